// tb_mmd_device: a single modular multiplication device used on its own
// (master, cascade inputs tied off, ADFIN/DIN/SGNI looped back from its own
// outputs). Loads A, B, -M and the bit count over the 8-bit bus, pulses RUN,
// waits for BUSY to fall and reads R back over the bus. R must equal
// A*B mod M (M <= 2^15, A < M), the busy time must be 1 + sum over the bits
// of B of (11 if 1, else 6) clocks, and a shorter bit count must use only
// the top bits of B.
module tb_mmd_device;
  import mmd_pkg::*;
  logic       clk = 1'b0, reset;
  logic       cs, rw, run, busy, data_oe;
  logic [2:0] addr;
  logic [7:0] data_in, data_out;
  logic       cout, rout, bout, dout, sgno, aout;
  int checks = 0, failures = 0;

  mmd_device dut (
    .clk(clk), .reset(reset), .ms(1'b1), .cs(cs), .rw(rw), .addr(addr),
    .data_in(data_in), .data_out(data_out), .data_oe(data_oe), .run(run), .busy(busy),
    .cin(1'b0), .cout(cout), .rin(1'b0), .rout(rout), .bin(1'b0), .bout(bout),
    .din(dout), .dout(dout), .sgni(sgno), .sgno(sgno), .ain(1'b1), .aout(aout), .adfin(aout)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input logic [2:0] ad, input logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b0; addr = ad; data_in = v;
    @(negedge clk);
    cs = 1'b0; rw = 1'b1;
  endtask

  task automatic bus_read(input logic [2:0] ad, output logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b1; addr = ad;
    #1;
    v = data_out;
    checks++;
    if (!data_oe) begin failures++; $display("FAIL data_oe low during read"); end
    @(negedge clk);
    cs = 1'b0;
  endtask

  task automatic multiply(input int unsigned av, input int unsigned bv, input int unsigned mod,
                          input int unsigned nbits);
    logic [15:0] negm;
    logic [7:0]  lo, hi;
    int unsigned bused, expect_r, exp_cycles, cycles;
    negm = 16'(-mod);
    bus_write(ADR_A_LO, av[7:0]);   bus_write(ADR_A_HI, av[15:8]);
    bus_write(ADR_B_LO, bv[7:0]);   bus_write(ADR_B_HI, bv[15:8]);
    bus_write(ADR_M_LO, negm[7:0]); bus_write(ADR_M_HI, negm[15:8]);
    bus_write(ADR_C, 8'(nbits));
    bused = bv >> (16 - nbits);
    expect_r = int'((longint'(av) * longint'(bused)) % longint'(mod));
    exp_cycles = 1;
    for (int i = 16 - nbits; i < 16; i++) exp_cycles += bv[i] ? 11 : 6;
    @(negedge clk) run = 1'b1;
    @(posedge clk);
    #1;
    cycles = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    @(negedge clk) run = 1'b0;
    bus_read(ADR_A_LO, lo);
    bus_read(ADR_A_HI, hi);
    checks++;
    if ({hi, lo} !== 16'(expect_r)) begin
      failures++;
      $display("FAIL A=%0d B=%0d M=%0d bits=%0d R=%0d want %0d", av, bv, mod, nbits, {hi, lo}, expect_r);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL cycles %0d want %0d", cycles, exp_cycles);
    end
  endtask

  initial begin
    reset = 1'b1; cs = 1'b0; rw = 1'b1; run = 1'b0; addr = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    multiply(32767, 65535, 32768, 16);   // largest modulus, all B bits set
    multiply(1, 1, 2, 16);
    multiply(0, 12345, 977, 16);
    multiply(1704, 1704, 3233, 16);
    multiply(500, 16'hA000, 3001, 4);    // only the top 4 bits of B
    for (int t = 0; t < 40; t++) begin
      int unsigned mod;
      mod = 2 + ($urandom % 32767);
      multiply($urandom % mod, $urandom & 32'hffff, mod, 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
