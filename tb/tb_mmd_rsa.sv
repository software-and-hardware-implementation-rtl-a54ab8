// tb_mmd_rsa: RSA encryption on the default cascade (15 devices, 240 bits),
// with the testbench playing the 8-bit host. The host runs exponentiation by
// repeated squaring and multiplying (C := M, T := M, e := e - 1; while e > 0:
// if e odd C := C*T, e := e - 1, else T := T*T, e := e / 2) and hands every
// modular multiplication to the hardware.
// Workload: the textbook example N = 53*61 = 3233, e = 71, message blocks
// 1704 1300 0818 1800 1302 0426, expected ciphertext
// 3106 0100 0931 2691 1984 2927. Every product is also checked against a
// reference, as is the busy time of each multiplication, and one full-width
// (240-bit) random multiplication is run at the end.
module tb_mmd_rsa;
  import mmd_pkg::*;
  localparam int NDEV = 15;
  localparam int N    = 16 * NDEV;
  localparam int AW   = 3 + $clog2(NDEV);

  logic          clk = 1'b0, reset;
  logic          cs, rw, run, busy, data_oe, carry_out;
  logic [AW-1:0] addr;
  logic [7:0]    data_in, data_out;
  int checks = 0, failures = 0;
  int n_mults = 0;

  mmd_cascade dut (
    .clk(clk), .reset(reset), .cs(cs), .rw(rw), .addr(addr), .data_in(data_in),
    .data_out(data_out), .data_oe(data_oe), .run(run), .busy(busy), .carry_out(carry_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_write(input int dev, input logic [2:0] ad, input logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b0; addr = AW'({dev[AW-4:0], ad}); data_in = v;
    @(negedge clk);
    cs = 1'b0; rw = 1'b1;
  endtask

  task automatic bus_read(input int dev, input logic [2:0] ad, output logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b1; addr = AW'({dev[AW-4:0], ad});
    #1;
    v = data_out;
    @(negedge clk);
    cs = 1'b0;
  endtask

  task automatic load_modulus(input logic [N-1:0] mod);
    logic [N-1:0] negm;
    negm = -mod;
    for (int k = 0; k < NDEV; k++) begin
      bus_write(k, ADR_M_LO, negm[16*k +: 8]);
      bus_write(k, ADR_M_HI, negm[16*k+8 +: 8]);
    end
  endtask

  // R := A*B mod M on the hardware (M already loaded).
  task automatic hw_mult(input logic [N-1:0] av, input logic [N-1:0] bv,
                         input logic [N-1:0] mod, output logic [N-1:0] res);
    logic [2*N-1:0] prod;
    logic [N-1:0]   expect_r;
    int             exp_cycles, cycles;
    for (int k = 0; k < NDEV; k++) begin
      bus_write(k, ADR_A_LO, av[16*k +: 8]); bus_write(k, ADR_A_HI, av[16*k+8 +: 8]);
      bus_write(k, ADR_B_LO, bv[16*k +: 8]); bus_write(k, ADR_B_HI, bv[16*k+8 +: 8]);
      bus_write(k, ADR_C, 8'(N));
    end
    prod = (2*N)'(av) * (2*N)'(bv);
    expect_r = N'(prod % (2*N)'(mod));
    exp_cycles = 1;
    for (int i = 0; i < N; i++) exp_cycles += bv[i] ? 8 + 3 * NDEV : 5 + NDEV;
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
    for (int k = 0; k < NDEV; k++) begin
      bus_read(k, ADR_A_LO, res[16*k +: 8]);
      bus_read(k, ADR_A_HI, res[16*k+8 +: 8]);
    end
    n_mults++;
    checks++;
    if (res !== expect_r) begin
      failures++;
      $display("FAIL A=%h B=%h R=%h want %h", av, bv, res, expect_r);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL cycles %0d want %0d", cycles, exp_cycles);
    end
  endtask

  task automatic hw_modexp(input logic [N-1:0] msg, input int unsigned e,
                           input logic [N-1:0] mod, output logic [N-1:0] c);
    logic [N-1:0] t;
    c = msg;
    t = msg;
    e = e - 1;
    while (e != 0) begin
      if (e[0]) begin
        hw_mult(c, t, mod, c);
        e = e - 1;
      end else begin
        hw_mult(t, t, mod, t);
        e = e / 2;
      end
    end
  endtask

  initial begin
    int unsigned msg [6] = '{1704, 1300, 818, 1800, 1302, 426};
    int unsigned ct  [6] = '{3106, 100, 931, 2691, 1984, 2927};
    logic [N-1:0] c, mod, av, bv, r;
    reset = 1'b1; cs = 1'b0; rw = 1'b1; run = 1'b0; addr = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    mod = N'(3233);
    load_modulus(mod);
    for (int i = 0; i < 6; i++) begin
      hw_modexp(N'(msg[i]), 71, mod, c);
      checks++;
      if (c !== N'(ct[i])) begin
        failures++;
        $display("FAIL block %0d: %0d^71 mod 3233 = %0d, want %0d", i, msg[i], c, ct[i]);
      end else begin
        $display("block %0d: %04d -> %04d", i, msg[i], c);
      end
    end
    // one full-width multiplication, M just below 2^(N-1)
    mod = {2'b01, {(N-2){1'b1}}} - N'(12345);
    for (int i = 0; i < N; i += 32) begin
      av = {av[N-33:0], 32'($urandom)};
      bv = {bv[N-33:0], 32'($urandom)};
    end
    av = av % mod;
    load_modulus(mod);
    hw_mult(av, bv, mod, r);
    $display("%0d hardware multiplications", n_mults);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
