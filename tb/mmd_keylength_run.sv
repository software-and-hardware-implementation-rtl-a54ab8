// mmd_keylength_run: drives one cascade of NDEV devices (key length
// 2*NDEV bytes) through worst-case multiplications (all bits of B set, bit
// count = 16*NDEV) as an 8-bit host would, and checks the product and the
// busy time 1 + 16*NDEV*(8 + 3*NDEV). Reports the time per multiplication
// in clocks, counting one clock per loaded byte (7 per device) plus the busy
// time, next to the source design's 12*N_B^2 + 116*N_B for the same N_B.
// Used by tb_mmd_keylengths; starts on START and raises DONE at the end.
module mmd_keylength_run #(
  parameter int NDEV = 1
) (
  input  logic clk,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);
  import mmd_pkg::*;
  localparam int N  = 16 * NDEV;
  localparam int AW = 3 + ((NDEV > 1) ? $clog2(NDEV) : 1);

  logic          reset, cs, rw, run, busy, data_oe, carry_out;
  logic [AW-1:0] addr;
  logic [7:0]    data_in, data_out;

  mmd_cascade #(.NDEV(NDEV)) dut (
    .clk(clk), .reset(reset), .cs(cs), .rw(rw), .addr(addr), .data_in(data_in),
    .data_out(data_out), .data_oe(data_oe), .run(run), .busy(busy), .carry_out(carry_out)
  );

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

  initial begin
    logic [N-1:0]   mod, negm, av, bv, got, expect_r;
    logic [2*N-1:0] prod;
    int             cycles, exp_cycles, nb;
    done = 1'b0; checks = 0; failures = 0;
    reset = 1'b1; cs = 1'b0; rw = 1'b1; run = 1'b0; addr = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    wait (start);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < N; i += 16) mod[i +: 16] = 16'($urandom);
      mod[N-1] = 1'b0;                 // M < 2^(N-1)
      mod[N-2] = 1'b1;                 // a full-length modulus
      for (int i = 0; i < N; i += 16) av[i +: 16] = 16'($urandom);
      av   = av % mod;
      bv   = '1;
      negm = -mod;
      for (int k = 0; k < NDEV; k++) begin
        bus_write(k, ADR_A_LO, av[16*k +: 8]);   bus_write(k, ADR_A_HI, av[16*k+8 +: 8]);
        bus_write(k, ADR_B_LO, bv[16*k +: 8]);   bus_write(k, ADR_B_HI, bv[16*k+8 +: 8]);
        bus_write(k, ADR_M_LO, negm[16*k +: 8]); bus_write(k, ADR_M_HI, negm[16*k+8 +: 8]);
        bus_write(k, ADR_C, 8'(N));
      end
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
        bus_read(k, ADR_A_LO, got[16*k +: 8]);
        bus_read(k, ADR_A_HI, got[16*k+8 +: 8]);
      end
      prod = (2*N)'(av) * (2*N)'(bv);
      expect_r = N'(prod % (2*N)'(mod));
      exp_cycles = 1 + N * (8 + 3 * NDEV);
      checks += 2;
      if (got !== expect_r) begin
        failures++;
        $display("FAIL NDEV=%0d R=%h want %h", NDEV, got, expect_r);
      end
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL NDEV=%0d busy %0d clocks, want %0d", NDEV, cycles, exp_cycles);
      end
      nb = 2 * NDEV;
      if (t == 0)
        $display("key %2d bytes: %6d clocks per multiplication (7 per device to load + %0d busy); source design %6d",
                 nb, 7 * NDEV + cycles, cycles, 12 * nb * nb + 116 * nb);
    end
    done = 1'b1;
  end
endmodule
