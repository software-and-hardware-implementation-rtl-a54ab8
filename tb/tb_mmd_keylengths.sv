// tb_mmd_keylengths: worst-case modular multiplication time against key
// length. Cascades of 1, 2, 3, 4, 6, 8, 10, 12 and 15 devices (key lengths
// 2 to 30 bytes, the largest the 8-bit bit counter allows) each run three
// multiplications with every bit of B set; products and busy times are
// checked and the time per multiplication is printed beside the source
// design's formula.
module tb_mmd_keylengths;
  localparam int NRUN = 9;
  localparam int SIZES [NRUN] = '{1, 2, 3, 4, 6, 8, 10, 12, 15};

  logic clk = 1'b0, start = 1'b0;
  logic [NRUN-1:0] done;
  int   chk [NRUN];
  int   fail [NRUN];
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NRUN; i++) begin : g_run
    mmd_keylength_run #(.NDEV(SIZES[i])) u_run (
      .clk(clk), .start(start), .done(done[i]), .checks(chk[i]), .failures(fail[i])
    );
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5) @(posedge clk);
    start = 1'b1;
    wait (&done);
    for (int i = 0; i < NRUN; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
