// tb_mmd_add_complete: four Addition Complete cells chained as in a cascade.
// After the adder enable rises, AOUT of cell k must rise exactly k+1 clocks
// later; when the enable falls every AOUT must clear on the next edge.
module tb_mmd_add_complete;
  localparam int N = 4;
  logic         clk = 1'b0, reset, aden;
  logic [N:0]   chain;
  int checks = 0, failures = 0;

  assign chain[0] = 1'b1;
  for (genvar k = 0; k < N; k++) begin : g_c
    mmd_add_complete u (.clk(clk), .reset(reset), .aden(aden), .ain(chain[k]), .aout(chain[k+1]));
  end

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; aden = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int trial = 0; trial < 20; trial++) begin
      int hold;
      hold = 1 + ($urandom % 8);
      @(negedge clk) aden = 1'b1;
      for (int t = 1; t <= hold; t++) begin
        @(negedge clk);
        for (int k = 1; k <= N; k++) begin
          checks++;
          if (chain[k] !== (t >= k)) begin
            failures++;
            $display("FAIL trial %0d t=%0d cell %0d aout=%0d", trial, t, k - 1, chain[k]);
          end
        end
      end
      aden = 1'b0;
      @(negedge clk);
      checks++;
      if (chain[N:1] !== '0) begin failures++; $display("FAIL not cleared %b", chain); end
      repeat ($urandom % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
