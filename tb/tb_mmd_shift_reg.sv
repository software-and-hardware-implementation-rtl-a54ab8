// tb_mmd_shift_reg: random sequences of load (per byte), shift with serial
// input, clear and hold on the R/B shift register against a model.
module tb_mmd_shift_reg;
  logic        clk = 1'b0, reset;
  logic        clr, sh, sin, sout;
  logic [1:0]  ld;
  logic [15:0] d, q, model;
  int checks = 0, failures = 0;

  mmd_shift_reg #(.W(16)) dut (.clk(clk), .reset(reset), .clr(clr), .ld(ld),
                               .sh(sh), .d(d), .sin(sin), .q(q), .sout(sout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; clr = 0; sh = 0; sin = 0; ld = '0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      clr = ($urandom % 10) == 0;
      sh  = 1'($urandom);
      ld  = 2'($urandom);
      sin = 1'($urandom);
      d   = 16'($urandom);
      @(posedge clk);
      if (clr)             model = '0;
      else if (sh && ld == 2'b00) model = {model[14:0], sin};
      else if (!sh) begin
        if (ld[0]) model[7:0]  = d[7:0];
        if (ld[1]) model[15:8] = d[15:8];
      end
      #1;
      checks++;
      if (q !== model || sout !== model[15]) begin
        failures++;
        $display("FAIL clr=%0d sh=%0d ld=%b sin=%0d q=%h want %h", clr, sh, ld, sin, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
