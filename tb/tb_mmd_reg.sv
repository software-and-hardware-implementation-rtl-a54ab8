// tb_mmd_reg: byte-lane loading, holding and reset of the A/M register.
module tb_mmd_reg;
  logic        clk = 1'b0, reset;
  logic [1:0]  load;
  logic [7:0]  d;
  logic [15:0] q, model;
  int checks = 0, failures = 0;

  mmd_reg #(.W(16)) dut (.clk(clk), .reset(reset), .load(load), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = '0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL reset value %h", q); end
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      load = 2'($urandom);
      d    = 8'($urandom);
      @(posedge clk);
      if (load[0]) model[7:0]  = d;
      if (load[1]) model[15:8] = d;
      #1;
      checks++;
      if (q !== model) begin failures++; $display("FAIL load=%b d=%h q=%h want %h", load, d, q, model); end
    end
    @(negedge clk) reset = 1'b1;
    #1;
    checks++;
    if (q !== 16'h0) begin failures++; $display("FAIL async reset %h", q); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
