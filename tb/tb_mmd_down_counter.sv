// tb_mmd_down_counter: load, count down to zero (zero flag), wrap-around and
// load priority of the 8-bit bit counter.
module tb_mmd_down_counter;
  logic       clk = 1'b0, reset, load, dec, zero;
  logic [7:0] d, q, model;
  int checks = 0, failures = 0;

  mmd_down_counter #(.W(8)) dut (.clk(clk), .reset(reset), .load(load), .d(d),
                                 .dec(dec), .q(q), .zero(zero));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; load = 0; dec = 0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom % 40) == 0;
      dec  = ($urandom % 4) != 0;
      d    = 8'($urandom);
      @(posedge clk);
      if (load)     model = d;
      else if (dec) model = model - 8'd1;
      #1;
      checks++;
      if (q !== model || zero !== (model == 8'd0)) begin
        failures++;
        $display("FAIL load=%0d dec=%0d q=%0d zero=%0d want %0d", load, dec, q, zero, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
