// tb_mmd_cascade_unit: master/slave selection of the B bit and the sign, the
// broadcast outputs and the Addition Complete register.
module tb_mmd_cascade_unit;
  logic clk = 1'b0, reset;
  logic ms, bout, din, dout, bi, sum_msb, sgni, sgno, sign, aden, ain, aout;
  int checks = 0, failures = 0;

  mmd_cascade_unit dut (.clk(clk), .reset(reset), .ms(ms), .bout(bout), .din(din),
                        .dout(dout), .bi(bi), .sum_msb(sum_msb), .sgni(sgni),
                        .sgno(sgno), .sign(sign), .aden(aden), .ain(ain), .aout(aout));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_aout;
    reset = 1'b1; {ms, bout, din, sum_msb, sgni, aden, ain} = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    exp_aout = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      {ms, bout, din, sum_msb, sgni, aden, ain} = 7'($urandom);
      #1;
      checks++;
      if (bi !== (ms ? bout : din) || sign !== (ms ? sum_msb : sgni) ||
          dout !== bout || sgno !== sum_msb || aout !== exp_aout) begin
        failures++;
        $display("FAIL ms=%0d bout=%0d din=%0d bi=%0d sum=%0d sgni=%0d sign=%0d aout=%0d",
                 ms, bout, din, bi, sum_msb, sgni, sign, aout);
      end
      @(posedge clk);
      exp_aout = aden & ain;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
