// tb_mmd_control: runs the controller against a behavioural 16-bit data path
// written in the testbench (R, A, -M, B, counter and an Addition Finished
// that comes L clocks after the adder enable, L = 1..4 standing for the
// number of cascaded devices). Each run must leave R = A*B mod M and take
// 1 + sum over the bits of B of (8 + 3L if the bit is 1, else 5 + L) clocks.
module tb_mmd_control;
  logic clk = 1'b0, reset;
  logic adfin, sign, cz, bi, run;
  logic aden, sam, ldr, sr, sb, clrr, dec, busy;
  int checks = 0, failures = 0;

  // behavioural data path
  logic [15:0] r, a, negm, b;
  logic [7:0]  c;
  logic [15:0] sum;
  int          aden_run, lat;

  mmd_control dut (.clk(clk), .reset(reset), .adfin(adfin), .sign(sign), .cz(cz),
                   .bi(bi), .run(run), .aden(aden), .sam(sam), .ldr(ldr), .sr(sr),
                   .sb(sb), .clrr(clrr), .dec(dec), .busy(busy));

  always #5 clk = ~clk;

  always_comb begin
    sum   = r + (sam ? a : negm);
    sign  = sum[15];
    bi    = b[15];
    cz    = (c == 8'd0);
    adfin = aden && (aden_run >= lat);
  end

  always_ff @(posedge clk) begin
    if (clrr)     r <= '0;
    else if (sr)  r <= {r[14:0], 1'b0};
    else if (ldr) r <= sum;
    if (sb)  b <= {b[14:0], 1'b0};
    if (dec) c <= c - 8'd1;
    aden_run <= aden ? aden_run + 1 : 0;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; run = 1'b0; r = '0; a = '0; negm = '0; b = '0; c = '0; aden_run = 0; lat = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    for (int t = 0; t < 60; t++) begin
      int unsigned mod, av, bv, expect_r, exp_cycles, cycles;
      lat  = 1 + (t % 4);
      mod  = 2 + ($urandom % 32767);          // M <= 2^15
      if (t == 0) mod = 32768;
      av   = $urandom % mod;
      bv   = (t == 1) ? 32'hffff : ($urandom & 32'hffff);
      expect_r = int'((longint'(av) * longint'(bv)) % longint'(mod));
      exp_cycles = 1;
      for (int i = 0; i < 16; i++) exp_cycles += bv[i] ? 8 + 3 * lat : 5 + lat;
      @(negedge clk);
      a = 16'(av); negm = 16'(-mod); b = 16'(bv); c = 8'd16;
      run = 1'b1;
      @(posedge clk);
      #1;
      cycles = 0;
      while (busy) begin
        @(posedge clk);
        #1;
        cycles++;
      end
      run = 1'b0;
      checks++;
      if (r !== 16'(expect_r)) begin
        failures++;
        $display("FAIL A=%0d B=%0d M=%0d R=%0d want %0d", av, bv, mod, r, expect_r);
      end
      checks++;
      if (cycles != exp_cycles) begin
        failures++;
        $display("FAIL L=%0d cycles %0d want %0d", lat, cycles, exp_cycles);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
