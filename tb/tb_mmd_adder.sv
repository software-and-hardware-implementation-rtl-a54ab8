// tb_mmd_adder: random and corner-case check of the 16-bit computation unit:
// sum and carry out of R + A (SAM=1) and R + M (SAM=0) with carry in.
module tb_mmd_adder;
  logic        aden, sam, cin, cout;
  logic [15:0] a, m, r, sum;
  int checks = 0, failures = 0;

  mmd_adder #(.W(16)) dut (.aden(aden), .sam(sam), .a(a), .m(m), .r(r),
                           .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [16:0] exp_v;
    #1;
    exp_v = 17'(r) + 17'(sam ? a : m) + 17'(cin);
    checks++;
    if ({cout, sum} !== exp_v) begin
      failures++;
      $display("FAIL r=%h a=%h m=%h sam=%0d cin=%0d got %h want %h", r, a, m, sam, cin, {cout, sum}, exp_v);
    end
  endtask

  initial begin
    aden = 1'b1;
    // full-length carry ripple
    r = 16'hffff; a = 16'h0000; m = 16'h0001; sam = 1'b0; cin = 1'b0; check();
    r = 16'hffff; a = 16'h0000; m = 16'h0000; sam = 1'b1; cin = 1'b1; check();
    r = 16'h8000; a = 16'h8000; m = 16'h0000; sam = 1'b1; cin = 1'b0; check();
    for (int i = 0; i < 2000; i++) begin
      r = 16'($urandom); a = 16'($urandom); m = 16'($urandom);
      sam = 1'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
