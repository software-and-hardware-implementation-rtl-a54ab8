// tb_mcc_adder4: exhaustive check of the 4-bit Manchester carry-chain slice.
// With the enable high every a, b, carry-in combination must give the
// arithmetic sum; with it low the chain passes no carry (sum = a XOR b,
// carry out 0).
module tb_mcc_adder4;
  logic       en, cin, cout;
  logic [3:0] a, b, s;
  int checks = 0, failures = 0;

  mcc_adder4 dut (.en(en), .a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++)
          for (int k = 0; k < 2; k++) begin
            logic [4:0] expect_v;
            en = 1'(e); a = 4'(i); b = 4'(j); cin = 1'(k);
            #1;
            expect_v = e ? (5'(i) + 5'(j) + 5'(k)) : {1'b0, 4'(i) ^ 4'(j)};
            checks++;
            if ({cout, s} !== expect_v) begin
              failures++;
              $display("FAIL en=%0d a=%0d b=%0d cin=%0d got %0d want %0d", e, i, j, k, {cout, s}, expect_v);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
