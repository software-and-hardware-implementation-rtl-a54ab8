// tb_mmd_interface: every address with read and write cycles and with the
// chip deselected; checks the byte load strobes, the read-back of R and the
// output enable.
module tb_mmd_interface;
  import mmd_pkg::*;
  logic        cs, rw, ld_c, data_oe;
  logic [2:0]  addr;
  logic [15:0] r;
  logic [1:0]  ld_a, ld_b, ld_m;
  logic [7:0]  data_out;
  int checks = 0, failures = 0;

  mmd_interface dut (.cs(cs), .rw(rw), .addr(addr), .r(r), .ld_a(ld_a), .ld_b(ld_b),
                     .ld_m(ld_m), .ld_c(ld_c), .data_out(data_out), .data_oe(data_oe));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      logic [6:0] exp_ld;
      logic [7:0] exp_d;
      cs = 1'($urandom); rw = 1'($urandom); addr = 3'($urandom); r = 16'($urandom);
      #1;
      exp_ld = '0;
      if (cs && !rw && addr != 3'd7) exp_ld[addr] = 1'b1;
      exp_d = 8'h00;
      if (cs && rw && addr == 3'd0) exp_d = r[7:0];
      if (cs && rw && addr == 3'd1) exp_d = r[15:8];
      checks++;
      if ({ld_c, ld_m, ld_b, ld_a} !== exp_ld || data_oe !== (cs & rw) || data_out !== exp_d) begin
        failures++;
        $display("FAIL cs=%0d rw=%0d addr=%0d strobes=%b oe=%0d dout=%h", cs, rw, addr,
                 {ld_c, ld_m, ld_b, ld_a}, data_oe, data_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
