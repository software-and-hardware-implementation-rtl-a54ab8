// tb_mmd_cascade: end-to-end test of a cascade of NDEV = 3 devices (48-bit
// modular multiplier). A behavioural 8-bit host loads every device's slices
// of A, B and -M and the bit count, raises RUN, waits for BUSY to fall and
// reads the 48-bit result back byte by byte. Checks: R = A*B mod M, the busy
// time 1 + sum over the bits of B of (8 + 3*NDEV if 1, else 5 + NDEV), and
// that every mechanism of the design happened: reduction taken and skipped,
// add of A taken and skipped, adder carry, R bits and B bits crossing from
// one device to the next, the Addition Complete ripple ending in ADFIN, a
// slave following the master's sign against its own adder MSB, and a
// shortened bit count.
module tb_mmd_cascade;
  import mmd_pkg::*;
  localparam int NDEV = 3;
  localparam int N    = 16 * NDEV;
  localparam int AW   = 3 + $clog2(NDEV);

  logic          clk = 1'b0, reset;
  logic          cs, rw, run, busy, data_oe, carry_out;
  logic [AW-1:0] addr;
  logic [7:0]    data_in, data_out;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_red_taken = 0, n_red_skipped = 0, n_add_a = 0, n_skip_a = 0;
  int n_carry_x = 0, n_rshift_x = 0, n_bshift_x = 0, n_adfin = 0;
  int n_slave_sign = 0, n_short = 0;

  mmd_cascade #(.NDEV(NDEV)) dut (
    .clk(clk), .reset(reset), .cs(cs), .rw(rw), .addr(addr), .data_in(data_in),
    .data_out(data_out), .data_oe(data_oe), .run(run), .busy(busy), .carry_out(carry_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism monitors (master controller decides for all devices).
  mmd_state_e st;
  assign st = dut.g_dev[NDEV-1].u_dev.u_ctrl.state;
  logic adfin_q;
  always_ff @(posedge clk) begin
    automatic logic ldr = dut.g_dev[NDEV-1].u_dev.u_ctrl.ldr;
    automatic logic adfin = dut.adfin;
    if ((st == ST_ADDM1 || st == ST_ADDM2) && adfin) begin
      if (ldr) n_red_taken++; else n_red_skipped++;
    end
    if (st == ST_TESTB) begin
      if (dut.bmsb) n_add_a++; else n_skip_a++;
    end
    if (dut.g_dev[0].u_dev.u_ctrl.aden && dut.carry[1]) n_carry_x++;
    if (dut.g_dev[0].u_dev.u_ctrl.sr && dut.rchain[1]) n_rshift_x++;
    if (dut.g_dev[0].u_dev.u_ctrl.sb && dut.bchain[1]) n_bshift_x++;
    if (adfin && !adfin_q) n_adfin++;
    if (dut.g_dev[0].u_dev.u_ctrl.aden && dut.g_dev[0].u_dev.sign != dut.g_dev[0].u_dev.sum[15]) n_slave_sign++;
    adfin_q <= adfin;
  end

  task automatic bus_write(input int dev, input logic [2:0] ad, input logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b0; addr = AW'({dev[AW-4:0], ad}); data_in = v;
    @(negedge clk);
    cs = 1'b0; rw = 1'b1;
  endtask

  task automatic bus_read(input int dev, input logic [2:0] ad, output logic [7:0] v);
    @(negedge clk);
    cs = 1'b1; rw = 1'b1; addr = AW'({dev[AW-4:0], ad});
    #1;
    v = data_out;
    checks++;
    if (!data_oe) begin failures++; $display("FAIL data_oe low during read"); end
    @(negedge clk);
    cs = 1'b0;
  endtask

  task automatic multiply(input logic [N-1:0] av, input logic [N-1:0] bv,
                          input logic [N-1:0] mod, input int nbits);
    logic [N-1:0]   negm, bused, expect_r, got;
    logic [2*N-1:0] prod;
    int             exp_cycles, cycles;
    negm = -mod;
    for (int k = 0; k < NDEV; k++) begin
      bus_write(k, ADR_A_LO, av[16*k +: 8]);   bus_write(k, ADR_A_HI, av[16*k+8 +: 8]);
      bus_write(k, ADR_B_LO, bv[16*k +: 8]);   bus_write(k, ADR_B_HI, bv[16*k+8 +: 8]);
      bus_write(k, ADR_M_LO, negm[16*k +: 8]); bus_write(k, ADR_M_HI, negm[16*k+8 +: 8]);
      bus_write(k, ADR_C, 8'(nbits));
    end
    bused = bv >> (N - nbits);
    prod = (2*N)'(av) * (2*N)'(bused);
    expect_r = N'(prod % (2*N)'(mod));
    exp_cycles = 1;
    for (int i = N - nbits; i < N; i++) exp_cycles += bv[i] ? 8 + 3 * NDEV : 5 + NDEV;
    if (nbits < N) n_short++;
    @(negedge clk) run = 1'b1;
    @(posedge clk);
    #1;
    cycles = 0;
    while (busy) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    @(negedge clk) run = 1'b0;
    for (int k = 0; k < NDEV; k++) begin
      bus_read(k, ADR_A_LO, got[16*k +: 8]);
      bus_read(k, ADR_A_HI, got[16*k+8 +: 8]);
    end
    checks++;
    if (got !== expect_r) begin
      failures++;
      $display("FAIL A=%h B=%h M=%h bits=%0d R=%h want %h", av, bv, mod, nbits, got, expect_r);
    end
    checks++;
    if (cycles != exp_cycles) begin
      failures++;
      $display("FAIL cycles %0d want %0d", cycles, exp_cycles);
    end
  endtask

  function automatic logic [N-1:0] rand_n();
    logic [N+31:0] v;
    v = '0;
    for (int i = 0; i < N; i += 32) v = {v[N-1:0], 32'($urandom)};
    return v[N-1:0];
  endfunction

  task automatic report(input string name, input int n);
    checks++;
    if (n == 0) begin failures++; $display("FAIL mechanism never seen: %s", name); end
    else $display("mechanism %-28s %0d", name, n);
  endtask

  initial begin
    logic [N-1:0] mod;
    reset = 1'b1; cs = 1'b0; rw = 1'b1; run = 1'b0; addr = '0; data_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 1'b0;
    mod = {1'b1, {(N-1){1'b0}}};                       // M = 2^(N-1)
    multiply(mod - 1, '1, mod, N);
    multiply(48'd1704, 48'd1704, 48'd3233, N);
    multiply(48'd12345, 48'hF0F0_0000_0000, 48'd99991, 8);
    for (int t = 0; t < 25; t++) begin
      mod = rand_n() >> (1 + $urandom % 40);
      if (mod < 2) mod = 2;
      multiply(rand_n() % mod, rand_n(), mod, N);
    end
    report("reduction taken", n_red_taken);
    report("reduction skipped", n_red_skipped);
    report("add A (B bit 1)", n_add_a);
    report("add A skipped (B bit 0)", n_skip_a);
    report("carry into a slave", n_carry_x);
    report("R bit into next device", n_rshift_x);
    report("B bit into next device", n_bshift_x);
    report("ADFIN after ripple", n_adfin);
    report("slave follows master sign", n_slave_sign);
    report("shortened bit count", n_short);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
