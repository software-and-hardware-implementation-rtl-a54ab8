// mmd_device: one modular multiplication device (MMD), a 16-bit slice of a
// cascadable Blakley modular multiplier R = A*B mod M.
//
// Units: the interface unit (bus decode and read-back of R), the storage unit
// (operand register A, modulus register M holding -M, control shift register
// B, result shift register R, 8-bit bit counter C), the computation unit
// (16-bit Manchester carry-chain adder R + A or R + (-M)), the cascade and
// master/slave unit and the control unit.
// A lone device is used with MS = 1, CIN = RIN = BIN = 0, AIN = 1 and
// ADFIN = AOUT, DIN = DOUT, SGNI = SGNO. In a cascade the most significant
// device is the master (MS = 1); every device is loaded over the bus with its
// own 16-bit slices of A, B and -M and with the same bit count, all receive
// RUN together and run their controllers in lock step on the master's
// decisions.
// Operand rules: the whole cascade of n bits needs M <= 2^(n-1) (the top bit
// serves as the sign of R - M) and A < M; B may be any n-bit value and C
// bits of it, from the top, are used. The product is then R = A*B' mod M,
// with B' the top C bits of B.
// Timing: see mmd_control for cycles per bit; the result can be read as soon
// as BUSY falls.
// Structure and pin names follow the source design; the split data bus
// (data_in, data_out, data_oe) replaces its bidirectional tri-state bus.
module mmd_device
  import mmd_pkg::*;
(
  input  logic              clk,
  input  logic              reset,
  input  logic              ms,        // 1: master / most significant device
  // microprocessor bus
  input  logic              cs,
  input  logic              rw,
  input  logic [ADDR_W-1:0] addr,
  input  logic [BUS_W-1:0]  data_in,
  output logic [BUS_W-1:0]  data_out,
  output logic              data_oe,
  input  logic              run,
  output logic              busy,
  // cascade pins
  input  logic              cin,       // adder carry from previous stage
  output logic              cout,
  input  logic              rin,       // R MSB of previous stage
  output logic              rout,
  input  logic              bin,       // B MSB of previous stage
  output logic              bout,
  input  logic              din,       // B MSB from the master
  output logic              dout,
  input  logic              sgni,      // sign from the master
  output logic              sgno,
  input  logic              ain,       // addition complete from previous stage
  output logic              aout,
  input  logic              adfin      // addition finished (master's AOUT)
);
  logic [1:0]        ld_a, ld_b, ld_m;
  logic              ld_c;
  logic [DATA_W-1:0] a_q, m_q, b_q, r_q, sum;
  logic [CNT_W-1:0]  c_q;
  logic              cz, bi, sign;
  logic              aden, sam, ldr, sr, sb, clrr, dec;

  mmd_interface u_if (
    .cs      (cs),
    .rw      (rw),
    .addr    (addr),
    .r       (r_q),
    .ld_a    (ld_a),
    .ld_b    (ld_b),
    .ld_m    (ld_m),
    .ld_c    (ld_c),
    .data_out(data_out),
    .data_oe (data_oe)
  );

  // Storage unit
  mmd_reg #(.W(DATA_W)) u_reg_a (
    .clk(clk), .reset(reset), .load(ld_a), .d(data_in), .q(a_q)
  );

  mmd_reg #(.W(DATA_W)) u_reg_m (
    .clk(clk), .reset(reset), .load(ld_m), .d(data_in), .q(m_q)
  );

  mmd_shift_reg #(.W(DATA_W)) u_reg_b (
    .clk(clk), .reset(reset), .clr(1'b0), .ld(ld_b), .sh(sb),
    .d({data_in, data_in}), .sin(bin), .q(b_q), .sout(bout)
  );

  mmd_shift_reg #(.W(DATA_W)) u_reg_r (
    .clk(clk), .reset(reset), .clr(clrr), .ld({ldr, ldr}), .sh(sr),
    .d(sum), .sin(rin), .q(r_q), .sout(rout)
  );

  mmd_down_counter #(.W(CNT_W)) u_cnt_c (
    .clk(clk), .reset(reset), .load(ld_c), .d(data_in), .dec(dec),
    .q(c_q), .zero(cz)
  );

  // Computation unit
  mmd_adder #(.W(DATA_W)) u_adder (
    .aden(aden), .sam(sam), .a(a_q), .m(m_q), .r(r_q),
    .cin(cin), .sum(sum), .cout(cout)
  );

  // Cascade and master/slave unit
  mmd_cascade_unit u_casc (
    .clk    (clk),
    .reset  (reset),
    .ms     (ms),
    .bout   (bout),
    .din    (din),
    .dout   (dout),
    .bi     (bi),
    .sum_msb(sum[DATA_W-1]),
    .sgni   (sgni),
    .sgno   (sgno),
    .sign   (sign),
    .aden   (aden),
    .ain    (ain),
    .aout   (aout)
  );

  // Control unit
  mmd_control u_ctrl (
    .clk  (clk),
    .reset(reset),
    .adfin(adfin),
    .sign (sign),
    .cz   (cz),
    .bi   (bi),
    .run  (run),
    .aden (aden),
    .sam  (sam),
    .ldr  (ldr),
    .sr   (sr),
    .sb   (sb),
    .clrr (clrr),
    .dec  (dec),
    .busy (busy)
  );

  // The counter value and B are only observed through CZ and BOUT.
  logic unused_q;
  assign unused_q = ^{c_q, b_q};
endmodule
