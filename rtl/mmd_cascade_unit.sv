// mmd_cascade_unit: cascade and master/slave unit of one device.
//
// In a cascade the most significant device is the master and makes the two
// decisions the controller needs; the others are slaves and copy them, so
// every device's controller takes the same path in lock step.
//  - B bit: the master uses the MSB of its own B register (BOUT) and
//    broadcasts it on DOUT; a slave ignores its own B MSB and uses DIN.
//  - Sign: the master takes the MSB of its own adder output as the sign of the
//    whole sum and broadcasts it on SGNO; a slave uses SGNI.
// It also holds the Addition Complete cell (see mmd_add_complete).
// The multiplexers and pin names follow the source design. DOUT and SGNO are
// plain wires from BOUT and the adder MSB in every device; only the master's
// are connected in a cascade. Combinational, except for the Addition
// Complete register.
module mmd_cascade_unit (
  input  logic clk,
  input  logic reset,
  input  logic ms,        // 1: master (most significant device)
  // B most significant bit
  input  logic bout,      // MSB of this device's B register
  input  logic din,       // B MSB from the master
  output logic dout,      // B MSB broadcast
  output logic bi,        // B bit used by the controller
  // sign of the adder output
  input  logic sum_msb,   // MSB of this device's adder output
  input  logic sgni,      // sign from the master
  output logic sgno,      // sign broadcast
  output logic sign,      // sign used by the controller
  // addition complete chain
  input  logic aden,
  input  logic ain,
  output logic aout
);
  assign dout = bout;
  assign bi   = ms ? bout : din;
  assign sgno = sum_msb;
  assign sign = ms ? sum_msb : sgni;

  mmd_add_complete u_addc (
    .clk  (clk),
    .reset(reset),
    .aden (aden),
    .ain  (ain),
    .aout (aout)
  );
endmodule
