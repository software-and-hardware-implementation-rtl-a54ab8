// mmd_adder: computation unit of the modular multiplication device.
//
// Adds the result register R to either operand A or the stored modulus -M,
// chosen by SAM, so one adder performs both R+A and R-M of Blakley's
// algorithm. It is built from W/4 Manchester carry-chain slices connected
// carry to carry. The carry in comes from the next less significant device
// (0 on the least significant one) and the carry out goes to the next more
// significant device, so cascaded devices form one long adder.
// Combinational: the sum is valid in the cycle in which ADEN is high, after
// the carry has rippled through all cascaded devices.
// Follows the source design except that the tri-state A/M operand bus is
// replaced by a multiplexer.
module mmd_adder #(
  parameter int unsigned W = mmd_pkg::DATA_W
) (
  input  logic         aden,   // adder enable
  input  logic         sam,    // 1: R + A, 0: R + M register (-M)
  input  logic [W-1:0] a,
  input  logic [W-1:0] m,
  input  logic [W-1:0] r,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NSLICE = W / 4;

  logic [W-1:0]      opnd;
  logic [NSLICE:0]   carry;

  assign opnd     = sam ? a : m;
  assign carry[0] = cin;

  for (genvar k = 0; k < NSLICE; k++) begin : g_slice
    mcc_adder4 u_slice (
      .en  (aden),
      .a   (r[4*k +: 4]),
      .b   (opnd[4*k +: 4]),
      .cin (carry[k]),
      .s   (sum[4*k +: 4]),
      .cout(carry[k+1])
    );
  end

  assign cout = carry[NSLICE];

  initial assert (W % 4 == 0) else $error("mmd_adder: W must be a multiple of 4");
endmodule
