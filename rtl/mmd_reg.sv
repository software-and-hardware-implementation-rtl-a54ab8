// mmd_reg: byte-loadable storage register, used for operand A and for the
// modulus register M (which holds -M).
//
// A row of D-type cells with a common reset. Each byte lane has its own load
// strobe so that the 8-bit microprocessor bus can fill a W-bit register one
// byte at a time. The stored value drives the adder's operand input
// continuously; the selection between A and M is made at the adder.
// Timing: a lane loads on the rising clock edge on which its strobe is high;
// reset is asynchronous and clears the register.
// The cell structure (D-type, load, reset) follows the source design; edge
// triggering and the multiplexed (not tri-state) output are this design's
// choices.
module mmd_reg #(
  parameter int unsigned W = mmd_pkg::DATA_W
) (
  input  logic           clk,
  input  logic           reset,
  input  logic [W/8-1:0] load,   // one strobe per byte lane
  input  logic [7:0]     d,      // internal input data bus
  output logic [W-1:0]   q
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q <= '0;
    end else begin
      for (int k = 0; k < W/8; k++) begin
        if (load[k]) q[8*k +: 8] <= d;
      end
    end
  end
endmodule
