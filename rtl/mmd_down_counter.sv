// mmd_down_counter: bit counter C, a loadable down counter with zero detect.
//
// Serial feed-forward structure: a borrow enters the least significant cell
// (tied to 1 while counting) and each cell passes it on only if its own bit
// is 0. A cell whose borrow-in is set toggles. The counter is loaded from the
// bus with the number of bits to process and is decremented once per
// iteration of the multiplication loop; ZERO tells the controller it has
// reached zero.
// Timing: load and decrement act on the rising clock edge (load wins);
// reset is asynchronous. ZERO is combinational from the count.
// The cell chain follows the source design; the priority of load over
// decrement is this design's choice.
module mmd_down_counter #(
  parameter int unsigned W = mmd_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [W-1:0] d,
  input  logic         dec,
  output logic [W-1:0] q,
  output logic         zero
);
  logic [W-1:0] borrow;   // borrow[i] enters cell i
  logic [W-1:0] next_q;

  assign borrow[0] = 1'b1;
  for (genvar i = 0; i < W; i++) begin : g_cell
    assign next_q[i] = q[i] ^ borrow[i];
    if (i < W - 1) begin : g_borrow
      assign borrow[i+1] = borrow[i] & ~q[i];
    end
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset)     q <= '0;
    else if (load) q <= d;
    else if (dec)  q <= next_q;
  end

  assign zero = (q == '0);
endmodule
