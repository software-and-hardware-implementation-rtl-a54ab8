// mmd_shift_reg: parallel-load, left-shifting register used for the result
// register R and the control register B.
//
// Every cell selects between three inputs: its own output (hold), its load
// data (load) and the output of the cell below it (shift). An end cell per
// register decodes the two control lines LD and SH into these three
// exclusive selects; when both are asserted the register holds. The bit shifted in at the bottom
// comes from the next less significant device (RIN/BIN, 0 on the least
// significant device) and the top bit leaves as ROUT/BOUT.
// Load is per byte lane: R is loaded as a whole from the adder (all lanes at
// once), B a byte at a time from the bus. CLR clears the register (CLRR).
// Timing: all actions take effect on the rising clock edge; reset is
// asynchronous.
// The cell and end-cell structure follow the source design; the priority of
// clear over load/shift is this design's choice.
module mmd_shift_reg #(
  parameter int unsigned W = mmd_pkg::DATA_W
) (
  input  logic           clk,
  input  logic           reset,
  input  logic           clr,              // synchronous clear
  input  logic [W/8-1:0] ld,               // load strobe per byte lane
  input  logic           sh,               // shift left by one
  input  logic [W-1:0]   d,                // parallel load data
  input  logic           sin,              // bit shifted in at bit 0
  output logic [W-1:0]   q,
  output logic           sout              // most significant bit
);
  logic           sel_shift;
  logic [W/8-1:0] sel_load;

  // End cell: exclusive select lines.
  assign sel_shift = sh & ~(|ld);
  assign sel_load  = ld & {(W/8){~sh}};

  always_ff @(posedge clk or posedge reset) begin
    if (reset) begin
      q <= '0;
    end else if (clr) begin
      q <= '0;
    end else if (sel_shift) begin
      q <= {q[W-2:0], sin};
    end else begin
      for (int k = 0; k < W/8; k++) begin
        if (sel_load[k]) q[8*k +: 8] <= d[8*k +: 8];
      end
    end
  end

  assign sout = q[W-1];
endmodule
