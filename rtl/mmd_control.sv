// mmd_control: control unit of the modular multiplication device.
//
// A Moore/Mealy state machine that runs Blakley's interleaved modular
// multiplication R = A*B mod M, scanning B from its most significant bit:
//   R := 0
//   repeat C times:
//     R := 2R;        if R - M >= 0 then R := R - M
//     if bit of B = 1: R := R + A;  if R - M >= 0 then R := R - M
//     shift B left, C := C - 1
// The modulus register holds -M, so every step is an addition of R and either
// A or -M (SAM selects). An add state raises ADEN and waits for ADFIN, the
// Addition Finished signal of the cascade; in the cycle ADFIN is seen it
// loads R from the adder (LDR), unconditionally after R+A and only if the
// sum is not negative (SIGN low) after R-M. Between two additions there is
// always one state with ADEN low so that ADFIN can fall.
// Interface: inputs ADFIN, SIGN, CZ, BI, RUN; outputs ADEN, SAM, LDR, SR, SB,
// CLRR, DEC, BUSY, as in the source design. RUN high in IDLE starts a
// multiplication; BUSY is high from then until the result is in R; the
// machine then waits in DONE for RUN to go low.
// Cycles per iteration with N devices in the cascade: 8 + 3N when the bit of
// B is 1, 5 + N when it is 0; one extra cycle clears R at the start.
// The inputs, outputs and the three additions per iteration follow the source
// design; its state diagram was not available, so the states and their order
// are this design's own (11 states instead of 16). The source lists each bit
// as add, reduce, shift, reduce; shifting first, as here, needs no final
// halving or skipped last shift. The source builds this
// machine as a PLA; here it is plain next-state logic.
module mmd_control
  import mmd_pkg::*;
(
  input  logic clk,
  input  logic reset,
  input  logic adfin,  // addition finished (whole cascade)
  input  logic sign,   // sign of the adder output (from the master)
  input  logic cz,     // bit counter is zero
  input  logic bi,     // current most significant bit of B (from the master)
  input  logic run,    // start
  output logic aden,   // adder enable
  output logic sam,    // 1: add A, 0: add M register (-M)
  output logic ldr,    // load R from the adder
  output logic sr,     // shift R left
  output logic sb,     // shift B left
  output logic clrr,   // clear R
  output logic dec,    // decrement the bit counter
  output logic busy
);
  mmd_state_e state, next;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= ST_IDLE;
    else       state <= next;
  end

  always_comb begin
    next = state;
    aden = 1'b0;
    sam  = 1'b0;
    ldr  = 1'b0;
    sr   = 1'b0;
    sb   = 1'b0;
    clrr = 1'b0;
    dec  = 1'b0;
    busy = 1'b1;
    unique case (state)
      ST_IDLE: begin
        busy = 1'b0;
        if (run) next = ST_CLEAR;
      end
      ST_CLEAR: begin
        clrr = 1'b1;
        next = ST_SHIFT;
      end
      ST_SHIFT: begin
        sr   = 1'b1;
        next = ST_ADDM1;
      end
      ST_ADDM1: begin
        aden = 1'b1;
        if (adfin) begin
          ldr  = ~sign;
          next = ST_TESTB;
        end
      end
      ST_TESTB: begin
        next = bi ? ST_ADDA : ST_NEXT;
      end
      ST_ADDA: begin
        aden = 1'b1;
        sam  = 1'b1;
        if (adfin) begin
          ldr  = 1'b1;
          next = ST_GAP;
        end
      end
      ST_GAP: begin
        next = ST_ADDM2;
      end
      ST_ADDM2: begin
        aden = 1'b1;
        if (adfin) begin
          ldr  = ~sign;
          next = ST_NEXT;
        end
      end
      ST_NEXT: begin
        sb   = 1'b1;
        dec  = 1'b1;
        next = ST_TESTC;
      end
      ST_TESTC: begin
        next = cz ? ST_DONE : ST_SHIFT;
      end
      ST_DONE: begin
        busy = 1'b0;
        if (!run) next = ST_IDLE;
      end
      default: begin
        next = ST_IDLE;
      end
    endcase
  end

  // A load of R is only ever taken from an enabled adder.
  a_ldr_needs_aden: assert property (@(posedge clk) disable iff (reset) ldr |-> aden);
  // R is never shifted and loaded in the same cycle.
  a_sr_ldr_excl: assert property (@(posedge clk) disable iff (reset) !(sr && ldr));
endmodule
