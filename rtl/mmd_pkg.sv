// mmd_pkg: sizes, register map and controller states shared by the
// modular multiplication device (MMD).
//
// The device is a 16-bit slice of a Blakley modular multiplier that talks to
// an 8-bit microprocessor. The data path width (16 bits), the byte-wide data
// bus, the 3-bit address bus and the 8-bit bit counter follow the source
// design. The address map and the state encoding are this design's own choice.
package mmd_pkg;

  localparam int unsigned DATA_W = 16;  // data path bits per device
  localparam int unsigned BUS_W  = 8;   // microprocessor data bus
  localparam int unsigned ADDR_W = 3;   // register select inside one device
  localparam int unsigned CNT_W  = 8;   // bit counter C

  // Register map seen by the microprocessor. A, B, M and C are write-only,
  // R is read-only, so reads of R share the addresses of A.
  typedef enum logic [ADDR_W-1:0] {
    ADR_A_LO = 3'd0,  // write A[7:0]   / read R[7:0]
    ADR_A_HI = 3'd1,  // write A[15:8]  / read R[15:8]
    ADR_B_LO = 3'd2,
    ADR_B_HI = 3'd3,
    ADR_M_LO = 3'd4,  // the modulus register holds -M (two's complement)
    ADR_M_HI = 3'd5,
    ADR_C    = 3'd6,  // bit counter: number of bits of B to process
    ADR_NONE = 3'd7
  } mmd_addr_e;

  // Controller states (Blakley loop: shift, reduce, add A, reduce).
  typedef enum logic [3:0] {
    ST_IDLE   = 4'd0,
    ST_CLEAR  = 4'd1,   // CLRR: R := 0
    ST_SHIFT  = 4'd2,   // SR:   R := 2R
    ST_ADDM1  = 4'd3,   // R + (-M), load R if not negative
    ST_TESTB  = 4'd4,   // branch on the current bit of B
    ST_ADDA   = 4'd5,   // R + A, load R
    ST_GAP    = 4'd6,   // adder idle so Addition Complete can fall
    ST_ADDM2  = 4'd7,   // R + (-M), load R if not negative
    ST_NEXT   = 4'd8,   // SB, DEC: next bit of B, count it
    ST_TESTC  = 4'd9,   // loop until the bit counter is zero
    ST_DONE   = 4'd10   // wait for RUN to be released
  } mmd_state_e;

endpackage
