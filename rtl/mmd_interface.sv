// mmd_interface: microprocessor interface unit of one device.
//
// The device appears to an 8-bit microprocessor as eight contiguous memory
// locations. A 3-bit address selects a register and a byte within it; a
// decoder turns a write cycle (chip select active, R/W low) into the load
// strobe of one byte: A low/high, B low/high, M low/high or the bit counter C.
// A read cycle (chip select active, R/W high) puts the addressed byte of the
// result register R on the output data bus and raises the output enable that
// would turn on the tri-state pad drivers.
// Timing: strobes and read data are combinational from the bus signals; the
// registers take the data on the rising clock edge during the write cycle.
// The bus widths, R/W and chip-select signals, write-only A/B/M/C and the
// read-only R follow the source design; the address map and the split of the
// bidirectional data bus into input, output and enable are this design's
// choices.
module mmd_interface
  import mmd_pkg::*;
(
  input  logic              cs,       // chip select, active high
  input  logic              rw,       // 1: read, 0: write
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] r,        // result register, for reads
  output logic [1:0]        ld_a,     // byte strobes {high, low}
  output logic [1:0]        ld_b,
  output logic [1:0]        ld_m,
  output logic              ld_c,
  output logic [BUS_W-1:0]  data_out,
  output logic              data_oe
);
  logic wr;
  assign wr = cs & ~rw;

  always_comb begin
    ld_a = '0;
    ld_b = '0;
    ld_m = '0;
    ld_c = 1'b0;
    if (wr) begin
      unique case (mmd_addr_e'(addr))
        ADR_A_LO: ld_a[0] = 1'b1;
        ADR_A_HI: ld_a[1] = 1'b1;
        ADR_B_LO: ld_b[0] = 1'b1;
        ADR_B_HI: ld_b[1] = 1'b1;
        ADR_M_LO: ld_m[0] = 1'b1;
        ADR_M_HI: ld_m[1] = 1'b1;
        ADR_C:    ld_c    = 1'b1;
        default: ;
      endcase
    end
  end

  always_comb begin
    data_oe  = cs & rw;
    data_out = '0;
    if (data_oe) begin
      unique case (mmd_addr_e'(addr))
        ADR_A_LO: data_out = r[7:0];
        ADR_A_HI: data_out = r[15:8];
        default:  data_out = '0;
      endcase
    end
  end
endmodule
