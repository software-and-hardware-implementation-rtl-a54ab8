// mmd_cascade: NDEV modular multiplication devices cascaded into one
// (16*NDEV)-bit Blakley modular multiplier on an 8-bit microprocessor bus.
//
// Device 0 holds the least significant 16 bits, device NDEV-1 the most
// significant and is the master. The adder carry, the R and B shift chains
// and the Addition Complete chain run from device k to device k+1; the
// master's B MSB (DOUT), sign (SGNO) and Addition Complete (as ADFIN) go to
// every device. RUN goes to all devices; BUSY is taken from the master.
// Bus: the low 3 address bits select a register byte inside a device
// (see mmd_pkg), the bits above them select the device, so each device
// occupies eight consecutive bytes. Write -M (two's complement over all
// 16*NDEV bits) into the M registers and the same bit count into every C.
// Timing with all B bits 1: 1 + C*(8 + 3*NDEV) clock cycles from the cycle
// RUN is seen to BUSY low.
// Default NDEV = 15: the largest cascade whose bit count (240) still fits
// the 8-bit bit counter, which limits the key length. The cascade scheme
// follows the source design; the device-select decoder stands in for the
// microprocessor board's address decoding and is this design's choice.
module mmd_cascade
  import mmd_pkg::*;
#(
  parameter int unsigned NDEV  = 15,
  localparam int unsigned DEV_W = (NDEV > 1) ? $clog2(NDEV) : 1,
  localparam int unsigned AW    = ADDR_W + DEV_W
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             cs,
  input  logic             rw,        // 1: read, 0: write
  input  logic [AW-1:0]    addr,      // {device, register byte}
  input  logic [BUS_W-1:0] data_in,
  output logic [BUS_W-1:0] data_out,
  output logic             data_oe,
  input  logic             run,
  output logic             busy,
  output logic             carry_out  // carry out of the master's adder
);
  logic [NDEV-1:0]           dev_cs, dev_oe, dev_busy;
  logic [BUS_W-1:0]          dev_dout [NDEV];
  logic [NDEV:0]             carry, rchain, bchain, achain;
  logic [NDEV-1:0]           dout_v, sgno_v, aout_v;
  logic                      adfin, bmsb, sgn;
  logic [DEV_W-1:0]          dev_sel;

  assign dev_sel   = addr[AW-1:ADDR_W];
  assign carry[0]  = 1'b0;
  assign rchain[0] = 1'b0;
  assign bchain[0] = 1'b0;
  assign achain[0] = 1'b1;

  assign adfin = aout_v[NDEV-1];
  assign bmsb  = dout_v[NDEV-1];
  assign sgn   = sgno_v[NDEV-1];

  for (genvar k = 0; k < NDEV; k++) begin : g_dev
    assign dev_cs[k] = cs && (32'(dev_sel) == k);

    mmd_device u_dev (
      .clk     (clk),
      .reset   (reset),
      .ms      (k == NDEV - 1),
      .cs      (dev_cs[k]),
      .rw      (rw),
      .addr    (addr[ADDR_W-1:0]),
      .data_in (data_in),
      .data_out(dev_dout[k]),
      .data_oe (dev_oe[k]),
      .run     (run),
      .busy    (dev_busy[k]),
      .cin     (carry[k]),
      .cout    (carry[k+1]),
      .rin     (rchain[k]),
      .rout    (rchain[k+1]),
      .bin     (bchain[k]),
      .bout    (bchain[k+1]),
      .din     (bmsb),
      .dout    (dout_v[k]),
      .sgni    (sgn),
      .sgno    (sgno_v[k]),
      .ain     (achain[k]),
      .aout    (achain[k+1]),
      .adfin   (adfin)
    );
    assign aout_v[k] = achain[k+1];
  end

  // Read data: the selected device drives the bus.
  always_comb begin
    data_out = '0;
    for (int k = 0; k < NDEV; k++) begin
      if (dev_oe[k]) data_out = dev_dout[k];
    end
  end
  assign data_oe   = |dev_oe;
  assign busy      = dev_busy[NDEV-1];
  assign carry_out = carry[NDEV];

  // Signals that only the master's copy of is used.
  logic unused;
  assign unused = ^{rchain[NDEV], bchain[NDEV], dout_v[NDEV-2:0], sgno_v[NDEV-2:0], dev_busy[NDEV-2:0]};

  // All devices step in lock step, so they are busy together.
  a_lockstep: assert property (@(posedge clk) disable iff (reset) busy == dev_busy[0]);
endmodule
