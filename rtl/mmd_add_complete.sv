// mmd_add_complete: Addition Complete cell of one device.
//
// Cascaded devices form one long ripple adder, so the time an addition needs
// grows with the number of devices. Instead of a worst-case delay each device
// produces an Addition Complete signal: it is registered from the adder enable
// ANDed with the Addition Complete of the next less significant device (AIN,
// tied to 1 on the least significant device). The signal therefore ripples
// up the cascade one clock per device, matching one clock of carry
// propagation allowed per device. AOUT of the most significant (master)
// device is fed back to every device as ADFIN, "addition finished".
// When ADEN falls, AOUT clears on the next edge in every device at once.
// Timing: AOUT of device k rises k+1 clocks after ADEN rises.
// The AIN/AOUT chain ANDing and the ADFIN broadcast follow the source design;
// the one-register-per-device delay is this design's choice.
module mmd_add_complete (
  input  logic clk,
  input  logic reset,
  input  logic aden,   // adder enable from the controller
  input  logic ain,    // Addition Complete from the less significant device
  output logic aout    // Addition Complete to the more significant device
);
  always_ff @(posedge clk or posedge reset) begin
    if (reset) aout <= 1'b0;
    else       aout <= aden & ain;
  end
endmodule
