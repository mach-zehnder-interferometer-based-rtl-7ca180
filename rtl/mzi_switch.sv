// mzi_switch: logical model of a semiconductor-optical-amplifier based
// Mach-Zehnder interferometer switch.
//
// The incoming beam enters at port a and the control beam at port b. With
// control light present the incoming light leaves at the bar port; without
// it the light is switched to the cross port. As Boolean functions:
//   bar_port   = a & b
//   cross_port = a & ~b
// The physical device (two SOAs between two couplers) is not modelled; only
// this switching behaviour is. The model is combinational with no delay; in
// the library's accounting one switch costs 1 and takes one delay unit
// (optical_pkg::MZI_COST, MZI_DELAY).
module mzi_switch (
  input  logic a,      // incoming signal
  input  logic b,      // control signal
  output logic bar_port,   // a & b
  output logic cross_port  // a & ~b
);

  always_comb begin
    bar_port   = a & b;
    cross_port = a & ~b;
  end

endmodule
