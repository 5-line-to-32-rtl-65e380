// inv_cell: static CMOS inverter, the smallest cell of the decoder library.
//
// The transistor cell is one p-channel pull-up from VCC to the output and one
// n-channel pull-down from the output to ground, both gated by the input, so
// the output is the complement of the input. At the logic level that is
// y = ~a. The supply and ground pins of the transistor cell carry no logic and
// are left out of the port list (a design choice of this RTL).
//
// Ports: a (input), y (output). Timing: purely combinational, no clock.
module inv_cell (
  input  logic a,
  output logic y
);
  always_comb y = ~a;
endmodule
