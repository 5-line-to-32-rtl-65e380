// nand4_cell: 4-input NAND gate. At transistor level it is four parallel
// p-channel pull-ups and a stack of four series n-channel pull-downs, so the
// output is low only when all four inputs are high. In the 3:8 decoder one
// such gate drives each active-low output line: three inputs take the true or
// complemented select bits and the fourth takes the internal enable.
//
// Ports: a, b, c, d (inputs), y (output, ~(a & b & c & d)). Combinational.
// Supply pins are left out of the port list (a choice of this RTL).
module nand4_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic y
);
  always_comb y = ~(a & b & c & d);
endmodule
