// and3_cell: 3-input AND gate, as built at transistor level: a 3-input NAND
// stage (three parallel p-channel pull-ups, three series n-channel pull-downs)
// followed by an inverter stage. The RTL keeps the two stages as two
// expressions, the internal node nand_n being the NAND stage output.
//
// Ports: a, b, c (inputs), y (output, a & b & c). Timing: combinational.
// Supply pins are left out of the port list (a choice of this RTL).
module and3_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  logic nand_n;

  always_comb begin
    nand_n = ~(a & b & c);
    y      = ~nand_n;
  end
endmodule
