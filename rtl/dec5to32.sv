// dec5to32: 5-line to 32-line decoder built from five 3:8 decoders
// (ac11138) and four inverters.
//
// Two-level tree. The first decoder, always enabled (G1 high, G2A_n and G2B_n
// low), has a3 on its A input, a4 on B and C tied low, so its outputs Y0..Y3
// are the active-low bank selects for a4a3 = 00, 01, 10, 11; its Y4..Y7 never
// go low and are left unused. Each bank select drives both active-low enables
// of one output decoder directly and, through one of the four inverters, that
// decoder's active-high G1. The four output decoders all see a0, a1, a2 on
// A, B, C; the one whose bank is selected pulls its line low. Output decoder k
// drives y_n[8k+7:8k], so y_n[i] is low exactly when a == i.
//
// Tying both active-low enables and G1 to the same bank select (through the
// inverter for G1) follows the circuit this decoder comes from; it makes the
// enable logic of an output decoder redundant three times over, but keeps the
// five decoders identical.
//
// Ports: a[4:0] (address, a[0] least significant), y_n[31:0] (active low).
// Timing: combinational. The critical path is a3/a4 through the first
// decoder, a bank-select inverter and the enable path of an output decoder.
module dec5to32 (
  input  logic [4:0]  a,
  output logic [31:0] y_n
);
  logic [7:0] bank_sel_n;   // [7:4] stay high: C input of the first stage is low
  logic [3:0] bank_sel;

  ac11138 u_bank (
    .a(a[3]), .b(a[4]), .c(1'b0),
    .g1(1'b1), .g2a_n(1'b0), .g2b_n(1'b0),
    .y_n(bank_sel_n)
  );

  for (genvar k = 0; k < 4; k++) begin : g_bank
    inv_cell u_inv (.a(bank_sel_n[k]), .y(bank_sel[k]));

    ac11138 u_dec (
      .a(a[0]), .b(a[1]), .c(a[2]),
      .g1(bank_sel[k]), .g2a_n(bank_sel_n[k]), .g2b_n(bank_sel_n[k]),
      .y_n(y_n[8*k +: 8])
    );
  end

  // The first-stage lines that no bank uses can never be selected.
  always_comb assert (&bank_sel_n[7:4])
    else $error("dec5to32: unused bank select active, bank_sel_n=%b", bank_sel_n);

  always_comb assert ($countones(~y_n) == 1)
    else $error("dec5to32: expected exactly one active output, y_n=%h", y_n);
endmodule
