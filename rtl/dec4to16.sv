// dec4to16: 4-line to 16-line decoder built from three 3:8 decoders
// (ac11138) and two inverters, the same two-level scheme as dec5to32 one
// size smaller.
//
// The first decoder, always enabled, has a3 on its A input and B, C tied low;
// its Y0 and Y1 are the active-low bank selects for a3 = 0 and a3 = 1 (Y2..Y7
// stay high and are unused). Each bank select drives both active-low enables
// of one output decoder and, through an inverter, its G1. Both output
// decoders decode a0, a1, a2; decoder k drives y_n[8k+7:8k].
//
// Ports: a[3:0] (address, a[0] least significant), y_n[15:0] (active low,
// y_n[i] low exactly when a == i). Timing: combinational.
module dec4to16 (
  input  logic [3:0]  a,
  output logic [15:0] y_n
);
  logic [7:0] bank_sel_n;   // [7:2] stay high: B and C of the first stage are low
  logic [1:0] bank_sel;

  ac11138 u_bank (
    .a(a[3]), .b(1'b0), .c(1'b0),
    .g1(1'b1), .g2a_n(1'b0), .g2b_n(1'b0),
    .y_n(bank_sel_n)
  );

  for (genvar k = 0; k < 2; k++) begin : g_bank
    inv_cell u_inv (.a(bank_sel_n[k]), .y(bank_sel[k]));

    ac11138 u_dec (
      .a(a[0]), .b(a[1]), .c(a[2]),
      .g1(bank_sel[k]), .g2a_n(bank_sel_n[k]), .g2b_n(bank_sel_n[k]),
      .y_n(y_n[8*k +: 8])
    );
  end

  // The first-stage lines that no bank uses can never be selected.
  always_comb assert (&bank_sel_n[7:2])
    else $error("dec4to16: unused bank select active, bank_sel_n=%b", bank_sel_n);

  always_comb assert ($countones(~y_n) == 1)
    else $error("dec4to16: expected exactly one active output, y_n=%h", y_n);
endmodule
