// col_decoder: bit-line (column) decoder with the parallel test mode.
//
// Bit-lines are taken in groups of four.  The upper address bits A(n-1)..A2
// select a group and A1A0 select one bit-line inside it.  In normal mode
// (phi4 = 0) this is an ordinary one-hot decoder.  In test mode (phi4 = 1)
// every group is enabled regardless of A(n-1)..A2, as the added per-group
// transistor E_a does in the circuit, so A1A0 alone pick the same bit-line
// class (cell label) in every group: one bit-line in four is selected and
// written or read in parallel.  `en` gates the whole decoder (no access).
// Combinational.  The parallel mode follows the document; the enable input
// is this design's own.
module col_decoder #(
  parameter int unsigned COLS = 256,
  localparam int unsigned CW  = $clog2(COLS)
) (
  input  logic            en,
  input  logic            phi4,      // 1 = test mode, label-parallel select
  input  logic [CW-1:0]   col_addr,
  output logic [COLS-1:0] bl_sel
);
  localparam int unsigned NGRP = COLS / 4;

  logic [NGRP-1:0] grp_en;   // per-group enable (group decode or forced by phi4)
  logic [3:0]      low_sel;  // decode of A1A0

  always_comb begin
    for (int unsigned a = 0; a < NGRP; a++)
      grp_en[a] = en && (phi4 || (col_addr[CW-1:2] == (CW-2)'(a)));
    for (int unsigned k = 0; k < 4; k++)
      low_sel[k] = (col_addr[1:0] == 2'(k));
    for (int unsigned c = 0; c < COLS; c++)
      bl_sel[c] = grp_en[c / 4] && low_sel[c % 4];
  end

  initial assert (COLS % 4 == 0 && COLS >= 8)
    else $error("col_decoder: COLS must be a multiple of 4, at least 8");
endmodule
