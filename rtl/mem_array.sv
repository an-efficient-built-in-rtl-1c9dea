// mem_array: behavioural model of the DRAM cell array with its sense amplifiers.
//
// The real part is an analog array of one-transistor cells on folded
// bit-lines; this model keeps one bit per cell and reproduces only the logic
// behaviour the BIST relies on.  On a clock edge with `we`, every selected
// bit-line (bl_sel) of every active word-line (wl) is written with `din`;
// unselected cells keep their value.  The sense-amplifier outputs `bl_out`
// show, combinationally, the cells of the active word-line (several active
// word-lines give their OR; none gives 0).  Cells have no reset.
//
// For simulation a single defect can be placed at (DEFECT_ROW, DEFECT_COL):
//   0 none
//   1 stuck-at-0 cell           2 stuck-at-1 cell
//   3 coupling: the cell inverts when its right-hand neighbour on the same
//     word-line (bit-line DEFECT_COL+1) is written 0 -> 1, the kind of
//     neighbour disturbance the NPSF and NBLSF tests target
//   4 multiple access: word-line DEFECT_ROW also opens word-line
//     DEFECT_ROW+1, an address decoder fault
//   5 bit-line crosstalk: on a read that directly follows a write to the
//     same word-line, the cell reads inverted while its left-hand neighbour
//     (bit-line DEFECT_COL-1) holds the opposite value; the stored value is
//     not changed.  This stands for the leftover bit-line charge after a
//     write that only a write directly followed by a read exposes (the
//     NBLSF test); DEFECT_COL must be at least 1.
// The defect list is this model's own; the document describes the fault
// classes, not a model of them.
module mem_array #(
  parameter int unsigned ROWS        = 256,
  parameter int unsigned COLS        = 256,
  parameter int unsigned DEFECT_KIND = 0,
  parameter int unsigned DEFECT_ROW  = 0,
  parameter int unsigned DEFECT_COL  = 0
) (
  input  logic            clk,
  input  logic [ROWS-1:0] wl,      // word-lines
  input  logic [COLS-1:0] bl_sel,  // selected bit-lines (column decoder)
  input  logic            we,
  input  logic            din,
  output logic [COLS-1:0] bl_out   // sense amplifier outputs
);
  // neighbour bit-lines of the defect, clamped to the array
  localparam int unsigned COL_L = (DEFECT_COL >= 1) ? DEFECT_COL - 1 : 0;
  localparam int unsigned COL_R = (DEFECT_COL + 1 < COLS) ? DEFECT_COL + 1 : COLS - 1;

  logic [COLS-1:0] cells [ROWS];
  logic [ROWS-1:0] wl_eff;

  always_comb begin
    wl_eff = wl;
    if (DEFECT_KIND == 4 && DEFECT_ROW + 1 < ROWS)
      wl_eff[DEFECT_ROW + 1] = wl[DEFECT_ROW] | wl[DEFECT_ROW + 1];
  end

  // Coupling defect: inversion of the victim when the aggressor rises.
  logic [COLS-1:0] flip;
  always_comb begin
    flip = '0;
    if (DEFECT_KIND == 3 && DEFECT_COL + 1 < COLS)
      if (we && wl_eff[DEFECT_ROW] && bl_sel[COL_R] && din && !cells[DEFECT_ROW][COL_R])
        flip[DEFECT_COL] = 1'b1;
  end

  always_ff @(posedge clk) begin
    for (int unsigned r = 0; r < ROWS; r++)
      if (we && wl_eff[r])
        cells[r] <= ((cells[r] & ~bl_sel) | (bl_sel & {COLS{din}})) ^
                    ((r == DEFECT_ROW) ? flip : '0);
  end

  // Crosstalk defect: the previous cycle wrote the victim's word-line.
  logic wrote_row_q;
  always_ff @(posedge clk) wrote_row_q <= we && wl_eff[DEFECT_ROW];

  logic [COLS-1:0] v;

  always_comb begin
    bl_out = '0;
    v      = '0;
    for (int unsigned r = 0; r < ROWS; r++)
      if (wl_eff[r]) begin
        v = cells[r];
        if (r == DEFECT_ROW && DEFECT_KIND == 1) v[DEFECT_COL] = 1'b0;
        if (r == DEFECT_ROW && DEFECT_KIND == 2) v[DEFECT_COL] = 1'b1;
        if (r == DEFECT_ROW && DEFECT_KIND == 5 && DEFECT_COL >= 1 && !we && wrote_row_q &&
            (cells[r][DEFECT_COL] != cells[r][COL_L]))
          v[DEFECT_COL] = !cells[r][DEFECT_COL];
        bl_out = bl_out | v;
      end
  end
endmodule
