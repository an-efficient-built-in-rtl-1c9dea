// bist_pkg: types and helper functions shared by the memory BIST.
//
// The BIST tests a bit-oriented memory whose cells are marked with four
// labels (1..4, coded here as 0..3) in the four-cell tiling.  A label is
// written or compared on every fourth bit-line of a word-line at once.  Two
// tilings are used ("group A" and "group B"): both repeat 1 2 3 4 along a
// word-line, and every second pair of word-lines is shifted by two bit-lines.
// In group A the shift applies to rows 2,3, 6,7, ...; in group B to rows
// 1,2, 5,6, ...  label_class() turns a label into the bit-line class (the
// column address bits A1A0 that the modified column decoder and the parallel
// comparator use) for a given row and group; cell_label() is the inverse.
//
// Test pattern bit B(k) belongs to label k+1 (B0 -> label 1 ... B3 -> label 4).
// The two S/A recovery patterns are test patterns #7 (0101) and #13 (1010)
// of the TPG sequence.
package bist_pkg;

  // Phases of the self-test, in the order the controller runs them.
  typedef enum logic [3:0] {
    PH_IDLE,      // waiting for test enable
    PH_INIT,      // write 0 to every cell (four label writes per row)
    PH_NPSF_W,    // NPSF: write the changed label on every row
    PH_NPSF_R,    // NPSF: read the written label on every row
    PH_NBLSF,     // NBLSF: per row, write and read the changed label twice
    PH_SAR_W,     // S/A recovery: write a long string, complement on the last row
    PH_SAR_R,     // S/A recovery: read back (case 1 last row, case 2 all rows)
    PH_MARCH_ROW, // 6n march along bit-line 0 (row decoder test)
    PH_MARCH_COL, // 6n march along word-line 0 (column decoder test)
    PH_DONE       // finished, result held
  } phase_e;

  localparam logic [3:0]  SAR_TP7    = 4'b0101;  // test pattern #7
  localparam logic [3:0]  SAR_TP13   = 4'b1010;  // test pattern #13

  // Shift (0 or 1, meaning 0 or 2 bit-lines) of the labels on a row.
  // Only the two low row-address bits matter.
  // Group A: bit 1 of the row; group B: bit 1 of row+1.
  function automatic logic row_shift(input logic [1:0] row, input logic group_b);
    return row[1] ^ (group_b & row[0]);
  endfunction

  // Bit-line class (A1A0) holding a label on a row.
  function automatic logic [1:0] label_class(input logic [1:0] row, input logic [1:0] label,
                                             input logic group_b);
    return {label[1] ^ row_shift(row, group_b), label[0]};
  endfunction

  // Label of the cell on a row and bit-line class.  Adding 2 modulo 4 is its
  // own inverse, so this is the same mapping as label_class().
  function automatic logic [1:0] cell_label(input logic [1:0] row, input logic [1:0] cls,
                                            input logic group_b);
    return {cls[1] ^ row_shift(row, group_b), cls[0]};
  endfunction

endpackage
