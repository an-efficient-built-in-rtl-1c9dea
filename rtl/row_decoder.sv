// row_decoder: word-line decoder.
//
// Drives exactly one word-line, the one addressed by row_addr, while `en`
// is high, and none otherwise.  Combinational.  The document only names the
// block; this is a plain one-hot decoder.
module row_decoder #(
  parameter int unsigned ROWS = 256,
  localparam int unsigned RW  = $clog2(ROWS)
) (
  input  logic            en,
  input  logic [RW-1:0]   row_addr,
  output logic [ROWS-1:0] wl
);
  always_comb begin
    for (int unsigned r = 0; r < ROWS; r++)
      wl[r] = en && (row_addr == RW'(r));
  end
endmodule
