// par_comparator: parallel comparator and error detector.
//
// Compares, in one step, every bit-line of one label on the open word-line.
// L1..L4 (l_n[0..3], active low) select the first, second, third or fourth
// bit-line of each group of four; all high (normal mode) selects nothing.
// Of the selected sense-amplifier outputs it reports whether they are all 1
// (s1, the all-ones detector), all 0 (s2, the all-zeros detector) or not
// identical.  The circuit precharges (phi1), evaluates (phi2) and latches
// ERROR (phi3); here one clock cycle with `eval` high does all three and
// ERROR is registered at its end.
//
// ERROR is raised when the selected cells are not identical, as in the
// document.  With `check` high it is also raised when they agree but on
// the wrong value (s1 with exp = 0 or s2 with exp = 1): the test algorithm
// compares each cell with the written data, and the s1/s2 outputs make that
// possible with no extra compare logic; this extension is this design's
// own choice.
module par_comparator #(
  parameter int unsigned COLS = 256
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] bl,      // sense amplifier outputs
  input  logic [3:0]      l_n,     // L4..L1, active low label select
  input  logic            eval,    // compare this cycle
  input  logic            check,   // also compare against exp
  input  logic            exp,     // expected cell value
  output logic            s1,      // all selected bit-lines are 1
  output logic            s2,      // all selected bit-lines are 0
  output logic            error    // latched ERROR of the last compare
);
  logic [COLS-1:0] sel;
  logic            fail;

  always_comb begin
    for (int unsigned c = 0; c < COLS; c++)
      sel[c] = !l_n[c % 4];
    s1   = &(bl | ~sel);
    s2   = ~|(bl & sel);
    fail = !(s1 || s2) || (check && ((s1 && !exp) || (s2 && exp)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) error <= 1'b0;
    else        error <= eval && fail;
  end
endmodule
