// tpg: test pattern generator for the four-cell neighborhood.
//
// Produces the 64 four-bit test patterns B3..B0 (one bit per cell label) as
// an Eulerian-style walk in which consecutive patterns differ in one bit.  A
// 4-bit binary counter b3..b0 is turned into Gray code (G3 = b3,
// Gi = b(i+1) xor bi).  A sequence controller C0..C3 (one-hot) selects one of
// four mappings of the Gray code onto B3..B0, each used for 16 patterns:
//   C0: B3=G3   B2=G2   B1=G1   B0=G0
//   C1: B3=~G0  B2=G3   B1=G2   B0=~G1
//   C2: B3=G1   B2=~G0  B1=G3   B0=~G2
//   C3: B3=G2   B2=G1   B1=~G0  B0=~G3
// The counter, the Gray code and these equations follow the document; the
// sequence controller is a 2-bit counter that advances when b3..b0 wraps.
//
// Interface: `clear` returns to pattern #1, `step` moves to the next pattern
// (after #64 back to #1).  `tp` is the current pattern, `tp_idx` its number
// minus one, `last` marks pattern #64.  Outputs are registered state.
module tpg (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       step,
  output logic [3:0] tp,      // B3..B0
  output logic [3:0] c_sel,   // C3..C0, one-hot sequence controller
  output logic [5:0] tp_idx,  // 0..63 = TP#1..TP#64
  output logic       last
);
  logic [3:0] b;     // 4-bit counter
  logic [1:0] seq;   // sequence controller state
  logic [3:0] g;     // Gray code

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b   <= '0;
      seq <= '0;
    end else if (clear) begin
      b   <= '0;
      seq <= '0;
    end else if (step) begin
      b <= b + 4'd1;
      if (b == 4'hF) seq <= seq + 2'd1;
    end
  end

  assign g     = {b[3], b[3] ^ b[2], b[2] ^ b[1], b[1] ^ b[0]};
  assign c_sel = 4'b0001 << seq;

  always_comb begin
    tp[3] = (c_sel[0] & g[3]) | (c_sel[1] & ~g[0]) | (c_sel[2] & g[1])  | (c_sel[3] & g[2]);
    tp[2] = (c_sel[0] & g[2]) | (c_sel[1] & g[3])  | (c_sel[2] & ~g[0]) | (c_sel[3] & g[1]);
    tp[1] = (c_sel[0] & g[1]) | (c_sel[1] & g[2])  | (c_sel[2] & g[3])  | (c_sel[3] & ~g[0]);
    tp[0] = (c_sel[0] & g[0]) | (c_sel[1] & ~g[1]) | (c_sel[2] & ~g[2]) | (c_sel[3] & ~g[3]);
  end

  assign tp_idx = {seq, b};
  assign last   = (tp_idx == 6'd63);
endmodule
