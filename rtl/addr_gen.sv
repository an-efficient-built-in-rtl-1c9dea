// addr_gen: address generator for the row and column decoders.
//
// Sweeps an address from `first` to `last`, upward or downward (`down`),
// and at each address counts an operation index from 0 to `last_op`, so one
// step is one memory operation.  A `start` pulse loads the sweep settings
// and puts the generator at (first, op 0); every `step` moves to the next
// operation.  `final_op` is high during the last operation of the sweep.
// `start` wins over `step`.  The document names the block; the sweep/op
// structure is this design's choice.
module addr_gen #(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          step,
  input  logic [AW-1:0] first,
  input  logic [AW-1:0] last,
  input  logic          down,
  input  logic [2:0]    last_op,
  output logic [AW-1:0] addr,
  output logic [2:0]    op,
  output logic          final_op
);
  logic [AW-1:0] last_q;
  logic          down_q;
  logic [2:0]    last_op_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr      <= '0;
      op        <= '0;
      last_q    <= '0;
      down_q    <= 1'b0;
      last_op_q <= '0;
    end else if (start) begin
      addr      <= first;
      op        <= '0;
      last_q    <= last;
      down_q    <= down;
      last_op_q <= last_op;
    end else if (step) begin
      if (op == last_op_q) begin
        op   <= '0;
        addr <= down_q ? addr - AW'(1) : addr + AW'(1);
      end else begin
        op <= op + 3'd1;
      end
    end
  end

  assign final_op = (op == last_op_q) && (addr == last_q);
endmodule
