// error_holder: holds the result of a self-test run.
//
// Two error sources arrive: the latched ERROR of the parallel comparator
// (label-parallel checks) and a single-cell check of the data output
// (io_check/io_dout/io_exp, used by the decoder march tests), registered
// here so both line up one cycle after the read.  The controller's context
// of each cycle (phase, address, test pattern number) is delayed by the
// same cycle.  `error` is a sticky flag, `err_count` a saturating count of
// failing compares, and first_* record the context of the first failure.
// `clear` (start of a run) resets them.  The document only names an error
// holder; what it records is this design's choice.
module error_holder
  import bist_pkg::*;
#(
  parameter int unsigned AW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          cmp_error,   // registered ERROR from the comparator
  input  logic          io_check,    // single-cell compare this cycle
  input  logic          io_dout,
  input  logic          io_exp,
  input  phase_e        ctx_phase,
  input  logic [AW-1:0] ctx_addr,
  input  logic [5:0]    ctx_tp,
  output logic          error,
  output logic [15:0]   err_count,
  output phase_e        first_phase,
  output logic [AW-1:0] first_addr,
  output logic [5:0]    first_tp
);
  logic          io_err_q;
  phase_e        phase_q;
  logic [AW-1:0] addr_q;
  logic [5:0]    tp_q;
  logic          fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      io_err_q <= 1'b0;
      phase_q  <= PH_IDLE;
      addr_q   <= '0;
      tp_q     <= '0;
    end else begin
      io_err_q <= io_check && (io_dout != io_exp) && !clear;
      phase_q  <= ctx_phase;
      addr_q   <= ctx_addr;
      tp_q     <= ctx_tp;
    end
  end

  assign fail = cmp_error || io_err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      error       <= 1'b0;
      err_count   <= '0;
      first_phase <= PH_IDLE;
      first_addr  <= '0;
      first_tp    <= '0;
    end else if (clear) begin
      error       <= 1'b0;
      err_count   <= '0;
      first_phase <= PH_IDLE;
      first_addr  <= '0;
      first_tp    <= '0;
    end else if (fail) begin
      error <= 1'b1;
      if (err_count != 16'hFFFF) err_count <= err_count + 16'd1;
      if (!error) begin
        first_phase <= phase_q;
        first_addr  <= addr_q;
        first_tp    <= tp_q;
      end
    end
  end
endmodule
