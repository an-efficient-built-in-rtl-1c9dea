// bist_memory_top: bit-oriented DRAM array with built-in self-test for
// neighborhood pattern-sensitive and neighborhood bit-line-sensitive faults.
//
// Normal mode: the memory is read and written one bit at a time through the
// access port (acc_*); a write happens on the clock edge with acc_en and
// acc_we high, the read bit is acc_dout, combinational from the addressed
// cell.  Test mode: pulling /CAS low while /RAS is high (CAS before RAS)
// enters test mode; the controller then runs the whole self-test (NPSF with
// tilings A and B, NBLSF, sense-amplifier recovery, row and column decoder
// marches) without further input, using the modified column decoder to write
// and compare one label on every fourth bit-line of a word-line at once.
// When it finishes, bist_done rises, test mode is left and `error`,
// `err_count` and first_* hold the result until the next run.  The access
// port is ignored while the test runs.
//
// Structure (blocks as in the BIST organisation of the document): test
// enable, test pattern generator, control, address generator, row decoder,
// modified column decoder, memory cells, I/O buffer, parallel comparator and
// error detector, error holder.  The access port and the status outputs are
// this design's own interface.  DEFECT_* place one defect in the cell-array
// model for simulation (see mem_array); 0 means a fault-free array.
// READ_BASE_CELLS (off by default) makes the NPSF and NBLSF tests read the
// neighbouring base cells after every write, not only the label written
// (see bist_ctrl).
module bist_memory_top
  import bist_pkg::*;
#(
  parameter int unsigned ROWS        = 256,
  parameter int unsigned COLS        = 256,
  parameter int unsigned DEFECT_KIND = 0,
  parameter int unsigned DEFECT_ROW  = 0,
  parameter int unsigned DEFECT_COL  = 0,
  parameter bit          READ_BASE_CELLS = 1'b0,
  localparam int unsigned RW = $clog2(ROWS),
  localparam int unsigned CW = $clog2(COLS),
  localparam int unsigned AW = (RW > CW) ? RW : CW
) (
  input  logic          clk,
  input  logic          rst_n,
  // DRAM strobes (test entry)
  input  logic          n_ras,
  input  logic          n_cas,
  // normal access port
  input  logic          acc_en,
  input  logic          acc_we,
  input  logic [RW-1:0] acc_row,
  input  logic [CW-1:0] acc_col,
  input  logic          acc_din,
  output logic          acc_dout,
  // self-test status
  output logic          test_mode,
  output logic          bist_busy,
  output logic          bist_done,
  output phase_e        bist_phase,
  output logic          bist_group_b,
  output logic          error,
  output logic [15:0]   err_count,
  output phase_e        first_phase,
  output logic [AW-1:0] first_addr,
  output logic [5:0]    first_tp
);
  // test enable
  logic te_clear, bist_clk_en;
  // TPG
  logic [3:0] tp, c_sel;
  logic [5:0] tp_idx;
  logic       tp_last, tpg_clear, tpg_step;
  // address generator
  logic          ag_start, ag_step, ag_down, ag_final;
  logic [AW-1:0] ag_first, ag_last, ag_addr;
  logic [2:0]    ag_last_op, ag_op;
  // controller memory access
  logic          c_en, c_we, c_phi4, c_din;
  logic [RW-1:0] c_row;
  logic [CW-1:0] c_col;
  logic          cmp_eval, cmp_check, cmp_exp, io_check, io_exp;
  logic [3:0]    cmp_l_n;
  // array side
  logic            m_en, m_we, m_phi4, m_din;
  logic [RW-1:0]   m_row;
  logic [CW-1:0]   m_col;
  logic [ROWS-1:0] wl;
  logic [COLS-1:0] bl_sel, bl_out;
  logic            dout;
  logic            s1, s2, cmp_error;

  test_enable u_te (
    .clk, .rst_n, .n_ras, .n_cas,
    .clear(te_clear), .test_en(test_mode), .bist_clk_en
  );

  tpg u_tpg (
    .clk, .rst_n, .clear(tpg_clear), .step(tpg_step && bist_clk_en),
    .tp, .c_sel, .tp_idx, .last(tp_last)
  );

  addr_gen #(.AW(AW)) u_ag (
    .clk, .rst_n, .start(ag_start), .step(ag_step), .first(ag_first), .last(ag_last),
    .down(ag_down), .last_op(ag_last_op), .addr(ag_addr), .op(ag_op), .final_op(ag_final)
  );

  bist_ctrl #(.ROWS(ROWS), .COLS(COLS), .READ_BASE_CELLS(READ_BASE_CELLS)) u_ctrl (
    .clk, .rst_n, .test_en(test_mode),
    .tp, .tp_last, .tpg_clear, .tpg_step,
    .ag_addr, .ag_op, .ag_final, .ag_start, .ag_step, .ag_first, .ag_last, .ag_down, .ag_last_op,
    .mem_en(c_en), .mem_we(c_we), .row_addr(c_row), .col_addr(c_col), .phi4(c_phi4), .din(c_din),
    .cmp_eval, .cmp_l_n, .cmp_check, .cmp_exp, .io_check, .io_exp,
    .phase(bist_phase), .group_b(bist_group_b), .busy(bist_busy), .done(bist_done), .te_clear
  );

  // The BIST owns the array while it runs; otherwise the access port does.
  always_comb begin
    if (bist_busy) begin
      m_en = c_en;  m_we = c_we;  m_phi4 = c_phi4;  m_row = c_row;  m_col = c_col;
    end else begin
      m_en = acc_en; m_we = acc_en && acc_we; m_phi4 = 1'b0; m_row = acc_row; m_col = acc_col;
    end
  end

  row_decoder #(.ROWS(ROWS)) u_rdec (.en(m_en), .row_addr(m_row), .wl);

  col_decoder #(.COLS(COLS)) u_cdec (.en(m_en), .phi4(m_phi4), .col_addr(m_col), .bl_sel);

  io_buffer #(.COLS(COLS)) u_io (
    .test_mode(bist_busy), .bist_din(c_din), .ext_din(acc_din),
    .col_addr(m_col), .bl_out, .din(m_din), .dout
  );

  mem_array #(
    .ROWS(ROWS), .COLS(COLS),
    .DEFECT_KIND(DEFECT_KIND), .DEFECT_ROW(DEFECT_ROW), .DEFECT_COL(DEFECT_COL)
  ) u_mem (
    .clk, .wl, .bl_sel, .we(m_we), .din(m_din), .bl_out
  );

  par_comparator #(.COLS(COLS)) u_cmp (
    .clk, .rst_n, .bl(bl_out), .l_n(cmp_l_n), .eval(cmp_eval && bist_busy),
    .check(cmp_check), .exp(cmp_exp), .s1, .s2, .error(cmp_error)
  );

  error_holder #(.AW(AW)) u_eh (
    .clk, .rst_n, .clear(tpg_clear), .cmp_error,
    .io_check(io_check && bist_busy), .io_dout(dout), .io_exp,
    .ctx_phase(bist_phase), .ctx_addr(ag_addr), .ctx_tp(tp_idx),
    .error, .err_count, .first_phase, .first_addr, .first_tp
  );

  assign acc_dout = dout;
endmodule
