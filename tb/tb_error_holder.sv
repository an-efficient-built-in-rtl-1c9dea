// tb_error_holder: error flag and count stay at zero without failures; a
// comparator error or a single-cell mismatch sets the sticky flag one clock
// later, counts, and records the context of the first failure only; clear
// resets everything.
module tb_error_holder;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0;
  logic cmp_error = 1'b0, io_check = 1'b0, io_dout = 1'b0, io_exp = 1'b0;
  phase_e ctx_phase = PH_IDLE;
  logic [7:0] ctx_addr = '0;
  logic [5:0] ctx_tp = '0;
  logic error;
  logic [15:0] err_count;
  phase_e first_phase;
  logic [7:0] first_addr;
  logic [5:0] first_tp;
  int checks = 0, failures = 0;

  error_holder #(.AW(8)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one cycle of context; the comparator error for it arrives next cycle
  task automatic cyc(input phase_e ph, input int a, input int t, input bit io_chk,
                     input bit io_bad, input bit cmp_bad_prev);
    ctx_phase = ph; ctx_addr = 8'(a); ctx_tp = 6'(t);
    io_check = io_chk; io_exp = 1'b1; io_dout = io_bad ? 1'b0 : 1'b1;
    cmp_error = cmp_bad_prev;
    @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 20; i++) cyc(PH_NPSF_R, i, i, 1'b1, 1'b0, 1'b0);
    cyc(PH_IDLE, 0, 0, 1'b0, 1'b0, 1'b0);
    check(!error && err_count == 0, "error without failure");
    // comparator failure for context (NBLSF, 7, 33)
    cyc(PH_NBLSF, 7, 33, 1'b0, 1'b0, 1'b0);
    check(!error, "error too early");
    cyc(PH_NBLSF, 8, 33, 1'b0, 1'b0, 1'b1);
    cyc(PH_NBLSF, 9, 33, 1'b0, 1'b0, 1'b0);
    check(error && err_count == 1, "comparator failure not held");
    check(first_phase == PH_NBLSF && first_addr == 7 && first_tp == 33, "first failure context");
    // single-cell failure later must count but keep the first context
    cyc(PH_MARCH_COL, 3, 0, 1'b1, 1'b1, 1'b0);
    cyc(PH_MARCH_COL, 4, 0, 1'b0, 1'b0, 1'b0);
    cyc(PH_MARCH_COL, 5, 0, 1'b0, 1'b0, 1'b0);
    check(err_count == 2 && first_addr == 7, "second failure");
    clear = 1'b1; @(negedge clk); clear = 1'b0;
    check(!error && err_count == 0 && first_phase == PH_IDLE, "clear");
    // single-cell failure as the first one
    cyc(PH_MARCH_ROW, 11, 0, 1'b1, 1'b1, 1'b0);
    cyc(PH_MARCH_ROW, 12, 0, 1'b0, 1'b0, 1'b0);
    cyc(PH_MARCH_ROW, 13, 0, 1'b0, 1'b0, 1'b0);
    check(error && err_count == 1 && first_phase == PH_MARCH_ROW && first_addr == 11,
          "single-cell failure context");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
