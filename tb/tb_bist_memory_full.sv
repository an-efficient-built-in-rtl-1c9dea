// tb_bist_memory_full: one complete self-test of the memory at its default
// size (256 x 256 cells), fault-free array.
//
// Starts the test with CAS-before-RAS, waits for bist_done and checks the
// run length against the controller's cycle formula, that no error was
// reported and that test mode was left.  It then reads every cell through
// the normal access port and compares it with the contents the last test
// steps leave behind, worked out here from the four-cell labelling.
// It also counts the cycles spent in each test and compares them with the
// test lengths of the algorithms at this size: 256 x sqrt(n) for NPSF
// (groups A and B together) and for NBLSF, 16 write passes plus 8 x sqrt(n)
// + 8 reads for S/A recovery and 6 x sqrt(n) per decoder march, with
// sqrt(n) = 256 word-lines.
module tb_bist_memory_full;
  import bist_pkg::*;

  localparam int unsigned R = 256;
  localparam int unsigned C = 256;
  localparam int unsigned RUN_CYCLES = 3*4*R + 2*64*2*R + 64*4*R + (24*R + 8) + (6*R + 6*C);

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic n_ras = 1'b1, n_cas = 1'b1;
  logic acc_en = 1'b0, acc_we = 1'b0, acc_din = 1'b0;
  logic [7:0] acc_row = '0, acc_col = '0;
  logic        dout, tm, busy, done, gb, err;
  logic [15:0] cnt;
  phase_e      ph, fph;
  logic [7:0]  fadr;
  logic [5:0]  ftp;
  int checks = 0, failures = 0;
  int busy_cycles = 0;
  int n_init = 0, n_npsf = 0, n_nblsf = 0, n_sar = 0, n_mrow = 0, n_mcol = 0;

  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  bist_memory_top dut (
    .clk, .rst_n, .n_ras, .n_cas, .acc_en, .acc_we, .acc_row, .acc_col, .acc_din,
    .acc_dout(dout), .test_mode(tm), .bist_busy(busy), .bist_done(done),
    .bist_phase(ph), .bist_group_b(gb), .error(err), .err_count(cnt),
    .first_phase(fph), .first_addr(fadr), .first_tp(ftp)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (busy) begin
    busy_cycles++;
    unique case (ph)
      PH_INIT:                n_init++;
      PH_NPSF_W, PH_NPSF_R:   n_npsf++;
      PH_NBLSF:               n_nblsf++;
      PH_SAR_W, PH_SAR_R:     n_sar++;
      PH_MARCH_ROW:           n_mrow++;
      PH_MARCH_COL:           n_mcol++;
      default: ;
    endcase
  end

  function automatic logic expected_cell(input int r, input int c);
    int lab;
    logic [3:0] p;
    if (r == 0 || c == 0) return 1'b0;
    lab = ((c % 4) + (((r / 2) % 2) * 2)) % 4;
    p = 4'b1010;
    return (r == R - 1) ? !p[lab] : p[lab];
  endfunction

  initial begin
    int bad;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    n_cas = 1'b0;
    repeat (3) @(negedge clk);
    n_ras = 1'b0;
    repeat (2) @(negedge clk);
    n_cas = 1'b1; n_ras = 1'b1;
    wait (done);
    @(negedge clk);
    check(busy_cycles == RUN_CYCLES, $sformatf("run length %0d, expected %0d", busy_cycles, RUN_CYCLES));
    check(n_init == 3 * 4 * R, $sformatf("initialisation %0d cycles", n_init));
    check(n_npsf == 256 * R, $sformatf("NPSF test %0d cycles, expected 256 x %0d", n_npsf, R));
    check(n_nblsf == 256 * R, $sformatf("NBLSF test %0d cycles, expected 256 x %0d", n_nblsf, R));
    check(n_sar == 16 * R + 8 * R + 8, $sformatf("S/A recovery test %0d cycles", n_sar));
    check(n_mrow == 6 * R, $sformatf("row decoder march %0d cycles", n_mrow));
    check(n_mcol == 6 * C, $sformatf("column decoder march %0d cycles", n_mcol));
    $display("cycles: init %0d, NPSF %0d, NBLSF %0d, S/A recovery %0d, row march %0d, column march %0d",
             n_init, n_npsf, n_nblsf, n_sar, n_mrow, n_mcol);
    check(!err && cnt == 0, $sformatf("fault-free array reported %0d errors", cnt));
    repeat (3) @(negedge clk);
    check(!tm, "test mode not left");
    bad = 0;
    acc_en = 1'b1;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        acc_row = 8'(r); acc_col = 8'(c);
        #1;
        if (dout != expected_cell(r, c)) bad++;
      end
    acc_en = 1'b0;
    check(bad == 0, $sformatf("%0d cells differ after the test", bad));
    $display("run of %0d cycles", busy_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
