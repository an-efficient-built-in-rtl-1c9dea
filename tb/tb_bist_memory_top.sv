// tb_bist_memory_top: end-to-end test of the memory with BIST on an 8x8 array.
//
// Six copies of the design share clock, strobes and access port: one with a
// fault-free array and five each with one defect in the cell-array model
// (stuck-at-0, stuck-at-1, neighbour coupling, word-line multiple access,
// bit-line crosstalk on a read directly after a write).
// The test
//   - writes and reads cells through the normal access port,
//   - checks that RAS-before-CAS (a normal cycle) does not start the test,
//   - starts the self-test with CAS-before-RAS and runs it to the end,
//   - checks the run length against the cycle formula of the controller,
//   - checks that the fault-free copy reports no error and every defective
//     copy reports one (at the defect's row where that is predictable),
//   - reads the whole fault-free array back and compares it with the last
//     patterns written, labelled independently of the RTL,
//   - runs the self-test a second time.
// Two more copies run with READ_BASE_CELLS set (all four labels read after
// every NPSF write, the written label and its bit-line neighbours after
// every NBLSF write): a fault-free one, checked for its longer run length
// and no error, and one with the coupling defect, which must then be caught
// already by an NPSF read of its own word-line.
// It counts how often each mechanism happens (test entry, test exit, NPSF
// with tilings A and B, transition and non-transition writes, NBLSF, both
// S/A recovery cases, both decoder marches, error detection, normal access)
// and fails any that never happened.
module tb_bist_memory_top;
  import bist_pkg::*;

  localparam int unsigned R  = 8;
  localparam int unsigned C  = 8;
  localparam int unsigned NF = 5;  // defective copies
  localparam int unsigned KIND [NF] = '{1, 2, 3, 4, 5};
  localparam int unsigned DROW [NF] = '{3, 6, 2, 4, 5};
  localparam int unsigned DCOL [NF] = '{5, 2, 4, 1, 6};
  localparam int unsigned RUN_CYCLES = 3*4*R + 2*64*2*R + 64*4*R + (24*R + 8) + (6*R + 6*C);
  localparam int unsigned RUN_CYCLES_RA = RUN_CYCLES + 2*64*3*R + 64*4*R;  // READ_BASE_CELLS
  localparam int unsigned RA_KIND [2] = '{0, 3};
  localparam int unsigned RA_ROW = 2, RA_COL = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  initial #1 rst_n = 1'b0;  // a falling edge applies the asynchronous reset
  logic n_ras = 1'b1, n_cas = 1'b1;
  logic acc_en = 1'b0, acc_we = 1'b0, acc_din = 1'b0;
  logic [2:0] acc_row = '0, acc_col = '0;

  logic        dout0, tm0, busy0, done0, gb0, err0;
  logic [15:0] cnt0;
  phase_e      ph0, fph0;
  logic [2:0]  fadr0;
  logic [5:0]  ftp0;

  logic        doutf [NF];
  logic        tmf [NF], busyf [NF], donef [NF], gbf [NF], errf [NF];
  logic [15:0] cntf [NF];
  phase_e      phf [NF], fphf [NF];
  logic [2:0]  fadrf [NF];
  logic [5:0]  ftpf [NF];

  logic        tmr [2], busyr [2], doner [2], errr [2];
  logic [15:0] cntr [2];
  phase_e      phr [2], fphr [2];
  logic [2:0]  fadrr [2];
  int          busy_r [2];

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bist_memory_top #(.ROWS(R), .COLS(C)) dut (
    .clk, .rst_n, .n_ras, .n_cas, .acc_en, .acc_we, .acc_row, .acc_col, .acc_din,
    .acc_dout(dout0), .test_mode(tm0), .bist_busy(busy0), .bist_done(done0),
    .bist_phase(ph0), .bist_group_b(gb0), .error(err0), .err_count(cnt0),
    .first_phase(fph0), .first_addr(fadr0), .first_tp(ftp0)
  );

  for (genvar g = 0; g < NF; g++) begin : g_faulty
    bist_memory_top #(.ROWS(R), .COLS(C), .DEFECT_KIND(KIND[g]), .DEFECT_ROW(DROW[g]),
                      .DEFECT_COL(DCOL[g])) dutf (
      .clk, .rst_n, .n_ras, .n_cas, .acc_en, .acc_we, .acc_row, .acc_col, .acc_din,
      .acc_dout(doutf[g]), .test_mode(tmf[g]), .bist_busy(busyf[g]), .bist_done(donef[g]),
      .bist_phase(phf[g]), .bist_group_b(gbf[g]), .error(errf[g]), .err_count(cntf[g]),
      .first_phase(fphf[g]), .first_addr(fadrf[g]), .first_tp(ftpf[g])
    );
  end

  for (genvar g = 0; g < 2; g++) begin : g_read_all
    logic       dout_u, gb_u;
    logic [5:0] ftp_u;
    bist_memory_top #(.ROWS(R), .COLS(C), .DEFECT_KIND(RA_KIND[g]), .DEFECT_ROW(RA_ROW),
                      .DEFECT_COL(RA_COL), .READ_BASE_CELLS(1'b1)) dutr (
      .clk, .rst_n, .n_ras, .n_cas, .acc_en, .acc_we, .acc_row, .acc_col, .acc_din,
      .acc_dout(dout_u), .test_mode(tmr[g]), .bist_busy(busyr[g]), .bist_done(doner[g]),
      .bist_phase(phr[g]), .bist_group_b(gb_u), .error(errr[g]), .err_count(cntr[g]),
      .first_phase(fphr[g]), .first_addr(fadrr[g]), .first_tp(ftp_u)
    );
    always @(posedge clk) if (busyr[g]) busy_r[g]++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------------- mechanism counters
  int n_entry, n_exit, n_npsf_a, n_npsf_b, n_trans, n_nontrans, n_nblsf, n_init;
  int n_sar1, n_sar2, n_mrow, n_mcol, n_err_seen, n_normal;
  int busy_cycles, n_read_all, n_nb_reads;
  logic tm0_q = 1'b0;

  always @(posedge clk) begin
    tm0_q <= tm0;
    if (tm0 && !tm0_q) n_entry++;
    if (!tm0 && tm0_q) n_exit++;
    if (busy0) busy_cycles++;
    if (ph0 == PH_INIT) n_init++;
    if (ph0 == PH_NPSF_W && !gb0) n_npsf_a++;
    if (ph0 == PH_NPSF_W &&  gb0) n_npsf_b++;
    if (ph0 == PH_NPSF_W || (ph0 == PH_NBLSF && dut.u_ctrl.ag_op == 3'd0)) begin
      if (dut.u_ctrl.diff == 4'h0) n_nontrans++;
      else                         n_trans++;
    end
    if (ph0 == PH_NBLSF && dut.u_ctrl.ag_op == 3'd2) n_nontrans++;
    if (ph0 == PH_NBLSF) n_nblsf++;
    if (ph0 == PH_SAR_R && !dut.u_ctrl.sar_case) n_sar1++;
    if (ph0 == PH_SAR_R &&  dut.u_ctrl.sar_case) n_sar2++;
    if (ph0 == PH_MARCH_ROW) n_mrow++;
    if (phr[0] == PH_NPSF_R) n_read_all++;
    if (phr[0] == PH_NBLSF && g_read_all[0].dutr.u_ctrl.ag_op[1]) n_nb_reads++;
    if (ph0 == PH_MARCH_COL) n_mcol++;
    if (acc_en && !busy0) n_normal++;
  end

  for (genvar g = 0; g < NF; g++) begin : g_errmon
    logic seen = 1'b0;
    always @(posedge clk) if (errf[g] && !seen) begin
      seen <= 1'b1;
      n_err_seen++;
    end
  end

  // ---------------------------------------------------------- helpers
  task automatic normal_write(input int r, input int c, input logic d);
    @(negedge clk);
    acc_en = 1'b1; acc_we = 1'b1; acc_row = 3'(r); acc_col = 3'(c); acc_din = d;
    @(negedge clk);
    acc_en = 1'b0; acc_we = 1'b0;
  endtask

  task automatic normal_read(input int r, input int c, output logic d);
    @(negedge clk);
    acc_en = 1'b1; acc_we = 1'b0; acc_row = 3'(r); acc_col = 3'(c);
    #1 d = dout0;
    @(negedge clk);
    acc_en = 1'b0;
  endtask

  // Expected array after a fault-free run: the S/A recovery test leaves
  // pattern #13 = 1010 (bit k for label k+1) on rows 0..R-2 and its
  // complement on row R-1; the marches then clear bit-line 0 and word-line 0.
  // Group A label of cell (r,c): columns repeat labels 1 2 3 4, shifted by
  // two on rows whose bit 1 is set.
  function automatic logic expected_cell(input int r, input int c);
    int lab;
    logic [3:0] p;
    if (r == 0 || c == 0) return 1'b0;
    lab = ((c % 4) + (((r / 2) % 2) * 2)) % 4;
    p = 4'b1010;
    return (r == R - 1) ? !p[lab] : p[lab];
  endfunction

  task automatic cbr_start();
    @(negedge clk); n_cas = 1'b0;
    repeat (3) @(negedge clk);
    n_ras = 1'b0;
    repeat (2) @(negedge clk);
    n_cas = 1'b1; n_ras = 1'b1;
  endtask

  task automatic run_test(input int run);
    int start_cnt;
    int start_r [2];
    start_cnt = busy_cycles;
    start_r = busy_r;
    cbr_start();
    wait (done0 && doner[0] && doner[1]);
    @(negedge clk);
    for (int g = 0; g < 2; g++)
      check(busy_r[g] - start_r[g] == RUN_CYCLES_RA,
            $sformatf("run %0d: read-all copy %0d length %0d cycles, expected %0d", run, g,
                      busy_r[g] - start_r[g], RUN_CYCLES_RA));
    check(!errr[0] && cntr[0] == 0, $sformatf("run %0d: fault-free read-all copy reported %0d errors", run, cntr[0]));
    check(errr[1] && fphr[1] == PH_NPSF_R && 32'(fadrr[1]) == RA_ROW,
          $sformatf("run %0d: read-all coupling defect first seen in %s at row %0d", run,
                    fphr[1].name(), fadrr[1]));
    $display("run %0d: read-all copy, coupling defect first fails in %s, address %0d, %0d errors",
             run, fphr[1].name(), fadrr[1], cntr[1]);
    check(busy_cycles - start_cnt == RUN_CYCLES,
          $sformatf("run %0d length %0d cycles, expected %0d", run, busy_cycles - start_cnt, RUN_CYCLES));
    check(!err0 && cnt0 == 0, $sformatf("run %0d: fault-free array reported %0d errors", run, cnt0));
    for (int g = 0; g < NF; g++) begin
      check(errf[g] && cntf[g] != 0, $sformatf("run %0d: defect kind %0d not detected", run, KIND[g]));
      check(donef[g], $sformatf("run %0d: defective copy %0d not done", run, g));
    end
    // stuck-at and coupling defects first fail on a read of their own row
    for (int g = 0; g < 3; g++)
      check(32'(fadrf[g]) == DROW[g],
            $sformatf("run %0d: defect %0d first fail row %0d, expected %0d", run, g, fadrf[g], DROW[g]));
    check(fphf[0] == PH_NPSF_R, "stuck-at-0 first seen outside the NPSF read");
    // only the NBLSF test reads a word-line directly after writing it
    check(fphf[4] == PH_NBLSF && 32'(fadrf[4]) == DROW[4],
          $sformatf("run %0d: crosstalk first seen in %s at %0d", run, fphf[4].name(), fadrf[4]));
    for (int g = 0; g < NF; g++)
      $display("run %0d: defect kind %0d first fails in %s, address %0d, pattern #%0d, %0d errors",
               run, KIND[g], fphf[g].name(), fadrf[g], ftpf[g] + 1, cntf[g]);
    repeat (3) @(negedge clk);
    check(!tm0, "test mode not left after the run");
  endtask

  // ---------------------------------------------------------- stimulus
  initial begin
    logic d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // normal access
    for (int i = 0; i < 16; i++) normal_write(i % R, (i * 3 + i / 8) % C, 1'(i % 3 == 0));
    for (int i = 0; i < 16; i++) begin
      normal_read(i % R, (i * 3 + i / 8) % C, d);
      check(d == 1'(i % 3 == 0), $sformatf("normal read %0d", i));
    end

    // a normal RAS-before-CAS cycle must not enter test mode
    @(negedge clk); n_ras = 1'b0;
    repeat (3) @(negedge clk); n_cas = 1'b0;
    repeat (3) @(negedge clk); n_cas = 1'b1; n_ras = 1'b1;
    repeat (5) @(negedge clk);
    check(!tm0 && !busy0, "RAS-before-CAS started the test");

    run_test(1);

    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) begin
        normal_read(r, c, d);
        check(d == expected_cell(r, c), $sformatf("array after test, cell (%0d,%0d) = %0b", r, c, d));
      end

    run_test(2);

    // every mechanism must have happened
    check(n_entry == 2,        $sformatf("test entries %0d", n_entry));
    check(n_exit == 2,         $sformatf("test exits %0d", n_exit));
    check(n_init == 2 * 3*4*R, $sformatf("initialisation cycles %0d", n_init));
    check(n_npsf_a == 2 * 64 * R, $sformatf("NPSF group A writes %0d", n_npsf_a));
    check(n_npsf_b == 2 * 64 * R, $sformatf("NPSF group B writes %0d", n_npsf_b));
    check(n_nontrans > 0,      "no non-transition write");
    check(n_trans > 0,         "no transition write");
    check(n_nblsf == 2 * 64 * 4 * R, $sformatf("NBLSF cycles %0d", n_nblsf));
    check(n_sar1 == 2 * 2 * 4,  $sformatf("S/A case 1 reads %0d", n_sar1));
    check(n_sar2 == 2 * 2 * 4 * R, $sformatf("S/A case 2 reads %0d", n_sar2));
    check(n_mrow == 2 * 6 * R, $sformatf("row march ops %0d", n_mrow));
    check(n_mcol == 2 * 6 * C, $sformatf("column march ops %0d", n_mcol));
    check(n_err_seen == NF,    $sformatf("defects detected %0d", n_err_seen));
    check(n_normal > 0,        "no normal access");
    check(n_read_all == 2 * 2 * 64 * 4 * R, $sformatf("read-all NPSF reads %0d", n_read_all));
    check(n_nb_reads == 2 * 64 * 4 * R, $sformatf("NBLSF neighbour reads %0d", n_nb_reads));
    $display("mechanisms: entry=%0d exit=%0d npsfA=%0d npsfB=%0d trans=%0d nontrans=%0d nblsf=%0d sar1=%0d sar2=%0d mrow=%0d mcol=%0d errs=%0d normal=%0d readall=%0d nbreads=%0d",
             n_entry, n_exit, n_npsf_a, n_npsf_b, n_trans, n_nontrans, n_nblsf, n_sar1, n_sar2,
             n_mrow, n_mcol, n_err_seen, n_normal, n_read_all, n_nb_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * RUN_CYCLES_RA + 5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
