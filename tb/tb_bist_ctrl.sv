// tb_bist_ctrl: runs the controller (with the pattern generator and the
// address generator it needs) against a memory model kept in this
// testbench, 8 x 8 cells, and checks every cycle of one complete run:
//   - each write in the NPSF and NBLSF tests writes the label whose bit
//     changed from the previous pattern of the 64-entry table, with that
//     pattern's bit, on the bit-line class given by the tiling of the
//     current group (tilings written out here independently), and each
//     NBLSF step writes that label twice on the same word-line;
//   - every parallel compare selects the label just written and expects
//     the value the model holds in all cells of that label; every single-cell check
//     expects the model's value;
//   - the number of cycles of each phase and of the whole run match the
//     counts of the algorithms, phases come in the expected order, and
//     test-mode clear is pulsed once at the end.
// Two controllers run side by side: one as built by default and one with
// READ_BASE_CELLS set, whose NPSF read step must read labels 1..4 of every
// word-line in turn (4 times as many read cycles), and whose NBLSF step
// must follow each write with reads of the written label and its two
// bit-line neighbours only (twice the cycles).
module tb_bist_ctrl;
  import bist_pkg::*;
  localparam int unsigned R = 8, C = 8;
  localparam int unsigned RUN_CYCLES = 3*4*R + 2*64*2*R + 64*4*R + (24*R + 8) + (6*R + 6*C);
  localparam int unsigned RUN_CYCLES_RA = RUN_CYCLES + 2*64*3*R + 64*4*R;
  localparam logic [3:0] TABLE [64] = '{
    4'h0, 4'h1, 4'h3, 4'h2, 4'h6, 4'h7, 4'h5, 4'h4, 4'hC, 4'hD, 4'hF, 4'hE, 4'hA, 4'hB, 4'h9, 4'h8,
    4'h9, 4'h1, 4'h0, 4'h8, 4'hA, 4'h2, 4'h3, 4'hB, 4'hF, 4'h7, 4'h6, 4'hE, 4'hC, 4'h4, 4'h5, 4'hD,
    4'h5, 4'h1, 4'h9, 4'hD, 4'hC, 4'h8, 4'h0, 4'h4, 4'h6, 4'h2, 4'hA, 4'hE, 4'hF, 4'hB, 4'h3, 4'h7,
    4'h3, 4'h1, 4'h5, 4'h7, 4'hF, 4'hD, 4'h9, 4'hB, 4'hA, 4'h8, 4'hC, 4'hE, 4'h6, 4'h4, 4'h0, 4'h2};
  localparam int FIRST_A [4] = '{0, 0, 2, 2};  // label on class 0, rows mod 4
  localparam int FIRST_B [4] = '{0, 2, 2, 0};

  logic clk = 1'b0, rst_n = 1'b1;
  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  logic fin [2];

  for (genvar g = 0; g < 2; g++) begin : g_run
    localparam bit RA = (g == 1);
    localparam int unsigned RUN_LEN = RA ? RUN_CYCLES_RA : RUN_CYCLES;
    logic test_en = 1'b0;
    logic finished = 1'b0;
    assign fin[g] = finished;

    logic [3:0] tp, c_sel;
    logic [5:0] tp_idx;
    logic tp_last, tpg_clear, tpg_step;
    logic [2:0] ag_addr, ag_first, ag_last;
    logic [2:0] ag_op, ag_last_op;
    logic ag_final, ag_start, ag_step, ag_down;
    logic mem_en, mem_we, phi4, din;
    logic [2:0] row_addr, col_addr;
    logic cmp_eval, cmp_check, cmp_exp, io_check, io_exp;
    logic [3:0] cmp_l_n;
    phase_e phase;
    logic group_b, busy, done, te_clear;

    tpg u_tpg (.clk, .rst_n, .clear(tpg_clear), .step(tpg_step), .tp, .c_sel, .tp_idx, .last(tp_last));
    addr_gen #(.AW(3)) u_ag (.clk, .rst_n, .start(ag_start), .step(ag_step), .first(ag_first),
      .last(ag_last), .down(ag_down), .last_op(ag_last_op), .addr(ag_addr), .op(ag_op), .final_op(ag_final));
    bist_ctrl #(.ROWS(R), .COLS(C), .READ_BASE_CELLS(RA)) dut (.*);


    logic model [R][C];
    int   cyc_in [phase_e];
    int   tp_count;          // patterns completed in the current test
    int   busy_cycles = 0, clears = 0;
    phase_e last_phase = PH_IDLE;
    phase_e order [$];
    logic [3:0] held;        // pattern the array holds
    int   last_wr_label = 0;
    int   nb_left = 0, nb_right = 0;  // NBLSF neighbour reads
    int   rd_on_row = 0;       // read-all: labels read so far on this row
    logic [2:0] rd_row = '0;
    int   nblsf_writes [R];

    function automatic int label_of(input int r, input int cls, input bit gb);
      return ((gb ? FIRST_B[r % 4] : FIRST_A[r % 4]) + cls) % 4;
    endfunction

    always @(posedge clk) if (rst_n) begin
      if (te_clear) clears++;
      if (busy) begin
        busy_cycles++;
        cyc_in[phase] = cyc_in.exists(phase) ? cyc_in[phase] + 1 : 1;
        if (phase != last_phase) order.push_back(phase);
        last_phase = phase;
        check(mem_en, "no memory access in a busy cycle");
        // pattern-writing writes: the changed label with the table's bit
        if (mem_we && (phase == PH_NPSF_W || phase == PH_NBLSF)) begin
          logic [3:0] want;
          int lab, ch;
          want = TABLE[tp_count % 64];
          lab  = label_of(int'(row_addr), int'(col_addr[1:0]), group_b);
          ch   = -1;
          for (int k = 0; k < 4; k++) if (want[k] != held[k]) ch = k;
          if (ch < 0) ch = 0;
          check(phi4, "pattern write not label-parallel");
          check(lab == ch, $sformatf("pattern #%0d row %0d wrote label %0d, changed label %0d",
                                     tp_count % 64 + 1, row_addr, lab + 1, ch + 1));
          check(din == want[lab], $sformatf("pattern #%0d data %0d", tp_count % 64 + 1, din));
          last_wr_label = lab;
          if (phase == PH_NBLSF) nblsf_writes[row_addr]++;
        end
        // compares must expect what the model holds on the selected label
        if (cmp_eval) begin
          int cls;
          cls = -1;
          for (int k = 0; k < 4; k++) if (!cmp_l_n[k]) cls = k;
          check($countones(~cmp_l_n) == 1, "label select not one-hot");
          if (RA && phase == PH_NPSF_R && cls >= 0) begin
            if (row_addr != rd_row) rd_on_row = 0;
            rd_row = row_addr;
            check(label_of(int'(row_addr), cls, group_b) == rd_on_row % 4,
                  $sformatf("read-all reads label %0d as read %0d of row %0d",
                            label_of(int'(row_addr), cls, group_b) + 1, rd_on_row + 1, row_addr));
            rd_on_row++;
          end else if (RA && phase == PH_NBLSF && cls >= 0) begin
          int dl;
          dl = (label_of(int'(row_addr), cls, group_b) - last_wr_label + 4) % 4;
          check(dl != 2, $sformatf("NBLSF reads label %0d, two bit-lines from written label %0d",
                                   label_of(int'(row_addr), cls, group_b) + 1, last_wr_label + 1));
          if (dl == 1) nb_right++;
          if (dl == 3) nb_left++;
        end else if (cls >= 0 && phase != PH_SAR_R) check(label_of(int'(row_addr), cls, group_b) == last_wr_label,
                              $sformatf("%s compares label %0d, last written %0d", phase.name(),
                                        label_of(int'(row_addr), cls, group_b) + 1, last_wr_label + 1));
          check(cmp_check, "compare without value check");
          for (int c = cls; c < C; c += 4)
            check(model[row_addr][c] == cmp_exp,
                  $sformatf("%s row %0d class %0d expects %0d, holds %0d", phase.name(), row_addr, cls,
                            cmp_exp, model[row_addr][c]));
        end
        if (io_check) begin
          check(!phi4 && !mem_we, "single-cell check in parallel mode");
          check(model[row_addr][col_addr] == io_exp, $sformatf("%s cell (%0d,%0d) expects %0d",
                phase.name(), row_addr, col_addr, io_exp));
        end
        // update the model
        if (mem_we)
          for (int c = 0; c < C; c++)
            if (phi4 ? (c % 4 == int'(col_addr) % 4) : (c == int'(col_addr))) model[row_addr][c] = din;
        if (phase == PH_INIT) held = 4'h0;
        if (tpg_step) begin
          held = TABLE[tp_count % 64];
          tp_count++;
        end
        if (phase == PH_INIT) tp_count = tp_count - (tp_count % 64);
      end
    end

    initial begin
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) model[r][c] = 1'($urandom);
      tp_count = 0;
      held = 4'h0;
      for (int r = 0; r < R; r++) nblsf_writes[r] = 0;
      repeat (2) @(negedge clk);
      check(!busy && !done, "idle after reset");
      test_en = 1'b1;
      wait (done);
      @(negedge clk);
      test_en = 1'b0;
      check(busy_cycles == RUN_LEN, $sformatf("run %0d cycles, expected %0d", busy_cycles, RUN_LEN));
      check(cyc_in[PH_INIT] == 3 * 4 * R, $sformatf("init cycles %0d", cyc_in[PH_INIT]));
      check(cyc_in[PH_NPSF_W] == 2 * 64 * R, $sformatf("NPSF write cycles %0d", cyc_in[PH_NPSF_W]));
      check(cyc_in[PH_NPSF_R] == 2 * 64 * R * (RA ? 4 : 1), $sformatf("NPSF read cycles %0d", cyc_in[PH_NPSF_R]));
      check(cyc_in[PH_NBLSF] == 64 * 4 * R * (RA ? 2 : 1), $sformatf("NBLSF cycles %0d", cyc_in[PH_NBLSF]));
      check(cyc_in[PH_SAR_W] == 4 * 4 * R, $sformatf("S/A write cycles %0d", cyc_in[PH_SAR_W]));
      check(cyc_in[PH_SAR_R] == 2 * 4 + 2 * 4 * R, $sformatf("S/A read cycles %0d", cyc_in[PH_SAR_R]));
      check(cyc_in[PH_MARCH_ROW] == 6 * R, $sformatf("row march cycles %0d", cyc_in[PH_MARCH_ROW]));
      check(cyc_in[PH_MARCH_COL] == 6 * C, $sformatf("column march cycles %0d", cyc_in[PH_MARCH_COL]));
      for (int r = 0; r < R; r++)
        check(nblsf_writes[r] == 2 * 64, $sformatf("NBLSF writes on row %0d: %0d", r, nblsf_writes[r]));
      if (RA) check(nb_left == 2 * 64 * R && nb_right == 2 * 64 * R,
                  $sformatf("NBLSF neighbour reads left %0d right %0d", nb_left, nb_right));
    check(clears == 1, $sformatf("test-mode clear pulses %0d", clears));
      check(order[0] == PH_INIT && order[1] == PH_NPSF_W && order[$] == PH_MARCH_COL, "phase order");
      check(order[order.size() - 2] == PH_MARCH_ROW, "row march before column march");
      repeat (5) @(negedge clk);
      check(done && !busy, "done not held");
      finished = 1'b1;
    end

  end

  initial begin
    repeat (2) @(negedge clk);
    wait (fin[0] && fin[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (RUN_CYCLES_RA + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
