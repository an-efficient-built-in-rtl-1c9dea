// bist_ctrl: sequencer of the memory self-test.
//
// Started by the rising edge of test enable, it runs, one memory operation
// per clock cycle and with no idle cycles between steps:
//   1. NPSF test, tiling group A, then again with tiling group B (64
//      patterns each, 128 in all).  Each starts by writing 0 to every cell.
//      For each test pattern: on every word-line, write the one label whose
//      bit changed since the previous pattern (label 1 if none changed, a
//      non-transition write) to all cells of that label at once; then on
//      every word-line read that label back, one parallel compare.  With
//      READ_BASE_CELLS set, each word-line instead has all four labels read
//      in turn (labels 1..4), so the three base cells next to the written
//      cell are observed too; this costs 4 reads per word-line instead of 1.
//   2. NBLSF test (group A): write 0 everywhere, then for each of the 64
//      patterns and each word-line: write the changed label (transition
//      write), read it, write it again with the same value (non-transition
//      write), read it, all on the same word-line before moving on.  With
//      READ_BASE_CELLS set, each of the two writes is followed by three
//      reads: the written label, then the labels on the bit-lines to either
//      side of it (the base cells its bit-line disturbs); the label two
//      bit-lines away is not read.
//   3. Sense-amplifier recovery test with patterns #7 and #13 (0101/1010):
//      write one pattern on all word-lines but the last and its complement
//      on the last, then case 1 reads the last word-line, case 2 reads all
//      word-lines in order (a long string of equal reads, then the opposite).
//      Each case is run with both patterns.
//   4. Decoder tests: a 6n march (up W0; up R0 W1; down R1 W0 R0) over the
//      cells of bit-line 0 (row decoder) and then of word-line 0 (column
//      decoder), single-cell accesses in normal decoder mode.
// Then it holds `done` and asks the test-enable block to leave test mode.
//
// Cycle count of a run (R rows, C columns): 3 x 4R initialisation,
// 2 x 64 x 2R NPSF (256R), 64 x 4R NBLSF (256R), 24R + 8 S/A recovery,
// 6R + 6C march; 554R + 6C + 8 in all.  READ_BASE_CELLS adds 2 x 64 x 3R
// to NPSF and 64 x 4R to NBLSF: 1194R + 6C + 8.
//
// The algorithms, pattern order, groups A/B, reading back the written label,
// the S/A recovery patterns and the march follow the document.  Own choices:
// initialising again before each test; the order of the four tests; the
// exact S/A recovery read sequence; group A labelling for the NBLSF and S/A
// recovery tests; the READ_BASE_CELLS option (off by default, which keeps
// the document's 256 x sqrt(n) count per test; on, it checks the base cells
// after every write as the document's fault coverage asks).
module bist_ctrl
  import bist_pkg::*;
#(
  parameter int unsigned ROWS = 256,
  parameter int unsigned COLS = 256,
  parameter bit          READ_BASE_CELLS = 1'b0,  // read the base cells after each write
  localparam int unsigned RW  = $clog2(ROWS),
  localparam int unsigned CW  = $clog2(COLS),
  localparam int unsigned AW  = (RW > CW) ? RW : CW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          test_en,
  // test pattern generator
  input  logic [3:0]    tp,
  input  logic          tp_last,
  output logic          tpg_clear,
  output logic          tpg_step,
  // address generator
  input  logic [AW-1:0] ag_addr,
  input  logic [2:0]    ag_op,
  input  logic          ag_final,
  output logic          ag_start,
  output logic          ag_step,
  output logic [AW-1:0] ag_first,
  output logic [AW-1:0] ag_last,
  output logic          ag_down,
  output logic [2:0]    ag_last_op,
  // memory access
  output logic          mem_en,
  output logic          mem_we,
  output logic [RW-1:0] row_addr,
  output logic [CW-1:0] col_addr,
  output logic          phi4,       // label-parallel decoder mode
  output logic          din,
  // checks
  output logic          cmp_eval,
  output logic [3:0]    cmp_l_n,
  output logic          cmp_check,
  output logic          cmp_exp,
  output logic          io_check,
  output logic          io_exp,
  // status
  output phase_e        phase,
  output logic          group_b,
  output logic          busy,
  output logic          done,
  output logic          te_clear
);
  // ---------------------------------------------------------------- state
  logic       sar_case;       // 0: write-read, 1: read-read
  logic       sar_comp;       // 0: pattern #7, 1: pattern #13
  logic [1:0] march_el;       // march element 0..2
  logic       init_nblsf;     // the running initialisation precedes NBLSF
  logic [3:0] prev_tp;        // pattern currently held in the array
  logic       test_en_q;

  phase_e     nxt_phase;
  logic       nxt_case, nxt_comp, nxt_group_b, nxt_init_nblsf;
  logic [1:0] nxt_el;
  logic       advance;        // enter nxt_phase at this edge

  // ---------------------------------------------------------------- datapath
  logic [3:0] diff;
  logic [1:0] lc;             // label written in this pattern
  logic [1:0] lab;            // label of this operation
  logic [3:0] sar_p;
  logic       last_row;
  logic [1:0] mop;            // march operation: {is_read, value}

  assign diff = tp ^ prev_tp;
  // A single bit changes between patterns; with none changed (the first
  // pattern after initialisation) label 1 gets a non-transition write.
  always_comb begin
    if      (diff[1]) lc = 2'd1;
    else if (diff[2]) lc = 2'd2;
    else if (diff[3]) lc = 2'd3;
    else              lc = 2'd0;
  end

  assign sar_p    = sar_comp ? SAR_TP13 : SAR_TP7;
  assign last_row = (32'(ag_addr) == ROWS - 1);

  // march elements: 0 = W0; 1 = R0 W1; 2 = R1 W0 R0
  always_comb begin
    unique case (march_el)
      2'd0:    mop = 2'b00;
      2'd1:    mop = (ag_op == 3'd0) ? 2'b10 : 2'b01;
      default: mop = (ag_op == 3'd0) ? 2'b11 : (ag_op == 3'd1) ? 2'b00 : 2'b10;
    endcase
  end

  always_comb begin
    mem_en    = 1'b0;
    mem_we    = 1'b0;
    row_addr  = RW'(ag_addr);
    col_addr  = '0;
    phi4      = 1'b1;
    din       = 1'b0;
    cmp_eval  = 1'b0;
    cmp_l_n   = 4'hF;
    cmp_check = 1'b0;
    cmp_exp   = 1'b0;
    io_check  = 1'b0;
    io_exp    = 1'b0;
    lab       = ag_op[1:0];
    unique case (phase)
      PH_INIT: begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        din    = 1'b0;
      end
      PH_NPSF_W: begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        lab    = lc;
        din    = tp[lc];
      end
      PH_NPSF_R: begin
        mem_en    = 1'b1;
        lab       = READ_BASE_CELLS ? ag_op[1:0] : lc;
        cmp_eval  = 1'b1;
        cmp_check = 1'b1;
        cmp_exp   = tp[lab];
      end
      PH_NBLSF: begin
        mem_en = 1'b1;
        lab    = lc;
        din    = tp[lc];
        if (READ_BASE_CELLS) begin
          // op[2] 0: transition, 1: non-transition half; op[1:0] 0: write,
          // 1: read written label, 2/3: read left/right bit-line neighbour
          mem_we = (ag_op[1:0] == 2'd0);
          if (ag_op[1:0] == 2'd2) lab = lc - 2'd1;
          if (ag_op[1:0] == 2'd3) lab = lc + 2'd1;
        end else begin
          // op 0: transition write, 1: read, 2: non-transition write, 3: read
          mem_we = !ag_op[0];
        end
        cmp_eval  = !mem_we;
        cmp_check = !mem_we;
        cmp_exp   = tp[lab];
      end
      PH_SAR_W: begin
        mem_en = 1'b1;
        mem_we = 1'b1;
        din    = sar_p[lab] ^ last_row;
      end
      PH_SAR_R: begin
        mem_en    = 1'b1;
        cmp_eval  = 1'b1;
        cmp_check = 1'b1;
        cmp_exp   = sar_p[lab] ^ last_row;
      end
      PH_MARCH_ROW, PH_MARCH_COL: begin
        mem_en = 1'b1;
        phi4   = 1'b0;
        if (phase == PH_MARCH_COL) begin
          row_addr = '0;
          col_addr = CW'(ag_addr);
        end
        mem_we   = !mop[1];
        din      = mop[0];
        io_check = mop[1];
        io_exp   = mop[0];
      end
      default: ;
    endcase
    if (phi4) begin
      col_addr = CW'(label_class(row_addr[1:0], lab, group_b));
      if (cmp_eval) cmp_l_n = ~(4'b0001 << label_class(row_addr[1:0], lab, group_b));
    end
  end

  // ---------------------------------------------------------------- sequencing
  assign busy     = (phase != PH_IDLE) && (phase != PH_DONE);
  assign done     = (phase == PH_DONE);
  assign te_clear = advance && (nxt_phase == PH_DONE);
  assign ag_step  = busy;

  always_comb begin
    nxt_phase      = phase;
    nxt_case       = sar_case;
    nxt_comp       = sar_comp;
    nxt_el         = march_el;
    nxt_group_b    = group_b;
    nxt_init_nblsf = init_nblsf;
    advance        = 1'b0;
    tpg_clear      = 1'b0;
    tpg_step       = 1'b0;
    if (!busy) begin
      if (test_en && !test_en_q) begin
        advance        = 1'b1;
        tpg_clear      = 1'b1;
        nxt_phase      = PH_INIT;
        nxt_group_b    = 1'b0;
        nxt_init_nblsf = 1'b0;
        nxt_case       = 1'b0;
        nxt_comp       = 1'b0;
        nxt_el         = 2'd0;
      end
    end else if (ag_final) begin
      advance = 1'b1;
      unique case (phase)
        PH_INIT:   nxt_phase = init_nblsf ? PH_NBLSF : PH_NPSF_W;
        PH_NPSF_W: nxt_phase = PH_NPSF_R;
        PH_NPSF_R: begin
          tpg_step  = 1'b1;
          nxt_phase = PH_NPSF_W;
          if (tp_last) begin
            nxt_phase = PH_INIT;
            if (!group_b) begin
              nxt_group_b = 1'b1;
            end else begin
              nxt_group_b    = 1'b0;
              nxt_init_nblsf = 1'b1;
            end
          end
        end
        PH_NBLSF: begin
          tpg_step  = 1'b1;
          nxt_phase = tp_last ? PH_SAR_W : PH_NBLSF;
        end
        PH_SAR_W: nxt_phase = PH_SAR_R;
        PH_SAR_R: begin
          nxt_comp = !sar_comp;
          if (!sar_comp)      nxt_phase = PH_SAR_W;
          else if (!sar_case) begin
            nxt_case  = 1'b1;
            nxt_phase = PH_SAR_W;
          end else            nxt_phase = PH_MARCH_ROW;
        end
        PH_MARCH_ROW: begin
          if (march_el != 2'd2) nxt_el = march_el + 2'd1;
          else begin
            nxt_el    = 2'd0;
            nxt_phase = PH_MARCH_COL;
          end
        end
        PH_MARCH_COL: begin
          if (march_el != 2'd2) nxt_el = march_el + 2'd1;
          else                  nxt_phase = PH_DONE;
        end
        default: ;
      endcase
    end
  end

  // Address generator settings for the step being entered.
  always_comb begin
    ag_start   = advance && (nxt_phase != PH_DONE);
    ag_first   = '0;
    ag_last    = AW'(ROWS - 1);
    ag_down    = 1'b0;
    ag_last_op = 3'd3;
    unique case (nxt_phase)
      PH_NPSF_W: ag_last_op = 3'd0;
      PH_NPSF_R: ag_last_op = READ_BASE_CELLS ? 3'd3 : 3'd0;
      PH_NBLSF:  ag_last_op = READ_BASE_CELLS ? 3'd7 : 3'd3;
      PH_SAR_R:  if (!nxt_case) ag_first = AW'(ROWS - 1);
      PH_MARCH_ROW, PH_MARCH_COL: begin
        ag_last_op = {1'b0, nxt_el};
        if (nxt_phase == PH_MARCH_COL) ag_last = AW'(COLS - 1);
        if (nxt_el == 2'd2) begin
          ag_down  = 1'b1;
          ag_first = ag_last;
          ag_last  = '0;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase      <= PH_IDLE;
      sar_case   <= 1'b0;
      sar_comp   <= 1'b0;
      march_el   <= 2'd0;
      group_b    <= 1'b0;
      init_nblsf <= 1'b0;
      prev_tp    <= 4'h0;
      test_en_q  <= 1'b0;
    end else begin
      test_en_q <= test_en;
      if (advance) begin
        phase      <= nxt_phase;
        sar_case   <= nxt_case;
        sar_comp   <= nxt_comp;
        march_el   <= nxt_el;
        group_b    <= nxt_group_b;
        init_nblsf <= nxt_init_nblsf;
      end
      // The array holds pattern `tp` once its writes are done; after an
      // initialisation it holds all zeros.
      if (phase == PH_INIT)  prev_tp <= 4'h0;
      else if (tpg_step)     prev_tp <= tp;
    end
  end
endmodule
