// tb_mem_array: random writes (single bit-lines, every fourth bit-line, all)
// and reads of an 8x8 array against a reference array kept here; plus one
// copy per defect kind, each checked for its defect's behaviour.
module tb_mem_array;
  localparam int unsigned R = 8, C = 8;
  logic clk = 1'b0;
  logic [R-1:0] wl;
  logic [C-1:0] bl_sel;
  logic we, din;
  logic [C-1:0] bl_out, out_sa0, out_sa1, out_cpl, out_ma, out_xt;
  logic [C-1:0] ref_mem [R];
  int checks = 0, failures = 0;

  mem_array #(.ROWS(R), .COLS(C)) dut (.clk, .wl, .bl_sel, .we, .din, .bl_out);
  mem_array #(.ROWS(R), .COLS(C), .DEFECT_KIND(1), .DEFECT_ROW(2), .DEFECT_COL(3)) u_sa0
    (.clk, .wl, .bl_sel, .we, .din, .bl_out(out_sa0));
  mem_array #(.ROWS(R), .COLS(C), .DEFECT_KIND(2), .DEFECT_ROW(5), .DEFECT_COL(6)) u_sa1
    (.clk, .wl, .bl_sel, .we, .din, .bl_out(out_sa1));
  mem_array #(.ROWS(R), .COLS(C), .DEFECT_KIND(3), .DEFECT_ROW(1), .DEFECT_COL(4)) u_cpl
    (.clk, .wl, .bl_sel, .we, .din, .bl_out(out_cpl));
  mem_array #(.ROWS(R), .COLS(C), .DEFECT_KIND(4), .DEFECT_ROW(3), .DEFECT_COL(0)) u_ma
    (.clk, .wl, .bl_sel, .we, .din, .bl_out(out_ma));
  mem_array #(.ROWS(R), .COLS(C), .DEFECT_KIND(5), .DEFECT_ROW(6), .DEFECT_COL(2)) u_xt
    (.clk, .wl, .bl_sel, .we, .din, .bl_out(out_xt));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int r, input logic [C-1:0] sel, input logic d);
    @(negedge clk);
    wl = R'(1) << r; bl_sel = sel; we = 1'b1; din = d;
    @(negedge clk);
    we = 1'b0;
    for (int c = 0; c < C; c++) if (sel[c]) ref_mem[r][c] = d;
  endtask

  // write, then read the same word-line in the very next cycle
  task automatic wr_rd(input int r, input logic [C-1:0] sel, input logic d);
    @(negedge clk);
    wl = R'(1) << r; bl_sel = sel; we = 1'b1; din = d;
    @(negedge clk);
    we = 1'b0; bl_sel = '0;
    #1;
  endtask

  task automatic rd(input int r);
    @(negedge clk);
    wl = R'(1) << r; bl_sel = '0; we = 1'b0;
    #1;
  endtask

  initial begin
    logic [C-1:0] sel;
    int r;
    wl = '0; bl_sel = '0; we = 1'b0; din = 1'b0;
    for (int i = 0; i < R; i++) wr(i, '1, 1'b0);
    for (int i = 0; i < 300; i++) begin
      r = $urandom % R;
      case ($urandom % 3)
        0: sel = C'(1) << ($urandom % C);
        1: sel = C'(8'h11) << ($urandom % 4);
        default: sel = '1;
      endcase
      wr(r, sel, 1'($urandom));
      r = $urandom % R;
      rd(r);
      check(bl_out === ref_mem[r], $sformatf("row %0d read %b expected %b", r, bl_out, ref_mem[r]));
    end
    // no word-line: no output
    @(negedge clk); wl = '0; #1;
    check(bl_out == '0, "output without word-line");
    // stuck-at cells
    wr(2, '1, 1'b1); rd(2);
    check(out_sa0 == 8'hF7, $sformatf("stuck-at-0 row read %b", out_sa0));
    wr(5, '1, 1'b0); rd(5);
    check(out_sa1 == 8'h40, $sformatf("stuck-at-1 row read %b", out_sa1));
    // coupling: victim (1,4) inverts when (1,5) rises
    wr(1, '1, 1'b0);
    wr(1, 8'h20, 1'b1); rd(1);
    check(out_cpl == 8'h30, $sformatf("coupling after rise %b", out_cpl));
    wr(1, 8'h20, 1'b1); rd(1);
    check(out_cpl == 8'h30, $sformatf("coupling after non-transition write %b", out_cpl));
    wr(1, 8'h20, 1'b0); rd(1);
    check(out_cpl == 8'h10, $sformatf("coupling after fall %b", out_cpl));
    // multiple access: row 3 also opens row 4
    wr(4, '1, 1'b0);
    wr(3, '1, 1'b1); rd(4);
    check(out_ma == 8'hFF, $sformatf("multiple access: row 4 reads %b", out_ma));
    check(bl_out == 8'h00, $sformatf("fault-free row 4 reads %b", bl_out));
    // crosstalk: victim (6,2) misreads right after a write to row 6 while
    // (6,1) holds the opposite value, and reads correctly a cycle later
    wr(6, '1, 1'b0);
    wr_rd(6, 8'h04, 1'b1);
    check(out_xt == 8'h00, $sformatf("crosstalk: read after write %b", out_xt));
    @(negedge clk); #1;
    check(out_xt == 8'h04, $sformatf("crosstalk: later read %b", out_xt));
    wr_rd(6, 8'h02, 1'b1);
    check(out_xt == 8'h06, $sformatf("crosstalk: neighbours equal %b", out_xt));
    wr_rd(5, 8'h02, 1'b0); @(negedge clk); wl = R'(1) << 6; #1;
    wr_rd(6, 8'h01, 1'b1);
    check(out_xt == 8'h07, $sformatf("crosstalk: other bit-line written %b", out_xt));
    wr(6, 8'h02, 1'b0);
    wr_rd(6, 8'h01, 1'b0);
    check(out_xt == 8'h00, $sformatf("crosstalk: write elsewhere, neighbours opposite %b", out_xt));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
