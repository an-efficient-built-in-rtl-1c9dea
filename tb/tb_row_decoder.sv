// tb_row_decoder: every row address with en high must raise exactly its
// word-line; with en low no word-line.  16 rows.
module tb_row_decoder;
  localparam int unsigned ROWS = 16;
  logic en;
  logic [3:0] row_addr;
  logic [ROWS-1:0] wl;
  int checks = 0, failures = 0;

  row_decoder #(.ROWS(ROWS)) dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int a = 0; a < ROWS; a++) begin
        en = 1'(e); row_addr = 4'(a);
        #1;
        checks++;
        if (wl !== (e == 1 ? ROWS'(1) << a : '0)) begin
          failures++;
          $display("FAIL: en=%0d addr=%0d wl=%b", e, a, wl);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
