// tb_col_decoder: every address in normal mode must select exactly that
// bit-line; in test mode (phi4) every bit-line whose index is the address
// modulo 4; with en low nothing.  32 bit-lines.
module tb_col_decoder;
  localparam int unsigned COLS = 32;
  logic en, phi4;
  logic [4:0] col_addr;
  logic [COLS-1:0] bl_sel, expv;
  int checks = 0, failures = 0;

  col_decoder #(.COLS(COLS)) dut (.*);

  initial begin
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < 2; p++)
        for (int a = 0; a < COLS; a++) begin
          en = 1'(e); phi4 = 1'(p); col_addr = 5'(a);
          #1;
          for (int c = 0; c < COLS; c++)
            expv[c] = (e == 1) && (p == 1 ? (c % 4 == a % 4) : (c == a));
          checks++;
          if (bl_sel !== expv) begin
            failures++;
            $display("FAIL: en=%0d phi4=%0d addr=%0d sel=%h expected %h", e, p, a, bl_sel, expv);
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
