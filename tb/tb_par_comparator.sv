// tb_par_comparator: for random bit-line values (biased so that all-equal
// labels are frequent), each label select, check and expected value, S1/S2
// and the ERROR latched one clock later must match a reference computed here
// bit by bit.  Also: no ERROR without eval.
module tb_par_comparator;
  localparam int unsigned COLS = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  logic [COLS-1:0] bl;
  logic [3:0] l_n;
  logic eval, check, exp;
  logic s1, s2, error;
  int checks = 0, failures = 0;

  par_comparator #(.COLS(COLS)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  initial begin
    int lab;
    logic r1, r0, rerr;
    eval = 0; check = 0; exp = 0; l_n = 4'hF; bl = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      lab = $urandom % 4;
      l_n = ~(4'b1 << lab);
      case ($urandom % 3)
        0: bl = '0;
        1: bl = '1;
        default: bl = COLS'($urandom);
      endcase
      if ($urandom % 2 != 0) bl[($urandom % (COLS / 4)) * 4 + lab] ^= 1'b1;
      eval = 1'($urandom % 4 != 0);
      check = 1'($urandom);
      exp = 1'($urandom);
      r1 = 1'b1; r0 = 1'b1;
      for (int k = lab; k < COLS; k += 4) begin
        r1 &= bl[k];
        r0 &= !bl[k];
      end
      rerr = eval && (!(r1 || r0) || (check && ((r1 && !exp) || (r0 && exp))));
      #1;
      checks++;
      if (s1 !== r1 || s2 !== r0) begin
        failures++;
        $display("FAIL: s1/s2 %b%b expected %b%b", s1, s2, r1, r0);
      end
      @(negedge clk);
      checks++;
      if (error !== rerr) begin
        failures++;
        $display("FAIL: error %0d expected %0d (bl=%h label=%0d)", error, rerr, bl, lab);
      end
    end
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
