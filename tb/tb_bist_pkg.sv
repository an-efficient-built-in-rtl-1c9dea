// tb_bist_pkg: checks the label mapping functions against the two four-cell
// tilings written out row by row (eight rows each, labels 1..4 as 0..3):
// group A rows read 1234, 1234, 3412, 3412, ...; group B rows read 1234,
// 3412, 3412, 1234, ...
module tb_bist_pkg;
  import bist_pkg::*;
  int checks = 0, failures = 0;

  // label of bit-line class 0 on each row (the others follow cyclically)
  localparam int FIRST_A [8] = '{0, 0, 2, 2, 0, 0, 2, 2};
  localparam int FIRST_B [8] = '{0, 2, 2, 0, 0, 2, 2, 0};

  initial begin
    for (int g = 0; g < 2; g++)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 4; c++) begin
          int lab;
          lab = ((g != 0 ? FIRST_B[r % 8] : FIRST_A[r % 8]) + c) % 4;
          checks++;
          if (cell_label(2'(r), 2'(c), 1'(g)) != 2'(lab)) begin
            failures++;
            $display("FAIL: group %0d row %0d class %0d label %0d expected %0d", g, r, c,
                     cell_label(2'(r), 2'(c), 1'(g)), lab);
          end
          checks++;
          if (label_class(2'(r), 2'(lab), 1'(g)) != 2'(c)) begin
            failures++;
            $display("FAIL: group %0d row %0d label %0d class wrong", g, r, lab);
          end
        end
    checks++;
    if (SAR_TP7 != 4'b0101 || SAR_TP13 != 4'b1010 || (SAR_TP7 ^ SAR_TP13) != 4'hF) begin
      failures++;
      $display("FAIL: S/A recovery patterns");
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
