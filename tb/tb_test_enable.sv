// tb_test_enable: CAS-before-RAS must set test mode (three clocks after /CAS
// falls), RAS-before-CAS must not, clear must leave test mode, and the BIST
// clock enable must follow test mode.
module tb_test_enable;
  logic clk = 1'b0, rst_n = 1'b1, n_ras = 1'b1, n_cas = 1'b1, clear = 1'b0;
  logic test_en, bist_clk_en;
  int checks = 0, failures = 0;

  test_enable dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!test_en && !bist_clk_en, "idle after reset");
    for (int k = 0; k < 3; k++) begin
      // normal cycle: RAS then CAS
      n_ras = 1'b0; repeat (2) @(negedge clk);
      n_cas = 1'b0; repeat (4) @(negedge clk);
      check(!test_en, "RAS-before-CAS set test mode");
      n_cas = 1'b1; n_ras = 1'b1; repeat (3) @(negedge clk);
      check(!test_en, "end of normal cycle set test mode");
      // CAS before RAS
      n_cas = 1'b0;
      @(negedge clk); @(negedge clk);
      check(!test_en, "test mode too early");
      @(negedge clk);
      check(test_en && bist_clk_en, "CAS-before-RAS did not set test mode after 3 clocks");
      n_ras = 1'b0; repeat (2) @(negedge clk);
      n_cas = 1'b1; n_ras = 1'b1; repeat (4) @(negedge clk);
      check(test_en, "test mode not held");
      clear = 1'b1; @(negedge clk); clear = 1'b0;
      check(!test_en && !bist_clk_en, "clear did not leave test mode");
      repeat (2) @(negedge clk);
    end
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
