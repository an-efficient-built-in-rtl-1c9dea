// tb_tpg: checks the test pattern generator against the 64-entry pattern
// table (typed in here), the one-bit change between consecutive patterns,
// the one-hot sequence controller, the wrap after pattern #64, `last`, the
// hold without `step` and `clear`.
module tb_tpg;
  logic clk = 1'b0, rst_n = 1'b1, clear = 1'b0, step = 1'b0;
  logic [3:0] tp, c_sel;
  logic [5:0] tp_idx;
  logic last;
  int checks = 0, failures = 0;

  // Test patterns #1..#64, B3..B0.
  localparam logic [3:0] TABLE [64] = '{
    4'h0, 4'h1, 4'h3, 4'h2, 4'h6, 4'h7, 4'h5, 4'h4, 4'hC, 4'hD, 4'hF, 4'hE, 4'hA, 4'hB, 4'h9, 4'h8,
    4'h9, 4'h1, 4'h0, 4'h8, 4'hA, 4'h2, 4'h3, 4'hB, 4'hF, 4'h7, 4'h6, 4'hE, 4'hC, 4'h4, 4'h5, 4'hD,
    4'h5, 4'h1, 4'h9, 4'hD, 4'hC, 4'h8, 4'h0, 4'h4, 4'h6, 4'h2, 4'hA, 4'hE, 4'hF, 4'hB, 4'h3, 4'h7,
    4'h3, 4'h1, 4'h5, 4'h7, 4'hF, 4'hD, 4'h9, 4'hB, 4'hA, 4'h8, 4'hC, 4'hE, 4'h6, 4'h4, 4'h0, 4'h2};

  tpg dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [3:0] prev;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 64; i++) begin
        check(tp == TABLE[i], $sformatf("TP#%0d = %b, expected %b", i + 1, tp, TABLE[i]));
        check(tp_idx == 6'(i), $sformatf("index %0d", tp_idx));
        check(c_sel == 4'(1 << (i / 16)), $sformatf("sequence controller %b at TP#%0d", c_sel, i + 1));
        check(last == (i == 63), "last flag");
        if (pass == 1 || i > 0) check($countones(tp ^ prev) == 1, $sformatf("TP#%0d changes %0d bits", i + 1, $countones(tp ^ prev)));
        prev = tp;
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        if (i % 7 == 3) begin
          @(negedge clk);
          check(tp_idx == 6'((i + 1) % 64), "holds without step");
        end
      end
    step = 1'b1;
    repeat (5) @(negedge clk);
    step = 1'b0;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    check(tp_idx == 0 && tp == TABLE[0], "clear");
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
