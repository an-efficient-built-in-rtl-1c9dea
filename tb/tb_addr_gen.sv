// tb_addr_gen: random sweeps (first, last, direction, operations per
// address) must visit the expected (address, op) sequence one step per clock
// and raise final_op exactly on the last step; start must override step.
module tb_addr_gen;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, step = 1'b0, down = 1'b0;
  logic [5:0] first = '0, last = '0, addr;
  logic [2:0] last_op = '0, op;
  logic final_op;
  int checks = 0, failures = 0;

  addr_gen #(.AW(6)) dut (.*);

  always #5 clk = ~clk;
  initial #1 rst_n = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int a0, a1, nop, n;
    bit dn;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 40; t++) begin
      a0 = $urandom % 64; a1 = $urandom % 64;
      dn = (a1 < a0);
      nop = 1 + $urandom % 5;
      first = 6'(a0); last = 6'(a1); down = dn; last_op = 3'(nop - 1);
      start = 1'b1; step = 1'b1;
      @(negedge clk);
      start = 1'b0;
      n = (dn ? a0 - a1 : a1 - a0) + 1;
      for (int k = 0; k < n; k++)
        for (int o = 0; o < nop; o++) begin
          check(addr == 6'(dn ? a0 - k : a0 + k) && op == 3'(o),
                $sformatf("sweep %0d: at %0d/%0d expected %0d/%0d", t, addr, op, dn ? a0 - k : a0 + k, o));
          check(final_op == (k == n - 1 && o == nop - 1), "final_op");
          if ($urandom % 5 == 0) begin
            step = 1'b0; @(negedge clk); step = 1'b1;
            check(addr == 6'(dn ? a0 - k : a0 + k) && op == 3'(o), "hold without step");
          end
          @(negedge clk);
        end
      step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
