// tb_io_buffer: random check of the write-data select and the read-bit mux.
module tb_io_buffer;
  localparam int unsigned COLS = 16;
  logic test_mode, bist_din, ext_din, din, dout;
  logic [3:0] col_addr;
  logic [COLS-1:0] bl_out;
  int checks = 0, failures = 0;

  io_buffer #(.COLS(COLS)) dut (.*);

  initial begin
    for (int i = 0; i < 500; i++) begin
      {test_mode, bist_din, ext_din} = 3'($urandom);
      col_addr = 4'($urandom);
      bl_out = COLS'($urandom);
      #1;
      checks++;
      if (din !== (test_mode ? bist_din : ext_din) || dout !== bl_out[col_addr]) begin
        failures++;
        $display("FAIL: mode=%0d din=%0d dout=%0d", test_mode, din, dout);
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
