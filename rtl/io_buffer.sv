// io_buffer: data input/output buffer of the memory.
//
// Write path: in test mode the BIST's pattern bit is driven onto the data
// input, otherwise the external data pin.  Read path: the sense-amplifier
// output of the addressed bit-line is selected for the data output pin and
// for the BIST's single-cell (march) checks.  Combinational.  The document
// names the buffer and says the patterns enter through the data input; the
// mux structure is this design's choice.
module io_buffer #(
  parameter int unsigned COLS = 256,
  localparam int unsigned CW  = $clog2(COLS)
) (
  input  logic            test_mode,
  input  logic            bist_din,
  input  logic            ext_din,
  input  logic [CW-1:0]   col_addr,
  input  logic [COLS-1:0] bl_out,
  output logic            din,
  output logic            dout
);
  assign din  = test_mode ? bist_din : ext_din;
  assign dout = bl_out[col_addr];
endmodule
