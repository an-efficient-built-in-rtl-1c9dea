// test_enable: CAS-before-RAS test-mode entry.
//
// A DRAM normally sees /RAS fall before /CAS.  This block watches the two
// strobes and enters test mode when /CAS goes low while /RAS is still high,
// the CAS-before-RAS order reserved here for starting the self-test (so the
// memory must not use that order for auto-refresh).  The test-enable state
// is a flag that stays set until the BIST reports completion (`clear`);
// the BIST clock is the system clock qualified by this flag, given here as a
// clock enable (`bist_clk_en`) rather than a gated clock.
//
// The strobes are asynchronous, so each passes a two-flop synchronizer;
// entry is seen three clocks after /CAS falls.  Following the document: the
// CAS-before-RAS trigger and the qualified BIST clock.  Own choices: the
// synchronizers, the clear input and the synchronous clock enable.
module test_enable (
  input  logic clk,
  input  logic rst_n,
  input  logic n_ras,       // row address strobe, active low
  input  logic n_cas,       // column address strobe, active low
  input  logic clear,       // leave test mode (BIST finished)
  output logic test_en,     // test mode
  output logic bist_clk_en  // enable for the BIST clock domain
);
  logic [1:0] ras_sync, cas_sync;
  logic       cas_q;
  logic       cbr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ras_sync <= 2'b11;
      cas_sync <= 2'b11;
      cas_q    <= 1'b1;
    end else begin
      ras_sync <= {ras_sync[0], n_ras};
      cas_sync <= {cas_sync[0], n_cas};
      cas_q    <= cas_sync[1];
    end
  end

  // /CAS falling edge while /RAS is high.
  assign cbr = cas_q && !cas_sync[1] && ras_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     test_en <= 1'b0;
    else if (cbr)   test_en <= 1'b1;
    else if (clear) test_en <= 1'b0;
  end

  assign bist_clk_en = test_en;
endmodule
