// ddr_bus_tx: double-data-rate output register for one OPTIN board bus.
//
// Each OPTIN board drives 64 lines towards the BRAIN at double data rate with
// the 80.16 MHz clock, i.e. 128 bits per clock, enough for its 120 Fast-OR
// bits plus frame flags. The word d is captured on the rising edge; its low
// half is driven while clk is high and its high half while clk is low (the
// high half is re-registered on the falling edge, as an FPGA output DDR cell
// does). The clock therefore selects the output half: this is the intended
// DDR output multiplexer, not a gated clock.
//
// Following the document: 64 lines, DDR, 80.16 MHz. Own choice: which half
// goes first.
//
// Reset (synchronous, active low) clears the output registers so that no
// frame flag appears on the lines while the board starts.
//
// Timing: d presented before rising edge k appears on q during cycle k.
module ddr_bus_tx #(
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [2*W-1:0] d,
  output logic [W-1:0]   q
);

  logic [W-1:0] lo_q, hi_q, hi_n;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lo_q <= '0;
      hi_q <= '0;
    end else begin
      lo_q <= d[W-1:0];
      hi_q <= d[2*W-1:W];
    end
  end

  always_ff @(negedge clk) hi_n <= hi_q;

  assign q = clk ? lo_q : hi_n;

endmodule
