// ddr_bus_rx: double-data-rate input register for one OPTIN board bus in
// the BRAIN FPGA.
//
// The 64 lines carry the low half of a 128-bit word while the system clock is
// high and the high half while it is low. They are sampled on the rising
// edge of clk90, a copy of the system clock delayed by a quarter period
// (middle of the low-half bit time), and on its falling edge (middle of the
// high-half bit time). The next rising edge of clk moves both halves into
// the system clock domain.
//
// Following the document: DDR at 80.16 MHz on 64 lines per board. Own
// choice: the quarter-period shifted capture clock, which in an FPGA comes
// from a clock manager.
//
// Reset (synchronous to clk, active low) clears dout only; the capture
// registers hold line samples and need none.
//
// Timing: a word driven by ddr_bus_tx in cycle k is on dout after rising
// edge k+1.
module ddr_bus_rx #(
  parameter int unsigned W = 64
) (
  input  logic           clk,
  input  logic           clk90,
  input  logic           rst_n,
  input  logic [W-1:0]   pins,
  output logic [2*W-1:0] dout
);

  logic [W-1:0] lo_s, hi_s;

  always_ff @(posedge clk90) lo_s <= pins;
  always_ff @(negedge clk90) hi_s <= pins;

  always_ff @(posedge clk) begin
    if (!rst_n) dout <= '0;
    else        dout <= {hi_s, lo_s};
  end

endmodule
