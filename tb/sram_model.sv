// sram_model: behavioural model of the synchronous firmware SRAM for
// testbenches. 32-bit words; a write happens on the rising edge with we
// high, read data appears on the rising edge after rd is high.
module sram_model #(
  parameter int unsigned AW = 10
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  input  logic          we,
  input  logic          rd,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];
  initial for (int i = 0; i < 2**AW; i++) mem[i] = '0;
  always @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (rd) rdata <= mem[addr];
  end
endmodule
