// trigger_proc: the Level 0 decision computed from the 1200 Fast-OR bits.
//
// Each Fast-OR bit says that at least one of the 8192 pixels of a readout
// chip was hit, so the pixel detector acts as a fast, coarse pad detector.
// The decisions built here are occupancy and topology functions of these
// bits, selected by the algo input:
//   0  any hit        : at least one Fast-OR bit set
//   1  multiplicity   : total number of set bits >= th_lo
//   2  coincidence    : inner-layer count >= th_in AND outer-layer count >= th_out
//   3  window         : th_lo <= total <= th_hi (centrality selection)
// Links 0..INNER_LINKS-1 (bits 0..10*INNER_LINKS-1) form the inner layer.
//
// Timing: one registered stage. The two population counts (400 and 800
// bits, adder trees), their sum and the threshold compare form one
// combinational path; the decision is registered at the next rising edge.
// A frame presented with in_valid in cycle t gives out_valid/trig after
// rising edge t+1, one 12.5 ns clock at 80.16 MHz, inside the 15 ns the
// processing step is allowed.
//
// Following the document: decisions as combinational functions of the 1200
// bits computed in under 15 ns, multiplicity and topology triggers,
// inner/outer layer sizes. Own choices: the four algorithms and their
// thresholds.
module trigger_proc
  import ptrig_pkg::*;
#(
  parameter int unsigned NL    = N_LINKS,
  parameter int unsigned NIN   = INNER_LINKS,
  parameter int unsigned CH    = CHIPS_PER_LINK,
  localparam int unsigned NB   = NL * CH,
  localparam int unsigned CW   = $clog2(NB + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [NB-1:0] fo,
  input  logic          in_valid,
  input  logic [1:0]    algo,
  input  logic [CW-1:0] th_lo,
  input  logic [CW-1:0] th_hi,
  input  logic [CW-1:0] th_in,
  input  logic [CW-1:0] th_out,
  output logic          out_valid,
  output logic          trig,
  output logic [CW-1:0] total      // multiplicity of the last decided frame
);

  localparam int unsigned NBI = NIN * CH;

  logic [CW-1:0] cnt_in, cnt_out, total_c;

  always_comb begin
    cnt_in  = '0;
    cnt_out = '0;
    for (int i = 0; i < int'(NBI); i++)      cnt_in  += CW'(fo[i]);
    for (int i = int'(NBI); i < int'(NB); i++) cnt_out += CW'(fo[i]);
  end

  assign total_c = cnt_in + cnt_out;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      trig      <= 1'b0;
      total     <= '0;
    end else begin
      out_valid <= in_valid;
      trig      <= 1'b0;
      if (in_valid) begin
        total <= total_c;
        unique case (algo)
          2'd0: trig <= (total_c != '0);
          2'd1: trig <= (total_c >= th_lo);
          2'd2: trig <= (cnt_in >= th_in) && (cnt_out >= th_out);
          2'd3: trig <= (total_c >= th_lo) && (total_c <= th_hi);
        endcase
      end
    end
  end

endmodule
