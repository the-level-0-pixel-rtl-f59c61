// frame_align: gathers the parts of one 100 ns frame arriving from N sources
// with different delays.
//
// Each source pulses part_new[i] when it has new data for the current frame.
// A source counts as present once it pulsed; a frame is released (rel pulse)
// in the cycle after the last enabled source arrived, so the latency is set
// by the latest source only. If some enabled source is still missing TIMEOUT
// cycles after the first arrival, the frame is released anyway with
// rel_timeout set and the missing sources listed in missing. Sources outside
// en are ignored. A frame with no enabled source is never released.
//
// The need for frame alignment across channels is stated in the document;
// the arrive-then-release scheme, the timeout and its length are this
// design's choices. Used both on the OPTIN boards (12 links) and in the
// BRAIN (10 boards).
module frame_align #(
  parameter int unsigned N       = 12,
  parameter int unsigned TIMEOUT = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] en,           // sources taking part
  input  logic [N-1:0] part_new,     // arrival pulses
  output logic         rel,          // frame released (one cycle)
  output logic         rel_timeout,  // released by timeout
  output logic [N-1:0] missing       // sources absent from the released frame
);

  logic [N-1:0] got, got_nx;
  logic         busy;
  logic [$clog2(TIMEOUT+1)-1:0] age;
  logic         complete, expired;

  assign got_nx   = got | (part_new & en);
  assign complete = (en != '0) && ((got_nx & en) == en);
  assign expired  = busy && (age == ($bits(age))'(TIMEOUT));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      got         <= '0;
      busy        <= 1'b0;
      age         <= '0;
      rel         <= 1'b0;
      rel_timeout <= 1'b0;
      missing     <= '0;
    end else begin
      rel         <= 1'b0;
      rel_timeout <= 1'b0;
      if (complete || expired) begin
        rel         <= 1'b1;
        rel_timeout <= !complete;
        missing     <= en & ~got_nx;
        got         <= '0;
        busy        <= 1'b0;
        age         <= '0;
      end else begin
        got <= got_nx;
        if (busy) age <= age + 1'b1;
        else if ((part_new & en) != '0) begin busy <= 1'b1; age <= ($bits(age))'(1); end
      end
    end
  end

endmodule
