// fastor_chan_rx: extracts the Fast-OR bits of one half stave from its
// G-Link stream.
//
// The detector sends the 10 Fast-OR bits of a half stave as the payload of a
// G-Link control word once every 100 ns, i.e. one control word in every four
// 25 ns words (800 Mb/s, 20-bit frames). This block watches the parallel
// output of the deserializer: on a strobe carrying a clean control word from a
// locked link it latches payload bits [CHIPS-1:0] and pulses fo_new for one
// cycle. Control words flagged with an error are dropped and counted. The
// distance in words between control words is checked against
// WORDS_PER_FRAME, and deviations are counted (the word is still used).
//
// Following the document: Fast-OR bits carried in control words, 10 per link,
// every 100 ns. Own choices: the bit placement (chip i in payload bit i), the
// error policy and the counters.
//
// Timing: fo/fo_new are registered, one clock after the strobe.
module fastor_chan_rx
  import ptrig_pkg::*;
#(
  parameter int unsigned CHIPS           = CHIPS_PER_LINK,
  parameter int unsigned WORDS_PER_FRAME = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  glink_word_t      word,
  input  logic             stb,        // one-cycle strobe per received word
  output logic [CHIPS-1:0] fo,         // last good Fast-OR bits
  output logic             fo_new,     // pulse: fo was just updated
  output logic             link_ok,
  output logic [15:0]      n_ctrl,     // good control words
  output logic [15:0]      n_err,      // words received with the error flag
  output logic [15:0]      n_spacing   // control words out of the 4-word pattern
);

  logic [3:0] since_ctrl;   // words since the last control word
  logic       seen_ctrl;
  logic       good_ctrl;

  assign good_ctrl = stb && word.ready && word.cav && !word.error;
  assign link_ok   = word.ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fo         <= '0;
      fo_new     <= 1'b0;
      n_ctrl     <= '0;
      n_err      <= '0;
      n_spacing  <= '0;
      since_ctrl <= '0;
      seen_ctrl  <= 1'b0;
    end else begin
      fo_new <= 1'b0;
      if (stb && word.ready) begin
        if (word.error) n_err <= n_err + 16'd1;
        if (good_ctrl) begin
          fo        <= word.data[CHIPS-1:0];
          fo_new    <= 1'b1;
          n_ctrl    <= n_ctrl + 16'd1;
          seen_ctrl <= 1'b1;
          if (seen_ctrl && (since_ctrl != 4'(WORDS_PER_FRAME - 1)))
            n_spacing <= n_spacing + 16'd1;
          since_ctrl <= '0;
        end else if (since_ctrl != '1) begin
          since_ctrl <= since_ctrl + 4'd1;
        end
      end
      if (!word.ready) seen_ctrl <= 1'b0;
    end
  end

endmodule
