// tb_fastor_chan_rx: self-checking test of the per-link Fast-OR extractor.
// Sends a G-Link stream of one control word followed by three data words,
// repeated, with random payloads; checks that each good control word's low
// 10 bits appear on fo with a one-cycle fo_new one clock later, that data
// words and error-flagged control words are ignored, and that the word,
// error and spacing counters match a reference count kept here.
module tb_fastor_chan_rx;
  import ptrig_pkg::*;

  logic clk = 0, rst_n = 0;
  glink_word_t word;
  logic stb;
  logic [9:0] fo;
  logic fo_new, link_ok;
  logic [15:0] n_ctrl, n_err, n_spacing;
  int checks = 0, failures = 0;
  int exp_ctrl = 0, exp_err = 0, exp_spacing = 0;

  always #5 clk = ~clk;

  fastor_chan_rx dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // send one word and check the response in the next cycle
  task automatic send(input logic cav, input logic err, input logic [15:0] d);
    logic [9:0] fo_prev;
    fo_prev = fo;
    word = '{ready: 1'b1, cav: cav, dav: !cav, error: err, data: d};
    stb  = 1'b1;
    @(posedge clk); #1;
    stb  = 1'b0;
    if (cav && !err) begin
      check(fo_new === 1'b1, "fo_new after control word");
      check(fo === d[9:0], $sformatf("fo %h exp %h", fo, d[9:0]));
    end else begin
      check(fo_new === 1'b0, "no fo_new after data/error word");
      check(fo === fo_prev, "fo held");
    end
    // one idle cycle: words come every 25 ns = 2 clocks
    @(posedge clk); #1;
    check(fo_new === 1'b0, "fo_new is a single pulse");
  endtask

  initial begin
    word = '0; stb = 0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    check(link_ok === 1'b0, "link not ready at start");
    // regular frames
    for (int f = 0; f < 20; f++) begin
      exp_ctrl += 1;
      send(1'b1, 1'b0, 16'($urandom));
      for (int k = 0; k < 3; k++) send(1'b0, 1'b0, 16'($urandom));
    end
    check(link_ok === 1'b1, "link ready");
    // error-flagged control word: dropped, counted
    exp_err += 1;
    send(1'b1, 1'b1, 16'h03FF);
    for (int k = 0; k < 3; k++) send(1'b0, 1'b0, 16'($urandom));
    // next good control word is 8 words after the last good one: spacing error
    exp_ctrl += 1; exp_spacing += 1;
    send(1'b1, 1'b0, 16'h0155);
    // short frame: control word after only 2 data words
    for (int k = 0; k < 2; k++) send(1'b0, 1'b0, 16'($urandom));
    exp_ctrl += 1; exp_spacing += 1;
    send(1'b1, 1'b0, 16'h02AA);
    for (int k = 0; k < 3; k++) send(1'b0, 1'b0, 16'($urandom));
    exp_ctrl += 1;
    send(1'b1, 1'b0, 16'h0001);
    check(n_ctrl == 16'(exp_ctrl), $sformatf("n_ctrl %0d exp %0d", n_ctrl, exp_ctrl));
    check(n_err == 16'(exp_err), $sformatf("n_err %0d exp %0d", n_err, exp_err));
    check(n_spacing == 16'(exp_spacing), $sformatf("n_spacing %0d exp %0d", n_spacing, exp_spacing));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
