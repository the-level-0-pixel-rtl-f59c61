// tb_optin_fpga: self-checking test of one OPTIN board FPGA.
// Twelve G-Link streams are generated with a fixed, different phase per link
// (one word every 2 clocks, a control word with 10 random Fast-OR bits in
// every 4th word, i.e. every 100 ns). The 64 DDR output lines are sampled in
// the middle of each half clock and the 128-bit frames rebuilt. Checks: one
// frame per 100 ns with the expected 120 bits, parity and flags; the frame
// reaches the lines 3 clocks after the last control word; a link disabled by
// the mask register or not locked is not waited for; a link that stops
// sending control words causes a timeout with its bits zeroed; register
// reads return the id and counters.
`timescale 1ps/1ps
module tb_optin_fpga;
  import ptrig_pkg::*;
  localparam time TCLK = 12476ps;
  localparam int L = 12;
  logic clk = 0, rst_n = 0;
  glink_word_t word [L];
  logic [L-1:0] stb;
  logic [63:0] bus_q;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  int checks = 0, failures = 0;

  always #(TCLK/2) clk = ~clk;

  optin_fpga #(.BOARD_ID(4'd3)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- stimulus ----------------
  int cyc = 0;
  int skew [L];
  logic [9:0] payload [L][64];
  logic [L-1:0] ready_mask = '1, silent = '0;
  int last_ctrl_cyc [64];       // cycle of the last control word of frame k

  logic go = 1'b0;
  always @(posedge clk) begin
    #1;
    if (go) cyc++;
    stb = '0;
    for (int j = 0; j < L; j++) begin
      word[j] = '0;
      word[j].ready = ready_mask[j];
      if (go && cyc >= skew[j] && ((cyc - skew[j]) % 2 == 0)) begin
        int w, k;
        w = (cyc - skew[j]) / 2;
        k = w / 4;
        stb[j] = 1'b1;
        if (w % 4 == 0 && !silent[j] && k < 64) begin
          word[j].cav  = 1'b1;
          word[j].data = {6'd0, payload[j][k]};
          if (last_ctrl_cyc[k] < cyc) last_ctrl_cyc[k] = cyc;
        end else begin
          word[j].dav  = 1'b1;
          word[j].data = 16'($urandom);
        end
      end
    end
  end

  // ---------------- output decoding ----------------
  logic [127:0] rx;
  int nframe = 0, n_timeout = 0;
  logic [L-1:0] exp_zero = '0, dont_care = '0;
  logic transition = 1'b0;
  always @(posedge clk) begin
    #(TCLK/4) rx[63:0] = bus_q;
    #(TCLK/2) rx[127:64] = bus_q;
    if (rx[FRM_VALID]) begin
      int k;
      k = nframe;
      check(rx[FRM_PARITY] == ^rx[119:0], "parity");
      check(rx[127:123] == '0, "spare bits zero");
      if (rx[FRM_ERROR]) n_timeout++;
      if (!transition) check(rx[FRM_ERROR] == (exp_zero != '0), $sformatf("frame %0d error flag", k));
      for (int j = 0; j < L; j++) begin
        if (exp_zero[j]) check(rx[10*j +: 10] == '0, "missing link zeroed");
        else if (!dont_care[j])
          check(rx[10*j +: 10] == payload[j][k],
                $sformatf("frame %0d link %0d bits %h exp %h", k, j, rx[10*j +: 10], payload[j][k]));
      end
      if (exp_zero == '0 && dont_care == '0)
        check(cyc == last_ctrl_cyc[k] + 3,
              $sformatf("latency: frame on lines in cycle %0d, last control word %0d", cyc, last_ctrl_cyc[k]));
      nframe++;
    end
  end

  // ---------------- local bus ----------------
  task automatic lb_read(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk); #1;
    lb_req = '{we: 1'b0, re: 1'b1, addr: {4'd3, a}, wdata: '0};
    @(posedge clk); #1;
    lb_req = '0;
    check(lb_rsp.ack === 1'b1, "ack");
    d = lb_rsp.rdata;
  endtask
  task automatic lb_write(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk); #1;
    lb_req = '{we: 1'b1, re: 1'b0, addr: {4'd3, a}, wdata: d};
    @(posedge clk); #1;
    lb_req = '0;
    check(lb_rsp.ack === 1'b1, "write ack");
  endtask

  initial begin
    logic [31:0] d;
    lb_req = '0;
    for (int j = 0; j < L; j++) begin
      skew[j] = $urandom_range(1, 6);
      for (int k = 0; k < 64; k++) payload[j][k] = 10'($urandom);
    end
    for (int k = 0; k < 64; k++) last_ctrl_cyc[k] = -1;
    stb = '0;
    for (int j = 0; j < L; j++) word[j] = '0;
    // reset, released before the first word (cycle 0)
    rst_n = 1'b0;
    #(TCLK/4) rst_n = 1'b0;
    repeat (1) @(posedge clk);
    #2 rst_n = 1'b1;
    go = 1'b1;
    // wrong board id must not answer
    @(posedge clk); #1 lb_req = '{we: 1'b0, re: 1'b1, addr: 16'h5000, wdata: '0};
    @(posedge clk); #1 lb_req = '0;
    check(lb_rsp.ack === 1'b0, "other board does not answer");
    // ten normal frames
    wait (nframe == 10);
    lb_read(12'h000, d); check(d == ID_OPTIN, "id");
    lb_read(12'h002, d); check(d == 32'hFFF, "all links ready");
    // disable link 4 via the mask: it is not waited for
    lb_write(12'h001, 32'hFEF);
    lb_read(12'h001, d); check(d == 32'hFEF, "mask readback");
    dont_care[4] = 1'b1;
    wait (nframe == 14);
    // link 7 loses lock: not waited for, no timeout
    ready_mask[7] = 1'b0; dont_care[7] = 1'b1;
    wait (nframe == 18);
    lb_read(12'h002, d); check(d == 32'hF7F, "link 7 not ready");
    // link 2 locked but silent (frame arrives partly): timeout
    wait (nframe == 20);
    @(posedge clk); silent[2] = 1'b1; dont_care[2] = 1'b1; transition = 1'b1;
    wait (nframe == 22); exp_zero[2] = 1'b1; dont_care[2] = 1'b0; transition = 1'b0;
    wait (nframe == 27);
    lb_read(12'h004, d); check(d >= 5, $sformatf("timeouts counted %0d", d));
    lb_read(12'h003, d); check(d >= 26, "frames counted");
    lb_read(12'h010, d); check(d[15:0] >= 20 && d[31:16] == 0, "link 0 counters");
    check(n_timeout >= 5, "timeout frames seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
