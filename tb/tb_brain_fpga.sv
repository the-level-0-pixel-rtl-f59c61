// tb_brain_fpga: self-checking test of the processing FPGA.
// Ten board buses are driven at double data rate (low half while clk is
// high, high half while it is low) with one frame every 100 ns; each board
// has its own delay of 0..2 clocks. The thresholds and algorithm are set
// over the local bus. For every frame the expected decision is computed here
// from the 1200 bits; ctp_l0 must rise exactly 4 clocks after the last
// board's frame was on the lines and stay high for 2 clocks. Also checked:
// a parity error and a missing board are counted, a board removed from the
// mask is not waited for, and the status registers.
`timescale 1ps/1ps
module tb_brain_fpga;
  import ptrig_pkg::*;
  localparam time TCLK = 12476ps;
  localparam int NB = 10;
  logic clk = 0, clk90 = 0, rst_n = 0;
  logic [63:0] bus_pins [NB];
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  logic ctp_l0;
  int checks = 0, failures = 0;

  always #(TCLK/2) clk = ~clk;
  initial begin #(TCLK/4); forever #(TCLK/2) clk90 = ~clk90; end

  brain_fpga dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- bus drivers ----------------
  logic [127:0] cur [NB];
  int cyc = 0;
  always @(posedge clk) begin
    #1 cyc++;
    #2;
    for (int b = 0; b < NB; b++) bus_pins[b] = cur[b][63:0];
  end
  always @(negedge clk) begin
    #1;
    for (int b = 0; b < NB; b++) bus_pins[b] = cur[b][127:64];
  end

  // local bus
  task automatic lb_write(input logic [11:0] a, input logic [31:0] d);
    @(posedge clk); #2;
    lb_req = '{we: 1'b1, re: 1'b0, addr: {DEV_BRAIN, a}, wdata: d};
    @(posedge clk); #2;
    lb_req = '0;
    check(lb_rsp.ack === 1'b1, "write ack");
  endtask
  task automatic lb_read(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk); #2;
    lb_req = '{we: 1'b0, re: 1'b1, addr: {DEV_BRAIN, a}, wdata: '0};
    @(posedge clk); #2;
    lb_req = '0;
    check(lb_rsp.ack === 1'b1, "read ack");
    d = lb_rsp.rdata;
  endtask

  // ---------------- CTP output monitor ----------------
  int rise_cyc = -1, n_rise = 0, high_len = 0, n_high_bad = 0;
  always @(posedge clk) begin
    #(TCLK/4);
    if (ctp_l0) begin
      if (high_len == 0) begin rise_cyc = cyc; n_rise++; end
      high_len++;
    end else begin
      if (high_len != 0 && high_len != 2) n_high_bad++;
      high_len = 0;
    end
  end

  int algo = 0, th_lo = 1, th_hi = 1200, th_in = 1, th_out = 1;
  logic [NB-1:0] mask = '1;

  // Send one frame: board b's word is on the lines in cycle start+delay[b].
  // Returns the expected decision and the cycle of the last board.
  task automatic send_frame(input int pct, input logic [NB-1:0] present, input bit bad_par,
                            output bit exp, output int last_cyc);
    logic [1199:0] fo;
    int ci, co, tot, dly [NB], c0, maxd;
    for (int i = 0; i < 1200; i++) fo[i] = ($urandom_range(0, 999) < pct);
    ci = 0; co = 0; maxd = 0;
    for (int b = 0; b < NB; b++) begin
      dly[b] = $urandom_range(0, 2);
      if (present[b] && mask[b] && dly[b] > maxd) maxd = dly[b];
    end
    for (int i = 0; i < 1200; i++)
      if (fo[i] && present[i/120]) begin if (i < 400) ci++; else co++; end
    tot = ci + co;
    case (algo)
      0: exp = tot != 0;
      1: exp = tot >= th_lo;
      2: exp = ci >= th_in && co >= th_out;
      default: exp = tot >= th_lo && tot <= th_hi;
    endcase
    @(posedge clk); #2;
    c0 = cyc;
    last_cyc = c0 + maxd;
    for (int d = 0; d < 8; d++) begin
      for (int b = 0; b < NB; b++) begin
        cur[b] = '0;
        if (present[b] && d == dly[b]) begin
          cur[b][119:0] = fo[b*120 +: 120];
          cur[b][FRM_VALID] = 1'b1;
          cur[b][FRM_PARITY] = ^fo[b*120 +: 120] ^ (bad_par && b == 3);
        end
      end
      if (d < 7) begin @(posedge clk); #2; end
    end
  endtask

  initial begin
    logic [31:0] d;
    bit exp;
    int last, n_exp = 0, n_pos = 0;
    lb_req = '0;
    for (int b = 0; b < NB; b++) begin cur[b] = '0; bus_pins[b] = '0; end
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    lb_read(12'h000, d); check(d == ID_BRAIN, "id");
    for (int f = 0; f < 120; f++) begin
      if (f % 30 == 0) begin
        algo = f / 30;
        th_lo = (algo == 3) ? 20 : 30; th_hi = 40; th_in = 8; th_out = 20;
        lb_write(12'h001, 32'(algo) | (32'(mask) << 16));
        lb_write(12'h002, th_lo); lb_write(12'h003, th_hi);
        lb_write(12'h004, th_in); lb_write(12'h005, th_out);
        lb_read(12'h001, d); check(d[1:0] == 2'(algo), "algo readback");
        lb_read(12'h002, d); check(d == 32'(th_lo), $sformatf("th_lo readback %0d", d));
      end
      n_rise = 0;
      send_frame((f % 5 == 0) ? 0 : $urandom_range(5, 50), '1, 1'b0, exp, last);
      repeat (4) @(posedge clk);
      #3;
      check(n_rise == int'(exp), $sformatf("frame %0d algo %0d: ctp pulses %0d exp %0d", f, algo, n_rise, exp));
      if (exp) check(rise_cyc == last + 4, $sformatf("latency: ctp at %0d, last board at %0d", rise_cyc, last));
      n_exp++; if (exp) n_pos++;
    end
    check(n_high_bad == 0, "pulse width 2 clocks");
    check(n_pos > 10 && n_pos < 110, "both decisions seen");
    lb_read(12'h006, d); check(d == 32'(n_pos), $sformatf("trigger count %0d exp %0d", d, n_pos));
    lb_read(12'h007, d); check(d == 32'(n_exp), "frame count");
    // parity error on board 3
    send_frame(20, '1, 1'b1, exp, last);
    repeat (4) @(posedge clk);
    lb_read(12'h009, d); check(d == 1, "parity error counted");
    // board 6 missing: timeout, frame still decided
    send_frame(20, 10'h3BF, 1'b0, exp, last);
    repeat (8) @(posedge clk);
    lb_read(12'h00A, d); check(d == 1, "timeout counted");
    lb_read(12'h007, d); check(d == 32'(n_exp + 2), "frame count after timeout");
    // board 6 removed from the mask: no timeout
    mask = 10'h3BF;
    lb_write(12'h001, 32'(algo) | (32'(mask) << 16));
    send_frame(20, 10'h3BF, 1'b0, exp, last);
    repeat (8) @(posedge clk);
    lb_read(12'h00A, d); check(d == 1, "no timeout with masked board");
    lb_read(12'h007, d); check(d == 32'(n_exp + 3), "frame count with masked board");
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
