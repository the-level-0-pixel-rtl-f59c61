// tb_pixel_trigger_top: end-to-end test of the whole Pixel Trigger at full
// size (120 links, 10 OPTIN boards, 1200 Fast-OR bits, default parameters).
//
// The 120 G-Link receiver outputs are generated here: every link sends a
// 25 ns word every 2 clocks and, once per 100 ns frame, a control word whose
// low 10 bits are that half stave's Fast-OR bits; each link has its own
// fixed phase (1..6 clocks). For every frame the expected Level 0 decision
// is computed from the 1200 bits with the algorithm and thresholds in force,
// and ctp_l0 must rise exactly 7 clocks after the frame's last control word
// (about 87 ns, which with the 88 ns of the deserializer stays inside the
// 250 ns left for this system). Configuration goes through the command port
// of the control FPGA, as it would from the data link.
//
// Mechanisms exercised and counted (a failure is counted for any that never
// happens): frames complete on all links, each of the four algorithms,
// positive and negative decisions, a link disabled by its OPTIN mask
// register, a link losing lock, a silent link causing a timeout on its
// OPTIN board and in the BRAIN, register read-back from OPTIN and BRAIN, a
// read of an absent device, bitstream download into the SRAM, its transfer
// into the PROM chain over JTAG, and the reconfiguration instruction.
`timescale 1ps/1ps
module tb_pixel_trigger_top;
  import ptrig_pkg::*;
  localparam time TCLK = 12476ps;   // 80.16 MHz
  localparam int NL = 120, NF = 200;

  logic clk = 0, clk90 = 0, rst_n = 0;
  glink_word_t rx_word [NL];
  logic [NL-1:0] rx_stb;
  logic ctp_l0;
  logic [31:0] cmd_data, rsp_data;
  logic cmd_valid, cmd_ready, rsp_valid;
  logic [19:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic sram_we, sram_rd;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  always #(TCLK/2) clk = ~clk;
  initial begin #(TCLK/4); forever #(TCLK/2) clk90 = ~clk90; end

  pixel_trigger_top dut (.*);
  sram_model #(.AW(20)) u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we),
                                .rd(sram_rd), .rdata(sram_rdata));
  jtag_tap_model u_tap (.tck, .tms, .tdi, .tdo);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- mechanism counters ----------------
  int m_complete = 0, m_algo [4] = '{0, 0, 0, 0}, m_pos = 0, m_neg = 0, m_masked = 0;
  int m_unlocked = 0, m_timeout = 0, m_regread = 0, m_absent = 0, m_sram = 0, m_prom = 0, m_reconf = 0;

  // ---------------- link stimulus ----------------
  int cyc = 0;
  bit go = 0;
  int skew [NL];
  logic [9:0] payload [NL][NF];
  bit active [NF];
  logic [NL-1:0] locked = '1, silent = '0;
  int last_ctrl [NF];

  always @(posedge clk) begin
    #1;
    if (go) cyc++;
    rx_stb = '0;
    for (int j = 0; j < NL; j++) begin
      rx_word[j] = '0;
      rx_word[j].ready = locked[j];
      if (go && cyc >= skew[j] && ((cyc - skew[j]) % 2 == 0)) begin
        int w, k;
        w = (cyc - skew[j]) / 2;
        k = w / 4;
        rx_stb[j] = 1'b1;
        if (w % 4 == 0 && k < NF && active[k] && !silent[j]) begin
          rx_word[j].cav  = 1'b1;
          rx_word[j].data = {6'(w), payload[j][k]};
          if (locked[j] && last_ctrl[k] < cyc) last_ctrl[k] = cyc;
        end else begin
          rx_word[j].dav  = 1'b1;
          rx_word[j].data = 16'($urandom);
        end
      end
    end
  end

  // ---------------- CTP output monitor ----------------
  bit rise_at [NF * 8 + 64];
  logic ctp_d = 0;
  always @(posedge clk) begin
    #(TCLK/4);
    if (ctp_l0 && !ctp_d && cyc < NF * 8 + 64) rise_at[cyc] = 1;
    ctp_d = ctp_l0;
  end

  // ---------------- expected decisions ----------------
  int cfg_algo = 0, cfg_lo = 1, cfg_hi = 1200, cfg_in = 1, cfg_out = 1;
  bit exp_timeout [NF];
  logic [NL-1:0] zero_links [NF];

  function automatic bit expected(input int k);
    int ci, co, tot;
    ci = 0; co = 0;
    for (int j = 0; j < NL; j++)
      if (!zero_links[k][j])
        for (int i = 0; i < 10; i++)
          if (payload[j][k][i]) begin if (j < INNER_LINKS) ci++; else co++; end
    tot = ci + co;
    case (cfg_algo)
      0: return tot != 0;
      1: return tot >= cfg_lo;
      2: return ci >= cfg_in && co >= cfg_out;
      default: return tot >= cfg_lo && tot <= cfg_hi;
    endcase
  endfunction

  // run frames k0 .. k0+n-1 and check each decision
  task automatic run_frames(input int k0, input int n);
    for (int k = k0; k < k0 + n; k++) active[k] = 1;
    for (int k = k0; k < k0 + n; k++) begin
      bit e, got;
      e = expected(k);
      // the frame is released at the latest 6 clocks after its first word;
      // wait for the last possible CTP rise
      wait (cyc >= 8 * k + 6 + 16);
      if (!exp_timeout[k]) begin
        got = rise_at[last_ctrl[k] + 7];
        check(got == e, $sformatf("frame %0d algo %0d: decision %b exp %b", k, cfg_algo, got, e));
        // nothing else in the window
        // a normal frame's rise can only fall in 8k+8 .. 8k+13; the cycles
        // 8k+6 .. 8k+13 belong to no other frame unless frame k-1 timed out
        for (int c = 8 * k + 6; c <= 8 * k + 13; c++)
          if (c != last_ctrl[k] + 7 && rise_at[c] && !(k > 0 && exp_timeout[k - 1]))
            check(0, $sformatf("frame %0d: extra CTP pulse at %0d", k, c));
      end else begin
        // board 7 released by its timeout, 7 clocks after its first link,
        // arrives last at the BRAIN: CTP 13 clocks after that first link
        int first7;
        first7 = 1 << 30;
        for (int j = 84; j < 96; j++) if (!silent[j] && 8 * k + skew[j] < first7) first7 = 8 * k + skew[j];
        got = rise_at[first7 + 13];
        check(got == e, $sformatf("timeout frame %0d: decision %b exp %b", k, got, e));
        m_timeout++;
      end
      if (e) m_pos++; else m_neg++;
      m_algo[cfg_algo]++;
    end
  endtask

  // ---------------- command port ----------------
  logic [31:0] rsp_q [$];
  always @(posedge clk) if (rst_n && rsp_valid) rsp_q.push_back(rsp_data);

  task automatic send(input logic [31:0] w);
    #1 cmd_data = w; cmd_valid = 1;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask
  function automatic logic [31:0] hdr(input int op, input int len, input int addr);
    return {4'(op), 12'(len), 16'(addr)};
  endfunction
  task automatic reg_write(input logic [15:0] a, input logic [31:0] d);
    send(hdr(1, 1, a)); send(d);
  endtask
  task automatic reg_read(input logic [15:0] a, output logic [31:0] d);
    rsp_q.delete();
    send(hdr(2, 1, a));
    wait (rsp_q.size() == 1);
    d = rsp_q[0];
  endtask
  task automatic set_algo(input int algo, input int lo, input int hi, input int thin, input int thout);
    logic [31:0] d;
    cfg_algo = algo; cfg_lo = lo; cfg_hi = hi; cfg_in = thin; cfg_out = thout;
    reg_write({DEV_BRAIN, 12'h001}, 32'(algo) | 32'h03FF_0000);
    reg_write({DEV_BRAIN, 12'h002}, lo);
    reg_write({DEV_BRAIN, 12'h003}, hi);
    reg_write({DEV_BRAIN, 12'h004}, thin);
    reg_write({DEV_BRAIN, 12'h005}, thout);
    reg_read({DEV_BRAIN, 12'h001}, d);
    check(d[1:0] == 2'(algo), "algorithm read back");
  endtask

  // ---------------- main sequence ----------------
  localparam logic [7:0] IR_PROGRAM = 8'hE5, IR_RECONF = 8'hEE;
  initial begin
    logic [31:0] d;
    int k;
    logic [31:0] fw [16];
    cmd_valid = 0; cmd_data = 0;
    rx_stb = '0;
    for (int j = 0; j < NL; j++) rx_word[j] = '0;
    for (int j = 0; j < NL; j++) skew[j] = $urandom_range(1, 6);
    for (int f = 0; f < NF; f++) begin
      int pct;
      active[f] = 0; last_ctrl[f] = -1; exp_timeout[f] = 0; zero_links[f] = '0;
      pct = (f % 9 == 0) ? 0 : $urandom_range(1, 8);
      for (int j = 0; j < NL; j++)
        for (int i = 0; i < 10; i++) payload[j][f][i] = ($urandom_range(0, 99) < pct);
      // links 25 and 61 are later masked and unlocked; whatever stale value
      // they then hold, it equals the constant they carry throughout
      payload[25][f] = 10'h3FF;
      payload[61][f] = 10'h0A5;
    end
    check(7.0 * 12.476 + 88.0 < 250.0, "latency budget");
    repeat (3) @(posedge clk);
    #2 rst_n = 1;
    go = 1;

    // registers
    reg_read({4'd7, 12'h000}, d);   check(d == ID_OPTIN, "OPTIN 7 id"); m_regread++;
    reg_read({DEV_BRAIN, 12'h000}, d); check(d == ID_BRAIN, "BRAIN id"); m_regread++;
    reg_read({4'd13, 12'h000}, d);  check(d == 32'hFFFF_FFFF, "absent device"); m_absent++;
    reg_read({DEV_CTRL, 12'h000}, d); check(d == ID_CTRL, "control FPGA id"); m_regread++;

    // algorithm 0: any hit
    k = cyc / 8 + 2;
    run_frames(k, 10); m_complete += 10;
    // algorithm 1: multiplicity
    set_algo(1, 40, 0, 0, 0);
    k = cyc / 8 + 2;
    run_frames(k, 12); m_complete += 12;
    // algorithm 2: layer coincidence
    set_algo(2, 0, 0, 12, 30);
    k = cyc / 8 + 2;
    run_frames(k, 12);
    // algorithm 3: window
    set_algo(3, 30, 60, 0, 0);
    k = cyc / 8 + 2;
    run_frames(k, 12);

    // link 25 (board 2) disabled by its mask
    set_algo(1, 40, 0, 0, 0);
    reg_write({4'd2, 12'h001}, 32'hFFD);
    reg_read({4'd2, 12'h001}, d); check(d == 32'hFFD, "OPTIN mask read back");
    k = cyc / 8 + 2;
    skew[25] = 60;      // far too late for its frame: only the mask avoids a timeout
    run_frames(k, 6); m_masked += 6;
    reg_read({4'd2, 12'h004}, d); check(d == 0, "no timeout with masked link");

    // link 61 (board 5) loses lock: its last bits stay in the frame
    k = cyc / 8 + 2;
    locked[61] = 0;
    run_frames(k, 6); m_unlocked += 6;
    reg_read({4'd5, 12'h002}, d); check(d[1] == 1'b0, "OPTIN 5 shows link 1 unlocked");

    // link 90 (board 7) locked but silent: timeout on board 7 and zero bits
    k = cyc / 8 + 2;
    silent[90] = 1;
    for (int f = k; f < NF; f++) begin exp_timeout[f] = 1; zero_links[f][90] = 1; end
    run_frames(k, 6);
    reg_read({4'd7, 12'h004}, d); check(d >= 6, $sformatf("OPTIN 7 timeouts %0d", d));

    // reprogramming: download 16 words, JTAG them into the PROM, reconfigure
    for (int i = 0; i < 16; i++) fw[i] = $urandom;
    send(hdr(3, 0, 0)); send(32'h100);
    send(hdr(4, 16, 0));
    for (int i = 0; i < 16; i++) send(fw[i]);
    send(hdr(0, 0, 0));
    for (int i = 0; i < 16; i++) check(u_sram.mem[32'h100 + i] == fw[i], "firmware word in SRAM");
    m_sram++;
    send(hdr(5, 0, 0));
    send(hdr(6, 0, IR_PROGRAM));
    send(hdr(3, 0, 0)); send(32'h100);
    send(hdr(7, 0, 0)); send(32'd512);
    send(hdr(0, 0, 0));
    check(u_tap.last_dr_len == 512, "bitstream length in PROM chain");
    for (int b = 0; b < 512; b++)
      check(u_tap.dr_bits[b] == fw[b / 32][b % 32], $sformatf("bitstream bit %0d", b));
    m_prom++;
    send(hdr(6, 0, IR_RECONF));
    send(hdr(0, 0, 0));
    check(u_tap.ir == IR_RECONF, "reconfiguration instruction");
    m_reconf++;

    check(m_complete > 0, "complete frames");
    for (int a = 0; a < 4; a++) check(m_algo[a] > 0, $sformatf("algorithm %0d used", a));
    check(m_pos > 0 && m_neg > 0, "positive and negative decisions");
    check(m_masked > 0 && m_unlocked > 0 && m_timeout > 0, "masked, unlocked and timeout cases");
    check(m_regread > 0 && m_absent > 0 && m_sram > 0 && m_prom > 0 && m_reconf > 0, "control cases");
    $display("mechanisms: complete=%0d algo=%0d/%0d/%0d/%0d pos=%0d neg=%0d masked=%0d unlocked=%0d timeout=%0d regread=%0d absent=%0d sram=%0d prom=%0d reconf=%0d",
             m_complete, m_algo[0], m_algo[1], m_algo[2], m_algo[3], m_pos, m_neg, m_masked,
             m_unlocked, m_timeout, m_regread, m_absent, m_sram, m_prom, m_reconf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 8 + 4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
