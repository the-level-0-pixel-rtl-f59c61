// tb_ctrl_fpga: self-checking test of the slow-control logic.
// Command words are fed as from the data link; a small register-file model
// answers on the local bus as device 2, an SRAM model and a JTAG TAP model
// stand for the firmware memory and the PROM chain. Checks: register writes
// and read-back through the link, the no-answer value for an absent device,
// bitstream download into the SRAM, transfer of the stored bitstream into
// the TAP data register bit by bit, instruction shift, IDCODE read-back via
// STATUS, and that cmd_ready holds off commands while JTAG runs.
module tb_ctrl_fpga;
  import ptrig_pkg::*;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic [31:0] cmd_data, rsp_data;
  logic cmd_valid, cmd_ready, rsp_valid;
  lbus_req_t lb_req;
  lbus_rsp_t lb_rsp;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_wdata, sram_rdata;
  logic sram_we, sram_rd;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ctrl_fpga #(.SRAM_AW(AW), .IR_LEN(8)) dut (.*);
  sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr), .wdata(sram_wdata), .we(sram_we), .rd(sram_rd), .rdata(sram_rdata));
  jtag_tap_model u_tap (.tck, .tms, .tdi, .tdo);

  // register file of device 2, answering one cycle after the request
  logic [31:0] regs [16];
  always_ff @(posedge clk) begin
    lb_rsp <= '0;
    if (lb_req.addr[15:12] == 4'd2 && (lb_req.we || lb_req.re)) begin
      lb_rsp.ack <= 1'b1;
      if (lb_req.we) regs[lb_req.addr[3:0]] <= lb_req.wdata;
      if (lb_req.re) lb_rsp.rdata <= regs[lb_req.addr[3:0]];
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [31:0] rsp_q [$];
  always @(posedge clk) if (rst_n && rsp_valid) rsp_q.push_back(rsp_data);

  int busy_refusals = 0;
  task automatic send(input logic [31:0] w);
    #1 cmd_data = w; cmd_valid = 1;
    @(negedge clk);
    while (!cmd_ready) begin busy_refusals++; @(negedge clk); end
    @(posedge clk);
    #1 cmd_valid = 0;
  endtask
  function automatic logic [31:0] hdr(input int op, input int len, input int addr);
    return {4'(op), 12'(len), 16'(addr)};
  endfunction

  initial begin
    logic [31:0] fw [8];
    cmd_valid = 0; cmd_data = 0;
    for (int i = 0; i < 16; i++) regs[i] = '0;
    for (int i = 0; i < 8; i++) fw[i] = $urandom;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // register write and read-back
    send(hdr(1, 3, 16'h2004)); send(32'hCAFE_0001); send(32'hCAFE_0002); send(32'hCAFE_0003);
    send(hdr(2, 3, 16'h2004));
    send(hdr(2, 1, 16'h7000));     // nobody answers
    send(hdr(0, 0, 0));
    repeat (40) @(posedge clk);
    check(regs[5] == 32'hCAFE_0002, "register written");
    check(rsp_q.size() == 4, $sformatf("responses %0d", rsp_q.size()));
    if (rsp_q.size() == 4) begin
      check(rsp_q[0] == 32'hCAFE_0001 && rsp_q[1] == 32'hCAFE_0002 && rsp_q[2] == 32'hCAFE_0003, "read-back");
      check(rsp_q[3] == 32'hFFFF_FFFF, "absent device");
    end
    rsp_q.delete();
    // own status registers: id, then the command count (5 headers with this one)
    send(hdr(2, 4, 16'hB000));
    repeat (10) @(posedge clk);
    check(rsp_q.size() == 4, "own registers answered");
    if (rsp_q.size() == 4) begin
      check(rsp_q[0] == ID_CTRL, "control FPGA id");
      check(rsp_q[3] == 32'd5, $sformatf("command count %0d", rsp_q[3]));
    end
    rsp_q.delete();
    // bitstream download: pointer 0x40, 8 words
    send(hdr(3, 0, 0)); send(32'h40);
    send(hdr(4, 8, 0));
    for (int i = 0; i < 8; i++) send(fw[i]);
    @(posedge clk); @(posedge clk);
    for (int i = 0; i < 8; i++) check(u_sram.mem[64 + i] == fw[i], $sformatf("SRAM word %0d", i));
    // JTAG: reset, instruction, 256-bit bitstream from the SRAM
    busy_refusals = 0;
    send(hdr(5, 0, 0));
    send(hdr(6, 0, 8'hE8));
    send(hdr(3, 0, 0)); send(32'h40);
    send(hdr(7, 0, 0)); send(32'd256);
    send(hdr(8, 0, 0)); send(32'd10);
    send(hdr(0, 0, 0));
    check(u_tap.ir == 8'hE8, $sformatf("IR %h", u_tap.ir));
    check(u_tap.last_dr_len == 256, $sformatf("DR length %0d", u_tap.last_dr_len));
    for (int b = 0; b < 256; b++)
      check(u_tap.dr_bits[b] == fw[b / 32][b % 32], $sformatf("bitstream bit %0d", b));
    check(busy_refusals > 500, "commands held off while JTAG runs");
    // IDCODE through STATUS
    send(hdr(7, 0, 0)); send(32'd32);
    send(hdr(9, 0, 0));
    repeat (3) @(posedge clk);
    check(rsp_q.size() == 1 && rsp_q[0] == 32'h1234_5093, "IDCODE via status");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
