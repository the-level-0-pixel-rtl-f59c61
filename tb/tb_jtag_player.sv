// tb_jtag_player: self-checking test of the JTAG player against a TAP model
// and an SRAM model. Runs a reset, an instruction shift, a 32-bit data
// shift that reads back the model's IDCODE, a 150-bit data shift of SRAM
// contents (compared bit by bit with the SRAM words, LSB first) and a
// Run-Test/Idle wait, checking the TAP state, TCK at half the clock rate
// and the duration of each operation.
module tb_jtag_player;
  localparam int AW = 10;
  logic clk = 0, rst_n = 0;
  logic start;
  logic [1:0] op;
  logic [7:0] ir;
  logic [31:0] nbits;
  logic [AW-1:0] addr;
  logic busy;
  logic [31:0] tdo_cap;
  logic sram_rd;
  logic [AW-1:0] sram_addr;
  logic [31:0] sram_rdata;
  logic tck, tms, tdi, tdo;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  jtag_player #(.IR_LEN(8), .SRAM_AW(AW)) dut (.*);
  jtag_tap_model u_tap (.tck, .tms, .tdi, .tdo);
  sram_model #(.AW(AW)) u_sram (.clk, .addr(sram_addr), .wdata('0), .we(1'b0), .rd(sram_rd), .rdata(sram_rdata));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int n_tck = 0;
  always @(posedge tck) n_tck++;

  task automatic run(input logic [1:0] o, input logic [7:0] i, input int n, input int a, output int cycles);
    @(posedge clk); #1;
    start = 1; op = o; ir = i; nbits = n; addr = AW'(a);
    @(posedge clk); #1;
    start = 0;
    cycles = 1;
    while (busy) begin @(posedge clk); #1; cycles++; end
  endtask

  initial begin
    int cyc, t0;
    start = 0; op = 0; ir = 0; nbits = 0; addr = 0;
    for (int w = 0; w < 8; w++) u_sram.mem[16 + w] = $urandom;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // reset
    t0 = n_tck;
    run(2'd0, 8'h00, 0, 0, cyc);
    check(u_tap.state == u_tap.RTI, "idle after reset");
    check(u_tap.n_tlr >= 1, "passed through Test-Logic-Reset");
    check(n_tck - t0 == 6, "reset takes 6 TCK");
    check(cyc <= 2 * 6 + 3, $sformatf("reset duration %0d", cyc));
    // instruction
    run(2'd1, 8'hA5, 0, 0, cyc);
    check(u_tap.ir == 8'hA5, $sformatf("IR %h", u_tap.ir));
    check(u_tap.state == u_tap.RTI, "idle after IR");
    check(u_tap.n_ir_upd == 1, "one IR update");
    // 32-bit DR: read IDCODE
    run(2'd2, 8'h00, 32, 16, cyc);
    check(tdo_cap == 32'h1234_5093, $sformatf("IDCODE %h", tdo_cap));
    check(u_tap.last_dr_len == 32, "32 bits shifted");
    // 150-bit DR from SRAM words 16..20
    t0 = n_tck;
    run(2'd2, 8'h00, 150, 16, cyc);
    check(u_tap.last_dr_len == 150, $sformatf("150 bits shifted, got %0d", u_tap.last_dr_len));
    for (int b = 0; b < 150; b++)
      check(u_tap.dr_bits[b] == u_sram.mem[16 + b / 32][b % 32], $sformatf("DR bit %0d", b));
    check(n_tck - t0 == 3 + 150 + 2, "DR TCK count");
    check(cyc <= 2 * (3 + 150 + 2) + 3 * 5 + 3, $sformatf("DR duration %0d", cyc));
    check(u_tap.state == u_tap.RTI, "idle after DR");
    // run-test
    t0 = u_tap.n_rti_clk;
    run(2'd3, 8'h00, 20, 0, cyc);
    check(u_tap.n_rti_clk - t0 == 20, "20 TCK in Run-Test/Idle");
    check(cyc == 2 * 20 + 2, $sformatf("run-test duration %0d", cyc));
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
