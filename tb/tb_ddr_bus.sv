// tb_ddr_bus: self-checking test of the DDR link between an OPTIN board and
// the BRAIN (ddr_bus_tx driving ddr_bus_rx over 64 lines).
// Random 128-bit words are sent every clock at 80.16 MHz. Checks: the lines
// carry the low half while clk is high and the high half while it is low,
// and each word appears on dout after exactly two rising edges.
`timescale 1ps/1ps
module tb_ddr_bus;
  localparam int W = 64;
  localparam time TCLK = 12476ps;   // 80.16 MHz
  logic clk = 0, clk90 = 0, rst_n = 0;
  logic [2*W-1:0] d, dout;
  logic [W-1:0] pins;
  logic [2*W-1:0] hist [4];
  int checks = 0, failures = 0;

  always #(TCLK/2) clk = ~clk;
  initial begin
    #(TCLK/4);
    forever #(TCLK/2) clk90 = ~clk90;
  end

  ddr_bus_tx #(.W(W)) u_tx (.clk, .rst_n, .d, .q(pins));
  ddr_bus_rx #(.W(W)) u_rx (.clk, .clk90, .rst_n, .pins, .dout);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    d = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < 4; i++) hist[i] = '0;
    // reset clears the lines and the received word
    repeat (2) @(posedge clk);
    #(TCLK/4) check(pins === '0, "lines cleared by reset (high phase)");
    #(TCLK/2) check(pins === '0, "lines cleared by reset (low phase)");
    check(dout === '0, "received word cleared by reset");
    @(posedge clk) #1 rst_n = 1;
    d = '0;
    for (int n = 0; n < 200; n++) begin
      @(posedge clk);
      // hist[0] = word captured by this edge
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1ps d = {$urandom, $urandom, $urandom, $urandom};
      #(TCLK/4);
      if (n > 1) check(pins === hist[0][W-1:0], "low half in high phase");
      #(TCLK/2);
      if (n > 1) check(pins === hist[0][2*W-1:W], "high half in low phase");
      if (n > 3) check(dout === hist[1], $sformatf("dout %h exp %h", dout, hist[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TCLK * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
