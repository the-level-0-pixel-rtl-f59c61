// tb_frame_align: self-checking test of the frame alignment logic.
// Drives random arrival times for 12 sources within a frame and checks that
// the frame is released exactly one clock after the last enabled source,
// that disabled sources are not waited for, and that a missing source makes
// the frame come out TIMEOUT clocks after the first arrival with the
// timeout flag and the missing-source list.
module tb_frame_align;
  localparam int N = 12, TMO = 6;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] en, part_new, missing;
  logic rel, rel_timeout;
  int checks = 0, failures = 0;
  int n_timeout_seen = 0;

  always #5 clk = ~clk;

  frame_align #(.N(N), .TIMEOUT(TMO)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one frame: source i arrives at cycle arr[i] (relative), -1 = never
  task automatic frame(input int arr[N], input logic [N-1:0] enable);
    int first, last, relcyc, exp_rel;
    logic [N-1:0] exp_missing;
    bit will_timeout;
    first = 1000; last = -1; exp_missing = '0;
    for (int i = 0; i < N; i++) if (enable[i]) begin
      if (arr[i] < 0) exp_missing[i] = 1'b1;
      else begin
        if (arr[i] < first) first = arr[i];
        if (arr[i] > last) last = arr[i];
      end
    end
    for (int i = 0; i < N; i++) if (enable[i] && arr[i] > first + TMO) exp_missing[i] = 1'b1;
    will_timeout = (exp_missing != '0);
    exp_rel = will_timeout ? first + TMO + 1 : last + 1;
    en = enable;
    relcyc = -1;
    for (int c = 0; c < 12; c++) begin
      for (int i = 0; i < N; i++) part_new[i] = (arr[i] == c);
      @(posedge clk); #1;
      if (rel && relcyc < 0) begin
        relcyc = c + 1;
        check(rel_timeout === will_timeout, "timeout flag");
        check(missing === exp_missing, $sformatf("missing %h exp %h", missing, exp_missing));
        if (rel_timeout) n_timeout_seen++;
      end
    end
    part_new = '0;
    check(relcyc == exp_rel, $sformatf("release at %0d exp %0d", relcyc, exp_rel));
    repeat (2) @(posedge clk); #1;
  endtask

  initial begin
    int arr[N];
    en = '1; part_new = '0;
    repeat (3) @(posedge clk);
    rst_n = 1; #1;
    // skewed but complete frames
    for (int f = 0; f < 30; f++) begin
      for (int i = 0; i < N; i++) arr[i] = $urandom_range(0, 5);
      frame(arr, '1);
    end
    // disabled sources never arrive and are not waited for
    for (int f = 0; f < 10; f++) begin
      for (int i = 0; i < N; i++) arr[i] = (i % 3 == 0) ? -1 : $urandom_range(0, 4);
      frame(arr, 12'hDB6);
    end
    // a dead source: timeout
    for (int f = 0; f < 10; f++) begin
      for (int i = 0; i < N; i++) arr[i] = $urandom_range(0, 3);
      arr[$urandom_range(0, N-1)] = -1;
      frame(arr, '1);
    end
    check(n_timeout_seen == 10, "timeouts seen");
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
