// tb_trigger_proc: self-checking test of the Level 0 decision unit at full
// size (1200 Fast-OR bits, 400 in the inner layer).
// Random frames of varying occupancy are sent back to back under each of
// the four algorithms with random thresholds. The expected decision is
// computed here by counting bits; the decision must come exactly one clock
// after the frame, with the frame's total multiplicity.
module tb_trigger_proc;
  localparam int NB = 1200, NBI = 400, CW = 11;
  logic clk = 0, rst_n = 0;
  logic [NB-1:0] fo;
  logic in_valid;
  logic [1:0] algo;
  logic [CW-1:0] th_lo, th_hi, th_in, th_out, total;
  logic out_valid, trig;
  int checks = 0, failures = 0;
  int n_pos = 0, n_neg = 0;

  always #5 clk = ~clk;

  trigger_proc dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reference model
  function automatic bit ref_trig(input logic [NB-1:0] f, output int tot);
    int ci, co;
    ci = 0; co = 0;
    for (int i = 0; i < NB; i++) if (f[i]) begin if (i < NBI) ci++; else co++; end
    tot = ci + co;
    case (algo)
      2'd0: return tot != 0;
      2'd1: return tot >= int'(th_lo);
      2'd2: return (ci >= int'(th_in)) && (co >= int'(th_out));
      default: return (tot >= int'(th_lo)) && (tot <= int'(th_hi));
    endcase
  endfunction

  logic [NB-1:0] fr [3];
  initial begin
    int tot, pct;
    bit exp;
    fo = '0; in_valid = 0; algo = 0; th_lo = 1; th_hi = 100; th_in = 1; th_out = 1;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      algo   = 2'(n / 100);
      th_lo  = CW'($urandom_range(0, 60));
      th_hi  = th_lo + CW'($urandom_range(0, 40));
      th_in  = CW'($urandom_range(0, 20));
      th_out = CW'($urandom_range(0, 40));
      pct = $urandom_range(0, 6);       // occupancy 0 .. 6 %
      for (int i = 0; i < NB; i++) fo[i] = ($urandom_range(0, 99) < pct);
      if (n % 7 == 0) fo = '0;
      in_valid = 1;
      check(out_valid === 1'b0, "no decision before the frame");
      exp = ref_trig(fo, tot);
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid === 1'b1, "decision after one clock (12.5 ns < 15 ns)");
      check(trig === exp, $sformatf("algo %0d trig %b exp %b tot %0d", algo, trig, exp, tot));
      check(int'(total) == tot, $sformatf("total %0d exp %0d", total, tot));
      if (exp) n_pos++; else n_neg++;
      @(posedge clk); #1;
      check(out_valid === 1'b0 && trig === 1'b0, "single decision per frame");
    end
    check(n_pos > 20 && n_neg > 20, "both decisions seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
