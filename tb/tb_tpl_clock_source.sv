// tb_tpl_clock_source: runs a 200 MHz GCLK through the clock source at skews
// of 8, 4 and 0 taps and measures ClkB and ClkC edges against ClkA (one and
// two skews). It then injects transients on GCLK during its low phase: one
// narrower than the skew must appear on ClkA only, one wider than twice the
// skew reaches all three clocks.
module tb_tpl_clock_source;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 8;
  localparam int TAP = 75;
  localparam int HALF = 2500;

  int checks = 0, failures = 0;
  logic gclk = 1'b0;
  logic [N-1:0] sel;
  logic clk_a, clk_b, clk_c;
  longint ta, tb_, tc, tbf, tcf, taf;
  int na, nb, nc;

  tpl_clock_source #(.N_TAPS(N), .TAP_PS(TAP)) dut (
    .gclk(gclk), .sel(sel), .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c));

  always @(posedge clk_a) begin ta  = $time; na++; end
  always @(posedge clk_b) begin tb_ = $time; nb++; end
  always @(posedge clk_c) begin tc  = $time; nc++; end
  always @(negedge clk_a) taf = $time;
  always @(negedge clk_b) tbf = $time;
  always @(negedge clk_c) tcf = $time;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [N-1:0] therm(input int k);
    logic [N-1:0] s = '0;
    for (int i = 0; i < N; i++) if (i >= N - k) s[i] = 1'b1;
    return s;
  endfunction

  task automatic run_cycles(input int k, input int n);
    int skew = k * TAP;
    for (int i = 0; i < n; i++) begin
      gclk = 1'b1; #HALF;
      check(tb_ - ta == longint'(skew) && tc - ta == longint'(2 * skew),
            $sformatf("k=%0d rise skew B %0d C %0d want %0d/%0d", k, tb_ - ta, tc - ta, skew, 2 * skew));
      gclk = 1'b0; #HALF;
      check(tbf - taf == longint'(skew) && tcf - taf == longint'(2 * skew),
            $sformatf("k=%0d fall skew B %0d C %0d", k, tbf - taf, tcf - taf));
    end
  endtask

  initial begin
    #200000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = therm(8);
    #3000;
    run_cycles(8, 4);
    sel = therm(4); #100;
    run_cycles(4, 4);
    sel = therm(0); #100;
    run_cycles(0, 4);
    // narrow GCLK transient at full skew (600 ps): 300 ps wide
    sel = therm(8); #100;
    run_cycles(8, 2);
    na = 0; nb = 0; nc = 0;
    #500 gclk = 1'b1; #300 gclk = 1'b0; #(HALF * 2 - 800);
    check(na == 1 && nb == 0 && nc == 0,
          $sformatf("300 ps GCLK SET reaches A only: A=%0d B=%0d C=%0d", na, nb, nc));
    // wide transient, 1400 ps > 2 x 600 ps: reaches every clock
    na = 0; nb = 0; nc = 0;
    #200 gclk = 1'b1; #1400 gclk = 1'b0; #(HALF * 2 - 1600);
    check(na == 1 && nb == 1 && nc == 1,
          $sformatf("1400 ps GCLK pulse reaches all: A=%0d B=%0d C=%0d", na, nb, nc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
