// tb_tpl_prog_delay: for every thermometer setting 0..8 taps, and for a few
// random select words, launches a rising and a falling edge and measures the
// output delay against TAP_PS times the number of consecutive ones ending at
// the top select bit.
module tb_tpl_prog_delay;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int N = 8;
  localparam int TAP = 75;

  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] sel;
  logic out;
  longint t_in, t_out;

  tpl_prog_delay #(.N_TAPS(N), .TAP_PS(TAP)) dut (.clk_in(clk), .sel(sel), .clk_out(out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int expected_taps(input logic [N-1:0] s);
    int k = 0;
    for (int i = N - 1; i >= 0; i--) begin
      if (!s[i]) break;
      k++;
    end
    return k;
  endfunction

  task automatic measure(input logic [N-1:0] s);
    int want;
    sel = s;
    want = expected_taps(s) * TAP;
    #2000;
    clk = 1'b1; t_in = $time;
    @(posedge out); t_out = $time;
    check(t_out - t_in == longint'(want),
          $sformatf("sel=%b rise delay %0d want %0d", s, t_out - t_in, want));
    #1500;
    clk = 1'b0; t_in = $time;
    @(negedge out); t_out = $time;
    check(t_out - t_in == longint'(want),
          $sformatf("sel=%b fall delay %0d want %0d", s, t_out - t_in, want));
  endtask

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sel = '0;
    for (int k = 0; k <= N; k++) begin
      logic [N-1:0] s;
      s = '0;
      for (int i = 0; i < N; i++) if (i >= N - k) s[i] = 1'b1;
      measure(s);
    end
    for (int r = 0; r < 10; r++) measure(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
