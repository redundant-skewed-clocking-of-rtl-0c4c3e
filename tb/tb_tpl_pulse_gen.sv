// tb_tpl_pulse_gen: at each rising edge of a 5 ns clock one pulse of exactly
// PULSE_PS must appear, starting at the edge; nothing on falling edges.
module tb_tpl_pulse_gen;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int PW = 154;
  int checks = 0, failures = 0;
  logic clk = 1'b0, p;
  longint t_clk, t_r;
  int npulse, ncyc;

  tpl_pulse_gen #(.PULSE_PS(PW)) dut (.clk(clk), .pclk(p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge p) begin
    t_r = $time;
    check(t_r == t_clk, $sformatf("pulse starts %0d after edge", t_r - t_clk));
  end
  always @(negedge p) begin
    npulse++;
    check($time - t_r == PW, $sformatf("pulse width %0d want %0d", $time - t_r, PW));
  end

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    npulse = 0; ncyc = 0;
    #1000;
    for (int i = 0; i < 50; i++) begin
      clk = 1'b1; t_clk = $time; ncyc++; #2500;
      clk = 1'b0; #2500;
    end
    check(npulse == ncyc, $sformatf("%0d pulses for %0d edges", npulse, ncyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
