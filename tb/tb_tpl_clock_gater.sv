// tb_tpl_clock_gater: random enable changes at random points of a 5 ns clock.
// A reference model latches the enable at each rising clock edge; the gated
// clock must equal clk AND that value at all times, and every gated pulse must
// be a whole clock high phase (no glitches).
module tb_tpl_clock_gater;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 1'b0, en = 1'b0, gq;
  logic en_ref;
  longint t_r;
  int pulses;

  tpl_clock_gater dut (.clk(clk), .en(en), .gclk_out(gq));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always #2500 clk = ~clk;
  always @(posedge clk) en_ref = en;

  always @(posedge gq) t_r = $time;
  always @(negedge gq) begin
    pulses++;
    check($time - t_r == 2500, $sformatf("gated pulse width %0d", $time - t_r));
  end

  initial begin
    #2000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en_ref = 1'b0; pulses = 0;
    for (int i = 0; i < 2000; i++) begin
      #(100 + $urandom_range(0, 300));
      if ($urandom_range(0, 3) == 0) en = ~en;
      check(gq == (clk & en_ref), $sformatf("t=%0t gq=%b clk=%b en_ref=%b", $time, gq, clk, en_ref));
    end
    check(pulses > 10, "some gated pulses seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
