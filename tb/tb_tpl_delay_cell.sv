// tb_tpl_delay_cell: checks the buffer-chain delay model. A step comes out
// DELAY_PS later, a 100 ps pulse comes out intact and DELAY_PS later, and a
// 10 ps glitch (shorter than one 25 ps buffer stage) is absorbed. Also checks
// the zero-delay wire case.
module tb_tpl_delay_cell;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a = 1'b0, a0 = 1'b0;
  logic y, y0;
  int rise_t, fall_t, edges;

  tpl_delay_cell #(.DELAY_PS(600), .BUF_PS(25)) dut  (.a(a),  .y(y));
  tpl_delay_cell #(.DELAY_PS(0))                dut0 (.a(a0), .y(y0));

  always @(posedge y) begin rise_t = int'($time); edges++; end
  always @(negedge y) begin fall_t = int'($time); edges++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    edges = 0;
    #1000;
    check(y == 1'b0, "output low after settling");
    a = 1'b1;                     // step at 1000
    #599 check(y == 1'b0, "not yet risen at 599 ps");
    #2   check(y == 1'b1 && rise_t == 1600, $sformatf("rise at %0d, want 1600", rise_t));
    #400 a = 1'b0;                // fall at 2001
    #700 check(y == 1'b0 && fall_t == 2601, $sformatf("fall at %0d, want 2601", fall_t));
    edges = 0;
    a = 1'b1; #100 a = 1'b0;      // 100 ps pulse at 2701
    #800 check(edges == 2 && rise_t == 3301 && fall_t == 3401,
               $sformatf("100 ps pulse: edges=%0d rise=%0d fall=%0d", edges, rise_t, fall_t));
    edges = 0;
    a = 1'b1; #10 a = 1'b0;       // 10 ps glitch
    #800 check(edges == 0 && y == 1'b0, "10 ps glitch absorbed");
    a0 = 1'b1; #1 check(y0 == 1'b1, "zero-delay cell follows input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
