// tb_tpl_c_element: drives the C-element through random input sequences and
// compares with the rule "follow when equal, hold otherwise", then checks its
// use as a delay filter (input plus a 600 ps delayed copy): a 300 ps glitch is
// blocked and a wide pulse passes, delayed.
module tb_tpl_c_element;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a, b, y;
  logic model;
  logic s, sd, fy;

  tpl_c_element dut (.a(a), .b(b), .y(y));
  tpl_delay_cell #(.DELAY_PS(600)) u_d (.a(s), .y(sd));
  tpl_c_element dutf (.a(s), .b(sd), .y(fy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; b = 1'b0; s = 1'b0; model = 1'b0;
    #10 check(y == 1'b0, "initial 00 -> 0");
    for (int i = 0; i < 200; i++) begin
      a = 1'($urandom); b = 1'($urandom);
      if (a == b) model = a;
      #10 check(y == model, $sformatf("step %0d a=%b b=%b y=%b want %b", i, a, b, y, model));
    end
    // delay filter: glitch narrower than the delay
    #2000 s = 1'b1; #300 s = 1'b0;
    for (int t = 0; t < 20; t++) begin
      #100 check(fy == 1'b0, "300 ps glitch blocked by delay filter");
    end
    // wide pulse of 2000 ps: output rises 600 ps after s, falls 600 ps after s falls
    s = 1'b1;
    #599 check(fy == 1'b0, "filter output still low at +599");
    #2   check(fy == 1'b1, "filter output high at +601");
    #1399 s = 1'b0;
    #599 check(fy == 1'b1, "filter output still high 599 ps after fall");
    #2   check(fy == 1'b0, "filter output low 601 ps after fall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
