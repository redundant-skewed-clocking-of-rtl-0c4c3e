// tb_tpl_majority: exhaustive check of the plain and the NRM-modified
// majority gate against a 2-of-3 vote (and y = a when NRM is active).
module tb_tpl_majority;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic a, b, c, nrm, y0, y1;

  tpl_majority #(.HAS_NRM(1'b0)) u_plain (.a(a), .b(b), .c(c), .nrm(nrm), .y(y0));
  tpl_majority #(.HAS_NRM(1'b1)) u_nrm   (.a(a), .b(b), .c(c), .nrm(nrm), .y(y1));

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
    for (int v = 0; v < 16; v++) begin
      int ones;
      logic vote;
      {nrm, a, b, c} = 4'(v);
      ones = int'(a) + int'(b) + int'(c);
      vote = (ones >= 2);
      #10;
      check(y0 == vote, $sformatf("plain abc=%b%b%b nrm=%b y=%b", a, b, c, nrm, y0));
      check(y1 == (nrm ? a : vote), $sformatf("nrm-gate abc=%b%b%b nrm=%b y=%b", a, b, c, nrm, y1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
