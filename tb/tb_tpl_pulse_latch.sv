// tb_tpl_pulse_latch: random data and pulse sequences on three latches (plain,
// NRM forcing 1, NRM forcing 0), compared with a reference latch model: q
// follows d while pclk is high and holds otherwise; with nrm high the NRM
// copies read their forced value.
module tb_tpl_pulse_latch;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic pclk, d, nrm;
  logic q0, q1, qz;
  logic m0, m1, mz;

  tpl_pulse_latch #(.HAS_NRM(1'b0), .NRM_VALUE(1'b0)) u_plain (.pclk(pclk), .d(d), .nrm(nrm), .q(q0));
  tpl_pulse_latch #(.HAS_NRM(1'b1), .NRM_VALUE(1'b1)) u_one   (.pclk(pclk), .d(d), .nrm(nrm), .q(q1));
  tpl_pulse_latch #(.HAS_NRM(1'b1), .NRM_VALUE(1'b0)) u_zero  (.pclk(pclk), .d(d), .nrm(nrm), .q(qz));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pclk = 1'b1; d = 1'b0; nrm = 1'b0;
    #10 pclk = 1'b0;
    m0 = 1'b0; m1 = 1'b0; mz = 1'b0;
    #10;
    for (int i = 0; i < 500; i++) begin
      d = 1'($urandom);
      pclk = ($urandom_range(0, 2) == 0);
      nrm = ($urandom_range(0, 4) == 0);
      if (pclk) m0 = d;
      if (nrm) begin m1 = 1'b1; mz = 1'b0; end
      else if (pclk) begin m1 = d; mz = d; end
      #10;
      check(q0 == m0 && q1 == m1 && qz == mz,
            $sformatf("i=%0d pclk=%b d=%b nrm=%b q=%b%b%b want %b%b%b", i, pclk, d, nrm, q0, q1, qz, m0, m1, mz));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
