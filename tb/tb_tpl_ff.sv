// tb_tpl_ff: one hardened bit in both non-redundant-mode styles, driven by
// three pulse clocks skewed by 600 ps with 154 ps pulses.
//  - random data: the voted q changes exactly when copy B opens (one skew
//    after copy A) and holds the new value afterwards;
//  - a single-event upset flipped into any one latch leaves q unchanged;
//  - a data transient that covers the closing edge of PCLKA only is voted out;
//  - non-redundant mode: only PCLKA pulses and q follows copy A, with the B
//    and C latches forced to 1 and 0 in the latch style.
module tb_tpl_ff;
  timeunit 1ps;
  timeprecision 1ps;
  import tpl_pkg::*;

  localparam int SKEW = 600;
  localparam int PW   = 154;

  int checks = 0, failures = 0;
  int n_seu = 0, n_set = 0, n_nrm = 0;
  logic pa = 1'b0, pb = 1'b0, pc = 1'b0, d = 1'b0, nrm = 1'b0;
  logic q_l, q_m;
  logic cur, v;

  tpl_ff #(.NRM_STYLE(NRM_IN_LATCH))    dut_l (.pclk_a(pa), .pclk_b(pb), .pclk_c(pc), .d(d), .nrm(nrm), .q(q_l));
  tpl_ff #(.NRM_STYLE(NRM_IN_MAJORITY)) dut_m (.pclk_a(pa), .pclk_b(pb), .pclk_c(pc), .d(d), .nrm(nrm), .q(q_m));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // One capture: pulses at t0, t0+SKEW, t0+2*SKEW (or A only). d must be set
  // by the caller before this is called. Checks q against old/new value.
  // Reference model of the three latch states, kept by the testbench.
  logic ma, mb, mc;
  function automatic logic vote(input logic x, input logic y, input logic z);
    return (x & y) | (y & z) | (x & z);
  endfunction

  // One capture: pulses at t0, t0+SKEW, t0+2*SKEW (or A only in NRM).
  // a_val is what copy A sees at its closing edge (differs from newv when a
  // data transient is injected). q is checked against the model after each
  // copy captures, and against newv at the end.
  task automatic capture(input logic newv, input bit a_only, input logic a_val);
    pa = 1'b1; #PW pa = 1'b0;
    ma = a_val;
    if (!a_only) begin
      #(SKEW - PW - 1);
      check(q_l == vote(ma, mb, mc) && q_m == vote(ma, mb, mc),
            $sformatf("q after A: %b%b want %b", q_l, q_m, vote(ma, mb, mc)));
      #1 pb = 1'b1; #1;
      mb = newv;
      check(q_l == vote(ma, mb, mc) && q_m == vote(ma, mb, mc),
            $sformatf("q once B opens: %b%b want %b", q_l, q_m, vote(ma, mb, mc)));
      #(PW - 1) pb = 1'b0;
      #(SKEW - PW) pc = 1'b1; #1;
      mc = newv;
      check(q_l == newv && q_m == newv, $sformatf("q once C opens: %b%b want %b", q_l, q_m, newv));
      #(PW - 1) pc = 1'b0;
    end else begin
      #1;
      check(q_l == newv && q_m == newv, $sformatf("NRM q after A: %b%b want %b", q_l, q_m, newv));
    end
    #1000;
    check(q_l == newv && q_m == newv, $sformatf("q settled: %b%b want %b", q_l, q_m, newv));
    cur = newv;
  endtask

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // load a known value into all latches
    d = 1'b0; pa = 1'b1; pb = 1'b1; pc = 1'b1; #200 pa = 1'b0; pb = 1'b0; pc = 1'b0;
    cur = 1'b0; ma = 1'b0; mb = 1'b0; mc = 1'b0; #1000;
    for (int i = 0; i < 60; i++) begin
      v = 1'($urandom);
      d = v; #100;
      capture(v, 1'b0, v);
      // SEU in one of the three latches of each flip-flop
      case (i % 3)
        0: begin ma = ~cur; force dut_l.u_la.q = ~cur; force dut_m.u_la.q = ~cur; #1 release dut_l.u_la.q; release dut_m.u_la.q; end
        1: begin mb = ~cur; force dut_l.u_lb.q = ~cur; force dut_m.u_lb.q = ~cur; #1 release dut_l.u_lb.q; release dut_m.u_lb.q; end
        default: begin mc = ~cur; force dut_l.u_lc.q = ~cur; force dut_m.u_lc.q = ~cur; #1 release dut_l.u_lc.q; release dut_m.u_lc.q; end
      endcase
      n_seu++;
      #50 check(q_l == cur && q_m == cur, $sformatf("SEU %0d voted out: %b%b want %b", i % 3, q_l, q_m, cur));
      #500;
    end
    // data SET covering the closing edge of PCLKA only (300 ps < skew)
    for (int i = 0; i < 20; i++) begin
      v = 1'($urandom);
      d = v; #100;
      fork
        capture(v, 1'b0, ~v);
        begin #(PW - 150) d = ~v; #300 d = v; end
      join
      n_set++;
    end
    // non-redundant mode
    nrm = 1'b1; #10;
    check(dut_l.qb == NRM_VALUE_B && dut_l.qc == NRM_VALUE_C, "NRM forces B and C latches");
    for (int i = 0; i < 20; i++) begin
      v = 1'($urandom);
      d = v; #100;
      capture(v, 1'b1, v);
      n_nrm++;
    end
    nrm = 1'b0;
    check(n_seu > 0 && n_set > 0 && n_nrm > 0, "every mechanism exercised");
    $display("mechanisms: seu=%0d data_set=%0d nrm_captures=%0d", n_seu, n_set, n_nrm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
