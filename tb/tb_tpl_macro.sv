// tb_tpl_macro: a 16-bit macro fed by three 200 MHz clocks skewed by 600 ps
// (as the clock source delivers them in full-hardened mode).
//  - random words: q must still hold the old word just before ClkB rises,
//    show the new word from ClkB + PULSE_PS on, i.e. one skew after ClkA;
//  - an upset of one latch in a random bit and copy is voted out;
//  - a 300 ps data transient on a random bit, covering the closing edge of
//    PCLKA, does not reach q;
//  - with zero skew (SEU-only timing) q is valid one pulse after the edge;
//  - non-redundant mode: ClkB and ClkC stopped, nrm high, q follows copy A.
module tb_tpl_macro;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int W = 16;
  localparam int SKEW = 600;
  localparam int PW = 154;
  localparam int HALF = 2500;

  int checks = 0, failures = 0;
  int n_seu = 0, n_set = 0, n_nrm = 0, n_fast = 0;
  logic clk_a = 1'b0, clk_b = 1'b0, clk_c = 1'b0, nrm = 1'b0;
  logic [W-1:0] d, q, cur, v;
  logic [W-1:0] seu_mask;  // bit whose stored copy was upset last cycle
  int skew;
  bit run_bc;

  tpl_macro #(.WIDTH(W), .PULSE_PS(PW)) dut (
    .clk_a(clk_a), .clk_b(clk_b), .clk_c(clk_c), .nrm(nrm), .d(d), .q(q));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // Clock generator: ClkA, then ClkB and ClkC skew and 2*skew later.
  always begin
    #HALF clk_a = 1'b1;
    #HALF clk_a = 1'b0;
  end
  logic lvl_b, lvl_c;
  always begin
    @(clk_a); lvl_b = clk_a; #(skew); if (run_bc) clk_b = lvl_b;
  end
  always begin
    @(clk_a); lvl_c = clk_a; #(2 * skew); if (run_bc) clk_c = lvl_c;
  end

  initial begin
    #20000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    skew = SKEW; run_bc = 1'b1;
    d = '0;
    repeat (2) @(negedge clk_a);
    cur = '0; seu_mask = '0;
    // hardened: data changes at ClkA falling edge (well after PCLKC)
    for (int i = 0; i < 40; i++) begin
      int bitn;
      v = W'($urandom);
      @(negedge clk_a); #1 d = v;
      @(posedge clk_a);
      if (i % 3 == 1) begin
        // data SET on one bit covering the PCLKA closing edge
        bitn = $urandom_range(0, W - 1);
        #(PW - 150) d[bitn] = ~d[bitn];
        #300 d[bitn] = ~d[bitn];
        #(SKEW - PW - 151);
        n_set++;
      end else begin
        #(SKEW - 1);
      end
      // an upset latch is rewritten only when its own pulse comes, so the
      // upset bit may already flip once copy A has captured: leave it out
      check(((q ^ cur) & ~seu_mask) == '0 || i % 3 == 1, $sformatf("q before ClkB: %h want old %h", q, cur));
      seu_mask = '0;
      #(PW + 2);
      if (i % 3 != 1)
        check(q == v, $sformatf("q one skew after ClkA: %h want %h", q, v));
      #(2 * SKEW);
      check(q == v, $sformatf("q settled: %h want %h", q, v));
      cur = v;
      if (i % 3 == 2) begin
        // upset one latch copy of one bit
        case ($urandom_range(0, 2))
          0: begin seu_mask = W'(1) << 0; force dut.g_bit[0].u_ff.u_la.q = ~cur[0]; #1 release dut.g_bit[0].u_ff.u_la.q; end
          1: begin seu_mask = W'(1) << 5; force dut.g_bit[5].u_ff.u_lb.q = ~cur[5]; #1 release dut.g_bit[5].u_ff.u_lb.q; end
          default: begin seu_mask = W'(1) << 15; force dut.g_bit[15].u_ff.u_lc.q = ~cur[15]; #1 release dut.g_bit[15].u_ff.u_lc.q; end
        endcase
        n_seu++;
        #10 check(q == cur, $sformatf("after SEU q=%h want %h", q, cur));
      end
    end
    // zero skew: SEU-only timing
    @(negedge clk_a); skew = 0;
    for (int i = 0; i < 10; i++) begin
      v = W'($urandom);
      @(negedge clk_a); #1 d = v;
      @(posedge clk_a); #(PW + 1);
      check(q == v, $sformatf("zero skew q after one pulse: %h want %h", q, v));
      n_fast++;
      cur = v;
    end
    // non-redundant mode
    @(negedge clk_a); #(2 * SKEW + 10); run_bc = 1'b0; nrm = 1'b1;
    for (int i = 0; i < 10; i++) begin
      v = W'($urandom);
      @(negedge clk_a); #1 d = v;
      @(posedge clk_a); #(PW + 1);
      check(q == v, $sformatf("NRM q after PCLKA: %h want %h", q, v));
      check(clk_b == 1'b0 && clk_c == 1'b0, "B and C clocks stopped");
      n_nrm++;
    end
    check(n_seu > 0 && n_set > 0 && n_nrm > 0 && n_fast > 0, "every mechanism exercised");
    $display("mechanisms: seu=%0d data_set=%0d zero_skew=%0d nrm=%0d", n_seu, n_set, n_fast, n_nrm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
