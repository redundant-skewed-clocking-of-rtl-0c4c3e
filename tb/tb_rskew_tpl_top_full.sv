// tb_rskew_tpl_top_full: the top at its default size (426 macros x 16 bits =
// 6816 hardened flip-flops, all default timing). Every cycle a fresh random
// word is written into every macro and read back one cycle later, first in
// full-hardened mode (600 ps skew), then in SEU-only and non-redundant mode,
// then in full-hardened mode again; one latch upset is injected per cycle in
// a rotating macro. Data change at the GCLK falling edge, which meets both
// the setup and the hold window.
module tb_rskew_tpl_top_full;
  timeunit 1ps;
  timeprecision 1ps;
  import tpl_pkg::*;

  localparam int NM = DEF_N_MACROS;
  localparam int W = DEF_WIDTH;
  localparam int TW = $clog2(DEF_N_TAPS + 1);
  localparam int HALF = 2500;

  int checks = 0, failures = 0, bad_words = 0;
  logic gclk = 1'b0, rst_n = 1'b1, clk_en = 1'b1;
  tpl_mode_e mode_req = MODE_FULL_HARD, mode;
  logic [TW-1:0] hard_taps = TW'(DEF_N_TAPS);
  logic [W-1:0] d [NM];
  logic [W-1:0] q [NM];
  logic [W-1:0] expw [NM];

  rskew_tpl_top dut (
    .gclk(gclk), .rst_n(rst_n), .mode_req(mode_req), .hard_taps(hard_taps), .clk_en(clk_en),
    .d(d), .q(q), .mode(mode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic run(input int n, input tpl_mode_e m, input bit seu);
    for (int k = 0; k < n; k++) begin
      gclk = 1'b1;                          // capture expw
      #HALF gclk = 1'b0;
      #1000;                                // all clocks low again
      bad_words = 0;
      for (int i = 0; i < NM; i++) if (q[i] != expw[i]) bad_words++;
      check(bad_words == 0, $sformatf("%0d words wrong in mode %s", bad_words, mode.name()));
      if (seu) begin
        // upset one latch copy; the location rotates over four cells
        case (k % 4)
          0: begin force dut.g_macro[0].u_macro.g_bit[0].u_ff.u_la.q = ~expw[0][0];
                   #1 release dut.g_macro[0].u_macro.g_bit[0].u_ff.u_la.q; end
          1: begin force dut.g_macro[213].u_macro.g_bit[7].u_ff.u_lb.q = ~expw[213][7];
                   #1 release dut.g_macro[213].u_macro.g_bit[7].u_ff.u_lb.q; end
          2: begin force dut.g_macro[425].u_macro.g_bit[15].u_ff.u_lc.q = ~expw[425][15];
                   #1 release dut.g_macro[425].u_macro.g_bit[15].u_ff.u_lc.q; end
          default: begin force dut.g_macro[100].u_macro.g_bit[3].u_ff.u_lb.q = ~expw[100][3];
                   #1 release dut.g_macro[100].u_macro.g_bit[3].u_ff.u_lb.q; end
        endcase
        #10;
        bad_words = 0;
        for (int i = 0; i < NM; i++) if (q[i] != expw[i]) bad_words++;
        check(bad_words == 0, "upset voted out");
      end
      for (int i = 0; i < NM; i++) begin
        expw[i] = W'($urandom);
        d[i] = expw[i];
      end
      mode_req = m;
      #(HALF - 1000 - (seu ? 11 : 0));
    end
  endtask

  initial begin
    #1000000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NM; i++) begin expw[i] = W'($urandom); d[i] = expw[i]; end
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    #(HALF - 20);
    run(8, MODE_FULL_HARD, 1'b1);
    run(2, MODE_SEU_ONLY, 1'b0);
    run(4, MODE_SEU_ONLY, 1'b1);
    run(2, MODE_NON_REDUNDANT, 1'b0);
    run(4, MODE_NON_REDUNDANT, 1'b0);
    run(2, MODE_FULL_HARD, 1'b0);
    run(4, MODE_FULL_HARD, 1'b1);
    check(mode == MODE_FULL_HARD, "back in full-hardened mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
