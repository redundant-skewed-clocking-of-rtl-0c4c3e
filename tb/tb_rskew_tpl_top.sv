// tb_rskew_tpl_top: end-to-end test of the sequential subsystem.
//
// The flip-flop macros are chained into a shift register, word m+1 taking
// word m's output through a hold buffer of HOLD_PS (the minimum-delay path a
// real design needs between these flip-flops); word 0 is driven with random
// data. GCLK runs at 200 MHz. A reference shift-register model, fed with what
// each capture should see, is compared with every q word in every cycle, and
// the mode in effect is predicted from the requests (two cycles of latency).
//
// Each mechanism is made to happen and counted:
//   hard      capture in full-hardened mode, q valid one skew after GCLK
//   retune    the skew reprogrammed from 8 to 4 taps while running
//   data_set  300 ps transient on a data input in full-hardened mode: voted out
//   seu       upset of one latch copy: voted out
//   clk_set   300 ps transient on GCLK: reaches ClkA only, voted out
//   gated     clock enable low: all words hold
//   gater_hit the ClkC gater's enable latch upset to 0: PCLKC is missing for
//             one cycle and the outputs are unaffected
//   seu_only  zero skew, q valid right at the edge; a data transient is now
//             captured by all three copies (the mode's known weakness)
//   nrm       non-redundant mode: ClkB/ClkC gated off, B/C latches forced
//   switch    mode changes made on the fly with data moving
// A mechanism that never happened counts as a failure.
module tb_rskew_tpl_top;
  timeunit 1ps;
  timeprecision 1ps;
  import tpl_pkg::*;

  localparam int NM = 4;
  localparam int W = 16;
  localparam int NT = 8;
  localparam int TAP = 75;
  localparam int PW = 154;
  localparam int HALF = 2500;
  localparam int HOLD_PS = 1500;
  localparam int TW = $clog2(NT + 1);

  int checks = 0, failures = 0;
  int n_hard = 0, n_retune = 0, n_dset = 0, n_seu = 0, n_cset = 0, n_gated = 0;
  int n_seu_only = 0, n_seu_only_set = 0, n_nrm = 0, n_switch = 0, n_gater_hit = 0;

  logic gclk = 1'b0, rst_n = 1'b1, clk_en = 1'b1;
  tpl_mode_e mode_req = MODE_FULL_HARD, mode;
  logic [TW-1:0] hard_taps = TW'(NT);
  logic [W-1:0] d [NM];
  logic [W-1:0] q [NM];
  logic [W-1:0] d0;
  logic [W-1:0] exp_q [NM];

  rskew_tpl_top #(.N_MACROS(NM), .WIDTH(W), .N_TAPS(NT), .TAP_PS(TAP), .PULSE_PS(PW)) dut (
    .gclk(gclk), .rst_n(rst_n), .mode_req(mode_req), .hard_taps(hard_taps), .clk_en(clk_en),
    .d(d), .q(q), .mode(mode));

  assign d[0] = d0;
  for (genvar m = 1; m < NM; m++) begin : g_hold
    assign #(HOLD_PS) d[m] = q[m-1];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  // latency of word 0: first change after the rising edge
  longint t_rise, t_q0;
  bit q0_changed;
  bit skip_lat = 1'b0;
  always @(q[0]) if (!q0_changed) begin t_q0 = $time; q0_changed = 1'b1; end

  // edges of the gated B and C clocks
  int nb_edges = 0, nc_edges = 0;
  always @(posedge dut.gclk_b) nb_edges++;
  always @(posedge dut.gclk_c) nc_edges++;

  // request history: a request made in cycle k is in effect from cycle k+2
  tpl_mode_e req_h [2];
  logic [TW-1:0] taps_h [2];
  tpl_mode_e eff_mode, last_mode;

  function automatic tpl_mode_e norm(input tpl_mode_e m);
    return (m == MODE_RESERVED) ? MODE_FULL_HARD : m;
  endfunction
  logic [TW-1:0] eff_taps;
  logic en_h;

  initial begin
    #100000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One GCLK cycle starting at the rising edge.
  //  dset     - data transient on word 0 bit 3 over the PCLKA closing edge
  //  cset     - GCLK transient in the low phase
  //  seu      - flip one latch copy in word 1 late in the cycle
  //  nreq/ntaps/nen - requests applied late in the cycle
  task automatic cycle(input bit dset, input bit cset, input bit seu,
                       input tpl_mode_e nreq, input int ntaps, input bit nen);
    logic [W-1:0] prev [NM];
    logic [W-1:0] newd0;
    int skew;
    bit captured;
    skew = (eff_mode == MODE_FULL_HARD) ? int'(eff_taps) * TAP : 0;
    prev = exp_q;
    captured = en_h;
    q0_changed = 1'b0;
    gclk = 1'b1; t_rise = $time;
    if (captured) begin
      exp_q[0] = d0;
      for (int m = 1; m < NM; m++) exp_q[m] = prev[m-1];
    end
    if (dset) begin
      #(PW - 150) d0[3] = ~d0[3];
      #300        d0[3] = ~d0[3];
      #(HALF - PW - 150 - 300);
      // at zero skew all three copies close while the transient is present
      if (eff_mode != MODE_FULL_HARD && captured) exp_q[0][3] = ~exp_q[0][3];
    end else begin
      #HALF;
    end
    gclk = 1'b0;
    newd0 = W'($urandom);
    #1 d0 = newd0;
    if (cset) begin
      #(500 - 1) gclk = 1'b1; #300 gclk = 1'b0;
      #(1500 - 800);
    end else begin
      #(1500 - 1);
    end
    // t = rise + 4000: all three clocks are low again
    // the mode output switches at the ClkC falling edge, one cycle before
    // the captures use it: it now shows the previous cycle's request
    check(mode == norm(req_h[0]), $sformatf("mode %s want %s", mode.name(), norm(req_h[0]).name()));
    for (int m = 0; m < NM; m++)
      check(q[m] == exp_q[m], $sformatf("word %0d q=%h want %h (mode %s)", m, q[m], exp_q[m], eff_mode.name()));
    // leaving non-redundant mode, B and C still hold their forced opposite
    // values, so the first capture shows at copy A's edge: no latency check
    if (captured && !dset && prev[0] != exp_q[0] && last_mode != MODE_NON_REDUNDANT && !skip_lat)
      check(q0_changed && t_q0 - t_rise == longint'(skew),
            $sformatf("q latency %0d want %0d", t_q0 - t_rise, skew));
    if (seu) begin
      force dut.g_macro[1].u_macro.g_bit[7].u_ff.u_lb.q = ~exp_q[1][7];
      #1 release dut.g_macro[1].u_macro.g_bit[7].u_ff.u_lb.q;
      #10 check(q[1] == exp_q[1], "SEU in copy B voted out");
    end
    // requests for later cycles
    req_h[1] = req_h[0]; taps_h[1] = taps_h[0];
    req_h[0] = nreq;     taps_h[0] = TW'(ntaps);
    mode_req = nreq; hard_taps = TW'(ntaps);
    clk_en = nen;
    #(seu ? 989 : 1000);
    // bookkeeping for the next cycle
    en_h = nen;
    last_mode = eff_mode;
    eff_mode = norm(req_h[1]);
    eff_taps = taps_h[1];
  endtask

  // Called at a GCLK rising edge, before ClkC rises: the ClkC gater latch is
  // held at 0 through this cycle's ClkC pulse and released while ClkC is
  // low, after which the latch takes the enable again at ClkC's fall.
  task automatic upset_gater_c();
    fork
      begin
        #500 force dut.u_cg_c.en_l = 1'b0;
        #2500 release dut.u_cg_c.en_l;
      end
    join_none
  endtask

  initial begin
    d0 = '0;
    for (int m = 0; m < NM; m++) exp_q[m] = '0;
    req_h[0] = MODE_FULL_HARD; req_h[1] = MODE_FULL_HARD;
    taps_h[0] = TW'(NT); taps_h[1] = TW'(NT);
    eff_mode = MODE_FULL_HARD; last_mode = MODE_FULL_HARD; eff_taps = TW'(NT); en_h = 1'b1;
    #10 rst_n = 1'b0;
    #10 rst_n = 1'b1;
    // flush: fill the chain with zeros, results not checked until known
    for (int k = 0; k < NM + 2; k++) begin
      gclk = 1'b1; #HALF gclk = 1'b0; #HALF;
    end
    for (int m = 0; m < NM; m++) exp_q[m] = q[m];

    // full-hardened mode, 8 taps (600 ps)
    for (int k = 0; k < 12; k++) begin
      cycle(k % 4 == 1, k % 4 == 2, k % 4 == 3, MODE_FULL_HARD, NT, 1'b1);
      n_hard++;
      if (k % 4 == 1) n_dset++;
      if (k % 4 == 2) n_cset++;
      if (k % 4 == 3) n_seu++;
    end
    // retune to 4 taps (300 ps)
    for (int k = 0; k < 6; k++) begin
      cycle(k == 3, k == 4, 1'b0, MODE_FULL_HARD, 4, 1'b1);
      if (eff_taps == TW'(4)) n_retune++;
    end
    // clock gating: three cycles with the enable low
    for (int k = 0; k < 5; k++) begin
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, 4, !(k inside {[0:2]}));
      if (!en_h) n_gated++;
    end
    // upset of the ClkC clock gater (full-hardened, 8 taps again)
    for (int k = 0; k < 3; k++) cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
    begin
      int c0;
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
      c0 = nc_edges;
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
      check(nc_edges == c0 + 1, "ClkC runs before the gater upset");
    end
    n_gater_hit++;
    begin
      int c1;
      c1 = nc_edges;
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
      c1 = nc_edges;
      upset_gater_c();
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
      check(nc_edges == c1, "gater upset suppresses one ClkC pulse");
      c1 = nc_edges;
      // copy C missed one capture, so this cycle's q may switch at copy A's
      // edge (as after a latch upset): no latency check
      skip_lat = 1'b1;
      cycle(1'b0, 1'b0, 1'b0, MODE_FULL_HARD, NT, 1'b1);
      skip_lat = 1'b0;
      check(nc_edges == c1 + 1, "ClkC back after the gater upset");
    end
    // switch to SEU-only mode on the fly
    n_switch++;
    for (int k = 0; k < 8; k++) begin
      cycle(k == 5, 1'b0, k == 6, MODE_SEU_ONLY, NT, 1'b1);
      if (eff_mode == MODE_SEU_ONLY) begin
        n_seu_only++;
        if (k == 5) n_seu_only_set++;
      end
    end
    // switch to non-redundant mode
    n_switch++;
    for (int k = 0; k < 3; k++) cycle(1'b0, 1'b0, 1'b0, MODE_NON_REDUNDANT, NT, 1'b1);
    nb_edges = 0; nc_edges = 0;
    check(dut.nrm == 1'b1, "NRM raised");
    for (int k = 0; k < 8; k++) begin
      cycle(1'b0, 1'b0, 1'b0, MODE_NON_REDUNDANT, NT, 1'b1);
      if (eff_mode == MODE_NON_REDUNDANT) n_nrm++;
    end
    check(nb_edges == 0 && nc_edges == 0, $sformatf("ClkB/ClkC gated in NRM: %0d/%0d edges", nb_edges, nc_edges));
    check(dut.g_macro[2].u_macro.g_bit[0].u_ff.qb == NRM_VALUE_B &&
          dut.g_macro[2].u_macro.g_bit[0].u_ff.qc == NRM_VALUE_C, "B/C latches forced in NRM");
    // back to full-hardened mode
    n_switch++;
    for (int k = 0; k < 8; k++) cycle(k == 5, k == 6, k == 7, MODE_FULL_HARD, NT, 1'b1);
    // reserved encoding behaves as full-hardened
    for (int k = 0; k < 4; k++) cycle(1'b0, 1'b0, 1'b0, MODE_RESERVED, NT, 1'b1);

    check(n_hard > 0,          "mechanism hard");
    check(n_retune > 0,        "mechanism retune");
    check(n_dset > 0,          "mechanism data_set");
    check(n_seu > 0,           "mechanism seu");
    check(n_cset > 0,          "mechanism clk_set");
    check(n_gated > 0,         "mechanism gated");
    check(n_seu_only > 0,      "mechanism seu_only");
    check(n_seu_only_set > 0,  "mechanism seu_only data transient");
    check(n_nrm > 0,           "mechanism nrm");
    check(n_switch > 0,        "mechanism switch");
    check(n_gater_hit > 0,     "mechanism gater_hit");
    $display("mechanisms: hard=%0d retune=%0d data_set=%0d seu=%0d clk_set=%0d gated=%0d seu_only=%0d seu_only_set=%0d nrm=%0d switch=%0d gater_hit=%0d",
             n_hard, n_retune, n_dset, n_seu, n_cset, n_gated, n_seu_only, n_seu_only_set, n_nrm, n_switch, n_gater_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
