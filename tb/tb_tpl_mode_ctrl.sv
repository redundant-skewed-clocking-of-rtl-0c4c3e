// tb_tpl_mode_ctrl: random mode and hardness requests. Outputs must change
// only at falling edges of ClkC (and at reset), and then match the decode
// of the request sampled there: thermometer select of hard_taps taps
// (saturated at N_TAPS) in full-hardened mode, zero taps otherwise, B/C
// enables low and NRM high only in non-redundant mode, reserved = full.
module tb_tpl_mode_ctrl;
  timeunit 1ps;
  timeprecision 1ps;
  import tpl_pkg::*;

  localparam int N = 8;
  localparam int TW = $clog2(N + 1);

  int checks = 0, failures = 0;
  int seen[4];
  logic clk = 1'b0, rst_n = 1'b1;
  tpl_mode_e req, mode, exp_mode;
  logic [TW-1:0] taps, exp_taps;
  logic [N-1:0] sel, exp_sel;
  logic en_b, en_c, nrm;

  tpl_mode_ctrl #(.N_TAPS(N)) dut (
    .clk_c_root(clk), .rst_n(rst_n), .mode_req(req), .hard_taps(taps),
    .sel(sel), .en_b(en_b), .en_c(en_c), .nrm(nrm), .mode(mode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t: %s", $time, what); end
  endtask

  task automatic check_outputs();
    exp_sel = '0;
    if (exp_mode == MODE_FULL_HARD)
      for (int i = 0; i < N; i++) exp_sel[i] = (i >= N - int'(exp_taps));
    check(mode == exp_mode, $sformatf("mode %s want %s", mode.name(), exp_mode.name()));
    check(sel == exp_sel, $sformatf("sel %b want %b", sel, exp_sel));
    check(nrm == (exp_mode == MODE_NON_REDUNDANT), "nrm");
    check(en_b == (exp_mode != MODE_NON_REDUNDANT) && en_c == en_b, "B/C enables");
  endtask

  always #2500 clk = ~clk;

  initial begin
    #10000000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = MODE_SEU_ONLY; taps = TW'(3);
    #10 rst_n = 1'b0;
    #90;
    exp_mode = MODE_FULL_HARD; exp_taps = TW'(N);
    check_outputs();                        // reset state
    #1000 rst_n = 1'b1;
    for (int i = 0; i < 300; i++) begin
      tpl_mode_e r;
      r = tpl_mode_e'($urandom_range(0, 3));
      @(posedge clk); #100;
      req = r; taps = TW'($urandom_range(0, 15));
      seen[int'(r)]++;
      #1000 check_outputs();                // unchanged before the falling edge
      @(negedge clk);
      exp_mode = (req == MODE_RESERVED) ? MODE_FULL_HARD : req;
      exp_taps = (taps > TW'(N)) ? TW'(N) : taps;
      #1 check_outputs();
    end
    for (int m = 0; m < 4; m++) check(seen[m] > 0, $sformatf("mode %0d requested", m));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
