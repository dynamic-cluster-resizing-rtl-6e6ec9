// tb_double_interval_ctrl: choice among N, N-1 and N+1 active queues.
//
// Rounds of REF, DOWN and UP results with random ED2P values and random
// current counts are fed; after UP the chosen count must be the one with the
// lowest ED2P among the valid candidates (N-1 only if N > 1, N+1 only if
// N < 4, ties keep N and prefer N-1 over N+1). Rounds broken by a clear, or
// with no reference, must give no update.
module tb_double_interval_ctrl;
  import dcr_pkg::*;
  localparam int P_W = 78;

  logic clk = 0, rst_n = 0, clear = 0, res_valid = 0;
  phase_e res_phase = PH_WARM;
  logic [P_W-1:0] ed2p_raw = '0, ed2p_scaled = '0;
  logic [N_W-1:0] n_cur = 3'd4, n_next;
  logic update;
  int checks = 0, failures = 0;
  int chose[3];

  double_interval_ctrl #(.P_W(P_W), .N_MIN(1), .N_MAX(4)) dut (
    .clk, .rst_n, .clear, .res_valid, .res_phase, .ed2p_raw, .ed2p_scaled, .n_cur, .n_next, .update);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic give(phase_e p, logic [P_W-1:0] raw, logic [P_W-1:0] sc);
    @(negedge clk);
    res_phase = p; ed2p_raw = raw; ed2p_scaled = sc; res_valid = 1;
    @(negedge clk);
    res_valid = 0; ed2p_raw = '1; ed2p_scaled = '1;
  endtask

  function automatic logic [P_W-1:0] rnd();
    return P_W'($urandom % 8);   // small range: many ties
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      logic [P_W-1:0] r, d, u, best;
      int n, exp_n;
      bit broken, noref;
      n = 1 + ($urandom % 4);
      n_cur = N_W'(n);
      r = rnd(); d = rnd(); u = rnd();
      broken = (k % 23 == 7);
      noref  = (k % 31 == 11);
      if (!noref) give(PH_REF, r, rnd());
      give(PH_DOWN, rnd(), d);
      if (broken) begin @(negedge clk) clear = 1; @(negedge clk) clear = 0; end
      give(PH_UP, rnd(), u);
      // the UP result was presented on the last cycle; update is high now
      exp_n = n; best = r;
      if (n > 1 && d < best) begin exp_n = n - 1; best = d; end
      if (n < 4 && u < best) exp_n = n + 1;
      if (broken || noref) begin
        check(!update, $sformatf("k=%0d no update expected", k));
      end else begin
        check(update, $sformatf("k=%0d update expected", k));
        check(int'(n_next) == exp_n, $sformatf("k=%0d n=%0d r=%0d d=%0d u=%0d chose %0d exp %0d", k, n, r, d, u, n_next, exp_n));
        chose[exp_n - n + 1]++;
      end
      @(negedge clk);
      check(!update, "update is a single pulse");
    end
    checks++;
    if (chose[0] == 0 || chose[1] == 0 || chose[2] == 0) begin
      failures++;
      $display("FAIL coverage %p", chose);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
