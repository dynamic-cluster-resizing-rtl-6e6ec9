// tb_iq_resizer: one issue-queue type's resizer in both schemes.
//
// The testbench plays the interval sequencer and the counters: windows of
// W cycles, each ending with a sample pulse, with random per-cluster ECR
// values and random instruction counts. A model computes every ED2P with
// 128-bit arithmetic and applies the single-interval rule (direction bit) or
// the double-interval rule (best of N, N-1, N+1) to predict the active count,
// which is checked before the next window ends. In the double scheme the
// applied count and the enable mask must show N-1 and N+1 during the trial
// windows. Scheme changes (clear) are included, also one that arrives while
// a decision is still being computed: that decision must be dropped.
module tb_iq_resizer;
  import dcr_pkg::*;
  localparam int NC = 4, ECR_W = 30, CYC_W = 19, INS_W = 22, D_W = 23;
  localparam int E_W = ECR_W + 2, P_W = E_W + 2 * D_W;
  localparam int W = 80;

  logic clk = 0, rst_n = 0, clear = 0, sample = 0;
  scheme_e scheme = SCHEME_SINGLE;
  logic [NC-1:0][ECR_W-1:0] ecr = '0;
  logic [CYC_W-1:0] cycles = '0;
  logic [INS_W-1:0] instrs = '0;
  phase_e sample_phase = PH_SINGLE, cur_phase = PH_SINGLE;
  logic [N_W-1:0] n_active, n_applied;
  logic [NC-1:0] iq_en;
  logic dir_up;
  logic [P_W-1:0] last_ed2p;
  int checks = 0, failures = 0;
  int n_changes = 0, n_trial_down = 0, n_trial_up = 0;

  // Decision latency: cycles from the sample pulse to the new n_active.
  localparam int DECISION_LAT = (INS_W + CYC_W) + 8;
  int since_sample = 0;
  logic [N_W-1:0] n_prev_q;
  always @(posedge clk) begin
    if (sample) since_sample = 0;
    else since_sample++;
    n_prev_q <= n_active;
    if (rst_n && n_active != n_prev_q) begin
      checks++;
      if (since_sample != DECISION_LAT) begin
        failures++;
        $display("FAIL decision latency %0d exp %0d", since_sample, DECISION_LAT);
      end
    end
  end

  iq_resizer #(.NC(NC), .ECR_W(ECR_W), .CYC_W(CYC_W), .INS_W(INS_W), .D_W(D_W)) dut (
    .clk, .rst_n, .clear, .scheme, .ecr, .cycles, .instrs, .sample, .sample_phase, .cur_phase,
    .n_active, .n_applied, .iq_en, .dir_up, .last_ed2p);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // model state
  int m_n = NC;
  bit s_have = 0, s_dir = 0;
  logic [127:0] s_prev = 0;
  longint iref = 0;
  logic [127:0] d_ref = 0, d_down = 0;
  bit d_have_ref = 0, d_have_down = 0;

  function automatic logic [127:0] scaled_ed2p(longint e, longint c, longint i, longint r);
    logic [127:0] d;
    d = (i == 0) ? 128'(2**D_W - 1) : (128'(r) * 128'(c)) / 128'(i);
    if (d > 128'(2**D_W - 1)) d = 128'(2**D_W - 1);
    return 128'(e) * d * d;
  endfunction

  // One window: phase p, lasting W cycles, measured values set before its end.
  task automatic window(phase_e p);
    longint e, c, i, r;
    logic [127:0] raw, sc;
    int exp_applied;
    cur_phase = p;
    // applied count during the window
    exp_applied = m_n;
    if (scheme == SCHEME_DOUBLE && p == PH_DOWN && m_n > 1) exp_applied = m_n - 1;
    if (scheme == SCHEME_DOUBLE && p == PH_UP && m_n < NC) exp_applied = m_n + 1;
    repeat (W / 2) @(negedge clk);
    check(int'(n_applied) == exp_applied, $sformatf("%s applied %0d exp %0d", p.name(), n_applied, exp_applied));
    for (int k = 0; k < NC; k++)
      check(iq_en[k] == (k == 0 || k < exp_applied), $sformatf("iq_en %b for %0d", iq_en, exp_applied));
    if (exp_applied < m_n) n_trial_down++;
    if (exp_applied > m_n) n_trial_up++;
    repeat (W / 2 - 1) @(negedge clk);
    // values latched by the estimators/counters at the end of this window
    e = 0;
    for (int k = 0; k < NC; k++) begin
      ecr[k] = (k < exp_applied) ? ECR_W'(1000 + $urandom % 20000) : '0;
      e += ecr[k];
    end
    c = W;
    i = (($urandom % 10) == 0) ? 0 : 20 + $urandom % 300;
    cycles = CYC_W'(c); instrs = INS_W'(i);
    sample = 1; sample_phase = p;
    @(negedge clk);
    sample = 0;
    // model the decision
    raw = 128'(e) * 128'(c) * 128'(c);
    case (p)
      PH_SINGLE: begin
        sc = scaled_ed2p(e, c, i, iref);
        iref = i;
        if (s_have) begin
          bit nd;
          nd = (sc < s_prev) ? s_dir : !s_dir;
          if (nd && m_n < NC) m_n++;
          else if (!nd && m_n > 1) m_n--;
          s_dir = nd;
        end
        s_prev = raw; s_have = 1;
      end
      PH_REF: begin
        iref = i; d_ref = raw; d_have_ref = 1; d_have_down = 0;
      end
      PH_DOWN: begin
        d_down = scaled_ed2p(e, c, i, iref); d_have_down = (m_n > 1);
      end
      PH_UP: begin
        sc = scaled_ed2p(e, c, i, iref);
        if (d_have_ref) begin
          logic [127:0] best;
          int bn;
          best = d_ref; bn = m_n;
          if (d_have_down && d_down < best) begin best = d_down; bn = m_n - 1; end
          if (m_n < NC && sc < best) bn = m_n + 1;
          m_n = bn;
        end
        d_have_ref = 0; d_have_down = 0;
      end
      default: ;
    endcase
  endtask

  task automatic check_n(string where);
    repeat (60) @(negedge clk);
    check(int'(n_active) == m_n, $sformatf("%s n_active %0d exp %0d", where, n_active, m_n));
  endtask

  task automatic switch_scheme(scheme_e s);
    @(negedge clk);
    scheme = s; clear = 1;
    @(negedge clk);
    clear = 0;
    s_have = 0; s_dir = 0; d_have_ref = 0; d_have_down = 0;
  endtask

  initial begin
    int prev_n;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 40; k++) begin
      prev_n = m_n;
      window(PH_SINGLE);
      check_n("single");
      if (m_n != prev_n) n_changes++;
    end
    switch_scheme(SCHEME_DOUBLE);
    for (int k = 0; k < 30; k++) begin
      prev_n = m_n;
      window(PH_WARM);
      window(PH_REF);
      window(PH_DOWN);
      window(PH_UP);
      check_n("double");
      if (m_n != prev_n) n_changes++;
    end
    // A clear while a decision is being computed must drop that decision.
    for (int k = 0; k < 4; k++) begin
      int saved_n;
      window(PH_WARM);
      window(PH_REF);
      window(PH_DOWN);
      saved_n = m_n;
      window(PH_UP);
      repeat (5) @(negedge clk);
      clear = 1;
      @(negedge clk);
      clear = 0;
      m_n = saved_n;
      s_have = 0; s_dir = 0; d_have_ref = 0; d_have_down = 0;
      check_n("decision dropped by clear");
    end
    switch_scheme(SCHEME_SINGLE);
    for (int k = 0; k < 10; k++) begin
      window(PH_SINGLE);
      check_n("single again");
    end
    checks++;
    if (n_changes < 5 || n_trial_down == 0 || n_trial_up == 0) begin
      failures++;
      $display("FAIL coverage changes=%0d down=%0d up=%0d", n_changes, n_trial_down, n_trial_up);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
