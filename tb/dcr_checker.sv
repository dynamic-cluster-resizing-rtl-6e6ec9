// dcr_checker: stimulus, reference model and checks for dcr_top.
//
// Drives the resizing unit the way a clustered core would and checks it end
// to end. The synthetic core: each issue-queue type t has a demand level
// dem[t] (1..4 queues, changing every few intervals). The chance of
// committing in a cycle is the product over types of min(active, demand) /
// demand, so too few queues slow the core down. Every committed result is
// broadcast to all enabled queues of every type, so each extra queue costs
// energy. A disabled queue still receives random accesses, which the design
// must ignore.
//
// The checker counts cycles, commits and enabled accesses per window on its
// own. At each interval end it checks every ECR (accesses x EAR), computes
// the window's ED2P per type and, with its own copy of the two decision rules,
// predicts the active counts. Before every later window end it compares them
// with n_active. It also checks the enable mask against n_applied, and checks
// that n_applied is N-1 / N+1 in the trial windows. Each mechanism must occur
// at least once: single-scheme grow, shrink, direction flip and blocked move;
// double-scheme keep, shrink and grow; both trial windows; a scheme switch;
// ignored accesses to a gated queue.
//
// The run: N_SINGLE single-scheme intervals, a switch to the double scheme,
// N_ROUNDS double rounds, then a switch back and two more single intervals.
module dcr_checker
  import dcr_pkg::*;
#(
  parameter int unsigned LARGE_LEN  = LARGE_INTERVAL_CYCLES,
  parameter int unsigned SHORT_LEN  = SHORT_INTERVAL_CYCLES,
  parameter int unsigned SINGLE_LEN = SINGLE_INTERVAL_CYCLES,
  parameter int unsigned N_SINGLE   = 40,
  parameter int unsigned N_ROUNDS   = 20,
  localparam int unsigned NC     = NUM_CLUSTERS,
  localparam int unsigned NT     = NUM_IQ_TYPES,
  localparam int unsigned MAX_LEN = (LARGE_LEN > SINGLE_LEN) ? LARGE_LEN : SINGLE_LEN,
  localparam int unsigned CYC_W  = $clog2(MAX_LEN + 1),
  localparam int unsigned D_W    = CYC_W + 4,
  localparam int unsigned ECR_W  = CYC_W + ACC_W + EAR_W
) (
  input  logic                              clk,
  output logic                              rst_n,
  output scheme_e                           scheme,
  output logic [NT-1:0][NC-1:0][ACC_W-1:0]  iq_access,
  output logic [2:0]                        commit,
  input  logic [NT-1:0][NC-1:0]             iq_enable,
  input  logic [NT-1:0][N_W-1:0]            n_active,
  input  logic [NT-1:0][N_W-1:0]            n_applied,
  input  logic [NT-1:0][NC-1:0][ECR_W-1:0]  ecr,
  input  logic                              interval_end,
  input  phase_e                            cur_phase
);

  int checks = 0, failures = 0;

  // mechanism counters
  int cnt_s_up = 0, cnt_s_down = 0, cnt_s_flip = 0, cnt_s_blocked = 0;
  int cnt_d_keep = 0, cnt_d_down = 0, cnt_d_up = 0;
  int cnt_trial_down = 0, cnt_trial_up = 0, cnt_switch = 0, cnt_gated = 0;
  int n_windows = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // ---------------- synthetic core ----------------
  int dem[NT];
  bit restart_now = 0;    // the scheme changed before this posedge

  always @(negedge clk) begin
    real f;
    int  a;
    f = 1.0;
    for (int t = 0; t < NT; t++) begin
      a = 0;
      for (int c = 0; c < NC; c++) a += iq_enable[t][c];
      f = f * ((a < dem[t]) ? real'(a) / real'(dem[t]) : 1.0);
    end
    commit = (($urandom % 1000) < int'(f * 1000.0)) ? 3'(1 + $urandom % COMMIT_WIDTH) : 3'd0;
    for (int t = 0; t < NT; t++)
      for (int c = 0; c < NC; c++)
        iq_access[t][c] = iq_enable[t][c] ? ACC_W'((int'(commit) + ($urandom % 2)))
                                          : ACC_W'($urandom % 2);
  end

  // ---------------- reference model ----------------
  longint acc[NT][NC];
  longint m_cyc, m_ins;
  longint exp_ecr[NT][NC];
  bit     ecr_pending = 0;

  int           m_n[NT];
  bit           s_have[NT], s_dir[NT];
  logic [127:0] s_prev[NT];
  longint       iref;
  logic [127:0] d_ref[NT], d_down[NT];
  bit           d_have_ref[NT], d_have_down[NT];

  function automatic logic [127:0] scaled_ed2p(longint e, longint c, longint i, longint r);
    logic [127:0] d;
    d = (i == 0) ? 128'(2**D_W - 1) : (128'(r) * 128'(c)) / 128'(i);
    if (d > 128'(2**D_W - 1)) d = 128'(2**D_W - 1);
    return 128'(e) * d * d;
  endfunction

  function automatic int expected_len(phase_e p);
    case (p)
      PH_SINGLE: return SINGLE_LEN;
      PH_WARM:   return LARGE_LEN - SHORT_LEN;
      default:   return SHORT_LEN;
    endcase
  endfunction

  task automatic clear_history();
    for (int t = 0; t < NT; t++) begin
      s_have[t] = 0; s_dir[t] = 0; d_have_ref[t] = 0; d_have_down[t] = 0;
    end
  endtask

  task automatic clear_counts();
    for (int t = 0; t < NT; t++) for (int c = 0; c < NC; c++) acc[t][c] = 0;
    m_cyc = 0; m_ins = 0;
  endtask

  task automatic end_of_window(phase_e p);
    longint e;
    logic [127:0] raw, sc;
    longint iref_new;
    n_windows++;
    check(m_cyc == expected_len(p), $sformatf("%s window lasted %0d cycles", p.name(), m_cyc));
    iref_new = iref;
    for (int t = 0; t < NT; t++) begin
      check(int'(n_active[t]) == m_n[t], $sformatf("type %0d n_active %0d exp %0d", t, n_active[t], m_n[t]));
      e = 0;
      for (int c = 0; c < NC; c++) begin
        exp_ecr[t][c] = acc[t][c] * longint'(EAR_DEFAULT[t]);
        e += exp_ecr[t][c];
      end
      raw = 128'(e) * 128'(m_cyc) * 128'(m_cyc);
      case (p)
        PH_SINGLE: begin
          sc = scaled_ed2p(e, m_cyc, m_ins, iref);
          iref_new = m_ins;
          if (s_have[t]) begin
            bit nd;
            nd = (sc < s_prev[t]) ? s_dir[t] : !s_dir[t];
            if (nd != s_dir[t]) cnt_s_flip++;
            if (nd && m_n[t] < NC) begin m_n[t]++; cnt_s_up++; end
            else if (!nd && m_n[t] > 1) begin m_n[t]--; cnt_s_down++; end
            else cnt_s_blocked++;
            s_dir[t] = nd;
          end
          s_prev[t] = raw; s_have[t] = 1;
        end
        PH_REF: begin
          iref_new = m_ins; d_ref[t] = raw; d_have_ref[t] = 1; d_have_down[t] = 0;
        end
        PH_DOWN: begin
          d_down[t] = scaled_ed2p(e, m_cyc, m_ins, iref); d_have_down[t] = (m_n[t] > 1);
        end
        PH_UP: begin
          sc = scaled_ed2p(e, m_cyc, m_ins, iref);
          if (d_have_ref[t]) begin
            logic [127:0] best;
            int bn;
            best = d_ref[t]; bn = m_n[t];
            if (d_have_down[t] && d_down[t] < best) begin best = d_down[t]; bn = m_n[t] - 1; end
            if (m_n[t] < NC && sc < best) bn = m_n[t] + 1;
            if (bn < m_n[t]) cnt_d_down++;
            else if (bn > m_n[t]) cnt_d_up++;
            else cnt_d_keep++;
            m_n[t] = bn;
          end
          d_have_ref[t] = 0; d_have_down[t] = 0;
        end
        default: ;
      endcase
    end
    iref = iref_new;
    ecr_pending = 1;
  endtask

  // Observe at every rising edge, before the design's registers change.
  always @(posedge clk) begin
    if (rst_n) begin
      if (ecr_pending) begin
        for (int t = 0; t < NT; t++)
          for (int c = 0; c < NC; c++)
            check(longint'(ecr[t][c]) == exp_ecr[t][c],
                  $sformatf("ecr[%0d][%0d] %0d exp %0d", t, c, ecr[t][c], exp_ecr[t][c]));
        ecr_pending = 0;
      end
      // enable mask and trial configurations
      for (int t = 0; t < NT; t++) begin
        int ap;
        ap = int'(n_active[t]);
        if (scheme == SCHEME_DOUBLE && cur_phase == PH_DOWN && ap > 1) ap--;
        else if (scheme == SCHEME_DOUBLE && cur_phase == PH_UP && ap < NC) ap++;
        if (int'(n_applied[t]) != ap || iq_enable[t] != (NC'((1 << ap) - 1) | NC'(1))) begin
          failures++; checks++;
          if (failures < 20) $display("FAIL t=%0t type %0d applied %0d mask %b", $time, t, n_applied[t], iq_enable[t]);
        end
        if (int'(n_applied[t]) < int'(n_active[t])) cnt_trial_down++;
        if (int'(n_applied[t]) > int'(n_active[t])) cnt_trial_up++;
        for (int c = 0; c < NC; c++) if (!iq_enable[t][c] && iq_access[t][c] != 0) cnt_gated++;
      end
      if (restart_now) begin
        clear_counts();
        restart_now = 0;
      end else begin
        for (int t = 0; t < NT; t++)
          for (int c = 0; c < NC; c++)
            if (iq_enable[t][c]) acc[t][c] += iq_access[t][c];
        m_cyc++;
        m_ins += commit;
        if (interval_end) begin
          end_of_window(cur_phase);
          clear_counts();
        end
      end
    end
  end

  // ---------------- run ----------------
  task automatic switch_scheme(scheme_e s);
    // switch well inside a window, after the last decision has been applied
    @(posedge interval_end);
    repeat (SHORT_LEN / 2) @(negedge clk);
    scheme = s;
    restart_now = 1;
    clear_history();
    cnt_switch++;
  endtask

  task automatic wait_windows(int n);
    repeat (n) @(posedge interval_end);
  endtask

  always @(posedge interval_end) begin
    // change the demand profile every few windows
    if (n_windows % 5 == 4)
      for (int t = 0; t < NT; t++) dem[t] = 1 + $urandom % NC;
  end

  initial begin
    rst_n = 0;
    scheme = SCHEME_SINGLE;
    commit = '0;
    iq_access = '0;
    for (int t = 0; t < NT; t++) begin
      m_n[t] = NC; dem[t] = 1 + t % NC;
    end
    iref = 0;
    clear_history();
    clear_counts();
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait_windows(N_SINGLE);
    switch_scheme(SCHEME_DOUBLE);
    wait_windows(4 * N_ROUNDS + 1);
    switch_scheme(SCHEME_SINGLE);
    wait_windows(3);
    @(negedge clk);
    checks++;
    if (cnt_s_up == 0 || cnt_s_down == 0 || cnt_s_flip == 0 || cnt_s_blocked == 0 ||
        cnt_d_keep == 0 || cnt_d_down == 0 || cnt_d_up == 0 || cnt_trial_down == 0 ||
        cnt_trial_up == 0 || cnt_switch != 2 || cnt_gated == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("single: grow %0d shrink %0d flip %0d blocked %0d | double: keep %0d shrink %0d grow %0d | trial cycles down %0d up %0d | switches %0d | gated accesses %0d | windows %0d",
             cnt_s_up, cnt_s_down, cnt_s_flip, cnt_s_blocked, cnt_d_keep, cnt_d_down, cnt_d_up,
             cnt_trial_down, cnt_trial_up, cnt_switch, cnt_gated, n_windows);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog: twice the planned run
  initial begin
    repeat (2 * (N_SINGLE * SINGLE_LEN + (N_ROUNDS + 2) * (LARGE_LEN + 2 * SHORT_LEN) + 6 * SINGLE_LEN)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
