// tb_single_interval_ctrl: direction-bit resizing rule.
//
// A stream of interval results (random raw and scaled ED2P) is fed; the
// testbench keeps the active count, applies each update and compares count,
// direction bit and update timing with a model of the rule: keep direction
// when ED2P fell, reverse it otherwise, move one queue, stay within 1..4.
// The first result after reset or clear only records its value.
module tb_single_interval_ctrl;
  import dcr_pkg::*;
  localparam int P_W = 78;

  logic clk = 0, rst_n = 0, clear = 0, res_valid = 0;
  logic [P_W-1:0] ed2p_raw = '0, ed2p_scaled = '0;
  logic [N_W-1:0] n_cur, n_next;
  logic update, dir_up;
  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_flip = 0, n_clamp = 0;

  single_interval_ctrl #(.P_W(P_W), .N_MIN(1), .N_MAX(4)) dut (
    .clk, .rst_n, .clear, .res_valid, .ed2p_raw, .ed2p_scaled, .n_cur, .n_next, .update, .dir_up);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit m_have, m_dir;
    logic [P_W-1:0] m_prev;
    int m_n;
    n_cur = 3'd4;
    m_have = 0; m_dir = 0; m_prev = '0; m_n = 4;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int k = 0; k < 200; k++) begin
      bit exp_upd, nd;
      int nn;
      @(negedge clk);
      if (k % 50 == 25) begin
        clear = 1;
        @(negedge clk);
        clear = 0;
        m_have = 0; m_dir = 0;
      end
      ed2p_raw    = {$urandom, $urandom, $urandom};
      ed2p_scaled = (k % 3 == 0) ? ed2p_raw : {$urandom, $urandom, $urandom};
      if (k % 7 == 3) ed2p_scaled = m_prev;   // equal: counts as not decreased
      res_valid = 1;
      // model
      exp_upd = m_have;
      nd = (ed2p_scaled < m_prev) ? m_dir : !m_dir;
      nn = m_n;
      if (m_have) begin
        if (nd && m_n < 4) nn = m_n + 1;
        else if (!nd && m_n > 1) nn = m_n - 1;
        else n_clamp++;
        if (nd != m_dir) n_flip++;
      end
      m_prev = ed2p_raw; m_have = 1;
      @(negedge clk);
      res_valid = 0;
      check(update == exp_upd, $sformatf("k=%0d update %b exp %b", k, update, exp_upd));
      if (exp_upd) begin
        check(int'(n_next) == nn, $sformatf("k=%0d n_next %0d exp %0d", k, n_next, nn));
        check(dir_up == nd, $sformatf("k=%0d dir %b exp %b", k, dir_up, nd));
        if (nn > m_n) n_up++;
        if (nn < m_n) n_down++;
        m_dir = nd; m_n = nn;
        n_cur = N_W'(n_next);
      end
      repeat (1 + $urandom % 3) @(negedge clk);
      check(update == 0, "update is a single pulse");
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_flip == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage up=%0d down=%0d flip=%0d clamp=%0d", n_up, n_down, n_flip, n_clamp);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
