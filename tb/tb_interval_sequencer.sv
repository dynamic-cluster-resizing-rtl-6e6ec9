// tb_interval_sequencer: checks window lengths and tags of both schemes.
//
// With LARGE=40, SHORT=8, SINGLE=10 a cycle-by-cycle model predicts cur_phase
// and the sample pulse: single scheme, one sample every 10 cycles; double
// scheme, WARM 32, REF 8, DOWN 8, UP 8 cycles. A scheme change restarts the
// sequence from its first window.
module tb_interval_sequencer;
  import dcr_pkg::*;

  localparam int L = 40, S = 8, SI = 10;

  logic clk = 0, rst_n = 0, restart = 0;
  scheme_e scheme = SCHEME_SINGLE;
  logic sample;
  phase_e sample_phase, cur_phase;
  int checks = 0, failures = 0;
  int n_samples[5];

  interval_sequencer #(.LARGE_LEN(L), .SHORT_LEN(S), .SINGLE_LEN(SI)) dut (
    .clk, .rst_n, .restart, .scheme, .sample, .sample_phase, .cur_phase);

  always #5 clk = ~clk;

  // reference model state
  phase_e m_phase;
  int     m_cnt;

  function automatic int m_len(phase_e p);
    case (p)
      PH_SINGLE: return SI;
      PH_WARM:   return L - S;
      default:   return S;
    endcase
  endfunction

  function automatic phase_e m_nextp(phase_e p);
    case (p)
      PH_SINGLE: return PH_SINGLE;
      PH_WARM:   return PH_REF;
      PH_REF:    return PH_DOWN;
      PH_DOWN:   return PH_UP;
      default:   return PH_WARM;
    endcase
  endfunction

  task automatic run(int ncyc);
    for (int k = 0; k < ncyc; k++) begin
      bit exp_sample;
      #1;
      exp_sample = !restart && (m_cnt == m_len(m_phase) - 1);
      checks++;
      if (cur_phase != m_phase || sample != exp_sample) begin
        failures++;
        $display("FAIL t=%0t phase %s exp %s sample %b exp %b", $time, cur_phase.name(), m_phase.name(), sample, exp_sample);
      end
      if (sample) n_samples[int'(sample_phase)]++;
      @(posedge clk);
      if (restart) begin
        m_cnt = 0; m_phase = (scheme == SCHEME_DOUBLE) ? PH_WARM : PH_SINGLE;
      end else if (exp_sample) begin
        m_cnt = 0; m_phase = m_nextp(m_phase);
      end else m_cnt++;
      #1 restart = 0;
      @(negedge clk);
    end
  endtask

  initial begin
    m_phase = PH_SINGLE; m_cnt = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(negedge clk);
    run(55);
    scheme = SCHEME_DOUBLE; restart = 1;
    run(200);
    scheme = SCHEME_SINGLE; restart = 1;
    run(30);
    checks++;
    if (n_samples[PH_SINGLE] < 6 || n_samples[PH_REF] < 3 || n_samples[PH_DOWN] < 3 ||
        n_samples[PH_UP] < 3 || n_samples[PH_WARM] < 3) begin
      failures++;
      $display("FAIL sample counts %p", n_samples);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
