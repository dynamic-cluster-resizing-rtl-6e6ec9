// interval_sequencer: interval boundaries for both resizing schemes.
//
// Single-interval scheme: back-to-back intervals of SINGLE_LEN cycles, each
// tagged PH_SINGLE; the active-IQ count may change after every one.
//
// Double-interval scheme: the configuration is held for a large interval of
// LARGE_LEN cycles and then two short trial intervals of SHORT_LEN cycles are
// run, one with N-1 and one with N+1 active IQs. To compare equal-length
// measurements, the large interval is split into an unmeasured part
// (PH_WARM, LARGE_LEN-SHORT_LEN cycles) and a last short window (PH_REF) whose
// ED2P stands for configuration N; this split is this design's choice. The
// sequence is WARM, REF, DOWN, UP, WARM, ...
//
// Interface: 'sample' is high on the last cycle of a window with
// 'sample_phase' naming that window; 'cur_phase' names the window running now
// (it tells the resizers which trial configuration to apply). 'restart'
// (a scheme change) starts the selected scheme from its first window.
module interval_sequencer
  import dcr_pkg::*;
#(
  parameter int unsigned LARGE_LEN  = LARGE_INTERVAL_CYCLES,
  parameter int unsigned SHORT_LEN  = SHORT_INTERVAL_CYCLES,
  parameter int unsigned SINGLE_LEN = SINGLE_INTERVAL_CYCLES,
  localparam int unsigned MAX_LEN   = (LARGE_LEN > SINGLE_LEN) ? LARGE_LEN : SINGLE_LEN,
  localparam int unsigned CNT_W     = $clog2(MAX_LEN + 1)
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    restart,
  input  scheme_e scheme,
  output logic    sample,
  output phase_e  sample_phase,
  output phase_e  cur_phase
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] len;
  phase_e           phase, phase_next;

  always_comb begin
    unique case (phase)
      PH_SINGLE: len = CNT_W'(SINGLE_LEN);
      PH_WARM:   len = CNT_W'(LARGE_LEN - SHORT_LEN);
      default:   len = CNT_W'(SHORT_LEN);
    endcase
    unique case (phase)
      PH_SINGLE: phase_next = PH_SINGLE;
      PH_WARM:   phase_next = PH_REF;
      PH_REF:    phase_next = PH_DOWN;
      PH_DOWN:   phase_next = PH_UP;
      default:   phase_next = PH_WARM;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt   <= '0;
      phase <= (scheme == SCHEME_DOUBLE) ? PH_WARM : PH_SINGLE;
    end else if (restart) begin
      cnt   <= '0;
      phase <= (scheme == SCHEME_DOUBLE) ? PH_WARM : PH_SINGLE;
    end else if (cnt == len - 1'b1) begin
      cnt   <= '0;
      phase <= phase_next;
    end else begin
      cnt   <= cnt + 1'b1;
    end
  end

  assign sample       = !restart && (cnt == len - 1'b1);
  assign sample_phase = phase;
  assign cur_phase    = phase;

  initial begin
    assert (SHORT_LEN > 0 && LARGE_LEN > SHORT_LEN && SINGLE_LEN > 0)
      else $error("interval_sequencer: need LARGE_LEN > SHORT_LEN > 0");
  end

endmodule
