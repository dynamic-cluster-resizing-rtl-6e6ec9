// dcr_top: dynamic cluster resizing for a four-cluster processor.
//
// Each cluster has an integer, a floating-point, a memory and a copy issue
// queue. Every queue has an energy estimator: an activity counter whose count
// is multiplied, at the end of each interval, by a design-time energy per
// access. One counter pair measures the cycles and committed instructions of
// the interval. Per issue-queue type, a resizer computes the interval's
// energy-delay-squared product (ED2P) and adjusts the number of active queues
// of that type to lower it, with either the single-interval scheme (one move
// per interval, steered by a direction bit) or the double-interval scheme
// (hold N for a large interval, try N-1 and N+1 for two short ones, keep the
// best). All four types share the interval boundaries and decide separately.
//
// Interface: iq_access gives each queue's accesses per cycle and commit the
// instructions committed per cycle; both come from the processor core, which
// is not part of this RTL. iq_enable tells the core which queues are on (the
// steering logic must send nothing to a queue that is off; accesses to a
// disabled queue are not counted). 'scheme' selects the scheme; a change
// restarts the interval sequence and the controllers' history. ecr exposes the
// Energy Consumed Registers for performance monitoring.
//
// Timing: interval_end pulses on the last cycle of each measurement window;
// a resizing decision reaches n_active / iq_enable 49 cycles later (default
// widths), inside the next window.
module dcr_top
  import dcr_pkg::*;
#(
  parameter int unsigned LARGE_LEN  = LARGE_INTERVAL_CYCLES,
  parameter int unsigned SHORT_LEN  = SHORT_INTERVAL_CYCLES,
  parameter int unsigned SINGLE_LEN = SINGLE_INTERVAL_CYCLES,
  parameter logic [NUM_IQ_TYPES-1:0][EAR_W-1:0] EAR = EAR_DEFAULT,
  localparam int unsigned NC     = NUM_CLUSTERS,
  localparam int unsigned NT     = NUM_IQ_TYPES,
  localparam int unsigned MAX_LEN = (LARGE_LEN > SINGLE_LEN) ? LARGE_LEN : SINGLE_LEN,
  localparam int unsigned CYC_W  = $clog2(MAX_LEN + 1),
  localparam int unsigned INS_W  = CYC_W + 3,
  localparam int unsigned D_W    = CYC_W + 4,
  localparam int unsigned AC_W   = CYC_W + ACC_W,
  localparam int unsigned ECR_W  = AC_W + EAR_W
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  scheme_e                              scheme,
  input  logic [NT-1:0][NC-1:0][ACC_W-1:0]     iq_access,
  input  logic [2:0]                           commit,
  output logic [NT-1:0][NC-1:0]                iq_enable,
  output logic [NT-1:0][N_W-1:0]               n_active,
  output logic [NT-1:0][N_W-1:0]               n_applied,
  output logic [NT-1:0][NC-1:0][ECR_W-1:0]     ecr,
  output logic                                 interval_end,
  output phase_e                               cur_phase
);

  scheme_e          scheme_q;
  logic             restart;
  phase_e           sample_phase;
  logic [CYC_W-1:0] cycles;
  logic [INS_W-1:0] instrs;
  logic [NT-1:0]    dir_up_unused;
  logic [NT-1:0][ECR_W+$clog2(NC)+2*D_W-1:0] ed2p_unused;

  // scheme_q needs no reset: a mismatch right after reset only restarts a
  // sequence that has just started, with counters that are still zero.
  always_ff @(posedge clk) scheme_q <= scheme;
  assign restart = (scheme != scheme_q);

  interval_sequencer #(.LARGE_LEN(LARGE_LEN), .SHORT_LEN(SHORT_LEN), .SINGLE_LEN(SINGLE_LEN)) u_seq (
    .clk, .rst_n,
    .restart      (restart),
    .scheme       (scheme),
    .sample       (interval_end),
    .sample_phase (sample_phase),
    .cur_phase    (cur_phase)
  );

  interval_monitor #(.CYC_W(CYC_W), .INS_W(INS_W)) u_mon (
    .clk, .rst_n,
    .clear  (restart),
    .commit (commit),
    .sample (interval_end),
    .cycles (cycles),
    .instrs (instrs)
  );

  for (genvar t = 0; t < NT; t++) begin : g_type
    for (genvar c = 0; c < NC; c++) begin : g_cluster
      logic [AC_W-1:0] ac_unused;
      energy_estimator #(.AC_W(AC_W), .EAR(EAR[t])) u_est (
        .clk, .rst_n,
        .clear  (restart),
        .en     (iq_enable[t][c]),
        .access (iq_access[t][c]),
        .sample (interval_end),
        .ac_o   (ac_unused),
        .ecr    (ecr[t][c])
      );
    end

    iq_resizer #(.NC(NC), .ECR_W(ECR_W), .CYC_W(CYC_W), .INS_W(INS_W), .D_W(D_W)) u_rsz (
      .clk, .rst_n,
      .clear        (restart),
      .scheme       (scheme),
      .ecr          (ecr[t]),
      .cycles       (cycles),
      .instrs       (instrs),
      .sample       (interval_end),
      .sample_phase (sample_phase),
      .cur_phase    (cur_phase),
      .n_active     (n_active[t]),
      .n_applied    (n_applied[t]),
      .iq_en        (iq_enable[t]),
      .dir_up       (dir_up_unused[t]),
      .last_ed2p    (ed2p_unused[t])
    );
  end

endmodule
