// iq_resizer: active-issue-queue control for one issue-queue type.
//
// The energy of the type over an interval is the sum of the Energy Consumed
// Registers of its queues in all clusters. One cycle after an interval ends
// (when the ECRs and the interval counters hold the interval's totals) the
// ED2P unit is started. Its reference instruction count is the previous
// interval's count in the single-interval scheme and the reference window's
// count in the double-interval scheme, so every comparison is made over the
// same amount of work. The result goes to the controller of the selected
// scheme, whose decision updates the active count N. During the double
// scheme's trial windows the applied count is N-1 or N+1 (kept at N when that
// would leave 1..NC); the mask then enables clusters 0 .. count-1.
//
// Own choices: windows tagged PH_WARM are not measured; a scheme change
// ('clear') keeps N and drops both controllers' history; a result whose
// computation began before the last 'clear' is dropped.
//
// Timing: a decision takes effect PROD_W + 8 cycles after the interval
// end, PROD_W being the ED2P divider width. Intervals must be longer than that
// (an assertion checks the ED2P unit is idle when a new interval ends).
module iq_resizer
  import dcr_pkg::*;
#(
  parameter int unsigned NC    = NUM_CLUSTERS,
  parameter int unsigned ECR_W = 30,
  parameter int unsigned CYC_W = 19,
  parameter int unsigned INS_W = CYC_W + 3,
  parameter int unsigned D_W   = CYC_W + 4,
  localparam int unsigned E_W  = ECR_W + $clog2(NC),
  localparam int unsigned P_W  = E_W + 2 * D_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clear,
  input  scheme_e                   scheme,
  input  logic [NC-1:0][ECR_W-1:0]  ecr,
  input  logic [CYC_W-1:0]          cycles,
  input  logic [INS_W-1:0]          instrs,
  input  logic                      sample,
  input  phase_e                    sample_phase,
  input  phase_e                    cur_phase,
  output logic [N_W-1:0]            n_active,   // decided count N
  output logic [N_W-1:0]            n_applied,  // count in force now
  output logic [NC-1:0]             iq_en,
  output logic                      dir_up,     // single-scheme direction bit
  output logic [P_W-1:0]            last_ed2p   // last delay-scaled ED2P
);

  logic            sample_d;
  phase_e          phase_d;
  phase_e          res_phase;
  logic            res_live;
  logic [INS_W-1:0] iref_q;
  logic [INS_W-1:0] iref_use;
  logic [E_W-1:0]  energy;
  logic            ed_start, ed_busy, ed_done;
  logic [P_W-1:0]  ed2p_raw, ed2p_scaled;
  logic [N_W-1:0]  s_next, d_next;
  logic            s_upd, d_upd;
  logic            s_valid, d_valid;

  always_comb begin
    energy = '0;
    for (int unsigned c = 0; c < NC; c++) energy += E_W'(ecr[c]);
  end

  assign ed_start = sample_d && (phase_d != PH_WARM) && !clear;
  assign iref_use = (phase_d == PH_REF) ? instrs : iref_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_d  <= 1'b0;
      phase_d   <= PH_WARM;
      res_phase <= PH_WARM;
      res_live  <= 1'b0;
      iref_q    <= '0;
    end else begin
      sample_d <= sample && !clear;
      phase_d  <= sample_phase;
      if (clear) res_live <= 1'b0;
      if (ed_start) begin
        res_phase <= phase_d;
        res_live  <= 1'b1;
        if (phase_d == PH_SINGLE || phase_d == PH_REF) iref_q <= instrs;
      end
    end
  end

  ed2p_unit #(.E_W(E_W), .CYC_W(CYC_W), .INS_W(INS_W), .D_W(D_W)) u_ed2p (
    .clk, .rst_n,
    .start       (ed_start),
    .energy      (energy),
    .cycles      (cycles),
    .instrs      (instrs),
    .ref_instrs  (iref_use),
    .busy        (ed_busy),
    .done        (ed_done),
    .ed2p_raw    (ed2p_raw),
    .ed2p_scaled (ed2p_scaled)
  );

  assign s_valid = ed_done && res_live && !clear && (res_phase == PH_SINGLE);
  assign d_valid = ed_done && res_live && !clear && (res_phase != PH_SINGLE);

  single_interval_ctrl #(.P_W(P_W), .N_MIN(1), .N_MAX(NC)) u_sint (
    .clk, .rst_n, .clear,
    .res_valid   (s_valid),
    .ed2p_raw    (ed2p_raw),
    .ed2p_scaled (ed2p_scaled),
    .n_cur       (n_active),
    .n_next      (s_next),
    .update      (s_upd),
    .dir_up      (dir_up)
  );

  double_interval_ctrl #(.P_W(P_W), .N_MIN(1), .N_MAX(NC)) u_dint (
    .clk, .rst_n, .clear,
    .res_valid   (d_valid),
    .res_phase   (res_phase),
    .ed2p_raw    (ed2p_raw),
    .ed2p_scaled (ed2p_scaled),
    .n_cur       (n_active),
    .n_next      (d_next),
    .update      (d_upd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n_active  <= N_W'(NC);
      last_ed2p <= '0;
    end else begin
      if (scheme == SCHEME_SINGLE && s_upd && !clear) n_active <= s_next;
      if (scheme == SCHEME_DOUBLE && d_upd && !clear) n_active <= d_next;
      if (ed_done) last_ed2p <= ed2p_scaled;
    end
  end

  always_comb begin
    n_applied = n_active;
    if (scheme == SCHEME_DOUBLE) begin
      if (cur_phase == PH_DOWN && n_active > 1)           n_applied = n_active - 1'b1;
      else if (cur_phase == PH_UP && n_active < N_W'(NC)) n_applied = n_active + 1'b1;
    end
  end

  aiq_mask #(.NC(NC)) u_mask (
    .n_active (n_applied),
    .iq_en    (iq_en)
  );

  a_ed2p_free: assert property (@(posedge clk) disable iff (!rst_n) ed_start |-> !ed_busy)
    else $error("iq_resizer: interval shorter than the ED2P computation");

endmodule
