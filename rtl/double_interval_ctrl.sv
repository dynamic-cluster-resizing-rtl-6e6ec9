// double_interval_ctrl: double-interval resizing decision for one IQ type.
//
// The configuration with N active issue queues is measured in the reference
// window (PH_REF, end of the large interval); then N-1 queues are tried for a
// short interval (PH_DOWN) and N+1 for another (PH_UP). The three ED2P values,
// the trial ones with their delay scaled to the reference window's instruction
// count, are compared and the count with the lowest one is kept for the next
// large interval. This follows the source description. Own choices: a trial
// outside [N_MIN, N_MAX] is not a candidate; a trial must be strictly lower
// than the reference to replace it, and on a tie between the two trials the
// smaller count wins; 'clear' forgets a half-finished round.
//
// Interface: res_valid with res_phase tags each result; after the PH_UP result
// 'update' pulses one cycle later with the chosen count on n_next.
module double_interval_ctrl
  import dcr_pkg::*;
#(
  parameter int unsigned P_W   = 78,
  parameter int unsigned N_MIN = 1,
  parameter int unsigned N_MAX = NUM_CLUSTERS
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           res_valid,
  input  phase_e         res_phase,
  input  logic [P_W-1:0] ed2p_raw,
  input  logic [P_W-1:0] ed2p_scaled,
  input  logic [N_W-1:0] n_cur,
  output logic [N_W-1:0] n_next,
  output logic           update
);

  logic           have_ref;
  logic           have_down;
  logic [P_W-1:0] ref_ed2p;
  logic [P_W-1:0] down_ed2p;
  logic [N_W-1:0] best_n;

  always_comb begin
    logic [P_W-1:0] best_v;
    best_n = n_cur;
    best_v = ref_ed2p;
    if (have_down && down_ed2p < best_v) begin
      best_n = n_cur - 1'b1;
      best_v = down_ed2p;
    end
    if (n_cur < N_W'(N_MAX) && ed2p_scaled < best_v) begin
      best_n = n_cur + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_ref  <= 1'b0;
      have_down <= 1'b0;
      ref_ed2p  <= '0;
      down_ed2p <= '0;
      n_next    <= N_W'(N_MAX);
      update    <= 1'b0;
    end else begin
      update <= 1'b0;
      if (clear) begin
        have_ref  <= 1'b0;
        have_down <= 1'b0;
      end else if (res_valid) begin
        unique case (res_phase)
          PH_REF: begin
            ref_ed2p  <= ed2p_raw;
            have_ref  <= 1'b1;
            have_down <= 1'b0;
          end
          PH_DOWN: begin
            down_ed2p <= ed2p_scaled;
            have_down <= (n_cur > N_W'(N_MIN));
          end
          PH_UP: begin
            if (have_ref) begin
              n_next <= best_n;
              update <= 1'b1;
            end
            have_ref  <= 1'b0;
            have_down <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

endmodule
