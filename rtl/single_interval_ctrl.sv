// single_interval_ctrl: single-interval resizing decision for one IQ type.
//
// A direction bit remembers whether the last resize added (1) or removed (0)
// an issue queue. At the end of every interval the interval's ED2P, with its
// delay scaled to the previous interval's instruction count, is compared with
// the ED2P of the previous interval. If it went down, the last move helped and
// the count moves again the same way; otherwise the direction bit flips and the
// count moves the other way. This rule follows the source description. Own
// choices: the first interval after reset or 'clear' only records its ED2P;
// the direction bit starts at 0 (remove a queue first, from all queues active);
// a move that would leave [N_MIN, N_MAX] leaves the count where it is; an equal
// ED2P counts as "not decreased".
//
// Interface: on res_valid, ed2p_raw is this interval's own E*C^2 (kept for the
// next comparison) and ed2p_scaled its delay-scaled ED2P. One cycle later
// 'update' pulses with the new count on n_next (also when it is unchanged).
module single_interval_ctrl
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
  input  logic [P_W-1:0] ed2p_raw,
  input  logic [P_W-1:0] ed2p_scaled,
  input  logic [N_W-1:0] n_cur,
  output logic [N_W-1:0] n_next,
  output logic           update,
  output logic           dir_up
);

  logic           have_prev;
  logic [P_W-1:0] prev_ed2p;
  logic           dir_new;
  logic [N_W-1:0] n_moved;

  always_comb begin
    dir_new = (ed2p_scaled < prev_ed2p) ? dir_up : !dir_up;
    n_moved = n_cur;
    if (dir_new && n_cur < N_W'(N_MAX))      n_moved = n_cur + 1'b1;
    else if (!dir_new && n_cur > N_W'(N_MIN)) n_moved = n_cur - 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_prev <= 1'b0;
      prev_ed2p <= '0;
      dir_up    <= 1'b0;
      n_next    <= N_W'(N_MAX);
      update    <= 1'b0;
    end else begin
      update <= 1'b0;
      if (clear) begin
        have_prev <= 1'b0;
        dir_up    <= 1'b0;
      end else if (res_valid) begin
        prev_ed2p <= ed2p_raw;
        have_prev <= 1'b1;
        if (have_prev) begin
          dir_up <= dir_new;
          n_next <= n_moved;
          update <= 1'b1;
        end
      end
    end
  end

endmodule
