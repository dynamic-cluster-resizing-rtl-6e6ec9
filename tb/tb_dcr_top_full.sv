// tb_dcr_top_full: end-to-end run of dcr_top at its default sizes.
//
// 256K-cycle large interval, 16K-cycle trial windows and 16K-cycle
// single-scheme intervals: 40 single-scheme intervals, 10 complete
// double-scheme rounds and a switch back, checked by dcr_checker.
module tb_dcr_top_full;
  import dcr_pkg::*;
  localparam int unsigned NC = NUM_CLUSTERS, NT = NUM_IQ_TYPES;
  localparam int unsigned ECR_W = $clog2(LARGE_INTERVAL_CYCLES + 1) + ACC_W + EAR_W;

  logic clk = 0;
  logic rst_n;
  scheme_e scheme;
  logic [NT-1:0][NC-1:0][ACC_W-1:0] iq_access;
  logic [2:0] commit;
  logic [NT-1:0][NC-1:0] iq_enable;
  logic [NT-1:0][N_W-1:0] n_active, n_applied;
  logic [NT-1:0][NC-1:0][ECR_W-1:0] ecr;
  logic interval_end;
  phase_e cur_phase;

  always #5 clk = ~clk;

  dcr_top dut (
    .clk, .rst_n, .scheme, .iq_access, .commit, .iq_enable, .n_active, .n_applied, .ecr,
    .interval_end, .cur_phase);

  dcr_checker #(.N_SINGLE(40), .N_ROUNDS(10)) chk (
    .clk, .rst_n, .scheme, .iq_access, .commit, .iq_enable, .n_active, .n_applied, .ecr,
    .interval_end, .cur_phase);
endmodule
