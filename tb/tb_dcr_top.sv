// tb_dcr_top: end-to-end test of the resizing unit at short interval lengths.
//
// Intervals of 100 cycles (single scheme) and a 400-cycle large interval with
// 100-cycle trial windows (double scheme) keep the run short while exercising
// every mechanism; dcr_checker holds the synthetic core, model and checks.
module tb_dcr_top;
  import dcr_pkg::*;
  localparam int unsigned L = 400, S = 100, SI = 100;
  localparam int unsigned NC = NUM_CLUSTERS, NT = NUM_IQ_TYPES;
  localparam int unsigned ECR_W = $clog2(L + 1) + ACC_W + EAR_W;

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

  dcr_top #(.LARGE_LEN(L), .SHORT_LEN(S), .SINGLE_LEN(SI)) dut (
    .clk, .rst_n, .scheme, .iq_access, .commit, .iq_enable, .n_active, .n_applied, .ecr,
    .interval_end, .cur_phase);

  dcr_checker #(.LARGE_LEN(L), .SHORT_LEN(S), .SINGLE_LEN(SI), .N_SINGLE(60), .N_ROUNDS(40)) chk (
    .clk, .rst_n, .scheme, .iq_access, .commit, .iq_enable, .n_active, .n_applied, .ecr,
    .interval_end, .cur_phase);
endmodule
