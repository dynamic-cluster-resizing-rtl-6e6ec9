// tb_energy_estimator: self-checking test of the activity counter / EAR / ECR.
//
// Random accesses, random enable and random interval lengths drive two
// instances: one at default width and one with a 4-bit activity counter that
// must saturate. A reference model keeps the expected count; after every
// sample the ECR must equal count x EAR. 'clear' is exercised as well.
module tb_energy_estimator;
  import dcr_pkg::*;

  logic clk = 0;
  logic rst_n = 0;
  logic clear = 0, en = 0, sample = 0;
  logic [ACC_W-1:0] access = '0;
  int checks = 0, failures = 0;

  localparam logic [EAR_W-1:0] EAR_A = 8'd12;
  localparam logic [EAR_W-1:0] EAR_B = 8'd3;

  logic [21:0] ac_a;  logic [29:0] ecr_a;
  logic [3:0]  ac_b;  logic [11:0] ecr_b;

  energy_estimator #(.AC_W(22), .EAR(EAR_A)) u_a (
    .clk, .rst_n, .clear, .en, .access, .sample, .ac_o(ac_a), .ecr(ecr_a));
  energy_estimator #(.AC_W(4), .EAR(EAR_B)) u_b (
    .clk, .rst_n, .clear, .en, .access, .sample, .ac_o(ac_b), .ecr(ecr_b));

  always #5 clk = ~clk;

  longint exp_a, exp_b;
  int sat_seen = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    exp_a = 0; exp_b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int iv = 0; iv < 60; iv++) begin
      int len;
      len = 1 + ($urandom % 12);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        access = ACC_W'($urandom);
        en     = ($urandom % 4) != 0;
        sample = (k == len - 1);
        clear  = (iv % 17 == 5) && (k == 0) && !sample;
        // model: this cycle's accesses count if enabled
        if (clear) begin
          exp_a = 0; exp_b = 0;
        end else begin
          if (en) begin exp_a += access; exp_b += access; end
          if (exp_b > 15) begin exp_b = 15; sat_seen++; end
        end
        @(posedge clk);
        #1;
        if (sample) begin
          check(ecr_a == 30'(exp_a * EAR_A), $sformatf("ecr_a %0d exp %0d", ecr_a, exp_a * EAR_A));
          check(ecr_b == 12'(exp_b * EAR_B), $sformatf("ecr_b %0d exp %0d", ecr_b, exp_b * EAR_B));
          check(ac_a == 0 && ac_b == 0, "AC restarts after sample");
          exp_a = 0; exp_b = 0;
        end else begin
          check(ac_a == 22'(exp_a), $sformatf("ac_a %0d exp %0d", ac_a, exp_a));
        end
      end
    end
    @(negedge clk); sample = 0; en = 0; clear = 0;
    check(sat_seen > 0, "saturation exercised");
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
