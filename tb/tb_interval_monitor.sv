// tb_interval_monitor: self-checking test of the cycle / instruction counters.
//
// Random commit counts (0..4) over random-length intervals; after each sample
// the latched cycle and instruction totals must match a model. A clear in the
// middle of an interval restarts both counts.
module tb_interval_monitor;
  import dcr_pkg::*;

  logic clk = 0;
  logic rst_n = 0;
  logic clear = 0, sample = 0;
  logic [2:0] commit = '0;
  logic [18:0] cycles;
  logic [21:0] instrs;
  int checks = 0, failures = 0;

  interval_monitor #(.CYC_W(19), .INS_W(22)) dut (.clk, .rst_n, .clear, .commit, .sample, .cycles, .instrs);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    int exp_c, exp_i;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    exp_c = 1; exp_i = 0;  // the cycle between reset release and the first stimulus
    for (int iv = 0; iv < 40; iv++) begin
      int len;
      len = 1 + ($urandom % 40);
      for (int k = 0; k < len; k++) begin
        @(negedge clk);
        commit = 3'($urandom % (COMMIT_WIDTH + 1));
        sample = (k == len - 1);
        clear  = (iv % 9 == 4) && (k == len / 2) && !sample;
        if (clear) begin exp_c = 0; exp_i = 0; end
        else begin exp_c++; exp_i += commit; end
        @(posedge clk); #1;
        if (sample) begin
          check(cycles == 19'(exp_c), $sformatf("cycles %0d exp %0d", cycles, exp_c));
          check(instrs == 22'(exp_i), $sformatf("instrs %0d exp %0d", instrs, exp_i));
          exp_c = 0; exp_i = 0;
        end
      end
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
