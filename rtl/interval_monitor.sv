// interval_monitor: cycle and committed-instruction counters of an interval.
//
// The ED2P metric needs the delay of an interval (its cycle count) and the work
// done in it (committed instructions, from which IPC follows). Both counters
// run every cycle; on a sample pulse their totals, including the sample cycle,
// are latched into cycles/instrs and the counters restart. 'clear' restarts
// them without latching. Widths are this design's choice: CYC_W must hold the
// longest interval, INS_W the commit width times that.
//
// Timing: cycles/instrs are valid from the cycle after the sample pulse.
module interval_monitor
  import dcr_pkg::*;
#(
  parameter int unsigned CYC_W = 19,
  parameter int unsigned INS_W = CYC_W + 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic [2:0]       commit,   // instructions committed this cycle, 0..COMMIT_WIDTH
  input  logic             sample,
  output logic [CYC_W-1:0] cycles,
  output logic [INS_W-1:0] instrs
);

  logic [CYC_W-1:0] cyc_cnt;
  logic [INS_W-1:0] ins_cnt;
  logic [CYC_W-1:0] cyc_next;
  logic [INS_W-1:0] ins_next;

  always_comb begin
    cyc_next = (cyc_cnt == '1) ? cyc_cnt : cyc_cnt + 1'b1;
    ins_next = ins_cnt + INS_W'(commit);
    if (ins_next < ins_cnt) ins_next = '1;  // saturate
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_cnt <= '0;
      ins_cnt <= '0;
      cycles  <= '0;
      instrs  <= '0;
    end else if (sample) begin
      cycles  <= cyc_next;
      instrs  <= ins_next;
      cyc_cnt <= '0;
      ins_cnt <= '0;
    end else if (clear) begin
      cyc_cnt <= '0;
      ins_cnt <= '0;
    end else begin
      cyc_cnt <= cyc_next;
      ins_cnt <= ins_next;
    end
  end

  // Commit count never exceeds the machine's commit width.
  a_commit_range: assert property (@(posedge clk) disable iff (!rst_n) 32'(commit) <= COMMIT_WIDTH);

endmodule
