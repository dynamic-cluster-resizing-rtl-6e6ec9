// energy_estimator: dynamic energy estimation for one processor block.
//
// An activity counter (AC) adds the block's accesses every cycle. At the end of
// an interval (sample pulse) the energy of the interval is computed as
// AC x EAR, where EAR is a design-time constant giving the energy of one access,
// and stored in the Energy Consumed Register (ECR); AC restarts from zero. The
// AC / EAR / ECR structure and the multiply at interval end follow the source
// description. This design adds: accesses are counted only while the block is
// enabled (a gated-off queue consumes no dynamic energy), the accesses of the
// sample cycle belong to the interval that ends, and 'clear' restarts AC without
// touching ECR.
//
// Timing: ecr holds the energy of the last interval from the cycle after the
// sample pulse until the next one. ac_o shows the running count.
module energy_estimator
  import dcr_pkg::*;
#(
  parameter int unsigned           AC_W = 22,              // activity counter width
  parameter logic [EAR_W-1:0]      EAR  = 8'd12,           // energy per access
  localparam int unsigned          ECR_W = AC_W + EAR_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,    // restart AC (scheme change)
  input  logic              en,       // block enabled (not gated off)
  input  logic [ACC_W-1:0]  access,   // accesses this cycle
  input  logic              sample,   // interval end
  output logic [AC_W-1:0]   ac_o,
  output logic [ECR_W-1:0]  ecr
);

  logic [AC_W-1:0] ac;
  logic [AC_W-1:0] ac_total;

  // Accesses of this cycle, added with saturation so a long interval cannot wrap.
  always_comb begin
    logic [AC_W:0] sum;
    sum = {1'b0, ac} + (en ? (AC_W+1)'(access) : '0);
    ac_total = sum[AC_W] ? '1 : sum[AC_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ac  <= '0;
      ecr <= '0;
    end else if (sample) begin
      ecr <= ECR_W'(ac_total) * ECR_W'(EAR);
      ac  <= '0;
    end else if (clear) begin
      ac  <= '0;
    end else begin
      ac  <= ac_total;
    end
  end

  assign ac_o = ac;

endmodule
