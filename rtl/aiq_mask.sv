// aiq_mask: per-cluster enables of one issue-queue type from its AIQ count.
//
// With N active issue queues of a type, the queues of clusters 0 .. N-1 are
// enabled and the others are gated off. Cluster 0 keeps all of its queues
// active in every configuration, so its enable is always set, even for N = 0.
// Turning queues off from the highest-numbered cluster down is this design's
// choice; it matches a machine where cluster 1 is active more often than
// cluster 2. Purely combinational.
module aiq_mask
  import dcr_pkg::*;
#(
  parameter int unsigned NC = NUM_CLUSTERS
) (
  input  logic [N_W-1:0] n_active,
  output logic [NC-1:0]  iq_en
);

  always_comb begin
    for (int unsigned c = 0; c < NC; c++) begin
      iq_en[c] = (c == 0) || (c < 32'(n_active));
    end
  end

endmodule
