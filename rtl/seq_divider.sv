// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// A start pulse loads num and den; NUM_W cycles later 'done' pulses with
// quo = num / den and rem = num % den. A zero divisor gives an all-ones
// quotient. 'busy' is high while a division runs; start is ignored then.
module seq_divider #(
  parameter int unsigned NUM_W = 40,
  parameter int unsigned DEN_W = 22
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  output logic             busy,
  output logic             done,
  output logic [NUM_W-1:0] quo,
  output logic [DEN_W-1:0] rem
);

  localparam int unsigned CNT_W = $clog2(NUM_W + 1);

  logic [CNT_W-1:0] cnt;
  logic [DEN_W-1:0] r;       // partial remainder, always below den
  logic [DEN_W-1:0] d;
  logic [NUM_W-1:0] q;       // dividend bits shift out, quotient bits shift in
  logic [DEN_W:0]   trial;
  logic [DEN_W+1:0] diff;    // sign bit on top

  always_comb begin
    trial = {r, q[NUM_W-1]};
    diff  = {1'b0, trial} - {2'b0, d};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      r    <= '0;
      d    <= '0;
      q    <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r    <= '0;
          d    <= den;
          q    <= num;
          cnt  <= CNT_W'(NUM_W);
          busy <= 1'b1;
        end
      end else begin
        if (diff[DEN_W+1]) begin          // trial < d: quotient bit 0
          r <= trial[DEN_W-1:0];
          q <= {q[NUM_W-2:0], 1'b0};
        end else begin
          r <= diff[DEN_W-1:0];
          q <= {q[NUM_W-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quo = (d == '0) ? '1 : q;
  assign rem = r;

endmodule
