// ed2p_unit: energy-delay-squared product of one measurement interval.
//
// Given the energy E, cycle count C and committed instructions I of an
// interval, it computes two products:
//   ed2p_raw    = E * C^2                (the interval's own ED2P)
//   ed2p_scaled = E * (Iref * C / I)^2   (delay scaled to Iref instructions)
// The scaled delay is Iref divided by the interval's IPC (I / C), so that an
// interval is compared with another one over the same amount of work, as the
// resizing schemes require. Energy is not scaled. The hardware is sequential:
// one cycle to load, a restoring divider (one bit per cycle) for Iref*C/I,
// then one cycle each for the squares and for the products with E. The
// quotient is truncated and saturates at D_W bits; I = 0 gives the largest
// value. These arithmetic details are this design's choice.
//
// Timing: start is taken when busy is low; done pulses PROD_W + 5 cycles
// later (PROD_W = INS_W + CYC_W) with both results valid until the next start.
module ed2p_unit #(
  parameter int unsigned E_W    = 32,
  parameter int unsigned CYC_W  = 19,
  parameter int unsigned INS_W  = CYC_W + 3,
  parameter int unsigned D_W    = CYC_W + 4,
  localparam int unsigned P_W   = E_W + 2 * D_W,
  localparam int unsigned PROD_W = INS_W + CYC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [E_W-1:0]   energy,
  input  logic [CYC_W-1:0] cycles,
  input  logic [INS_W-1:0] instrs,
  input  logic [INS_W-1:0] ref_instrs,
  output logic             busy,
  output logic             done,
  output logic [P_W-1:0]   ed2p_raw,
  output logic [P_W-1:0]   ed2p_scaled
);

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_DIV, S_SQ, S_MUL} state_e;
  state_e state;

  logic [E_W-1:0]    e_q;
  logic [CYC_W-1:0]  c_q;
  logic [INS_W-1:0]  i_q;
  logic [INS_W-1:0]  iref_q;
  logic [D_W-1:0]    d_q;            // scaled delay, saturated
  logic [2*D_W-1:0]  d2_q;           // scaled delay squared
  logic [2*D_W-1:0]  c2_q;           // raw delay squared

  logic              div_done;
  logic              div_busy;
  logic [PROD_W-1:0] quo;
  logic [INS_W-1:0]  rem_unused;

  seq_divider #(.NUM_W(PROD_W), .DEN_W(INS_W)) u_div (
    .clk, .rst_n,
    .start (state == S_LOAD),
    .num   (PROD_W'(iref_q) * PROD_W'(c_q)),
    .den   (i_q),
    .busy  (div_busy),
    .done  (div_done),
    .quo   (quo),
    .rem   (rem_unused)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      e_q         <= '0;
      c_q         <= '0;
      i_q         <= '0;
      iref_q      <= '0;
      d_q         <= '0;
      d2_q        <= '0;
      c2_q        <= '0;
      ed2p_raw    <= '0;
      ed2p_scaled <= '0;
      done        <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          e_q    <= energy;
          c_q    <= cycles;
          i_q    <= instrs;
          iref_q <= ref_instrs;
          state  <= S_LOAD;
        end
        S_LOAD: state <= S_DIV;
        S_DIV: if (div_done) begin
          d_q   <= (quo > PROD_W'({D_W{1'b1}})) ? '1 : D_W'(quo);
          state <= S_SQ;
        end
        S_SQ: begin
          d2_q  <= (2*D_W)'(d_q) * (2*D_W)'(d_q);
          c2_q  <= (2*D_W)'(c_q) * (2*D_W)'(c_q);
          state <= S_MUL;
        end
        S_MUL: begin
          ed2p_scaled <= P_W'(e_q) * P_W'(d2_q);
          ed2p_raw    <= P_W'(e_q) * P_W'(c2_q);
          done        <= 1'b1;
          state       <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) (state == S_LOAD) |-> !div_busy);

  initial assert (D_W >= CYC_W) else $error("ed2p_unit: D_W must hold a raw cycle count");

endmodule
