// lsqr_unit: least-squares fit of the object channel onto the principal
// components of its two reference channels.
//
// With A the N x 2 matrix of the reference channels, y the object channel
// and r = A^T y, the shared structure is the projection of y onto the
// principal components kept: template = sum_i u_i (u_i^T y) with
// u_i = A v_i / sigma_i. Rewritten in terms of the samples of A this is
// template_k = beta1 a_k + beta2 b_k, with
//   beta = sum_i v_i (v_i . r) / lambda_i.
// The unit computes beta from the outputs of svd2_unit and r. A component
// whose eigenvalue is below LAMBDA_MIN carries no shared structure (the two
// reference channels are then collinear, or silent) and is left out, so the
// fit falls back to the first component or to no template at all; comps
// tells how many components were used. Keeping both components follows the
// design; the threshold and the number formats are choices of this design.
//
// Timing: two sequential divisions, about 200 cycles from start to done.
module lsqr_unit
  import pca_pkg::*;
#(
  parameter logic [LW-1:0] LAMBDA_MIN = LW'(N_SAMP)
) (
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [LW-1:0]        lambda1,
  input  logic [LW-1:0]        lambda2,
  input  logic signed [VW-1:0] v1x,
  input  logic signed [VW-1:0] v1y,
  input  logic signed [VW-1:0] v2x,
  input  logic signed [VW-1:0] v2y,
  input  logic signed [GW-1:0] r1,
  input  logic signed [GW-1:0] r2,
  output logic                 busy,
  output logic                 done,
  output logic [1:0]           comps,
  output logic signed [BW-1:0] beta1,
  output logic signed [BW-1:0] beta2
);

  localparam int unsigned PW  = VW + GW + 1;       // v . r
  localparam int unsigned DNW = PW - 1 + FRAC;     // |v . r| << FRAC
  localparam int unsigned QW  = DNW + 1;           // signed quotient
  localparam int unsigned SW2 = QW + VW + 1;       // beta before scaling

  typedef enum logic [1:0] {S_IDLE, S_DIV1, S_DIV2, S_SUM} state_e;
  state_e state;

  logic signed [PW-1:0]  p1, p2;
  logic signed [QW-1:0]  q1, q2;
  logic                  dv_start, dv_busy, dv_done;
  logic [DNW-1:0]        dv_n;
  logic [LW-1:0]         dv_d;
  logic [DNW-1:0]        dv_q;

  assign p1 = PW'(v1x) * PW'(r1) + PW'(v1y) * PW'(r2);
  assign p2 = PW'(v2x) * PW'(r1) + PW'(v2y) * PW'(r2);

  udiv_seq #(.NW(DNW), .DW(LW)) u_div (
    .clk, .rst, .start(dv_start), .n(dv_n), .d(dv_d), .busy(dv_busy), .done(dv_done), .q(dv_q)
  );

  function automatic logic [DNW-1:0] mag_sh(input logic signed [PW-1:0] p);
    logic [PW-1:0] m;
    m = p < 0 ? -p : p;
    return DNW'(m) << FRAC;
  endfunction

  localparam logic signed [SW2-1:0] BMAX = (SW2'(1) <<< (BW - 1)) - SW2'(1);
  localparam logic signed [SW2-1:0] HALF = SW2'(1) <<< (2 * VF - 1);

  // round away the eigenvector fraction bits, saturate to BW bits
  function automatic logic signed [BW-1:0] scale_sat(input logic signed [SW2-1:0] s);
    logic signed [SW2-1:0] t;
    t = (s + HALF) >>> (2 * VF);
    if (t > BMAX)       return BW'(BMAX);
    else if (t < -BMAX) return BW'(-BMAX);
    else                return BW'(t);
  endfunction

  logic signed [SW2-1:0] sx, sy;
  assign sx = SW2'(v1x) * SW2'(q1) + SW2'(v2x) * SW2'(q2);
  assign sy = SW2'(v1y) * SW2'(q1) + SW2'(v2y) * SW2'(q2);

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE; done <= 1'b0; comps <= '0;
      beta1 <= '0; beta2 <= '0; q1 <= '0; q2 <= '0;
      dv_start <= 1'b0; dv_n <= '0; dv_d <= '0;
    end else begin
      done     <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          q1 <= '0; q2 <= '0;
          if (lambda1 < LAMBDA_MIN) begin
            comps <= 2'd0; beta1 <= '0; beta2 <= '0; done <= 1'b1;
          end else begin
            comps    <= (lambda2 < LAMBDA_MIN) ? 2'd1 : 2'd2;
            dv_n     <= mag_sh(p1);
            dv_d     <= lambda1;
            dv_start <= 1'b1;
            state    <= S_DIV1;
          end
        end
        S_DIV1: if (dv_done) begin
          q1 <= (p1 < 0) ? -$signed({1'b0, dv_q}) : $signed({1'b0, dv_q});
          if (comps == 2'd2) begin
            dv_n     <= mag_sh(p2);
            dv_d     <= lambda2;
            dv_start <= 1'b1;
            state    <= S_DIV2;
          end else begin
            state <= S_SUM;
          end
        end
        S_DIV2: if (dv_done) begin
          q2    <= (p2 < 0) ? -$signed({1'b0, dv_q}) : $signed({1'b0, dv_q});
          state <= S_SUM;
        end
        S_SUM: begin
          beta1 <= scale_sat(sx);
          beta2 <= scale_sat(sy);
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
