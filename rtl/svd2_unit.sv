// svd2_unit: singular value decomposition of an N x 2 data matrix A.
//
// The unit receives the 2x2 matrix G = A^T A = [g11 g12; g12 g22], built by
// the caller from the two reference channels, and decomposes it the way the
// design does: the eigenvalues are the roots of det(G - lambda I) = 0,
//   lambda1,2 = ((g11 + g22) +/- sqrt((g11 - g22)^2 + 4 g12^2)) / 2,
// the singular values are sigma_i = sqrt(lambda_i) (sigma1 >= sigma2), and
// the eigenvector v1 solves (G - lambda1 I) v1 = 0. It is taken as
// (lambda1 - g22, g12) when g11 >= g22 and as (g12, lambda1 - g11) otherwise,
// the choice that cannot vanish, and normalised to unit length; v2 is v1
// turned by 90 degrees, since G is symmetric. The left singular vectors
// u_i = A v_i / sigma_i are not formed here: the least-squares stage needs
// only V and the lambdas.
//
// All arithmetic is integer and sequential, sharing one square-root unit and
// one divider: four square roots and two divisions, about 330 cycles from
// start to the done pulse. The closed-form 2x2 solution and the number
// formats are choices of this design.
module svd2_unit
  import pca_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic                 start,
  input  logic [GW-1:0]        g11,
  input  logic signed [GW-1:0] g12,
  input  logic [GW-1:0]        g22,
  output logic                 busy,
  output logic                 done,
  output logic [LW-1:0]        lambda1,
  output logic [LW-1:0]        lambda2,
  output logic [LW/2:0]        sigma1,
  output logic [LW/2:0]        sigma2,
  output logic signed [VW-1:0] v1x,
  output logic signed [VW-1:0] v1y,
  output logic signed [VW-1:0] v2x,
  output logic signed [VW-1:0] v2y
);

  localparam int unsigned SQW = 2 * LW + 2;   // square-root radicand width
  localparam int unsigned DNW = LW + 1 + VF;  // divider numerator width
  localparam int unsigned DDW = SQW / 2;      // divider divisor width

  typedef enum logic [2:0] {
    S_IDLE, S_DISC, S_SIG1, S_SIG2, S_NORM, S_DIVX, S_DIVY
  } state_e;
  state_e state;

  logic [GW-1:0]        a11, a22;
  logic signed [GW-1:0] a12;
  logic [DDW-1:0]       nrm;
  logic signed [LW:0]   wx, wy;
  logic [LW:0]          wxn, wyn;   // |w| scaled to fill LW bits
  logic [LW:0]          wxs, wys;   // registered wxn, wyn
  logic                 wxneg, wyneg;

  logic                 sq_start, sq_busy, sq_done;
  logic [SQW-1:0]       sq_x;
  logic [SQW/2-1:0]     sq_root;
  logic                 dv_start, dv_busy, dv_done;
  logic [DNW-1:0]       dv_n;
  logic [DDW-1:0]       dv_d;
  logic [DNW-1:0]       dv_q;

  isqrt_seq #(.W(SQW)) u_sqrt (
    .clk, .rst, .start(sq_start), .x(sq_x), .busy(sq_busy), .done(sq_done), .root(sq_root)
  );
  udiv_seq #(.NW(DNW), .DW(DDW)) u_div (
    .clk, .rst, .start(dv_start), .n(dv_n), .d(dv_d), .busy(dv_busy), .done(dv_done), .q(dv_q)
  );

  // discriminant (g11 - g22)^2 + 4 g12^2 of the characteristic polynomial
  logic signed [GW:0]   dlt;
  logic [SQW-1:0]       disc;
  logic [LW-1:0]        tr;
  assign dlt  = $signed({1'b0, a11}) - $signed({1'b0, a22});
  assign disc = SQW'(SQW'(dlt) * SQW'(dlt)) + (SQW'(SQW'(a12) * SQW'(a12)) << 2);
  assign tr   = LW'(a11) + LW'(a22);

  // unnormalised eigenvector of lambda1
  always_comb begin
    if (dlt >= 0) begin
      wx = $signed({1'b0, lambda1}) - $signed({2'b00, a22});
      wy = (LW+1)'(a12);
    end else begin
      wx = (LW+1)'(a12);
      wy = $signed({1'b0, lambda1}) - $signed({2'b00, a11});
    end
  end

  function automatic logic [LW:0] mag(input logic signed [LW:0] v);
    return v < 0 ? -v : v;
  endfunction

  // Scale w up until its larger component fills LW bits, so that the
  // integer square root of |w|^2 keeps full relative precision.
  always_comb begin
    logic [LW:0] m;
    int unsigned sh;
    m  = mag(wx) | mag(wy);
    sh = 0;
    for (int i = 0; i < int'(LW); i++) if (m[i]) sh = LW - 1 - i;
    wxn = mag(wx) << sh;
    wyn = mag(wy) << sh;
  end

  assign v2x = -v1y;
  assign v2y = v1x;
  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE; done <= 1'b0;
      a11 <= '0; a12 <= '0; a22 <= '0; nrm <= '0;
      wxs <= '0; wys <= '0; wxneg <= 1'b0; wyneg <= 1'b0;
      lambda1 <= '0; lambda2 <= '0; sigma1 <= '0; sigma2 <= '0;
      v1x <= '0; v1y <= '0;
      sq_start <= 1'b0; sq_x <= '0; dv_start <= 1'b0; dv_n <= '0; dv_d <= '0;
    end else begin
      done     <= 1'b0;
      sq_start <= 1'b0;
      dv_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          a11 <= g11; a12 <= g12; a22 <= g22;
          state <= S_DISC;
        end
        S_DISC: begin
          if (!sq_start && !sq_busy && !sq_done) begin
            sq_x <= disc; sq_start <= 1'b1;            // sqrt(discriminant)
          end else if (sq_done) begin
            lambda1  <= LW'((SQW'(tr) + SQW'(sq_root)) >> 1);
            lambda2  <= LW'((SQW'(tr) - SQW'(sq_root)) >> 1);
            sq_x     <= SQW'((SQW'(tr) + SQW'(sq_root)) >> 1);
            sq_start <= 1'b1;                           // sigma1
            state    <= S_SIG1;
          end
        end
        S_SIG1: if (sq_done) begin
          sigma1   <= sq_root[LW/2:0];
          sq_x     <= SQW'(lambda2);
          sq_start <= 1'b1;                             // sigma2
          state    <= S_SIG2;
        end
        S_SIG2: if (sq_done) begin
          sigma2   <= sq_root[LW/2:0];
          wxs      <= wxn;
          wys      <= wyn;
          wxneg    <= wx < 0;
          wyneg    <= wy < 0;
          sq_x     <= SQW'(wxn) * SQW'(wxn) + SQW'(wyn) * SQW'(wyn);
          sq_start <= 1'b1;                             // |w|
          state    <= S_NORM;
        end
        S_NORM: if (sq_done) begin
          if (sq_root == '0) begin                      // G = g I: any basis
            v1x   <= VW'(1 << VF);
            v1y   <= '0;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            nrm      <= sq_root;
            dv_n     <= DNW'(wxs) << VF;
            dv_d     <= sq_root;
            dv_start <= 1'b1;
            state    <= S_DIVX;
          end
        end
        S_DIVX: if (dv_done) begin
          v1x      <= wxneg ? -$signed(VW'(dv_q)) : $signed(VW'(dv_q));
          dv_n     <= DNW'(wys) << VF;
          dv_d     <= nrm;
          dv_start <= 1'b1;
          state    <= S_DIVY;
        end
        S_DIVY: if (dv_done) begin
          v1y   <= wyneg ? -$signed(VW'(dv_q)) : $signed(VW'(dv_q));
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
