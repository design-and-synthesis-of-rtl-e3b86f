// artifact_remover: real-time stimulation artifact removal by PCA.
//
// A stimulation pulse reaches every electrode at about the same time, while
// a spike shows only on one electrode and its neighbours. For each object
// channel c the unit therefore builds the shared structure of the pulse from
// two reference channels that skip the neighbours, c+2 and c+3 (modulo NC),
// and subtracts it from channel c, leaving the spikes. Per block of NS
// samples and per channel:
//   1. accumulate G = A^T A and r = A^T y over the block (A: the two
//      reference channels, y: the object channel), NS cycles;
//   2. svd2_unit: eigenvalues, singular values and eigenvectors of G;
//   3. lsqr_unit: coefficients beta of the projection of y onto the kept
//      principal components;
//   4. stream out y_k - round(beta1 a_k + beta2 b_k), NS cycles, one cleaned
//      sample per cycle on out_* with its channel and sample index.
// Channels are processed one after another while the sample buffer fills its
// other bank; about 8,200 cycles per block of ten channels, well inside the
// 48,340 cycles between blocks at 10 MHz and 30 kS/s. block_cycles reports
// the cycles the last block took. The singular values of svd2_unit are not
// needed by the fit and are left unconnected. The algorithm (PCA through SVD of the
// N x 2 reference matrix, least squares, subtraction), the block length and
// the channel count follow the design; the reference channel numbering, the
// sequential channel order, the number formats and the streaming interface
// are choices of this design.
module artifact_remover
  import pca_pkg::*;
#(
  parameter int unsigned NC = N_CH,
  parameter int unsigned NS = N_SAMP
) (
  input  logic                   clk,
  input  logic                   rst,
  // raw samples, one time point of all channels per in_valid
  input  logic                   in_valid,
  input  sample_t                in_sample [NC],
  // cleaned samples, one per out_valid
  output logic                   out_valid,
  output logic [$clog2(NC)-1:0]  out_ch,
  output logic [$clog2(NS)-1:0]  out_idx,
  output sample_t                out_sample,
  output logic [1:0]             out_comps,     // principal components used
  // status
  output logic                   overflow,      // a time point was dropped
  output logic                   block_start,   // processing of a bank begins
  output logic                   block_end,     // a bank has been processed
  output logic [31:0]            block_cycles   // cycles the last block took
);

  localparam int unsigned KW = $clog2(NS);
  localparam int unsigned CW = $clog2(NC);
  localparam int unsigned EW = BW + SAMPLE_W + 1;

  typedef enum logic [2:0] {S_IDLE, S_ACC, S_SVD, S_LSQ, S_SUB} state_e;
  state_e state;

  logic [1:0]   full;
  logic         rb;                 // bank being processed
  logic [KW:0]  k;                  // read address counter
  logic         rv;                 // read data valid
  logic [KW-1:0] rk;                // sample index of the read data
  logic [CW-1:0] ch;
  logic [CW-1:0] cha, chb;          // reference channels
  logic         rel;              // free the bank rel_bank
  logic         rel_bank;
  sample_t      rd_data [NC];
  logic         blk_done_unused;

  pca_sample_buffer #(.NC(NC), .NS(NS)) u_buf (
    .clk, .rst, .in_valid, .in_sample, .full, .block_done(blk_done_unused),
    .overflow, .release_bank_en(rel), .release_bank(rel_bank),
    .rd_bank(rb), .rd_addr(k[KW-1:0]), .rd_data
  );

  always_comb begin
    cha = CW'((32'(ch) + 2) % NC);
    chb = CW'((32'(ch) + 3) % NC);
  end

  sample_t ya, yb, yy;
  assign ya = rd_data[cha];
  assign yb = rd_data[chb];
  assign yy = rd_data[ch];

  // block sums
  logic [GW-1:0]        g11, g22;
  logic signed [GW-1:0] g12, r1, r2;

  // SVD and least squares
  logic                 svd_start, svd_done, svd_busy;
  logic [LW-1:0]        lambda1, lambda2;
  logic [LW/2:0]        sigma1, sigma2;
  logic signed [VW-1:0] v1x, v1y, v2x, v2y;
  logic                 lsq_start, lsq_done, lsq_busy;
  logic [1:0]           comps;
  logic signed [BW-1:0] beta1, beta2;

  svd2_unit u_svd (
    .clk, .rst, .start(svd_start), .g11, .g12, .g22, .busy(svd_busy), .done(svd_done),
    .lambda1, .lambda2, .sigma1, .sigma2, .v1x, .v1y, .v2x, .v2y
  );

  lsqr_unit u_lsq (
    .clk, .rst, .start(lsq_start), .lambda1, .lambda2, .v1x, .v1y, .v2x, .v2y,
    .r1, .r2, .busy(lsq_busy), .done(lsq_done), .comps, .beta1, .beta2
  );

  // template and cleaned sample
  logic signed [EW-1:0] est, est_r, diff;
  assign est   = EW'(beta1) * EW'(ya) + EW'(beta2) * EW'(yb);
  assign est_r = (est + (EW'(1) <<< (FRAC - 1))) >>> FRAC;
  assign diff  = EW'(yy) - est_r;

  function automatic sample_t sat(input logic signed [EW-1:0] v);
    if (v > EW'(2 ** (SAMPLE_W - 1) - 1))  return sample_t'(2 ** (SAMPLE_W - 1) - 1);
    else if (v < -EW'(2 ** (SAMPLE_W - 1))) return sample_t'(-(2 ** (SAMPLE_W - 1)));
    else                                   return sample_t'(v);
  endfunction

  logic [31:0] cyc;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE; rb <= 1'b0; k <= '0; rv <= 1'b0; rk <= '0; ch <= '0; rel <= 1'b0; rel_bank <= 1'b0;
      g11 <= '0; g12 <= '0; g22 <= '0; r1 <= '0; r2 <= '0;
      svd_start <= 1'b0; lsq_start <= 1'b0;
      out_valid <= 1'b0; out_ch <= '0; out_idx <= '0; out_sample <= '0; out_comps <= '0;
      block_start <= 1'b0; block_end <= 1'b0; block_cycles <= '0; cyc <= '0;
    end else begin
      svd_start   <= 1'b0;
      lsq_start   <= 1'b0;
      rel         <= 1'b0;
      out_valid   <= 1'b0;
      block_start <= 1'b0;
      block_end   <= 1'b0;
      cyc         <= cyc + 1;
      // read side shared by the accumulate and subtract passes
      rv <= 1'b0;
      if ((state == S_ACC || state == S_SUB) && k < (KW+1)'(NS)) begin
        rv <= 1'b1;
        rk <= k[KW-1:0];
        k  <= k + 1'b1;
      end
      unique case (state)
        S_IDLE: if (full[rb] && !rel) begin
          ch <= '0; k <= '0; cyc <= 32'd1; block_start <= 1'b1;
          g11 <= '0; g12 <= '0; g22 <= '0; r1 <= '0; r2 <= '0;
          state <= S_ACC;
        end
        S_ACC: begin
          if (rv) begin
            g11 <= g11 + (GW'(ya) * GW'(ya));
            g22 <= g22 + (GW'(yb) * GW'(yb));
            g12 <= g12 + (GW'(ya) * GW'(yb));
            r1  <= r1  + (GW'(ya) * GW'(yy));
            r2  <= r2  + (GW'(yb) * GW'(yy));
          end
          if (!rv && k == (KW+1)'(NS)) begin
            svd_start <= 1'b1;
            state     <= S_SVD;
          end
        end
        S_SVD: if (svd_done) begin
          lsq_start <= 1'b1;
          state     <= S_LSQ;
        end
        S_LSQ: if (lsq_done) begin
          k     <= '0;
          state <= S_SUB;
        end
        S_SUB: begin
          if (rv) begin
            out_valid  <= 1'b1;
            out_ch     <= ch;
            out_idx    <= rk;
            out_sample <= sat(diff);
            out_comps  <= comps;
          end
          if (!rv && k == (KW+1)'(NS)) begin
            k <= '0;
            g11 <= '0; g12 <= '0; g22 <= '0; r1 <= '0; r2 <= '0;
            if (ch == CW'(NC - 1)) begin
              rel          <= 1'b1;
              rel_bank     <= rb;
              rb           <= ~rb;
              block_end    <= 1'b1;
              block_cycles <= cyc + 1;
              state        <= S_IDLE;
            end else begin
              ch    <= ch + 1'b1;
              state <= S_ACC;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(svd_busy && lsq_busy));

endmodule
