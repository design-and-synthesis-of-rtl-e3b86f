// pca_pkg: sizes shared by the real-time stimulation artifact remover.
//
// Ten recording channels are processed in blocks of 145 samples (30 kS/s,
// 4.83 ms per block); both numbers are the design's. Samples are 16-bit
// two's complement, a width chosen here. All sums over a block of products
// of two samples fit in GW bits. Eigenvectors are unit vectors held in
// signed fixed point with VF fraction bits; regression coefficients have
// FRAC fraction bits and are saturated to BW bits. VF is wide because the
// second eigenvalue can be 1e5 times smaller than the first when the
// stimulation artifact dominates the reference channels, and the error of
// the eigenvectors is amplified by that ratio in the fit.
package pca_pkg;

  localparam int unsigned N_CH      = 10;    // channels processed
  localparam int unsigned N_SAMP    = 145;   // samples per block
  localparam int unsigned SAMPLE_W  = 16;    // sample width
  localparam int unsigned GW        = 2 * SAMPLE_W + 8;  // block sums, 145 < 2^8
  localparam int unsigned LW        = GW + 1;            // eigenvalues
  localparam int unsigned VF        = 30;    // eigenvector fraction bits
  localparam int unsigned VW        = VF + 2;            // eigenvector width
  localparam int unsigned FRAC      = 24;    // coefficient fraction bits
  localparam int unsigned BW        = 40;    // coefficient width

  typedef logic signed [SAMPLE_W-1:0] sample_t;

endpackage
