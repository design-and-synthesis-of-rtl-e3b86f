// pca_sample_buffer: double-buffered block memory of the artifact remover.
//
// Samples of all channels arrive together, one time point per in_valid, and
// are written into one of two banks of N_SAMP words (one word holds all
// channels). When a bank is full it is flagged in full[] and writing
// continues in the other bank, so acquisition goes on while the full bank is
// processed. The processor frees a bank with release. A time point that
// arrives while the bank it would go to is still full is dropped and
// reported with an overflow pulse: processing was slower than the sample
// stream, the real-time condition of the design. Reads have one cycle of
// latency. Blocks of N_SAMP samples follow the design; the two banks and the
// drop-on-overflow policy are choices of this design.
module pca_sample_buffer
  import pca_pkg::*;
#(
  parameter int unsigned NC = N_CH,
  parameter int unsigned NS = N_SAMP
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  in_valid,
  input  sample_t               in_sample [NC],
  output logic [1:0]            full,
  output logic                  block_done,   // a bank has just filled
  output logic                  overflow,     // a time point was dropped
  input  logic                  release_bank_en,
  input  logic                  release_bank,
  input  logic                  rd_bank,
  input  logic [$clog2(NS)-1:0] rd_addr,
  output sample_t               rd_data [NC]
);

  localparam int unsigned AW = $clog2(2 * NS);

  logic [NC*SAMPLE_W-1:0] mem [2 * NS];
  logic                   wbank;
  logic [$clog2(NS)-1:0]  wptr;
  logic [NC*SAMPLE_W-1:0] wword, rword;

  always_comb
    for (int c = 0; c < int'(NC); c++) wword[c*SAMPLE_W +: SAMPLE_W] = in_sample[c];

  always_ff @(posedge clk) begin
    if (in_valid && !full[wbank])
      mem[AW'(wbank) * AW'(NS) + AW'(wptr)] <= wword;
    rword <= mem[AW'(rd_bank) * AW'(NS) + AW'(rd_addr)];
  end

  always_comb
    for (int c = 0; c < int'(NC); c++) rd_data[c] = rword[c*SAMPLE_W +: SAMPLE_W];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      full <= '0; wbank <= 1'b0; wptr <= '0; block_done <= 1'b0; overflow <= 1'b0;
    end else begin
      block_done <= 1'b0;
      overflow   <= 1'b0;
      if (release_bank_en) full[release_bank] <= 1'b0;
      if (in_valid) begin
        if (full[wbank]) begin
          overflow <= 1'b1;
        end else if (wptr == $bits(wptr)'(NS - 1)) begin
          wptr        <= '0;
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
          block_done  <= 1'b1;
        end else begin
          wptr <= wptr + 1'b1;
        end
      end
    end
  end

endmodule
