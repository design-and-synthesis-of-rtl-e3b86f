// isqrt_seq: sequential integer square root, floor(sqrt(x)).
//
// Digit-by-digit (restoring) method: each clock cycle brings down two bits
// of the radicand and decides one bit of the root, so a W-bit radicand takes
// W/2 cycles after start. start is accepted when busy is low; done pulses
// for one cycle with root valid, and root holds until the next start.
module isqrt_seq #(
  parameter int unsigned W = 84   // radicand width, even
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [W-1:0]     x,
  output logic             busy,
  output logic             done,
  output logic [W/2-1:0]   root
);

  localparam int unsigned RW = W / 2 + 2;

  logic [W-1:0]            xs;
  logic [RW-1:0]           rem;
  logic [$clog2(W/2+1)-1:0] n;
  logic [RW-1:0]           rem_sh, trial;

  assign rem_sh = {rem[RW-3:0], xs[W-1 -: 2]};
  assign trial  = {root, 2'b01};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; xs <= '0; rem <= '0; root <= '0; n <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; xs <= x; rem <= '0; root <= '0; n <= '0;
      end else if (busy) begin
        xs <= xs << 2;
        if (rem_sh >= trial) begin
          rem  <= rem_sh - trial;
          root <= {root[W/2-2:0], 1'b1};
        end else begin
          rem  <= rem_sh;
          root <= {root[W/2-2:0], 1'b0};
        end
        n <= n + 1'b1;
        if (n == $bits(n)'(W/2 - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

endmodule
