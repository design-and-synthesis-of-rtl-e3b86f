// udiv_seq: sequential unsigned divider, q = floor(n / d).
//
// Restoring division, one quotient bit per clock cycle, NW cycles after
// start. start is accepted when busy is low; done pulses for one cycle with
// q valid, and q holds until the next start. Division by zero gives a
// quotient of all ones; the callers never divide by zero.
module udiv_seq #(
  parameter int unsigned NW = 73,   // numerator and quotient width
  parameter int unsigned DW = 42    // divisor width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  input  logic [NW-1:0] n,
  input  logic [DW-1:0] d,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] q
);

  logic [DW:0]              rem;
  logic [DW-1:0]            dq;
  logic [$clog2(NW+1)-1:0]  cnt;
  logic [DW:0]              rem_sh;

  assign rem_sh = {rem[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      busy <= 1'b0; done <= 1'b0; rem <= '0; dq <= '0; q <= '0; cnt <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1; rem <= '0; dq <= d; q <= n; cnt <= '0;
      end else if (busy) begin
        // q shifts left as the numerator bits move into rem
        if (rem_sh >= {1'b0, dq}) begin
          rem <= rem_sh - {1'b0, dq};
          q   <= {q[NW-2:0], 1'b1};
        end else begin
          rem <= rem_sh;
          q   <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt + 1'b1;
        if (cnt == $bits(cnt)'(NW - 1)) begin busy <= 1'b0; done <= 1'b1; end
      end
    end
  end

endmodule
