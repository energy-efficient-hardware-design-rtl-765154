// DIVIDE unit of the ALU processor, for a power-switchable domain.
//
// Unsigned restoring division, one quotient bit per cycle. A cycle with start
// high (and busy low) loads a and b; W cycles later done pulses for one
// cycle with q = a / b and r = a % b. Division by zero gives q = all ones and
// r = a. busy is high from the cycle after start until done. The unit follows
// the document; the algorithm and its timing are this design's choices.
module alu_divide #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] q,
  output logic [W-1:0] r,
  output logic         busy,
  output logic         done
);

  localparam int unsigned CNTW = $clog2(W + 1);

  logic [W-1:0]    divisor;
  logic [CNTW-1:0] cnt;
  logic [W:0]      rem_shift;
  logic [W:0]      rem_sub;

  assign rem_shift = {r, q[W-1]};
  assign rem_sub   = rem_shift - {1'b0, divisor};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      r       <= '0;
      divisor <= '0;
      cnt     <= '0;
      busy    <= 1'b0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q       <= a;
          r       <= '0;
          divisor <= b;
          cnt     <= CNTW'(W);
          busy    <= 1'b1;
        end
      end else begin
        if (!rem_sub[W]) begin
          r <= rem_sub[W-1:0];
          q <= {q[W-2:0], 1'b1};
        end else begin
          r <= rem_shift[W-1:0];
          q <= {q[W-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CNTW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
