// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// Pulse start with dividend and divisor; W cycles later done pulses and
// quotient/remainder hold floor(dividend/divisor) and the remainder. A zero
// divisor gives an all-ones quotient. Used by the blink remover to form the
// global mean of the selected samples.
module seq_divider #(
  parameter int unsigned W = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient,
  output logic [W-1:0] remainder
);
  logic [W-1:0]         dvs;
  logic [$clog2(W+1)-1:0] cnt;
  logic [W:0]           trial;

  assign trial = {remainder[W-2:0], quotient[W-1]} - {1'b0, dvs};
  // trial is the partial remainder shifted left by one with the next dividend
  // bit brought in, minus the divisor; its top bit set means "did not fit".

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      cnt       <= '0;
      dvs       <= '0;
      quotient  <= '0;
      remainder <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy      <= 1'b1;
        cnt       <= ($clog2(W+1))'(W);
        dvs       <= divisor;
        quotient  <= dividend;
        remainder <= '0;
      end else if (busy) begin
        if (trial[W] && !remainder[W-1]) begin
          remainder <= {remainder[W-2:0], quotient[W-1]};
          quotient  <= {quotient[W-2:0], 1'b0};
        end else begin
          remainder <= trial[W-1:0];
          quotient  <= {quotient[W-2:0], 1'b1};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
