// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// A start pulse latches dividend and divisor; W cycles later done pulses
// for one cycle with quotient = dividend / divisor. A zero divisor gives an
// all-ones quotient, which callers clamp. busy is high while it works and
// start is ignored then. Used by the predictor, which runs once per kernel
// launch, so a small serial divider is preferred over a combinational one.
module seq_divider #(
  parameter int W = 48
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  logic [W-1:0]         q_r;     // dividend shifting out, quotient shifting in
  logic [W-1:0]         d_r;
  logic [W-1:0]         rem_r;
  logic [$clog2(W+1)-1:0] cnt_r;
  logic [W:0]           shifted;
  logic [W:0]           diff;

  always_comb begin
    shifted = {rem_r, q_r[W-1]};
    diff    = shifted - {1'b0, d_r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_r   <= '0;
      d_r   <= '0;
      rem_r <= '0;
      cnt_r <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          q_r   <= dividend;
          d_r   <= divisor;
          rem_r <= '0;
          cnt_r <= '0;
          busy  <= 1'b1;
        end
      end else begin
        if (diff[W]) begin
          rem_r <= shifted[W-1:0];
          q_r   <= {q_r[W-2:0], 1'b0};
        end else begin
          rem_r <= diff[W-1:0];
          q_r   <= {q_r[W-2:0], 1'b1};
        end
        if (cnt_r == ($clog2(W+1))'(W - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
        cnt_r <= cnt_r + 1'b1;
      end
    end
  end

  assign quotient = q_r;
endmodule
