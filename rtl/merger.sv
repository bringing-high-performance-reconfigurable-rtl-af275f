// Merging process: turns the stream of 3p-bit coefficients into p-bit result
// words while the MAC process is still running.
//
// With C_i = Q_low_i + Q_high_i x + Delta_i x^2 (x = 2^p) the product is
// C = sum C_i x^i, and each result word follows from a small-precision sum
//   S_i = delta_(i-1) + Q_low_i + Q_high_(i-1) + Delta_(i-2),
//   result word i = S_i mod x,  delta_i = S_i div x,
// so the merger only needs to remember Q_high of the previous coefficient,
// Delta of the two previous ones and the small carry delta (at most 2).
//
// Stage 1 adds the three coefficient parts (no feedback); stage 2 adds the
// carry and holds the only loop, a p-bit add of a 2-bit carry. With LAT = 2
// stage 1 is registered, with LAT = 1 it is combinational.
//
// Addition and subtraction bypass the MAC: with bypass set, the second operand
// word b_op takes the place of Q_high_(i-1), so S_i = delta_(i-1) + A_i + B_i.
// For subtraction the caller passes ~B_i and sets cin, the initial carry, to 1.
//
// Interface: clear (one cycle, before the first coefficient of an operation)
// resets the history and loads cin as delta_(-1). in_valid marks a coefficient;
// out_valid/s follow exactly LAT cycles later, one word per coefficient, one
// per cycle. The equations are those of the paper; the split into stages and
// the bypass port are this design's choices.
module merger #(
  parameter int unsigned P   = 64,
  parameter int unsigned LAT = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         cin,
  input  logic         in_valid,
  input  logic         bypass,
  input  logic [P-1:0] q_low,
  input  logic [P-1:0] q_high,
  input  logic [P-1:0] delta,
  input  logic [P-1:0] b_op,
  output logic         out_valid,
  output logic [P-1:0] s,
  output logic [1:0]   carry        // delta_i, for observation
);

  // History of the coefficient stream.
  logic [P-1:0] qh_prev, dl_prev1, dl_prev2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      qh_prev <= '0; dl_prev1 <= '0; dl_prev2 <= '0;
    end else if (clear) begin
      qh_prev <= '0; dl_prev1 <= '0; dl_prev2 <= '0;
    end else if (in_valid) begin
      qh_prev  <= q_high;
      dl_prev1 <= delta;
      dl_prev2 <= dl_prev1;
    end
  end

  // Stage 1: three-operand sum, no feedback.
  logic [P+1:0] t_comb;
  always_comb begin
    t_comb = {2'b00, q_low}
           + {2'b00, (bypass ? b_op : qh_prev)}
           + {2'b00, dl_prev2};
  end

  logic         t_valid;
  logic [P+1:0] t_val;

  if (LAT >= 2) begin : g_reg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        t_valid <= 1'b0;
        t_val   <= '0;
      end else begin
        t_valid <= in_valid && !clear;
        t_val   <= t_comb;
      end
    end
  end else begin : g_comb
    assign t_valid = in_valid && !clear;
    assign t_val   = t_comb;
  end

  // Stage 2: add the running carry.
  logic [P+1:0] s_full;
  assign s_full = t_val + {{P{1'b0}}, carry};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carry     <= 2'd0;
      out_valid <= 1'b0;
      s         <= '0;
    end else begin
      out_valid <= t_valid;
      // A word still in stage 2 when clear arrives finishes with the old carry.
      if (t_valid) s <= s_full[P-1:0];
      if (clear)
        carry <= {1'b0, cin};
      else if (t_valid)
        carry <= s_full[P+1:P];
    end
  end

endmodule
