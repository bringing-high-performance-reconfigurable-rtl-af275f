// Non-linear-pipelined 3p-bit accumulator of the MAC process.
//
// A coefficient C_i of the product is the sum of up to n terms A_k B_(i-k),
// each 2p bits wide, and needs 3p bits: C_i = Q_low + Q_high x + Delta x^2 with
// x = 2^p. A single 3p-bit adder with a feedback loop would be the critical
// path. Here the accumulator register is cut into three p-bit chunks, each
// with its own p-bit adder and feedback loop, and the carry out of a chunk is
// registered and added into the next chunk one cycle later. The accumulator
// thus accepts one product per cycle with only a p-bit carry chain in any loop,
// while its state is kept in redundant form (chunks plus pending carries).
//
// When the last term of a coefficient enters, the redundant state is handed to
// a two-stage resolve pipeline that folds the pending carries into the upper
// chunks; the accumulator itself restarts on the next coefficient in the very
// next cycle, so back-to-back coefficients never stall.
//
// Timing: a term presented with in_valid (first/last marking the coefficient's
// boundaries) is in the accumulator one cycle later; the finished coefficient
// appears on out_valid/q_low/q_high/delta 3 cycles after its last term.
// Delta is kept in p bits, which holds for any operand shorter than p*2^p
// digits (the paper's bound on the accumulation digits). The paper gives only
// the function and name of this accumulator; the chunking and the resolve
// pipeline are this design's choices.
module nl_accumulator #(
  parameter int unsigned P = 64
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic           first,
  input  logic           last,
  input  logic [2*P-1:0] prod,
  output logic           out_valid,
  output logic [P-1:0]   q_low,
  output logic [P-1:0]   q_high,
  output logic [P-1:0]   delta
);

  // Redundant accumulator state.
  logic [P-1:0] acc0, acc1, acc2;
  logic         cy0, cy1;

  // Next state.
  logic [P-1:0] b0, b1, b2;
  logic         bc0, bc1;
  logic [P-1:0] n0, n1, n2;
  logic         nc0, nc1;

  always_comb begin
    // A first term starts from zero; pending carries of the previous
    // coefficient were handed off with it.
    b0  = first ? '0 : acc0;
    b1  = first ? '0 : acc1;
    b2  = first ? '0 : acc2;
    bc0 = first ? 1'b0 : cy0;
    bc1 = first ? 1'b0 : cy1;
    {nc0, n0} = {1'b0, b0} + {1'b0, prod[P-1:0]};
    {nc1, n1} = {1'b0, b1} + {1'b0, prod[2*P-1:P]} + {{P{1'b0}}, bc0};
    n2        = b2 + {{(P-1){1'b0}}, bc1};
  end

  // Hand-off register and resolve pipeline.
  logic         h_valid, r_valid;
  logic [P-1:0] h0, h1, h2, r0, r1, r2;
  logic         hc0, hc1, rc1, rc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc0 <= '0; acc1 <= '0; acc2 <= '0; cy0 <= 1'b0; cy1 <= 1'b0;
      h_valid <= 1'b0; r_valid <= 1'b0; out_valid <= 1'b0;
      h0 <= '0; h1 <= '0; h2 <= '0; hc0 <= 1'b0; hc1 <= 1'b0;
      r0 <= '0; r1 <= '0; r2 <= '0; rc1 <= 1'b0; rc <= 1'b0;
      q_low <= '0; q_high <= '0; delta <= '0;
    end else begin
      if (in_valid) begin
        acc0 <= n0; acc1 <= n1; acc2 <= n2; cy0 <= nc0; cy1 <= nc1;
      end
      // Hand-off of a finished coefficient in redundant form.
      h_valid <= in_valid && last;
      if (in_valid && last) begin
        h0 <= n0; h1 <= n1; h2 <= n2; hc0 <= nc0; hc1 <= nc1;
      end
      // Resolve 1: fold the low carry into the middle chunk.
      r_valid <= h_valid;
      if (h_valid) begin
        r0 <= h0;
        {rc, r1} <= {1'b0, h1} + {{P{1'b0}}, hc0};
        r2  <= h2;
        rc1 <= hc1;
      end
      // Resolve 2: fold both middle carries into the top chunk.
      out_valid <= r_valid;
      if (r_valid) begin
        q_low  <= r0;
        q_high <= r1;
        delta  <= r2 + {{(P-1){1'b0}}, rc1} + {{(P-1){1'b0}}, rc};
      end
    end
  end

endmodule
