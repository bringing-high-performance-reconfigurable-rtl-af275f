// MAC process of the arbitrary-precision unit.
//
// Each scheduled term is a pair of p-bit words (A_k, B_(i-k)); the MAC
// multiplies them in a pipelined p x p multiplier and sums the 2p-bit products
// of one coefficient in the non-linear-pipelined accumulator, producing
// C_i = Q_low + Q_high x + Delta x^2 (x = 2^p) as three p-bit words. The
// first/last markers of the convolution schedule travel with the operands
// through the multiplier, so the unit needs no counters of its own.
//
// Timing: one term per cycle, no stalls; a coefficient leaves
// L_mac = MUL_LAT + 3 cycles after its last term (11 with the defaults, the
// MAC latency the paper gives for its 64-bit unit). The multiply/accumulate
// split follows the paper; the way the latency is divided is this design's.
module mac_unit #(
  parameter int unsigned P       = 64,
  parameter int unsigned MUL_LAT = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         first,
  input  logic         last,
  input  logic [P-1:0] a,
  input  logic [P-1:0] b,
  output logic         out_valid,
  output logic [P-1:0] q_low,
  output logic [P-1:0] q_high,
  output logic [P-1:0] delta
);

  logic           m_valid;
  logic [2*P-1:0] m_prod;
  logic [1:0]     m_tag;

  pipelined_multiplier #(.P(P), .LAT(MUL_LAT), .TAG_W(2)) u_mul (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (a),
    .b         (b),
    .in_tag    ({first, last}),
    .out_valid (m_valid),
    .prod      (m_prod),
    .out_tag   (m_tag)
  );

  nl_accumulator #(.P(P)) u_acc (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (m_valid),
    .first     (m_tag[1]),
    .last      (m_tag[0]),
    .prod      (m_prod),
    .out_valid (out_valid),
    .q_low     (q_low),
    .q_high    (q_high),
    .delta     (delta)
  );

endmodule
