// Shared definitions of the arbitrary-precision arithmetic unit.
//
// The unit works on numbers stored as arrays of p-bit words (base x = 2^p).
// The default word length p = 64 and the latencies below are those of the
// 64-bit unit; the 32-bit variant uses p = 32, a MAC latency of 4 and a merge
// latency of 1. The operation encoding and the schedule tag are this design's
// own choice.
package ap_pkg;

  localparam int unsigned P_DEFAULT       = 64;  // word length p in bits
  localparam int unsigned MUL_LAT_DEFAULT = 8;   // multiplier stages; L_mac = MUL_LAT + 3
  localparam int unsigned MERGE_LAT_DEFAULT = 2; // merging latency L_merger
  localparam int unsigned ADDR_W_DEFAULT  = 19;  // 512K-word local memories

  // Operation selected at start.
  typedef enum logic [1:0] {
    OP_MUL  = 2'd0,   // C = A * B, n1+n2+1 result words
    OP_ADD  = 2'd1,   // C = A + B, max(n1,n2)+1 result words
    OP_SUB  = 2'd2,   // C = A - B, two's complement in max(n1,n2)+1 words
    OP_CONV = 2'd3    // c_i = sum_k a_k b_(i-k), n1+n2-1 coefficients of 3p bits
  } op_e;

  // Control tag that travels with each scheduled term.
  typedef struct packed {
    logic first;   // first term of a coefficient C_i
    logic last;    // last term of a coefficient C_i
    logic a_zero;  // A word is outside the operand (or a tail slot): use 0
    logic b_zero;  // B word is outside the operand (or a tail slot): use 0
  } term_tag_t;

endpackage
