// Convolution schedule generator.
//
// Multiplication and convolution: the coefficients of C(x) = A(x) B(x) are the
// convolution sums C_i = sum_k A_(i-k) B_k, i = 0 .. n1+n2-2, with k running
// from max(0, i-n1+1) to min(i, n2-1). The generator walks this schedule one
// term per clock cycle, coefficient after coefficient, and emits the word
// indexes of A and B with a tag that marks the first and last term of each
// coefficient. For multiplication it then adds two empty "tail" coefficients
// (tag a_zero = b_zero = 1) so that the merging process can flush the two
// result words that follow the last coefficient (eq. (6) runs to i = n1+n2).
// Convolution has no tail.
//
// Addition and subtraction: one slot per word, i = 0 .. max(n1,n2)-1, with
// A_i and B_i read at the same index; words past the end of the shorter operand
// are marked zero. One tail slot yields the final carry (or sign) word.
//
// Interface: a one-cycle start pulse with op, n1, n2 (word counts, both >= 1)
// begins a run; busy stays high while terms are issued; issue_valid/a_idx/
// b_idx/tag are registered and change every cycle; done is high together with
// the last slot. The first slot appears two cycles after start. A start while busy is ignored. There is no back-pressure: the
// datapath behind this schedule never stalls.
//
// The schedule order (coefficient-major, ascending k) follows the convolution
// sum of the paper's eq. (4b); the tag encoding, the tail slots and the
// start/busy/done handshake are this design's choices.
module conv_scheduler
  import ap_pkg::*;
#(
  parameter int unsigned LEN_W = ADDR_W_DEFAULT + 1   // width of word counts
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  op_e              op,
  input  logic [LEN_W-1:0] n1,          // words of A
  input  logic [LEN_W-1:0] n2,          // words of B
  output logic             busy,
  output logic             done,
  output logic             issue_valid,
  output logic [LEN_W-1:0] a_idx,
  output logic [LEN_W-1:0] b_idx,
  output term_tag_t        tag
);

  typedef enum logic [1:0] {S_IDLE, S_CONV, S_ADD, S_TAIL} state_e;

  state_e           state;
  op_e              op_q;
  logic [LEN_W-1:0] n1_q, n2_q;
  logic [LEN_W:0]   i_q;        // coefficient index (one bit wider: i < n1+n2)
  logic [LEN_W-1:0] k_q;        // term index inside the coefficient
  logic [1:0]       tail_q;     // tail slots still to issue

  // Bounds of k for the current coefficient i.
  logic [LEN_W:0]   kmin, kmax, kmin_next, last_i, n_add;
  always_comb begin
    kmin      = (i_q >= {1'b0, n1_q}) ? i_q - {1'b0, n1_q} + 1'b1 : '0;
    kmax      = (i_q <  {1'b0, n2_q}) ? i_q : {1'b0, n2_q} - 1'b1;
    kmin_next = (i_q + 1'b1 >= {1'b0, n1_q}) ? i_q + (LEN_W+1)'(2) - {1'b0, n1_q} : '0;
    last_i    = {1'b0, n1_q} + {1'b0, n2_q} - (LEN_W+1)'(2);
    n_add     = (n1_q > n2_q) ? {1'b0, n1_q} : {1'b0, n2_q};
  end

  logic [LEN_W:0] a_full;
  assign a_full = i_q - {1'b0, k_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      op_q        <= OP_MUL;
      n1_q        <= '0;
      n2_q        <= '0;
      i_q         <= '0;
      k_q         <= '0;
      tail_q      <= '0;
      issue_valid <= 1'b0;
      a_idx       <= '0;
      b_idx       <= '0;
      tag         <= '0;
      done        <= 1'b0;
    end else begin
      issue_valid <= 1'b0;
      done        <= 1'b0;
      tag         <= '0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            op_q  <= op;
            n1_q  <= n1;
            n2_q  <= n2;
            i_q   <= '0;
            k_q   <= '0;
            state <= (op == OP_ADD || op == OP_SUB) ? S_ADD : S_CONV;
          end
        end
        S_CONV: begin
          issue_valid  <= 1'b1;
          a_idx        <= a_full[LEN_W-1:0];
          b_idx        <= k_q;
          tag.first    <= ({1'b0, k_q} == kmin);
          tag.last     <= ({1'b0, k_q} == kmax);
          tag.a_zero   <= 1'b0;
          tag.b_zero   <= 1'b0;
          if ({1'b0, k_q} == kmax) begin
            if (i_q == last_i) begin
              if (op_q == OP_MUL) begin
                tail_q <= 2'd2;
                state  <= S_TAIL;
              end else begin
                state  <= S_IDLE;
                done   <= 1'b1;
              end
            end else begin
              i_q <= i_q + 1'b1;
              k_q <= kmin_next[LEN_W-1:0];
            end
          end else begin
            k_q <= k_q + 1'b1;
          end
        end
        S_ADD: begin
          issue_valid <= 1'b1;
          a_idx       <= i_q[LEN_W-1:0];
          b_idx       <= i_q[LEN_W-1:0];
          tag.first   <= 1'b1;
          tag.last    <= 1'b1;
          tag.a_zero  <= (i_q >= {1'b0, n1_q});
          tag.b_zero  <= (i_q >= {1'b0, n2_q});
          if (i_q == n_add - 1'b1) begin
            tail_q <= 2'd1;
            state  <= S_TAIL;
          end else begin
            i_q <= i_q + 1'b1;
          end
        end
        S_TAIL: begin
          issue_valid <= 1'b1;
          a_idx       <= '0;
          b_idx       <= '0;
          tag         <= '{first: 1'b1, last: 1'b1, a_zero: 1'b1, b_zero: 1'b1};
          tail_q      <= tail_q - 1'b1;
          if (tail_q == 2'd1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
