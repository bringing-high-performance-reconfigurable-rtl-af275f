// Arbitrary-precision arithmetic unit (top level).
//
// Operands are unsigned integers of any length, stored least significant word
// first as n1 (A) and n2 (B) words of p bits in external word memories. The
// product is computed as a convolve-and-merge process: the coefficients
// C_i = sum_k A_(i-k) B_k of A(x)B(x), x = 2^p, are formed by a MAC process
// fed along a convolution schedule, and a merging process folds each
// coefficient into one final p-bit result word as soon as it is done, so the
// whole multiplication streams at one word pair per clock cycle with no stall.
// The same datapath performs:
//   OP_MUL   C = A*B           n1+n2+1 words written (the last is always 0)
//   OP_ADD   C = A+B           max(n1,n2)+1 words written
//   OP_SUB   C = A-B           max(n1,n2)+1 words, two's complement (a
//                              negative result has an all-ones top word)
//   OP_CONV  c_i = sum a_k b_(i-k), n1+n2-1 coefficients of 3p bits on the
//                              conv_* stream (MAC only, nothing written)
// Addition and subtraction pass the operand words straight to the merger,
// bypassing the MAC.
//
// Interface: pulse start for one cycle with op, n1, n2 (>= 1) and the base
// word addresses; busy stays high until done pulses with the last result.
// A read port per operand (x_re, x_addr) returns x_rdata exactly MEM_LAT cycles
// later; the result port writes c_wdata to c_addr when c_we is high. Reads of
// A, B and writes of C may go to three separate banks, or to one three-port
// memory. Result word i goes to c_base + i.
//
// Timing: the first term is issued two cycles after start; a multiplication
// issues n1*n2 + 2 terms, one per cycle, and its last word is written
// MEM_LAT + L_mac + L_merger cycles after the last issue, done one cycle later,
// with L_mac = MUL_LAT + 3 and L_merger = MERGE_LAT (11 and 2 by default, the
// paper's latencies for its 64-bit unit); addition issues max(n1,n2) + 1.
// Word length, latencies and memory size follow the paper's 64-bit unit on
// 512K x 64 local memories; the memory read latency, the handshake and the
// conv_* stream are this design's choices.
module ap_arith_unit
  import ap_pkg::*;
#(
  parameter int unsigned P         = P_DEFAULT,
  parameter int unsigned MUL_LAT   = MUL_LAT_DEFAULT,
  parameter int unsigned MERGE_LAT = MERGE_LAT_DEFAULT,
  parameter int unsigned ADDR_W    = ADDR_W_DEFAULT,
  parameter int unsigned MEM_LAT   = 1,
  parameter int unsigned LEN_W     = ADDR_W + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // command
  input  logic              start,
  input  op_e               op,
  input  logic [LEN_W-1:0]  n1,
  input  logic [LEN_W-1:0]  n2,
  input  logic [ADDR_W-1:0] a_base,
  input  logic [ADDR_W-1:0] b_base,
  input  logic [ADDR_W-1:0] c_base,
  output logic              busy,
  output logic              done,
  // operand memories
  output logic              a_re,
  output logic [ADDR_W-1:0] a_addr,
  input  logic [P-1:0]      a_rdata,
  output logic              b_re,
  output logic [ADDR_W-1:0] b_addr,
  input  logic [P-1:0]      b_rdata,
  // result memory
  output logic              c_we,
  output logic [ADDR_W-1:0] c_addr,
  output logic [P-1:0]      c_wdata,
  // convolution result stream
  output logic              conv_valid,
  output logic [LEN_W:0]    conv_idx,
  output logic [3*P-1:0]    conv_data
);

  // ---------------------------------------------------------------- command
  op_e           op_q;
  logic [LEN_W:0] expected_q;     // number of outputs of this operation
  logic [LEN_W:0] out_cnt;
  logic           busy_q;
  logic           start_ok;
  logic           out_fire;

  assign start_ok = start && !busy_q;

  logic [LEN_W:0] n_max;
  assign n_max = (n1 > n2) ? {1'b0, n1} : {1'b0, n2};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= OP_MUL;
      expected_q <= '0;
      busy_q     <= 1'b0;
      done       <= 1'b0;
      out_cnt    <= '0;
    end else begin
      done <= 1'b0;
      if (start_ok) begin
        op_q    <= op;
        busy_q  <= 1'b1;
        out_cnt <= '0;
        unique case (op)
          OP_MUL:  expected_q <= {1'b0, n1} + {1'b0, n2} + 1'b1;
          OP_CONV: expected_q <= {1'b0, n1} + {1'b0, n2} - 1'b1;
          default: expected_q <= n_max + 1'b1;
        endcase
      end else if (out_fire) begin
        out_cnt <= out_cnt + 1'b1;
        if (out_cnt + 1'b1 == expected_q) begin
          busy_q <= 1'b0;
          done   <= 1'b1;
        end
      end
    end
  end

  assign busy = busy_q;

  // ------------------------------------------------------------- schedule
  logic             s_valid;
  logic [LEN_W-1:0] s_a_idx, s_b_idx;
  term_tag_t        s_tag;
  logic             s_busy, s_done;

  conv_scheduler #(.LEN_W(LEN_W)) u_sched (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start_ok),
    .op          (op),
    .n1          (n1),
    .n2          (n2),
    .busy        (s_busy),
    .done        (s_done),
    .issue_valid (s_valid),
    .a_idx       (s_a_idx),
    .b_idx       (s_b_idx),
    .tag         (s_tag)
  );

  logic [ADDR_W-1:0] a_base_q, b_base_q, c_base_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_base_q <= '0; b_base_q <= '0; c_base_q <= '0;
    end else if (start_ok) begin
      a_base_q <= a_base; b_base_q <= b_base; c_base_q <= c_base;
    end
  end

  assign a_re   = s_valid && !s_tag.a_zero;
  assign b_re   = s_valid && !s_tag.b_zero;
  assign a_addr = a_base_q + s_a_idx[ADDR_W-1:0];
  assign b_addr = b_base_q + s_b_idx[ADDR_W-1:0];

  // Align the tag with the read data.
  logic      d_valid [MEM_LAT+1];
  term_tag_t d_tag   [MEM_LAT+1];
  assign d_valid[0] = s_valid;
  assign d_tag[0]   = s_tag;
  for (genvar g = 1; g <= MEM_LAT; g++) begin : g_memlat
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        d_valid[g] <= 1'b0;
        d_tag[g]   <= '0;
      end else begin
        d_valid[g] <= d_valid[g-1];
        d_tag[g]   <= d_tag[g-1];
      end
    end
  end

  logic            t_valid;
  term_tag_t       t_tag;
  logic [P-1:0]    a_w, b_w;
  assign t_valid = d_valid[MEM_LAT];
  assign t_tag   = d_tag[MEM_LAT];
  assign a_w     = t_tag.a_zero ? '0 : a_rdata;
  assign b_w     = t_tag.b_zero ? '0 : b_rdata;

  logic use_mac, is_sub;
  assign use_mac = (op_q == OP_MUL) || (op_q == OP_CONV);
  assign is_sub  = (op_q == OP_SUB);

  // ------------------------------------------------------------------ MAC
  logic         m_valid;
  logic [P-1:0] m_low, m_high, m_delta;

  mac_unit #(.P(P), .MUL_LAT(MUL_LAT)) u_mac (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (t_valid && use_mac),
    .first     (t_tag.first),
    .last      (t_tag.last),
    .a         (a_w),
    .b         (b_w),
    .out_valid (m_valid),
    .q_low     (m_low),
    .q_high    (m_high),
    .delta     (m_delta)
  );

  // --------------------------------------------------------------- merger
  logic         g_valid, g_bypass;
  logic [P-1:0] g_low, g_high, g_delta, g_bop;
  logic         r_valid;
  logic [P-1:0] r_word;
  logic [1:0]   r_carry;

  always_comb begin
    if (use_mac) begin
      g_valid  = m_valid && (op_q == OP_MUL);
      g_bypass = 1'b0;
      g_low    = m_low;
      g_high   = m_high;
      g_delta  = m_delta;
      g_bop    = '0;
    end else begin
      g_valid  = t_valid;
      g_bypass = 1'b1;
      g_low    = a_w;
      g_high   = '0;
      g_delta  = '0;
      g_bop    = is_sub ? ~b_w : b_w;
    end
  end

  merger #(.P(P), .LAT(MERGE_LAT)) u_merge (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (start_ok),
    .cin       (op == OP_SUB),
    .in_valid  (g_valid),
    .bypass    (g_bypass),
    .q_low     (g_low),
    .q_high    (g_high),
    .delta     (g_delta),
    .b_op      (g_bop),
    .out_valid (r_valid),
    .s         (r_word),
    .carry     (r_carry)
  );

  // -------------------------------------------------------------- outputs
  assign c_we       = r_valid;
  assign c_addr     = c_base_q + out_cnt[ADDR_W-1:0];
  assign c_wdata    = r_word;

  assign conv_valid = m_valid && (op_q == OP_CONV);
  assign conv_idx   = out_cnt;
  assign conv_data  = {m_delta, m_high, m_low};

  assign out_fire   = busy_q && (c_we || conv_valid);

  // --------------------------------------------------------------- checks
  // Schedule and datapath never stall: the scheduler is idle once the unit
  // has reported done, and results only appear while the unit is busy.
  a_out_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
                                     (c_we || conv_valid) |-> busy_q);
  a_sched_inside:   assert property (@(posedge clk) disable iff (!rst_n)
                                     (s_busy || s_done) |-> busy_q);
  // The merging carry delta_i never exceeds 2.
  a_carry_small:    assert property (@(posedge clk) disable iff (!rst_n)
                                     r_valid |-> (r_carry != 2'd3));

endmodule
