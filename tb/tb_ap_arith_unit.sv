// End-to-end testbench of ap_arith_unit at its default parameters (p = 64,
// L_mac = 11, L_merger = 2, 512K-word memories with one cycle of read
// latency). Three memory models hold A, B and the result C.
//
// It runs a mix of multiplications, additions, subtractions and convolutions
// of 1 to 24 words with random, all-ones and mixed data, in an order that
// switches the operation often, then a sweep of multiplications and additions
// up to 10240-bit operands (160 words, the size up to which the schoolbook
// method is the one used by software libraries). Every result word is compared
// with a reference computed by bignum_ref_pkg, and the cycles from raising
// start to seeing done must equal issued slots + MEM_LAT + L_mac + L_merger + 2
// for multiplication (no stall ever), slots + MEM_LAT + L_merger + 2 for
// addition/subtraction and slots + MEM_LAT + L_mac + 2 for convolution.
// It counts how often each mechanism of the unit occurred and fails if one
// never did.
module tb_ap_arith_unit;
  import ap_pkg::*;
  import bignum_ref_pkg::*;

  localparam int unsigned AW = 19, LW = 20, L_MAC = 11, L_MERGE = 2, MEM_LAT = 1;

  logic clk = 0, rst_n = 1, start = 0;
  op_e  op = OP_MUL;
  logic [LW-1:0] n1 = '0, n2 = '0;
  logic [AW-1:0] a_base = '0, b_base = '0, c_base = '0;
  logic busy, done;
  logic a_re, b_re, c_we;
  logic [AW-1:0] a_addr, b_addr, c_addr;
  logic [63:0] a_rdata, b_rdata, c_wdata, c_rdata_unused;
  logic conv_valid;
  logic [LW:0] conv_idx;
  logic [191:0] conv_data;

  ap_arith_unit dut (.*);

  obm_model #(.AW(AW), .DW(64), .LAT(MEM_LAT)) mem_a (
    .clk(clk), .re(a_re), .raddr(a_addr), .rdata(a_rdata),
    .we(1'b0), .waddr('0), .wdata('0));
  obm_model #(.AW(AW), .DW(64), .LAT(MEM_LAT)) mem_b (
    .clk(clk), .re(b_re), .raddr(b_addr), .rdata(b_rdata),
    .we(1'b0), .waddr('0), .wdata('0));
  obm_model #(.AW(AW), .DW(64), .LAT(MEM_LAT)) mem_c (
    .clk(clk), .re(1'b0), .raddr('0), .rdata(c_rdata_unused),
    .we(c_we), .waddr(c_addr), .wdata(c_wdata));

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // Mechanism counters.
  int n_mode_switch = 0, n_bypass_words = 0, n_acc_carry = 0, n_delta_nonzero = 0;
  int n_merge_carry = 0, n_negative = 0, n_zero_pad = 0, n_single_term = 0;
  int n_conv_words = 0, n_tail = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_mac.u_acc.cy0 || dut.u_mac.u_acc.cy1) n_acc_carry++;
    if (dut.u_mac.out_valid && dut.u_mac.delta != 0) n_delta_nonzero++;
    if (dut.u_merge.out_valid && dut.u_merge.carry != 2'd0) n_merge_carry++;
    if (dut.t_valid && dut.g_bypass) n_bypass_words++;
    if (dut.t_valid && (dut.t_tag.a_zero ^ dut.t_tag.b_zero)) n_zero_pad++;
    if (dut.t_valid && dut.t_tag.a_zero && dut.t_tag.b_zero) n_tail++;
    if (dut.u_mac.in_valid && dut.u_mac.first && dut.u_mac.last) n_single_term++;
  end

  // Convolution stream capture.
  logic [191:0] conv_got[$];
  always @(posedge clk) if (conv_valid) begin
    conv_got.push_back(conv_data);
    n_conv_words++;
  end

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  op_e last_op = OP_MUL;

  task automatic run(op_e o, num_t a, num_t b, output longint cycles);
    num_t   e;
    longint t0, slots, expect_cycles;
    int     nres, bad = 0;
    foreach (a[i]) mem_a.mem[100 + i] = a[i];
    foreach (b[i]) mem_b.mem[200000 + i] = b[i];
    conv_got.delete();
    if (o != last_op) n_mode_switch++;
    last_op = o;
    @(negedge clk);
    start = 1; op = o; n1 = LW'(a.size()); n2 = LW'(b.size());
    a_base = 100; b_base = 200000; c_base = 400000;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done && cycle - t0 < 4_000_000) @(negedge clk);
    cycles = cycle - t0;
    case (o)
      OP_MUL: begin
        slots = longint'(a.size()) * b.size() + 2;
        expect_cycles = slots + MEM_LAT + L_MAC + L_MERGE + 2;
        e = mul_ref(a, b);
      end
      OP_CONV: begin
        slots = longint'(a.size()) * b.size();
        expect_cycles = slots + MEM_LAT + L_MAC + 2;
      end
      default: begin
        slots = ((a.size() > b.size()) ? a.size() : b.size()) + 1;
        expect_cycles = slots + MEM_LAT + L_MERGE + 2;
        e = addsub_ref(a, b, o == OP_SUB);
      end
    endcase
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("%s %0dx%0d words: %0d cycles, expected %0d", o.name(), a.size(), b.size(),
               cycles, expect_cycles);
    end
    if (o == OP_CONV) begin
      nres = a.size() + b.size() - 1;
      checks++;
      if (conv_got.size() != nres) begin
        failures++; bad++;
      end else
        for (int i = 0; i < nres; i++) begin
          checks++;
          if (conv_got[i] !== conv_ref(a, b, i)) begin
            failures++; bad++;
          end
        end
    end else begin
      for (int i = 0; i < e.size(); i++) begin
        checks++;
        if (mem_c.mem[400000 + i] !== e[i]) begin
          failures++; bad++;
          if (bad < 4) $display("%s %0dx%0d words: word %0d is %h, expected %h", o.name(),
                                a.size(), b.size(), i, mem_c.mem[400000 + i], e[i]);
        end
      end
      if (o == OP_SUB && e[e.size()-1] == '1) n_negative++;
    end
    // Clear the result area for the next run.
    for (int i = 0; i < a.size() + b.size() + 2; i++) mem_c.mem[400000 + i] = '0;
  endtask

  function automatic num_t make(int n, int mode);
    num_t x = new[n];
    foreach (x[i]) x[i] = rand_word(mode);
    return x;
  endfunction

  initial begin
    longint cyc;
    op_e ops[4] = '{OP_MUL, OP_ADD, OP_SUB, OP_CONV};
    int  sweep[9] = '{1, 2, 4, 8, 16, 32, 64, 128, 160};
    int  mech[10];
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(posedge clk);

    // Mixed operations.
    for (int r = 0; r < 80; r++) begin
      automatic op_e o = ops[$urandom_range(3)];
      automatic num_t a = make($urandom_range(1, 24), r % 3);
      automatic num_t b = make($urandom_range(1, 24), (r / 3) % 3);
      run(o, a, b, cyc);
    end
    run(OP_MUL, make(1, 1), make(1, 1), cyc);
    run(OP_SUB, make(3, 0), make(5, 0), cyc);

    // Size sweep up to 10240-bit operands.
    foreach (sweep[k]) begin
      automatic int w = sweep[k];
      longint cm, ca;
      run(OP_MUL, make(w, 2), make(w, 2), cm);
      run(OP_ADD, make(w, 0), make(w, 0), ca);
      $display("%6d-bit operands: multiply %0d cycles (%0d MACs, %.1f%% busy), add %0d cycles",
               w * 64, cm, w * w, 100.0 * (w * w) / cm, ca);
    end

    $display("mechanisms: mode switches %0d, bypassed words %0d, zero-padded words %0d, tail slots %0d",
             n_mode_switch, n_bypass_words, n_zero_pad, n_tail);
    $display("            accumulator carries pending %0d, Delta != 0 %0d, merge carries %0d",
             n_acc_carry, n_delta_nonzero, n_merge_carry);
    $display("            single-term coefficients %0d, negative differences %0d, convolution words %0d",
             n_single_term, n_negative, n_conv_words);
    mech = '{n_mode_switch, n_bypass_words, n_zero_pad, n_tail, n_acc_carry, n_delta_nonzero,
             n_merge_carry, n_single_term, n_negative, n_conv_words};
    foreach (mech[m]) begin
      checks++;
      if (mech[m] == 0) begin
        failures++;
        $display("mechanism %0d never occurred", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
