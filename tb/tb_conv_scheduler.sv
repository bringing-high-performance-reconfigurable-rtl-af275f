// Self-checking testbench of conv_scheduler. For multiplication, convolution,
// addition and subtraction with many operand lengths (1 to 13 words, equal and
// unequal), the issued slots are compared one by one with a schedule listed by
// the testbench from the convolution sum (i = 0 .. n1+n2-2, k ascending),
// including the tail slots; slots must come on consecutive cycles, starting
// two cycles after start, with done on the last one.
module tb_conv_scheduler;
  import ap_pkg::*;
  localparam int unsigned LEN_W = 20;
  logic clk = 0, rst_n = 1, start = 0;
  op_e  op = OP_MUL;
  logic [LEN_W-1:0] n1 = '0, n2 = '0;
  logic busy, done, issue_valid;
  logic [LEN_W-1:0] a_idx, b_idx;
  term_tag_t tag;
  int checks = 0, failures = 0;

  conv_scheduler #(.LEN_W(LEN_W)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { int a; int b; bit first; bit last; bit az; bit bz; } slot_t;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(op_e o, int na, int nb);
    slot_t exp[$];
    int got = 0, cyc = 0, first_cyc = -1;
    bit bad = 0;
    if (o == OP_MUL || o == OP_CONV) begin
      for (int i = 0; i <= na + nb - 2; i++) begin
        int kmin = (i - na + 1 > 0) ? i - na + 1 : 0;
        int kmax = (i < nb - 1) ? i : nb - 1;
        for (int k = kmin; k <= kmax; k++)
          exp.push_back('{i - k, k, k == kmin, k == kmax, 1'b0, 1'b0});
      end
      if (o == OP_MUL) repeat (2) exp.push_back('{0, 0, 1'b1, 1'b1, 1'b1, 1'b1});
    end else begin
      int n = (na > nb) ? na : nb;
      for (int i = 0; i < n; i++)
        exp.push_back('{i, i, 1'b1, 1'b1, i >= na, i >= nb});
      exp.push_back('{0, 0, 1'b1, 1'b1, 1'b1, 1'b1});
    end
    @(negedge clk);
    start = 1; op = o; n1 = LEN_W'(na); n2 = LEN_W'(nb);
    @(negedge clk);
    start = 0;
    cyc = 1;
    forever begin
      @(posedge clk); #1;
      cyc++;
      if (issue_valid) begin
        slot_t e = exp[got];
        if (first_cyc < 0) first_cyc = cyc;
        if (got >= exp.size() || a_idx != LEN_W'(e.a) || b_idx != LEN_W'(e.b) ||
            tag.first != e.first || tag.last != e.last ||
            tag.a_zero != e.az || tag.b_zero != e.bz || cyc - first_cyc != got)
          bad = 1;
        got++;
        if (done) break;
      end else if (done || cyc > 1000) begin
        bad = 1;
        break;
      end
    end
    checks++;
    if (bad || got != exp.size() || first_cyc != 2) begin
      failures++;
      $display("op %s n1=%0d n2=%0d: %0d of %0d slots, first at %0d, mismatch %0d",
               o.name(), na, nb, got, exp.size(), first_cyc, bad);
    end
    @(negedge clk);
    checks++;
    if (busy) begin
      failures++;
      $display("still busy after done");
    end
  endtask

  initial begin
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int na = 1; na <= 13; na += 2)
      for (int nb = 1; nb <= 13; nb += 3) begin
        run(OP_MUL, na, nb);
        run(OP_CONV, na, nb);
        run(OP_ADD, na, nb);
        run(OP_SUB, na, nb);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
