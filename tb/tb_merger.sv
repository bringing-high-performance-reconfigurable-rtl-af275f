// Self-checking testbench of merger. Random coefficient streams (Q_low, Q_high
// and Delta random, all-ones or small) followed by two zero coefficients are
// merged and the result words compared with the big integer sum C_i x^i formed
// by the testbench with word-serial carry propagation. Then addition and
// subtraction in bypass mode are compared with bignum_ref_pkg::addsub_ref.
// The latency from input to output word must be LAT cycles, and a carry
// delta_i of 2 must occur at least once.
module tb_merger;
  import bignum_ref_pkg::*;
  localparam int unsigned P = 64, LAT = 2;
  logic clk = 0, rst_n = 1;
  logic clear = 0, cin = 0, in_valid = 0, bypass = 0;
  logic [P-1:0] q_low = '0, q_high = '0, delta = '0, b_op = '0;
  logic out_valid;
  logic [P-1:0] s;
  logic [1:0] carry;
  int checks = 0, failures = 0, cycle = 0, carry2 = 0;

  merger #(.P(P), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (carry == 2'd2) carry2++;

  word_t exp_q[$];
  int    cyc_q[$];

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    automatic word_t e = exp_q.pop_front();
    automatic int c = cyc_q.pop_front();
    checks++;
    if (s !== e || cycle - c != LAT) begin
      failures++;
      $display("mismatch: got %h exp %h latency %0d", s, e, cycle - c);
    end
  end

  function automatic word_t pick(int mode);
    case (mode)
      0: return {$urandom, $urandom};
      1: return '1;
      default: return word_t'($urandom_range(7));
    endcase
  endfunction

  task automatic start_op(bit c_in);
    @(negedge clk);
    in_valid = 0; clear = 1; cin = c_in;
    @(negedge clk);
    clear = 0;
  endtask

  task automatic send(word_t lo, word_t hi, word_t dl, word_t bo, bit byp);
    @(negedge clk);
    in_valid = 1; q_low = lo; q_high = hi; delta = dl; b_op = bo; bypass = byp;
  endtask

  initial begin
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Coefficient streams.
    for (int r = 0; r < 60; r++) begin
      automatic int n = $urandom_range(1, 30);
      automatic num_t ref_sum = new[n + 2];
      automatic word_t lo[] = new[n + 2];
      automatic word_t hi[] = new[n + 2];
      automatic word_t dl[] = new[n + 2];
      foreach (ref_sum[i]) ref_sum[i] = '0;
      for (int i = 0; i < n + 2; i++) begin
        if (i < n) begin
          lo[i] = pick(r % 2);
          hi[i] = pick(r % 2);
          dl[i] = pick(2);   // Delta stays small, as in a real product
        end else begin
          lo[i] = '0; hi[i] = '0; dl[i] = '0;
        end
      end
      // Reference: add each part at its word position.
      for (int i = 0; i < n; i++) begin
        word_t part[3];
        part[0] = lo[i]; part[1] = hi[i]; part[2] = dl[i];
        for (int j = 0; j < 3; j++) begin
          automatic logic [64:0] t = {1'b0, ref_sum[i+j]} + {1'b0, part[j]};
          ref_sum[i+j] = t[63:0];
          for (int k = i + j + 1; t[64] && k < n + 2; k++) begin
            t = {1'b0, ref_sum[k]} + 65'd1;
            ref_sum[k] = t[63:0];
          end
        end
      end
      start_op(1'b0);
      for (int i = 0; i < n + 2; i++) begin
        send(lo[i], hi[i], dl[i], '0, 1'b0);
        exp_q.push_back(ref_sum[i]);
        cyc_q.push_back(cycle);
      end
    end
    // Addition and subtraction through the bypass.
    for (int r = 0; r < 60; r++) begin
      automatic bit sub = r[0];
      automatic num_t a = new[$urandom_range(1, 12)];
      automatic num_t b = new[$urandom_range(1, 12)];
      automatic num_t e;
      automatic int n;
      foreach (a[i]) a[i] = rand_word(r % 3);
      foreach (b[i]) b[i] = rand_word((r / 3) % 3);
      e = addsub_ref(a, b, sub);
      n = e.size();
      start_op(sub);
      for (int i = 0; i < n; i++) begin
        automatic word_t x = (i < a.size()) ? a[i] : '0;
        automatic word_t y = (i < b.size()) ? b[i] : '0;
        send(x, '0, '0, sub ? ~y : y, 1'b1);
        exp_q.push_back(e[i]);
        cyc_q.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || carry2 == 0) begin
      failures++;
      $display("left %0d, carry of 2 seen %0d times", exp_q.size(), carry2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
