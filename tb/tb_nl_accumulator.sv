// Self-checking testbench of nl_accumulator: streams of coefficients with 1 to
// 40 terms each, sent back to back or with idle gaps, with random and all-ones
// products (the latter force carries between chunks every cycle). Each output
// is compared with a 192-bit sum formed in the testbench; the latency from the
// last term to the output must be 3 cycles. Counts how often a chunk carry was
// pending, to show the redundant carry path is exercised.
module tb_nl_accumulator;
  localparam int unsigned P = 64;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, first = 0, last = 0;
  logic [2*P-1:0] prod = '0;
  logic out_valid;
  logic [P-1:0] q_low, q_high, delta;
  int checks = 0, failures = 0, cycle = 0, carry_events = 0;

  nl_accumulator #(.P(P)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (dut.cy0 || dut.cy1) carry_events++;

  logic [3*P-1:0] exp_q[$];
  int             cyc_q[$];

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    automatic logic [3*P-1:0] e = exp_q.pop_front();
    automatic int c = cyc_q.pop_front();
    checks++;
    if ({delta, q_high, q_low} !== e || cycle - c != 3) begin
      failures++;
      $display("mismatch: got %h exp %h latency %0d", {delta, q_high, q_low}, e, cycle - c);
    end
  end

  initial begin
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 300; g++) begin
      automatic int len = (g % 7 == 0) ? 1 : $urandom_range(1, 40);
      automatic int mode = g % 3;
      automatic logic [3*P-1:0] sum = '0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        // Occasional idle cycle inside a coefficient.
        if ($urandom_range(9) == 0) begin
          in_valid = 0; first = 0; last = 0;
          @(negedge clk);
        end
        in_valid = 1;
        first    = (t == 0);
        last     = (t == len - 1);
        prod     = (mode == 1) ? '1 : {$urandom, $urandom, $urandom, $urandom};
        sum     += {{P{1'b0}}, prod};
        if (last) begin
          exp_q.push_back(sum);
          cyc_q.push_back(cycle);
        end
      end
      if (g % 4 == 0) begin
        @(negedge clk) in_valid = 0; first = 0; last = 0;
      end
    end
    @(negedge clk) in_valid = 0; first = 0; last = 0;
    repeat (6) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || carry_events == 0) begin
      failures++;
      $display("left %0d, carry events %0d", exp_q.size(), carry_events);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
