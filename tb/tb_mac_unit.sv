// Self-checking testbench of mac_unit: coefficients of 1 to 50 terms of random
// or all-ones word pairs, issued one term per cycle without gaps, as the
// convolution schedule does. Each coefficient is compared with a 192-bit sum
// of products formed in the testbench, and must leave L_mac = MUL_LAT + 3
// cycles after its last term.
module tb_mac_unit;
  localparam int unsigned P = 64, MUL_LAT = 8, L_MAC = MUL_LAT + 3;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, first = 0, last = 0;
  logic [P-1:0] a = '0, b = '0;
  logic out_valid;
  logic [P-1:0] q_low, q_high, delta;
  int checks = 0, failures = 0, cycle = 0, big_delta = 0;

  mac_unit #(.P(P), .MUL_LAT(MUL_LAT)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

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
    if (delta > 1) big_delta++;
    if ({delta, q_high, q_low} !== e || cycle - c != L_MAC) begin
      failures++;
      $display("mismatch: got %h exp %h latency %0d", {delta, q_high, q_low}, e, cycle - c);
    end
  end

  initial begin
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 200; g++) begin
      automatic int len = $urandom_range(1, 50);
      automatic bit ones = (g % 3 == 1);
      automatic logic [3*P-1:0] sum = '0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        in_valid = 1;
        first    = (t == 0);
        last     = (t == len - 1);
        a        = ones ? '1 : {$urandom, $urandom};
        b        = ones ? '1 : {$urandom, $urandom};
        sum     += {{2*P{1'b0}}, a} * {{2*P{1'b0}}, b};
        if (last) begin
          exp_q.push_back(sum);
          cyc_q.push_back(cycle);
        end
      end
    end
    @(negedge clk) in_valid = 0; first = 0; last = 0;
    repeat (L_MAC + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || big_delta == 0) begin
      failures++;
      $display("left %0d, coefficients with Delta > 1: %0d", exp_q.size(), big_delta);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
