// Self-checking testbench of pipelined_multiplier: random and extreme operand
// pairs every cycle (with gaps), each product compared with a 128-bit product
// computed in the testbench, and the latency checked to be exactly LAT.
module tb_pipelined_multiplier;
  localparam int unsigned P = 64, LAT = 8;
  logic clk = 0, rst_n = 1;
  logic in_valid = 0, out_valid;
  logic [P-1:0] a = '0, b = '0;
  logic [3:0] in_tag = '0, out_tag;
  logic [2*P-1:0] prod;
  int checks = 0, failures = 0;
  int cycle = 0;

  pipelined_multiplier #(.P(P), .LAT(LAT), .TAG_W(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  // Expected results, tagged with the issue cycle.
  logic [2*P-1:0] exp_q[$];
  int             cyc_q[$];
  logic [3:0]     tag_q[$];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (out_valid) begin
    automatic logic [2*P-1:0] e = exp_q.pop_front();
    automatic int c = cyc_q.pop_front();
    automatic logic [3:0] t = tag_q.pop_front();
    checks++;
    if (prod !== e || out_tag !== t || cycle - c != LAT) begin
      failures++;
      $display("mismatch: prod %h exp %h tag %h/%h latency %0d", prod, e, out_tag, t, cycle - c);
    end
  end

  initial begin
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(4) != 0);
      case (n % 5)
        0: begin a = '1; b = '1; end
        1: begin a = '1; b = {$urandom, $urandom}; end
        default: begin a = {$urandom, $urandom}; b = {$urandom, $urandom}; end
      endcase
      in_tag = 4'($urandom);
      if (in_valid) begin
        exp_q.push_back({{P{1'b0}}, a} * {{P{1'b0}}, b});
        cyc_q.push_back(cycle);
        tag_q.push_back(in_tag);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d products never came out", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
