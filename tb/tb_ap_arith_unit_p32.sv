// End-to-end testbench of the 32-bit configuration of ap_arith_unit: p = 32,
// a single-stage multiplier (L_mac = MUL_LAT + 3 = 4) and a single-stage merger
// (L_merger = 1), with 4K-word memories. Random multiplications, additions,
// subtractions and convolutions of 1 to 40 words are compared with a 32-bit
// word reference computed here, and the cycle count from start to done is
// checked against issued slots + MEM_LAT + L_mac + L_merger + 2.
module tb_ap_arith_unit_p32;
  import ap_pkg::*;

  localparam int unsigned P = 32, AW = 12, LW = 13, MUL_LAT = 1, L_MAC = 4, L_MERGE = 1;
  localparam int unsigned MEM_LAT = 1;

  typedef logic [31:0] w32_t;
  typedef w32_t        n32_t[];

  logic clk = 0, rst_n = 1, start = 0;
  op_e  op = OP_MUL;
  logic [LW-1:0] n1 = '0, n2 = '0;
  logic [AW-1:0] a_base = '0, b_base = '0, c_base = '0;
  logic busy, done, a_re, b_re, c_we, conv_valid;
  logic [AW-1:0] a_addr, b_addr, c_addr;
  logic [P-1:0] a_rdata, b_rdata, c_wdata, c_rdata_unused;
  logic [LW:0] conv_idx;
  logic [3*P-1:0] conv_data;

  ap_arith_unit #(.P(P), .MUL_LAT(MUL_LAT), .MERGE_LAT(L_MERGE), .ADDR_W(AW),
                  .MEM_LAT(MEM_LAT)) dut (.*);

  obm_model #(.AW(AW), .DW(P), .LAT(MEM_LAT)) mem_a (
    .clk(clk), .re(a_re), .raddr(a_addr), .rdata(a_rdata), .we(1'b0), .waddr('0), .wdata('0));
  obm_model #(.AW(AW), .DW(P), .LAT(MEM_LAT)) mem_b (
    .clk(clk), .re(b_re), .raddr(b_addr), .rdata(b_rdata), .we(1'b0), .waddr('0), .wdata('0));
  obm_model #(.AW(AW), .DW(P), .LAT(MEM_LAT)) mem_c (
    .clk(clk), .re(1'b0), .raddr('0), .rdata(c_rdata_unused), .we(c_we), .waddr(c_addr), .wdata(c_wdata));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic [3*P-1:0] conv_got[$];
  always @(posedge clk) if (conv_valid) conv_got.push_back(conv_data);

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: schoolbook product row by row, 64-bit intermediate.
  function automatic n32_t mul32(n32_t a, n32_t b);
    n32_t r = new[a.size() + b.size() + 1];
    foreach (r[i]) r[i] = '0;
    foreach (a[i]) begin
      logic [63:0] c = '0;
      for (int j = 0; j < b.size() || c != 0; j++) begin
        logic [63:0] t = {32'd0, r[i+j]} + c;
        if (j < b.size()) t += {32'd0, a[i]} * {32'd0, b[j]};
        r[i+j] = t[31:0];
        c = {32'd0, t[63:32]};
      end
    end
    return r;
  endfunction

  function automatic n32_t addsub32(n32_t a, n32_t b, bit sub);
    int n = (a.size() > b.size()) ? a.size() : b.size();
    n32_t r = new[n + 1];
    logic c = sub;
    for (int i = 0; i <= n; i++) begin
      w32_t x = (i < a.size()) ? a[i] : '0;
      w32_t y = (i < b.size()) ? b[i] : '0;
      logic [32:0] t;
      if (sub) y = ~y;
      t = {1'b0, x} + {1'b0, y} + {32'd0, c};
      r[i] = t[31:0];
      c = t[32];
    end
    return r;
  endfunction

  task automatic run(op_e o, n32_t a, n32_t b);
    n32_t   e;
    longint t0, slots, expect_cycles, cycles;
    foreach (a[i]) mem_a.mem[10 + i] = a[i];
    foreach (b[i]) mem_b.mem[1000 + i] = b[i];
    conv_got.delete();
    @(negedge clk);
    start = 1; op = o; n1 = LW'(a.size()); n2 = LW'(b.size());
    a_base = 10; b_base = 1000; c_base = 2000;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done && cycle - t0 < 100_000) @(negedge clk);
    cycles = cycle - t0;
    case (o)
      OP_MUL:  begin slots = a.size() * b.size() + 2; expect_cycles = slots + MEM_LAT + L_MAC + L_MERGE + 2; end
      OP_CONV: begin slots = a.size() * b.size();     expect_cycles = slots + MEM_LAT + L_MAC + 2; end
      default: begin
        slots = ((a.size() > b.size()) ? a.size() : b.size()) + 1;
        expect_cycles = slots + MEM_LAT + L_MERGE + 2;
      end
    endcase
    checks++;
    if (cycles != expect_cycles) begin
      failures++;
      $display("%s: %0d cycles, expected %0d", o.name(), cycles, expect_cycles);
    end
    if (o == OP_CONV) begin
      for (int i = 0; i < a.size() + b.size() - 1; i++) begin
        logic [3*P-1:0] s = '0;
        foreach (a[k]) if (i - k >= 0 && i - k < b.size())
          s += {64'd0, a[k]} * {64'd0, b[i-k]};
        checks++;
        if (i >= conv_got.size() || conv_got[i] !== s) failures++;
      end
    end else begin
      e = (o == OP_MUL) ? mul32(a, b) : addsub32(a, b, o == OP_SUB);
      foreach (e[i]) begin
        checks++;
        if (mem_c.mem[2000 + i] !== e[i]) begin
          failures++;
          $display("%s word %0d: %h, expected %h", o.name(), i, mem_c.mem[2000 + i], e[i]);
        end
      end
    end
  endtask

  function automatic n32_t make(int n, int mode);
    n32_t x = new[n];
    foreach (x[i]) x[i] = (mode == 1 || (mode == 2 && $urandom_range(2) == 0)) ? '1 : w32_t'($urandom);
    return x;
  endfunction

  initial begin
    op_e ops[4] = '{OP_MUL, OP_ADD, OP_SUB, OP_CONV};
    #1 rst_n = 0;   // a falling edge applies the asynchronous reset
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 120; r++)
      run(ops[r % 4], make($urandom_range(1, 40), r % 3), make($urandom_range(1, 40), (r / 4) % 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
