// Pipelined p x p unsigned multiplier: the fixed-precision core of the MAC
// process.
//
// With LAT >= 3 the operands are registered, the product is formed from four
// half-width partial products (aL*bL, aL*bH, aH*bL, aH*bH) that are registered
// separately, and the next stage adds them with the proper shifts; any further
// stages are plain registers that give synthesis room to retime. With LAT of 1
// or 2 the full product is computed in one step and then delayed. A side-band
// tag of TAG_W bits travels alongside the operands with the same delay.
//
// Timing: out_valid/prod/out_tag appear exactly LAT cycles after in_valid/a/b/
// in_tag. A new pair is accepted every cycle. The paper only names a p-digit by
// p-digit multiplier; the split into half products and the latency are this
// design's choices (the default LAT = 8 makes the MAC latency 11, the value the
// paper gives for its 64-bit unit).
module pipelined_multiplier #(
  parameter int unsigned P     = 64,
  parameter int unsigned LAT   = 8,
  parameter int unsigned TAG_W = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [P-1:0]     a,
  input  logic [P-1:0]     b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [2*P-1:0]   prod,
  output logic [TAG_W-1:0] out_tag
);

  localparam int unsigned H = P / 2;

  // Valid and tag delay line, LAT stages.
  logic [LAT-1:0]           v_pipe;
  logic [TAG_W-1:0]         t_pipe [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_pipe <= '0;
      for (int s = 0; s < LAT; s++) t_pipe[s] <= '0;
    end else begin
      v_pipe[0] <= in_valid;
      t_pipe[0] <= in_tag;
      for (int s = 1; s < LAT; s++) begin
        v_pipe[s] <= v_pipe[s-1];
        t_pipe[s] <= t_pipe[s-1];
      end
    end
  end

  assign out_valid = v_pipe[LAT-1];
  assign out_tag   = t_pipe[LAT-1];

  // Product pipeline.
  logic [2*P-1:0] p_pipe [LAT];

  if (LAT >= 3) begin : g_split
    logic [P-1:0]   a_r, b_r;
    logic [2*H-1:0] pp_ll, pp_lh, pp_hl, pp_hh;
    logic [2*P-1:0] sum;

    always_comb begin
      sum = {pp_hh, pp_ll}
          + ({{(2*P-2*H){1'b0}}, pp_lh} << H)
          + ({{(2*P-2*H){1'b0}}, pp_hl} << H);
    end

    always_ff @(posedge clk) begin
      a_r   <= a;
      b_r   <= b;
      pp_ll <= a_r[H-1:0] * b_r[H-1:0];
      pp_lh <= a_r[H-1:0] * b_r[P-1:H];
      pp_hl <= a_r[P-1:H] * b_r[H-1:0];
      pp_hh <= a_r[P-1:H] * b_r[P-1:H];
      p_pipe[2] <= sum;
      for (int s = 3; s < LAT; s++) p_pipe[s] <= p_pipe[s-1];
    end
    // Stages 0 and 1 hold operands and partial products, not the product.
    assign p_pipe[0] = '0;
    assign p_pipe[1] = '0;
  end else begin : g_direct
    always_ff @(posedge clk) begin
      p_pipe[0] <= {{P{1'b0}}, a} * {{P{1'b0}}, b};
      for (int s = 1; s < LAT; s++) p_pipe[s] <= p_pipe[s-1];
    end
  end

  assign prod = p_pipe[LAT-1];

endmodule
