// pipe_mult: one coefficient multiplier of stage E.
//
// Multiplies two unsigned COEF_W-bit fixed-point coefficients into a
// 2*COEF_W-bit product. The product appears L cycles after the operands
// (L = 5 in the architecture's timing model); `in_valid` travels with it.
// The product is formed in the first stage and then delayed through L-1
// registers, which a synthesis tool may retime into the multiplier array.
// The latency follows the architecture; unsigned operands and the
// register placement are this design's choices.
module pipe_mult #(
  parameter int COEF_W = 16,
  parameter int L      = 5
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic [COEF_W-1:0]   a,
  input  logic [COEF_W-1:0]   b,
  output logic                out_valid,
  output logic [2*COEF_W-1:0] prod
);

  logic [2*COEF_W-1:0] p_q [L];
  logic                v_q [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < L; s++) begin
        p_q[s] <= '0;
        v_q[s] <= 1'b0;
      end
    end else begin
      p_q[0] <= a * b;
      v_q[0] <= in_valid;
      for (int s = 1; s < L; s++) begin
        p_q[s] <= p_q[s-1];
        v_q[s] <= v_q[s-1];
      end
    end
  end

  assign prod      = p_q[L-1];
  assign out_valid = v_q[L-1];

endmodule
