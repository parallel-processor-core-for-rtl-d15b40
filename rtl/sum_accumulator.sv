// sum_accumulator: the adder of stage E. It adds the products of all P
// multipliers that are valid this cycle to the running dot product.
//
// One cycle per addition (A = 1 in the architecture's timing model): the
// products arriving in cycle t are included in `acc` from cycle t+1.
// `clr` zeroes the accumulator at the start of a comparison. ACC_W is wide
// enough for N full-scale products, so the sum never overflows.
module sum_accumulator #(
  parameter int P      = 8,
  parameter int PROD_W = 32,
  parameter int ACC_W  = 42
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              in_valid [P],
  input  logic [PROD_W-1:0] prod     [P],
  output logic [ACC_W-1:0]  acc
);

  logic [ACC_W-1:0] sum;

  always_comb begin
    sum = acc;
    for (int j = 0; j < P; j++)
      if (in_valid[j]) sum += ACC_W'(prod[j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      acc <= '0;
    else if (clr)
      acc <= '0;
    else
      acc <= sum;
  end

endmodule
