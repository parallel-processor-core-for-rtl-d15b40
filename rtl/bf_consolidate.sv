// bf_consolidate: merges the n per-row Bloom filters of stage B into the
// single filter of descriptor D2.
//
// The combined filter is the bitwise OR of all row filters. The OR is built
// as a tree of two-input OR stages (the cascaded OR gates of the
// architecture) and registered once when `en` is high, so consolidation
// costs one cycle (O = 1 in the timing model).
module bf_consolidate #(
  parameter int N = 1024,
  parameter int M = 131072
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [M-1:0] row_bf [N],
  output logic [M-1:0] bf
);

  logic [M-1:0] or_all;

  always_comb begin
    or_all = '0;
    for (int r = 0; r < N; r++)
      or_all |= row_bf[r];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      bf <= '0;
    else if (en)
      bf <= or_all;
  end

endmodule
