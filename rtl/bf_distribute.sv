// bf_distribute: interconnect 1. Loads the consolidated Bloom filter of D2
// into a private copy for each of the n membership-test slices of stage C.
//
// All n copies are written in the same cycle when `load` is high, so
// distribution costs one cycle (D = 1 in the timing model). Giving each
// slice its own copy lets all n slices read K filter bits without sharing a
// read port. The copies and the one-cycle distribution follow the
// architecture; the flat register per copy is this design's choice.
module bf_distribute #(
  parameter int N = 1024,
  parameter int M = 131072
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [M-1:0] bf,
  output logic [M-1:0] copy [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) copy[r] <= '0;
    end else if (load) begin
      for (int r = 0; r < N; r++) copy[r] <= bf;
    end
  end

endmodule
