// stage_b_slice: the Bloom filter memory of one row (stage B).
//
// Each of the n rows of D2 owns an M-bit filter. `clr` empties it at the
// start of a comparison; each cycle with `we` high sets bit `wr_idx`. The
// controller presents the row's K indices one per cycle, so writing a row's
// filter takes K cycles (W = k in the timing model), in parallel for all rows.
// The per-row filters are ORed together afterwards by bf_consolidate.
// Per-row filters and their OR follow the architecture; one write per cycle
// is this design's reading of W = k.
module stage_b_slice #(
  parameter int M = 131072,
  localparam int IDX_W = $clog2(M)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             we,
  input  logic [IDX_W-1:0] wr_idx,
  output logic [M-1:0]     bf
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      bf <= '0;
    else if (clr)
      bf <= '0;
    else if (we)
      bf[wr_idx] <= 1'b1;
  end

endmodule
