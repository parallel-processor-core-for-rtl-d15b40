// stage_c_slice: one of the n membership-test slices of stage C.
//
// The slice holds the K Bloom filter indices of one row of D1 (the third
// column of D1's coefficient table) and tests them against its copy of D2's
// filter. Indices are written one per cycle (`wr_en`, `wr_sel`), taking K
// cycles like the filter writes of stage B. The test also takes K cycles,
// one filter bit per cycle: `test_first` starts a new test with index 0 and
// each following `test_en` cycle ANDs in the next index. `row_sel` is high
// when the row is valid and all K bits were set: the row is a candidate
// common basis vector (possibly a Bloom filter false positive).
// Testing one index per cycle follows the k-cycle test term of the timing
// model; the storage of the indices inside the slice is this design's choice.
module stage_c_slice #(
  parameter int K = 7,
  parameter int M = 131072,
  localparam int IDX_W = $clog2(M),
  localparam int SEL_W = (K > 1) ? $clog2(K) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [SEL_W-1:0] wr_sel,
  input  logic [IDX_W-1:0] wr_idx,
  input  logic             wr_valid,   // row holds a basis vector
  input  logic             test_en,
  input  logic             test_first,
  input  logic [SEL_W-1:0] test_sel,
  input  logic [M-1:0]     bf_copy,
  output logic             row_sel
);

  logic [IDX_W-1:0] idx_q [K];
  logic             valid_q;
  logic             hit_q;
  logic             bit_set;

  assign bit_set = bf_copy[idx_q[test_sel]];
  assign row_sel = valid_q & hit_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K; i++) idx_q[i] <= '0;
      valid_q <= 1'b0;
      hit_q   <= 1'b0;
    end else begin
      if (wr_en) begin
        idx_q[wr_sel] <= wr_idx;
        valid_q       <= wr_valid;
      end
      if (test_en)
        hit_q <= test_first ? bit_set : (hit_q & bit_set);
    end
  end

endmodule
