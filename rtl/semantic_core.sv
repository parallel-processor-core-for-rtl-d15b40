// semantic_core: a semantic comparison core. It computes the dot product of
// two sparse meaning tensors D1 and D2, each given as a table of basis
// vector strings with 16-bit fixed-point weights, as the sum of the weight
// products of the strings the two tables share.
//
// Flow of one comparison (see ssc_controller for the cycle counts):
//  A  N stage-A slices hash every row of D2 (FNV-64 = vector ID) and derive
//     K Bloom filter (BF) indices per row.
//  B  Each row sets its K bits in its own M-bit filter; the N filters are
//     ORed into D2's filter and copied to every stage-C slice (interconnect 1).
//     D2's IDs and coefficients are loaded into the B CAM units.
//  A  The same slices then hash every row of D1; the K indices go into the
//     stage-C slices, the IDs and coefficients into the B RAM units.
//  C  Every D1 row tests its K bits against D2's filter (RowSelect).
//  D  Interconnect 2 hands the candidates to B RAM/CAM lanes, B per cycle;
//     the CAM confirms a true common vector and returns D2's coefficient.
//  E  Interconnect 3 packs the confirmed pairs and issues P per cycle to P
//     pipelined multipliers; the adder accumulates the products.
//
// Host interface: write rows with wr_en/wr_tbl/wr_row/wr_str/wr_len/wr_coef
// (wr_tbl 0 = D1, 1 = D2), clear both tables with tbl_clear, then pulse
// `start` while idle. `done` pulses when `similarity` holds D1.D2 (an
// unsigned integer sum of 16x16-bit products; the binary point follows from
// the coefficients' format). `cand_count` is the number of BF candidates,
// `match_count` the number of confirmed common vectors, `cycles` the busy
// cycles. Rows must not be written while busy. The stage structure, slice
// counts and timing follow the architecture; the host interface is this
// design's own.
module semantic_core
  import ssc_pkg::*;
#(
  parameter int N         = 1024,
  parameter int M         = 131072,
  parameter int K         = 7,
  parameter int B         = 16,
  parameter int P         = 8,
  parameter int STR_BYTES = 40,
  parameter int L         = 5,
  localparam int IDX_W = $clog2(M),
  localparam int ROW_W = $clog2(N),
  localparam int CNT_W = $clog2(N + 1),
  localparam int LEN_W = $clog2(STR_BYTES + 1),
  localparam int BI_W  = (STR_BYTES > 1) ? $clog2(STR_BYTES) : 1,
  localparam int SEL_W = (K > 1) ? $clog2(K) : 1,
  localparam int ACC_W = PROD_W + $clog2(N)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic                   wr_tbl,
  input  logic [ROW_W-1:0]       wr_row,
  input  logic [8*STR_BYTES-1:0] wr_str,
  input  logic [LEN_W-1:0]       wr_len,
  input  logic [COEF_W-1:0]      wr_coef,
  input  logic                   tbl_clear,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic [ACC_W-1:0]       similarity,
  output logic [CNT_W-1:0]       cand_count,
  output logic [CNT_W-1:0]       match_count,
  output logic [31:0]            cycles
);

  // ---------------------------------------------------------------- control
  phase_t      phase;
  logic [15:0] cnt;
  logic        sched_more, pair_more;
  logic        begin_cmp;

  ssc_controller #(.STR_BYTES(STR_BYTES), .K(K), .L(L), .A(1)) u_ctrl (
    .clk, .rst_n, .start, .sched_more, .pair_more,
    .phase, .cnt, .busy, .done, .cycles
  );

  assign begin_cmp = (phase == PH_IDLE) && start;

  // ---------------------------------------------------------- input tables
  logic [8*STR_BYTES-1:0] str1 [N], str2 [N];
  logic [LEN_W-1:0]       len1 [N], len2 [N];
  logic [COEF_W-1:0]      coef1 [N], coef2 [N];
  logic                   valid1 [N], valid2 [N];

  input_table #(.N(N), .STR_BYTES(STR_BYTES)) u_tbl1 (
    .clk, .rst_n, .clear(tbl_clear), .wr_en(wr_en && !wr_tbl), .wr_row, .wr_str,
    .wr_len, .wr_coef, .str(str1), .len(len1), .coef(coef1), .valid(valid1)
  );

  input_table #(.N(N), .STR_BYTES(STR_BYTES)) u_tbl2 (
    .clk, .rst_n, .clear(tbl_clear), .wr_en(wr_en && wr_tbl), .wr_row, .wr_str,
    .wr_len, .wr_coef, .str(str2), .len(len2), .coef(coef2), .valid(valid2)
  );

  // ------------------------------------------------ stages A, B and C slices
  logic             hash_en, use_d2;
  logic [ID_W-1:0]  vec_id  [N];
  logic [IDX_W-1:0] bf_idx  [N][K];
  logic [M-1:0]     row_bf  [N];
  logic [M-1:0]     bf_copy [N];
  logic [N-1:0]     row_sel;
  logic [SEL_W-1:0] ksel;

  assign hash_en = (phase == PH_HASH2) || (phase == PH_HASH1);
  assign use_d2  = (phase == PH_HASH2);
  assign ksel    = SEL_W'(cnt);

  for (genvar r = 0; r < N; r++) begin : g_row
    stage_a_slice #(.STR_BYTES(STR_BYTES), .K(K), .IDX_W(IDX_W)) u_a (
      .clk, .rst_n, .en(hash_en), .byte_idx(BI_W'(cnt)),
      .str(use_d2 ? str2[r] : str1[r]),
      .len(use_d2 ? len2[r] : len1[r]),
      .vec_id(vec_id[r]), .idx(bf_idx[r])
    );

    stage_b_slice #(.M(M)) u_b (
      .clk, .rst_n, .clr(begin_cmp),
      .we((phase == PH_WRBF) && valid2[r]),
      .wr_idx(bf_idx[r][ksel]), .bf(row_bf[r])
    );

    stage_c_slice #(.K(K), .M(M)) u_c (
      .clk, .rst_n,
      .wr_en(phase == PH_WRIDX), .wr_sel(ksel), .wr_idx(bf_idx[r][ksel]),
      .wr_valid(valid1[r]),
      .test_en(phase == PH_TEST), .test_first(cnt == '0), .test_sel(ksel),
      .bf_copy(bf_copy[r]), .row_sel(row_sel[r])
    );
  end

  logic [M-1:0] bf_d2;

  bf_consolidate #(.N(N), .M(M)) u_or (
    .clk, .rst_n, .en(phase == PH_OR), .row_bf, .bf(bf_d2)
  );

  bf_distribute #(.N(N), .M(M)) u_ic1 (
    .clk, .rst_n, .load(phase == PH_DIST), .bf(bf_d2), .copy(bf_copy)
  );

  // -------------------------------------------------------------- stage D
  logic             lane_valid [B];
  logic [ROW_W-1:0] lane_row   [B];
  logic             lane_ready [B];
  coef_pair_t       lane_pair  [B];

  row_scheduler #(.N(N), .B(B)) u_ic2 (
    .clk, .rst_n, .issue(phase == PH_LOOKUP),
    .first((phase == PH_LOOKUP) && (cnt == '0)),
    .row_sel, .lane_valid, .lane_row, .more(sched_more), .cand_count
  );

  for (genvar j = 0; j < B; j++) begin : g_lane
    logic [ID_W-1:0]   key;
    logic [COEF_W-1:0] ca;

    coef_ram #(.N(N)) u_ram (
      .clk, .rst_n, .load((phase == PH_WRIDX) && (cnt == '0)),
      .ld_id(vec_id), .ld_coef(coef1),
      .rd_row(lane_row[j]), .rd_id(key), .rd_coef(ca)
    );

    coef_cam #(.N(N)) u_cam (
      .clk, .rst_n, .load((phase == PH_WRBF) && (cnt == '0)),
      .ld_id(vec_id), .ld_coef(coef2), .ld_valid(valid2),
      .lk_valid(lane_valid[j]), .lk_id(key), .lk_coef_a(ca),
      .data_ready(lane_ready[j]),
      .coef_a(lane_pair[j].coef_a), .coef_b(lane_pair[j].coef_b)
    );
  end

  // -------------------------------------------------------------- stage E
  logic                mul_in_v  [P];
  coef_pair_t          mul_in    [P];
  logic                mul_out_v [P];
  logic [PROD_W-1:0]   mul_out   [P];

  pair_buffer #(.N(N), .B(B), .P(P)) u_ic3 (
    .clk, .rst_n, .clr(begin_cmp), .in_valid(lane_ready), .in_pair(lane_pair),
    .rd_en(phase == PH_MULT), .out_valid(mul_in_v), .out_pair(mul_in),
    .more(pair_more), .count(match_count)
  );

  for (genvar j = 0; j < P; j++) begin : g_mul
    pipe_mult #(.COEF_W(COEF_W), .L(L)) u_mul (
      .clk, .rst_n, .in_valid(mul_in_v[j]), .a(mul_in[j].coef_a),
      .b(mul_in[j].coef_b), .out_valid(mul_out_v[j]), .prod(mul_out[j])
    );
  end

  sum_accumulator #(.P(P), .PROD_W(PROD_W), .ACC_W(ACC_W)) u_add (
    .clk, .rst_n, .clr(begin_cmp), .in_valid(mul_out_v), .prod(mul_out),
    .acc(similarity)
  );

endmodule
