// tb_semantic_core: end-to-end test of the semantic comparison core at a
// reduced size (N=16 rows, M=64-bit filter, K=3, B=4 lanes, P=2 multipliers,
// 8-byte strings). The small filter makes Bloom filter false positives
// common, so the CAM's rejection of them is exercised.
//
// Each case builds two random tables of distinct strings, of which a chosen
// number are shared, loads them through the host port, runs one comparison
// and checks the dot product, the candidate count G, the confirmed match
// count and the cycle count against a reference model written here
// independently (bit-level FNV-1a, index folding and filter). It counts how
// often each mechanism occurred: several lookup rounds (G > B), several
// multiply rounds (matches > P), false positives rejected, partially
// filled tables, comparisons with no match, all rows matching.
module tb_semantic_core;
  import ssc_pkg::*;

  localparam int N = 16, M = 64, K = 3, B = 4, P = 2, SB = 8, L = 5;
  localparam int NCASES = 40;
  localparam int WATCHDOG = 200000;

  localparam int IDX_W = $clog2(M), ROW_W = $clog2(N), CNT_W = $clog2(N + 1);
  localparam int LEN_W = $clog2(SB + 1), ACC_W = 32 + $clog2(N);

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 0, wr_tbl = 0, tbl_clear = 0, start = 0;
  logic [ROW_W-1:0] wr_row = '0;
  logic [8*SB-1:0]  wr_str = '0;
  logic [LEN_W-1:0] wr_len = '0;
  logic [15:0]      wr_coef = '0;
  logic busy, done;
  logic [ACC_W-1:0] similarity;
  logic [CNT_W-1:0] cand_count, match_count;
  logic [31:0]      cycles;

  semantic_core #(.N(N), .M(M), .K(K), .B(B), .P(P), .STR_BYTES(SB), .L(L)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_multi_lookup = 0, n_multi_mult = 0, n_false_pos = 0, n_partial = 0,
      n_no_match = 0, n_all_match = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------- reference model
  function automatic logic [63:0] ref_fnv(input logic [8*SB-1:0] s, input int n);
    logic [63:0] h = 64'hcbf29ce484222325;
    for (int i = 0; i < n; i++) begin
      h = h ^ {56'd0, s[8*i +: 8]};
      h = h * 64'd1099511628211;
    end
    return h;
  endfunction

  function automatic int ref_idx(input logic [63:0] h, input int i);
    logic [63:0] r;
    logic [IDX_W-1:0] f1, f2, o;
    for (int j = 0; j < 64; j++) r[j] = h[(j + 64 - 33) % 64];
    for (int j = 0; j < IDX_W; j++) begin
      f1[j] = r[j] ^ ((j + IDX_W < 64) ? r[j + IDX_W] : 1'b0);
      f2[j] = h[j] ^ ((j + IDX_W < 64) ? h[j + IDX_W] : 1'b0);
    end
    for (int j = 0; j < IDX_W; j++) o[j] = f1[(j + IDX_W - (i % IDX_W)) % IDX_W] ^ f2[j];
    return int'(o);
  endfunction

  // ---------------------------------------------------------- stimulus
  logic [8*SB-1:0] s1 [N], s2 [N];
  int              l1 [N], l2 [N];
  logic [15:0]     c1 [N], c2 [N];
  int              uid = 0;

  task automatic make_string(output logic [8*SB-1:0] s, output int n);
    int u = uid++;
    s = '0;
    n = 3 + $urandom_range(0, SB - 3);
    s[7:0]   = 8'(97 + u % 26);
    s[15:8]  = 8'(97 + (u / 26) % 26);
    s[23:16] = 8'(65 + (u / 676) % 26);
    for (int i = 3; i < n; i++) s[8*i +: 8] = 8'(97 + $urandom_range(0, 25));
  endtask

  task automatic write_row(input bit tbl, input int row, input logic [8*SB-1:0] s,
                           input int n, input logic [15:0] c);
    wr_en = 1; wr_tbl = tbl; wr_row = ROW_W'(row); wr_str = s; wr_len = LEN_W'(n); wr_coef = c;
    @(posedge clk); #1;
    wr_en = 0;
  endtask

  task automatic run_case(input int n1, input int n2, input int common, input int maxcoef);
    logic [63:0] id1 [N], id2 [N];
    bit          bf [M];
    int          g, mt, expc, cnt;
    logic [ACC_W-1:0] dot;
    int          perm [N];

    // tables: D2 rows perm[0..common-1] repeat D1 rows 0..common-1
    if (common > n1) common = n1;
    if (common > n2) common = n2;
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = n2 - 1; i > 0; i--) begin
      int j = $urandom_range(0, i);
      int t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    for (int i = 0; i < n1; i++) begin
      make_string(s1[i], l1[i]);
      c1[i] = 16'($urandom_range(0, maxcoef));
    end
    for (int i = 0; i < n2; i++) begin
      make_string(s2[i], l2[i]);
      c2[i] = 16'($urandom_range(0, maxcoef));
    end
    for (int i = 0; i < common; i++) begin
      int r = perm[i];
      s2[r] = s1[i]; l2[r] = l1[i];
    end

    tbl_clear = 1; @(posedge clk); #1; tbl_clear = 0;
    for (int i = 0; i < n1; i++) write_row(0, i, s1[i], l1[i], c1[i]);
    for (int i = 0; i < n2; i++) write_row(1, i, s2[i], l2[i], c2[i]);

    // reference
    for (int i = 0; i < M; i++) bf[i] = 0;
    for (int i = 0; i < n2; i++) begin
      id2[i] = ref_fnv(s2[i], l2[i]);
      for (int k = 0; k < K; k++) bf[ref_idx(id2[i], k)] = 1;
    end
    g = 0; mt = 0; dot = '0;
    for (int i = 0; i < n1; i++) begin
      bit in_bf = 1;
      id1[i] = ref_fnv(s1[i], l1[i]);
      for (int k = 0; k < K; k++) if (!bf[ref_idx(id1[i], k)]) in_bf = 0;
      if (in_bf) begin
        g++;
        for (int j = 0; j < n2; j++)
          if (id2[j] == id1[i]) begin
            mt++;
            dot += ACC_W'(32'(c1[i]) * 32'(c2[j]));
            break;
          end
      end
    end
    expc = 2 * SB + 3 * K + 2 + ((g + B - 1) / B > 1 ? (g + B - 1) / B : 1) + 2
         + ((mt + P - 1) / P > 1 ? (mt + P - 1) / P : 1) + L + 1;

    // run
    start = 1; @(posedge clk); #1; start = 0;
    cnt = 1;
    while (!done) begin @(posedge clk); #1; cnt++; end

    check(similarity == dot, $sformatf("dot n1=%0d n2=%0d c=%0d: got %0d exp %0d", n1, n2, common, similarity, dot));
    check(int'(cand_count) == g, $sformatf("G got %0d exp %0d", cand_count, g));
    check(int'(match_count) == mt, $sformatf("matches got %0d exp %0d", match_count, mt));
    check(int'(cycles) == expc, $sformatf("cycles got %0d exp %0d (G=%0d Mt=%0d)", cycles, expc, g, mt));
    check(cnt == expc + 1, $sformatf("start-to-done %0d exp %0d", cnt, expc + 1));
    @(posedge clk); #1;
    check(!busy, "idle after done");

    if (g > B) n_multi_lookup++;
    if (mt > P) n_multi_mult++;
    if (g > mt) n_false_pos++;
    if (n1 < N || n2 < N) n_partial++;
    if (mt == 0) n_no_match++;
    if (mt == n1 && n1 == N) n_all_match++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    run_case(N, N, N, 65535);        // every row shared
    run_case(N, N, 0, 65535);        // nothing shared
    run_case(N, N, N / 2, 65535);
    run_case(5, 9, 3, 100);          // partly filled tables
    for (int c = 0; c < NCASES; c++)
      run_case($urandom_range(1, N), $urandom_range(1, N), $urandom_range(0, N), 65535);
    check(n_multi_lookup > 0, "several lookup rounds never happened");
    check(n_multi_mult > 0, "several multiply rounds never happened");
    check(n_false_pos > 0, "no Bloom filter false positive was rejected");
    check(n_partial > 0, "no partly filled table");
    check(n_no_match > 0, "no comparison without matches");
    check(n_all_match > 0, "no comparison with every row matching");
    $display("mechanisms: multi_lookup=%0d multi_mult=%0d false_pos=%0d partial=%0d no_match=%0d all_match=%0d",
             n_multi_lookup, n_multi_mult, n_false_pos, n_partial, n_no_match, n_all_match);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
