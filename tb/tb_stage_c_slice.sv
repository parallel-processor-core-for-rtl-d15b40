// tb_stage_c_slice: writes K indices into a slice one per cycle, runs the
// K-cycle membership test against a random filter copy and checks RowSelect
// against a reference (valid row and all K bits set). Filters are made so
// that hits, single misses and invalid rows all occur.
module tb_stage_c_slice;
  localparam int K = 4, M = 32;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_valid = 0, test_en = 0, test_first = 0;
  logic [1:0]   wr_sel = '0, test_sel = '0;
  logic [4:0]   wr_idx = '0;
  logic [M-1:0] bf_copy = '0;
  logic         row_sel;
  int checks = 0, failures = 0, hits = 0;

  stage_c_slice #(.K(K), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [4:0] ix [K];
      bit v, exp;
      v = ($urandom_range(0, 7) != 0);
      for (int i = 0; i < K; i++) ix[i] = 5'($urandom);
      bf_copy = 32'($urandom);
      if (t % 3 == 0) for (int i = 0; i < K; i++) bf_copy[ix[i]] = 1'b1;
      exp = v;
      for (int i = 0; i < K; i++) if (!bf_copy[ix[i]]) exp = 0;
      for (int i = 0; i < K; i++) begin
        wr_en = 1; wr_sel = 2'(i); wr_idx = ix[i]; wr_valid = v; @(posedge clk); #1;
      end
      wr_en = 0;
      for (int i = 0; i < K; i++) begin
        test_en = 1; test_first = (i == 0); test_sel = 2'(i); @(posedge clk); #1;
      end
      test_en = 0;
      checks++;
      if (row_sel !== exp) begin failures++; $display("FAIL t=%0d got %b exp %b", t, row_sel, exp); end
      if (exp) hits++;
    end
    checks++; if (hits == 0) begin failures++; $display("FAIL no hit case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
