// tb_bf_consolidate: drives random sparse row filters and checks that the
// registered output is their OR one cycle after `en`, and holds otherwise.
module tb_bf_consolidate;
  localparam int N = 8, M = 64;
  logic clk = 0, rst_n = 0, en = 0;
  logic [M-1:0] row_bf [N];
  logic [M-1:0] bf, exp, prev;
  int checks = 0, failures = 0;

  bf_consolidate #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < N; r++) row_bf[r] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      exp = '0;
      for (int r = 0; r < N; r++) begin
        row_bf[r] = '0;
        for (int i = 0; i < 3; i++) row_bf[r][$urandom_range(0, M - 1)] = 1'b1;
        exp |= row_bf[r];
      end
      prev = bf;
      en = 0; @(posedge clk); #1;
      checks++; if (bf !== prev) begin failures++; $display("FAIL hold"); end
      en = 1; @(posedge clk); #1; en = 0;
      checks++; if (bf !== exp) begin failures++; $display("FAIL or %h exp %h", bf, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
