// tb_input_table: writes random rows, checks that every row reads back with
// its string, length, coefficient and valid bit, that unwritten rows stay
// invalid and that `clear` invalidates all rows.
module tb_input_table;
  localparam int N = 16, SB = 4;
  logic clk = 0, rst_n = 0, clear = 0, wr_en = 0;
  logic [3:0]      wr_row = '0;
  logic [8*SB-1:0] wr_str = '0;
  logic [2:0]      wr_len = '0;
  logic [15:0]     wr_coef = '0;
  logic [8*SB-1:0] str [N];
  logic [2:0]      len [N];
  logic [15:0]     coef [N];
  logic            valid [N];
  logic [8*SB-1:0] es [N];
  logic [2:0]      el [N];
  logic [15:0]     ec [N];
  bit              ev [N];
  int checks = 0, failures = 0;

  input_table #(.N(N), .STR_BYTES(SB)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      clear = 1; @(posedge clk); #1; clear = 0;
      for (int r = 0; r < N; r++) ev[r] = 0;
      for (int r = 0; r < N; r++) begin
        checks++; if (valid[r]) begin failures++; $display("FAIL clear row %0d", r); end
      end
      for (int w = 0; w < 12; w++) begin
        automatic int r = $urandom_range(0, N - 1);
        wr_en = 1; wr_row = 4'(r); wr_str = $urandom; wr_len = 3'($urandom_range(0, SB)); wr_coef = 16'($urandom);
        es[r] = wr_str; el[r] = wr_len; ec[r] = wr_coef; ev[r] = 1;
        @(posedge clk); #1;
      end
      wr_en = 0;
      for (int r = 0; r < N; r++) begin
        checks++;
        if (valid[r] !== ev[r] || (ev[r] && (str[r] !== es[r] || len[r] !== el[r] || coef[r] !== ec[r]))) begin
          failures++; $display("FAIL row %0d", r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
