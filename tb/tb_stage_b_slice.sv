// tb_stage_b_slice: writes random index sets into a row filter, one per
// cycle, and compares the filter with a reference bit array; checks that
// `clr` empties it and that nothing is set without `we`.
module tb_stage_b_slice;
  localparam int M = 256;
  logic clk = 0, rst_n = 0, clr = 0, we = 0;
  logic [7:0]   wr_idx = '0;
  logic [M-1:0] bf;
  logic [M-1:0] exp;
  int checks = 0, failures = 0;

  stage_b_slice #(.M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      clr = 1; @(posedge clk); #1; clr = 0; exp = '0;
      checks++; if (bf !== '0) begin failures++; $display("FAIL clear"); end
      for (int i = 0; i < 7; i++) begin
        wr_idx = 8'($urandom); we = ($urandom_range(0, 3) != 0);
        if (we) exp[wr_idx] = 1'b1;
        @(posedge clk); #1;
      end
      we = 0;
      checks++; if (bf !== exp) begin failures++; $display("FAIL bf"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
