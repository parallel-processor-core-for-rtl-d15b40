// tb_sum_accumulator: presents random products with random valid flags and
// checks the accumulator against a running reference sum one cycle later;
// checks `clr`.
module tb_sum_accumulator;
  localparam int P = 4, ACC_W = 36;
  logic clk = 0, rst_n = 0, clr = 0;
  logic              in_valid [P];
  logic [31:0]       prod [P];
  logic [ACC_W-1:0]  acc, exp;
  int checks = 0, failures = 0;

  sum_accumulator #(.P(P), .PROD_W(32), .ACC_W(ACC_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < P; j++) begin in_valid[j] = 0; prod[j] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 10; t++) begin
      clr = 1; @(posedge clk); #1; clr = 0; exp = '0;
      checks++; if (acc !== '0) begin failures++; $display("FAIL clr"); end
      for (int c = 0; c < 12; c++) begin
        for (int j = 0; j < P; j++) begin
          in_valid[j] = $urandom_range(0, 1); prod[j] = $urandom;
          if (in_valid[j]) exp += ACC_W'(prod[j]);
        end
        @(posedge clk); #1;
        checks++; if (acc !== exp) begin failures++; $display("FAIL acc %h exp %h", acc, exp); end
      end
      for (int j = 0; j < P; j++) in_valid[j] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
