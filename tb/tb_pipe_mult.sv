// tb_pipe_mult: streams random operand pairs (with gaps) into the
// multiplier and checks each product and its valid flag exactly L cycles
// later, including the extreme values.
module tb_pipe_mult;
  localparam int L = 5;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [31:0] prod;
  logic [31:0] ep [$];
  bit          ev [$];
  int checks = 0, failures = 0;

  pipe_mult #(.COEF_W(16), .L(L)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < L - 1; i++) begin ep.push_back('0); ev.push_back(0); end
    for (int t = 0; t < 300; t++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      a = (t == 5) ? 16'hffff : 16'($urandom);
      b = (t == 5) ? 16'hffff : 16'($urandom);
      ep.push_back(32'(a) * 32'(b)); ev.push_back(in_valid);
      @(posedge clk); #1;
      begin
        automatic logic [31:0] e = ep.pop_front(); automatic bit v = ev.pop_front();
        checks++;
        if (out_valid !== v || (v && prod !== e)) begin failures++; $display("FAIL t=%0d %h exp %h", t, prod, e); end
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
