// tb_bf_distribute: checks that every copy takes the filter one cycle after
// `load` and keeps it while `load` is low.
module tb_bf_distribute;
  localparam int N = 6, M = 40;
  logic clk = 0, rst_n = 0, load = 0;
  logic [M-1:0] bf = '0, held;
  logic [M-1:0] copy [N];
  int checks = 0, failures = 0;

  bf_distribute #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      bf = M'({$urandom, $urandom}); load = 1; @(posedge clk); #1; load = 0;
      held = bf;
      for (int r = 0; r < N; r++) begin
        checks++; if (copy[r] !== held) begin failures++; $display("FAIL copy %0d", r); end
      end
      bf = ~bf; @(posedge clk); #1;
      for (int r = 0; r < N; r++) begin
        checks++; if (copy[r] !== held) begin failures++; $display("FAIL hold %0d", r); end
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
