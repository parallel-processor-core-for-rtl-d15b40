// tb_pair_buffer: feeds random lane patterns (some lanes valid) for several
// cycles, then reads the buffer out P pairs per cycle. Checks that pairs
// come out in arrival order (lane order within a cycle), that the count is
// right, that `more` ends the read after ceil(count/P) cycles (at least
// one), and that `clr` empties the buffer.
module tb_pair_buffer;
  import ssc_pkg::*;
  localparam int N = 32, B = 4, P = 3;
  logic clk = 0, rst_n = 0, clr = 0, rd_en = 0;
  logic       in_valid [B];
  coef_pair_t in_pair  [B];
  logic       out_valid [P];
  coef_pair_t out_pair  [P];
  logic       more;
  logic [5:0] count;
  int checks = 0, failures = 0;

  pair_buffer #(.N(N), .B(B), .P(P)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int j = 0; j < B; j++) begin in_valid[j] = 0; in_pair[j] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      automatic coef_pair_t q [$];
      automatic int rounds = 0, pos = 0, cyc = $urandom_range(0, 6);
      automatic bit going = 1;
      q.delete();
      clr = 1; @(posedge clk); #1; clr = 0;
      for (int c = 0; c < cyc; c++) begin
        for (int j = 0; j < B; j++) begin
          in_valid[j] = ($urandom_range(0, 2) != 0);
          in_pair[j]  = coef_pair_t'($urandom);
          if (in_valid[j]) q.push_back(in_pair[j]);
        end
        @(posedge clk); #1;
      end
      for (int j = 0; j < B; j++) in_valid[j] = 0;
      @(posedge clk); #1;
      checks++; if (int'(count) != q.size()) begin failures++; $display("FAIL count %0d exp %0d", count, q.size()); end
      while (going) begin
        rd_en = 1; #1 going = more;
        @(posedge clk); #1; rd_en = 0; rounds++;
        for (int j = 0; j < P; j++) begin
          automatic bit ev = (pos + j < q.size());
          checks++;
          if (out_valid[j] !== ev || (ev && out_pair[j] !== q[pos + j])) begin
            failures++; $display("FAIL t=%0d round %0d lane %0d", t, rounds, j);
          end
        end
        pos += P;
        if (rounds > N) going = 0;
      end
      checks++;
      if (rounds != (q.size() > 0 ? (q.size() + P - 1) / P : 1)) begin
        failures++; $display("FAIL rounds %0d for %0d pairs", rounds, q.size());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
