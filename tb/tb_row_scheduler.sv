// tb_row_scheduler: loads random RowSelect vectors and checks that each
// issue cycle hands the next (up to) B lowest candidate rows to lanes
// 0,1,.. in order, that every candidate is issued exactly once, that the
// number of issue cycles is ceil(G/B) (at least one) and that cand_count = G.
module tb_row_scheduler;
  localparam int N = 40, B = 4;
  logic clk = 0, rst_n = 0, issue = 0, first = 0;
  logic [N-1:0] row_sel = '0;
  logic         lane_valid [B];
  logic [5:0]   lane_row [B];
  logic         more;
  logic [5:0]   cand_count;
  int checks = 0, failures = 0;

  row_scheduler #(.N(N), .B(B)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      automatic int list [$];
      int g, rounds, pos;
      bit going;
      list.delete();
      row_sel = '0;
      for (int r = 0; r < N; r++)
        if ($urandom_range(0, 99) < (t % 4) * 25 + 5) row_sel[r] = 1'b1;
      if (t == 0) row_sel = '0;
      for (int r = 0; r < N; r++) if (row_sel[r]) list.push_back(r);
      g = list.size(); rounds = 0; pos = 0; going = 1;
      while (going) begin
        issue = 1; first = (rounds == 0);
        #1 going = more;
        @(posedge clk); #1;
        issue = 0; first = 0;
        rounds++;
        for (int j = 0; j < B; j++) begin
          automatic bit ev = (pos + j < g);
          checks++;
          if (lane_valid[j] !== ev || (ev && int'(lane_row[j]) != list[pos + j])) begin
            failures++; $display("FAIL t=%0d round %0d lane %0d v=%b r=%0d pos=%0d g=%0d exp=%0d", t, rounds, j, lane_valid[j], lane_row[j], pos, g, (pos+j<g) ? list[pos+j] : -1);
          end
        end
        pos += B;
        if (rounds > N) going = 0;
      end
      checks++;
      if (rounds != ((g + B - 1) / B > 0 ? (g + B - 1) / B : 1)) begin
        failures++; $display("FAIL rounds %0d for G=%0d", rounds, g);
      end
      checks++; if (int'(cand_count) != g) begin failures++; $display("FAIL G"); end
      @(posedge clk); #1;
      for (int j = 0; j < B; j++) begin
        checks++; if (lane_valid[j]) begin failures++; $display("FAIL lane stays valid"); end
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
