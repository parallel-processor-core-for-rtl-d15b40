// tb_coef_cam: loads a random table with some invalid and some duplicated
// keys, then looks up present keys, absent keys and keys of invalid rows.
// Checks DataReady, Coeff_b (lowest matching row) and Coeff_a one cycle
// after each lookup, and that DataReady stays low without lk_valid.
module tb_coef_cam;
  localparam int N = 24;
  logic clk = 0, rst_n = 0, load = 0, lk_valid = 0;
  logic [63:0] ld_id [N];
  logic [15:0] ld_coef [N];
  logic        ld_valid [N];
  logic [63:0] lk_id = '0;
  logic [15:0] lk_coef_a = '0;
  logic        data_ready;
  logic [15:0] coef_a, coef_b;
  int checks = 0, failures = 0, hits = 0, misses = 0;

  coef_cam #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < N; r++) begin ld_id[r] = '0; ld_coef[r] = '0; ld_valid[r] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int r = 0; r < N; r++) begin
        ld_id[r] = {$urandom, $urandom}; ld_coef[r] = 16'($urandom);
        ld_valid[r] = ($urandom_range(0, 5) != 0);
      end
      ld_id[N-1] = ld_id[3]; ld_valid[N-1] = 1; ld_valid[3] = 1;   // duplicate key
      load = 1; @(posedge clk); #1; load = 0;
      for (int q = 0; q < 60; q++) begin
        automatic bit eh = 0; automatic logic [15:0] eb = 0; logic [15:0] ea;
        automatic int r = $urandom_range(0, N - 1);
        lk_id = (q % 4 == 3) ? {$urandom, $urandom} : ld_id[r];
        ea = 16'($urandom); lk_coef_a = ea;
        lk_valid = (q % 7 != 6);
        for (int i = N - 1; i >= 0; i--) if (ld_valid[i] && ld_id[i] == lk_id) begin eh = 1; eb = ld_coef[i]; end
        eh = eh & lk_valid;
        @(posedge clk); #1; lk_valid = 0;
        checks++;
        if (data_ready !== eh || (eh && (coef_b !== eb || coef_a !== ea))) begin
          failures++; $display("FAIL q=%0d ready %b exp %b b %h exp %h", q, data_ready, eh, coef_b, eb);
        end
        if (eh) hits++; else misses++;
      end
    end
    checks++; if (hits == 0 || misses == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
