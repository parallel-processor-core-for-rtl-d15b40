// tb_ssc_controller: runs the controller with scripted lookup and multiply
// round counts and checks the phase sequence, the length of every phase,
// the in-phase counter, the busy cycle count (2T + 3K + 2 + rounds + 2 +
// rounds + L + A) and the one-cycle done pulse.
module tb_ssc_controller;
  import ssc_pkg::*;
  localparam int T = 6, K = 3, L = 5, A = 1;
  logic clk = 0, rst_n = 0, start = 0, sched_more, pair_more;
  phase_t      phase;
  logic [15:0] cnt;
  logic        busy, done;
  logic [31:0] cycles;
  int checks = 0, failures = 0;
  int look_rounds, mult_rounds, look_seen, mult_seen;

  ssc_controller #(.STR_BYTES(T), .K(K), .L(L), .A(A)) dut (.*);
  always #5 clk = ~clk;

  // scheduler / pair buffer stand-ins: report "more" until the scripted
  // number of rounds has been issued
  assign sched_more = (phase == PH_LOOKUP) && (look_seen + 1 < look_rounds);
  assign pair_more  = (phase == PH_MULT)   && (mult_seen + 1 < mult_rounds);
  always_ff @(posedge clk) begin
    if (phase == PH_LOOKUP) look_seen <= look_seen + 1;
    if (phase == PH_MULT)   mult_seen <= mult_seen + 1;
  end

  task automatic expect_phase(input phase_t ph, input int len);
    for (int i = 0; i < len; i++) begin
      checks++;
      if (phase !== ph || int'(cnt) != i || !busy) begin
        failures++; $display("FAIL expected %s cycle %0d, got %s cnt %0d", ph.name(), i, phase.name(), cnt);
      end
      @(posedge clk); #1;
    end
  endtask

  initial begin
    look_seen = 0; mult_seen = 0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      look_rounds = 1 + t; mult_rounds = 1 + 2 * t; look_seen = 0; mult_seen = 0;
      checks++; if (busy) begin failures++; $display("FAIL busy before start"); end
      start = 1; @(posedge clk); #1; start = 0;
      expect_phase(PH_HASH2, T);  expect_phase(PH_WRBF, K);
      expect_phase(PH_OR, 1);     expect_phase(PH_DIST, 1);
      expect_phase(PH_HASH1, T);  expect_phase(PH_WRIDX, K);
      expect_phase(PH_TEST, K);   expect_phase(PH_LOOKUP, look_rounds);
      expect_phase(PH_CAM, 1);    expect_phase(PH_APPEND, 1);
      expect_phase(PH_MULT, mult_rounds); expect_phase(PH_DRAIN, L + A);
      checks++;
      if (!done || busy || int'(cycles) != 2*T + 3*K + 2 + look_rounds + 2 + mult_rounds + L + A) begin
        failures++; $display("FAIL end: done %b cycles %0d", done, cycles);
      end
      @(posedge clk); #1;
      checks++; if (done) begin failures++; $display("FAIL done longer than one cycle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
