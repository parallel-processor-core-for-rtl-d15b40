// row_scheduler: interconnect 2, between the n slices of stage C and the
// b RAM/CAM lanes of stage D.
//
// Stage C raises RowSelect for every row of D1 that passed the Bloom filter
// test. Only a few rows are expected to, so b << n lookup lanes suffice. Each
// cycle with `issue` high the scheduler takes the (up to) B lowest-numbered
// pending rows, hands the j-th of them to lane j, and retires them, so G
// candidates are served in ceil(G/B) cycles (staggered reads). On the cycle
// with `first` high the pending set is taken straight from `row_sel`. The
// lane outputs are registered: a row issued in cycle t is presented to its
// RAM unit in cycle t+1. `more` (combinational) says whether rows remain
// after the current cycle; `cand_count` is G, the number of candidates.
// The lane outputs carry a full row address, since each RAM unit holds a
// whole copy of D1's table; lowest-row-first order is this design's choice.
module row_scheduler #(
  parameter int N = 1024,
  parameter int B = 16,
  localparam int ROW_W = $clog2(N),
  localparam int CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             issue,
  input  logic             first,
  input  logic [N-1:0]     row_sel,
  output logic             lane_valid [B],
  output logic [ROW_W-1:0] lane_row [B],
  output logic             more,
  output logic [CNT_W-1:0] cand_count
);

  logic [N-1:0]     pending_q, pending, remain;
  logic             pick_v [B];
  logic [ROW_W-1:0] pick_r [B];
  int unsigned      n_pick;

  always_comb begin
    pending = first ? row_sel : pending_q;
    remain  = pending;
    n_pick  = 0;
    for (int j = 0; j < B; j++) begin
      pick_v[j] = 1'b0;
      pick_r[j] = '0;
    end
    for (int r = 0; r < N; r++) begin
      if (pending[r] && n_pick < B) begin
        pick_v[n_pick] = 1'b1;
        pick_r[n_pick] = ROW_W'(r);
        remain[r]      = 1'b0;
        n_pick++;
      end
    end
    more = |remain;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_q  <= '0;
      cand_count <= '0;
      for (int j = 0; j < B; j++) begin
        lane_valid[j] <= 1'b0;
        lane_row[j]   <= '0;
      end
    end else begin
      if (first)
        cand_count <= CNT_W'($countones(row_sel));
      if (issue)
        pending_q <= remain;
      for (int j = 0; j < B; j++) begin
        lane_valid[j] <= issue & pick_v[j];
        lane_row[j]   <= pick_r[j];
      end
    end
  end

endmodule
