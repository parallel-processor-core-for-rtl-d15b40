// coef_cam: one CAM unit of stage D, holding a full copy of descriptor D2's
// coefficient table, searched by vector ID.
//
// A lookup compares the key (a vector ID of D1 that passed the Bloom filter
// test) with the IDs of all valid D2 rows at once. On a hit the unit returns
// D2's coefficient as Coeff_b and raises DataReady; a Bloom filter false
// positive finds no entry and is dropped here. Coeff_a (D1's coefficient) is
// carried alongside. The outputs are registered, so a lookup presented in
// cycle t is answered in cycle t+1 (E = 1 in the timing model). If D2 holds
// the same ID twice, the lowest row wins. All N entries are loaded at once
// from the stage A slices when `load` is high.
// Ports Coeff_a, DataReady and Coeff_b follow the architecture; the
// parallel load and the duplicate rule are this design's choices.
module coef_cam
  import ssc_pkg::*;
#(
  parameter int N = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ID_W-1:0]   ld_id    [N],
  input  logic [COEF_W-1:0] ld_coef  [N],
  input  logic              ld_valid [N],
  input  logic              lk_valid,
  input  logic [ID_W-1:0]   lk_id,
  input  logic [COEF_W-1:0] lk_coef_a,
  output logic              data_ready,
  output logic [COEF_W-1:0] coef_a,
  output logic [COEF_W-1:0] coef_b
);

  logic [ID_W-1:0]   key_mem  [N];
  logic [COEF_W-1:0] coef_mem [N];
  logic              vld_mem  [N];
  logic              hit;
  logic [COEF_W-1:0] hit_coef;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        key_mem[r]  <= '0;
        coef_mem[r] <= '0;
        vld_mem[r]  <= 1'b0;
      end
    end else if (load) begin
      for (int r = 0; r < N; r++) begin
        key_mem[r]  <= ld_id[r];
        coef_mem[r] <= ld_coef[r];
        vld_mem[r]  <= ld_valid[r];
      end
    end
  end

  always_comb begin
    hit      = 1'b0;
    hit_coef = '0;
    for (int r = N - 1; r >= 0; r--) begin
      if (vld_mem[r] && key_mem[r] == lk_id) begin
        hit      = 1'b1;
        hit_coef = coef_mem[r];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_ready <= 1'b0;
      coef_a     <= '0;
      coef_b     <= '0;
    end else begin
      data_ready <= lk_valid & hit;
      coef_a     <= lk_coef_a;
      coef_b     <= hit_coef;
    end
  end

endmodule
