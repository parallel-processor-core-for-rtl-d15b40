// pair_buffer: interconnect 3, between the b CAM lanes of stage D and the
// p multipliers of stage E.
//
// Each cycle up to B lanes may deliver a confirmed pair (Coeff_a, Coeff_b,
// DataReady). The buffer packs the valid ones, in lane order, behind those
// already stored, so no slot is wasted when only some lanes hit. In the
// multiply phase (`rd_en`) it issues the stored pairs P at a time into
// registered outputs that feed the multipliers, so M pairs take ceil(M/P)
// issue cycles. `more` says whether pairs remain after the current read;
// `count` is the number of confirmed pairs. `clr` empties the buffer.
// Depth N covers the worst case in which every row of D1 matches.
// The architecture names this interconnect and its job (matching b producers
// to p < b consumers); the packing buffer itself is this design's choice.
module pair_buffer
  import ssc_pkg::*;
#(
  parameter int N = 1024,
  parameter int B = 16,
  parameter int P = 8,
  localparam int CNT_W = $clog2(N + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             in_valid [B],
  input  coef_pair_t       in_pair  [B],
  input  logic             rd_en,
  output logic             out_valid [P],
  output coef_pair_t       out_pair  [P],
  output logic             more,
  output logic [CNT_W-1:0] count
);

  coef_pair_t     mem [N];
  logic [CNT_W:0] rd_ptr;

  assign more = (rd_ptr + (CNT_W+1)'(P)) < {1'b0, count};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count  <= '0;
      rd_ptr <= '0;
      for (int i = 0; i < N; i++) mem[i] <= '0;
      for (int j = 0; j < P; j++) begin
        out_valid[j] <= 1'b0;
        out_pair[j]  <= '0;
      end
    end else if (clr) begin
      count  <= '0;
      rd_ptr <= '0;
      for (int j = 0; j < P; j++) out_valid[j] <= 1'b0;
    end else begin
      // pack this cycle's confirmed pairs behind the stored ones
      automatic int unsigned wp = 32'(count);
      for (int j = 0; j < B; j++) begin
        if (in_valid[j] && wp < N) begin
          mem[wp] <= in_pair[j];
          wp++;
        end
      end
      count <= CNT_W'(wp);
      // issue up to P pairs to the multipliers
      for (int j = 0; j < P; j++) begin
        out_valid[j] <= rd_en && ((rd_ptr + (CNT_W+1)'(j)) < {1'b0, count});
        out_pair[j]  <= mem[32'(rd_ptr + (CNT_W+1)'(j)) % N];
      end
      if (rd_en)
        rd_ptr <= rd_ptr + (CNT_W+1)'(P);
    end
  end

endmodule
