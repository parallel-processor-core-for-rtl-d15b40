// coef_ram: one RAM unit of stage D, holding a full copy of descriptor D1's
// coefficient table (vector ID and coefficient of every row).
//
// There are B copies, one per lookup lane, so B rows can be read in the
// same cycle. All N rows are written at once from the stage A slices when
// `load` is high (the vector IDs are computed on chip). The read is
// asynchronous: `rd_row` selects the row whose vector ID goes to the lane's
// CAM unit as the search key and whose coefficient travels with it as
// Coeff_a. The B copies and the 64-bit ID path to the CAM follow the
// architecture; the parallel load port is this design's choice.
module coef_ram
  import ssc_pkg::*;
#(
  parameter int N = 1024,
  localparam int ROW_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,
  input  logic [ID_W-1:0]   ld_id   [N],
  input  logic [COEF_W-1:0] ld_coef [N],
  input  logic [ROW_W-1:0]  rd_row,
  output logic [ID_W-1:0]   rd_id,
  output logic [COEF_W-1:0] rd_coef
);

  logic [ID_W-1:0]   id_mem   [N];
  logic [COEF_W-1:0] coef_mem [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        id_mem[r]   <= '0;
        coef_mem[r] <= '0;
      end
    end else if (load) begin
      for (int r = 0; r < N; r++) begin
        id_mem[r]   <= ld_id[r];
        coef_mem[r] <= ld_coef[r];
      end
    end
  end

  assign rd_id   = id_mem[rd_row];
  assign rd_coef = coef_mem[rd_row];

endmodule
