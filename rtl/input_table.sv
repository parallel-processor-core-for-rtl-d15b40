// input_table: the input coefficient table of one tensor (D1 or D2).
//
// Row r holds a basis vector string (up to STR_BYTES bytes, byte 0 first,
// with its length), its 16-bit fixed-point coefficient and a valid bit. The
// host writes one row per cycle (`wr_en`); `clear` invalidates all rows.
// Every row is visible at once on the read side, because each of the n
// stage A slices hashes its own row in parallel.
// The table contents (string, coefficient) follow the architecture; the
// write port, string length limit and valid bits are this design's choices.
module input_table
  import ssc_pkg::*;
#(
  parameter int N         = 1024,
  parameter int STR_BYTES = 40,
  localparam int ROW_W = $clog2(N),
  localparam int LEN_W = $clog2(STR_BYTES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   clear,
  input  logic                   wr_en,
  input  logic [ROW_W-1:0]       wr_row,
  input  logic [8*STR_BYTES-1:0] wr_str,
  input  logic [LEN_W-1:0]       wr_len,
  input  logic [COEF_W-1:0]      wr_coef,
  output logic [8*STR_BYTES-1:0] str   [N],
  output logic [LEN_W-1:0]       len   [N],
  output logic [COEF_W-1:0]      coef  [N],
  output logic                   valid [N]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N; r++) begin
        str[r]   <= '0;
        len[r]   <= '0;
        coef[r]  <= '0;
        valid[r] <= 1'b0;
      end
    end else if (clear) begin
      for (int r = 0; r < N; r++) valid[r] <= 1'b0;
    end else if (wr_en) begin
      str[wr_row]   <= wr_str;
      len[wr_row]   <= wr_len;
      coef[wr_row]  <= wr_coef;
      valid[wr_row] <= 1'b1;
    end
  end

endmodule
