// stage_a_slice: one of the n slices of stage A. It turns one row's basis
// vector string into the row's vector ID and its K Bloom filter indices.
//
// The slice is an FNV hasher followed by the index generator. The hasher
// runs for STR_BYTES cycles under the controller's byte counter; the 64-bit
// hash becomes the vector ID, and the K indices follow combinationally from
// the registered hash, so they are valid as soon as the hash is.
// The slice structure (one hash, K derived indices) follows the architecture.
module stage_a_slice
  import ssc_pkg::*;
#(
  parameter int STR_BYTES = 40,
  parameter int K         = 7,
  parameter int IDX_W     = 17,
  localparam int BI_W  = (STR_BYTES > 1) ? $clog2(STR_BYTES) : 1,
  localparam int LEN_W = $clog2(STR_BYTES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [BI_W-1:0]        byte_idx,
  input  logic [8*STR_BYTES-1:0] str,
  input  logic [LEN_W-1:0]       len,
  output logic [ID_W-1:0]        vec_id,
  output logic [IDX_W-1:0]       idx [K]
);

  fnv64_hasher #(.STR_BYTES(STR_BYTES)) u_fnv (
    .clk, .rst_n, .en, .byte_idx, .str, .len, .hash(vec_id)
  );

  bf_index_gen #(.K(K), .IDX_W(IDX_W)) u_idx (
    .hash(vec_id), .idx
  );

endmodule
