// fnv64_hasher: byte-serial 64-bit FNV hash of one basis vector string.
//
// The string arrives as a packed vector of STR_BYTES bytes, byte 0 (the first
// character) in bits [7:0], with its length in `len`. While `en` is high the
// unit hashes byte `byte_idx` (driven by the controller, 0 .. STR_BYTES-1).
// At byte_idx 0 it starts from the FNV offset basis, so no separate clear is
// needed. Bytes at or beyond `len` leave the hash unchanged, so every slice
// runs for the same STR_BYTES cycles (t_FNV) whatever its string length.
//
// Timing: one byte per clock; `hash` is valid the cycle after the step with
// byte_idx = STR_BYTES-1 and holds until the next `en`.
// The use of FNV with a 64-bit result follows the architecture; the FNV-1a
// variant and the one-byte-per-cycle rate are this design's choice.
module fnv64_hasher
  import ssc_pkg::*;
#(
  parameter int STR_BYTES = 40,
  localparam int BI_W  = (STR_BYTES > 1) ? $clog2(STR_BYTES) : 1,
  localparam int LEN_W = $clog2(STR_BYTES + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   en,
  input  logic [BI_W-1:0]        byte_idx,
  input  logic [8*STR_BYTES-1:0] str,
  input  logic [LEN_W-1:0]       len,
  output logic [ID_W-1:0]        hash
);

  logic [ID_W-1:0] base;
  logic [7:0]      cur_byte;

  always_comb begin
    base     = (byte_idx == '0) ? FNV64_OFFSET : hash;
    cur_byte = str[8*byte_idx +: 8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      hash <= FNV64_OFFSET;
    else if (en)
      hash <= (LEN_W'(byte_idx) < len) ? fnv1a_step(base, cur_byte) : base;
  end

endmodule
