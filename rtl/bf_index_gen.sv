// bf_index_gen: derives the K Bloom filter indices of one row from its 64-bit
// FNV hash, as in the architecture's index generator.
//
// The hash is used twice. Copy f1 is rotated by 33 bits and then XOR-folded
// to IDX_W bits; copy f2 is XOR-folded directly. Index i (i = 0 .. K-1) is f1
// rotated by i bits, XORed with f2, so all K indices come out in parallel from
// one hash. Purely combinational.
//
// The 33-bit rotation, the 17-bit fold, and rotations 0 .. K-1 follow the
// architecture. The rotation direction (left) and the fold itself,
// ((x >> IDX_W) ^ x) masked to IDX_W bits (the usual FNV xor-folding), are
// this design's reading.
module bf_index_gen
  import ssc_pkg::*;
#(
  parameter int K     = 7,
  parameter int IDX_W = 17
) (
  input  logic [ID_W-1:0]  hash,
  output logic [IDX_W-1:0] idx [K]
);

  function automatic logic [IDX_W-1:0] xor_fold(input logic [ID_W-1:0] x);
    return IDX_W'((x >> IDX_W) ^ x);
  endfunction

  function automatic logic [IDX_W-1:0] rotl_idx(input logic [IDX_W-1:0] x, input int s);
    return IDX_W'(({x, x} << (s % IDX_W)) >> IDX_W);
  endfunction

  logic [ID_W-1:0]  rot33;
  logic [IDX_W-1:0] f1, f2;

  always_comb begin
    rot33 = {hash[ID_W-34:0], hash[ID_W-1:ID_W-33]};
    f1    = xor_fold(rot33);
    f2    = xor_fold(hash);
    for (int i = 0; i < K; i++)
      idx[i] = rotl_idx(f1, i) ^ f2;
  end

endmodule
