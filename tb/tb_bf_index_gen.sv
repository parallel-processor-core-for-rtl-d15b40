// tb_bf_index_gen: checks the K Bloom filter indices derived from a hash
// against a bit-level reference: f1 = fold(rotl(h,33)), f2 = fold(h),
// index i = rotl17(f1, i) ^ f2, with fold bit j = x[j] ^ x[j+17].
// Also checks two hand-worked values.
module tb_bf_index_gen;
  localparam int K = 7, W = 17;
  logic [63:0]  hash;
  logic [W-1:0] idx [K];
  int checks = 0, failures = 0;

  bf_index_gen #(.K(K), .IDX_W(W)) dut (.*);

  function automatic int ref_idx(input logic [63:0] h, input int i);
    logic [63:0] r; logic [W-1:0] f1, f2, o;
    for (int j = 0; j < 64; j++) r[j] = h[(j + 31) % 64];
    for (int j = 0; j < W; j++) begin
      f1[j] = r[j] ^ r[j + W];
      f2[j] = h[j] ^ h[j + W];
    end
    for (int j = 0; j < W; j++) o[j] = f1[(j + W - i) % W] ^ f2[j];
    return int'(o);
  endfunction

  initial begin
    // h = 1: f2 = 1; rotl(h,33) = 2^33 -> fold gives bit 33-17 = 16 -> f1 = 0x10000
    hash = 64'd1; #1;
    checks++; if (idx[0] !== 17'h10001) begin failures++; $display("FAIL idx0 %h", idx[0]); end
    checks++; if (idx[1] !== 17'h00000) begin failures++; $display("FAIL idx1 %h", idx[1]); end
    for (int t = 0; t < 200; t++) begin
      hash = {$urandom, $urandom}; #1;
      for (int i = 0; i < K; i++) begin
        checks++;
        if (int'(idx[i]) != ref_idx(hash, i)) begin
          failures++; $display("FAIL h=%h i=%0d got %h exp %h", hash, i, idx[i], ref_idx(hash, i));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
