// tb_stage_a_slice: checks that a stage A slice produces the FNV-1a vector
// ID of its string and the K indices derived from it (reference model in
// the testbench) after STR_BYTES hashing cycles.
module tb_stage_a_slice;
  localparam int SB = 6, K = 5, W = 10;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0]      byte_idx = '0;
  logic [8*SB-1:0] str = '0;
  logic [2:0]      len = '0;
  logic [63:0]     vec_id;
  logic [W-1:0]    idx [K];
  int checks = 0, failures = 0;

  stage_a_slice #(.STR_BYTES(SB), .K(K), .IDX_W(W)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] ref_fnv(input logic [8*SB-1:0] s, input int n);
    logic [63:0] h = 64'hcbf29ce484222325;
    for (int i = 0; i < n; i++) h = (h ^ {56'd0, s[8*i +: 8]}) * 64'd1099511628211;
    return h;
  endfunction
  function automatic int ref_idx(input logic [63:0] h, input int i);
    logic [63:0] r; logic [W-1:0] f1, f2, o;
    for (int j = 0; j < 64; j++) r[j] = h[(j + 31) % 64];
    for (int j = 0; j < W; j++) begin f1[j] = r[j] ^ r[j + W]; f2[j] = h[j] ^ h[j + W]; end
    for (int j = 0; j < W; j++) o[j] = f1[(j + W - i) % W] ^ f2[j];
    return int'(o);
  endfunction

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      logic [63:0] e;
      str = 48'({$urandom, $urandom}); len = 3'($urandom_range(0, SB));
      for (int i = 0; i < SB; i++) begin en = 1; byte_idx = 3'(i); @(posedge clk); #1; end
      en = 0;
      e = ref_fnv(str, int'(len));
      checks++; if (vec_id !== e) begin failures++; $display("FAIL id %h exp %h", vec_id, e); end
      for (int i = 0; i < K; i++) begin
        checks++; if (int'(idx[i]) != ref_idx(e, i)) begin failures++; $display("FAIL idx %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
