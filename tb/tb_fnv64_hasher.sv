// tb_fnv64_hasher: checks the byte-serial FNV-1a hasher against published
// FNV-1a 64-bit test values ("", "a", "foobar") and against a reference
// loop for random strings, including bytes past the length being ignored,
// and checks that the hash is ready after exactly STR_BYTES steps.
module tb_fnv64_hasher;
  localparam int SB = 8;
  logic clk = 0, rst_n = 0, en = 0;
  logic [2:0]      byte_idx = '0;
  logic [8*SB-1:0] str = '0;
  logic [3:0]      len = '0;
  logic [63:0]     hash;
  int checks = 0, failures = 0;

  fnv64_hasher #(.STR_BYTES(SB)) dut (.*);
  always #5 clk = ~clk;

  function automatic logic [63:0] ref_fnv(input logic [8*SB-1:0] s, input int n);
    logic [63:0] h = 64'hcbf29ce484222325;
    for (int i = 0; i < n; i++) h = (h ^ {56'd0, s[8*i +: 8]}) * 64'd1099511628211;
    return h;
  endfunction

  task automatic run(input logic [8*SB-1:0] s, input int n, input logic [63:0] exp);
    str = s; len = 4'(n);
    for (int i = 0; i < SB; i++) begin
      en = 1; byte_idx = 3'(i); @(posedge clk); #1;
    end
    en = 0;
    checks++;
    if (hash !== exp) begin failures++; $display("FAIL len %0d: %h exp %h", n, hash, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run(64'h0, 0, 64'hcbf29ce484222325);
    run({56'h0, "a"}, 1, 64'haf63dc4c8601ec8c);
    run({16'h0, "raboof"}, 6, 64'h85944171f73967e8);
    for (int t = 0; t < 50; t++) begin
      automatic logic [8*SB-1:0] s = {$urandom, $urandom};
      automatic int n = $urandom_range(0, SB);
      run(s, n, ref_fnv(s, n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
