// tb_coef_ram: loads a random table in one cycle and reads every row back;
// checks that a later load replaces the contents and that rows hold
// without `load`.
module tb_coef_ram;
  localparam int N = 32;
  logic clk = 0, rst_n = 0, load = 0;
  logic [63:0] ld_id [N];
  logic [15:0] ld_coef [N];
  logic [4:0]  rd_row = '0;
  logic [63:0] rd_id;
  logic [15:0] rd_coef;
  logic [63:0] eid [N];
  logic [15:0] ec [N];
  int checks = 0, failures = 0;

  coef_ram #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < N; r++) begin ld_id[r] = '0; ld_coef[r] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int t = 0; t < 5; t++) begin
      for (int r = 0; r < N; r++) begin
        ld_id[r] = {$urandom, $urandom}; ld_coef[r] = 16'($urandom);
        eid[r] = ld_id[r]; ec[r] = ld_coef[r];
      end
      load = 1; @(posedge clk); #1; load = 0;
      for (int r = 0; r < N; r++) begin ld_id[r] = ~ld_id[r]; ld_coef[r] = ~ld_coef[r]; end
      @(posedge clk); #1;
      for (int r = 0; r < N; r++) begin
        rd_row = 5'(r); #1;
        checks++;
        if (rd_id !== eid[r] || rd_coef !== ec[r]) begin failures++; $display("FAIL row %0d", r); end
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
