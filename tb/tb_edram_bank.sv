// tb_edram_bank: writes words with all per-pixel masks and checks the
// read-back against a model of what each 64-bit half should hold.
module tb_edram_bank;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, we = 0;
  logic [1:0] wmask;
  logic [15:0] addr;
  logic [127:0] wdata, rdata;
  logic [127:0] model [64];
  int checks = 0, failures = 0;
  edram_bank #(.AW(16)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); en = 1; we = 1; wmask = 2'b11; addr = 16'(a * 1021);
      wdata = {4{$urandom}}; model[a] = wdata;
    end
    for (int k = 0; k < 300; k++) begin
      int a;
      a = $urandom % 64;
      @(negedge clk); en = 1; we = 1; wmask = 2'($urandom); addr = 16'(a * 1021);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      if (wmask[0]) model[a][63:0] = wdata[63:0];
      if (wmask[1]) model[a][127:64] = wdata[127:64];
      a = $urandom % 64;
      @(negedge clk); we = 0; addr = 16'(a * 1021);
      @(negedge clk); en = 0; checks++;
      if (rdata !== model[a]) begin failures++; if (failures < 5) $display("FAIL word %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
