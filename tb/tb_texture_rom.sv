// tb_texture_rom: fills part of the texture store, then reads 32 random
// addresses per clock, every clock, and checks all of them one clock
// later; also checks that the outputs hold while rd_en is low.
module tb_texture_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int AW = 21, P = 32;
  logic               rd_en;
  logic [P-1:0][AW-1:0] rd_addr, prev;
  logic [P-1:0][31:0]   rd_data, held;
  logic               ld_we = 0;
  logic [AW-1:0]      ld_addr;
  logic [31:0]        ld_data;
  int checks = 0, failures = 0;
  texture_rom #(.AW(AW), .PORTS(P)) dut (.*);

  function automatic logic [31:0] pat(int a); return 32'(a) * 32'h0101_0101 + 32'h0F0F_0000; endfunction

  initial begin
    #10_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int a = 0; a < 4096; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = AW'(a); ld_data = pat(a);
    end
    @(negedge clk); ld_we = 0; rd_en = 1;
    for (int p = 0; p < P; p++) rd_addr[p] = AW'($urandom % 4096);
    for (int t = 0; t < 200; t++) begin
      prev = rd_addr;
      @(negedge clk);
      for (int p = 0; p < P; p++) begin
        checks++;
        if (rd_data[p] !== pat(int'(prev[p]))) begin failures++; if (failures < 5) $display("FAIL port %0d", p); end
        rd_addr[p] = AW'($urandom % 4096);
      end
    end
    held = rd_data; rd_en = 0;
    @(negedge clk); @(negedge clk); checks++;
    if (rd_data !== held) begin failures++; $display("FAIL output did not hold"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
