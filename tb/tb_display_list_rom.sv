// tb_display_list_rom: preloads words through the load port and reads them
// back, checking the one-clock read latency.
module tb_display_list_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [15:0] rd_addr, ld_addr;
  logic [31:0] rd_data, ld_data;
  logic        ld_we = 0;
  int checks = 0, failures = 0;
  display_list_rom #(.AW(16)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic logic [31:0] pat(int a); return 32'(a) * 32'h9E37_79B9 ^ 32'h1234_5678; endfunction

  initial begin
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); ld_we = 1; ld_addr = 16'(a * 97); ld_data = pat(a * 97);
    end
    @(negedge clk); ld_we = 0;
    for (int a = 0; a < 512; a++) begin
      @(negedge clk); rd_addr = 16'(a * 97);
      @(negedge clk); checks++;
      if (rd_data !== pat(a * 97)) begin failures++; $display("FAIL addr %0d: %h", a * 97, rd_data); end
    end
    // latency: data must not change until the clock after the address
    @(negedge clk); rd_addr = 16'(97);
    @(posedge clk); #1;
    rd_addr = 16'(194);
    #2; checks++;
    if (rd_data !== pat(97)) begin failures++; $display("FAIL latency"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
