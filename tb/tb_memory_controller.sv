// tb_memory_controller: writes pixels through the host port, then reads and
// writes whole quads through the pixel ports and checks them against a
// pixel-level model, including per-pixel write masks, the conflict signal
// (read and write in the same bank pair, which must block the read) and
// simultaneous non-conflicting read and write.
module tb_memory_controller;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en = 0, wr_en = 0, conflict;
  logic [QW-1:0] rd_qx, rd_qy, wr_qx, wr_qy;
  logic [255:0] rd_data, wr_data;
  logic [3:0] wr_pmask;
  logic host_req = 0, host_we = 0, host_gnt;
  logic [9:0] host_x, host_y;
  logic [63:0] host_wdata, host_rdata;
  int checks = 0, failures = 0;
  memory_controller dut (.*);

  localparam int W = 32;
  logic [63:0] model [W][W];
  int n_conf = 0;

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic hw(int x, int y, logic [63:0] d);
    @(negedge clk); host_req = 1; host_we = 1; host_x = 10'(x); host_y = 10'(y); host_wdata = d;
    while (!host_gnt) @(negedge clk);
    @(negedge clk); host_req = 0;
  endtask

  task automatic hr(int x, int y, output logic [63:0] d);
    @(negedge clk); host_req = 1; host_we = 0; host_x = 10'(x); host_y = 10'(y);
    while (!host_gnt) @(negedge clk);
    @(negedge clk); host_req = 0; d = host_rdata;
  endtask

  initial begin
    logic [63:0] d;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
      model[y][x] = {$urandom, $urandom}; hw(x, y, model[y][x]);
    end
    for (int k = 0; k < 400; k++) begin
      int rx, ry, wx, wy;
      logic expect_conf;
      rx = $urandom % (W / 2); ry = $urandom % (W / 2);
      wx = $urandom % (W / 2); wy = $urandom % (W / 2);
      if (rx == wx && ry == wy) wx = (wx + 1) % (W / 2);
      @(negedge clk);
      rd_en = 1; rd_qx = QW'(rx); rd_qy = QW'(ry);
      wr_en = ($urandom % 2); wr_qx = QW'(wx); wr_qy = QW'(wy);
      wr_data = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      wr_pmask = 4'($urandom);
      expect_conf = wr_en && (rx % 4 == wx % 4);
      #1; checks++;
      if (conflict !== expect_conf) begin failures++; $display("FAIL conflict flag"); end
      if (conflict) n_conf++;
      @(posedge clk); #1;
      if (wr_en)
        for (int p = 0; p < 4; p++)
          if (wr_pmask[p]) model[2 * wy + p / 2][2 * wx + p % 2] = wr_data[64 * p +: 64];
      rd_en = 0; wr_en = 0;
      if (!expect_conf) begin
        @(negedge clk);
        for (int p = 0; p < 4; p++) begin
          checks++;
          if (rd_data[64 * p +: 64] !== model[2 * ry + p / 2][2 * rx + p % 2]) begin
            failures++; if (failures < 8) $display("FAIL quad %0d,%0d pixel %0d", rx, ry, p);
          end
        end
      end
    end
    for (int y = 0; y < W; y++) for (int x = 0; x < W; x++) begin
      hr(x, y, d); checks++;
      if (d !== model[y][x]) begin failures++; if (failures < 8) $display("FAIL host read %0d,%0d", x, y); end
    end
    checks++;
    if (n_conf == 0) begin failures++; $display("FAIL no conflict exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
