// tb_edge_buffer: writes random edge values for both slots and reads whole
// tile rows (TILE_H lines at once, one clock latency) back.
module tb_edge_buffer;
  import accel_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic we = 0, w_slot, r_slot;
  logic [CW-1:0] w_y, w_x, r_ty;
  logic [7:0][CW-1:0] r_x;
  logic [CW-1:0] model [2][1024];
  int checks = 0, failures = 0;
  edge_buffer #(.ROWS(1024), .TILE_H(8)) dut (.*);

  initial begin
    #5_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) for (int y = 0; y < 1024; y++) begin
      @(negedge clk); we = 1; w_slot = 1'(s); w_y = CW'(y); w_x = CW'($urandom % 1025);
      model[s][y] = w_x;
    end
    for (int k = 0; k < 1000; k++) begin
      int s, t;
      s = $urandom % 2; t = $urandom % 128;
      @(negedge clk);
      // a write to the other slot in the same clock must not disturb the read
      we = 1; w_slot = 1'(1 - s); w_y = CW'($urandom % 1024); w_x = CW'($urandom % 1025);
      model[1 - s][w_y] = w_x;
      r_slot = 1'(s); r_ty = CW'(t);
      @(negedge clk); we = 0;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (r_x[i] !== model[s][8 * t + i]) begin failures++; if (failures < 8) $display("FAIL slot %0d row %0d", s, 8 * t + i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
