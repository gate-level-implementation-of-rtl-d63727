// tb_edge_queue: random pushes and pops against a queue model: order,
// full and empty flags, simultaneous push and pop.
module tb_edge_queue;
  import accel_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, full, empty;
  edge_t din, dout;
  edge_t model [$];
  int checks = 0, failures = 0;
  edge_queue #(.DEPTH(8)) dut (.*);

  initial begin
    #1_000_000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int nfull = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      checks++;
      if (full !== (model.size() == 8) || empty !== (model.size() == 0)) begin
        failures++; $display("FAIL flags size=%0d full=%b empty=%b", model.size(), full, empty);
      end
      if (full) nfull++;
      if (!empty) begin
        checks++;
        if (dout !== model[0]) begin failures++; $display("FAIL order"); end
      end
      push = ($urandom % 100) < ((t / 500) % 2 ? 70 : 35) && !full;
      pop  = ($urandom % 100) < 50 && !empty;
      din  = edge_t'({$urandom, $urandom});
      @(posedge clk);
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
      #1; push = 0; pop = 0;
    end
    checks++;
    if (nfull == 0) begin failures++; $display("FAIL never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
