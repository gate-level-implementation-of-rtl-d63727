// edram_bank: one 8 Mbit embedded-DRAM bank of the frame buffer.
//
// The document's frame buffer is eight 8 Mbit embedded DRAMs. This model
// stands in for such a macro: 2^AW words of 128 bits (two 64-bit pixels),
// one access per clock, synchronous read (data one clock after en with
// we = 0) and a write enable per pixel (wmask). Refresh and DRAM timing are
// not modelled.
module edram_bank #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [1:0]    wmask,
  input  logic [AW-1:0] addr,
  input  logic [127:0]  wdata,
  output logic [127:0]  rdata
);
  logic [127:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) begin
        if (wmask[0]) mem[addr][63:0]   <= wdata[63:0];
        if (wmask[1]) mem[addr][127:64] <= wdata[127:64];
      end else begin
        rdata <= mem[addr];
      end
    end
  end
endmodule
