// texture_rom: texture store feeding the four pixel pipes.
//
// Each pixel needs eight 32-bit RGBA texels per clock (four around the
// sample point in each of two mip levels), so the quad pipeline reads
// PORTS = 32 texels (4 x 256 bits) every cycle. As in the document the
// store is idealised: every port is served every cycle, without caches or
// stalls. Reads are synchronous: addresses presented while rd_en is high
// give data on the next clock, and the outputs hold while rd_en is low.
// The ld_* port fills the store before rendering. Size 2^21 texels (8 MB)
// follows the document's 8-megabyte texture buffer.
module texture_rom #(
  parameter int unsigned AW    = 21,
  parameter int unsigned PORTS = 32
) (
  input  logic                      clk,
  input  logic                      rd_en,
  input  logic [PORTS-1:0][AW-1:0]  rd_addr,
  output logic [PORTS-1:0][31:0]    rd_data,
  input  logic                      ld_we,
  input  logic [AW-1:0]             ld_addr,
  input  logic [31:0]               ld_data
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
  end

  for (genvar p = 0; p < PORTS; p++) begin : g_port
    always_ff @(posedge clk) begin
      if (rd_en) rd_data[p] <= mem[rd_addr[p]];
    end
  end
endmodule
