// display_list_rom: the scene description read by the setup controller.
//
// The document treats the display list as a ROM since it does not change
// while an image is rendered. Here it is a synchronous 32-bit memory: the
// word at rd_addr appears on rd_data one clock later. A separate write port
// (ld_*) fills it before rendering starts; its size (2^AW words) is this
// design's choice.
module display_list_rom #(
  parameter int unsigned AW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output logic [31:0]   rd_data,
  input  logic          ld_we,
  input  logic [AW-1:0] ld_addr,
  input  logic [31:0]   ld_data
);
  logic [31:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (ld_we) mem[ld_addr] <= ld_data;
    rd_data <= mem[rd_addr];
  end
endmodule
