// memory_controller: frame-buffer controller over eight eDRAM banks.
//
// The pixel processor reads one 2x2 quad (4 x 64 bits, two 128-bit words)
// and writes one quad every clock, 512 bits in all as in the document.
// The document says pixel coordinates were mapped to addresses so as to
// minimise conflicts but does not give the mapping; this design places a
// quad's top pixel pair in bank 2p and its bottom pair in bank 2p+1, with
// p = qx mod 4 and word address {qy, qx[8:2]}. The rasterizer walks the
// 4 x 4 quads of a tile row by row, and the pixel pipeline writes a quad
// three quads after reading it, so the read and the write of a steady
// stream always fall on different pairs; only quads skipped at polygon
// edges can bring them together.
// Each bank does one access per clock. When the read and the write fall on
// the same pair, the write goes ahead and `conflict` tells the pixel
// processor to hold its read and retry. The host port (one pixel per
// access, granted only to banks idle that cycle) loads and reads back the
// frame buffer; it is this design's addition.
//
// Timing: rd_data is valid the clock after an accepted read (rd_en and not
// conflict); host_rdata the clock after a granted host read.
// Pixel i of a quad is (2*qx + i%2, 2*qy + i/2), bits [64*i +: 64].
module memory_controller
  import accel_pkg::*;
#(
  parameter int unsigned BANK_AW = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  // quad read port
  input  logic            rd_en,
  input  logic [QW-1:0]   rd_qx,
  input  logic [QW-1:0]   rd_qy,
  output logic [255:0]    rd_data,
  output logic            conflict,
  // quad write port
  input  logic            wr_en,
  input  logic [QW-1:0]   wr_qx,
  input  logic [QW-1:0]   wr_qy,
  input  logic [255:0]    wr_data,
  input  logic [3:0]      wr_pmask,
  // host pixel port
  input  logic            host_req,
  input  logic            host_we,
  input  logic [CW-2:0]   host_x,
  input  logic [CW-2:0]   host_y,
  input  logic [63:0]     host_wdata,
  output logic            host_gnt,
  output logic [63:0]     host_rdata
);
  localparam int unsigned BANKS = 8;

  logic [1:0]         rd_pair, wr_pair, h_pair, rd_pair_q;
  logic [2:0]         h_bank;
  logic               h_lane_q;
  logic [2:0]         h_bank_q;
  logic [BANK_AW-1:0] rd_addr, wr_addr, h_addr;
  logic               rd_go;

  logic [BANKS-1:0]              b_en, b_we;
  logic [BANKS-1:0][1:0]         b_wmask;
  logic [BANKS-1:0][BANK_AW-1:0] b_addr;
  logic [BANKS-1:0][127:0]       b_wdata, b_rdata;

  always_comb begin
    rd_pair  = rd_qx[1:0];
    wr_pair  = wr_qx[1:0];
    rd_addr  = BANK_AW'({rd_qy, rd_qx[QW-1:2]});
    wr_addr  = BANK_AW'({wr_qy, wr_qx[QW-1:2]});
    h_pair   = host_x[2:1];
    h_bank   = {h_pair, host_y[0]};
    h_addr   = BANK_AW'({host_y[CW-2:1], host_x[CW-2:3]});
    conflict = rd_en && wr_en && (rd_pair == wr_pair);
    rd_go    = rd_en && !conflict;
    host_gnt = 1'b0;
    for (int k = 0; k < BANKS; k++) begin
      b_en[k] = 1'b0; b_we[k] = 1'b0; b_wmask[k] = 2'b00;
      b_addr[k] = '0; b_wdata[k] = '0;
      if (wr_en && wr_pair == 2'(k / 2)) begin
        b_en[k] = 1'b1; b_we[k] = 1'b1; b_addr[k] = wr_addr;
        b_wmask[k] = (k % 2 == 0) ? wr_pmask[1:0] : wr_pmask[3:2];
        b_wdata[k] = (k % 2 == 0) ? wr_data[127:0] : wr_data[255:128];
      end else if (rd_go && rd_pair == 2'(k / 2)) begin
        b_en[k] = 1'b1; b_addr[k] = rd_addr;
      end else if (host_req && h_bank == 3'(k)) begin
        host_gnt  = 1'b1;
        b_en[k]   = 1'b1; b_we[k] = host_we; b_addr[k] = h_addr;
        b_wmask[k] = host_x[0] ? 2'b10 : 2'b01;
        b_wdata[k] = {host_wdata, host_wdata};
      end
    end
  end

  for (genvar k = 0; k < BANKS; k++) begin : g_bank
    edram_bank #(.AW(BANK_AW)) u_bank (
      .clk, .en(b_en[k]), .we(b_we[k]), .wmask(b_wmask[k]), .addr(b_addr[k]),
      .wdata(b_wdata[k]), .rdata(b_rdata[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_pair_q <= '0; h_bank_q <= '0; h_lane_q <= 1'b0;
    end else begin
      if (rd_go) rd_pair_q <= rd_pair;
      if (host_gnt && !host_we) begin
        h_bank_q <= h_bank; h_lane_q <= host_x[0];
      end
    end
  end

  always_comb begin
    rd_data    = {b_rdata[{rd_pair_q, 1'b1}], b_rdata[{rd_pair_q, 1'b0}]};
    host_rdata = h_lane_q ? b_rdata[h_bank_q][127:64] : b_rdata[h_bank_q][63:0];
  end
endmodule
