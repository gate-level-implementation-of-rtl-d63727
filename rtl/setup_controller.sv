// setup_controller: reads the display list and feeds the rasterizer and
// the pixel processor.
//
// The document's setup/controller reads the display list, updates the
// polygon information and sends line segments to the rasterizer. The
// record format is this design's (word offsets within a polygon record):
//   0       header: [7:0] vertex count n (0 ends the list), [11:8] highest
//           mip level, [15:12] log2 texture height, [19:16] log2 width,
//           [20] texture on, [21] blend on, [22] depth test on,
//           [23] depth write on
//   1       [20:0] texture base address
//   2..31   plane coefficients A, B, C of 1/z, u/z, v/z, diffuse R,G,B,A
//           over z and specular R,G,B over z (floats, host-computed)
//   32..    n vertices {y[15:0], x[15:0]} in pixels, clockwise, convex
// The display list is read as a stream, one word per clock after a
// one-clock latency. Polygons alternate between the two slots of the
// double-buffered rasterizer: before writing a polygon's data into the
// pixel processor (poly_we) the controller waits for its slot to be free,
// then sends the n closed-outline segments v[i] -> v[(i+1) mod n], one per
// clock, the last one marked. `busy` stays high from start to the end mark.
module setup_controller
  import accel_pkg::*;
#(
  parameter int unsigned AW   = 16,
  parameter int unsigned MAXV = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          busy,
  // display list
  output logic [AW-1:0] dl_addr,
  input  logic [31:0]   dl_data,
  // pixel processor polygon data
  input  logic [1:0]    slot_free,
  output logic          poly_we,
  output logic          poly_slot,
  output poly_t         poly,
  // rasterizer
  output logic          seg_valid,
  input  logic          seg_ready,
  output seg_t          seg
);
  localparam int unsigned VW = $clog2(MAXV + 1);
  localparam int unsigned IW = $clog2(MAXV);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_HDR2, S_BODY, S_WAIT, S_SEG} state_t;
  state_t state;

  logic [AW-1:0]     base, ra;
  logic [7:0]        ri;          // record index of the word arriving now
  logic [7:0]        last_idx;
  logic              arriving;    // a body word arrives this clock
  logic [VW-1:0]     n, si;
  logic              slot;
  logic [CW-1:0]     vx [MAXV];
  logic [CW-1:0]     vy [MAXV];
  logic [NPLANES*3-1:0][31:0] pw;

  assign busy      = (state != S_IDLE);
  assign poly_slot = slot;
  assign dl_addr   = ra;

  logic [VW-1:0] si_next;
  assign si_next   = (si == n - 1'b1) ? '0 : si + 1'b1;
  assign seg_valid = (state == S_SEG);
  assign seg = '{x0: vx[IW'(si)], y0: vy[IW'(si)], x1: vx[IW'(si_next)], y1: vy[IW'(si_next)],
                 slot: slot, last: (si == n - 1'b1)};

  // word 2 + 3p + k (k = 0 A, 1 B, 2 C) goes to plane p, field k
  logic [7:0] pw_j;
  logic [4:0] pw_idx;
  assign pw_j   = ri - 8'd2;
  assign pw_idx = 5'(8'd3 * (pw_j / 8'd3) + 8'd2 - (pw_j % 8'd3));

  polymode_t mode_q;
  always_comb begin
    poly.mode = mode_q;
    poly.pl   = pw;
  end

  // plane words and vertices: data registers without reset
  always_ff @(posedge clk) begin
    if (state == S_BODY && arriving && ri != 8'd1) begin
      if (ri < 8'd32) pw[pw_idx] <= dl_data;
      else begin
        vx[IW'(ri - 8'd32)] <= dl_data[CW-1:0];
        vy[IW'(ri - 8'd32)] <= dl_data[16 +: CW];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; base <= '0; ra <= '0; ri <= '0; last_idx <= '0;
      arriving <= 1'b0; n <= '0; si <= '0; slot <= 1'b0; poly_we <= 1'b0;
      mode_q <= '0;
    end else begin
      poly_we <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          base <= '0; ra <= '0; slot <= 1'b0;
          state <= S_HDR;
        end
        S_HDR: state <= S_HDR2;            // header read in flight
        S_HDR2: begin
          if (dl_data[7:0] == 8'd0) state <= S_IDLE;
          else begin
            n <= VW'(dl_data[7:0] > 8'(MAXV) ? 8'(MAXV) : dl_data[7:0]);
            mode_q.levels    <= dl_data[11:8];
            mode_q.log2h     <= dl_data[15:12];
            mode_q.log2w     <= dl_data[19:16];
            mode_q.tex_en    <= dl_data[20];
            mode_q.blend_en  <= dl_data[21];
            mode_q.ztest_en  <= dl_data[22];
            mode_q.zwrite_en <= dl_data[23];
            last_idx <= 8'd31 + ((dl_data[7:0] > 8'(MAXV)) ? 8'(MAXV) : dl_data[7:0]);
            ra <= base + 1'b1;
            ri <= 8'd1;
            arriving <= 1'b0;
            state <= S_BODY;
          end
        end
        S_BODY: begin
          // address ri+? issued; data of the previous address arrives
          if (!arriving || ri != last_idx) ra <= ra + 1'b1;
          arriving <= 1'b1;
          if (arriving) begin
            if (ri == 8'd1) mode_q.tex_base <= dl_data[20:0];
            if (ri == last_idx) begin
              state <= S_WAIT;
              base  <= base + AW'(last_idx) + 1'b1;
            end
            ri <= ri + 1'b1;
          end
        end
        S_WAIT: if (slot_free[slot]) begin
          poly_we <= 1'b1;
          si <= '0;
          state <= S_SEG;
        end
        S_SEG: if (seg_ready) begin
          if (si == n - 1'b1) begin
            slot  <= ~slot;
            ra    <= base;
            state <= S_HDR;
          end else si <= si + 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
