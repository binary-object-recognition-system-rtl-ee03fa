// vga_display: shows every neuron's weights as a small image on a VGA monitor.
//
// Each neuron's VEC_BITS trits are a IMG_W x IMG_H image (32x24), bit
// k = row*IMG_W + col. The neurons are tiled TILES_X per row, left to right
// and top to bottom, each pixel drawn as a 2x2 block, so a tile covers
// 64x48 screen pixels inside a 64x64 cell. Trit 0 is black, 1 is white,
// don't-care is grey; the rest of the screen is dark blue.
//
// Default timing is VESA 800x600 at 60 Hz, whose 40 MHz pixel clock equals
// the reference design's system clock, so the display runs on the same clock
// and in parallel with pattern input and training, reading the weights
// through the memory's second read port (one read per pixel, 1 clock
// latency). Syncs, data enable and colour leave the block together, two
// clocks after the pixel counters. Showing the weights on VGA at the
// monitor refresh rate follows the reference design; the resolution, layout
// and colours are this design's choices.
module vga_display #(
  parameter int unsigned NEURONS  = 40,
  parameter int unsigned IMG_W    = 32,
  parameter int unsigned IMG_H    = 24,
  parameter int unsigned TILES_X  = 8,
  parameter int unsigned H_ACTIVE = 800,
  parameter int unsigned H_FP     = 40,
  parameter int unsigned H_SYNC   = 128,
  parameter int unsigned H_BP     = 88,
  parameter int unsigned V_ACTIVE = 600,
  parameter int unsigned V_FP     = 1,
  parameter int unsigned V_SYNC   = 4,
  parameter int unsigned V_BP     = 23,
  localparam int unsigned VEC_BITS = IMG_W * IMG_H,
  localparam int unsigned AW       = $clog2(VEC_BITS),
  localparam int unsigned H_TOTAL  = H_ACTIVE + H_FP + H_SYNC + H_BP,
  localparam int unsigned V_TOTAL  = V_ACTIVE + V_FP + V_SYNC + V_BP,
  localparam int unsigned HW       = $clog2(H_TOTAL),
  localparam int unsigned VW       = $clog2(V_TOTAL),
  localparam int unsigned CELL_W   = 2 * IMG_W,        // tile pitch, pixels
  localparam int unsigned CELL_H   = 2 * IMG_H,        // tile image height
  localparam int unsigned CELL_P   = 1 << $clog2(CELL_H), // tile row pitch
  localparam int unsigned IW       = (NEURONS > 1) ? $clog2(NEURONS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // weight memory display port
  output logic                 mem_re,
  output logic [AW-1:0]        mem_raddr,
  input  logic [2*NEURONS-1:0] mem_rdata,
  // VGA
  output logic                 hsync,      // active high (VESA 800x600@60)
  output logic                 vsync,      // active high
  output logic                 de,
  output logic [3:0]           red,
  output logic [3:0]           green,
  output logic [3:0]           blue,
  output logic                 frame_start // one clock at the first pixel of a frame
);
  import bsom_pkg::*;

  logic [HW-1:0] hcnt;
  logic [VW-1:0] vcnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hcnt <= '0;
      vcnt <= '0;
    end else if (hcnt == HW'(H_TOTAL - 1)) begin
      hcnt <= '0;
      vcnt <= (vcnt == VW'(V_TOTAL - 1)) ? '0 : vcnt + 1'b1;
    end else begin
      hcnt <= hcnt + 1'b1;
    end
  end

  // Stage 0: locate the pixel in the tile grid and address the memory.
  int unsigned tcol, trow, px, py, nrn;
  logic        in_tile;
  always_comb begin
    tcol    = int'(hcnt) / CELL_W;
    trow    = int'(vcnt) / CELL_P;
    px      = (int'(hcnt) % CELL_W) / 2;
    py      = (int'(vcnt) % CELL_P) / 2;
    nrn     = trow * TILES_X + tcol;
    in_tile = (tcol < TILES_X) && (int'(vcnt) % CELL_P < CELL_H) && (nrn < NEURONS)
              && (int'(hcnt) < H_ACTIVE) && (int'(vcnt) < V_ACTIVE);
  end

  assign mem_re    = in_tile;
  assign mem_raddr = in_tile ? AW'(py * IMG_W + px) : '0;

  wire logic de0 = (int'(hcnt) < H_ACTIVE) && (int'(vcnt) < V_ACTIVE);
  wire logic hs0 = (int'(hcnt) >= H_ACTIVE + H_FP) && (int'(hcnt) < H_ACTIVE + H_FP + H_SYNC);
  wire logic vs0 = (int'(vcnt) >= V_ACTIVE + V_FP) && (int'(vcnt) < V_ACTIVE + V_FP + V_SYNC);

  // Stage 1: memory data returns; stage 2: colour registered with the syncs.
  logic          de1, hs1, vs1, tile1, fs1;
  logic [IW-1:0] nrn1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {de1, hs1, vs1, tile1, fs1} <= '0;
      nrn1 <= '0;
      {de, hsync, vsync, frame_start} <= '0;
      {red, green, blue} <= '0;
    end else begin
      de1   <= de0;
      hs1   <= hs0;
      vs1   <= vs0;
      fs1   <= (hcnt == '0) && (vcnt == '0);
      tile1 <= in_tile;
      nrn1  <= in_tile ? IW'(nrn) : '0;

      de          <= de1;
      hsync       <= hs1;
      vsync       <= vs1;
      frame_start <= fs1;
      if (!de1) begin
        {red, green, blue} <= '0;
      end else if (!tile1) begin
        {red, green, blue} <= {4'h0, 4'h0, 4'h4};
      end else begin
        unique case (mem_rdata[2*nrn1 +: 2])
          TRIT_0:  {red, green, blue} <= {4'h0, 4'h0, 4'h0};
          TRIT_1:  {red, green, blue} <= {4'hF, 4'hF, 4'hF};
          default: {red, green, blue} <= {4'h8, 4'h8, 4'h8};
        endcase
      end
    end
  end

endmodule
