// parallax_map: frame-level left/right parallax detector of the V1 model.
//
// Two DIM x DIM grey images (left and right eye) are written through a
// pixel port. On start, both go through their own slit_layer, and the two
// 8-channel SLIT maps (OD x OD, OD = DIM-4) are captured together with the
// pixels. The scanner then visits the OD x OD SLIT positions in raster
// order, one per cycle, feeds parallax_detect with the 3x3 SLIT windows and
// the 3x3 pixel windows around the matching pixel (SLIT position (y,x) is
// matched with pixel (y+2, x+2), the centre of the SLIT window's pixel
// footprint) and writes the chosen disparity into disp_map. Positions
// outside the maps read as 0.
// The search range follows the document's "1/16 of the width of the
// vision": MAX_D = ceil(DIM/16), so disparities 0..2 for DIM = 28. The image
// size, scan order and alignment are this design's choices.
//
// Interface: l_we/r_we with pix_addr = y*DIM + x and pix_data write the
// left/right image; th1/th as in slit_layer (sampled at start); start pulse,
// busy level, one-cycle done pulse; disp_map holds the result and stays
// valid until the next start.
// Timing: done rises OD*OD + 1 cycles after the start cycle (577 for DIM=28).
module parallax_map #(
  parameter int unsigned DIM   = slit_pkg::IMG_DIM,
  parameter int unsigned MAX_D = (DIM + 15) / 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        l_we,
  input  logic        r_we,
  input  logic [$clog2(DIM*DIM)-1:0] pix_addr,
  input  logic [7:0]  pix_data,
  input  logic [7:0]  th1,
  input  logic [2:0]  th,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [$clog2(MAX_D+1)-1:0] disp_map [DIM-4][DIM-4]
);
  localparam int unsigned OD = DIM - 4;
  localparam int unsigned DW = $clog2(MAX_D + 1);

  logic [7:0] limg [DIM][DIM];
  logic [7:0] rimg [DIM][DIM];
  logic [7:0] lcap [DIM][DIM];
  logic [7:0] rcap [DIM][DIM];
  logic       lslit_c [8][OD][OD];
  logic       rslit_c [8][OD][OD];
  logic       lslit [8][OD][OD];
  logic       rslit [8][OD][OD];

  always_ff @(posedge clk) begin
    if (l_we) limg[$clog2(DIM)'(32'(pix_addr) / DIM)][$clog2(DIM)'(32'(pix_addr) % DIM)] <= pix_data;
    if (r_we) rimg[$clog2(DIM)'(32'(pix_addr) / DIM)][$clog2(DIM)'(32'(pix_addr) % DIM)] <= pix_data;
  end

  slit_layer #(.DIM(DIM)) u_lslit (.img(limg), .th1(th1), .th(th), .slit_o(lslit_c));
  slit_layer #(.DIM(DIM)) u_rslit (.img(rimg), .th1(th1), .th(th), .slit_o(rslit_c));

  // scan position
  logic [$clog2(OD)-1:0] py, px;

  // windows for the current position, zero outside the maps
  logic       wl_slit [8][3][3];
  logic       wr_slit [8][3][MAX_D+3];
  logic [7:0] wl_pix  [3][3];
  logic [7:0] wr_pix  [3][MAX_D+3];

  always_comb begin
    for (int j = 0; j < 3; j++) begin
      for (int i = 0; i < 3; i++) begin
        int sy, sx, iy, ix;
        sy = int'(py) - 1 + j;  sx = int'(px) - 1 + i;
        iy = int'(py) + 1 + j;  ix = int'(px) + 1 + i;
        for (int t = 0; t < 8; t++)
          wl_slit[t][j][i] = (sy >= 0 && sy < OD && sx >= 0 && sx < OD) ? lslit[t][sy][sx] : 1'b0;
        wl_pix[j][i] = (iy < DIM && ix < DIM) ? lcap[iy][ix] : 8'd0;
      end
      for (int k = 0; k < MAX_D + 3; k++) begin
        int sy, sx, iy, ix;
        sy = int'(py) - 1 + j;  sx = int'(px) - 1 - int'(MAX_D) + k;
        iy = int'(py) + 1 + j;  ix = int'(px) + 1 - int'(MAX_D) + k;
        for (int t = 0; t < 8; t++)
          wr_slit[t][j][k] = (sy >= 0 && sy < OD && sx >= 0 && sx < OD) ? rslit[t][sy][sx] : 1'b0;
        wr_pix[j][k] = (iy < DIM && ix >= 0 && ix < DIM) ? rcap[iy][ix] : 8'd0;
      end
    end
  end

  logic [DW-1:0] best_d;
  logic [6:0]    best_score;
  logic [11:0]   best_sad;

  parallax_detect #(.MAX_D(MAX_D)) u_pd (
    .lslit(wl_slit), .rslit(wr_slit), .lpix(wl_pix), .rpix(wr_pix),
    .disp(best_d), .score(best_score), .sad(best_sad)
  );

  always_ff @(posedge clk) begin
    if (start && !busy) begin
      lslit <= lslit_c;
      rslit <= rslit_c;
      lcap  <= limg;
      rcap  <= rimg;
    end
    if (busy) disp_map[py][px] <= best_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      py   <= '0;
      px   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          py   <= '0;
          px   <= '0;
        end
      end else if (px == ($clog2(OD))'(OD - 1)) begin
        px <= '0;
        if (py == ($clog2(OD))'(OD - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          py <= py + 1'b1;
        end
      end else begin
        px <= px + 1'b1;
      end
    end
  end
endmodule
