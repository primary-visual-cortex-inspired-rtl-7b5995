// slit_layer: the parameter-free first layer that replaces CONV1.
//
// The whole frame is processed in parallel, in one combinational pass:
//   1. every 8-bit pixel is reduced to one bit, 1 when pixel >= th1 (Eq. 6);
//   2. edge_detect runs on the 3x3 neighbourhood of every pixel; pixels
//      outside the frame count as 0, so the edge map is DIM x DIM;
//   3. slit_detect runs on every 4x4 window of the edge map whose top-left
//      corner is (r,c), 0 <= r,c < DIM-4, giving 8 binary maps of
//      (DIM-4) x (DIM-4). For DIM = 28 that is 8 x 24 x 24, the size of the
//      conventional 5x5 CONV1 output the document replaces. The last row and
//      column of the edge map are not used by any window.
// Binarisation, edge rule and SLIT rule follow the document; the zero
// padding and window placement that give the 24x24 size are this design's
// choice.
//
// Interface: img[y][x] 8-bit pixels, th1 pixel threshold, th edge threshold;
// slit_o[ch][r][c] output bits. Combinational; the caller registers it.
module slit_layer #(
  parameter int unsigned DIM = slit_pkg::IMG_DIM
) (
  input  logic [7:0] img    [DIM][DIM],
  input  logic [7:0] th1,
  input  logic [2:0] th,
  output logic       slit_o [slit_pkg::SLIT_CH][DIM-4][DIM-4]
);
  localparam int unsigned OD = DIM - 4;

  logic bin  [DIM+2][DIM+2];   // binarised image with a zero border
  logic edgm [DIM][DIM];

  always_comb begin
    for (int y = 0; y < DIM + 2; y++)
      for (int x = 0; x < DIM + 2; x++)
        bin[y][x] = 1'b0;
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++)
        bin[y+1][x+1] = (img[y][x] >= th1);
  end

  for (genvar y = 0; y < DIM; y++) begin : g_ey
    for (genvar x = 0; x < DIM; x++) begin : g_ex
      logic [8:0] w;
      always_comb
        for (int i = 0; i < 9; i++) w[i] = bin[y + i/3][x + i%3];
      edge_detect u_edge (.win(w), .th(th), .edge_o(edgm[y][x]));
    end
  end

  for (genvar r = 0; r < OD; r++) begin : g_sr
    for (genvar c = 0; c < OD; c++) begin : g_sc
      logic [15:0] w;
      logic [7:0]  ch;
      always_comb
        for (int i = 0; i < 16; i++) w[i] = edgm[r + i/4][c + i%4];
      slit_detect u_slit (.win(w), .ch(ch));
      for (genvar t = 0; t < slit_pkg::SLIT_CH; t++) begin : g_t
        assign slit_o[t][r][c] = ch[t];
      end
    end
  end
endmodule
