// smp_layer: SMP, max pooling of binary feature maps with OR gates.
//
// For binary maps the maximum of a 2x2 window is the OR of its four bits, so
// each output bit is a single 4-input OR gate instead of three comparators
// (document Fig. 16(b)). Stride 2, no overlap: a CH x DIM x DIM input gives
// CH x DIM/2 x DIM/2.
//
// Interface: in_map[ch][y][x] binary, out_map[ch][y][x] binary.
// Combinational.
module smp_layer #(
  parameter int unsigned CH  = slit_pkg::SLIT_CH,
  parameter int unsigned DIM = slit_pkg::SLIT_DIM
) (
  input  logic in_map  [CH][DIM][DIM],
  output logic out_map [CH][DIM/2][DIM/2]
);
  always_comb begin
    for (int k = 0; k < CH; k++)
      for (int y = 0; y < DIM/2; y++)
        for (int x = 0; x < DIM/2; x++)
          out_map[k][y][x] = in_map[k][2*y][2*x]   | in_map[k][2*y][2*x+1] |
                             in_map[k][2*y+1][2*x] | in_map[k][2*y+1][2*x+1];
  end
endmodule
