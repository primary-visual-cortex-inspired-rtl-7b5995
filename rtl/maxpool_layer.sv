// maxpool_layer: conventional 2x2, stride-2 max pooling with comparators.
//
// Used after SCONV, whose outputs are multi-bit, so the OR-gate shortcut of
// SMP does not apply here; each output is the largest of four signed values
// found with three comparators, as in an unmodified LeNet-5 MP(2) layer.
//
// Interface: in_map[ch][y][x] and out_map[ch][y][x] of slit_pkg::data_t.
// Combinational.
module maxpool_layer
  import slit_pkg::*;
#(
  parameter int unsigned CH  = SCONV_OC,
  parameter int unsigned DIM = SCONV_DIM
) (
  input  data_t in_map  [CH][DIM][DIM],
  output data_t out_map [CH][DIM/2][DIM/2]
);
  function automatic data_t max2(input data_t a, input data_t b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    for (int k = 0; k < CH; k++)
      for (int y = 0; y < DIM/2; y++)
        for (int x = 0; x < DIM/2; x++)
          out_map[k][y][x] = max2(max2(in_map[k][2*y][2*x],   in_map[k][2*y][2*x+1]),
                                  max2(in_map[k][2*y+1][2*x], in_map[k][2*y+1][2*x+1]));
  end
endmodule
