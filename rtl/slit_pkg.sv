// slit_pkg: types and constants shared by the SLIT feature extractor and the
// SLIT-based LeNet-5 inference core.
//
// The default sizes are those of the LeNet-5 / MNIST configuration: a 28x28
// 8-bit grey image, 8 SLIT orientation channels, 24x24 SLIT maps pooled to
// 12x12, a 5x5 SCONV with 16 output channels, 2x2 max pooling and fully
// connected layers of 120, 84 and 10 neurons. Activations and weights are
// signed 16-bit fixed point with 8 fractional bits (Q8.8); the 16-bit width
// follows the fixed-point IP-core evaluation, the split into integer and
// fraction bits is this design's choice.
package slit_pkg;

  localparam int unsigned IMG_DIM    = 28;  // input image edge
  localparam int unsigned SLIT_CH    = 8;   // orientations 0..157.5 deg step 22.5
  localparam int unsigned SLIT_DIM   = IMG_DIM - 4;      // 24
  localparam int unsigned SMP_DIM    = SLIT_DIM / 2;     // 12
  localparam int unsigned K_SCONV    = 5;
  localparam int unsigned SCONV_OC   = 16;
  localparam int unsigned SCONV_DIM  = SMP_DIM - K_SCONV + 1;  // 8
  localparam int unsigned MP_DIM     = SCONV_DIM / 2;    // 4
  localparam int unsigned FC1_IN     = SCONV_OC * MP_DIM * MP_DIM;  // 256
  localparam int unsigned FC1_OUT    = 120;
  localparam int unsigned FC2_OUT    = 84;
  localparam int unsigned FC3_OUT    = 10;

  localparam int unsigned DATA_W     = 16;  // activation / weight width
  localparam int unsigned FRAC_W     = 8;   // fractional bits

  typedef logic signed [DATA_W-1:0] data_t;

  // Which weight memory a host write goes to.
  typedef enum logic [2:0] {
    WSEL_SCONV_W = 3'd0,
    WSEL_SCONV_B = 3'd1,
    WSEL_FC1_W   = 3'd2,
    WSEL_FC1_B   = 3'd3,
    WSEL_FC2_W   = 3'd4,
    WSEL_FC2_B   = 3'd5,
    WSEL_FC3_W   = 3'd6,
    WSEL_FC3_B   = 3'd7
  } wsel_e;

  // One host write into a parameter memory.
  typedef struct packed {
    logic         en;
    wsel_e        sel;
    logic [15:0]  addr;
    data_t        data;
  } wt_wr_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = 48'sd32767;
    localparam logic signed [47:0] MINV = -48'sd32768;
    if (v > MAXV)      return data_t'(16'sh7fff);
    else if (v < MINV) return data_t'(16'sh8000);
    else               return data_t'(v[DATA_W-1:0]);
  endfunction

endpackage
