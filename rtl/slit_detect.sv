// slit_detect: 8-orientation SLIT (line segment) detector of the V1 model.
//
// The input is a 4x4 window of edge bits, win[r*4+c] with row r = 0 at the
// top and column c = 0 at the left. Channel t answers "is there a straight
// run of four edge pixels at angle t*22.5 degrees": it is the AND of the
// four cells that a line at that angle crosses in the window, so the whole
// block is eight 4-input AND gates, as in the document. Angles are counted
// counter-clockwise from the horizontal. The document shows the exact cell
// patterns only in a drawing; the sets below are this design's reading of
// the digital line at each angle:
//   ch0   0.0 deg  (1,0)(1,1)(1,2)(1,3)
//   ch1  22.5 deg  (2,0)(2,1)(1,2)(1,3)
//   ch2  45.0 deg  (3,0)(2,1)(1,2)(0,3)
//   ch3  67.5 deg  (3,1)(2,1)(1,2)(0,2)
//   ch4  90.0 deg  (0,1)(1,1)(2,1)(3,1)
//   ch5 112.5 deg  (0,1)(1,1)(2,2)(3,2)
//   ch6 135.0 deg  (0,0)(1,1)(2,2)(3,3)
//   ch7 157.5 deg  (1,0)(1,1)(2,2)(2,3)
//
// Interface: win (16 bits) in, ch (8 bits) out. Combinational.
module slit_detect (
  input  logic [15:0] win,
  output logic [7:0]  ch
);
  // Cell indices (r*4+c) of the four pixels of each orientation.
  localparam int unsigned LINES [8][4] = '{
    '{ 4,  5,  6,  7},
    '{ 8,  9,  6,  7},
    '{12,  9,  6,  3},
    '{13,  9,  6,  2},
    '{ 1,  5,  9, 13},
    '{ 1,  5, 10, 14},
    '{ 0,  5, 10, 15},
    '{ 4,  5, 10, 11}
  };

  always_comb begin
    for (int t = 0; t < 8; t++)
      ch[t] = win[LINES[t][0]] & win[LINES[t][1]] &
              win[LINES[t][2]] & win[LINES[t][3]];
  end
endmodule
