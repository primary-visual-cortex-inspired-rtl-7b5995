// edge_detect: binary 3x3 edge detector of the V1 model.
//
// The 3x3 window holds binarised pixels P0..P8 in raster order (P4 is the
// centre). The four point-symmetric pairs (P0,P8), (P1,P7), (P2,P6) and
// (P3,P5) cover the 135, 90, 45 and 0 degree directions; each pair that
// differs contributes one to a mismatch count (an XOR is the one-bit absolute
// difference). The output is an edge when the count is at least TH. This is
// the document's algorithm; the threshold is a run-time input because no
// value for it is given.
//
// Interface: win[i] = P_i, th = threshold (0..4, 3 bits), edge_o = 1 for an
// edge. Purely combinational, no latency.
module edge_detect (
  input  logic [8:0] win,
  input  logic [2:0] th,
  output logic       edge_o
);
  logic [3:0] diff;
  logic [2:0] cnt;

  always_comb begin
    for (int i = 0; i < 4; i++) diff[i] = win[i] ^ win[8-i];
    cnt    = 3'(diff[0]) + 3'(diff[1]) + 3'(diff[2]) + 3'(diff[3]);
    edge_o = (cnt >= th);
  end
endmodule
