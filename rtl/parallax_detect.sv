// parallax_detect: left/right parallax (disparity) decision for one
// position of the V1 model.
//
// For each candidate disparity d = 0..MAX_D the unit compares a 3x3 window
// of the left image with the 3x3 window of the right image shifted d
// columns to the left, in two ways at once:
//   * SLIT coincidence: the number of (channel, pixel) places where the left
//     and right SLIT maps are both 1, i.e. the count of ones of an AND over
//     all 8 channels and 9 positions (0..72);
//   * SAD: the sum of absolute differences of the 9 grey pixel pairs.
// The chosen disparity has the largest coincidence; among equal
// coincidences the smallest SAD wins, and then the smallest d. This is the
// rule the document states ("maximise the SLIT coincidence and minimise the
// SAD"); the order of the two criteria and the tie rule are this design's
// choice.
//
// Window layout: lslit/lpix column j (0..2) is left-image column x-1+j.
// rslit/rpix column k (0..MAX_D+2) is right-image column x-1-MAX_D+k, so
// the right window for disparity d is columns MAX_D-d .. MAX_D-d+2.
// Outputs: disp (best d), score (its coincidence), sad (its SAD).
// Combinational.
module parallax_detect #(
  parameter int unsigned MAX_D = 2
) (
  input  logic       lslit [8][3][3],
  input  logic       rslit [8][3][MAX_D+3],
  input  logic [7:0] lpix  [3][3],
  input  logic [7:0] rpix  [3][MAX_D+3],
  output logic [$clog2(MAX_D+1)-1:0] disp,
  output logic [6:0]                 score,
  output logic [11:0]                sad
);
  logic [6:0]  sc [MAX_D+1];
  logic [11:0] sd [MAX_D+1];

  always_comb begin
    for (int d = 0; d <= MAX_D; d++) begin
      sc[d] = '0;
      sd[d] = '0;
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++) begin
          for (int t = 0; t < 8; t++)
            sc[d] = sc[d] + 7'(lslit[t][y][x] & rslit[t][y][MAX_D-d+x]);
          sd[d] = sd[d] + ((lpix[y][x] > rpix[y][MAX_D-d+x]) ?
                           12'(lpix[y][x] - rpix[y][MAX_D-d+x]) :
                           12'(rpix[y][MAX_D-d+x] - lpix[y][x]));
        end
    end
    disp  = '0;
    score = sc[0];
    sad   = sd[0];
    for (int d = 1; d <= MAX_D; d++)
      if (sc[d] > score || (sc[d] == score && sd[d] < sad)) begin
        disp  = ($clog2(MAX_D+1))'(d);
        score = sc[d];
        sad   = sd[d];
      end
  end
endmodule
