// tb_slit_layer: whole-frame check of the SLIT layer at the default 28x28
// size. Random images with bright strokes (horizontal, vertical and
// diagonal bars) go through the layer, and all 8x24x24 output bits are
// compared with a model built here: threshold each pixel, count mismatching
// opposite pairs around each pixel with a zero border, then look for a full
// four-point line per orientation. Each image is checked with two
// (th1, th) settings; the count of set bits per channel must be non-zero
// for every channel across the run.
module tb_slit_layer;
  localparam int DIM = 28, OD = DIM - 4;
  logic       clk = 1'b0;
  logic [7:0] img [DIM][DIM];
  logic [7:0] th1;
  logic [2:0] th;
  logic       slit_o [8][OD][OD];
  int checks = 0, failures = 0;
  int hits [8];

  slit_layer #(.DIM(DIM)) dut (.img(img), .th1(th1), .th(th), .slit_o(slit_o));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pts_r [8][4] = '{'{1,1,1,1}, '{2,2,1,1}, '{3,2,1,0}, '{3,2,1,0},
                       '{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2}};
  int pts_c [8][4] = '{'{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2},
                       '{1,1,1,1}, '{1,1,2,2}, '{0,1,2,3}, '{0,1,2,3}};

  function automatic int px(int y, int x, int t1);
    if (y < 0 || x < 0 || y >= DIM || x >= DIM) return 0;
    return int'(img[y][x]) >= t1 ? 1 : 0;
  endfunction

  task automatic check_frame(int t1, int te);
    int e [DIM][DIM];
    th1 = 8'(t1); th = 3'(te);
    @(posedge clk);
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++) begin
        int n = 0;
        // pairs (-1,-1)/(1,1), (-1,0)/(1,0), (-1,1)/(1,-1), (0,-1)/(0,1)
        if (px(y-1,x-1,t1) != px(y+1,x+1,t1)) n++;
        if (px(y-1,x,t1)   != px(y+1,x,t1))   n++;
        if (px(y-1,x+1,t1) != px(y+1,x-1,t1)) n++;
        if (px(y,x-1,t1)   != px(y,x+1,t1))   n++;
        e[y][x] = (n >= te) ? 1 : 0;
      end
    for (int t = 0; t < 8; t++)
      for (int r = 0; r < OD; r++)
        for (int c = 0; c < OD; c++) begin
          int all = 1;
          for (int k = 0; k < 4; k++)
            if (e[r + pts_r[t][k]][c + pts_c[t][k]] == 0) all = 0;
          checks++;
          if (int'(slit_o[t][r][c]) != all) begin
            failures++;
            if (failures < 10) $display("ch%0d (%0d,%0d) got %b", t, r, c, slit_o[t][r][c]);
          end
          hits[t] += all;
        end
  endtask

  initial begin
    for (int t = 0; t < 8; t++) hits[t] = 0;
    for (int it = 0; it < 12; it++) begin
      for (int y = 0; y < DIM; y++)
        for (int x = 0; x < DIM; x++)
          img[y][x] = 8'($urandom % 60);
      // a few bright bars, several pixels thick, in random directions
      for (int b = 0; b < 4; b++) begin
        int y0, x0, dy, dx, len, step2, y, x;
        y0 = $urandom % DIM; x0 = $urandom % DIM;
        dy = int'($urandom % 3) - 1; dx = int'($urandom % 3) - 1;
        len = 6 + $urandom % 10;
        step2 = $urandom % 2;
        for (int s = 0; s < len; s++) begin
          y = y0 + dy*s; x = x0 + dx*s + (step2 ? s/2 : 0);
          for (int w = 0; w < 3; w++)
            if (y+w >= 0 && y+w < DIM && x >= 0 && x < DIM) img[y+w][x] = 8'(200 + $urandom % 56);
        end
      end
      check_frame(128, 2);
      check_frame(30, 1);
    end
    for (int t = 0; t < 8; t++) begin
      checks++;
      if (hits[t] == 0) begin
        failures++;
        $display("channel %0d never fired", t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
