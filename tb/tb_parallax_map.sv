// tb_parallax_map: stereo frames through the frame-level parallax detector
// at the default 28x28 size (disparities 0..2). The right image is the left
// image moved left by a known shift, with fresh noise. Every entry of the
// disparity map is compared with a reference computed here (threshold,
// edges, SLIT lines for both eyes, then coincidence and SAD for each
// candidate with zeros outside the maps). The latency must be 24*24 + 1
// cycles, and the known shift must be the answer at the majority of
// positions that carry SLIT features.
module tb_parallax_map;
  localparam int DIM = 28, OD = DIM - 4, MAX_D = 2;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       l_we = 0, r_we = 0;
  logic [9:0] pix_addr = 0;
  logic [7:0] pix_data = 0;
  logic [7:0] th1 = 8'd128;
  logic [2:0] th = 3'd2;
  logic       start = 0, busy, done;
  logic [1:0] disp_map [OD][OD];
  int checks = 0, failures = 0;

  parallax_map #(.DIM(DIM)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int L [DIM][DIM];
  int R [DIM][DIM];
  int pts_r [8][4] = '{'{1,1,1,1}, '{2,2,1,1}, '{3,2,1,0}, '{3,2,1,0},
                       '{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2}};
  int pts_c [8][4] = '{'{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2},
                       '{1,1,1,1}, '{1,1,2,2}, '{0,1,2,3}, '{0,1,2,3}};

  function automatic int bit_at(input int img [DIM][DIM], int y, int x);
    if (y < 0 || x < 0 || y >= DIM || x >= DIM) return 0;
    return img[y][x] >= int'(th1) ? 1 : 0;
  endfunction

  task automatic slit_ref(input int img [DIM][DIM], output int s [8][OD][OD]);
    int e [DIM][DIM];
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++) begin
        int n;
        n = (bit_at(img,y-1,x-1) != bit_at(img,y+1,x+1)) + (bit_at(img,y-1,x) != bit_at(img,y+1,x)) +
            (bit_at(img,y-1,x+1) != bit_at(img,y+1,x-1)) + (bit_at(img,y,x-1) != bit_at(img,y,x+1));
        e[y][x] = (n >= int'(th)) ? 1 : 0;
      end
    for (int t = 0; t < 8; t++)
      for (int r = 0; r < OD; r++)
        for (int c = 0; c < OD; c++) begin
          s[t][r][c] = 1;
          for (int k = 0; k < 4; k++) if (e[r+pts_r[t][k]][c+pts_c[t][k]] == 0) s[t][r][c] = 0;
        end
  endtask

  function automatic int sget(input int s [8][OD][OD], int t, int y, int x);
    if (y < 0 || x < 0 || y >= OD || x >= OD) return 0;
    return s[t][y][x];
  endfunction

  function automatic int pget(input int img [DIM][DIM], int y, int x);
    if (y < 0 || x < 0 || y >= DIM || x >= DIM) return 0;
    return img[y][x];
  endfunction

  task automatic run_frame(int shift);
    int sl [8][OD][OD];
    int sr [8][OD][OD];
    int cyc, featured, found;
    // images: strokes on noise; right = left moved left by `shift`
    for (int y = 0; y < DIM; y++) for (int x = 0; x < DIM; x++) L[y][x] = $urandom % 50;
    for (int k = 0; k < 6; k++) begin
      int y0, x0, dy, dx;
      y0 = $urandom % DIM; x0 = $urandom % DIM;
      dy = int'($urandom % 3) - 1; dx = (dy == 0) ? 1 : int'($urandom % 3) - 1;
      for (int s = 0; s < 14; s++)
        for (int w = 0; w < 3; w++)
          if (y0+dy*s+w >= 0 && y0+dy*s+w < DIM && x0+dx*s >= 0 && x0+dx*s < DIM)
            L[y0+dy*s+w][x0+dx*s] = 200 + $urandom % 50;
    end
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++)
        R[y][x] = (x + shift < DIM) ? L[y][x+shift] : int'($urandom % 50);
    for (int y = 0; y < DIM; y++)
      for (int x = 0; x < DIM; x++) begin
        @(negedge clk);
        l_we = 1; r_we = 0; pix_addr = 10'(y*DIM + x); pix_data = 8'(L[y][x]);
        @(negedge clk);
        l_we = 0; r_we = 1; pix_data = 8'(R[y][x]);
      end
    @(negedge clk); l_we = 0; r_we = 0;
    slit_ref(L, sl);
    slit_ref(R, sr);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != OD*OD + 1) begin failures++; $display("latency %0d", cyc); end
    featured = 0; found = 0;
    for (int y = 0; y < OD; y++)
      for (int x = 0; x < OD; x++) begin
        int bd, bs, ba, any;
        bd = 0; bs = -1; ba = 0; any = 0;
        for (int d = 0; d <= MAX_D; d++) begin
          int s, a;
          s = 0; a = 0;
          for (int j = -1; j <= 1; j++)
            for (int i = -1; i <= 1; i++) begin
              for (int t = 0; t < 8; t++) begin
                s += sget(sl,t,y+j,x+i) & sget(sr,t,y+j,x+i-d);
                any |= sget(sl,t,y+j,x+i);
              end
              a += (pget(L,y+2+j,x+2+i) > pget(R,y+2+j,x+2+i-d)) ?
                   pget(L,y+2+j,x+2+i) - pget(R,y+2+j,x+2+i-d) :
                   pget(R,y+2+j,x+2+i-d) - pget(L,y+2+j,x+2+i);
            end
          if (s > bs || (s == bs && a < ba)) begin bd = d; bs = s; ba = a; end
        end
        checks++;
        if (int'(disp_map[y][x]) != bd) begin
          failures++;
          if (failures < 10) $display("(%0d,%0d) got %0d exp %0d", y, x, disp_map[y][x], bd);
        end
        if (any != 0 && x >= MAX_D + 1) begin
          featured++;
          if (int'(disp_map[y][x]) == shift) found++;
        end
      end
    $display("shift %0d: found at %0d of %0d featured positions", shift, found, featured);
    checks++;
    if (featured == 0 || 2*found <= featured) begin failures++; $display("shift %0d not recovered", shift); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_frame(2);
    run_frame(1);
    run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
