// tb_slit_lenet5_top: end-to-end test of the SLIT LeNet-5 core at its
// default (full) size. It loads random Q8.8 parameters for SCONV and the
// three FC layers through the parameter write port, then classifies
// several synthetic 28x28 "stroke" images. A reference model written here
// with plain integer loops (threshold, edge count, SLIT lines, OR pooling,
// binary convolution, max pooling, three dense layers, argmax) gives the
// expected logits and class. Checked per image: all 10 logits, the class,
// and the start-to-done latency of 54 445 cycles. The next image is written
// while the core is still busy, which must not disturb the running one.
// Mechanisms counted, each of which must occur at least once: edge pixels,
// each of the 8 SLIT orientations, SMP blocks with more than one set bit,
// SCONV ReLU clamps, FC ReLU clamps, image loads overlapped with a run, and
// at least three different winning classes (FC3 biases are re-programmed
// between images so that the argmax moves). Finally a stereo pair is sent
// to the parallax detector, which must find the known shift of 2.
module tb_slit_lenet5_top;
  import slit_pkg::*;
  localparam int N_IMG = 4;
  localparam int LAT = 1 + (SCONV_DIM*SCONV_DIM*SLIT_CH*K_SCONV*K_SCONV + 1)
                     + (FC1_IN*FC1_OUT + 1) + (FC1_OUT*FC2_OUT + 1) + (FC2_OUT*FC3_OUT + 1);

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       pix_we = 1'b0;
  logic [9:0] pix_addr = '0;
  logic [7:0] pix_data = '0;
  wt_wr_t     wt_wr;
  logic [7:0] th1 = 8'd128;
  logic [2:0] th  = 3'd2;
  logic       start = 1'b0, busy, done;
  logic [3:0] class_o;
  data_t      logits [FC3_OUT];
  logic       st_l_we = 1'b0, st_r_we = 1'b0, st_start = 1'b0, st_busy, st_done;
  logic [9:0] st_pix_addr = '0;
  logic [7:0] st_pix_data = '0;
  logic [1:0] disp_map [SLIT_DIM][SLIT_DIM];
  int         n_disp [4];

  slit_lenet5_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_edge = 0, n_smp_merge = 0, n_sconv_relu = 0, n_fc_relu = 0, n_overlap = 0;
  int n_slit [SLIT_CH];
  logic [15:0] classes_seen = '0;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference parameters and images
  int w_sc [SCONV_OC][SLIT_CH*K_SCONV*K_SCONV];
  int b_sc [SCONV_OC];
  int w1 [FC1_OUT*FC1_IN];  int b1 [FC1_OUT];
  int w2 [FC2_OUT*FC1_OUT]; int b2 [FC2_OUT];
  int w3 [FC3_OUT*FC2_OUT]; int b3 [FC3_OUT];
  int pic [N_IMG][IMG_DIM][IMG_DIM];
  int exp_logit [FC3_OUT];
  int exp_class;

  function automatic int clip16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  int pts_r [8][4] = '{'{1,1,1,1}, '{2,2,1,1}, '{3,2,1,0}, '{3,2,1,0},
                       '{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2}};
  int pts_c [8][4] = '{'{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2},
                       '{1,1,1,1}, '{1,1,2,2}, '{0,1,2,3}, '{0,1,2,3}};

  task automatic reference(int n);
    int b  [IMG_DIM+2][IMG_DIM+2];
    int e  [IMG_DIM][IMG_DIM];
    int s  [SLIT_CH][SLIT_DIM][SLIT_DIM];
    int p  [SLIT_CH][SMP_DIM][SMP_DIM];
    int c  [SCONV_OC][SCONV_DIM][SCONV_DIM];
    int f0 [FC1_IN];
    int f1 [FC1_OUT];
    int f2 [FC2_OUT];
    for (int y = 0; y < IMG_DIM+2; y++)
      for (int x = 0; x < IMG_DIM+2; x++)
        b[y][x] = (y >= 1 && x >= 1 && y <= IMG_DIM && x <= IMG_DIM &&
                   pic[n][y-1][x-1] >= int'(th1)) ? 1 : 0;
    for (int y = 0; y < IMG_DIM; y++)
      for (int x = 0; x < IMG_DIM; x++) begin
        int d;
        d = (b[y][x] != b[y+2][x+2]) + (b[y][x+1] != b[y+2][x+1]) +
            (b[y][x+2] != b[y+2][x]) + (b[y+1][x] != b[y+1][x+2]);
        e[y][x] = (d >= int'(th)) ? 1 : 0;
        n_edge += e[y][x];
      end
    for (int t = 0; t < SLIT_CH; t++)
      for (int y = 0; y < SLIT_DIM; y++)
        for (int x = 0; x < SLIT_DIM; x++) begin
          s[t][y][x] = 1;
          for (int k = 0; k < 4; k++)
            if (e[y + pts_r[t][k]][x + pts_c[t][k]] == 0) s[t][y][x] = 0;
          n_slit[t] += s[t][y][x];
        end
    for (int t = 0; t < SLIT_CH; t++)
      for (int y = 0; y < SMP_DIM; y++)
        for (int x = 0; x < SMP_DIM; x++) begin
          int cnt;
          cnt = s[t][2*y][2*x] + s[t][2*y][2*x+1] + s[t][2*y+1][2*x] + s[t][2*y+1][2*x+1];
          p[t][y][x] = (cnt > 0) ? 1 : 0;
          if (cnt > 1) n_smp_merge++;
        end
    for (int o = 0; o < SCONV_OC; o++)
      for (int y = 0; y < SCONV_DIM; y++)
        for (int x = 0; x < SCONV_DIM; x++) begin
          longint acc;
          acc = b_sc[o];
          for (int i = 0; i < SLIT_CH; i++)
            for (int ky = 0; ky < K_SCONV; ky++)
              for (int kx = 0; kx < K_SCONV; kx++)
                if (p[i][y+ky][x+kx] != 0) acc += w_sc[o][(i*K_SCONV + ky)*K_SCONV + kx];
          c[o][y][x] = clip16(acc);
          if (c[o][y][x] < 0) begin c[o][y][x] = 0; n_sconv_relu++; end
        end
    for (int o = 0; o < SCONV_OC; o++)
      for (int y = 0; y < MP_DIM; y++)
        for (int x = 0; x < MP_DIM; x++) begin
          int m;
          m = c[o][2*y][2*x];
          if (c[o][2*y][2*x+1] > m) m = c[o][2*y][2*x+1];
          if (c[o][2*y+1][2*x] > m) m = c[o][2*y+1][2*x];
          if (c[o][2*y+1][2*x+1] > m) m = c[o][2*y+1][2*x+1];
          f0[(o*MP_DIM + y)*MP_DIM + x] = m;
        end
    for (int o = 0; o < FC1_OUT; o++) begin
      longint acc; acc = longint'(b1[o]) * 256;
      for (int i = 0; i < FC1_IN; i++) acc += longint'(w1[o*FC1_IN + i]) * f0[i];
      f1[o] = clip16(acc >>> 8);
      if (f1[o] < 0) begin f1[o] = 0; n_fc_relu++; end
    end
    for (int o = 0; o < FC2_OUT; o++) begin
      longint acc; acc = longint'(b2[o]) * 256;
      for (int i = 0; i < FC1_OUT; i++) acc += longint'(w2[o*FC1_OUT + i]) * f1[i];
      f2[o] = clip16(acc >>> 8);
      if (f2[o] < 0) begin f2[o] = 0; n_fc_relu++; end
    end
    exp_class = 0;
    for (int o = 0; o < FC3_OUT; o++) begin
      longint acc; acc = longint'(b3[o]) * 256;
      for (int i = 0; i < FC2_OUT; i++) acc += longint'(w3[o*FC2_OUT + i]) * f2[i];
      exp_logit[o] = clip16(acc >>> 8);
      if (exp_logit[o] > exp_logit[exp_class]) exp_class = o;
    end
  endtask

  task automatic wr(wsel_e sel, int addr, int val);
    @(negedge clk);
    wt_wr.en = 1'b1; wt_wr.sel = sel; wt_wr.addr = 16'(addr); wt_wr.data = data_t'(val);
  endtask

  task automatic make_image(int n);
    for (int y = 0; y < IMG_DIM; y++)
      for (int x = 0; x < IMG_DIM; x++)
        pic[n][y][x] = $urandom % 40;
    // strokes like a hand-written digit: thick bars in several directions
    for (int k = 0; k < 3 + n; k++) begin
      int y0, x0, dy, dx, len, yy, xx;
      y0 = 2 + $urandom % 24; x0 = 2 + $urandom % 24;
      dy = int'($urandom % 3) - 1; dx = int'($urandom % 3) - 1;
      if (dy == 0 && dx == 0) dx = 1;
      len = 8 + $urandom % 12;
      for (int st = 0; st < len; st++) begin
        yy = y0 + dy*st + ((k % 2 == 1 && dx != 0) ? st/2 : 0);
        xx = x0 + dx*st;
        for (int w = 0; w < 3; w++)
          if (yy+w >= 0 && yy+w < IMG_DIM && xx >= 0 && xx < IMG_DIM)
            pic[n][yy+w][xx] = 180 + $urandom % 76;
      end
    end
  endtask

  task automatic load_image(int n);
    for (int y = 0; y < IMG_DIM; y++)
      for (int x = 0; x < IMG_DIM; x++) begin
        @(negedge clk);
        pix_we = 1'b1; pix_addr = 10'(y*IMG_DIM + x); pix_data = 8'(pic[n][y][x]);
        if (busy) n_overlap++;
      end
    @(negedge clk); pix_we = 1'b0;
  endtask

  initial begin
    wt_wr = '0;
    for (int t = 0; t < SLIT_CH; t++) n_slit[t] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // parameters: SCONV weights in [-1,1), FC weights in [-0.25,0.25)
    for (int o = 0; o < SCONV_OC; o++)
      for (int t = 0; t < SLIT_CH*K_SCONV*K_SCONV; t++) begin
        w_sc[o][t] = int'($urandom % 512) - 256;
        wr(WSEL_SCONV_W, o*SLIT_CH*K_SCONV*K_SCONV + t, w_sc[o][t]);
      end
    for (int o = 0; o < SCONV_OC; o++) begin
      b_sc[o] = int'($urandom % 512) - 256; wr(WSEL_SCONV_B, o, b_sc[o]);
    end
    for (int i = 0; i < FC1_OUT*FC1_IN; i++) begin
      w1[i] = int'($urandom % 128) - 64; wr(WSEL_FC1_W, i, w1[i]);
    end
    for (int o = 0; o < FC1_OUT; o++) begin b1[o] = int'($urandom % 256) - 128; wr(WSEL_FC1_B, o, b1[o]); end
    for (int i = 0; i < FC2_OUT*FC1_OUT; i++) begin
      w2[i] = int'($urandom % 128) - 64; wr(WSEL_FC2_W, i, w2[i]);
    end
    for (int o = 0; o < FC2_OUT; o++) begin b2[o] = int'($urandom % 256) - 128; wr(WSEL_FC2_B, o, b2[o]); end
    for (int i = 0; i < FC3_OUT*FC2_OUT; i++) begin
      w3[i] = int'($urandom % 128) - 64; wr(WSEL_FC3_W, i, w3[i]);
    end
    for (int o = 0; o < FC3_OUT; o++) begin b3[o] = int'($urandom % 256) - 128; wr(WSEL_FC3_B, o, b3[o]); end
    @(negedge clk); wt_wr.en = 1'b0;

    for (int n = 0; n < N_IMG; n++) make_image(n);
    load_image(0);
    for (int n = 0; n < N_IMG; n++) begin
      int cyc;
      // from the second image on, raise one FC3 bias so that the winning
      // class moves around (also re-programs a parameter between images)
      if (n > 0) begin
        int j;
        j = (3*n + 1) % FC3_OUT;
        b3[j] += 12000;
        wr(WSEL_FC3_B, j, b3[j]);
        @(negedge clk); wt_wr.en = 1'b0;
      end
      reference(n);
      @(negedge clk); start = 1'b1;
      @(negedge clk); start = 1'b0; cyc = 1;
      // overwrite the image memory with the next picture while this one runs
      if (n + 1 < N_IMG) begin
        load_image(n + 1);
        cyc += IMG_DIM*IMG_DIM + 1;
      end
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != LAT) begin failures++; $display("image %0d latency %0d expected %0d", n, cyc, LAT); end
      for (int o = 0; o < FC3_OUT; o++) begin
        checks++;
        if (int'(logits[o]) != exp_logit[o]) begin
          failures++;
          $display("image %0d logit %0d got %0d expected %0d", n, o, logits[o], exp_logit[o]);
        end
      end
      checks++;
      if (int'(class_o) != exp_class) begin
        failures++;
        $display("image %0d class %0d expected %0d", n, class_o, exp_class);
      end
      $display("image %0d: class %0d, latency %0d cycles", n, class_o, cyc);
      classes_seen[class_o] = 1'b1;
    end
    // stereo pair: right eye sees the first picture moved 2 columns left;
    // the parallax detector must report disparity 2 more often than any
    // other value, in 24*24 + 1 cycles
    begin
      int cyc;
      for (int y = 0; y < IMG_DIM; y++)
        for (int x = 0; x < IMG_DIM; x++) begin
          @(negedge clk);
          st_l_we = 1'b1; st_r_we = 1'b0; st_pix_addr = 10'(y*IMG_DIM + x); st_pix_data = 8'(pic[0][y][x]);
          @(negedge clk);
          st_l_we = 1'b0; st_r_we = 1'b1;
          st_pix_data = (x + 2 < IMG_DIM) ? 8'(pic[0][y][x+2]) : 8'd0;
        end
      @(negedge clk); st_r_we = 1'b0; st_start = 1'b1;
      @(negedge clk); st_start = 1'b0; cyc = 1;
      while (!st_done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != SLIT_DIM*SLIT_DIM + 1) begin failures++; $display("parallax latency %0d", cyc); end
      for (int d = 0; d < 4; d++) n_disp[d] = 0;
      for (int y = 0; y < SLIT_DIM; y++)
        for (int x = 0; x < SLIT_DIM; x++) n_disp[disp_map[y][x]]++;
      $display("disparity histogram: 0:%0d 1:%0d 2:%0d 3:%0d", n_disp[0], n_disp[1], n_disp[2], n_disp[3]);
      checks++;
      if (n_disp[2] <= n_disp[0] || n_disp[2] <= n_disp[1] || n_disp[3] != 0) begin
        failures++; $display("stereo shift of 2 not recovered");
      end
    end
    $display("edges %0d, smp merges %0d, sconv relu %0d, fc relu %0d, overlapped loads %0d",
             n_edge, n_smp_merge, n_sconv_relu, n_fc_relu, n_overlap);
    for (int t = 0; t < SLIT_CH; t++) begin
      $display("slit ch%0d hits %0d", t, n_slit[t]);
      checks++; if (n_slit[t] == 0) begin failures++; $display("slit ch%0d never fired", t); end
    end
    checks++; if (n_edge == 0) begin failures++; $display("no edges"); end
    checks++; if (n_smp_merge == 0) begin failures++; $display("no SMP merge"); end
    checks++; if (n_sconv_relu == 0) begin failures++; $display("no SCONV ReLU clamp"); end
    checks++; if (n_fc_relu == 0) begin failures++; $display("no FC ReLU clamp"); end
    checks++; if ($countones(classes_seen) < 3) begin failures++; $display("fewer than 3 classes seen"); end
    checks++; if (n_overlap == 0) begin failures++; $display("no overlapped load"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
