// tb_parallax_detect: random and constructed windows through the per-position
// parallax unit (MAX_D = 2). The expected disparity is found here by scoring
// every candidate (AND-coincidence count of the SLIT bits, SAD of the
// pixels) and keeping the first best by (highest coincidence, lowest SAD).
// Constructed cases copy the left window into the right one at a known
// shift, which must then be found; tie cases (blank SLIT maps) must be
// decided by the SAD.
module tb_parallax_detect;
  localparam int MAX_D = 2, RW = MAX_D + 3;
  logic       clk = 1'b0;
  logic       lslit [8][3][3];
  logic       rslit [8][3][RW];
  logic [7:0] lpix  [3][3];
  logic [7:0] rpix  [3][RW];
  logic [1:0] disp;
  logic [6:0] score;
  logic [11:0] sad;
  int checks = 0, failures = 0, n_tie = 0;

  parallax_detect #(.MAX_D(MAX_D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int want_d);
    int bd, bs, bsad;
    bd = -1; bs = -1; bsad = 0;
    for (int d = 0; d <= MAX_D; d++) begin
      int s, a;
      s = 0; a = 0;
      for (int y = 0; y < 3; y++)
        for (int x = 0; x < 3; x++) begin
          for (int t = 0; t < 8; t++) s += (lslit[t][y][x] && rslit[t][y][x + MAX_D - d]) ? 1 : 0;
          a += (int'(lpix[y][x]) > int'(rpix[y][x + MAX_D - d])) ?
               int'(lpix[y][x]) - int'(rpix[y][x + MAX_D - d]) :
               int'(rpix[y][x + MAX_D - d]) - int'(lpix[y][x]);
        end
      if (s == bs && a < bsad) n_tie++;
      if (s > bs || (s == bs && a < bsad)) begin bd = d; bs = s; bsad = a; end
    end
    @(posedge clk);
    checks++;
    if (int'(disp) != bd || int'(score) != bs || int'(sad) != bsad) begin
      failures++;
      if (failures < 10) $display("got d=%0d s=%0d sad=%0d exp d=%0d s=%0d sad=%0d", disp, score, sad, bd, bs, bsad);
    end
    if (want_d >= 0) begin
      checks++;
      if (int'(disp) != want_d) begin failures++; $display("shift %0d not found (got %0d)", want_d, disp); end
    end
  endtask

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int mode, sh;
      mode = it % 3;
      sh = $urandom % (MAX_D + 1);
      for (int y = 0; y < 3; y++) begin
        for (int k = 0; k < RW; k++) begin
          rpix[y][k] = 8'($urandom);
          for (int t = 0; t < 8; t++) rslit[t][y][k] = (mode == 2) ? 1'b0 : ($urandom % 3 == 0);
        end
        for (int x = 0; x < 3; x++) begin
          lpix[y][x] = 8'($urandom);
          for (int t = 0; t < 8; t++) lslit[t][y][x] = (mode == 2) ? 1'b0 : ($urandom % 3 == 0);
        end
      end
      if (mode == 1) begin
        // right = left shifted by sh, all other right columns empty
        for (int y = 0; y < 3; y++)
          for (int k = 0; k < RW; k++) for (int t = 0; t < 8; t++) rslit[t][y][k] = 1'b0;
        for (int y = 0; y < 3; y++)
          for (int x = 0; x < 3; x++) begin
            rpix[y][x + MAX_D - sh] = lpix[y][x];
            for (int t = 0; t < 8; t++) begin
              lslit[t][y][x] = 1'b1;
              rslit[t][y][x + MAX_D - sh] = lslit[t][y][x];
            end
          end
        check(sh);
      end else begin
        check(-1);
      end
    end
    checks++; if (n_tie == 0) begin failures++; $display("SAD tie-break never used"); end
    $display("SAD tie-breaks %0d", n_tie);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
