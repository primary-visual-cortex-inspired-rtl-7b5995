// tb_slit_detect: checks the 8-orientation SLIT detector.
// Part 1 draws each reference line (given here as (row, column) points of a
// line at 22.5-degree steps, rows counted from the top) and checks that its
// own channel fires. Part 2 applies all 65 536 windows and compares every
// channel with "all four points of the line are set".
module tb_slit_detect;
  logic        clk = 1'b0;
  logic [15:0] win;
  logic [7:0]  ch;
  int checks = 0, failures = 0;

  slit_detect dut (.win(win), .ch(ch));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // (row, col) points of each orientation
  int pts_r [8][4] = '{'{1,1,1,1}, '{2,2,1,1}, '{3,2,1,0}, '{3,2,1,0},
                       '{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2}};
  int pts_c [8][4] = '{'{0,1,2,3}, '{0,1,2,3}, '{0,1,2,3}, '{1,1,2,2},
                       '{1,1,1,1}, '{1,1,2,2}, '{0,1,2,3}, '{0,1,2,3}};

  function automatic logic [15:0] line_mask(input int t);
    logic [15:0] m = '0;
    for (int k = 0; k < 4; k++) m[pts_r[t][k]*4 + pts_c[t][k]] = 1'b1;
    return m;
  endfunction

  initial begin
    for (int t = 0; t < 8; t++) begin
      win = line_mask(t);
      @(posedge clk);
      checks++;
      if (ch[t] !== 1'b1) begin
        failures++;
        $display("line %0d not detected (ch=%b)", t, ch);
      end
    end
    for (int v = 0; v < 65536; v++) begin
      win = 16'(v);
      @(posedge clk);
      for (int t = 0; t < 8; t++) begin
        checks++;
        if (ch[t] !== ((win & line_mask(t)) == line_mask(t))) begin
          failures++;
          if (failures < 10) $display("win=%h ch%0d got %b", win, t, ch[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
