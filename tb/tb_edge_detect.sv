// tb_edge_detect: exhaustive check of the binary 3x3 edge detector.
// Every one of the 512 windows is applied with every threshold 0..5 and the
// output is compared with a count of mismatching opposite pixels computed
// here from (row, column) coordinates reflected through the centre.
module tb_edge_detect;
  logic       clk = 1'b0;
  logic [8:0] win;
  logic [2:0] th;
  logic       edge_o;
  int checks = 0, failures = 0;

  edge_detect dut (.win(win), .th(th), .edge_o(edge_o));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit ref_edge(input logic [8:0] w, input int t);
    int n = 0;
    // pixel (r,c) is opposite to (2-r, 2-c); count each pair once
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        if (r*3 + c < 4 && w[r*3+c] != w[(2-r)*3 + (2-c)]) n++;
    return n >= t;
  endfunction

  initial begin
    for (int t = 0; t <= 5; t++) begin
      for (int v = 0; v < 512; v++) begin
        win = 9'(v);
        th  = 3'(t);
        @(posedge clk);
        checks++;
        if (edge_o !== ref_edge(win, t)) begin
          failures++;
          if (failures < 10) $display("mismatch win=%b th=%0d got %b", win, t, edge_o);
        end
      end
    end
    // a vertical step: left column dark, rest bright -> 3 mismatching pairs
    win = 9'b110_110_110; th = 3'd3; @(posedge clk);
    checks++; if (edge_o !== 1'b1) failures++;
    // uniform window: never an edge for th >= 1
    win = 9'b111_111_111; th = 3'd1; @(posedge clk);
    checks++; if (edge_o !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
