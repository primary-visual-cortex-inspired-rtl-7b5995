// tb_smp_layer: random binary maps through SMP; each output is checked
// against the maximum of its 2x2 block computed with integer comparisons.
module tb_smp_layer;
  localparam int CH = 8, DIM = 24;
  logic clk = 1'b0;
  logic in_map  [CH][DIM][DIM];
  logic out_map [CH][DIM/2][DIM/2];
  int checks = 0, failures = 0;

  smp_layer #(.CH(CH), .DIM(DIM)) dut (.in_map(in_map), .out_map(out_map));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 20; it++) begin
      // sparse maps so that all-zero blocks are common
      for (int k = 0; k < CH; k++)
        for (int y = 0; y < DIM; y++)
          for (int x = 0; x < DIM; x++)
            in_map[k][y][x] = ($urandom % (it % 4 + 2)) == 0;
      @(posedge clk);
      for (int k = 0; k < CH; k++)
        for (int y = 0; y < DIM/2; y++)
          for (int x = 0; x < DIM/2; x++) begin
            int m; m = 0;
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++)
                if (int'(in_map[k][2*y+dy][2*x+dx]) > m) m = int'(in_map[k][2*y+dy][2*x+dx]);
            checks++;
            if (int'(out_map[k][y][x]) != m) failures++;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
