// tb_maxpool_layer: random signed maps through the 2x2 max pooling layer;
// each output is compared with the largest of its four inputs found by
// sorting-free integer scan, including all-negative and tied blocks.
module tb_maxpool_layer;
  import slit_pkg::*;
  localparam int CH = 16, DIM = 8;
  logic  clk = 1'b0;
  data_t in_map  [CH][DIM][DIM];
  data_t out_map [CH][DIM/2][DIM/2];
  int checks = 0, failures = 0;

  maxpool_layer #(.CH(CH), .DIM(DIM)) dut (.in_map(in_map), .out_map(out_map));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 50; it++) begin
      for (int k = 0; k < CH; k++)
        for (int y = 0; y < DIM; y++)
          for (int x = 0; x < DIM; x++)
            case (it % 3)
              0: in_map[k][y][x] = data_t'($urandom);
              1: in_map[k][y][x] = data_t'(-int'($urandom % 1000) - 1);
              default: in_map[k][y][x] = data_t'($urandom % 3);
            endcase
      @(posedge clk);
      for (int k = 0; k < CH; k++)
        for (int y = 0; y < DIM/2; y++)
          for (int x = 0; x < DIM/2; x++) begin
            int m; m = -100000;
            for (int dy = 0; dy < 2; dy++)
              for (int dx = 0; dx < 2; dx++)
                if (int'(in_map[k][2*y+dy][2*x+dx]) > m) m = int'(in_map[k][2*y+dy][2*x+dx]);
            checks++;
            if (int'(out_map[k][y][x]) != m) begin
              failures++;
              if (failures < 10) $display("ch%0d (%0d,%0d) got %0d exp %0d", k, y, x, out_map[k][y][x], m);
            end
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
