// tb_sconv_engine: SCONV at the default LeNet-5 sizes (8x12x12 binary in,
// 5x5 kernels, 16 outputs). Random weights and biases are loaded through
// the write ports, random binary maps are convolved, and every output is
// compared with a direct sum of the weights under set input bits, plus the
// bias, saturated and clipped at zero. The start-to-done latency must be
// 8*8*8*25 + 1 cycles. Negative sums (ReLU active) and saturation are
// counted and must both occur.
module tb_sconv_engine;
  import slit_pkg::*;
  localparam int IC = 8, DIM = 12, K = 5, OC = 16, OD = DIM - K + 1;
  localparam int TAPS = IC*K*K;
  logic        clk = 1'b0, rst_n = 1'b0;
  logic        w_we = 1'b0, b_we = 1'b0, start = 1'b0;
  logic [15:0] w_addr = '0, b_addr = '0;
  data_t       w_data = '0, b_data = '0;
  logic        in_map [IC][DIM][DIM];
  logic        busy, done;
  data_t       out_map [OC][OD][OD];
  int checks = 0, failures = 0, n_relu = 0, n_sat = 0;
  int wt [OC][TAPS];
  int bs [OC];

  sconv_engine #(.IC(IC), .DIM(DIM), .K(K), .OC(OC), .RELU(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_and_check();
    int cyc;
    @(negedge clk); start = 1'b1;
    @(negedge clk); start = 1'b0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc != OD*OD*TAPS + 1) begin
      failures++;
      $display("latency %0d, expected %0d", cyc, OD*OD*TAPS + 1);
    end
    for (int o = 0; o < OC; o++)
      for (int y = 0; y < OD; y++)
        for (int x = 0; x < OD; x++) begin
          int s, e;
          s = bs[o];
          for (int c = 0; c < IC; c++)
            for (int ky = 0; ky < K; ky++)
              for (int kx = 0; kx < K; kx++)
                if (in_map[c][y+ky][x+kx]) s += wt[o][(c*K + ky)*K + kx];
          e = s;
          if (e > 32767) begin e = 32767; n_sat++; end
          if (e < -32768) e = -32768;
          if (e < 0) begin e = 0; n_relu++; end
          checks++;
          if (int'(out_map[o][y][x]) != e) begin
            failures++;
            if (failures < 10) $display("oc%0d (%0d,%0d) got %0d exp %0d", o, y, x, out_map[o][y][x], e);
          end
        end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 3; pass++) begin
      // weights: small in pass 0/1, large positive in pass 2 to force saturation
      for (int o = 0; o < OC; o++) begin
        for (int t = 0; t < TAPS; t++) begin
          wt[o][t] = (pass == 2 && o < 4) ? 30000 : int'($urandom % 1024) - 512;
          @(negedge clk); w_we = 1'b1; w_addr = 16'(o*TAPS + t); w_data = data_t'(wt[o][t]);
        end
        bs[o] = int'($urandom % 2048) - 1024;
        @(negedge clk); w_we = 1'b0; b_we = 1'b1; b_addr = 16'(o); b_data = data_t'(bs[o]);
        @(negedge clk); b_we = 1'b0;
      end
      for (int c = 0; c < IC; c++)
        for (int y = 0; y < DIM; y++)
          for (int x = 0; x < DIM; x++)
            in_map[c][y][x] = ($urandom % 3) == 0;
      run_and_check();
    end
    checks++; if (n_relu == 0) begin failures++; $display("ReLU clamp never happened"); end
    checks++; if (n_sat == 0)  begin failures++; $display("saturation never happened"); end
    $display("relu clamps %0d, saturations %0d", n_relu, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
