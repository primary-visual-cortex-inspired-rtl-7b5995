// tb_fc_layer: FC(120) at the LeNet-5 size (256 inputs) with ReLU, and a
// small 7x5 layer without ReLU. Random Q8.8 weights, biases and inputs;
// each output is compared with a 64-bit integer dot product, bias shifted
// by 8 bits, arithmetic shift right by 8, saturation and (when enabled)
// clipping at zero. The latency must be N_IN*N_OUT + 1 cycles.
module tb_fc_layer;
  import slit_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0, n_neg = 0, n_sat = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- DUT A: 256 -> 120, ReLU
  localparam int NI_A = 256, NO_A = 120;
  logic        a_w_we = 0, a_b_we = 0, a_start = 0, a_busy, a_done;
  logic [15:0] a_w_addr = 0, a_b_addr = 0;
  data_t       a_w_data = 0, a_b_data = 0;
  data_t       a_in [NI_A];
  data_t       a_out [NO_A];
  fc_layer #(.N_IN(NI_A), .N_OUT(NO_A), .RELU(1'b1)) dut_a (
    .clk, .rst_n, .w_we(a_w_we), .w_addr(a_w_addr), .w_data(a_w_data),
    .b_we(a_b_we), .b_addr(a_b_addr), .b_data(a_b_data), .in_vec(a_in),
    .start(a_start), .busy(a_busy), .done(a_done), .out_vec(a_out));

  // ---- DUT B: 7 -> 5, no ReLU
  localparam int NI_B = 7, NO_B = 5;
  logic        b_w_we = 0, b_b_we = 0, b_start = 0, b_busy, b_done;
  logic [15:0] b_w_addr = 0, b_b_addr = 0;
  data_t       b_w_data = 0, b_b_data = 0;
  data_t       b_in [NI_B];
  data_t       b_out [NO_B];
  fc_layer #(.N_IN(NI_B), .N_OUT(NO_B), .RELU(1'b0)) dut_b (
    .clk, .rst_n, .w_we(b_w_we), .w_addr(b_w_addr), .w_data(b_w_data),
    .b_we(b_b_we), .b_addr(b_b_addr), .b_data(b_b_data), .in_vec(b_in),
    .start(b_start), .busy(b_busy), .done(b_done), .out_vec(b_out));

  int wa [NO_A*NI_A];
  int ba [NO_A];
  int wb [NO_B*NI_B];
  int bb [NO_B];

  function automatic int expect_out(longint dot, int bias, bit relu);
    longint v;
    v = (dot + (longint'(bias) * 256)) >>> 8;
    if (v > 32767) v = 32767;
    if (v < -32768) v = -32768;
    if (relu && v < 0) v = 0;
    return int'(v);
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      int cyc;
      // load A (pass 1 uses large values so that outputs saturate)
      for (int i = 0; i < NO_A*NI_A; i++) begin
        wa[i] = (pass == 1 && i < NI_A) ? 20000 : int'($urandom % 512) - 256;
        @(negedge clk); a_w_we = 1; a_w_addr = 16'(i); a_w_data = data_t'(wa[i]);
      end
      @(negedge clk); a_w_we = 0;
      for (int o = 0; o < NO_A; o++) begin
        ba[o] = int'($urandom % 1024) - 512;
        @(negedge clk); a_b_we = 1; a_b_addr = 16'(o); a_b_data = data_t'(ba[o]);
      end
      @(negedge clk); a_b_we = 0;
      for (int i = 0; i < NI_A; i++) a_in[i] = data_t'((pass == 1) ? 2000 : int'($urandom % 512));
      @(negedge clk); a_start = 1;
      @(negedge clk); a_start = 0; cyc = 1;
      while (!a_done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NI_A*NO_A + 1) begin failures++; $display("A latency %0d", cyc); end
      for (int o = 0; o < NO_A; o++) begin
        longint dot; int e;
        dot = 0;
        for (int i = 0; i < NI_A; i++) dot += longint'(wa[o*NI_A + i]) * longint'(int'(a_in[i]));
        e = expect_out(dot, ba[o], 1'b1);
        if (((dot + longint'(ba[o])*256) >>> 8) < 0) n_neg++;
        if (((dot + longint'(ba[o])*256) >>> 8) > 32767) n_sat++;
        checks++;
        if (int'(a_out[o]) != e) begin
          failures++;
          if (failures < 10) $display("A out%0d got %0d exp %0d", o, a_out[o], e);
        end
      end
    end
    // B: signed inputs, no ReLU
    for (int pass = 0; pass < 5; pass++) begin
      int cyc;
      for (int i = 0; i < NO_B*NI_B; i++) begin
        wb[i] = int'($urandom % 4096) - 2048;
        @(negedge clk); b_w_we = 1; b_w_addr = 16'(i); b_w_data = data_t'(wb[i]);
      end
      for (int o = 0; o < NO_B; o++) begin
        bb[o] = int'($urandom % 4096) - 2048;
        @(negedge clk); b_w_we = 0; b_b_we = 1; b_b_addr = 16'(o); b_b_data = data_t'(bb[o]);
      end
      @(negedge clk); b_b_we = 0;
      for (int i = 0; i < NI_B; i++) b_in[i] = data_t'(int'($urandom % 4096) - 2048);
      @(negedge clk); b_start = 1;
      @(negedge clk); b_start = 0; cyc = 1;
      while (!b_done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NI_B*NO_B + 1) begin failures++; $display("B latency %0d", cyc); end
      for (int o = 0; o < NO_B; o++) begin
        longint dot; int e;
        dot = 0;
        for (int i = 0; i < NI_B; i++) dot += longint'(wb[o*NI_B + i]) * longint'(int'(b_in[i]));
        e = expect_out(dot, bb[o], 1'b0);
        if (e < 0) n_neg++;
        checks++;
        if (int'(b_out[o]) != e) begin
          failures++;
          if (failures < 10) $display("B out%0d got %0d exp %0d", o, b_out[o], e);
        end
      end
    end
    checks++; if (n_neg == 0) begin failures++; $display("no negative sums"); end
    checks++; if (n_sat == 0) begin failures++; $display("no saturation"); end
    $display("negative sums %0d, saturations %0d", n_neg, n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
