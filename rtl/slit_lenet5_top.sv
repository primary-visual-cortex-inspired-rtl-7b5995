// slit_lenet5_top: LeNet-5 inference core whose first three layers are the
// parameter-free SLIT front end.
//
// Network (MNIST configuration):
//   image 28x28x8b -> SLIT(8) 8x24x24 binary -> SMP(2) 8x12x12 binary
//   -> SCONV(16) 5x5, MUX-accumulate, ReLU -> MP(2) 16x4x4
//   -> FC(120) ReLU -> FC(84) ReLU -> FC(10) -> argmax
// The SLIT layer and SMP are pure logic (comparators, XOR/compare, AND and
// OR gates) evaluated for the whole frame in one cycle; SCONV and the FC
// layers are sequential engines with their own parameter memories. The
// layer sequence and sizes follow the document; the storage, the schedule
// and the number format (Q8.8, 16 bits) are this design's.
//
// Operation:
//   1. The host writes the 784 pixels (pix_we, pix_addr = y*28 + x) and the
//      parameters (wt_wr, see slit_pkg::wt_wr_t; addresses as in
//      sconv_engine and fc_layer). Parameters persist between images.
//   2. A start pulse while idle captures the SMP output of the current image
//      in a register, so the next image may be written while the core runs.
//   3. SCONV, FC1, FC2 and FC3 then run back to back, each started by the
//      done pulse of the one before.
//   4. done pulses for one cycle; class_o holds the index of the largest
//      logit (lowest index on a tie) and logits holds the 10 FC3 outputs.
// Timing: done follows start after
//   1 + (12 800 + 1) + (30 720 + 1) + (10 080 + 1) + (840 + 1) = 54 445
// cycles at the default sizes.
// th1 is the pixel binarisation threshold and th the edge threshold (0..4);
// they must be stable in the start cycle.
//
// Beside the classifier, and independent of it, the top carries the V1
// model's left/right parallax detector (parallax_map): its own left and
// right image memories (st_l_we/st_r_we, st_pix_addr, st_pix_data), its own
// st_start/st_busy/st_done and a 24x24 map of disparities 0..2 (disp_map).
// It shares only th1/th. See parallax_map for its timing (577 cycles).
module slit_lenet5_top
  import slit_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // image load
  input  logic        pix_we,
  input  logic [9:0]  pix_addr,
  input  logic [7:0]  pix_data,
  // parameter load
  input  wt_wr_t      wt_wr,
  // configuration
  input  logic [7:0]  th1,
  input  logic [2:0]  th,
  // control
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic [3:0]  class_o,
  output data_t       logits [FC3_OUT],
  // stereo parallax detector
  input  logic        st_l_we,
  input  logic        st_r_we,
  input  logic [9:0]  st_pix_addr,
  input  logic [7:0]  st_pix_data,
  input  logic        st_start,
  output logic        st_busy,
  output logic        st_done,
  output logic [1:0]  disp_map [SLIT_DIM][SLIT_DIM]
);
  // ---------------------------------------------------------------- image
  logic [7:0] img [IMG_DIM][IMG_DIM];

  always_ff @(posedge clk)
    if (pix_we) img[5'(32'(pix_addr) / IMG_DIM)][5'(32'(pix_addr) % IMG_DIM)] <= pix_data;

  // ------------------------------------------------------ SLIT + SMP (comb)
  logic slit_map [SLIT_CH][SLIT_DIM][SLIT_DIM];
  logic smp_map  [SLIT_CH][SMP_DIM][SMP_DIM];
  logic smp_reg  [SLIT_CH][SMP_DIM][SMP_DIM];

  slit_layer #(.DIM(IMG_DIM)) u_slit (
    .img(img), .th1(th1), .th(th), .slit_o(slit_map)
  );

  smp_layer #(.CH(SLIT_CH), .DIM(SLIT_DIM)) u_smp (
    .in_map(slit_map), .out_map(smp_map)
  );

  // ------------------------------------------------------------ sequencing
  logic sconv_start, sconv_busy, sconv_done;
  logic fc1_busy, fc1_done, fc2_busy, fc2_done, fc3_busy, fc3_done;
  logic run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run         <= 1'b0;
      sconv_start <= 1'b0;
    end else begin
      sconv_start <= 1'b0;
      if (start && !run) begin
        run         <= 1'b1;
        sconv_start <= 1'b1;
      end else if (fc3_done) begin
        run <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk)
    if (start && !run) smp_reg <= smp_map;

  assign busy = run;
  assign done = fc3_done;

  // ---------------------------------------------------------------- SCONV
  data_t sconv_map [SCONV_OC][SCONV_DIM][SCONV_DIM];

  sconv_engine #(.IC(SLIT_CH), .DIM(SMP_DIM), .K(K_SCONV), .OC(SCONV_OC), .RELU(1'b1)) u_sconv (
    .clk(clk), .rst_n(rst_n),
    .w_we(wt_wr.en && wt_wr.sel == WSEL_SCONV_W), .w_addr(wt_wr.addr), .w_data(wt_wr.data),
    .b_we(wt_wr.en && wt_wr.sel == WSEL_SCONV_B), .b_addr(wt_wr.addr), .b_data(wt_wr.data),
    .in_map(smp_reg), .start(sconv_start),
    .busy(sconv_busy), .done(sconv_done), .out_map(sconv_map)
  );

  // ------------------------------------------------------------ MP + flatten
  data_t mp_map [SCONV_OC][MP_DIM][MP_DIM];
  data_t fc1_in [FC1_IN];

  maxpool_layer #(.CH(SCONV_OC), .DIM(SCONV_DIM)) u_mp (
    .in_map(sconv_map), .out_map(mp_map)
  );

  // Flatten channel-major: index = ch*16 + y*4 + x.
  always_comb
    for (int k = 0; k < SCONV_OC; k++)
      for (int y = 0; y < MP_DIM; y++)
        for (int x = 0; x < MP_DIM; x++)
          fc1_in[(k*MP_DIM + y)*MP_DIM + x] = mp_map[k][y][x];

  // ------------------------------------------------------------ FC layers
  data_t fc1_out [FC1_OUT];
  data_t fc2_out [FC2_OUT];

  fc_layer #(.N_IN(FC1_IN), .N_OUT(FC1_OUT), .RELU(1'b1)) u_fc1 (
    .clk(clk), .rst_n(rst_n),
    .w_we(wt_wr.en && wt_wr.sel == WSEL_FC1_W), .w_addr(wt_wr.addr), .w_data(wt_wr.data),
    .b_we(wt_wr.en && wt_wr.sel == WSEL_FC1_B), .b_addr(wt_wr.addr), .b_data(wt_wr.data),
    .in_vec(fc1_in), .start(sconv_done),
    .busy(fc1_busy), .done(fc1_done), .out_vec(fc1_out)
  );

  fc_layer #(.N_IN(FC1_OUT), .N_OUT(FC2_OUT), .RELU(1'b1)) u_fc2 (
    .clk(clk), .rst_n(rst_n),
    .w_we(wt_wr.en && wt_wr.sel == WSEL_FC2_W), .w_addr(wt_wr.addr), .w_data(wt_wr.data),
    .b_we(wt_wr.en && wt_wr.sel == WSEL_FC2_B), .b_addr(wt_wr.addr), .b_data(wt_wr.data),
    .in_vec(fc1_out), .start(fc1_done),
    .busy(fc2_busy), .done(fc2_done), .out_vec(fc2_out)
  );

  fc_layer #(.N_IN(FC2_OUT), .N_OUT(FC3_OUT), .RELU(1'b0)) u_fc3 (
    .clk(clk), .rst_n(rst_n),
    .w_we(wt_wr.en && wt_wr.sel == WSEL_FC3_W), .w_addr(wt_wr.addr), .w_data(wt_wr.data),
    .b_we(wt_wr.en && wt_wr.sel == WSEL_FC3_B), .b_addr(wt_wr.addr), .b_data(wt_wr.data),
    .in_vec(fc2_out), .start(fc2_done),
    .busy(fc3_busy), .done(fc3_done), .out_vec(logits)
  );

  // --------------------------------------------------------------- argmax
  always_comb begin
    class_o = '0;
    for (int k = 1; k < FC3_OUT; k++)
      if (logits[k] > logits[class_o]) class_o = 4'(k);
  end

  // ------------------------------------------------ stereo parallax (V1)
  parallax_map #(.DIM(IMG_DIM)) u_parallax (
    .clk(clk), .rst_n(rst_n),
    .l_we(st_l_we), .r_we(st_r_we), .pix_addr(st_pix_addr), .pix_data(st_pix_data),
    .th1(th1), .th(th), .start(st_start),
    .busy(st_busy), .done(st_done), .disp_map(disp_map)
  );

  // Only one engine may be active at a time.
  a_one_engine: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({sconv_busy, fc1_busy, fc2_busy, fc3_busy}));
endmodule
