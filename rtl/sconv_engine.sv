// sconv_engine: SCONV, the second convolution layer on binary SLIT features.
//
// Because every input activation is 0 or 1, the multiply of a normal
// convolution reduces to a multiplexer that passes the weight or zero
// (document Fig. 15(b)); no multiplier is used. The engine walks the output
// positions in raster order and, for each, the IC*K*K kernel taps in the
// order (ic, ky, kx). In each cycle one tap is applied to all OC output
// channels at once: OC multiplexers feed OC accumulators. After the last tap
// the bias is added, the sum is saturated to DATA_W bits, ReLU is applied
// (when RELU = 1) and the OC results are written to out_map.
// The MUX datapath is the document's; the tap order, the OC-wide parallelism
// and the ReLU after SCONV are this design's choices.
//
// Number format: weights and biases are Q(DATA_W-FRAC).FRAC; a binary input
// counts as 1.0, so the accumulator is in the same format as the weights.
//
// Interface:
//   w_we/w_addr/w_data  write weight (oc*IC + ic)*K*K + ky*K + kx
//   b_we/b_addr/b_data  write bias of output channel b_addr
//   in_map              binary input, must stay stable while busy
//   start               one-cycle pulse, accepted when not busy
//   done                one-cycle pulse when out_map is complete
// Timing: done rises exactly OD*OD*IC*K*K + 1 cycles after the start cycle
// (12 801 cycles for the LeNet-5 sizes).
module sconv_engine
  import slit_pkg::*;
#(
  parameter int unsigned IC   = SLIT_CH,
  parameter int unsigned DIM  = SMP_DIM,
  parameter int unsigned K    = K_SCONV,
  parameter int unsigned OC   = SCONV_OC,
  parameter bit          RELU = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        w_we,
  input  logic [15:0] w_addr,
  input  data_t       w_data,
  input  logic        b_we,
  input  logic [15:0] b_addr,
  input  data_t       b_data,
  input  logic        in_map  [IC][DIM][DIM],
  input  logic        start,
  output logic        busy,
  output logic        done,
  output data_t       out_map [OC][DIM-K+1][DIM-K+1]
);
  localparam int unsigned OD   = DIM - K + 1;
  localparam int unsigned TAPS = IC * K * K;
  localparam int unsigned ACC_W = 32;
  localparam int unsigned OW = $clog2(OD);    // output position counter width
  localparam int unsigned CW = $clog2(IC);
  localparam int unsigned KW = $clog2(K);
  localparam int unsigned TW = $clog2(TAPS);
  localparam int unsigned DW = $clog2(DIM);   // input map index width
  localparam int unsigned NW = $clog2(OC);

  data_t weight [OC][TAPS];
  data_t bias   [OC];

  logic signed [ACC_W-1:0] acc [OC];
  logic [OW-1:0]             oy, ox;
  logic [CW-1:0]             ic;
  logic [KW-1:0]             ky, kx;
  logic [TW-1:0]             tap;
  logic                      last_tap, in_bit;

  // Parameter memories: one write per cycle from the host side.
  always_ff @(posedge clk) begin
    if (w_we) weight[NW'(32'(w_addr) / TAPS)][TW'(32'(w_addr) % TAPS)] <= w_data;
    if (b_we) bias[NW'(b_addr)] <= b_data;
  end

  assign last_tap = (tap == TW'(TAPS - 1));
  assign in_bit   = in_map[ic][DW'(oy) + DW'(ky)][DW'(ox) + DW'(kx)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      oy <= '0; ox <= '0; ic <= '0; ky <= '0; kx <= '0; tap <= '0;
      for (int o = 0; o < OC; o++) acc[o] <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          oy <= '0; ox <= '0; ic <= '0; ky <= '0; kx <= '0; tap <= '0;
          for (int o = 0; o < OC; o++) acc[o] <= '0;
        end
      end else begin
        // MUX-accumulate: the binary input selects the weight or zero.
        for (int o = 0; o < OC; o++) begin
          logic signed [ACC_W-1:0] s;
          s = acc[o] + (in_bit ? ACC_W'(weight[o][tap]) : '0);
          if (last_tap) begin
            data_t r;
            r = sat(48'(s) + 48'(bias[o]));
            out_map[o][oy][ox] <= (RELU && r < 0) ? '0 : r;
            acc[o] <= '0;
          end else begin
            acc[o] <= s;
          end
        end
        // Tap and position counters.
        if (last_tap) begin
          tap <= '0; ic <= '0; ky <= '0; kx <= '0;
          if (ox == OW'(OD - 1)) begin
            ox <= '0;
            if (oy == OW'(OD - 1)) begin
              oy   <= '0;
              busy <= 1'b0;
              done <= 1'b1;
            end else begin
              oy <= oy + 1'b1;
            end
          end else begin
            ox <= ox + 1'b1;
          end
        end else begin
          tap <= tap + 1'b1;
          if (kx == KW'(K - 1)) begin
            kx <= '0;
            if (ky == KW'(K - 1)) begin
              ky <= '0;
              ic <= ic + 1'b1;
            end else begin
              ky <= ky + 1'b1;
            end
          end else begin
            kx <= kx + 1'b1;
          end
        end
      end
    end
  end
endmodule
