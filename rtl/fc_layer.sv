// fc_layer: fully connected layer, out[o] = f(sum_i W[o][i]*in[i] + b[o]).
//
// A single multiply-accumulate unit steps through the weight memory in
// address order (o*N_IN + i), one product per cycle, so the memory has one
// read port. At the end of each row the bias (aligned to the product's
// 2*FRAC fraction bits) is added, the sum is shifted back to FRAC fraction
// bits (arithmetic shift, i.e. rounding toward minus infinity), saturated,
// passed through ReLU when RELU = 1 and written to out_vec[o].
// The layer function is the standard one used by the document (Eq. 3); the
// one-MAC-per-cycle schedule is this design's choice.
//
// Interface:
//   w_we/w_addr/w_data  write weight o*N_IN + i
//   b_we/b_addr/b_data  write bias of output o
//   in_vec              input activations, stable while busy
//   start / busy / done start pulse, busy level, one-cycle done pulse
//   out_vec             registered outputs
// Timing: done rises exactly N_IN*N_OUT + 1 cycles after the start cycle.
module fc_layer
  import slit_pkg::*;
#(
  parameter int unsigned N_IN  = FC1_IN,
  parameter int unsigned N_OUT = FC1_OUT,
  parameter bit          RELU  = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        w_we,
  input  logic [15:0] w_addr,
  input  data_t       w_data,
  input  logic        b_we,
  input  logic [15:0] b_addr,
  input  data_t       b_data,
  input  data_t       in_vec [N_IN],
  input  logic        start,
  output logic        busy,
  output logic        done,
  output data_t       out_vec [N_OUT]
);
  localparam int unsigned ACC_W = 48;
  localparam int unsigned AW    = $clog2(N_IN * N_OUT);
  localparam int unsigned IW    = $clog2(N_IN);
  localparam int unsigned OW    = $clog2(N_OUT);

  data_t weight [N_IN * N_OUT];
  data_t bias   [N_OUT];

  logic [AW-1:0]                addr;
  logic [IW-1:0]                i_idx;
  logic [OW-1:0]                o_idx;
  logic signed [ACC_W-1:0]      acc, sum;
  data_t                        w_rd;

  always_ff @(posedge clk) begin
    if (w_we) weight[w_addr[AW-1:0]] <= w_data;
    if (b_we) bias[OW'(b_addr)] <= b_data;
  end

  assign w_rd = weight[addr];
  assign sum  = acc + ACC_W'(w_rd * in_vec[i_idx]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      addr  <= '0;
      i_idx <= '0;
      o_idx <= '0;
      acc   <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          addr  <= '0;
          i_idx <= '0;
          o_idx <= '0;
          acc   <= '0;
        end
      end else begin
        addr <= addr + 1'b1;
        if (i_idx == IW'(N_IN - 1)) begin
          data_t r;
          r = sat(48'((sum + (ACC_W'(bias[o_idx]) <<< FRAC_W)) >>> FRAC_W));
          out_vec[o_idx] <= (RELU && r < 0) ? '0 : r;
          acc   <= '0;
          i_idx <= '0;
          if (o_idx == OW'(N_OUT - 1)) begin
            o_idx <= '0;
            busy  <= 1'b0;
            done  <= 1'b1;
          end else begin
            o_idx <= o_idx + 1'b1;
          end
        end else begin
          acc   <= sum;
          i_idx <= i_idx + 1'b1;
        end
      end
    end
  end
endmodule
