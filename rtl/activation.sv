// activation: ReLU or piece-wise-linear TanH on every lane.
//
// ReLU is a comparator and a multiplexer per lane: y = x if x >= 0, else 0.
// TanH is approximated as y = a*x + b, where a (slope) and b (intercept)
// come from two 11-entry tables addressed by a range comparator on x, as
// published. The input range -128..127 stands for -4..3.97 and the output
// range -127..127 for -1..1, so the breakpoints and coefficients are in
// int8 units directly:
//     x >= 90: 0,127    39..89: 0,99     28..38: 2,46    16..27: 3,18
//     1..15: 4,0        0: 0,0           -15..-1: 4,0    -27..-16: 3,-18
//     -38..-28: 2,-46   -89..-39: 0,-99  x <= -90: 0,-127
// The product a*x and the intercept b are registered (the "buffers" of the
// published diagram) and added after the register. ReLU and the bypass
// (enable low) are registered in the same stage, so every mode has a
// latency of one clock. select picks ReLU (0) or TanH (1).
module activation #(
  parameter int N      = 8,
  parameter int DWIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  tpu_pkg::act_sel_e        select,
  input  logic                     in_valid,
  input  logic [$clog2(N)-1:0]     in_col,
  input  logic [N-1:0][DWIDTH-1:0] in_data,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_col,
  output logic [N-1:0][DWIDTH-1:0] out_data
);
  import tpu_pkg::*;

  localparam int NSEG = 11;

  // Slope and intercept tables (LUT A and LUT B).
  localparam logic signed [3:0] SLOPE [NSEG] =
    '{4'sd0, 4'sd0, 4'sd2, 4'sd3, 4'sd4, 4'sd0, 4'sd4, 4'sd3, 4'sd2, 4'sd0, 4'sd0};
  localparam logic signed [7:0] ICPT [NSEG] =
    '{8'sd127, 8'sd99, 8'sd46, 8'sd18, 8'sd0, 8'sd0, 8'sd0, -8'sd18, -8'sd46, -8'sd99, -8'sd127};

  // Address decoder: range comparator giving the segment of x.
  function automatic logic [3:0] segment(logic signed [7:0] x);
    if      (x >= 8'sd90)  return 4'd0;
    else if (x >= 8'sd39)  return 4'd1;
    else if (x >= 8'sd28)  return 4'd2;
    else if (x >= 8'sd16)  return 4'd3;
    else if (x >= 8'sd1)   return 4'd4;
    else if (x == 8'sd0)   return 4'd5;
    else if (x > -8'sd16)  return 4'd6;
    else if (x > -8'sd28)  return 4'd7;
    else if (x > -8'sd39)  return 4'd8;
    else if (x > -8'sd90)  return 4'd9;
    else                   return 4'd10;
  endfunction

  logic signed [11:0]      prod_q [N];
  logic signed [7:0]       icpt_q [N];
  logic [N-1:0][DWIDTH-1:0] pass_q;
  logic                    tanh_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_col   <= '0;
      tanh_q    <= 1'b0;
      pass_q    <= '0;
      for (int i = 0; i < N; i++) begin
        prod_q[i] <= '0;
        icpt_q[i] <= '0;
      end
    end else begin
      out_valid <= in_valid;
      out_col   <= in_col;
      tanh_q    <= enable && (select == ACT_TANH);
      for (int i = 0; i < N; i++) begin
        automatic logic signed [7:0] x = signed'(in_data[i][7:0]);
        automatic logic [3:0]        s = segment(x);
        prod_q[i] <= 12'(x * SLOPE[s]);
        icpt_q[i] <= ICPT[s];
        if (enable && select == ACT_RELU)
          pass_q[i] <= (x >= 0) ? in_data[i] : '0;
        else
          pass_q[i] <= in_data[i];
      end
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++)
      out_data[i] = tanh_q ? DWIDTH'(prod_q[i] + 12'(icpt_q[i])) : pass_q[i];
  end

endmodule
