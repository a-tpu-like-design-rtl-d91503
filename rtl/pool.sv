// pool: average pooling across the lanes of one output column.
//
// Works on one column (one output batch) at a time, as it leaves the
// normalization unit. The window is 1, 2 or 4, as published: with window W,
// output lane i (i < N/W) is the average of input lanes i*W .. i*W+W-1 and
// the remaining lanes are zero, because the bus keeps its fixed width.
// The average is the signed sum shifted right arithmetically by log2(W),
// which rounds toward minus infinity; pooling inside one bus word and this
// rounding are this design's choices. A window value other than 2 or 4,
// or enable low, passes the data unchanged. Latency: one clock.
module pool #(
  parameter int N      = 8,
  parameter int DWIDTH = 8
) (
  input  logic                                clk,
  input  logic                                rst,
  input  logic                                enable,
  input  logic [tpu_pkg::MAX_BITS_POOL-1:0]   window,
  input  logic                                in_valid,
  input  logic [$clog2(N)-1:0]                in_col,
  input  logic [N-1:0][DWIDTH-1:0]            in_data,
  output logic                                out_valid,
  output logic [$clog2(N)-1:0]                out_col,
  output logic [N-1:0][DWIDTH-1:0]            out_data
);

  logic [N-1:0][DWIDTH-1:0] y;
  logic signed [DWIDTH+1:0] s2 [N/2];
  logic signed [DWIDTH+1:0] s4 [N/4];

  always_comb begin
    for (int i = 0; i < N/2; i++)
      s2[i] = (DWIDTH+2)'(signed'(in_data[2*i])) + (DWIDTH+2)'(signed'(in_data[2*i+1]));
    for (int i = 0; i < N/4; i++)
      s4[i] = s2[2*i] + s2[2*i+1];
    y = '0;
    if (enable && window == 3'd2) begin
      for (int i = 0; i < N/2; i++) y[i] = DWIDTH'(s2[i] >>> 1);
    end else if (enable && window == 3'd4) begin
      for (int i = 0; i < N/4; i++) y[i] = DWIDTH'(s4[i] >>> 2);
    end else begin
      y = in_data;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_col   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      out_col   <= in_col;
      out_data  <= y;
    end
  end

endmodule
