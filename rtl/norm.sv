// norm: inference-time normalization of the matmul output.
//
// Each element becomes (x - mean) * inv_var. Training statistics are not
// computed here: as published, only the "apply" step of batch
// normalization is done, with the mean and the inverse of the variance
// supplied by software through configuration registers, so the division
// becomes a multiplication. One subtractor and one multiplier per lane
// (N lanes), int8 arithmetic keeping the low 8 bits (this design's choice,
// matching the int8 datapath). The validity mask marks which rows and
// columns of the tile hold real data; element (i, col) is normalized only
// if mask[i] and mask[col] are both set, otherwise it passes unchanged so
// padding zeros stay zero. When enable is low every element passes.
// Latency: one clock.
module norm #(
  parameter int N      = 8,
  parameter int DWIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     enable,
  input  logic [DWIDTH-1:0]        mean,
  input  logic [DWIDTH-1:0]        inv_var,
  input  logic [N-1:0]             valid_mask,
  input  logic                     in_valid,
  input  logic [$clog2(N)-1:0]     in_col,
  input  logic [N-1:0][DWIDTH-1:0] in_data,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_col,
  output logic [N-1:0][DWIDTH-1:0] out_data
);

  logic [N-1:0][DWIDTH-1:0] y;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      if (enable && valid_mask[i] && valid_mask[in_col])
        y[i] = DWIDTH'((in_data[i] - mean) * inv_var);
      else
        y[i] = in_data[i];
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
