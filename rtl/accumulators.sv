// accumulators: partial-sum storage for matrices larger than the array.
//
// Holds N*N int8 accumulators (64 for the 8x8 array), one per element of
// an output tile. The matmul result arrives one column per clock
// (in_data[i] = C[i][in_col]). The unit has three modes, as published:
//   ACC_DISABLED  the column is passed downstream unchanged (bypass);
//   ACC_SAVE      the column is stored in the accumulators;
//   ACC_ADD       the column is added to the stored column, the sum is
//                 stored and also sent downstream.
// That Save sends nothing downstream while Add both stores and sends is this
// design's reading: a K-pass tile is computed as one Save pass followed by
// K-1 Add passes, and the last Add pass delivers the finished tile (earlier
// Add passes deliver partial sums that the last one overwrites in memory).
// Latency: one clock from in_* to out_*. Sums wrap at 8 bits.
module accumulators #(
  parameter int N      = 8,
  parameter int DWIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  tpu_pkg::acc_mode_e       mode,
  input  logic                     in_valid,
  input  logic [$clog2(N)-1:0]     in_col,
  input  logic [N-1:0][DWIDTH-1:0] in_data,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_col,
  output logic [N-1:0][DWIDTH-1:0] out_data
);
  import tpu_pkg::*;

  logic [N-1:0][DWIDTH-1:0] acc_q [N];   // acc_q[col][row]
  logic [N-1:0][DWIDTH-1:0] sum;

  always_comb begin
    for (int i = 0; i < N; i++) sum[i] = acc_q[in_col][i] + in_data[i];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int c = 0; c < N; c++) acc_q[c] <= '0;
    end else if (in_valid) begin
      unique case (mode)
        ACC_SAVE: acc_q[in_col] <= in_data;
        ACC_ADD:  acc_q[in_col] <= sum;
        default:  ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_col   <= '0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid && (mode != ACC_SAVE);
      out_col   <= in_col;
      out_data  <= (mode == ACC_ADD) ? sum : in_data;
    end
  end

endmodule
