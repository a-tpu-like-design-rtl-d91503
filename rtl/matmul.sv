// matmul: N x N x N output-stationary systolic matrix multiplier.
//
// An N x N grid of processing elements (pe). Row i of the grid receives
// lane i of the staged A operands from the left and passes them right;
// column j receives lane j of the staged B operands from the top and passes
// them down. Each PE keeps its own element C[i][j] = sum_k A[i][k]*B[k][j]
// in place. A clock counter, started with the operands, knows when the last
// product has reached the last PE (the result "wave" runs from the top-left
// to the bottom-right corner); the unit then captures all N*N results at
// once and shifts them out one column of C per clock, column 0 first, so
// that a column can be written as one memory word without any transposing.
// Waiting for the whole wave before shifting out is the published choice;
// the exact cycle counts below come from this implementation's pipeline.
//
// Timing: start in cycle s, operands from systolic_setup (lane i of word k
// in cycle s+2+k+i). Results are captured in cycle s+3N+2 and column j is
// on out_data with out_valid in cycle s+3N+3+j. done rises after the last
// column and stays high until the next start. int8 arithmetic, wrapping.
module matmul #(
  parameter int N      = 8,
  parameter int DWIDTH = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     start,
  input  logic [N-1:0][DWIDTH-1:0] a_in,
  input  logic [N-1:0][DWIDTH-1:0] b_in,
  output logic                     out_valid,
  output logic [$clog2(N)-1:0]     out_col,
  output logic [N-1:0][DWIDTH-1:0] out_data,   // out_data[i] = C[i][out_col]
  output logic                     done
);

  localparam int CAPTURE = 3 * N + 2;          // cycle after start of capture
  localparam int LAST    = CAPTURE + N;        // last shift-out cycle
  localparam int CW      = $clog2(LAST + 2);
  localparam int IW      = (N > 1) ? $clog2(N) : 1;

  // Operand wires between PEs: a_w[i][j] enters PE(i,j) from the left,
  // b_w[i][j] enters PE(i,j) from above.
  logic [DWIDTH-1:0] a_w [N][N+1];
  logic [DWIDTH-1:0] b_w [N+1][N];
  logic [DWIDTH-1:0] acc [N][N];

  for (genvar i = 0; i < N; i++) begin : g_edge
    assign a_w[i][0] = a_in[i];
    assign b_w[0][i] = b_in[i];
  end

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      pe #(.DWIDTH(DWIDTH)) u_pe (
        .clk   (clk),
        .rst   (rst),
        .clear (start),
        .a_in  (a_w[i][j]),
        .b_in  (b_w[i][j]),
        .a_out (a_w[i][j+1]),
        .b_out (b_w[i+1][j]),
        .acc   (acc[i][j])
      );
    end
  end

  // Clock count and done generation.
  logic [CW-1:0] cnt;
  logic          running;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt     <= '0;
      running <= 1'b0;
      done    <= 1'b0;
    end else if (start) begin
      cnt     <= CW'(1);
      running <= 1'b1;
      done    <= 1'b0;
    end else if (running) begin
      cnt <= cnt + 1'b1;
      if (cnt == CW'(LAST)) begin
        running <= 1'b0;
        done    <= 1'b1;
      end
    end
  end

  // Output capture and shift-out.
  logic [DWIDTH-1:0] cap [N][N];
  logic [IW-1:0]     col_q;
  logic              shifting;

  always_ff @(posedge clk) begin
    if (rst) begin
      shifting <= 1'b0;
      col_q    <= '0;
    end else if (running && cnt == CW'(CAPTURE)) begin
      shifting <= 1'b1;
      col_q    <= '0;
    end else if (shifting) begin
      col_q <= col_q + 1'b1;
      if (col_q == IW'(N - 1)) shifting <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (running && cnt == CW'(CAPTURE)) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          cap[i][j] <= acc[i][j];
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) out_data[i] = cap[i][col_q];
  end

  assign out_valid = shifting;
  assign out_col   = $clog2(N)'(col_q);

endmodule
