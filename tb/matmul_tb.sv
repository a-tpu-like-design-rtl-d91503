// matmul_tb: self-checking test of the 8x8x8 systolic matrix multiplier.
// The testbench skews the operands itself (lane i of A column k and lane j
// of B row k in cycle s+2+k+i resp. s+2+k+j after the start clock s), then
// checks that column j of C = A*B (int8, wrap-around) appears on out_data
// exactly in cycle s+3N+3+j with out_valid, that out_valid is low
// otherwise, and that done rises in cycle s+4N+3. Three random products,
// back to back, show that start clears the previous result.
module matmul_tb;
  localparam int N = 8, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, start = 1'b0;
  logic [N-1:0][DW-1:0] a_in = '0, b_in = '0, out_data;
  logic out_valid, done;
  logic [$clog2(N)-1:0] out_col;

  matmul #(.N(N), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] A [N][N], B [N][N], C [N][N];

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 3; t++) begin
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[i][j] = 8'($urandom);
          B[i][j] = 8'($urandom);
        end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          C[i][j] = '0;
          for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
        end
      start <= 1'b1;
      @(posedge clk);      // this edge ends the start clock s
      start <= 1'b0;
      for (int cyc = 1; cyc <= 4 * N + 4; cyc++) begin
        // drive the operands for cycle s+cyc
        for (int i = 0; i < N; i++) begin
          automatic int k = cyc - 2 - i;
          a_in[i] <= (k >= 0 && k < N) ? A[i][k] : '0;
          b_in[i] <= (k >= 0 && k < N) ? B[k][i] : '0;
        end
        #1;
        if (cyc >= 3 * N + 3 && cyc < 4 * N + 3) begin
          automatic int j = cyc - (3 * N + 3);
          checks++;
          if (!out_valid || out_col !== ($clog2(N))'(j)) begin
            failures++; $display("FAIL: cycle %0d valid=%b col=%0d", cyc, out_valid, out_col);
          end
          for (int i = 0; i < N; i++) begin
            checks++;
            if (out_data[i] !== C[i][j]) begin
              failures++;
              $display("FAIL: C[%0d][%0d] got %h exp %h", i, j, out_data[i], C[i][j]);
            end
          end
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("FAIL: out_valid at cycle %0d", cyc); end
        end
        checks++;
        if (done !== (cyc >= 4 * N + 3)) begin
          failures++; $display("FAIL: done=%b at cycle %0d", done, cyc);
        end
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
