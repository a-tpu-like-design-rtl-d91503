// norm_tb: self-checking test of the normalization unit.
// Random columns with random mean, inverse variance and validity mask;
// the output one clock later must be (x - mean) * inv_var (int8 wrap) for
// elements whose row and column are both valid, x otherwise, and x
// everywhere when the unit is disabled.
module norm_tb;
  localparam int N = 8, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, enable = 1'b0;
  logic [DW-1:0] mean = '0, inv_var = '0;
  logic [N-1:0] valid_mask = '1;
  logic in_valid = 1'b0, out_valid;
  logic [$clog2(N)-1:0] in_col = '0, out_col;
  logic [N-1:0][DW-1:0] in_data = '0, out_data;

  norm #(.N(N), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0][DW-1:0] v, exp;
  logic [DW-1:0] m, iv;
  logic [N-1:0] mk;
  logic en;
  int col;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      m = 8'($urandom); iv = 8'($urandom); col = $urandom_range(0, N-1);
      mk = (t % 3 == 0) ? '1 : N'($urandom);
      en = (t % 5 != 0);
      for (int i = 0; i < N; i++) v[i] = 8'($urandom);
      for (int i = 0; i < N; i++) begin
        automatic int d = (int'(v[i]) - int'(m)) * int'(iv);
        exp[i] = (en && mk[i] && mk[col]) ? 8'(d) : v[i];
      end
      enable <= en; mean <= m; inv_var <= iv; valid_mask <= mk;
      in_valid <= 1'b1; in_col <= ($clog2(N))'(col); in_data <= v;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_data !== exp || out_col !== ($clog2(N))'(col)) begin
        failures++;
        $display("FAIL: t=%0d got %h exp %h", t, out_data, exp);
      end
    end
    in_valid <= 1'b0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL: valid not cleared"); end
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
