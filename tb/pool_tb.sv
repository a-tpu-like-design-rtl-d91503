// pool_tb: self-checking test of the average-pooling unit.
// For windows 1, 2 and 4 (and an unsupported value, and disabled) random
// signed columns are pooled; one clock later lane i < N/W must hold the
// floor of the mean of lanes i*W..i*W+W-1 and the other lanes zero.
module pool_tb;
  localparam int N = 8, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, enable = 1'b0;
  logic [2:0] window = 3'd1;
  logic in_valid = 1'b0, out_valid;
  logic [$clog2(N)-1:0] in_col = '0, out_col;
  logic [N-1:0][DW-1:0] in_data = '0, out_data;

  pool #(.N(N), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0][DW-1:0] v, exp;
  logic [2:0] w;
  logic en;
  int n2 = 0, n4 = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int t = 0; t < 300; t++) begin
      case (t % 5)
        0: w = 3'd1;
        1: w = 3'd2;
        2: w = 3'd4;
        3: w = 3'd3;
        default: w = 3'd2;
      endcase
      en = (t % 7 != 6);
      for (int i = 0; i < N; i++) v[i] = 8'($urandom);
      if (en && (w == 3'd2 || w == 3'd4)) begin
        exp = '0;
        for (int i = 0; i < N / int'(w); i++) begin
          automatic int s = 0;
          for (int q = 0; q < int'(w); q++) s += int'(signed'(v[i * int'(w) + q]));
          // floor division
          exp[i] = 8'((s >= 0) ? s / int'(w) : -((-s + int'(w) - 1) / int'(w)));
        end
        if (w == 3'd2) n2++; else n4++;
      end else begin
        exp = v;
      end
      enable <= en; window <= w;
      in_valid <= 1'b1; in_col <= ($clog2(N))'(t % N); in_data <= v;
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || out_data !== exp) begin
        failures++;
        $display("FAIL: t=%0d w=%0d in %h got %h exp %h", t, w, v, out_data, exp);
      end
    end
    checks++;
    if (n2 == 0 || n4 == 0) failures++;
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
