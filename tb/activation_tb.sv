// activation_tb: self-checking test of the activation unit.
// Sweeps every int8 input through ReLU, TanH and the bypass, lane by lane,
// and checks the registered output (latency one clock). The TanH reference
// evaluates the eleven-segment piece-wise linear function directly from
// its breakpoints; spot values are also compared with round(127*tanh(x/32))
// to within the approximation's error.
module activation_tb;
  import tpu_pkg::*;
  localparam int N = 8, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, enable = 1'b0;
  act_sel_e select = ACT_RELU;
  logic in_valid = 1'b0, out_valid;
  logic [$clog2(N)-1:0] in_col = '0, out_col;
  logic [N-1:0][DW-1:0] in_data = '0, out_data;

  activation #(.N(N), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;

  function automatic int pwl_tanh(int x);
    if (x >= 90)  return 127;
    if (x >= 39)  return 99;
    if (x >= 28)  return 2*x + 46;
    if (x >= 16)  return 3*x + 18;
    if (x > -16)  return 4*x;
    if (x > -28)  return 3*x - 18;
    if (x > -39)  return 2*x - 46;
    if (x > -90)  return -99;
    return -127;
  endfunction

  logic [N-1:0][DW-1:0] v, exp;
  int xs [N];

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int mode = 0; mode < 3; mode++) begin
      for (int base = -128; base < 128; base += N) begin
        for (int i = 0; i < N; i++) begin
          xs[i] = base + i;
          v[i] = 8'(xs[i]);
          case (mode)
            0: exp[i] = (xs[i] >= 0) ? v[i] : '0;
            1: exp[i] = 8'(pwl_tanh(xs[i]));
            default: exp[i] = v[i];
          endcase
        end
        enable <= (mode != 2); select <= (mode == 1) ? ACT_TANH : ACT_RELU;
        in_valid <= 1'b1; in_col <= ($clog2(N))'(base / N); in_data <= v;
        @(posedge clk);
        #1;
        checks++;
        if (!out_valid || out_data !== exp) begin
          failures++;
          $display("FAIL: mode %0d base %0d got %h exp %h", mode, base, out_data, exp);
        end
      end
    end
    // the approximation stays close to the mapped hyperbolic tangent
    // at the segment centres (values of 127*tanh(x/32), rounded)
    begin
      int px [6];
      int py [6];
      px = '{8, 22, 33, 60, -22, -100};
      py = '{31, 76, 98, 121, -76, -127};
      for (int p = 0; p < 6; p++) begin
        v = '0; v[0] = 8'(px[p]);
        enable <= 1'b1; select <= ACT_TANH; in_data <= v;
        @(posedge clk); #1;
        checks++;
        if (signed'(out_data[0]) - py[p] > 25 || py[p] - signed'(out_data[0]) > 25) begin
          failures++;
          $display("FAIL: tanh(%0d) = %0d, far from %0d", px[p], signed'(out_data[0]), py[p]);
        end
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
