// accumulators_tb: self-checking test of the accumulator block.
// Streams tiles of N columns through the block in each mode and checks,
// one clock later, the output against a reference: Disabled passes the
// column, Save emits nothing and stores, Add emits stored+new (int8 wrap)
// and stores the sum. A Save followed by two Adds must deliver the sum of
// three tiles, as in the 3-pass accumulation of a 24-wide product.
module accumulators_tb;
  import tpu_pkg::*;
  localparam int N = 8, DW = 8;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1;
  acc_mode_e mode = ACC_DISABLED;
  logic in_valid = 1'b0, out_valid;
  logic [$clog2(N)-1:0] in_col = '0, out_col;
  logic [N-1:0][DW-1:0] in_data = '0, out_data;

  accumulators #(.N(N), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [N-1:0][DW-1:0] store [N];
  logic [N-1:0][DW-1:0] v, exp;
  logic exp_valid;

  task automatic tile(input acc_mode_e m);
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) v[i] = 8'($urandom);
      mode <= m; in_valid <= 1'b1; in_col <= ($clog2(N))'(j); in_data <= v;
      @(posedge clk);
      in_valid <= 1'b0;
      case (m)
        ACC_SAVE: begin store[j] = v; exp_valid = 1'b0; end
        ACC_ADD: begin
          for (int i = 0; i < N; i++) store[j][i] = store[j][i] + v[i];
          exp = store[j]; exp_valid = 1'b1;
        end
        default: begin exp = v; exp_valid = 1'b1; end
      endcase
      #1;
      checks++;
      if (out_valid !== exp_valid || (exp_valid && (out_data !== exp || out_col !== ($clog2(N))'(j)))) begin
        failures++;
        $display("FAIL: mode %s col %0d valid %b data %h exp %b %h",
                 m.name(), j, out_valid, out_data, exp_valid, exp);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    tile(ACC_DISABLED);
    tile(ACC_SAVE);
    tile(ACC_ADD);
    tile(ACC_ADD);
    tile(ACC_DISABLED);   // bypass must not disturb the stored tile
    tile(ACC_ADD);
    tile(ACC_SAVE);
    tile(ACC_ADD);
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
