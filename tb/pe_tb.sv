// pe_tb: self-checking test of one processing element.
// Streams random operand pairs into the PE and checks that the operands
// come out one clock later, that the accumulator equals the int8
// (wrap-around) sum of the products three clocks after each pair, and
// that clear zeroes the sum.
module pe_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, clear = 1'b0;
  logic [7:0] a_in = '0, b_in = '0, a_out, b_out, acc;

  pe #(.DWIDTH(8)) dut (.*);

  int checks = 0, failures = 0;
  logic [7:0] a_hist [$], b_hist [$];
  logic [7:0] sum, a, b, pa, pb;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    for (int run = 0; run < 3; run++) begin
      clear <= 1'b1; a_in <= '0; b_in <= '0;
      @(posedge clk);
      clear <= 1'b0;
      sum = '0;
      for (int k = 0; k < 20 + 3; k++) begin
        a = (k < 20) ? 8'($urandom) : 8'd0;
        b = (k < 20) ? 8'($urandom) : 8'd0;
        a_in <= a; b_in <= b;
        @(posedge clk);
        #1;
        checks++;
        if (a_out !== a || b_out !== b) begin
          failures++; $display("FAIL: pass-through %h %h", a_out, b_out);
        end
        a_hist.push_back(a); b_hist.push_back(b);
        // the pair entered 3 clocks ago is now in acc
        if (a_hist.size() > 2) begin
          pa = a_hist.pop_front();
          pb = b_hist.pop_front();
          sum += pa * pb;
          // acc reflects pairs up to the one entered two edges earlier
        end
      end
      @(posedge clk); #1;
      while (a_hist.size() > 0) begin
        pa = a_hist.pop_front();
        pb = b_hist.pop_front();
        sum += pa * pb;
      end
      checks++;
      if (acc !== sum) begin failures++; $display("FAIL: acc %h expected %h", acc, sum); end
    end
    // exact latency: one pair, acc changes exactly 3 clocks after it enters
    clear <= 1'b1; @(posedge clk); clear <= 1'b0;
    a_in <= 8'd7; b_in <= 8'd9;
    @(posedge clk); a_in <= '0; b_in <= '0;
    @(posedge clk); #1;
    checks++; if (acc !== 8'd0) begin failures++; $display("FAIL: acc too early"); end
    @(posedge clk); #1;
    checks++; if (acc !== 8'd63) begin failures++; $display("FAIL: latency, acc %0d", acc); end
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
