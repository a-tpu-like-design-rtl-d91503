// systolic_setup_tb: self-checking test of the systolic data setup unit.
// A behavioural synchronous-read memory in the testbench answers the
// unit's reads. Checks that word k is requested at base + k*stride in
// the k-th clock after start (one word per clock, N clocks in a row),
// and that lane i of word k appears on data_out exactly 2+k+i clocks after
// the start clock, with zeros on every lane at all other times.
module systolic_setup_tb;
  localparam int N = 8, DW = 8, AW = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1, start = 1'b0;
  logic [AW-1:0] base_addr = '0, stride = '0;
  logic bram_en;
  logic [AW-1:0] bram_addr;
  logic [N-1:0][DW-1:0] bram_rdata, data_out;

  systolic_setup #(.N(N), .DWIDTH(DW), .AWIDTH(AW)) dut (.*);

  // memory model: word at address x has lane i = x*3 + i*17 + 1
  function automatic logic [N-1:0][DW-1:0] word_at(logic [AW-1:0] x);
    logic [N-1:0][DW-1:0] w;
    for (int i = 0; i < N; i++) w[i] = DW'(x * 3 + i * 17 + 1);
    return w;
  endfunction
  always_ff @(posedge clk) if (bram_en) bram_rdata <= word_at(bram_addr);

  int checks = 0, failures = 0;
  int cyc;   // clocks since the start clock
  int reads;

  task automatic run(input int base, input int str);
    base_addr <= AW'(base); stride <= AW'(str); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    reads = 0;
    for (cyc = 1; cyc < 3 * N + 4; cyc++) begin
      #1;
      // address check
      if (cyc >= 1 && cyc <= N) begin
        checks++;
        if (!bram_en || bram_addr !== AW'(base + (cyc - 1) * str)) begin
          failures++;
          $display("FAIL: cycle %0d en=%b addr=%0d", cyc, bram_en, bram_addr);
        end
      end else begin
        checks++;
        if (bram_en) begin failures++; $display("FAIL: extra read at cycle %0d", cyc); end
      end
      if (bram_en) reads++;
      // data check: lane i carries word k = cyc-2-i
      for (int i = 0; i < N; i++) begin
        automatic int k = cyc - 2 - i;
        automatic logic [DW-1:0] exp = (k >= 0 && k < N) ? word_at(AW'(base + k * str))[i] : '0;
        checks++;
        if (data_out[i] !== exp) begin
          failures++;
          $display("FAIL: cycle %0d lane %0d got %h exp %h", cyc, i, data_out[i], exp);
        end
      end
      @(posedge clk);
    end
    checks++;
    if (reads != N) begin failures++; $display("FAIL: %0d reads", reads); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run(0, 1);
    run(100, 3);
    run(2040, 5);   // wraps around the address space
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
