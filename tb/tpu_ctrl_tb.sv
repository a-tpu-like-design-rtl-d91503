// tpu_ctrl_tb: self-checking test of the control FSM.
// The testbench plays the configuration block (START held until done_set)
// and the matmul (done rises a chosen number of clocks after start). It
// checks: exactly one start pulse, one clock after START; done_set exactly
// PIPE_LAT+1 clocks after the matmul's done is seen, for one clock;
// a START with the matmul disabled completes one clock after START without a start
// pulse; and the BRAM A port carries the setup unit's reads unchanged and
// the output writes at addr_c + col*stride_c.
module tpu_ctrl_tb;
  localparam int N = 8, AW = 11, DW = 8, PIPE_LAT = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1;
  logic start_tpu = 1'b0, enable_matmul = 1'b1, start, mm_done = 1'b0, done_set, busy;
  logic [AW-1:0] addr_c = '0, stride_c = '0, rd_addr = '0, bram_addr;
  logic out_valid = 1'b0, rd_en = 1'b0, bram_en, bram_we;
  logic [$clog2(N)-1:0] out_col = '0;
  logic [N-1:0][DW-1:0] out_data = '0, bram_wdata;

  tpu_ctrl #(.N(N), .AWIDTH(AW), .DWIDTH(DW), .PIPE_LAT(PIPE_LAT)) dut (.*);

  int checks = 0, failures = 0;
  int starts = 0, dones = 0;
  always_ff @(posedge clk) begin
    if (!rst && start) starts <= starts + 1;
    if (!rst && done_set) dones <= dones + 1;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL: %s got %0d expected %0d", what, got, exp); end
  endtask

  int t_start, t_done;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    for (int run = 0; run < 3; run++) begin
      automatic int mm_lat = 10 + run * 7;
      start_tpu <= 1'b1;
      t_start = -1; t_done = -1;
      for (int c = 1; c < 80; c++) begin
        @(posedge clk); #1;
        if (start && t_start < 0) t_start = c;
        if (t_start > 0 && c == t_start + mm_lat) mm_done = 1'b1;
        if (done_set && t_done < 0) begin t_done = c; start_tpu = 1'b0; end
        if (t_done > 0 && c == t_done + 1) mm_done = 1'b0;   // next start clears it
      end
      expect_eq(t_start, 1, "start pulse one clock after START");
      expect_eq(t_done, 1 + mm_lat + PIPE_LAT + 1, "done_set latency");
      expect_eq(starts, run + 1, "one start pulse per operation");
      expect_eq(dones, run + 1, "one done_set per operation");
    end
    // matmul disabled
    enable_matmul <= 1'b0; start_tpu <= 1'b1;
    t_done = -1;
    for (int c = 1; c < 10; c++) begin
      @(posedge clk); #1;
      if (done_set && t_done < 0) begin t_done = c; start_tpu = 1'b0; end
    end
    expect_eq(t_done, 1, "disabled matmul completes");
    expect_eq(starts, 3, "no start pulse when disabled");
    // BRAM A port multiplexing
    rd_en <= 1'b1; rd_addr <= 11'd77; #1;
    expect_eq(int'(bram_en), 1, "read en");
    expect_eq(int'(bram_we), 0, "read we");
    expect_eq(int'(bram_addr), 77, "read addr");
    rd_en <= 1'b0; addr_c <= 11'd500; stride_c <= 11'd3;
    for (int j = 0; j < N; j++) begin
      out_valid <= 1'b1; out_col <= ($clog2(N))'(j); out_data <= {8{8'(j)}};
      #1;
      expect_eq(int'(bram_we), 1, "write we");
      expect_eq(int'(bram_addr), 500 + 3 * j, "write addr");
      expect_eq(int'(bram_wdata[N-1]), j, "write data");
      @(posedge clk);
    end
    out_valid <= 1'b0;
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
