// matmul_axi_ip_tb: self-checking test of the 4x4 AXI4-Lite matmul IP.
// Three single-port block RAMs are modelled here (32-bit words, byte
// addresses, one-clock reads). The test follows the host sequence of the
// prototype: reset the IP (write 0 to START and DONE), load A column by
// column and B row by row, set START, poll DONE, clear START and DONE, and
// read C. C must equal A*B (int8 wrap-around), stored column by column.
// Also checked: SANITY and STATE read-back, scratch registers, that the
// multiplier reads one word per clock from each BRAM, and the number of
// clocks from the start pulse to DONE: 4N+4, the 4N+3 of the matmul and
// one more for the DONE register.
module matmul_axi_ip_tb;
  localparam int N = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic resetn = 1'b0;

  logic [5:0]  awaddr = '0, araddr = '0;
  logic        awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0]  wstrb = 4'hf;
  logic        awready, wready, bvalid, arready, rvalid;
  logic [1:0]  bresp, rresp;
  logic        en_a, en_b, en_c;
  logic [3:0]  we_a, we_b, we_c;
  logic [14:0] addr_a, addr_b, addr_c;
  logic [31:0] wd_a, wd_b, wd_c, rd_a, rd_b, rd_c;

  matmul_axi_ip dut (
    .s00_axi_aclk(clk), .s00_axi_aresetn(resetn),
    .s00_axi_awaddr(awaddr), .s00_axi_awvalid(awvalid), .s00_axi_awready(awready),
    .s00_axi_wdata(wdata), .s00_axi_wstrb(wstrb), .s00_axi_wvalid(wvalid), .s00_axi_wready(wready),
    .s00_axi_bresp(bresp), .s00_axi_bvalid(bvalid), .s00_axi_bready(bready),
    .s00_axi_araddr(araddr), .s00_axi_arvalid(arvalid), .s00_axi_arready(arready),
    .s00_axi_rdata(rdata), .s00_axi_rresp(rresp), .s00_axi_rvalid(rvalid), .s00_axi_rready(rready),
    .bram_en_a(en_a), .bram_we_a(we_a), .bram_addr_a(addr_a), .bram_wdata_a(wd_a), .bram_rdata_a(rd_a),
    .bram_en_b(en_b), .bram_we_b(we_b), .bram_addr_b(addr_b), .bram_wdata_b(wd_b), .bram_rdata_b(rd_b),
    .bram_en_c(en_c), .bram_we_c(we_c), .bram_addr_c(addr_c), .bram_wdata_c(wd_c), .bram_rdata_c(rd_c)
  );

  // block RAM models, 16 words each
  logic [31:0] mem_a [16], mem_b [16], mem_c [16];
  always_ff @(posedge clk) begin
    if (en_a) rd_a <= mem_a[addr_a[5:2]];
    if (en_b) rd_b <= mem_b[addr_b[5:2]];
    if (en_c) begin
      if (we_c == 4'hf) mem_c[addr_c[5:2]] <= wd_c;
      rd_c <= mem_c[addr_c[5:2]];
    end
  end

  int checks = 0, failures = 0;
  int t_start = 0, t_done = 0, cyc;
  int reads_a = 0, reads_b = 0;
  always_ff @(posedge clk) begin
    if (resetn && en_a) reads_a <= reads_a + 1;
    if (resetn && en_b) reads_b <= reads_b + 1;
  end

  // The AXI tasks drive and sample 1 time unit after a clock edge, so a
  // handshake counts at the edge where both valid and ready were high.
  // cycle stamps of the start pulse and of DONE rising
  int cycle = 0;
  logic done_q = 1'b0;
  always_ff @(posedge clk) begin
    cycle  <= cycle + 1;
    done_q <= dut.done_bit;
    if (resetn && dut.start) t_start <= cycle;
    if (resetn && dut.done_bit && !done_q) t_done <= cycle;
  end

  task automatic axi_write(input logic [5:0] addr, input logic [31:0] data);
    logic hs;
    @(posedge clk); #1;
    awaddr = addr; wdata = data; awvalid = 1'b1; wvalid = 1'b1; bready = 1'b1;
    do begin hs = awready && wready; @(posedge clk); #1; end while (!hs);
    awvalid = 1'b0; wvalid = 1'b0;
    while (!bvalid) begin @(posedge clk); #1; end
    checks++;
    if (bresp != 2'b00) begin failures++; $display("FAIL: bresp"); end
    @(posedge clk); #1;
    bready = 1'b0;
  endtask

  task automatic axi_read(input logic [5:0] addr, output logic [31:0] data);
    logic hs;
    @(posedge clk); #1;
    araddr = addr; arvalid = 1'b1; rready = 1'b1;
    do begin hs = arready; @(posedge clk); #1; end while (!hs);
    arvalid = 1'b0;
    while (!rvalid) begin @(posedge clk); #1; end
    data = rdata;
    @(posedge clk); #1;
    rready = 1'b0;
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL: %s got %h expected %h", what, got, exp); end
  endtask

  logic [7:0] A [N][N], B [N][N], C [N][N];
  logic [31:0] r;

  initial begin
    repeat (3) @(posedge clk);
    resetn <= 1'b1;
    @(posedge clk);
    axi_read(6'h24, r); expect_eq(r, 32'h4d4d0404, "sanity");
    axi_write(6'h08, 32'hdeadbeef);
    axi_read(6'h08, r); expect_eq(r, 32'hdeadbeef, "scratch register");
    for (int run = 0; run < 3; run++) begin
      // reset(): write 0 to START and DONE
      axi_write(6'h00, 0);
      axi_write(6'h04, 0);
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          A[i][j] = (run == 0) ? 8'($urandom_range(0, 9)) : 8'($urandom);
          B[i][j] = (run == 0) ? 8'($urandom_range(0, 9)) : 8'($urandom);
        end
      for (int k = 0; k < N; k++) begin
        mem_a[k] = {A[3][k], A[2][k], A[1][k], A[0][k]};   // column k of A
        mem_b[k] = {B[k][3], B[k][2], B[k][1], B[k][0]};   // row k of B
      end
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          C[i][j] = '0;
          for (int k = 0; k < N; k++) C[i][j] += A[i][k] * B[k][j];
        end
      axi_read(6'h14, r); expect_eq(r, 0, "state idle");
      reads_a = 0; reads_b = 0;
      // start(): write 1 to START, then wait for DONE
      axi_write(6'h00, 1);
      for (cyc = 0; cyc < 60 && !dut.done_bit; cyc++) @(posedge clk);
      @(posedge clk); #1;
      expect_eq(32'(t_done - t_start), 32'(4 * N + 4), "clocks from start pulse to DONE");
      axi_read(6'h04, r); expect_eq(r, 1, "is_done");
      axi_read(6'h14, r); expect_eq(r, 2, "state done");
      expect_eq(32'(reads_a), N, "reads of BRAM A");
      expect_eq(32'(reads_b), N, "reads of BRAM B");
      // clear_done(): write 0 to START, 1 to DONE
      axi_write(6'h00, 0);
      axi_write(6'h04, 1);
      axi_read(6'h04, r); expect_eq(r, 0, "done cleared");
      axi_read(6'h14, r); expect_eq(r, 0, "state back to idle");
      for (int j = 0; j < N; j++)
        expect_eq(mem_c[j], {C[3][j], C[2][j], C[1][j], C[0][j]}, "column of C");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
