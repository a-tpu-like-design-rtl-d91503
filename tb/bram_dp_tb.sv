// bram_dp_tb: self-checking test of the dual-port block RAM.
// Writes random words through both ports, reads them back through the
// other port, and checks the one-clock read latency, that a write leaves
// rdata unchanged, and that a disabled port holds its rdata.
module bram_dp_tb;
  localparam int AW = 11, DW = 64;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          en0 = 0, we0 = 0, en1 = 0, we1 = 0;
  logic [AW-1:0] addr0 = '0, addr1 = '0;
  logic [DW-1:0] wdata0 = '0, wdata1 = '0, rdata0, rdata1;

  bram_dp #(.AWIDTH(AW), .DWIDTH(DW)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [int];

  task automatic check(input logic [DW-1:0] got, input logic [DW-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  int a;
  logic [DW-1:0] d;

  initial begin
    repeat (2) @(posedge clk);
    // write 64 words, alternating ports
    for (int k = 0; k < 64; k++) begin
      a = (k * 37) % (2**AW);
      d = {$urandom, $urandom};
      model[a] = d;
      en0 <= (k % 2 == 0); we0 <= (k % 2 == 0); addr0 <= AW'(a); wdata0 <= d;
      en1 <= (k % 2 == 1); we1 <= (k % 2 == 1); addr1 <= AW'(a); wdata1 <= d;
      @(posedge clk);
    end
    en0 <= 0; we0 <= 0; en1 <= 0; we1 <= 0;
    // read back through the other port; data must appear after one clock
    for (int k = 0; k < 64; k++) begin
      a = (k * 37) % (2**AW);
      en1 <= (k % 2 == 0); addr1 <= AW'(a);
      en0 <= (k % 2 == 1); addr0 <= AW'(a);
      @(posedge clk);
      en0 <= 0; en1 <= 0;
      #1;
      if (k % 2 == 0) check(rdata1, model[a], "port1 read");
      else            check(rdata0, model[a], "port0 read");
      // disabled port holds its value
      @(posedge clk);
      #1;
      if (k % 2 == 0) check(rdata1, model[a], "port1 hold");
      else            check(rdata0, model[a], "port0 hold");
    end
    // both ports read different addresses in the same clock
    en0 <= 1; addr0 <= AW'(0); en1 <= 1; addr1 <= AW'(37);
    @(posedge clk);
    en0 <= 0; en1 <= 0;
    #1;
    check(rdata0, model[0], "dual read p0");
    check(rdata1, model[37], "dual read p1");
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
