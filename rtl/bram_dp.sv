// bram_dp: true dual-port block RAM, the storage behind BRAM A and BRAM B.
//
// Two independent synchronous ports on one array. Each port has an enable,
// a write enable, an address and write data; a read returns the addressed
// word on rdata one clock after en is high with we low (a write does not
// update rdata). The accelerator uses port 0, and port 1 is brought out so
// that a host (a testbench here, DRAM traffic in a full system) can load
// inputs and read results. Word width 64 bits (eight int8 elements) and
// depth 2048 (11 address bits) are the sizes the design was published with;
// the port arrangement and read latency are this design's own choice. If
// both ports write one address in the same cycle, port 1 wins.
module bram_dp #(
  parameter int AWIDTH = 11,
  parameter int DWIDTH = 64
) (
  input  logic              clk,
  // port 0 (accelerator side)
  input  logic              en0,
  input  logic              we0,
  input  logic [AWIDTH-1:0] addr0,
  input  logic [DWIDTH-1:0] wdata0,
  output logic [DWIDTH-1:0] rdata0,
  // port 1 (host side)
  input  logic              en1,
  input  logic              we1,
  input  logic [AWIDTH-1:0] addr1,
  input  logic [DWIDTH-1:0] wdata1,
  output logic [DWIDTH-1:0] rdata1
);

  localparam int DEPTH = 1 << AWIDTH;

  logic [DWIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en0) begin
      if (we0) mem[addr0] <= wdata0;
      else     rdata0     <= mem[addr0];
    end
    if (en1) begin
      if (we1) mem[addr1] <= wdata1;
      else     rdata1     <= mem[addr1];
    end
  end

endmodule
