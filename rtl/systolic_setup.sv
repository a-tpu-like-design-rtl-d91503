// systolic_setup: address generation and systolic staging for one BRAM.
//
// On a start pulse the unit reads N consecutive operand vectors from its
// BRAM, one word per clock (N int8 elements per word), at addresses
// base_addr, base_addr + stride, base_addr + 2*stride, ... For BRAM A a word
// is one column of the A tile (A is stored column-major); for BRAM B it is
// one row of the B tile (B is stored row-major). Element i of every word is
// then delayed by i clocks, so lane 0 enters the array at once, lane 1 one
// clock later and so on; this skew is what makes the operands meet in the
// right processing element. Lanes carry zero whenever no word is in flight.
// Reading one word per clock per BRAM and the per-lane delays are as
// published; the use of a word-granular stride is this design's choice.
//
// Timing (start high in cycle s): en/addr for word k in cycle s+1+k, BRAM
// data in cycle s+2+k, lane i of word k on data_out in cycle s+2+k+i.
module systolic_setup #(
  parameter int N      = 8,
  parameter int DWIDTH = 8,
  parameter int AWIDTH = 11
) (
  input  logic                       clk,
  input  logic                       rst,
  input  logic                       start,
  input  logic [AWIDTH-1:0]          base_addr,
  input  logic [AWIDTH-1:0]          stride,
  // BRAM read port
  output logic                       bram_en,
  output logic [AWIDTH-1:0]          bram_addr,
  input  logic [N-1:0][DWIDTH-1:0]   bram_rdata,
  // staged operands, lane i feeds array row (A) or column (B) i
  output logic [N-1:0][DWIDTH-1:0]   data_out
);

  localparam int CW = $clog2(N + 1);

  logic [CW-1:0]     cnt;     // words still to read
  logic [AWIDTH-1:0] addr_q;
  logic              rvalid_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt      <= '0;
      addr_q   <= '0;
      rvalid_q <= 1'b0;
    end else begin
      rvalid_q <= bram_en;
      if (start) begin
        cnt    <= CW'(N);
        addr_q <= base_addr;
      end else if (cnt != '0) begin
        cnt    <= cnt - 1'b1;
        addr_q <= addr_q + stride;
      end
    end
  end

  assign bram_en   = (cnt != '0);
  assign bram_addr = addr_q;

  // Lane i gets an i-deep delay line; the words enter gated by rvalid_q.
  for (genvar i = 0; i < N; i++) begin : g_lane
    logic [DWIDTH-1:0] lane_in;
    assign lane_in = rvalid_q ? bram_rdata[i] : '0;
    if (i == 0) begin : g_direct
      assign data_out[i] = lane_in;
    end else begin : g_delay
      logic [DWIDTH-1:0] dly [i];
      always_ff @(posedge clk) begin
        if (rst) begin
          for (int d = 0; d < i; d++) dly[d] <= '0;
        end else begin
          dly[0] <= lane_in;
          for (int d = 1; d < i; d++) dly[d] <= dly[d-1];
        end
      end
      assign data_out[i] = dly[i-1];
    end
  end

endmodule
