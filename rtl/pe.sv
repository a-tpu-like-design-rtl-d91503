// pe: one processing element of the output-stationary systolic array.
//
// The A operand enters from the left and the B operand from the top; both
// are registered and passed on unchanged to the right and lower neighbours
// one clock later. The registered operands are multiplied, the product is
// registered, and the product is added into the accumulator register, which
// holds this PE's element of the result matrix ("output stationary"). The
// structure (input flops, multiplier, product flop, adder, accumulator
// flop) follows the published PE diagram. Arithmetic is int8 throughout,
// as published: the product and the running sum keep their low 8 bits
// (two's-complement wrap-around). clear zeroes the accumulator and the
// product flop; operands stay zero when no data is being fed, so the
// accumulator holds its value once the operands have passed.
// Latency: an operand pair at a_in/b_in reaches acc three clocks later.
module pe #(
  parameter int DWIDTH = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              clear,
  input  logic [DWIDTH-1:0] a_in,
  input  logic [DWIDTH-1:0] b_in,
  output logic [DWIDTH-1:0] a_out,
  output logic [DWIDTH-1:0] b_out,
  output logic [DWIDTH-1:0] acc
);

  logic [DWIDTH-1:0] a_q, b_q, prod_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      a_q    <= '0;
      b_q    <= '0;
      prod_q <= '0;
      acc    <= '0;
    end else begin
      a_q    <= a_in;
      b_q    <= b_in;
      if (clear) begin
        prod_q <= '0;
        acc    <= '0;
      end else begin
        prod_q <= DWIDTH'(a_q * b_q);
        acc    <= acc + prod_q;
      end
    end
  end

  assign a_out = a_q;
  assign b_out = b_q;

endmodule
