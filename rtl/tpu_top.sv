// tpu_top: TPU-like accelerator for int8 neural-network inference.
//
// A matrix multiply unit is at the centre, as in Google's TPU, but it is an
// 8x8x8 output-stationary systolic array. Around it:
//   - apb_config: registers written by the host over AMBA APB (commands);
//   - tpu_ctrl: FSM that sequences one multiply and writes results back;
//   - BRAM A (input/output activations) and BRAM B (weights), 64-bit x 2048
//     dual-port RAMs whose second ports are brought out for loading data;
//   - two systolic_setup units that read one word per clock from each BRAM
//     and skew the elements into the array;
//   - matmul, then accumulators (for matrices larger than the array), norm,
//     pool and activation, in that order, each of which can be disabled;
//   - the activation output is written back to BRAM A, so the output of one
//     layer is the input of the next.
// One START computes one N x N output tile from an N-column slice of A
// (column-major in BRAM A) and an N-row slice of B (row-major in BRAM B),
// and writes N words of C (column-major) to BRAM A. Larger matrices are
// multiplied tile by tile in software using the accumulator modes.
// Interface: clock, active-low reset, an APB slave, and the host ports of
// the two BRAMs. Timing (N = 8): 34 clocks from the start pulse to the last
// matmul output column, 4 more through the pipeline, DONE a few clocks later.
module tpu_top #(
  parameter int N      = 8,     // matmul size (N x N x N)
  parameter int DWIDTH = 8,     // int8 data
  parameter int AWIDTH = 11     // BRAM depth 2048
) (
  input  logic                     clk,
  input  logic                     resetn,
  // APB slave
  input  logic                     psel,
  input  logic                     penable,
  input  logic                     pwrite,
  input  logic [31:0]              paddr,
  input  logic [31:0]              pwdata,
  output logic [31:0]              prdata,
  output logic                     pready,
  output logic                     pslverr,
  // host port of BRAM A
  input  logic                     bram_a_en,
  input  logic                     bram_a_we,
  input  logic [AWIDTH-1:0]        bram_a_addr,
  input  logic [N*DWIDTH-1:0]      bram_a_wdata,
  output logic [N*DWIDTH-1:0]      bram_a_rdata,
  // host port of BRAM B
  input  logic                     bram_b_en,
  input  logic                     bram_b_we,
  input  logic [AWIDTH-1:0]        bram_b_addr,
  input  logic [N*DWIDTH-1:0]      bram_b_wdata,
  output logic [N*DWIDTH-1:0]      bram_b_rdata,
  // status
  output logic                     busy,
  output logic                     done_irq
);
  import tpu_pkg::*;

  localparam int CW = $clog2(N);
  typedef logic [N-1:0][DWIDTH-1:0] vec_t;

  logic rst;
  assign rst = !resetn;

  // ---------------- configuration ----------------
  logic               start_tpu, en_mm, en_norm, en_pool, en_act;
  logic [7:0]         mean, inv_var;
  logic [MAX_BITS_POOL-1:0] pool_window;
  act_sel_e           act_select;
  acc_mode_e          acc_mode;
  logic [N-1:0]       valid_mask;
  logic [AWIDTH-1:0]  addr_a, addr_b, addr_c, stride_a, stride_b, stride_c;
  logic               done_set;

  apb_config #(.N(N), .AWIDTH(AWIDTH)) u_config (
    .clk, .rst,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .done_set,
    .start_tpu, .enable_matmul(en_mm), .enable_norm(en_norm),
    .enable_pool(en_pool), .enable_activation(en_act),
    .mean, .inv_var, .pool_window, .act_select, .acc_mode, .valid_mask,
    .addr_a, .addr_b, .addr_c, .stride_a, .stride_b, .stride_c
  );

  // ---------------- control ----------------
  logic              start, mm_done;
  logic              sa_en, sb_en;
  logic [AWIDTH-1:0] sa_addr, sb_addr;
  logic              a0_en, a0_we;
  logic [AWIDTH-1:0] a0_addr;
  vec_t              a0_wdata, a0_rdata, b0_rdata;
  logic              act_valid;
  logic [CW-1:0]     act_col;
  vec_t              act_data;

  tpu_ctrl #(.N(N), .AWIDTH(AWIDTH), .DWIDTH(DWIDTH)) u_ctrl (
    .clk, .rst,
    .start_tpu, .enable_matmul(en_mm), .start, .mm_done, .done_set, .busy,
    .addr_c, .stride_c,
    .out_valid(act_valid), .out_col(act_col), .out_data(act_data),
    .rd_en(sa_en), .rd_addr(sa_addr),
    .bram_en(a0_en), .bram_we(a0_we), .bram_addr(a0_addr), .bram_wdata(a0_wdata)
  );

  assign done_irq = done_set;

  // ---------------- memories ----------------
  bram_dp #(.AWIDTH(AWIDTH), .DWIDTH(N*DWIDTH)) u_bram_a (
    .clk,
    .en0(a0_en), .we0(a0_we), .addr0(a0_addr), .wdata0(a0_wdata), .rdata0(a0_rdata),
    .en1(bram_a_en), .we1(bram_a_we), .addr1(bram_a_addr),
    .wdata1(bram_a_wdata), .rdata1(bram_a_rdata)
  );

  bram_dp #(.AWIDTH(AWIDTH), .DWIDTH(N*DWIDTH)) u_bram_b (
    .clk,
    .en0(sb_en), .we0(1'b0), .addr0(sb_addr), .wdata0('0), .rdata0(b0_rdata),
    .en1(bram_b_en), .we1(bram_b_we), .addr1(bram_b_addr),
    .wdata1(bram_b_wdata), .rdata1(bram_b_rdata)
  );

  // ---------------- systolic data setup ----------------
  vec_t a_stage, b_stage;

  systolic_setup #(.N(N), .DWIDTH(DWIDTH), .AWIDTH(AWIDTH)) u_setup_a (
    .clk, .rst, .start, .base_addr(addr_a), .stride(stride_a),
    .bram_en(sa_en), .bram_addr(sa_addr), .bram_rdata(a0_rdata),
    .data_out(a_stage)
  );

  systolic_setup #(.N(N), .DWIDTH(DWIDTH), .AWIDTH(AWIDTH)) u_setup_b (
    .clk, .rst, .start, .base_addr(addr_b), .stride(stride_b),
    .bram_en(sb_en), .bram_addr(sb_addr), .bram_rdata(b0_rdata),
    .data_out(b_stage)
  );

  // ---------------- datapath ----------------
  logic mm_valid, acc_valid, norm_valid, pool_valid;
  logic [CW-1:0] mm_col, acc_col, norm_col, pool_col;
  vec_t mm_data, acc_data, norm_data, pool_data;

  matmul #(.N(N), .DWIDTH(DWIDTH)) u_matmul (
    .clk, .rst, .start, .a_in(a_stage), .b_in(b_stage),
    .out_valid(mm_valid), .out_col(mm_col), .out_data(mm_data),
    .done(mm_done)
  );

  accumulators #(.N(N), .DWIDTH(DWIDTH)) u_accum (
    .clk, .rst, .mode(acc_mode),
    .in_valid(mm_valid), .in_col(mm_col), .in_data(mm_data),
    .out_valid(acc_valid), .out_col(acc_col), .out_data(acc_data)
  );

  norm #(.N(N), .DWIDTH(DWIDTH)) u_norm (
    .clk, .rst, .enable(en_norm), .mean, .inv_var, .valid_mask,
    .in_valid(acc_valid), .in_col(acc_col), .in_data(acc_data),
    .out_valid(norm_valid), .out_col(norm_col), .out_data(norm_data)
  );

  pool #(.N(N), .DWIDTH(DWIDTH)) u_pool (
    .clk, .rst, .enable(en_pool), .window(pool_window),
    .in_valid(norm_valid), .in_col(norm_col), .in_data(norm_data),
    .out_valid(pool_valid), .out_col(pool_col), .out_data(pool_data)
  );

  activation #(.N(N), .DWIDTH(DWIDTH)) u_act (
    .clk, .rst, .enable(en_act), .select(act_select),
    .in_valid(pool_valid), .in_col(pool_col), .in_data(pool_data),
    .out_valid(act_valid), .out_col(act_col), .out_data(act_data)
  );

endmodule
