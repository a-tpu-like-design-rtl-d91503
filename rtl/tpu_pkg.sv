// tpu_pkg: constants and types shared by the TPU-like accelerator.
//
// Holds the APB register map of the configuration block, the accumulator
// modes and the activation selector. The register addresses 0x0, 0x2, 0x4,
// 0x8, 0xA, 0xE, 0x12, 0x16, 0x20, 0x32, 0x36 and 0x3A and the bit fields of
// ENABLES and START/DONE follow the published register list. The address of
// the matrix-A stride register (0x2E) and of the accumulator-mode register
// (0x24) are this design's own choice, as is the 2-bit mode encoding.
package tpu_pkg;

  // Register addresses (APB PADDR values; registers are decoded by value).
  localparam logic [31:0] REG_ENABLES_ADDR         = 32'h0;
  localparam logic [31:0] REG_POOL_KERNEL_SIZE     = 32'h2;
  localparam logic [31:0] REG_STDN_TPU_ADDR        = 32'h4;
  localparam logic [31:0] REG_MEAN_ADDR            = 32'h8;
  localparam logic [31:0] REG_INV_VAR_ADDR         = 32'ha;
  localparam logic [31:0] REG_MATRIX_A_ADDR        = 32'he;
  localparam logic [31:0] REG_MATRIX_B_ADDR        = 32'h12;
  localparam logic [31:0] REG_MATRIX_C_ADDR        = 32'h16;
  localparam logic [31:0] REG_VALID_MASK_ADDR      = 32'h20;
  localparam logic [31:0] REG_ACCUM_ACTIONS_ADDR   = 32'h24;
  localparam logic [31:0] REG_MATRIX_A_STRIDE_ADDR = 32'h2e;
  localparam logic [31:0] REG_MATRIX_B_STRIDE_ADDR = 32'h32;
  localparam logic [31:0] REG_MATRIX_C_STRIDE_ADDR = 32'h36;
  localparam logic [31:0] REG_ACTIVATION_CSR_ADDR  = 32'h3a;

  // Bits of REG_ENABLES_ADDR.
  localparam int EN_MATMUL_BIT     = 0;
  localparam int EN_NORM_BIT       = 1;
  localparam int EN_POOL_BIT       = 2;
  localparam int EN_ACTIVATION_BIT = 3;

  // Bits of REG_STDN_TPU_ADDR.
  localparam int START_TPU_BIT = 0;
  localparam int DONE_TPU_BIT  = 31;

  // Width of the pooling window field (window sizes 1, 2 and 4).
  localparam int MAX_BITS_POOL = 3;

  // Accumulator modes.
  typedef enum logic [1:0] {
    ACC_DISABLED = 2'd0,  // bypass: matmul result goes straight downstream
    ACC_SAVE     = 2'd1,  // store the result, send nothing downstream
    ACC_ADD      = 2'd2   // add to the stored result, store and send the sum
  } acc_mode_e;

  // Activation function selected by the LSB of REG_ACTIVATION_CSR_ADDR.
  typedef enum logic {
    ACT_RELU = 1'b0,
    ACT_TANH = 1'b1
  } act_sel_e;

endpackage
