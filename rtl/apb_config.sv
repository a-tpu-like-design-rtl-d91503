// apb_config: configuration block, the accelerator's control and status
// registers behind an AMBA APB slave.
//
// Software drives the accelerator only through register writes: block
// enables, normalization mean and inverse variance, pooling window,
// activation select, the start addresses and strides of matrices A, B and C
// in the BRAMs, the validity mask, the accumulator mode, and the START bit.
// The register list (addresses, START bit 0 and DONE bit 31 of the same
// register, enable bits 0..3) follows the published map; see tpu_pkg.
// This design's own choices: the A-stride and accumulator-mode addresses,
// reset values (strides 1, mask all ones, pooling window 1, all else 0),
// and the START/DONE handshake: a write to the START/DONE register loads
// START from bit 0 and clears DONE; when the control FSM finishes it pulses
// done_set, which sets DONE and clears START. Reads return every register.
// APB timing: zero wait states (PREADY tied high), no errors; a write takes
// effect at the end of the access phase (PSEL and PENABLE high).
// PREADY and PSLVERR are constants, and PRDATA bits above a register's
// width read as zero (bits 30:1 of START/DONE, for example), so synthesis
// reports those outputs as constant; that is intended.
module apb_config #(
  parameter int N      = 8,
  parameter int AWIDTH = 11
) (
  input  logic                  clk,
  input  logic                  rst,
  // APB slave
  input  logic                  psel,
  input  logic                  penable,
  input  logic                  pwrite,
  input  logic [31:0]           paddr,
  input  logic [31:0]           pwdata,
  output logic [31:0]           prdata,
  output logic                  pready,
  output logic                  pslverr,
  // status from the control FSM
  input  logic                  done_set,
  // configuration out
  output logic                  start_tpu,
  output logic                  enable_matmul,
  output logic                  enable_norm,
  output logic                  enable_pool,
  output logic                  enable_activation,
  output logic [7:0]            mean,
  output logic [7:0]            inv_var,
  output logic [tpu_pkg::MAX_BITS_POOL-1:0] pool_window,
  output tpu_pkg::act_sel_e     act_select,
  output tpu_pkg::acc_mode_e    acc_mode,
  output logic [N-1:0]          valid_mask,
  output logic [AWIDTH-1:0]     addr_a,
  output logic [AWIDTH-1:0]     addr_b,
  output logic [AWIDTH-1:0]     addr_c,
  output logic [AWIDTH-1:0]     stride_a,
  output logic [AWIDTH-1:0]     stride_b,
  output logic [AWIDTH-1:0]     stride_c
);
  import tpu_pkg::*;

  logic [3:0] enables;
  logic       done_tpu;
  logic       wr;

  assign wr      = psel && penable && pwrite;
  assign pready  = 1'b1;
  assign pslverr = 1'b0;

  assign enable_matmul     = enables[EN_MATMUL_BIT];
  assign enable_norm       = enables[EN_NORM_BIT];
  assign enable_pool       = enables[EN_POOL_BIT];
  assign enable_activation = enables[EN_ACTIVATION_BIT];

  always_ff @(posedge clk) begin
    if (rst) begin
      enables     <= '0;
      start_tpu   <= 1'b0;
      done_tpu    <= 1'b0;
      mean        <= '0;
      inv_var     <= '0;
      pool_window <= MAX_BITS_POOL'(1);
      act_select  <= ACT_RELU;
      acc_mode    <= ACC_DISABLED;
      valid_mask  <= '1;
      addr_a      <= '0;
      addr_b      <= '0;
      addr_c      <= '0;
      stride_a    <= AWIDTH'(1);
      stride_b    <= AWIDTH'(1);
      stride_c    <= AWIDTH'(1);
    end else begin
      if (done_set) begin
        done_tpu  <= 1'b1;
        start_tpu <= 1'b0;
      end
      if (wr) begin
        unique case (paddr)
          REG_ENABLES_ADDR:         enables     <= pwdata[3:0];
          REG_POOL_KERNEL_SIZE:     pool_window <= pwdata[MAX_BITS_POOL-1:0];
          REG_STDN_TPU_ADDR: begin
            start_tpu <= pwdata[START_TPU_BIT];
            done_tpu  <= 1'b0;
          end
          REG_MEAN_ADDR:            mean        <= pwdata[7:0];
          REG_INV_VAR_ADDR:         inv_var     <= pwdata[7:0];
          REG_MATRIX_A_ADDR:        addr_a      <= pwdata[AWIDTH-1:0];
          REG_MATRIX_B_ADDR:        addr_b      <= pwdata[AWIDTH-1:0];
          REG_MATRIX_C_ADDR:        addr_c      <= pwdata[AWIDTH-1:0];
          REG_VALID_MASK_ADDR:      valid_mask  <= pwdata[N-1:0];
          REG_ACCUM_ACTIONS_ADDR:   acc_mode    <= acc_mode_e'(pwdata[1:0]);
          REG_MATRIX_A_STRIDE_ADDR: stride_a    <= pwdata[AWIDTH-1:0];
          REG_MATRIX_B_STRIDE_ADDR: stride_b    <= pwdata[AWIDTH-1:0];
          REG_MATRIX_C_STRIDE_ADDR: stride_c    <= pwdata[AWIDTH-1:0];
          REG_ACTIVATION_CSR_ADDR:  act_select  <= act_sel_e'(pwdata[0]);
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    prdata = '0;
    unique case (paddr)
      REG_ENABLES_ADDR:         prdata[3:0]               = enables;
      REG_POOL_KERNEL_SIZE:     prdata[MAX_BITS_POOL-1:0] = pool_window;
      REG_STDN_TPU_ADDR: begin
        prdata[START_TPU_BIT] = start_tpu;
        prdata[DONE_TPU_BIT]  = done_tpu;
      end
      REG_MEAN_ADDR:            prdata[7:0]        = mean;
      REG_INV_VAR_ADDR:         prdata[7:0]        = inv_var;
      REG_MATRIX_A_ADDR:        prdata[AWIDTH-1:0] = addr_a;
      REG_MATRIX_B_ADDR:        prdata[AWIDTH-1:0] = addr_b;
      REG_MATRIX_C_ADDR:        prdata[AWIDTH-1:0] = addr_c;
      REG_VALID_MASK_ADDR:      prdata[N-1:0]      = valid_mask;
      REG_ACCUM_ACTIONS_ADDR:   prdata[1:0]        = acc_mode;
      REG_MATRIX_A_STRIDE_ADDR: prdata[AWIDTH-1:0] = stride_a;
      REG_MATRIX_B_STRIDE_ADDR: prdata[AWIDTH-1:0] = stride_b;
      REG_MATRIX_C_STRIDE_ADDR: prdata[AWIDTH-1:0] = stride_c;
      REG_ACTIVATION_CSR_ADDR:  prdata[0]          = act_select;
      default: ;
    endcase
  end

  // APB protocol rules: the access phase follows a setup phase, and the
  // address and direction hold through it.
  property p_enable_needs_sel;
    @(posedge clk) disable iff (rst) penable |-> psel;
  endproperty
  property p_setup_then_access;
    @(posedge clk) disable iff (rst) (psel && !penable) |=> (psel && penable);
  endproperty
  property p_addr_stable;
    @(posedge clk) disable iff (rst)
      (psel && !penable) |=> ($stable(paddr) && $stable(pwrite));
  endproperty
  a_enable_needs_sel:  assert property (p_enable_needs_sel);
  a_setup_then_access: assert property (p_setup_then_access);
  a_addr_stable:       assert property (p_addr_stable);

endmodule
