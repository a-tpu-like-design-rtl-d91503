// apb_config_tb: self-checking test of the APB configuration block.
// Checks reset values, writes every register over APB and reads it back
// both on PRDATA and on the block's outputs, checks that writes to an
// unmapped address change nothing, and walks the START/DONE handshake:
// a write sets START and clears DONE, done_set sets DONE and clears START.
module apb_config_tb;
  import tpu_pkg::*;
  localparam int N = 8, AW = 11;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic rst = 1'b1;
  logic psel = 0, penable = 0, pwrite = 0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic pready, pslverr, done_set = 1'b0;
  logic start_tpu, enable_matmul, enable_norm, enable_pool, enable_activation;
  logic [7:0] mean, inv_var;
  logic [MAX_BITS_POOL-1:0] pool_window;
  act_sel_e act_select;
  acc_mode_e acc_mode;
  logic [N-1:0] valid_mask;
  logic [AW-1:0] addr_a, addr_b, addr_c, stride_a, stride_b, stride_c;

  apb_config #(.N(N), .AWIDTH(AW)) dut (.*);

  int checks = 0, failures = 0;

  task automatic apb_write(input logic [31:0] addr, input logic [31:0] data);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b1; paddr <= addr; pwdata <= data;
    @(posedge clk);
    penable <= 1'b1;
    @(posedge clk);
    psel <= 1'b0; penable <= 1'b0; pwrite <= 1'b0;
    @(posedge clk);
  endtask

  task automatic apb_read(input logic [31:0] addr, output logic [31:0] data);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b0; paddr <= addr;
    @(posedge clk);
    penable <= 1'b1;
    #1 data = prdata;
    checks++;
    if (!pready || pslverr) begin failures++; $display("FAIL: pready/pslverr"); end
    @(posedge clk);
    psel <= 1'b0; penable <= 1'b0;
    @(posedge clk);
  endtask

  task automatic expect_eq(input logic [31:0] got, input logic [31:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL: %s got %h expected %h", what, got, exp);
    end
  endtask

  logic [31:0] r;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    // reset values
    expect_eq(32'(stride_a), 1, "stride_a reset");
    expect_eq(32'(valid_mask), 32'hff, "mask reset");
    expect_eq(32'(pool_window), 1, "pool reset");
    expect_eq(32'(start_tpu), 0, "start reset");

    apb_write(REG_ENABLES_ADDR, 32'hb);
    expect_eq({enable_activation, enable_pool, enable_norm, enable_matmul}, 4'hb, "enables");
    apb_write(REG_MEAN_ADDR, 32'h7e);           expect_eq(32'(mean), 32'h7e, "mean");
    apb_write(REG_INV_VAR_ADDR, 32'h13);        expect_eq(32'(inv_var), 32'h13, "inv_var");
    apb_write(REG_POOL_KERNEL_SIZE, 32'h4);     expect_eq(32'(pool_window), 4, "pool");
    apb_write(REG_ACTIVATION_CSR_ADDR, 32'h1);  expect_eq(32'(act_select), 1, "act");
    apb_write(REG_ACCUM_ACTIONS_ADDR, 32'h2);   expect_eq(32'(acc_mode), 2, "acc");
    apb_write(REG_VALID_MASK_ADDR, 32'h3c);     expect_eq(32'(valid_mask), 32'h3c, "mask");
    apb_write(REG_MATRIX_A_ADDR, 32'h123);      expect_eq(32'(addr_a), 32'h123, "addr_a");
    apb_write(REG_MATRIX_B_ADDR, 32'h456);      expect_eq(32'(addr_b), 32'h456, "addr_b");
    apb_write(REG_MATRIX_C_ADDR, 32'h7ff);      expect_eq(32'(addr_c), 32'h7ff, "addr_c");
    apb_write(REG_MATRIX_A_STRIDE_ADDR, 32'd3); expect_eq(32'(stride_a), 3, "stride_a");
    apb_write(REG_MATRIX_B_STRIDE_ADDR, 32'd5); expect_eq(32'(stride_b), 5, "stride_b");
    apb_write(REG_MATRIX_C_STRIDE_ADDR, 32'd7); expect_eq(32'(stride_c), 7, "stride_c");
    apb_write(32'h40, 32'hffffffff);            // unmapped

    apb_read(REG_ENABLES_ADDR, r);          expect_eq(r, 32'hb, "rd enables");
    apb_read(REG_MEAN_ADDR, r);             expect_eq(r, 32'h7e, "rd mean");
    apb_read(REG_INV_VAR_ADDR, r);          expect_eq(r, 32'h13, "rd inv_var");
    apb_read(REG_POOL_KERNEL_SIZE, r);      expect_eq(r, 32'h4, "rd pool");
    apb_read(REG_ACTIVATION_CSR_ADDR, r);   expect_eq(r, 32'h1, "rd act");
    apb_read(REG_ACCUM_ACTIONS_ADDR, r);    expect_eq(r, 32'h2, "rd acc");
    apb_read(REG_VALID_MASK_ADDR, r);       expect_eq(r, 32'h3c, "rd mask");
    apb_read(REG_MATRIX_A_ADDR, r);         expect_eq(r, 32'h123, "rd addr_a");
    apb_read(REG_MATRIX_B_ADDR, r);         expect_eq(r, 32'h456, "rd addr_b");
    apb_read(REG_MATRIX_C_ADDR, r);         expect_eq(r, 32'h7ff, "rd addr_c");
    apb_read(REG_MATRIX_A_STRIDE_ADDR, r);  expect_eq(r, 3, "rd stride_a");
    apb_read(REG_MATRIX_B_STRIDE_ADDR, r);  expect_eq(r, 5, "rd stride_b");
    apb_read(REG_MATRIX_C_STRIDE_ADDR, r);  expect_eq(r, 7, "rd stride_c");
    apb_read(32'h40, r);                    expect_eq(r, 0, "rd unmapped");

    // START / DONE handshake
    apb_write(REG_STDN_TPU_ADDR, 32'h1);
    expect_eq(32'(start_tpu), 1, "start set");
    apb_read(REG_STDN_TPU_ADDR, r);         expect_eq(r, 32'h1, "status busy");
    done_set <= 1'b1; @(posedge clk); done_set <= 1'b0; @(posedge clk);
    expect_eq(32'(start_tpu), 0, "start cleared by done");
    apb_read(REG_STDN_TPU_ADDR, r);         expect_eq(r, 32'h80000000, "status done");
    apb_write(REG_STDN_TPU_ADDR, 32'h1);
    apb_read(REG_STDN_TPU_ADDR, r);         expect_eq(r, 32'h1, "done cleared by write");
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
