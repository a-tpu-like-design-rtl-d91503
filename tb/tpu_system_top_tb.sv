// tpu_system_top_tb: end-to-end test of both accelerators under the
// system top, every parameter at its default.
//
// TPU-like accelerator (8x8x8 matmul, 64-bit x 2048 BRAMs): the host side
// is modelled by APB register writes and by the BRAM host ports. A
// reference model in this file computes, word by word, what every
// operation must write into BRAM A (int8 wrap-around arithmetic, the
// accumulator modes, normalization with the validity mask, average pooling
// and the ReLU / piece-wise TanH activations), and the result is read back
// through the host port of BRAM A and compared.
// Workloads:
//   1. layer test: two fully connected layers, 8 inputs x batch 8 x 8
//      neurons, one START each (norm+ReLU, then pool 2 + TanH);
//   2. accumulator test: two 24x24x24 layers, 9 output tiles x 3 passes
//      (Save, Add, Add) each, strides 3 (pool 4 + ReLU, mask, TanH);
//   3. a START with the matmul disabled, which must finish at once;
//   4. the 4x4 prototype peripheral: two multiplies through its AXI4-Lite
//      registers and three modelled 32-bit BRAMs, run while the TPU idles.
// Each mechanism (accumulator Disabled/Save/Add, norm, mask, pool 2 and 4,
// ReLU, TanH, non-unit strides, matmul-disabled start, prototype run) is
// counted and must occur. The operand read rate, one word per clock from
// each BRAM for N clocks in a row, is checked on every TPU operation.
module tpu_system_top_tb;
  import tpu_pkg::*;

  localparam int N      = 8;
  localparam int AWIDTH = 11;
  localparam int W      = N * 8;

  logic clk = 1'b0;
  logic resetn = 1'b0;
  always #5 clk = ~clk;

  logic        psel = 1'b0, penable = 1'b0, pwrite = 1'b0;
  logic [31:0] paddr = '0, pwdata = '0, prdata;
  logic        pready, pslverr;
  logic              a_en = 1'b0, a_we = 1'b0, b_en = 1'b0, b_we = 1'b0;
  logic [AWIDTH-1:0] a_addr = '0, b_addr = '0;
  logic [W-1:0]      a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic              busy, done_irq;

  tpu_system_top dut (
    .clk, .resetn,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .bram_a_en(a_en), .bram_a_we(a_we), .bram_a_addr(a_addr),
    .bram_a_wdata(a_wdata), .bram_a_rdata(a_rdata),
    .bram_b_en(b_en), .bram_b_we(b_we), .bram_b_addr(b_addr),
    .bram_b_wdata(b_wdata), .bram_b_rdata(b_rdata),
    .busy, .done_irq,
    .proto_awaddr(p_awaddr), .proto_awvalid(p_awvalid), .proto_awready(p_awready),
    .proto_wdata(p_wdata), .proto_wstrb(4'hf), .proto_wvalid(p_wvalid), .proto_wready(p_wready),
    .proto_bresp(p_bresp), .proto_bvalid(p_bvalid), .proto_bready(p_bready),
    .proto_araddr(p_araddr), .proto_arvalid(p_arvalid), .proto_arready(p_arready),
    .proto_rdata(p_rdata), .proto_rresp(p_rresp), .proto_rvalid(p_rvalid), .proto_rready(p_rready),
    .proto_bram_en_a(pa_en), .proto_bram_we_a(), .proto_bram_addr_a(pa_addr),
    .proto_bram_wdata_a(), .proto_bram_rdata_a(pa_rd),
    .proto_bram_en_b(pb_en), .proto_bram_we_b(), .proto_bram_addr_b(pb_addr),
    .proto_bram_wdata_b(), .proto_bram_rdata_b(pb_rd),
    .proto_bram_en_c(pc_en), .proto_bram_we_c(pc_we), .proto_bram_addr_c(pc_addr),
    .proto_bram_wdata_c(pc_wd), .proto_bram_rdata_c(pc_rd)
  );

  // ---------------- prototype peripheral side ----------------
  localparam int PN = 4;
  logic [5:0]  p_awaddr = '0, p_araddr = '0;
  logic        p_awvalid = 1'b0, p_wvalid = 1'b0, p_bready = 1'b0;
  logic        p_arvalid = 1'b0, p_rready = 1'b0;
  logic [31:0] p_wdata = '0, p_rdata;
  logic        p_awready, p_wready, p_bvalid, p_arready, p_rvalid;
  logic [1:0]  p_bresp, p_rresp;
  logic        pa_en, pb_en, pc_en;
  logic [3:0]  pc_we;
  logic [14:0] pa_addr, pb_addr, pc_addr;
  logic [31:0] pa_rd, pb_rd, pc_rd, pc_wd;
  logic [31:0] pmem_a [16], pmem_b [16], pmem_c [16];
  always_ff @(posedge clk) begin
    if (pa_en) pa_rd <= pmem_a[pa_addr[5:2]];
    if (pb_en) pb_rd <= pmem_b[pb_addr[5:2]];
    if (pc_en) begin
      if (pc_we == 4'hf) pmem_c[pc_addr[5:2]] <= pc_wd;
      pc_rd <= pmem_c[pc_addr[5:2]];
    end
  end

  int checks = 0, failures = 0;

  // Mechanism counters.
  int n_acc_dis = 0, n_acc_save = 0, n_acc_add = 0, n_norm = 0, n_mask = 0;
  int n_pool2 = 0, n_pool4 = 0, n_relu = 0, n_tanh = 0, n_stride = 0, n_mmoff = 0;
  int n_proto = 0;

  // Reference copies of the two memories.
  logic [W-1:0] ref_a [2**AWIDTH];
  logic [W-1:0] ref_b [2**AWIDTH];
  logic [W-1:0] accm  [N];

  // Shadow of the configuration.
  logic [3:0]  cfg_en;
  logic [7:0]  cfg_mean, cfg_ivar;
  logic [2:0]  cfg_pool;
  logic        cfg_tanh;
  logic [1:0]  cfg_acc;
  logic [N-1:0] cfg_mask;
  int cfg_a, cfg_b, cfg_c, cfg_sa, cfg_sb, cfg_sc;

  // ---------------- host tasks ----------------
  task automatic apb_write(input logic [31:0] addr, input logic [31:0] data);
    @(posedge clk);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b1; paddr <= addr; pwdata <= data;
    @(posedge clk);
    penable <= 1'b1;
    @(posedge clk);
    psel <= 1'b0; penable <= 1'b0; pwrite <= 1'b0;
  endtask

  task automatic apb_read(input logic [31:0] addr, output logic [31:0] data);
    @(posedge clk);
    psel <= 1'b1; penable <= 1'b0; pwrite <= 1'b0; paddr <= addr;
    @(posedge clk);
    penable <= 1'b1;
    #1 data = prdata;
    @(posedge clk);
    psel <= 1'b0; penable <= 1'b0;
  endtask

  task automatic load_a(input int addr, input logic [W-1:0] d);
    @(posedge clk);
    a_en <= 1'b1; a_we <= 1'b1; a_addr <= AWIDTH'(addr); a_wdata <= d;
    @(posedge clk);
    a_en <= 1'b0; a_we <= 1'b0;
    ref_a[addr] = d;
  endtask

  task automatic load_b(input int addr, input logic [W-1:0] d);
    @(posedge clk);
    b_en <= 1'b1; b_we <= 1'b1; b_addr <= AWIDTH'(addr); b_wdata <= d;
    @(posedge clk);
    b_en <= 1'b0; b_we <= 1'b0;
    ref_b[addr] = d;
  endtask

  task automatic read_a(input int addr, output logic [W-1:0] d);
    @(posedge clk);
    a_en <= 1'b1; a_we <= 1'b0; a_addr <= AWIDTH'(addr);
    @(posedge clk);
    a_en <= 1'b0;
    #1 d = a_rdata;
  endtask

  function automatic logic [W-1:0] rand_word();
    logic [W-1:0] w;
    for (int i = 0; i < N; i++) w[i*8 +: 8] = 8'($urandom_range(0, 255));
    return w;
  endfunction

  // ---------------- configuration tasks ----------------
  task automatic set_funcs(input logic [3:0] en, input logic [7:0] mean,
                           input logic [7:0] ivar, input logic [2:0] pw,
                           input logic tanh_sel, input logic [N-1:0] mask);
    apb_write(REG_ENABLES_ADDR, 32'(en));          cfg_en   = en;
    apb_write(REG_MEAN_ADDR, 32'(mean));           cfg_mean = mean;
    apb_write(REG_INV_VAR_ADDR, 32'(ivar));        cfg_ivar = ivar;
    apb_write(REG_POOL_KERNEL_SIZE, 32'(pw));      cfg_pool = pw;
    apb_write(REG_ACTIVATION_CSR_ADDR, 32'(tanh_sel)); cfg_tanh = tanh_sel;
    apb_write(REG_VALID_MASK_ADDR, 32'(mask));     cfg_mask = mask;
  endtask

  task automatic set_strides(input int sa, input int sb, input int sc);
    apb_write(REG_MATRIX_A_STRIDE_ADDR, 32'(sa)); cfg_sa = sa;
    apb_write(REG_MATRIX_B_STRIDE_ADDR, 32'(sb)); cfg_sb = sb;
    apb_write(REG_MATRIX_C_STRIDE_ADDR, 32'(sc)); cfg_sc = sc;
  endtask

  // ---------------- reference model ----------------
  function automatic logic signed [7:0] ref_tanh(logic signed [7:0] x);
    int xi = int'(x);
    int y;
    if      (xi >= 90)  y = 127;
    else if (xi >= 39)  y = 99;
    else if (xi >= 28)  y = 2*xi + 46;
    else if (xi >= 16)  y = 3*xi + 18;
    else if (xi >= -15) y = 4*xi;
    else if (xi >= -27) y = 3*xi - 18;
    else if (xi >= -38) y = 2*xi - 46;
    else if (xi >= -89) y = -99;
    else                y = -127;
    return 8'(y);
  endfunction

  // What one START must do to the reference memory.
  task automatic model_op();
    logic [W-1:0] col_v;
    for (int j = 0; j < N; j++) begin
      logic [7:0] c [N];
      logic [7:0] v [N];
      logic [7:0] p [N];
      logic       emit;
      for (int i = 0; i < N; i++) begin
        c[i] = '0;
        for (int k = 0; k < N; k++)
          c[i] += ref_a[cfg_a + k*cfg_sa][i*8 +: 8] * ref_b[cfg_b + k*cfg_sb][j*8 +: 8];
      end
      emit = 1'b1;
      for (int i = 0; i < N; i++) begin
        case (cfg_acc)
          2'd1: begin accm[j][i*8 +: 8] = c[i]; v[i] = c[i]; end
          2'd2: begin accm[j][i*8 +: 8] += c[i]; v[i] = accm[j][i*8 +: 8]; end
          default: v[i] = c[i];
        endcase
      end
      if (cfg_acc == 2'd1) emit = 1'b0;
      if (cfg_en[1])
        for (int i = 0; i < N; i++)
          if (cfg_mask[i] && cfg_mask[j]) v[i] = 8'((v[i] - cfg_mean) * cfg_ivar);
      for (int i = 0; i < N; i++) p[i] = v[i];
      if (cfg_en[2] && (cfg_pool == 3'd2 || cfg_pool == 3'd4)) begin
        int w = int'(cfg_pool);
        for (int i = 0; i < N; i++) p[i] = '0;
        for (int i = 0; i < N / w; i++) begin
          int s = 0;
          for (int t = 0; t < w; t++) s += int'(signed'(v[i*w + t]));
          p[i] = 8'(s >>> $clog2(w));
        end
      end
      for (int i = 0; i < N; i++) begin
        logic [7:0] o = p[i];
        if (cfg_en[3]) begin
          if (cfg_tanh) o = ref_tanh(signed'(p[i]));
          else if (signed'(p[i]) < 0) o = '0;
        end
        col_v[i*8 +: 8] = o;
      end
      if (emit) ref_a[cfg_c + j*cfg_sc] = col_v;
    end
  endtask

  // ---------------- operation ----------------
  int rd_run, rd_max_run, rd_total;
  always_ff @(posedge clk) begin
    if (dut.u_tpu.u_bram_b.en0) begin
      rd_run   <= rd_run + 1;
      rd_total <= rd_total + 1;
    end else begin
      rd_run <= 0;
    end
    if (dut.u_tpu.u_bram_b.en0 && rd_run + 1 > rd_max_run) rd_max_run <= rd_run + 1;
  end

  task automatic run_op(input int a, input int b, input int c, input logic [1:0] acc);
    logic [31:0] st;
    int wait_cycles;
    apb_write(REG_MATRIX_A_ADDR, 32'(a)); cfg_a = a;
    apb_write(REG_MATRIX_B_ADDR, 32'(b)); cfg_b = b;
    apb_write(REG_MATRIX_C_ADDR, 32'(c)); cfg_c = c;
    apb_write(REG_ACCUM_ACTIONS_ADDR, 32'(acc)); cfg_acc = acc;
    rd_max_run = 0; rd_total = 0;
    apb_write(REG_STDN_TPU_ADDR, 32'h1);
    wait_cycles = 0;
    do begin
      apb_read(REG_STDN_TPU_ADDR, st);
      wait_cycles++;
    end while (!st[DONE_TPU_BIT] && wait_cycles < 200);
    checks++;
    if (!st[DONE_TPU_BIT] || st[START_TPU_BIT]) begin
      failures++;
      $display("FAIL: operation did not finish (status %h)", st);
    end
    if (cfg_en[0]) begin
      checks++;
      if (rd_max_run != N || rd_total != N) begin
        failures++;
        $display("FAIL: expected %0d B reads in a row, saw run %0d total %0d",
                 N, rd_max_run, rd_total);
      end
      model_op();
      case (acc)
        2'd0: n_acc_dis++;
        2'd1: n_acc_save++;
        default: n_acc_add++;
      endcase
      if (cfg_en[1]) n_norm++;
      if (cfg_en[1] && cfg_mask != '1) n_mask++;
      if (cfg_en[2] && cfg_pool == 3'd2) n_pool2++;
      if (cfg_en[2] && cfg_pool == 3'd4) n_pool4++;
      if (cfg_en[3] && !cfg_tanh) n_relu++;
      if (cfg_en[3] && cfg_tanh) n_tanh++;
      if (cfg_sa != 1 || cfg_sb != 1 || cfg_sc != 1) n_stride++;
    end else begin
      n_mmoff++;
    end
    // compare the words this operation could have written
    for (int j = 0; j < N; j++) begin
      logic [W-1:0] got;
      read_a(c + j*cfg_sc, got);
      checks++;
      if (got !== ref_a[c + j*cfg_sc]) begin
        failures++;
        if (failures < 10)
          $display("FAIL: A[%0d] = %h, expected %h", c + j*cfg_sc, got, ref_a[c + j*cfg_sc]);
      end
    end
  endtask

  // The AXI tasks drive and sample 1 time unit after a clock edge, so a
  // handshake counts at the edge where both valid and ready were high.
  task automatic axi_write(input logic [5:0] addr, input logic [31:0] data);
    logic hs;
    @(posedge clk); #1;
    p_awaddr = addr; p_wdata = data; p_awvalid = 1'b1; p_wvalid = 1'b1; p_bready = 1'b1;
    do begin hs = p_awready && p_wready; @(posedge clk); #1; end while (!hs);
    p_awvalid = 1'b0; p_wvalid = 1'b0;
    while (!p_bvalid) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    p_bready = 1'b0;
  endtask

  task automatic axi_read(input logic [5:0] addr, output logic [31:0] data);
    logic hs;
    @(posedge clk); #1;
    p_araddr = addr; p_arvalid = 1'b1; p_rready = 1'b1;
    do begin hs = p_arready; @(posedge clk); #1; end while (!hs);
    p_arvalid = 1'b0;
    while (!p_rvalid) begin @(posedge clk); #1; end
    data = p_rdata;
    @(posedge clk); #1;
    p_rready = 1'b0;
  endtask

  // One 4x4 multiply on the prototype, in the order its driver uses:
  // reset, load, start, poll DONE, clear, read C (column-major).
  task automatic proto_matmul();
    logic [7:0]  pa [PN][PN], pb [PN][PN], pc [PN][PN];
    logic [31:0] r;
    int polls;
    axi_write(6'h00, 0);
    axi_write(6'h04, 0);
    for (int i = 0; i < PN; i++)
      for (int j = 0; j < PN; j++) begin
        pa[i][j] = 8'($urandom);
        pb[i][j] = 8'($urandom);
      end
    for (int k = 0; k < PN; k++) begin
      pmem_a[k] = {pa[3][k], pa[2][k], pa[1][k], pa[0][k]};
      pmem_b[k] = {pb[k][3], pb[k][2], pb[k][1], pb[k][0]};
    end
    for (int i = 0; i < PN; i++)
      for (int j = 0; j < PN; j++) begin
        pc[i][j] = '0;
        for (int k = 0; k < PN; k++) pc[i][j] += pa[i][k] * pb[k][j];
      end
    axi_write(6'h00, 1);
    polls = 0;
    do begin axi_read(6'h04, r); polls++; end while (r[0] != 1'b1 && polls < 100);
    checks++; if (r[0] != 1'b1) begin failures++; $display("FAIL: prototype never done"); end
    axi_write(6'h00, 0);
    axi_write(6'h04, 1);
    for (int j = 0; j < PN; j++) begin
      checks++;
      if (pmem_c[j] != {pc[3][j], pc[2][j], pc[1][j], pc[0][j]}) begin
        failures++; $display("FAIL: prototype C column %0d got %h", j, pmem_c[j]);
      end
    end
    n_proto++;
  endtask

  // ---------------- tests ----------------
  initial begin
    logic [31:0] r;
    repeat (4) @(posedge clk);
    resetn <= 1'b1;
    repeat (2) @(posedge clk);

    // register read-back
    apb_write(REG_MEAN_ADDR, 32'h5a);
    apb_read(REG_MEAN_ADDR, r);
    checks++; if (r != 32'h5a) begin failures++; $display("FAIL: MEAN read %h", r); end
    apb_read(REG_MATRIX_B_STRIDE_ADDR, r);
    checks++; if (r != 32'h1) begin failures++; $display("FAIL: stride reset %h", r); end

    // give every output word a known value first, so that a word the
    // accelerator must not write (Save passes) can be checked as well
    for (int k = 0; k < 3*N; k++) load_a(16 + k, rand_word());
    for (int k = 0; k < 72; k++) load_a(400 + k, rand_word());
    for (int k = 0; k < 72; k++) load_a(500 + k, rand_word());
    for (int k = 0; k < 3*N; k++) load_a(600 + k, rand_word());

    // ---- 1. layer test: 8x8 two-layer network ----
    for (int k = 0; k < N; k++) load_a(k, rand_word());          // input, column-major
    for (int k = 0; k < 2*N; k++) load_b(k, rand_word());        // W1 at 0, W2 at 8
    set_strides(1, 1, 1);
    set_funcs(4'b1011, 8'd3, 8'd2, 3'd1, 1'b0, '1);              // norm + ReLU
    run_op(0, 0, 16, 2'd0);
    set_funcs(4'b1101, 8'd0, 8'd1, 3'd2, 1'b1, '1);              // pool 2 + TanH
    run_op(16, N, 32, 2'd0);

    // ---- 2. accumulator test: 24x24 two-layer network ----
    for (int k = 0; k < 72; k++) load_a(100 + k, rand_word());   // 24x24 input
    for (int k = 0; k < 72; k++) load_b(200 + k, rand_word());   // W1
    for (int k = 0; k < 72; k++) load_b(300 + k, rand_word());   // W2
    set_strides(3, 3, 3);
    for (int layer = 0; layer < 2; layer++) begin
      automatic int abase = (layer == 0) ? 100 : 400;
      automatic int bbase = (layer == 0) ? 200 : 300;
      automatic int cbase = (layer == 0) ? 400 : 500;
      if (layer == 0) set_funcs(4'b1111, 8'd1, 8'd3, 3'd4, 1'b0, 8'h7f); // norm+mask, pool 4, ReLU
      else            set_funcs(4'b1011, 8'd2, 8'd1, 3'd1, 1'b1, '1);    // norm, TanH
      for (int ti = 0; ti < 3; ti++)
        for (int tj = 0; tj < 3; tj++)
          for (int p = 0; p < 3; p++)
            run_op(abase + p*N*3 + ti, bbase + p*N*3 + tj, cbase + tj*N*3 + ti,
                   (p == 0) ? 2'd1 : 2'd2);
    end

    // ---- 3. matmul disabled ----
    set_funcs(4'b0000, 8'd0, 8'd1, 3'd1, 1'b0, '1);
    run_op(0, 0, 600, 2'd0);

    // ---- 4. prototype peripheral ----
    axi_read(6'h24, r);
    checks++; if (r != 32'h4d4d0404) begin failures++; $display("FAIL: prototype sanity %h", r); end
    repeat (2) proto_matmul();

    // every mechanism must have happened
    begin
      int cnt [12];
      string nm [12];
      cnt = '{n_acc_dis, n_acc_save, n_acc_add, n_norm, n_mask,
              n_pool2, n_pool4, n_relu, n_tanh, n_stride, n_mmoff, n_proto};
      nm  = '{"acc_disabled", "acc_save", "acc_add", "norm", "mask",
              "pool2", "pool4", "relu", "tanh", "stride", "matmul_off", "prototype"};
      for (int m = 0; m < 12; m++) begin
        $display("mechanism %s: %0d", nm[m], cnt[m]);
        checks++;
        if (cnt[m] == 0) begin failures++; $display("FAIL: %s never happened", nm[m]); end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
