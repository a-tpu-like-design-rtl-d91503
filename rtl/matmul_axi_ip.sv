// matmul_axi_ip: stand-alone matrix-multiply peripheral with an AXI4-Lite
// register interface, the form in which the systolic multiplier was first
// brought up next to an ARM host (4x4x4, int8).
//
// Ten 32-bit registers sit behind an AXI4-Lite slave. A small FSM connects
// them to the multiplier: software writes 1 to START (0x00), the FSM runs
// the two systolic data setup units and the matmul on BRAM A (columns of
// A) and BRAM B (rows of B), writes the N result columns to BRAM C at byte
// addresses 0, 4, 8, ..., sets DONE (0x04) and waits until software clears
// START. Writing 1 to DONE clears it. STATE (0x14) reads the FSM state and
// SANITY (0x24) reads a fixed identification value; the other registers are
// plain scratch registers. The three BRAM ports use byte addresses (one
// 32-bit word = four int8 elements, step 4) with 4-bit write enables, as a
// vendor block-RAM port does.
// Published: the ten-register AXI slave, the FSM between registers and
// matmul, START at 0x00, DONE at 0x04 (write 1 to clear), state at 0x14,
// a sanity register at 0x24, and the BRAM port names and widths. This
// design's choices: the state encoding (IDLE 0, RUN 1, DONE 2), the
// SANITY value, the AXI handshake details (one outstanding transfer, OKAY
// responses), and 1-clock BRAM read latency.
// The IP only reads A and B and only writes C, so the write enables and
// write data of ports A and B are tied to zero and C's read data is not
// used; all three ports are kept complete because the published block
// exposes them that way, and the low two bits of the AXI addresses are
// ignored (word-aligned registers).
// Timing: the FSM pulses start one clock after START is seen in IDLE;
// column j of C is written in cycle s+3N+3+j after a pulse in cycle s, and
// DONE is set 4N+4 clocks after the pulse.
module matmul_axi_ip #(
  parameter int N         = 4,
  parameter int DWIDTH    = 8,
  parameter int BAWIDTH   = 15,          // BRAM byte address width
  parameter int AXI_AW    = 6,
  parameter logic [31:0] SANITY = 32'h4d4d_0404
) (
  input  logic                 s00_axi_aclk,
  input  logic                 s00_axi_aresetn,
  // AXI4-Lite slave
  input  logic [AXI_AW-1:0]    s00_axi_awaddr,
  input  logic                 s00_axi_awvalid,
  output logic                 s00_axi_awready,
  input  logic [31:0]          s00_axi_wdata,
  input  logic [3:0]           s00_axi_wstrb,
  input  logic                 s00_axi_wvalid,
  output logic                 s00_axi_wready,
  output logic [1:0]           s00_axi_bresp,
  output logic                 s00_axi_bvalid,
  input  logic                 s00_axi_bready,
  input  logic [AXI_AW-1:0]    s00_axi_araddr,
  input  logic                 s00_axi_arvalid,
  output logic                 s00_axi_arready,
  output logic [31:0]          s00_axi_rdata,
  output logic [1:0]           s00_axi_rresp,
  output logic                 s00_axi_rvalid,
  input  logic                 s00_axi_rready,
  // BRAM A (input matrix A, column-major)
  output logic                 bram_en_a,
  output logic [3:0]           bram_we_a,
  output logic [BAWIDTH-1:0]   bram_addr_a,
  output logic [N*DWIDTH-1:0]  bram_wdata_a,
  input  logic [N*DWIDTH-1:0]  bram_rdata_a,
  // BRAM B (input matrix B, row-major)
  output logic                 bram_en_b,
  output logic [3:0]           bram_we_b,
  output logic [BAWIDTH-1:0]   bram_addr_b,
  output logic [N*DWIDTH-1:0]  bram_wdata_b,
  input  logic [N*DWIDTH-1:0]  bram_rdata_b,
  // BRAM C (output matrix C, column-major)
  output logic                 bram_en_c,
  output logic [3:0]           bram_we_c,
  output logic [BAWIDTH-1:0]   bram_addr_c,
  output logic [N*DWIDTH-1:0]  bram_wdata_c,
  input  logic [N*DWIDTH-1:0]  bram_rdata_c
);

  localparam int NREGS = 10;
  localparam int WBYTES = N * DWIDTH / 8;

  typedef enum logic [1:0] {S_IDLE = 2'd0, S_RUN = 2'd1, S_DONE = 2'd2} state_e;

  logic clk, rst;
  assign clk = s00_axi_aclk;
  assign rst = !s00_axi_aresetn;

  // ---------------- registers ----------------
  logic [31:0] regs [NREGS];     // scratch storage; 0, 1, 5, 9 are special
  logic        start_bit, done_bit;
  state_e      state;
  logic        done_set;

  logic wr_fire;
  logic [3:0] wr_idx;
  assign wr_fire = s00_axi_awvalid && s00_axi_wvalid && !s00_axi_bvalid;
  assign wr_idx  = s00_axi_awaddr[5:2];
  assign s00_axi_awready = wr_fire;
  assign s00_axi_wready  = wr_fire;
  assign s00_axi_bresp   = 2'b00;
  assign s00_axi_rresp   = 2'b00;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
      start_bit      <= 1'b0;
      done_bit       <= 1'b0;
      s00_axi_bvalid <= 1'b0;
    end else begin
      if (done_set) done_bit <= 1'b1;
      if (s00_axi_bvalid && s00_axi_bready) s00_axi_bvalid <= 1'b0;
      if (wr_fire) begin
        s00_axi_bvalid <= 1'b1;
        if (wr_idx == 4'd0 && s00_axi_wstrb[0]) start_bit <= s00_axi_wdata[0];
        if (wr_idx == 4'd1 && s00_axi_wstrb[0] && s00_axi_wdata[0]) done_bit <= 1'b0;
        if (wr_idx < 4'(NREGS))
          for (int b = 0; b < 4; b++)
            if (s00_axi_wstrb[b]) regs[wr_idx][8*b +: 8] <= s00_axi_wdata[8*b +: 8];
      end
    end
  end

  // Read channel: one outstanding read.
  logic [3:0] rd_idx;
  assign rd_idx = s00_axi_araddr[5:2];
  assign s00_axi_arready = !s00_axi_rvalid;

  always_ff @(posedge clk) begin
    if (rst) begin
      s00_axi_rvalid <= 1'b0;
      s00_axi_rdata  <= '0;
    end else if (s00_axi_arvalid && s00_axi_arready) begin
      s00_axi_rvalid <= 1'b1;
      unique case (rd_idx)
        4'd0:    s00_axi_rdata <= {31'b0, start_bit};
        4'd1:    s00_axi_rdata <= {31'b0, done_bit};
        4'd5:    s00_axi_rdata <= {30'b0, state};
        4'd9:    s00_axi_rdata <= SANITY;
        default: s00_axi_rdata <= (rd_idx < 4'(NREGS)) ? regs[rd_idx] : '0;
      endcase
    end else if (s00_axi_rvalid && s00_axi_rready) begin
      s00_axi_rvalid <= 1'b0;
    end
  end

  // ---------------- FSM ----------------
  logic start, mm_done, mm_valid;
  logic [$clog2(N)-1:0] mm_col;
  logic [N-1:0][DWIDTH-1:0] a_stage, b_stage, mm_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      unique case (state)
        S_IDLE: if (start_bit && !done_bit) begin
          start <= 1'b1;
          state <= S_RUN;
        end
        S_RUN:  if (mm_done && !start) state <= S_DONE;
        S_DONE: if (!start_bit) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign done_set = (state == S_RUN) && mm_done && !start;

  // ---------------- datapath ----------------
  systolic_setup #(.N(N), .DWIDTH(DWIDTH), .AWIDTH(BAWIDTH)) u_setup_a (
    .clk, .rst, .start, .base_addr('0), .stride(BAWIDTH'(WBYTES)),
    .bram_en(bram_en_a), .bram_addr(bram_addr_a), .bram_rdata(bram_rdata_a),
    .data_out(a_stage)
  );

  systolic_setup #(.N(N), .DWIDTH(DWIDTH), .AWIDTH(BAWIDTH)) u_setup_b (
    .clk, .rst, .start, .base_addr('0), .stride(BAWIDTH'(WBYTES)),
    .bram_en(bram_en_b), .bram_addr(bram_addr_b), .bram_rdata(bram_rdata_b),
    .data_out(b_stage)
  );

  matmul #(.N(N), .DWIDTH(DWIDTH)) u_matmul (
    .clk, .rst, .start, .a_in(a_stage), .b_in(b_stage),
    .out_valid(mm_valid), .out_col(mm_col), .out_data(mm_data), .done(mm_done)
  );

  assign bram_we_a    = '0;
  assign bram_wdata_a = '0;
  assign bram_we_b    = '0;
  assign bram_wdata_b = '0;

  // Output data interface: column j of C to byte address WBYTES*j.
  assign bram_en_c    = mm_valid;
  assign bram_we_c    = {4{mm_valid}};
  assign bram_addr_c  = BAWIDTH'(mm_col) * BAWIDTH'(WBYTES);
  assign bram_wdata_c = mm_data;

  a_bresp_held: assert property (@(posedge clk) disable iff (rst)
    (s00_axi_bvalid && !s00_axi_bready) |=> s00_axi_bvalid);
  a_rvalid_held: assert property (@(posedge clk) disable iff (rst)
    (s00_axi_rvalid && !s00_axi_rready) |=> (s00_axi_rvalid && $stable(s00_axi_rdata)));

endmodule
