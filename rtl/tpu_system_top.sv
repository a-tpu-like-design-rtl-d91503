// tpu_system_top: the two accelerators side by side.
//
// u_tpu is the TPU-like accelerator: an 8x8x8 int8 systolic matmul fed by
// two 64-bit BRAMs, followed by the accumulator, normalization, pooling
// and activation stages, configured over APB and writing its results back
// to BRAM A. u_proto is the earlier stand-alone 4x4 matmul peripheral with
// an AXI4-Lite register slave and three 32-bit BRAM ports. The two share
// only the clock and the active-low reset; each keeps its own ports, which
// appear here unchanged. The TPU's ports keep their names; the prototype's
// carry a proto_ prefix.
// Interface and timing: those of tpu_top and matmul_axi_ip; this module
// adds no logic and no delay.
// The host processor, the DMA engine, the AXI interconnect, the APB bridge
// and the vendor BRAM controllers around both designs are not part of this
// RTL; their signals are the ports of this module. Putting both designs
// under one top with separate ports is this design's choice.
module tpu_system_top #(
  parameter int N          = 8,    // TPU matmul size
  parameter int DWIDTH     = 8,    // int8 data
  parameter int AWIDTH     = 11,   // TPU BRAM depth 2048
  parameter int PROTO_N    = 4,    // prototype matmul size
  parameter int PROTO_BAW  = 15,   // prototype BRAM byte address width
  parameter int PROTO_AXIW = 6     // prototype AXI4-Lite address width
) (
  input  logic                        clk,
  input  logic                        resetn,
  // ---- TPU-like accelerator ----
  input  logic                        psel,
  input  logic                        penable,
  input  logic                        pwrite,
  input  logic [31:0]                 paddr,
  input  logic [31:0]                 pwdata,
  output logic [31:0]                 prdata,
  output logic                        pready,
  output logic                        pslverr,
  input  logic                        bram_a_en,
  input  logic                        bram_a_we,
  input  logic [AWIDTH-1:0]           bram_a_addr,
  input  logic [N*DWIDTH-1:0]         bram_a_wdata,
  output logic [N*DWIDTH-1:0]         bram_a_rdata,
  input  logic                        bram_b_en,
  input  logic                        bram_b_we,
  input  logic [AWIDTH-1:0]           bram_b_addr,
  input  logic [N*DWIDTH-1:0]         bram_b_wdata,
  output logic [N*DWIDTH-1:0]         bram_b_rdata,
  output logic                        busy,
  output logic                        done_irq,
  // ---- prototype matmul peripheral ----
  input  logic [PROTO_AXIW-1:0]       proto_awaddr,
  input  logic                        proto_awvalid,
  output logic                        proto_awready,
  input  logic [31:0]                 proto_wdata,
  input  logic [3:0]                  proto_wstrb,
  input  logic                        proto_wvalid,
  output logic                        proto_wready,
  output logic [1:0]                  proto_bresp,
  output logic                        proto_bvalid,
  input  logic                        proto_bready,
  input  logic [PROTO_AXIW-1:0]       proto_araddr,
  input  logic                        proto_arvalid,
  output logic                        proto_arready,
  output logic [31:0]                 proto_rdata,
  output logic [1:0]                  proto_rresp,
  output logic                        proto_rvalid,
  input  logic                        proto_rready,
  output logic                        proto_bram_en_a,
  output logic [3:0]                  proto_bram_we_a,
  output logic [PROTO_BAW-1:0]        proto_bram_addr_a,
  output logic [PROTO_N*DWIDTH-1:0]   proto_bram_wdata_a,
  input  logic [PROTO_N*DWIDTH-1:0]   proto_bram_rdata_a,
  output logic                        proto_bram_en_b,
  output logic [3:0]                  proto_bram_we_b,
  output logic [PROTO_BAW-1:0]        proto_bram_addr_b,
  output logic [PROTO_N*DWIDTH-1:0]   proto_bram_wdata_b,
  input  logic [PROTO_N*DWIDTH-1:0]   proto_bram_rdata_b,
  output logic                        proto_bram_en_c,
  output logic [3:0]                  proto_bram_we_c,
  output logic [PROTO_BAW-1:0]        proto_bram_addr_c,
  output logic [PROTO_N*DWIDTH-1:0]   proto_bram_wdata_c,
  input  logic [PROTO_N*DWIDTH-1:0]   proto_bram_rdata_c
);

  tpu_top #(.N(N), .DWIDTH(DWIDTH), .AWIDTH(AWIDTH)) u_tpu (
    .clk, .resetn,
    .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready, .pslverr,
    .bram_a_en, .bram_a_we, .bram_a_addr, .bram_a_wdata, .bram_a_rdata,
    .bram_b_en, .bram_b_we, .bram_b_addr, .bram_b_wdata, .bram_b_rdata,
    .busy, .done_irq
  );

  matmul_axi_ip #(.N(PROTO_N), .DWIDTH(DWIDTH), .BAWIDTH(PROTO_BAW), .AXI_AW(PROTO_AXIW)) u_proto (
    .s00_axi_aclk(clk), .s00_axi_aresetn(resetn),
    .s00_axi_awaddr(proto_awaddr), .s00_axi_awvalid(proto_awvalid), .s00_axi_awready(proto_awready),
    .s00_axi_wdata(proto_wdata), .s00_axi_wstrb(proto_wstrb), .s00_axi_wvalid(proto_wvalid),
    .s00_axi_wready(proto_wready), .s00_axi_bresp(proto_bresp), .s00_axi_bvalid(proto_bvalid),
    .s00_axi_bready(proto_bready), .s00_axi_araddr(proto_araddr), .s00_axi_arvalid(proto_arvalid),
    .s00_axi_arready(proto_arready), .s00_axi_rdata(proto_rdata), .s00_axi_rresp(proto_rresp),
    .s00_axi_rvalid(proto_rvalid), .s00_axi_rready(proto_rready),
    .bram_en_a(proto_bram_en_a), .bram_we_a(proto_bram_we_a), .bram_addr_a(proto_bram_addr_a),
    .bram_wdata_a(proto_bram_wdata_a), .bram_rdata_a(proto_bram_rdata_a),
    .bram_en_b(proto_bram_en_b), .bram_we_b(proto_bram_we_b), .bram_addr_b(proto_bram_addr_b),
    .bram_wdata_b(proto_bram_wdata_b), .bram_rdata_b(proto_bram_rdata_b),
    .bram_en_c(proto_bram_en_c), .bram_we_c(proto_bram_we_c), .bram_addr_c(proto_bram_addr_c),
    .bram_wdata_c(proto_bram_wdata_c), .bram_rdata_c(proto_bram_rdata_c)
  );

endmodule
