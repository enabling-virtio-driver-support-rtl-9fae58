// virtio_fpga_top: VirtIO console device logic for a PCIe FPGA whose DMA core
// forwards configuration accesses above the hard block's capabilities.
//
// Joins the two pieces of device logic that sit around the vendor PCIe DMA
// core:
//   * virtio_ext_cfg, the extended configuration space carrying the VirtIO
//     capability list and the PCI configuration access state machine. It is
//     placed inside the core, between the hard block's transaction interface
//     and the core's DMA/bridge engine; its configuration request/completion
//     port faces the hard block, and the BAR0 requests it produces for
//     pci_cfg_data accesses go to the DMA/bridge engine, which turns them
//     into AXI-lite accesses like any host BAR0 access.
//   * virtio_controller, on the core's user side: the VirtIO structures on
//     the AXI-lite port, the virtqueue controllers, the arbiter, the card
//     memory split.
// Neither the hard block nor the DMA/bridge engine is part of this RTL, so
// every signal that would connect to them is a port here: cfg_* (hard
// block), ext_bar_* (ext_cfg to DMA engine), s_axil_* (DMA engine AXI-lite
// master), *_byp_*, *_done, msix_* and card_* (DMA engine bypass, status,
// interrupt and AXI-MM). usr_* are the user logic's ports.
//
// All timing is as described in the two blocks; there is no logic at this
// level.
module virtio_fpga_top
  import virtio_pkg::*;
#(
  parameter int unsigned           NUM_QUEUES      = 2,
  parameter logic [NUM_QUEUES-1:0] RX_QUEUES       = NUM_QUEUES'(1),
  parameter int unsigned           QUEUE_SIZE_MAX  = 256,
  parameter logic [63:0]           DEVICE_FEATURES = CONSOLE_DEVICE_FEATURES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // forwarded configuration accesses (hard block side)
  input  logic                  cfg_req_valid,
  output logic                  cfg_req_ready,
  input  logic                  cfg_req_write,
  input  logic [9:0]            cfg_req_dwaddr,
  input  logic [31:0]           cfg_req_wdata,
  input  logic [3:0]            cfg_req_be,
  output logic                  cfg_cpl_valid,
  output logic [31:0]           cfg_cpl_rdata,
  // BAR0 requests from the PCI configuration access capability
  output logic                  ext_bar_req_valid,
  input  logic                  ext_bar_req_ready,
  output logic                  ext_bar_req_write,
  output logic [BAR0_AW-1:0]    ext_bar_req_addr,
  output logic [31:0]           ext_bar_req_wdata,
  output logic [3:0]            ext_bar_req_wstrb,
  input  logic                  ext_bar_rsp_valid,
  input  logic [31:0]           ext_bar_rsp_rdata,
  // AXI4-Lite slave (BAR0)
  input  logic [BAR0_AW-1:0]    s_axil_awaddr,
  input  logic                  s_axil_awvalid,
  output logic                  s_axil_awready,
  input  logic [31:0]           s_axil_wdata,
  input  logic [3:0]            s_axil_wstrb,
  input  logic                  s_axil_wvalid,
  output logic                  s_axil_wready,
  output logic [1:0]            s_axil_bresp,
  output logic                  s_axil_bvalid,
  input  logic                  s_axil_bready,
  input  logic [BAR0_AW-1:0]    s_axil_araddr,
  input  logic                  s_axil_arvalid,
  output logic                  s_axil_arready,
  output logic [31:0]           s_axil_rdata,
  output logic [1:0]            s_axil_rresp,
  output logic                  s_axil_rvalid,
  input  logic                  s_axil_rready,
  // DMA descriptor bypass
  output logic                  h2c_byp_load,
  input  logic                  h2c_byp_ready,
  output logic                  c2h_byp_load,
  input  logic                  c2h_byp_ready,
  output dma_desc_t             byp_desc,
  input  logic                  h2c_done,
  input  logic                  c2h_done,
  // interrupts
  output logic                  msix_req,
  output logic [15:0]           msix_vector,
  input  logic                  msix_ack,
  output logic                  intx,
  // card memory port from the DMA engine
  input  logic                  card_we,
  input  logic [CARD_AW-1:0]    card_waddr,
  input  logic [CARD_DW-1:0]    card_wdata,
  input  logic [7:0]            card_wstrb,
  input  logic                  card_re,
  input  logic [CARD_AW-1:0]    card_raddr,
  output logic [CARD_DW-1:0]    card_rdata,
  // user logic
  output logic                  usr_mem_we,
  output logic [CARD_AW-1:0]    usr_mem_waddr,
  output logic [CARD_DW-1:0]    usr_mem_wdata,
  output logic [7:0]            usr_mem_wstrb,
  output logic                  usr_mem_re,
  output logic [CARD_AW-1:0]    usr_mem_raddr,
  input  logic [CARD_DW-1:0]    usr_mem_rdata,
  input  logic [NUM_QUEUES-1:0] usr_req_valid,
  output logic [NUM_QUEUES-1:0] usr_req_ready,
  input  logic [CARD_AW-1:0]    usr_req_addr [NUM_QUEUES],
  input  logic [31:0]           usr_req_len  [NUM_QUEUES],
  output logic [NUM_QUEUES-1:0] usr_done,
  output logic [31:0]           usr_done_len [NUM_QUEUES],
  output logic [7:0]            device_status
);

  virtio_ext_cfg #(.NUM_QUEUES(NUM_QUEUES)) u_ext_cfg (
    .clk, .rst_n,
    .cfg_req_valid, .cfg_req_ready, .cfg_req_write, .cfg_req_dwaddr,
    .cfg_req_wdata, .cfg_req_be, .cfg_cpl_valid, .cfg_cpl_rdata,
    .bar_req_valid (ext_bar_req_valid),
    .bar_req_ready (ext_bar_req_ready),
    .bar_req_write (ext_bar_req_write),
    .bar_req_addr  (ext_bar_req_addr),
    .bar_req_wdata (ext_bar_req_wdata),
    .bar_req_wstrb (ext_bar_req_wstrb),
    .bar_rsp_valid (ext_bar_rsp_valid),
    .bar_rsp_rdata (ext_bar_rsp_rdata)
  );

  virtio_controller #(
    .NUM_QUEUES     (NUM_QUEUES),
    .RX_QUEUES      (RX_QUEUES),
    .QUEUE_SIZE_MAX (QUEUE_SIZE_MAX),
    .DEVICE_FEATURES(DEVICE_FEATURES)
  ) u_ctrl (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .h2c_byp_load, .h2c_byp_ready, .c2h_byp_load, .c2h_byp_ready,
    .byp_desc, .h2c_done, .c2h_done,
    .msix_req, .msix_vector, .msix_ack, .intx,
    .card_we, .card_waddr, .card_wdata, .card_wstrb,
    .card_re, .card_raddr, .card_rdata,
    .usr_mem_we, .usr_mem_waddr, .usr_mem_wdata, .usr_mem_wstrb,
    .usr_mem_re, .usr_mem_raddr, .usr_mem_rdata,
    .usr_req_valid, .usr_req_ready, .usr_req_addr, .usr_req_len,
    .usr_done, .usr_done_len,
    .device_status
  );

endmodule
