// virtio_controller: the device-side VirtIO logic between the PCIe DMA core
// and the user logic.
//
// Holds the VirtIO structures (common configuration, notification, ISR) on
// the core's AXI-lite master port, one virtqueue controller per queue, and
// the arbiter that shares the core's DMA descriptor bypass ports and MSI-X
// request among them. It also splits the card-side memory port through
// which the DMA engine reads and writes card memory: addresses from
// CARD_META_BASE up to CARD_META_BASE + 64*NUM_QUEUES reach queue q's 64-byte
// metadata scratch buffer at CARD_META_BASE + 64*q; every other address is
// passed to the user logic's memory port unchanged.
//
// Queues whose bit is set in RX_QUEUES receive (device to driver, started by
// the user logic); the others transmit (driver to device, started by a
// notification). The default, two queues with queue 0 receiving and queue 1
// transmitting, is the port-0 receiveq/transmitq pair of a VirtIO console.
//
// Interface: AXI4-Lite slave for BAR0; H2C/C2H descriptor bypass load/ready,
// one shared descriptor, done strobes; MSI-X request/vector/ack; card memory
// port with one-cycle read latency (card_re -> card_rdata next cycle),
// forwarded to the user port with the same timing; per-queue user request
// and completion signals.
//
// The block structure (structures, arbiter, per-queue controllers) follows
// the design description; the card-side split of the memory port is this
// design's choice.
module virtio_controller
  import virtio_pkg::*;
#(
  parameter int unsigned          NUM_QUEUES      = 2,
  parameter logic [NUM_QUEUES-1:0] RX_QUEUES      = NUM_QUEUES'(1),
  parameter int unsigned          QUEUE_SIZE_MAX  = 256,
  parameter logic [63:0]          DEVICE_FEATURES = CONSOLE_DEVICE_FEATURES
) (
  input  logic                  clk,
  input  logic                  rst_n,
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
  // MSI-X and legacy interrupt
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
  // card memory port toward the user logic
  output logic                  usr_mem_we,
  output logic [CARD_AW-1:0]    usr_mem_waddr,
  output logic [CARD_DW-1:0]    usr_mem_wdata,
  output logic [7:0]            usr_mem_wstrb,
  output logic                  usr_mem_re,
  output logic [CARD_AW-1:0]    usr_mem_raddr,
  input  logic [CARD_DW-1:0]    usr_mem_rdata,
  // per-queue user logic interface
  input  logic [NUM_QUEUES-1:0] usr_req_valid,
  output logic [NUM_QUEUES-1:0] usr_req_ready,
  input  logic [CARD_AW-1:0]    usr_req_addr [NUM_QUEUES],
  input  logic [31:0]           usr_req_len  [NUM_QUEUES],
  output logic [NUM_QUEUES-1:0] usr_done,
  output logic [31:0]           usr_done_len [NUM_QUEUES],
  // device state, for observation
  output logic [7:0]            device_status
);

  localparam int unsigned QW = (NUM_QUEUES > 1) ? $clog2(NUM_QUEUES) : 1;
  localparam logic [CARD_AW-1:0] META_END = CARD_META_BASE + CARD_AW'(META_BYTES * NUM_QUEUES);

  logic [63:0] driver_features;
  logic [15:0] msix_config;
  logic        dev_reset;
  logic [15:0] q_size   [NUM_QUEUES];
  logic [15:0] q_msix   [NUM_QUEUES];
  logic        q_enable [NUM_QUEUES];
  logic [63:0] q_desc   [NUM_QUEUES];
  logic [63:0] q_driver [NUM_QUEUES];
  logic [63:0] q_device [NUM_QUEUES];
  logic [NUM_QUEUES-1:0] kick;
  logic [NUM_QUEUES-1:0] isr_set;

  virtio_structures #(
    .NUM_QUEUES     (NUM_QUEUES),
    .QUEUE_SIZE_MAX (QUEUE_SIZE_MAX),
    .DEVICE_FEATURES(DEVICE_FEATURES)
  ) u_structs (
    .clk, .rst_n,
    .s_axil_awaddr, .s_axil_awvalid, .s_axil_awready,
    .s_axil_wdata, .s_axil_wstrb, .s_axil_wvalid, .s_axil_wready,
    .s_axil_bresp, .s_axil_bvalid, .s_axil_bready,
    .s_axil_araddr, .s_axil_arvalid, .s_axil_arready,
    .s_axil_rdata, .s_axil_rresp, .s_axil_rvalid, .s_axil_rready,
    .device_status, .driver_features, .msix_config, .dev_reset,
    .q_size, .q_msix, .q_enable, .q_desc, .q_driver, .q_device,
    .kick,
    .isr_set_queue  (|isr_set),
    .isr_set_config (1'b0),
    .intx
  );

  // ---------------- card-side split ----------------
  logic          w_meta, r_meta, r_meta_q;
  logic [QW-1:0] w_q, r_q, r_q_q;
  logic [CARD_AW-1:0] w_off, r_off;

  assign w_meta = (card_waddr >= CARD_META_BASE) && (card_waddr < META_END);
  assign r_meta = (card_raddr >= CARD_META_BASE) && (card_raddr < META_END);
  assign w_off  = card_waddr - CARD_META_BASE;
  assign r_off  = card_raddr - CARD_META_BASE;
  assign w_q    = QW'(w_off / META_BYTES);
  assign r_q    = QW'(r_off / META_BYTES);

  assign usr_mem_we    = card_we && !w_meta;
  assign usr_mem_waddr = card_waddr;
  assign usr_mem_wdata = card_wdata;
  assign usr_mem_wstrb = card_wstrb;
  assign usr_mem_re    = card_re && !r_meta;
  assign usr_mem_raddr = card_raddr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_meta_q <= 1'b0;
      r_q_q    <= '0;
    end else if (card_re) begin
      r_meta_q <= r_meta;
      r_q_q    <= r_q;
    end
  end

  // ---------------- per-queue controllers ----------------
  logic [NUM_QUEUES-1:0] dma_req_valid, dma_req_ready, dma_done;
  dma_desc_t             dma_req [NUM_QUEUES];
  logic [NUM_QUEUES-1:0] irq_req, irq_ack;
  logic [15:0]           irq_vector [NUM_QUEUES];
  logic [CARD_DW-1:0]    meta_rdata [NUM_QUEUES];

  assign card_rdata = r_meta_q ? meta_rdata[r_q_q] : usr_mem_rdata;

  for (genvar q = 0; q < NUM_QUEUES; q++) begin : g_vq
    virtqueue_controller #(
      .IS_RX    (RX_QUEUES[q]),
      .META_BASE(CARD_META_BASE + CARD_AW'(META_BYTES * q))
    ) u_vq (
      .clk, .rst_n,
      .dev_reset,
      .driver_ok     (device_status[STATUS_DRIVER_OK]),
      .q_enable      (q_enable[q]),
      .q_size        (q_size[q]),
      .q_msix        (q_msix[q]),
      .q_desc        (q_desc[q]),
      .q_driver      (q_driver[q]),
      .q_device      (q_device[q]),
      .kick          (kick[q]),
      .dma_req_valid (dma_req_valid[q]),
      .dma_req_ready (dma_req_ready[q]),
      .dma_req       (dma_req[q]),
      .dma_done      (dma_done[q]),
      .meta_we       (card_we && w_meta && w_q == QW'(q)),
      .meta_waddr    (w_off[5:0]),
      .meta_wdata    (card_wdata),
      .meta_wstrb    (card_wstrb),
      .meta_re       (card_re && r_meta && r_q == QW'(q)),
      .meta_raddr    (r_off[5:0]),
      .meta_rdata    (meta_rdata[q]),
      .irq_req       (irq_req[q]),
      .irq_vector    (irq_vector[q]),
      .irq_ack       (irq_ack[q]),
      .isr_set       (isr_set[q]),
      .usr_req_valid (usr_req_valid[q]),
      .usr_req_ready (usr_req_ready[q]),
      .usr_req_addr  (usr_req_addr[q]),
      .usr_req_len   (usr_req_len[q]),
      .usr_done      (usr_done[q]),
      .usr_done_len  (usr_done_len[q])
    );
  end

  vq_arbiter #(.N(NUM_QUEUES)) u_arb (
    .clk, .rst_n,
    .dma_req_valid, .dma_req_ready, .dma_req, .dma_done,
    .irq_req, .irq_vector, .irq_ack,
    .h2c_byp_load, .h2c_byp_ready, .c2h_byp_load, .c2h_byp_ready,
    .byp_desc, .h2c_done, .c2h_done,
    .msix_req, .msix_vector, .msix_ack
  );

endmodule
