// virtio_structures: the VirtIO structures mapped into BAR0, behind the
// AXI-lite master port of the PCIe DMA core.
//
// Decodes 32-bit AXI-lite accesses to the 4 KiB BAR0 into the three
// structures the capability list points at:
//   0x000-0x037  common configuration  (virtio_common_cfg)
//   0x100-...    notification          (virtio_notify, write-only)
//   0x200-0x203  ISR status            (virtio_isr, cleared on read)
// Everything else reads 0 and ignores writes. The same port serves the host's
// direct BAR0 accesses and those made through the PCI configuration access
// capability, which arrive here as ordinary BAR0 requests.
//
// Interface: an AXI4-Lite slave (12-bit address, 32-bit data, OKAY responses
// only), the per-queue state held by the common configuration, one kick pulse
// per queue, and the ISR set strobes from the queue controllers.
//
// Timing: one transaction per channel at a time, and a read is not accepted
// in the cycle a write is. A write is accepted once both AW and W
// are valid and answered on B in the next cycle; a read is answered on R in
// the cycle after AR is accepted. A read of the ISR clears it in the cycle it
// is accepted.
//
// Placing all structures in BAR0 behind the AXI-lite port follows the design
// description; the offsets and the one-transaction-at-a-time slave are this
// design's choice.
module virtio_structures
  import virtio_pkg::*;
#(
  parameter int unsigned NUM_QUEUES      = 2,
  parameter int unsigned QUEUE_SIZE_MAX  = 256,
  parameter logic [63:0] DEVICE_FEATURES = CONSOLE_DEVICE_FEATURES
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // AXI4-Lite slave
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
  // device state
  output logic [7:0]            device_status,
  output logic [63:0]           driver_features,
  output logic [15:0]           msix_config,
  output logic                  dev_reset,
  output logic [15:0]           q_size   [NUM_QUEUES],
  output logic [15:0]           q_msix   [NUM_QUEUES],
  output logic                  q_enable [NUM_QUEUES],
  output logic [63:0]           q_desc   [NUM_QUEUES],
  output logic [63:0]           q_driver [NUM_QUEUES],
  output logic [63:0]           q_device [NUM_QUEUES],
  output logic [NUM_QUEUES-1:0] kick,
  input  logic                  isr_set_queue,
  input  logic                  isr_set_config,
  output logic                  intx
);

  localparam logic [BAR0_AW-1:0] NOTIFY_LEN = BAR0_AW'(NUM_QUEUES * NOTIFY_OFF_MULTIPLIER);

  typedef enum logic [1:0] {R_NONE, R_COMMON, R_NOTIFY, R_ISR} region_e;

  function automatic region_e decode(input logic [BAR0_AW-1:0] a);
    if (a < BAR0_COMMON_BASE + BAR0_COMMON_LEN)                     return R_COMMON;
    if (a >= BAR0_NOTIFY_BASE && a < BAR0_NOTIFY_BASE + NOTIFY_LEN) return R_NOTIFY;
    if (a >= BAR0_ISR_BASE && a < BAR0_ISR_BASE + BAR0_ISR_LEN)     return R_ISR;
    return R_NONE;
  endfunction

  // ---------------- write channel ----------------
  logic    wr_fire;
  region_e wr_region, rd_region;

  assign s_axil_awready = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign s_axil_wready  = s_axil_awready;
  assign wr_fire        = s_axil_awready;
  assign wr_region      = decode(s_axil_awaddr);
  assign s_axil_bresp   = 2'b00;
  assign s_axil_rresp   = 2'b00;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                       s_axil_bvalid <= 1'b0;
    else if (wr_fire)                 s_axil_bvalid <= 1'b1;
    else if (s_axil_bready)           s_axil_bvalid <= 1'b0;
  end

  // ---------------- read channel ----------------
  logic        rd_fire;
  logic [31:0] cc_rdata, isr_rdata;

  // A read waits while a write fires: both share the common configuration port.
  assign s_axil_arready = s_axil_arvalid && !s_axil_rvalid && !wr_fire;
  assign rd_fire        = s_axil_arready;
  assign rd_region      = decode(s_axil_araddr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
    end else if (rd_fire) begin
      s_axil_rvalid <= 1'b1;
      unique case (rd_region)
        R_COMMON: s_axil_rdata <= cc_rdata;
        R_ISR:    s_axil_rdata <= isr_rdata;
        default:  s_axil_rdata <= 32'h0;
      endcase
    end else if (s_axil_rready) begin
      s_axil_rvalid <= 1'b0;
    end
  end

  // One register port for the common configuration, shared by the channels.
  logic [5:0] cc_addr;
  logic       cc_we;
  assign cc_we   = wr_fire && (wr_region == R_COMMON);
  assign cc_addr = cc_we ? {s_axil_awaddr[5:2], 2'b00} : {s_axil_araddr[5:2], 2'b00};

  virtio_common_cfg #(
    .NUM_QUEUES     (NUM_QUEUES),
    .QUEUE_SIZE_MAX (QUEUE_SIZE_MAX),
    .DEVICE_FEATURES(DEVICE_FEATURES)
  ) u_common (
    .clk, .rst_n,
    .reg_we        (cc_we),
    .reg_addr      (cc_addr),
    .reg_wdata     (s_axil_wdata),
    .reg_wstrb     (s_axil_wstrb),
    .reg_rdata     (cc_rdata),
    .device_status, .driver_features, .msix_config, .dev_reset,
    .q_size, .q_msix, .q_enable, .q_desc, .q_driver, .q_device
  );

  virtio_notify #(.NUM_QUEUES(NUM_QUEUES)) u_notify (
    .clk, .rst_n,
    .wr_en (wr_fire && (wr_region == R_NOTIFY)),
    .wdata (s_axil_wdata),
    .wstrb (s_axil_wstrb),
    .kick
  );

  virtio_isr u_isr (
    .clk, .rst_n,
    .clear      (dev_reset),
    .set_queue  (isr_set_queue),
    .set_config (isr_set_config),
    .rd_en      (rd_fire && (rd_region == R_ISR)),
    .rdata      (isr_rdata),
    .intx
  );

endmodule
