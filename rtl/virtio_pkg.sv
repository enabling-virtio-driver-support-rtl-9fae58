// virtio_pkg: types and constants shared by the VirtIO device-side blocks.
//
// Holds the layout of the VirtIO vendor-specific PCI capabilities that the
// extended configuration space exposes, the BAR0 map of the VirtIO structures,
// the common configuration register offsets (VirtIO 1.1 split-queue, modern
// PCI transport), the DMA descriptor-bypass request type used between the
// virtqueue controllers, the arbiter and the DMA engine, and the split
// virtqueue field sizes. Capability offsets 0xA8/0xB8/0xCC/0xDC match the
// enumeration of the VirtIO console device; the BAR0 offsets of the
// structures and the widths of the DMA interface are this design's choice.
package virtio_pkg;

  // ---------------- PCI identity (attributes of the PCIe hard block) -------
  localparam logic [15:0] PCI_VENDOR_ID_VIRTIO = 16'h1AF4;
  localparam logic [15:0] PCI_DEVICE_ID_NET    = 16'h1041;
  localparam logic [15:0] PCI_DEVICE_ID_CONSOLE = 16'h1043;
  // Next pointer the hard block's MSI-X capability must carry (first VirtIO cap).
  localparam logic [7:0]  MSIX_CAP_NEXTPTR     = 8'hA8;

  // ---------------- VirtIO capability list in config space ------------------
  localparam logic [7:0] PCI_CAP_ID_VNDR = 8'h09;
  localparam logic [7:0] CAP_COMMON_OFF  = 8'hA8;
  localparam logic [7:0] CAP_NOTIFY_OFF  = 8'hB8;
  localparam logic [7:0] CAP_ISR_OFF     = 8'hCC;
  localparam logic [7:0] CAP_PCICFG_OFF  = 8'hDC;
  localparam logic [7:0] CAP_END_OFF     = 8'hF0;  // first byte after the list

  typedef enum logic [7:0] {
    VIRTIO_PCI_CAP_COMMON_CFG = 8'd1,
    VIRTIO_PCI_CAP_NOTIFY_CFG = 8'd2,
    VIRTIO_PCI_CAP_ISR_CFG    = 8'd3,
    VIRTIO_PCI_CAP_DEVICE_CFG = 8'd4,
    VIRTIO_PCI_CAP_PCI_CFG    = 8'd5
  } virtio_cap_type_e;

  // ---------------- BAR0 map of the VirtIO structures -----------------------
  localparam int unsigned BAR0_AW = 12;                 // 4 KiB BAR0
  localparam logic [BAR0_AW-1:0] BAR0_COMMON_BASE = 12'h000;
  localparam logic [BAR0_AW-1:0] BAR0_COMMON_LEN  = 12'h038;
  localparam logic [BAR0_AW-1:0] BAR0_NOTIFY_BASE = 12'h100;
  localparam logic [BAR0_AW-1:0] BAR0_ISR_BASE    = 12'h200;
  localparam logic [BAR0_AW-1:0] BAR0_ISR_LEN     = 12'h004;
  localparam int unsigned NOTIFY_OFF_MULTIPLIER   = 4;

  // ---------------- Common configuration register offsets ------------------
  localparam logic [5:0] CC_DEVICE_FEATURE_SELECT = 6'h00;
  localparam logic [5:0] CC_DEVICE_FEATURE        = 6'h04;
  localparam logic [5:0] CC_DRIVER_FEATURE_SELECT = 6'h08;
  localparam logic [5:0] CC_DRIVER_FEATURE        = 6'h0C;
  localparam logic [5:0] CC_MSIX_CONFIG_NUMQ      = 6'h10;  // msix_config | num_queues<<16
  localparam logic [5:0] CC_STATUS_GEN_QSEL       = 6'h14;  // status | gen<<8 | queue_select<<16
  localparam logic [5:0] CC_QSIZE_QMSIX           = 6'h18;  // queue_size | queue_msix_vector<<16
  localparam logic [5:0] CC_QENABLE_QNOTIFYOFF    = 6'h1C;  // queue_enable | queue_notify_off<<16
  localparam logic [5:0] CC_QUEUE_DESC_LO         = 6'h20;
  localparam logic [5:0] CC_QUEUE_DESC_HI         = 6'h24;
  localparam logic [5:0] CC_QUEUE_DRIVER_LO       = 6'h28;
  localparam logic [5:0] CC_QUEUE_DRIVER_HI       = 6'h2C;
  localparam logic [5:0] CC_QUEUE_DEVICE_LO       = 6'h30;
  localparam logic [5:0] CC_QUEUE_DEVICE_HI       = 6'h34;

  localparam logic [15:0] VIRTIO_MSI_NO_VECTOR = 16'hFFFF;

  // device_status bits
  localparam int unsigned STATUS_ACKNOWLEDGE = 0;
  localparam int unsigned STATUS_DRIVER      = 1;
  localparam int unsigned STATUS_DRIVER_OK   = 2;
  localparam int unsigned STATUS_FEATURES_OK = 3;

  // Feature bits offered by the console device: VIRTIO_F_VERSION_1 (bit 32).
  localparam logic [63:0] CONSOLE_DEVICE_FEATURES = 64'h0000_0001_0000_0000;

  // ISR status bits
  localparam int unsigned ISR_QUEUE  = 0;
  localparam int unsigned ISR_CONFIG = 1;

  // ---------------- Split virtqueue layout ----------------------------------
  localparam int unsigned VQ_DESC_BYTES      = 16;  // addr(8) len(4) flags(2) next(2)
  localparam int unsigned VQ_AVAIL_HDR_BYTES = 4;   // flags(2) idx(2)
  localparam int unsigned VQ_AVAIL_ELEM_BYTES = 2;
  localparam int unsigned VQ_USED_HDR_BYTES  = 4;
  localparam int unsigned VQ_USED_ELEM_BYTES = 8;   // id(4) len(4)
  localparam logic [15:0] VIRTQ_DESC_F_NEXT  = 16'h0001;
  localparam logic [15:0] VIRTQ_DESC_F_WRITE = 16'h0002;
  localparam logic [15:0] VIRTQ_AVAIL_F_NO_INTERRUPT = 16'h0001;

  // ---------------- DMA descriptor bypass -----------------------------------
  typedef enum logic {
    DMA_H2C = 1'b0,   // host memory -> card address space
    DMA_C2H = 1'b1    // card address space -> host memory
  } dma_dir_e;

  localparam int unsigned DMA_LEN_W = 28;   // length field of a bypass descriptor

  typedef struct packed {
    dma_dir_e             dir;
    logic [63:0]          src;
    logic [63:0]          dst;
    logic [DMA_LEN_W-1:0] len;
  } dma_desc_t;

  // Card-side data bus width (AXI-MM data width of the DMA engine).
  localparam int unsigned CARD_DW = 64;
  localparam int unsigned CARD_AW = 32;
  // Card addresses at or above this value reach the virtqueue controllers'
  // metadata scratch buffers instead of the user logic.
  localparam logic [CARD_AW-1:0] CARD_META_BASE = 32'h8000_0000;
  localparam int unsigned META_BYTES = 64;   // scratch bytes per virtqueue

endpackage
