// virtio_common_cfg: the VirtIO common configuration structure (BAR0 + 0x000).
//
// Offers the device feature bits, the number of queues and each queue's
// maximum size; holds what the driver writes during initialisation: driver
// feature bits, device_status, the configuration-change MSI-X vector, and for
// every queue its size, MSI-X vector, enable bit and the host addresses of its
// descriptor table, available ring and used ring. Fields that refer to one
// queue exist once per queue; queue_select picks the copy that reads and
// writes of those fields reach. Writing 0 to device_status resets the device:
// every field returns to its reset value and dev_reset pulses for one cycle
// so the virtqueue controllers restart as well.
//
// Register layout follows the VirtIO 1.1 PCI common configuration:
//   0x00 device_feature_select  0x04 device_feature (RO)
//   0x08 driver_feature_select  0x0C driver_feature
//   0x10 msix_config[15:0], num_queues[31:16] (RO)
//   0x14 device_status[7:0], config_generation[15:8] (RO), queue_select[31:16]
//   0x18 queue_size[15:0], queue_msix_vector[31:16]
//   0x1C queue_enable[15:0], queue_notify_off[31:16] (RO, = queue index)
//   0x20/0x24 queue_desc, 0x28/0x2C queue_driver, 0x30/0x34 queue_device
//
// Interface: a register port with a one-cycle write strobe (byte strobes for
// 8- and 16-bit driver accesses) and a combinational read of the dword at
// reg_addr. Writes take effect at the next clock edge.
//
// The replicated per-queue fields selected by queue_select and the use of the
// fields follow the design description; the maximum queue size, the feature
// bits offered and the register port are this design's choice.
module virtio_common_cfg
  import virtio_pkg::*;
#(
  parameter int unsigned NUM_QUEUES      = 2,
  parameter int unsigned QUEUE_SIZE_MAX  = 256,
  parameter logic [63:0] DEVICE_FEATURES = CONSOLE_DEVICE_FEATURES
) (
  input  logic        clk,
  input  logic        rst_n,
  // register port
  input  logic        reg_we,
  input  logic [5:0]  reg_addr,       // byte offset, dword aligned
  input  logic [31:0] reg_wdata,
  input  logic [3:0]  reg_wstrb,
  output logic [31:0] reg_rdata,
  // state toward the rest of the device
  output logic [7:0]  device_status,
  output logic [63:0] driver_features,
  output logic [15:0] msix_config,
  output logic        dev_reset,
  output logic [15:0] q_size   [NUM_QUEUES],
  output logic [15:0] q_msix   [NUM_QUEUES],
  output logic        q_enable [NUM_QUEUES],
  output logic [63:0] q_desc   [NUM_QUEUES],
  output logic [63:0] q_driver [NUM_QUEUES],
  output logic [63:0] q_device [NUM_QUEUES]
);

  localparam int unsigned QW = (NUM_QUEUES > 1) ? $clog2(NUM_QUEUES) : 1;

  logic [31:0]   dev_feat_sel, drv_feat_sel;
  logic [15:0]   queue_select;
  logic          qsel_ok;
  logic [QW-1:0] qs;       // selected queue, valid when qsel_ok

  assign qsel_ok = (32'(queue_select) < NUM_QUEUES);
  assign qs      = qsel_ok ? queue_select[QW-1:0] : '0;

  function automatic logic [31:0] merge(input logic [31:0] old,
                                        input logic [31:0] wd,
                                        input logic [3:0]  be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // Read mux.
  always_comb begin
    reg_rdata = 32'h0;
    unique case (reg_addr)
      CC_DEVICE_FEATURE_SELECT: reg_rdata = dev_feat_sel;
      CC_DEVICE_FEATURE:        reg_rdata = (dev_feat_sel == 0) ? DEVICE_FEATURES[31:0]
                                          : (dev_feat_sel == 1) ? DEVICE_FEATURES[63:32] : 32'h0;
      CC_DRIVER_FEATURE_SELECT: reg_rdata = drv_feat_sel;
      CC_DRIVER_FEATURE:        reg_rdata = (drv_feat_sel == 0) ? driver_features[31:0]
                                          : (drv_feat_sel == 1) ? driver_features[63:32] : 32'h0;
      CC_MSIX_CONFIG_NUMQ:      reg_rdata = {16'(NUM_QUEUES), msix_config};
      CC_STATUS_GEN_QSEL:       reg_rdata = {queue_select, 8'h00, device_status};
      CC_QSIZE_QMSIX:           reg_rdata = qsel_ok ? {q_msix[qs], q_size[qs]} : 32'h0;
      CC_QENABLE_QNOTIFYOFF:    reg_rdata = qsel_ok ? {queue_select, 15'h0, q_enable[qs]} : 32'h0;
      CC_QUEUE_DESC_LO:         reg_rdata = qsel_ok ? q_desc[qs][31:0]    : 32'h0;
      CC_QUEUE_DESC_HI:         reg_rdata = qsel_ok ? q_desc[qs][63:32]   : 32'h0;
      CC_QUEUE_DRIVER_LO:       reg_rdata = qsel_ok ? q_driver[qs][31:0]  : 32'h0;
      CC_QUEUE_DRIVER_HI:       reg_rdata = qsel_ok ? q_driver[qs][63:32] : 32'h0;
      CC_QUEUE_DEVICE_LO:       reg_rdata = qsel_ok ? q_device[qs][31:0]  : 32'h0;
      CC_QUEUE_DEVICE_HI:       reg_rdata = qsel_ok ? q_device[qs][63:32] : 32'h0;
      default:                  reg_rdata = 32'h0;
    endcase
  end

  logic [31:0] wmerged;
  assign wmerged = merge(reg_rdata, reg_wdata, reg_wstrb);

  logic do_reset;
  assign do_reset = reg_we && (reg_addr == CC_STATUS_GEN_QSEL) && reg_wstrb[0]
                 && (reg_wdata[7:0] == 8'h00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dev_reset <= 1'b0;
    end else begin
      dev_reset <= do_reset;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dev_feat_sel    <= '0;
      drv_feat_sel    <= '0;
      driver_features <= '0;
      msix_config     <= VIRTIO_MSI_NO_VECTOR;
      device_status   <= '0;
      queue_select    <= '0;
      for (int q = 0; q < NUM_QUEUES; q++) begin
        q_size[q]   <= 16'(QUEUE_SIZE_MAX);
        q_msix[q]   <= VIRTIO_MSI_NO_VECTOR;
        q_enable[q] <= 1'b0;
        q_desc[q]   <= '0;
        q_driver[q] <= '0;
        q_device[q] <= '0;
      end
    end else if (do_reset) begin
      dev_feat_sel    <= '0;
      drv_feat_sel    <= '0;
      driver_features <= '0;
      msix_config     <= VIRTIO_MSI_NO_VECTOR;
      device_status   <= '0;
      queue_select    <= '0;
      for (int q = 0; q < NUM_QUEUES; q++) begin
        q_size[q]   <= 16'(QUEUE_SIZE_MAX);
        q_msix[q]   <= VIRTIO_MSI_NO_VECTOR;
        q_enable[q] <= 1'b0;
        q_desc[q]   <= '0;
        q_driver[q] <= '0;
        q_device[q] <= '0;
      end
    end else if (reg_we) begin
      unique case (reg_addr)
        CC_DEVICE_FEATURE_SELECT: dev_feat_sel <= wmerged;
        CC_DRIVER_FEATURE_SELECT: drv_feat_sel <= wmerged;
        CC_DRIVER_FEATURE: begin
          if (drv_feat_sel == 0) driver_features[31:0]  <= wmerged;
          if (drv_feat_sel == 1) driver_features[63:32] <= wmerged;
        end
        CC_MSIX_CONFIG_NUMQ: msix_config <= wmerged[15:0];
        CC_STATUS_GEN_QSEL: begin
          if (reg_wstrb[0]) device_status <= wmerged[7:0];
          queue_select <= wmerged[31:16];
        end
        CC_QSIZE_QMSIX: if (qsel_ok) begin
          // The driver may shrink a queue; sizes above the maximum are ignored.
          if (reg_wstrb[1:0] != 2'b00 && wmerged[15:0] <= 16'(QUEUE_SIZE_MAX)
              && wmerged[15:0] != 16'h0)
            q_size[qs] <= wmerged[15:0];
          q_msix[qs] <= wmerged[31:16];
        end
        CC_QENABLE_QNOTIFYOFF: if (qsel_ok && reg_wstrb[0]) q_enable[qs] <= wmerged[0];
        CC_QUEUE_DESC_LO:   if (qsel_ok) q_desc[qs][31:0]    <= wmerged;
        CC_QUEUE_DESC_HI:   if (qsel_ok) q_desc[qs][63:32]   <= wmerged;
        CC_QUEUE_DRIVER_LO: if (qsel_ok) q_driver[qs][31:0]  <= wmerged;
        CC_QUEUE_DRIVER_HI: if (qsel_ok) q_driver[qs][63:32] <= wmerged;
        CC_QUEUE_DEVICE_LO: if (qsel_ok) q_device[qs][31:0]  <= wmerged;
        CC_QUEUE_DEVICE_HI: if (qsel_ok) q_device[qs][63:32] <= wmerged;
        default: ;
      endcase
    end
  end

endmodule
