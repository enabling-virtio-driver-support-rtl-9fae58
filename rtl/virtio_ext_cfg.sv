// virtio_ext_cfg: the part of the PCI configuration space that lives outside
// the PCIe hard block and carries the VirtIO capability list.
//
// The hard block forwards every configuration access at or above the dword
// given by its EXT_CFG_CAP_PTR attribute (dword 0x2A, byte 0xA8, just after the
// hard block's MSI-X capability, whose next pointer is set to 0xA8). This
// block answers those accesses from four vendor-specific capabilities:
//   0xA8 common configuration   (16 bytes, next 0xB8)
//   0xB8 notification           (20 bytes, next 0xCC)
//   0xCC ISR status             (16 bytes, next 0xDC)
//   0xDC PCI configuration access (20 bytes, last, next 0x00)
// Each of the first three points the driver at its structure in BAR0. The
// bar, offset and length fields of the PCI configuration access capability
// are writable; a read or write of its pci_cfg_data dword (0xEC) is handed to
// pci_cfg_access, which performs the matching BAR0 access, and only then is
// the configuration access completed. All other forwarded dwords read 0 and
// ignore writes.
//
// Interface: cfg_req_* is one forwarded configuration read or write (dword
// address, data, byte enables), accepted when cfg_req_ready is high. Every
// request, read or write, gets one cfg_cpl_valid pulse (configuration writes
// are non-posted). bar_req_*/bar_rsp_* is the BAR0 request produced for
// pci_cfg_data accesses.
//
// Timing: an ordinary access completes in the cycle after it is accepted; a
// pci_cfg_data access completes two cycles after its BAR0 response.
//
// The capability offsets and the list order are those the VirtIO console
// device enumerates with; the BAR0 offsets of the structures, the request and
// completion signalling, and completing writes with a pulse are this design's
// choice.
module virtio_ext_cfg
  import virtio_pkg::*;
#(
  parameter int unsigned NUM_QUEUES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  // forwarded configuration access
  input  logic               cfg_req_valid,
  output logic               cfg_req_ready,
  input  logic               cfg_req_write,
  input  logic [9:0]         cfg_req_dwaddr,
  input  logic [31:0]        cfg_req_wdata,
  input  logic [3:0]         cfg_req_be,
  output logic               cfg_cpl_valid,
  output logic [31:0]        cfg_cpl_rdata,
  // BAR0 request produced by the PCI configuration access capability
  output logic               bar_req_valid,
  input  logic               bar_req_ready,
  output logic               bar_req_write,
  output logic [BAR0_AW-1:0] bar_req_addr,
  output logic [31:0]        bar_req_wdata,
  output logic [3:0]         bar_req_wstrb,
  input  logic               bar_rsp_valid,
  input  logic [31:0]        bar_rsp_rdata
);

  localparam logic [31:0] NOTIFY_LEN = 32'(NUM_QUEUES * NOTIFY_OFF_MULTIPLIER);

  // Dword addresses of the capability list.
  localparam logic [9:0] DW_COMMON = 10'(CAP_COMMON_OFF >> 2);
  localparam logic [9:0] DW_NOTIFY = 10'(CAP_NOTIFY_OFF >> 2);
  localparam logic [9:0] DW_ISR    = 10'(CAP_ISR_OFF    >> 2);
  localparam logic [9:0] DW_PCICFG = 10'(CAP_PCICFG_OFF >> 2);

  // Writable fields of the PCI configuration access capability.
  logic [7:0]  pc_bar;
  logic [31:0] pc_offset;
  logic [31:0] pc_length;
  logic [31:0] pc_data;

  function automatic logic [31:0] cap_hdr(input logic [7:0] next,
                                          input logic [7:0] len,
                                          input virtio_cap_type_e t);
    return {t, len, next, PCI_CAP_ID_VNDR};
  endfunction

  function automatic logic [31:0] merge_be(input logic [31:0] old,
                                           input logic [31:0] wd,
                                           input logic [3:0]  be);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[8*b +: 8] = be[b] ? wd[8*b +: 8] : old[8*b +: 8];
    return r;
  endfunction

  // Read value of every forwarded dword except pci_cfg_data.
  logic [31:0] rd_value;
  always_comb begin
    unique case (cfg_req_dwaddr)
      DW_COMMON + 10'd0: rd_value = cap_hdr(CAP_NOTIFY_OFF, 8'd16, VIRTIO_PCI_CAP_COMMON_CFG);
      DW_COMMON + 10'd1: rd_value = 32'h0;                         // bar 0, id 0
      DW_COMMON + 10'd2: rd_value = 32'(BAR0_COMMON_BASE);
      DW_COMMON + 10'd3: rd_value = 32'(BAR0_COMMON_LEN);
      DW_NOTIFY + 10'd0: rd_value = cap_hdr(CAP_ISR_OFF, 8'd20, VIRTIO_PCI_CAP_NOTIFY_CFG);
      DW_NOTIFY + 10'd1: rd_value = 32'h0;
      DW_NOTIFY + 10'd2: rd_value = 32'(BAR0_NOTIFY_BASE);
      DW_NOTIFY + 10'd3: rd_value = NOTIFY_LEN;
      DW_NOTIFY + 10'd4: rd_value = 32'(NOTIFY_OFF_MULTIPLIER);
      DW_ISR + 10'd0:    rd_value = cap_hdr(CAP_PCICFG_OFF, 8'd16, VIRTIO_PCI_CAP_ISR_CFG);
      DW_ISR + 10'd1:    rd_value = 32'h0;
      DW_ISR + 10'd2:    rd_value = 32'(BAR0_ISR_BASE);
      DW_ISR + 10'd3:    rd_value = 32'(BAR0_ISR_LEN);
      DW_PCICFG + 10'd0: rd_value = cap_hdr(8'h00, 8'd20, VIRTIO_PCI_CAP_PCI_CFG);
      DW_PCICFG + 10'd1: rd_value = {24'h0, pc_bar};
      DW_PCICFG + 10'd2: rd_value = pc_offset;
      DW_PCICFG + 10'd3: rd_value = pc_length;
      DW_PCICFG + 10'd4: rd_value = pc_data;
      default:           rd_value = 32'h0;
    endcase
  end

  // Access to pci_cfg_data goes through the access state machine.
  logic        pca_busy, pca_done;
  logic [31:0] pca_rdata;
  logic        is_data;
  logic        pca_start;
  logic        pend_write;
  logic [31:0] pca_wdata;

  assign is_data       = (cfg_req_dwaddr == DW_PCICFG + 10'd4);
  assign cfg_req_ready = !pca_busy && !pca_start;
  assign pca_wdata     = merge_be(pc_data, cfg_req_wdata, cfg_req_be);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_bar        <= '0;
      pc_offset     <= '0;
      pc_length     <= '0;
      pc_data       <= '0;
      pca_start     <= 1'b0;
      pend_write    <= 1'b0;
      cfg_cpl_valid <= 1'b0;
      cfg_cpl_rdata <= '0;
    end else begin
      cfg_cpl_valid <= 1'b0;
      pca_start     <= 1'b0;
      if (cfg_req_valid && cfg_req_ready) begin
        if (is_data) begin
          // Completion is deferred until the BAR0 access has finished.
          pca_start  <= 1'b1;
          pend_write <= cfg_req_write;
          if (cfg_req_write) pc_data <= pca_wdata;
        end else begin
          cfg_cpl_valid <= 1'b1;
          cfg_cpl_rdata <= cfg_req_write ? 32'h0 : rd_value;
          if (cfg_req_write) begin
            if (cfg_req_dwaddr == DW_PCICFG + 10'd1 && cfg_req_be[0])
              pc_bar <= cfg_req_wdata[7:0];
            if (cfg_req_dwaddr == DW_PCICFG + 10'd2)
              pc_offset <= merge_be(pc_offset, cfg_req_wdata, cfg_req_be);
            if (cfg_req_dwaddr == DW_PCICFG + 10'd3)
              pc_length <= merge_be(pc_length, cfg_req_wdata, cfg_req_be);
          end
        end
      end
      if (pca_done) begin
        cfg_cpl_valid <= 1'b1;
        cfg_cpl_rdata <= pend_write ? 32'h0 : pca_rdata;
        if (!pend_write) pc_data <= pca_rdata;
      end
    end
  end

  pci_cfg_access u_pca (
    .clk          (clk),
    .rst_n        (rst_n),
    .start_valid  (pca_start),
    .start_write  (pend_write),
    .start_wdata  (pc_data),
    .cap_bar      (pc_bar),
    .cap_offset   (pc_offset),
    .cap_length   (pc_length),
    .busy         (pca_busy),
    .done         (pca_done),
    .done_rdata   (pca_rdata),
    .bar_req_valid(bar_req_valid),
    .bar_req_ready(bar_req_ready),
    .bar_req_write(bar_req_write),
    .bar_req_addr (bar_req_addr),
    .bar_req_wdata(bar_req_wdata),
    .bar_req_wstrb(bar_req_wstrb),
    .bar_rsp_valid(bar_rsp_valid),
    .bar_rsp_rdata(bar_rsp_rdata)
  );

endmodule
