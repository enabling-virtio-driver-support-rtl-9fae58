// pci_cfg_access: state machine behind the VirtIO PCI configuration access
// capability (VIRTIO_PCI_CAP_PCI_CFG).
//
// When the host reads or writes the capability's pci_cfg_data dword, the
// extended configuration space hands the access to this block together with
// the capability's current bar, offset and length fields. The block turns it
// into one BAR0 memory request (the access the host could have made through
// BAR0 directly), waits for the response and reports completion with the read
// data, so that the configuration read/write can be completed.
//
// Interface: start_* is a one-cycle start strobe, accepted only while busy is
// low. bar_req_* is a valid/ready request toward BAR0 (12-bit byte address of
// the containing dword, byte strobes, data already shifted to its byte lane);
// every request, read or write, is answered by one bar_rsp_valid pulse.
// done pulses for one cycle with done_rdata holding the first `length` bytes
// read, right-aligned, as the capability defines.
//
// Timing: done follows the BAR0 response by one cycle. Accesses that cannot be
// served (bar other than 0, length not 1/2/4, or a span crossing a dword) are
// completed one cycle after start with no BAR0 request and read data 0.
//
// That the forwarded configuration access is converted into a BAR0 memory
// access follows the design description; the alignment rules and the
// treatment of unsupported fields are this design's choice.
module pci_cfg_access
  import virtio_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // start of an access through pci_cfg_data
  input  logic                 start_valid,
  input  logic                 start_write,
  input  logic [31:0]          start_wdata,
  input  logic [7:0]           cap_bar,
  input  logic [31:0]          cap_offset,
  input  logic [31:0]          cap_length,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          done_rdata,
  // BAR0 request toward the VirtIO structures
  output logic                 bar_req_valid,
  input  logic                 bar_req_ready,
  output logic                 bar_req_write,
  output logic [BAR0_AW-1:0]   bar_req_addr,
  output logic [31:0]          bar_req_wdata,
  output logic [3:0]           bar_req_wstrb,
  input  logic                 bar_rsp_valid,
  input  logic [31:0]          bar_rsp_rdata
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_RSP, S_DONE} state_e;
  state_e state;

  logic [1:0]  lane;        // byte offset inside the dword
  logic [3:0]  bmask;       // bytes selected, right-aligned
  logic [31:0] rdata_q;

  // Legality of the requested access.
  logic        legal;
  logic [3:0]  len_mask;
  always_comb begin
    unique case (cap_length)
      32'd1:   len_mask = 4'b0001;
      32'd2:   len_mask = 4'b0011;
      32'd4:   len_mask = 4'b1111;
      default: len_mask = 4'b0000;
    endcase
    legal = (cap_bar == 8'd0) && (len_mask != 4'b0000)
         && (cap_offset < 32'h1000)
         && ({1'b0, cap_offset[1:0]} + {1'b0, cap_length[2:0]} <= 4'd4);
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      lane          <= '0;
      bmask         <= '0;
      rdata_q       <= '0;
      bar_req_write <= 1'b0;
      bar_req_addr  <= '0;
      bar_req_wdata <= '0;
      bar_req_wstrb <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start_valid) begin
          lane          <= cap_offset[1:0];
          bmask         <= len_mask;
          bar_req_write <= start_write;
          bar_req_addr  <= {cap_offset[BAR0_AW-1:2], 2'b00};
          bar_req_wdata <= start_wdata << (8 * cap_offset[1:0]);
          bar_req_wstrb <= len_mask << cap_offset[1:0];
          rdata_q       <= '0;
          state         <= legal ? S_REQ : S_DONE;
        end
        S_REQ: if (bar_req_ready) state <= S_RSP;
        S_RSP: if (bar_rsp_valid) begin
          if (!bar_req_write) rdata_q <= bar_rsp_rdata >> (8 * lane);
          state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bar_req_valid = (state == S_REQ);
  assign done          = (state == S_DONE);
  always_comb begin
    for (int b = 0; b < 4; b++)
      done_rdata[8*b +: 8] = bmask[b] ? rdata_q[8*b +: 8] : 8'h00;
  end

endmodule
