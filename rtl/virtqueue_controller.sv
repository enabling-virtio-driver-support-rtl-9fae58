// virtqueue_controller: moves buffers of one split virtqueue between host
// memory and the card by programming the DMA engine.
//
// One instance serves one queue. A transmit (TX, driver-to-device) queue
// starts when the driver notifies it; a receive (RX, device-to-driver) queue
// starts when the user logic offers data. Either way the controller then
//   0. reads the available ring header (flags, idx) to learn how many
//      entries the driver has made;
// and, for each new entry, one at a time:
//   i.   reads the available ring entry (the head descriptor index),
//   ii.  reads that descriptor from the descriptor table,
//   iii. moves the buffer: TX host->card into user memory, RX card->host
//        from user memory (following NEXT-chained descriptors while room or
//        data remains),
//   iv.  writes a used ring element (id = head index, len = bytes written
//        to the buffer: 0 for TX, the bytes moved for RX),
//   v.   writes the used ring idx,
//   vi.  interrupts the driver: sets the ISR queue bit and requests the
//        queue's MSI-X vector (no request if the vector is NO_VECTOR, no
//        interrupt at all if the driver set VIRTQ_AVAIL_F_NO_INTERRUPT).
// Steps 0 to v are each one DMA descriptor issued through the arbiter. Ring
// metadata lands in, and is sent from, a 64-byte scratch buffer inside the
// controller that the DMA engine reaches in the card address space at
// META_BASE; byte layout: 0 avail header, 8 avail entry, 16 descriptor,
// 32 used element, 40 used idx.
//
// User interface: usr_req_valid/usr_req_ready hand over one card-side buffer
// (usr_req_addr, usr_req_len): for RX the data to send, for TX the space to
// receive into. A TX queue only takes a user buffer once it has found a new
// available entry. usr_done pulses when the entry is complete, with
// usr_done_len bytes moved.
//
// Timing: one DMA at a time; each step waits for the engine's completion
// before the next starts. A device reset (dev_reset) is applied as soon as
// no DMA or interrupt handshake is outstanding; it clears the ring indices.
// The queue only runs while it is enabled and device_status has DRIVER_OK.
//
// The step sequence, one controller per queue, the shared DMA bypass
// interface and MSI-X vector selection follow the design description; the
// scratch buffer, the user handshake, chained-descriptor handling and the
// interrupt suppression flag are this design's choices (the latter two from
// the VirtIO split-virtqueue rules).
module virtqueue_controller
  import virtio_pkg::*;
#(
  parameter bit                 IS_RX     = 1'b0,
  parameter logic [CARD_AW-1:0] META_BASE = CARD_META_BASE
) (
  input  logic               clk,
  input  logic               rst_n,
  // queue state from the common configuration
  input  logic               dev_reset,
  input  logic               driver_ok,
  input  logic               q_enable,
  input  logic [15:0]        q_size,
  input  logic [15:0]        q_msix,
  input  logic [63:0]        q_desc,
  input  logic [63:0]        q_driver,   // available ring
  input  logic [63:0]        q_device,   // used ring
  input  logic               kick,
  // DMA descriptor request (through the arbiter)
  output logic               dma_req_valid,
  input  logic               dma_req_ready,
  output dma_desc_t          dma_req,
  input  logic               dma_done,
  // card-side access to the metadata scratch buffer
  input  logic               meta_we,
  input  logic [5:0]         meta_waddr,
  input  logic [CARD_DW-1:0] meta_wdata,
  input  logic [7:0]         meta_wstrb,
  input  logic               meta_re,
  input  logic [5:0]         meta_raddr,
  output logic [CARD_DW-1:0] meta_rdata,
  // interrupts
  output logic               irq_req,
  output logic [15:0]        irq_vector,
  input  logic               irq_ack,
  output logic               isr_set,
  // user logic
  input  logic               usr_req_valid,
  output logic               usr_req_ready,
  input  logic [CARD_AW-1:0] usr_req_addr,
  input  logic [31:0]        usr_req_len,
  output logic               usr_done,
  output logic [31:0]        usr_done_len
);

  // ---------------- metadata scratch buffer ----------------
  logic [CARD_DW-1:0] meta [META_BYTES/8];
  logic               meta_cw;        // controller write of used element / idx
  logic [2:0]         meta_cw_word;
  logic [CARD_DW-1:0] meta_cw_data;

  always_ff @(posedge clk) begin
    if (meta_we)
      for (int b = 0; b < 8; b++)
        if (meta_wstrb[b]) meta[meta_waddr[5:3]][8*b +: 8] <= meta_wdata[8*b +: 8];
    if (meta_cw) meta[meta_cw_word] <= meta_cw_data;
    if (meta_re) meta_rdata <= meta[meta_raddr[5:3]];
  end

  localparam logic [CARD_AW-1:0] M_AVAIL_HDR = META_BASE + 0;
  localparam logic [CARD_AW-1:0] M_AVAIL_ENT = META_BASE + 8;
  localparam logic [CARD_AW-1:0] M_DESC      = META_BASE + 16;
  localparam logic [CARD_AW-1:0] M_USED_ELEM = META_BASE + 32;
  localparam logic [CARD_AW-1:0] M_USED_IDX  = META_BASE + 40;

  wire [15:0] avail_flags = meta[0][15:0];
  wire [15:0] avail_idx   = meta[0][31:16];
  wire [15:0] ring_head   = meta[1][15:0];
  wire [63:0] d_addr      = meta[2];
  wire [31:0] d_len       = meta[3][31:0];
  wire [15:0] d_flags     = meta[3][47:32];
  wire [15:0] d_next      = meta[3][63:48];

  // ---------------- control ----------------
  typedef enum logic [3:0] {
    S_IDLE, S_HDR, S_CHECK, S_WAIT_KICK, S_RING, S_DESC, S_DATA, S_DATA_NEXT,
    S_UELEM, S_UIDX, S_NOTIFY, S_IRQ, S_FIN, S_DMA, S_DMA_WAIT
  } state_e;

  state_e      state, after_dma;
  logic [15:0] last_avail, used_idx;
  logic [15:0] head, chain_cnt;
  logic [31:0] moved, buf_len;
  logic [CARD_AW-1:0] buf_addr;
  logic        kick_pending, reset_pending;
  logic [15:0] qmask;
  logic [31:0] remaining, chunk;

  assign qmask     = q_size - 16'd1;
  assign remaining = buf_len - moved;
  assign chunk     = (d_len < remaining) ? d_len : remaining;

  wire active = q_enable && driver_ok;

  function automatic dma_desc_t mk(input dma_dir_e dir, input logic [63:0] src,
                                   input logic [63:0] dst, input int unsigned len);
    dma_desc_t d;
    d.dir = dir;
    d.src = src;
    d.dst = dst;
    d.len = DMA_LEN_W'(len);
    return d;
  endfunction

  assign dma_req_valid = (state == S_DMA);
  assign irq_req       = (state == S_IRQ);
  assign irq_vector    = q_msix;
  assign usr_req_ready = (state == S_CHECK) && (avail_idx != last_avail) && usr_req_valid
                         && !reset_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      after_dma     <= S_IDLE;
      dma_req       <= '0;
      last_avail    <= '0;
      used_idx      <= '0;
      head          <= '0;
      chain_cnt     <= '0;
      moved         <= '0;
      buf_len       <= '0;
      buf_addr      <= '0;
      kick_pending  <= 1'b0;
      reset_pending <= 1'b0;
      isr_set       <= 1'b0;
      usr_done      <= 1'b0;
      usr_done_len  <= '0;
      meta_cw       <= 1'b0;
      meta_cw_word  <= '0;
      meta_cw_data  <= '0;
    end else begin
      isr_set  <= 1'b0;
      usr_done <= 1'b0;
      meta_cw  <= 1'b0;
      if (kick)      kick_pending  <= 1'b1;
      if (dev_reset) reset_pending <= 1'b1;

      if (reset_pending && state != S_DMA_WAIT && state != S_IRQ) begin
        state         <= S_IDLE;
        last_avail    <= '0;
        used_idx      <= '0;
        kick_pending  <= 1'b0;
        reset_pending <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: begin
            if (active && (IS_RX ? usr_req_valid : kick_pending)) begin
              if (!IS_RX) kick_pending <= 1'b0;
              state <= S_HDR;
            end
          end
          // 0. available ring header
          S_HDR: begin
            dma_req   <= mk(DMA_H2C, q_driver, 64'(M_AVAIL_HDR), VQ_AVAIL_HDR_BYTES);
            after_dma <= S_CHECK;
            state     <= S_DMA;
          end
          S_CHECK: begin
            if (avail_idx == last_avail) begin
              state <= IS_RX ? S_WAIT_KICK : S_IDLE;
            end else if (usr_req_valid) begin
              buf_addr <= usr_req_addr;
              buf_len  <= usr_req_len;
              moved    <= '0;
              state    <= S_RING;
            end
          end
          S_WAIT_KICK: begin
            if (kick_pending) begin
              kick_pending <= 1'b0;
              state        <= S_HDR;
            end
          end
          // i. available ring entry
          S_RING: begin
            dma_req   <= mk(DMA_H2C,
                            q_driver + 64'(VQ_AVAIL_HDR_BYTES)
                                     + 64'(VQ_AVAIL_ELEM_BYTES) * 64'(last_avail & qmask),
                            64'(M_AVAIL_ENT), VQ_AVAIL_ELEM_BYTES);
            after_dma <= S_DESC;
            state     <= S_DMA;
            chain_cnt <= '0;
          end
          // ii. descriptor (head first, then NEXT links)
          S_DESC: begin
            if (chain_cnt == 16'd0) head <= ring_head;
            dma_req   <= mk(DMA_H2C,
                            q_desc + 64'(VQ_DESC_BYTES)
                                   * 64'(16'(((chain_cnt == 16'd0) ? ring_head : d_next) & qmask)),
                            64'(M_DESC), VQ_DESC_BYTES);
            after_dma <= S_DATA;
            state     <= S_DMA;
          end
          // iii. buffer data
          S_DATA: begin
            if (chunk == 32'd0) begin
              state <= S_DATA_NEXT;
            end else begin
              dma_req <= IS_RX
                ? mk(DMA_C2H, 64'(buf_addr) + 64'(moved), d_addr, chunk)
                : mk(DMA_H2C, d_addr, 64'(buf_addr) + 64'(moved), chunk);
              moved     <= moved + chunk;
              after_dma <= S_DATA_NEXT;
              state     <= S_DMA;
            end
          end
          S_DATA_NEXT: begin
            if ((d_flags & VIRTQ_DESC_F_NEXT) != 16'h0 && remaining != 32'd0
                && chain_cnt < qmask) begin
              chain_cnt <= chain_cnt + 16'd1;
              state     <= S_DESC;
            end else begin
              // prepare the used element {len, id}
              meta_cw      <= 1'b1;
              meta_cw_word <= 3'd4;
              meta_cw_data <= {IS_RX ? moved : 32'd0, 16'd0, head};
              state        <= S_UELEM;
            end
          end
          // iv. used ring element
          S_UELEM: begin
            dma_req   <= mk(DMA_C2H, 64'(M_USED_ELEM),
                            q_device + 64'(VQ_USED_HDR_BYTES)
                                     + 64'(VQ_USED_ELEM_BYTES) * 64'(used_idx & qmask),
                            VQ_USED_ELEM_BYTES);
            after_dma <= S_UIDX;
            state     <= S_DMA;
            meta_cw      <= 1'b1;
            meta_cw_word <= 3'd5;
            meta_cw_data <= {48'd0, used_idx + 16'd1};
          end
          // v. used ring idx
          S_UIDX: begin
            dma_req   <= mk(DMA_C2H, 64'(M_USED_IDX), q_device + 64'd2, 2);
            used_idx  <= used_idx + 16'd1;
            after_dma <= S_NOTIFY;
            state     <= S_DMA;
          end
          // vi. interrupt
          S_NOTIFY: begin
            if ((avail_flags & VIRTQ_AVAIL_F_NO_INTERRUPT) != 16'h0) begin
              state <= S_FIN;
            end else begin
              isr_set <= 1'b1;
              state   <= (q_msix != VIRTIO_MSI_NO_VECTOR) ? S_IRQ : S_FIN;
            end
          end
          S_IRQ: if (irq_ack) state <= S_FIN;
          S_FIN: begin
            usr_done     <= 1'b1;
            usr_done_len <= moved;
            last_avail   <= last_avail + 16'd1;
            state        <= IS_RX ? S_IDLE : S_CHECK;
          end
          S_DMA:      if (dma_req_ready) state <= S_DMA_WAIT;
          S_DMA_WAIT: if (dma_done)      state <= after_dma;
          default:    state <= S_IDLE;
        endcase
      end
    end
  end

  // A descriptor is held stable while it waits for the arbiter. The check is
  // enabled by a flop that leaves reset one cycle after rst_n rises, so rst_n
  // itself is only ever used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end
  assert property (@(posedge clk) disable iff (!chk_en)
                   dma_req_valid && !dma_req_ready |=> dma_req_valid && $stable(dma_req));

endmodule
