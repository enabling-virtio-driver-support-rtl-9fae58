// vq_arbiter: shares the DMA engine's descriptor bypass ports and its MSI-X
// interrupt request among the virtqueue controllers.
//
// DMA: each controller raises dma_req_valid with one descriptor. The arbiter
// grants one request at a time in round-robin order, loads the descriptor
// into the engine's host-to-card (H2C) or card-to-host (C2H) bypass port
// according to its direction, and then holds the grant until the engine
// reports that descriptor complete on that channel's done strobe, which is
// passed back to the owner only. Controllers therefore never have more than
// one descriptor in the engine between them.
//
// Interrupts: controllers' irq_req/irq_vector are served the same way onto
// the single msix_req/msix_vector/msix_ack handshake; the ack is routed back
// to the granted controller.
//
// Timing: a descriptor is loaded in the cycle the engine's bypass ready is
// high (byp_load and dma_req_ready pulse together); a new grant can be made in
// the cycle after done.
//
// Arbitration of the shared DMA control among per-queue controllers follows
// the design description; round-robin order and one descriptor in flight are
// this design's choice.
module vq_arbiter
  import virtio_pkg::*;
#(
  parameter int unsigned N = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  // controllers
  input  logic [N-1:0]  dma_req_valid,
  output logic [N-1:0]  dma_req_ready,
  input  dma_desc_t     dma_req [N],
  output logic [N-1:0]  dma_done,
  input  logic [N-1:0]  irq_req,
  input  logic [15:0]   irq_vector [N],
  output logic [N-1:0]  irq_ack,
  // DMA engine descriptor bypass
  output logic          h2c_byp_load,
  input  logic          h2c_byp_ready,
  output logic          c2h_byp_load,
  input  logic          c2h_byp_ready,
  output dma_desc_t     byp_desc,
  input  logic          h2c_done,
  input  logic          c2h_done,
  // MSI-X request toward the DMA core
  output logic          msix_req,
  output logic [15:0]   msix_vector,
  input  logic          msix_ack
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  // Round-robin pick: first requester after the previous winner.
  function automatic logic [IW-1:0] rr_pick(input logic [N-1:0] req,
                                            input logic [IW-1:0] last);
    logic [IW-1:0] pick;
    pick = last;
    for (int k = N; k >= 1; k--) begin
      int unsigned c;
      c = (int'(last) + k) % N;
      if (req[c]) pick = IW'(c);
    end
    return pick;
  endfunction

  // ---------------- DMA ----------------
  typedef enum logic [1:0] {D_IDLE, D_LOAD, D_BUSY} dstate_e;
  dstate_e       dstate;
  logic [IW-1:0] downer, dlast;
  logic          ch_ready;

  assign byp_desc     = dma_req[downer];
  assign ch_ready     = (byp_desc.dir == DMA_H2C) ? h2c_byp_ready : c2h_byp_ready;
  assign h2c_byp_load = (dstate == D_LOAD) && (byp_desc.dir == DMA_H2C) && h2c_byp_ready;
  assign c2h_byp_load = (dstate == D_LOAD) && (byp_desc.dir == DMA_C2H) && c2h_byp_ready;

  logic done_ch;
  assign done_ch = (byp_desc.dir == DMA_H2C) ? h2c_done : c2h_done;

  always_comb begin
    dma_req_ready = '0;
    dma_done      = '0;
    if (dstate == D_LOAD && ch_ready) dma_req_ready[downer] = 1'b1;
    if (dstate == D_BUSY && done_ch)  dma_done[downer]      = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dstate <= D_IDLE;
      downer <= '0;
      dlast  <= IW'(N - 1);
    end else begin
      unique case (dstate)
        D_IDLE: if (|dma_req_valid) begin
          downer <= rr_pick(dma_req_valid, dlast);
          dstate <= D_LOAD;
        end
        D_LOAD: if (ch_ready) begin
          dlast  <= downer;
          dstate <= D_BUSY;
        end
        D_BUSY: if (done_ch) dstate <= D_IDLE;
        default: dstate <= D_IDLE;
      endcase
    end
  end

  // ---------------- MSI-X ----------------
  logic          ibusy;
  logic [IW-1:0] iowner, ilast;

  assign msix_req    = ibusy;
  assign msix_vector = irq_vector[iowner];

  always_comb begin
    irq_ack = '0;
    if (ibusy && msix_ack) irq_ack[iowner] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ibusy  <= 1'b0;
      iowner <= '0;
      ilast  <= IW'(N - 1);
    end else if (!ibusy) begin
      if (|irq_req) begin
        iowner <= rr_pick(irq_req, ilast);
        ibusy  <= 1'b1;
      end
    end else if (msix_ack) begin
      ilast <= iowner;
      ibusy <= 1'b0;
    end
  end

  // Only the owner is ever told it was loaded or completed. The checks are
  // enabled by a flop so that rst_n is only used as an asynchronous reset.
  logic chk_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) chk_en <= 1'b0;
    else        chk_en <= 1'b1;
  end
  assert property (@(posedge clk) disable iff (!chk_en) $onehot0(dma_done));
  assert property (@(posedge clk) disable iff (!chk_en) (h2c_byp_load && c2h_byp_load) == 1'b0);

endmodule
