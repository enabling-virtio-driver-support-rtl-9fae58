// virtio_notify: the VirtIO notification structure (BAR0 + 0x100).
//
// The driver writes here to tell the device that it has added buffers to a
// queue. Nothing is stored and reads return 0: the block only watches writes.
// Queue q's notification address is 0x100 + 4*q (queue_notify_off = q,
// notify_off_multiplier = 4), and the 16-bit value the driver writes is the
// index of the queue. The index is taken from the written data, so a
// notification is decoded the same way whether the driver uses one shared
// address or one address per queue. A write naming a queue that does not
// exist is dropped.
//
// Interface: wr_en is a one-cycle write strobe with the dword's data and byte
// strobes; kick[q] pulses for one cycle, in the cycle after the write, for the
// queue named.
//
// Write-only decoding and taking the queue from the written data follow the
// design description; the multiplier of 4 is this design's choice.
module virtio_notify
  import virtio_pkg::*;
#(
  parameter int unsigned NUM_QUEUES = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [31:0]           wdata,
  input  logic [3:0]            wstrb,
  output logic [NUM_QUEUES-1:0] kick
);

  logic [15:0] qidx;
  assign qidx = wdata[15:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      kick <= '0;
    end else begin
      kick <= '0;
      if (wr_en && wstrb[1:0] != 2'b00 && 32'(qidx) < NUM_QUEUES)
        kick[qidx[$clog2(NUM_QUEUES > 1 ? NUM_QUEUES : 2)-1:0]] <= 1'b1;
    end
  end

endmodule
