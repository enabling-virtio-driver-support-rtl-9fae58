// virtio_isr: the VirtIO ISR status field (BAR0 + 0x200).
//
// A one-byte register that tells a driver using legacy INTx interrupts why
// the device interrupted: bit 0 is set by a used-buffer (queue) interrupt,
// bit 1 by a configuration change. Reading it returns the bits and clears
// them. intx is high while any bit is set, the level a legacy interrupt
// would carry; with MSI-X the driver does not need this register.
//
// Interface: set_queue/set_config are one-cycle set strobes; rd_en is a
// one-cycle read strobe and rdata (combinational) is the value read. A set
// in the same cycle as a read survives the clear.
//
// The clear-on-read register follows the design description; the intx
// output is this design's choice.
module virtio_isr
  import virtio_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear,       // device reset
  input  logic        set_queue,
  input  logic        set_config,
  input  logic        rd_en,
  output logic [31:0] rdata,
  output logic        intx
);

  logic [1:0] isr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      isr <= '0;
    end else if (clear) begin
      isr <= '0;
    end else begin
      if (rd_en) isr <= '0;
      if (set_queue)  isr[ISR_QUEUE]  <= 1'b1;
      if (set_config) isr[ISR_CONFIG] <= 1'b1;
    end
  end

  assign rdata = {30'h0, isr};
  assign intx  = |isr;

endmodule
