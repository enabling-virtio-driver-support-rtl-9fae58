// xdma_bypass_model: behavioural model of the PCIe DMA engine as the VirtIO
// logic sees it, plus the host memory behind it. Not synthesizable.
//
// The engine takes one descriptor at a time from its H2C or C2H bypass port
// (ready is high while idle, the descriptor is loaded when load is high),
// copies len bytes between host memory (a byte array, addresses taken modulo
// HOST_BYTES) and the card memory port one byte per transfer, and then
// pulses that channel's done strobe. Card writes use a single byte strobe;
// card reads assume one cycle of read latency. The MSI-X request is
// acknowledged IRQ_LAT cycles after it rises and each acknowledged vector is
// counted. Testbenches read and write host_mem directly.
module xdma_bypass_model
  import virtio_pkg::*;
#(
  parameter int unsigned HOST_BYTES = 65536,
  parameter int unsigned IRQ_LAT    = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               h2c_byp_load,
  output logic               h2c_byp_ready,
  input  logic               c2h_byp_load,
  output logic               c2h_byp_ready,
  input  dma_desc_t          byp_desc,
  output logic               h2c_done,
  output logic               c2h_done,
  output logic               card_we,
  output logic [CARD_AW-1:0] card_waddr,
  output logic [CARD_DW-1:0] card_wdata,
  output logic [7:0]         card_wstrb,
  output logic               card_re,
  output logic [CARD_AW-1:0] card_raddr,
  input  logic [CARD_DW-1:0] card_rdata,
  input  logic               msix_req,
  input  logic [15:0]        msix_vector,
  output logic               msix_ack
);

  logic [7:0] host_mem [HOST_BYTES];
  int unsigned n_h2c, n_c2h, n_irq;
  int unsigned irq_count [32];
  int unsigned load_cycle;          // cycle of the last descriptor load
  int unsigned cycle;
  logic        busy;

  assign h2c_byp_ready = rst_n && !busy;
  assign c2h_byp_ready = rst_n && !busy;

  initial begin
    busy = 1'b0; h2c_done = 1'b0; c2h_done = 1'b0;
    card_we = 1'b0; card_re = 1'b0; card_waddr = '0; card_raddr = '0;
    card_wdata = '0; card_wstrb = '0; msix_ack = 1'b0;
    n_h2c = 0; n_c2h = 0; n_irq = 0; cycle = 0; load_cycle = 0;
    foreach (irq_count[i]) irq_count[i] = 0;
    foreach (host_mem[i]) host_mem[i] = 8'h00;
  end

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && !busy && (h2c_byp_load || c2h_byp_load)) begin
      dma_desc_t d;
      d = byp_desc;
      busy <= 1'b1;
      load_cycle = cycle;
      if (h2c_byp_load) begin
        n_h2c++;
        for (int unsigned i = 0; i < d.len; i++) begin
          logic [CARD_AW-1:0] a;
          a = CARD_AW'(d.dst) + CARD_AW'(i);
          @(posedge clk);
          card_we    <= 1'b1;
          card_waddr <= {a[CARD_AW-1:3], 3'b000};
          card_wdata <= CARD_DW'(host_mem[32'((d.src + 64'(i)) % 64'(HOST_BYTES))]) << (8 * a[2:0]);
          card_wstrb <= 8'h01 << a[2:0];
        end
        @(posedge clk);
        card_we  <= 1'b0;
        h2c_done <= 1'b1;
        @(posedge clk);
        h2c_done <= 1'b0;
      end else begin
        n_c2h++;
        for (int unsigned i = 0; i < d.len; i++) begin
          logic [CARD_AW-1:0] a;
          a = CARD_AW'(d.src) + CARD_AW'(i);
          @(posedge clk);
          card_re    <= 1'b1;
          card_raddr <= {a[CARD_AW-1:3], 3'b000};
          @(posedge clk);
          card_re    <= 1'b0;
          @(posedge clk);
          host_mem[32'((d.dst + 64'(i)) % 64'(HOST_BYTES))] = card_rdata[8 * a[2:0] +: 8];
        end
        @(posedge clk);
        c2h_done <= 1'b1;
        @(posedge clk);
        c2h_done <= 1'b0;
      end
      busy <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && msix_req && !msix_ack) begin
      repeat (IRQ_LAT) @(posedge clk);
      msix_ack <= 1'b1;
      n_irq++;
      irq_count[msix_vector[4:0]]++;
      @(posedge clk);
      msix_ack <= 1'b0;
    end
  end

endmodule
