// tb_virtqueue_controller: checks one transmit and one receive virtqueue
// controller against a behavioural DMA engine and host memory.
//
// The testbench plays the driver: it builds split virtqueues (descriptor
// table, available ring, used ring) in host memory, notifies, and then
// compares the data that arrives in user memory (TX) or host buffers (RX),
// the used ring elements and idx, the interrupt vector counts and the number
// of DMA descriptors of each direction against values it computes itself.
// Covered: single and chained descriptors, ring wrap-around, interrupt
// suppression, RX waiting for a buffer, buffer shorter than the data, and a
// device reset.
`timescale 1ns/1ps
module tb_virtqueue_controller;
  import virtio_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam logic [63:0] DESC  = 64'h1000;
  localparam logic [63:0] AVAIL = 64'h2000;
  localparam logic [63:0] USED  = 64'h3000;
  localparam int unsigned QS    = 8;

  // ------------------------------------------------------------------
  // Two benches: index 0 transmits, index 1 receives.
  // ------------------------------------------------------------------
  logic        dev_reset;
  logic        kick [2];
  logic        usr_req_valid [2];
  logic        usr_req_ready [2];
  logic [CARD_AW-1:0] usr_req_addr [2];
  logic [31:0] usr_req_len [2];
  logic        usr_done [2];
  logic [31:0] usr_done_len [2];
  logic        isr_set [2];
  logic [15:0] avail_flags_unused;
  int unsigned isr_cnt [2];
  logic [7:0]  usr_mem [2][4096];

  for (genvar k = 0; k < 2; k++) begin : g
    logic dma_req_valid, dma_req_ready, dma_done;
    dma_desc_t dma_req;
    logic h2c_load, h2c_ready, c2h_load, c2h_ready, h2c_done, c2h_done;
    logic card_we, card_re;
    logic [CARD_AW-1:0] card_waddr, card_raddr;
    logic [CARD_DW-1:0] card_wdata, card_rdata, meta_rdata, um_rdata;
    logic [7:0] card_wstrb;
    logic irq_req, irq_ack;
    logic [15:0] irq_vector;
    logic rd_meta_q;
    logic w_meta, r_meta;

    assign h2c_load      = dma_req_valid && dma_req.dir == DMA_H2C && h2c_ready;
    assign c2h_load      = dma_req_valid && dma_req.dir == DMA_C2H && c2h_ready;
    assign dma_req_ready = h2c_load || c2h_load;
    assign dma_done      = (dma_req.dir == DMA_H2C) ? h2c_done : c2h_done;

    assign w_meta = card_waddr >= CARD_META_BASE;
    assign r_meta = card_raddr >= CARD_META_BASE;
    always @(posedge clk) begin
      if (card_we && !w_meta)
        for (int b = 0; b < 8; b++)
          if (card_wstrb[b]) usr_mem[k][(card_waddr[11:0] & 12'hFF8) + 12'(b)] <= card_wdata[8*b +: 8];
      if (card_re) begin
        rd_meta_q <= r_meta;
        for (int b = 0; b < 8; b++)
          um_rdata[8*b +: 8] <= usr_mem[k][(card_raddr[11:0] & 12'hFF8) + 12'(b)];
      end
    end
    assign card_rdata = rd_meta_q ? meta_rdata : um_rdata;

    virtqueue_controller #(.IS_RX(k == 1), .META_BASE(CARD_META_BASE)) dut (
      .clk, .rst_n,
      .dev_reset     (dev_reset),
      .driver_ok     (1'b1),
      .q_enable      (1'b1),
      .q_size        (16'(QS)),
      .q_msix        (16'(3 + k)),
      .q_desc        (DESC),
      .q_driver      (AVAIL),
      .q_device      (USED),
      .kick          (kick[k]),
      .dma_req_valid, .dma_req_ready, .dma_req, .dma_done,
      .meta_we       (card_we && w_meta),
      .meta_waddr    (card_waddr[5:0]),
      .meta_wdata    (card_wdata),
      .meta_wstrb    (card_wstrb),
      .meta_re       (card_re && r_meta),
      .meta_raddr    (card_raddr[5:0]),
      .meta_rdata    (meta_rdata),
      .irq_req, .irq_vector, .irq_ack,
      .isr_set       (isr_set[k]),
      .usr_req_valid (usr_req_valid[k]),
      .usr_req_ready (usr_req_ready[k]),
      .usr_req_addr  (usr_req_addr[k]),
      .usr_req_len   (usr_req_len[k]),
      .usr_done      (usr_done[k]),
      .usr_done_len  (usr_done_len[k])
    );

    xdma_bypass_model model (
      .clk, .rst_n,
      .h2c_byp_load (h2c_load), .h2c_byp_ready(h2c_ready),
      .c2h_byp_load (c2h_load), .c2h_byp_ready(c2h_ready),
      .byp_desc     (dma_req),
      .h2c_done, .c2h_done,
      .card_we, .card_waddr, .card_wdata, .card_wstrb,
      .card_re, .card_raddr, .card_rdata,
      .msix_req     (irq_req), .msix_vector(irq_vector), .msix_ack(irq_ack)
    );

    always @(posedge clk) if (isr_set[k]) isr_cnt[k]++;
  end

  // ---------------- host memory helpers ----------------
  task automatic hw8(input int k, input logic [63:0] a, input logic [7:0] v);
    if (k == 0) g[0].model.host_mem[a[15:0]] = v; else g[1].model.host_mem[a[15:0]] = v;
  endtask
  function automatic logic [7:0] hr8(input int k, input logic [63:0] a);
    return (k == 0) ? g[0].model.host_mem[a[15:0]] : g[1].model.host_mem[a[15:0]];
  endfunction
  task automatic hw(input int k, input logic [63:0] a, input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) hw8(k, a + 64'(i), v[8*i +: 8]);
  endtask
  function automatic logic [63:0] hr(input int k, input logic [63:0] a, input int n);
    logic [63:0] v = '0;
    for (int i = 0; i < n; i++) v[8*i +: 8] = hr8(k, a + 64'(i));
    return v;
  endfunction
  task automatic put_desc(input int k, input int idx, input logic [63:0] addr, input int len,
                          input logic [15:0] flags, input logic [15:0] next);
    hw(k, DESC + 64'(16*idx), addr, 8);
    hw(k, DESC + 64'(16*idx) + 8, 64'(len), 4);
    hw(k, DESC + 64'(16*idx) + 12, 64'(flags), 2);
    hw(k, DESC + 64'(16*idx) + 14, 64'(next), 2);
  endtask
  task automatic post(input int k, input int aidx, input int head);
    hw(k, AVAIL + 4 + 64'(2*(aidx % QS)), 64'(head), 2);
    hw(k, AVAIL + 2, 64'(aidx + 1), 2);
  endtask
  task automatic do_kick(input int k);
    @(posedge clk); kick[k] <= 1'b1;
    @(posedge clk); kick[k] <= 1'b0;
  endtask
  // Offer one user buffer and wait for the entry to complete.
  task automatic usr_xfer(input int k, input logic [CARD_AW-1:0] addr, input int len,
                          output int done_len);
    @(posedge clk);
    usr_req_valid[k] <= 1'b1; usr_req_addr[k] <= addr; usr_req_len[k] <= 32'(len);
    do @(posedge clk); while (!usr_req_ready[k]);
    usr_req_valid[k] <= 1'b0;
    do @(posedge clk); while (!usr_done[k]);
    done_len = int'(usr_done_len[k]);
  endtask

  // ---------------- TX scenario ----------------
  task automatic tx_test();
    int dl;
    logic [7:0] pat [int];
    int nexp;
    // buffer 0: one descriptor of 20 bytes
    for (int i = 0; i < 20; i++) begin pat[i] = 8'($urandom); hw8(0, 64'h8000 + 64'(i), pat[i]); end
    put_desc(0, 0, 64'h8000, 20, 16'h0, 16'h0);
    // buffer 1: chain of 10 + 7 bytes
    for (int i = 0; i < 10; i++) hw8(0, 64'h8100 + 64'(i), 8'(i + 8'h40));
    for (int i = 0; i < 7; i++)  hw8(0, 64'h8200 + 64'(i), 8'(i + 8'h60));
    put_desc(0, 1, 64'h8100, 10, VIRTQ_DESC_F_NEXT, 16'd2);
    put_desc(0, 2, 64'h8200, 7, 16'h0, 16'h0);
    post(0, 0, 0);
    post(0, 1, 1);
    do_kick(0);
    usr_xfer(0, 32'h0000, 256, dl);
    check(dl == 20, "TX entry 0 length");
    usr_xfer(0, 32'h0100, 256, dl);
    check(dl == 17, "TX chained entry length");
    repeat (20) @(posedge clk);
    for (int i = 0; i < 20; i++) check(usr_mem[0][i] == pat[i], "TX data buffer 0");
    for (int i = 0; i < 10; i++) check(usr_mem[0][256 + i] == 8'(i + 8'h40), "TX data chain part 1");
    for (int i = 0; i < 7; i++)  check(usr_mem[0][266 + i] == 8'(i + 8'h60), "TX data chain part 2");
    check(hr(0, USED + 2, 2) == 64'd2, "TX used idx after 2");
    check(hr(0, USED + 4, 4) == 64'd0 && hr(0, USED + 8, 4) == 64'd0, "TX used elem 0 {id 0, len 0}");
    check(hr(0, USED + 12, 4) == 64'd1 && hr(0, USED + 16, 4) == 64'd0, "TX used elem 1 {id 1, len 0}");
    check(g[0].model.irq_count[3] == 2, "TX two MSI-X interrupts on vector 3");
    check(isr_cnt[0] == 2, "TX ISR set twice");
    check(g[0].model.n_c2h == 4, "TX two C2H descriptors per entry");
    // interrupt suppressed
    hw(0, AVAIL, 64'(VIRTQ_AVAIL_F_NO_INTERRUPT), 2);
    put_desc(0, 3, 64'h8300, 5, 16'h0, 16'h0);
    post(0, 2, 3);
    do_kick(0);
    usr_xfer(0, 32'h0200, 256, dl);
    repeat (20) @(posedge clk);
    check(dl == 5, "TX entry 2 length");
    check(hr(0, USED + 2, 2) == 64'd3, "TX used idx after 3");
    check(g[0].model.irq_count[3] == 2, "TX interrupt suppressed by NO_INTERRUPT");
    hw(0, AVAIL, 64'h0, 2);
    // ring wrap: 9 more entries through an 8-entry queue
    nexp = 3;
    for (int e = 0; e < 9; e++) begin
      int d = 4 + (e % 4);
      put_desc(0, d, 64'h9000 + 64'(16 * e), 3 + e, 16'h0, 16'h0);
      for (int i = 0; i < 3 + e; i++) hw8(0, 64'h9000 + 64'(16 * e + i), 8'(e * 16 + i));
      post(0, nexp, d);
      do_kick(0);
      usr_xfer(0, 32'h0400 + 32'(16 * e), 16, dl);
      check(dl == 3 + e, "TX wrap entry length");
      nexp++;
      repeat (15) @(posedge clk);
      check(hr(0, USED + 2, 2) == 64'(nexp), "TX used idx during wrap");
      check(hr(0, USED + 4 + 64'(8 * ((nexp - 1) % QS)), 4) == 64'(d), "TX used id during wrap");
    end
    for (int e = 0; e < 9; e++)
      for (int i = 0; i < 3 + e; i++)
        check(usr_mem[0][12'h400 + 12'(16 * e + i)] == 8'(e * 16 + i), "TX wrap data");
    // device reset: indices restart at 0
    @(posedge clk); dev_reset <= 1'b1; @(posedge clk); dev_reset <= 1'b0;
    repeat (5) @(posedge clk);
    hw(0, AVAIL + 2, 64'h0, 2);
    hw(0, USED + 2, 64'h0, 2);
    put_desc(0, 0, 64'h8000, 4, 16'h0, 16'h0);
    post(0, 0, 0);
    do_kick(0);
    usr_xfer(0, 32'h0800, 16, dl);
    repeat (15) @(posedge clk);
    check(dl == 4 && hr(0, USED + 2, 2) == 64'd1, "TX restarts from index 0 after reset");
  endtask

  // ---------------- RX scenario ----------------
  task automatic rx_test();
    int dl;
    bit  got;
    for (int i = 0; i < 40; i++) usr_mem[1][12'h100 + 12'(i)] = 8'($urandom);
    for (int i = 0; i < 50; i++) usr_mem[1][12'h200 + 12'(i)] = 8'(i ^ 8'h5A);
    put_desc(1, 0, 64'h8000, 64, VIRTQ_DESC_F_WRITE, 16'h0);
    put_desc(1, 1, 64'h8100, 16, VIRTQ_DESC_F_WRITE | VIRTQ_DESC_F_NEXT, 16'd2);
    put_desc(1, 2, 64'h8200, 16, VIRTQ_DESC_F_WRITE, 16'h0);
    post(1, 0, 0);
    post(1, 1, 1);
    do_kick(1);
    usr_xfer(1, 32'h0100, 40, dl);
    repeat (15) @(posedge clk);
    check(dl == 40, "RX moved 40 bytes");
    for (int i = 0; i < 40; i++) check(hr8(1, 64'h8000 + 64'(i)) == usr_mem[1][12'h100 + 12'(i)], "RX data buffer 0");
    check(hr(1, USED + 4, 4) == 64'd0 && hr(1, USED + 8, 4) == 64'd40, "RX used elem {0, 40}");
    usr_xfer(1, 32'h0200, 50, dl);
    repeat (15) @(posedge clk);
    check(dl == 32, "RX limited to the 32-byte chained buffer");
    for (int i = 0; i < 16; i++) check(hr8(1, 64'h8100 + 64'(i)) == 8'(i ^ 8'h5A), "RX chain part 1");
    for (int i = 0; i < 16; i++) check(hr8(1, 64'h8200 + 64'(i)) == 8'((i + 16) ^ 8'h5A), "RX chain part 2");
    check(hr(1, USED + 12, 4) == 64'd1 && hr(1, USED + 16, 4) == 64'd32, "RX used elem {1, 32}");
    check(hr(1, USED + 2, 2) == 64'd2, "RX used idx 2");
    check(g[1].model.irq_count[4] == 2, "RX two MSI-X interrupts on vector 4");
    // no buffer: the request waits until the driver posts one
    @(posedge clk);
    usr_req_valid[1] <= 1'b1; usr_req_addr[1] <= 32'h0100; usr_req_len[1] <= 32'd8;
    got = 1'b0;
    repeat (300) begin @(posedge clk); if (usr_req_ready[1]) got = 1'b1; end
    check(!got, "RX waits while no buffer is available");
    put_desc(1, 3, 64'h8400, 64, VIRTQ_DESC_F_WRITE, 16'h0);
    post(1, 2, 3);
    do_kick(1);
    do @(posedge clk); while (!usr_req_ready[1]);
    usr_req_valid[1] <= 1'b0;
    do @(posedge clk); while (!usr_done[1]);
    repeat (15) @(posedge clk);
    check(usr_done_len[1] == 8, "RX after kick moved 8 bytes");
    check(hr(1, USED + 2, 2) == 64'd3 && hr(1, USED + 20, 4) == 64'd3, "RX used idx 3, id 3");
  endtask

  initial begin
    dev_reset = 1'b0;
    for (int k = 0; k < 2; k++) begin
      kick[k] = 1'b0; usr_req_valid[k] = 1'b0; usr_req_addr[k] = '0; usr_req_len[k] = '0;
      isr_cnt[k] = 0;
      foreach (usr_mem[k][i]) usr_mem[k][i] = 8'h00;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);
    fork
      tx_test();
      rx_test();
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
