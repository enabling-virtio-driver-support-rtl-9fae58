// tb_virtio_fpga_top: end-to-end run of the VirtIO console device logic at its
// default parameters (two queues: 0 receive, 1 transmit; maximum queue size
// 256).
//
// The testbench stands in for everything around the RTL: the PCIe hard block
// (configuration requests), the DMA/bridge engine (a behavioural bypass DMA
// model with host memory, an AXI-lite master for BAR0 that also carries the
// BAR0 requests produced by the PCI configuration access capability), the
// host VirtIO driver (capability walk, initialisation, ring management,
// notifications, interrupt accounting) and the user logic (a card memory).
//
// Sequence: walk the capability list; initialise the device as a driver
// does (reset, feature negotiation, queue setup, DRIVER_OK); read and write
// common-configuration fields through pci_cfg_data; receive data into posted
// RX buffers, including one request that must wait for a buffer; transmit
// single and chained buffers through a shrunk 8-entry TX queue until it
// wraps, with one entry whose interrupt is suppressed; run RX and TX at the
// same time so the arbiter has to choose; read-clear the ISR; complete a
// TX entry with no MSI-X vector so that only the ISR bit and intx signal it;
// reset the device and run once more. Each of these mechanisms is counted,
// and one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_virtio_fpga_top;
  import virtio_pkg::*;
  localparam int NQ = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- DUT signals ----------------
  logic cfg_req_valid, cfg_req_ready, cfg_req_write, cfg_cpl_valid;
  logic [9:0] cfg_req_dwaddr; logic [31:0] cfg_req_wdata, cfg_cpl_rdata; logic [3:0] cfg_req_be;
  logic ext_bar_req_valid, ext_bar_req_ready, ext_bar_req_write, ext_bar_rsp_valid;
  logic [BAR0_AW-1:0] ext_bar_req_addr; logic [31:0] ext_bar_req_wdata, ext_bar_rsp_rdata;
  logic [3:0] ext_bar_req_wstrb;
  logic [BAR0_AW-1:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata; logic [3:0] s_axil_wstrb; logic [1:0] s_axil_bresp, s_axil_rresp;
  logic h2c_byp_load, h2c_byp_ready, c2h_byp_load, c2h_byp_ready, h2c_done, c2h_done;
  dma_desc_t byp_desc;
  logic msix_req, msix_ack, intx; logic [15:0] msix_vector;
  logic card_we, card_re; logic [CARD_AW-1:0] card_waddr, card_raddr;
  logic [CARD_DW-1:0] card_wdata, card_rdata; logic [7:0] card_wstrb;
  logic usr_mem_we, usr_mem_re; logic [CARD_AW-1:0] usr_mem_waddr, usr_mem_raddr;
  logic [CARD_DW-1:0] usr_mem_wdata, usr_mem_rdata; logic [7:0] usr_mem_wstrb;
  logic [NQ-1:0] usr_req_valid, usr_req_ready, usr_done;
  logic [CARD_AW-1:0] usr_req_addr [NQ]; logic [31:0] usr_req_len [NQ]; logic [31:0] usr_done_len [NQ];
  logic [7:0] device_status;

  virtio_fpga_top dut (.*);

  xdma_bypass_model udma (
    .clk, .rst_n, .h2c_byp_load, .h2c_byp_ready, .c2h_byp_load, .c2h_byp_ready, .byp_desc,
    .h2c_done, .c2h_done, .card_we, .card_waddr, .card_wdata, .card_wstrb,
    .card_re, .card_raddr, .card_rdata, .msix_req, .msix_vector, .msix_ack
  );

  // ---------------- user logic memory ----------------
  logic [7:0] umem [8192];
  always @(posedge clk) begin
    if (usr_mem_we)
      for (int b = 0; b < 8; b++)
        if (usr_mem_wstrb[b]) umem[13'(usr_mem_waddr) + 13'(b)] <= usr_mem_wdata[8*b +: 8];
    if (usr_mem_re)
      for (int b = 0; b < 8; b++) usr_mem_rdata[8*b +: 8] <= umem[13'(usr_mem_raddr) + 13'(b)];
  end

  // ---------------- mechanism counters ----------------
  int n_capwalk = 0, n_pcicfg_rd = 0, n_pcicfg_wr = 0, n_rx = 0, n_tx = 0, n_chain = 0;
  int n_wrap = 0, n_suppressed = 0, n_isr_clear = 0, n_arb_conflict = 0, n_rx_wait = 0;
  int n_reset = 0, n_intx = 0, n_kick = 0, n_load = 0, n_long_load = 0;
  logic load_q = 1'b0;
  always @(posedge clk) begin
    // A bypass descriptor is handed over in one clock cycle.
    if (h2c_byp_load || c2h_byp_load) n_load++;
    if ((h2c_byp_load || c2h_byp_load) && load_q) n_long_load++;
    load_q <= h2c_byp_load || c2h_byp_load;
    if (&dut.u_ctrl.dma_req_valid) n_arb_conflict++;
    if (|dut.u_ctrl.kick) n_kick++;
  end

  // ---------------- AXI-lite master (shared by driver and bridge) ----------
  semaphore axil_lock = new(1);
  task automatic axw(input logic [11:0] a, input logic [31:0] d, input logic [3:0] be);
    axil_lock.get(1);
    @(posedge clk);
    s_axil_awvalid <= 1; s_axil_awaddr <= a; s_axil_wvalid <= 1; s_axil_wdata <= d; s_axil_wstrb <= be;
    do @(posedge clk); while (!s_axil_awready);
    s_axil_awvalid <= 0; s_axil_wvalid <= 0; s_axil_bready <= 1;
    do @(posedge clk); while (!s_axil_bvalid);
    s_axil_bready <= 0;
    axil_lock.put(1);
  endtask
  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    axil_lock.get(1);
    @(posedge clk);
    s_axil_arvalid <= 1; s_axil_araddr <= a;
    do @(posedge clk); while (!s_axil_arready);
    s_axil_arvalid <= 0; s_axil_rready <= 1;
    do @(posedge clk); while (!s_axil_rvalid);
    d = s_axil_rdata;
    s_axil_rready <= 0;
    axil_lock.put(1);
  endtask

  // The DMA/bridge engine turns ext_cfg's BAR0 requests into AXI-lite accesses.
  initial begin
    ext_bar_req_ready = 0; ext_bar_rsp_valid = 0; ext_bar_rsp_rdata = 0;
    forever begin
      @(posedge clk);
      if (ext_bar_req_valid) begin
        logic [31:0] d;
        logic wr;
        logic [11:0] a;
        logic [31:0] wd;
        logic [3:0] st;
        wr = ext_bar_req_write; a = ext_bar_req_addr; wd = ext_bar_req_wdata; st = ext_bar_req_wstrb;
        ext_bar_req_ready <= 1; @(posedge clk); ext_bar_req_ready <= 0;
        if (wr) begin axw(a, wd, st); d = 0; end else axr(a, d);
        ext_bar_rsp_rdata <= d; ext_bar_rsp_valid <= 1; @(posedge clk); ext_bar_rsp_valid <= 0;
      end
    end
  end

  // ---------------- configuration space ----------------
  task automatic cfg(input bit wr, input logic [7:0] a, input logic [31:0] wd, input logic [3:0] be,
                     output logic [31:0] rd);
    @(posedge clk);
    cfg_req_valid <= 1; cfg_req_write <= wr; cfg_req_dwaddr <= 10'(a >> 2);
    cfg_req_wdata <= wd; cfg_req_be <= be;
    do @(posedge clk); while (!cfg_req_ready);
    cfg_req_valid <= 0;
    while (!cfg_cpl_valid) @(posedge clk);
    rd = cfg_cpl_rdata;
  endtask

  // ---------------- host memory and rings ----------------
  localparam logic [63:0] RX_DESC = 64'h1000, RX_AVAIL = 64'h2000, RX_USED = 64'h3000;
  localparam logic [63:0] TX_DESC = 64'h4000, TX_AVAIL = 64'h5000, TX_USED = 64'h5800;
  localparam int RX_QS = 256, TX_QS = 8;
  logic [63:0] qdesc [NQ], qavail [NQ], qused [NQ];
  int qs [NQ];
  int avail_next [NQ];

  function automatic logic [63:0] hr(input logic [63:0] a, input int n);
    logic [63:0] v = '0;
    for (int i = 0; i < n; i++) v[8*i +: 8] = udma.host_mem[16'(a + 64'(i))];
    return v;
  endfunction
  task automatic hw(input logic [63:0] a, input logic [63:0] v, input int n);
    for (int i = 0; i < n; i++) udma.host_mem[16'(a + 64'(i))] = v[8*i +: 8];
  endtask
  task automatic put_desc(input int q, input int idx, input logic [63:0] addr, input int len,
                          input logic [15:0] flags, input logic [15:0] next);
    hw(qdesc[q] + 64'(16 * idx), addr, 8);
    hw(qdesc[q] + 64'(16 * idx) + 8, 64'(len), 4);
    hw(qdesc[q] + 64'(16 * idx) + 12, 64'(flags), 2);
    hw(qdesc[q] + 64'(16 * idx) + 14, 64'(next), 2);
  endtask
  task automatic post(input int q, input int head);
    hw(qavail[q] + 4 + 64'(2 * (avail_next[q] % qs[q])), 64'(head), 2);
    avail_next[q]++;
    hw(qavail[q] + 2, 64'(avail_next[q] & 16'hFFFF), 2);
  endtask
  task automatic notify(input int q);
    axw(BAR0_NOTIFY_BASE + 12'(4 * q), 32'(q), 4'b0011);
  endtask
  task automatic usr_xfer(input int q, input logic [CARD_AW-1:0] addr, input int len, output int dl);
    @(posedge clk);
    usr_req_valid[q] <= 1; usr_req_addr[q] <= addr; usr_req_len[q] <= 32'(len);
    do @(posedge clk); while (!usr_req_ready[q]);
    usr_req_valid[q] <= 0;
    do @(posedge clk); while (!usr_done[q]);
    dl = int'(usr_done_len[q]);
  endtask

  // ---------------- driver initialisation ----------------
  task automatic driver_init(input int tx_size);
    logic [31:0] v;
    axw(12'h014, 32'h0, 4'b0001);                       // reset
    axw(12'h014, 32'h1, 4'b0001);                       // ACKNOWLEDGE
    axw(12'h014, 32'h3, 4'b0001);                       // DRIVER
    axw(12'h000, 32'h1, 4'hF); axr(12'h004, v);
    check(v[0], "device offers VIRTIO_F_VERSION_1");
    axw(12'h008, 32'h1, 4'hF); axw(12'h00C, 32'h1, 4'hF);
    axw(12'h014, 32'hB, 4'b0001);                       // FEATURES_OK
    axr(12'h014, v); check(v[3], "FEATURES_OK accepted");
    axr(12'h010, v); check(v[31:16] == 16'(NQ), "num_queues");
    axw(12'h010, 32'h0, 4'b0011);                       // config vector 0
    for (int q = 0; q < NQ; q++) begin
      axw(12'h016, {16'(q), 16'h0}, 4'b1100);
      axr(12'h018, v); check(v[15:0] == 16'd256, "queue size offered");
      if (q == 1) axw(12'h018, 32'(tx_size), 4'b0011);
      axw(12'h01A, {16'(q + 1), 16'h0}, 4'b1100);
      axw(12'h020, qdesc[q][31:0], 4'hF);  axw(12'h024, qdesc[q][63:32], 4'hF);
      axw(12'h028, qavail[q][31:0], 4'hF); axw(12'h02C, qavail[q][63:32], 4'hF);
      axw(12'h030, qused[q][31:0], 4'hF);  axw(12'h034, qused[q][63:32], 4'hF);
      axw(12'h01C, 32'h1, 4'b0011);
    end
    axw(12'h014, 32'hF, 4'b0001);                       // DRIVER_OK
  endtask

  // ---------------- scenario ----------------
  initial begin
    logic [31:0] v, hdr;
    logic [7:0] p;
    int n, dl, irq_rx, irq_tx;
    cfg_req_valid = 0; cfg_req_write = 0; cfg_req_dwaddr = 0; cfg_req_wdata = 0; cfg_req_be = 0;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    usr_req_valid = '0;
    for (int q = 0; q < NQ; q++) begin usr_req_addr[q] = '0; usr_req_len[q] = '0; avail_next[q] = 0; end
    foreach (umem[i]) umem[i] = 8'($urandom);
    qdesc[0] = RX_DESC; qavail[0] = RX_AVAIL; qused[0] = RX_USED; qs[0] = RX_QS;
    qdesc[1] = TX_DESC; qavail[1] = TX_AVAIL; qused[1] = TX_USED; qs[1] = TX_QS;
    repeat (3) @(posedge clk); rst_n = 1'b1; repeat (2) @(posedge clk);

    // 1. capability walk from the MSI-X next pointer
    p = MSIX_CAP_NEXTPTR; n = 0;
    while (p != 0 && n < 8) begin
      cfg(0, p, 0, 4'hF, hdr);
      check(hdr[7:0] == 8'h09, "vendor-specific capability");
      n++; p = hdr[15:8];
    end
    check(n == 4, "four VirtIO capabilities");
    if (n == 4) n_capwalk++;

    // 2. initialisation
    driver_init(TX_QS);
    check(device_status == 8'h0F, "DRIVER_OK reached");

    // 3. PCI configuration access capability: read num_queues, write queue_select
    cfg(1, 8'hE0, 32'h0, 4'h1, v);
    cfg(1, 8'hE4, 32'h12, 4'hF, v); cfg(1, 8'hE8, 32'h2, 4'hF, v);
    cfg(0, 8'hEC, 0, 4'hF, v);
    check(v == 32'(NQ), "num_queues read through pci_cfg_data");
    if (v == 32'(NQ)) n_pcicfg_rd++;
    cfg(1, 8'hE4, 32'h16, 4'hF, v);
    cfg(1, 8'hEC, 32'h1, 4'hF, v);
    axr(12'h014, v);
    check(v[31:16] == 16'h1, "queue_select written through pci_cfg_data");
    if (v[31:16] == 16'h1) n_pcicfg_wr++;
    axr(12'h018, v);
    check(v[15:0] == 16'(TX_QS), "queue 1 size as the driver set it");

    // 4. RX: post 3 buffers (one chained), notify, send user data
    put_desc(0, 0, 64'h8000, 64, VIRTQ_DESC_F_WRITE, 0);
    put_desc(0, 1, 64'h8100, 32, VIRTQ_DESC_F_WRITE | VIRTQ_DESC_F_NEXT, 2);
    put_desc(0, 2, 64'h8200, 32, VIRTQ_DESC_F_WRITE, 0);
    put_desc(0, 3, 64'h8300, 128, VIRTQ_DESC_F_WRITE, 0);
    post(0, 0); post(0, 1); post(0, 3);
    notify(0);
    irq_rx = 0;
    usr_xfer(0, 32'h0000, 48, dl);
    check(dl == 48, "RX 48 bytes"); n_rx++;
    usr_xfer(0, 32'h0100, 60, dl);
    check(dl == 60, "RX 60 bytes into a chained 64-byte buffer"); n_rx++; n_chain++;
    usr_xfer(0, 32'h0300, 90, dl);
    check(dl == 90, "RX 90 bytes"); n_rx++;
    repeat (30) @(posedge clk);
    for (int i = 0; i < 48; i++) check(hr(64'h8000 + 64'(i), 1) == 64'(umem[i]), "RX data 0");
    for (int i = 0; i < 32; i++) check(hr(64'h8100 + 64'(i), 1) == 64'(umem[256 + i]), "RX chain part 1");
    for (int i = 0; i < 28; i++) check(hr(64'h8200 + 64'(i), 1) == 64'(umem[288 + i]), "RX chain part 2");
    check(hr(RX_USED + 2, 2) == 3, "RX used idx");
    check(hr(RX_USED + 4, 4) == 0 && hr(RX_USED + 8, 4) == 48, "RX used elem 0");
    check(hr(RX_USED + 12, 4) == 1 && hr(RX_USED + 16, 4) == 60, "RX used elem 1");
    check(udma.irq_count[1] == 3, "RX MSI-X vector 1 three times");

    // 5. TX: single and chained buffers through the 8-entry queue, wrapping
    for (int e = 0; e < 11; e++) begin
      automatic int len = 5 + 3 * e;
      automatic logic [63:0] base = 64'hA000 + 64'(64 * e);
      for (int i = 0; i < len; i++) hw(base + 64'(i), 64'(8'(e * 7 + i)), 1);
      if (e == 4) begin
        put_desc(1, e % 8, base, 4, VIRTQ_DESC_F_NEXT, 16'((e + 1) % 8));
        put_desc(1, (e + 1) % 8, base + 4, len - 4, 0, 0);
        n_chain++;
      end else put_desc(1, (e == 5) ? 7 : e % 8, base, len, 0, 0);
      if (e == 6) begin hw(TX_AVAIL, 64'(VIRTQ_AVAIL_F_NO_INTERRUPT), 2); end
      post(1, (e == 5) ? 7 : e % 8);
      notify(1);
      irq_tx = udma.irq_count[2];
      usr_xfer(1, 32'h0400 + 32'(64 * e), 64, dl);
      check(dl == len, "TX length");
      n_tx++;
      repeat (30) @(posedge clk);
      for (int i = 0; i < len; i++) check(umem[13'h400 + 13'(64 * e + i)] == 8'(e * 7 + i), "TX data");
      check(hr(TX_USED + 2, 2) == 64'(e + 1), "TX used idx");
      check(hr(TX_USED + 4 + 64'(8 * (e % TX_QS)), 4) == 64'((e == 5) ? 7 : e % 8), "TX used id");
      if (e >= TX_QS) n_wrap++;
      if (e == 6) begin
        check(udma.irq_count[2] == irq_tx, "TX interrupt suppressed");
        if (udma.irq_count[2] == irq_tx) n_suppressed++;
        hw(TX_AVAIL, 64'h0, 2);
      end else check(udma.irq_count[2] == irq_tx + 1, "TX MSI-X vector 2");
    end

    // 6. RX and TX at once; RX also waits for a buffer first
    fork
      begin
        automatic bit early = 0;
        @(posedge clk);
        usr_req_valid[0] <= 1; usr_req_addr[0] <= 32'h0200; usr_req_len[0] <= 32'd100;
        repeat (400) begin @(posedge clk); if (usr_req_ready[0]) early = 1; end
        check(!early, "RX request waits while no buffer is posted");
        if (!early) n_rx_wait++;
        put_desc(0, 4, 64'h8400, 128, VIRTQ_DESC_F_WRITE, 0);
        post(0, 4);
        notify(0);
        do @(posedge clk); while (!usr_req_ready[0]);
        usr_req_valid[0] <= 0;
        do @(posedge clk); while (!usr_done[0]);
        check(usr_done_len[0] == 100, "RX 100 bytes after the buffer arrived");
        n_rx++;
      end
      begin
        repeat (420) @(posedge clk);
        for (int e = 11; e < 14; e++) begin
          for (int i = 0; i < 40; i++) hw(64'hA000 + 64'(64 * e + i), 64'(8'(i + e)), 1);
          put_desc(1, e % 8, 64'hA000 + 64'(64 * e), 40, 0, 0);
          post(1, e % 8);
          notify(1);
          usr_xfer(1, 32'h0400 + 32'(64 * e), 64, dl);
          check(dl == 40, "TX during RX"); n_tx++;
        end
      end
    join
    repeat (30) @(posedge clk);
    for (int i = 0; i < 100; i++) check(hr(64'h8400 + 64'(i), 1) == 64'(umem[512 + i]), "RX data after wait");
    for (int i = 0; i < 90; i++) check(hr(64'h8300 + 64'(i), 1) == 64'(umem[768 + i]), "RX data 3");
    check(hr(RX_USED + 2, 2) == 4, "RX used idx 4");
    check(hr(RX_USED + 4 + 8 * 2, 4) == 3 && hr(RX_USED + 8 + 8 * 2, 4) == 90, "RX used elem 2");
    check(hr(RX_USED + 4 + 8 * 3, 4) == 4 && hr(RX_USED + 8 + 8 * 3, 4) == 100, "RX used elem 3");

    // 7. ISR read-clear
    axr(12'h200, v); check(v[0], "ISR queue bit set");
    axr(12'h200, v); check(v == 0, "ISR cleared by read");
    if (v == 0) n_isr_clear++;

    // Legacy interrupt: with queue 1's vector set to NO_VECTOR a TX entry
    // raises only the ISR bit and intx, which the ISR read then drops.
    axw(12'h016, {16'h1, 16'h0}, 4'b1100);
    axw(12'h018, {VIRTIO_MSI_NO_VECTOR, 16'h0}, 4'b1100);
    for (int i = 0; i < 16; i++) hw(64'hA000 + 64'(64 * 14 + i), 64'(8'(3 * i)), 1);
    put_desc(1, 14 % 8, 64'hA000 + 64'(64 * 14), 16, 0, 0);
    post(1, 14 % 8);
    irq_tx = int'(udma.n_irq);
    check(!intx, "intx low before the legacy-interrupt entry");
    notify(1);
    usr_xfer(1, 32'h0400 + 32'(64 * 14), 64, dl);
    repeat (10) @(posedge clk);
    check(dl == 16, "TX with NO_VECTOR");
    check(int'(udma.n_irq) == irq_tx, "no MSI-X message for NO_VECTOR");
    check(intx, "intx raised by the ISR queue bit");
    axr(12'h200, v); check(v == 32'h1, "ISR shows a queue interrupt");
    repeat (2) @(posedge clk);
    check(!intx, "intx dropped by the ISR read");
    if (dl == 16 && int'(udma.n_irq) == irq_tx && !intx) n_intx++;

    // 8. device reset and a second run
    axw(12'h014, 32'h0, 4'b0001);
    repeat (5) @(posedge clk);
    check(device_status == 0, "device reset");
    n_reset++;
    for (int q = 0; q < NQ; q++) begin
      avail_next[q] = 0;
      hw(qavail[q] + 2, 0, 2); hw(qused[q] + 2, 0, 2);
    end
    driver_init(TX_QS);
    put_desc(1, 0, 64'hA000, 12, 0, 0);
    post(1, 0);
    notify(1);
    usr_xfer(1, 32'h1000, 64, dl);
    repeat (30) @(posedge clk);
    check(dl == 12 && hr(TX_USED + 2, 2) == 1, "TX restarts at index 0 after reset");

    // mechanism coverage
    check(n_capwalk > 0, "mechanism: capability walk");
    check(n_pcicfg_rd > 0, "mechanism: pci_cfg_data read");
    check(n_pcicfg_wr > 0, "mechanism: pci_cfg_data write");
    check(n_kick > 0, "mechanism: notification");
    check(n_rx > 0, "mechanism: RX transfer");
    check(n_tx > 0, "mechanism: TX transfer");
    check(n_chain > 0, "mechanism: chained descriptors");
    check(n_wrap > 0, "mechanism: ring wrap");
    check(n_suppressed > 0, "mechanism: interrupt suppression");
    check(n_rx_wait > 0, "mechanism: RX waiting for a buffer");
    check(n_arb_conflict > 0, "mechanism: DMA arbitration between queues");
    check(n_isr_clear > 0, "mechanism: ISR read-clear");
    check(n_reset > 0, "mechanism: device reset");
    check(n_intx > 0, "mechanism: legacy interrupt through the ISR");
    check(udma.n_irq > 0, "mechanism: MSI-X interrupt");
    check(n_load > 0 && n_long_load == 0, "each descriptor load takes a single cycle");
    check(n_load == udma.n_h2c + udma.n_c2h, "every load accepted by the DMA engine");
    $display("mechanisms: capwalk=%0d pcicfg_rd=%0d pcicfg_wr=%0d kick=%0d rx=%0d tx=%0d chain=%0d wrap=%0d suppressed=%0d rx_wait=%0d arb_conflict=%0d isr_clear=%0d intx=%0d reset=%0d msix=%0d",
             n_capwalk, n_pcicfg_rd, n_pcicfg_wr, n_kick, n_rx, n_tx, n_chain, n_wrap, n_suppressed,
             n_rx_wait, n_arb_conflict, n_isr_clear, n_intx, n_reset, udma.n_irq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
