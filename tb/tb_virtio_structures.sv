// tb_virtio_structures: AXI4-Lite accesses to BAR0 as the host driver makes
// them. Checks the decode of the common configuration (queue fields through
// queue_select, 16-bit accesses with byte strobes), that writes to the
// notification area pulse the kick of the queue named in the data and that
// the area reads 0, that the ISR reads its bits and is cleared by the read,
// that unmapped offsets read 0, that AW and W may arrive in either order, and
// that writing 0 to device_status resets the queue state.
`timescale 1ns/1ps
module tb_virtio_structures;
  import virtio_pkg::*;
  localparam int NQ = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [BAR0_AW-1:0] s_axil_awaddr, s_axil_araddr;
  logic s_axil_awvalid, s_axil_awready, s_axil_wvalid, s_axil_wready, s_axil_bvalid, s_axil_bready;
  logic s_axil_arvalid, s_axil_arready, s_axil_rvalid, s_axil_rready;
  logic [31:0] s_axil_wdata, s_axil_rdata; logic [3:0] s_axil_wstrb; logic [1:0] s_axil_bresp, s_axil_rresp;
  logic [7:0] device_status; logic [63:0] driver_features; logic [15:0] msix_config; logic dev_reset;
  logic [15:0] q_size [NQ]; logic [15:0] q_msix [NQ]; logic q_enable [NQ];
  logic [63:0] q_desc [NQ]; logic [63:0] q_driver [NQ]; logic [63:0] q_device [NQ];
  logic [NQ-1:0] kick; logic isr_set_queue, isr_set_config, intx;

  virtio_structures #(.NUM_QUEUES(NQ)) dut (.*);

  int kicks [NQ];
  always @(posedge clk) if (rst_n) for (int q = 0; q < NQ; q++) if (kick[q]) kicks[q]++;

  task automatic axw(input logic [11:0] a, input logic [31:0] d, input logic [3:0] be,
                     input int w_first = 0);
    @(posedge clk);
    if (w_first) begin
      s_axil_wvalid <= 1; s_axil_wdata <= d; s_axil_wstrb <= be;
      @(posedge clk);
    end
    s_axil_awvalid <= 1; s_axil_awaddr <= a;
    s_axil_wvalid <= 1; s_axil_wdata <= d; s_axil_wstrb <= be;
    do @(posedge clk); while (!s_axil_awready);
    s_axil_awvalid <= 0; s_axil_wvalid <= 0;
    s_axil_bready <= 1;
    do @(posedge clk); while (!s_axil_bvalid);
    s_axil_bready <= 0;
  endtask
  task automatic axr(input logic [11:0] a, output logic [31:0] d);
    @(posedge clk);
    s_axil_arvalid <= 1; s_axil_araddr <= a;
    do @(posedge clk); while (!s_axil_arready);
    s_axil_arvalid <= 0; s_axil_rready <= 1;
    do @(posedge clk); while (!s_axil_rvalid);
    d = s_axil_rdata;
    s_axil_rready <= 0;
  endtask

  initial begin
    logic [31:0] v;
    s_axil_awvalid = 0; s_axil_wvalid = 0; s_axil_bready = 0; s_axil_arvalid = 0; s_axil_rready = 0;
    s_axil_awaddr = 0; s_axil_araddr = 0; s_axil_wdata = 0; s_axil_wstrb = 0;
    isr_set_queue = 0; isr_set_config = 0;
    kicks[0] = 0; kicks[1] = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    axr(12'h012, v); check(v[31:16] == 16'(NQ), "num_queues over AXI-lite");
    axw(12'h014, 32'h0000_0007, 4'b0001);
    axr(12'h014, v); check(v[7:0] == 8'h07 && device_status == 8'h07, "device_status");
    axw(12'h016, 32'h0001_0000, 4'b1100, 1);
    axr(12'h014, v); check(v == 32'h0001_0007, "queue_select written alone, W before AW");
    axw(12'h01A, 32'h0005_0000, 4'b1100);
    axw(12'h020, 32'h1234_5000, 4'hF);
    axw(12'h01C, 32'h0000_0001, 4'b0011);
    check(q_msix[1] == 16'h5 && q_desc[1][31:0] == 32'h1234_5000 && q_enable[1], "queue 1 fields");
    check(q_msix[0] == 16'hFFFF && !q_enable[0], "queue 0 untouched");
    // notification
    axw(12'h100, 32'h0000_0001, 4'b0011);
    axw(12'h104, 32'h0000_0001, 4'b0011);
    axw(12'h104, 32'h0000_0000, 4'b0011);
    @(posedge clk);
    check(kicks[0] == 1 && kicks[1] == 2, "kicks by written queue index");
    axr(12'h100, v); check(v == 0, "notification reads 0");
    axw(12'h300, 32'h0000_0000, 4'b0011);
    @(posedge clk);
    check(kicks[0] == 1, "write outside the notification area is no kick");
    // ISR
    axr(12'h200, v); check(v == 0 && !intx, "ISR empty");
    @(posedge clk); isr_set_queue <= 1; @(posedge clk); isr_set_queue <= 0;
    @(posedge clk); isr_set_config <= 1; @(posedge clk); isr_set_config <= 0;
    @(posedge clk);
    check(intx, "intx while ISR non-zero");
    axr(12'h200, v); check(v == 32'h3, "ISR bits");
    axr(12'h200, v); check(v == 32'h0, "ISR cleared by read");
    axr(12'h800, v); check(v == 0, "unmapped offset reads 0");
    check(s_axil_bresp == 0 && s_axil_rresp == 0, "OKAY responses");
    // reset
    axw(12'h014, 32'h0000_0000, 4'b0001);
    @(posedge clk);
    check(!q_enable[1] && q_msix[1] == 16'hFFFF && device_status == 0, "device reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
