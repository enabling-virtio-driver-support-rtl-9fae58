// tb_virtio_common_cfg: plays a driver's initialisation sequence against the
// common configuration structure: feature negotiation through the select
// registers, byte- and half-word writes through byte strobes, per-queue
// fields reached through queue_select (checked on both the register reads
// and the per-queue outputs), rejected queue sizes, an out-of-range
// queue_select, and the reset caused by writing 0 to device_status.
`timescale 1ns/1ps
module tb_virtio_common_cfg;
  import virtio_pkg::*;
  localparam int NQ = 3;
  localparam int QMAX = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic reg_we; logic [5:0] reg_addr; logic [31:0] reg_wdata, reg_rdata; logic [3:0] reg_wstrb;
  logic [7:0] device_status; logic [63:0] driver_features; logic [15:0] msix_config; logic dev_reset;
  logic [15:0] q_size [NQ]; logic [15:0] q_msix [NQ]; logic q_enable [NQ];
  logic [63:0] q_desc [NQ]; logic [63:0] q_driver [NQ]; logic [63:0] q_device [NQ];
  int resets = 0;
  always @(posedge clk) if (rst_n && dev_reset) resets++;

  virtio_common_cfg #(.NUM_QUEUES(NQ), .QUEUE_SIZE_MAX(QMAX),
                      .DEVICE_FEATURES(64'h0000_0003_0000_0005)) dut (.*);

  task automatic wr(input logic [5:0] a, input logic [31:0] d, input logic [3:0] be);
    @(posedge clk); reg_we <= 1'b1; reg_addr <= a; reg_wdata <= d; reg_wstrb <= be;
    @(posedge clk); reg_we <= 1'b0; reg_addr <= '0; #1;
  endtask
  task automatic rd(input logic [5:0] a, output logic [31:0] d);
    @(posedge clk); reg_addr <= a; @(posedge clk); #1; d = reg_rdata;
  endtask

  initial begin
    logic [31:0] v;
    logic [63:0] dsc [NQ], drv [NQ], dev [NQ];
    reg_we = 0; reg_addr = 0; reg_wdata = 0; reg_wstrb = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    rd(CC_MSIX_CONFIG_NUMQ, v);
    check(v == {16'(NQ), 16'hFFFF}, "num_queues and msix_config reset");
    rd(CC_QSIZE_QMSIX, v);
    check(v == {16'hFFFF, 16'(QMAX)}, "queue 0 size and vector reset");
    // feature negotiation
    wr(CC_DEVICE_FEATURE_SELECT, 0, 4'hF); rd(CC_DEVICE_FEATURE, v); check(v == 32'h5, "features 31:0");
    wr(CC_DEVICE_FEATURE_SELECT, 1, 4'hF); rd(CC_DEVICE_FEATURE, v); check(v == 32'h3, "features 63:32");
    wr(CC_DEVICE_FEATURE_SELECT, 2, 4'hF); rd(CC_DEVICE_FEATURE, v); check(v == 32'h0, "features beyond 63");
    wr(CC_STATUS_GEN_QSEL, 32'h1, 4'b0001);
    wr(CC_STATUS_GEN_QSEL, 32'h3, 4'b0001);
    wr(CC_DRIVER_FEATURE_SELECT, 0, 4'hF); wr(CC_DRIVER_FEATURE, 32'h4, 4'hF);
    wr(CC_DRIVER_FEATURE_SELECT, 1, 4'hF); wr(CC_DRIVER_FEATURE, 32'h1, 4'hF);
    check(driver_features == 64'h1_0000_0004, "driver features stored");
    rd(CC_DRIVER_FEATURE, v); check(v == 32'h1, "driver features read back");
    wr(CC_STATUS_GEN_QSEL, 32'hB, 4'b0001);
    check(device_status == 8'hB, "FEATURES_OK status");
    // per-queue programming, queue_select written as a 16-bit field
    for (int q = 0; q < NQ; q++) begin
      dsc[q] = {$urandom, $urandom}; drv[q] = {$urandom, $urandom}; dev[q] = {$urandom, $urandom};
      wr(CC_STATUS_GEN_QSEL, {16'(q), 16'hDEAD}, 4'b1100);
      wr(CC_QSIZE_QMSIX, {16'(q + 1), 16'h0000}, 4'b1100);              // vector only
      wr(CC_QSIZE_QMSIX, {16'h0000, 16'(QMAX * 2)}, 4'b0011);           // too large: ignored
      wr(CC_QSIZE_QMSIX, {16'h0000, 16'(QMAX >> q)}, 4'b0011);          // smaller: taken
      wr(CC_QUEUE_DESC_LO, dsc[q][31:0], 4'hF);   wr(CC_QUEUE_DESC_HI, dsc[q][63:32], 4'hF);
      wr(CC_QUEUE_DRIVER_LO, drv[q][31:0], 4'hF); wr(CC_QUEUE_DRIVER_HI, drv[q][63:32], 4'hF);
      wr(CC_QUEUE_DEVICE_LO, dev[q][31:0], 4'hF); wr(CC_QUEUE_DEVICE_HI, dev[q][63:32], 4'hF);
      wr(CC_QENABLE_QNOTIFYOFF, 32'h1, 4'b0011);
    end
    check(device_status == 8'hB, "status untouched by queue_select writes");
    for (int q = NQ - 1; q >= 0; q--) begin
      wr(CC_STATUS_GEN_QSEL, {16'(q), 16'h0}, 4'b1100);
      rd(CC_QSIZE_QMSIX, v);        check(v == {16'(q + 1), 16'(QMAX >> q)}, "size and vector read back");
      rd(CC_QENABLE_QNOTIFYOFF, v); check(v == {16'(q), 16'h1}, "enable and notify_off read back");
      rd(CC_QUEUE_DESC_LO, v);      check(v == dsc[q][31:0], "desc lo");
      rd(CC_QUEUE_DRIVER_HI, v);    check(v == drv[q][63:32], "driver hi");
      rd(CC_QUEUE_DEVICE_HI, v);    check(v == dev[q][63:32], "device hi");
      check(q_size[q] == 16'(QMAX >> q) && q_msix[q] == 16'(q + 1) && q_enable[q], "queue outputs");
      check(q_desc[q] == dsc[q] && q_driver[q] == drv[q] && q_device[q] == dev[q], "queue address outputs");
    end
    wr(CC_STATUS_GEN_QSEL, {16'(NQ), 16'h0}, 4'b1100);
    rd(CC_QSIZE_QMSIX, v); check(v == 0, "missing queue reads size 0");
    wr(CC_MSIX_CONFIG_NUMQ, 32'h0000_0007, 4'b0011);
    check(msix_config == 16'h7, "msix_config");
    wr(CC_STATUS_GEN_QSEL, 32'h0000_000F, 4'b0001);
    check(device_status == 8'hF, "DRIVER_OK");
    // device reset
    wr(CC_STATUS_GEN_QSEL, 32'h0, 4'b0001);
    @(posedge clk); #1;
    check(resets == 1, "reset pulse");
    check(device_status == 0 && driver_features == 0 && msix_config == 16'hFFFF, "reset clears device fields");
    for (int q = 0; q < NQ; q++)
      check(!q_enable[q] && q_size[q] == 16'(QMAX) && q_desc[q] == 0 && q_msix[q] == 16'hFFFF, "reset clears queues");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
