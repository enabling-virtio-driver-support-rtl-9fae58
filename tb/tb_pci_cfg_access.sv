// tb_pci_cfg_access: drives random accesses through the PCI configuration
// access state machine against a BAR0 memory model with random response
// delay. For legal accesses it checks the BAR0 address, byte strobes and
// shifted write data, the right-aligned read data and that the memory
// changed only in the addressed bytes; for illegal ones (bar != 0, length
// not 1/2/4, a dword-crossing span) it checks that no BAR0 request is made
// and that the access still completes.
`timescale 1ns/1ps
module tb_pci_cfg_access;
  import virtio_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic start_valid, start_write, busy, done;
  logic [31:0] start_wdata, cap_offset, cap_length, done_rdata;
  logic [7:0] cap_bar;
  logic bar_req_valid, bar_req_ready, bar_req_write, bar_rsp_valid;
  logic [BAR0_AW-1:0] bar_req_addr;
  logic [31:0] bar_req_wdata, bar_rsp_rdata;
  logic [3:0] bar_req_wstrb;

  pci_cfg_access dut (.*);

  logic [31:0] mem [1024];
  int nreq;
  logic [BAR0_AW-1:0] last_addr;
  logic [3:0] last_strb;
  logic [31:0] last_wdata;

  // BAR0 model: ready after a random wait, response a random time later.
  initial begin
    bar_req_ready = 0; bar_rsp_valid = 0; bar_rsp_rdata = 0; nreq = 0;
    forever begin
      @(posedge clk);
      if (rst_n && bar_req_valid) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        bar_req_ready <= 1'b1;
        @(posedge clk);
        bar_req_ready <= 1'b0;
        nreq++;
        last_addr = bar_req_addr; last_strb = bar_req_wstrb; last_wdata = bar_req_wdata;
        repeat ($urandom_range(0, 4)) @(posedge clk);
        if (bar_req_write) begin
          for (int b = 0; b < 4; b++)
            if (bar_req_wstrb[b]) mem[bar_req_addr[11:2]][8*b +: 8] = bar_req_wdata[8*b +: 8];
        end else bar_rsp_rdata <= mem[bar_req_addr[11:2]];
        bar_rsp_valid <= 1'b1;
        @(posedge clk);
        bar_rsp_valid <= 1'b0;
      end
    end
  end

  task automatic access(input bit wr, input logic [7:0] bar, input logic [31:0] off,
                        input logic [31:0] len, input logic [31:0] wd, output logic [31:0] rd);
    @(posedge clk);
    while (busy) @(posedge clk);
    start_valid <= 1'b1; start_write <= wr; start_wdata <= wd;
    cap_bar <= bar; cap_offset <= off; cap_length <= len;
    @(posedge clk);
    start_valid <= 1'b0;
    do @(posedge clk); while (!done);
    rd = done_rdata;
  endtask

  initial begin
    logic [31:0] rd, prev_v, expect_v, m;
    start_valid = 0; start_write = 0; start_wdata = 0; cap_bar = 0; cap_offset = 0; cap_length = 0;
    foreach (mem[i]) mem[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      automatic int sel = $urandom_range(0, 2);
      automatic logic [31:0] len = (sel == 0) ? 1 : (sel == 1) ? 2 : 4;
      automatic logic [31:0] off = 32'($urandom_range(0, 4095));
      automatic logic [7:0]  bar = ($urandom_range(0, 9) == 0) ? 8'd1 : 8'd0;
      automatic bit wr = 1'($urandom);
      automatic logic [31:0] wd = $urandom;
      bit legal;
      automatic int n0 = nreq;
      if ($urandom_range(0, 9) == 0) len = 3;
      legal = (bar == 0) && (len != 3) && (off[1:0] + len <= 4);
      m = (len == 1) ? 32'hFF : (len == 2) ? 32'hFFFF : 32'hFFFF_FFFF;
      prev_v = mem[off[11:2]];
      access(wr, bar, off, len, wd, rd);
      if (!legal) begin
        check(nreq == n0, $sformatf("illegal access makes no BAR0 request bar=%0d off=%h len=%0d n=%0d %0d", bar, off, len, n0, nreq));
        check(rd == 0, "illegal access reads 0");
        check(mem[off[11:2]] == prev_v, "illegal access leaves memory");
      end else begin
        check(nreq == n0 + 1, "one BAR0 request");
        check(last_addr == {off[11:2], 2'b00}, "BAR0 dword address");
        if (wr) begin
          expect_v = (prev_v & ~(m << (8 * off[1:0]))) | ((wd & m) << (8 * off[1:0]));
          check(mem[off[11:2]] == expect_v, "write lands in the addressed bytes only");
          check(last_strb == 4'((len == 1 ? 1 : len == 2 ? 3 : 15) << off[1:0]), "write strobes");
        end else begin
          check(rd == ((prev_v >> (8 * off[1:0])) & m), "read data right-aligned");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
