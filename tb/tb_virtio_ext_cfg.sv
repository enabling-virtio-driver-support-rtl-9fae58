// tb_virtio_ext_cfg: walks the VirtIO capability list the way a driver does,
// starting at 0xA8 and following the next pointers, and checks each
// capability's id, length, type, BAR, offset and length fields against the
// expected table (0xA8 common, 0xB8 notify with multiplier 4, 0xCC ISR,
// 0xDC PCI configuration access, end of list). Then it uses the PCI
// configuration access capability: programs bar/offset/length, writes and
// reads pci_cfg_data, and checks the BAR0 requests seen by a memory model
// and the returned data. Unused forwarded dwords must read 0, and every
// configuration access must complete exactly once.
`timescale 1ns/1ps
module tb_virtio_ext_cfg;
  import virtio_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic cfg_req_valid, cfg_req_ready, cfg_req_write, cfg_cpl_valid;
  logic [9:0] cfg_req_dwaddr; logic [31:0] cfg_req_wdata, cfg_cpl_rdata; logic [3:0] cfg_req_be;
  logic bar_req_valid, bar_req_ready, bar_req_write, bar_rsp_valid;
  logic [BAR0_AW-1:0] bar_req_addr; logic [31:0] bar_req_wdata, bar_rsp_rdata; logic [3:0] bar_req_wstrb;

  virtio_ext_cfg #(.NUM_QUEUES(2)) dut (.*);

  logic [31:0] bar0 [1024];
  int nbar = 0, ncpl = 0, ncalls = 0;
  always @(posedge clk) if (rst_n && cfg_cpl_valid) ncpl++;
  initial begin
    bar_req_ready = 0; bar_rsp_valid = 0; bar_rsp_rdata = 0;
    forever begin
      @(posedge clk);
      if (rst_n && bar_req_valid) begin
        bar_req_ready <= 1'b1; @(posedge clk); bar_req_ready <= 1'b0; nbar++;
        repeat (2) @(posedge clk);
        if (bar_req_write) begin
          for (int b = 0; b < 4; b++) if (bar_req_wstrb[b]) bar0[bar_req_addr[11:2]][8*b +: 8] = bar_req_wdata[8*b +: 8];
        end else bar_rsp_rdata <= bar0[bar_req_addr[11:2]];
        bar_rsp_valid <= 1'b1; @(posedge clk); bar_rsp_valid <= 1'b0;
      end
    end
  end

  task automatic cfg(input bit wr, input logic [7:0] byte_addr, input logic [31:0] wd,
                     input logic [3:0] be, output logic [31:0] rd);
    ncalls++;
    @(posedge clk);
    cfg_req_valid <= 1'b1; cfg_req_write <= wr; cfg_req_dwaddr <= 10'(byte_addr >> 2);
    cfg_req_wdata <= wd; cfg_req_be <= be;
    do @(posedge clk); while (!cfg_req_ready);
    cfg_req_valid <= 1'b0;
    while (!cfg_cpl_valid) @(posedge clk);
    rd = cfg_cpl_rdata;
  endtask

  initial begin
    logic [31:0] v, hdr;
    logic [7:0] p;
    int n;
    // expected list: offset, type, cap_len, struct offset, struct length
    automatic int exp_off [4] = '{'hA8, 'hB8, 'hCC, 'hDC};
    automatic int exp_typ [4] = '{1, 2, 3, 5};
    automatic int exp_len [4] = '{16, 20, 16, 20};
    automatic int exp_so  [3] = '{'h000, 'h100, 'h200};
    automatic int exp_sl  [3] = '{'h38, 8, 4};
    cfg_req_valid = 0; cfg_req_write = 0; cfg_req_dwaddr = 0; cfg_req_wdata = 0; cfg_req_be = 0;
    foreach (bar0[i]) bar0[i] = $urandom;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    p = 8'hA8; n = 0;
    while (p != 8'h00 && n < 8) begin
      cfg(0, p, 0, 4'hF, hdr);
      check(32'(p) == 32'(exp_off[n]), "capability position");
      check(hdr[7:0] == 8'h09, "vendor-specific capability id");
      check(32'(hdr[31:24]) == 32'(exp_typ[n]), "cfg_type");
      check(32'(hdr[23:16]) == 32'(exp_len[n]), "cap_len");
      cfg(0, p + 4, 0, 4'hF, v); check(v[7:0] == 0, "bar 0");
      if (n < 3) begin
        cfg(0, p + 8, 0, 4'hF, v);  check(v == 32'(exp_so[n]), "structure offset");
        cfg(0, p + 12, 0, 4'hF, v); check(v == 32'(exp_sl[n]), "structure length");
      end
      if (n == 1) begin cfg(0, p + 16, 0, 4'hF, v); check(v == 4, "notify_off_multiplier"); end
      p = hdr[15:8]; n++;
    end
    check(n == 4, "four VirtIO capabilities in the list");
    cfg(0, 8'hF0, 0, 4'hF, v); check(v == 0, "after the list reads 0");
    cfg(0, 8'hA8, 32'hFFFF_FFFF, 4'hF, v);
    cfg(0, 8'hA8, 0, 4'hF, v); check(v[7:0] == 8'h09, "read-only header ignores writes");
    // PCI configuration access: write a byte at BAR0 offset 0x15
    cfg(1, 8'hE0, 32'h0, 4'h1, v);
    cfg(1, 8'hE4, 32'h15, 4'hF, v);
    cfg(1, 8'hE8, 32'h1, 4'hF, v);
    cfg(0, 8'hE4, 0, 4'hF, v); check(v == 32'h15, "cap.offset readable");
    begin
      automatic int n0 = nbar;
      automatic logic [31:0] old = bar0[5];
      cfg(1, 8'hEC, 32'h0000_00A5, 4'hF, v);
      check(nbar == n0 + 1, "pci_cfg_data write makes one BAR0 request");
      check(bar0[5] == {old[31:16], 8'hA5, old[7:0]}, "byte written at BAR0 0x15");
    end
    // 16-bit read at 0x22, 32-bit read at 0x40
    cfg(1, 8'hE4, 32'h22, 4'hF, v); cfg(1, 8'hE8, 32'h2, 4'hF, v);
    cfg(0, 8'hEC, 0, 4'hF, v); check(v == {16'h0, bar0[8][31:16]}, "16-bit read through pci_cfg_data");
    cfg(1, 8'hE4, 32'h40, 4'hF, v); cfg(1, 8'hE8, 32'h4, 4'hF, v);
    cfg(0, 8'hEC, 0, 4'hF, v); check(v == bar0[16], "32-bit read through pci_cfg_data");
    cfg(0, 8'hEC, 0, 4'hF, v); check(v == bar0[16], "repeat read");
    begin
      automatic int n0 = nbar;
      cfg(1, 8'hE0, 32'h1, 4'h1, v);
      cfg(0, 8'hEC, 0, 4'hF, v);
      check(v == 0 && nbar == n0, "bar 1 is not served");
    end
    @(posedge clk);
    check(ncpl == ncalls, "one completion per configuration access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
