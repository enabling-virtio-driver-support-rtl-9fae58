// tb_virtio_isr: checks the ISR status register: queue and configuration
// bits set by their strobes, value returned and cleared by a read, a set in
// the read cycle surviving the clear, the intx level, and the reset clear.
`timescale 1ns/1ps
module tb_virtio_isr;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic clear, set_queue, set_config, rd_en, intx;
  logic [31:0] rdata;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  virtio_isr dut (.*);

  task automatic strobe(input bit q, input bit c, input bit r);
    @(posedge clk); set_queue <= q; set_config <= c; rd_en <= r;
    @(posedge clk); set_queue <= 1'b0; set_config <= 1'b0; rd_en <= 1'b0;
    #1;
  endtask

  initial begin
    clear = 0; set_queue = 0; set_config = 0; rd_en = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1; #1;
    check(rdata == 0 && !intx, "zero after reset");
    strobe(1, 0, 0);
    check(rdata == 32'h1 && intx, "queue bit set");
    strobe(0, 1, 0);
    check(rdata == 32'h3, "config bit set too");
    // read: value seen in the read cycle, then cleared
    @(posedge clk); rd_en <= 1'b1; #1;
    check(rdata == 32'h3, "read returns both bits");
    @(posedge clk); rd_en <= 1'b0; #1;
    check(rdata == 32'h0 && !intx, "cleared by read");
    strobe(1, 0, 1);
    check(rdata == 32'h1, "set during read survives");
    strobe(0, 0, 1);
    check(rdata == 32'h0, "second read clears");
    strobe(0, 1, 0);
    @(posedge clk); clear <= 1'b1; @(posedge clk); clear <= 1'b0; #1;
    check(rdata == 32'h0, "device reset clears");
    for (int i = 0; i < 20; i++) begin
      automatic bit q = 1'($urandom); automatic bit c = 1'($urandom);
      strobe(q, c, 0);
      check(rdata == {30'h0, c, q}, "random set");
      strobe(0, 0, 1);
      check(rdata == 0, "random clear");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
