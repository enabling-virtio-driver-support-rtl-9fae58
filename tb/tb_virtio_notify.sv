// tb_virtio_notify: checks that a notification write pulses the kick of the
// queue named in the written data, for one cycle, whatever notification
// address is used, and that writes naming no existing queue are dropped.
`timescale 1ns/1ps
module tb_virtio_notify;
  localparam int NQ = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en; logic [31:0] wdata; logic [3:0] wstrb; logic [NQ-1:0] kick;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  virtio_notify #(.NUM_QUEUES(NQ)) dut (.*);

  task automatic notify(input int q, input logic [3:0] be, output logic [NQ-1:0] seen,
                        output logic [NQ-1:0] after);
    @(posedge clk); wr_en <= 1'b1; wdata <= {16'($urandom), 16'(q)}; wstrb <= be;
    @(posedge clk); wr_en <= 1'b0; #1; seen = kick;
    @(posedge clk); #1; after = kick;
  endtask

  initial begin
    logic [NQ-1:0] s, a;
    wr_en = 0; wdata = 0; wstrb = 0;
    repeat (2) @(posedge clk); rst_n = 1'b1;
    for (int i = 0; i < 40; i++) begin
      automatic int q = $urandom_range(0, NQ + 2);
      notify(q, 4'b0011, s, a);
      check(s == ((q < NQ) ? NQ'(1) << q : '0), "kick for named queue");
      check(a == '0, "kick lasts one cycle");
    end
    notify(1, 4'b1100, s, a);
    check(s == '0, "write missing the low half is no notification");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
