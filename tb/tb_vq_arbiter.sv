// tb_vq_arbiter: three requesters share the arbiter's DMA and MSI-X paths.
// An engine model with random ready and completion delays checks that each
// loaded descriptor is the granted requester's, arrives on the channel of
// its direction, and that only one descriptor is ever in flight; each
// requester checks that it alone gets its ready and done. With all three
// requesting back to back, grants must rotate 0,1,2. MSI-X requests must
// come out with the right vector and each ack must reach its requester.
`timescale 1ns/1ps
module tb_vq_arbiter;
  import virtio_pkg::*;
  localparam int N = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [N-1:0] dma_req_valid, dma_req_ready, dma_done, irq_req, irq_ack;
  dma_desc_t dma_req [N];
  logic [15:0] irq_vector [N];
  logic h2c_byp_load, h2c_byp_ready, c2h_byp_load, c2h_byp_ready, h2c_done, c2h_done;
  dma_desc_t byp_desc;
  logic msix_req, msix_ack; logic [15:0] msix_vector;

  vq_arbiter #(.N(N)) dut (.*);

  // engine
  int inflight = 0, loads = 0;
  int order [$];
  bit rr_phase = 0;
  initial begin
    h2c_byp_ready = 0; c2h_byp_ready = 0; h2c_done = 0; c2h_done = 0;
    forever begin
      @(posedge clk);
      h2c_byp_ready <= ($urandom_range(0, 3) != 0) && inflight == 0;
      c2h_byp_ready <= ($urandom_range(0, 3) != 0) && inflight == 0;
      if (rst_n && (h2c_byp_load || c2h_byp_load)) begin
        automatic dma_desc_t d = byp_desc;
        automatic int owner = int'(d.src[63:56]);
        check(inflight == 0, "one descriptor in flight");
        check(!(h2c_byp_load && c2h_byp_load), "one channel loaded");
        check(h2c_byp_load == (d.dir == DMA_H2C), "loaded on the channel of its direction");
        check(dma_req_ready == N'(1) << owner, "ready goes to the owner only, in the load cycle");
        if (rr_phase) order.push_back(owner);
        inflight++; loads++;
        h2c_byp_ready <= 1'b0; c2h_byp_ready <= 1'b0;
        repeat ($urandom_range(1, 6)) @(posedge clk);
        if (d.dir == DMA_H2C) h2c_done <= 1'b1; else c2h_done <= 1'b1;
        inflight--;
        @(posedge clk);
        h2c_done <= 1'b0; c2h_done <= 1'b0;
      end
    end
  end

  int served [N];
  bit stop_req = 0;
  for (genvar k = 0; k < N; k++) begin : g_req
    initial begin
      automatic int seq = 0;
      dma_req_valid[k] = 1'b0; dma_req[k] = '0;
      @(posedge rst_n);
      while (!stop_req) begin
        if (!rr_phase) repeat ($urandom_range(0, 5)) @(posedge clk);
        @(posedge clk);
        dma_req[k].dir <= dma_dir_e'($urandom_range(0, 1));
        dma_req[k].src <= {8'(k), 24'h0, 32'(seq)};
        dma_req[k].dst <= {$urandom, $urandom};
        dma_req[k].len <= DMA_LEN_W'($urandom_range(1, 100));
        dma_req_valid[k] <= 1'b1;
        do @(posedge clk); while (!dma_req_ready[k]);
        dma_req_valid[k] <= 1'b0;
        do begin
          @(posedge clk);
          if (dma_done[k]) break;
        end while (1);
        served[k]++;
        seq++;
      end
    end
    always @(posedge clk) if (rst_n && dma_done[k]) check(dma_req_valid[k] == 1'b0, "done only to a waiting owner");
  end

  // MSI-X
  int acks [N];
  for (genvar k = 0; k < N; k++) begin : g_irq
    initial begin
      irq_req[k] = 1'b0; irq_vector[k] = 16'(10 + k); acks[k] = 0;
      @(posedge rst_n);
      repeat (4) begin
        repeat ($urandom_range(1, 20)) @(posedge clk);
        irq_req[k] <= 1'b1;
        do @(posedge clk); while (!irq_ack[k]);
        irq_req[k] <= 1'b0;
        acks[k]++;
      end
    end
  end
  initial begin
    msix_ack = 0;
    forever begin
      @(posedge clk);
      if (rst_n && msix_req && !msix_ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        check(msix_vector >= 10 && msix_vector < 10 + N && irq_req[msix_vector - 10],
              "MSI-X vector of a requesting controller");
        msix_ack <= 1'b1; @(posedge clk); msix_ack <= 1'b0;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    for (int k = 0; k < N; k++) check(served[k] > 20, "every requester served");
    for (int k = 0; k < N; k++) check(acks[k] == 4, "every interrupt acknowledged");
    rr_phase = 1;
    repeat (1500) @(posedge clk);
    stop_req = 1;
    repeat (200) @(posedge clk);
    for (int i = 3; i + 1 < order.size(); i++)
      check(order[i + 1] == (order[i] + 1) % N, "round-robin order under full load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
