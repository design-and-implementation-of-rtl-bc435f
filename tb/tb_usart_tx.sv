// tb_usart_tx: self-checking testbench for the USART send controller.
//
// A byte queue stands in for the DMA FIFO: bytes trickle in at random
// times, so the controller has to wait in data_valid, and the FIFO read
// data appears one cycle after a pop, as from the real FIFO. A line monitor
// finds every falling edge on txd and checks the 10 bits of the frame
// cycle by cycle: start bit low, D0..D7, stop bit high, each exactly
// baud_div cycles long. The DMA "done" input is held low for a while after
// the last byte, and the test checks that the interrupt pulse waits for it
// and comes exactly once per transfer. Two transfers run, with an even and
// an odd divisor.
module tb_usart_tx;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] baud = 16'd8;
  logic [31:0] length = '0;
  logic        fifo_empty, fifo_pop, dma_done = 1'b0;
  logic [7:0]  fifo_data = '0;
  logic        txd, busy, done;

  int checks = 0, failures = 0;
  logic [7:0] src [64];
  int wr_idx = 0, rd_idx = 0, mon_idx = 0, done_cnt = 0;
  bit early_done = 0;

  always #5 clk = ~clk;

  usart_tx dut (
    .clk(clk), .rst_n(rst_n), .start(start), .baud_div(baud), .length(length),
    .fifo_empty(fifo_empty), .fifo_pop(fifo_pop), .fifo_data(fifo_data),
    .dma_done(dma_done), .txd(txd), .busy(busy), .done(done)
  );

  assign fifo_empty = (rd_idx == wr_idx);
  always @(posedge clk) begin
    if (fifo_pop && rd_idx != wr_idx) begin
      fifo_data <= src[rd_idx];
      rd_idx    <= rd_idx + 1;
    end
    if (done) begin
      done_cnt <= done_cnt + 1;
      if (!dma_done) early_done <= 1;
    end
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // line monitor: checks each frame bit for every cycle of its duration
  initial begin
    logic prev = 1'b1;
    forever begin
      @(negedge clk);
      if (rst_n && prev && !txd) begin
        logic [9:0] frame;
        bit ok = 1;
        frame = {1'b1, src[mon_idx], 1'b0};
        for (int k = 0; k < 10; k++) begin
          for (int c = 0; c < int'(baud); c++) begin
            if (!(k == 0 && c == 0)) @(negedge clk);
            if (txd !== frame[k]) ok = 0;
          end
        end
        check(ok, $sformatf("frame %0d (byte %02h) bits or bit timing wrong", mon_idx, src[mon_idx]));
        mon_idx++;
      end
      prev = txd;
    end
  end

  task automatic run(input int n, input int b);
    int first = wr_idx;
    int dc0 = done_cnt;
    baud   = 16'(b);
    length = 32'(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    check(busy, "busy after start");
    // producer: bytes arrive at random times
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, 3 * b * 10)) @(negedge clk);
      src[first + i] = 8'($urandom);
      wr_idx = first + i + 1;
    end
    // wait until the last frame is on the line and finished
    while (mon_idx < first + n) @(negedge clk);
    repeat (b * 12) @(negedge clk);
    check(done_cnt == dc0, "no interrupt before the DMA reports done");
    check(busy, "controller waits in master_done");
    dma_done = 1'b1;
    repeat (3) @(negedge clk);
    dma_done = 1'b0;
    check(done_cnt == dc0 + 1, "exactly one interrupt pulse per transfer");
    check(!busy, "back to idle");
    check(txd, "line idles high");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(txd == 1'b1 && !busy, "idle after reset");
    run(5, 8);
    run(4, 5);
    check(mon_idx == 9, "all 9 frames seen");
    check(!early_done, "done never while dma_done low");
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
