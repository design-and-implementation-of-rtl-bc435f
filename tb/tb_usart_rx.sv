// tb_usart_rx: self-checking testbench for the USART receive controller.
//
// A serial line driver sends frames (start bit, D0..D7, stop bit) whose bit
// length is the divisor, or for the slow run the divisor plus or minus
// one cycle (3 % clock mismatch), separated by random
// idle gaps, back to back at times. A model of the write DMA acknowledges
// each offered byte after a random delay of a few cycles; the bytes taken
// are compared with the bytes sent. After the last byte the DMA "done"
// input is held low for a while, and the test checks that the interrupt
// pulse waits for it and comes exactly once. Two transfers run with
// different divisors and block lengths.
module tb_usart_rx;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [15:0] baud = 16'd16;
  logic [31:0] length = '0;
  logic        rxd = 1'b1;
  logic [7:0]  byte_data;
  logic        byte_valid, byte_ack = 1'b0, dma_done = 1'b0;
  logic        busy, done;

  int checks = 0, failures = 0, got = 0, done_cnt = 0;
  logic [7:0] sent [64];
  bit early_done = 0;

  always #5 clk = ~clk;

  usart_rx dut (
    .clk(clk), .rst_n(rst_n), .start(start), .baud_div(baud), .length(length),
    .rxd(rxd), .byte_data(byte_data), .byte_valid(byte_valid), .byte_ack(byte_ack),
    .dma_done(dma_done), .busy(busy), .done(done)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (done) begin
    done_cnt <= done_cnt + 1;
    if (!dma_done) early_done <= 1;
  end

  // write DMA model: take each offered byte after 0..3 cycles
  initial begin
    forever begin
      @(negedge clk);
      byte_ack = 1'b0;
      if (byte_valid) begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        check(byte_valid, "byte stays offered until taken");
        check(byte_data == sent[got], $sformatf("byte %0d: got %02h expected %02h", got, byte_data, sent[got]));
        got++;
        byte_ack = 1'b1;
      end
    end
  end

  task automatic send_byte(input logic [7:0] b, input int bitlen);
    logic [9:0] frame = {1'b1, b, 1'b0};
    for (int k = 0; k < 10; k++) begin
      rxd = frame[k];
      repeat (bitlen) @(negedge clk);
    end
    rxd = 1'b1;
  endtask

  task automatic run(input int n, input int b);
    int first = got;
    int dc0 = done_cnt;
    baud   = 16'(b);
    length = 32'(n);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    repeat (5) @(negedge clk);
    for (int i = 0; i < n; i++) begin
      int skew = (b >= 32) ? $urandom_range(0, 2) - 1 : 0;  // +-1 cycle at b >= 32 (3 %)
      sent[first + i] = 8'($urandom);
      send_byte(sent[first + i], b + skew);
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(1, 3 * b)) @(negedge clk);
    end
    repeat (b) @(negedge clk);
    check(got == first + n, $sformatf("all %0d bytes handed over", n));
    repeat (4 * b) @(negedge clk);
    check(done_cnt == dc0 && busy, "waits in master_done for the DMA");
    dma_done = 1'b1;
    repeat (3) @(negedge clk);
    dma_done = 1'b0;
    check(done_cnt == dc0 + 1, "exactly one interrupt pulse per transfer");
    check(!busy, "back to idle");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check(!busy && !byte_valid, "idle after reset");
    // line activity while idle is ignored
    send_byte(8'h5A, 16);
    check(got == 0 && !busy, "idle controller ignores the line");
    run(8, 32);
    run(5, 10);
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
