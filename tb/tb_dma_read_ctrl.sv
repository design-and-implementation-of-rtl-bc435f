// tb_dma_read_ctrl: self-checking testbench for the Master Read DMA
// controller and its FIFO.
//
// A behavioural Avalon memory is filled with random bytes. Three transfers
// run: (1) 16 bytes with no waitrequest and a fast consumer, checking the
// basic read timing: read_n low for exactly one cycle per byte, addresses
// base, base+1, ..., and done exactly 2*N+2 cycles after the start pulse;
// (2) 300 bytes with 30 % waitrequest and a consumer slower than the bus,
// so the 256-byte FIFO fills and the master must stall (checked: the FIFO
// level reaches 256 and never exceeds it); (3) a restart with a different
// base. Every byte popped is compared with memory, and no address outside
// the block is ever read.
module tb_dma_read_ctrl;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] base = '0, length = '0;
  logic [31:0] address;
  logic        read_n, waitrequest;
  logic [7:0]  readdata;
  logic        fifo_pop = 1'b0, fifo_empty, busy, done;
  logic [7:0]  fifo_data;
  int checks = 0, failures = 0;
  int pushed = 0, popped = 0, max_level = 0, reads_lo = 0;
  logic [31:0] exp_addr;

  always #5 clk = ~clk;

  dma_read_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start(start), .base(base), .length(length),
    .address(address), .read_n(read_n), .waitrequest(waitrequest), .readdata(readdata),
    .fifo_pop(fifo_pop), .fifo_data(fifo_data), .fifo_empty(fifo_empty),
    .busy(busy), .done(done)
  );

  avalon_mem_model #(.AW_BITS(16), .WAIT_PCT(0)) u_mem (
    .clk(clk), .rst_n(rst_n), .rd_address(address), .rd_read_n(read_n), .rd_waitrequest(waitrequest),
    .rd_readdata(readdata), .wr_address('0), .wr_write_n(1'b1), .wr_writedata('0),
    .wr_waitrequest()
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // bus monitor: completed reads go to consecutive addresses
  int addr_err = 0;
  always @(posedge clk) begin
    if (start) exp_addr <= base;
    else if (rst_n && !read_n && !waitrequest) begin
      if (address != exp_addr) addr_err <= addr_err + 1;
      exp_addr <= exp_addr + 1;
      pushed   <= pushed + 1;
    end
    if (rst_n && !read_n) reads_lo <= reads_lo + 1;
    if (fifo_pop && !fifo_empty) popped <= popped + 1;
    if (pushed - popped > max_level) max_level <= pushed - popped;
  end

  task automatic consume(input int n, input int gap, input logic [31:0] b);
    for (int i = 0; i < n; i++) begin
      while (fifo_empty) @(negedge clk);
      repeat (gap) @(negedge clk);
      fifo_pop = 1'b1;
      @(negedge clk);
      fifo_pop = 1'b0;
      check(fifo_data == u_mem.mem[16'(b + 32'(i))],
            $sformatf("byte %0d: %02h expected %02h", i, fifo_data, u_mem.mem[16'(b + 32'(i))]));
    end
  endtask

  task automatic kick(input logic [31:0] b, input int n);
    base = b; length = 32'(n);
    pushed = 0; popped = 0; max_level = 0; reads_lo = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
  endtask

  initial begin
    int t;
    for (int i = 0; i < 65536; i++) u_mem.mem[i] = 8'($urandom);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(read_n && !busy && !done, "idle after reset");

    // (1) basic read timing, no wait states
    u_mem.base_lo = 32'h0100_0000; u_mem.base_hi = 32'h0100_000F;
    kick(32'h0100_0000, 16);
    t = 1;
    while (!done) begin @(negedge clk); t++; end
    check(t == 2 * 16 + 2, $sformatf("16 bytes in %0d cycles, expected %0d", t, 2 * 16 + 2));
    check(reads_lo == 16, "read_n low one cycle per byte without waitrequest");
    consume(16, 0, 32'h0100_0000);
    check(fifo_empty, "FIFO drained");

    // (2) FIFO full back-pressure with waitrequest
    u_mem.wait_pct = 30;
    u_mem.base_lo = 32'h0100_2000; u_mem.base_hi = 32'h0100_2000 + 299;
    kick(32'h0100_2000, 300);
    repeat (1200) @(negedge clk);
    check(max_level == 256 && busy && !done, "FIFO filled, master stalled");
    consume(300, 1, 32'h0100_2000);
    repeat (4) @(negedge clk);
    check(done && !busy, "done after the last byte");
    check(max_level <= 256, "FIFO never over-filled");
    check(u_mem.rd_stalls > 0, "waitrequest stalls happened");

    // (3) restart elsewhere
    u_mem.base_lo = 32'h0000_7FF0; u_mem.base_hi = 32'h0000_7FF0 + 40;
    kick(32'h0000_7FF0, 41);
    consume(41, 0, 32'h0000_7FF0);
    repeat (4) @(negedge clk);
    check(done, "second transfer done");
    check(addr_err == 0, "consecutive read addresses");
    check(u_mem.range_errors == 0, "no read outside the block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
