// tb_workload_blocks: the core moving data blocks of 64, 512 and 4096
// bytes, the block sizes of the CPU-load comparison made for this core.
//
// For each size the host programs one loop-back transfer (txd wired to
// rxd) with the same register sequence and then only waits for the
// interrupt. The testbench counts the host's bus accesses to the core and
// the clock cycles it spends driving the slave port; in DMA mode this cost
// does not depend on the block size, which is the point of the design, so
// the test checks that it is identical for all three sizes, while the
// number of memory reads and writes done by the two DMA masters grows with
// the block. The data arriving at the destination is compared byte for
// byte. The divisor is 8 clock cycles per bit to keep the run short.
module tb_workload_blocks;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  avs_address = '0;
  logic        avs_chipselect = 1'b0, avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] rd_address, wr_address;
  logic        rd_read_n, rd_waitrequest, wr_write_n, wr_waitrequest;
  logic [7:0]  rd_readdata, wr_writedata;
  logic        line, irq;
  int checks = 0, failures = 0, host_accesses = 0, host_cycles = 0;

  always #5 clk = ~clk;

  dma_usart_ip dut (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_chipselect(avs_chipselect), .avs_read(avs_read),
    .avs_write(avs_write), .avs_writedata(avs_writedata), .avs_readdata(avs_readdata),
    .avm_rd_address(rd_address), .avm_rd_read_n(rd_read_n),
    .avm_rd_waitrequest(rd_waitrequest), .avm_rd_readdata(rd_readdata),
    .avm_wr_address(wr_address), .avm_wr_write_n(wr_write_n),
    .avm_wr_writedata(wr_writedata), .avm_wr_waitrequest(wr_waitrequest),
    .txd(line), .rxd(line), .irq(irq)
  );

  avalon_mem_model #(.AW_BITS(16), .WAIT_PCT(10)) u_mem (
    .clk(clk), .rst_n(rst_n), .rd_address(rd_address), .rd_read_n(rd_read_n),
    .rd_waitrequest(rd_waitrequest), .rd_readdata(rd_readdata),
    .wr_address(wr_address), .wr_write_n(wr_write_n), .wr_writedata(wr_writedata),
    .wr_waitrequest(wr_waitrequest)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) if (avs_chipselect) host_cycles <= host_cycles + 1;

  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1; avs_chipselect = 1'b1;
    host_accesses++;
    @(negedge clk);
    avs_write = 1'b0; avs_chipselect = 1'b0;
  endtask

  task automatic block(input int n, output int accesses, output int cycles);
    logic [31:0] src = 32'h0100_0000, dst = 32'h0100_8000;
    int r0 = u_mem.reads, w0 = u_mem.writes, bad = 0, t = 0;
    for (int i = 0; i < n; i++) u_mem.mem[16'(src + 32'(i))] = 8'($urandom);
    for (int i = 0; i <= n; i++) u_mem.mem[16'(dst + 32'(i))] = 8'h00;
    host_accesses = 0;
    host_cycles = 0;
    wr(REG_BAUD, 32'd8);
    wr(REG_BASE, dst);
    wr(REG_LENGTH, 32'(n));
    wr(REG_START, 32'h2);
    wr(REG_BASE, src);
    wr(REG_START, 32'h1);
    // the host is free now; it comes back on each interrupt
    while (u_mem.writes - w0 < n || dut.irq) begin
      while (!irq && t < 1_000_000) begin @(negedge clk); t++; end
      if (!irq) break;
      wr(REG_START, 32'h0);
      repeat (2) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(!irq, "all interrupts acknowledged");
    accesses = host_accesses;
    cycles = host_cycles;
    check(u_mem.reads - r0 == n, $sformatf("%0d bytes read by DMA, expected %0d", u_mem.reads - r0, n));
    check(u_mem.writes - w0 == n, $sformatf("%0d bytes written by DMA, expected %0d", u_mem.writes - w0, n));
    for (int i = 0; i < n; i++)
      if (u_mem.mem[16'(dst + 32'(i))] != u_mem.mem[16'(src + 32'(i))]) bad++;
    check(bad == 0, $sformatf("block of %0d bytes: %0d bytes differ", n, bad));
    check(u_mem.mem[16'(dst + 32'(n))] == 8'h00, "nothing past the block");
    $display("block %0d bytes: host bus accesses %0d, host bus cycles %0d", n, accesses, cycles);
  endtask

  initial begin
    int a64, c64, a512, c512, a4k, c4k;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    block(64, a64, c64);
    block(512, a512, c512);
    block(4096, a4k, c4k);
    check(a64 == a512 && a512 == a4k, "host accesses independent of block size");
    check(c64 == c512 && c512 == c4k, "host bus cycles independent of block size");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
