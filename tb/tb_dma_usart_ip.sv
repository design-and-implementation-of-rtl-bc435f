// tb_dma_usart_ip: end-to-end testbench of the DMA-mode USART core at its
// default parameters (32-bit addresses, 256-byte transmit FIFO).
//
// txd is looped back to rxd. A host task programs the registers over the
// Avalon-MM slave the way driver software would: BASE and LENGTH for the
// destination, START bit 1 (receive), BASE for the source, START bit 0
// (transmit); it then acknowledges each interrupt with a write to START
// until the block is on the line and in memory (the receive side finishes
// half a bit before the send side, so one acknowledge may cover both). A
// transmit-only and a receive-only transfer (the testbench drives rxd)
// check that each direction raises exactly one interrupt of its own. A
// behavioural memory with random waitrequest on both masters holds the
// data. Checks: the block arrives unchanged, every frame on txd has the
// right bits and exactly BAUD cycles per bit, nothing is read or written
// outside the blocks, irq clears on a write to START. Everything is seen
// from the core's ports. Each mechanism is counted and must happen at least
// once: read and write waitrequest stalls, the FIFO filling up (256 bytes
// read ahead of the line in a 300-byte block), a START refused while busy
// (no second read of the block), the interrupt of each direction and a
// change of baud rate.
module tb_dma_usart_ip;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  avs_address = '0;
  logic        avs_chipselect = 1'b0, avs_read = 1'b0, avs_write = 1'b0;
  logic [31:0] avs_writedata = '0, avs_readdata;
  logic [31:0] rd_address, wr_address;
  logic        rd_read_n, rd_waitrequest, wr_write_n, wr_waitrequest;
  logic [7:0]  rd_readdata, wr_writedata;
  logic        line, irq;

  int checks = 0, failures = 0;
  int n_fifo_full = 0, n_refused = 0, n_irq_tx = 0, n_irq_rx = 0, n_irq_rise = 0;
  int n_baud_change = 0, frames = 0, frames_begun = 0, frame_err = 0;
  int rd_base = 0, max_ahead = 0;
  logic prev_irq = 1'b0, rx_hold = 1'b1, rx_drv = 1'b1;
  int cur_baud = 434;
  logic [31:0] src_base = 0;

  always #5 clk = ~clk;

  dma_usart_ip dut (
    .clk(clk), .rst_n(rst_n),
    .avs_address(avs_address), .avs_chipselect(avs_chipselect), .avs_read(avs_read),
    .avs_write(avs_write), .avs_writedata(avs_writedata), .avs_readdata(avs_readdata),
    .avm_rd_address(rd_address), .avm_rd_read_n(rd_read_n),
    .avm_rd_waitrequest(rd_waitrequest), .avm_rd_readdata(rd_readdata),
    .avm_wr_address(wr_address), .avm_wr_write_n(wr_write_n),
    .avm_wr_writedata(wr_writedata), .avm_wr_waitrequest(wr_waitrequest),
    .txd(line), .rxd(rx_hold ? line : rx_drv), .irq(irq)
  );

  avalon_mem_model #(.AW_BITS(16), .WAIT_PCT(20)) u_mem (
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

  // host bus accesses
  task automatic wr(input logic [1:0] a, input logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_writedata = d; avs_write = 1'b1; avs_chipselect = 1'b1;
    @(negedge clk);
    avs_write = 1'b0; avs_chipselect = 1'b0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    @(negedge clk);
    avs_address = a; avs_read = 1'b1; avs_chipselect = 1'b1;
    #1 d = avs_readdata;
    @(negedge clk);
    avs_read = 1'b0; avs_chipselect = 1'b0;
  endtask

  // interrupt rising edges and FIFO level seen from the bus: bytes read
  // from memory minus frames begun on the line
  always @(posedge clk) begin
    prev_irq <= irq;
    if (irq && !prev_irq) n_irq_rise <= n_irq_rise + 1;
    if (u_mem.reads - rd_base - frames_begun > max_ahead) max_ahead <= u_mem.reads - rd_base - frames_begun;
  end

  // line monitor: each frame checked bit by bit against the source block
  initial begin
    static logic prev = 1'b1;
    forever begin
      @(negedge clk);
      if (rst_n && prev && !line) begin
        logic [9:0] frame;
        bit ok = 1;
        frames_begun++;
        frame = {1'b1, u_mem.mem[16'(src_base + 32'(frames))], 1'b0};
        for (int k = 0; k < 10; k++)
          for (int c = 0; c < cur_baud; c++) begin
            if (!(k == 0 && c == 0)) @(negedge clk);
            if (line !== frame[k]) ok = 0;
          end
        if (!ok) frame_err++;
        frames++;
      end
      prev = line;
    end
  end

  task automatic wait_irq(output bit seen);
    int t = 0;
    seen = 0;
    while (!irq && t < 200_000) begin @(negedge clk); t++; end
    seen = irq;
  endtask

  // acknowledge every interrupt until cond() holds and irq stays low
  task automatic ack_until_idle(input int n, input int w0, input int b, input bit tx, input bit rx);
    bit seen;
    int acks = 0;
    forever begin
      wait_irq(seen);
      if (!seen) break;
      acks++;
      wr(REG_START, 32'h0);
      #1 check(!irq, "irq cleared by write to START");
      repeat (2 * b) @(negedge clk);
      if ((!tx || frames == n) && (!rx || u_mem.writes - w0 == n) && !irq) break;
    end
    check(acks > 0, "interrupt raised");
    repeat (30 * b) @(negedge clk);
    check(!irq, "no further interrupt");
  endtask

  task automatic fill(input logic [31:0] src, input logic [31:0] dst, input int n);
    for (int i = 0; i < n; i++) u_mem.mem[16'(src + 32'(i))] = 8'($urandom);
    for (int i = 0; i <= n; i++) u_mem.mem[16'(dst + 32'(i))] = 8'h00;
    u_mem.base_lo = (src < dst) ? src : dst;
    u_mem.base_hi = ((src > dst) ? src : dst) + 32'(n) - 1;
  endtask

  task automatic set_baud(input int b);
    logic [31:0] d;
    if (b != cur_baud) n_baud_change++;
    wr(REG_BAUD, 32'(b));
    rd(REG_BAUD, d);
    check(d == 32'(b), "BAUD read back");
    cur_baud = b;
  endtask

  task automatic check_copy(input logic [31:0] src, input logic [31:0] dst, input int n);
    int bad = 0;
    for (int i = 0; i < n; i++)
      if (u_mem.mem[16'(dst + 32'(i))] != u_mem.mem[16'(src + 32'(i))]) bad++;
    check(bad == 0, $sformatf("%0d of %0d bytes differ at the destination", bad, n));
    check(u_mem.mem[16'(dst + 32'(n))] == 8'h00, "nothing written past the destination block");
  endtask

  // one loop-back transfer of n bytes from src to dst at divisor b
  task automatic transfer(input logic [31:0] src, input logic [31:0] dst, input int n, input int b);
    int w0 = u_mem.writes, r0 = u_mem.reads;
    fill(src, dst, n);
    set_baud(b);
    src_base = src; frames = 0; frames_begun = 0; rd_base = r0; max_ahead = 0;
    wr(REG_BASE, dst);
    wr(REG_LENGTH, 32'(n));
    wr(REG_START, 32'h2);           // receive into dst
    wr(REG_BASE, src);
    wr(REG_START, 32'h1);           // transmit from src
    // a second START while transmitting must be ignored: a restart would
    // read the block again and send more than n frames
    repeat (3 * b) @(negedge clk);
    wr(REG_START, 32'h1);
    ack_until_idle(n, w0, b, 1, 1);
    check(frames == n, $sformatf("%0d frames on the line, expected %0d", frames, n));
    check(u_mem.reads - r0 == n, $sformatf("%0d bytes read, expected %0d", u_mem.reads - r0, n));
    if (u_mem.reads - r0 == n && frames == n) n_refused++;
    if (max_ahead >= 256) n_fifo_full++;
    check_copy(src, dst, n);
  endtask

  // transmit only: exactly one interrupt, from the send side
  task automatic tx_only(input logic [31:0] src, input int n, input int b);
    int r0 = u_mem.reads, w0 = u_mem.writes, i0;
    fill(src, src, n);
    set_baud(b);
    src_base = src; frames = 0; frames_begun = 0; rd_base = r0; max_ahead = 0;
    rx_hold = 1'b0;                 // receiver input held high, away from txd
    wr(REG_BASE, src);
    wr(REG_LENGTH, 32'(n));
    i0 = n_irq_rise;
    wr(REG_START, 32'h1);
    ack_until_idle(n, w0, b, 1, 0);
    rx_hold = 1'b1;
    check(frames == n && u_mem.reads - r0 == n && u_mem.writes == w0, "transmit-only transfer");
    check(n_irq_rise - i0 == 1, "one interrupt from the send side");
    if (n_irq_rise - i0 == 1) n_irq_tx++;
  endtask

  // receive only: the testbench drives rxd itself; one interrupt
  task automatic rx_only(input logic [31:0] dst, input int n, input int b);
    int r0 = u_mem.reads, w0 = u_mem.writes, i0, bad = 0;
    logic [7:0] v [16];
    fill(dst, dst, n);
    set_baud(b);
    wr(REG_BASE, dst);
    wr(REG_LENGTH, 32'(n));
    i0 = n_irq_rise;
    wr(REG_START, 32'h2);
    rx_hold = 1'b0;
    for (int i = 0; i < n; i++) begin
      logic [9:0] f;
      v[i] = 8'($urandom);
      f = {1'b1, v[i], 1'b0};
      for (int k = 0; k < 10; k++) begin
        rx_drv = f[k];
        repeat (b) @(negedge clk);
      end
      rx_drv = 1'b1;
      repeat ($urandom_range(0, b)) @(negedge clk);
    end
    ack_until_idle(n, w0, b, 0, 1);
    rx_hold = 1'b1;
    for (int i = 0; i < n; i++) if (u_mem.mem[16'(dst + 32'(i))] != v[i]) bad++;
    check(bad == 0 && u_mem.reads == r0, "receive-only transfer stores the bytes sent");
    check(n_irq_rise - i0 == 1, "one interrupt from the receive side");
    if (n_irq_rise - i0 == 1) n_irq_rx++;
  endtask

  initial begin
    logic [31:0] d;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    rd(REG_BAUD, d);
    check(d == 32'd434, "BAUD reset value");
    check(line && !irq, "idle line, no interrupt");
    transfer(32'h0100_0000, 32'h0100_8000, 300, 16);
    transfer(32'h0100_2345, 32'h0100_A000, 20, 23);
    tx_only(32'h0100_3000, 7, 12);
    rx_only(32'h0100_C000, 9, 12);
    check(frame_err == 0, $sformatf("%0d frames with wrong bits or timing", frame_err));
    check(u_mem.range_errors == 0, "no access outside the blocks");
    $display("mechanisms: rd_stalls=%0d wr_stalls=%0d fifo_full=%0d refused=%0d irq_tx=%0d irq_rx=%0d baud_changes=%0d",
             u_mem.rd_stalls, u_mem.wr_stalls, n_fifo_full, n_refused, n_irq_tx, n_irq_rx, n_baud_change);
    check(u_mem.rd_stalls > 0, "read waitrequest stall happened");
    check(u_mem.wr_stalls > 0, "write waitrequest stall happened");
    check(n_fifo_full > 0, "FIFO full back-pressure happened");
    check(n_refused > 0, "START refused while busy");
    check(n_irq_tx > 0 && n_irq_rx > 0, "interrupt of each direction");
    check(n_baud_change > 0, "baud rate changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
