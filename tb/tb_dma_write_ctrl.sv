// tb_dma_write_ctrl: self-checking testbench for the Master Write DMA
// controller.
//
// A producer offers random bytes with the receive controller's hand-over
// (byte_valid held until byte_ack) at random intervals; a behavioural
// Avalon memory answers with random waitrequest. Checks: every byte lands
// at base, base+1, ... in order; each offered byte is taken exactly once;
// write_n is low exactly one cycle per byte when there are no wait states
// (basic write transfer); done rises only after the last write and nothing
// beyond the block is touched; a second transfer to another base works.
module tb_dma_write_ctrl;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        start = 1'b0;
  logic [31:0] base = '0, length = '0;
  logic [31:0] address;
  logic        write_n, waitrequest;
  logic [7:0]  writedata;
  logic        byte_valid = 1'b0, byte_ack, busy, done;
  logic [7:0]  byte_data = '0;
  int checks = 0, failures = 0, writes_lo = 0;
  logic [7:0] sent [512];

  always #5 clk = ~clk;

  dma_write_ctrl dut (
    .clk(clk), .rst_n(rst_n), .start(start), .base(base), .length(length),
    .address(address), .write_n(write_n), .writedata(writedata), .waitrequest(waitrequest),
    .byte_valid(byte_valid), .byte_data(byte_data), .byte_ack(byte_ack),
    .busy(busy), .done(done)
  );

  avalon_mem_model #(.AW_BITS(16), .WAIT_PCT(0)) u_mem (
    .clk(clk), .rst_n(rst_n), .rd_address('0), .rd_read_n(1'b1), .rd_waitrequest(), .rd_readdata(),
    .wr_address(address), .wr_write_n(write_n), .wr_writedata(writedata),
    .wr_waitrequest(waitrequest)
  );

  always @(posedge clk) if (rst_n && !write_n) writes_lo <= writes_lo + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run(input logic [31:0] b, input int n, input int wpct, input int maxgap);
    int w0 = u_mem.writes;
    u_mem.wait_pct = wpct;
    u_mem.base_lo = b; u_mem.base_hi = b + 32'(n) - 1;
    base = b; length = 32'(n); writes_lo = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int i = 0; i < n; i++) begin
      repeat ($urandom_range(0, maxgap)) @(negedge clk);
      check(!done, "not done before the last byte");
      sent[i] = 8'($urandom);
      byte_data = sent[i];
      byte_valid = 1'b1;
      #1;
      while (!byte_ack) begin @(negedge clk); #1; end
      @(negedge clk);
      byte_valid = 1'b0;
    end
    repeat (20) @(negedge clk);
    check(done && !busy, "done after the last write");
    check(u_mem.writes - w0 == n, $sformatf("%0d writes, expected %0d", u_mem.writes - w0, n));
    if (wpct == 0) check(writes_lo == n, "write_n low one cycle per byte without waitrequest");
    for (int i = 0; i < n; i++)
      check(u_mem.mem[16'(b + 32'(i))] == sent[i], $sformatf("byte %0d in memory", i));
    check(u_mem.mem[16'(b + 32'(n))] == 8'h00, "nothing written past the block");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(write_n && !busy && !done && !byte_ack, "idle after reset");
    run(32'h0100_0000, 64, 0, 3);
    run(32'h0100_4000, 200, 40, 2);
    check(u_mem.wr_stalls > 0, "waitrequest stalls happened");
    check(u_mem.range_errors == 0, "no write outside the blocks");
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
