// tb_reg_file: self-checking testbench for the Avalon-MM register file.
//
// Drives Avalon writes and zero-wait-state reads and checks: the BAUD reset
// value; read-back of BAUD (16 bits), BASE and LENGTH (32 bits); START
// reading as 0; writes without chipselect being ignored; the START bits
// producing one-cycle start pulses for transmit and receive, suppressed
// while the direction is busy or LENGTH is 0; the interrupt being set by a
// done pulse, held, cleared by a write to START, and a done pulse winning
// over a clearing write in the same cycle.
module tb_reg_file;
  import usart_dma_pkg::*;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [1:0]  address = '0;
  logic        chipselect = 1'b0, read = 1'b0, write = 1'b0;
  logic [31:0] writedata = '0, readdata;
  logic [15:0] baud_div;
  logic [31:0] base, length;
  logic        tx_start, rx_start;
  logic        tx_busy = 1'b0, rx_busy = 1'b0, tx_done = 1'b0, rx_done = 1'b0;
  logic        irq;
  int checks = 0, failures = 0, tx_pulses = 0, rx_pulses = 0;

  always #5 clk = ~clk;

  reg_file dut (
    .clk(clk), .rst_n(rst_n), .address(address), .chipselect(chipselect),
    .read(read), .write(write), .writedata(writedata), .readdata(readdata),
    .baud_div(baud_div), .base(base), .length(length),
    .tx_start(tx_start), .rx_start(rx_start), .tx_busy(tx_busy), .rx_busy(rx_busy),
    .tx_done(tx_done), .rx_done(rx_done), .irq(irq)
  );

  always @(posedge clk) begin
    if (tx_start) tx_pulses <= tx_pulses + 1;
    if (rx_start) rx_pulses <= rx_pulses + 1;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic wr(input logic [1:0] a, input logic [31:0] d, input bit cs = 1);
    address = a; writedata = d; write = 1'b1; chipselect = cs;
    @(negedge clk);
    write = 1'b0; chipselect = 1'b0;
  endtask

  task automatic rd(input logic [1:0] a, output logic [31:0] d);
    address = a; read = 1'b1; chipselect = 1'b1;
    #1 d = readdata;
    @(negedge clk);
    read = 1'b0; chipselect = 1'b0;
  endtask

  initial begin
    logic [31:0] d;
    int t0, r0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    rd(REG_BAUD, d);   check(d == 32'd434, "BAUD reset value");
    check(baud_div == 16'd434 && length == 0 && !irq, "reset state");
    wr(REG_BAUD, 32'hABCD_1234);
    wr(REG_BASE, 32'h0100_0000);
    wr(REG_LENGTH, 32'd4096);
    rd(REG_BAUD, d);   check(d == 32'h0000_1234, "BAUD keeps 16 bits");
    rd(REG_BASE, d);   check(d == 32'h0100_0000, "BASE read back");
    rd(REG_LENGTH, d); check(d == 32'd4096, "LENGTH read back");
    rd(REG_START, d);  check(d == 32'd0, "START is write-only");
    check(baud_div == 16'h1234 && base == 32'h0100_0000 && length == 32'd4096, "outputs follow registers");
    wr(REG_BASE, 32'hDEAD_BEEF, 0);
    rd(REG_BASE, d);   check(d == 32'h0100_0000, "write without chipselect ignored");
    #1 check(readdata == 0, "readdata 0 when not reading");

    // start pulses
    t0 = tx_pulses; r0 = rx_pulses;
    wr(REG_START, 32'd1);
    check(tx_pulses == t0 + 1 && rx_pulses == r0, "START bit 0 starts transmit once");
    wr(REG_START, 32'd2);
    check(tx_pulses == t0 + 1 && rx_pulses == r0 + 1, "START bit 1 starts receive once");
    wr(REG_START, 32'd3);
    check(tx_pulses == t0 + 2 && rx_pulses == r0 + 2, "START 3 starts both");
    tx_busy = 1'b1;
    wr(REG_START, 32'd3);
    check(tx_pulses == t0 + 2 && rx_pulses == r0 + 3, "no transmit start while busy");
    tx_busy = 1'b0; rx_busy = 1'b1;
    wr(REG_START, 32'd3);
    check(tx_pulses == t0 + 3 && rx_pulses == r0 + 3, "no receive start while busy");
    rx_busy = 1'b0;
    wr(REG_LENGTH, 32'd0);
    wr(REG_START, 32'd3);
    check(tx_pulses == t0 + 3 && rx_pulses == r0 + 3, "no start with LENGTH 0");

    // interrupt
    tx_done = 1'b1; @(negedge clk); tx_done = 1'b0;
    repeat (3) @(negedge clk);
    check(irq, "transmit done raises irq and holds it");
    rd(REG_BAUD, d);
    check(irq, "read does not clear irq");
    wr(REG_START, 32'd0);
    check(!irq, "write to START clears irq");
    rx_done = 1'b1; @(negedge clk); rx_done = 1'b0;
    check(irq, "receive done raises irq");
    address = REG_START; writedata = 0; write = 1'b1; chipselect = 1'b1; tx_done = 1'b1;
    @(negedge clk);
    write = 1'b0; chipselect = 1'b0; tx_done = 1'b0;
    check(irq, "done in the clearing cycle wins");
    wr(REG_START, 32'd0);
    check(!irq, "cleared again");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
