// dma_usart_ip: USART core whose data moves by DMA, for an Avalon system.
//
// The five sub-modules of the published design are wired together here:
// the register file (Avalon-MM slave) holds BAUD, BASE and LENGTH and turns
// writes to START into start pulses; the Master Read DMA controller fetches
// the block to send from memory into a FIFO, which the USART send
// controller serialises onto txd; the USART receive controller deserialises
// rxd and hands each byte to the Master Write DMA controller, which stores
// it in memory. When a controller has finished its block it pulses done and
// the register file raises irq until software writes START again.
//
// Ports: one Avalon-MM slave (avs_*, word offsets 0..3, 32-bit data, no wait
// states), two Avalon-MM masters (avm_rd_*: byte reads with read_n;
// avm_wr_*: byte writes with write_n; both honour waitrequest), the serial
// lines txd/rxd and a level interrupt irq. One clock, asynchronous
// active-low reset. ADDR_W and FIFO_DEPTH are this design's parameters.
module dma_usart_ip
  import usart_dma_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  // Avalon-MM slave: register file
  input  logic [1:0]        avs_address,
  input  logic              avs_chipselect,
  input  logic              avs_read,
  input  logic              avs_write,
  input  logic [31:0]       avs_writedata,
  output logic [31:0]       avs_readdata,
  // Avalon-MM master: Master Read DMA
  output logic [ADDR_W-1:0] avm_rd_address,
  output logic              avm_rd_read_n,
  input  logic              avm_rd_waitrequest,
  input  logic [7:0]        avm_rd_readdata,
  // Avalon-MM master: Master Write DMA
  output logic [ADDR_W-1:0] avm_wr_address,
  output logic              avm_wr_write_n,
  output logic [7:0]        avm_wr_writedata,
  input  logic              avm_wr_waitrequest,
  // serial lines and interrupt
  output logic              txd,
  input  logic              rxd,
  output logic              irq
);
  logic [15:0] baud_div;
  logic [31:0] base, length;
  logic        tx_start, rx_start;
  logic        tx_busy, rx_busy, tx_done, rx_done;
  logic        rd_busy, rd_done, wr_busy, wr_done;
  logic        fifo_pop, fifo_empty;
  logic [7:0]  fifo_data;
  logic [7:0]  rx_byte;
  logic        rx_byte_valid, rx_byte_ack;

  reg_file u_reg_file (
    .clk        (clk),
    .rst_n      (rst_n),
    .address    (avs_address),
    .chipselect (avs_chipselect),
    .read       (avs_read),
    .write      (avs_write),
    .writedata  (avs_writedata),
    .readdata   (avs_readdata),
    .baud_div   (baud_div),
    .base       (base),
    .length     (length),
    .tx_start   (tx_start),
    .rx_start   (rx_start),
    .tx_busy    (tx_busy || rd_busy),
    .rx_busy    (rx_busy || wr_busy),
    .tx_done    (tx_done),
    .rx_done    (rx_done),
    .irq        (irq)
  );

  dma_read_ctrl #(.ADDR_W(ADDR_W), .FIFO_DEPTH(FIFO_DEPTH)) u_dma_read (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (tx_start),
    .base        (base[ADDR_W-1:0]),
    .length      (length),
    .address     (avm_rd_address),
    .read_n      (avm_rd_read_n),
    .waitrequest (avm_rd_waitrequest),
    .readdata    (avm_rd_readdata),
    .fifo_pop    (fifo_pop),
    .fifo_data   (fifo_data),
    .fifo_empty  (fifo_empty),
    .busy        (rd_busy),
    .done        (rd_done)
  );

  usart_tx u_usart_tx (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (tx_start),
    .baud_div   (baud_div),
    .length     (length),
    .fifo_empty (fifo_empty),
    .fifo_pop   (fifo_pop),
    .fifo_data  (fifo_data),
    .dma_done   (rd_done),
    .txd        (txd),
    .busy       (tx_busy),
    .done       (tx_done)
  );

  usart_rx u_usart_rx (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (rx_start),
    .baud_div   (baud_div),
    .length     (length),
    .rxd        (rxd),
    .byte_data  (rx_byte),
    .byte_valid (rx_byte_valid),
    .byte_ack   (rx_byte_ack),
    .dma_done   (wr_done),
    .busy       (rx_busy),
    .done       (rx_done)
  );

  dma_write_ctrl #(.ADDR_W(ADDR_W)) u_dma_write (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (rx_start),
    .base        (base[ADDR_W-1:0]),
    .length      (length),
    .address     (avm_wr_address),
    .write_n     (avm_wr_write_n),
    .writedata   (avm_wr_writedata),
    .waitrequest (avm_wr_waitrequest),
    .byte_valid  (rx_byte_valid),
    .byte_data   (rx_byte),
    .byte_ack    (rx_byte_ack),
    .busy        (wr_busy),
    .done        (wr_done)
  );

endmodule
