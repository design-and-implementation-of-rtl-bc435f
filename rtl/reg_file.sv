// reg_file: register file with an Avalon-MM slave interface.
//
// Four 32-bit registers addressed by word offset:
//   0 START  write-only, bits [1:0]: bit 0 starts a transmit transfer
//            (Master Read DMA + send controller), bit 1 a receive transfer
//            (Master Write DMA + receive controller). Reads return 0.
//   1 BAUD   read/write, bits [15:0]: clock cycles per serial bit
//   2 BASE   read/write: byte address of the data block in memory
//   3 LENGTH read/write: number of bytes in the block
// BASE and LENGTH are shared by both directions; the DMA controllers sample
// them at their start pulse, so software programs one direction, starts it,
// and may then reprogram them for the other.
//
// Interrupt: each direction has a pending flag, set by the done pulse of its
// controller. irq is high while either flag is set. Any write to START
// clears both flags before its own start bits take effect. A start bit is
// ignored while that direction is busy or while LENGTH is 0.
//
// Bus timing: no wait states; readdata is combinational on address, valid
// in the cycle in which read is high (read latency 0). The register map and
// access rights follow the published table; the START bit assignment, the
// interrupt flags and their clearing, the reset value of BAUD and the read
// latency are this design's choices.
module reg_file
  import usart_dma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // Avalon-MM slave
  input  logic [1:0]  address,
  input  logic        chipselect,
  input  logic        read,
  input  logic        write,
  input  logic [31:0] writedata,
  output logic [31:0] readdata,
  // configuration
  output logic [15:0] baud_div,
  output logic [31:0] base,
  output logic [31:0] length,
  output logic        tx_start,
  output logic        rx_start,
  // status from the controllers
  input  logic        tx_busy,
  input  logic        rx_busy,
  input  logic        tx_done,
  input  logic        rx_done,
  output logic        irq
);
  logic wr_en, start_wr;
  logic tx_pend, rx_pend;

  assign wr_en    = chipselect && write;
  assign start_wr = wr_en && (address == REG_START);
  assign tx_start = start_wr && writedata[START_TX_BIT] && !tx_busy && (length != '0);
  assign rx_start = start_wr && writedata[START_RX_BIT] && !rx_busy && (length != '0);
  assign irq      = tx_pend || rx_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      baud_div <= BAUD_RESET;
      base     <= '0;
      length   <= '0;
      tx_pend  <= 1'b0;
      rx_pend  <= 1'b0;
    end else begin
      if (wr_en) begin
        unique case (address)
          REG_BAUD:   baud_div <= writedata[15:0];
          REG_BASE:   base     <= writedata;
          REG_LENGTH: length   <= writedata;
          default: ;
        endcase
      end
      // a done pulse wins over a clearing write in the same cycle
      tx_pend <= tx_done || (tx_pend && !start_wr);
      rx_pend <= rx_done || (rx_pend && !start_wr);
    end
  end

  always_comb begin
    readdata = '0;
    if (chipselect && read) begin
      unique case (address)
        REG_BAUD:   readdata = {16'h0, baud_div};
        REG_BASE:   readdata = base;
        REG_LENGTH: readdata = length;
        default:    readdata = '0;
      endcase
    end
  end

endmodule
