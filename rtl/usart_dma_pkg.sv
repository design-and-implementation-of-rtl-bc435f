// usart_dma_pkg: types and constants shared by the DMA-mode USART core.
//
// Register offsets of the Avalon-MM slave (word offsets 0..3), the bit
// assignment of the START register, the serial frame geometry and the
// state encodings of the two serial controllers. The register map and the
// state names follow the published description of the core; the numeric
// state encodings, the START bit assignment and the reset value of BAUD are
// this design's own choices.
package usart_dma_pkg;

  // Avalon-MM slave register offsets (word addressed)
  localparam logic [1:0] REG_START  = 2'd0;  // write-only, 2 effective bits
  localparam logic [1:0] REG_BAUD   = 2'd1;  // read/write, 16 effective bits
  localparam logic [1:0] REG_BASE   = 2'd2;  // read/write, 32 bits
  localparam logic [1:0] REG_LENGTH = 2'd3;  // read/write, 32 bits

  // START register bits
  localparam int START_TX_BIT = 0;  // start the Master Read DMA (transmit)
  localparam int START_RX_BIT = 1;  // start the Master Write DMA (receive)

  // Serial frame: 1 start bit (low), 8 data bits D0 first, 1 stop bit (high)
  localparam int DATA_BITS  = 8;
  localparam int FRAME_BITS = DATA_BITS + 2;

  // Reset value of BAUD: clock cycles per bit, 50 MHz / 115200 baud
  localparam logic [15:0] BAUD_RESET = 16'd434;

  // Receive controller states (names as in the state diagram)
  typedef enum logic [3:0] {
    RX_IDLE, RX_START, RX_READY, RX_RECV, RX_FINISH, RX_LOAD,
    RX_BUFFER_READY, RX_BLOCK_FINISH, RX_MASTER_DONE, RX_GET_DONE
  } rx_state_t;

  // Send controller states (names as in the state diagram)
  typedef enum logic [2:0] {
    TX_IDLE, TX_DATA_VALID, TX_READ_FIFO, TX_LOAD, TX_SEND, TX_FINISH,
    TX_BLOCK_FINISH, TX_MASTER_DONE
  } tx_state_t;

  // DMA master states
  typedef enum logic [1:0] {
    DMA_IDLE, DMA_ACCESS, DMA_NEXT, DMA_DONE
  } dma_state_t;

endpackage
