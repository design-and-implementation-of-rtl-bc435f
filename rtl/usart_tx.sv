// usart_tx: USART send controller.
//
// A finite state machine with the states idle, data_valid, read_fifo, load,
// send, finish, block_finish and master_done, as in the core's published
// state diagram. A start pulse (the Master Read DMA controller is started)
// samples the byte count and leaves idle. data_valid waits until the DMA
// FIFO holds a byte, read_fifo pops it, load frames it as start bit (0),
// D0..D7, stop bit (1) in a 10-bit shift register. send holds the current
// bit for baud_div-1 cycles and finish shifts to the next one, so each bit
// lasts exactly baud_div clock cycles; after the tenth bit block_finish
// compares the bytes sent with the length and either counts one more and
// returns to data_valid or moves to master_done. master_done waits until
// the DMA controller reports its transfer complete and then pulses done
// (the interrupt request) for one cycle on the way back to idle.
//
// Timing: txd comes straight from a flip-flop and idles high. Between two
// frames the line stays high for 4 extra cycles (block_finish, data_valid,
// read_fifo, load) beyond the stop bit when the FIFO is not empty.
// baud_div is clock cycles per bit; values below 2 act as 2. The state
// names, their order and the frame format follow the published design; the
// cycle split between send and finish and the baud divisor meaning are this
// design's choices.
module usart_tx
  import usart_dma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] baud_div,
  input  logic [31:0] length,
  // FIFO filled by the Master Read DMA controller
  input  logic        fifo_empty,
  output logic        fifo_pop,
  input  logic [7:0]  fifo_data,
  input  logic        dma_done,
  output logic        txd,
  output logic        busy,
  output logic        done
);
  tx_state_t state, state_n;
  logic [FRAME_BITS-1:0] shreg;
  logic [3:0]            bitcnt;
  logic [15:0]           baud_cnt;
  logic [31:0]           length_q, sent_cnt;
  logic                  bit_end;

  // send lasts baud_div-1 cycles (at least one), finish one more
  assign bit_end = ({1'b0, baud_cnt} + 17'd2) >= {1'b0, baud_div};

  always_comb begin
    state_n = state;
    unique case (state)
      TX_IDLE:         if (start) state_n = TX_DATA_VALID;
      TX_DATA_VALID:   if (!fifo_empty) state_n = TX_READ_FIFO;
      TX_READ_FIFO:    state_n = TX_LOAD;
      TX_LOAD:         state_n = TX_SEND;
      TX_SEND:         if (bit_end) state_n = TX_FINISH;
      TX_FINISH:       state_n = (bitcnt == 4'(FRAME_BITS-1)) ? TX_BLOCK_FINISH : TX_SEND;
      TX_BLOCK_FINISH: state_n = (sent_cnt + 32'd1 < length_q) ? TX_DATA_VALID : TX_MASTER_DONE;
      TX_MASTER_DONE:  if (dma_done) state_n = TX_IDLE;
      default:         state_n = TX_IDLE;
    endcase
  end

  assign fifo_pop = (state == TX_READ_FIFO);
  assign done     = (state == TX_MASTER_DONE) && dma_done;
  assign busy     = (state != TX_IDLE);
  assign txd      = shreg[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= TX_IDLE;
      shreg    <= '1;
      bitcnt   <= '0;
      baud_cnt <= '0;
      length_q <= '0;
      sent_cnt <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        TX_IDLE: begin
          if (start) begin
            length_q <= length;
            sent_cnt <= '0;
          end
        end
        TX_LOAD: begin
          shreg    <= {1'b1, fifo_data, 1'b0};
          bitcnt   <= '0;
          baud_cnt <= '0;
        end
        TX_SEND: begin
          baud_cnt <= baud_cnt + 16'd1;
        end
        TX_FINISH: begin
          shreg    <= {1'b1, shreg[FRAME_BITS-1:1]};
          bitcnt   <= bitcnt + 4'd1;
          baud_cnt <= '0;
        end
        TX_BLOCK_FINISH: begin
          if (sent_cnt + 32'd1 < length_q) sent_cnt <= sent_cnt + 32'd1;
        end
        default: ;
      endcase
    end
  end

endmodule
