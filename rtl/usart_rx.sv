// usart_rx: USART receive controller.
//
// A finite state machine with the states idle, start, ready, recv, finish,
// load, buffer_ready, block_finish, master_done and get_done, as in the
// core's published state diagram. A start pulse (the Master Write DMA
// controller is started) samples the byte count; start clears the byte
// counter, shift register and bit counter, and ready clears the shift
// register and bit counter again and waits for the line to go low (start
// bit). recv counts clock cycles and finish samples the line: the start bit
// is sampled half a bit after the falling edge was seen, each of the 8 data
// bits (D0 first) and the stop bit one full bit later. After the stop bit
// load copies the byte to the output buffer and buffer_ready offers it to
// the Master Write DMA controller until it is acknowledged. block_finish
// counts the byte and returns to ready, or moves to master_done after the
// last one. master_done waits for the DMA controller to report the block
// stored and get_done pulses done (the interrupt request) for one cycle on
// the way back to idle.
//
// Timing: rxd passes a two-flop synchroniser first. baud_div is clock cycles
// per bit (values below 2 act as 2). The controller is back in ready a few
// cycles after the centre of the stop bit, well inside the remaining half
// bit, as long as the DMA accepts the byte within that time. The sampled
// stop bit is not checked and there is no parity: the frame format and state
// sequence follow the published design, the centre sampling, synchroniser and
// the absence of error reporting are this design's choices.
module usart_rx
  import usart_dma_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] baud_div,
  input  logic [31:0] length,
  input  logic        rxd,
  // byte hand-over to the Master Write DMA controller
  output logic [7:0]  byte_data,
  output logic        byte_valid,
  input  logic        byte_ack,
  input  logic        dma_done,
  output logic        busy,
  output logic        done
);
  rx_state_t   state, state_n;
  logic [1:0]  rx_sync;
  logic        rx_s;
  logic [7:0]  shreg;
  logic [3:0]  bitcnt;
  logic [15:0] baud_cnt, wait_len;
  logic [31:0] length_q, recv_cnt;
  logic        bit_end;

  assign rx_s = rx_sync[1];

  // recv cycles before the next sample: half a bit for the start bit, a
  // whole bit less the finish cycle for the others; at least one
  always_comb begin
    if (bitcnt == 4'd0) wait_len = (baud_div >> 1) - 16'd1;
    else                wait_len = baud_div - 16'd1;
    if (baud_div < 16'd4) wait_len = 16'd1;
  end
  assign bit_end = ({1'b0, baud_cnt} + 17'd1) >= {1'b0, wait_len};

  always_comb begin
    state_n = state;
    unique case (state)
      RX_IDLE:         if (start) state_n = RX_START;
      RX_START:        state_n = RX_READY;
      RX_READY:        if (!rx_s) state_n = RX_RECV;
      RX_RECV:         if (bit_end) state_n = RX_FINISH;
      RX_FINISH:       state_n = (bitcnt == 4'(FRAME_BITS-1)) ? RX_LOAD : RX_RECV;
      RX_LOAD:         state_n = RX_BUFFER_READY;
      RX_BUFFER_READY: if (byte_ack) state_n = RX_BLOCK_FINISH;
      RX_BLOCK_FINISH: state_n = (recv_cnt + 32'd1 < length_q) ? RX_READY : RX_MASTER_DONE;
      RX_MASTER_DONE:  if (dma_done) state_n = RX_GET_DONE;
      RX_GET_DONE:     state_n = RX_IDLE;
      default:         state_n = RX_IDLE;
    endcase
  end

  assign byte_valid = (state == RX_BUFFER_READY);
  assign done       = (state == RX_GET_DONE);
  assign busy       = (state != RX_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_sync   <= 2'b11;
      state     <= RX_IDLE;
      shreg     <= '0;
      bitcnt    <= '0;
      baud_cnt  <= '0;
      length_q  <= '0;
      recv_cnt  <= '0;
      byte_data <= '0;
    end else begin
      rx_sync <= {rx_sync[0], rxd};
      state   <= state_n;
      unique case (state)
        RX_IDLE: if (start) length_q <= length;
        RX_START: begin
          recv_cnt <= '0;
          shreg    <= '0;
          bitcnt   <= '0;
          baud_cnt <= '0;
        end
        RX_READY: begin
          shreg    <= '0;
          bitcnt   <= '0;
          baud_cnt <= '0;
        end
        RX_RECV: baud_cnt <= baud_cnt + 16'd1;
        RX_FINISH: begin
          baud_cnt <= '0;
          bitcnt   <= bitcnt + 4'd1;
          // bits 1..8 are D0..D7; bit 0 is the start bit, bit 9 the stop bit
          if (bitcnt >= 4'd1 && bitcnt <= 4'(DATA_BITS)) shreg <= {rx_s, shreg[7:1]};
        end
        RX_LOAD: byte_data <= shreg;
        RX_BLOCK_FINISH: if (recv_cnt + 32'd1 < length_q) recv_cnt <= recv_cnt + 32'd1;
        default: ;
      endcase
    end
  end

endmodule
