// dma_write_ctrl: Master Write type DMA controller with an Avalon-MM master.
//
// On a start pulse it samples the base address and the byte count. In state
// next it waits for the USART receive controller to offer a byte, takes it
// with a one-cycle byte_ack and moves to access, where it performs a basic
// Avalon write transfer: address, writedata and write_n (low) are driven in
// the first cycle and, if waitrequest is low, the slave captures writedata
// at the next rising edge; while waitrequest is high everything is held.
// The address then advances by one byte. When length bytes have been
// written, done rises and stays high until the next start.
//
// Bus: byte-wide writedata, byte addresses, active-low write_n, matching the
// published basic write transfer. The single-byte hand-over and the done
// flag are this design's choices.
// The concurrent assertion at the end checks the Avalon rule that a
// stalled request stays unchanged. Its disable condition uses rst_n, which
// is why a linter may report rst_n as used both as an asynchronous reset
// and as a synchronous signal; the logic itself uses it only as an
// asynchronous reset.
module dma_write_ctrl
  import usart_dma_pkg::*;
#(
  parameter int unsigned ADDR_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [31:0]       length,
  // Avalon-MM master, write only
  output logic [ADDR_W-1:0] address,
  output logic              write_n,
  output logic [7:0]        writedata,
  input  logic              waitrequest,
  // byte hand-over from the USART receive controller
  input  logic              byte_valid,
  input  logic [7:0]        byte_data,
  output logic              byte_ack,
  output logic              busy,
  output logic              done
);
  dma_state_t  state;
  logic [31:0] remaining;

  assign write_n  = (state != DMA_ACCESS);
  assign byte_ack = (state == DMA_NEXT) && (remaining != '0) && byte_valid && !start;
  assign busy     = (state == DMA_ACCESS) || (state == DMA_NEXT);
  assign done     = (state == DMA_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= DMA_IDLE;
      address   <= '0;
      remaining <= '0;
      writedata <= '0;
    end else if (start) begin
      state     <= DMA_NEXT;
      address   <= base;
      remaining <= length;
    end else begin
      unique case (state)
        DMA_NEXT: begin
          if (remaining == '0) state <= DMA_DONE;
          else if (byte_valid) begin
            writedata <= byte_data;
            state     <= DMA_ACCESS;
          end
        end
        DMA_ACCESS: begin
          if (!waitrequest) begin
            address   <= address + 1'b1;
            remaining <= remaining - 32'd1;
            state     <= DMA_NEXT;
          end
        end
        default: ;
      endcase
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
    (!write_n && waitrequest) |=> (!write_n && $stable(address) && $stable(writedata)));

endmodule
