// dma_read_ctrl: Master Read type DMA controller with an Avalon-MM master.
//
// On a start pulse it samples the base address and the byte count and then
// reads the bytes at base, base+1, ... base+length-1 with basic Avalon read
// transfers, pushing each into a byte FIFO that the USART send controller
// drains. A basic read transfer: in the first cycle the master drives
// address and pulls read_n low; if waitrequest is low the read data is on
// readdata in that cycle and is captured at the next rising clock edge. While
// waitrequest is high the master holds address and read_n. After each
// transfer read_n goes high for one cycle (state next), in which the master
// checks the remaining count and the FIFO: it starts the next read only if
// the FIFO has room, so a slow serial line throttles the bus reads. done
// rises once the last byte is in the FIFO and stays high until the next start.
//
// Bus: byte-wide readdata, byte addresses, active-low read_n, as in the
// published read waveform (addresses 01000000, 01000001, ... returning one
// character each). The FIFO and its depth, the one idle cycle between reads
// and the done flag are this design's choices.
// The concurrent assertion at the end checks the Avalon rule that a
// stalled request stays unchanged. Its disable condition uses rst_n, which
// is why a linter may report rst_n as used both as an asynchronous reset
// and as a synchronous signal; the logic itself uses it only as an
// asynchronous reset.
module dma_read_ctrl
  import usart_dma_pkg::*;
#(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned FIFO_DEPTH = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [ADDR_W-1:0] base,
  input  logic [31:0]       length,
  // Avalon-MM master, read only
  output logic [ADDR_W-1:0] address,
  output logic              read_n,
  input  logic              waitrequest,
  input  logic [7:0]        readdata,
  // FIFO towards the USART send controller
  input  logic              fifo_pop,
  output logic [7:0]        fifo_data,
  output logic              fifo_empty,
  output logic              busy,
  output logic              done
);
  dma_state_t  state;
  logic [31:0] remaining;
  logic        fifo_full, push;

  assign push   = (state == DMA_ACCESS) && !waitrequest;
  assign read_n = (state != DMA_ACCESS);
  assign busy   = (state == DMA_ACCESS) || (state == DMA_NEXT);
  assign done   = (state == DMA_DONE);

  byte_fifo #(.DEPTH(FIFO_DEPTH), .WIDTH(8)) u_fifo (
    .clk   (clk),
    .rst_n (rst_n),
    .clear (start),
    .push  (push),
    .wdata (readdata),
    .pop   (fifo_pop),
    .rdata (fifo_data),
    .full  (fifo_full),
    .empty (fifo_empty)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= DMA_IDLE;
      address   <= '0;
      remaining <= '0;
    end else if (start) begin
      state     <= DMA_NEXT;
      address   <= base;
      remaining <= length;
    end else begin
      unique case (state)
        DMA_NEXT: begin
          if (remaining == '0)  state <= DMA_DONE;
          else if (!fifo_full)  state <= DMA_ACCESS;
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

  // Avalon rule: a master held off by waitrequest keeps its request unchanged
  a_hold: assert property (@(posedge clk) disable iff (!rst_n || start)
    (!read_n && waitrequest) |=> (!read_n && $stable(address)));

endmodule
