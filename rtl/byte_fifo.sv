// byte_fifo: synchronous first-in first-out buffer between the Master Read
// DMA controller and the USART send controller.
//
// A circular buffer of DEPTH words held in an array (maps onto one block
// RAM) with a write pointer, a read pointer and an occupancy counter. A push
// stores wdata at the end of the cycle. A pop removes the oldest word and
// presents it on rdata from the next cycle on (registered read, as a RAM
// output port behaves), which is why the send controller spends one state
// popping and the next one loading. clear empties the buffer. Pushing when
// full and popping when empty are ignored. DEPTH must be a power of two.
// The buffer itself is this design's choice: the send controller's state
// "read_fifo" names a FIFO, and its 256-byte default matches the 256 bytes
// of on-chip memory the core is reported to use.
module byte_fifo #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [WIDTH-1:0] wdata,
  input  logic             pop,
  output logic [WIDTH-1:0] rdata,
  output logic             full,
  output logic             empty
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic [AW:0]      count;
  logic             do_push, do_pop;

  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
      rdata <= '0;
    end else if (clear) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop) begin
        rptr  <= rptr + 1'b1;
        rdata <= mem[rptr];
      end
      case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

endmodule
