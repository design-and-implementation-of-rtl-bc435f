// avalon_mem_model: behavioural byte memory with two Avalon-MM slave ports,
// for the testbenches.
//
// The read port serves basic read transfers: while read_n is low and
// waitrequest is low, readdata carries the byte at the address in that same
// cycle (the master captures it at the next rising edge); otherwise it is 0.
// The write port stores writedata at the rising edge that ends a cycle with
// write_n low and waitrequest low. Each port's waitrequest is drawn at
// random every cycle, high with probability wait_pct percent (a variable
// the testbench may change at run time). The memory covers the low AW_BITS
// bits of the address; accesses outside base_lo..base_hi are counted as
// errors. Counters record completed reads and writes and stalled cycles.
// Nothing is stored or counted while rst_n is low.
module avalon_mem_model #(
  parameter int unsigned AW_BITS  = 16,
  parameter int unsigned WAIT_PCT = 25
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] rd_address,
  input  logic        rd_read_n,
  output logic        rd_waitrequest,
  output logic [7:0]  rd_readdata,
  input  logic [31:0] wr_address,
  input  logic        wr_write_n,
  input  logic [7:0]  wr_writedata,
  output logic        wr_waitrequest
);
  logic [7:0] mem [2**AW_BITS];
  int wait_pct = int'(WAIT_PCT);
  logic [31:0] base_lo = '0, base_hi = '1;
  int reads = 0, writes = 0, rd_stalls = 0, wr_stalls = 0, range_errors = 0;
  logic rd_w = 1'b0, wr_w = 1'b0;

  initial for (int i = 0; i < 2**AW_BITS; i++) mem[i] = '0;

  assign rd_waitrequest = rd_w;
  assign wr_waitrequest = wr_w;
  assign rd_readdata = (!rd_read_n && !rd_w) ? mem[rd_address[AW_BITS-1:0]] : 8'h00;

  always @(posedge clk) begin
    rd_w <= ($urandom_range(0, 99) < wait_pct);
    wr_w <= ($urandom_range(0, 99) < wait_pct);
    if (rst_n && !rd_read_n) begin
      if (rd_w) rd_stalls <= rd_stalls + 1;
      else begin
        reads <= reads + 1;
        if (rd_address < base_lo || rd_address > base_hi) range_errors <= range_errors + 1;
      end
    end
    if (rst_n && !wr_write_n) begin
      if (wr_w) wr_stalls <= wr_stalls + 1;
      else begin
        writes <= writes + 1;
        mem[wr_address[AW_BITS-1:0]] <= wr_writedata;
        if (wr_address < base_lo || wr_address > base_hi) range_errors <= range_errors + 1;
      end
    end
  end
endmodule
