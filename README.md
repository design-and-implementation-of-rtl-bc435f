# DMA-mode USART core for an Avalon-MM system

A serial port (8N1 UART framing) whose data never passes through the
processor. The processor writes four registers, telling the core where a
block of bytes is in memory, how long it is and how fast the line runs, and
sets a start bit. From then on, two DMA engines inside the core move the
bytes between memory and the serial shift registers. The processor is
interrupted once, when the whole block has gone out or come in. Sending
or receiving a block therefore costs the processor the same handful of
register writes whether the block is 64 bytes or 4 KiB. A polled or
interrupt-per-byte UART costs time in proportion to the block size.

The core has one Avalon-MM slave port (the registers), two Avalon-MM master
ports (one that only reads memory, one that only writes it), `txd`, `rxd`
and a level interrupt `irq`. It was written for a Nios II-style soft-processor
system on an FPGA, but it depends on nothing vendor-specific.

```
            +--------------------------------------------------------+
  txd  <----| usart_tx  <-- byte_fifo (256 B) <-- dma_read_ctrl      |<==> Avalon-MM master (read)
            |    ^                                      ^            |
            |    |            reg_file                  |            |<==> Avalon-MM slave
            |    v      START BAUD BASE LENGTH  irq     v            |
  rxd  ---->| usart_rx  --> (1-byte hand-over) --> dma_write_ctrl    |<==> Avalon-MM master (write)
            +--------------------------------------------------------+
```

## Files

| file | what it is |
|---|---|
| `rtl/usart_dma_pkg.sv` | register offsets, START bit positions, frame size, state enums |
| `rtl/dma_usart_ip.sv` | top level: wires the five sub-modules together |
| `rtl/reg_file.sv` | Avalon-MM slave with the four registers, start pulses, interrupt flags |
| `rtl/dma_read_ctrl.sv` | Master Read DMA: memory → FIFO |
| `rtl/byte_fifo.sv` | 256-byte FIFO inside the read DMA (one block RAM) |
| `rtl/usart_tx.sv` | send controller: FIFO → framed serial bits on `txd` |
| `rtl/usart_rx.sv` | receive controller: `rxd` → bytes handed to the write DMA |
| `rtl/dma_write_ctrl.sv` | Master Write DMA: bytes → memory |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the end-to-end and block-size tests |
| `tb/avalon_mem_model.sv` | behavioural byte memory with two Avalon ports and random `waitrequest` |

## Programming model

Registers are 32 bits wide and addressed by word offset on `avs_address[1:0]`.

| offset | name | access | bits used | meaning |
|---|---|---|---|---|
| 0 | START | write-only | 1:0 | bit 0 starts a transmit block, bit 1 starts a receive block; any write clears the interrupt |
| 1 | BAUD | read/write | 15:0 | clock cycles per serial bit (reset 434 = 115200 baud at 50 MHz) |
| 2 | BASE | read/write | 31:0 | byte address of the first byte of the block |
| 3 | LENGTH | read/write | 31:0 | number of bytes in the block |

There is only **one** BASE and **one** LENGTH. Each DMA engine copies both
at the moment it is started, so software can run both directions at once:

```
BAUD   <- cycles_per_bit
BASE   <- rx_buffer ; LENGTH <- n ; START <- 2   // receive armed
BASE   <- tx_buffer ; LENGTH <- m ; START <- 1   // transmit starts
... processor does other work ...
on irq:  START <- 0                              // acknowledge
```

Rules worth knowing:

* A start bit is ignored while its direction is still busy. It is also
  ignored while LENGTH is 0, so a zero-length block never starts and never
  interrupts.
* `irq` is the OR of two pending flags, one per direction. A controller's
  done pulse sets its flag. Any write to START clears both flags; a done
  pulse in the same cycle wins. The registers cannot tell which direction
  finished. Software that runs both at once knows what it started, and
  can check the receive buffer or wait for a second interrupt.
* Reads of START return 0. The slave has no wait states: `avs_readdata` is
  combinational and valid in the cycle `avs_read` is high.

## Serial frame and bit timing

1 start bit (low), 8 data bits with D0 first, 1 stop bit (high). There is no
parity. BAUD is a divisor: each bit lasts exactly BAUD clock cycles.

**Transmit.** `txd` is the low bit of a 10-bit shift register, so it comes
straight from a flip-flop. The shift register is all ones when idle. Between
frames the line stays high for 4 clock cycles beyond the stop bit while the
controller fetches the next byte. BAUD values below 2 behave as 2.

**Receive.** `rxd` passes a two-flop synchroniser. When the line is seen
low, the receiver waits half a bit and samples the start bit. It then
samples the 8 data bits and the stop bit one bit apart, at the centre of
each bit. The stop bit is not checked. There is no framing-error, parity
or break detection, and a glitch is taken as a start bit. The receiver is ready for the next
start bit a few cycles after the centre of the stop bit. This leaves half a bit for the
write DMA to take the byte. Use BAUD ≥ 16 when the memory can stall for
many cycles. BAUD values below 4 are not usable for reception. Over a
10-bit frame, centre sampling tolerates a clock mismatch of about ±4 %
between the two ends.

## The two serial controllers

Both controllers are explicit state machines. Their state names are the
ones used for this design's published state diagrams. Most states last
one cycle. Only the waiting states (`data_valid`, `send`, `ready`,
`recv`, `buffer_ready`, `master_done`) can last longer.

### Send controller (`usart_tx`)

```
idle --start--> data_valid --FIFO not empty--> read_fifo --> load --> send <--> finish
                    ^                                                           |
                    +----------- more bytes ------------ block_finish <---------+ (10th bit done)
                                                             |
                                             last byte  -->  master_done --DMA done--> idle (done pulse)
```

* `data_valid` waits for the FIFO to hold a byte. `read_fifo` pops it.
  The FIFO has a registered read port, so the byte is available one cycle
  later, in `load`. `load` builds `{1, byte, 0}` in the shift register.
* `send` holds a bit for BAUD−1 cycles. `finish` (1 cycle) shifts. It
  either returns to `send` or, after the stop bit, goes to `block_finish`.
* `block_finish` compares the byte count with LENGTH. It loops back to
  `data_valid` or moves to `master_done`. `master_done` waits until the
  read DMA says it has fetched the whole block, then pulses `done` for one
  cycle.

### Receive controller (`usart_rx`)

```
idle --start--> start --> ready --line low--> recv <--> finish --stop bit sampled--> load --> buffer_ready
                            ^                                                                  | ack
                            +--------------- more bytes ---------------- block_finish <--------+
                                                                             |
                                           last byte --> master_done --DMA done--> get_done --> idle (done pulse)
```

* `start` clears the byte counter. `start` and `ready` both clear the bit
  counter and shift register.
* `recv` counts cycles; `finish` samples one bit. The first wait is
  BAUD/2−1 cycles and the later ones BAUD−1, so that together with the
  `finish` cycle the samples fall at the bit centres.
* `load` copies the byte to the output register. `buffer_ready` offers
  it (`byte_valid`) until the write DMA acknowledges it (`byte_ack`, one
  cycle).
* `block_finish` counts the byte against LENGTH. `master_done` waits for
  the write DMA to finish its last memory write, and `get_done` pulses
  `done`.

## The DMA engines and the Avalon master timing

Both masters use byte-wide data and byte addresses. The address starts at
BASE and goes up by one per byte. Both use basic, single-beat transfers
with active-low strobes:

* **Read (`avm_rd_*`).** The master drives `address` and pulls `read_n`
  low. Reads have zero latency: in a cycle with `read_n` low and
  `waitrequest` low, `readdata` is valid and is captured at the next
  rising edge. While `waitrequest` is high, address and `read_n` are held
  (an assertion checks this). After each completed read, `read_n` goes high
  for one cycle. So a block without wait states is fetched at 2 cycles per
  byte, and `done` rises 2·LENGTH+2 cycles after the start pulse.
* **FIFO back-pressure.** In the idle cycle between reads the read DMA
  checks the FIFO. If the FIFO is full it does not issue the next read. A
  block longer than 256 bytes is therefore fetched 256 bytes ahead of the
  line and then at line rate. The FIFO is cleared at each transmit start.
* **Write (`avm_wr_*`).** In state `next` the write DMA waits for a byte
  from the receive controller, acknowledges it and latches it. In state
  `access` it drives `address`, `writedata` and `write_n` low until
  `waitrequest` is low. The receive path has no FIFO. Each byte is written
  long before the next one can arrive.

Each DMA engine's `done` output is a level. It is high from the end of its
block until the next start. The serial controllers wait for it in
`master_done`.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `ADDR_W` | 32 | top, both DMA engines | Avalon master address width |
| `FIFO_DEPTH` | 256 | top, `dma_read_ctrl` | transmit FIFO depth in bytes (power of two) |
| `BAUD_RESET` | 434 | package constant | BAUD after reset |

The BAUD, BASE and LENGTH widths are those of the register map. A
generic synthesis of the top gives about 450 flip-flops and 2048 bits of
RAM, the FIFO. The 32-bit byte counters in all four engines make up much
of the flip-flop count. The original FPGA build was reported at 352
registers and 2048 memory bits.

## What follows the original design and what is this implementation's choice

Taken from the original design: the five sub-modules and how they connect;
the register map (offsets, access rights, effective widths); the 8N1 frame
with D0 first; the state names and the order of the two controllers' state
machines; the basic Avalon read and write transfer timing with `read_n` and
`write_n`; byte-wide transfers to consecutive addresses; an interrupt at the
end of each block; and 2048 bits of on-chip memory.

Chosen here, because the original leaves it open:

* BAUD is a divisor in clock cycles per bit, not a rate.
* START bit 0 is transmit and bit 1 is receive.
* The interrupt flags, how they are cleared, and the OR that combines
  them.
* The START-while-busy and LENGTH = 0 rules.
* The memory is used as a 256-byte transmit FIFO inside the read DMA, and
  the receive path uses a one-byte hand-over.
* The exact cycle split between `send`/`finish` and `recv`/`finish`,
  centre sampling and the input synchroniser.
* The one idle cycle between bus transfers.
* Zero-wait-state register reads.
* An asynchronous active-low reset everywhere.

Left out: parity, a 9-bit mode, error and status reporting, a status
register showing which direction finished, and a clocked synchronous
mode. None of these is specified for this core.

## Verification

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a cycle watchdog.

| testbench | what it establishes |
|---|---|
| `tb_usart_tx` | frame bits and exactly BAUD cycles per bit (checked every cycle); stalls on an empty FIFO; the interrupt waits for the DMA; even and odd divisors |
| `tb_usart_rx` | bytes recovered with random gaps between frames and ±1 cycle per bit of clock skew at BAUD=32; hand-over held until acknowledged; one interrupt per block; line activity ignored when idle |
| `tb_reg_file` | reset value, read-back, write-only START, chipselect, start pulses, busy and LENGTH = 0 suppression, interrupt set, hold and clear, done winning over clear |
| `tb_dma_read_ctrl` | 2 cycles per byte and done at 2·N+2 without wait states; consecutive addresses; FIFO fills to exactly 256 and the master stalls; random `waitrequest`; restart at a new base |
| `tb_dma_write_ctrl` | memory contents, one write per byte, nothing past the block, random `waitrequest` |
| `tb_dma_usart_ip` | whole core at default parameters, `txd` looped to `rxd`: a 300-byte and a 20-byte block with different BAUD; transmit-only and receive-only blocks, each raising exactly one interrupt. Counts and requires read and write stalls, FIFO-full back-pressure, a refused START, both interrupts and a baud change |
| `tb_workload_blocks` | 64, 512 and 4096-byte blocks through the loop-back; the host's bus accesses (8) and bus cycles are identical for all three sizes |

Run any of them with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/usart_dma_pkg.sv tb/tb_dma_usart_ip.sv --top-module tb_dma_usart_ip
./obj_dir/Vtb_dma_usart_ip
```

Each testbench runs in well under a second. The testbenches reach into
`avalon_mem_model` through hierarchical names to load and compare memory.
They never look inside the core.

The processor-time figures that motivated the design are measured in
processor clock cycles, including driver code, so they cannot be
reproduced without a processor. What the RTL does show is that the host's
share is constant: 6 register writes to launch a receive+transmit pair and
1–2 acknowledge writes, whatever the block size.
