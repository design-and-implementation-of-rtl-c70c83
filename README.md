# Byte-wide DMA controller with SECDED-protected memory

A small, single-channel DMA engine for 8-bit embedded systems. It moves data
from a peripheral into memory without the CPU. Every byte is stored with an
error-correcting code, so a flipped bit in memory is repaired when the byte is
read. A byte with two flipped bits is flagged instead of being returned as
good data. The error check runs inside the transfer path. Right after a
transfer, the controller reads back what it wrote and reports the result in a
status register, so software never has to re-read the data to validate it.

The design follows a published description of an ECC-enabled DMA controller:
an ECC encoder, a DMA state machine and a syndrome checker tied together by a
top-level module, with single and 4-word burst modes, a 2-cycle single
transfer and a 5-cycle burst. Registers, arbitration, the request
synchroniser and all the timing details that description leaves open are
filled in here. They are listed under "Interpretations and departures".

## Structure

```
              dma_req ──► req_sync ──┐
                                     ▼
 CPU regs ◄──► dma_csr ──start/mode/addr──► dma_controller ──periph_rd──► peripheral
                  ▲  irq                        │   ▲          ◄─periph_data─
                  └──── done / error events ────┘   │ single/double flags
                                                    ▼   │
 CPU mem port ◄──► mem_arbiter ◄── DMA memory master    │
                        │ we/addr/data (8 bit)          │
                        ▼                               │
                   ecc_encoder ─13 bit─ ⊕ err_inject ─► ecc_memory (16 x 13)
                                                          │ codeword
                                                          ▼
                                                     ecc_syndrome ──► corrected byte,
                                                                      single/double flags
```

| Module | File | Role |
|---|---|---|
| `dma_top` | `rtl/dma_top.sv` | top level, wires everything below |
| `dma_controller` | `rtl/dma_controller.sv` | transfer state machine |
| `dma_csr` | `rtl/dma_csr.sv` | control/status registers, interrupt |
| `mem_arbiter` | `rtl/mem_arbiter.sv` | DMA/CPU sharing of the memory port |
| `ecc_encoder` | `rtl/ecc_encoder.sv` | byte → 13-bit SECDED codeword |
| `ecc_memory` | `rtl/ecc_memory.sv` | 16-word codeword store |
| `ecc_syndrome` | `rtl/ecc_syndrome.sv` | syndrome, single-bit correction, double-error flag |
| `req_sync` | `rtl/req_sync.sv` | two-flop synchroniser for the request pin |
| `dma_pkg` | `rtl/dma_pkg.sv` | default sizes, mode and state enums, register map, code-size functions |

There is one encoder and one syndrome checker. Both DMA and CPU accesses pass
through them, so every byte in memory is protected, whoever wrote it.

## The error-correcting code

Each 8-bit byte becomes a 13-bit codeword. It is an extended Hamming code
that corrects any single-bit error and detects any double-bit error (SECDED).

| Codeword bit | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| Content | overall parity | c0 | c1 | d0 | c2 | d1 | d2 | d3 | c3 | d4 | d5 | d6 | d7 |

- The data bits sit at the bit positions that are not powers of two.
- Check bit `ck` sits at position 2^k. It is the XOR of every bit whose
  position has bit k set:
  - `c0 = d0^d1^d3^d4^d6`
  - `c1 = d0^d2^d3^d5^d6`
  - `c2 = d1^d2^d3^d7`
  - `c3 = d4^d5^d6^d7`
- Bit 0 is the XOR of bits 1 to 12. This makes the parity of the whole
  codeword even.

On a read, the checker recomputes the four check sums over the received bits.
The result is the 4-bit **syndrome**. If exactly one of bits 1 to 12 flipped,
the syndrome is that bit's position. The overall parity of all 13 bits tells
the cases apart:

| syndrome | overall parity | verdict | action |
|---|---|---|---|
| 0 | even | no error | data passed through |
| any | odd | single error | invert bit `syndrome` (0 means bit 0 itself flipped; the data is intact) |
| ≠ 0 | even | double error | `double_err`, data must not be used |
| > 12 | odd | three or more errors | reported as `double_err` |

Encoder and checker are written for any `DATA_W`. The number of check bits is
the smallest `p` with 2^p ≥ DATA_W + p + 1 (`dma_pkg::ecc_parity_bits`), plus
one overall parity bit. Both are combinational, so a word is encoded and
checked in the same cycle it is accessed.

## Transfer state machine and timing

`dma_controller` has five states:

| State | What happens | Cycles |
|---|---|---|
| `S_IDLE` | waits for a request; mode and destination address are captured | until a request |
| `S_ACK` | `dma_ack` is high for one cycle. The mode is decoded (`01` single = 1 word, `10` burst = 4 words), the word counter is cleared and the memory is requested from the arbiter. A reserved mode (`00`, `11`), or a burst that would run past word 15, skips to `S_COMPLETE` with nothing written. | 1 |
| `S_WRITE` | one word per cycle. `periph_rd` strobes the peripheral, the byte on `periph_data` is encoded and written to `dst_addr + counter`, and the counter increments. | 1 or 4 |
| `S_COMPLETE` | `dma_done` is high for one cycle (with `addr_err`/`mode_err` for a refused request). The read-back starts next. | 1 |
| `S_VERIFY` | each written word is read back through the syndrome checker, one per cycle. `chk_valid` marks each one; `chk_single`/`chk_double` carry the verdict into the status register. | 1 or 4 |

A 4-word burst, cycle by cycle (`A` = destination address):

```
cycle        0      1       2       3       4       5         6      7      8      9      10
state      IDLE    ACK    WRITE   WRITE   WRITE   WRITE   COMPLETE VERIFY VERIFY VERIFY VERIFY
dma_ack             1
periph_rd                   1       1       1       1
mem addr                    A      A+1     A+2     A+3               A     A+1    A+2    A+3
dma_done                                                     1
chk_valid                                                             1      1      1      1
```

**Latency.** From the acknowledge cycle to the last memory write inclusive, a
single transfer takes 2 cycles and a burst 5 cycles. This is how the 2-cycle
and 5-cycle figures of the original description are met: acknowledge, mode
check and counter set-up share one cycle. `dma_done` follows one cycle after
the last write. The read-back adds one cycle per word. A complete
single-transfer request therefore occupies the controller for 4 cycles, and a
burst for 10.

**Request handshake.** The peripheral raises `dma_req` and holds it until it
sees `dma_ack`. The pin passes through the two-flop synchroniser (`req_sync`),
so the peripheral may run on its own clock. This adds 2 cycles from the pin
to `S_ACK`. A request that is still high when the controller returns to
`S_IDLE` starts the next transfer at once, so back-to-back transfers have one
idle cycle between them. Setting the CTRL start bit raises an internal request, without the
synchroniser, which is held until acknowledged. Only data produced by the
peripheral is moved: the peripheral must put the next byte on `periph_data`
after each `periph_rd` strobe.

**Reset.** `rst_n` is asynchronous and active low. It resets the state
machine, the counters, the registers and the synchroniser. Memory contents
are not reset.

## Registers (`csr_*` port)

Writes take effect at the clock edge. `csr_rdata` is combinational from
`csr_addr`.

| Addr | Name | Bits |
|---|---|---|
| 0 | CTRL | `[1:0]` mode (`01` single, `10` burst), `[2]` interrupt enable, `[7]` start (write 1; reads 1 while the request waits for acknowledge) |
| 1 | ADDR | `[3:0]` destination word address |
| 2 | STATUS | `[0]` done, `[1]` single error corrected, `[2]` double error, `[3]` address error, `[4]` mode error: sticky, write 1 to clear; `[7]` busy (read only) |
| 3 | — | reads 0 |

If a flag's event arrives in the same cycle as a write that clears it, the
flag stays set. `irq` is high while the interrupt enable is set and any
STATUS flag is set.

## Memory sharing and CPU access

The CPU can read and write the protected memory directly through `cpu_mem_*`.
`mem_arbiter` gives the DMA fixed priority. The DMA holds its memory request
from `S_ACK` to the end of `S_VERIFY`, so a transfer is never stretched.
During that time `cpu_mem_gnt` is low, and the CPU must hold its request
until the grant appears. A granted CPU access completes in that cycle. Read
data is the corrected byte, with `cpu_mem_single_err` and
`cpu_mem_double_err` valid in the same cycle. CPU errors are reported on these
pins only, not in STATUS. `dma_controller` can wait out a low grant in
`S_WRITE` and `S_VERIFY`, but with this arbiter that never happens.

## Fault injection

`err_inject` (13 bits) is XORed into every codeword as it is written. Driving
a mask with one or two bits set during a chosen write models an upset in the
stored word. Tie it to zero in a real system.

## Interpretations and departures

- **Check-bit count.** The original description states both "a 4-bit ECC for
  every 8-bit word" and single-error correction with double-error detection.
  Four check bits alone (Hamming(12,8)) cannot tell a double error from a
  single one. This design keeps the four Hamming check bits and adds an
  overall parity bit, giving 13-bit codewords and true SECDED.
- **Order of completion and read-back.** The flow chart signals completion
  and then triggers a memory read; one state list puts the ECC check before
  completion. This design follows the flow chart: `dma_done` comes first,
  then every written word is read back and checked. Software waiting for
  "done" and a clean result should wait for `busy` to fall.
- **Latency.** The description gives 2 and 5 cycles without saying where the
  count starts and ends. Here the count runs from acknowledge to last write.
- **Address errors.** The description claims detection of "erroneous address
  accesses" without defining them. Here a burst that would run past the last
  memory word is refused with `addr_err`.
- **Registers.** The description lists source address, destination address,
  size and mode. The source here is always the peripheral data port, and the
  size follows from the mode, so only the destination and mode are
  registers. The register map is this design's own.
- **Arbitration.** The description asks only for lightweight arbitration
  between memory masters. Fixed DMA priority and the CPU port are this
  design's own choices.
- **Memory size.** No size is given. 16 words (4-bit address) is used.
- **Not reproduced.** The published FPGA figures (10.948 mW, 12.156 ns,
  about 85 logic LUTs) come from a vendor flow and are not checked here. In
  generic synthesis this RTL has 32 flip-flops and 208 memory bits.
  Multi-channel operation, priority scheduling and configurable burst
  lengths are mentioned in the description only as future work and are not
  built.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `DATA_W` | 8 | top, controller, encoder, checker | data width; codeword width follows |
| `ADDR_W` | 4 | top, controller, CSR, arbiter, memory | memory word address width (16 words) |
| `BURST_LEN` | 4 | top, controller | words per burst |
| `STAGES` | 2 | `req_sync` | synchroniser depth, at least 2 |

The register port stays 8 bits wide: `ADDR_W` above 8 or `DATA_W` other than
8 would need a wider register port. The testbenches assume the defaults.

## Simulation

Every testbench checks itself, prints
`TB_RESULT checks=<n> failures=<m>` and stops with a watchdog if it hangs.

| Testbench | What it checks |
|---|---|
| `tb/tb_ecc_encoder.sv` | all 256 bytes against the written-out equations above; minimum code distance is 4 |
| `tb/tb_ecc_syndrome.sv` | all 256 bytes clean, with each of the 13 single flips and the 78 double flips |
| `tb/tb_ecc_memory.sv` | random writes/reads against a reference array |
| `tb/tb_mem_arbiter.sv` | random request patterns; priority, port muxing, CPU hold-off |
| `tb/tb_dma_csr.sv` | reset values, register read/write, start hand-off, sticky/W1C flags, irq masking |
| `tb/tb_req_sync.sv` | exact 2-cycle delay and reset |
| `tb/tb_dma_controller.sv` | single/burst writes, 2/5-cycle latency, done timing, read-back flags, refused modes and addresses, grant stalls, back-to-back requests |
| `tb/tb_dma_top.sv` | whole design at default parameters: transfers started by pin and by register, injected single and double errors caught on read-back and on CPU reads, CPU held off during a burst, address and mode errors, back-to-back bursts, interrupt masking; counts each of these mechanisms and fails if any never occurs |
| `tb/tb_dma_stress.sv` | 300 back-to-back requests with random mode, address, request source and injected errors, interleaved with CPU reads (some stalled), all checked against a memory model |

Running one with Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl rtl/dma_pkg.sv \
          tb/tb_dma_top.sv --top-module tb_dma_top --Mdir obj_top
./obj_top/Vtb_dma_top
```

Replace `tb_dma_top` with any other testbench name. The package must come
first on the command line. The other modules are found through `-y rtl`.
Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl rtl/dma_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are unused package constants, two unused
`csr_wdata` bits, and `rst_n` being used both as an asynchronous reset and
in an assertion's `disable iff`.
