# 16-port SRAM from 2-port banks: a hierarchical multi-port memory in SystemVerilog

True multi-port memory cells grow quickly with the number of ports, because every
port needs its own wordline and bitlines in every cell. This design gets 16 ports
(8 read, 8 write) out of small, ordinary 2-port banks instead. 32 banks of
2 Kbit each have one read port and one write port. A *distributed crossbar*
connects them to the 16 memory ports: every bank carries a small 1-to-8 read-port
converter and a 1-to-8 write-port converter. Two ports can work at the same time
whenever they address different banks. A read and a write can also share one bank
in the same cycle. Only two reads, or two writes, to the same bank in the same
cycle collide. For those cases each bank port has an arbiter, and the losing port
is told to retry.

The default configuration is 64 Kbit in total, with 32-bit words. The banks form
a grid of 8 banks per bank column × 4 bank columns, and every access takes a
2-cycle pipeline. When no two ports conflict, the memory moves 16 × 32 = 512 bits
per clock. The silicon implementation this architecture comes from runs at
1.16 GHz, where 512 bits per clock is about 590 Gbit/s of random-access bandwidth.
The RTL has no clock-rate figure of its own.

## Organisation

```
 8 read ports                                         8 write ports
 rd_en/rd_addr                                        wr_en/wr_addr/wr_data
     |                                                    |
 bank decoder x8                                      bank decoder x8      write unit
     |  (one request line per bank)                       |                (data register)
     v                                                    v                     |
 +--------------------- per bank (x32) -------------------------------------+   |
 | read arbiter --> read bank ctrl --+              +-- write bank ctrl <-- write arbiter
 |                                   v              v                          |
 |                       wordline decoder (RWL / WWL)                          |
 |                                   |              |                          |
 |                      2-port SRAM core (32 rows x 2 words x 32 bit)          |
 |                                   |              ^                          |
 |                 1-to-8 read-port converter   1-to-8 write-port converter <--+
 +-----------------------------------|--------------------------------------+
                                     v  one line per read port
        3rd sensing stage: per bank column, 8 banks  ->  4th stage: 4 columns
                                     v
                        output latches -> rd_data (8 x 32 bit)
```

Addresses are 11 bits. `addr[10:6]` selects the bank (0..31), and bank *b* sits in
bank column *b*/8. `addr[5:1]` selects one of the 32 wordlines of the bank.
`addr[0]` selects one of the two words that share a wordline. The original design
does not give this address split; it is this design's own choice.

### Inside a bank

The core uses the 8-transistor 2-port cell. Its read port is a separate read
wordline and read bitline, so reading never disturbs the stored value. The read
path senses in two stages, which is the part that keeps signals large at speed:

1. **Local bitline.** A local read bitline serves only 8 cells, a *local
   cluster*.
2. **Global bitline.** The 4 clusters of a column share a global read bitline.
   A 2:1 bitline select (RBLSel) then picks one of two neighbouring global
   bitlines. This is why each wordline holds two words.

In the circuit these are precharged lines that a cell pulls down. `hma_sram_core`
models each stage as the logical OR of what it collects. That gives the selected
word when one wordline is active, and 0 when none is.

Wordline decoding is split across the pipeline. The bank controllers
(`hma_bank_ctrl`, one for the read side and one for the write side) predecode
the 5-bit row into a 4-line cluster group and an 8-line row-in-cluster group at
the end of cycle 1. The wordline decoder (`hma_wl_decoder`) ANDs the two groups
when the wordlines fire in cycle 2.

### The crossbar

* **Read side.** The bank's read controller registers the one-hot grant of its
  arbiter as the read-port select lines SR1..SR8. The read-port converter
  (`hma_read_port_conv`) puts the bank's data on the line of the selected port
  only: line *p* = SR*p* AND data. In the circuit this is domino logic that pulls
  the port's sensing line down only for a 1 bit, so the lines of many banks can
  share a wire. `hma_read_network` models that sharing as an OR. It forms one OR
  per bank column (the 3rd sensing stage) and then one across the 4 columns
  (the 4th stage). The result goes into the output latch of each port.
* **Write side.** The write data of all 8 ports is registered once (the write
  unit in `hma_sram16p`) and runs past every bank. The write-port converter
  (`hma_write_port_conv`) is an AND-OR selector. It hands the core the data of
  the port that won the bank.

## The 2-cycle pipeline

Each clock cycle has two halves, and the work of an access is spread over the
four half cycles like this:

| cycle | first half (clock low)                         | second half (clock high)                          |
|-------|------------------------------------------------|---------------------------------------------------|
| 1     | bank decoding, conflict arbitration            | bank-internal control signals, wordline predecode |
| 2     | wordline drivers fire, cells read and written  | read data through the converter and 3rd/4th stages |

The RTL is single-edge and keeps this split as two register boundaries:

* The rising edge that ends **cycle 1** captures the bank controllers'
  registers, the write data of every port and the served/rejected status of
  every port.
* The rising edge that ends **cycle 2** writes the cells and loads the read
  output registers (`rd_data`, `rd_valid`, `rd_conflict`) and the write status
  (`wr_done`, `wr_conflict`).

So a request presented in cycle *t* is answered after the second rising edge.
Every port can issue a new request every cycle. Reads see all writes issued in
earlier cycles. A read of a word that is written in the *same* cycle returns the
old value. The original design does not state this read-during-write rule; it is
this design's choice.

## Conflicts

Every bank has two `hma_conflict_arbiter` instances, one on its read port and one
on its write port. When several read ports (or write ports) address the same
bank in one cycle, the lowest-numbered port wins. The losers get
`rd_conflict`/`wr_conflict` two cycles later and must issue the access again. The
architecture expects the system around the memory to schedule accesses so that
conflicts are rare. It names arbitration but gives no policy, so fixed priority
is this design's choice. A fairer policy (for example round-robin) can replace
`hma_conflict_arbiter` without touching anything else.

## Interface of `hma_sram16p`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset of the pipeline registers (the cells are not reset) |
| `rd_en`, `rd_addr` | in | 8, 8×11 | read request per read port, cycle 1 |
| `rd_data` | out | 8×32 | read data, after the 2nd edge; 0 when `rd_valid` is low |
| `rd_valid`, `rd_conflict` | out | 8 | read served / rejected by a bank conflict |
| `wr_en`, `wr_addr`, `wr_data` | in | 8, 8×11, 8×32 | write request with its data, cycle 1 |
| `wr_done`, `wr_conflict` | out | 8 | write performed / rejected, after the 2nd edge |

Parameters (defaults in `hma_pkg`): `N_RD_PORTS`=8, `N_WR_PORTS`=8, `DATA_W`=32,
`BANKS_PER_COL`=8, `BANK_COLS`=4, `WL_ROWS`=32, `COL_MUX`=2, `CELLS_PER_LBL`=8. The
address width follows from them. The architecture is meant to scale to more ports
and banks. `tb/tb_hma_sram32p.sv` runs the same end-to-end test with 16 read and
16 write ports, which moves 1024 bits per conflict-free cycle. That is the
32-port configuration that would pass 1 Tbit/s at the original clock rate. Other
sizes are not tested.

## How far it follows the original design

The following come from the original design:

* 8 read and 8 write ports
* 32-bit words and 64 Kbit in 32 banks of 2 Kbit, arranged 8 × 4
* 32 wordlines per bank and two words per wordline
* 8 cells per local bitline and 4 clusters per global bitline
* the 1-to-8 converters in every bank
* the 3rd and 4th sensing stages grouped by bank column
* a separate bank controller for each of the read and write sides
* the 2-cycle latency and the work done in each half cycle

The following are this design's own choices:

* the address map
* the fixed-priority arbitration and the conflict/done outputs
* the register placement inside the pipeline
* the predecoding split
* read-old-data on a read during a write
* the reset
* `rd_data` = 0 when nothing is read

What the RTL cannot capture:

* Analog behaviour: precharge, domino evaluation, sense amplifiers, the
  repeaters of the read path, the latch transparency phases and all timing
  numbers.
* Choosing a low-power or a high-speed operating point through the supply
  voltage. This is an electrical property with no logic counterpart.
* The pads of the test chip.

## Files

* `rtl/hma_pkg.sv`: default sizes
* `rtl/hma_sram16p.sv`: top level
* `rtl/hma_bank_decoder.sv`, `rtl/hma_conflict_arbiter.sv`: cycle-1 logic in the
  periphery
* `rtl/hma_bank.sv`: one bank, containing `hma_bank_ctrl`, `hma_wl_decoder`,
  `hma_sram_core`, `hma_read_port_conv` and `hma_write_port_conv`
* `rtl/hma_read_network.sv`: the 3rd and 4th sensing stages and the output
  registers
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each ends by
  printing `TB_RESULT checks=N failures=M`.

`tb/tb_hma_sram16p.sv` runs the whole memory at its default size. It compares
everything against a 2048-word reference model with its own prediction of
arbitration and read-during-write. It first fills the memory, then measures the
latency of an isolated read (2 cycles). It then runs 200 cycles in which all 16
ports are served, followed by 3000 cycles of random traffic crowded onto a few
banks. It counts read conflicts, write conflicts, a read and a write in the same
bank, a read of a word written in the same cycle, and cycles with all 16 ports
busy, and it fails if any of them never happened. `tb/tb_hma_sram32p.sv` repeats
this test for the 32-port configuration.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/hma_pkg.sv \
    tb/tb_hma_sram16p.sv --top-module tb_hma_sram16p -o sim
./obj_dir/sim
```

Replace the testbench name to run one of the block tests. The full-size
end-to-end test takes well under a minute. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/hma_pkg.sv rtl/<module>.sv`. The only
warnings are unused package constants.
