# PFIF: a portable interface between an FPGA accelerator IP and its board

An accelerator IP written for one reconfigurable computer usually cannot be moved
to another one. The reason is not the algorithm but the plumbing. Each platform
has its own vendor cores for the host link and for the on-board SRAM. Each has
its own SRAM widths, depths and latencies. Each has its own way of moving data
between host memory and the board.

PFIF (Portable Framework InterFace) puts one generated block between the vendor
cores and the IP. The IP describes what it needs:

- how many input and output registers;
- which memory banks, each with an access type, a width and a depth.

It then sees exactly those ports and nothing else. The platform-specific work is
done below the IP and is invisible to it:

- packing logical banks onto physical SRAM modules;
- adding read-valid flags;
- running DMA to host memory;
- decoding host accesses.

Only that lower layer changes when the IP moves to another board.

This repository holds synthesizable SystemVerilog for that block in one
configuration. It is configured for a board with four 64-bit, 4 MB SRAM modules
and a 64-bit host link (the Cray XD1 figures). Plugged into it is the example
IP: a DES encryptor with two pipelined DES cores that consumes 128 bits per
clock.

## Layers

From the board upward:

| Layer | Modules | Platform-specific? |
|---|---|---|
| Vendor services (host link, SRAM pins) | outside this RTL; their signals are the ports of `fpga_top` | yes |
| Control layer (PFCL) | `pfif_local_mem_ctrl` (one per SRAM module), `pfif_comm_service` | yes |
| PFC interface | the `pfc_mem_req_t` / `pfc_mem_rsp_t` module ports, the bank host ports and the host-memory master | common |
| Services | `pfif_reg_block`, `pfif_logical_mem`, `pfif_seq_in`, `pfif_seq_out`, `pfif_dma_rd`, `pfif_dma_wr`, `pfif_fifo`, `pfif_ctrl` | common |
| IP interface | ports of `pfif` toward `user_logic` | common, generated per IP |

`pfif` instantiates all of these for the DES configuration. `fpga_top` adds the
DES IP (`user_logic`, two `des_core`s). The shared types and constants live in
`pfif_pkg`.

## Logical banks on physical modules

This is the heart of the design: `pfif_logical_mem`.

The IP asks for a bank of `LOG_DEPTH` words of `LOG_W` bits. The module
parameters derive the mapping at elaboration:

- **Wide words** (`LOG_W` a multiple of 64): `LANES = LOG_W/64` modules sit
  side by side. One logical word is one row across all lanes.
- **Narrow words** (32, 16 or 8 bits): `SUB = 64/LOG_W` words share one 64-bit
  module word.
  - The low address bits pick the slice.
  - Writes use byte enables.
  - Reads select the slice in an extra register stage.
- **Depth**: a module holds 512 Ki rows. `GROUPS = ceil(rows / 512Ki)` groups
  of lanes are stacked, and the high address bits pick the group.
- **Module count**: the bank uses `LANES x GROUPS` whole modules. A module is
  never shared between two banks.

Examples for 4 MB modules:

| Bank | Modules |
|---|---|
| 8 MB x 128 bits (DES) | 2 (side by side) |
| 6 MB x 128 bits | 2 |
| 10 MB x 64 bits | 3 (stacked) |
| 2 MB x 32 bits | 1 (two words per module word) |

Widths must be 8, 16, 32 or a multiple of 64. A width such as 24 or 56 is
rejected by an elaboration-time assertion.

### Bank types

`MEM_TYPE` selects the bank type. It decides which ports are live. A request on
a port that the type does not have is ignored.

| Type | IP read | IP write | Host access |
|---|---|---|---|
| Shared IN | yes | – | yes |
| Shared OUT | – | yes | yes |
| Shared IN/OUT | yes | yes (one IP request per cycle) | yes |
| Local | yes | yes | – |

Sequential IN and Sequential OUT are not random-access banks. They are the
separate `pfif_seq_in` / `pfif_seq_out` channels described below.

### Host side of a bank

The host port is 64 bits wide. Host word `h` is lane `h % LANES` of row
`h / LANES`. For banks narrower than 64 bits, host word `h` is bank word `h`.

**The IP has priority.** In any cycle in which the IP issues a request, the host
port's `h_ready` is low and the host waits.

**Read routing.** Read responses come back from the modules in order. A small
tag FIFO records, for each read, its source (IP or host), group, slice and
lane. This steers the data to the right port.

### Latency

- The SRAM returns data `RD_LAT-2` cycles after the strobe.
- `pfif_local_mem_ctrl` adds an input and an output register, so a module read
  takes `RD_LAT` = 10 cycles.
- The bank adds one output stage for lane/slice/group selection, so the IP sees
  `mem_x_rd_data_vld` **`RD_LAT + 1` = 11 cycles** after `mem_x_rd_cmd`.

Every bank accepts one read or one write per cycle and is fully pipelined.

I use one extra cycle for every geometry. The motivating description only
requires it for narrow banks and suggests more for multi-module banks. A single
stage is enough here because the module selection is a mux on registered data.

## Host address map

The host slave port takes 28-bit word addresses of 64-bit words. Bits 27:24
select a region:

| Region | Target |
|---|---|
| 0 | register block (word index in bits 5:0) |
| 1 | mem_0 host port |
| 2 | mem_1 host port |
| others | unmapped: writes are dropped, reads return 0 |

**Read order.** Reads return in issue order. A read to a region other than the
last one waits until all earlier reads have returned. This is needed because
registers answer in 1 cycle and banks in 11.

**Bank ownership.** While the run controller owns the banks (during load and
store), host bank accesses are held off.

Registers (64 bits each):

| Index | Name | Meaning |
|---|---|---|
| 0 | CTRL | write bit 0 = 1: start a run. Read: status — bits 2:0 state (0 idle, 1 load, 2 run, 3 drain, 4 store, 5 done), bit 8 busy, bits 47:16 completed runs |
| 1, 2, 3 | LOAD_HADDR, LOAD_WORDS, LOAD_BANK | DMA host memory -> bank, host word address, count of 64-bit words, bank number |
| 4, 5, 6 | STORE_HADDR, STORE_WORDS, STORE_BANK | DMA bank -> host memory |
| 7, 8 | SQI_HADDR, SQI_WORDS | Sequential IN source |
| 9, 10 | SQO_HADDR, SQO_WORDS | Sequential OUT destination |
| 16 + i | reg_in[i] | IP input registers (host writes, IP reads). DES: 16 = key, 17 = number of 128-bit words |
| 32 + i | reg_out[i] | IP output registers (IP writes, host reads) |

Register reads take one cycle.

## A run

`pfif_ctrl` supports both ways of using an accelerator:

- **Subroutine style**: the framework moves the data.
- **Interactive style**: the host moves the data itself through the slave port,
  and sets the load and store counts to zero.

The sequence after a start:

1. **LOAD**: a DMA read engine streams `LOAD_WORDS` host words from
   `LOAD_HADDR` into the host port of bank `LOAD_BANK`, from word 0 up. It
   keeps one request per cycle in flight, limited by the room in its FIFO.
2. **RUN**:
   - `user_logic_go` pulses for one cycle.
   - The sequential channels start at the same time.
   - The controller waits for the one-cycle `user_logic_done` pulse.
3. **DRAIN**: the controller waits until the Sequential OUT channel has sent
   every word and no host read is outstanding.
4. **STORE**: bank `STORE_BANK` is read from word 0 and written to host memory
   at `STORE_HADDR`.
5. **DONE**: shown in the status register. A new start begins again at step 1.

Steps with a zero count are skipped.

### DMA arbitration

Host-memory traffic comes from four DMA engines: load, store, Sequential IN and
Sequential OUT. `pfif_comm_service` arbitrates between them round-robin, one
request per cycle. A tag FIFO routes read data back to the engine that asked.

Writes are posted: an engine counts a write as done when host memory accepts
it.

### Sequential channels

These have no address. Words go in order from the first.

- **Sequential IN**: the IP sees `rd_avail`. A one-cycle `rd_cmd` returns the
  next word on `rd_data` with `rd_data_vld` one cycle later. A `rd_cmd` while
  `rd_avail` is low is ignored.
- **Sequential OUT**: `wr_cmd`/`wr_data` is accepted when `wr_ready` is high.
  The channel stops after `SQ*_WORDS` host words.

The IP word width `DW` (`SEQ_IN_W` / `SEQ_OUT_W` on `pfif`) may be 8, 16, 32,
64 or a multiple of 64. The transfer counts are always in 64-bit host words.

- **Narrow words** are sliced out of, or packed into, host words. The first IP
  word goes in the least significant slice.
- **Wide words** take consecutive host words, the first in the low bits.
- **Partial words are never transferred.**
  - Sequential IN, wide words: give a host-word count that is a whole number
    of IP words. A partial last group is never presented.
  - Sequential OUT, narrow words: the IP must write a whole number of host
    words. A partial last host word is not sent.

## The DES example

The IP port list follows the interface that the framework generates for DES:

| Port | Width |
|---|---|
| `mem_0_rd_cmd`, `mem_0_rd_addr` | 1, 19 |
| `mem_0_rd_data`, `mem_0_rd_data_vld` | 128, 1 |
| `mem_1_wr_cmd`, `mem_1_wr_addr`, `mem_1_wr_data`, `mem_1_wr_be` | 1, 19, 128, 16 |
| `reg_in0`, `reg_in1` | 64, 64 |
| `user_logic_go`, `user_logic_done` | 1, 1 |

What `user_logic` does:

- On go, it reads `reg_in1` words from mem_0, one per cycle.
- Each 128-bit word is two DES blocks:
  - bits 127:64 go to one `des_core`;
  - bits 63:0 go to the other.
- Both cores use the key in `reg_in0`.
- The ciphertext is written to the same index of mem_1.
- One cycle after the last write, `user_logic_done` pulses.

`des_core` is standard DES encryption (ECB) with a 17-stage pipeline: an initial
stage plus one stage per round. The key schedule travels through the pipeline
with the data, so the key may change on any cycle.

## Simulating

Each `rtl/` file holds one module or package. Each `tb/tb_*.sv` is a
self-checking testbench that ends with a `TB_RESULT checks=N failures=M` line.
Helper models live in `tb/`:

- `sram_model.sv`: SRAM module;
- `hmem_model.sv`: host memory that refuses a set percentage of requests;
- `des_ref_pkg.sv`: reference DES function;
- `lm_harness.sv`: a bank with its controllers and SRAMs;
- `seq_in_harness.sv`, `seq_out_harness.sv`, `seq_word_pkg.sv`: one sequential
  channel of a given width, and its test data.

With verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/pfif_pkg.sv tb/des_ref_pkg.sv tb/sram_model.sv tb/hmem_model.sv \
        rtl/*.sv tb/tb_des_workload.sv --top-module tb_des_workload
    ./obj_dir/Vtb_des_workload

Swap the last file and the top module name for any other testbench.
Add the helper files a testbench instantiates:

- `tb_pfif_logical_mem` needs `tb/lm_harness.sv`;
- the sequential testbenches need `tb/seq_word_pkg.sv` (listed first) and their
  harness.

### What the testbenches cover

| Testbench | What it runs |
|---|---|
| `tb_des_workload` | Full size, all defaults. 8 MB of plaintext (524288 words of 128 bits): DMA load into mem_0, encryption, DMA store back, every ciphertext word checked against the reference. |
| `tb_fpga_top` | All defaults, 40-word runs. A subroutine run with a sequential loop-back, then an interactive run. |
| `tb_pfif_logical_mem` | Shared IN/OUT banks of 128-bit x 4096, 32-bit x 8192 and 64-bit x 10 MB (three stacked modules); a 16-bit Local bank, a 128-bit Shared IN bank and an 8-bit Shared OUT bank, with requests on their missing ports checked to be ignored. |
| `tb_pfif_seq_in`, `tb_pfif_seq_out` | Channels 16, 64 and 128 bits wide. |
| the others | One block each, with random stalls and refusals. |

Measured in `tb_des_workload` (about 13 s of simulation):

| Phase | Cycles |
|---|---|
| load | 1,048,595 (one host word per cycle) |
| encryption | 524,317 (128 bits per cycle) |
| store | about 1,048,900 |

At 200 MHz:

| Figure | This design | Reference |
|---|---|---|
| Encryption rate | 3.2 GB/s | – |
| Whole run | 0.64 GB/s | 0.57 GB/s reported for the real Cray XD1 system |

The 0.64 GB/s figure assumes a host memory that accepts a request every cycle.

`tb_fpga_top` counts each mechanism and fails if one never happens:

- go and done;
- DMA reads and writes;
- sequential words in and out;
- host bank reads and writes;
- a host access held behind the IP;
- a refused host-memory request;
- two DMA engines competing in one cycle.

## Departures and open points

- **Vendor interfaces.** The host slave, host-memory master and SRAM port shapes
  are generic stand-ins for vendor cores that are not described here. On a real
  board, `pfif_comm_service` and `pfif_local_mem_ctrl` must be adapted to them.
  That adaptation is exactly the platform-specific layer.
- **One platform.** Only the four-module, 64-bit platform is built. A platform
  with 128-bit modules would need a different package, with each DES bank on one
  module. The IP would see the same ports.
- **Configuration generator not included.** The host-side generator that picks
  the register counts and bank types is software and is not included. `pfif`
  is the DES configuration written out by hand. `pfif_logical_mem` and
  `pfif_reg_block` are parameterized for any configuration.
- **Choices of this design.** These are all my own choices:
  - the register map;
  - the run controller with its descriptors;
  - go and done as one-cycle pulses;
  - `reg_in1` counting 128-bit words;
  - the in-order rule on the host slave port;
  - IP priority over the host on a bank;
  - round-robin DMA arbitration;
  - FIFO depths (16).
- **Extra services.** `pfif` has one output register and one pair of sequential
  channels, which the DES IP does not use. They are brought out at `fpga_top` so
  that every service is present and tested.
- **Unused fill-level outputs.** Some FIFO `count`/`full` outputs are left unread
  on purpose (lint reports them as unused signals). The engines are
  credit-limited, so those FIFOs cannot overflow. Each FIFO asserts this.
