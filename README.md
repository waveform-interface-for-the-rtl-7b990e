# Waveform interface: replaying recorded optical transmissions into an FPGA DSP

An FPGA-based emulation environment tests a DSP block (for example a carrier-recovery
circuit for a coherent optical receiver) by feeding it a continuous stream of channel
samples and counting the bit errors at its output. This design changes where the samples
come from. The samples are not generated on the chip by channel models. Instead, a
*recording* (a real measured transmission, or one produced offline) is loaded into the
board's DDR3 memory over a UART. The DSP then sees it replayed endlessly, at the speed of
its own clock.

Two facts shape the whole design:

* **DDR3 has plenty of capacity but awkward access.** Through the Xilinx MIG core, a
  transfer is one 512-bit word on a fixed 200 MHz user clock. Each transfer is either a
  read or a write, and waits on handshakes.
* **The DSP wants one sample every clock of its own clock.** That clock is chosen to
  suit the DSP (100 MHz in the reference set-up), not the memory.

The interface bridges the two with a small cache. DDR words are sliced into 16-bit samples
and 4-bit reference symbols. These fill a 32-entry dual-clock cache, and the cache is then
emptied into the DSP in one burst. While the cache refills, the DSP is stalled. The memory
is organised as circular buffers, so the recording repeats without a seam in the logic. The
DSP output is recorded back into DDR, where it can be read out for offline analysis.

```
            200 MHz memory region                          |  simulation region (free clock)
                                                           |
 PC ─UART─> uart_rx ─> comms_controller ─> param_ram ──────┼──────────────> params to DSP
       <─── uart_tx <─┘   │      │    └──> results_ram <───┼─── analysis results
                          │      │                         |
                          v      │                         |
                   memory_manager ─> ddr_controller ─> MIG app_* ports ─> (MIG + DDR3)
                     ^   │   ^                             |
     signal/ref word │   │   │ result words                |
                     │   v   │                             |
                runtime_control  recorder <────────────────┼─── DSP output
                     │ samples+symbols (1 per clock)       |
                     v                                     |
               waveform_cache (2 dual-clock FIFOs) ────────┼──> DSP input (stall while loading)
                                                     └─────┼──> ref_delay ──> analysis
```

The MIG core and its DDR3 module, the DSP under test, and the demodulator/analysis blocks
are not part of this RTL. Their connections are ports of `wfi_top`.

A test runs while the `test_start` input is high. The runtime controller then streams the
stored recording through the cache. When `test_start` is dropped, loading stops at once. A
batch that the DSP is already draining still runs to its end. Under the default sizes, a recording is 1,736 words of samples
followed by 434 words of symbols, loaded once with command 0xD1.

## Two clock regions

Everything that touches the DDR controller runs on `mem_clk`. This is the MIG user clock:
200 MHz, a quarter of the 800 MHz memory clock. The DSP, the read side of the cache, the
reference delay and the packing half of the recorder run on `sim_clk`. The DSP may not
close timing at 200 MHz, so `sim_clk` is left free to choose. Each region has its own
synchronous, active-high reset (`mem_rst`, `sim_rst`).

Only two signals cross between the regions:

* **Data** goes through Gray-coded dual-clock FIFOs (`async_fifo`). Two are inside the
  cache and one is inside the recorder.
* **The level `run`** goes from the runtime controller to the cache's read side, through a
  two-flop synchroniser.

Inside the interface, nothing else crosses. Two things cross at its edge without
synchronisation, because they change only when the PC acts:
* The parameter bytes (`params`, written in the memory region) go to the DSP.
* The analysis results (`analysis_results`, from the simulation region) are sampled by
  the store-results command.

Anything on the DSP side that needs a clean value should take the parameters while the
test is stopped. Likewise, the results should be stored while they are not changing.

## The cache and the batch rhythm (the part that sets throughput)

`waveform_cache` is two FIFOs of depth 32. One holds 16-bit samples and the other 4-bit
reference symbols. They share a write enable and a read enable, so entry *k* of one always
belongs with entry *k* of the other. Depth 32 is one DDR word of samples (512 / 16).

The cache works strictly in batches:

1. **Load.** On `mem_clk`, the runtime controller writes one sample and one symbol per clock
   until the cache reports full. During this time the DSP sees `dsp_valid = 0` and
   `dsp_stall = 1`.
2. **Run.** A full cache makes the runtime controller raise `run`. The read side (on
   `sim_clk`) sees `run` and its own full flag, and reads one entry every clock until it
   is empty. `dsp_sample` and `ref_symbol` come with `dsp_valid`, one clock after the read.
3. **Reload.** When the write side sees the cache empty again, the controller drops `run`
   and loads the next batch.

Loading 32 entries takes 32 memory clocks, which is 16 clocks at a 100 MHz `sim_clk`.
Draining takes 32. The ideal rate is therefore 32 samples per 48 DSP clocks, about 0.67
samples per clock. At 16 bits and 100 MHz that is about 1.07 Gbit/s. The batch is also
held up when the next DDR word has not arrived yet, and by the time the flags take to cross
between the clocks. The full-size simulation measures **0.6155 samples per `sim_clk`**
(0.985 Gbit/s).

The cache depth is a parameter (`CACHE_DEPTH`). Sizes other than one DDR word work, but
they are slower. In the reduced end-to-end test the rates are 0.576 samples per clock at
depth 16, 0.625 at 32 and 0.600 at 64. At depth 16 there are twice as many batch
hand-overs. At depth 64 the load pauses halfway for the next signal word.

The stall is not a fault. It is how this interface trades DDR bandwidth for DSP clock
freedom. The DSP must be written to accept a `valid`/stall input and must not advance its
state on stalled clocks.

## Runtime controller: slicing DDR words into the cache

`runtime_control` holds one 512-bit signal word and one 512-bit reference word. Each has a
slice index that runs up to its range: 32 samples (`SIGNAL_RANGE`) or 128 symbols
(`REFERENCE_RANGE`). Slice *k* is bits `[k*W +: W]`, lowest first. Two state machines run
in parallel:

* **Memory side**
  - States: IDLE → REQ_SIGNAL → WAIT_SIGNAL, or IDLE → REQ_REFERENCE → WAIT_REFERENCE.
  - When a word is used up, it asks the memory manager for the next one (signal first).
  - It waits for `mem_busy`, then for `mem_done`, stores the word and restarts the index.
* **Cache side**
  - States: IDLE → LOAD_CACHE ⇄ WAIT_MEMORY → RUN_SIMULATION → back to loading.
  - It writes while both words still hold data and the cache is not full.
  - When a word runs out mid-batch, it waits for the memory side.

One signal word fills exactly one cache batch, and one reference word lasts four
batches. The memory side fetches the next word as soon as the current one is used up, so
the DDR read overlaps the drain of the cache whenever the manager is otherwise free.

## Memory manager: DDR as three circular buffers

`memory_manager` is the only user of the DDR controller. DDR is laid out as three
sections, one after the other, each word 8 addresses apart (a 512-bit word is a burst of 8
on the 64-bit memory bus):

| section   | words (default)            | contents                    |
|-----------|----------------------------|-----------------------------|
| signal    | `SIGNAL_WORDS` = 1736      | 32 samples per word         |
| reference | `REFERENCE_WORDS` = 434    | 128 symbols per word        |
| result    | `RESULT_WORDS` = 1736      | 32 recorded outputs per word|

The defaults hold a recording of 55,552 samples exactly. That is the length of the
reference use case: a phase-noise-only 16-QAM recording, looped front to back so that its
phase is continuous.

**Runtime operations**
* *Read signal word*, *read reference word* and *write result word*.
* Each section has its own word pointer that wraps at the section's length. This wrap is
  what makes the recording repeat, and what makes the result section hold a rolling window
  of the latest DSP output.

**Comms operations** (for the PC, via the comms controller)
* *Write data* fills the signal section, then the reference section, word by word.
* *Dump data* reads the same words back.
* *Read results* reads the result section.

Comms requests win over runtime requests. Among runtime requests the order is signal,
then reference, then result. A write-data or dump operation therefore stalls the DSP until
it ends.

The manager starts a DDR operation by holding `ddr_start` until the controller drops
`ready`. The operation is complete when `ready` returns. After every operation the manager
passes through WAIT_MEM.

The comms handshake works one word at a time:
* In WAIT_RECEIVE and WAIT_SEND it raises `ready`.
* The comms controller pulses `comms_next` when it has received or sent a word.
* `op_done` pulses after the last word of the section. For a write, this means "memory
  full".

## UART protocol

The link is 8N1. `CLKS_PER_BIT` = 1736, which is 115200 baud from 200 MHz. Multi-byte
words travel least significant byte first, 64 bytes per DDR word.

| command        | bytes from PC    | behaviour |
|----------------|------------------|-----------|
| reset          | `00`             | `test_reset` pulses for one clock |
| store results  | `01`             | the 256-byte results memory takes a snapshot of `analysis_results` |
| get results    | `02 a`           | replies with results byte `a` |
| set parameter  | `03 a v`         | parameter byte `a` := `v`; all 256 are on the `params` port |
| write data     | `D1`, then words | `D0` when ready; after each 64-byte word `D0`, or `DF` after the last word of the reference section |
| read results   | `D2`             | sends each result word (64 bytes); the PC answers `D0` for the next; ends after the last word |
| dump data      | `D3`             | same as `D2`, for the signal and reference sections |
| empty recorder | `04`             | streams the result section from word 0, back to back, with no `D0` from the PC |

Unknown bytes are ignored while idle. The read operations have no end marker: the PC knows
the section sizes.

## DDR controller

`ddr_controller` turns the MIG native interface into one request at a time: `start`, `cmd`
(0 write, 1 read), `addr`, `wdata` → `ready`, `rdata`. Its states are:

| state | action |
|---|---|
| INIT | wait for `init_calib_complete` |
| IDLE | `ready` high |
| REQ_WRITE | hold `app_en` with command 000 until `app_rdy` |
| WRITE_DATA | hold `app_wdf_wren` and `app_wdf_end` until `app_wdf_rdy` |
| WAIT_WRITE | wait for `app_rdy` |
| REQ_READ | hold `app_en` with command 001 until `app_rdy` |
| WAIT_READ | capture `app_rd_data` on `app_rd_data_valid` |
| FINISH | wait until `start` drops |

The outputs are decoded from the state, so a command or data beat cannot change before MIG
accepts it. Assertions in the module check this. Write data follows its command by one
clock, which MIG allows (up to two). Back-to-back writes and byte masks are not used. Only
one command is ever in flight.

## Recorder and reference delay

`recorder` packs 32 consecutive valid DSP outputs (16 bits each, first output in the lowest
bits) into a DDR word on `sim_clk`. The word goes through a 4-deep dual-clock FIFO to
`mem_clk`, where the memory manager writes it into the circular result section. If the
FIFO is full, the word is dropped and `rec_overflow` pulses. Recording never stalls the
DSP.

`ref_delay` is a shift register of `REF_DELAY` stages (default 8). It advances only when a
sample enters the DSP, so it delays the reference by a number of samples, not clocks. Set
`REF_DELAY` to the DSP's latency in samples so that `ref_delayed` lines up with `dsp_out`
for the analysis blocks.

## Parameters of `wfi_top`

| parameter | default | meaning |
|---|---|---|
| `CLKS_PER_BIT` | 1736 | `mem_clk` cycles per UART bit |
| `SIGNAL_WORDS` | 1736 | signal section length, words of 32 samples |
| `REFERENCE_WORDS` | 434 | reference section length, words of 128 symbols |
| `RESULT_WORDS` | 1736 | result window length, words of 32 outputs |
| `REF_DELAY` | 8 | reference delay in samples (match the DSP latency) |
| `CACHE_DEPTH` | 32 | cache entries (power of two); 32 is one DDR word of samples |
| `N_PARAMS`, `N_RESULTS` | 256 | parameter and result bytes (one address byte) |

The widths shared by all modules are in `wfi_pkg`: 512-bit words, 28-bit MIG address,
16-bit samples, 4-bit symbols, and the command codes.

## Where this design departs from, or fills in, its source

* **Cache control.** The cache is written while loading and read while the test runs. The
  original state diagram of the cache controller places the write and read enables the
  other way round; the written description (load when empty, run when full) was followed.
* **Runtime memory operations.** The original gives only the comms path of the memory
  manager's state machine. The runtime read and write states, their priority, the section
  layout and the default section sizes are this design's own.
* **End of a section.** Both comms directions check for the last word after handling it,
  not before.
* **Write data** fills the signal and the reference sections in one operation.
* **Starting a test.** How a test is started is left open in the source. Here it is the
  `test_start` port, which a board wrapper can drive from a button or from a parameter
  byte.
* **"Empty recorder" (0x04)** originally streams a separate recorder memory. Here the
  recorder writes to DDR, so 0x04 streams the DDR result section (0xD2 does the same
  with a 0xD0 handshake per word).
* **Simplest-possible blocks.** The UART, the reference delay, the parameter and results
  memories, the recorder's packing and the dual-clock FIFO are built simply. Their details
  (8N1 at 115200 baud, byte order, depths, widths) are assumptions.
* **Storage capacity.** The original claims room for 4·10⁹ samples in 1 GB. At 20 bits per
  sample, 1 GB holds at most about 4.3·10⁸ samples, so the claim is about ten times too
  large. With the 28-bit address, this design can reach up to 2 GB by raising the section
  parameters.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a
watchdog. With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv rtl/wfi_pkg.sv tb/tb_wfi_top.sv --top-module tb_wfi_top
./obj_dir/Vtb_wfi_top
```

| testbench | what it shows |
|---|---|
| `tb_<module>` | one per module, against independently computed expectations |
| `tb_wfi_top` | end to end, small sizes (4 signal words, 1 reference word, 3 result words, 8 clocks per UART bit) |
| `tb_wfi_full` | the top with every parameter at its default |

`tb_wfi_top` runs the whole design end to end:
* It loads DDR over the UART.
* It dumps DDR back and compares.
* It replays the recording several times through the cache, into a model DSP.
* It checks every sample and the delayed reference.
* It reads the recorded results over the UART and checks them against the model DSP's
  output.
* It empties the recorder (0x04) and compares the stream with the same words.
* It exercises the parameter, store and get-results commands.

It also counts DSP stalls, cache batches, loop-backs, MIG back-pressure on commands and on
write data, result-window wraps and the reset command. A mechanism that never happened
counts as a failure.

`tb_wfi_full` does the following:
* It places the 55,552-sample recording directly in the memory model.
* It replays one full pass plus the loop-back, with a 200 MHz and a 100 MHz clock, and
  checks every sample and the rate.
* It then performs one UART exchange at 115200 baud.

`tb/mig_model.sv` is a behavioural model of the MIG native interface. It has a sparse
memory, random `app_rdy`/`app_wdf_rdy` back-pressure and a fixed read latency.

The design has two-state-safe resets: every register that is read is reset. It
synthesises with no latches; at the defaults this is about 8.6k flip-flop bits, plus the
cache and recorder FIFOs as memories.
