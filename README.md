# Sequence loader for fast PHY configuration on an ATE

On an automatic test equipment (ATE) the configuration registers of a SerDes
PHY can only be reached through JTAG. Every register write is shifted in
serially: first the address, then the data. That costs about 26 times a write
on the PHY's internal parallel register bus. A test that changes protocol rate
many times sends the same routines of register writes again and again, and
those routines take up a large share of the test time.

This design stores those routines inside the chip. The tester writes a single
*sequence number* into a dedicated register. A small engine next to the PHY's
register controller then replays the whole routine on the parallel bus at full
speed. When the routine has finished, the engine puts the register back to its
default value. The tester polls that register to learn that the routine is
done.

The RTL contains the engine (`seq_loader`) and everything that makes it work
end to end: a JTAG TAP, a translator from JTAG scans to parallel-bus accesses,
a direct parallel host port for fast simulation, and an arbiter. The arbiter
shares the register controller's bus between the host and the engine. The PHY
and its register controller are outside this design.

## How a sequence runs

1. The tester writes the value `n` to the sequence register at `SEQ_REG_ADDR`
   (0xFFF0). It can do this through JTAG, or in simulation through the direct
   parallel port. The low five bits of `n` pick the sequence.
2. The register stores `n`, acknowledges the write and pulses `start`.
3. The iterator raises `active`. The 5-to-32 decoder then enables the one
   sequence block numbered `n`.
4. The iterator steps a position counter `pos` from 0. The enabled block shows
   the (address, data) pair at `pos`. The iterator issues it as a parallel
   write and holds it until the register controller acknowledges. `pos`
   advances on the acknowledge, and the next write starts in the following
   cycle.
5. The iterator stops after the block's last entry is acknowledged. If the
   slot holds no sequence, it stops at once. It then drops `active`, which
   disables every block, and pulses `done`.
6. `done` sets the sequence register back to `SEQ_REG_DEFAULT` (0xFFFF). The
   tester reads the register. While the routine runs it reads back `n`; once
   the routine has finished it reads 0xFFFF.

The register controller acknowledges one cycle after a request, so every
write takes two cycles. An N-write sequence therefore finishes with `done`
2N+1 cycles after the cycle in which the sequence-register write is
acknowledged. An empty slot takes 2 cycles. While a sequence runs, writes to
the sequence register are acknowledged but ignored.

## The parallel register bus

Every block talks over one handshake. The signals are defined as packed
structs in `seq_pkg`: `par_req_t` has `req`, `we`, `addr[15:0]` and
`wdata[15:0]`; `par_rsp_t` has `ack` and `rdata[15:0]`.

- The master raises `req` and holds `we`, `addr` and `wdata` stable until
  `ack`.
- `ack` is a single-cycle pulse and only answers a request. On a read,
  `rdata` is valid in the ack cycle.
- The master may start its next transfer in the cycle after the ack.
- A slave that registers its ack (`ack <= req & ~ack`) completes each transfer
  in two cycles, back to back.

`par_checker` holds these rules as concurrent assertions. The top instantiates
it on the port to the PHY.

## Inside the loader

| Block | Module | Role |
|---|---|---|
| Sequence register | `seq_reg` | Parallel slave. A write stores the value and starts a sequence; `done` reverts the register to the default. |
| Decoder | `seq_decoder` | 5-to-32 one-hot decoder, gated by the iterator's `active`. |
| Sequence blocks | `seq_block` (×24) | Each holds one constant table of (address, data) pairs and outputs the entry at `pos` while enabled, or zero while disabled. |
| Iterator | `seq_iterator` | Three-state FSM (idle, run, finish). It steps `pos`, issues the writes, waits for each ack and ends the run. |

The sequence blocks output zero while disabled, so their outputs are simply
ORed onto one bus. An assertion in `seq_loader` checks that at most one block
answers at a time. The decoder has 32 slots but only 24 sequences are stored.
Selecting slot 24–31 ends at once and reverts the register, so the default
value 0xFFFF (slot 31) is harmless if the tester writes it.

### Sequence contents

The real routines are a vendor's rate-change register settings. Their lengths,
addresses and values are not public. The tables here keep what is known about
them:

- There are 24 sequences. Sequences 0–11 are the longer "type 1" routine and
  sequences 12–23 the shorter "type 2" routine.
- The two routine types configure different parts of the PHY.
- One type-1 call takes about twice as long as a type-2 call.

Everything else is a placeholder, computed in `seq_pkg` (used by `seq_len`,
`seq_addr` and `seq_data`):

- type 1: 32 writes to 0x1000 + k; type 2: 16 writes to 0x2000 + k;
- data of entry k of sequence id: `{3'b000, id[4:0], ((37*k + 11*id) mod 256) ^ 8'h5A}`.

`seq_block` builds its table at elaboration from these functions, so
synthesis sees a ROM. To use real sequences, replace the three functions with
a lookup of the real tables. Each block can index up to 2^`POS_W` = 256
entries.

## JTAG access path

`jtag_tap` is an IEEE 1149.1 TAP controller with the standard 16-state
machine, a 4-bit instruction register and IDCODE and BYPASS registers. It runs
entirely in the system clock domain:

- TCK, TMS, TDI and TRST are passed through two-flop synchronizers.
- The edges of TCK become one-cycle enables.
- TCK must therefore be slower than clk/4.
- TDO changes on the falling edge of TCK, as the standard requires.
- Update-IR and Update-DR take effect on the TCK rising edge that leaves the
  update state.

| IR code | Instruction | Data register |
|---|---|---|
| 0000 | EXTEST | bypass (there is no boundary-scan chain) |
| 0001 | IDCODE (reset value) | 32-bit ID 0x1C0DE0A5 |
| 0010 | SAMPLE/PRELOAD | bypass |
| 1000 | PAR_ADDR | 16 bits. Capture returns the current address; update loads a new one. |
| 1001 | PAR_WRITE | 16 bits. Update writes the shifted data at the address. |
| 1010 | PAR_READ | 18 bits. Update starts a read; the next capture returns `{error, pending, data}`. |
| 1111 | BYPASS | 1 bit |

`jtag_par_bridge` holds the registers of the three private instructions and
masters the parallel bus. A register write is two DR scans, address then
data. A register read is three DR scans: address, a PAR_READ scan whose update
launches the read, and a second PAR_READ scan whose capture returns the data.

`pending` means the launched transfer has not been acknowledged yet. If
another update arrives during that time, it is dropped and `error` is set.
Capturing PAR_READ clears `error`.

With TCK at clk/8, the end-to-end test gives these times. The loader time
includes the sequence-register write and the polling until the register
reverts.

| Routine (placeholder length) | Register by register over JTAG | Through the loader | Share |
|---|---|---|---|
| type 2, 16 writes | 992 TCK | 149 TCK | 15 % |
| type 1, 32 writes | 1984 TCK | 149 TCK | 7 % |

The loader's cost barely depends on the routine's length. JTAG, by contrast,
pays about 62 TCK per register. The original work reports a type-1 routine cut
to about a tenth of its time, in the vendor's environment and with routines of
a different length.

## Sharing the register bus

`par_router` picks the host path with `host_sel`: 0 is JTAG, 1 is the direct
port. Change `host_sel` only while neither path has a request outstanding. The
router sends accesses to `SEQ_REG_ADDR` to the loader and all other addresses
to the PHY side. The host that is not selected never sees an ack.

`par_arbiter` gives the PHY port to the loader (master 0) or the host
(master 1):

- When the bus is free, the loader wins.
- A granted transfer keeps the bus until its ack.
- The loader requests back to back, so a host write issued during a sequence
  waits until the sequence is over. `host_stall` shows this wait.
- Grant is combinational, so an uncontested request adds no cycle.

## Top level: `seq_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `tck`, `tms`, `tdi`, `trst_n` | in | 1 | JTAG pins |
| `tdo` | out | 1 | JTAG data out |
| `host_sel` | in | 1 | 0: JTAG path, 1: direct parallel port |
| `host_req` / `host_rsp` | in/out | 34 / 17 | direct parallel host port |
| `phy_req` / `phy_rsp` | out/in | 34 / 17 | to the PHY register controller |
| `seq_busy`, `seq_done` | out | 1 | sequence running; end-of-sequence pulse |
| `host_stall`, `jtag_pending` | out | 1 | host waiting for the loader; JTAG transfer outstanding |

The top has no parameters. The sizes are in `seq_pkg`: 16-bit address and
data, 24 sequences, a 5-bit sequence bus, 32/16 writes per routine type, and
the register address and default value. `seq_loader` takes `N_SEQ`, which
defaults to the package value.

## What follows the original architecture and what is this design's own

These parts follow the original architecture:

- a register that a single write turns into a whole configuration routine;
- a 5-to-32 decoder feeding one block per stored sequence;
- an iterator that gives the blocks their position, waits for each
  parallel-bus acknowledge, stops the blocks and reverts the register;
- 24 sequences of two routine types;
- JTAG commands that are translated into parallel-bus accesses, address
  first;
- two-cycle parallel writes.

These parts are this design's own choices:

- the bus widths, the handshake details, the register address and its default
  value 0xFFFF;
- ignoring writes while busy, and the behaviour of empty slots;
- OR-combining the outputs of the blocks;
- a clock enable on `pos` instead of a separate block clock;
- the JTAG instruction codes, register lengths and the pending/error status;
- sampling TCK in the system clock;
- the router, the direct host port and the fixed-priority arbiter;
- the sequence contents, which are placeholders (see above).

## Not included

- The PHY's register controller and registers. The testbenches use a
  behavioural model, `tb/phy_reg_model.sv`, which acknowledges after a
  settable latency and logs every write.
- The SerDes data path: serializer, driver, PLL, CDR and loopback. The loader
  only configures registers.
- A boundary-scan chain behind EXTEST and SAMPLE/PRELOAD.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `seq_decoder_tb` | every select value, with the enable high and low |
| `seq_block_tb` | every position of type-1, type-2 and empty blocks, against the layout recomputed in the testbench |
| `seq_reg_tb` | reset value, two-cycle access, one start pulse per write, busy readback, ignored second write, revert on `done` |
| `seq_iterator_tb` | write order and data, `active` window, 2N+1 timing, empty slot, a slow controller |
| `seq_loader_tb` | all 32 sequence numbers write by write, timing, busy and default readback, writes while busy, a slow controller |
| `jtag_tap_tb` | IDCODE, IR capture pattern, bypass delay, enables for the private instructions, TMS reset and TRST |
| `jtag_par_bridge_tb` | address-then-data writes, reads, pending and error status, no access under standard instructions |
| `par_router_tb` | random routing and response selection |
| `par_arbiter_tb` | two random masters: completion and order, priority on a free bus, stall flag, protocol assertions |
| `seq_top_tb` | runs end to end at default sizes. It covers JTAG identification and register access, a routine sent over JTAG against the same routine through the loader, all 32 sequence numbers on the direct port, a host write stalled by a running sequence, an ignored restart, and switching between the two access modes. It counts each of these and fails if one never happened. |

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/seq_pkg.sv rtl/jtag_pkg.sv tb/seq_top_tb.sv --top-module seq_top_tb
./obj_dir/Vseq_top_tb
```

Use the same command with another testbench name for the other blocks.
Verilator simulates with two states, so every testbench resets or initialises
all that it reads.
