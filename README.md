# (σ, ρ) flow regulator for AXI on-chip interconnect

An IP block that injects traffic into a shared on-chip interconnect as fast
as it can creates bursts. Bursts make other flows wait, spread their delays
(jitter) and force the network to buffer a lot. This design puts a small
regulator between an IP's AXI port and the interconnect. The regulator
reshapes each traffic flow so that it never exceeds a **(σ, ρ) envelope**:

- at most **σ** transfers go back to back (the burstiness);
- on average no more than **ρ** transfers per cycle go out (the rate).

In any window of `t` cycles, a regulated flow therefore carries at most
about `σ + ρ·t` transfers. The regulator never drops data. It only holds
the master back by keeping READY low. If ρ is at least the flow's own
average rate, the flow's throughput is unchanged; only its shape changes.
With σ equal to the flow's own burst size the regulator has no effect. With
σ = 1 the transfers are spread as evenly as the rate allows.

The RTL has two layers:

1. a **single-flow regulator** built on a token bucket;
2. a **multiflow regulator** that shares one AXI channel among many flows.
   It holds three single-flow regulators and a three-entry parameter table,
   and loads the right regulator on the fly. It comes in a master-side
   version (W channel) and a slave-side version (R channel).

## The token bucket in hardware

The rate is given as a fraction of two integers, `ρ = m/n`: *m tokens every
n cycles*. Each flow has three integer parameters, `(n, m, σ)`, each 10 bits
wide.

```
             n ──► [R] ──► mux ──► count-down counter c ──┐
                                                          ▼
             m ─────────────────────────────► comparator: c >= n - m + 1 ──► token
                                                          ▲                    │
                                         enable (x < max) │                    ▼
  σ ─────────────────────────────────────────────► token bank x (0..max(σ,1))
                                                                               ▲ -1
  master ──valid/data──► [data register] ──► interconnect                      │
         ◄──ready────────  (grant: x > full)     └── monitor: transfer left ───┘
```

**Token generator** (`token_generator.sv`). An 8-bit count-down counter
starts at `n` and moves down by one each cycle. After it reaches 1 it is
reloaded with `n`, which is kept in a register. The comparator issues one
token in every cycle where `c >= n - m + 1`. Those are the first `m` cycles
of each `n`-cycle period, so exactly `m` tokens are made per period.
Edge cases:

- `m = 0` makes no tokens;
- `m >= n` makes a token every cycle;
- `n` must fit in the counter (`n <= 255`), and an assertion reports a
  larger value.

The tokens of one period come in consecutive cycles. For an even spread,
give the rate as `1/n`, with `m = 1`.

**Token bank** (`token_bank.sv`). The bank is a saturating credit counter
`x`. Loading the parameters fills it to its maximum, `max(σ, 1)`. A token
adds one, and a transfer that leaves removes one. While the bank is full,
the comparator is disabled, so tokens that arrive then are lost. This loss
is what limits the burst to σ.

**Data path and monitor** (`reg_datapath.sv`). The data path is a
one-transfer register. Every transfer passes through it and leaves one
cycle after it is accepted, at the earliest. The monitor sits on the
register's output and reports each transfer that leaves, and that removes
the transfer's token from the bank.

**Admission rule** (`flow_regulator.sv`). A transfer waiting in the
register already owes one token, so the master sees READY only while
`x > full`. This keeps the number of transfers admitted within the tokens
actually held, even under back-pressure from the interconnect.

### Timing of a single regulator

- A load (`cfg_load`) resets the period counter and fills the bank. The
  regulator can accept a transfer in the next cycle.
- In steady state with σ = 1 and `m = 1`, transfers are exactly `n` cycles
  apart. The token made in the first cycle after a load finds the bank
  full and is lost, so the first gap after a load can be `n + 1`.
- The counter runs freely and is not aligned with the master's traffic. If
  the bank is full when a burst starts, the second token may come at any
  point of the period. So two transfers can be closer than `n` cycles even
  at σ = 1. The `σ + m·⌈t/n⌉` envelope still holds, and the testbenches
  check it for every window.

Example: 8 transfers at the start of every 40 cycles, with `(n, m, σ) =
(5, 1, 1)`. The output is one transfer every 5 cycles, and all 8 still
leave within each 40-cycle period.

## The multiflow regulator

`multiflow_regulator.sv` regulates any number of flows that share one
valid/ready channel. Each transfer carries a **flow ID** as a sideband
signal (`in_fid`, 5 bits), which is the only signal added to AXI. The
block contains:

- `param_table.sv`: three entries of `(flow ID, n, m, σ)` held in
  registers. Entries are written through a write port and searched by flow
  ID in one cycle.
- three `flow_regulator`s. Each one is free or *holds one active flow*.
  Every regulator keeps making tokens for its flow, even while that flow is
  not sending.
- an input demultiplexer that steers a transfer to its flow's regulator,
  and an output multiplexer that merges the regulated transfers.
- `mf_controller.sv`: the FSM that decides all of this.

### Controller behaviour

Each cycle, the controller compares the flow ID of the offered transfer
with the IDs held by the three regulators.

- **Active flow (hit).** The transfer goes to that regulator in the same
  cycle, and the master's READY is that regulator's READY. With a token
  free, the transfer is accepted in the cycle it is offered.
- **Inactive flow (miss).** READY stays low, and loading takes two extra
  cycles:
  1. In the cycle of the miss, the controller reads the table entry and
     latches it. It picks a free regulator, or else the one **least
     recently used**. A regulator counts as used when it is loaded or
     accepts a transfer.
  2. In the next cycle (state `CONFIG`) it loads the chosen regulator.

  The transfer is accepted in the cycle after that, exactly two cycles
  later than a hit. A reloaded regulator starts with a full bank.
- **Unknown flow.** If the flow ID is not in the table, the transfer is
  held and `unknown_flow` pulses each cycle. It goes through once software
  writes an entry for it.

**Ordering.** All regulators share one output, and AXI write data must stay
in order. So a transfer is steered to a regulator only while no *other*
regulator holds a transfer in its data register. For the same reason, the
`CONFIG` state waits until the chosen regulator's register is empty. The
cost is a bubble of at most one cycle when the flow changes while the
output is stalled.

**Head-of-line blocking.** The master offers one transfer at a time. A
transfer waiting for a token therefore also blocks the transfers of other
flows behind it.

This matters when choosing parameters. Suppose two flows of one master are
each regulated with σ = 1, at exactly their average rates. While one flow
waits for a token, the other flow's bank is already full, so the tokens it
receives are lost. Over time the master falls behind without bound. Leave
some slack instead: either round the rates up, so that the flows' holding
times fit in one window together, or give the banks room to absorb the
wait. For example, one flow at 16 transfers per 256 cycles and one at 2 per
256 cycles stay bounded with `(14, 1, 1)` and `(32, 1, 1)`, or with
`(16, 1, 8)` and `(128, 1, 2)`. They do not stay bounded with `(16, 1, 1)`
and `(128, 1, 1)`.

### Master side and slave side

- **Master side** (W channel, in the top). The payload is
  `{WDATA, WSTRB, WLAST}`. The master supplies `s_wfid`, and WREADY to the
  master comes from the controller.
- **Slave side** (`axi_slave_regulator.sv`, R channel). A slave does not
  know about flows. So the regulator watches the AR handshakes and records
  each request's flow ID under its ARID in `flow_id_table.sv` (one entry
  per ID, a later request with the same ID overwrites). Each R beat from
  the slave is tagged with the flow found under its RID. It then passes
  through its own multiflow regulator, with `{RID, RDATA, RRESP, RLAST}` as
  the payload. If a response's ID was never recorded, the beat is treated
  as flow 0.

## Top level

`axi_flow_regulator_top` places the two side by side:

- the W-channel master-side regulator (`s_w*` → `m_w*`, plus `s_wfid`);
- the R-channel slave-side regulator (`ar_*` observed, `s_r*` → `m_r*`).

Each side has its own table write port (`*_tbl_we/idx/entry`) and status
outputs (`*_reconfig`, `*_unknown_flow`, `*_active`). Writing a table
entry does not change a regulator that is already loaded. The new values
apply the next time that flow is loaded.

Table entries use the packed struct `table_entry_t` from `flow_reg_pkg`:
`{valid, fid[4:0], n[9:0], m[9:0], sigma[9:0]}`, 46 bits.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N_W`, `M_W`, `SIGMA_W` (package) | 10 | widths of n, m, σ and of the bank |
| `CNT_W` (package) | 8 | period counter width; `n` must be ≤ 255 |
| `FID_W` (package) | 5 | flow ID width (enough for 24 flows) |
| `NUM_REG` | 3 | regulators per multiflow regulator |
| `NUM_ENTRIES` | 3 | parameter table entries |
| `DATA_W` | 32 | AXI data width (top) |
| `ID_W` | 4 | AXI ID width (slave side) |

A synthesis of this architecture has been reported with the 8-bit
counter, 10-bit parameters and a three-entry register table. In 180 nm it
came to about 5 K gates at 730 MHz (optimised for area) or 7 K gates at
860 MHz (optimised for timing). Those figures are for orientation only;
this RTL has not been synthesised to gates.

## Where this RTL makes its own choices

The regulator's mechanism is taken as designed: the period counter, the
comparison against `n - m + 1`, a bank of `max(σ, 1)` with saturation,
a two-cycle load, three regulators and a three-entry table. The following
are this implementation's own decisions:

- **Comparison direction.** Tokens are made while `c >= n - m + 1`, because
  that gives exactly `m` tokens per period. The opposite direction would
  make `n - m + 1` tokens.
- **Counter width.** The counter is 8 bits while `n` is 10 bits, so periods
  longer than 255 cycles cannot be used. A rate of `k/256` must be reduced
  or rounded up, for example `14/256 → 1/18`.
- **Handshakes and data register.** The data register uses valid/ready with
  downstream back-pressure. The bank is decremented when a transfer leaves
  the register, which is why admission uses `x > full`.
- **Replacement rule.** Least recently used, counting loads and accepted
  transfers.
- **Output order.** At most one transfer is in flight across the
  regulators.
- **Table.** It has a write port and a valid bit, is searched by flow ID,
  and the lowest index wins for duplicate IDs. Unknown flows are held and
  flagged.
- **Slave side.** The regulator serves the R channel, and it learns flow
  IDs from AR handshakes.
- **Reset.** Reset clears everything. An unloaded regulator admits nothing,
  and every table entry is invalid.
- **Widths.** The flow ID (5 bits), AXI data (32 bits) and AXI ID (4 bits)
  widths are this implementation's choice.

Not included: the masters and slaves, and the evaluation platform around
the regulators. That platform was a 4×4 mesh network-on-chip with TDM
virtual circuits and network interfaces with per-flow buffers, described
only at block level. The network delay and backlog figures measured there
therefore cannot be reproduced with this RTL.

## Verification

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The testbenches compare against reference
models written separately from the RTL, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `token_generator_tb` | tokens exactly in the first m cycles of each period, for several (n, m) including n = 255, m = 0, m = n; none while disabled |
| `token_bank_tb` | random tokens/transfers against a reference saturating counter, σ = 0, 1, 2, 7, 14 |
| `reg_datapath_tb` | accept only when granted and free, order, stability under back-pressure, monitor pulse |
| `flow_regulator_tb` | READY compared each cycle with a reference token bucket; the 8-per-40-cycles example at (5, 1, 1); no effect at (1, 1, 8); envelope under random traffic |
| `param_table_tb` | search, overwrite, invalidate, duplicate IDs, out-of-range writes |
| `mf_controller_tb` | two-cycle load, immediate routing, free-first then LRU replacement, waits for a full victim, ordering hold, unknown flow |
| `multiflow_regulator_tb` | first-transfer latency 2, per-flow spacing, eviction, per-flow parameters kept, scoreboard and envelopes under random traffic |
| `flow_id_table_tb` | random record/look-up against a reference array |
| `axi_slave_regulator_tb` | flow recovered from RID, per-flow spacing, payload, unrecorded ID |
| `axi_flow_regulator_top_tb` | end to end at default parameters: four W flows (one replaces another), two R flows, random back-pressure; scoreboards, per-flow envelopes, and a count of every mechanism (load, replacement, token stall, back-to-back burst, bank saturation, back-pressure, unknown flow, slave-side load and stall) |
| `workload_f41_tb` | a flow of 14 transfers per 256-cycle window under no, medium `(18, 1, 7)` and strong `(18, 1, 1)` regulation: longest back-to-back run 14 / 7 / 1, all transfers within each window, longest hold at the master 15 / 129 / 237 cycles |
| `workload_master_tb` | one master with two flows at the extremes of the evaluated rate range (16 and 2 transfers per 256-cycle window), unregulated, medium and strong: all delivered in order, master backlog within two transactions, σ = 1 flows never back to back, per-flow envelopes |

The RTL also carries assertions:

- the bank never underflows;
- at most one regulator holds a transfer;
- the output is held stable under back-pressure;
- `n` fits the counter.

To simulate, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module axi_flow_regulator_top_tb \
    -y rtl -y tb +libext+.sv rtl/flow_reg_pkg.sv tb/axi_flow_regulator_top_tb.sv
./obj_dir/Vaxi_flow_regulator_top_tb
```

Replace the top module and testbench file to run any other testbench. Each
one finishes in well under a second.
