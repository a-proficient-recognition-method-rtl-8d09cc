# Self-motivated arbitration for a multilayer AHB bus matrix

A multilayer AHB bus matrix lets several AHB masters reach several AHB
slaves at the same time: every slave port has its own arbiter, so two
masters that talk to different slaves never wait for each other
(slave-side arbitration). What is left is the conflict at a single slave,
and the usual answers to it (fixed priority or round robin, switched per
transfer) cannot keep every master inside a latency budget.

This design gives each slave port a **self-motivated arbiter**. The
masters tell the arbiters, in spare bits of every address they issue, two
things: a *priority level* and a *desired transfer length* (how many
transfers in a row they want once they own the slave). From these
notifications the arbiter chooses, decision by decision, one of nine
arbitration schemes: three priority policies times three units of
arbitration. A master that knows its deadline can raise its level and
ask for exactly the burst it needs, and the arbiter then serves it in one
piece and moves on.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) with a
self-checking testbench per block. The default configuration is 4 masters
and 2 slaves with 32-bit address and data, which is the size the scheme
was evaluated at.

## The address word as a notification channel

Every AHB address a master issues carries, besides the target, its
current notifications:

| HADDR bits | field        | meaning                                         |
|-----------:|--------------|-------------------------------------------------|
| 31:29      | `S_Number`   | target slave (up to 8)                          |
| 28:26      | `P_Level`    | priority level of the master; 0 = none notified |
| 25:22      | `T_Length`   | desired transfer length; 0 = none notified      |
| 21:0       | `Offset_Add` | address inside the slave (0 .. 2^22-1)          |

The slave sees only `Offset_Add`; the upper ten address bits reach it as
zero. Because the notifications travel with every transfer, a master can
change its level or length at any time without a separate register
interface. Slaves therefore see a 4 Mbyte window each.

## The nine schemes

**Policies** (who wins among the requesters):

* *fixed priority*: the lowest master number wins;
* *round robin*: the first requester after the master chosen last;
* *dynamic priority*: the highest notified `P_Level` wins, ties to the
  lowest master number.

**Units** (how long the winner keeps the slave):

* *transfer*: one transfer, then a new decision;
* *transaction*: one whole burst, its length taken from HBURST of the
  first beat (SINGLE 1, INCR4/WRAP4 4, INCR8/WRAP8 8, INCR16/WRAP16 16; an
  undefined-length INCR is allowed up to 16 beats);
* *desired length*: the `T_Length` transfers the winner asked for.

Each output stage has a 5-bit configuration `arb_cfg_t`
(`{sm_en, base_policy[1:0], base_unit[1:0]}`, encodings in
`rtl/ahb_pkg.sv`). With `sm_en = 0` the arbiter uses `base_policy` and
`base_unit` as they are, so any of the nine schemes can be forced. With
`sm_en = 1` it chooses for every decision:

* the policy is *dynamic priority* if any competing master notified a
  non-zero `P_Level`, otherwise `base_policy`;
* the unit is *desired length* if the winning master notified a non-zero
  `T_Length`, otherwise `base_unit`.

### When a decision is taken

The arbiter's two output registers, **NoPort** (no master owns the slave;
the slave sees HSEL low and HTRANS IDLE) and **Master No.** (the owner),
only load in cycles in which the slave's HREADY is high, and a decision
applies from the next cycle on. In such a cycle the controller decides
again when

1. there is no owner, or the owner has no transfer for this slave in this
   cycle; or
2. the owner's transfer is accepted in this cycle and it is the last one
   of its unit (the counter is at one, or it is the last beat of its
   burst),

and it keeps the owner in every other case, and always while the owner
drives HMASTLOCK. In case 2 the owner is left out of the next choice if
anyone else is waiting: its next transfer is not known yet. If nobody
else is waiting it keeps the slave, so a lone master streams with no idle
cycles.

### Worked example

Three masters all request the same slave at cycle 0. M1, M2 and M3 need
4, 8 and 2 transfers, and must be done within 14, 8 and 10 cycles. The
arbiter sequences below are produced by `tb_sm_arbiter` (the cycle is the
one in which the master's last transfer is accepted):

| scheme                                                     | order           | M1 | M2 | M3 | all within limits |
|------------------------------------------------------------|-----------------|---:|---:|---:|-------------------|
| fixed priority, desired length                             | M1×4 M2×8 M3×2  |  4 | 12 | 14 | no (M2, M3 late)  |
| dynamic priority favouring M3 (latency minimising)         | M3×2 M1×4 M2×8  |  6 | 14 |  2 | no (M2 late)      |
| self-motivated, levels M2 > M3 > M1, lengths 4/8/2         | M2×8 M3×2 M1×4  | 14 |  8 | 10 | yes               |

Through the complete matrix the same self-motivated case takes 14
consecutive slave cycles, one cycle after the requests, because the first
decision is registered (checked by `tb_ml_ahb_busmatrix`).

## Inside the arbiter (`sm_arbiter`)

* **RR block** (`sm_rr_block`) and **P block** (`sm_p_block`) each pick a
  candidate from the request vector. The P block with levels disabled is
  the fixed-priority policy, with levels enabled the dynamic one.
* **MUX_1** selects the candidate of the active policy.
* **MUX_2** selects the `T_Length` of that candidate for the counter.
* **Counter** (`sm_counter`) holds the transfers left in the owner's unit:
  loaded with 1, with the burst length at each first beat, or with
  `T_Length`, and counted down per accepted transfer.
* **Controller**: the decision rule above, the self-motivated selection
  and the lock handling.
* Two **flip-flops** for NoPort and Master No., enabled by HREADY. They
  keep the arbitration logic out of the address path.

Besides NoPort and Master No. the arbiter outputs the policy and unit of
its last decision and a strobe per decision, for observation.

## Path of a transfer through the matrix

```
master m ── input stage ── decoder ──req──> output stage s ── slave s
                 ^            ^                  | arbiter
                 └── accept ──┴──── response ────┘
```

* **Input stage** (`ahb_input_stage`, one per master). A transfer is
  sampled when the master sees HREADY high. If the owning output stage
  takes it in that cycle it goes straight through. Otherwise the input
  stage stores its address and control, the master sees HREADY low, and
  the stored transfer is offered until it is taken.
* **Decoder** (`ahb_decoder`, one per master). It turns `S_Number` into a
  request to one output stage. It also records where the master's data
  phase is: waiting in the input stage, on slave *s*, or at the default
  slave. It returns that slave's HREADY, HRESP and HRDATA to the master.
  An `S_Number` of `NUM_SLAVES` or more gets the two-cycle AHB ERROR
  response from the built-in default slave.
* **Output stage** (`ahb_output_stage`, one per slave). The arbiter
  chooses the owner. A multiplexer drives the slave with the owner's
  offered transfer, and a data-phase register forwards HWDATA from the
  master whose transfer is in the data phase. HMASTER tells the slave
  who the owner is. If the owner changes in the middle of a burst, the
  first SEQ of the new owner reaches the slave as NONSEQ with HBURST INCR.
  The slave therefore always sees a legal burst, even under per-transfer
  arbitration.

Timing, with zero-wait slaves: a master that already owns a slave gets
back-to-back transfers with no added wait state. A master that first has
to win the slave sees at least one wait state while the decision
registers. Each slave's HREADY input is its own HREADYOUT, since one
output stage drives one slave.

## Top level (`ml_ahb_busmatrix`)

| parameter     | default | meaning                          |
|---------------|--------:|----------------------------------|
| `NUM_MASTERS` | 4       | master ports (arbiters accept up to 8) |
| `NUM_SLAVES`  | 2       | slave ports (up to 8)            |

The ports are plain packed arrays indexed by master or slave. They are
`hclk`, `hresetn` (asynchronous, active low) and `cfg[NUM_SLAVES]`. Per
master: `m_haddr`, `m_htrans`, `m_hwrite`, `m_hsize`, `m_hburst`,
`m_hprot`, `m_hmastlock` and `m_hwdata` come in; `m_hready`, `m_hresp`
and `m_hrdata` go out. Per slave: `s_hsel`, `s_haddr`, `s_htrans`,
`s_hwrite`, `s_hsize`, `s_hburst`, `s_hprot`, `s_hmastlock`, `s_hwdata`
and `s_hmaster` go out; `s_hreadyout`, `s_hresp` and `s_hrdata` come in.
Masters and slaves are AHB-Lite: there is no HBUSREQ/HGRANT, and a master
that is waiting for arbitration simply sees HREADY low. The control group
is 15 bits (HTRANS, HWRITE, HSIZE, HBURST, HPROT, HMASTLOCK and HREADY)
and the response 3 bits (HRESP and HREADY).

## Departures and own choices

The scheme's description fixes the block structure, the field widths and
the three-by-three set of schemes. These points are this implementation's
own:

* The placement of the four address fields, and 0 meaning "nothing
  notified". As a result, desired lengths run from 1 to 15, not 1 to 16.
  A 16-beat burst is still served whole by the transaction unit.
* A larger `P_Level` means a higher priority. Ties and fixed priority
  favour the lower master number.
* The self-motivated selection rule, and the `arb_cfg_t` configuration
  input that sets the base scheme or forces one of the nine.
* The decision rule in "When a decision is taken". This includes handing
  the slave to another requester after a unit ends, and using HBURST to
  find the length of a transaction.
* The default slave, the SEQ-to-NONSEQ rewrite, and clearing the upper
  address bits towards the slave.
* BUSY transfers are not forwarded, and SPLIT/RETRY are not supported.
* The registered decision delays a contended master's first transfer by
  one cycle. In the worked example the whole schedule therefore starts
  one cycle after the requests, not at cycle 0.

The masters (processor and DMA traffic), the SRAM and SDRAM slaves with
their controller, the protocol checker and the performance monitor of the
original evaluation set-up are test equipment, and they are not part of
this RTL. `tb/ahb_sram_model.sv` is a behavioural SRAM slave with random
wait states that stands in for the slaves.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench              | what it checks |
|------------------------|----------------|
| `tb_sm_rr_block`       | all 2048 request/pointer combinations against a cyclic-distance reference |
| `tb_sm_p_block`        | 3000 random cases against a level*8+(7-number) ranking |
| `tb_sm_counter`        | random load/decrement against a reference count |
| `tb_sm_arbiter`        | the worked example in all three forms, round robin, per-transaction and per-transfer fixed priority, locking, a lone master, random wait states |
| `tb_ahb_input_stage`   | holding and offering against a reference, 3000 random cycles |
| `tb_ahb_decoder`       | requests, default slave and response routing against a data-phase reference |
| `tb_ahb_output_stage`  | directed: grant timing, address clearing, HWDATA routing, wait states, SEQ rewrite, alternation. Then 2000 random round-robin cycles: one acceptance at a time, the right address and write data, and no requester passed over more than three times |
| `tb_ml_ahb_busmatrix`  | the full matrix at default size. Four masters write and read back random bursts under each of the nine schemes and the self-motivated mode, with random slave wait states. Then the worked example, a locked burst and an ERROR access. It also counts that each mechanism occurred |
| `tb_busmatrix_workload` | a processor-and-DMA workload at default size (see below) |

The workload test has two processor-like masters and two DMA-like
masters. The processors issue single-word accesses at level 7 and length
1. The DMA engines issue INCR16 bursts at level 1 and length 4. Both slaves
add 0 or 1 wait states at random. With the default seed it gives:

| scheme                                   | cycles for 504 transfers | worst processor latency |
|------------------------------------------|-------------------------:|------------------------:|
| fixed priority per transaction           | 600 | 30 |
| round robin per transaction              | 650 | 53 |
| self-motivated (base: round robin/transaction) | 500 | 10 |

The test fails if the self-motivated worst case is not below the
round-robin one.

To run one with plain Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/ahb_pkg.sv tb/tb_ml_ahb_busmatrix.sv --top-module tb_ml_ahb_busmatrix
./obj_dir/Vtb_ml_ahb_busmatrix
```

The end-to-end run takes about 2200 cycles and well under a second. The
RTL also carries concurrent assertions: the owner is stable while the
slave stalls, the address phase is stable during wait states, at most one
output stage accepts a master's transfer, and a held transfer implies a
stalled master.

## Files

* `rtl/ahb_pkg.sv`: widths, address-field helpers, AHB enums,
  `arb_cfg_t` and `ahb_aphase_t`
* `rtl/sm_rr_block.sv`, `rtl/sm_p_block.sv`, `rtl/sm_counter.sv` and
  `rtl/sm_arbiter.sv`: the arbiter
* `rtl/ahb_input_stage.sv`, `rtl/ahb_decoder.sv` and
  `rtl/ahb_output_stage.sv`: the stages
* `rtl/ml_ahb_busmatrix.sv`: the top
* `tb/`: one testbench per block, plus `ahb_sram_model.sv`
