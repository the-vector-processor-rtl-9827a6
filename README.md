# Vector Controller: an 8088 PC with many 8087s as a vector machine

An IBM PC has one 8088 CPU and one socket for an 8087 floating-point
coprocessor. An 8087 does not fetch instructions. It watches the CPU's
bus, keeps a copy of the CPU's instruction queue, and uses the CPU's
queue-status pins to see when one of its own instructions reaches the
head of the queue. So any number of 8087s can sit on the same bus and
listen to the same instruction stream. What they lack is something that
decides which of them act on it.

The Vector Controller makes that decision. It controls two things for
every 8087: its READY input, which holds it in a wait state or lets it
run, and its two queue-status inputs, which either pass the CPU's codes
through or show "no operation". With only these two levers it gives the
machine three modes:

| mode     | entered by             | 87-1                 | 87-2 … 87-N                       |
|----------|------------------------|----------------------|-----------------------------------|
| scalar   | power-up, `DF FE`      | runs, as in a PC     | held in wait, queue status 00     |
| serial   | `DF FF` (FVECTOR-SQ)   | runs the 1st element | run one after another, one each   |
| parallel | `DF FD` (FVECTOR-OP)   | runs                 | all run every instruction at once |

A program loads one operand into each 8087 in serial mode. It then
returns to scalar mode, enters parallel mode and issues ordinary 8087
arithmetic, which every coprocessor executes on its own data. Finally it
stores the results one by one, again in serial mode. The design is a
reconstruction of a 1986 TTL design (R. K. Manja, *The Vector Processor*,
MS thesis), written as synchronous SystemVerilog. The default size is ten
8087s, the largest number the original discusses.

## Signals and conventions

All signals are positive logic and every flip-flop is clocked on the
rising edge of `clk`, the CPU clock. The original circuit mixes
rising-edge and falling-edge flip-flops, asynchronous presets and
active-low strobes. Here each of those strobes is a registered or
decoded pulse, high for one clock. Reset (`rst`) is synchronous and
active high, and puts the controller into scalar mode, which is also the
original's power-up state.

| port | meaning |
|------|---------|
| `bus_status[2:0]` | CPU S2 S1 S0. `100` instruction fetch, `111` passive. |
| `cpu_qs[1:0]` | CPU {QS1,QS0}: `00` none, `01` first byte, `10` queue emptied, `11` subsequent byte |
| `ad[7:0]` | multiplexed address/data bus, AD7..AD0 |
| `r88` | READY from the 8284 clock generator (CPU wait states) |
| `busy[i]` | BUSY of 8087 number i+1 |
| `cop_ready[i]`, `cop_qs[i]` | READY and {QS1,QS0} driven to 8087 number i+1 |
| `vec_op[15:0]` | one-clock pulse on bit k when `DF Fk` is decoded |
| `serial_mode`, `parallel_mode` | mode flags, for observation |

The bus-cycle model behind the timing is this. A bus cycle shows active
status in T1 and T2 (and in any wait states). The status goes passive
for the clock in which the opcode byte is on `ad` (the "data clock",
which is T3 when there are no wait states). T4 follows.

## Recognising a vector instruction (`vector_instr_decoder`)

The codes `DF F0`–`DF FF` are escapes that neither chip uses. They are
register-form escapes (MOD = 11), so the CPU runs no memory cycle for
them, and the 8087 has no opcode there. The controller must spot them on
the bus. The hard part is that the 8088 fetches ahead, so a byte seen on
the bus is only known to be an opcode's first byte right after the queue
has been emptied. That is why every vector instruction must follow a
`JMP` to the next address:

```
        JMP  L1          ; empties the queue: QS = 10
L1:     DB   0DFh, 0FFh  ; FVECTOR-SQ, the first bytes fetched afterwards
```

The decoder is five small blocks:

* `ifetch_monitor` sets `q11` on the queue-empty code. While `q11` (or
  the serial flag) is high, it raises `s` during fetch status.
* `data_enable_gen` turns the fall of `s` into `t31`, a one-clock strobe
  in the data clock. It then makes `cl1` one clock later, in T4.
* `df_monitor` sets `q12` if the byte under `t31` is `DF`.
* `clear_control` counts the monitored fetches with a toggle bit `q1`.
  After the first fetch it gives `clr1` if the byte was not `DF`. After
  the second fetch it gives `clr2` and `clr1` together. The decoder then
  forgets everything until the next queue-empty code.
* `subsequent_byte_decoder` checks, under the second `t31`, that the high
  nibble is `F`, and pulses `vec_op[low nibble]`.

A `DF FF` fetched without a queue-empty code in front of it is ignored.
So are the same bytes as operands of other instructions, and bytes read in
non-fetch cycles. Of the sixteen codes only `DF FD`, `DF FE` and `DF FF`
are used. The other thirteen are decoded and brought out on `vec_op`, and
they change nothing.

In serial mode the fetch monitor stays armed for every fetch (the serial
flag is ORed in), because the controller must find the first `WAIT`
after the loaded instruction.

## Serial mode: parallel loading, then a hand-over chain

This is the least obvious part of the design. In serial mode each 8087
must execute the *same* instruction, for example `FLD [BX]`, but the
program gives it N times with N `WAIT`s in between. The controller
spreads them like this:

1. **Loading into every queue.** `DF FF` sets the serial flag `q31`. On
   T2 of the next bus cycle (`t22`), `sp1` rises, and every 8087's READY
   follows `r88` (`ready = r88 & sp1 & !c1`). So the fetch of the first
   coprocessor instruction after `DF FF` lands in all N queues. The 87-1
   also receives its queue status and starts executing it.
2. **Closing the loading window.** The first `WAIT` byte (`9B`) fetched
   in serial mode sets `c1`. From then on READY is given only to the
   coprocessor whose turn it is. All the others are in wait states, still
   holding the instruction from step 1.
3. **87-1.** `ready1 = r88 & !(c1 & !b1)`. It keeps READY while busy and
   loses it as soon as its BUSY (`b1`) falls. Its queue status is then
   forced to 00.
4. **87-2.** It becomes active when `c1 & !b1`, that is, when the 87-1 has
   finished. A flag `q51` records that the 87-2 itself has been busy. When
   its BUSY falls with `q51` set, `sm2` drops. That ends its turn and is the
   87-3's "previous done". Once the 87-1 is done, the CPU leaves its
   `WAIT` and takes the second `FLD` from its queue. The 87-2 now receives
   the queue status, so it starts the instruction from step 1 on the
   second `FLD`'s memory operand.
5. **87-n, n ≥ 3.** Each is a copy of the 87-2 logic (`coproc_n_control`).
   It is activated by the previous one's done signal, and its own `qn`/`p_n`
   pair marks its end:
   `act = c1 & prev_done & p_n`, `p_n = !(qn & !busy)`.
   The top module chains these through `done_chain`.

The queue-status gate of each coprocessor is
`QS0' = g & QS0`, `QS1' = (g | !QS0) & QS1`, with `g` = "active". The
queue-empty code (`10`) therefore always gets through, even to a waiting
coprocessor, so every copy of the queue is flushed by a `JMP`. The other
codes pass only while `g` is high.

`DF FE` (after a `JMP`) sets `q42`. On the next T2 the one-clock strobe
`sm1` clears `q31`, `c1`, `sp1`, the parallel flags and every
per-coprocessor flag. The machine is back in scalar mode.

**Fewer elements than coprocessors.** A serial block does not have to use
all N coprocessors. The test programs load three and four. The chain
stops being fed after element k, but the hand-over still makes 87-(k+1)
active when 87-k finishes. That coprocessor still holds the block's
first instruction from step 1. With the coprocessor model used in the
testbenches, it starts that instruction on the first-byte code of the
`JMP` in front of `FSCALAR`, and `tb_workloads` checks for this. The
original design does not discuss the case. With real 8087s, a `FLD`
there only pushes an unused value onto 87-(k+1)'s stack. A store,
however, would run a memory cycle. Use all N coprocessors in store
blocks, or keep N equal to the number of elements.

## Parallel mode and the early queue-status cut (`parallel_exec_control`)

`DF FD` sets `pm1`. On the next T2, `sp1` rises (`parallel_ready_control`),
so every coprocessor's READY follows `r88`. `pm2 = pm1 & sp1 & !q52`
opens every queue-status gate (`parallel_qs_control`). Each coprocessor
instruction that follows is executed by all N in the same clock, and
CPU instructions may be mixed in. Store instructions do not make sense
here, because all N would write.

The closing sequence needs care. It is `JMP` then `DF FE`, and
`DF FE` is itself an escape. If the 8087s took its first-byte code, they
would decode it just as `sm1` pulls their READY low. They would be left
busy in a wait state, and the next `WAIT` would hang. So `q52` is set by
the queue-empty code of that `JMP`, which withdraws the queue status
(`pm2` falls) while READY stays up until `sm1`. The 87-1 keeps its normal
scalar-mode gating throughout.

## The T2 strobe (`t22_clock_gen`)

The 8087 samples READY around T2/T3, so every change of `sp1` and the
return to scalar mode (`sm1`) are timed on T2. A two-bit counter restarts
whenever the status is passive and counts active-status clocks. After any
data strobe `t31`, the flag `q61` is set, and the next clock with count 1
(T2 of the next bus cycle) gives `t22` and clears `q61`. Vector-mode changes
therefore take effect in the bus cycle *after* the one that carried the
vector instruction's second byte.

## Module map

```
vector_controller (N_COPROC = 10)
├── vector_instr_decoder
│   ├── ifetch_monitor   data_enable_gen   df_monitor
│   ├── clear_control    subsequent_byte_decoder
├── seq_ls_control                       (87-1, 87-2, main control)
│   ├── t22_clock_gen    main_control
│   ├── ready1_control   qs1_control
│   └── ready2_control   qs2_control
├── parallel_exec_control
│   ├── parallel_ready_control           (pm1, sp1)
│   └── parallel_qs_control              (pm2, q52)
└── coproc_n_control × (N_COPROC − 2)    (87-3 … 87-N)
vc_pkg: bus-status and queue-status enums, opcode constants
```

The top module also carries assertions for the mode rules:
- at most one `vec_op` bit per clock;
- in scalar mode, 87-2 … 87-N are not ready and see only the no-operation
  or queue-empty codes;
- once the loading window has closed (`c1`), at most one 8087 is ready.

About 185 cells and 24 flip-flops at N = 10. Each extra coprocessor adds
one flip-flop and a few gates.

## Where this RTL departs from the original circuit

* **Synchronous.** The TTL original uses both clock edges, asynchronous
  presets from BUSY and from decoder outputs, and a one-shot clear. Here
  everything is on the rising edge. A BUSY edge is seen one clock later,
  and each strobe lasts exactly one clock.
* **Polarity.** The original's strobes `V1`–`V3`, `CLR1`, `CLR2`, `SM1`
  and `T22` are active low. Here they are active-high pulses.
* **Two flags named Q31.** The original's serial flag and its parallel-ready
  flag share the name `Q31`. Here they are `q31` (serial mode) and `sp1`
  (READY enable for 87-2 … 87-N). `sp1` is set on T2 by either mode.
* **Closing the loading window.** The original uses a counter of `9B`
  bytes. Here `c1` is set by the first `9B` fetched in serial mode. The
  original also suggests counting four bus cycles instead; that is not
  built.
* **The decoder's bus-cycle counter** is a single toggle bit. Only two
  fetches are ever counted.
* **Mode decode.** One passage of the original says `DF FF` triggers the
  return-to-scalar flag, while its instruction table gives `DF FE` for
  that. `DF FE` is used.
* **Not built:** the CPU, the 8087s, the 8284 and 8288, memory, bus
  drivers, and the suggested per-count parallel activation. The 8087 is
  modelled in the testbenches only (`tb/cop8087_model.sv`).

## Testbenches

Each testbench prints `TB_RESULT checks=… failures=…` and stops itself
with a watchdog.

| testbench | covers |
|-----------|--------|
| `tb_vector_instr_decoder` | all 16 codes, codes with no JMP in front, non-DF first bytes, near-miss bytes (`5F`, `DE`, `E5`), wait states, non-fetch cycles, the serial-flag override, reset mid-look-up |
| `tb_seq_ls_control` | T2 strobe timing, C1 on the first WAIT, 87-1/87-2 READY and queue status through a serial block and a return to scalar mode, R-88 gating |
| `tb_parallel_exec_control` | pm1/sp1 on T2, the q52 queue-status cut, clear by sm1 |
| `tb_coproc_n_control` | one 87-n control: waiting, hand-over in and out, scalar mode, parallel loading, parallel mode, clearing with C1 |
| `tb_vector_controller` | full size (N = 10, no parameter override): scalar code, ignored and reserved codes, serial load of ten elements, parallel FADD and FSQRT, serial store. Counts each mechanism (mode entries, loadings, 18 hand-overs, queue-status cut, wait states, R-88 hold) and fails on any that never happened |
| `tb_workloads` | the two example programs, at N = 10, with random wait states in every fetch: c = a + b over three elements, and √tan(a + c) over four |

The 8088 in these benches is a bus-cycle model. It fetches each byte
(T1, T2, data clock, T4) and then issues the queue-status codes. The CPU
does not prefetch ahead of execution. `WAIT` is modelled as waiting for
every BUSY line to be low, i.e. BUSY lines wired together to TEST.

To run one with plain Verilator:

```
verilator --binary --timing -y rtl -y tb +libext+.sv -Irtl \
    rtl/vc_pkg.sv tb/tb_vector_controller.sv --top-module tb_vector_controller
./obj_dir/Vtb_vector_controller
```

Every testbench finishes in well under a second. To change the number of
coprocessors, set `N_COPROC` (≥ 2) on `vector_controller`, and `N` in
the testbench to match.
