# Pausible-clock interface between synchronous modules over asynchronous FIFOs

Two synchronous modules that run on unrelated clocks need to exchange 32-bit
words. The usual answer is a synchronizer, and with it a small chance of
metastability on every crossing. This design avoids synchronizers. It joins
the two modules with self-timed (clockless) micropipeline FIFOs. Each module
makes its own clock from a ring oscillator, and that clock can be *paused*.
Whenever a FIFO handshake has to touch a register that the module reads, the
interface first stops the module's clock. It makes the change and then lets
the clock run on. A register never changes near a clock edge, so nothing can
go metastable. The price is an occasional stretched clock cycle.

The RTL covers the whole interface:

- the asynchronous cells it is built from: Muller C-element, transparent
  latch, mutex, toggle and select;
- the 4-stage micropipeline FIFO;
- the pausible-clock port with its ring oscillator, mutex, arbiter,
  asynchronous state machine and synchronous-side registers;
- the ring-oscillator test structure with its divide-by-256 counter.

## Chip structure

```
            side A                                              side B
  +------------------------+      fifo_ab (4 stages)     +------------------------+
  | a_tx_* --> pcc u_pcc_a | --req/ack/data[31:0]-->     | pcc u_pcc_b --> b_rx_* |
  | a_rx_* <--             |  <--req/ack/data[31:0]--    |             <-- b_tx_* |
  |        a_sysclk        |      fifo_ba (4 stages)     |        b_sysclk        |
  +------------------------+                             +------------------------+

  ring test structure:  ro_select, ro_enable -> ring_oscillator -> ring_divider (/256) -> ro_out
  library cell:         sel_in, sel_sel, sel_cdn -> select_elem -> sel_out_t, sel_out_f
```

`interface_chip` is the top. Side A (for instance a CPU) and side B (for
instance a peripheral) each get:

- a local clock, `a_sysclk` or `b_sysclk`;
- a transmit port on that clock, `*_tx_valid`, `*_tx_ready` and `*_tx_data`.
  A word moves on a rising clock edge where valid and ready are both high;
- a receive port on that clock, `*_rx_valid`, `*_rx_ready` and `*_rx_data`,
  with the same rule.

The two synchronous modules themselves are not part of this RTL. The
testbench supplies them.

## The pausible clock (`pcc`)

This is the core of the design, and the part that needs care.

```
            +-------------------- sysclk (to the module and back into the ring)
            |
  ring_in   v             rclk   +-------+ g1 = sysclk
  -----> [NAND + 20 inverting ] ->| r1    |------------+
         [ stages, 11 ps each ]   | mutex |
                  creq_held ----->| r2    |-----> cgnt  (clock is paused)
                                  +-------+
   afsm --req_rx/req_tx--> arbiter --creq--> grant_hold --creq_held
   afsm <--gnt_rx/gnt_tx-- arbiter <--cgnt--
```

The ring oscillator is a 21-stage ring. Its loop is closed *through a mutex*
(the mutual-exclusion element):

1. The ring's output, `rclk`, is request 1 of the mutex.
2. Grant 1 is the module clock `sysclk`. It also feeds back into the first
   ring stage.
3. With no other traffic, `sysclk` simply equals `rclk`. The clock then runs
   with a period of 2 × 21 × 11 ps = 462 ps, about 2.2 GHz.

Request 2 of the mutex comes from the asynchronous side. It can be granted
only while `rclk` is low, which means `sysclk` is low. While request 2 holds
the mutex:

- a rising `rclk` is not granted, so `sysclk` stays low;
- because the ring is fed from `sysclk`, the ring waits too;
- when request 2 is released, `sysclk` rises at once, and the next cycle
  starts from that edge.

The effect on the clock:

- a high phase is never shortened;
- a period is never shorter than nominal;
- a period is stretched by at most the time the asynchronous side holds the
  mutex.

Every change the asynchronous side makes to shared state happens while it
holds the mutex. That is why the synchronous registers in `sync_port` can
sample the shared state without synchronizers.

**Handshake time (`grant_hold`).** All the cells are zero-delay RTL. A
handshake would therefore finish in zero time, and the clock would never
actually be stretched. `grant_hold` is a behavioural stand-in for the time
the real cells take: it keeps the mutex request high for `HOLD_PS` (200 ps)
after the state machine releases it. This matches the pause of about 0.2 ns
observed in silicon. Set `HOLD_PS = 0` for pure zero-delay behaviour.

**Arbiter.** The state machine has two channels, receive and transmit, and
either may want the clock paused. `arbiter` uses a second mutex to choose
one of them. It forwards the winner's request to the clock mutex (`creq`),
and returns the clock grant `cgnt` to the winner only.

## The asynchronous state machine (`afsm`) and the shared registers (`sync_port`)

Every edge of a four-phase handshake (request up, request down) is done
under one clock pause.

**Receive (incoming FIFO to module).**

1. When the FIFO raises `rx_req` and the holding register is empty, the FSM
   requests a pause.
2. Under the grant, the FSM:
   - latches the word into `rx_data`;
   - marks the register full;
   - raises `rx_ack`.
3. When the FIFO lowers its request, a second pause lowers `rx_ack`.
4. While the register is full, a new word waits in the FIFO. This is
   back-pressure.

**Transmit (module to outgoing FIFO).**

1. The module loads `tx_data` on a clock edge, and the word is then pending.
2. Under a pause, the FSM raises `tx_req`. The data is already stable in the
   register, which satisfies the bundled-data rule.
3. After the FIFO acknowledges, a second pause lowers `tx_req` and marks the
   register empty.

**Full and empty flags.** Each flag is a pair of toggle bits:

- one bit is written only by the FSM, under a pause;
- the other is written only by the module's flip-flops, on `sysclk`.

Full means the two bits differ. No bit has two writers, and no bit changes
near a clock edge that samples it.

## The micropipeline FIFO (`micropipeline_fifo`, `pipeline_control`)

The FIFO is a chain of `STAGES` (4) stages. Each stage has a
`pipeline_control` (a C-element) and a 32-bit transparent latch. Stage *i*
computes

    c[i] = C(req[i], ~c[i+1])

and `c[i]` serves at once as the request to stage *i*+1 and the acknowledge
to stage *i*−1. The last stage takes `ack_in` in place of `c[i+1]`.

A stage's latch is open while `c[i]` is low. It closes when `c[i]` rises,
capturing the word that the previous stage holds until it sees that
acknowledge.

The protocol is four-phase bundled data on both sides:

1. The sender sets the data, then raises `req`.
2. The receiver raises `ack`.
3. The sender lowers `req`.
4. The receiver lowers `ack`.

`data_out` is valid, and stable, while `req_out` is high.

A word and its return-to-zero phase occupy two neighbouring stages. Four
stages therefore hold two words when the output is stalled.

`clear` (active high) drives the C-elements' active-low clear pins and
empties the FIFO.

## The cell library

| module        | behaviour |
|---------------|-----------|
| `muller_c`    | Output takes the inputs' value when they agree and holds otherwise; `cdn` low clears it. Written as a latch with enable `a == b`. |
| `trans_latch` | W-bit latch, open while `en` is high. |
| `mutex`       | `g1`/`g2` follow `r1`/`r2`, never both. A grant is held until its own request falls. An exact tie goes to `r1`. |
| `toggle`      | Two-phase: input transitions go alternately to `out_dot` (1st, 3rd, ...) and `out_blank` (2nd, 4th, ...). Two latches in a loop. |
| `select_elem` | Two-phase: an input transition goes to `out_t` if `sel` is high, to `out_f` if it is low. `sel` must be set up first. |

These cells hold state in level-sensitive feedback, as the transistor cells
do. Lint and synthesis therefore report latches and combinational loops in
every module built from them. That is intended, not a coding slip.

## Ring-oscillator test structure (`ring_oscillator`, `ring_divider`)

The ring has 21 stages:

- the first stage is a NAND of `select`, `enable` and the ring feedback
  (the gate choice is this design's);
- 20 further inverting stages follow, each of `STAGE_PS` delay;
- an isolation buffer taps the ring output, so a heavy load does not disturb
  the ring.

With either `select` or `enable` low, the ring stops with its output high.

In the test structure the ring is closed on itself. Its buffered output
drives `ring_divider`, an 8-stage ripple counter of toggle cells. The
counter's output is the ring frequency divided by 256, slow enough to
measure off chip. After reset it rises on the first input edge, and then
once every 256 input periods.

`ring_oscillator` and `grant_hold` are behavioural models with `#` delays.
All other modules are synthesizable, zero-delay RTL.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `DATA_W` / `W` | 32 | top, FIFO, ports | word width |
| `FIFO_STAGES` / `STAGES` | 4 | top, FIFO | micropipeline stages |
| `RING_STAGES` | 21 | top, pcc, ring | ring length (odd) |
| `STAGE_PS_A`, `STAGE_PS` | 11 | top, pcc, ring | ring stage delay in ps (462 ps period) |
| `STAGE_PS_B` | 14 | top | side B stage delay (588 ps, about 1.7 GHz) |
| `HOLD_PS` | 200 | pcc, grant_hold | time one handshake edge keeps the clock paused |
| `BITS` | 8 | ring_divider | toggle stages (divide by 2^BITS) |

The shared defaults live in `async_pkg`.

## Where this RTL departs from the silicon it describes

- **No cell timing.** Cell and FIFO delays are not modelled: the C-element,
  latch, mutex and FIFO have zero delay. The measured figures of the real
  FIFO cannot be reproduced here. Those figures are a throughput of about
  1.6 GHz, 0.62 ns from data in to data out, and 0.73 ns from request in to
  request out. Only event ordering is modelled, plus the two behavioural
  delays (ring stages and handshake hold).
- **Ring stage delay.** The 11 ps stage delay is chosen so that the clock
  lands near 2.2 GHz. Side B's 14 ps is an arbitrary second frequency.
- **Mutex metastability.** A real mutex resolves near-simultaneous requests
  with a metastability filter and an unbounded but rare delay. The model
  decides instantly, and in favour of `r1` on an exact tie.
- **Choices of this design.** The insides of the following are this design's
  own:
  - the pipeline control (a plain C-element stage);
  - the asynchronous state machine;
  - the arbiter;
  - the valid/ready synchronous interface;
  - the toggle-based divider;
  - the reset polarities.

  The silicon design gives their roles but not their logic.
- **Two-phase cells unused.** The toggle and select cells use two-phase
  (transition) signalling. The interface itself is four-phase and does not
  use them. The toggle serves in the divider, and the select cell is placed
  in the top with its own pins.
- **Not built.** The capture-pass micropipeline, an alternative FIFO style,
  is not built.

## Simulating

Every file starts with `` `timescale 1ps/1ps ``. The package must be read
first, and `-y rtl` lets Verilator find the other modules by name. For
example, the end-to-end test at full size:

```
verilator --binary --timing --assert -Wno-fatal -Wall -y rtl -Irtl \
    rtl/async_pkg.sv tb/tb_interface_chip.sv --top-module tb_interface_chip
./obj_dir/Vtb_interface_chip +verilator+rand+reset+2
```

Every testbench prints `TB_RESULT checks=N failures=M` and calls `$finish`.
Each has a watchdog that counts a failure if the test hangs.

| testbench | what it exercises |
|-----------|-------------------|
| `tb_interface_chip` | Full-size chip: 600 words each way between a 462 ps and a 588 ps clock, in order. It also checks the clock shape, the ring period (462 ps), the divider period (256 × 462 ps) and the Select routing. Each of these must occur: clock pauses on both sides, transmit stalls, receive back-pressure, a full FIFO, both channels of a port asking at once, and a request waiting for the clock to go low. |
| `tb_pcc` | One port with stand-in FIFOs: data both ways; no shortened period or high phase; pauses bounded by one hold time plus one period; every `rx_ack` edge while `sysclk` is low. |
| `tb_micropipeline_fifo` | Random four-phase producer and consumer; order; output stable while `req_out` is high; capacity of two words; clear. |
| `tb_afsm`, `tb_arbiter`, `tb_sync_port` | The port's parts against stand-ins of their neighbours. |
| `tb_ring_oscillator`, `tb_ring_divider`, `tb_grant_hold` | Period, duty cycle, stop/start (and a 15-stage ring running faster), divide ratio, hold time. |
| `tb_muller_c`, `tb_trans_latch`, `tb_mutex`, `tb_toggle`, `tb_select_elem`, `tb_pipeline_control` | Each cell against a reference model over random sequences. |

The simulations run on two-state logic with random initial values. Each
testbench therefore applies reset with a real edge and ignores activity
before reset is released.

## Files

- `rtl/async_pkg.sv` holds the shared constants.
- `rtl/<module>.sv` holds one module each.
- `tb/tb_<module>.sv` holds one self-checking testbench per module.
