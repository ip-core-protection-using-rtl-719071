# Voltage side-channel IP core protection

A vendor ships an IP core to a customer. Later the core turns up, unlicensed, inside someone else's FPGA product, mixed in with other cores and with no spare pin. How can the vendor show that it is their core?

The idea here is to give the core a hidden **input** channel that needs no pin. The verifier modulates the FPGA's supply voltage between two levels. Inside the chip, a ring oscillator runs faster or slower with the voltage. A small receiver counts its oscillations against a fixed clock and recovers a bit stream from the changes.

Each protected core sits in a wrapper with such a receiver and a state machine. Once the right secret codeword arrives, the state machine accepts commands:

- switch the core off;
- force its data outputs to zero;
- return it to normal;
- deselect it.

The verifier watches the finished product's ordinary outputs, such as a serial link or a screen. If the product reacts to the commands of one codeword, that codeword's core is inside.

This repository holds SystemVerilog for:

- the receiver;
- the protection wrapper;
- a four-core case study: a serial link with an AES-128 core, and a 128-bit LFSR feeding a 4-bit VGA output;
- the verifier side that drives the supply;
- behavioural models of the two analog parts, the supply switch and the ring oscillator.

Every file compiles with Verilator and has a self-checking testbench.

## 1. The supply as a channel

Two control wires, `c1 c0`, select the supply level:

| c1 c0 | Vcc                          |
|-------|------------------------------|
| 00    | V_reset = 0 V (chip in reset) |
| 01    | V0 = 2.8 V                   |
| 11    | V1 = 3.2 V                   |
| 10    | not used                     |

`supply_model` is a behavioural model of this switch. It models board decoupling as a ramp of 20 mV every 100 ns, so a 0.4 V step takes 2 µs. That ramp rate is this design's own estimate. A half bit lasts 20.48 µs, so the slow ramp matters. The receiver always sees edges that are smeared over one or two sampling windows.

### Line code

The line is a modified Manchester code:

- **Idle.** The line rests at V1.
- **Start.** A transmission begins with a falling edge, then one half bit at V0.
- **Bits.** Every bit takes two half bits, with a transition in the middle. V1→V0 is a `0` and V0→V1 is a `1`.
- **Repeated bits.** When two equal bits follow each other, an extra transition at the bit boundary restores the level.
- **End.** The line returns to V1.
- **Half-bit length.** One half bit is `HALF_BIT_CYCLES` = 1024 cycles of the 50 MHz clock. That gives 2048 cycles per bit, about 24.4 kbit/s.

`sc_transmitter` makes this waveform on `c1 c0`. It sends the MSB first and ends each frame with six idle half bits (`GAP_HALF_BITS`). The gap lets the receiver close the frame before the next one starts.

## 2. The receiver (`sc_receiver`)

This is the part that needs the most care. Its chain is:

```
ring_osc -> osc_counter -> freq_sampler -> edge_classifier -> manchester_decoder
(analog)    (RO clock)     (50 MHz clock from here on)
```

### `ring_osc` (behavioural)

This models a ring of `NUM_INV` = 3 inverters. One oscillation takes `NUM_INV × d`. The stage delay `d` falls linearly from 1.2 ns at 2.8 V to 1.0 ns at 3.2 V, and below 1 V the ring stops.

The model is event-driven on delayed non-blocking assignments. A real ring needs vendor placement constraints and attributes to keep its inverters, and those are not written here.

### `osc_counter`

This is a free-running counter clocked by the ring. It keeps a binary and a Gray-coded copy of the count, and only the Gray value leaves the ring's clock domain.

It is never cleared. Resetting it every window would need a reset that crosses into the fast ring domain. Instead, the sampler subtracts successive readings, which gives the same per-window count.

### `freq_sampler`

The sampler works as follows:

1. It passes the Gray count through a two-flop synchroniser and converts it back to binary.
2. Every `WINDOW_CYCLES` = 128 reference cycles it stores the count gained since the last window in `sampled`, and moves the old value to `previous`.
3. It raises `sample_valid` once two full windows exist.

### `edge_classifier`

This computes `diff = sampled − previous` as a signed number and registers one result per window:

- rising if `diff > THRESHOLD`;
- falling if `diff < −THRESHOLD`;
- same otherwise.

The threshold defaults to 35. It comes from a worked example: c = 128 cycles of a 5 ns clock, r = 3 and d = 1.2 / 1.0 ns give t ≤ |213.3 − 177.8| ≈ 35.6.

At the 50 MHz clock used here, a window is 2.56 µs. That gives about 711 oscillations at V0 and 853 at V1, so a full step differs by about 142. A ramp split over two windows still gives two differences above 35.

### `manchester_decoder`

The decoder is the subtle part, because the classifier's output is noisy in time:

- **Slow edges are reported twice.** A ramp of 2 µs against 2.56 µs windows often straddles two windows. The classifier then reports the same edge twice, for example rise, rise.
- **Repeats are dropped.** The decoder keeps the line level it believes in. Any event in the direction the line already has is a repeat, and it is dropped.
- **Start.** A fall from idle starts a frame.
- **Mid-bit or boundary.** A transition at least 1.5 half bits after the last mid-bit (or start) edge is a mid-bit edge, and it emits a bit equal to the new level. An earlier transition is a boundary edge, and it only flips the level. Mid-bit edges come 2 half bits apart and boundary edges sit 1 half bit after a mid-bit edge, so a threshold of 1.5 separates them with half a bit of margin on each side.
- **End of frame.** If no mid-bit edge has arrived 2.5 half bits after the last one, the frame has ended. The final return to V1 then counts only as the return to idle.

The outputs are `data_valid` (a one-cycle pulse), `data` and `frame_active`.

### Timing

From a supply edge to `edge_valid`, the delay is:

- up to one window;
- plus the ramp time;
- plus two synchroniser cycles;
- plus one register.

A decoded bit appears on the cycle after its mid-bit event is classified.

## 3. Protection wrapper and state machine

### `auth_fsm`

The state machine has four states: `ST_AUTH`, `ST_NORMAL`, `ST_OFF` and `ST_ZEROS`.

- **Codeword match.** In `ST_AUTH` every received bit is shifted into a register of `CW_LEN` = 80 bits, with the first bit received ending up as the MSB. When the last `CW_LEN` bits equal the codeword, the FSM enters `ST_NORMAL`. Matching is continuous, so a codeword may start anywhere in the bit stream.
- **Commands.** After the match, the bits are read as 2-bit commands (`cmd_t` in `ipp_pkg`):

  | code | command  | effect                                  |
  |------|----------|-----------------------------------------|
  | 00   | OFF      | `ST_OFF`: `core_off` (and zeroed data)  |
  | 01   | ZEROS    | `ST_ZEROS`: `zero_data`                 |
  | 10   | NORMAL   | `ST_NORMAL`                             |
  | 11   | DESELECT | back to `ST_AUTH`, bit history cleared  |

  The command order comes from the method. The 2-bit encoding is this design's own.
- **Core behaviour.** In `ST_AUTH` and `ST_NORMAL` the core behaves exactly as it would unprotected.

### `protect_layer`

The wrapper contains one `sc_receiver`, one `auth_fsm` and three multiplexers:

- `core_en = core_off ? 0 : en_in`
- `ctrl_out = core_off ? 0 : core_ctrl`
- `data_out = zero_data ? 0 : core_data`

In the ZEROS state the data is corrupted and the control signals still work, so the neighbouring cores keep running. The codeword is a port, which lets each instance hold its own secret. Which of a core's outputs count as control and which as data is decided where the wrapper is used.

## 4. Case study (`case_study_fpga`)

The case study has two independent paths, and each of its four cores has its own `protect_layer` and its own 80-bit codeword (`CW_RS232`, `CW_AES`, `CW_LFSR` and `CW_VGA` in `ipp_pkg`).

| core | module | control through the wrapper | data through the wrapper |
|------|--------|-----------------------------|--------------------------|
| RS-232 | `rs232_core` (115200 baud 8N1, 16 bytes per block) | `{blk_out_valid, txd}` | received block |
| AES-128 | `aes128_enc` (10 cycles per block) | `done` | ciphertext |
| LFSR | `lfsr128` (taps 128, 126, 101, 99) | `out_valid` | 4-bit pixel |
| VGA | `vga_ctrl` (640×480, 25 MHz pixel enable) | `{hsync_n, vsync_n}` | 4-bit colour |

The paths are:

- **Encryption path.** PC → RS-232 → AES → RS-232 → PC.
- **Display path.** LFSR → VGA → monitor.

What the outside world sees after each command:

| core | OFF | ZEROS |
|------|-----|-------|
| RS-232 | no reply | the PC receives the encryption of an all-zero block |
| AES | no reply | the PC receives zeros |
| LFSR | one colour | black screen |
| VGA | no sync ("no signal") | black screen with sync intact |

The RS-232 row follows from the wrapper rule: its data is zeroed and its control kept.

Four parts of this table are this design's own choices:

- the key (`AES_KEY` = 000102…0f);
- the baud rate;
- the LFSR taps and seed;
- the VGA timing.

The AES S-box is computed at elaboration from the inverse in GF(2^8) and the affine map, so the source holds no table.

## 5. The verifier (`verifier_seq`, `sc_transmitter`, `ipp_system`)

`verifier_seq` steps through a codeword database (`cw_db`, `cw_count` entries, at most `NUM_CW` = 8). For each entry it:

1. sends the 80-bit codeword;
2. sends OFF, ZEROS, NORMAL and DESELECT, each as its own frame;
3. holds for `HOLD_CYCLES` = 262144 cycles (5.2 ms) after each command, so the outputs can be observed.

`cur_index`, `cur_cmd` and `cmd_strobe` let a logger mark when each command took effect.

`ipp_system` is the top level: verifier sequencer → transmitter → `supply_model` → `case_study_fpga`. Both boards share one clock in this model. The PC's serial pins and the VGA pins are top-level ports.

`power_off` drives V_reset (`c1 c0` = 00) whenever the transmitter is idle. The FPGA design is held in reset while the modelled supply is below `POR_MV` (1 V), which stands in for the device's own power-on reset. A supply cut therefore returns every protection layer to authentication, and the verifier must send the codeword again.

## 6. Simulating

You need only Verilator 5 with `--timing`. Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`. Run from the repository root:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/ipp_pkg.sv tb/tb_sc_receiver.sv \
          --top-module tb_sc_receiver -Mdir obj_sc -o sim
./obj_sc/sim
```

Replace `tb_sc_receiver` with any file in `tb/`. The helpers `tb_manch_src`, `tb_uart_pc` and `tb_vga_mon` are test-side models of the verifier's wires, the PC and the monitor, and are used by the other benches.

| testbench | what it shows | run time |
|-----------|---------------|----------|
| `tb_ring_osc`, `tb_supply_model` | oscillation counts per window at V0 and V1; the level table and ramp | seconds |
| `tb_osc_counter`, `tb_freq_sampler`, `tb_edge_classifier` | counting across the clock crossing; classification boundaries at ±t | seconds |
| `tb_manchester_decoder` | random frames with repeated slow-edge reports, boundary edges and frame ends | seconds |
| `tb_sc_receiver` | the whole receiver on the supply model, including `0000111100` | seconds |
| `tb_auth_fsm`, `tb_protect_layer` | codeword match, wrong codeword, every command, the multiplexers | seconds |
| `tb_codeword_sizes` | the state machine at 32-, 64-, 80- and 128-bit codewords side by side on one bit stream | seconds |
| `tb_aes128_enc`, `tb_rs232_core`, `tb_lfsr128`, `tb_vga_ctrl` | standard AES vectors; byte framing; LFSR against a reference; VGA line and frame timing | seconds |
| `tb_sc_transmitter`, `tb_verifier_seq` | the waveform on `c1 c0` to the cycle; the probing order | seconds |
| `tb_case_study_fpga` | all four cores reacting to their own codewords | about 1 minute |
| `tb_ipp_system` | end to end, every parameter at its default | about 3 minutes |

`tb_ipp_system` probes five codewords: one unknown, then the AES, VGA, LFSR and RS-232 codewords. During every hold it has the PC model encrypt a block and it watches the VGA pins, and it checks that only the addressed core reacts. It also counts:

- rising and falling edges;
- repeated edge reports;
- boundary edges;
- frame ends;
- rejected codewords;
- each command;
- resets through V_reset.

It fails if any of these never occurs. A second phase authenticates the AES core, turns it off, cuts the supply during the hold, and checks that all four layers are back in authentication and ignore the remaining commands.

### Changing sizes

- **Codeword length.** `CW_LEN` on `auth_fsm` and `protect_layer` sets it; `CW_BITS` in `ipp_pkg` and `MAX_BITS` on the transmitter set it for the full system.
- **Link speed.** `HALF_BIT_CYCLES`, `WINDOW_CYCLES` and `THRESHOLD` are parameters of every layer down from `case_study_fpga`. Keep at least a few windows per half bit (1024 / 128 = 8 here). Keep the threshold below the count difference computed above.

## 7. Limits and departures

**Analog parts.** `ring_osc` and `supply_model` are behavioural models. They simulate, but synthesis turns them into a combinational loop and a latch. On an FPGA the ring must be built from kept, placed LUT inverters, and the supply switch is a board circuit. The voltage-to-delay mapping is linear, which is a modelling assumption and not a device law.

**Clocking.** The fixed reference clock is a port. No PLL or DCM is instantiated.

**Choices made here.** The source description leaves these open:

- the bit polarity, start half bit and gap length of the line code;
- the decoder's timing windows (1.5 and 2.5 half bits);
- the 2-bit command encoding;
- the codeword values;
- the choice of control and data signals per core;
- UART framing, the AES key and interface, the LFSR polynomial and seed, and the VGA mode;
- the hold time and database size.

**Case-study behaviour.** Two points differ from the description:

- **Zeros on the encryption path.** Zeroing the RS-232 core's data feeds an all-zero block to AES. The PC therefore sees E(0), not literal zeros. Zeroing the AES core gives literal zeros.
- **LFSR width.** The LFSR drives a 4-bit pixel, not a single bit.

**Not measured.**

- Resource use on a Spartan-3 class device was not measured. The source reports about 81 slices for an 80-bit codeword, and this RTL has not been mapped to that family.
- Robustness against the attacks the method discusses (clock manipulation, extra capacitors and similar) is not modelled. The main lever against a stopped clock, supply noise or added capacitance is a longer sampling window. That is `WINDOW_CYCLES`, together with a matching `THRESHOLD` and `HALF_BIT_CYCLES`.
