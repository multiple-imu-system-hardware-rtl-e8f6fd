# Redundant IMU bus interface — a processor interface unit and three IMU interface units

This RTL connects one flight computer to three strapdown-era inertial measurement units (Kearfott KT-70 class) over a serial 10 MHz data bus. The computer never talks to an IMU directly. It places a short job description in its own memory and raises a start discrete. The **processor interface unit (PIU)** then fetches the words with parallel I/O cycles, frames them into bus messages and sends them to one IMU's **interface unit (IU)**, or to all three. On a demand it also collects the IU's reply and writes it back into computer memory. Each IU decodes the bus messages addressed to it and does four jobs:

- drives the IMU's command discretes;
- turns a compact gyro torquing command into the pulse pattern the gyros need;
- counts accelerometer pulses;
- holds gimbal angles and a status word for the computer to read.

Everything is synchronous to one 10 MHz clock. One bus bit cell is one clock.

```
                 +-------------------------- imu_system --------------------------+
 computer  <---> | piu                                                            |
 (ECO/ECI,       |  piu_timing   johnson_counter (bit cell 0..17), 900 ns tick,   |
  DOT1, ABORT,   |               400 Hz sync, 50 Hz minor cycle                   |
  discretes)     |  piu_controller  state machine, F/A registers, word count,     |
 HP2116B   <---> |                  TIME0 timer                                   |
 (HPFLAG/HPCMD)  |  piu_fifo     3-word rolling FIFO, plus a holding register     |
                 |  bus_word_tx  word serialiser + AMI                            |
                 |  bus_word_rx  reply framing + parity                           |
                 +---------|bus 1|-----------|bus 2|-----------|bus 3|------------+
                           |  + 400 Hz sync  |                 |
                 +---------v----------+  (same)            (same)
                 | iu                 |
                 |  iu_bus_gating     | johnson_counter cleared by message sync
                 |  iu_write_ctrl     | input shift register, B/C/D1/D2 routing
                 |  iu_read_ctrl      | reply: D words + C echo, read clock
                 |  iu_status         | status word, gimbal angle registers
                 |  iu_accel          | delta-V synchronisers, 12-bit counters
                 |  iu_update_timer   | 400 Hz / 50 pps timing, GYPTO clocks
                 |  gypto_logic       | ternary -> binary gyro torquing
                 +--------------------+
```

`imu_bus_pkg` holds the shared types, bit positions and state numbers.

## 1. The serial bus

Each bus direction has two signals, clock and data. Each signal is a pair of lines, `p` and `n` (`ami_pair_t`), and the two together form a `bus_dir_t`. The pair stands for the two comparator outputs of the transformer-coupled receiver. A mark on either line is a pulse, and the receiver ORs the two lines back into one bit.

- **AMI coding.** Successive ones alternate between the `p` and `n` lines. A zero is no pulse. The clock pair is coded the same way, with a mark in every cell, so it alternates every cell.
- **Word.** A word is 18 cells, 1.8 µs: a lead one, 16 data bits MSB first, then an odd parity bit. With odd parity the 17 bits after the lead hold an odd number of ones. Cell 0 is LTIME, cells 1–16 are DTIME and cell 17 is PTIME. Words of one message follow each other with no gap.
- **Transmit clock and message sync.** The PIU's transmit clock runs all the time. Just before the first word of a message, the PIU leaves out one clock mark, in the cell that would have been the previous slot's PTIME. That clockless cell is the message sync. It goes only on the buses the message is for. An IU clears its 9-bit Johnson counter on it, so the next clocked cell is LTIME of the first word. Between messages the clock keeps running and the data lines stay quiet. The IU sees these as empty slots.
- **Read clock.** The read pair carries a clock only while an IU is replying. The PIU frames a reply word from the first marked data cell after the read clock appears.
- **Reply timing.** An IU starts its reply in the cell right after the PTIME of the demand's C word. This is well inside the one-word-time limit.

### Word formats

Bit numbers below are register indices 15..0. The original design report numbers bits 16..1, so its bit *n* is index *n−1* here.

| Word | Fields |
|---|---|
| **F** (job word, first word in computer memory) | [15:14] bus: 00 HP2116B, 01/10/11 IMU 1/2/3 · [13] WRITE · [12] PIU TEST · [11] SYNC (broadcast to all three IMU buses) · [7:0] word count, two's complement, counting up toward zero |
| **B** (message label, first word on the bus) | [15:14] = 10 · [11] sync (RAU) · [10] 1 = read demand · [9:7] words in the message or reply, counting the C word · [1:0] group: 01 accelerometers / D1, 10 status / D2, 11 gimbal angles |
| **C** (bus status, last word of every message) | [15:14] must be 00. The IU echoes it unchanged as the last word of every reply |
| **D1** (IMU commands) | held on `imu_cmd` as discretes · [10] Reset Fail flip-flop · [9] Reset Parity Fail: clears all four status error bits |
| **D2** (gyro torquing) | per axis *a* (X=0, Y=1, Z=2): [5a+3:5a] one pattern bit per 5 ms decision period, slot 0 in bit 5a · [5a+4] sign, 1 = negative |
| **Status** | [15] System Ready · [14] IMS Fail (IMU discrete OR the fail switch) · [13] IMS Fault · [12] IMU BITE · [11] AUTOCAL · [10:4] 0 · [3] C format error · [2] B format error · [1] read error · [0] parity fail |
| **Accelerometer reply** | `{4'b0, count[11:0]}`, two's complement |
| **Gimbal angle reply** | `{angle[13:0], 2'b00}`, left justified |

The messages are:

| Message | Words on the bus | Reply |
|---|---|---|
| IMU command | B(group 01) D1 C | — |
| GYPTO command | B(group 10) D2 C | — |
| Sync (RAU) | B(sync) C, on all buses | — |
| Read accelerometers | B(read, 01, count 4) C | DAX DAY DAZ C |
| Read status | B(read, 10, count 2) C | DSTATUS C |
| Read gimbal angles | B(read, 11, count 4) C | DSD1 DSD2 DSD3 C |

## 2. PIU: the state controller

`piu_controller` is the hardest part to follow, so its behaviour is set out in full here. It moves one state per 900 ns tick. The tick comes in cells 0 and 9 of the 18-cell bus count, so a tick is two per word time. State numbers follow the original state diagram and appear on the `state` / `piu_state` output.

| # | Name | What it does | Leaves when |
|---|---|---|---|
| 0 | IDLE | waits for a DOT1 rising edge | DOT1 seen → 14 |
| 14 | LOAD_F | ECO from address 0 into F; the word count is copied from F[7:0] | ACK → 11 |
| 11 | ADDR | decodes the bus address | HP → 13, IMU → 12 |
| 13 | HP_F | offers F to the HP2116B (HPFLAG) | ACK → 10 |
| 10 | HP_WAIT | waits for HPCMD | HPCMD → 12; TIME0 → 0 (error) |
| 12 | LOAD_A | ECO from address 1 into the memory pointer A | ACK → 2 |
| 2 | DECIDE | looks at WRITE | write or IMU → 6, HP read → 0 |
| 6 | ECO_DATA | ECO from A into FIFO level 1 (or to the HP) | ACK: count zero → 16 (IMU) or 0 (HP), else → 4 |
| 4 | INC | count+1, A+1 on entry; waits for 1EMP (FIFO level 1 free) | write → 6, read → 5; HP: next tick → 6, TIME0 → 0 |
| 5 | ECO_C | ECO of the C word into the FIFO | ACK: TEST → 1, else → 15 |
| 15 | TX_READ | sends the demand | FIFO empty → 1 |
| 16 | TX_WRITE | sends the command | FIFO empty → 0 |
| 1 | RD_WAIT | count+1, A+1 on entry; waits for 3FUL (reply word at the FIFO output) | 3FUL → 3 |
| 3 | ECI | ECI of the FIFO output word to address A | ACK: count zero → 0, else → 1 |

This gives the following paths:

- IMU write: 14 11 12 2 6 4 6 4 6 16 0.
- IMU read: 14 11 12 2 6 4 5 15 1 3 1 3 … 0.
- FIFO test: … 4 5 1 3 1 3 0. The words just loaded come straight back into memory without touching the bus.
- HP write: 14 11 13 10 12 2 6 4 6 4 … 0. Each word is offered with HPFLAG and must be taken with HPCMD before TIME0 expires. TIME0 starts at HPFLAG and defaults to 1 ms. A timeout returns to state 0 and sets `err_timeout`.
- ABORT: from any state, returns to 0 at once, clears the FIFO and pulses DINT3.

**Word count.** For a message of *n* words F[7:0] holds −(*n*−1), for example −2 for B D C. For a read, *n* counts every word moved between memory and the PIU: the demand's B and C words and all reply words. An accelerometer read (B C, then DAX DAY DAZ C back) therefore has −5. After F and A are read, addresses run upward from A. So memory holds the message at A, A+1, … and a read stores its reply words just after the message's C word.

**Computer I/O handshake.** `io_start` pulses on entry to a state that moves a word. `io_eci` selects the direction and `io_addr` gives the address relative to the channel's base: 0 for F, 1 for A, otherwise A. The computer answers with a one-clock `io_ack`, carrying `io_dout` for an ECO. An ACK may arrive at any time. It is remembered until the next 900 ns tick.

**FIFO and holding register.** `piu_fifo` has three levels. Words enter at level 1 and roll one level per clock toward level 3, the output. The flags are 1EMP (level 1 free), 3FUL (level 3 holds a word) and ALLEMP. A reply to an accelerometer or angle demand is four words arriving 1.8 µs apart. A computer transfer takes about 16.7 µs per word, so at most one word leaves while the four arrive. A one-word holding register in front of the FIFO therefore absorbs the extra word. A word that finds both the holding register and the FIFO full sets `rx_overrun`. A parity or lead-bit error in a reply sets `ipe2`. Both flags clear at the next DOT1.

**Timing.** `piu_timing` divides the 10 MHz clock by 18 for the bit cell count and the controller tick. It divides by `DIV_400HZ` (25000) for the 400 Hz sync line to all IUs, and then by `DIV_50HZ` (8) for the 50 Hz minor cycle interrupt to the computer.

## 3. IU: receiving and replying

- **Bit gating (`iu_bus_gating`).** A cell is any clock in which the transmit clock pair carries a mark. The 9-bit Johnson counter advances once per cell and is cleared by the clockless cell. Its decoded count gives LTIME, DTIME and PTIME.
- **Write controller (`iu_write_ctrl`).** During DTIME the data bits shift into a 16-bit register. At PTIME the parity is checked and a two-flip-flop Johnson counter routes the word:
  - **B state (00):** the word must carry tag 10, else a B format error. A read or sync B is followed by C. A write B is followed by D1 (group 01) or D2 (group 10).
  - **D1 (01) and D2 (11):** load the register, then go to C.
  - **C (10):** the word must have [15:14] = 00, else a C format error. A read B then raises `read_demand` and a sync B raises `rau`. Both are combinational in the C word's PTIME cell, which lets the reply begin in the next cell. The controller then returns to B.

  A parity error, an empty slot or a message sync throws away the rest of the message and returns to B. D1 and D2 are loaded as they arrive, before the C word is checked.
- **Reply (`iu_read_ctrl`).** On `read_demand` the word counter is preset from the B word's count and the first data word is loaded. Words go out back to back on the read pairs with the read clock, and the echoed C word comes last. The module's `busy` output covers the reply.
- **Status and angles (`iu_status`).** The five discretes are sampled when a Read Status B word arrives. The four error bits stay set until a D1 with Reset Parity Fail. A read error is recorded in two cases: accelerometers are demanded while the counters are being transferred, or angles are demanded while an angle update is still waiting for a converter. The three 14-bit angle registers load on every second 50 pps tick (25 per second). A converter whose data-ready line is low is left pending until the line goes high, so bits are never taken while the converter resets its outputs.

## 4. IU: accelerometers and gyro torquing

**Accelerometer counters (`iu_accel`).** The delta-V pulses arrive on separate positive and negative lines. They are asynchronous, from 1 to 25 µs long, and come at up to 10⁴ per second. Each line goes through a two-flop synchroniser and an edge detector that sets a pending flag. A four-phase sequence ACLK0–3 runs from a 0.5 µs divider (`ACLK_CYCLES` clocks per phase):

- ACLK0 applies the pending counts to 12-bit up/down counters.
- A sync message (`rau`) requests a transfer. ACLK1 accepts the request and raises `busy`.
- ACLK2 copies the counters into the output registers.
- ACLK3 clears the counters and drops `busy`.

Pulses that arrive during the transfer stay pending, so none are lost. The counters hold ±2047, which covers the 2000 pulses that build up between reads at the slowest read rate.

**Update timer (`iu_update_timer`).** A 400 Hz counter is restarted by every pulse of the PIU's sync line. If the line is missing it runs free with period `FREE_PERIOD`. A divide-by-8 stage gives the 50 pps tick. Every second 50 pps tick requests an angle update. Even 400 Hz ticks are GYPTO decision clocks and odd ticks are GYPTO output strobes, 2.5 ms later. The 2-bit slot number (0..3) counts the decision periods of the 20 ms frame.

**GYPTO (`gypto_logic`).** The gyros must be torqued with a steady 200 pps, 1:1 positive/negative dither. The computer only wants to add a few net pulses. So each 50 Hz D2 word gives, per axis, four ternary digits: pulse-and-sign or no pulse, one per 5 ms period. At each decision the logic handles each axis as follows:

- If the slot's pattern bit is set, the pulse has the commanded sign. The dither memory is left alone.
- If the bit is clear, the pulse is a free pulse of the opposite sense to the last free pulse, and that sense is remembered.

The decided senses are strobed onto `torq_pos`/`torq_neg` at the next output strobe. They are held as levels for the 5 ms period, exactly one of the two being high per axis once running. With no command the result is + − + − …. A commanded + in place of a − adds two pulses of net positive torque relative to the dither, and the dither carries on afterwards in the same phase. D2 is not cleared, so a pattern repeats until a new D2 arrives.

## 5. Interfaces of the top (`imu_system`)

Arrays are indexed by IMU 0..2, which are bus addresses 01..11.

| Group | Ports |
|---|---|
| clock, reset | `clk` (10 MHz), `rst_n` (asynchronous, active low) |
| computer | `dot1`, `abort`, `io_start`, `io_eci`, `io_addr`, `io_ack`, `io_dout`, `io_din`, `err_timeout`, `dint3`, `ipe2`, `rx_overrun`, `minor_cycle`, `piu_state` |
| HP2116B | `hp_flag`, `hp_data`, `hp_cmd` |
| per IMU | `dv_pos[i][2:0]`, `dv_neg[i][2:0]`, `sd_in[i][axis][13:0]`, `sd_ready[i][2:0]`, discretes `system_ready`, `ims_fail`, `ims_fail_switch`, `ims_fault`, `imu_bite`, `autocal` (bit *i*), outputs `imu_cmd[i]`, `torq_pos[i]`, `torq_neg[i]`, `iu_status[i]` |

Parameters and their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `DIV_400HZ` | 25000 | clocks per 400 Hz sync pulse |
| `DIV_50HZ` | 8 | sync pulses per minor cycle |
| `TIMEOUT` | 10000 | TIME0 delay in clocks (1 ms) |
| `FREE_PERIOD` | 26000 | IU 400 Hz period when the sync line is absent |
| `ACLK_CYCLES` | 5 | clocks per ACLK phase (0.5 µs) |

Testbenches shorten `DIV_400HZ`, `TIMEOUT` and `FREE_PERIOD` to save simulation time. The system testbench uses the defaults.

Several outputs of the stand-alone `piu_controller` are direct wires from its inputs, for example the ECO data passed on to the FIFO and the HP. The unused status bits [10:4] are constant zero. Synthesis reports those output bits as idle, which is expected.

## 6. Where this design departs from the original or fills gaps

- **Read/sync bits of the B word.** The read flag is index 10 (the report's bit 11) and sync is index 11 (its bit 12), as the report's description of the B word states. The word count is in [9:7].
- **F register.** The bus address, WRITE and word count positions are as specified. The positions of TEST ([12]) and SYNC ([11]), and the two's-complement count, are this design's reading.
- **Sync timing.** The original IUs restarted their 400 Hz timing on each sync message. Later hardware used a separate 400 Hz line from the PIU, which this design follows. The sync message only latches the accelerometer counters.
- **Angle update rate.** The original gives two rates, 2.5 per second and 25 per second (every even minor cycle). The design uses 25 per second.
- **Status sampling.** The report says both that the status register is updated on demand and that the 50 pps train requests status updates. The design samples the discretes when a Read Status B word arrives, so the reply always carries their state at the time of the demand.
- **HP read** was never implemented in the original hardware and is not built here. An HP read job returns to idle after loading A.
- **Own choices.** These are not specified and were chosen here:
  - the one-word holding register in the PIU;
  - clearing IPE2 and the overrun flag on DOT1;
  - the 1 ms TIME0;
  - the IU's free-running period;
  - in the D2 word, which follows the report's layout of four pattern bits and a sign per axis: the lowest pattern bit being the first period, sign 1 meaning negative, and the first free pulse after reset being positive;
  - synchronising delta-V pulses on the system clock rather than a separate oscillator;
  - which error bits a Reset Parity Fail clears;
  - the recovery rules of the IU write controller.
- **Not modelled:** the analog transformer-coupled transmitters and receivers, the oscillator, the S/D converters, the IMUs, the computers and the power distribution. Their digital interfaces appear as ports.

## 7. Simulating

Every block has a self-checking testbench in `tb/`. Each prints `TB_RESULT checks=N failures=M` and ends with `$finish`, and each has a watchdog. `tb/tb_check.svh` holds the check macro. For example:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Itb \
          --top-module tb_imu_system rtl/imu_bus_pkg.sv tb/tb_imu_system.sv
./obj_dir/Vtb_imu_system
```

Run this from the folder that holds `rtl/` and `tb/`, because the testbenches include `tb/tb_check.svh`.

| Testbench | What it shows |
|---|---|
| `tb_imu_system` | Full system at default sizes with computer, HP and IMU models. It checks D1 and D2 to one IMU, torquing, a broadcast sync, accelerometer reads of all three IMUs, a status read, an angle read, the FIFO test, an HP write, a TIME0 timeout, ABORT and the minor cycle. It prints how often each mechanism ran |
| `tb_piu` | Routing to one or all buses, exactly one clockless cell per message, words back to back, a reply stored via ECI, IPE2 on a bad reply |
| `tb_iu` | IU at bus level: D1, status with reply timing, parity, B and C format errors and their reset, accelerometer latch and read, angles held while a converter is not ready, GYPTO torquing |
| `tb_piu_controller` | State sequences of every path against the table in section 2, the 1EMP stall, TIME0, ABORT |
| others | one per leaf block, with independent reference models |

Verilator lints the RTL with a few warnings left. These are unused parameters from the shared package, a few unused signals (the FIFO overflow flag, which the holding register makes unreachable, and internal ring bits) and the port name `abort`, which is reserved in some language versions. None of them affect the circuit.
