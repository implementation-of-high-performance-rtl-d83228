# QDR II SRAM controller with a UART loop-back system

A QDR II SRAM has two data ports: a write port (D) and a read port (Q). Both run at double data rate. They share one address bus, and with a burst length of four the device can accept one read and one write every two clock cycles. This RTL connects such a memory to a UART and shows both directions running together:

- Characters arrive on the serial line and are packed into 72-bit words.
- The words are written to the SRAM as four-word bursts at consecutive addresses.
- The same bursts are read back while later ones are still being written.
- The read-back data goes out on the serial line again.

The memory side targets a 512K x 36 burst-of-4 device (CY7C1315BV18 class). All user logic runs on one clock, `clk0`.

```
uart_rx pin -> uart (rx) -> fifo_rx (8 x 9 bit -> 72 bit) -> user_wr_fsm --+
                                                                            v
                                     addr_counter (write)          qdr_mig (controller)
                                     addr_counter (read)   user_rd_fsm --+      |  ^
uart_tx pin <- uart (tx) <- fifo_tx (72 bit -> 8 x 9 bit) <-------------+      v  |
                                                                       QDR II SRAM pins
qdr_mig = qdr_user_if (FIFOs) + qdr_rw_sm (command slots) + qdr_phy (pins, capture)
          + qdr_cal (read-capture calibration)
```

## The command slot: how reads and writes run together

`qdr_rw_sm` issues exactly one command word per `clk0` cycle. A burst of four occupies:

- the address bus for one cycle;
- the write data bus for two cycles (two DDR words per cycle).

The controller therefore works in two-cycle slots:

| slot cycle | SA (address bus)      | R#  | W#  | D (write data)                        |
|-----------:|-----------------------|-----|-----|---------------------------------------|
| 0          | read address          | low if a read waits | low if a write is ready | words 3 and 4 of the previous write |
| 1          | write address         | high| high| words 1 and 2 of the write issued in cycle 0 |

Both R# and W# may be low in slot cycle 0. That is the concurrent operation the separate ports allow: a read and a write each complete every two cycles.

A write starts as soon as the write address FIFO and the write data FIFO both hold the burst's first data half. The user interface stores the second half on the next cycle by itself, so it is always there one cycle later. Nothing is issued until calibration is done.

The user interface (`qdr_user_if`) follows the vendor protocol. It is single data rate and works on `clk0`:

- **Write:** `user_ad_w_n` and `user_d_w_n` go low together with the address and words 1 and 2 (`user_dwl`, `user_dwh`). Words 3 and 4 follow on the next cycle, with no gap allowed.
- **Read:** `user_r_n` goes low with `user_ad_rd`. Each returned pair comes out of the read data FIFO with `user_qr_valid`:
  - `user_qrl` holds the earlier word of the pair;
  - `user_qrh` holds the later word.

  A burst gives two consecutive valid cycles.
- **Flow control:**
  - `user_wr_full` rises while fewer than four free entries remain in the write FIFOs, so a whole burst always fits.
  - `user_rd_full` is the read address FIFO's full flag.
  - `user_wr_empty` is an extra output. It tells the system that no write is still queued.

## Clocks, pins and read capture (`qdr_phy`)

### Output side

- The command word is registered on `clk0`, then registered again on `clk270`. `clk270` is `clk0` delayed by three quarters of a period.
- Address, R# and W# change on the rising edge of `clk270`, a quarter period before the rising edge of K.
- D and BW# are double data rate. A mux selected by `clk270` drives:
  - the word for the K edge while `clk270` is high;
  - the word for the K# edge while `clk270` is low.

  Every word is therefore centred on the clock edge that latches it.
- K and K# are `clk0` and its inverse.
- C, C# and DOFF# are held high. The memory then times its outputs from K and keeps its DLL on.
- A command presented in cycle *c* reaches the pins in time for the K edge that starts cycle *c+2*.

### Read side (direct clocking)

The echo clocks CQ/CQ# are not used. Q is sampled by `clk0` itself on both edges. Each rising edge then offers two candidate pairs of consecutive words:

| phase | pair                                                  |
|-------|-------------------------------------------------------|
| 0     | previous falling-edge sample, this rising-edge sample |
| 1     | previous rising-edge sample, previous falling-edge sample |

Which one is a real pair (words 1-2 or 3-4 of a burst), and how many cycles after the command it appears, depends on:

- board delays;
- the memory's clock-to-out time.

A shift register records the cycle of every issued read. It is tapped at the calibrated latency `rd_lat` and at `rd_lat+1`, which gives the two cycles of `rd_valid` for each burst.

### Calibration (`qdr_cal`)

The latency and phase are found at start-up:

1. After `INIT_WAIT` cycles, the machine writes a four-word training pattern to burst address `CAL_ADDR`. The pattern is `A5A5A5A5A`, `5A5A5A5A5`, `FF00FF00F`, `00FF00FF0`.
2. It reads the pattern back and counts cycles from the read command.
3. The first cycle in which one of the candidate pairs equals {word 2, word 1} fixes the latency and the phase.
4. The next cycle must then show {word 4, word 3} at the same phase.
5. `VERIFY` reads in a row must agree.
6. A read that finds nothing within `MAX_LAT` cycles, or disagrees, starts the process over.

When calibration is done, `cal_done` rises and the read/write state machine takes over the pins. Until then the calibration machine drives them.

With the testbench memory model (0.45 ns clock-to-out), calibration settles on latency 5, phase 1. With a 3 ns clock-to-out it settles on latency 5, phase 0. The first read pair reaches the user interface 8 cycles after `user_r_n`.

A real FPGA would also tune per-bit input delay taps to centre the sampling point in time. That step is analog and is not modelled; only the whole-cycle and half-cycle alignment is calibrated.

## The user state machines and the read-back lag

`user_wr_fsm` has the states BUSY, WAIT, WRITE1, WRITE2 and USER_WR_STOP.

- It leaves BUSY on `cal_done`.
- When `fifo_rx` holds two 72-bit words (one burst), and the controller is not full, it writes them:
  - WRITE1 carries the address and words 1-2;
  - WRITE2 carries words 3-4 and steps the address counter.
- It can loop straight back to WRITE1 when another burst is waiting.
- It goes to USER_WR_STOP:
  - after the last address (`last_add`), and then rests in BUSY with `wr_done`;
  - while the controller is full.

`user_rd_fsm` has the states BUSY, WAIT, READ1, READ2 and READ_FINISH. It fires on the same event as the writer: a burst waiting in `fifo_rx`. In that cycle, the writer requests burst *n* and the reader requests burst *n-1*, so the controller runs both in one slot. The reader therefore trails the writer by one burst while data streams in. After the last write it reads the remaining bursts.

Two rules keep the read-back correct:

- A burst is read only when the write pointer has passed it and `user_wr_empty` is high. A read can never overtake its own write in the controller.
- Returned data cannot be held back, so `fifo_tx` room is reserved in advance. A read is issued only if `fifo_tx` has at least (outstanding halves + 2) free words. Otherwise the reader waits.

The memory model answers a read correctly even when it falls in the same slot as a write to another address.

## UART and the packing FIFOs

`uart` contains:

- `uart_baud_gen`: a tick at 16 times the bit rate, every `baud_div` clocks;
- `uart_rx`;
- `uart_tx`;
- a 16-deep receive FIFO and a 16-deep transmit FIFO.

Each character is framed as: start bit, nine data bits LSB first, no parity, one stop bit.

The receiver passes the line through a two-flop synchroniser. A start bit counts only if the line is still low half a bit time later. A shorter low pulse is ignored. Each data bit is then sampled one bit time later, in the middle of the bit. `rx_err` pulses when:

- the stop bit is low; or
- a character arrives while the receive FIFO is full.

`fifo_rx` packs eight 9-bit characters into one 72-bit word, with the first character in bits 8:0. Bits 35:0 go to `user_dwl` and bits 71:36 to `user_dwh`. `fifo_tx` undoes the packing, so characters come out in the order they went in.

## Where this departs from the source description

- **Address width:** the burst address is 17 bits, which covers 512K words in bursts of four. One passage calls the read address 18 bits; the block diagram and the device size give 17.
- **Character width:** characters are 9 bits, so that eight fill a 72-bit word. The general UART description mentions the usual 5 to 8 bits. There is no parity.
- **Controller internals:** the controller is written from its described function. This covers the slot scheme, the calibration pattern and search, and the direct-clocking capture with latency/phase selection. It is not the vendor's implementation.
- **FIFOs:** the FIFOs are generic inferred memories, 512 deep in the controller, standing in for FIFO16 block RAM primitives. The UART and packing FIFOs are 16 deep (a choice).
- **Write FSM:**
  - The "FIFO full" condition of the write state diagram is read as "a whole burst is waiting". Waiting for a truly full FIFO would stall the stream.
  - The writer enters WRITE1 only while `user_wr_full` is low.
  - The write-FIFO-full test on leaving BUSY is dropped.
- **Read FSM:** the read trigger, the one-burst lag and the transmit-room reservation are this design's choices.
- **Burst length:** only burst-of-4 is built. There is no burst-of-2 mode.
- **Clocks:** no clock generator is included. `clk0` and `clk270` are inputs, and so is the 200 MHz delay reference a real design needs (not used here).
- **Unused pins:** C, C# and DOFF# are constant outputs, matching the fixed levels shown in the reference simulation.

## Files

- `rtl/qdr_pkg.sv`: shared widths and the command and write-data structs.
- Everything else in `rtl/` has one module per file. The top is `rtl/qdr_uart_system.sv`.
- `tb/qdr2_sram_model.sv` is a behavioural burst-of-4 QDR II SRAM:
  - read data starts 1.5 cycles after the read command, plus the clock-to-out time `TCO`;
  - its memory is sparse.
- Each block has a self-checking testbench, `tb/tb_<module>.sv`. It prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.

Key end-to-end tests:

- `tb_qdr_uart_system`: small FIFOs, 128 characters through the whole system. It checks:
  - every character that comes back;
  - that calibration, a rejected glitch, concurrent read/write slots, USER_WR_STOP, the writer's WAIT state and READ_FINISH all happen.
- `tb_qdr_uart_system_full`: the top at its default parameters, 64 characters.
- `tb_qdr_mig`: the controller alone, including:
  - the 8-cycle read latency;
  - both full flags;
  - concurrent commands.

## Simulating

With Verilator 5 (two-state simulation, so every register that is read has a reset):

```
verilator --binary --timing --assert -Irtl -Itb rtl/qdr_pkg.sv \
    tb/tb_qdr_uart_system.sv --top-module tb_qdr_uart_system
./obj_dir/Vtb_qdr_uart_system
```

Use the same command for any other testbench: replace the testbench file and the top name. `-Irtl -Itb` lets Verilator find the submodules. The package must come first on the command line.

Parameters worth changing:

| parameter | where | default | meaning |
|-----------|-------|---------|---------|
| `MIG_DEPTH` | `qdr_uart_system` | 512 | controller FIFO depth |
| `WORD_DEPTH` | `qdr_uart_system` | 16 | `fifo_rx` and `fifo_tx` depth, in 72-bit words |
| `UART_DEPTH` | `qdr_uart_system` | 16 | UART FIFO depth |
| `MAX_LAT` | `qdr_uart_system` | 16 | longest read latency calibration searches |
| `INIT_WAIT` | `qdr_uart_system` | 16 | cycles before calibration starts |
| `baud_div` | port | none | clocks per 1/16 bit |
| `last_add` | port | none | last burst address of a run |
