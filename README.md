# VME controller FPGA of the CMS CSC DDU5 board

The DDU (Detector Dependent Unit) of the CMS Cathode Strip Chamber readout
collects the data of up to fifteen DMB boards. Its VME controller FPGA is the
board's only link to the crate's VME bus. It does four jobs:

- **VME-JTAG.** It drives the JTAG chains of all other parts on the board
  (configuration PROMs, FPGAs, FIFOs), so they can be programmed and
  debugged over VME.
- **VME-Serial.** It loads and reads the serial devices: input FIFOs, the
  GbE output FIFO and the DDU control FPGA. It also keeps the board's
  settings in a serial flash and copies them into those devices after
  every reset.
- **VME-Parallel.** It gathers the four status lines of every DMB and of
  the DDU control FPGA and shows them as registers.
- **FMM output.** It sends the DDU's state to the Fast Merging Module as a
  4-bit code, and shows it on two LEDs.

It also gives VME access to two MAX1271 serial ADCs and reads a mode switch
that picks the debug view and can turn off the automatic settings load.

This repository holds a synthesizable SystemVerilog model of that
controller, with a self-checking testbench for every module and an
end-to-end testbench for the whole chip.

## Address map

The controller is an A24/D16 slave. It decodes the address as follows:

| bits    | field   | meaning |
|---------|---------|---------|
| [23:19] | slot    | The board's geographic address. Slot 28 (0x1C) is the DDU broadcast address; broadcast is accepted for writes only. |
| [18:16] | type    | 000 VME-JTAG, 100 VME-Serial, 011 VME-Parallel |
| [15:12] | device  | JTAG chain, serial device or parallel register |
| [11:2]  | command | Meaning depends on the type; see below |
| [1]     | -       | Not used |

A cycle to another slot, to an unknown type or to an unused JTAG device
gets no DTACK*. The crate's bus timer ends it. Address modifiers are not
checked.

## VME-JTAG

There is one JTAG chain per board device group. The chain is picked by the
device field:

| device | chain | IR length |
|--------|-------|-----------|
| 1 | output FIFO | 4 |
| 2 | VME controller PROM | 8 |
| 3 | DDU control PROMs 1, 0 | 8+8 |
| 4 | input controller PROMs 1, 0 | 8+8 |
| 5 | DDU control FPGA (XC2VP7) | 10 |
| 6, 7 | input controller FPGAs 0, 1 (XC2VP20) | 14 |
| 8 | input FIFOs 0-3 | 4+4+4+4 |
| 9 | not JTAG: the serial ADC port (below) | - |
| 15 | emergency PROM programming | 8 |

### How a shift works

One VME write moves up to 16 bits through a chain. The host never sees TMS
directly; it picks an operation, and the controller makes the TMS pattern.

- Address bits [5:2] give the operation.
- Address bits [11:8] give the number of bits minus one (0 = 1 bit,
  15 = 16 bits).
- The data word holds the bits to send, LSB first.

| op | action |
|----|--------|
| 0 / 1 / 2 / 3 | Shift the data register: no header / header only / tailer only / both |
| C / D / E / F | Shift the instruction register, the same four variants |
| 7 | Shift the instruction register with header and tailer (same as F) |
| 5 | Read the TDO register. No JTAG activity. |
| 6 | Reset the chain's TAP controllers, ending in Run-Test/Idle |

The *header* takes a TAP from Run-Test/Idle to Shift-DR (TMS 1,0,0) or to
Shift-IR (TMS 1,1,0,0). In the shift itself TMS is 0 on every bit except
the last one, and only when a tailer follows. The *tailer* then sends TMS
1,0 through Update to Run-Test/Idle. Without a tailer the TAP stays in its
Shift state.

This is how registers longer than 16 bits are handled. For a 32-bit ID
register, send 16 bits with op 1 (header, no tailer), then 16 more with
op 2 (tailer, no header). The PROM pairs and the four-FIFO chain are just
longer IRs: 16 bits, so they fit in one cycle.

Every bit that comes back on TDO goes into a 16-bit right-shifting
register. After an n-bit shift, op 5 returns the new bits in data bits
[15:16-n], the first bit lowest. Read it after each shift you care about.

A typical session with the DDU control FPGA looks like this:

1. Load IR User1.
2. Write an 8-bit function select.
3. Load IR User2.
4. Shift the data (repeat as needed).
5. Load IR User1 again, then write a no-op.
6. Finish with IR Bypass.

The end-to-end testbench runs exactly that session.

### Timing

- TCK is half of the slow clock: 40 MHz / 16 / 2 = 1.25 MHz. That is the
  rate the XC18V04 PROMs need for in-system programming, which fails at
  2.5 MHz.
- TMS and TDI change while TCK falls. TDO is sampled when TCK rises.
- DTACK* is given only when the whole shift, including header and tailer,
  is done. A VME cycle therefore lasts about 0.8 µs per TCK cycle. A full
  16-bit IR load with header and tailer takes 22 TCK, about 18 µs.
- The reset (op 6) is 5 TCK with TMS high plus 1 with TMS low. That is 12
  slow-clock ticks, the length of the board's reset counter.
- When a reset (power-up or soft reset) ends, the same sequence runs on
  every chain at once. This puts all TAPs back in Run-Test/Idle without a
  VME cycle.

A chain's TCK/TMS/TDI outputs, and its drive enable `jtag_oe`, are active
only during its own operation. At all other times they are low, so the pins
can be put in 3-state. Chain numbers with no JTAG device (0, 9-14) never
toggle.

## VME-Serial and the settings flash

### The input shift chain

Serial transfers go through three 16-bit input shift registers. Together
they form a 48-bit chain. The host reaches the chain through VME-Parallel
device 8:

- A write (cmd 0x80) moves the chain up one word and puts the new word in
  the low 16 bits. So to send a 32-bit value, write the high word first,
  then the low word.
- Reads with cmd 0, 1 and 2 return word 0, 1 and 2.

A VME-Serial cycle then moves N bits, MSB first:

- **To a device:** the bits leave the chain from bit N-1.
- **From a device:** the bits enter the chain at bit 0, so the value ends
  up in chain[N-1:0].

### Serial devices

| device | action | bits |
|--------|--------|------|
| 0-3 | Read input FIFO 0-3 into the chain | 32 |
| 4 | Settings flash (commands below) | - |
| 8-B | Load input FIFO 0-3 from the chain (its DDR offsets) | 32 |
| F | Load all four input FIFOs at once | 32 |
| C | Load the GbE output FIFO | 34 |
| D | Load the DDU control FPGA's kill-channel mask | 16 |
| E | Load the DDU control FPGA's board ID | 16 |

Flash commands are on device 4, in address bits [5:2]:

| cmd | action |
|-----|--------|
| 0 | Read the flash status byte into the chain (opcode 0xD7) |
| 9 / C / D / F | Program page 1 / 4 / 5 / 7 from the chain, with 16 / 32 / 34 / 16 bits |
| 1 / 4 / 5 / 7 | Page reads. Used only by the automatic load; over VME they are acknowledged and ignored. |

- A program is a 32-bit header (opcode 0x82 and a 24-bit page address)
  followed by the data.
- A page read is a 64-bit header (opcode 0xD2, page address, 32 don't-care
  bits) followed by the data.
- During a page read the data goes from the flash's output straight to the
  target device, bit by bit. It does not pass through the chain.

### Automatic load

After every reset, unless mode switch bit 6 is set, four steps run in
order:

| step | flash page | target device | content |
|------|-----------|---------------|---------|
| 0 | 1 | D | kill-channel mask |
| 1 | 7 | E | board ID |
| 2 | 4 | 8-B together | DDR offsets of the input FIFOs |
| 3 | 5 | C | GbE thresholds |

- The step pointer is a one-hot 4-bit register that the reset sets to step
  0.
- A pulse on `ctrl_req` (a request from the DDU control FPGA) repeats
  steps 0 and 1.
- VME-Serial cycles wait while a load runs.
- The VME ready bit (VME-Parallel device 15, bit 15) is low while a load is
  pending or running.

### Serial timing

- Each bit takes two slow ticks, so the serial clock also runs at
  1.25 MHz.
- Data changes while the clock falls and is sampled when it rises (SPI
  mode 0).
- The flash chip select stays low for the whole transfer.
- A device's load enable (`ser_en`) is high only for the data bits, and
  `ser_clk` runs only then.
- The GbE FIFO's enable (`ser_en[12]`) is held high during reset.

## VME-Parallel registers

The command is address bits [9:2]; a command of 0x80 or more is a write.
Devices 0-6 need no command. In their words bit 15 is the DDU control FPGA
and bits 14:0 are DMB 14-0.

| device | content |
|--------|---------|
| 0 | Busy (not ready) |
| 1 | Warning / near full |
| 2 | Lost sync |
| 3 | Error |
| 4 | Needs a reset: lost sync or error |
| 5 | Warning history: set while a board warns, cleared only by reset |
| 6 | Busy history, the same way |
| 8 | Input shift chain (see above) |
| 9 | cmd 0x00/0x80: S-Link wait enable / GbE prescale register. cmd 0x0F/0x8F: FMM test register. |
| 14 | Mode switch in bits 7:0 |
| 15 | Bit 15 VME ready, bits 8:5 FMM code, bits 4:0 slot address |

Each board reports four lines: busy, warning, lost sync, error. They are
registered once on entry.

## FMM code and LEDs

The FMM code comes from the DDU control FPGA's four status lines. When
several lines are high, the highest in this list wins:

| code | state | green LED | yellow LED |
|------|-------|-----------|------------|
| 1100 | Error, needs hard reset | off | blink |
| 0010 | Lost sync, needs sync reset | blink | blink |
| 0100 | Busy | off | on |
| 0001 | Warning / near full | on | blink |
| 1000 | Ready (no line high) | on | off |

The code is registered and reads busy during reset. The LEDs blink with
the top bit of a free-running 25-bit counter, about 0.84 s per period.

For tests, the FMM test register can force any code. The override is on
only while the register holds a checking pattern:

- bits 7:4 are the inverse of bits 3:0, and
- bits 15:8 repeat bits 7:0.

Bits 3:0 are then the code sent. For example, 0xE1E1 forces warning
(0001). Any other value, such as 0, turns the override off.

## Serial ADCs

The ADCs sit at VME-JTAG device 9.

1. Command 0 sends the low byte of the data word to one ADC as its
   control byte. Address bits [11:8] pick which ADC. The chip select is
   then left low.
2. Command 1 clocks 16 bits back, MSB first, and releases the chip select.
   The 12-bit result sits where the MAX1271 puts it: bits 14:3.

Use the ADC's internal-clock mode, so the time between the two VME cycles
does not matter. The bit clock is 1.25 MHz, inside the ADC's 0.1-2 MHz
range.

## Mode switch

| bits | use |
|------|-----|
| 5:4 | Debug view: 00 standard debug, 01 VME-Serial, 10 flash, 11 VME-Parallel |
| 3:0 | Picks one LED mode. In standard debug it drives the one-hot `led_mode[15:0]`; in the VME-Parallel view it drives `led_par[7:0]`. Both decodes are off while bit 7 is set. |
| 6 | Turns off the automatic settings load |
| 7 | Brought out as `la_all_high` |

What the LEDs and logic-analyser pins show in each mode belongs to the
board's debug wiring. That is not part of this model.

## Clocks and reset

- **One clock.** Everything runs on `clk` (40 MHz). The slow clock (2.5 MHz
  with `SLOW_DIV` = 16) exists only as a one-cycle enable, `slow_tick`, and
  as the `slowclk` output. No logic is clocked by a divided clock. Changing
  `SLOW_DIV` scales the JTAG, serial and ADC rates together.
- **Reset.** `rst` (power-up) and `soft_rst` (the front-panel soft reset)
  are ORed. Both are synchronous and active high. When the combined reset
  ends, two things start: restore-idle on all JTAG chains, and the
  automatic settings load.

## Modules

```
vme5ctrl_top
├── slow_clock_gen        clock divider, slow_tick enable
├── vme_slave             VME decode, DTACK*/data bus, routes to one unit
├── vme_jtag              VME-JTAG shifter
│   ├── sr16clre          16-bit loadable right shift register (TDI)
│   └── sr16lce           16-bit serial-in right shift register (TDO)
├── serial_adc_ctrl       MAX1271 port
│   └── sr4re             one-hot sequencer, sync reset to 0001
├── vme_serial            VME-Serial, flash, automatic load
│   └── sr4ce3            one-hot step pointer, async clear to 0001
├── vme_parallel          status and control registers
├── fmm_encoder           status lines to FMM code, test override
├── fmm_led               LED drive
└── led_mode_decode       mode switch decodes
vme5_pkg                  request/response structs, codes, constants
```

Inside the chip, the slave hands each cycle to one unit as a `vme_req_t`:
strobe, write, device, command, data. The strobe stays high until the
master releases its data strobes. The unit answers with a `vme_rsp_t`:
dtack and read data. The unit's dtack is held until its strobe falls.

The top's parameters are `SLOW_DIV` (16), `BLINK_BITS` (25) and `NUM_ADC`
(2). The JTAG device mask and the ADC's device number are parameters of
`vme_slave` and `vme_jtag`.

The JTAG chip lines are plain outputs with a drive enable per chain
(`jtag_oe`). The VME data bus is split into `vme_d_in`, `vme_d_out` and
`vme_d_oe`. The pads and 3-state buffers go outside this model.

## Simulating

Each module has a testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=<n> failures=<n>` and stops. A watchdog ends a run that
hangs. For example:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vme5_pkg.sv tb/tb_vme5ctrl_top.sv --top-module tb_vme5ctrl_top -o sim
obj_dir/sim
```

To run another testbench, replace `tb_vme5ctrl_top` in both places. The
models in `tb/` stand in for the chips around the controller:

- `tb_tap_model`: a JTAG device with the IEEE 1149.1 TAP state machine.
- `tb_flash_model`: a serial flash with status, page program and page read.
- `tb_adc_model`: a MAX1271-style ADC.
- `tb_serdev_model`: the serial devices. It records what each was loaded
  with and answers reads.

`tb_vme5ctrl_top` drives the whole chip at its default parameters, through
the VME bus only. It covers:

- the automatic load;
- restore-idle after reset;
- the JTAG session above, TDO read-back, a 32-bit register read in two
  cycles, and a TAP reset;
- an ADC conversion;
- input FIFO read and load;
- flash program, status, and the reload on request;
- all status registers and the histories;
- the FMM code and the FMM override;
- a broadcast write and an unanswered cycle;
- a soft reset, and a reset with the automatic load off.

It counts each of these mechanisms and fails if one never happened. It also
checks that the JTAG, ADC and flash bit clocks never run faster than
1.25 MHz and run at exactly that rate within a transfer. It
runs in well under a second.

## What is taken from the board and what is not

**Follows the original controller:**

- The address fields.
- The JTAG device numbers and the operation codes.
- The 12-tick TAP reset.
- The 1.25 MHz JTAG and ADC clocks.
- The serial device list and data widths.
- The flash page use and the order of the automatic load.
- The flash status opcode.
- The parallel register list.
- The FMM codes and LED patterns.
- The mode switch use.
- The macro registers: `sr16clre`, `sr16lce`, `sr4ce3`, `sr4re`.

**Chosen here, where the original is not specific:**

- **Bit order.** JTAG data goes LSB first. Serial data goes MSB first.
  The chain moves up on each write.
- **TMS patterns.** The header and tailer sequences are the standard TAP
  paths.
- **When DTACK* comes.** For JTAG, serial and ADC cycles it is given at the
  end of the transfer.
- **Flash.** The page program and read opcodes and the page-address layout
  are those of the AT45DB DataFlash family. Its status opcode matches the
  one the board uses. Check them against the actual part before use.
- **FMM.** The priority between FMM states, read from the rank numbers
  printed beside the original code list.
- **FMM test register.** Its address and the rule that enables the
  override.
- **Histories.** They are cleared by reset only.
- **Device 15.** The layout of the status word.
- **ADC.** The ADC is picked by address bits [11:8], and the read is 16
  clocks.
- **Blink rate.**
- **Broadcast.** Broadcast reads are refused.

**Not modelled:**

- VME interrupts.
- The fake-L1A and production-test registers.
- The DLLs and the 80 MHz clock.
- The contents of the debug LED and logic-analyser views.
- The I/O pads.
