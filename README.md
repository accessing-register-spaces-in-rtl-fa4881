# SCAX – an SCA-compatible register access port for FPGAs

In the ATLAS data-acquisition scheme, front-end ASICs are configured and
monitored through the GBT-SCA (Slow Control Adapter) chip. The back-end side
of that path is a FELIX card and an OPC UA server that speak the SCA's
HDLC-based protocol over an e-link. The SCA eXtension (SCAX) is a block
that sits inside a front-end FPGA and answers that protocol exactly as an
SCA would. Instead of driving real I2C buses, its sixteen "I2C channels"
read and write the FPGA's own registers. The unchanged back-end software can
then reach FPGA registers the same way it reaches ASIC registers.

This repository holds a synthesizable SystemVerilog implementation of the
SCAX core, from the decoded e-link byte stream to the user registers, plus
self-checking testbenches for every block and for the whole design.

## Architecture

```
 rx bytes ─► Deframer ─► Traffic Handler ─┬─► Controller (CRB/CRC/CRD, chip ID)
            (FCS check)   (FSM, RX bus,   ├─► S-Reply Manager (link frames, N(S)/N(R))
                           reply bus)     └─► I2C Router ═╦═► I2C Channel 0 ─► Register File 0 ─► user regs
 tx bytes ◄─ Framer ◄──── reply ◄─────────────────────────╠═► I2C Channel 1 ─► Register File 1 ─► user regs
            (FCS gen)                                      ╚═► ... up to 16 channels
 debug buffers: one on rx, one on tx               SCAX Memory Controller on 2 slots of one Register File
```

| File | Block |
|---|---|
| `rtl/scax_pkg.sv` | Shared constants: channel numbers, command codes, error and status bits, frame structs, CRC-16 step function |
| `rtl/scax_deframer.sv` | Buffers one inbound frame, checks its FCS and length, and presents its fields |
| `rtl/scax_framer.sv` | Serialises a reply frame and appends the FCS |
| `rtl/scax_traffic_handler.sv` | Routes each frame to a sub-module, waits for the reply, and generates error replies |
| `rtl/scax_controller.sv` | Channel-enable registers (CRB/CRC/CRD) and the chip ID |
| `rtl/scax_sreply_manager.sv` | Link-level (unnumbered/supervisory) frames and sequence numbers |
| `rtl/scax_i2c_router.sv` | Steers requests to one channel and brings the reply back; pipelined strobes, held buses |
| `rtl/scax_i2c_channel.sv` | Emulated SCA I2C channel with an optional CDC mode |
| `rtl/scax_i2c_access.sv` | Multicycle register-file access engine used by a channel |
| `rtl/scax_cdc_fifo.sv` | Gray-pointer dual-clock FIFO used in CDC mode |
| `rtl/scax_register_file.sv` | Combinational address demultiplexer (writes) and multiplexer (reads) to the user registers |
| `rtl/scax_mem_ctrl.sv` | RAM access through two register slots, with an auto-incrementing pointer |
| `rtl/scax_debug_buffer.sv` | Circular capture buffer for a byte stream |
| `rtl/scax_top.sv` | Everything wired together |

Only one transaction is in flight at a time. The Traffic Handler accepts a
frame, hands it to exactly one sub-module, waits for that sub-module's
one-cycle reply pulse, and passes the reply to the Framer. Only then does it
take the next frame. Later frames wait in the Deframer (`rx_ready` low) and
in the e-link FIFO in front of it.

## The link protocol as implemented

The SCA protocol details below are the commonly documented GBT-SCA values.
The interoperability of this RTL with a real back-end rests on them, so check
them against your back-end before deployment. All of them are constants in
`scax_pkg`.

Frames arrive on `rx_*` as bytes. `rx_sop` marks the first byte and `rx_eop`
the last. The HDLC flags and 8b10b coding are handled outside this core by
the e-link interface.

| Kind | Inbound bytes | Outbound bytes |
|---|---|---|
| Information (command) | ADDR CTRL TRID CH LEN CMD D3 D2 D1 D0 FCSlo FCShi (8 to 12 bytes; fewer data bytes are zero-filled) | ADDR CTRL TRID CH ERR LEN D3 D2 D1 D0 FCSlo FCShi |
| Link-level | ADDR CTRL FCSlo FCShi | ADDR CTRL FCSlo FCShi |

- **FCS.** The FCS is the HDLC CRC-16: polynomial x^16+x^12+x^5+1, processed LSB first, initial value 0xFFFF, complemented on transmission. A received frame is good when the CRC over all its bytes, FCS included, leaves the residue 0xF0B8. Frames with a bad FCS or a wrong length are dropped silently; `fcs_err` / `len_err` pulse.
- **Control byte.** Bit 0 = 0 marks an information frame, with N(S) in bits 3:1 and N(R) in bits 7:5.
  - CONNECT (0x2F) and RESET (0x8F) are answered with UA (0x63) plus the P/F bit. They clear the sequence numbers and the channel enables.
  - TEST (0xE3) is echoed.
  - RR (S-frame 0x01) is answered with RR carrying the current N(R).
  - Every received command frame sets N(R) to its N(S)+1. Every information reply carries the next N(S), which then increments.
- **Channel routing.** The CH byte selects the destination:
  - channel 0x00 (controller) and channel 0x14 (chip-ID read) go to the Controller;
  - channels 0x03–0x12 are I2C channels 0–15.
- **Error byte.**
  - An unknown channel, or an I2C channel that was not built, is answered with error bit 1.
  - A built channel whose enable is off is answered with error bit 5.
  - An unknown command is answered with error bit 2.
  - Error replies still carry LEN = 4 and zero data.
- **Controller.**
  - W/R_CRB (0x02/0x03), W/R_CRC (0x04/0x05) and W/R_CRD (0x06/0x07) take the register value in D3 (the first data byte).
  - The I2C channel enables follow the SCA bit assignment: channels 0–4 are CRB bits 7:3, channels 5–12 are CRC bits 7:0, and channels 13–15 are CRD bits 2:0.
  - Command 0xD1 on channel 0x14 returns `CHIP_ID` as a 24-bit value.

### I2C channel commands

A channel behaves like an SCA I2C master in 10-bit addressing mode. Instead
of addressing a slave, the 10-bit address selects a 32-bit user register:

| Command | Code | Action |
|---|---|---|
| W_CTRL / R_CTRL | 0x30 / 0x31 | Control register (stored and read back only) |
| R_STR | 0x11 | Status of the last command: 0x04 success, 0x40 no register at that address (NOACK), 0x20 invalid command |
| W_DATA0 | 0x40 | Load the 32-bit write-data register from D3..D0 |
| R_DATA0 | 0x41 | Return the 32-bit read-data register |
| M_10B_W | 0xE2 | Write the write-data register into user register `data[9:0]`; the reply's D0 holds the status |
| M_10B_R | 0xE6 | Read user register `data[9:0]` into the read-data register; the reply's D0 holds the status |

A register write is therefore two frames (W_DATA0, then M_10B_W). A register
read is also two frames (M_10B_R, then R_DATA0). Other SCA I2C modes
(single-byte, 7-bit addressing, multi-byte with NBYTES) are not implemented
and answer "invalid command".

## Register files and the multicycle paths

A Register File is pure combinational logic. Writes use the address to steer
a one-cycle write strobe to one of up to `N_REGS` (1024) user registers. The
write data goes to all registers in parallel on `ufl_wr_data[k]`. Reads use
the address to select one of the `ufl_rd_data[k][i]` words. A matching
`ufl_rd_en[k][i]` pulse lets the user logic attach FIFOs, whose reads
consume data. The user registers themselves live in the user's logic. A
register narrower than 32 bits is simply zero-extended there.

With 1024 × 32-bit inputs, this multiplexer is large and slow. A 320 MHz core
clock cannot pass through it in a single cycle. The channel therefore
accesses it as a multicycle path (`scax_i2c_access`):

1. Address and write data are registered and then held.
2. The engine waits `RF_MCP` clocks.
3. Only then does it pulse the write strobe or sample the read data.

The address is thus stable for `RF_MCP`+1 clock edges before it is used. The
matching timing constraint to apply in the implementation tool is a
multicycle path of `RF_MCP`+1 from the channel's `rf_addr`/`rf_wdata`
registers to the user registers and back. An address with no register behind
it (possible when `N_REGS` < 2^`ADDR_W`) gives NOACK status and no strobe.

The same idea relaxes the placement of channels relative to the core:

- the I2C Router drives one shared request bus, held stable for a whole transaction;
- the one-bit request and reply strobes pass through `ROUTER_PIPE` pipeline registers in each direction.

A channel and its Register File can thus be placed far from the core, next
to the user logic they serve. The multi-bit router↔channel buses again need a
multicycle constraint in the implementation tool.

Latency at the defaults (`RF_MCP` = 4, `ROUTER_PIPE` = 2), from the last
request byte to the first reply byte, is about 20–30 clocks for any
operation. At 320 MHz that is under 100 ns. On a real e-link the frame
transfer itself dominates: 12 bytes at 80 Mb/s with 8b10b take 1.5 µs.

## CDC mode

By default every channel and Register File runs on the core clock `clk`, and
`ufl_clk` is ignored. Setting bit k of `CDC_MODE` moves channel k's access
engine and Register File to `ufl_clk[k]`, the clock of the user registers:

- a write FIFO carries {write flag, address, data} from the core to the user clock;
- a read FIFO carries {no-ack, read data} back;
- channel k's `ufl_*` signals are then synchronous to `ufl_clk[k]`.

The channel's command handling is unchanged. The FIFOs (`scax_cdc_fifo`) use
Gray-coded pointers with two-flop synchronisers. Constrain the
synchroniser inputs as asynchronous paths.

## SCAX Memory Controller (RAM access)

To reach a RAM without spending one register address per word, the SCAX
Memory Controller takes two slots of one Register File (`SMC_EN`, `SMC_CH`,
`SMC_ADDR_SLOT`; by default the last two registers, 1022 and 1023, of
channel 0):

- writing slot 1022 loads the RAM pointer; reading it returns the pointer;
- writing slot 1023 writes the RAM at the pointer; reading it returns the RAM word at the pointer;
- both accesses to slot 1023 advance the pointer by one (wrapping at 2^`RAM_AW`).

A block of RAM is thus written or read with one pointer write followed by
back-to-back data accesses. The RAM port (`ram_*`) expects a synchronous
RAM with one clock of read latency. That latency is well within the
multicycle access. The user inputs for those two slots of that channel are
ignored.

## Debug buffers

Two capture buffers record the inbound and outbound byte streams while
`dbg_enable` is high, storing {sop, eop, byte}. They are circular,
`DBG_DEPTH` deep, and can be read at any time through `dbg_rd_addr`. This
lets the exchange with the back-end be inspected in hardware with any
logic analyser or register read-out.

## Parameters of `scax_top`

| Parameter | Default | Meaning |
|---|---|---|
| `CH_ACTIVE` | 16'h0003 | Which of the 16 channels (with Register Files) are built |
| `CDC_MODE` | 16'h0000 | Channels that run on their `ufl_clk` |
| `ADDR_W` / `N_REGS` | 10 / 1024 | Register address width and number of registers per file |
| `RF_MCP` | 4 | Register-file multicycle length (clocks before the strobe) |
| `ROUTER_PIPE` | 2 | Strobe pipeline stages between router and channels |
| `SMC_EN`, `SMC_CH`, `SMC_ADDR_SLOT`, `RAM_AW` | 1, 0, N_REGS-2, 10 | Memory controller placement and RAM size |
| `DBG_DEPTH` | 512 | Debug buffer depth |
| `CHIP_ID` | 24'h5CA001 | Value returned by the chip-ID read |

The width-16 ports always exist. Signals of channels that are not built are
tied to zero.

## Simulating

Each block has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if the
design hangs. The shared testbench helpers, including an independent CRC
model and frame builders, are in `tb/scax_tb_pkg.sv`. With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb --top-module tb_scax_top \
    rtl/scax_pkg.sv tb/scax_tb_pkg.sv rtl/*.sv tb/tb_scax_top.sv
./obj_dir/Vtb_scax_top
```

The two end-to-end testbenches play the back-end: they send real frames with
FCS, and they model the user registers and a RAM.

- `tb_scax_top` uses a small configuration: 128 registers per file, and channel 1 in CDC mode with an unrelated user clock. It exercises:
  - connect, test, RR;
  - controller registers and chip ID;
  - disabled, absent and invalid channels, and invalid commands;
  - a dropped bad-FCS frame;
  - register writes and reads on both channels;
  - RAM writes and reads through the memory controller;
  - stalls on both byte streams;
  - the debug buffers.

  It counts how often each of these happened and fails if any never did.
- `tb_scax_top_full` uses the defaults (two channels of 1024 registers each). It:
  - writes every register of both files in random order, with random data;
  - reads them all back in a different random order, then checks them;
  - checks the reply latency.

  It takes a couple of seconds with Verilator.

## Limits and departures

- The e-link encoder/decoder (8b10b and HDLC framing at 80/160/320 Mb/s) is not included. The core starts and ends at decoded byte streams with frame boundaries.
- Register Files are generic: `N_REGS` registers of 32 bits, all readable and writable. Generating a register file from a register list is left to the user's tooling.
- Only the SCA commands a register-access back-end needs are implemented (see above). Other SCA channels (GPIO, ADC conversions, SPI, JTAG, DAC) answer "invalid channel", except the chip-ID read.
- The router and Register File multicycle paths are enforced by the RTL (held buses, delayed strobes). The matching timing exceptions must be added in the implementation tool.
- With the default `N_REGS` = 2^`ADDR_W`, every address has a register, so a NOACK status only appears with smaller register files.
- There is no timeout. Every sub-module always answers, and only one transaction is outstanding.
