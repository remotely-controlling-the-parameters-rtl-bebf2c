# CAN-controlled gain and filter settings for a data-acquisition crate (Zynq-7000 PL side)

A data-acquisition system holds up to four plug-in modules, each with two channels whose
gain and filter settings must be set remotely. The user enters a setting on a PC; it
travels as a CAN frame to a Zynq-7000 SoC (the XC7Z020 on a ZC702 board), where software on
the ARM core receives it with the SoC's built-in CAN controller and hands it to the
programmable logic (PL) over the EMIO GPIO bus. The PL turns it into enable lines and a
4-bit parameter value for the modules. The other way round, the PL watches which modules
are inserted and reads the module ID. The software sends a status frame back to the user
whenever one of these changes.

This repository holds the PL logic as synthesizable SystemVerilog, plus testbenches. The CAN
controller, the processor, its software and the analog modules are outside it. The
end-to-end testbench has a behavioural model of the PS software.

## The command word

The PS gives the PL a 7-bit command word and an 8-bit parameter byte:

| bits of `decode` | meaning |
|---|---|
| [6]   | write control: nothing is driven unless it is 1 |
| [5:4] | parameter type: `01` gain, `10` filter (`00`, `11` select no type) |
| [3]   | channel (0 or 1) within the module |
| [2:0] | module number |

The parameter byte carries the filter value in bits [7:4] and the gain value in bits [3:0].
The two type codes are this design's choice. The source design names the field but not
its values.

## How a command is accepted (`param_decoder`)

This is the core of the design:

1. The module number is decoded one-hot (`mod_ena_sig`). Numbers 4 to 7 give no bit.
2. That vector is ANDed with `mod_ins`, the modules that are inserted. The command is
   accepted only if the result still equals the decoded vector, which means the addressed
   module is present, and write control is 1.
3. When a command is accepted, the module line is driven, along with the channel line. The
   gain or filter type line follows the type field. `data_out` gets the gain nibble for a
   gain write or the filter nibble for a filter write.
4. When a command is rejected, all enable lines are low. `data_out` keeps its last value.

All outputs are registered, so they appear one clock after the command word. The enables
are levels. They stay high as long as the PS presents an accepted command. They drop when
write control goes low or the module is pulled. A module therefore latches `data_out` while
its module, channel and type lines are all high. With type code `11` the module and channel
lines are still driven but no type line is. In that case `data_out` does not change. The
decoder also keeps the last accepted command and parameter byte (`applied_cmd`,
`applied_param`), so the PS can report what the PL is using. Assertions check that every
enable group is one-hot-or-zero, and that no channel or type line is ever high without a
module line.

## Watching the modules (`status_monitor`)

The module-inserted inputs come from four switches on the evaluation board, standing in for
real modules. The 8-bit module ID comes from FMC pins and reads 0xFF with no module fitted.
All of these inputs pass two-flop synchronisers. A change sets a sticky `changed` flag three
clocks later. The PS clears the flag with an `ack` pulse. A change in the same clock as the
ack keeps the flag set. The first value sampled after reset also counts as a change, so the
PS reports the initial state. The synchronisers and the flag/ack handshake are this
design's choice. The source design only says that the PL monitors these signals and that
the PS reports every change.

## Top level and EMIO map (`zc702_pl_top`)

The top wires the two blocks to the 64-bit EMIO bus. The bit map is this design's own:

| direction | bits | content |
|---|---|---|
| PS → PL (`emio_gpio_o`) | [6:0] | command word |
| | [14:7] | parameter byte |
| | [15] | ack for the change flag |
| PL → PS (`emio_gpio_i`) | [3:0] | modules inserted (synchronised) |
| | [15:8] | module ID |
| | [22:16] | last accepted command |
| | [31:24] | its parameter byte |
| | [35:32] | current `data_out` |
| | [40] | change flag |

All other input bits read 0. The decoder uses the synchronised switch values, so its
presence check and the PS report always see the same value. The PS must write the command
word and the parameter byte in one GPIO write. If it does not, the PL can act on a
half-updated pair for one clock.

Parameters: `EMIO_W` (64, the PS maximum; must be above 40) and `NUM_MODULES` (4). The
status frame the PS model sends has byte 0 for the inserted modules, byte 1 for the module
ID, byte 2 for the command word in use and byte 3 for its parameter byte. Bytes 4 to 7 are
zero.

## Files

- `rtl/can_ctrl_pkg.sv`: command/parameter structs, type codes, EMIO bit positions
- `rtl/param_decoder.sv`, `rtl/status_monitor.sv`, `rtl/zc702_pl_top.sv`
- `tb/param_decoder_tb.sv`: all 128 command words × all 16 insertion patterns, checked against
  a reference model, with one-clock latency checked
- `tb/status_monitor_tb.sv`: 200 random input changes, checking the synchroniser delay, the
  sticky flag, the ack, and a change that arrives with an ack
- `tb/zc702_pl_top_tb.sv`: end to end at default parameters, through `tb/ps_app_model.sv`.
  It sets gains 1, 2, 4 and 8 and checks a modelled gain stage (200 mV in gives 200, 400, 800
  and 1600 mV out). It also covers a filter write, an absent module, write control low, a
  module number out of range, the unused type code, and module insertion, removal and
  module-ID changes with their status frames. It counts each of these and fails if one never
  happens.

Each testbench prints `TB_RESULT checks=N failures=M`. To run one with Verilator:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
        rtl/can_ctrl_pkg.sv tb/zc702_pl_top_tb.sv --top-module zc702_pl_top_tb
    ./obj_dir/Vzc702_pl_top_tb

## What to trust and what differs from the original design

The decoding rule (AND with the inserted modules, compare, then channel and type, then the
nibble select) follows the source design closely, as do the field positions in the command
word. The following are this design's own choices:

- the type code values
- the registered one-clock timing
- enables held while the command is presented
- `data_out` held between writes
- the reset values
- the treatment of module numbers 4 to 7
- the synchronisers and change flag
- the EMIO bit map
- the byte layout of the frames the PS model receives

The original PS software polls the switches and module ID itself. Here the PL also offers a
change flag, and the software can use either. The analog gain stages are modelled only as
registers latched by the enables.
