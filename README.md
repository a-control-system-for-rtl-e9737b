# FDDA tuning logic

Analog circuits built for very low supply voltages, here 0.4 V fully
differential difference amplifiers (FDDAs), rarely come out of fabrication
exactly as simulated. Process, voltage and temperature spread move their
offset and their stability margin. Fuse or laser trimming cannot be undone.
This design keeps the trim in digital registers instead. The registers
switch the amplifiers' signal paths and connect resistor and capacitor banks,
and they can be rewritten at any time. An external controller reaches them
over a four-pin serial bus.

The chip carries three FDDAs. Each FDDA has 14 tuning registers, 42 in all.
Each FDDA has two amplifier stages, a frequency-compensation block (FC) and
an offset-calibration block (OC), all set by its registers. On the test
board, a PC application sends commands to a microcontroller. The
microcontroller bit-bangs the serial bus frames on GPIO pins.

The RTL here is the on-chip digital part: the serial bus slave and the
register banks. The amplifiers, the microcontroller and the PC application
are not part of it. The register contents leave the design on one output
port, `tune_o`, for the analog circuit.

## Structure

```
             +------------------------- tuning_logic ------------------------+
 CLK   ----->|                                                               |
 RST_N ----->|  serial_slave  --wr_en/fdda/reg/data-->  tune_regs  (FDDA 1)  |--> tune_o[0]
 DATA_IN --->|  (frame decode)                          tune_regs  (FDDA 2)  |--> tune_o[1]
 DATA_OUT <--|                <------ rd_data mux ----  tune_regs  (FDDA 3)  |--> tune_o[2]
             +---------------------------------------------------------------+
```

| file | contents |
|------|----------|
| `rtl/tuning_pkg.sv` | register map (names, addresses, widths, reset values) and frame header type |
| `rtl/serial_slave.sv` | bus frame decoder: header shift register, write strobes, read shifter |
| `rtl/tune_regs.sv` | the 14 registers of one FDDA, width masking, synchronous reset |
| `rtl/tuning_logic.sv` | top: one slave, one `tune_regs` per FDDA, write steering and read mux |
| `tb/serial_master.sv` | behavioural bus controller (the microcontroller's role), for testbenches only |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

One clock drives everything: the bus clock CLK, supplied by the controller.
It uses rising edges only. There is no second clock domain and no clock
crossing. The bit rate is whatever the controller's software reaches, and
no speed is required.

## Register map

The addresses follow the order of the register panel in the control
application. `tune_o[f][a]` carries register `a` of FDDA `f`, right-aligned
in a `BANK_W`-bit slot. Slot bits above a register's width are constant
zero.

| addr | name | width | reset | role |
|-----:|------|------:|------:|------|
| 0 | EN_ST_1 | 1 | 1 | enable |
| 1 | EN_ST_2 | 1 | 1 | enable |
| 2 | EN_HP | 1 | 0 | enable |
| 3 | EN_CALIB | 1 | 0 | enable |
| 4 | EN_RECONFIG | 1 | 0 | enable |
| 5 | EN_CMFB_REF_EXT | 2 | 0 | enable/select |
| 6 | CMFB_1_SEL | 2 | 0 | select |
| 7 | CMFB_2_SEL | 2 | 0 | select |
| 8–10 | C_TUNE_1..3 | BANK_W | 2^(BANK_W−1) | capacitor bank codes |
| 11–13 | R_TUNE_1..3 | BANK_W | 2^(BANK_W−1) | resistor bank codes |

Only the names hint at which analog switch each control drives; the
mapping is left to the analog design. The control application shows bank codes as physical values (for example
900 fF or 201.7 kΩ). Its Plus and Minus buttons step a code by one. In
hardware, that step is a read followed by a write of the new code.

## Serial frames

The bus is half duplex. The controller drives `DATA_IN` and the chip
answers on `DATA_OUT`, never both at once. The chip samples `DATA_IN` on the
rising edge of CLK. The controller should change `DATA_IN` while CLK is low
and read `DATA_OUT` just before the next rising edge. The line idles low,
and a 1 seen while idle is a start bit. Fields are sent MSB first:

```
 START | OP | MODE | FDDA[1:0] | REG[3:0] | payload
   1     1=write     0..2        0..13
         0=read
             0 = address mode: one register, REG selects it
             1 = full mode: all 14 registers of the FDDA, address 0 first
                 (REG is sent but ignored)
```

Every register moves as one `DATA_W = BANK_W`-bit word, whatever its
width. Numbering the start bit's rising edge 0:

```
 edge      0   1 ........ 8   9 ......... 8+W   9+W
 write     S   OP MODE F F R R R R   d[W-1] ... d[0]    (next start allowed)
                                     ^ register written on edge 8+W
 read      S   OP MODE F F R R R R   turn   ...           (next start allowed)
 DATA_OUT  0 .....................0  d[W-1] ... d[0]  0
                                     ^ driven after edge 9, one bit per edge
```

- **Write:** the register is written on the same edge that samples the
  last bit of its word. In full mode, 14 words follow back to back, and word
  `i` is written on edge `8 + (i+1)·W`.
- **Read:** the edge after the header (edge 9) is the turnaround. It loads
  the register and puts its MSB on `DATA_OUT`. Each later edge shifts out the
  next bit, and in full mode the next word follows with no gap. `DATA_OUT`
  is low at all other times.
- **Frame length:** a frame of either kind takes `9 + n·W` clocks, with
  `n` = 1 or 14. With W = 4 that is 13 clocks in address mode and 65 in full
  mode. The next start bit may come on the very next edge.
- **Missing addresses:** a frame naming FDDA 3 or register 14/15 still runs
  its full length. It writes nothing and reads zeros.
- **Reset:** RST_N is synchronous and active low. While it is low at a
  rising edge, every register returns to its reset value and the slave
  drops any frame in progress. This is the only way to abort a frame.

Setting all three FDDAs (the application's "All FDDAs") means sending one
full-mode frame per FDDA.

## Parameters

| module | parameter | default | meaning |
|--------|-----------|--------:|---------|
| `tuning_logic` | `NUM_FDDA` | 3 | amplifiers on the chip (1..4, limited by the 2-bit field) |
| `tuning_logic`, `tune_regs` | `BANK_W` | 4 | width of a bank code and of a bus data word (2..32) |
| `serial_slave` | `DATA_W` | 4 | data word width; the top sets it to `BANK_W` |

At the defaults, the register banks hold 105 bits of state (3 × (5·1 + 3·2 +
6·4)). The whole design synthesizes to about 135 flip-flops and about 200
word-level cells.

## What is fixed by the original design and what is chosen here

These points follow the original system description:

- Three FDDAs with 14 registers each.
- The register names and order.
- The 1- and 2-bit widths of the first eight registers.
- Individual read and write access to every register.
- Address-mode and full-mode access.
- The four bus pins and half-duplex operation.
- Rising-edge operation and synchronous reset to defaults.

The reset values 1 for EN_ST_1/EN_ST_2 and 0 for the other controls are the
values the register panel shows. They are assumed to be the power-up state.

These are this design's own choices, because the description does not give
them:

- The whole frame layout: start bit, field order, field widths, MSB-first
  order and the one-clock turnaround.
- That each register moves in a fixed-width word.
- The bank-code width (`BANK_W = 4`) and the mid-scale reset value of the
  bank codes.
- How the bank codes map to capacitor and resistor values.
- Which `tune_o` bit drives which analog switch.
- The handling of missing addresses.

A controller written for the original chip would need its frame format
matched to this one.

The analog blocks are not modelled, because no behaviour is specified for
them. The microcontroller and the PC application are software, and are
represented only by the testbench bus model.

## Verification

Each testbench counts checks and ends with
`TB_RESULT checks=N failures=M`. Each has a cycle watchdog.

- `tb_tune_regs`: checks reset values, width masking on every register, and
  300 random writes (including to addresses 14 and 15), with every register
  compared after each write. It also checks that nothing is written without
  a strobe, and a second reset.
- `tb_serial_slave`: drives the slave through the bus model, with a register
  array in the testbench. It checks:
  - address writes to every FDDA/register combination, including missing
    ones, with the exact edge of each strobe;
  - full-mode writes (14 strobes in order and at the right edges);
  - address and full reads, bit for bit;
  - that `DATA_OUT` stays low outside reads;
  - frames sent back to back;
  - a reset that aborts a frame half way.
- `tb_tuning_logic`: runs the whole design at its default parameters, in the
  same sequence the control application would use. It reads everything
  after reset, writes and reads in address mode, does Plus/Minus
  read-modify-writes and full-mode writes and reads, sets all FDDAs, sends
  frames to missing addresses, and resets. It compares every read and every
  `tune_o` bit with its own model, checks frame lengths in clocks, and fails
  if any bus mechanism never occurred.

The design also asserts the bus rules: a write strobe only inside a write
payload and only for an existing register, and `DATA_OUT` high only during
a read payload.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/tuning_pkg.sv tb/tb_tuning_logic.sv --top-module tb_tuning_logic
./obj_dir/Vtb_tuning_logic
```

Replace the testbench name to run the other two. Each finishes in well under
a second.

To drive the chip from another testbench, instantiate `serial_master`. Then
call its tasks: `reset`, `write_addr`, `write_full`, `read_addr`,
`read_full` and `idle`. Change the frame format in `tuning_pkg`, and change
`serial_slave` and `serial_master` together with it.
