# Binding an FPGA configuration to one device with its Device DNA

Many FPGAs have a factory-programmed, read-only serial number, the *Device
DNA* (57 bits on Spartan-3A class parts). A design can refuse to work unless
it finds, in its own configuration flash, a value derived from that number.
A copied flash then fails on any other board. The usual way to set this up
is a production step: read each device's DNA, encrypt it, and write the
result into the flash. That step is what makes the protection awkward in
volume production.

This RTL removes that step. The flash is programmed with the same image for
every board, and the board creates its own check value on its first
power-up:

* **Design 1, the controller image** (`controller_design`) sits at the bottom
  of the flash, where the FPGA always boots. It contains the design being
  protected, or rather that design's enable.
* **Design 2, the one-time image** (`one_time_design`) sits further up. It
  reads the DNA, encrypts it, writes the result into a small *data segment*
  at the end of the flash, and then **erases its own first page**. It can run
  only once.
* The two images switch between each other by *multiboot*: a design writes a
  short command sequence into the FPGA's internal configuration access port
  (ICAP), and the FPGA reconfigures from another flash address.

## What happens at power-up

First power-up after the flash is programmed:

1. The FPGA loads Design 1.
2. Design 1 reads the data segment. It is blank (erased flash reads all
   ones).
3. Design 1 triggers a multiboot to Design 2.
4. Design 2 reads the DNA, pads it with zeros to 64 bits and encrypts it
   with TEA under the product key.
5. Design 2 programs the 64-bit result into the data segment. From now on it
   is the *stored check value*.
6. Design 2 erases the first page of its own image, then triggers a multiboot
   back to Design 1. Design 1 now continues as in regular use.

Every later power-up (regular use):

1. The FPGA loads Design 1.
2. Design 1 reads the DNA and encrypts it the same way, giving the
   *active value*.
3. At the same time it reads the stored check value.
4. If the two are equal, `design_enable` goes high and stays high. Otherwise
   `auth_fail` goes high and the enable stays low.

Why a copy fails:

* A flash copied from a used board carries the check value of the original
  device. On another device the active value differs, so the design is not
  enabled.
* If someone erases the data segment of the copy, Design 1 jumps to Design 2.
  But Design 2's first page is gone, so configuration fails and no new check
  value is created.
* A copy of a fresh, never-booted flash does authenticate on the board it is
  put on. That is the same as legitimately building one more board. The
  scheme does not stop it, because the unused image carries no device
  identity.

The key is the only secret. Both images must be built with the same `KEY`.

## Flash memory map

The flash is an AT45DB161D DataFlash: 16 Mbit, SPI, used here in binary
512-byte page mode with 21-bit byte addresses sent as 3 bytes. The map is set
by parameters; the defaults are in `auth_pkg`:

| part | address | contents |
|------|---------|----------|
| 1 | `0x000000` | Design 1 bitstream (about 318 KiB uncompressed for an XC3S700A) |
| gap | | left blank; multiboot images that use a DCM need a gap here |
| 2 | `0x080000` | Design 2 bitstream; its first page is erased after first use |
| 3 | `0x1FFE00` | data segment: the 8-byte check value, big-endian, in the last page |

The two images take about 636 KiB of the 2 MiB part. Once Design 2 has been
used, its area can be reused.

## The check value

`value = TEA_encrypt(key, {7'b0, DNA[56:0]})`

TEA is the Tiny Encryption Algorithm: a 64-bit block, a 128-bit key and 32
cycles. Each cycle is two Feistel half-rounds:

```
sum += 0x9E3779B9
v0  += ((v1 << 4) + k0) ^ (v1 + sum) ^ ((v1 >> 5) + k1)
v1  += ((v0 << 4) + k2) ^ (v0 + sum) ^ ((v0 >> 5) + k3)
```

Here v0 is block bits 63:32, and k0 is key bits 127:96. `tea_encipher` runs
one cycle per clock, so a block takes 32 clocks. The core matches the
published all-zero vector `41EA3A0A 94BAA940`. The DNA's 57 bits go in the
low bits of the block, and the upper 7 bits are zero.

## Module hierarchy

```
fpga_auth_top                  both images side by side (never loaded together)
├── controller_design          Design 1
│   ├── at45_flash_ctrl        flash command engine
│   │   └── spi_byte_master    SPI mode-0 byte shifter
│   ├── data_segment_controller  reads the data segment, decides "blank"
│   ├── dna_encryptor          active value obtainer
│   │   ├── dna_port_reader    57-bit DNA out of the DNA port, zero-padded
│   │   └── tea_encipher       TEA, 32 cycles
│   ├── check_comparator       equality, verdict held until reset
│   └── multiboot_trigger      ICAP IPROG sequence to Design 2
└── one_time_design            Design 2
    ├── at45_flash_ctrl
    ├── dna_encryptor          DNA part
    ├── otd_memory_part        writer, then eraser of its own start page
    └── multiboot_trigger      ICAP IPROG sequence back to Design 1
```

Shared types and constants (flash opcodes, address map, TEA constants,
default key) are in `rtl/auth_pkg.sv`.

### Top level

`fpga_auth_top` exists so that both images can be built and simulated as
one unit. In hardware each image is its own bitstream. Each image has its own
group of pins and its own reset: `cd_*` for Design 1 and `otd_*` for
Design 2. Hold the image that is not loaded in reset. The top passes the
same `KEY` and memory map to both images. For a real build, synthesise
`controller_design` and `one_time_design` separately. Map their ports to
the vendor DNA port primitive (`DNA_PORT`), the ICAP primitive
(`ICAP_SPARTAN3A`) and the configuration flash pins. Connect
`design_enable` to the protected design.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `KEY` | `128'h3A5C96E1_0F2B7D48_C1E65B09_A47F8263` | product key; set your own |
| `CD_ADDR`, `OTD_ADDR`, `DS_ADDR` | `0x000000`, `0x080000`, `0x1FFE00` | memory map |
| `SPI_CLK_HALF` | 2 | SPI half period in clocks (12.5 MHz at 50 MHz) |
| `DNA_CLK_HALF` | 25 | DNA port half period in clocks (1 MHz at 50 MHz) |
| `ROUNDS` | 32 | TEA cycles |

### Timing at 50 MHz with the defaults

* DNA read: (1 + 2·57)·25 + 1 = 2876 clocks, about 58 µs.
* TEA: 32 clocks, plus 1 clock to start it.
* Flash read of the data segment: 12 bytes of 34 clocks each, plus a 4-clock
  chip-select gap, about 8 µs. It overlaps the DNA read.
* Design 1 therefore decides about 2900 clocks after reset.
* Design 2 adds one page program and one page erase. Each lasts as long as the
  flash reports busy, which is milliseconds on the real part.
* Multiboot: 20 ICAP bytes, one per clock while ICAP `BUSY` is low.

## Interfaces of the building blocks

All modules use one clock and an asynchronous active-low reset.

* **start/done blocks**: `tea_encipher`, `dna_port_reader`, `dna_encryptor`,
  `spi_byte_master`, `data_segment_controller`, `otd_memory_part` and
  `multiboot_trigger` all work the same way. A one-clock `start` (or
  `trigger`) is taken while `busy` is low. A one-clock `done` marks valid
  results, which are held until the next start.
* **Flash request port**: `at45_flash_ctrl` takes `req_valid`/`req_ready`
  with `req_cmd` (`FL_READ8`, `FL_PROG8`, `FL_ERASE`), a 24-bit address and
  64-bit write data. It pulses `done` once per command, with `rdata` valid
  after a read. After a program or erase it polls the status register
  (`0xD7`) until the ready bit is set, so `done` means the flash has really
  finished. The opcodes it uses are `0x03` (read), `0x82` (page program
  through buffer 1) and `0x81` (page erase).
* **DNA port**: `dna_clk`, `dna_read`, `dna_shift`, `dna_din` (held low) and
  `dna_dout`. One DNA clock with `READ` high loads the identifier. Then
  `DOUT` is sampled and one DNA clock with `SHIFT` high is given, 57 times in
  all, MSB first.
* **ICAP**: `icap_ce_n`, `icap_write_n`, `icap_din[7:0]` and `icap_busy`.
  The sequence is `FFFF AA99 3261 <addr[15:0]> 3281 <03, addr[23:16]> 30A1
  000E 2000 2000`. That is a dummy word, the sync word, GENERAL1, GENERAL2
  (SPI read opcode and the high address byte), then the CMD register set to
  IPROG. Each word goes out as two bytes, high byte first.

## What comes from the scheme and what is this implementation's choice

The following come from the scheme itself:

* the two images and what each one contains
* the three-part flash layout with the data segment at the end
* the boot flow above, including the branch on a blank data segment
* padding the 57-bit DNA with zeros to 64 bits
* TEA with a 128-bit key, a 64-bit block and 32 rounds
* write first, then erase the one-time image's start page
* the return to Design 1 by multiboot
* one ICAP and one DNA port per image

The following are choices made here, and worth checking before use:

* **The key.** No value is given; the default is arbitrary.
* **The relation between active and stored value.** Plain equality. Any
  other relation would go in `check_comparator`.
* **"Blank".** The data segment counts as blank when all 64 bits are ones.
* **Where the padding zeros go.** They are the upper 7 bits.
* **The addresses** in the memory map.
* **The flash command set and page mode.** These follow the AT45DB161D
  data sheet as generally known. A part set to 528-byte pages needs
  different address bytes.
* **The ICAP word sequence and byte order.** Check both against the
  configuration guide of the exact device; some families need the bits of
  each ICAP byte reversed.
* **Clocking.** The DNA port and SPI clocks come from dividers, and TEA runs
  one cycle per clock.
* **Parallel start.** Design 1 starts its DNA read and its flash read at the
  same moment.
* **What happens when authentication fails.** Outputs off, reduced function
  and active defence are all left to the protected design. This RTL only
  provides `design_enable` and `auth_fail`.

The following are not included:

* the protected design
* the vendor primitives, which are modelled in `tb/` only
* these possible hardening steps:
  * a longer identifier (DNA fed back into the DNA port, or combined with a
    flash serial number or OTP register)
  * hiding the check value in a page of random filler
  * erasing all of Design 2 instead of its first page
  * XTEA, XXTEA or more rounds in place of TEA

## Resource use

After generic synthesis (no vendor mapping), Design 1 has 561 flip-flop bits
and Design 2 has 451. A published implementation of the same scheme on an
XC3S700A reports 539 and 367 flip-flops, which is below 5% of that device's
11,776. LUT and slice counts need a vendor flow and were not measured here.
The TEA datapath is the largest part of either image: nine 32-bit adders in the round
function plus the key, block and sum registers.

## Simulation

Every module has a self-checking testbench `tb/<module>_tb.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops through a watchdog if it
hangs. The testbenches use behavioural models of the parts that are not
designed here:

* `dna_port_model`: the DNA shift register, with a chosen identifier
* `at45db_model`: read, page program through buffer, page erase and status,
  with a busy time
* `icap_model`: decodes the ICAP words and reports IPROG with its address and
  opcode; it can raise `BUSY` every N bytes

`tb_ref_pkg` holds a reference TEA written from the algorithm's definition.

The end-to-end test is `fpga_auth_top_tb`. It runs with every parameter at
its default. It plays the FPGA's configuration logic: it releases the reset
of whichever image is "loaded" and follows IPROG requests. A request that
points at an erased start page counts as a failed configuration. The test
runs four scenarios:

1. first power-up
2. regular use
3. the used flash moved to a device whose DNA differs in one bit
4. that copy with its data segment erased

It counts the following mechanisms, and each must happen:

* multiboot on a blank data segment
* check value written
* self-erase
* multiboot back to Design 1
* authentication granted
* authentication refused
* failed configuration of the erased image
* ICAP `BUSY` holding a byte

`mass_production_tb` uses the same harness for the case the scheme is made
for: one image on many boards. Six boards with random DNA each boot a fresh
copy of the same image, and each must create its own check value. Then every
used flash is tried on every board. Each board must accept only its own
flash: 6 acceptances and 30 refusals.

To run it with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -y rtl -y tb \
  rtl/auth_pkg.sv tb/tb_ref_pkg.sv tb/fpga_auth_top_tb.sv \
  --top-module fpga_auth_top_tb -o sim
./obj_dir/sim
```

For any other testbench, replace the file and top module names. It finishes
in well under a second. The testbenches give delays in plain time units with
a 20-unit (or 10-unit) clock period. The flash model's busy time is short on
the same scale, not the milliseconds of the real part.

The assertions in `controller_design` (the enable is never given unless the
stored and active values are equal) and `one_time_design` (no reboot before
the self-erase) are checked in every simulation that includes them.

## Limits of the verification

* Everything is checked against behavioural models written from the same
  understanding of the parts. The flash opcodes, the DNA port protocol and
  the ICAP sequence have not been checked on hardware.
* The key and the memory map are not secrets in this RTL. A product must
  set its own `KEY`.
* Nothing protects against an attacker who can read the bitstream and
  extract the key. The scheme relies on the bitstream being hard to reverse.
