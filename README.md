# SecOC frame authentication core for CAN

A classic CAN bus carries no security: any node on it, or a device plugged into
the diagnostic port, can read every frame and inject its own. This design adds
message authentication in the style of AUTOSAR Secure Onboard Communication
(SecOC). It does not encrypt the frame. The sender appends a freshness value and
a truncated message authentication code (MAC) to the payload. A receiver that
shares the 128-bit key recomputes the MAC and accepts the frame only if both the
freshness value and the MAC match. The whole secured frame fits the 8-byte
payload of a classic CAN frame.

The core computes the MAC with four AES-128 encryptions in a chain. It sits
behind an AXI4-Lite register interface, so a soft processor can drive it: the
processor writes the inputs, starts an operation, polls for completion and reads
the result.

## The secured frame (PDU)

| bits   | field | content                                       |
|--------|-------|-----------------------------------------------|
| 63:32  | data  | the 32-bit payload                            |
| 31:21  | TFV   | the 11-bit freshness value                    |
| 20:0   | TMAC  | the 21 least significant bits of the 128-bit MAC |

The MAC covers three things: the payload zero-padded to 128 bits, an 11-bit
identifier (ID) and the freshness value (FV). The ID is authenticated but not
sent, so both ends must know it, for instance from the CAN identifier. The
layout is `secoc_pkg::pdu_t`.

## How the MAC is formed

`mac_manager` chains four AES-128 cores, all under the same key K:

```
C1  = AES_K(data)                    data = {96'b0, payload}
C2  = AES_K(C1 ^ {106'b0, ID, FV})
SK  = AES_K(128'b0)                  the "subkey"
MAC = AES_K(C2 ^ SK)
```

This has the shape of CMAC: a CBC-MAC chain whose last block is XORed with a
key-derived subkey. **It is not NIST SP 800-38B CMAC.** CMAC derives its subkeys
K1 and K2 by doubling AES_K(0) in GF(2^128), and its last block is the padded
final message block. Here SK is AES_K(0) used as it is, and the last step
encrypts `C2 ^ SK` with no further message block. Standard CMAC test vectors will
therefore not match. The testbenches check against a reference model of the
construction above.

The cores run one after another. Core *n+1* is enabled by `ce & last_round(n)`,
so each core starts as soon as the previous one is done. The subkey core runs
third, just before the final core that needs it. The chain is 4 x 11 = 44 clock
cycles from `ce` rising to `last_round`.

Two things here are choices this design makes. Inside the second block, ID sits
above FV in the low 22 bits. The subkey core runs third in the chain rather than
first or in parallel. Changing either changes every MAC value.

## The AES-128 core (`aes128`)

`aes128` is a standard FIPS-197 encryption core that does one round per clock
cycle and expands the round keys on the fly. Its enable is a level, not a
pulse:

- `ce` low: the core is idle and `last_round` is 0.
- On the first edge with `ce` high, it loads `msg ^ key` (the initial
  AddRoundKey) and the cipher key.
- On each of the next 10 edges it applies one round. The last round has no
  MixColumns.
- After the 10th round, `last_round` is 1 and `cipher` holds the result for as
  long as `ce` stays high.
- Dropping `ce` for one cycle re-arms the core.

`msg` and `key` are sampled only on the first enabled edge. This is what makes
the `ce & last_round` chaining work: each core's input is the previous core's
held output. `rst` is synchronous and active high.

The S-box is not written out as a table. `aes_pkg` computes it at elaboration
from its definition: the inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, found as
a^254 by square-and-multiply, then the affine map
`b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`. Each lookup
synthesizes to a 256-entry constant ROM. A core uses 20 lookups: 16 for the
state and 4 for the key schedule.

## Sender, receiver and the mode switch

`secoc_sender` runs the MAC manager on (data, ID, FV) and outputs
`PDU = {data[31:0], FV, MAC[20:0]}`. The PDU is combinational and is valid
while `last_round` is 1.

`secoc_receiver` splits the incoming PDU. It recomputes the MAC over the
padded data, the ID and its **own** FV, and compares two things:

- TFV must equal the local FV. This is an exact match, not a window.
- TMAC must equal the low 21 bits of the recomputed MAC.

When `last_round` is 1, `status` is 1 only if both comparisons pass. In that case
`data_out` is the padded payload; otherwise `data_out` is 0. Because the MAC is
computed over the local FV, a stale TFV already makes the MAC differ. The
explicit TFV comparison gives the same verdict and is kept as a separate
freshness step.

`secoc_top` holds one sender and one receiver:

- `mode_select = 1`: the sender is enabled (`ce & mode_select`), takes
  `data_in[31:0]` zero-padded to 128 bits, and drives `PDU_out`.
- `mode_select = 0`: the receiver is enabled (`ce & ~mode_select`), checks
  `PDU_in`, and drives `status` and `data_out[31:0]`.

`last_round` is that of whichever side is selected. The upper 96 bits of
`data_in` are ignored.

Freshness values are inputs here. This core does not maintain the AUTOSAR
freshness counters (trip counter, reset counter, message counter, reset flag).
Software has to keep the sender's FV and the receiver's expected FV in step.

## Processor interface (`secoc_axi`, the top)

`secoc_axi` is an AXI4-Lite slave with 32-bit data and 16 word registers. The
byte address is 4 x index.

| index | access | content |
|-------|--------|---------|
| 0-3   | RW | data_in; index 0 holds bits 31:0 (only index 0 is used by the core) |
| 4-7   | RW | key; index 4 holds bits 31:0 |
| 8-9   | RW | PDU_in; index 8 holds bits 31:0 |
| 10    | RW | ID in bits 26:16, FV in bits 10:0 |
| 11    | RW | control: bit 0 `ce`, bit 1 `mode_select` (1 = send), bit 2 core reset |
| 12    | RO | bit 0 `last_round`, bit 1 `status` |
| 13    | RO | data_out |
| 14-15 | RO | PDU_out; index 14 holds bits 31:0 |

One operation goes like this:

1. Write the key, the ID/FV register, and data_in (to send) or PDU_in (to
   receive).
2. Write control = `0b011` to send or `0b001` to receive.
3. Poll register 12 until bit 0 is 1.
4. Read PDU_out, or read status and data_out.
5. Write control = 0 before the next operation.

If W is the clock edge that writes the control register, the core finishes on
edge W+44. A status read whose address is taken on edge W+45, or later, sees
`last_round = 1`.

Bus behaviour:

- A write is accepted when AWVALID and WVALID are both high and no write
  response is pending. AWREADY and WREADY are high together in that cycle.
  BVALID follows one cycle later and is held until BREADY.
- A read is accepted when no read data is pending. RDATA and RVALID follow one
  cycle later and are held until RREADY.
- Byte strobes are honoured.
- Writes to read-only registers are accepted and ignored.
- Every response is OKAY.
- `s_axi_aresetn` is active low and synchronous. It resets the registers and,
  like control bit 2, the core.

Concurrent assertions in the module check the AXI hold rules on both sides.

## Where this design departs from or goes beyond its source

The block structure and the port list follow the original SecOC hardware: the
four-core MAC manager, the sender, the receiver, the mode-switched top, and the
16-register AXI peripheral. The field widths (11-bit ID and FV, 21-bit TMAC,
32-bit data, 64-bit PDU) and the MAC construction also follow it. These are this
design's own:

- The AES core's internal structure and cycle timing. The original used a
  third-party core with the same ports.
- The S-box computed at elaboration.
- The ordering of the MAC chain and the bit placement of {ID, FV}.
- `mode_select = 1` meaning "send".
- `last_round` at the top is a plain multiplexer. The original netlist had a
  latch there.
- The register map, the soft-reset bit and the AXI4-Lite handshake details.
- The exact-match freshness rule, and zeroing `data_out` when a frame is
  rejected.

Not included: the soft processor, the bus interconnect, the clocking and reset
IP, a freshness-value manager, and a CAN controller. The PDU is only made
available in registers.

## Size and speed

After coarse synthesis the peripheral has about 2,200 flip-flop bits. Eight AES
cores account for 271 bits each: two MAC managers, one in the sender and one in
the receiver. The register array adds 12 x 32 bits. Every operation takes 44
core cycles. At a 100 MHz bus clock that is 0.44 µs, plus the register accesses.
Only one of the two MAC managers runs at a time, so the area could be halved by
sharing one between the two modes. A single AES core that holds the chain state
in registers would need one eighth of the AES area for the same 44 cycles. This
design keeps the four-core structure of the original and does neither.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The expected values
come from `tb/aes_ref_pkg.sv`, an AES-128 model written separately from the RTL:
it uses byte arrays, a full key schedule, and an S-box found by searching for the
inverse. The package also has models of the MAC and the PDU.

| testbench | what it checks |
|-----------|----------------|
| `tb_aes128` | FIPS-197 and SP 800-38A known answers, 20 random blocks, 11-cycle latency, result held, clear on `ce` low, reset |
| `tb_mac_manager` | random MACs against the model, 44-cycle latency, single-bit changes in ID/FV/data change the MAC |
| `tb_secoc_sender` | PDU layout and value, 44-cycle latency, upper data bits enter the MAC but are not sent |
| `tb_secoc_receiver` | accepts genuine PDUs; rejects flipped data, flipped TMAC, stale FV, wrong ID and wrong key, with `data_out` zero |
| `tb_secoc_top` | send, then loop the PDU back in receive mode; tampered and replayed frames rejected |
| `tb_secoc_axi` | end to end over the bus at the default configuration, with the same scenarios plus byte strobes, read-only writes, soft reset mid-operation, and B/R back-pressure; the latency is checked with status reads timed to the edge; counts every mechanism and fails if one never happened |
| `tb_ecu_link` | two peripherals as sending and receiving ECU, software-kept freshness counters, eight frames delivered; a replayed, a tampered, a forged and a wrong-key frame rejected |

To run one with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
    rtl/aes_pkg.sv rtl/secoc_pkg.sv tb/aes_ref_pkg.sv tb/tb_secoc_axi.sv \
    --top-module tb_secoc_axi
./obj_dir/Vtb_secoc_axi
```

To run a different testbench, replace both occurrences of `tb_secoc_axi`.
`tb_ecu_link` also needs `tb/axil_master_if.sv`, an AXI4-Lite master bundle
with blocking read/write tasks; `-y tb` finds it. Every register that is
read has a reset, so the design also behaves the same in a two-state
simulator.

## Files

```
rtl/aes_pkg.sv         AES types, round functions, computed S-box
rtl/secoc_pkg.sv       field widths, PDU struct, register map
rtl/aes128.sv          iterative AES-128 core
rtl/mac_manager.sv     four chained AES cores -> 128-bit MAC
rtl/secoc_sender.sv    MAC + PDU assembly
rtl/secoc_receiver.sv  PDU check -> status, data_out
rtl/secoc_top.sv       sender + receiver behind mode_select
rtl/secoc_axi.sv       AXI4-Lite peripheral, top of the design
tb/aes_ref_pkg.sv      reference models
tb/axil_master_if.sv   AXI4-Lite master with read/write tasks
tb/tb_*.sv             testbenches
```
