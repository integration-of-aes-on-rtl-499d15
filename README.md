# AES crypto tile for a mesh many-core platform

This is the RTL of an AES encryption/decryption accelerator (128-, 192- or
256-bit keys) built as one tile of a network-on-chip (NoC) many-core system.
It does not use a processor. A small state machine moves data between four things:

- the network,
- a local memory,
- four 32-bit block registers,
- an iterative AES core.

A request names a batch of 128-bit blocks in external memory. The tile fetches
the whole batch over the NoC into its internal memory and encrypts or decrypts
each block in place. It then writes the batch to a destination in external
memory.

Other tiles of the platform are not part of this RTL. Neither are the mesh
routers (static XY routing), the NoC-to-AXI bridge, or the DDR memory. The
tile brings its router port out as a pair of valid/ready flit channels.

## Structure

```
                  +------------------------ aes_crypto_tile ------------------------+
  NoC router      |  +--------+  req   +-------------+  start/din  +--------------+  |
  tx_flit  <------+--| net_if |<-------| crypto_ctrl |------------>|   aes_core   |  |
  rx_flit  -------+->|  FIFOs |------->| (FSM + four |<------------| + key sched. |  |
                  |  +--------+  rsp   |  32-bit regs)|  done/dout  +--------------+  |
                  |                    +-------------+                              |
  cmd_* / done ---+--------------------^      | 32-bit, 1 access/clock             |
                  |                           v                                     |
                  |                    +-------------+                              |
                  |                    |   int_mem   | 2048 x 32                    |
                  |                    +-------------+                              |
                  +-----------------------------------------------------------------+
```

| file | what it is |
|---|---|
| `rtl/aes_crypto_tile.sv` | top: the tile |
| `rtl/crypto_ctrl.sv` | controller state machine; contains `cipher_regs` |
| `rtl/cipher_regs.sv` | the four 32-bit registers between the memory and the AES core |
| `rtl/aes_core.sv` | AES core, one round per clock, encrypt and decrypt, 128/192/256-bit keys |
| `rtl/aes_key_schedule.sv` | key expansion, four words per clock; holds all round keys |
| `rtl/aes_pkg.sv` | AES arithmetic as functions (GF(2^8), S-box, rows, columns), key-length type |
| `rtl/int_mem.sv` | internal memory: single port, synchronous read |
| `rtl/net_if.sv` | network interface: packs and unpacks flits, buffers both directions |
| `rtl/sync_fifo.sv` | valid/ready FIFO used by `net_if` |
| `rtl/noc_pkg.sv` | flit format |

## What one command does

A command is a one-cycle `cmd_start` with these fields:

- `cmd_key`: the key, 256 bits wide and left-aligned. A 128-bit key sits in
  bits 255:128 and a 192-bit key in bits 255:64.
- `cmd_key_len`: `KEY_128`, `KEY_192` or `KEY_256`.
- `cmd_decrypt`: 0 to encrypt, 1 to decrypt.
- `cmd_src` and `cmd_dst`: byte addresses in external memory, word aligned.
- `cmd_nblocks`: the number of 128-bit blocks, N.

Block b occupies the four words at `src + 16*b`. The first word is column 0
of the AES state, in FIPS-197 byte order: byte 0 is the most significant.
The controller goes through these phases:

1. **Fetch.** The controller sends 4N read requests through the network
   interface as fast as the interface accepts them. Each read response is
   written to internal memory at `(addr - src)/4`. Responses may therefore
   arrive in any order. The key expansion runs in the AES core during this
   phase.
2. **Load.** Four memory reads, one per clock, fill the four block registers
   with the block's words. Each read returns its data one clock later, so the
   reads overlap and the phase takes 5 clocks.
3. **Crypt.** The 128 register bits go to the AES core. After 11 clocks (13
   or 15 with a 192- or 256-bit key) the result is loaded into the same four
   registers.
4. **Store.** The four registers are written back over the input block in
   internal memory, one word per clock (4 clocks). Steps 2 to 4 repeat for
   every block.
5. **Write-back.** Internal memory is read one word per clock. Each word goes
   out as a write request to `dst`.
6. **Acknowledge.** The controller waits for all 4N write acknowledgements,
   then pulses `done`.

Two commands end at once with a `done` pulse:

- A batch of zero blocks.
- A batch larger than the internal memory (4N > `MEM_DEPTH`). This case also
  sets `cmd_error`.

`busy` is high from the command until `done`.

### Timing

With a 128-bit key the tile spends 21 clocks on each block: 5 to load, 1 to
start the core, 11 in the core and 4 to store. With a network that never
stalls, a batch takes exactly **29·N + 9 clocks**: 4N to fetch, 21N in the
tile and 4N to write back. With 192- and 256-bit keys, each block costs 2 or
4 more clocks (31·N + 9 and 33·N + 9), as long as the batch has at least
four blocks, so that the key expansion stays hidden behind the fetch. The
fixed 9 clocks cover the command, the finish, and two round trips through
the interface buffers. At 100 MHz, 100 blocks take 29.09 µs and 300
blocks take 87.09 µs.

The testbenches check this formula exactly, and also the AES latency and the
21-clock spacing between blocks. A slower network only lengthens the fetch
and write-back phases.

## The AES core

`aes_core` has one 128-bit state register and does one full round per clock.
The number of rounds Nr is 10, 12 or 14 for 128-, 192- or 256-bit keys.
The block is always 128 bits.

- **Encryption:** Add Round Key, then Nr − 1 rounds of
  S-Box → Shift Rows → Mix Columns → Add Round Key. The final round has no
  Mix Columns.
- **Decryption:** Add Round Key with the last round key, then Nr − 1 rounds of
  inverse S-Box → Inverse Shift Rows → Inverse Mix Columns → Add Round Key.
  The final round has no Inverse Mix Columns.

In decryption, Inverse Mix Columns comes before Add Round Key. The round keys
of the middle rounds therefore also pass through Inverse Mix Columns, which
is the "equivalent inverse cipher" of FIPS-197. The core does this on the fly
from the stored forward round keys.

The S-box is computed, not stored. The inverse in GF(2^8) is computed as
a^254, with seven squarings and six multiplications, followed by the affine
map. The inverse S-box applies the inverse affine map first, then takes the
same inverse. The cost is area. The core has 16 forward and 16 inverse
S-boxes, and the key schedule has 16 more, one 4-byte SubWord per expansion
step. All of them are XOR networks. A 256-byte look-up table would be the
other standard choice.

Interface timing:

- `key_load` (with `key` and `key_len`) starts the key expansion. The
  expansion produces four 32-bit key words, one round key's worth, per clock.
  It uses the standard recurrence w[i] = w[i−Nk] ⊕ f(w[i−1]).
- `key_ready` rises 11, 13 or 14 clocks after `key_load`.
- A new key must not be loaded while a block is in flight.
- `start` is accepted only when `ready` is high, which means the key is
  ready and the core is idle.
- `done` pulses 1 + Nr clocks after `start` (11, 13 or 15), with `dout`
  valid. `dout` holds its value until the next result.

## Network interface and flit format

`net_if` has one 4-entry FIFO in each direction:

- Outgoing requests carry the tile's mesh coordinates as the source and the
  coordinates of the NoC-to-AXI bridge as the destination.
- Incoming flits are kept only if they are responses addressed to this tile.
  The interface accepts and discards any other flit, and raises `rx_drop`
  while it does so.

A flit (`noc_pkg::flit_t`, 82 bits) carries one whole transaction:

| bits | field |
|---|---|
| 81:78 / 77:74 | destination x / y |
| 73:70 / 69:66 | source x / y |
| 65:64 | kind: 0 read request, 1 write request, 2 read response, 3 write acknowledge |
| 63:32 | byte address |
| 31:0 | data |

A response carries the address of its request. This lets the controller place
read data correctly whatever order the network returns it in.

By default the tile sits at mesh position (x=1, y=2) and the bridge at (0, 0).
These are the places of the AES tile and the bridge in a 3×3 mesh with the
bridge in a corner. Set `TILE_X/TILE_Y/MEM_X/MEM_Y` for another floor plan.

## Parameters (top)

| parameter | default | meaning |
|---|---|---|
| `TILE_X`, `TILE_Y` | 1, 2 | this tile's mesh coordinates |
| `MEM_X`, `MEM_Y` | 0, 0 | coordinates of the NoC-to-AXI bridge |
| `MEM_DEPTH` | 2048 | internal memory in 32-bit words (8 KiB = 512 blocks per batch) |
| `NI_DEPTH` | 4 | entries in each network-interface FIFO |
| `NBLK_W` | 16 | width of `cmd_nblocks` |

## Design choices and departures

The following follow the original description of this tile:

- the four units (network interface, controller, AES, internal memory) and
  their connections;
- a controller built as a state machine, with no processor;
- a 32-bit memory path with one access per clock;
- four 32-bit registers to collect the 128-bit block and the cipher data;
- cipher data written back to internal memory;
- the AES round structure and the three key sizes with 10, 12 and 14 rounds;
- the 100 MHz operating point.

Everything else is a choice of this implementation:

- **Block size.** Rijndael also allows 192- and 256-bit blocks. Only the
  128-bit block of the AES standard is built, which is what the tile's
  four-register path carries. All three key sizes are built.
- **No direct AES-memory path.** The block diagram of the tile also shows a
  link between the AES core and the internal memory. The description of the
  data flow routes everything through the controller's registers, and this
  RTL follows that description. The core has no memory port.
- **Command port and write-back.** How requests reach the tile is not
  specified, nor how results leave it. The command port and the final copy to
  external memory are inventions of this implementation.
- **Packet format.** The flit format, the interface FIFOs, the dropping of
  foreign flits and the placement of responses by address are inventions of
  this implementation.
- **Sizes.** The memory size (2048 words) and the FIFO depth (4) are chosen.
  2048 words holds the largest batch that was studied, 300 blocks.
- **Reported latency.** The reported latency of this tile (about 815 ns for
  100 requests at 100 MHz, rising about 8 ns per request) is *not*
  reproduced. Even reading a request as one 128-bit block, that is under one
  clock per block. A 32-bit memory path at one word per clock needs 4 clocks
  just to move a block in. This RTL takes 29 clocks per block, and the
  growth with N is linear as reported.
- **Not built.** The second tile organisation, with a Plasma RISC processor
  issuing crypto instructions to the AES core and a DMA engine, is not built.
  The processor is an existing core, and the DMA and the instruction
  interface are not specified.
- **Resets.** Reset is asynchronous and active low. The key registers and
  the memory array have no reset; nothing reads them before they are written.

## Verification

Every testbench checks itself and ends with a
`TB_RESULT checks=N failures=M` line:

| testbench | covers |
|---|---|
| `tb_aes_key_schedule` | FIPS-197 appendix A examples for all three key lengths, random keys of each length against a reference model, 11/13/14-clock ready |
| `tb_aes_core` | FIPS-197 appendix B and C.1–C.3 vectors, both directions, random keys and blocks against the reference, 11/13/15-clock latency, start ignored without a key |
| `tb_cipher_regs` | word and block views, load priority |
| `tb_int_mem` | full-depth random read/write, one-clock read, rdata hold |
| `tb_net_if` | flit contents and order, response unpacking, drops, back-pressure both ways |
| `tb_crypto_ctrl` | controller with the real core and memory, reordered delayed responses, 21-clock block spacing, encrypt/decrypt round trip with a 256-bit key, zero and oversized batches |
| `tb_aes_crypto_tile` | whole tile at default parameters: 100 blocks encrypted (exact 29·N+9 latency), decrypted back under a congested network with refused flits, reordered responses and foreign flits, 192- and 256-bit keys with exact latency, error cases |
| `tb_latency_sweep` | 100…300 blocks in steps of 25, output checked, latency step of exactly 29 clocks per block |

`tb/aes_ref_pkg.sv` is a separate AES model used by these testbenches. It
finds S-box inverses by search, keeps the state as a byte matrix, and
decrypts with the textbook inverse cipher. `tb/noc_mem_model.sv` models the
network and the external memory. Its run-time settings give refused flits,
random delays, reordered responses and flits for other tiles.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/aes_pkg.sv rtl/noc_pkg.sv tb/aes_ref_pkg.sv \
  rtl/aes_key_schedule.sv rtl/aes_core.sv rtl/int_mem.sv rtl/cipher_regs.sv \
  rtl/crypto_ctrl.sv rtl/sync_fifo.sv rtl/net_if.sv rtl/aes_crypto_tile.sv \
  tb/noc_mem_model.sv tb/tb_aes_crypto_tile.sv --top-module tb_aes_crypto_tile
./obj_dir/Vtb_aes_crypto_tile
```

The block testbenches need only their own module and the packages it imports.
Every testbench runs in seconds.
