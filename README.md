# Blowfish brute-force key cracker

This is FPGA logic that recovers the key of a Blowfish-encrypted JPEG image by trying keys. A host
sends the encrypted image over Ethernet as UDP packets. The design stores it in DDR2 memory and
attacks its first 64-bit block with eight Blowfish cores running in parallel. A key is taken when
the decrypted block starts with `FF D8`, the JPEG start-of-image marker. The whole image is then
decrypted with that key and sent back to the host.

Keys are 32 bits long. The eight cores split the key space by its top three bits, so no key is
tried twice:

| core | keys |
|------|------|
| 0 | `0x00000000`–`0x1FFFFFFF` |
| 1 | `0x20000000`–`0x3FFFFFFF` |
| … | … |
| 7 | `0xE0000000`–`0xFFFFFFFF` |

```
 EMAC LocalLink rx ─> data_flow_ctrl ──payload──> sys_ctrl ──bytes──> mem_user_component ─> DDR2 controller
 EMAC LocalLink tx <─ data_flow_ctrl <──reply──── sys_ctrl <──words── mem_user_component <─ (native i/f)
                                                  sys_ctrl <────────> bf_key_search
                                                                      ├─ bf_pi_rom (shared)
                                                                      └─ 8 x bf_core ─ 4 x bf_sbox_ram + bf_f_func
```

The Ethernet MAC, the generated DDR2 controller with its physical layer, and the clock
infrastructure are not part of this RTL. Their interfaces are ports of the top, `bf_crack_top`.

## Why testing one key takes ~10,000 cycles

Blowfish is cheap to run but expensive to re-key, and a brute-force search re-keys all the time.
Every new key goes through these steps:

1. **Copy** the initial tables into the core: an 18-word P-array and four 256-word S-boxes.
   These are the hex digits of π − 3, 1042 words in all. The key is XORed into every P word on
   the way in. The four S-boxes and the P registers fill in parallel, so the copy takes 256
   cycles.
2. **Mix**: run 521 chained block encryptions, starting from an all-zero block. Each result
   overwrites the next two table words: first all of P, then S0 to S3. Later encryptions
   therefore use tables that are already partly keyed.
3. **Test**: decrypt the target block (18 cycles).

`bf_core` computes one Feistel round per clock. The S-boxes are synchronous RAMs (one 256×32 RAM
each, four per core), so a round works like this:

- The RAMs deliver the four words addressed in the previous cycle.
- `bf_f_func` combines them as `((S0[a] + S1[b]) ^ S2[c]) + S3[d]`.
- The result is XORed into the other half.
- That half is XORed with the next P word.
- Its four bytes become the next RAM addresses, all in the same cycle. This is the critical path.

Latencies, counted from the clock edge that accepts the request:

| operation | cycles | how it adds up |
|-----------|-------:|----------------|
| block (encrypt or decrypt) | 18 | accept + 1 start cycle + 16 rounds |
| key set-up | 10,157 | accept + 257 copy cycles + 521 × (1 start + 16 rounds + 2 table writes) |

A batch of eight keys takes about 10,180 cycles, so eight cores test about 7.9 keys per
1,000 cycles. At 100 MHz that is about 78,000 keys/s, or about 15 hours for the whole 2^32 key
space. The original FPGA implementation reported about 400 µs per key per core, about 20,000
keys/s in total and about 60 hours. Its core was slower per clock: it was rewritten three times
to fit the device. This RTL has not been synthesized for an FPGA, so no clock rate is claimed.

**Key byte order.** A 32-bit key is used as a 4-byte Blowfish key, least significant byte first:
`P[i] ^= {key[7:0], key[15:8], key[23:16], key[31:24]}`. Data blocks are big-endian: the first
image byte is bit 63, and the left half is `block[63:32]`. With this order, the reference example
works out: `FFD8334455667788` encrypted under key `0x67AEF891` gives `55F498A5C51B16AB`. The
standard all-zero vector also holds (key 0 encrypts 0 to `4EF997456198DD78`). Both are checked
in `tb_bf_core`.

## The search loop and its false keys

`bf_key_search` holds the eight cores and one shared table ROM (`bf_pi_rom`). Core 0 addresses
the ROM. All cores start together and read the ROM in lock-step; an assertion checks this. For
each value of a shared 29-bit counter the controller:

1. sets up core *i* with key `{i, counter}`, all eight cores at once;
2. has all cores decrypt the test block (the first 8 bytes of the image);
3. marks the cores whose result starts with `FFD8` as hits;
4. verifies the lowest-numbered hit. That core re-encrypts its result, and the search stops if
   the output equals the ciphertext. Otherwise the next hit is verified.
5. increments the counter and repeats when no hit passes. If the counter wraps, the search
   ends with `exhausted`.

After a match, core 0 is set up with the found key and `key_found` rises. From then on core 0
decrypts data for the system controller (`d_start`/`d_in` → `d_out`/`d_valid`).

**False keys are accepted.** The step-4 check cannot reject anything: re-encrypting a block
with the key that decrypted it always returns the ciphertext. About one key in 65,536 produces
`FFD8` by chance. For the example ciphertext above, all of these do:

`0x00004BDF`, `0x6000AEAE`, `0x8000640E`, `0x40005010`, `0x60003231`, `0xC000A891`,
`0xE000359F`.

A search that meets one of them first stops there and returns garbage for the rest of the image.
`tb_false_keys` shows this for all seven keys. `tb_bf_crack_top` shows it end to end (image B).
The logic is built as the original design describes it. Its authors report the problem as
unsolved. A real fix would check more than one block, or more than two bytes.

## Getting the image in and out: `data_flow_ctrl` and `sys_ctrl`

**Receive.** Frames come from the MAC over an 8-bit LocalLink port. The strobes
(`sof`, `eof`, `src_rdy`) are active low, and the port has no back-pressure. The controller
registers the inputs once, then:

- stores the first 42 bytes (Ethernet, IPv4 and UDP headers, no options, no checks);
- passes the UDP payload to `sys_ctrl`, one byte per cycle with `control_start` high;
- marks the end of each payload with `control_eop`.

**Host protocol.**

- Send the encrypted image (ECB mode, big-endian 64-bit blocks) as UDP payloads.
- Make every payload except the last a multiple of 32 bytes. The maximum, 1472 bytes, is one.
- End the image with one empty UDP payload. This starts the search.

The 32-byte rule comes from the memory path. A packet ends with a flush that writes a partial
DDR2 burst with its unused bytes masked. The next packet then starts at a new burst, which would
leave a gap in the stored image.

**Reply.** `sys_ctrl` reads the image back and decrypts it block by block through core 0. It
collects the plaintext in a 1024-byte buffer. Each full buffer, and the final partial one, is
streamed to `data_flow_ctrl`: `control_complete` stays high for as many cycles as there are
bytes. `data_flow_ctrl` buffers the whole payload first. When `control_complete` falls, it sends
a frame built from the last received header:

- MAC and IP addresses swapped, ports kept;
- IP total length and UDP length set for the new payload;
- IP header checksum recomputed, UDP checksum 0.

`control_busy` covers the transmission. A byte leaves on every edge where `tx_src_rdy_n` and
`tx_dst_rdy_n` are both low. Only the image's own byte count is returned.

If the search is exhausted, `search_failed` is set and no reply is sent. A new image can follow
at any time after a reply or a failure.

## DDR2 path: `mem_user_component`

The memory controller is generated with a 128-bit user data width and burst length 4. On a
64-bit DDR2 bus, one burst carries two 128-bit words, which is 32 bytes.

**Write.** A byte collector fills a 32-byte burst buffer, first byte in the top bits. When the
buffer is full, or `mem_flush` arrives at the end of a packet, the buffer moves to an issue
register. The issue register writes:

- one write command at the current address (`mem_addr_comp`) into the address FIFO;
- the two data words, each with a 16-bit byte mask, into the write FIFO. A mask bit of 1 means
  the byte is not written.

The address then steps by 4 columns. A second burst can be collected while one is being issued,
so the 1 byte/cycle Ethernet stream is absorbed without stalls. `mem_full` warns when both
buffers are busy.

**Read.** `mem_read` starts the read-back:

- Read commands go out from address 0 up to the last written address.
- A command is issued only while the read FIFO has room for all data in flight.
- Words come out first-word-fall-through on `read_data`/`read_valid` and are popped with
  `read_ack`.
- `read_done` rises when every word has been popped.

**Clock crossing.** The three FIFOs (`async_fifo`) are dual-clock, with Gray-coded pointers and
two-flop synchronisers. They separate the Ethernet clock `clk` from the controller's 200 MHz
`mem_clk`. On the memory side they drain into the controller's native interface:

- `app_af_wren/cmd/addr`, with command 0 for write and 1 for read;
- `app_wdf_wren/data/mask_data`;
- `rd_data_valid`/`rd_data_fifo_out` in the other direction;

with `app_af_afull`/`app_wdf_afull` honoured. `phy_init_done` is synchronised into `clk` and
becomes `mem_ready`. Bytes that arrive before calibration, or while `mem_full` is set, are
dropped and counted in `rx_dropped`.

## Top-level interface (`bf_crack_top`)

| group | signals |
|-------|---------|
| clocks/resets | `clk` (LocalLink clock, all logic but the FIFOs' memory side); `rst`; `mem_clk` and `mem_rst`. Resets are synchronous and active high. |
| MAC receive | `rx_data[7:0]`, `rx_sof_n`, `rx_eof_n`, `rx_src_rdy_n` |
| MAC transmit | `tx_data[7:0]`, `tx_sof_n`, `tx_eof_n`, `tx_src_rdy_n`, `tx_dst_rdy_n` |
| DDR2 controller | `phy_init_done`, `app_af_*`, `app_wdf_*`, `rd_data_valid`, `rd_data_fifo_out[127:0]` |
| search | `key_lo_start[28:0]`: first counter value, 0 for a full search. Outputs: `search_busy`, `key_found`, `found_key`, `search_failed` |
| status | `image_bytes`, `mem_last_addr` (a burst address, so its two low bits are always 0), `images_done`, `tx_packets`, `rx_dropped`, `stat_batches` (key batches tried), `stat_hits` (`FFD8` hits verified) |

Parameter: `N_CORES` (default 8, a power of two). `CORE_BITS = log2(N_CORES)` top key bits
select the core.

## How faithful this is

**Follows the original design:**

- the block structure: MAC → data flow controller → system controller; memory user component
  with memory-controller FSM, address component and address/write/read FIFOs; Blowfish
  controller with eight cores, shared initial-value ROMs and four 256×32 S-box RAMs per core;
- the Ethernet behaviour: header kept for the reply, MAC and IP addresses swapped, reply payload
  buffered before sending;
- the memory behaviour: burst packing, masking of unused bytes, flush at end of packet, linear
  addressing, read-back up to the last written address;
- the key-space split, the `FFD8` test, the re-encryption check and the final set-up of core 0.

**Choices made here,** where the original says nothing:

- one round per clock;
- the handshakes between blocks;
- the empty-payload end-of-image marker;
- the first block as the test block;
- ECB mode for the image;
- rewriting the length and checksum fields of reply frames;
- the 1024-byte reply size;
- FIFO depths and the memory command encoding;
- verifying simultaneous hits in core order.

**Not included:**

- the Ethernet MAC;
- the DDR2 controller, physical layer and clock infrastructure, which are vendor-generated with
  I/O and delay primitives (a behavioural model of the controller's native interface is in
  `tb/ddr2_mig_model.sv`);
- the DDR2 chip;
- the host program.

The original project's "system controller" test build only echoed received bytes back after a
delay. It is not reproduced: `sys_ctrl` here is the full store/crack/return controller.

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. Run Verilator from
the repository root: the ROM reads `rtl/bf_pi_init.hex` by that relative path. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/crack_pkg.sv \
    tb/tb_bf_crack_top.sv --top-module tb_bf_crack_top && ./obj_dir/Vtb_bf_crack_top
```

| testbench | what it shows |
|-----------|---------------|
| `tb_bf_f_func` | F function against a direct computation |
| `tb_bf_pi_rom` | spot values of the initial table, read latency |
| `tb_bf_core` | known-answer vectors, the example block, a false-key decryption, set-up and block latency |
| `tb_bf_key_search` | true key found in the second batch, a false key accepted, search exhausted |
| `tb_false_keys` | all seven false keys of the example |
| `tb_data_flow_ctrl` | payload extraction, empty/runt frames, reply frame byte by byte under back-pressure |
| `tb_async_fifo`, `tb_mem_addr_comp` | FIFO ordering across clocks, address register |
| `tb_mem_user_component` | 213-byte image in four packets written and read back with masking, random stalls |
| `tb_bf_crack_top` | full system at default size, described below |

`tb_bf_crack_top` runs three images through the whole system, with the DDR2 model and random
back-pressure. A and B are the same 1480-byte image; C is 16 bytes:

- **image A:** true key, returned in two reply frames;
- **image B:** false key, garbage returned exactly as predicted;
- **image C:** exhausted search, no reply.

It checks that every mechanism above occurs at least once. The whole run takes well under a
second of simulation time.

The expected values in the testbenches come from a separate Blowfish model. `tb_bf_crack_top`
carries its own behavioural implementation of it. The initial table is the standard one: word
*n* is bits 32*n*+1 … 32*n*+32 of the binary fraction of π.
