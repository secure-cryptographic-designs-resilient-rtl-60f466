# AES-128 with a rolling key list against correlation power and EM analysis

A correlation power attack (CPA) or correlation EM attack (CEMA) on an AES
engine builds up its statistics over many traces recorded under one key. For
a given device there is a least number of traces (LNTS) below which the key
does not come out. On an FPGA AES-128 the measured LNTS was about 5000 to 7000
power traces, and roughly 15000 EM traces. The countermeasure built here keeps
every key in use for fewer encryptions than that. It takes a list of random
keys and uses each for UP encryptions, with the update period UP chosen below
LNTS. It then moves to the next key, and after the last key it starts again
at the first. Statistics gathered under one key are spoiled each time the key
changes. The keys are generated and stored by a TPM (Trusted Platform Module)
reached over SPI, so no key list lives in the FPGA fabric.

The RTL holds both ends of a link:

* the **sender** has the TPM generate the key list, shares the list and UP
  with the receiver, then encrypts. It counts encryptions under the current
  key in ECT and fetches the next key from the TPM when ECT reaches UP.
* the **receiver** stores the shared list and decrypts. It counts
  decryptions in DCT and switches key after the same number of blocks.

The evaluated configuration has four keys and UP = 3000, over 30000
encryptions. It is the default here, and a testbench runs it in full.

## Module map

```
key_update_system                top: sender + receiver + the three channels
├── aes_sender
│   ├── key_update_tx_ctrl       sender sequencing, ECT, key order
│   ├── tpm_client               TPM command frames
│   │   └── spi_master           byte-wide SPI, mode 0
│   ├── aes_key_expand           round keys 0..10, stored
│   └── aes_enc_core             AES-128, one round per clock
└── aes_receiver
    ├── key_list_ram             shared key list
    ├── key_update_rx_ctrl       receiver sequencing, DCT, key order
    ├── aes_key_expand
    └── aes_dec_core             AES-128 inverse cipher, one round per clock
aes_pkg                          AES types and round functions (S-box computed)
key_update_pkg                   TPM frame constants
```

The TPM is an external chip and is not part of the RTL. Its four SPI pins are
ports of the top. `tb/tpm_model.sv` is a behavioural stand-in used by the
testbenches.

## How a run proceeds

Pulse `start` with the update period on `up`. The sender controller
(`key_update_tx_ctrl`) then goes through these phases:

| phase  | what happens | cost in clocks (SPI_HALF = 2) |
|--------|--------------|-------------------------------|
| GEN    | one *generate* frame per key: the TPM fills slots 0..NUM_KEYS-1 with random keys | 70 per key |
| SHARE  | one *read* frame per key. Each key read back is handed to the receiver on `share_valid/share_idx/share_key` | 614 per key |
| UP     | UP is handed to the receiver on `up_valid/up_value` | 1 |
| FETCH  | read frame for the current key, then the 11-clock key expansion. Plaintext is stalled | about 630 |
| RUN    | plaintext is accepted while ECT < UP, and ECT counts accepted blocks | 12 per block, or more under back-pressure |

When ECT reaches UP and the last block has left the engine, the sender
advances the key index. It goes from 0 to NUM_KEYS-1 and then back to 0. ECT
is cleared and the flow returns to FETCH. The key is read from the TPM again
at every change. Only the expanded round keys of the current key are held in
the fabric.

The receiver controller (`key_update_rx_ctrl`) waits until every list entry
and UP have arrived, in any order. It then reads key 0 from its key list
memory, expands it and accepts ciphertext while DCT < UP. A key change costs
the receiver 13 clocks: one memory read, one start cycle and the expansion.

With UP = 3000 and four keys, key 1 serves blocks 1-3000, 12001-15000 and
24001-27000. Keys 1 to 4 serve 9000, 9000, 6000 and 6000 of the first 30000
blocks. `tb_key_update_system_full` checks exactly this.

## Keeping the two ends in step

Sender and receiver never exchange key indices. Each one counts whole blocks
against the same UP and walks the same list in the same order. That holds for
any traffic pattern as long as every ciphertext block that leaves the sender
reaches the receiver once and in order. Inside `key_update_system` this is
guaranteed, because sender and receiver are joined by a valid/ready channel.
If the two ends sit on different chips, a lost or duplicated block shifts the
receiver onto the wrong key for the rest of the list. The design has no
resynchronisation mechanism. A real link would need a framing layer that
carries the key index or a block number.

Setting UP is the user's job. It must be below the LNTS measured for the
device. The design only enforces UP ≥ 1 (0 is treated as 1).

## The TPM link

The fabric reaches the TPM over SPI. The SPI mode, the bit order and the
frame format are choices of this design. The frames are:

| frame    | bytes on MOSI | bytes on MISO |
|----------|---------------|---------------|
| generate | `A0`, slot | ignored |
| read     | `80`, slot, 16 × `00` | header ignored, then key byte 0 … 15 |

The slot number is one byte. For lists of more than 256 keys it is two
bytes, most significant first. `aes_sender` picks the width from
`NUM_KEYS`, so the default frames are unchanged.

Chip select is low for the whole frame. SPI runs in mode 0, MSB first, and
SCLK is clk / (2·SPI_HALF). Each byte costs 16·SPI_HALF + 2 clocks, so a read
frame with a one-byte slot costs 2 + 18·(16·SPI_HALF + 2) clocks.

A real TPM 2.0, such as the Infineon SLB9670, does not speak this format. It
expects TCG SPI register transactions carrying TPM 2.0 commands:
`TPM2_GetRandom`, or key creation, plus NV read/write for the key store. To
use one, replace `tpm_client` with a client that sends those commands. The
rest of the design only sees its request interface: `req_valid/req_ready`,
`req_op` (generate or read), `req_slot`, and the response
`rsp_valid/rsp_key`. The SLB9670 NVM holds about 435 AES-128 keys, and a
list of that length is simulated end to end.

## The AES engines

Both engines are iterative and compute one round per clock:

* **`aes_enc_core`** does AddRoundKey with round key 0 in the cycle it accepts
  a block. It then runs rounds 1-9 (SubBytes, ShiftRows, MixColumns,
  AddRoundKey) and round 10 without MixColumns. `out_valid` rises 11 clocks
  after the accepting edge, and the result is held until `out_ready`.
* **`aes_dec_core`** runs the FIPS-197 inverse cipher. It starts with round
  key 10 and walks down to round key 0, with the same 11-clock latency.

Neither engine has a key schedule of its own. `aes_key_expand` computes all 11
round keys once per key change, one per clock, and keeps them in registers
(1408 flip-flops). The engines read them by index, the encryption core
walking forwards and the decryption core backwards. This costs flip-flops but
fits the scheme: a key is expanded once and then serves UP blocks.

The S-box is not a table. `aes_pkg::sbox` computes the GF(2^8) inverse (as
x^254, by square-and-multiply) and then the affine map. `inv_sbox` applies the
inverse affine map and then the same inversion. A synthesis tool flattens this
into logic. Replace it with a 256-entry table if the target maps ROMs better.

Block layout follows FIPS-197: byte 0 of a block or key is bits [127:120],
and the state is column-major.

## Top-level interface (`key_update_system`)

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `start`, `up[UP_W-1:0]` | in | begin the scheme with update period `up` |
| `pt_in_valid/ready/data[127:0]` | in/out/in | plaintext into the sender |
| `pt_out_valid/ready/data[127:0]` | out/in/out | recovered plaintext from the receiver |
| `link_fire`, `link_data[127:0]` | out | a ciphertext block passing from sender to receiver |
| `spi_cs_n`, `spi_sclk`, `spi_mosi`, `spi_miso` | out/out/out/in | SPI to the TPM |
| `rx_list_ready` | out | receiver holds the whole list and UP |
| `tx_key_idx`, `rx_key_idx`, `ect`, `dct` | out | current key indices and counters |
| `tx_key_update`, `rx_key_update` | out | one-clock pulse per key change |

| parameter | default | meaning |
|-----------|---------|---------|
| `NUM_KEYS` | 4 | keys in the list (the evaluated list; over 256 switches to two slot bytes) |
| `UP_W` | 16 | width of UP, ECT and DCT |
| `SPI_HALF` | 2 | clocks per SCLK half period |

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With plain Verilator
5, run from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
  rtl/aes_pkg.sv rtl/key_update_pkg.sv tb/aes_ref_pkg.sv \
  tb/tb_key_update_system_full.sv --top-module tb_key_update_system_full
./obj_dir/Vtb_key_update_system_full
```

Swap the last file and the top-module name for any other testbench:

| testbench | what it checks |
|-----------|----------------|
| `tb_key_update_system_full` | evaluated run at default parameters: 4 fixed keys, UP = 3000, 30000 blocks, the 9000/9000/6000/6000 split, every ciphertext against a reference AES, every plaintext recovered (about 10 s) |
| `tb_key_update_system` | 4 random keys, UP = 5, 220 blocks with random gaps and back-pressure. Counts, and requires at least once: key generation, list sharing, key changes on both sides, wrap to key 0, input stall, link and output back-pressure |
| `tb_key_update_system_8keys` | the same with an 8-key list and UP = 7. The TPM model hands out the eight keys of a recorded TPM key generation run, listed below |
| `tb_key_update_system_435keys` | the same with a 435-key list, the capacity of the TPM's key store, and UP = 4: two-byte slot numbers, every key fetched, two wraps over 3600 blocks (about 5 s) |
| `tb_aes_sender`, `tb_aes_receiver` | each side alone, 3 keys (the wrap of a list that is not a power of two), UP = 4 |
| `tb_key_update_tx_ctrl`, `tb_key_update_rx_ctrl` | controllers against emulated neighbours: request order, key order, exactly UP blocks per key |
| `tb_aes_enc_core`, `tb_aes_dec_core`, `tb_aes_key_expand` | FIPS-197 known answers, 200 or 100 random cases, 11-clock latencies |
| `tb_tpm_client`, `tb_spi_master`, `tb_key_list_ram` | frame timing, bit order and stored keys |

`tb/aes_ref_pkg.sv` is the reference AES. It is written independently of the
RTL: its S-box comes from the multiply-by-3 / divide-by-3 walk over GF(2^8),
and it is checked against FIPS-197 known answers. `tb/tpm_model.sv` answers
the frames above. By default it uses `$urandom` in place of a TRNG. With
`PRESET = 1` it hands out the four evaluated keys:

```
1D22BF01AC77D921EA3415F5368910A2
F01ED23CB45A967809AF81EB27CD1FA9
9745C3731DAD77B117B576F45B4C1EE0
2B7E151628AED2A6ABF7158809CF4F3C
```

With `PRESET = 2` it hands out eight keys recorded from a TPM:

```
77D809A16E13C11613F6A2F3F57D3ADD  01662F482BE0BE86C5E142B3541B5FB9
72F0C957178C96ECA600CDB04596F110  2610E9B66AE20A7F4EA7549BA5316F96
9AB4C746E8E898FE992B23BE68B672E5  1EC5BB56BEBF2B6514CF9F88D394BD90
6EC57619896BB1C4F8A9594864049DEB  B7B33CEC5BE58D46680FADEC6413AF40
```

The RTL carries assertions on its handshakes: a block enters an engine only
while its controller allows it and its round keys are complete. Compile with
`--assert` to have them checked.

## What follows the scheme, and what is this design's own

The following come from the scheme itself:

* the key list generated by the TPM and used in loop order
* the encryption and decryption counters (ECT, DCT) compared against UP
* a key change after UP blocks on both ends
* sharing the list and UP before data flows
* AES-128 as the engine
* four keys and UP = 3000 as the evaluated configuration

The following are choices of this design:

* the iterative engine organisation and the computed S-box
* storing all 11 round keys per key change
* the decryption engine, which the scheme requires but does not describe
* the SPI mode and the TPM frame format
* the on-chip share channel between the two ends, and the receiver's key
  list memory
* all handshakes and the reset style
* re-reading each key from the TPM at every change, rather than caching the
  list in the fabric; this keeps no key list outside the TPM

## Limits

* **No side-channel hardening inside AES.** The engines are plain AES. The
  protection comes only from limiting how many traces share one key, and it
  holds only if UP really is below the device's LNTS. That has to be
  measured on the target (power and EM), not in simulation.
* **The key list crosses the share channel in the clear.** The scheme expects
  the list to be shared in a trusted environment before data flows. Between
  two chips, that channel needs its own protection.
* **No resynchronisation.** See *Keeping the two ends in step*.
* **A simplified TPM protocol.** See *The TPM link*.
* **AES-128 only.** AES-192 and AES-256 keys are not supported, although
  a TPM could supply them.
* **Loop order only.** Keys are always used 1, 2, …, N, 1, … The list
  length (`NUM_KEYS`) and UP can be changed. A different or secret update
  order would also change how hard an attack is, but it is not built.
* **A key change stalls the sender** for one 18-byte SPI read plus the
  expansion, about 630 clocks at the default SPI divider. At UP = 3000 and 12
  clocks per block, that is under 2 % of throughput.
