# A programmable hardware security module for a blockchain-tracked IC supply chain

An integrated circuit passes through many hands between design and system
integration: the design owner, a test house, a system integrator. Each of them
needs some secret to do their job. The test house needs the JTAG access key and
the integrator needs the logic-locking key. A counterfeit or recycled chip must
not get either. This design is a hardware security module (HSM) that sits
between a blockchain node and these participants. It keeps every secret inside
the module, and it releases a chip's key only after three checks:

1. the participant's identity;
2. the chip's own physical fingerprint, taken from a PUF (physically unclonable
   function) and hashed with SHA-256;
3. the blockchain block the chip was recorded in.

All the cryptography is in hardware and sized at run time:

- a SHA-256 engine that takes messages of any length up to 448 bits;
- elliptic-curve key generation, signing and verification on any curve of up
  to 256 bits, supplied on ports;
- a behavioural model of a hybrid arbiter/butterfly PUF;
- a Merkle-tree block hasher.

The RTL is synthesizable SystemVerilog. The PUF is a behavioural stand-in for
the real circuit. Every block has
a self-checking testbench. The whole module runs end to end at its default
sizes on the secp256k1 curve.

## Participants, sessions and the command port

The node drives one command port (`hsm_top`):

1. Put a command on `cmd` (type `cmd_t` in `hsm_pkg`) with its operands.
2. Raise `cmd_valid` for one cycle while `busy` is low.
3. `rsp_valid` pulses when the command finishes, with a `status_t` code on
   `rsp_status`.

Each result output holds its value until the next command of the same unit.

| command | who | what happens |
|---|---|---|
| `KEYGEN` | anyone | Checks `1 <= priv_key < n` and computes `Q = priv_key x G`. Q.x becomes the session's **enroll ID**, and `pub_x`/`pub_y` show Q. |
| `SET_OWNER` | first caller after reset | The current enroll ID becomes the design owner. Later callers get `OWNER_SET`. |
| `HASHID` | owner | Runs the crypto module on `reg_challenge` and returns `hash_id`. This lets the owner enrol a genuine chip's fingerprint. |
| `REGISTER` | owner | Writes (participant enroll ID, IC ID, challenge) to the IC database. The same entry of the key memory gets the device hash, the current block number and header, the tester and integrator enroll IDs, the logic key and the JTAG key. |
| `ACCESS` | tester / integrator | Runs the multi-level check below. |
| `GENESIS` | anyone | Loads `genesis_hash` as the previous-block hash. |
| `BLOCK` | anyone | Hashes `txn[0..3]` and `timestamp` into the next block. |
| `ECDSA` | anyone | `sig_mode` 0 signs `sig_hash_z` with `priv_key` and the nonce `sig_nonce`. `sig_mode` 1 verifies (`sig_r_in`, `sig_s_in`) against (`sig_pub_x`, `sig_pub_y`) and sets `sig_ok`. |

There is no login beyond `KEYGEN`. The participant who last generated a key
is the session. The private key never leaves the module; only the public key
is visible.

## The access check

`ACCESS` takes the session's enroll ID, an IC ID (`acc_device_id`), and the
number and header of the block that the participant believes the IC belongs
to (`acc_block_num`, `acc_block_header`). The controller (`hsm_access_ctrl`) checks these, in this
order:

1. **Lookup.** The (enroll ID, IC ID) pair must be in the IC database
   (`ip_verification_unit`, an associative table of `NUM_IC` = 8 entries).
   Otherwise the status is `ID_MISMATCH`. The participant must also be the
   IC's tester or its integrator, else `NOT_ROLE`.
2. **Level 1, crypto.** The challenge stored for the IC is applied to the
   PUF. The PUF's 8-bit response is hashed with SHA-256, giving the IC's
   HashID.
3. **Level 2, device.** HashID must equal the device hash stored at
   registration (`HASH_MISMATCH`). A cloned or substituted chip has a
   different PUF and stops here.
4. **Level 3, chain.** The given block number (`acc_block_num`) and block
   header must equal those stored with the IC at registration
   (`BH_MISMATCH`).
5. **Grant.**
   - A tester receives the JTAG key (`key_is_jtag` = 1), and the IC's stage
     (`ip_stage`) moves to `TESTING`.
   - An integrator receives the logic key, and the stage moves to
     `INTEGRATION`.
   - If the same enroll ID is both the tester and the integrator, the
     integrator role wins.

`access_level` reports how far the check got: 0 to 3. `key_valid` is only ever
set at level 3, and an assertion checks this. Keys are cleared when the next
command starts.

Timing at the defaults:

| command | cycles |
|---|---|
| `REGISTER` | 3 |
| `ACCESS` | about 72 (most of it is the PUF and hash) |
| `HASHID` | about 71 |

## SHA-256 (`sha256_hash`, `sha256_padder`, `sha256_core`)

**Padding.** `sha256_padder` is purely combinational. It builds block
`blk_idx` of the padded message from `msg` and the run-time length `msg_len`:

- the message sits right-aligned in `msg`, first bit at `msg[msg_len-1]`;
- bits above `msg_len` are ignored;
- the pad is the `1` bit, zeros, then the 64-bit length.

With `MAX_BITS` = 448 a message needs one or two blocks.

**Compression.** `sha256_core` runs one round per clock. It keeps a 16-word
sliding message schedule, and the eight working registers a..h. After round 64
the working registers are added, modulo 2^32, into the hash registers H0..H7.
The addition follows FIPS 180-4 so that digests are the standard ones; the
source block diagram labels that step XOR.

**Latency** is `1 + 67 x blocks` cycles:

- 68 cycles for one block;
- 135 cycles for two blocks.

## Elliptic-curve arithmetic

All ECC units take the modulus as an input, and `WIDTH` is a parameter.

| unit | how it works | latency |
|---|---|---|
| `ecc_modmul` | Interleaved (shift-and-add) modular multiplication. It reduces after each doubling and after each conditional add. `modmul(1, z)` reduces any `z < 2^WIDTH`, which the signing unit uses. | `WIDTH + 1` cycles |
| `ecc_modinv` | Binary extended-Euclid inversion. The inverse of 0 is returned as 0. | at most about `2 x WIDTH + 6` cycles |
| `ecc_point_add` | Affine point addition. Handles the point at infinity and `P = -Q`. `P = Q` must go to the doubler; an assertion checks this. | |
| `ecc_point_double` | Affine point doubling with the curve's `a`. Handles y = 0 and the point at infinity. | |
| `ecc_point_mul` | Left-to-right double-and-add over all `WIDTH` scalar bits. When an add step meets `R = P`, it uses the doubler instead. | |
| `ecdsa_keygen` | Range check of the private key, then `Q = d x G`. | |
| `ecdsa_sign_verify` | Signing: `r = (k x G).x mod n`, `s = k^-1 (z + r d) mod n`; `sig_err` if r or s is 0. Verification: r and s in `[1, n-1]`, `w = s^-1`, `X = (z w) G + (r w) Q`, valid when `X.x mod n = r`. Has its own multiplier and inverter for arithmetic modulo n. | |

On secp256k1, a key generation takes about 200,000 to 320,000 cycles,
depending on the key's Hamming weight. A signature costs about one scalar
multiplication and a verification about two.

## The hybrid PUF model (`hybrid_puf`)

A real PUF gets its response from random manufacturing variation. RTL cannot
express that, so `hybrid_puf` is a behavioural model. It computes each race
arithmetically from per-instance delay values. It is written in synthesizable
style, but synthesis turns it into a fixed table from challenge to response.
That table does the PUF's job in simulation; it is not a physical PUF.

Each response bit is its own chain, repeated `RESP_BITS` times:

1. Two edges race through the chain.
2. For every challenge bit there are two pairs of multiplexers. The first pair
   is set by the challenge bit, which either keeps or swaps the two paths.
3. The second pair is set by a butterfly cell. The cell is excited by the
   racing edges and settles to the state its own mismatch favours.
4. An arbiter flip-flop at the end outputs 1 when the upper path wins.

Process variation is modelled as follows:

- Mux delays (90 to 110 time units) and the butterfly cells' preferred states
  come from a hash of the `INSTANCE` parameter.
- So one instance always answers a challenge the same way, and different
  instances differ.
- The model has no noise, temperature or voltage effects.

Over 20 instances and challenge `0001` (4-bit challenge, 8-bit response), the
measured statistics are:

- uniqueness (mean pairwise Hamming distance): 50.3 %;
- uniformity (fraction of ones): 48.8 %.

The response register holds a response only in the cycle in which `valid` is
high. It is cleared in the next cycle, so the PUF secret does not stay in the
module after use.

`crypto_module` chains the PUF into a SHA-256 engine sized for 8-bit messages.
HashID = SHA-256(PUF(challenge)), ready 69 cycles after `start`.

## The blockchain component (`merkle_block`)

One SHA-256 engine is used eight times in turn:

1. the leaf hashes of four 256-bit transactions;
2. the two pair hashes;
3. the Merkle root;
4. the block header, `SHA-256(previous hash || root || 32-bit timestamp)`.

The header is a 544-bit, two-block message. Each header replaces the
previous-block hash, so consecutive `BLOCK` commands form a chain, and
`block_num` counts them. `REGISTER` stores the number and header of the
latest block with an IC, and level 3 of `ACCESS` compares against them.

## Storage

- **`ip_verification_unit`**
  - `DEPTH` entries of (enroll ID, IC ID, challenge) plus a valid bit.
  - Combinational lookup.
  - A write updates the entry with the same (enroll ID, IC ID) pair, or
    takes the lowest free entry.
  - `wr_full` reports a full table.
- **`hsm_key_memory`**
  - Same depth and same index.
  - Holds one `ic_record_t` per IC and the IC's stage.
  - The stage can be written separately.

## Simulating

Every testbench is self-checking. It prints
`TB_RESULT checks=<n> failures=<m>` and stops; a watchdog bounds its run time.
With Verilator 5:

    # whole module, default sizes, secp256k1 (about 30 s to build, 3 s to run)
    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      rtl/hsm_pkg.sv rtl/sha256_pkg.sv tb/sha_ref_pkg.sv tb/tb_hsm_top.sv \
      --top-module tb_hsm_top
    obj_dir/Vtb_hsm_top

    # a single block, e.g. the point multiplier on a 17-bit test curve
    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
      tb/ecc_ref_pkg.sv tb/tb_ecc_point_mul.sv --top-module tb_ecc_point_mul

List the packages a testbench uses (`hsm_pkg`, `sha256_pkg`, `sha_ref_pkg`,
`ecc_ref_pkg`) before it on the command line. The remaining modules are found
through `-y`.

**End-to-end test (`tb_hsm_top`).** Three participants generate secp256k1 key
pairs, which are checked against precomputed public keys. Then:

1. The owner takes ownership, starts a chain, hashes a block and enrols a
   device HashID.
2. The owner registers ICs until the table is full, and adds a second block.
3. The tester and the integrator try every way to fail and then succeed.
4. The tester signs a 24-bit message, verifies the signature, and sees it
   rejected for a changed message.

Each of 20 mechanisms is counted, and one that never happens fails the test.
Examples: bad key, no session, not owner, database full, each access level
stopping, both key grants, sign, verify pass, verify reject.

**Unit tests.** The signing test signs ten 24-bit messages. The ECC unit
tests use a 17-bit curve:

- y^2 = x^3 + x + 35 over GF(65521);
- base point (2, 29470), of prime order 65761;
- a software reference in `ecc_ref_pkg`.

The SHA-256 test covers every input size from 0 to 448 bits used in the
design's evaluation, against independently computed digests, and checks the
cycle counts. The PUF test also runs an 8-bit challenge with 8 to 128-bit
responses.

## How far it follows the original HSM proposal, and where it is its own

Follows the proposal:

- the set of units and how they connect;
- the two phases: IP registration, then access and verification;
- the order of the checks and the three levels;
- the two keys and the stage updates;
- the enroll ID as the ECDSA public key;
- the PUF structure (challenge muxes, butterfly cells, arbiter, one chain per
  response bit) at 4-bit challenge and 8-bit response;
- a SHA-256 engine for any input length;
- interleaved multiplication and extended-Euclid inversion.

This design's own choices:

- **Command interface.** The single command port, the command and status
  codes, and `SET_OWNER` (first caller wins, since the proposal does not say
  how the owner is known).
- **HASHID enrolment.** The proposal compares the PUF-derived hash with a
  stored one but does not say how the stored one is first obtained.
- **Modular addition, not XOR,** when folding the working registers into the
  hash registers, so that the digests are standard SHA-256.
- **The curve is an input.** The proposal names no curve.
- **No random-number generator.** Private keys and the signing nonce are
  inputs; there is no key or nonce generator.
- **Single SHA-256** in the Merkle tree and header, with a header layout of
  previous hash, root and timestamp.
- **Four transactions per block.**
- **Level 3 compares with the stored header.** The check compares the given
  block header with the header stored for the IC at registration, not with
  the chain's newest header. An IC recorded in an older block therefore still
  passes after new blocks are added. The proposal's block diagram draws the
  newest header, while its access algorithm uses the stored one.
- **The ECDSA signature unit stands beside the access flow.** The proposal
  lets the PUF, not signatures, authenticate ICs.
- **The PUF model** is deterministic and noise-free. It cannot say anything
  about reliability, and it has no physical randomness.
- **Sizes the proposal does not give:** an 8-entry IC table, 128-bit keys,
  32-bit IC IDs, 256-bit transactions, 32-bit timestamps.

Not built:

- the blockchain node and its ledger;
- the transistor-level PUF;
- the FPGA resource, speed and power figures that the proposal reports for
  each unit.
