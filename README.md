# RC4 stream cipher core with a 128-entry state array

RC4 encrypts a byte stream by XORing it with a pseudorandom keystream. The
keystream comes from a secret permutation `S` of the numbers `0..N-1` that is
stirred by the key once, then stirred a little more for every byte produced.
Decryption is the same operation: XORing the ciphertext with the same keystream
gives back the plaintext, because `(A xor B) xor B = A`.

This core follows the RC4 variant described in *Implementation of RC4 Stream
Cipher Using FPGA* (2013): a state array of **128 entries** and a key of
**1 to 128 bytes**, chosen at run time. The size is a parameter, so the same RTL
also runs the classic byte-wide RC4 (`N = 256`) and the 4-entry hand example
(`N = 4`). After a key setup of `N + 3` clock cycles, it encrypts or decrypts
**one byte per clock**, with one cycle of latency.

## The algorithm, as the hardware runs it

All index arithmetic is modulo `N`. `N` must be a power of two, so "mod N" just
drops the carry.

**Key setup (key-scheduling algorithm, KSA).** This phase runs once for every new key.

```
S[k] = k for all k;  j = 0
for i = 0 .. N-1:
    j = (j + S[i] + K[i mod keylen]) mod N
    swap S[i], S[j]
```

**Keystream generation (PRGA).** This runs for every data byte, starting from `i = j = 0`.

```
i = (i + 1) mod N
j = (j + S[i]) mod N
swap S[i], S[j]
keystream = S[(S[i] + S[j]) mod N]
out = in xor keystream
```

With `N = 128` each entry of `S` holds a value `0..127`, which is 7 bits. The
keystream value is zero-extended to a byte, so **the top bit of every keystream
byte is 0** and the top bit of each data byte passes through unencrypted. That
follows directly from a 128-entry permutation, and it is how the original
design's 4-entry example treats its 2-bit values. Use `N = 256` for standard
RC4 with a full-byte keystream. Only the low `log2(N)` bits of each key byte
take part in the sum.

## Structure

```
             key_we/waddr/wdata                 din ──────────────┐
                    │                                             ▼
              ┌─────▼─────┐  key byte   ┌─────────┐   ks    ┌──────────┐
              │rc4_key_mem├────────────►│ rc4_ksa │         │ rc4_xor  ├──► dout
              └───────────┘             └────┬────┘    ┌───►│ (reg.)   │
   key_start,key_len ──────────────────────► │         │    └──────────┘
                                     init, read A, swap│
                                             ▼         │
                                   ┌──── phase mux ────┤
                                   │                   │
                              ┌────▼────┐  reads A,B,C ┌┴─────────┐
                              │rc4_sbox │◄────────────►│ rc4_prga │
                              └─────────┘    swap      └──────────┘
```

| module | role |
|---|---|
| `rc4_pkg` | default sizes (`RC4_N = 128`, `RC4_KEY_MAX = 128`), byte type, phase enum |
| `rc4_key_mem` | `KEY_MAX` bytes of key: byte write port, combinational read port |
| `rc4_sbox` | the state array `S`: three combinational read ports, one swap port, one-cycle identity load |
| `rc4_ksa` | key setup: identity load, then one mixing step (one swap) per clock |
| `rc4_prga` | keystream generator: one value per clock, with swap forwarding |
| `rc4_xor` | the combiner, `dout = din xor keystream`, registered |
| `rc4_top` | phase control (`NOKEY → KEYSETUP → STREAM`), the state-array multiplexer, and the host ports |

The KSA and the PRGA never run at the same time, so they share the one state
array. A three-state phase register chooses which unit drives the array's
init, read port A and swap port. Read ports B and C are used only by the
generator.

## The single-cycle keystream step

This is the least obvious part of the design. One keystream byte needs three
dependent reads and a swap:

1. read `S[i+1]`. Its value gives the new `j`.
2. read `S[j_new]`. The sum of both values gives `t`.
3. read `S[t]`, **after** the swap of `S[i+1]` and `S[j_new]`.

`S` sits in flip-flops, so each of the three read ports is a plain multiplexer.
All three reads chain combinationally within one clock, and the swap is
written at the clock edge that ends the cycle. Read 3 therefore sees the array
*before* the swap, and the generator corrects it:

- if `t == i_new`, the post-swap value is the old `S[j_new]`
- else if `t == j_new`, it is the old `S[i_new]`
- otherwise `S[t]` is unchanged by the swap.

If `i_new == j_new`, the swap does nothing and both reads return the same value,
so these rules still hold. The price of this schedule is a long path:
add, mux, add, mux, add, mux, compare, mux. A faster clock would pipeline
it, or keep `S` in block RAM and take several cycles per byte. The original
design does not say how its datapath is scheduled. This schedule is this
core's own choice.

The key setup needs only one read per step (`S[i]`). The swap partner
`S[j_new]` is read inside the array by the swap itself. So each of the `N`
mixing steps takes one clock.

## Host interface and timing

All ports are synchronous to `clk`. `rst_n` is an asynchronous, active-low reset.

| port | dir | width (defaults) | meaning |
|---|---|---|---|
| `key_we`, `key_waddr`, `key_wdata` | in | 1, 7, 8 | write one key byte |
| `key_len` | in | 8 | key length in bytes, `1..KEY_MAX`, sampled with `key_start` (0 acts as 1) |
| `key_start` | in | 1 | run key setup on the stored key; ignored while `key_busy` |
| `key_busy` | out | 1 | key setup in progress |
| `din_valid`, `din` | in | 1, 8 | byte to encrypt or decrypt |
| `din_ready` | out | 1 | the core is keyed and takes `din` this cycle |
| `dout_valid`, `dout` | out | 1, 8 | result, one cycle after the byte was taken |

The usage sequence:

1. Write the key bytes to addresses `0..keylen-1`. Bytes above the length are ignored.
2. Pulse `key_start` for one cycle with `key_len`. Call that cycle 0.
   - Cycle 1 loads the identity into `S`.
   - Cycles 2 to `N+1` do the `N` mixing steps.
   - Cycle `N+2` ends the setup.
   - From cycle `N+3` on, `din_ready` is high. That is cycle 131 with `N = 128`.
3. Offer bytes with `din_valid`. A byte is taken in every cycle where
   `din_valid && din_ready`, so a continuous stream moves one byte per clock.
   Gaps are allowed and do not advance the keystream.
4. To decrypt, or to change the key, give `key_start` again. The keystream
   restarts at `i = j = 0`. Both phases run again for every key, as RC4
   requires. Each RC4 key must be used only once in practice, so a real system
   would mix a nonce into the key. That is left to the host.

The key memory must not be written while `key_busy` is high. An assertion in
`rc4_top` reports it if it is. `din_ready` is low during key setup and in the
cycle `key_start` is given, so no byte is taken against a stale keystream.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. The reference values
come from `tb/rc4_ref_pkg.sv`, a plain software model of RC4 with an `N`-entry
array, and from externally known results:

| testbench | what it checks |
|---|---|
| `tb_rc4_example` | the 4-entry hand example, key `[1,7,1,7]`. `S` is checked after every key-setup step (`[1,0,2,3] [0,1,2,3] [0,1,3,2] [2,1,3,0]`) and after each keystream step (`[2,1,3,0] [3,1,2,0]`). "HI" (`48 49`) encrypts to `4B 48` and decrypts back |
| `tb_rc4_top` | three cores side by side: the 4-entry example; `N = 256` against the published RC4 test vectors ("Key"/"Plaintext" → `BBF316E8D940AF0AD3`, "Wiki"/"pedia", "Secret"/"Attack at dawn"); and `N = 128` against the model with key lengths 1, 5 and 128 plus random lengths, idle gaps, data offered during key setup (must be ignored), re-keying mid-stream, and decryption. It counts each of these situations and fails if one never happens. It also checks the setup time (`N + 3`) and the rate (1 byte per clock) |
| `tb_rc4_full` | the core at its default parameters: 16-byte key, 512-byte message, encryption against the model, then decryption |
| `tb_rc4_ksa` | key setup alone, at `N = 4` and `N = 128` with key lengths 1 to 128, and its cycle count |
| `tb_rc4_prga` | the generator on permutations set up by the testbench. It covers the cases where forwarding is needed, gaps, and `clear` mid-stream |
| `tb_rc4_sbox`, `tb_rc4_key_mem`, `tb_rc4_xor` | the storage and the combiner against shadow copies |

To run one with Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_rc4_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/rc4_pkg.sv tb/rc4_ref_pkg.sv tb/tb_rc4_top.sv
./obj_dir/Vtb_rc4_top
```

Replace `tb_rc4_top` with another testbench name to run that one. Each runs in
well under a second.

## Changing the design

- **Size.** Set `N` (a power of two of at least 2) and `KEY_MAX` on `rc4_top`.
  The port widths follow from them: `key_waddr` is `$clog2(KEY_MAX)` bits and
  `key_len` is `$clog2(KEY_MAX+1)` bits. Setup takes `N + 3` cycles. `N = 256`
  gives standard RC4.
- **Area.** At the defaults, synthesis gives about 1,980 flip-flops. That is
  896 bits of state array and 1,024 bits of key; the rest is counters and
  control. The three 128-way read multiplexers are most of the logic. For a small
  FPGA, the arrays would go into block RAM. The generator would then need
  about three cycles per byte, and the key setup two cycles per step.
- **Throughput.** For a higher clock, register the output of the first read
  (`S[i]`, `j`) and forward across the two pipeline stages. The structure of
  the units does not change.

## Relation to the original design

The algorithm and its sizes come from the original design:

- the two phases
- the formulas
- the 128-entry state array
- keys of 1 to 128 bytes
- the use of one mechanism for both encryption and decryption

The original paper was written in VHDL for a Microsemi ProASIC3 A3P250 flash
FPGA. It gives no host interface, timing or storage organisation. Everything in the following
list is therefore this core's own choice:

- the byte-write key memory and the `key_start`/`key_len` handshake
- the valid/ready data stream
- `S` held in flip-flops with three read ports
- the one-cycle identity load
- one swap per clock in key setup
- one keystream byte per clock with swap forwarding
- the registered XOR stage
- the reset behaviour

Two points should be kept in mind when comparing:

- **Key indexing.** In the paper's own example the key is as long as the
  array. This core uses the key cyclically, `K[i mod keylen]`, as standard RC4
  does.
- **FPGA target.** The core has not been synthesized for the ProASIC3 target.
  With its arrays in flip-flops, it is probably larger than the A3P250 (about
  6,000 logic tiles). It would need the block-RAM arrangement described above
  to fit there.
