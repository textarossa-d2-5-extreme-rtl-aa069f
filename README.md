# Secure crypto IP pair: an RLWE encryption accelerator and a SHAKE accelerator

This RTL implements two independent memory-mapped accelerators for security work on a host
processor:

* **HE accelerator**: the arithmetic core of symmetric RLWE encryption, as used by
  SEAL-Embedded for CKKS homomorphic encryption. Software encodes the message and samples the
  polynomials. The hardware computes the first ciphertext component
  `c0 = NTT(m+e) - a * NTT(s) mod q` for polynomials of degree up to 16384. To do that it runs
  a negacyclic number-theoretic transform (NTT) on 32-bit coefficients.
* **SHAKE accelerator**: the SHAKE-128 / SHAKE-256 extendable-output functions of FIPS 202, which
  are the hashing bottleneck of post-quantum signature schemes such as CRYSTALS-Dilithium. It uses
  a Keccak-f[1600] sponge that computes one round per clock cycle.

Each accelerator has its own AXI4 memory-mapped slave port, for a CPU or a DMA engine.
`crypto_top` places the two side by side. They share only the clock and the active-low
asynchronous reset.

The design follows the architecture of the accelerators described in the TEXTAROSSA project
deliverable D2.5 ("eXtreme Secure Crypto IP"). That description gives the block diagrams, the
memories and the interfaces, but not the internal schedules, register maps or command encodings.
Those are this design's own. Where the two differ is listed at the end.

```
crypto_top
├── he_accel                 AXI4 slave (32-bit data, 18-bit address) + registers
│   ├── axi4_slave
│   └── he_rlwe_core         memories, multiplexers, ALU
│       ├── ntt_fsm          command sequencer / address generator
│       ├── roots_generator  fills the Roots RAM with psi^brv(i)
│       ├── alu_butterfly    U ± V*r mod q, 3-stage pipeline
│       │   └── barrett_reduce
│       └── dpram  x4        DPRAM1, DPRAM2, shared DPRAM, Roots RAM
└── shake_accel              AXI4 slave (64- or 32-bit data) + registers + control
    ├── axi4_slave
    ├── shake_data_reg       1344-bit shift register for input and output
    ├── shake_padder         domain suffix and pad10*1
    └── shake_core           sponge state, absorb/squeeze
        └── keccak_round     theta, rho, pi, chi, iota
```

`he_pkg` and `shake_pkg` hold the shared types and constants.

---

## 1. The RLWE encryption accelerator

### 1.1 What it computes

Symmetric RLWE encryption of an encoded message `m` under a secret key `s` works in the ring
`Z_q[x]/(x^n + 1)`. Software samples a uniformly random polynomial `a` and a small error `e`.
The ciphertext is `(c0, c1) = (-a*s + m + e, a)`. The polynomial product is the expensive part.
This accelerator keeps everything in the NTT domain, where the ring product is a
coefficient-wise product:

```
c0 = NTT(m + e) - a ⊙ NTT(s)          (all mod q, coefficient by coefficient)
```

`a` is treated as already being in the NTT domain. It is uniformly random, so it can be sampled
there directly. Because the ring is `x^n + 1`, the transform is the **negacyclic** NTT. It uses
a primitive 2n-th root of unity `psi` (`psi^n = -1 mod q`), and the twiddle factors are
`psi^brv(k)`, k = 1..n-1, where `brv` reverses the bits of a log2(n)-bit index. The transform is
the in-place Cooley-Tukey version. Its input is in natural order and its output in bit-reversed
order, and the result is returned in that order. The software model must use the same order.

For index `i` the hardware returns

```
c0[i] = ( NTT(m+e)[i] - a[i] * NTT(s)[i] ) mod q,    0 <= c0[i] < q
```

with `NTT(x)[brv(k)] = sum_j x[j] * psi^((2k+1) j)`.

### 1.2 Memories and data flow

`he_rlwe_core` holds four `dpram` instances. Each is 2^MAX_LOGN words of 32 bits (64 KB each
at the default n = 16384):

| memory      | holds                                   | written by                    |
|-------------|-----------------------------------------|-------------------------------|
| shared DPRAM| s, then m+e, then a; finally c0         | host (port A), core (port A)  |
| DPRAM1      | NTT(s)                                  | core                          |
| DPRAM2      | NTT(m+e)                                | core                          |
| Roots RAM   | psi^brv(i) at address i                 | roots generator               |

Only the shared DPRAM is visible to the host. While the core is idle, mux4 (address) and mux6
(write data) give its port A to the bus. While the core is busy they give it to the datapath,
and host accesses are ignored. The other multiplexers are:

* **mux1 / mux2** select the butterfly operands U and V: port A / port B of the shared DPRAM,
  DPRAM1 or DPRAM2.
* **mux3** selects the multiplier `r`: a twiddle from the Roots RAM, or a coefficient of `a`
  from port B of the shared DPRAM.
* **demux1 / demux2** send the butterfly's sum and difference back to DPRAM1, DPRAM2 or (for
  the difference only) the shared DPRAM.
* **mux5** gives the Roots RAM port to the roots generator or to the FSM.

A full encryption runs four commands:

| command       | reads                                     | writes      |
|---------------|-------------------------------------------|-------------|
| `GEN_ROOTS`   | registers LOGN, Q, MU, PSI                | Roots RAM   |
| `NTT_S`       | shared DPRAM (s), then DPRAM1 in place    | DPRAM1      |
| `NTT_ME`      | shared DPRAM (m+e), then DPRAM2 in place  | DPRAM2      |
| `ENCRYPT`     | U = DPRAM2[i], V = DPRAM1[i], r = shared[i] (a) | shared[i] = U - V*r |

An NTT does not start with a copy. Stage 0 takes its operands straight from the shared DPRAM
and writes DPRAM1 or DPRAM2, and stages 1..logn-1 then work in place in that memory. The
encryption step needs no separate multiplier. It is the butterfly's difference output
`U - V*r` with `r = a[i]`.

### 1.3 NTT schedule and the butterfly pipeline

This is the part of the design with the most timing detail.

**Index arithmetic.** Stage `s` (s = 0..logn-1) has `m = 2^s` groups with half-width
`t = n >> (s+1)`. A single counter `k = 0..n/2-1` visits the butterflies of the stage:

```
group = k >> log2(t)
j     = 2*t*group + (k mod t)          pairs j with j + t
root  = m + group                      Roots RAM address, holds psi^brv(m+group)
(U, V) <- (U + V*root, U - V*root) mod q
```

The code is in `ntt_fsm`. For `ENCRYPT` the counter runs over `i = 0..n-1` with both
addresses equal to `i`.

**Pipeline.** Each butterfly reads two words and writes two words back to the same dual-port
RAM. That is four port accesses, so a dual-port memory can finish at most one butterfly every
two cycles. The FSM runs at that rate:

```
cycle   c      c+1        c+2  c+3  c+4          c+5
        read   operands   ALU  ALU  ALU result   write-back
        (rd_en)(alu_valid)          registered   (wr_en)
```

* In cycle `c` the FSM drives `rd_en`, the read addresses and the root address. The RAMs
  answer in `c+1`, the operands pass the multiplexers, and `alu_valid` is high.
* `alu_butterfly` has three register stages: V*r product, Barrett reduction, and modular
  add/subtract. A write-back register in `he_rlwe_core` holds its result for one more cycle.
* In cycle `c+5` the FSM drives `wr_en` and the write addresses. A 5-deep delay line in the
  FSM carries those addresses.

Reads fall on even cycles of a stage and writes, five cycles later, on odd cycles. Each RAM port
therefore takes the read address in one cycle and the write-back address in the next, and never
both at once. An assertion checks this, and the FSM testbench checks it too.

**Hazards.** The butterflies of one stage use disjoint address pairs, so reads and writes within
a stage never conflict. Stage `s+1` reads values written by stage `s`. After the last read of a
stage the FSM therefore waits (state `F_DRAIN`) until that butterfly's write is under way, and
only then starts the next stage. That costs 4 cycles per stage. In `ENCRYPT`, port B of the
shared DPRAM reads `a[i]` while port A writes `c0[j]` for an earlier `j`. Since `j != i`, that
is safe as well.

**Cycle counts** (from the start pulse to the `done` pulse, checked by the testbenches):

| operation   | cycles                 | n = 1024 | n = 4096 | n = 16384 |
|-------------|------------------------|---------:|---------:|----------:|
| `GEN_ROOTS` | 2n                     | 2 048    | 8 192    | 32 768    |
| `NTT_S`, `NTT_ME` | logn·(n + 4) + 1 | 10 281   | 49 201   | 229 433   |
| `ENCRYPT`   | 2n + 5                 | 2 053    | 8 197    | 32 773    |
| per encryption (2 NTT + ENCRYPT) |   | 22 615   | 106 599  | 491 639   |

At 100 MHz the core needs 0.23 ms for n = 1024 and 4.9 ms for n = 16384. Moving the
polynomials over the bus adds about 4n word transfers: s, m+e and a in, c0 out. Roots need to be
generated again only when q, psi or n change.

### 1.4 Butterfly ALU and Barrett reduction

`alu_butterfly` returns `sum = U + V*r mod q` and `diff = U - V*r mod q`. Both are fully reduced
to `[0, q)`. The product `V*r < q^2` is reduced by `barrett_reduce`:

```
mu  = floor(2^62 / q)              (software writes it; 64-bit register)
t   = floor(x * mu / 2^62)         quotient estimate, at most 2 too small
r   = x - t*q                      r < 3q, then two conditional subtractions
```

This needs `q < 2^31`, so that `U + (V*r mod q)` fits in 32 bits before its correction. The
testbenches use q = 2147352577 = 65532·2^15 + 1. It is prime and has 2n-th roots of unity up to
n = 16384.

### 1.5 Roots generator

`roots_generator` computes `psi^0, psi^1, ..., psi^(n-1)` by repeated modular multiplication.
It uses one Barrett multiply every two cycles and writes `psi^i` to Roots RAM address `brv(i)`.
Address `m + group` therefore holds exactly the twiddle that stage `s` needs. Entry 0 (`psi^0`)
is written but never read.

### 1.6 Register map and software sequence

`he_accel` decodes byte addresses with `ADDR_W = 18`:

| address            | name     | access | meaning |
|--------------------|----------|--------|---------|
| `0x00000 + 4*i`    | shared DPRAM word i | RW | ignored while busy (reads return stale data) |
| `0x20000`          | CTRL     | W  | [2:0] command: 1 GEN_ROOTS, 2 NTT_S, 3 NTT_ME, 4 ENCRYPT; writing starts it |
| `0x20004`          | STATUS   | R  | [0] busy, [1] done (set at the end of a command, cleared by the next) |
| `0x20008`          | LOGN     | RW | log2(n), 1..MAX_LOGN |
| `0x2000C`          | Q        | RW | modulus, below 2^31 |
| `0x20010`/`0x20014`| MU       | RW | floor(2^62/q), low / high word |
| `0x20018`          | PSI      | RW | primitive 2n-th root of unity mod q |

Configuration writes are ignored while a command runs. `irq_done` pulses for one cycle at the end
of each command, so software can use it instead of polling STATUS.

```
write LOGN, Q, MU, PSI;  CTRL = GEN_ROOTS;   wait done
write s  to 0x0 .. 4(n-1);  CTRL = NTT_S;    wait done
write m+e to 0x0 ..;        CTRL = NTT_ME;   wait done
write a  to 0x0 ..;         CTRL = ENCRYPT;  wait done
read c0 from 0x0 .. 4(n-1)      (c1 = a is already known to software)
```

Incremental bursts of up to 256 beats move a polynomial efficiently. The slave is a
single-transaction design, so a DMA engine gets the most out of it with long INCR bursts.

---

## 2. The SHAKE accelerator

### 2.1 Sponge core

`shake_core` holds the 1600-bit Keccak state. A single combinational `keccak_round` sits
between the state register's output and its input, so each clock applies one round and a
permutation takes 24 cycles. A multiplexer in front of the round chooses what enters it:

* the state register itself, for rounds 2..24 and for squeeze permutations;
* the padded input block XORed into the state (absorb); or
* the padded input block XORed into zero, for the first block of a message. This replaces an
  explicit state clear.

`trunc_out` is the rate part of the state, 1344 bits for SHAKE-128 and 1088 bits for SHAKE-256
(upper bits zero). It is the output block. `done` pulses 24 cycles after an absorb or squeeze
pulse.

### 2.2 Data register, block alignment and padding

`shake_data_reg` is a 1344-bit shift register used for both directions:

* **Input.** Each bus write shifts one `DATA_W`-bit word in at the top. After 1344/DATA_W
  writes, the first word written sits in bits `DATA_W-1:0`, which is byte 0 of the block. A
  SHAKE-256 block is only 1088 bits, so after 1088/DATA_W writes it sits 256 bits too high.
  `shake_accel` shifts it down by 256 bits before the padder. Both rates are multiples of 32
  and 64, so both bus widths work.
* **Output.** When a permutation ends with output expected, the register is loaded in
  parallel from `trunc_out`. Each bus read returns the low word and shifts the register down,
  so bytes come out in stream order.

`shake_padder` passes non-final blocks through unchanged. For the last block, with `nbytes`
message bytes, it clears the bytes from `nbytes` on, XORs `0x1F` into byte `nbytes` (SHAKE
suffix `1111` plus the first pad bit) and XORs `0x80` into the last byte of the rate. When
`nbytes = rate - 1`, both land in one byte, `0x9F`. If a message length is a multiple of the
rate, the message ends with an extra block with `nbytes = 0`.

### 2.3 Register map and command sequence

`shake_accel` has four word registers. Word `w` is at byte address `w * DATA_W/8`:

| word | name   | access | meaning |
|------|--------|--------|---------|
| 0    | CONFIG | RW | [0] mode: 0 SHAKE-128 (rate 168 B), 1 SHAKE-256 (rate 136 B) |
| 1    | CMD    | W  | [1:0] 1 absorb, 2 squeeze; [2] first block; [3] last block; [15:8] nbytes of the last block |
| 2    | STATUS | R  | [0] busy, [1] output block ready |
| 3    | DATA   | RW | write: shift a word in; read: next output word (shifts) |

```
CONFIG = mode
for each block:           write rate/DATA_W words to DATA (a FIXED burst works)
                          CMD = absorb | first? | last? | nbytes<<8;   wait !busy
read rate/DATA_W words from DATA                 (first output block)
for more output:  CMD = squeeze;  wait !busy;  read the next block
```

Writes to CMD and DATA are ignored while the permutation runs. One block costs the data
transfer (rate/DATA_W beats: 17 for SHAKE-256 on a 64-bit bus), a command write and 24
permutation cycles. With a master that streams, this comes to 54 bus cycles per 136-byte
block (measured by `tb_shake_workload`). At 300 MHz that is about 1.4 s for a 1 GiB message.

---

## 3. AXI4 slave front end

Both accelerators use `axi4_slave`. It turns AXI4 bursts into a word-access port: `req_we`, or
`req_re` with read data returned one clock later. It handles one transaction at a time and gives
a pending write priority over a pending read. It supports INCR and FIXED bursts (WRAP is treated
as INCR) and any length up to 256 beats. Responses are always OKAY. Every read beat makes
exactly one `req_re`, so FIFO-like registers such as SHAKE's DATA are safe to read with FIXED
bursts. A write burst of L beats takes L + 2 cycles. Each read beat takes three cycles, plus any
time `rready` is held low.

Both accelerators ignore the byte strobes, so every write beat writes a whole word. They also
ignore the address bits outside their decoded fields. The HE memory window and the four SHAKE
registers therefore repeat across the rest of each address space. Beats must be full bus width
(`AxSIZE` equal to the data width).

## 4. Top level and parameters

| parameter     | default | meaning |
|---------------|---------|---------|
| `HE_MAX_LOGN` | 14      | largest polynomial degree 2^HE_MAX_LOGN. Sets the size of all four RAMs, 2^HE_MAX_LOGN × 32 bit each. Smaller values (e.g. 10 for n ≤ 1024) give proportionally smaller memories |
| `HE_ADDR_W`   | 18      | HE byte-address width; bit 17 selects the register window |
| `SH_DATA_W`   | 64      | SHAKE bus width, 64 or 32 |
| `SH_ADDR_W`   | 12      | SHAKE byte-address width |
| `ID_W`        | 4       | AXI ID width of both ports |

The HE port has a fixed 32-bit data width. `he_irq_done` is the HE command-complete pulse. The
clock is one domain. The reset is asynchronous on assertion and should be released
synchronously to `clk`.

## 5. Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

| testbench            | what it checks |
|----------------------|----------------|
| `tb_barrett_reduce`  | random and edge products (0, (q-1)^2) for four moduli, against `%` |
| `tb_alu_butterfly`   | random operand stream with random gaps; each result exactly 3 cycles after its operands, equal to U ± V*r mod q |
| `tb_dpram`           | random traffic on both ports against a model: 1-cycle latency, read-first, each port sees the other's writes |
| `tb_roots_generator` | Roots RAM contents = psi^brv(i), write count, 2n cycles |
| `tb_ntt_fsm`         | read/write address sequences and root indices against the loop nest, mux selects, strobe pipeline, stage timing |
| `tb_he_rlwe_core`    | full encryption for n = 64 and n = 16 against a software NTT model, then with the moduli 12289 and 2^30 - 2^18 + 1; exact cycle counts; host writes while busy ignored |
| `tb_he_accel`        | the same flow over AXI, register read-back, STATUS, irq_done |
| `tb_axi4_slave`      | INCR/FIXED bursts, back-pressure, one request per beat (a read-counter register), ids, responses, rlast |
| `tb_keccak_round`    | one round on a patterned state, and 24 rounds of the zero state against the known Keccak-f[1600] answer |
| `tb_shake_padder`    | random blocks in both modes, not-last and last blocks with nbytes 0, 1, random and rate-1 (0x9F) |
| `tb_shake_data_reg`  | 21- and 17-word shift-in alignment, parallel load, shift-out order |
| `tb_shake_core`      | SHAKE-128 (200 bytes, two blocks) and SHAKE-256 (135 bytes) with a squeeze, against FIPS 202 outputs; 24 cycles per permutation |
| `tb_shake_accel`     | messages of 0-300 bytes in both modes over AXI, 64- and 32-bit buses, two output blocks each; writes while busy ignored |
| `tb_crypto_top`      | default parameters: a complete encryption for every n from 1024 to 16384 (and n = 16) against the model, while SHAKE-128/256 hashes run concurrently on the other port. Each exercised mechanism is counted, and a mechanism that never occurs is a failure |
| `tb_shake_workload`  | SHAKE-256 hashes of 100 KiB, 500 KiB and 1 MiB messages through AXI against a behavioural Keccak model (itself first checked against the FIPS 202 vectors); at most 60 bus cycles per block |

The HE reference model (`tb/he_ref_pkg.sv`) is a direct O(n log n) Cooley-Tukey NTT on 64-bit
integers. It takes `psi` for degree n from the fixed root 214822318 of order 32768 modulo
2147352577, as `psi_n = 214822318^(16384/n)`. The SHAKE expected digests in
`tb/shake_vectors.svh` are FIPS 202 outputs for messages whose byte `i` is `(7i + 3) mod 256`.
`tb/shake_ref_pkg.sv` is a separate SHAKE model. It writes the Keccak step mappings exactly as
the standard states them, so it shares no tables with the RTL, and it generates long messages
on the fly.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/he_pkg.sv rtl/shake_pkg.sv tb/he_ref_pkg.sv tb/tb_crypto_top.sv \
    --top-module tb_crypto_top
./obj_dir/Vtb_crypto_top
```

For another testbench, replace the last file and the top-module name. The package files must
come first. `tb_crypto_top` simulates about 1.2 million cycles in under a minute. The others
finish in seconds.

---

## 6. Departures from the original description, and limits

* **Negacyclic NTT.** The description writes the cyclic NTT formula, with a post-scaling by
  powers of the inverse root. This design implements the negacyclic transform with powers of a
  2n-th root. That is what the ring `x^n + 1` of RLWE requires, and it needs no scaling.
  Results are in bit-reversed order.
* **Butterfly reduction.** The butterfly has the usual `U ± V*r` structure, with the Barrett
  reduction on the `V*r` path. It reduces every result fully to `[0, q)`. It does not use
  Harvey's lazy reduction, which lets values grow to `[0, 4q)` between stages. This costs a
  conditional subtraction per output and keeps every intermediate value a plain residue.
* **Run-time parameters.** q, mu and psi are registers written by software, so any modulus
  below 2^31 with a 2n-th root of unity can be used. The description does not fix one modulus.
  SEAL-Embedded's multi-prime (RNS) moduli are handled by running the flow once per prime; there
  is no hardware RNS loop.
* **Memory sizes.** Each memory holds n words of 32 bits: 64 KB per memory at n = 16384, and
  4 KB at n = 1024 with `HE_MAX_LOGN = 10`. The description gives 8-128 KB for "DPRAM1 and
  DPRAM2", read here as the two together.
* **Performance.** The description reports an end-to-end time of 0.142 ms for n = 1024 at
  100 MHz with DMA transfers. This core alone needs 0.23 ms there, because it is limited to one
  butterfly every two cycles by the dual-port RAMs. For n ≥ 4096 this core is faster than the
  reported end-to-end figures, which also include software work. A faster NTT would need memory
  banking or ping-pong memories. That is not implemented.
* **Write-back register and FSM schedule** are this design's own. So are the command codes, the
  register maps of both accelerators, the STATUS/irq_done signalling and the SHAKE command
  protocol.
* **SHAKE data register.** Input and output share the 1344-bit register, as described. The host
  cannot load the next block while a permutation runs. The byte-count interface of the padder
  (whole bytes only, no bit-level message lengths) is a choice of this design.
* **Not included.** The host processors, the AXI interconnect, the DMA engine, DDR memory and
  the UART/JTAG peripherals of the systems in which the accelerators were evaluated.
  `crypto_top` only exposes the two slave ports. The reported FPGA clock rates (180 MHz for the
  HE accelerator, 333 MHz for SHAKE) have not been checked for this RTL.
