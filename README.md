# A 16-bit π-Cipher encryption processor

π-Cipher is a nonce-based authenticated cipher built around one permutation, the
π-function. The π-function uses only additions, rotations and XORs (an ARX design), so a
narrow datapath can compute it well. This RTL implements the 16-bit member of the family
(ω = 16, a 256-bit state). A single 16-bit *ARX engine* computes the cipher's basic mixing
step, the `*` operation. A *π-function core* sequences that engine through the 24
operations of one permutation call. A *message processor* uses the core three times to
turn a key, a public message number (PMN), a counter and a 128-bit message block into a
128-bit ciphertext and a 128-bit tag.

The structure follows the 16-bit reconfigurable π-Cipher processor published by
El-Hadedy et al. (IPDPS Workshops 2016). The block names KPIG, MPCU, ARX_Load, IOSEL and
so on come from that architecture. The published description leaves many details open:
protocols, encodings, the constants, the ciphertext path and exact timing. The choices made
here are listed under [Departures and open points](#departures-and-open-points). None of
them claims to be bit-compatible with the official π16-Cipher test vectors.

## The `*` operation

`Z = X * Y` takes two 4-tuples of 16-bit words, X and Y, and returns a 4-tuple Z. All
additions are modulo 2^16, and `<<<` is a left rotation:

```
T0 = (c1 + X0 + X1 + X2) <<< 1      T0' = (c5 + Y0 + Y2 + Y3) <<< 2
T1 = (c2 + X0 + X1 + X3) <<< 4      T1' = (c6 + Y1 + Y2 + Y3) <<< 5
T2 = (c3 + X0 + X2 + X3) <<< 9      T2' = (c7 + Y0 + Y1 + Y2) <<< 7
T3 = (c4 + X1 + X2 + X3) <<< 11     T3' = (c8 + Y0 + Y1 + Y3) <<< 13

X0 = T0^T1^T3   X1 = T0^T1^T2   X2 = T1^T2^T3   X3 = T0^T2^T3     (mu side, "X bus")
Y0 = T1'^T2'^T3' Y1 = T0'^T2'^T3' Y2 = T0'^T1'^T3' Y3 = T0'^T1'^T2' (nu side, "Y bus")

Z3 = X0+Y0   Z0 = X1+Y1   Z1 = X2+Y2   Z2 = X3+Y3
```

The two halves are independent until the last additions. The engine therefore has two
identical cores running side by side.

## ARX engine (`arx_engine`)

Each core (`arx_core`) has the following parts:

* **A 64-bit buffer** that holds four words. It is filled one word per cycle from the
  core's 16-bit input bus.
* **Sixteen read ports.** Each port has a 2-bit word address, so the core takes a 32-bit
  address word. Ports `4n..4n+3` feed adder `n`.
* **Four four-input adders** (`arx_adder4`). Each adder is built from three two-input
  adders: `(p0+p1) + (p2+op3)`. Bit 1 of the adder's control word chooses `op3`: the
  operation constant or the fourth port. The control unit always selects the constant,
  and the fourth-port path is there for general ARX use. Registers after the ports and
  after each adder level make the adder a three-cycle pipeline.
* **A rotator** (`arx_rotator`) with fixed per-lane amounts: 1, 4, 9, 11 on X and
  2, 5, 7, 13 on Y.
* **An XOR bank** (`arx_xor_bank`) that computes the three-input XORs above.

The engine also contains the output adding bank (`arx_add_bank`), a 64-bit FIFO register
and the control unit (`arx_ctrl`). Each stage has a register that its own enable from the
control unit loads: the adder controls, `XRC`/`YRC`, `XXC`/`XYC`, `OAC` and `FIFOC`. The
control unit is a Moore machine, so one stage works per cycle:

| cycle after ARX_Load | state | what happens |
|---|---|---|
| 1–4   | LOAD  | X_k and Y_k written into buffer word k (write counter) |
| 5–7   | BUFRD | read ports latched, adder level 1, adder level 2 (read counter) |
| 8     | ROT   | rotators |
| 9     | XOR   | XOR banks |
| 10    | ADDB  | Z = X-bank + Y-bank |
| 11    | FIFO  | Z stored in the FIFO |
| 12–15 | OUT   | `arx_flag` high, Z0, Z1, Z2, Z3 on the 16-bit `op` bus |

That gives seven execution cycles after four load cycles. One operation takes 16 cycles,
counted from one ARX_Load to the next.

## π-function core (`pi_function`)

A π-function call applies three rounds to the 256-bit state `I1..I4`, where each `Ii` is a
4-word chunk. A round uses two constant chunks, C1 and C2, that are different in each
round. The round runs eight `*` operations in two chains:

```
forward : J1 = C1 * I1,   J2 = J1 * I2,   J3 = J2 * I3,   J4 = J3 * I4
backward: J4 = J4 * C2,   J3 = J3 * J4,   J2 = J2 * J3,   J1 = J1 * J2
```

The new `J1..J4` are the round's output. In the forward chain, the running value enters the
engine's X port and the input chunk enters Y. In the backward chain the roles swap: the
forward result enters X, and the constant or the newer result enters Y.

**Buffer** (`pf_buffer`, 64 × 16 bits = 128 bytes):

| words | contents |
|---|---|
| 0–15  | state: call input, each round's output, call result |
| 16–39 | six round constants (C1, C2 of rounds 1–3), set by reset |
| 40–47 | unused |
| 48–63 | forward-chain results J1..J4 of the current round |

The forward chain writes words 48–63 and the backward chain overwrites the state in place,
so a round needs no copying. Ports PA and PB (6-bit addresses) feed the engine's X and Y
inputs. PO (4-bit address) reads the state for output. The write port shares ADDR_PA.
IOSEL chooses its data: the input stream ISTRM or the engine output (AE bus).

**Control** (`pf_ctrl`) runs the phases IN (16 cycles), then 24 × (LOAD, FEED, WAIT), then
OUT (16 cycles) and DONE. During FEED, ADDR_PA and ADDR_PB walk the X and Y chunks while the
engine loads them. During WAIT, the four cycles of `arx_flag` write Z back. `pi_flag`
arrives **417 cycles** after the Start cycle: 16 + 24·16 + 16 + 1.

Interface: pulse `start` while the core is idle. For the next 16 cycles `in_take` is high,
and the source must present state word k on `istrm` in the k-th of those cycles. Later
`po_valid` is high for 16 cycles with result words 0..15 on `po`, and then `pi_flag` pulses.

## Message processor (`msg_processor`, top level)

```
 key_pmn ──► KPIG ──Kpmn_DB──┐                    ┌──► cipher buffer ──► cipher_txt
                              ├─ DATA BUS ─► π-function ─PF_ALU_DB─┬─► tag buffer ─► tag
 message ──► ALU ───ALU_DB───┘      (DBSEL)            │           ├─► ALU result buffer
                                                       └───────────┴─► KPIG IS buffer
                         MPCU sequences everything
```

One block is processed as follows:

1. **Load.** The KPIG stores the key and the PMN. The ALU stores four counter words and
   eight message words.
2. **Initialisation.** `CIS = π((Key ‖ PMN ‖ 10*) ⊕ IS)`, where IS is zero after a clear.
   The KPIG keeps a copy of CIS in its IS buffer (mode 111). The ALU keeps it in its result
   buffer.
3. **Counter.** `R = π(CIS ⊕ counter)`, with the counter XORed into state words 0–3.
4. **Message.** The ALU feeds `D = (M ⊕ R[0..7]) ‖ R[8..15]` to the π-function. The
   ciphertext is the first eight words of D. They are written into the cipher buffer as
   the π-function takes them. The tag is the first eight words of `π(D)`.
5. **Output.** `tag_flag` is high for eight cycles. In cycle k, `cipher_txt` and `tag`
   carry word k.

**KPIG** (`kpig`). Two 16-word buffers hold Key ‖ PMN and IS. A mode runs once each time
the 3-bit `key_gen` changes value:

| key_gen | stores | output |
|---|---|---|
| 000 | clears both buffers | – |
| 001 | key | yes |
| 010 | key, IS | yes |
| 011 | key, PMN, IS | yes |
| 100 | PMN | yes |
| 101 | PMN, key, IS | yes |
| 110 | PMN, key | yes |
| 111 | IS from the π-function output | – |

Words arrive in the order key, PMN, IS on `key_pmn`, qualified by `key_pmn_valid`. The key
is 6 words (96 bits) and the PMN is 2 words (32 bits); both are parameters. The padding
word after the PMN is `16'h8000`.

**ALU** (`alu16`). The message buffer holds the counter in words 0–3 and the message in
words 4–11. The result buffer captures every π-function output word. The output stream is
the result buffer, modified according to `ALU_mode`:

| ALU_mode | output |
|---|---|
| 00 | result buffer unchanged; the ALU loads counter and message in this mode |
| 01 | result buffer unchanged |
| 10 | counter XORed into words 0–3 |
| 11 | message XORed into words 0–7 |

`ALU_flag` means that counter and message are loaded.

**MPCU** (`mpcu`). The states are INIT, LOAD, PF_INIT, PF_CTR, PF_MSG and OUT. The PC input
selects the KPIG mode: `0000` is the automatic mode (key_gen 110). Any other value gives
key_gen = PC[2:0]. The values 000 and 111 fall back to 110, because with those modes the
KPIG produces nothing to encrypt.

**Top-level interface.** Pulse `start` with `pc`. Message words (4 counter words, then 8
message words) are taken from the cycle after start. Key/PMN words are taken from the
second cycle after start. Both ports take a word only when its valid strobe is high, so
gaps are allowed. `busy` stays high until the last output cycle. The first output word
comes **1256 cycles** after the last input word: three π calls plus hand-over cycles.

## Cycle budget

| unit of work | bits | cycles here | bits per cycle |
|---|---|---|---|
| one `*` operation (ARX engine) | 128 in | 16 (load to next load) | 8 |
| one π-function call | 256 | 417 | 0.61 |
| one message block (input to first output) | 128 | 1256 + input and output cycles | ≈ 0.1 |

At the clock rates published for this architecture on a Virtex-7 FPGA, these cycle counts
would give about 2.8 Gbit/s for the engine (347 MHz), about 150 Mbit/s for the π-function
(250 MHz) and about 25 Mbit/s per message processor (250 MHz). This RTL has not been put
through FPGA timing.

Blocks of a long message are independent once CIS is known, so many processors can run side
by side. Each one gets its own counter value. `tb/tb_msg_parallel.sv` builds 100 processors
and encrypts a 1600-byte message in one pass: 1276 cycles from start to the last output
word, or about 10 bits per cycle (about 2.5 Gbit/s at 250 MHz). Each processor delivers the tag
of its own block. Combining the block tags into one message tag is not part of this design.

## Constants

The architecture does not list the numeric values of the eight operation constants or of
the six round constants. This RTL generates them in `pi16_pkg` the way the π-Cipher family
builds its constants. It takes the bytes of Hamming weight 4 in decreasing order (F0, E8,
E4, E2, E1, D8, …) and pairs them into 16-bit words. Words 0–7 are c1..c8, and words 8–31
are the round constants (C1 of round 1 at 8–11, C2 of round 1 at 12–15, and so on). The
testbenches list the same 32 words literally. Changing `pi_const` in the package changes
every use.

## Departures and open points

* **Timing.** One π call takes 417 cycles here, where the published figure is 675. One
  message takes about 1256 cycles after input, where the published figure is 2165. The
  engine's output takes four cycles on the 16-bit bus, not one.
* **Control structure.** The π-function control is a phase machine with round and operation
  counters, not 32 explicit states. The MPCU has six states, where five are mentioned.
  The π control's WRENA and the MPCU's cipher/tag write enables follow an input strobe in
  the same cycle. All other control outputs are Moore.
* **Ciphertext path.** The published block diagram draws the cipher buffer on the
  π-function output bus. Here the buffer takes the ALU's output (`message ⊕ key stream`) on
  its way into the π-function, so that the ciphertext can be decrypted.
* **Unspecified details** were chosen here: the ALU_mode encoding, the PC mapping, the
  KPIG's IS source in the user modes, the buffer layout, the valid/take handshakes, the
  key/PMN sizes and the word order everywhere.
* **Scope.** One 128-bit block per start. Associated data, secret message numbers,
  multi-block messages and decryption are not implemented.
* **Not RTL.** The parameterised (TLUT) FPGA configuration of the key input is a tool-flow
  and run-time reconfiguration technique. It is not part of this RTL. Functionally, the key
  enters through the KPIG's ordinary port.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. `tb/pi16_ref_pkg.sv` is a
behavioural reference: the `*` operation written step by step, the π-function as two
chains per round, and the message processor flow. It is written separately from the RTL
structure.

* `tb_arx_engine` checks random operations against the reference, a fixed vector, and the
  12-cycle latency.
* `tb_pi_function` checks random permutations, a fixed vector, and 417 cycles.
* `tb_pf_ctrl` checks every chunk address of all 24 operations.
* `tb_msg_processor` runs at default parameters. It encrypts nine blocks across all PC
  modes, with random input gaps, and includes a fixed vector. It checks ciphertext, tag,
  latency and busy, and counts each mechanism: automatic and manual modes, a user-loaded
  IS, stalls, the three kinds of π call, the CIS copy and the output phase.
* `tb_msg_parallel` runs 100 processors on one 1600-byte message and checks every block.

The fixed vectors were computed with an independent software model of the same
definitions.

Run a testbench with Verilator 5:

```
verilator --binary --timing --top-module tb_msg_processor -y rtl -y tb +libext+.sv \
    rtl/pi16_pkg.sv tb/pi16_ref_pkg.sv tb/tb_msg_processor.sv -o sim
./obj_dir/sim
```

## Files

| file | block |
|---|---|
| `rtl/pi16_pkg.sv` | word/tuple types, core control struct, constants, rotation amounts |
| `rtl/arx_adder4.sv`, `arx_rotator.sv`, `arx_xor_bank.sv`, `arx_add_bank.sv` | ARX datapath stages |
| `rtl/arx_core.sv`, `arx_ctrl.sv`, `arx_engine.sv` | ARX engine |
| `rtl/pf_buffer.sv`, `pf_ctrl.sv`, `pi_function.sv` | π-function core |
| `rtl/kpig.sv`, `alu16.sv`, `dbus_mux.sv`, `out_buffer.sv`, `mpcu.sv` | message processor blocks |
| `rtl/msg_processor.sv` | top level |
