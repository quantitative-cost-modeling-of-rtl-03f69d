# Error-protected circuit-switched Network-on-Chip

Wires on a chip grow less reliable as feature sizes shrink. Crosstalk and
noise can flip bits while a word travels between cores. This design
protects every word that crosses a Network-on-Chip (NoC) end to end, inside
the network interfaces (NIs). The switches and links need no protection of
their own.

Protection has two independent parts, each chosen by a parameter:

* **Error coding** (`CODE`). The sending NI adds check bits to every data
  word. The receiving NI then detects errors, and for some codes corrects
  them. The codes are parity, Hamming and enhanced Hamming.
* **Error handling** (`EH`). This decides what happens to a word whose
  error the code could detect but not correct:
  * it is accepted (send and forget);
  * it is sent again under send and wait, one word in flight;
  * it is sent again under send and wait with a sliding window, many words
    in flight and go-back-N retransmission.

A switch makes a circuit for each message. Set-up can fail when a switch
port is busy, so the NI also handles refused connections and retries them.

Around the network sits an emulation top level (`noc_emulator`). It puts a
traffic source and a traffic sink at every NI, plus a cycle counter. Error
masks on every link channel let a test inject bit errors at chosen places.
The time and latency of a transfer can then be measured for every
combination of code and error handling.

All RTL is synthesizable SystemVerilog in `rtl/`. Self-checking testbenches
are in `tb/`.

## Structure

```
noc_emulator                       top: NoC + sources/sinks + cycle counter
├── noc_mesh                       X_DIM x Y_DIM mesh, one NI per switch
│   ├── ni_send                    NI, sending part
│   │   ├── ni_send_control        circuit set-up / data / tear-down FSM
│   │   ├── ni_send_cfh            connection-failure handling (retry timer)
│   │   ├── ni_send_eh             error handling: S&F, S&W, S&W SWE
│   │   ├── ni_send_buffer         send buffer (S&W SWE only)
│   │   ├── ni_send_mux            new word or retransmitted word (not with S&F)
│   │   └── edc_encoder            error coding
│   ├── ni_recv                    NI, receiving part
│   │   ├── edc_decoder            error detection / correction
│   │   ├── ni_recv_eh             ACK / NACK / drop decision
│   │   └── ni_recv_control        connection state, delivery to the user
│   ├── noc_router                 5-port circuit switch, XY routing
│   └── noc_link                   one register stage each way + error mask
├── traffic_source                 one per NI
└── traffic_sink                   one per NI
noc_pkg                            shared enums, port numbers, code geometry
```

Blocks that exist only for one protocol are left out when another is
chosen. The send buffer exists only with the sliding window. The mux is
absent with send and forget. With send and forget, error handling holds no
logic at all.

## Error codes

The parameter is `CODE` (`noc_pkg::code_e`). The data width is `N`. A code
word is stored as `{overall parity, Hamming check bits, data}`, so the data
bits sit unchanged in the low `N` bits.

| `CODE`        | Code                | Extra bits | Receiver does |
|---------------|---------------------|------------|---------------|
| `CODE_NONE`   | none                | 0          | nothing |
| `CODE_SED`    | parity              | 1          | detects 1 error |
| `CODE_SEC`    | Hamming             | r          | corrects 1 error |
| `CODE_DED`    | Hamming             | r          | detects 1 or 2 errors |
| `CODE_SECDED` | enhanced Hamming    | r+1        | corrects 1 error, detects 2 |
| `CODE_TED`    | enhanced Hamming    | r+1        | detects 1 to 3 errors |

`r` is the smallest value with 2^r ≥ N + r + 1. That is 5 for N = 16, 6 for
N = 32, 7 for N = 64 and 9 for N = 255. Check bit i is the XOR of the data
bits whose position in the classic interleaved Hamming numbering has bit i
set. Data bit j takes the j-th position ≥ 3 that is not a power of two
(`ham_pos`). The enhanced codes add the parity of the whole Hamming word.
DED and TED use the same code words as SEC and SEC/DED. They only decode
differently: they never correct, so they can detect more.

A decoder reports three things:
* `err_detect`: anything was wrong.
* `err_corr`: a single error was repaired.
* `err_uncorr`: the word is unusable. This flag drives error handling.

Under SEC, a syndrome that points past the end of the word cannot come
from a single error. It is also reported as uncorrectable.

## Flits and links

Every link carries two channels, each behind one register:

* **forward** `{fkind, seq, word}`. `fkind` is IDLE, SETUP, DATA or TEAR.
  `word` is the `CW`-bit code word. A SETUP word carries the destination
  address `{y, x}` in its low bits.
* **backward** `{bkind, seq}`. `bkind` is IDLE, ACK, NACK, CONN_OK or
  CONN_FAIL.

The sequence number `seq` and the flit kinds travel beside the code word
and are not covered by the code. A link's error mask `inj_mask` is XORed
only into DATA code words. Injected errors therefore always hit protected
data, never control.

Switches have no registers, so each link adds one cycle in each direction.
In the default two-switch network a word crosses three links: NI → switch
0 → switch 1 → NI. Its acknowledge crosses the same three links back. From
sending a word to seeing its acknowledge takes **6 cycles**.

## Circuit switching

`ni_send_control` handles one message at a time. A message is a run of
words on the user's valid/ready stream, ended by `fu_last`.

1. **SETUP.** A SETUP flit goes out with the destination. Each switch
   routes it with XY routing: first along x, then along y. Port 0 is local,
   1 is north (y−1), 2 is east (x+1), 3 is south (y+1), 4 is west (x−1).
   * If the output port is free, the switch ties the input to it and passes
     the flit on in the same cycle.
   * If the port is busy, or a lower-numbered input claims it in that
     cycle, the switch answers CONN_FAIL.
2. **WAIT.**
   * The receiving NI answers CONN_OK and the sender moves to DATA.
   * On CONN_FAIL, every switch the answer passes back through releases its
     part of the path. `ni_send_cfh` then waits `RETRY_DELAY` cycles before
     the next attempt (BACKOFF) and counts the failures.
3. **DATA.** Words go out while error handling allows it.
4. **DRAIN.** After the last word, the sender waits until every word is
   acknowledged.
5. **TEAR.** A TEAR flit releases every switch on the path.

## Error handling

Parameter `EH` (`noc_pkg::eh_e`):

**Send and forget (`EH_SF`).** Words are sent back to back, and nothing is
acknowledged. The receiver delivers every word. A word with an
uncorrectable error is delivered with `fu_err` set.

**Send and wait (`EH_SW`).** After a word is sent, the next one may not go
until an ACK with the same `seq` returns. The word is kept in a register
inside `ni_send_eh`.
* A NACK makes the word go again at once.
* So does `TTA` cycles without an answer (time-out).

The ACK frees the sender in the cycle it arrives. Over three links that
gives one word every 6 cycles.

**Send and wait with sliding window (`EH_SWE`).** Up to `WIN` words may be
unacknowledged. They are kept in the send buffer, indexed by the low bits
of their sequence number. Sequence numbers are `log2(WIN)+1` bits wide, so
a full window is never ambiguous.

The receiver accepts only the next word it expects. It answers as follows:

| Word received | Receiver answers |
|---|---|
| expected word, good | ACK, and delivers the word |
| expected word, uncorrectable error | NACK |
| any other word (those behind a bad one, duplicates) | nothing; the word is dropped |

Error handling in the sender:
* Each ACK moves the window base on.
* A NACK for the base word starts a go-back-N retransmission. So does
  `TTA` cycles without progress. The base word and every word after it are
  read from the buffer and sent again, one per cycle.
* `ni_send_mux` gives retransmission priority over new words.

With `WIN` ≥ 6 the window covers the round trip and the link runs at one
word per cycle. A smaller window stalls the sender. For example, WIN = 4
sends 4 words every 6 cycles.

Correctable errors (SEC, SEC/DED) are repaired in the receiver and cost no
time. Only uncorrectable ones lead to a resend.

## Emulation top level

`noc_emulator` (defaults: 2 × 1 mesh, N = 32, SED, sliding window of 32
words) wires the NoC to one `traffic_source` and one `traffic_sink` per NI.
All of the following are plain ports:
* commands (`src_start`, `src_len`, `src_dest`, `src_gap`);
* the error masks (`inj_ni[node]` for NI → switch, `inj_out[node][port]`
  for every switch output);
* the results (sink counts, latency sum and maximum, and NI and switch
  counters).

A testbench or controller drives them.

* **Source.** A source sends one message of `src_len` words. Each word is
  `{index, time stamp}`; the stamp is 16 bits for N ≥ 32, else N/2 bits.
  * `src_gap = 0`: words are produced as fast as the NI takes them.
  * `src_gap = G`: word i is generated G·i cycles after the start and then
    waits for the NI. The measured latency then includes queueing in front
    of a slow protocol.
* **Sink.** A sink checks that indices count up within each message and
  counts flagged words. It adds up `now − stamp` (latency) per word.
  Average latency is `snk_lat_sum / snk_words`. Under send and forget a
  corrupted word may carry a wrong index or stamp, so the order count and
  the latency then include some noise from flagged words.

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `X_DIM`, `Y_DIM` | 2, 1 | mesh size (one NI per switch) |
| `N` | 32 | data word length (tested from 16 to 255) |
| `CODE` | `CODE_SED` | error code |
| `EH` | `EH_SWE` | error handling |
| `WIN` | 32 | sliding window size, words (any value ≥ 2; buffer rounded up to a power of two) |
| `TTA` | 64 | time-out for a missing acknowledge, cycles |
| `RETRY_DELAY` | 8 | wait after a refused set-up, cycles |

Interface and switch status counters are 16 bits wide and wrap.

## Measured behaviour

These are the cycle counts the testbenches check or print, for the
two-switch network with 32-bit words.

| Case | Result |
|---|---|
| S&W SWE, 400 words, no errors | 420 cycles, 1 word per cycle plus set-up and drain |
| S&W, 100 words | 615 cycles, 6 cycles per word |
| S&W SWE with WIN = 4, 400 words | 618 cycles |
| SEC with single-bit errors | all corrected, no resends |
| SECDED, DED and TED under double-bit errors | all detected and resent |

The last test (`tb_error_rate_sweep`) offers one word every 2 cycles, 300
words in all, with SED. Uncorrectable errors hit one link with the
probability shown. Average latency, in cycles:

| error probability | 0 % | 0.1 % | 1 % | 3 % | 10 % |
|---|---|---|---|---|---|
| send and wait | 609 | 612 | 613 | 629 | 732 |
| sliding window, 32 | 3 | 3 | 3 | 4 | 21 |

Send and wait cannot keep up with the offered load. Its latency is mostly
queueing, so it is large and nearly flat. The window protocol follows the
source until errors become frequent; then its latency climbs steeply. The
absolute numbers depend on message length and offered load, which are free
choices here. They are not meant to match any particular published curve.

## Where this design makes its own choices

The source material names most blocks and says what they do. It leaves the
following open; each was decided here:

* **Switching and routing.** Circuit switching with XY routing in a 2-D
  mesh.
* **Formats and timing.** The flit format, sequence numbers, link register
  stages and port numbering.
* **Control and timers.** The set-up/fail/retry state machine, and the
  time-out and retry delay values.
* **Go-back-N.** The receiver accepts only the next expected word, and the
  sender resends from the window base.
* **Time to acknowledge.** Here this is only the resend time-out (`TTA`,
  64 cycles by default). Whether the window stalls depends on the actual
  round trip (6 cycles here), not on `TTA`.
* **Test harness.** The traffic word format, the injection interval, and
  the error-injection masks.
* **Check-bit count.** The Hamming code uses the classic count of check
  bits (6 for 32-bit words, 7 with the overall parity). A tabulated count
  one bit larger per row was judged an overcount. Words of 27–57 bits still
  fit the same r = 6.
* **Parity does not correct.** One passage suggests that parity (SED)
  corrects errors. Here parity only detects, which matches its definition
  as a single-error-detecting code.

The silicon-area cost models are not part of the RTL: the per-block area
formulas for a 90 nm cell library. Nor are the soft-core processor and the
PC that drive a hardware emulator. The design's ports stand where the
processor would connect.

## Simulating

Any testbench builds with Verilator 5. Run from the repository root:

```
verilator --binary --timing --assert -y rtl -y tb rtl/noc_pkg.sv \
          tb/tb_noc_emulator.sv --top-module tb_noc_emulator
./obj_dir/Vtb_noc_emulator
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`.
Each has a watchdog that fails the run if it hangs.

**Per-block testbenches** (`tb_<module>`) compare each block with values
worked out in the testbench itself:
* the code words are rebuilt from the Hamming definition;
* the window and time-out behaviour is modelled cycle by cycle.

**Word-length sweep.** `tb_edc_word_length` runs every code at 16, 32, 64,
128 and 255 bits.

**End-to-end.** `tb_noc_emulator` runs eleven end-to-end cases through
`emu_harness`. Each one makes a mechanism happen and counts it:
* refused and retried set-ups;
* NACK and time-out resends;
* window stalls;
* corrections;
* detections under every code;
* errors accepted under send and forget.

**Full size.** `tb_noc_emulator_full` runs the top at its default
parameters: two crossing messages of 1000 and 500 words at a 1 % error
rate.

**Error-rate sweep.** `tb_error_rate_sweep` produces the latency table
above.

To try a different configuration, change the parameters on `noc_emulator`
(or on `emu_harness` in a testbench). The mesh grows with `X_DIM` and
`Y_DIM`. `tb_noc_mesh` shows a 2 × 2 mesh with contending connections.
