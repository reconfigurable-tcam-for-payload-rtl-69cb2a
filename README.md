# Bank-selected TCAM for payload monitoring

A ternary content-addressable memory (TCAM) compares a search key with every
stored word at once, and each stored bit may be 0, 1 or "don't care". Built
from flip-flops, as on an FPGA, a TCAM is power hungry: every search clocks and
compares the whole table. This design splits the table into 2^n banks. It uses
n bits of the key to pick the one bank that can hold a match, and clocks and
compares only that bank. With the default n = 2, three quarters of the storage
stays idle on every search and every store. A small backup CAM catches the
words a full bank cannot take, so uneven bank use costs capacity only, not
correctness.

The TCAM serves a payload monitor, a string matcher for intrusion detection.
Payload bytes stream through a six-byte window that is searched every cycle. A
pattern longer than the window is split into a *quotient* (its first six bytes)
and a *remnant* (the rest). Each part is one TCAM word. A small sequential
engine reports the pattern when the remnant's hit comes exactly the right
number of bytes after the quotient's hit.

```
 byte_in ──► payload_window ──win_next──► rpe_tcam ──(hit, index)──► subpattern_seq_engine ──► pat_match
                                          ▲                                   ▲                   match_count
            upd_key / upd_care ───────────┘         cfg_* (pattern slots) ────┘
```

## The TCAM pipeline (`rpe_tcam`)

The TCAM has five stages:

| stage | module | what it does |
|---|---|---|
| 1 pre-classification | `tcam_preclass` | decodes the selector (the key's n **least significant** bits) into a one-hot bank select; routes a store to its bank or to the backup CAM |
| 2 clock gating | `tcam_clock_gate` | one gate per bank; only the selected bank gets a clock edge |
| 3a banks | `tcam_bank` | `BANK_DEPTH` words of flip-flops (value, care mask, valid bit) plus a register for the search key |
| 3b filtering | `tcam_filter_mux` | passes the selected bank's words and key on, so one bank-sized comparator serves all banks |
| 4 comparison | `tcam_compare` | one match line per word: valid, and equal in every cared-about bit |
| 5 priority encoding | `tcam_priority_encoder` | the lowest matching line wins |

Bank words store only `KEY_W - SEL_W` bits. The selector bits are implied by
the bank the word sits in.

### Timing

One operation per cycle. The priority order is update, then delete, then
search.

```
cycle        t                 t+1                       t+2
search   srch_valid,key    bank[sel] holds key;      res_valid, res_hit,
         decoder → gate    mux → compare → PE         res_addr, res_mls
update   upd_valid,key,    upd_done, upd_ok,
         care → bank/BUC   upd_addr, upd_to_buc
delete   del_valid,addr    del_done
         → bank/BUC clear
```

A search may start every cycle. A search in the cycle after an update already
sees the new word. The update takes one cycle, which the original design
requires. The two-cycle search latency is this implementation's choice.

### Clock gating in detail

Each bank's flip-flops sit on their own clock, `gclk = clk & en_latched`. The
enable goes through a latch that is transparent while `clk` is low, which is
the usual integrated clock-gate cell. A bare AND gate would glitch if the
enable changed while the clock was high. This latch is the only latch in the
design, and it is intentional. The enable for bank *b* is high in a cycle that
searches, stores into or deletes from bank *b*. The bank uses one clock edge
for all three jobs:

* edge with `wr = 1`: store into the lowest free slot;
* edge with `clr = 1`: invalidate one slot;
* any other edge: capture the search key.

So an unselected bank has no clock edges at all. The testbenches count the
edges of every gated clock to check this.

On an FPGA you would normally map the gate to a clock-enable or a
clock-buffer enable (for example BUFGCE). On an ASIC you would map it to the
library's ICG cell. Timing analysis must treat the gated clocks as derived
from `clk`.

Not everything is gated. The backup CAM is clocked on every search, and the
few pipeline and result registers run on the free clock. The 25 % activity
figure therefore holds for the bank storage, not for the whole TCAM.

### Where a stored word goes (backup CAM)

`tcam_preclass` decides, when `upd_valid` is high:

1. If all selector bits of `upd_care` are 1 and bank `upd_key[SEL_W-1:0]` has
   room, the word goes to that bank.
2. Otherwise, if the backup CAM has room, the word goes there. This happens
   when the bank is full, or when a selector bit is "don't care": such a word
   could match keys of several banks, so only the always-searched backup CAM
   can hold it.
3. Otherwise the store is refused (`upd_ok = 0`).

The backup CAM (`tcam_backup_cam`) stores full-width words and is searched with
every search. Its match lines line up with the selected bank's.

### Addresses and priority

| where | address |
|---|---|
| bank *b*, slot *s* | `b * BANK_DEPTH + s` |
| backup CAM slot *s* | `2^SEL_W * BANK_DEPTH + s` |

A store takes the lowest free slot of its bank, or of the backup CAM. A delete
(`del_valid`, `del_addr`) invalidates one slot, and the next store may reuse
it. Reset empties the whole table. Among the words that match, the searched
bank's lower slots win, and the backup CAM comes last. Priority is by slot.
It is neither store order nor consistent across the bank/backup boundary. A
pattern set whose words overlap must take this into account. Store the word
that must win first, into an empty table, while its bank still has room.

`res_mls` gives the raw match lines, with the selected bank's in the low
`BANK_DEPTH` bits and the backup CAM's above them. Use it when you need every
match rather than the winner.

## Divided patterns (`payload_window`, `subpattern_seq_engine`)

The window holds the last `WIN_CHARS` bytes, with the newest in bits `[7:0]`.
The TCAM selector therefore comes from the newest byte, and every stored
sub-pattern specifies that byte. `win_next` is the window that includes the byte
being offered, so the search uses it in the byte's own cycle.

A sub-pattern of k ≤ 6 characters is stored right-aligned. Its last character
goes in the low byte. Care bits are `8'hFF` for the k bytes that are
specified and 0 for the 6 − k older bytes. A character class is a care mask
with holes. For example, the digits 0–3 are `value 8'h30, care 8'hFC`. If such
a hole falls in the selector bits, the word goes to the backup CAM.

Each of the `NUM_PATTERNS` engine slots holds `(q_idx, r_idx, r_len)`:

* a pattern of at most 6 characters is one TCAM word. Set `q_idx` to its
  address and `r_len = 0`;
* a pattern of 7 to 12 characters is the quotient (its first 6 characters) and
  the remnant (the other `r_len` characters, right-aligned). Set `q_idx` and
  `r_idx` to their two addresses.

The addresses come back on `upd_addr` one cycle after each store. Each slot
runs a three-state machine:

* **s0 (idle)**:
  * goes to s1 when `q_idx` arrives;
  * goes straight to s2 when `q_idx` arrives and `r_len = 0`.
* **s1 (quotient seen)**: counts `r_len` search results.
  * On the last one, goes to s2 if `r_idx` arrives.
  * Starts a new wait if `q_idx` arrives instead.
  * Otherwise returns to s0.
* **s2 (found)**:
  * fires `pat_match[slot]` for one cycle;
  * stays in s2 until the next byte;
  * then goes to s0 (or s1/s2 on a fresh quotient).

`match_count` counts all pulses and wraps at 2^16.

Example, "diatonic": store `"diaton"` (all six bytes cared about) and `"ic"`
(two bytes, four don't-care). Then configure a slot with
`q_idx = addr("diaton")`, `r_idx = addr("ic")`, `r_len = 2`.

### Limits of the sequential scheme

* The TCAM reports **one** index per byte. If two stored sub-patterns match
  the same window, only the higher-priority one reaches the engine. For
  example, "iambic" and the remnant "????ic" both match at the end of
  "iambic". Store the word you need first, or use `res_mls`.
* While a slot waits in s1, a second quotient occurrence that overlaps the
  pending one is ignored. Patterns that overlap themselves (such as "abcabcabc")
  can be missed.
* At most 12 characters per pattern (a window of quotient plus a window of
  remnant). Longer patterns would need more stages.
* After reset the window holds zero bytes. A sub-pattern that cares about
  fewer than 6 bytes can match as soon as its own bytes have arrived.

## Top level (`payload_monitor_top`)

The top level shares one TCAM port between the byte stream and updates. In a
cycle with `upd_valid` or `del_valid` high, `byte_ready` is low and the byte
waits.

| port | dir | meaning |
|---|---|---|
| `byte_valid`, `byte_in`, `byte_ready` | in/in/out | payload stream, one byte per cycle |
| `upd_valid`, `upd_key`, `upd_care` | in | store one ternary sub-pattern (48 bits each) |
| `upd_done`, `upd_ok`, `upd_addr`, `upd_to_buc` | out | answer, one cycle later; `upd_addr` is the sub-pattern index |
| `del_valid`, `del_addr`, `del_done` | in/in/out | remove the sub-pattern at one index; done one cycle later |
| `cfg_valid`, `cfg_slot`, `cfg_enable`, `cfg_q_idx`, `cfg_r_idx`, `cfg_r_len` | in | load one engine slot (also resets that slot's state) |
| `tcam_hit`, `tcam_addr`, `tcam_mls` | out | TCAM result, two cycles after the byte; `tcam_mls` are the match lines |
| `pat_match`, `match_count` | out | one pulse per found pattern, in the cycle after the second rising edge that follows the byte's acceptance |

Reset is asynchronous and active low. It empties the TCAM, the window and the
engine.

## Parameters

| parameter | default | where it comes from |
|---|---|---|
| `SEL_W` (n) | 2 → 4 banks | the original design's four banks |
| `WIN_CHARS` | 6 → `KEY_W` = 48 | the original design's six-character text window |
| `BANK_DEPTH` | 16 | chosen here |
| `BUC_DEPTH` | 8 | chosen here |
| `NUM_PATTERNS` | 8 | chosen here |
| `FILTER_MUX` (`rpe_tcam` only) | 1 | 1: one comparator behind the filtering multiplexer; 0: one comparator per bank, without the multiplexer (the original's other arrangement). Results are identical. |

`rpe_tcam` can be used on its own with any `KEY_W > SEL_W`. The default build
has about 7,300 flip-flop bits, nearly all of them TCAM words.

## How this design departs from the original

* The original gives the TCAM's stages and the backup CAM's purpose, but not
  the word width, depth, address map, priority, search latency or the rules
  for routing a store. All of these are chosen here, as described above.
* In the original drawings the key's `KEY_W - n` bits go straight to the
  comparator. Here they pass through a key register in the selected bank,
  which is clocked only when that bank is searched. The function is the same,
  and an unselected bank's search path never toggles.
* The original also compares its string matcher with an ASCII-based state
  machine and with Aho-Corasick. Those are only comparison points and are not
  built.
* Throughput is one byte per clock, 8 bits × f_clk. The original's range of
  3 to 10 Gbps would need a clock of 375 MHz to 1.25 GHz.
* The original describes the quotient/remnant split and a three-state
  sequential matcher. The counter, the exact transitions and the use of the
  TCAM address as the sub-pattern index are this design's.
* The field-extraction state machines and the NFA token unit that the
  original mentions are not built. Their function is not specified in enough
  detail.
* The original asks for patterns that can be "partially or entirely
  changed" but gives no mechanism. A one-cycle delete by address gives the
  partial change and reset gives the complete one; both are this design's.

## Files

`rtl/`: `tcam_pkg` (shared constants and the engine's state type),
`tcam_preclass`, `tcam_clock_gate`, `tcam_bank`, `tcam_filter_mux`,
`tcam_compare`, `tcam_priority_encoder`, `tcam_backup_cam`, `rpe_tcam`,
`payload_window`, `subpattern_seq_engine`, `payload_monitor_top`.

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed time if it
hangs.

* `tb_rpe_tcam` runs 3000 random cycles against a reference model. It covers
  overflow, refusal, deletes with slot reuse, wildcard selectors and
  clock-gate isolation. An instance
  with `FILTER_MUX = 0` runs alongside and must agree every cycle.
* `tb_rpe_tcam_bank_sweep` explores the number of banks. It builds three
  TCAMs with 2, 4 and 8 banks and the same total capacity, then gives them the
  same stores and 600 searches. Each must return correct answers, and all
  three find the same hits. Each search must clock exactly one bank, so bank
  clock activity falls to 1/B: 50 %, 25 % and 12.5 %.
* `tb_payload_monitor_top` runs the whole monitor at default sizes. It streams
  about 2,900 bytes with planted patterns, including "diatonic", which is
  split into two parts. It checks every `pat_match` pulse cycle by cycle
  against a plain string search. It also requires a stall, a bank overflow, a
  wildcard store and searches in all four banks. It also deletes "apps"
  partway through and checks that it is no longer reported. It checks that no cycle
  clocks more than one bank. Bank clock activity comes out at about 24 % of
  what an ungated table would see.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/tcam_pkg.sv \
          tb/tb_payload_monitor_top.sv --top-module tb_payload_monitor_top
./obj_dir/Vtb_payload_monitor_top
```

Replace the testbench name to run another one. `-Irtl` lets Verilator find
each module by its file name. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/tcam_pkg.sv rtl/<module>.sv`.

Testbenches start with `rst_n = 1` and drop it shortly after time 0. An
asynchronous reset that is already low at time 0 gives the simulator no edge,
and the flip-flops would keep their random start values.
