# Scan camouflaging: scan chains with look-alike dummy scan pins

Scan chains give a tester full control and observation of every flip-flop,
and an attacker who reverse engineers a chip uses them the same way: once the
scan order is known from the layout, camouflaged combinational logic can be
solved with an oracle-guided SAT attack. This design hides the scan order
without adding any logic to the scan path.

Some scan flip-flops get a **second scan input pin**. Both pins look the
same in the layout, but only one of them is contacted to the flip-flop's scan
multiplexer; the other sits on a dummy contact and goes nowhere. The extra pin
is wired to the output of a nearby flip-flop in another chain. Every
camouflaged flip-flop then shows two candidate scan predecessors. Which one is
real depends on which of two cell versions (pins swapped) was placed there. An
attacker who delayers the chip sees eroded contacts everywhere and cannot
tell a dummy contact from a damaged real one.

Functionally nothing changes. In capture mode every flip-flop still takes its
functional input. The scan path of each device is fixed by the cell versions
placed, so a tester that knows the layout's key generates patterns exactly as
before.

## Building blocks

| module | what it is |
|---|---|
| `scan_ff` | plain mux-D scan flip-flop: `q <= se ? si : d`, asynchronous active-low reset to 0 |
| `scan_camo_ff` | scan camouflaging flip-flop: a `scan_ff` with two scan pins `scan_in0`, `scan_in1`; parameter `REAL_PIN` selects the version (which pin is contacted) |
| `camo_chain_pair` | two scan chains of `CHAIN_LEN` flip-flops, camouflaged position by position |
| `secure_scan_top` | `NUM_CHAINS` chains, grouped into pairs of `camo_chain_pair` |

In `scan_camo_ff`, the pin that is not selected is an input port that drives
nothing. Lint tools report it as unused, and that is deliberate: it is the
dummy pin.

## How the camouflaged chain pair works

This is the part that takes some thought. Take two chains, 0 and 1, with
positions 0 (next to the scan-in pin) to `CHAIN_LEN-1` (driving scan-out).
Position 0 is a plain scan flip-flop. At every position `p` set in
`CAMO_MASK`, both flip-flops of the pair are `scan_camo_ff` cells, wired the
same way:

```
 chain 0:  ... q[0][p-1] ──┬──────────── scan_in0 ─ [cell 0,p]
                           └────────┐ ┌─ scan_in1 ─┘
                                    ╳
                           ┌────────┘ └─ scan_in1 ─┐
 chain 1:  ... q[1][p-1] ──┴──────────── scan_in0 ─ [cell 1,p]
```

`scan_in0` always comes from the same chain and `scan_in1` from the other
chain. The key bit `CAMO_KEY[p]` picks the version of **both** cells at that
position:

* `CAMO_KEY[p] = 0`: both cells use `scan_in0`, so the chains continue straight.
* `CAMO_KEY[p] = 1`: both cells use `scan_in1`, so from position `p` on, the two chains
  have exchanged their tails.

Both cells of a position always switch together, so the pair always forms two
complete chains. No flip-flop is fed twice and none is left out.

Write `k0..k3` for `CAMO_KEY[1..4]` in the five-flip-flop example. A bit
travelling down a chain changes chains once for every set key bit it passes.
This gives the two rules that the testbenches check.

**Loading.** Shift pattern `a` into scan-in 0 and `c` into scan-in 1,
`a[LEN-1]` first. Then

    X_p      = CAMO_KEY[1] ^ CAMO_KEY[2] ^ ... ^ CAMO_KEY[p]
    q[0][p]  = X_p ? c[p] : a[p]
    q[1][p]  = X_p ? a[p] : c[p]

For example, `q[0][2] = a2·¬(k0⊕k1) + c2·(k0⊕k1)`.

**Unloading.** Capture `b'` into chain 0 and `d'` into chain 1. Bit `j` then
appears on the scan-out pins after `LEN-1-j` shifts, as

    Y_j          = CAMO_KEY[j+1] ^ ... ^ CAMO_KEY[LEN-1]
    scan_out[0]  = Y_j ? d'[j] : b'[j]
    scan_out[1]  = Y_j ? b'[j] : d'[j]

In the two-chain example (chain 0 = flip-flops A..E, chain 1 = F..J), the
eight ways of exchanging the pairs B/G, C/H and D/I give the scan orders
below. Each one corresponds to exactly one key, with `CAMO_KEY[p] = X_p ^ X_(p-1)`:

| X1 X2 X3 | through scan-in 0 | through scan-in 1 |
|---|---|---|
| 000 | A-B-C-D-E | F-G-H-I-J |
| 100 | A-G-C-D-E | F-B-H-I-J |
| 010 | A-B-H-D-E | F-G-C-I-J |
| 110 | A-G-H-D-E | F-B-C-I-J |
| 001 | A-B-C-I-E | F-G-H-D-J |
| 101 | A-G-C-I-E | F-B-H-D-J |
| 011 | A-B-H-I-E | F-G-C-D-J |
| 111 | A-G-H-I-E | F-B-C-D-J |

An attacker who guesses the wrong key applies patterns to the wrong
flip-flops and reads responses from the wrong ones. That breaks the
assumption of full, known controllability that a SAT attack needs.
Recovering the key from scan-in/scan-out behaviour alone (a ScanSAT-style
attack) gives a circuit that is equivalent on the outside, but not the
individual connections.

## Top level: `secure_scan_top`

| port | width | meaning |
|---|---|---|
| `clk` | 1 | clock |
| `rst_n` | 1 | asynchronous active-low reset, clears every flip-flop |
| `scan_en` | 1 | 1 = shift, 0 = capture |
| `scan_in`, `scan_out` | `NUM_CHAINS` | scan pins, one per chain |
| `func_d` | `NUM_CHAINS x CHAIN_LEN` | functional input of each flip-flop, `[chain][position]`, from the combinational logic |
| `state_q` | `NUM_CHAINS x CHAIN_LEN` | output of each flip-flop, to the combinational logic |

The combinational logic the chains wrap is not part of this RTL, because its
function is the secret being protected. Connect your own logic between
`state_q` and `func_d`.

| parameter | default | meaning |
|---|---|---|
| `NUM_CHAINS` | 2 | number of chains; must be even (chains 2i and 2i+1 form pair i) |
| `CHAIN_LEN` | 5 | flip-flops per chain |
| `CAMO_MASK` | `5'b11110` per pair | camouflaged positions; bit 0 must be 0 |
| `CAMO_KEY` | `5'b01010` per pair | cell version per camouflaged position; bits outside the mask must be 0 |

The defaults are the two-chain, ten-flip-flop example with eight camouflaged
flip-flops. The default key (k0=1, k1=0, k2=1, k3=0) is an arbitrary choice,
because the key is meant to be a per-device secret. Elaboration stops with an
error if `NUM_CHAINS` is odd, if position 0 is masked, or if the key sets an
unmasked bit.

**Timing.** A load or unload takes `CHAIN_LEN` cycles with `scan_en = 1`, and
a capture takes one cycle. Camouflaging adds no cycles and no gates to the
scan path. At the physical level, its only cost is the extra routing to the
dummy pins. The expected cost is a small loss in maximum frequency (a few
percent at 50% camouflaged flip-flops) and almost no extra power.

**Larger designs.** A production flow would stitch, for example, ten chains and
camouflage about half of the flip-flops. To do that here, set `NUM_CHAINS = 10`,
set `CHAIN_LEN` to the longest chain, camouflage every other position in
`CAMO_MASK`, and choose a key per pair. Shorter chains can be padded.

## What this RTL does not capture, and its own choices

* **The cell layout is not modelled.** This includes the dummy contact and the
  need for both versions to have identical electrical and timing behaviour.
  The RTL models only the cell's logic: one contacted scan pin and one dead pin.
* **The dummy pin always goes to the same position in a partner chain.** The
  scheme only requires it to go to a "nearby" flip-flop. Fixing it to the
  same-position neighbour keeps both chains intact for every key.
  Placement-driven choices (any neighbour, chains of unequal length) are not
  supported.
* **Keys come in the pair-wise crossing form only.** A key bit exists only at
  positions where both cells of a pair are camouflaged.
* **The reset is this design's choice.** The asynchronous active-low reset to 0
  is not part of the scheme. With it, a reset followed by a scan-out returns
  all zeros whatever the key, so a reset-and-scan attack learns nothing about
  the key.
* **Scan compression is not included.** Scan compression makes key recovery
  harder still, but no decompressor or compactor is included.
* **Making each device differ is a flow step, not hardware.** Different devices
  can carry different keys by manufacturing a few layout variants. In this RTL
  that is simply a different `CAMO_KEY` per build.

## Verification

Every testbench checks itself and ends with a `TB_RESULT checks=N failures=M`
line. The expected values come from the load/unload equations above, or from
the scan-order table, and never from the stitching itself.

| testbench | what it covers |
|---|---|
| `tb_scan_ff` | random shift/capture cycles, asynchronous reset |
| `tb_scan_camo_ff` | both versions side by side; the dummy pin must have no effect |
| `tb_camo_chain_pair` | all 16 keys of the four-camouflaged pair plus four keys of a half-camouflaged pair; load, capture and unload checked bit by bit |
| `tb_table1_possibilities` | the eight scan orders of the table above, identified flip-flop by flip-flop |
| `tb_secure_scan_top` | the top at its default parameters, end to end. It counts shift, capture, crossed connections, straight camouflaged connections, reset-then-scan-out and functional cycles, and fails if any never occurred |
| `tb_iwls_workloads` | ten chains at the sizes of six benchmark circuits (98, 116, 190, 229, 818 and 1380 flip-flops) with about 50% camouflaged and a different key per pair |

`scan_check_harness` and `iwls_bench` in `tb/` are helper modules shared by
the last two testbenches.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
          --top-module tb_secure_scan_top tb/tb_secure_scan_top.sv
./obj_dir/Vtb_secure_scan_top
```

The same command works for every testbench; only the name changes. Each one
finishes in well under a second.
