# Token-managed admission control for a best-effort on-chip interconnect

A best-effort interconnect delivers every transaction, but it does nothing to
stop its initiators from flooding it. When several processors and DMA engines
share one memory target, long read bursts fill the response path. The
back-pressure then reaches the command path and the whole fabric saturates.
No initiator can count on bandwidth or latency any longer.

This design fixes that at the fabric's ingress, without changing the fabric.
A small synchronous token manager owns a fixed number of tokens: three for
five initiators in the reference configuration. An initiator may put a
transaction into the fabric only while it holds a token, and it gives the
token back when the transaction completes. So at most three transactions are
ever in flight, and the fabric stays out of congestion. The manager hands out
free tokens by priority, and by round robin among initiators of equal
priority. An initiator with a quality-of-service (QoS) requirement is
programmed with the highest priority. Under full load it then gets about
1/(number of tokens) of the target bandwidth. If it may hold two tokens, it
gets about two thirds. The guarantee is soft: latency still depends on burst
length and on the target.

## Structure

```
            initiator 0 ... initiator N-1   (AXI masters)
                 |              |
         tmac_axi_ingress  tmac_axi_ingress      one gate per initiator
                 |  req/assign/rtn  |
                 +------> tmac <----+            token manager
                 |              |
            fabric ingress ports (m_*)           GALS fabric + target, not included
```

`tmac_system` (top) holds one `tmac_axi_ingress` per initiator and one `tmac`.
Inside `tmac`:

| module | role |
|---|---|
| `tmac_prio_mem` | priority memory: a priority level and a token quota per initiator, programmable |
| `tmac_token_state` | tokens held per initiator, who may be granted this cycle, the `grant` register |
| `tmac_token_counter` | pool of free tokens |
| `tmac_rr_prio_arbiter` | picks one initiator per cycle; its scan memory holds the round-robin state |
| `tmac_pkg` | AXI channel payload structs and widths |

## The token handshake

Each initiator has three signals with the token manager:

* `req`: a level. The initiator wants one more token.
* `grant`: a level. It is high while the initiator holds at least one token.
  An extra one-cycle strobe, `assign`, marks each token handed over. An
  initiator with a quota of two needs it to see its second token arrive.
* `rtn`: a one-cycle pulse for each token given back.

Timing, one clock domain:

```
cycle       t        t+1         ...   u          u+1
req         1        1 (ignored)  0
assign      0        1            0
grant       0        1            1    1          0
rtn                                    1
```

* If a token is free in cycle t, the arbiter picks a requester in that same
  cycle. `grant` and `assign` are registered, so the initiator sees them in
  cycle t+1.
* In cycle t+1 the manager ignores `req` from the initiator it just served,
  because a registered initiator cannot drop its request before then.
* Only one token is assigned per clock cycle.
* A token returned in a cycle can be assigned again in that same cycle. So an
  initiator may pulse `rtn` and hold `req` together, and get the next token
  back to back.

## Arbitration: priority first, then round robin

In each cycle with a free token, the arbiter takes the eligible initiators
and steps through three stages:

1. An initiator is eligible if its request is up, it holds fewer tokens than
   its quota, and it was not just served.
2. The arbiter finds the highest priority level among the eligible
   initiators.
3. It searches that level round robin. The scan memory keeps, for each
   priority level, the index last granted at that level. The search starts
   just after that index and wraps around.

Only the winning level's entry is updated. As a result, a high-priority
initiator taking many tokens does not disturb the rotation among the
best-effort initiators. A quota of 0 shuts an initiator out completely.

How the tokens are set decides the bandwidth shares:

* With T tokens in total, and the QoS initiator allowed one at a time, the
  QoS initiator gets about 1/T of the completed transactions under
  saturation. The others share the rest.
* With a quota of 2 it holds two of the three tokens and gets up to 2/3. In
  simulation this comes out at 0.66. One token slips away when it is freed in
  the cycle right after an assignment.

## The ingress gate

The token manager could be wired to initiators that drive `req` and `rtn`
themselves. `tmac_axi_ingress` lets plain AXI masters be used instead:

* If a read (AR) or write (AW) address command is waiting and has no token,
  the gate raises `req`. The command's `valid` and `ready` are not passed on.
* A token that arrives goes to the waiting read first, then to the waiting
  write. That channel then passes exactly one command.
* Write data (W) is never held back. It may travel while the write command
  waits for its token.
* The token goes back one cycle after the last read beat is accepted, or
  one cycle after the write response (B) is accepted.
* If a read and a write complete in the same cycle, the two returns go out
  on consecutive cycles.
* `rd_out_o` and `wr_out_o` count the transactions in flight.

The gate puts no register on any AXI path. The forwarded `valid` signals
depend only on the gate's registers and the initiator's `valid`, never on
`ready`.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_INIT` | 5 | initiators (evaluated configuration; the manager is meant to scale to about 20) |
| `NUM_TOKENS` | 3 | tokens in the pool |
| `PRIO_W` | 2 | priority bits (4 levels) |
| `QUOTA_W` | 2 | quota bits (quota up to 3) |
| `RESET_QUOTA` | 1 | quota of every initiator after reset (`tmac`) |
| `OUT_W` | 4 | width of the in-flight counters in the gate |

The AXI payload widths are set in `tmac_pkg`:

* 64-bit data
* 32-bit address
* 4-bit ID
* 4-bit burst length, so bursts of up to 16 beats fit

Configuration goes through one write port: `cfg_we`, `cfg_idx`, `cfg_prio`
and `cfg_quota`. After reset every initiator has priority 0 and quota 1. That
is a plain round-robin admission control with three tokens.

Reset is asynchronous and active low (`rst_n`).

## Where this RTL departs from, or adds to, the described scheme

Taken from the scheme as described:

* request/grant/return
* a fixed token pool
* priority first, then round robin, with a scan memory
* one token per cycle
* back-to-back return and request
* up to two tokens for one initiator
* write data not gated

This implementation's own choices:

* the `assign` strobe, and ignoring a request for one cycle after a grant
* one round-robin pointer per priority level
* the quota field in the priority memory, and the configuration port
* the priority width and the reset values
* the whole AXI ingress gate, and its completion events (last read beat,
  write response)
* the read-before-write rule for a token that arrives while both commands
  are waiting
* the AXI ID, address and length widths

Not included:

* The self-timed GALS fabric.
* The initiators (processor cores, DMA).
* The memory controller target.
* Dynamic reconfiguration of quotas driven by an algorithm. The scheme
  mentions this only as a possible extension.
* Clock-domain crossing. The fabric and target run on other clocks (the
  target at 133 MHz against 100 MHz for the manager), and that belongs to
  the fabric.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`:

* `tb_tmac_prio_mem`: reset contents, and random writes against a shadow copy.
* `tb_tmac_token_counter`: random takes and returns against a reference
  count. It must see the pool run empty and a back-to-back return and take.
* `tb_tmac_rr_prio_arbiter`: random eligibility and priorities against a
  reference arbiter with its own pointers.
* `tb_tmac_token_state`: held counts, eligibility, grant and assign against
  a reference. It covers two tokens held, the one-cycle mask and
  back-to-back.
* `tb_tmac`: a directed sequence first, with two high-priority and three
  low-priority initiators all requesting at once. It expects tokens to go
  2, 4, 0, each one cycle after the request, then 1 and 3 to wait, then a
  back-to-back regrant. After that come random traffic with token
  conservation checked and even round-robin shares, a QoS share of about
  1/3, and a share above 1/2 with a quota of 2.
* `tb_tmac_axi_ingress`: directed checks of the gating, the return timing,
  write data passing, read-before-write, and a double return.
* `tb_tmac_system`: the top at its default size. It uses five saturating AXI
  read initiators and a behavioural fabric-plus-target model,
  `tb_fabric_target`. The target serves one 64-bit beat per cycle from an
  unbounded queue. The test runs 4-beat reads, 16-beat reads, reads with a
  quota of 2 for the QoS initiator, and then writes. It checks:
  * every data beat and `last` flag
  * never more than three transactions in the fabric
  * the QoS share
  * QoS latency below best-effort latency
  * that a token stall, a priority grant, round robin, a back-to-back
    return/request, two outstanding commands and a token return on a write
    response each happened
* `tb_tmac_scale`: the token manager with 10, 15 and 20 initiators and three
  tokens, and with five initiators and four tokens. The QoS share follows
  1/T (0.34 with three tokens, 0.26 with four). Best-effort initiators are
  served evenly.
* `tb_tmac_load_sweep`: the top at its default size with random 4-beat reads
  at five load levels, from light load to saturation. It reports target
  utilisation, the QoS share and the mean latencies. At light load the QoS
  initiator gets exactly what it asks for, with the same latency as best
  effort (13.6 cycles). Utilisation rises to 0.84. At saturation, QoS latency
  is 22 cycles against 39 for best effort.

Typical results of `tb_tmac_system` at the defaults:

| traffic | QoS share | mean latency, QoS | mean latency, best effort |
|---|---|---|---|
| 4-beat reads, 1 token | 0.333 | 22 cycles | 39 cycles |
| 16-beat reads, 1 token | 0.332 | 89 cycles | 137 cycles |
| 4-beat reads, 2 tokens | 0.663 | 16 cycles | 68 cycles |

The latencies are those of the simple target model, not of a real memory
controller.

To run a testbench with Verilator 5, for example the system test:

```
verilator --binary --timing --assert -y rtl -y tb rtl/tmac_pkg.sv \
    rtl/tmac_system.sv tb/tb_tmac_system.sv --top-module tb_tmac_system
./obj_dir/Vtb_tmac_system
```

For the others, replace the module and testbench names. The package file
always comes first. The RTL carries concurrent assertions for:

* no take from an empty pool
* no excess returns
* only eligible initiators selected
* returns only from holders
* AXI valid stays stable

Build with `--assert` to enable them.
