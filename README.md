# A reconfigurable arbiter for a shared AMBA AHB bus

On an AHB bus several masters (processors, DMA engines) share one set of address and data lines
to the slaves (memories, peripherals). Only one master may drive the bus in a cycle, so each master
raises a request line and a central arbiter answers with a grant line. Which master gets the grant
decides how the bus behaves. A strict priority order is cheap and fast, but it can starve a
low-priority master. A rotating order is fair, but it can leave the bus idle while masters are
waiting.

This design holds three arbitration schemes side by side in one arbiter. A two-bit input,
`arbitration`, chooses the scheme while the system runs:

| `arbitration` | scheme                   | who is granted                                         |
|---------------|--------------------------|--------------------------------------------------------|
| `00`          | static fixed priority    | the lowest-numbered requesting master                  |
| `01`          | round robin              | the token holder, and only if it requests              |
| `10`          | modified round robin     | the first requesting master at or after the token      |
| `11`          | (not assigned)           | treated as `00` in this design                         |

The arbiter sits in a small AHB fabric. That fabric has an address and control multiplexer, a
write data multiplexer, a read data multiplexer and an address decoder, so the whole bus can be
simulated end to end. The default configuration has four masters and four slaves, with 32-bit
address and data.

The scheme structure follows the paper *Analysis of Different Arbitration Algorithms for AMBA AHB
Bus Protocol in SoC Design*. This covers the fixed priority chain, the ring counter with one AND
gate per master, and the ring counter enabling one priority encoder/decoder per master. The
cycle-level timing, the fabric around the arbiter and every width are this design's own choices.
They are listed below.

## Masters, bits and the token

Master *k* (counted from 1) owns bit *k*−1 of `hbusreq`, `hgrant` and `token`. For example, the
request pattern `1010` means that masters 2 and 4 are requesting.

Both round robin schemes use a **ring counter**. It is a ring of N flip-flops that holds a single
1, called the token. Reset puts the token at master 1. After that, every rising clock edge moves
the token to the next master (bit *i* to bit *i*+1, and the last bit back to bit 0). The token
moves whether or not anyone requests, so every master holds it once every N cycles.

## When a grant appears

All grants are combinational. They depend on the current requests, the current token and
`arbitration`. The clock edge only advances the token. A master that requests in a cycle
therefore learns in that same cycle whether it owns the bus. Cycle 1 is the first cycle after
reset, in which the token is at master 1. A request that is not granted must stay up. The
arbiter has no memory of requests.

## The three schemes

**Static fixed priority** (`fixed_priority_arbiter`). The arbiter asks, in order, whether master
1, 2, 3 or 4 requests, and grants the first master that does. If a higher-priority master keeps
requesting, the masters below it never get the bus. If nobody requests, nobody is granted (there
is no default master). This scheme has no state.

**Round robin** (`round_robin_arbiter`). `grant = token & req`. This gives one AND gate per
master, after the ring counter. If the token holder does not want the bus, the cycle is lost,
and the token goes on to the next master at the next edge. No master can starve, but a master
may wait up to N−1 cycles even on an idle bus.

**Modified round robin** (`mrr_arbiter`). This scheme uses the same ring counter. The token
enables one of N *priority logic* blocks (`priority_logic`). Each block is a priority encoder
followed by a decoder, and its input 0 has the highest priority. Block *k* gets the requests
rotated so that master *k*+1 is its input 0, followed by master *k*+2, and so on with wrap-around.
When block *k* is enabled, it therefore grants the first requesting master at or after the token
holder. Its outputs are rotated back to master numbering, and all blocks are ORed into the grant.
Only one block is enabled, so the OR simply carries its result. The bus is never idle while
someone requests, and the moving token still rotates who comes first.

### Worked example: masters 2 and 4 request together

Both masters raise their request in cycle 1. Each master drops its request after one granted
cycle.

| cycle | token | requests | round robin grant | modified round robin grant |
|-------|-------|----------|-------------------|----------------------------|
| 1     | M1    | 1010     | none              | M2                         |
| 2     | M2    | 1010 / 1000 | M2             | M4                         |
| 3     | M3    | 1000     | none              | –                          |
| 4     | M4    | 1000     | M4                | –                          |

The requests column shows the round robin value on the left and the modified round robin value on
the right where they differ. Master 4 is served in cycle 4 under round robin and in cycle 2 under
modified round robin. Under fixed priority, master 4 is served only in the cycle after master 2
lowers its request. These three results are checked by the testbenches, and they match the
latencies the paper reports.

When masters 1 and 4 both keep requesting (`1001`), the schemes behave as follows:
- Fixed priority grants master 1 in every cycle.
- Round robin grants master 1 and master 4 once each in every four cycles.
- Modified round robin grants one of them in every cycle.

## The bus around the arbiter (`ahb_bus`)

Transfers are pipelined in two phases:

- **Address phase** (the cycle of the grant): `ahb_addr_mux` passes the granted master's
  `haddr_m`/`hctrl_m` to the bus. `ahb_decoder` turns the top two address bits into a one-hot
  `hsel`. `hsel` is asserted only for NONSEQ and SEQ transfers. With no grant, the bus carries
  address 0 and an IDLE transfer.
- **Data phase** (the next cycle): `ahb_wdata_mux` registers the grant and passes that master's
  `hwdata_m` to `hwdata`. `ahb_rdata_mux` registers `hsel` and returns that slave's `hrdata_s`
  on `hrdata`, which all masters see.

Because the grant can move every cycle, one grant carries exactly one transfer. A master that
wants several transfers keeps requesting. The control bundle `ahb_ctrl_t` (in `ahb_arb_pkg`)
holds `htrans`, `hwrite` and `hsize`.

## What this design decides on its own

These points are not fixed by the source, and are choices made here:

- The grant is combinational, and the scheme select takes effect in the same cycle.
- Code `11` falls back to fixed priority.
- With no requests there is no grant (no default master).
- How the requests are ordered inside each priority logic block (rotated so that the token holder
  comes first).
- The token moves one step per clock in both round robin schemes, even after a grant. It does not
  jump to the master after the one just granted.
- Reset is asynchronous and active-low (`rst_n`), and puts the token at master 1.
- The entire fabric: the grant is used directly as the address phase select, the data phase
  follows one cycle later, slaves have zero wait states, and the decoder splits the address space
  into four equal regions.
- Address and data widths are 32 bits. The control signals come from common AHB usage.

The following AHB features are **not** built: burst transfers, split and retry transactions,
`HREADY` wait states, `HRESP`, `HMASTER`, bus locking, and a grant that is held until a transfer
completes. Masters and slaves are outside the design. Their signals are ports of `ahb_bus`.

## Size

Generic synthesis to 4-input LUTs (yosys `synth -lut 4`) gives the following sizes:

| block | LUTs | flip-flops |
|---|---|---|
| fixed priority | 3 | 0 |
| round robin | 4 | 4 |
| modified round robin | 29 | 4 |
| whole reconfigurable arbiter | 45 | 8 |

For the three schemes, the paper reports 4, 6 and 15 LUTs on a Spartan-3E. The ranking is the
same, but the mappings are not comparable one to one. Timing was not analysed.

## Files

| file | contents |
|---|---|
| `rtl/ahb_arb_pkg.sv` | scheme encoding `arb_sel_e`, `htrans_e`, `ahb_ctrl_t`, `MAX_MASTERS` = 16 |
| `rtl/ring_counter.sv` | one-hot token ring |
| `rtl/fixed_priority_arbiter.sv` | static fixed priority |
| `rtl/round_robin_arbiter.sv` | ring counter + AND gates |
| `rtl/priority_logic.sv` | priority encoder + decoder with enable |
| `rtl/mrr_arbiter.sv` | ring counter + N priority logic blocks + OR |
| `rtl/reconfig_arbiter.sv` | the three schemes and the `arbitration` select |
| `rtl/ahb_addr_mux.sv`, `ahb_wdata_mux.sv`, `ahb_rdata_mux.sv`, `ahb_decoder.sv` | bus fabric |
| `rtl/ahb_bus.sv` | top: arbiter + fabric |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

The arbiters carry assertions for the bus rules: at most one grant, only to a requester, exactly
one token, and matching tokens in both rings. `ahb_bus` also asserts that the write data owner is
the previous address phase owner.

## Simulating

Every testbench checks its block against an independent model in the testbench. It ends by
printing `TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/ahb_arb_pkg.sv tb/tb_ahb_bus.sv --top-module tb_ahb_bus
./obj_dir/Vtb_ahb_bus
```

Replace `tb_ahb_bus` with any other testbench name. The package must be listed first.

`tb_ahb_bus` runs the full bus at its default parameters. It models four masters with random
reads and writes and four 16-word memory slaves. It runs each scheme alone, then switches schemes
at random, including code `11`, and finally runs the worked example above under all three
schemes. Every cycle it checks the grant, the address phase, the write data and the read data.
It also counts each behaviour and fails if one never occurred. The behaviours counted are:
grants under every code, contention, a round robin token passing with no grant, a modified round
robin grant ahead of the token, fixed priority holding a master off, a scheme switch, reads,
writes, and every slave being addressed. The unit testbenches for the round robin arbiters and
the priority logic also run a 16-master instance.

## Changing it

- `N` / `N_MASTERS` sets the number of masters. It is meant for 1 to 16, which an
  elaboration-time assertion checks. Above 16 nothing breaks, but that range is outside the
  intended scope.
- `N_SLAVES` must be a power of two for the equal-region address map. The decoder uses the top
  `log2(N_SLAVES)` address bits.
- `ADDR_W` and `DATA_W` are free.
- To add a scheme, add a code to `arb_sel_e`, instantiate the new arbiter in `reconfig_arbiter`
  and add a case arm. The reference models in `tb_reconfig_arbiter` and `tb_ahb_bus` need the
  same arm.
