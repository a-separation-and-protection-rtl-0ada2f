# Separation kernel for FPGA on-chip memory

On-chip memory in an FPGA (Block RAM, distributed RAM) normally has a flat
address space and no protection: any IP core wired to a RAM port can read or
overwrite every word, including keys and other sensitive data that other IP
cores left there. Encrypting on-chip memory is too slow and too large. This
design instead puts a small **reference monitor** in front of each Block RAM.
Every access carries the identity of the IP core that makes it, and the monitor
lets it through only if a fixed security policy allows that core to perform
that action on that word. The RAM has no other way in.

The monitors together form a **separation kernel**. Memory is split into
*kernel blocks* (one Block RAM plus its monitor). Each IP core sees the whole
memory as if it were its own, but the policy decides which words it may touch.
Cores that do not share words are isolated from each other. Cores that should
share data can do so only through words the policy gives to both.

The cost is two extra clock cycles per access: three instead of one. The
monitor is pipelined, so it still accepts one access per cycle per kernel block
and bursts run at full rate. The monitor needs no Block RAM of its own.

## Security policy: MID, PID and action

A memory access is the tuple *(MID, action, data, address)*:

- **MID (module ID):** a 4-bit number that identifies the IP core making the
  request. Each core is wired to its own fixed MID.
- **PID (privilege ID):** a 2-bit trust level. A look-up table maps each MID to
  a PID. A MID that is not in the table is unknown, and all its accesses are
  denied.
- **Action:** read (0) or write (1).

Each kernel block has a permission table with one record per PID:
`{rd, wr, lo, hi}`. The PID may read if `rd` is set and may write if `wr` is
set, but only for word addresses `lo..hi` of that block's RAM. An access is
legal only when all of these checks pass.

The default tables in `sk_pkg` are one example policy. It uses the same
permissions in every block:

| MID | PID | may read/write |
|-----|-----|----------------|
| 1   | 3   | every word (trusted core) |
| 3   | 1   | words 0x000–0x1FF of each RAM |
| 7   | 2   | words 0x200–0x3FF of each RAM |
| any other (e.g. 0xF) | – | nothing |

PIDs 1 and 2 get windows that do not overlap, so the two cores are separated.
PID 3 overlaps both, which shows how a trusted core can share memory with
them. To set a real policy, override the `LUT` and `POLICY` parameters of
`sep_kernel_top`. Both are fixed when the bitstream is built, so the policy
costs LUTs only.

## Kernel blocks and the address map

`sep_kernel_top` has `N_BLK = 4` kernel blocks. Each block has `N_IP = 2` IP
ports, which gives 8 IP ports in all. Each Block RAM holds 1024 words of 32
bits (one 36 Kb FPGA Block RAM). IP addresses are 12 bits wide:

```
addr[11:10]  kernel block (which RAM, which monitor owns it)
addr[9:0]    word inside that RAM
```

An IP core is connected to one monitor, its *home* monitor. It may still
address any kernel block. The home monitor always looks up the PID. The
monitor that owns the addressed block checks that PID against its own
permission table.

The RAMs are true dual-port, but the kernel uses only port A, which the
monitor drives. Port B is held disabled. If port B were wired to an IP core,
that core could bypass the monitor.

## Inside a reference monitor

```
 IP0 ─┐
 IP1 ─┼─► rm_arbiter ─► [S1] ─► mid_pid_lut ─► [S2] ─► rm_fsm ─┬─► Block RAM port A
 slot ┘   (round robin)         (MID → PID)            (decide) ├─► forward slot ─► crossbar
   ▲                                                            └─► answer (next cycle)
   └── crossbar (requests from other monitors)
```

- **`rm_arbiter`** grants one request per cycle. It chooses between IP 0,
  IP 1 and the one-entry slot that holds requests sent by other monitors. It
  uses round robin and registers the winner into stage S1. Its grant is the
  `ready` of the request handshake.
- **`mid_pid_lut`** replaces the MID with its PID and registers the result into
  stage S2. A request that came from another monitor already carries its PID,
  and that PID passes through unchanged.
- **`rm_fsm`** chooses a state for the request in S2: `GRANT_RD`, `GRANT_WR`,
  `DENY`, `FORWARD` (the address is in another block) or `IDLE`. It drives
  the RAM port combinationally from that choice, so a granted access happens
  on the edge that ends the decision cycle. In the next cycle the FSM returns
  the answer:
  - the read data, for a granted read;
  - an acknowledge, for a granted write;
  - `denied = 1` with zero data, for a denied access. The RAM is not touched.

  Each access has exactly one decision state, so the monitor never waits
  between accesses.

Nothing stale stays on an internal bus. Empty pipeline stages are cleared to
zero. The RAM address and write data are zero unless an access is granted.
Denied answers carry zero data.

### Timing

A local access (to the IP's home block) is presented in cycle 0 and accepted at
once if it wins arbitration:

```
cycle        0          1          2            3
IP          valid/ready
S1                      request
S2                                 req + PID
RAM edge                                  ▲ (end of cycle 2)
answer                                                rsp_valid
```

Answers come 3 cycles after the request. A bare Block RAM answers after 1.
When two IP ports compete, the loser waits one cycle per request granted ahead
of it.

## Remote accesses and the crossbar

This is the least obvious part of the design. A request to another kernel block
takes this path:

1. The home monitor accepts the request and looks up its PID. If the MID is
   unknown, the home monitor denies the request at once, with the normal
   3-cycle timing.
2. Otherwise the FSM enters `FORWARD`. It puts the request, with its PID and
   with the number of the home block and IP port, into its forward slot.
3. **`rm_crossbar`** moves the request into the one-entry input slot of the
   owning monitor. It does so only when that slot is empty. If several monitors
   send to the same block, round robin picks one per cycle. Different
   destinations are served in the same cycle.
4. The owning monitor arbitrates the request against its own IPs and checks
   the PID against its own permission table. It then accesses its RAM or
   denies the request.
5. The answer goes back through the crossbar's answer path to the home
   monitor, which hands it to the IP port that asked.

When there is no contention, a remote access is answered 7 cycles after it is
presented (4 more than a local one).

The following rules keep this correct and free of deadlock:

- **One remote access per monitor at a time.** While a remote access is
  outstanding, the port that issued it gets no grants at all. The monitor's
  other port gets grants for local accesses only.
  - Answers to one port therefore always come back in the order the port sent
    its requests.
  - A local answer and a remote answer can never arrive on the same port in
    the same cycle.
  - At most one answer is ever on its way to a given monitor, so the answer
    path needs no arbitration.
  - The forward slot is always empty when the FSM needs it, so the monitor
    pipeline never stalls.
- **Ready signals between monitors depend only on registers.** The ready of an
  input slot is just "slot empty". No combinational path runs from one
  monitor's pipeline into another's, and so no loop exists between them.
- **An input slot always drains.** Every monitor pipeline always moves forward,
  and round robin guarantees the slot a grant. A remote request therefore
  never waits on a chain of other monitors.

Allowing one remote access at a time per monitor costs remote bandwidth. Local
accesses are not slowed.

## Interfaces

All types are defined in `rtl/sk_pkg.sv`.

Each IP port of `sep_kernel_top` (indexed `[block][port]`) has:

| signal | dir | meaning |
|--------|-----|---------|
| `ip_valid`     | in  | a request is present; hold it and the request fields until `ip_ready` |
| `ip_req`       | in  | `ip_req_t`: `mid[3:0]`, `action` (0 read, 1 write), `addr[11:0]`, `data[31:0]` |
| `ip_ready`     | out | the request is taken at this clock edge |
| `ip_rsp_valid` | out | one-cycle answer to an accepted request, in order per port |
| `ip_rsp`       | out | `ip_rsp_t`: `denied`, `rdata[31:0]` (zero unless a granted read) |

A request that has `ip_valid` high must keep it high until it is taken.
Assertions in `rm_arbiter` check this. Reset is `rst_n`, active low. It is
asynchronous when asserted, and its release must be synchronous to `clk`.

## Files

| file | contents |
|------|----------|
| `rtl/sk_pkg.sv`        | widths, request/answer structs, default policy functions |
| `rtl/sep_kernel_top.sv`| 4 monitors + 4 RAMs + crossbar |
| `rtl/ref_monitor.sv`   | one monitor: arbiter, LUT, FSM, crossbar input slot, answer merge |
| `rtl/rm_arbiter.sv`, `rtl/mid_pid_lut.sv`, `rtl/rm_fsm.sv` | the three pipeline parts |
| `rtl/rm_crossbar.sv`   | request crossbar and answer routing |
| `rtl/tdp_bram.sv`      | true dual-port RAM |
| `tb/tb_<module>.sv`    | one self-checking testbench per module |

## Verification

Every testbench checks results against values it computes on its own. Each one
ends by printing `TB_RESULT checks=N failures=M`.

- `tb_sep_kernel_top` runs the whole kernel at its default sizes. All 8 ports
  send 400 random accesses each, with trusted, low-privilege, high-privilege
  and unknown MIDs, to every block. The testbench predicts every answer from
  its own copy of the policy and a memory model. Each port uses its own set of
  words, so the interleaving between ports cannot change a result.
  - It checks that every local access is answered 3 cycles after it is
    accepted.
  - It counts and requires each of these mechanisms: local read and write
    grants; denial for an unknown MID; denial outside the PID window;
    forwarding; remote grant; denial at the target; denial at the source; two
    IPs competing; a port held by its remote access; crossbar contention; and
    back-to-back accesses.
- `tb_ref_monitor` tests a single monitor with its RAM. MIDs 3 and 7 write `B10C0001` and `B10C0002` in the same
  cycle. MID F then tries to overwrite both with `BADD0001` and `BADBAD02` and
  is denied. It also tests bursts, forwarding with the PID, holding off a port,
  and serving requests that arrive over the crossbar.
- `tb_trace_scenario` replays a typical protection scenario on the full
  kernel. In block 0, two IPs write `1111B10C` and `2222B10C` in the same cycle. An IP of
  block 1 writes `0101BA55` into block 0 over the crossbar, and the test checks
  that it arrives with PID 1. Then MID F tries to overwrite the words with
  `BADD0001` and `BADBAD02` and is denied. The test checks the RAM write
  order, the answers and the final contents.
- `tb_kernel_burst` is the burst workload. In all four blocks at once, one
  port writes 256 words and then reads them back. Every access is accepted in
  the cycle it is presented. The answers come on consecutive cycles, the first
  one 3 cycles after the first request. Then both ports of every block burst
  together, each into its own PID window, and share one access per cycle.
  Finally a burst of writes into another core's window is denied, and the
  victim's words are read back unchanged.
- The unit testbenches (`tb_rm_arbiter`, `tb_mid_pid_lut`, `tb_rm_fsm`,
  `tb_rm_crossbar`, `tb_tdp_bram`) compare each block with a reference model
  on every cycle.

To simulate with Verilator, for example the top:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/sk_pkg.sv tb/tb_sep_kernel_top.sv \
          --top-module tb_sep_kernel_top -o sim
./obj_dir/sim
```

The full-size run takes well under a second.

## What comes from the original scheme and what was chosen here

The following follow the published scheme this RTL implements:

- the MID/PID/action policy;
- a reference monitor per Block RAM, made of a LUT, an arbiter and an FSM;
- two IPs per monitor;
- a crossbar between monitors;
- a true dual-port on-chip RAM per kernel block;
- pipelining, giving about 3 cycles per access against 1;
- one decision state per access;
- clearing data from internal buses.

The following were chosen here, because the scheme does not specify them:

- The number of kernel blocks (4) and the RAM size (1K × 32).
- The 12-bit address split.
- The 2-bit PID.
- The per-PID address windows and the default policy. In the scheme's
  published simulation, MID 7 writes word 0x01A. The default policy here would
  deny that write, because 0x01A is in MID 3's half. `tb_ref_monitor` and
  `tb_trace_scenario` therefore move that write to 0x21A.
- The valid/ready request handshake and the answer format.
- Round-robin arbitration, both in the monitor and in the crossbar.
- The whole inner structure of the crossbar, and the rule of one outstanding
  remote access per monitor.
- Keeping RAM port B disabled.

The following are not modelled:

- The 500 MHz figure reported for the placed device. Timing depends on the
  FPGA.
- Integrity checking of memory contents. This is left for later work.
