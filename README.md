# Guarding an untrusted AXI interconnect

An SoC often uses a bought-in AXI interconnect and bought-in IP blocks. A
hardware Trojan in any of them can cause several kinds of harm:

- divert a transfer to the wrong place;
- change data in flight;
- replay data it copied earlier;
- invent read or write requests no master made;
- flood a port with data or responses nobody asked for;
- let one IP pose as another.

This design does not try to find the Trojan. It places trusted logic around
every untrusted part and lets a transfer through only if it matches something
a trusted wrapper has already seen. Three ideas work together:

- **Component guarding.** Every master IP, every slave IP and the
  interconnect itself sit inside a wrapper. All traffic passes through the
  wrappers.
- **Event verification.** The wrapper around the interconnect records every
  request in transaction logs. A transfer that comes out of the interconnect
  is checked against those logs before it is delivered.
- **Data tagging.** Every data beat gets a tag on the side where it enters the
  fabric. The tag depends on the beat's data, its position in the burst and
  the ID of the wrapper that created it. The tag never travels through the
  interconnect. It is stored in a log inside the trusted wrapper, and the far
  side recomputes it from the data that actually arrives.

A transfer that fails a check is **blocked**: it is accepted from its sender,
thrown away, and a one-cycle alarm bit is raised. All of this is
synthesizable SystemVerilog with no software involved.

## The guarded SoC (`tcuc_soc`)

```
 master IP ─ W(M_i) ─ U(M_i) ═╗                          ╔═ U(S_j) ─ W(S_j) ─ slave IP
                              ║  untrusted interconnect  ║
 master IP ─ W(M_i) ─ U(M_i) ═╝     (outside the top)    ╚═ U(S_j) ─ W(S_j) ─ slave IP
                   └───────────── W(AXI) ───────────────────┘
                           TR_log(write)   DATA_log(write)
                           TR_log(read)    DATA_log(read)
```

The parts of the top:

- **Master wrapper `W(M_i)`** (`master_wrapper`), one per master, sits in front
  of master IP *i*.
- **Slave wrapper `W(S_j)`** (`slave_wrapper`), one per slave, sits in front of
  slave IP *j*.
- **Interconnect wrapper `W(AXI)`** (`axi_wrapper`) contains:
  - one master interface unit `U(M_i)` per interconnect master port;
  - one slave interface unit `U(S_j)` per interconnect slave port;
  - the four logs.

The interconnect itself is not part of the top. Its two sides are brought out
as ports:

- `ic_m_*` connects to the interconnect's master-side ports.
- `ic_s_*` connects to its slave-side ports.

Any AXI crossbar that meets the two rules in the next section can be placed
between them. The master IPs connect to `m_*` and the slave IPs to `s_*`.

### What the design expects of the interconnect

- **Routing by address.** Slave *j* owns addresses
  `[j << SLV_SHIFT, (j+1) << SLV_SHIFT)`.
- **ID prefix.** On its slave side, the interconnect puts the issuing master's
  index in the top `MI_W` (2) bits of the ID. On the way back it removes them.
  This is what common crossbars do. U(S_j) uses the prefix to find the log
  segment of the master that issued the request.

A Trojan can still break either rule. The checks below catch the result.

## Tags

All tags use one function, `tcuc_pkg::tag_fn(uid, beat, data)`:

- It is CRC-16-CCITT: polynomial 0x1021, initial value 0xFFFF, MSB first.
- It runs over the six bytes `{uid[7:0], beat[7:0], data[31:24] … data[7:0]}`.

Which wrapper tags which data:

- **Write data.** W(M_i) tags each W beat using its own UID, which is *i*.
- **Read data.** W(S_j) tags each R beat using UID `8 + j`.

The beat number restarts after each beat with `last` set. The tag generator
(`tag_gen`) is a register stage, so tagging costs one cycle.

Because the UID is part of the tag, a beat can only pass as coming from the
wrapper that actually tagged it. This blocks masquerading. Because the beat
number is part of the tag, a correct beat replayed at another position fails
too.

A CRC detects every change that a Trojan makes without knowing the function.
It is not a keyed MAC. A Trojan that knows the polynomial can XOR the data with
a pattern whose CRC residue is zero, and that change goes unseen. Where this
matters, replace `tag_fn` with a keyed function. It is the only place tags are
computed.

## The logs

Both logs are split into one segment per master. Each segment has `LOG_DEPTH`
entries for open transactions.

### `tr_log`: one instance for writes, one for reads

Each entry holds:

- **Master-side fields**, written only by U(M_i):
  - a valid bit;
  - the request (ID, address, length);
  - the target slave;
  - the number of beats seen on the master side.
- **Slave-side fields**, written only by U(S_j):
  - a forwarded bit (the request reached the slave);
  - the number of beats seen on the slave side;
  - a response-seen bit (write log only).

The two groups are separate registers. U(M_i) and U(S_j) can therefore update
the same entry in the same cycle, and checking never slows the traffic.
Allocating an entry clears its slave-side fields.

### `data_log`: one instance for writes, one for reads

For every entry it holds one tag and one valid bit per beat, up to `MAX_BEATS`
beats.

- **Write data log.** U(M_i) writes each tag it receives from W(M_i). U(S_j)
  reads it.
- **Read data log.** U(S_j) writes each tag it receives from W(S_j). U(M_i)
  reads it.

Allocating an entry clears its valid bits.

## What each guard checks

### W(M_i): master wrapper

- **Access control.** `access_ctrl` checks every AW and AR. The whole burst,
  from `addr` to `addr + (len+1)*4 - 1`, must lie in the master's window
  `[ACC_LO[i], ACC_HI[i]]`.
  - A request outside the window is blocked with `ALM_ACCESS`.
  - The W beats of a blocked write are discarded. A small FIFO of allow/deny
    decisions lets W beats wait until their AW has been judged.
- **Tagging.** W beats are tagged with UID *i*.
- **Pass-through.** B and R go straight through without a register.

### U(M_i): master interface unit

| channel | check | alarm on failure |
|---|---|---|
| AW, AR | The address maps to a slave and `len < MAX_BEATS`. The request is then logged and forwarded with the ID prefix cleared. A full log, or an open entry with the same ID, makes the request **wait**; it is not blocked. | `ALM_DECODE` |
| W | The beat's tag goes into the write data log under (entry, beat). The beat is forwarded. WLAST must agree with the logged length. | `ALM_W_LAST` |
| B | Delivered only if the write entry with this ID has all beats delivered on both sides and the slave side saw the response. The entry is then freed. | `ALM_B_UNEXP` |
| R | Delivered only if an open read entry has this ID, and the tag recomputed with the expected slave's UID equals the tag U(S_j) logged for this beat. RLAST must match the length. A beat that fails still counts toward the burst's beat numbering. The entry is freed after the last beat. | `ALM_R_TAG` for a wrong tag, `ALM_R_UNEXP` for the rest |

### U(S_j): slave interface unit

| channel | check | alarm on failure |
|---|---|---|
| AW, AR | Admitted only if the segment named by the ID prefix holds an open entry that has not yet been forwarded and matches the request in ID, address and length, with slave *j* as target. This catches invented, diverted and altered requests. | `ALM_AW_UNEXP`, `ALM_AR_UNEXP` |
| W | Beats belong to the admitted bursts in order. Each beat's tag is recomputed with the issuing master's UID and compared with the write data log. WLAST must be where the length says. | `ALM_W_TAG` |
| W, no admitted burst | If an AW is on offer at the same time, the beat waits, because the AW may simply be late. Otherwise the beat is blocked as flooding or replay. | `ALM_W_UNEXP` |
| B | Admitted only for an admitted write whose beats are all delivered and which has no response yet. | `ALM_B_UNEXP` |
| R | Admitted only for an admitted read, within its length. The beat's tag goes into the read data log. | `ALM_R_UNEXP` |

### W(S_j): slave wrapper

It tags R beats with UID `8 + j`. AW, W, AR and B go straight through.

### Alarms

`alarm_wm[i]`, `alarm_um[i]` and `alarm_us[j]` are `tcuc_pkg::alarm_t`
vectors. Each has one bit per event kind of `tcuc_pkg::alarm_e`:

| bit | name |
|---|---|
| 0 | ACCESS |
| 1 | DECODE |
| 2 | AW_UNEXP |
| 3 | AR_UNEXP |
| 4 | W_UNEXP |
| 5 | W_TAG |
| 6 | W_LAST |
| 7 | B_UNEXP |
| 8 | R_UNEXP |
| 9 | R_TAG |

A bit pulses for one cycle per blocked transfer. Any response beyond the
blocking is left to the system, for example an interrupt, isolating the IP, or
a reset.

## Timing

Every guard that acts on a channel adds exactly one register stage. Each stage
is a one-deep slice (`tcuc_reg`) that keeps full throughput. The added latency
on an idle channel is therefore:

| channel | stages | added cycles |
|---|---|---|
| AW, W, AR | W(M_i), U(M_i), U(S_j) | 3 |
| R | W(S_j), U(S_j), U(M_i) | 3 |
| B | U(S_j), U(M_i) | 2 |

All checks are combinational reads of the logs in the cycle the transfer is
offered. Back-pressure happens only in three cases:

- a log segment is full;
- an ID is already in use for that direction;
- a W beat reaches U(S_j) while its AW is still on offer.

## Parameters of `tcuc_soc`

| parameter | default | meaning |
|---|---|---|
| `N_M` | 2 | number of masters |
| `N_S` | 2 | number of slaves |
| `LOG_DEPTH` | 4 | open transactions per master and direction |
| `MAX_BEATS` | 16 | longest burst accepted; longer ones are blocked |
| `SLV_SHIFT` | 16 | slave *j* owns `[j<<16, (j+1)<<16)` |
| `ACC_LO[i]`, `ACC_HI[i]` | `0`, `0x0001_FFFF` | master *i*'s allowed window |

The AXI fields are fixed in `tcuc_pkg`:

- address: 32 bits;
- data: 32 bits;
- master-side ID: 4 bits, plus the 2-bit master prefix on the slave side;
- length: 8 bits.

Not carried:

- size is always the full bus width;
- bursts are always INCR;
- there are no lock, cache, prot, qos, region or user signals.

## Where this design goes its own way

The scheme fixes the following:

- the wrapper structure;
- the interface units;
- the four logs;
- tags that depend on the beat and on the source;
- blocking of detected transfers;
- the 3/3/3/3/2-cycle latency;
- configuration by master and slave counts, per-master address windows and log
  size.

The following are this design's own choices:

- **Tag function.** The CRC-16 described above, over UID, beat number and data.
  UIDs are *i* for master wrappers and `8 + j` for slave wrappers.
- **What the logs hold.** The fields are listed above. The data log keeps one
  tag per beat.
- **At most one open transaction per ID and direction per master.** This keeps
  responses unambiguous without tracking order. A second request with a busy
  ID waits.
- **Write bursts are not interleaved.** At each slave port, write data follows
  the order of the admitted AWs.
- **How blocking works.** A blocked transfer is swallowed and no error
  response is made up. A master whose request was blocked inside the
  interconnect therefore waits forever for that response. Recovery is the
  system's job.
- **Address map, ID prefix, windows and all numeric defaults.** None of these
  are given by the scheme.

## Files

- `rtl/tcuc_pkg.sv`: widths, AXI payload structs, alarm encoding and `tag_fn`.
- `rtl/tcuc_reg.sv`, `rtl/tcuc_fifo.sv`: register slice and small FIFO.
- `rtl/access_ctrl.sv`, `rtl/tag_gen.sv`, `rtl/master_wrapper.sv`,
  `rtl/slave_wrapper.sv`: the IP wrappers.
- `rtl/tr_log.sv`, `rtl/data_log.sv`, `rtl/master_if_unit.sv`,
  `rtl/slave_if_unit.sv`, `rtl/axi_wrapper.sv`: the interconnect wrapper.
- `rtl/tcuc_soc.sv`: the top.
- `tb/`: a self-checking testbench for every module, `tb_<module>.sv`, plus
  three behavioural models:
  - `tb_ic_model`: an AXI crossbar with switchable Trojan behaviours;
  - `tb_axi_mem`: a memory slave that can flood R or B;
  - `tb_lat_mon`: a latency monitor.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself.
A watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal --top-module tb_tcuc_soc \
  -y rtl -y tb +libext+.sv rtl/tcuc_pkg.sv tb/tb_tcuc_soc.sv -o sim
./obj_dir/sim
```

To run another testbench, replace `tb_tcuc_soc` with its name.

`tb_tcuc_soc` runs the top at its default parameters in five phases:

1. **Normal traffic.** Writes and reads from both masters to both slaves are
   checked against a reference memory. Latency monitors on every channel
   confirm the 3- and 2-cycle figures. A 16-beat write and a 16-beat read
   must cross all the guards at one beat per cycle.
2. **Back-pressure.** Back-to-back reads fill a log, and same-ID writes wait
   for each other.
3. **Concurrent traffic.** Both masters run at the same time.
4. **Attacks.** 17 attack cases, each started from reset, must each raise
   their alarm and be kept from their target:
   - 11 interconnect Trojan behaviours: write diversion, write modification,
     read modification, forged AW, forged AR, W flooding, R flooding to a
     master, read diversion, address modification, shadow replay, forged B;
   - 2 slave floods, of R and of B;
   - 4 master misuses: a write outside the window, a read outside the window,
     an over-long burst, an early WLAST.
5. **Recovery.** Normal traffic runs again after the attacks.

The testbenches of the interconnect wrapper and of the interface units also
check masquerading: a beat carrying a tag made under another wrapper's UID
must be blocked.
