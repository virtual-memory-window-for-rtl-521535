# Virtual Memory Window: an IDEA coprocessor that works in virtual addresses

A hardware accelerator normally has to know where its data sits: which
shared RAM it can reach, how large it is, and how the software splits a
large data set into pieces that fit. This design removes that knowledge from
the accelerator. The coprocessor (here an IDEA block cipher) issues plain
*virtual* addresses of the calling program, exactly as the program's own
code would. A small translation unit, the **Window Management Unit (WMU)**,
maps those addresses onto a **window memory**: a 16 KB dual-port RAM split
into eight 2 KB pages, which both the coprocessor side and the host
processor can reach. An operating-system module on the host (the *window
manager*) keeps the window filled: when the coprocessor touches a page that
is not in the window, the WMU stops it and interrupts the host, which copies
the page in (writing back a dirty page if it needs the room), updates the
WMU's TLB and lets the coprocessor continue.

The result is that neither the coprocessor RTL nor the calling program
depends on the window's size or location. The same coprocessor encrypts 4 KB
or 32 KB without change; with 32 KB of input and 32 KB of output it simply
takes more page faults. Only the WMU and the OS module are specific to a
platform.

This repository holds synthesizable SystemVerilog for everything on the
reconfigurable side: the WMU (TLB, TLB state machine, registers), the window
memory and the IDEA coprocessor with its four units. The host processor, its
bus and the OS software are not hardware of this design; the end-to-end
testbench plays their part.

## System overview

```
            coprocessor (portable)              WMU (platform-specific)        host side
 +-------------------------------------+     +---------------------------+
 | IDEA Core <-> IDEA CTRL   (slow)    |     |  AR  SR  CR   TLB          |   window memory
 |     ^  X/Y       | rd_req/wr_req    |     |  (CAM: VPN, RAM: PPN,V,D) |   8 x 2 KB, dual port
 |     |            v                  | VA  |  TLB state machine         |--dp_*--> port A
 | Memory CTRL   Init CTRL   (fast)    |---->|                            |          port B <-- mem_* (host)
 |      \  mux (init_sel)  /           |<----|  cp_tlbhit, cp_din         |
 +-------------------------------------+     +---------------------------+
                 cp_start, cp_inv, cp_fin          cpu_* registers, wmu_int --> host
```

`vmw_top` instantiates `idea_coprocessor`, `wmu` and `window_memory` and
brings out two host-side ports: a register bus to the WMU (`cpu_*`, with the
interrupt `wmu_int`) and a memory port to the window (`mem_*`).

## The coprocessor interface

These signals are all a coprocessor sees, and they do not change from one
platform to the next:

| signal      | dir (at coprocessor) | meaning |
|-------------|-----|---------|
| `cp_vaddr`  | out | 32-bit virtual byte address (word aligned) |
| `cp_dout`   | out | write data |
| `cp_din`    | in  | read data, valid with `cp_tlbhit` |
| `cp_access` | out | an access is requested; held until `cp_tlbhit` |
| `cp_wr`     | out | the access is a write |
| `cp_tlbhit` | in  | one-cycle pulse: translation succeeded, the access is done |
| `cp_start`  | in  | one-cycle pulse: the host launched the coprocessor |
| `cp_inv`    | out | one-cycle pulse: the parameter page is no longer needed |
| `cp_fin`    | out | one-cycle pulse: the operation is complete |

Timing of an access that translates without a fault (fast clock):

```
 edge        1         2         3         4         5
 cp_access  _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_ (or next request)
 cp_vaddr   =X========= held ===========================X=
 WMU          latch     CAM search   PPN read +
                                     window access
 cp_tlbhit  __________________________________/‾‾‾‾‾‾‾‾‾\_
 cp_din     ----------------------------------< data    >-
```

The coprocessor raises `cp_access` at edge 1 and samples `cp_tlbhit` and
`cp_din` at edge 5, the fourth edge after. A coprocessor may keep
`cp_access` high and present the next address right after edge 5; each access
then costs five cycles. On a page fault `cp_tlbhit` simply comes later; the
coprocessor needs no other signal to handle it.

## The WMU: TLB, state machine and the fault protocol

### TLB

`tlb` holds one line per window page (eight). Each line has a
content-addressed part, the virtual page number (VPN, the top 21 bits of the
address for 2 KB pages), and a RAM part: the physical window page (PPN,
3 bits), a valid bit and a dirty bit. A lookup compares all lines at once;
the result (hit and line number) is registered. The PPN is then read without
a clock. A coprocessor write through a line sets its dirty bit, which tells
the window manager that the page has to be copied back.

### State machine (`tlb_fsm`)

```
 IDLE   --manage-->            MANAGE   (manage has priority)
 IDLE   --match, !manage-->    MATCH
 MATCH  --!miss / tlbhit-->    IDLE
 MATCH  --miss / cp_miss-->    MISS
 MISS   --manage-->            MANAGE   (else stays in MISS)
 MANAGE --always-->            IDLE
```

* `match` is `cp_access`, masked in the cycle where the previous access's
  `cp_tlbhit` is being delivered, and masked while a miss is pending
  (`SR.MISS`).
* `manage` is any host access to a WMU register. Every host access is served
  in the MANAGE state, so it can never change the TLB in the middle of a
  translation; a host access that arrives during MATCH is held (`cpu_ready`
  low) for at most two cycles.
* MATCH lasts two cycles (CAM search, then RAM read and window access). The
  `miss` input is only looked at in the second one (`lookup_done`).

### Fault handling

On a miss the WMU stores the faulting virtual address in `AR`, sets
`SR.MISS` (and `SR.WRITE` for a write), and raises `wmu_int` if `CR.IE` is
set. The coprocessor stays waiting for `cp_tlbhit`. The host then:

1. reads `SR` and `AR`;
2. picks a window page; if its line is valid and dirty, copies the page back
   to user memory through the `mem_*` port;
3. copies the missing user page into the window page;
4. writes the TLB line (`TLBIDX`, then `TLBVPN`, then `TLBPPN` with the
   valid bit);
5. writes 1 to `SR.MISS`.

While `SR.MISS` is set no translation starts, so the host's own register
accesses (each of which passes through MANAGE and back to IDLE) do not
re-trigger the fault. After step 5 the held access is translated again and
now hits.

### Registers

Word-indexed on `cpu_addr`:

| idx | name     | bits |
|-----|----------|------|
| 0   | `CR`     | bit0 START (write 1: pulse `cp_start`, set BUSY, clear FIN/INV), bit1 IE |
| 1   | `SR`     | bit0 MISS, bit1 FIN, bit2 BUSY, bit3 WRITE (faulting access was a write), bit4 INV (parameter page released); write 1 clears MISS, FIN, INV |
| 2   | `AR`     | virtual address of the faulting access |
| 3   | `TLBIDX` | line selected for management |
| 4   | `TLBVPN` | VPN of the selected line (read/write) |
| 5   | `TLBPPN` | bit4 dirty, bit3 valid, bits2:0 PPN of the selected line (read/write) |

`wmu_int = CR.IE & (SR.MISS | SR.FIN)`. Host bus handshake: hold `cpu_sel`
(with `cpu_wr`, `cpu_addr`, `cpu_wdata`) until `cpu_ready` is high at a clock
edge; read data is on `cpu_rdata` while `cpu_ready` is high.

## Launching the coprocessor: the parameter page

The calling program fills an array of entries and hands it to the OS, which
places it in a window page mapped at the fixed virtual address
`PARAM_VADDR = 0xFFFF_F800` and writes `CR.START`. Each entry is two 32-bit
words:

| entry | word 0 (`u`)                      | word 1 (`v`)  |
|-------|-----------------------------------|---------------|
| 0     | number of entries, entry 0 included | flags (unused by IDEA) |
| 1     | virtual address of the input      | input size in bytes |
| 2     | virtual address of the output     | output size in bytes |
| 3 (optional) | virtual address of the 52 encryption subkeys | 104 |

`init_ctrl` reads word 0, then the rest of the used entries (at most four),
pulses `cp_inv` — the WMU then clears the valid bit of the parameter page's
TLB line and sets `SR.INV`, so the OS may reuse that window page for data —
and starts IDEA CTRL. With three entries the subkeys from the previous run
are kept. The subkeys are 26 words, subkey 2i in bits 31:16 and subkey 2i+1
in bits 15:0 of word i; for decryption pass the inverse subkeys.

When IDEA CTRL is done, `init_ctrl` pulses `cp_fin`; the WMU sets `SR.FIN`,
clears `SR.BUSY` and interrupts the host, which copies back every dirty page.

## The IDEA coprocessor

Four units, two clock domains:

* **IDEA Core** (`idea_core`, slow domain). Up to four 64-bit blocks
  through eight rounds and the output transformation. The round is a
  five-stage pipeline:
  `t1=X1*K1, t4=X4*K4, t2=X2+K2, t3=X3+K3`; `t7=(t1^t3)*K5`;
  `t8=(t2^t4)+t7`; `t9=t8*K6`; `t10=t7+t9` with the XORs that form the next
  X. Only two modulo-65537 multipliers (`idea_mul`) and two 16-bit adders
  exist. They are time-multiplexed: stage 0 uses all four on even cycles,
  and stages 1-4 use one each on odd cycles. A block leaving stage 4 goes
  back to stage 0 for its next round, or to the output transformation
  (the same four operators) after round eight. The loop holds four blocks,
  so a batch of n blocks takes 63+2n slow cycles (65 for one, 71 for
  four). A block in memory is two words: X1 = bits 31:16 of the word at the
  lower address, X2 its bits 15:0, X3/X4 the next word.
* **IDEA CTRL** (`idea_ctrl`, slow domain). Loads the subkeys, then per
  batch of up to four blocks: reads the batch's words into the core's input
  slots, `go`, waits for `done`, then writes the words of the output slots.
  It computes the virtual addresses itself and passes them with each
  request.
* **Memory CTRL** (`mem_ctrl`, fast domain). Performs each request as one
  WMU access and holds the slow side with `stall` until it is served.
* **Init CTRL** (`init_ctrl`, fast domain). Parameter reading and the
  start/end handshake described above; while it reads, three multiplexers
  give it `cp_access`, `cp_wr` and `cp_vaddr` (`init_sel`).

### Clock domains and the stall handshake

The WMU, window memory, Memory CTRL and Init CTRL run on the fast clock
(24 MHz in the original system); the core and IDEA CTRL at a quarter of it
(6 MHz). Here both domains use the same clock `clk`; the slow domain
advances only at edges where `core_ce` is high, one edge in `CLK_RATIO`
(4), produced by `clk_enable`. This keeps every crossing synchronous.

A request from IDEA CTRL (`rd_req` or `wr_req`, with `req_addr`) is a level.
Memory CTRL starts the WMU access on the next fast edge and drives
`stall = request & !served`. While `stall` is high, neither the core nor
IDEA CTRL advances. When the access is done, `stall` falls and the read word
waits on `x`; at the next slow edge IDEA CTRL loads it into the core and
moves on, and Memory CTRL treats the request as consumed. A fault-free
access costs two slow cycles.

Init CTRL and IDEA CTRL use a four-phase handshake: `start` stays high
until IDEA CTRL raises `fin`; `fin` stays high until `start` falls.

### Throughput

Per batch of four blocks: 71 slow cycles in the core plus sixteen accesses
of about two slow cycles each. That is about 26 slow cycles per block
(~104 fast cycles, 4.3 µs at 24 MHz). In simulation 32 KB (4096 blocks, with
paging) takes about 480 000 fast cycles (20 ms at 24 MHz). This includes the
test's page copies, which are modelled as taking two cycles per word.

## Where this design departs from the original, or fills gaps

* **Slow clock as an enable.** The original uses a second clock whose period
  is an integer multiple of the fast one; here it is a clock enable.
* **No overlap between memory traffic and computation.** Blocks are taken
  in batches of four, which fill the round pipeline. The core waits while a
  batch is read and written; the next batch is not fetched during the
  computation.
* **Key passing.** How the cipher key reaches the coprocessor is not part of
  the original interface description; here it is an optional fourth
  parameter entry pointing to precomputed subkeys.
* **Register layout, host bus and CP_INV action** (above) are this design's.
  So are the parameter page address, the word layout of a parameter entry and
  of a 64-bit block, the number of TLB lines (eight, one per window page), the
  32-bit data and address widths, and word-only accesses (no byte enables).
* **Pending-miss gating.** Blocking new translations while `SR.MISS` is set
  is an addition that makes the fault protocol well defined.
* **Reset.** Synchronous, active low, everywhere except the window memory
  contents.

## Files

`rtl/` (one module or package per file):

| file | content |
|------|---------|
| `vmw_pkg.sv`          | widths, page geometry, register map, TLB state type, parameter entry type |
| `vmw_top.sv`          | the system: coprocessor + WMU + window memory + slow-clock enable |
| `idea_coprocessor.sv` | the four coprocessor units and the WMU-side multiplexers |
| `idea_core.sv`, `idea_mul.sv` | IDEA datapath, modulo-65537 multiplier |
| `idea_ctrl.sv`, `mem_ctrl.sv`, `init_ctrl.sv` | the coprocessor's controllers |
| `wmu.sv`, `tlb.sv`, `tlb_fsm.sv` | the WMU |
| `window_memory.sv`    | the dual-port window RAM |
| `clk_enable.sv`       | one-in-N clock enable |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), each
ending with a `TB_RESULT checks=N failures=M` line; `idea_ref_pkg.sv`, a
plain IDEA reference model (key expansion and encryption, checked against
the published vector key `0001 0002 ... 0008`, plaintext
`0000 0001 0002 0003` → `11FB ED2B 0198 6DE5`); `wmu_model.sv`, a
behavioural stand-in for the WMU with random translation delays, used by the
coprocessor unit tests.

`tb_vmw_top` is the end-to-end test at the default sizes. It plays the host
and its window manager (page-fault service with round-robin eviction,
write-back of dirty pages, release of the parameter page) and encrypts 4, 8,
16 and 32 KB, comparing every block with the reference model. It also checks
the four-edge hit latency on every access that was not disturbed by a fault
or a host access, and requires each mechanism — page fault, eviction,
dirty write-back, parameter-page invalidation, core stall, host access held
off by a translation — to occur.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vmw_pkg.sv tb/idea_ref_pkg.sv tb/tb_vmw_top.sv --top-module tb_vmw_top
./obj_dir/Vtb_vmw_top
```

Other testbenches build the same way (`tb/idea_ref_pkg.sv` is needed only by
those that use the IDEA model). The end-to-end run takes about a second.
To change the window size, change `N_PAGES` and `PAGE_BYTES` in `vmw_pkg`;
the TLB, the window memory and the address split follow.

## How far it has been checked

All modules pass Verilator lint and elaborate in Yosys (slang front end).
Every testbench passes. Each was also run against a deliberately broken copy
of its module and caught the fault. What has not been checked: timing on a
real FPGA, two truly separate clocks, and behaviour under host accesses that
break the bus handshake above.
