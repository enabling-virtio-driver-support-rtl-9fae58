# VirtIO device logic for a PCIe FPGA

This RTL lets an FPGA appear to the host as a standard VirtIO device, here a
VirtIO **console**. The host can then use the VirtIO drivers that ship with
its operating system, such as Linux `virtio-pci` and `virtio_console`, and
needs no vendor DMA driver.

The FPGA keeps its vendor PCIe hard block and its vendor DMA/bridge engine.
What this RTL adds is everything VirtIO requires beyond them:

- **Capability list.** The four VirtIO vendor capabilities in PCI
  configuration space, chained behind the hard block's MSI-X capability.
- **VirtIO structures.** The device-side registers in BAR0: the common
  configuration, the notification area and the ISR status.
- **pci_cfg_data window.** The alternative route into those registers that
  VirtIO defines.
- **Virtqueue controllers.** One per queue. Each reads the driver's split
  virtqueue rings from host memory and moves the buffers. It does this by
  handing descriptors straight to the DMA engine's descriptor-bypass port,
  then reports completion with a used-ring entry and an MSI-X interrupt.

The host driver never programs the DMA engine. The device derives every
transfer from the ring addresses the driver wrote into the common
configuration.

```
  host ──PCIe── [hard block] ── [vendor DMA/bridge engine] ──┬── AXI-lite (BAR0) ─┐
                   │  config accesses ≥ 0xA8                  ├── bypass descriptors│
                   ▼                                          ├── card memory port  │
              virtio_ext_cfg ── BAR0 requests (pci_cfg_data) ─┘   MSI-X request     │
                                                                                    ▼
                                      virtio_controller ─────────────────────────────
                                        ├─ virtio_structures (common cfg, notify, ISR)
                                        ├─ virtqueue_controller  q0 (RX)
                                        ├─ virtqueue_controller  q1 (TX)
                                        └─ vq_arbiter (DMA descriptor port, MSI-X)
                                                  │
                                             user logic (card memory + request/done per queue)
```

The hard block, the DMA/bridge engine and the user logic are not part of
this RTL. Their signals are ports of `virtio_fpga_top`. The testbenches
contain a small behavioural model of the DMA engine with host memory
(`tb/xdma_bypass_model.sv`).

## Files

| File | Module | Role |
|---|---|---|
| `rtl/virtio_pkg.sv` | package | constants, capability layout, BAR0 map, `dma_desc_t` |
| `rtl/virtio_fpga_top.sv` | `virtio_fpga_top` | top: `virtio_ext_cfg` + `virtio_controller` |
| `rtl/virtio_ext_cfg.sv` | `virtio_ext_cfg` | configuration space 0xA8–0xEF: the VirtIO capabilities |
| `rtl/pci_cfg_access.sv` | `pci_cfg_access` | FSM that turns a `pci_cfg_data` access into a BAR0 access |
| `rtl/virtio_controller.sv` | `virtio_controller` | user-side top: structures, queues, arbiter, card address split |
| `rtl/virtio_structures.sv` | `virtio_structures` | AXI-lite slave for BAR0 and its address decode |
| `rtl/virtio_common_cfg.sv` | `virtio_common_cfg` | common configuration registers |
| `rtl/virtio_notify.sv` | `virtio_notify` | notification decode (write-only) |
| `rtl/virtio_isr.sv` | `virtio_isr` | ISR status, cleared on read |
| `rtl/virtqueue_controller.sv` | `virtqueue_controller` | per-queue split-virtqueue engine |
| `rtl/vq_arbiter.sv` | `vq_arbiter` | round-robin sharing of the DMA descriptor port and MSI-X |

Every file opens with a comment giving its function, interface and timing.

## Configuration space: the VirtIO capability list

A modern VirtIO PCI device advertises its register blocks with vendor-specific
capabilities (capability ID 0x09). The hard block owns configuration space up
to its MSI-X capability at 0x9C. It must be configured with two settings:

- MSI-X next pointer = 0xA8;
- accesses at and above 0xA8 forwarded to user logic.

`virtio_ext_cfg` answers those forwarded accesses:

| Offset | Length | cfg_type | Points to | Next |
|---|---|---|---|---|
| 0xA8 | 16 | 1 common | BAR0 + 0x000, 0x38 bytes | 0xB8 |
| 0xB8 | 20 | 2 notify | BAR0 + 0x100, 8 bytes, `notify_off_multiplier` = 4 | 0xCC |
| 0xCC | 16 | 3 ISR | BAR0 + 0x200, 4 bytes | 0xDC |
| 0xDC | 20 | 5 PCI cfg access | `bar`, `offset`, `length` writable; `pci_cfg_data` at 0xEC | 0x00 |

There is no device-specific capability. The console needs no
device-specific fields for one port without the multiport feature.

Configuration requests use a valid/ready request channel with a dword
address and byte enables. Each request gets exactly one `cfg_cpl_valid` pulse
carrying the read data. Writes get one too.

### The pci_cfg_data window

A driver can reach BAR0 without a memory mapping:

1. Write `bar`, `offset` and `length` into the capability at 0xDC.
2. Read or write `pci_cfg_data` at 0xEC.

Such an access is not answered at once. `pci_cfg_access` checks the window:

- `bar` = 0;
- `length` = 1, 2 or 4;
- the access stays within one dword of the 4 KiB BAR.

A legal access is issued as one request on `ext_bar_req_*`, with data and
byte strobes shifted into the lane that `offset` selects. The vendor engine
carries the request to BAR0 like any host memory access. The configuration
completion follows `ext_bar_rsp_valid`, with read data shifted back down to
bit 0. An illegal window completes at once: reads return 0 and writes are
dropped.

## BAR0: the VirtIO structures

BAR0 is 4 KiB and reached through an AXI-lite slave (`s_axil_*`). The slave
takes one access at a time, and its read data is registered. If a read and a
write arrive in the same cycle, the write goes first.

**Common configuration (0x000–0x037).** This is the VirtIO 1.x register
layout:

- feature select and feature words. The device offers only
  VIRTIO_F_VERSION_1.
- `msix_config` and `num_queues` (= `NUM_QUEUES`).
- `device_status`, `config_generation` (always 0) and `queue_select`.
- Per-queue fields, replicated `NUM_QUEUES` times and selected by
  `queue_select`:
  - `queue_size`. It reads as `QUEUE_SIZE_MAX`; the driver may write a
    smaller power of two.
  - `queue_msix_vector`.
  - `queue_enable`.
  - `queue_notify_off`, read-only and equal to the queue index.
  - The 64-bit descriptor table, available (driver) ring and used (device)
    ring addresses.

Writes merge byte-wise under the AXI strobes. Writing 0 to `device_status`
resets the device. It clears every register to its reset value, and a
one-cycle `dev_reset` tells the queues to drop their ring positions.

**Notification (0x100–0x107).** Queue *q* is notified at 0x100 + 4·*q*. The
block stores nothing. It takes the queue index from the low 16 bits of the
written data, so a driver that always writes to one address works as well.
The named queue's controller gets a one-cycle `kick`.

**ISR status (0x200).** Bit 0 is the queue interrupt and bit 1 the
configuration interrupt. Reading the ISR returns its value and clears it. A
bit set in the same cycle as the read survives. The `intx` output is the OR
of the ISR bits, for systems that use legacy interrupts instead of MSI-X.

## The virtqueue controller

This block is the heart of the design. Each queue has its own
`virtqueue_controller`. By default queue 0 receives, meaning device to host
(RX), and queue 1 transmits, host to device (TX). Which queues are RX is set
by the `RX_QUEUES` bit mask.

### What starts a queue

- **TX** starts when the driver writes the queue's notify address.
- **RX** starts when the user logic raises `usr_req_valid[q]`. It offers
  `usr_req_len` bytes of data at card address `usr_req_addr`. The driver
  posts its receive buffers ahead of time.

If an RX request finds no posted buffer, the controller waits for the next
notification, re-reads the ring and carries on. `usr_req_ready` is not given
until a buffer exists.

In both directions the queue runs only while `queue_enable` is set and
`device_status` has DRIVER_OK.

### The step sequence

Each ring access below is a separate DMA transfer. The controller waits for
each one to complete before it issues the next.

| Step | Transfer | Direction | Bytes |
|---|---|---|---|
| 0 | available ring header (`flags`, `idx`) | host→card | 4 |
| i | available ring entry at `last_avail mod size` | host→card | 2 |
| ii | descriptor (head, then each NEXT link) | host→card | 16 |
| iii | buffer data, once per descriptor | TX host→card, RX card→host | min(descriptor len, bytes left) |
| iv | used ring element `{id = head, len}` at `used_idx mod size` | card→host | 8 |
| v | used ring `idx` | card→host | 2 |
| vi | interrupt: ISR queue bit and an MSI-X request for the queue's vector | — | — |

After the header read, the entries between the device's `last_avail` and the
driver's `idx` are handled one at a time. The controller takes one user
request for each entry:

- **TX.** The user request supplies a card buffer of up to `usr_req_len`
  bytes. The controller copies the descriptor chain into it and reports
  `usr_done_len` = bytes copied. The used element's `len` is 0, because the
  device wrote nothing into the driver's buffer.
- **RX.** The controller fills descriptors, following NEXT links, until the
  user data is used up or the chain ends. The used element's `len` is the
  number of bytes written.

In both directions `usr_done[q]` pulses when the entry is finished.

Chains are followed at most `queue_size` − 1 links. Ring positions wrap with
the queue-size mask, and the 16-bit `idx` counters wrap naturally.

Step vi is skipped entirely when the driver has set
VIRTQ_AVAIL_F_NO_INTERRUPT in the available ring flags. When the queue's MSI-X
vector is NO_VECTOR (0xFFFF), only the ISR bit is set and no MSI-X request is
made.

### Where ring metadata lives

The DMA engine moves data between host addresses and *card* addresses. It
cannot write into a state machine's registers directly. Each controller
therefore has a 64-byte scratch buffer in card address space, at
`CARD_META_BASE + 64·q` (default `CARD_META_BASE` = 0x8000_0000).

| Scratch byte | Content |
|---|---|
| 0 | available ring header, as read |
| 8 | available ring entry, as read |
| 16 | descriptor, as read |
| 32 | used element, prepared for writing |
| 40 | used `idx`, prepared for writing |

Host-to-card ring reads land in the scratch buffer, and the controller takes
the fields from there. For card-to-host ring writes, the controller first
writes the element or index into the scratch buffer, then has the DMA engine
copy it out.

`virtio_controller` splits the engine's card memory port by address:

- below `CARD_META_BASE`: user memory (`usr_mem_*`), passed straight
  through;
- the scratch window: the queue's scratch buffer.

The card port is 64 bits wide with byte strobes. Reads return data one cycle
after `card_re`, from either user memory or scratch.

### Reset

A device reset (a write of 0 to `device_status`) is acted on as soon as the
controller has no DMA transfer or MSI-X handshake outstanding. It then
returns to idle with `last_avail` and `used_idx` at 0.

## Sharing the DMA engine and the interrupt

All controllers share one descriptor-bypass port. `vq_arbiter` keeps at most
one descriptor in flight:

- Among the requesting controllers it picks round-robin, starting after the
  previous winner.
- When the engine's H2C or C2H side (as `dir` selects) is ready, it drives
  `byp_desc` and pulses `h2c_byp_load` or `c2h_byp_load` for one clock
  cycle.
- When the matching `h2c_done` or `c2h_done` arrives, it routes that
  completion back to the winner only.

Handing a descriptor to an idle engine therefore takes a single cycle.
Assertions check two rules: a completion reaches only one controller, and
H2C and C2H are never loaded together.

MSI-X requests go through a second round-robin arbiter of the same kind:
`msix_req` with `msix_vector` is held until `msix_ack`.

`dma_desc_t` is `{dir, src[63:0], dst[63:0], len[27:0]}`:

- H2C: `src` is a host address and `dst` a card address.
- C2H: `src` is a card address and `dst` a host address.

## Top-level interface (`virtio_fpga_top`)

| Group | Signals | Connects to |
|---|---|---|
| clock/reset | `clk`, `rst_n` (asynchronous, active low) | |
| config requests | `cfg_req_valid/ready/write/dwaddr[9:0]/wdata/be`, `cfg_cpl_valid/rdata` | forwarded configuration accesses from the hard block |
| pci_cfg_data bridge | `ext_bar_req_valid/ready/write/addr[11:0]/wdata/wstrb`, `ext_bar_rsp_valid/rdata` | DMA/bridge engine, which turns them into BAR0 accesses |
| BAR0 | `s_axil_*` (AXI4-lite slave, 12-bit address) | AXI-lite master of the DMA/bridge engine |
| descriptor bypass | `h2c_byp_load/ready`, `c2h_byp_load/ready`, `byp_desc`, `h2c_done`, `c2h_done` | DMA engine |
| interrupt | `msix_req`, `msix_vector[15:0]`, `msix_ack`, `intx` | DMA engine interrupt port |
| card memory | `card_we/waddr/wdata/wstrb`, `card_re/raddr/rdata` | DMA engine's card-side memory port |
| user memory | `usr_mem_*` | user logic buffer memory (1-cycle read latency) |
| user queues | `usr_req_valid/ready/addr/len[q]`, `usr_done/usr_done_len[q]` | user logic |
| status | `device_status[7:0]` | |

Parameters of the top:

| Parameter | Default | Source |
|---|---|---|
| `NUM_QUEUES` | 2 | the console device: one RX and one TX queue |
| `RX_QUEUES` | 1 | bit mask, queue 0 is RX |
| `QUEUE_SIZE_MAX` | 256 | this design's choice |
| `DEVICE_FEATURES` | VIRTIO_F_VERSION_1 only | this design's choice |

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

`tb/tb_virtio_fpga_top.sv` runs the whole top at its default parameters. It
plays the host driver, the DMA engine (with host memory), the bridge for
`pci_cfg_data` and the user logic, and covers these steps:

1. Walk the capability list.
2. Run the driver's initialisation sequence: reset, feature negotiation,
   queue setup, DRIVER_OK.
3. Read `num_queues` and write `queue_select` through `pci_cfg_data`.
4. Receive into single and chained buffers.
5. Transmit through an 8-entry TX queue until it wraps, with one interrupt
   suppressed.
6. Run RX and TX at the same time, so that the arbiter has to choose,
   while an RX request waits for a buffer.
7. Read-clear the ISR.
8. Complete one TX entry whose queue has no MSI-X vector. Only the ISR bit
   and `intx` signal it, and the ISR read drops `intx`.
9. Reset the device and run again.

It counts each of these mechanisms and fails if any never happened. It also
checks that every descriptor load lasts one cycle.

`tb/tb_virtio_controller.sv` runs the same scenario on `virtio_controller`
alone, with `QUEUE_SIZE_MAX` = 64.

To simulate with Verilator, from the directory that holds `rtl/` and `tb/`,
give the package explicitly and let Verilator find the other modules by
name:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb rtl/virtio_pkg.sv tb/tb_virtio_fpga_top.sv --top-module tb_virtio_fpga_top
./obj_dir/Vtb_virtio_fpga_top
```

The full run takes about a second. The unit testbenches build the same way,
with their own name in place of `tb_virtio_fpga_top`.

`-Wno-fatal` is needed because the testbenches use integer arithmetic in
address expressions. Verilator reports that as width warnings and by default
stops on them.

The testbenches ignore every cycle before reset is released. They pass with
`+verilator+rand+reset+2`, which starts all state at random values.

## Departures, choices and limits

- **Interface widths and handshakes are this design's own choices.** This
  covers the configuration request port, the bridge port, the bypass
  descriptor type (28-bit length), the card memory port (64-bit) and the user
  request/done interface. They follow the shape of common PCIe DMA IP, not
  one product's exact signal list. Expect a thin adapter when attaching a
  real engine.
- **Not included: hard block and DMA/bridge engine.** The hard block's own
  settings (vendor ID 0x1AF4, device ID, MSI-X next pointer 0xA8, forwarding
  of configuration accesses) belong to it and are listed only as constants in
  the package.
- **No device-specific configuration structure and no configuration-change
  interrupt.** `msix_config` is stored but never used. `isr_set_config` is
  tied low.
- **Split virtqueues only.** Packed virtqueues, indirect descriptors and
  event-index notification suppression are not implemented. The device
  offers no such features, so a driver will not use them.
- **One DMA transfer at a time, across all queues.** This is simple and
  always correct, but it serialises queue traffic. Each ring entry costs five
  DMA transfers plus one per descriptor.
- **The scratch buffer, the card-address split and the TX/RX user handshake
  are this design's inventions.** They are how the controller obtains ring
  contents through a DMA engine that only moves memory.
- **Per-queue start:** RX re-reads the ring header for every user request;
  TX handles every entry present at its header read, then waits for the
  next notification.
- **Lint notes.** A few register-port bits are unused, such as the upper
  half of the notify data, `driver_features` and `msix_config`, so
  lint-level tools report them as unused. Some package constants document
  settings of the hard block and are not referenced by the logic. The 136
  user-memory address and data output bits are passed straight through from
  the card port.
