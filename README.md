# StarT-Voyager NES bus interface units (sBIU and aBIU)

StarT-Voyager joins SMP nodes of PowerPC 604 processors into a message-passing parallel machine.
Each node's network card (the NES) has two processors on two separate 60X memory buses: the
**application processor (aP)**, which runs user code, and the **service processor (sP)**, which
runs protocol code. The NES Core connects them to two dual-ported SRAMs that hold the message
queues (aSRAM on the aP side, sSRAM on the sP side) and to a controller, NES Ctrl, that moves data
between the SRAMs and the network.

This RTL is the part of the NES Core that sits on the two memory buses:

* **sBIU**: the bus slave on the sP bus.
* **aBIU**: a pipelined slave, snooper and bus master on the aP bus.

Each unit decodes physical addresses into *address spaces*. A load or store to a space is turned
into an SRAM access, a queue-pointer update, a request to NES Ctrl, or a state change. The main
idea is that the address carries the command. For example:

* A store to ShTx space writes a message slot and advances the transmit producer pointer.
* A load from ShRx space polls a set of receive queues. It returns the first non-empty message, or a
  fixed "empty" word.
* A load or store to Immediate space fires a command, such as an interrupt or a reset.
* On the aP side, accesses to ordinary memory in the *Serviced* and *Snooped* spaces can be
  ignored, reported to the sP, held for its approval, or retried.

NES Ctrl, the SRAM chips, the cache-line status SRAM (clSRAM) and its FIFO, and the processors
are not part of this RTL. Their signals are ports of the top, `nes_biu_top`.

## Conventions

- Bit numbering is big-endian, as on the PowerPC: bit `[0]` is the most significant. Vectors
  are declared `[0:N]`, so verilator prints ASCRANGE warnings; they are expected.
- All pins are active high. The 60X bus's active-low signals appear here as active-high.
- There are no tristate buses. A bidirectional pin is split into `...In` (the bus as observed)
  and `...Out`, with an output enable (`aPBusDriveAddress`, `aBMMasterData`).
- Every input of both units is registered before use, and every output is registered. A signal
  therefore reaches the unit one cycle after it appears on the port.
- Reset (`rst`) is synchronous and active high.
- Shared types, address-space decode and helper functions are in `rtl/nes_pkg.sv`.

## Address spaces

The top address bits select a space (decoded in `decode_sp_space` / `decode_ap_space`). The
remaining bits are then read as a space-specific command:

| Space | Action |
|---|---|
| SRAM | Direct SRAM word access. An sP access to the aSRAM, or an aP access to the sSRAM, becomes a *DataMotion* request to NES Ctrl. The data is staged in a temporary word in the near SRAM. |
| QPtr / Config | Reads and writes of queue pointers, bases, bounds and system registers. State that NES Ctrl owns is reached over the SCBus (sBIU) or ACBus (aBIU), and read data comes back through a compose into a temporary SRAM word. |
| ShTx | Short-message transmit. Writes go to the slot at the producer pointer (PPtr), and the new PPtr is sent to NES Ctrl. MemQOut and 32-byte composes are requests on the JBus. |
| ShRx | Short-message receive poll. The address holds a bit vector of queues to poll. The highest-priority non-empty queue's slot is read and its consumer pointer advanced. A failed poll reads EmptyMsg. *OnePoll* makes the second half of an 8-byte message re-read the same slot. |
| Immediate | Commands: NES reset, Arctic ack, clear Ctrl DMA, interrupt aP, interrupt sP. |
| Serviced (aP) | A response table indexed by transfer type (SSResponse): IGNORE, NOTIFY, APPROVE or RETRY. |
| Snooped (aP) | The same responses, but looked up in HALResponse by transfer type and the line's clSRAM state. The aBIU is not the slave here; it only asserts retries, and can capture write data. |

Table contents (SSResponse, HALResponse, lock bits, queue state) are written by the sP through
the sBIU's Config space. The sBIU passes these writes to the aBIU over the SABus. The aBIU
keeps the sBIU's copy of the MemQIn producer pointer current over the ASBus.

## Serviced and Snooped responses, and the Approval Register

This is the hardest part of the aBIU (`aqs.sv`). The response decides what happens:

- **IGNORE**: the transfer completes against the MissPattern word (writes are dropped).
- **NOTIFY**: a read completes at MissPattern. A write lands in the next MemQDataIn slot. A
  message with the address and type goes into MemQIn, and the MemQIn PPtr advances. While
  *NotifyLock* is set, notifying transfers are retried instead.
- **APPROVE**: handled by the Approval Register, which has four states: FREE, PENDING, READY and
  LOCKED.
  - From FREE: the transfer is retried, its address is latched, an approval request goes into
    MemQIn, and the state becomes PENDING.
  - In PENDING, LOCKED, or READY with a different address: the transfer is retried.
  - The sP answers with a NESBuffer command that carries the new ApprSRAMAddress and sets READY.
  - When the same address is retried: it completes at ApprSRAMAddress, and the state returns to
    FREE.
- **RETRY**: the transfer is always retried.

Some conditions retry a transfer whatever the response:

- *aPBusLock* is set (every aBIU-slave transfer is retried).
- A clSRAM update is in progress (Snooped transfers only).
- A needed Compose/DataMotion buffer or ACBus slot is busy.

An approved write completes at ApprSRAMAddress, the same as an approved read. (One reading of the
design puts approved write data in MemQDataIn instead.)

## The aPBus pipeline (`abi.sv`)

The aP's memory controller pipelines address tenures, so the aBI allows `PIPE_DEPTH` (3)
transfers whose address tenure is over but whose data tenure is not.

- Their per-transfer registers form a circular queue with two pointers:
  - the address half works on entry *x*;
  - the data half works on entry *y*.
- Each half has its own sub-state, so the state is a pair AxDy:
  - address: Empty, Active, Release (the ARTRY window), Confirm;
  - data: Empty, Setup, Active, Release.
- A data tenure begins on DBB/DBG for the oldest queued entry. It then gives one beat, or four for
  a burst.
- A fourth transfer is retried. A retried transfer never takes a queue entry.
- AACK from the memory controller is assumed one cycle after TS.

## The sPBus slave (`sbi.sv`)

The sP's memory controller does not overlap address tenures with an earlier data tenure. The sBI
is therefore a non-pipelined machine: address sub-state crossed with data sub-state, one transfer
at a time.

- From TS to AACK is three cycles: register TS, decode, then the ARTRY window.
- ARTRY, when needed, is driven in the cycle after AACK.
- A transfer that needs the far SRAM stalls in data Setup until NES Ctrl reports DataMotionDone.

## Requests to NES Ctrl (`sci.sv`, `aci.sv`)

Each unit has one DataMotion buffer and one Compose buffer toward NES Ctrl. These go on the JBus
(sBIU) or the KBus (aBIU). When both buffers are ready, the kind not served last goes first.

A DataMotion word is 32 bits:

| Bits | Field |
|---|---|
| `[1:13]` | near-SRAM word |
| `[16]` | direction (1 = into the aSRAM) |
| `[17:29]` | far-SRAM word |
| `[30:31]` | size (4 B, 8 B or 32 B) |

A DataMotion for a bus write is held until the data tenure ends.

On the aBIU, the Compose buffer also takes MemQIn messages from two more sources: the bus
master's acknowledgments, and NES Ctrl's own MemQInCtrlReq. It takes them only between address
tenures, so a compose that `aqs` has counted on is never taken away.

## NESBuffer commands and the bus master (`abm.sv`)

NES Ctrl hands the aBIU 64-bit commands. The type is in bits `[14:16]`:

| `[14:16]` | Command |
|---|---|
| 100 | NES-Mastered transfer: address from `[32:61]`, type, attributes and size from the command; data in the aSRAM |
| 001 | DMARx-Mastered transfer: data from the DMARxDataQ; the DMAPending counter of the channel is decremented |
| 000 | DMA Receive: initialises `DMAPending[channel]`, for 8 channels of 16 bits each |
| 101 | Misc: an Approval Register command, or a clSRAM update through the clFIFO |

The aBM requests the bus, drives the address tenure, and repeats it on ARTRY. It then runs the
data tenure from the aSRAM and counts TA.

If the command asks for an acknowledgment, the same command word is composed into MemQIn with bit
`[28]` set. For DMARx-Mastered writes, only the one that brings DMAPending to zero is
acknowledged, with bit `[1]` set.

## Files

| File | Contents |
|---|---|
| `rtl/nes_pkg.sv` | Types, constants, address decode |
| `rtl/sbiu.sv` | sBIU wrapper: `sbi` + `sqs` + `sci` |
| `rtl/sbi.sv`, `rtl/sqs.sv`, `rtl/sci.sv` | sP bus slave; sP address generation and queue/state; JBus interface |
| `rtl/abiu.sv` | aBIU wrapper: `abi` + `aqs` + `aci` + `abm` |
| `rtl/abi.sv`, `rtl/aqs.sv`, `rtl/aci.sv`, `rtl/abm.sv` | aP pipelined slave; aP address generation, tables and approval; KBus interface; bus master |
| `rtl/nes_biu_top.sv` | Both units, the SABus/ASBus between them and the cross interrupts |
| `tb/tb_<module>.sv` | One self-checking testbench per module |

`tb_nes_biu_top` is the end-to-end test at default parameters. It contains:

- models of both processors' bus masters;
- a model of NES Ctrl that answers DataMotion, Compose and state-bus requests;
- an arbiter for the aBIU's bus mastering.

It counts each mechanism it makes happen:

- sP bus: reads, writes, bursts, retries, DataMotion stalls, SCBus updates, MemQOut composes, ShRx
  polls (empty, and finding a MemQIn message), Immediate Commands, and Config reads and writes of
  aBIU state;
- aP bus: reads, burst writes, three-deep pipelining, the pipeline-full retry, DataMotion, NOTIFY
  with and without NotifyLock, the approval retry and completion, the aPBusLock retry, and a snooped
  IGNORE;
- bus master: NES-Mastered transfers with ARTRY and acknowledgment, the DMAPending-zero
  acknowledgment, and clSRAM updates.

A mechanism that never happens counts as a failure. The per-module testbenches cover the rest:
OnePoll, RETRY and HALResponse lookups, the clSRAM-update retry, and the JBus/KBus priority.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. A watchdog ends a run that hangs.
With verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_nes_biu_top \
    rtl/nes_pkg.sv rtl/*.sv tb/tb_nes_biu_top.sv -Mdir obj -o tb && obj/tb
```

To test a block on its own, replace `tb_nes_biu_top` with `tb_<module>`. `rtl/*.sv` can stay in
the file list.

## Where this RTL departs from, or goes beyond, the source design

- **Cycle timings are this design's own.** These include the three-cycle sP AACK, the one-cycle
  JBus/KBus request, and the assumed one-cycle AACK on the aP side. No cycle counts were given.
- **Formats are this design's own:** message formats (MemQIn notification and approval messages,
  NESBuffer acknowledgments), the DataMotion word layout, and enum encodings.
- **Placement is this design's own:** the static SRAM words (temporary, MissPattern /
  OverflowStatus, EmptyMsg, QPtr and continuation words) sit at the top of each SRAM, at
  parameterised addresses.
- **A full aBI pipeline retries** a new transfer rather than stalling.
- **Clearing the Approval Register** at the end of a DMARx-Mastered operation, which a command can
  request, is not implemented.
- **The ACBus write of a new PasT producer pointer** waits for the next data release.
- **Not included:** NES Ctrl, the SRAMs, clSRAM/clFIFO, the network interface and the
  processors. Their signals are ports of `nes_biu_top`, and the testbenches model them.
