# 802.11ac DL MU-MIMO access-point MAC hardware

An IEEE 802.11ac access point using downlink multi-user MIMO can serve up to
four stations in one transmit opportunity (TXOP). The station that won the
medium gets its frames on one spatial stream group, and frames of other
access categories for other stations go out at the same time on the others
(*TXOP sharing*). This tree holds the time-critical half of such a MAC:

- channel access;
- frame exchange sequencing;
- four parallel PSDU byte streams with CRCs and A-MPDU aggregation;
- de-aggregation and checking of received PSDUs;
- immediate responses.

Everything slower is left to software on a host processor that reaches the
hardware over an APB bus. That covers MSDU queues, management frames,
rate choice and retransmission policy above the retry limit.

The top module is `mac_hw_top` (`rtl/mac_hw_top.sv`). Its defaults:

- Clock: 320 MHz.
- Datapumps: four. A Datapump is the unit that streams one user's PSDU.
- Data path: each Datapump moves one octet per clock, 2.56 Gbit/s. That
  covers a 3-stream 2.34 Gbit/s single-user PHY rate.

## Hardware/software split

The host writes complete MPDUs into small circular transmit buffers:

- one per access category (AC_BK, AC_BE, AC_VI, AC_VO);
- a Tx buffer;
- a power-save (PS) buffer;
- a beacon buffer;
- a control buffer that holds the RTS template.

The host also programs the EDCA parameters and modes. The hardware then
decides on its own:

- when to transmit;
- which buffers feed which user;
- how many MPDUs go into each A-MPDU;
- whether an exchange succeeded;
- when to retry;
- when to answer a received frame.

Received frames that pass every check land in an Rx buffer, and the host
reads them out.

This split follows the architecture the design is based on. What belongs on
each side, the block names, the EDCA parameter set and the four-Datapump
structure all come from there. The bus protocol, the register map, buffer
sizes and encodings are this design's own choices; each file's header says
which is which.

## Block map

```
mac_hw_top
├── amba_if        APB3 slave -> register bus strobes
├── mib_regs       configuration, interrupts, buffer write/read windows
├── mac_timer      1 us tick, 64-bit TSF, TBTT, NAV
├── chan_monitor   medium idle = !(CCA | NAV | own Tx | own Rx), idle time
├── backoff x4     EDCA per access category (BK, BE, VI, VO)
├── tx_coord       virtual collision, TXOP sequencing, beacons, responses
├── rx_coord       ACK/CTS decisions and frames, NAV update
├── power_mgmt     RF on/off, DTIM release of the power-save buffer
├── mpdu_gen       8 frame_buffers + per-user source multiplexer
├── transmission   4 x (datapump + crc32 + crc8)
└── reception      deagg -> mpdu_validate (crc32) -> dup_filter -> frame_buffer
```

`mac_pkg` holds the shared types:

- the access-category and buffer enums;
- the configuration struct `mac_cfg_t`;
- the parsed receive header `rx_hdr_t`;
- frame type codes and timing constants (SIFS 16 µs, slot 9 µs, PIFS 25 µs).

## Channel access and virtual collisions

Each access category has its own `backoff` unit. The medium counts as idle
when none of these is true:

- the PHY's CCA is busy;
- the NAV is running;
- the MAC is transmitting;
- the MAC is receiving.

`chan_monitor` counts how many whole microseconds it has been idle.

A backoff becomes *ready* when all three hold:

- it has a frame pending;
- the idle time has reached its AIFS;
- its slot counter is zero.

The counter drops once per further 9 µs idle slot. Busy medium resets the
AIFS wait and freezes the counter.

A counter is drawn from a 16-bit LFSR masked with CW, where CW has the form
2^k−1, in three cases:

- a frame arrives while the medium is busy;
- after a success, with CW = CWmin;
- after a failure, with CW = 2·CW+1 capped at CWmax.

At the retry limit the frame is dropped and CW returns to CWmin. A frame
that arrives on an idle medium with no counter drawn goes out after AIFS
alone.

Several ACs can become ready in the same clock. `tx_coord` then grants the
highest one (VO > VI > BE > BK). Every other ready AC gets a failure, as if
its frame had collided on the air: its window doubles and its retry count
rises. That is the *virtual collision* rule of EDCA.

Reset values, all in the MIB registers:

| | BK | BE | VI | VO |
|---|---|---|---|---|
| AIFS (µs) | 79 | 61 | 43 | 34 |
| TXOP limit (µs) | 0 | 0 | 3008 | 1504 |

CWmin is 31, CWmax 1023 and the retry limit 7.

## A TXOP, step by step (`tx_coord`)

The coordinator is idle until one of three things happens. It takes them in
this order:

1. The Rx coordinator asks for a response (ACK or CTS). User 0 sends it
   from the response source.
2. TBTT has passed and the medium has been idle for PIFS. User 0 sends the
   beacon buffer's frame, without backoff.
3. A backoff is ready. The winning AC becomes the *primary* AC:
   - If RTS is enabled and the control buffer holds an RTS, user 0 sends
     it and waits for a CTS within the response timeout. No CTS counts as
     a failure.
   - After SIFS, the MU transmission starts. User 0 carries the primary
     AC. With TXOP sharing on in AP mode, users 1 to 3 carry the other ACs
     that hold frames, in descending priority. These are the *secondary*
     ACs.
   - Each user sends `agg_num[ac]` MPDUs (1–15) as an A-MPDU, or a single
     MPDU when aggregation is off.
   - When every active Datapump has finished, the coordinator waits for
     one acknowledgement per user, user 0 first, each within the response
     timeout. The timer stops while a frame is being received.
   - Frames of users that answered are freed from their buffers; the
     others stay and are sent again later. The primary AC's backoff hears
     success or failure.
   - After a success the TXOP continues, SIFS later, in two cases: the
     first frame was marked "more fragments", or the primary AC still has
     frames and less than its TXOP limit has elapsed. A frame marked
     "more fragments" is never aggregated; its successor follows as a
     fragment burst.

Two more buffers contend through the same backoffs:

- The Tx buffer contends through the VO backoff.
- The PS buffer contends through the BE backoff, but only after a DTIM
  beacon has released it. It stays released until it is empty.

## Transmit data path (`datapump`, `crc32`, `crc8`)

A Datapump reads frames from the buffer `tx_coord` chose for its user and
emits one octet per clock on `tx_valid/tx_data/tx_last`. `tx_ready` from the
PHY can stall it at any octet.

For every MPDU in an A-MPDU it emits, in order:

1. A 4-octet delimiter:
   - B0: EOF, sent as 0.
   - B1: reserved.
   - B2–B3: length bits 13:12.
   - B4–B15: length bits 11:0.
   - Then a CRC-8 over B0–B15: x⁸+x²+x+1, preset to ones, complemented,
     sent MSB first.
   - Then the signature 0x4E.
2. The MPDU.
3. Its FCS.
4. Zero padding up to a 4-octet boundary. The last subframe gets no
   padding.

A single MPDU is sent without a delimiter.

The FCS is the IEEE CRC-32:

- reflected polynomial 0xEDB88320;
- preset to ones;
- complemented;
- sent least significant octet first.

The receiver checks it through the residue 0xDEBB20E3.

In station mode (`ap_mode` = 0) only Datapump 0 can start.

## Receive path (`reception`, `rx_coord`)

A PSDU arrives as octets with `rx_ampdu` set for an A-MPDU. It goes through
four stages:

1. `deagg` takes the PSDU four octets at a time:
   - If the octets form a valid delimiter (CRC-8 matches and signature
     0x4E), the length field says how many octets to release as one MPDU.
     The pad octets after it are skipped.
   - An invalid delimiter is counted, and the search moves four octets on.
2. `mpdu_validate`:
   - runs the CRC-32 check;
   - parses the header (type, subtype, retry, duration, address 1,
     address 2, sequence control);
   - decides whether the frame is for this MAC: its own address or a group
     address.
3. `dup_filter` keeps the last 16 (transmitter, sequence control) pairs.
   A frame with the Retry bit set that matches one is a duplicate.
4. A frame is written into the Rx buffer only if it has a good FCS, is
   addressed to this MAC individually, is not a control frame and is not a
   duplicate. Writing starts on the frame's first octet. The frame is
   committed or discarded one clock after its last octet.

`rx_coord` acts on each good frame:

- An ACK, BlockAck or CTS to this MAC goes to `tx_coord`.
- A data or management frame, or an RTS, to this MAC starts a response.
  This includes duplicates, which are acknowledged again. An ACK or CTS of
  10 octets plus FCS is requested SIFS after the reception ends.
- A frame for another station loads the NAV with its Duration, if that is
  longer than what is left.

## Buffers and host interface

`frame_buffer` is a byte ring with a ring of frame descriptors, each holding
start, length and a "more fragments" flag.

- Writer side: a frame is written byte by byte and then committed. If the
  frame does not fit, it is dropped at commit and an overflow is signalled.
- Reader side: a cursor walks committed frames without freeing them. That
  lets a failed A-MPDU be read again. Frames are freed from the head only
  when the exchange succeeded or was given up.

Sizes at the defaults:

| Buffer | Size |
|---|---|
| AC buffers | 4 × 4096 B |
| Tx | 4096 B |
| PS | 4096 B |
| Beacon | 1024 B |
| Control | 256 B |
| Rx | 8192 B |
| **Total** | **34,048 B** |

Each buffer has 16 descriptors.

The register map (APB, byte addresses, 32-bit registers) is documented at the
top of `rtl/mib_regs.sv`. In short:

- 0x00: modes.
- 0x04/0x08: own address.
- 0x0C–0x24: EDCA, TXOP, beacon/DTIM, aggregation.
- 0x28/0x2C: interrupt status and mask. The status bits are tx success,
  drop, receive, TBTT and overflow.
- 0x30–0x3C: transmit buffer window: select, data octet, commit, status.
- 0x40/0x44: Rx buffer window. Reading 0x40 returns an octet and advances.
  Writing 0x44 opens the oldest frame or pops it.
- 0x48/0x4C: TSF.

## Where this design departs from full 802.11ac

- **Acknowledgements.** An A-MPDU is acknowledged as a whole: an ACK or
  BlockAck frame counts for all its MPDUs, and its bitmap is not read. The
  MAC itself answers received A-MPDUs with an ACK, not a BlockAck.
- **Response order.** After an MU PPDU, responses are expected one user
  after another, each within the response timeout. No BlockAck Request is
  sent to poll users 1 to 3.
- **Beacons.** A beacon waits for PIFS after TBTT and does not back off.
- **Delimiters.** The EOF bit of the delimiter is always 0.
- **Limits.**
  - At most 15 MPDUs per A-MPDU.
  - MPDUs must fit a 4096-byte AC buffer, so the standard's 11,426-byte
    A-MSDU and 1,048,575-byte A-MPDU limits cannot be reached.
  - The CTS Duration is the RTS Duration minus SIFS and 44 µs.
- **One user per access category.** Each user in an MU PPDU is fed from a
  different AC buffer. Traffic of a single AC, for example best effort to
  four stations, therefore reaches one station per TXOP. Serving several
  stations of one AC at once would need per-station queues inside that AC.
- **Power management.** This is a minimal reading:
  - The RF is held on unless the host sets doze mode.
  - In doze mode it is held on while frames are pending or the MAC is busy.
  - It is also held on from TBTT until the beacon has gone out.
- **Host access.** The host moves frames one octet per bus access.

## Simulation

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops on a watchdog.
`tb/tb_ref_pkg.sv` holds independent reference models:

- table-driven CRC-32;
- bitwise CRC-8;
- a frame builder;
- an A-MPDU builder.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mac_hw_top \
    rtl/mac_pkg.sv tb/tb_ref_pkg.sv -y rtl -y tb tb/tb_mac_hw_top.sv
./obj_dir/Vtb_mac_hw_top
```

Replace the top module name for any other testbench. Some unit tests shrink
parameters to stay short:

- the timer test runs at a 4 MHz clock;
- the Rx-buffer test uses a 256-byte buffer.

`tb_mac_hw_top` runs the whole MAC at its default parameters (320 MHz, four
users). It takes about 3 ms of simulated time, which is a few seconds of wall
time. An APB host model and a model of four stations drive it. The station
model collects each user's PSDU, splits A-MPDUs, checks every delimiter
CRC and FCS, and answers with ACK or CTS frames. The test goes through these
scenarios:

1. The VO and VI backoffs collide inside the MAC, with equal AIFS and CW 0.
   VO wins, and one MU PPDU carries VO, VI, BE and BK to four users.
   During this, the PHY randomly stalls user 1.
2. BE's station stays silent once. The response times out, and BE's frames
   are sent again later.
3. VI continues its own TXOP.
4. An RTS/CTS exchange precedes a data frame, and then a two-fragment
   burst goes out in one TXOP.
5. A received data frame is acknowledged after SIFS and read back over APB.
6. Its retransmission is acknowledged but filtered as a duplicate.
7. A frame for another station sets the NAV.
8. A beacon at TBTT releases a power-save frame.
9. In station mode, only one user is used.
10. A frame too big for the control buffer overflows it and raises the
    interrupt.
11. A received A-MPDU has one damaged delimiter and one damaged FCS. Only
    its intact subframe is stored.

Each of these mechanisms is counted, and the test fails if one never
happened.

`tb_table3_workload` runs a single-user best-effort load at the defaults:

- Traffic: 1500-octet MSDUs, with the host refilling the AC_BE buffer.
- PHY: throttled to 780 Mbit/s.
- Station: answers each PPDU with a BlockAck.

It reaches about 100 Mbit/s, which fits a simple budget per TXOP:

- AIFS: 61 µs.
- Mean backoff: 15.5 slots.
- Air time: 32 µs for two 1538-octet MPDUs.
- SIFS: 16 µs.

Each TXOP carries only two such MPDUs because the 4096-byte AC buffer holds
no more. The buffer size, not the data path, is what limits single-user
throughput here. No PHY preamble time is modelled.
