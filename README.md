# DisplayPort link layer: source and sink in SystemVerilog

This RTL carries one uncompressed video stream and one S/PDIF audio stream from a source to a sink. It uses the DisplayPort link-layer format: up to four 8B/10B lanes at the link symbol clock (162 MHz for 1.62 Gbps), with a 1 Mbps Manchester AUX channel that configures the link. The top level, `dp_link_top`, holds both ends:

- **The source:** video transmitter, audio transmitter, AUX requester and link-training policy.
- **The sink:** video receiver, audio receiver, AUX replier, DPCD registers and EDID.

The two ends meet on the parallel code-group interface that a SerDes PHY would serialise. At its defaults the design runs 1600x1200 at 60 Hz (pixel clock 162 MHz) over four lanes, with 48 kHz stereo audio alongside.

The analog PHYs, the DVI receiver/transmitter chips and the pixel-clock PLL of the sink are not part of the RTL. The main link appears as `ml_tx_codes` / `ml_rx_codes`, four 10-bit code groups per link clock; the test benches loop it back through a skew and error model. The sink is given its pixel clock as an input.

## Clocks and data rates

| Domain | Clock | Used by |
|---|---|---|
| stream | `pclk` (162 MHz at 1600x1200@60) | DVI input, DE generator, TBC output, timing generator |
| link | `lclk` (162 MHz, `LCLK_KHZ`) | everything else, including AUX and S/PDIF sampling |

- **Video needs** 162 M pixels/s × 3 bytes = 486 MB/s.
- **Four lanes carry** 4 × 162 M symbols/s = 648 MB/s.
- **Transfer units:** each 64-symbol transfer unit (`TU_SIZE`) carries 48 data symbols per lane. The rest is stuffing between FS and FE.
- **Pixel clock measurement:** the pixel clock frequency reaches the source as the input `pclk_khz`. The design uses it in two places:
  - `lane_decision` picks the lane count and the TU fill;
  - the M/N values sent with the attributes (Mvid = pclk_khz, Nvid = LCLK_KHZ).
- **Clock crossings:** the two clocks meet only in dual-clock FIFOs (`async_fifo`, Gray-coded pointers) and in 2-flop synchronisers for level signals.

## Video source (`dp_video_tx`)

The path is DE generator → bus steering → FIFO → lane data generator → skew → scrambler → 8B/10B.

1. **`de_generator`** turns HSYNC/VSYNC/DE into start-of-frame and start-of-line flags. It also measures the raster: totals, active size, start positions and sync widths. These measurements become the main stream attributes (`msa_gen`).
2. **`vid_bus_steering`** packs pixels into per-lane bytes. Pixel k goes to lane k mod L (L = 1, 2 or 4 lanes), R, G and B in turn. The grouped words cross to the link clock in `async_fifo` (`FIFO_DEPTH`).
3. **`lane_data_gen`** is the packetizer and the hardest block in the source. Per lane it emits:
   - **BS, VB-ID, Mvid[7:0], Maud[7:0]** every `BS_PERIOD` symbols, and at every line start. BS is K28.5 and is scrambler reset; VB-ID bit 0 is vertical blanking.
   - **Transfer units:** data symbols followed by FS … FE stuffing (K30.7 / K23.7), sized by `lane_decision`.
   - **BE (K27.7)** before the first pixel of each active line.
   - **The attribute packet** once per frame in vertical blanking: SS SS, 16 bytes, SE on lane 0.
   - **Audio secondary data packets (SDPs)** on lane 0 whenever the line is in blanking or the FIFO is idle. Other lanes carry stuffing meanwhile.

   In the idle state the priority is: attribute packet first, then waiting video (outside vertical blanking), then SDPs. Video never waits for audio.

   During training it sends TPS1 (D10.2 repeated) or TPS2 (K28.5 D11.6 K28.5 D11.6, then six D10.2) instead.
4. **`skew_insert`** delays lane i by 2i symbols, as the standard's inter-lane skew requires.
5. **`dp_scrambler`** is the standard 16-bit LFSR (x^16+x^5+x^4+x^3+1, seed FFFFh), eight steps per clock. It is reset on each BS and bypassed during training.
6. **`enc8b10b`** is a table encoder with running disparity.

The stream is released only while the link is in normal operation (`video_en`), and only from a frame start. A retrain in mid-frame drains the FIFO rather than sending a torn frame.

## Video sink (`dp_video_rx`)

The path is 8B/10B → deskew → descrambler → unpacker → attribute recovery → time-base converter.

- **`dec8b10b`** decodes each lane and flags invalid code groups. `rx_lock_detect` turns the decoded stream into the per-lane status that training reads:
  - clock recovery: `LOCK_COUNT` clean code groups;
  - symbol lock: the TPS2 pattern seen.
- **`deskew`** delays each lane so that the same K28.5 lines up on all lanes. The per-lane delay lines are `MAX_SKEW+1` deep. While training, a K28.5 right after D11.6 is ignored as a marker, because it is part of the TPS2 pair. In normal operation every K28.5 is a BS marker, since video data bytes may equal D11.6. The `aligned` output becomes DPCD 204h bit 0.
- **`dp_scrambler`** (descramble mode) mirrors the source.
- **`stream_unpacker`** removes BS, VB-ID, M bytes, stuffing and packets. It rebuilds pixel groups with frame-start and line-start flags, and passes lane-0 SS…SE packets to `msa_recovery` (attributes) and to the audio path (SDPs).
- **`tbc_rx`** is the time-base converter. It is a dual-clock FIFO of `TBC_DEPTH` groups, written in the link domain and read in the pixel domain.
  - `video_timing_gen` regenerates HSYNC/VSYNC/DE from the recovered attributes.
  - Reading starts at a frame start, once `START_GROUPS` groups are buffered.
  - An underflow or a missing frame flag raises `ev_tbc_underflow` / `ev_sync_err`. The converter then waits for the next frame start.

## Audio (`dp_audio_tx`, `dp_audio_rx`)

**Source side:**
- `spdif_rx` recovers biphase-mark S/PDIF words by sampling with `lclk`. The cell length is measured from the preambles.
- `infoframe_gen` builds a CEA-861 audio InfoFrame.
- `audio_timestamp_gen` counts Maud/Naud: audio samples against link clocks.
- `sdp_packer` builds the packets. The header is HB0–HB3. The payload is four 32-bit subframe words.

**Error protection:** every packet is protected by a Reed–Solomon RS(15,13) code over GF(16) (`rs_encoder`), with nibble interleaving. A burst of errors on one lane symbol then touches only one nibble per codeword. `rs_decoder` computes syndromes and corrects one nibble per codeword. It reports `ev_ecc_corrected` or `ev_ecc_fail`.

**Sink side:**
- `sdp_unpacker` de-interleaves the packet and checks it.
- The words go into a FIFO.
- `spdif_tx` replays them at the cell length given by `SPDIF_CELL`. Playback starts after `START_WORDS` words are buffered.

**Known limitation.** The sink has no audio clock recovery; it replays at a fixed cell length. Because of this, the word buffer can run dry. At full size this happened twice in about 80 ms of link time: `ev_audio_underrun` fires and the checker sees a few words skipped. A product would regenerate the audio clock from Maud/Naud. This design transmits and recovers those values (`rx_maud`, `rx_naud`) but does not use them to steer playback.

## AUX channel and DPCD

- **Line code:** `manchester_enc` / `manchester_dec` implement Manchester-II at `2*AUX_HALF` link clocks per bit (1 Mbps at 162 MHz).
- **Framing:** a frame is SYNC, then bytes, then STOP.
  - SYNC is 16 zero bits, then 2 bit times high and 2 bit times low.
  - STOP is 2 bit times high and 2 bit times low.
  - A frame of n bytes therefore lasts 24 + 8n bit times.
- **Bus:** `aux_data_shifter` serialises the bytes. The two ends share one modelled line in the top: whichever side drives enables its output.

**`aux_source_fsm`** sends a request and waits for the reply.
- It gives up after `AUX_TIMEOUT` clocks.
- It reports ACK, NACK, DEFER or timeout. A deferred request is retried after `AUX_RETRY_GAP`.

**`aux_sink_fsm`** decodes the request, waits `TURNAROUND` clocks, then replies.
- **Native reads and writes** go to `dpcd_mem`. It answers DEFER until the DPCD has finished its start-up time (`DPCD_INIT`).
- **I2C-over-AUX** to address 50h reads `edid_rom`: a 128-byte EDID with a valid header and checksum. Other I2C addresses get NACK.

**`dpcd_mem` fields:**

| Address | Content |
|---|---|
| 000h | DPCD revision 1.1 |
| 001h–002h | Maximum link rate and lane count |
| 100h–102h | Link rate, lane count and training pattern, written by the source |
| 202h–203h | Per-lane status: CR done, EQ done, symbol locked |
| 204h | Inter-lane aligned |

**Hot plug:** `hpd` is high from reset. When clock recovery is lost in normal operation, the sink pulls HPD low for `IRQ_LEN` clocks. This is the IRQ pulse that sends the source back to re-read the status.

## Link training (`link_policy_src`)

The source policy follows a four-state training graph.

| State | Meaning | How it is left |
|---|---|---|
| 1 | Idle / link inquiry | On HPD, the source reads the EDID and DPCD 000h–002h. It picks the lane count from the pixel rate and the sink's maximum, writes 100h/101h and writes TRAINING_PATTERN_SET = 01. |
| 2 | Clock recovery, TPS1 | After `TRAIN_WAIT` it reads 202h–204h. If every active lane reports CR done, it writes 02 and goes to 3. |
| 3 | Channel equalisation, TPS2 | If CR done, symbol lock and inter-lane alignment all hold, it writes 00 and goes to 4. If CR is lost, it writes 01 and goes back to 2. |
| 4 | Normal operation | Video and audio flow. On an HPD IRQ it re-reads the status; lost CR sends it back to 2. |

Any AUX failure (timeout or NACK) returns the policy to state 1. `train_state` shows the state, and `ev_train_trans` pulses on every transition.

## Departures and own choices

- **Scrambler reset.** The scrambler is reset on every BS. The standard resets only on every 512th BS (as SR).
- **Audio clock.** The sink does not regenerate the audio clock; see the audio section.
- **Attribute packet layout.** The layout (SS SS, 16 bytes, SE on lane 0) is this design's own.
- **SDP length.** SDPs carry a fixed four words.
- **Lane 0 only.** Both kinds of packet go only on lane 0.
- **Equalisation status.** There is no equaliser, so EQ done is reported equal to symbol lock.
- **TBC start.** The TBC start threshold and the audio start threshold are own choices (64 groups, 16 words).
- **Synthesis size.** The resource figures of the reference FPGA implementation are not reproduced. Yosys on `dp_link_top` at the defaults gives about 5,900 flip-flop bits and 60 kbit of memory. The reference design uses larger frame buffers.

## Simulating

Each test bench is self-checking and prints `TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Wno-fatal -y rtl -y tb +libext+.sv \
          rtl/dp_pkg.sv tb/tb_dp_link_top.sv --top-module tb_dp_link_top -o sim
./obj_dir/sim
```

| Bench | What it covers |
|---|---|
| `tb_enc8b10b` | Encoder/decoder round trip and disparity |
| `tb_dp_scrambler` | LFSR sequence against the standard's first bytes, round trip, bypass |
| `tb_lane_decision` | Lane count and TU fill against reference arithmetic |
| `tb_rs_codec` | RS(15,13) syndromes, single-nibble correction, latency |
| `tb_manchester` | AUX frames through encoder, shifter and decoder with random delay |
| `tb_aux` | Request/reply FSMs, DEFER, NACK, DPCD, EDID, timeout |
| `tb_dp_video` | Video source to sink through the lane codes with skew, checked pixel by pixel |
| `tb_dp_audio` | S/PDIF in to S/PDIF out through SDPs with injected errors |
| `tb_dp_link_top` | The whole top at reduced sizes. It makes every mechanism happen and counts each one: DEFER, each training transition, a forced retrain through the IRQ, alignment, stuffing, attributes, SDPs, ECC correction, frames and audio. |
| `tb_dp_link_full` | The top with no parameter overrides: training, then one full 1600x1200 frame checked pixel by pixel, recovered attributes, EDID, and the audio word sequence. It takes about 30 s of simulator time. |
