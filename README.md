# Diffuse-code FEC codec for a 1200 bit/s aeronautical satellite link

Data sent between aircraft and satellite at L-band suffers two kinds of damage. Thermal noise
causes scattered single errors. Sea-surface multipath causes short fades, and each fade
destroys a run of a few consecutive bits. The error rate before coding is about 1e-2 to 1e-3.
Message traffic needs about 1e-5.

This codec protects the data with a **rate-1/2 systematic diffuse convolutional code** and a
**threshold (majority-logic) decoder**. Every information bit is sent unchanged, followed by one
parity bit. Each parity bit is the sum of four information bits spread out by a distance `β`.
A fade therefore hits bits whose parity checks lie far apart. The decoder can correct:

- any burst of up to `2β` channel bits, provided at least `6β+2` error-free bits separate it
  from the next burst;
- any one or two errors among the eleven bits that take part in a single decision.

The circuit is small: about 750 flip-flops and 650 coarse logic cells in all, counting the
processor-interface ports and a test-set error generator. `β` is a run-time switch (4, 8, 12 or
16). An optional two-bit parity delay protects against the error pairs that differential PSK
demodulation makes.

The RTL is SystemVerilog and synthesizable. Everything runs on one system clock. The 1.2 kHz
data clock and 2.4 kHz channel clock are one-cycle enable strobes.

## The code

With `i_n` the information bit of period `n`, the parity bit sent with it is

```
p_n = i_n ^ i_(n-β) ^ i_(n-2β) ^ i_(n-3β-1)
```

The parity generator is a shift register of `3β+1` stages in three sections of `β`, `β` and
`β+1` stages. The parity is the sum of the incoming bit and the bits that leave each section
(`diffuse_parity_gen`). The register is built for `β = 16` (49 stages). `beta_sel` moves the
taps, so one piece of hardware serves all four settings:

| beta_sel | β  | register in use | correctable burst | guard space |
|----------|----|-----------------|-------------------|-------------|
| 0        | 4  | 13              | 8                 | 26          |
| 1        | 8  | 25              | 16                | 50          |
| 2        | 12 | 37              | 24                | 74          |
| 3        | 16 | 49              | 32                | 98          |

On the channel each information period carries two bits, information first and parity second.
With `pdly_en` set, every parity bit is sent two channel bits later. It then travels in the
parity slot of the following period. A DPSK error pair (two adjacent channel bits) then never
hits an information bit together with its own parity bit.

## Messages and the S/E MESS line

Traffic is sent as messages. A level signal, S/E MESS (start/end of message), travels next to the
data and is high while the data line carries message bits.

- **Encoder.** Before a message, the parity register is cleared. When the input S/E MESS falls,
  the encoder keeps running for `3β+1` more information periods. It sends zeros in the
  information slots, so every parity bit that involves the last message bits goes out. That is
  the fixed overhead of the code: 25 information slots per message at `β = 8`. With the parity
  delay there is one more slot. The output S/E MESS is high over exactly the coded message and
  its overhead. After each message one idle period is forced, so the receiver always sees the
  line fall between messages. Input bits that arrive during the zero fill are dropped.
- **Decoder.** While its input S/E MESS is low, all decoder registers are held clear. When a
  message starts, the first channel bit is taken as an information bit. The first `3β+1` decoder
  outputs of a message are start-up garbage. The S/E message logic (`dec_msg_logic`) counts
  them and tags only the real message bits as valid. The output S/E MESS is that tag, delayed
  with the data, so it is high for exactly the original message bits.

## Threshold decoding (`syndrome_decoder`, `threshold_logic`)

This is the part that needs the most care.

**Syndromes.** The decoder passes the received information bits through its own copy of the
parity generator. It adds each regenerated parity bit to the received one, which gives a
syndrome bit `s_n`. When no errors have occurred, every syndrome is 0. An error in `i_m`
makes four syndromes 1: `s_m`, `s_(m+β)`, `s_(m+2β)` and `s_(m+3β+1)`. An error in a parity
bit makes only its own syndrome 1.

**The decision.** The decoder decides about the oldest bit still in its register,
`i_(n-3β-1)`. By then all four of that bit's syndromes have been computed. The syndrome
register is `3β+1` stages long, laid out as `1, β, β, β`. Threshold logic forms four checks on
that bit:

| check | formed from                  | other bits it involves                             |
|-------|------------------------------|----------------------------------------------------|
| A     | `s_(n-3β-1)`                 | `p_(n-3β-1)`                                       |
| B     | `s_(n-2β-1)`                 | `i_(n-2β-1)`, `p_(n-2β-1)`                         |
| C     | `s_(n-β-1) ^ s_(n-1)`        | `i_(n-1)`, `p_(n-β-1)`, `p_(n-1)`                  |
| D     | `s_n` (entering)             | `i_n`, `i_(n-β)`, `i_(n-2β)`, `p_n`                |

The table assumes that earlier decisions were right. Check C is a sum of two syndromes. The sum
cancels the bits `i_(n-β-1)` and `i_(n-2β-1)`, which would otherwise show up in two checks at
once. This makes the four checks *orthogonal*: apart from the bit under test, no bit appears in
more than one check. Together they cover eleven bits. That is why five syndrome taps feed a
decision over four checks.

The bit is inverted when at least three of the four checks are 1. One error anywhere among the
eleven bits reaches at most one check. Two errors reach at most two. Neither can cause a wrong
decision, and an error in the bit under test is always corrected.

**Feedback.** When the decoder inverts a bit, it also inverts every stored syndrome that still
includes that bit. These are the entering `s_n`, and the syndromes crossing the first and second
`β` section boundaries. A corrected error then leaves nothing behind that could upset later
decisions. Because syndromes feed back this way, a wrong decision affects at most two syndromes
that are used at the same time. It acts like two single errors, and the decoder stops making
mistakes as soon as the channel does.

**Timing.** The decoded bit leaves the core `3β+1` information periods after it entered.
`corr` marks each corrected bit.

## Keeping in step: two phases and the bit synchronizer

The receiver may lose or gain a bit. After that, every "information" bit the decoder sees is
really a parity bit, and the other way round. The decoder recovers without outside help.

**Two decoders.** `fec_decoder` feeds the channel stream into a three-stage delay chain. On
every channel bit, that bit is taken as a parity bit. The bit one slot earlier is taken as its
information bit, or the bit three slots earlier with the parity delay. The pair is sent to one
of two identical syndrome decoders:

- phase 0 on odd-numbered channel bits, which is the correct framing;
- phase 1 on even-numbered channel bits, which is the framing after a slip of one bit.

Both ways of splitting the stream are therefore decoded all the time.
`freq_divider` makes the two pair strobes and the 1.2 kHz output strobe of the selected phase.
It resets its phase at each message start, so the first bit of a message is treated as an
information bit.

**The synchronizer.** `bit_synchronizer` counts the corrections of each decoder over windows of
50 information bits. At the end of a window it changes phase when the current phase has 4 or
more corrections and the other phase has fewer than 4. The wrong framing makes corrections at
a high rate. On a noisy but correctly framed stream both phases are busy, and the rule keeps
the output where it is. Each new message starts on phase 0.

**Output delay.** A decision needs a whole window. So `sync_delay` keeps the last 50 decoded
bits of each phase, with their valid tags: 100 bits in all. The output is taken from the end of
the selected phase's line. When the phase changes, the output therefore switches to bits that
were decoded with the right framing all along. Around a slip a few bits are lost or repeated;
after that the output is clean again.

**Latency.** The decoder output lags the channel by `3β+1` information periods in the
decoder, plus 50 in the output delay, plus one with the parity delay, plus a few channel bits.
At `β = 16` that is about 100 information bits. The end-to-end delay also includes the
encoder's one-period multiplexing.

## Encoder clocking (`clock_doubler`)

The encoder takes data at 1.2 kb/s and must produce a 2.4 kHz channel clock locked to it. Here
a small digital block does that job. It counts system clocks between data strobes and emits a
channel strobe on each data strobe and another one half a period later. `locked` rises after
the first full period has been measured. The data strobe may be at most 65535 system clocks
apart (`CNT_W = 16`) and at least 4.

## Processor interface ports (`mp_serial_in`, `mp_enc_out`, `mp_dec_out`, `mp_interface`)

The same code can also run in software on an 8-bit microprocessor. The processor handles
whole bytes, so it needs byte-wide ports with interrupts. The processor itself and its program
are not part of this RTL. The four ports it needs are built and brought out at the top.

- **Encoder input and decoder input** (`mp_serial_in`, used twice). These collect eight serial
  bits and raise `irq` on the 8th. They also give a control byte that has a 1 wherever the data
  byte holds a valid message bit. From the control byte the processor can see where a message
  ended inside a byte. After S/E MESS falls the port keeps counting bit slots, with control
  bits of 0, until the last byte is complete. Bit 0 is the first bit received. If a byte is not acknowledged before the next one is complete, the new
  byte overwrites it and `overrun` is set.
- **Encoder output** (`mp_enc_out`). The processor writes a data byte, a parity byte and a
  control byte. The port sends them as information bit i, then parity bit i, for i = 0 to 7, at
  the channel rate. S/E MESS follows control bit i. The port is double buffered: a holding
  register takes the next byte while the current one is being sent, so the stream has no gaps.
  `irq` asks for a new byte as soon as the holding register has been taken. `full` tells the
  processor to wait.
- **Decoder output** (`mp_dec_out`). The processor writes a byte in which information and parity
  bits alternate, information in positions 0, 2, 4 and 6, plus a control byte. The port sends
  the four information bits at 1.2 kb/s and sets S/E MESS from the matching control bits. It is
  double buffered in the same way.

## Burst error generator (`burst_error_gen`)

This is test equipment for bench-testing the codec. It is included because it is digital and
small.

- A 36-bit maximal-length shift register (`x^36 + x^25 + 1`, period `2^36-1`) steps on
  `prbs_tick`. The original test set ran it at 307.2 kHz.
- On each data bit (`bit_tick`), the data bit is inverted if the newest `pat_len` sequence bits
  are all ones. This gives an isolated error with probability `2^-pat_len`.
- If three further sequence bits are also all ones, which happens one time in eight, a burst
  starts instead. A burst inverts `burst_len` consecutive data bits (1 to 64).
- `dout = din ^ err` is combinational.

## Top level (`fec_codec`)

The top holds the hardwired encoder and decoder, the processor interface ports and the burst
error generator, side by side with separate ports. The channel (modem, radio, satellite) lies
outside, between `enc_chan_*` and `dec_chan_*`.

| group | ports |
|-------|-------|
| common | `clk`, `rst_n` (asynchronous, active low), `beta_sel[1:0]`, `pdly_en` |
| encoder | in: `enc_info_tick`, `enc_data_in`, `enc_sem_in`; out: `enc_chan_tick`, `enc_chan_data`, `enc_sem_out`, `enc_pll_locked` |
| decoder | in: `dec_chan_tick`, `dec_chan_data`, `dec_sem_in`; out: `dec_out_tick`, `dec_out_data`, `dec_out_sem`, `dec_phase`, `dec_resync`, `dec_corr` |
| processor ports | `mp_ei_*` and `mp_di_*` (byte inputs), `mp_eo_*` (encoder output), `mp_do_*` (decoder output) |
| burst generator | `beg_prbs_tick`, `beg_bit_tick`, `beg_din`, `beg_pat_len[4:0]`, `beg_burst_len[6:0]`, `beg_burst_en`, `beg_dout`, `beg_err`, `beg_in_burst` |

Timing rules:

- Data inputs are sampled on their strobe.
- Registered outputs change only on their strobe and hold until the next one.
- `enc_info_tick` must recur at a steady period. `enc_chan_tick` is derived from it.
- `dec_chan_tick` comes from the receiver's bit clock.
- The system clock must be much faster than the bit strobes. The testbenches use 8 or more
  system clocks per channel bit; nothing slower has been tested.

Parameters: `SYNC_WINDOW = 50` and `SYNC_THRESH = 4` (synchronizer window and threshold).
Lower blocks also have `BMAX = 16` (largest β) and `WINDOW` / `THRESH`.

## Where this design departs from the original hardware, and what it assumes

- **One system clock.** The original boards used separate 1.2 and 2.4 kHz clocks and a PLL.
  Here those clocks are strobes, and the PLL is a digital clock doubler.
- **Two decoders instead of one shared register.** The original decoded both phases with one
  syndrome register clocked at the channel rate, the two phases interleaved. Two half-rate
  decoders hold the same information and behave the same.
- **Synchronizer rule.** The hardware description says "lock on the stream with fewer errors,
  threshold 4 in 50". The software version says "act on 4 errors, provided the other stream has
  fewer than 4". The rule used here is the second one, with a 50-bit window. Errors are counted
  as decoder corrections.
- **Message framing details.** Not specified in the original, chosen here:
  - the order of the information and parity slots;
  - the extra zero slot with the parity delay;
  - the forced idle period after each message;
  - dropping input during the zero fill;
  - restarting the synchronizer on phase 0 for every message.
- **Burst generator details.** Chosen here: the feedback polynomial, the all-ones patterns, and
  which sequence bits form the second pattern.
- **Processor ports.** Chosen here: the bit order, the interrupt timing, the overrun flag, and
  the position of the information bits in the decoder output byte.
- **Reset.** Every register has an asynchronous reset. The original does not describe reset.
- **Not included.** The microprocessor and its software, the modem, and the channel.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the block against an
independent model. `tb/fec_ref_pkg.sv` holds a reference encoder written straight from the
parity equation.

| testbench | what it checks |
|-----------|----------------|
| `tb_diffuse_parity_gen` | parity against the equation, every β |
| `tb_clock_doubler` | doubled strobe spacing and lock, period changes |
| `tb_fec_encoder` | channel stream, zero fill, S/E MESS, idle period, parity delay, every β |
| `tb_threshold_logic` | all 32 input patterns |
| `tb_syndrome_decoder` | clean data, single and double errors, three-error patterns, `2β` bursts, every β |
| `tb_bit_synchronizer` | switch and no-switch cases of the window rule |
| `tb_freq_divider`, `tb_sync_delay`, `tb_dec_msg_logic` | strobe phases, 50-bit delay and phase switch, valid tagging |
| `tb_fec_decoder` | every β with and without the parity delay, isolated errors and bursts, latency, output rate, recovery from a lost channel bit |
| `tb_burst_error_gen` | error positions and burst lengths against a software copy of the sequence |
| `tb_mp_serial_in`, `tb_mp_enc_out`, `tb_mp_dec_out` | byte, control byte, interrupt and back-to-back streaming |
| `tb_fec_codec` | end to end, at default parameters: see below |
| `tb_fec_bursts` | burst-length and random-error workload: see below |

`tb_fec_codec` runs the whole top with no parameter overrides:

- all eight β / delay settings, each with a `2β` burst and isolated errors;
- a random-error run at 1e-2;
- a lost channel bit, which the synchronizer must recover from;
- a 4000-bit message through the burst error generator, at β = 8 with 16-bit bursts;
- a processor-port run: bytes collected from the encoder input port, encoded by a software
  model, sent through the encoder output port, decoded by the hardwired decoder, and looped
  from the decoder input port to the decoder output port.

It counts every mechanism: corrections, phase switches, bursts, generator errors and port
bytes. It fails if any of them never happens, and it checks the overhead of every message.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --top-module tb_fec_codec -y rtl -y tb +libext+.sv \
    rtl/fec_pkg.sv tb/fec_ref_pkg.sv tb/tb_fec_codec.sv
./obj_dir/Vtb_fec_codec
```

Each testbench ends with `TB_RESULT checks=<n> failures=<m>`. The full end-to-end run takes
well under a second.

`tb_fec_bursts` repeats the bench tests of the original codec on a smaller scale. It connects
encoder, burst error generator and decoder, with the generator stepping 128 times per channel
bit. It sends 16000-bit messages with about one error event per 512 channel bits, and one event
in eight is a burst. Results at the default seed:

| β  | burst | channel errors | decoded errors |
|----|-------|----------------|----------------|
| 8  | 4     | 96             | 0              |
| 8  | 8     | 124            | 18             |
| 8  | 12    | 178            | 0              |
| 8  | 16    | 192            | 1              |
| 8  | 20    | 225            | 136            |
| 12 | 16    | 161            | 0              |
| 12 | 20    | 241            | 15             |
| 16 | 16    | 150            | 0              |
| 16 | 20    | 175            | 0              |

Bursts up to `2β` are corrected. The few errors that remain come from events that fell inside
another event's guard space; the testbench counts those. At β = 8, 20-bit bursts are beyond
the code and most of their errors get through. The testbench requires:

- a gain of at least 5 in error count for bursts up to `2β`;
- less gain than that beyond `2β`.

A final run uses random errors only, at p = 0.031 per channel bit. It gives a decoded error
rate of 3.0e-3. The figure expected for this code on a random-error channel is about 166·p³,
here 5.0e-3. The testbench accepts a factor of three either way.

Not simulated: the full bit-error-rate curves (against noise, with the burst generator, and on a
channel simulator). They would need millions of bits per point.
