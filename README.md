# Reconfigurable radix-2 FFT processor

A fast Fourier transform accelerator core for a system-on-chip, whose transform size can be
changed from one transform to the next: 16, 32, 64, 128, 256, 512 or 1024 complex points. It
computes in place with one radix-2 butterfly unit and issues one butterfly per clock. The
data sit in two banks of small memory modules, and the modules a smaller transform does not
need are switched off to save power. Samples, coefficients and results are signed 16-bit
fixed-point numbers with 10 fractional bits (Q5.10: range -32.0 .. +31.999, step 1/1024).

The processor is built from six kinds of blocks:

| block | module | what it does |
|---|---|---|
| control block | `fft_control` | butterfly and pass counters, sequencing, handshakes, enables |
| address generation block (data) | `fft_agb_data` | operand addresses of each butterfly |
| address generation block (coefficients) | `fft_agb_coef` | coefficient address of each butterfly |
| address switch (AS) | `fft_addr_switch` | sends each operand address to the bank holding it |
| data memory cluster (DMC), two of them | `fft_dmc` | 64 modules x 8 words x 32 bits each |
| coefficient memory cluster (CMC) | `fft_cmc` | 64 modules x 8 coefficients |
| data switch (DS) | `fft_data_switch` | puts bank outputs in operand order and results back into their banks |
| butterfly block (BB) | `fft_butterfly` | `x1 = a + w*b`, `x2 = a - w*b` |

`fft_top` wires them together. `fft_switch` (the two-way crossbar used inside AS and DS),
`fft_mem_module` (one 8 x 32 memory module) and `fft_pkg` (shared types and constants) are the
building blocks below them.

## Data flow of one transform

```
            +--> AGB (data) --> address switch --+--> DMC0 --+
 control ---+                                    +--> DMC1 --+--> data switch (read side)
  block     +--> AGB (coef) --> CMC ---------------------W--------> butterfly
            |                                                          |
            +--> data switch / address switch config bit cb   data switch (write side)
                                                              --> back into DMC0 / DMC1
```

A transform has three phases.

1. **Load.** The core asks for N samples, one at a time, in natural order. Sample `i` is
   stored at address `bitrev_n(i)`, the bit-reversed order that an in-place
   decimation-in-time FFT wants at its input.
2. **Passes.** `n = log2(N)` passes of `N/2` butterflies each, one butterfly per clock, all
   reading and writing the same two banks in place. After each pass the control block stalls
   for 2 clocks until the last results of the pass have been written.
3. **Read-out.** The N results are handed out in natural frequency order, `X[0]` first.

## Addressing: how two operands are read in one clock

This is the part that makes the design work, and it is the least obvious.

**Operand addresses.** For butterfly `b` (0 .. N/2-1) of pass `p` (0 .. n-1) the two operands
are at the n-bit addresses

```
fa = rotl_n(2*b,     p)
fb = rotl_n(2*b + 1, p)          (rotl_n: rotate left within n bits)
```

`fa` and `fb` differ only in bit `p`, so the operand distance is 1, 2, 4, ... in successive
passes, and within one pass every address is touched exactly once.

**Coefficient address.** Butterfly `b` of pass `p` needs `W^k`, with `W = exp(-2*pi*i/N)`,
where `k` is `b` with its `n-1-p` least significant bits cleared. In the first pass every
butterfly uses `W^0 = 1`; in the last pass `k = b`. Under the rotated addressing above this is
exactly the decimation-in-time twiddle exponent: `k = (fa mod 2^p) * N / 2^(p+1)`.

**Banks.** A 1024-point transform needs 1024 words but each DMC holds 512. An address is
split over the two DMCs by its *parity* (the XOR of all its bits): parity 0 goes to DMC0,
parity 1 to DMC1, and the word inside the bank is `address >> 1` (9 bits). Because `fa` and
`fb` differ in exactly one bit, their parities always differ: the two operands of every
butterfly are in different banks, and both are read in the same clock through the two read
ports. Rotation keeps parity, so operand A is in bank `parity(b)`. The control block
computes this bit, `cb = XOR of the bits of b`, and gives it to the switches:

* `cb = 0`: operand A in DMC0, operand B in DMC1; the switches pass straight through.
* `cb = 1`: operand A in DMC1, operand B in DMC0; the switches cross.

The address switch crosses the two 9-bit addresses on their way to the banks. The read side
of the data switch crosses the bank outputs back into operand order. The write side crosses
the results `x1` and `x2` so that each goes back into the bank and word its operand came from.
Bit reversal also keeps parity, so the load and read-out phases use the same rule.

## Pipeline and timing

```
clock t     control issues butterfly b: addresses, cb, read enables
clock t+1   operands (DMC) and coefficient (CMC) arrive; butterfly computes;
            the data switch registers the crossed results
clock t+2   results written back (write addresses = read addresses of clock t)
```

The address switch delays the switched addresses by two clocks to produce the write
addresses. Within a pass no butterfly reads what another writes. Across passes they do, so
the control block inserts 2 stall clocks after each pass. The butterfly passes of an N-point
transform therefore take exactly `n * (N/2 + 2)` clocks:

| N | 16 | 32 | 64 | 128 | 256 | 512 | 1024 |
|---|---|---|---|---|---|---|---|
| pass clocks | 40 | 90 | 204 | 462 | 1040 | 2322 | 5140 |
| published budget, `(n+1)*N/2` | 40 | 96 | 224 | 512 | 1152 | 2560 | 5632 |

The budget row is what the published energy and power per transform work out to at 20 MHz.
Load and read-out add at least four clocks per sample each, because the handshakes below are
completed in four phases.

## Interfaces (`fft_top`)

**Configuration.** Set `cfg_log2n` (4 .. 10). While the core is idle its value also selects
which coefficient modules are switched on. Then write the coefficient table through
`coef_we`, `coef_addr`, `coef_re` and `coef_im`: entry `k` holds `exp(-2*pi*i*k/N)` in Q5.10,
for `k = 0 .. N/2-1`. Real part is `round(1024*cos(2*pi*k/N))` and imaginary part is
`round(-1024*sin(2*pi*k/N))`. Writes are ignored while `busy`. The table must be rewritten
when the size changes. Pulse `start` for one clock. `busy` stays high until the last result
has been taken; `done` pulses once after that.

**Input (source) handshake.** The core raises `data_req`. The source puts a sample on
`in_re`/`in_im` and raises `data_valid`. The core takes the sample and drops `data_req`. The
source then drops `data_valid`, and only after that does the core ask again.

**Output (sink) handshake.** The core puts a result on `out_re`/`out_im` and raises
`data_ready`. The sink takes it and raises `data_ack`. The core drops `data_ready`, the sink
drops `data_ack`, and the next result follows.

**Status.** `dmm_on0`, `dmm_on1` and `cmm_on` show which of the 64 modules of each cluster are
switched on: for N points, modules `0 .. N/16-1`. `ovf` is set when a butterfly output was
clipped during the current transform.

## Arithmetic

The butterfly forms `t = w*b` with four 16 x 16 multipliers, one subtractor and one adder.
It drops the 10 extra fractional bits by an arithmetic shift, which truncates towards minus
infinity. It then forms `a + t` and `a - t` and saturates each part to 16 bits. There is no
scaling between passes: a transform whose spectrum exceeds the Q5.10 range saturates, and
`ovf` reports it. Keep the input amplitude below about `32/N` for a full-scale single tone,
or lower for broadband input. The truncation error grows at most linearly with N; on random
data it stays within `2N` LSB (summed over real and imaginary parts) of an exact DFT.

## Memories and power switching

Each memory module (`fft_mem_module`) is 8 words x 32 bits with one write and one read port.
The read is synchronous. A simultaneous read and write of one word returns the old word.
When switched off, a module ignores accesses and clears its read register. A cluster
decodes address bits [8:3] to pick the module, and only that module sees the enable. The
rest stay idle. A module beyond the current size (`m >= N/16`) is switched off for the whole
transform. The CMC is built the same way.

## Departures and open points

* **Algorithm.** The design is described in one place as decimation in frequency. Its
  butterfly multiplies one input by the coefficient *before* the add/subtract, and its
  coefficient rule gives decimation-in-time exponents. This RTL is decimation in time, with
  a bit-reversed load and natural-order results.
* **Largest size.** 1024 points: two 512-word data banks, a 512-coefficient table and 9-bit
  in-bank addresses. 2048 and 4096 points, which appear in published figures for the
  architecture, would need twice and four times the memory. `LOG2N_MAX` is the parameter,
  but the bank module counts follow it, so larger sizes mean larger clusters, not the
  64 x 8 organisation.
* **Butterfly drawing.** The published data-path drawing of the butterfly feeds the second
  pair of multipliers with (real x real, imaginary x imaginary). It also marks both real
  outputs with a subtraction and both imaginary outputs with an addition. Taken literally that
  is not a complex butterfly; the RTL uses the standard complex product and `a +/- t`.
* **Memory combining.** The modules are combined by a plain decoder and output multiplexer.
  Configurable aspect ratios and pairwise glue logic in the style of FPGA embedded-memory
  arrays are not modelled.
* **Choices made here:** parity banking, the rotated address rule, the 2-clock
  pipeline and drain stall, the coefficient load port, four-phase completion of both
  handshakes, `start`/`busy`/`done`, truncation, saturation and `ovf`, and switching off
  unused coefficient modules as well as data modules.
* **Not included:** the processor platform the core is meant to sit in (SPARC V8 integer
  unit, caches, FPU, AMBA AHB/APB buses and their bridge, memory controller, peripherals)
  and any bus wrapper for the core. The core's handshake and coefficient ports are brought
  out directly.

## Simulating

Every block has a self-checking testbench in `tb/`, named `<module>_tb`. Each prints
`TB_RESULT checks=N failures=M` and stops on a watchdog if it hangs. `fft_top_tb` runs
the whole processor at its default parameters. It runs every size from 16 to 1024 points with
random source and sink delays. It compares every result bit-exactly with a textbook
fixed-point FFT and, more loosely, with a floating-point DFT. It checks the clock count of
the passes and forces saturation once. With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module fft_top_tb \
    rtl/fft_pkg.sv rtl/*.sv tb/fft_top_tb.sv
./obj_dir/Vfft_top_tb
```

The same command with another `<module>_tb` runs a block's own test. The whole-processor test
takes well under a second.
