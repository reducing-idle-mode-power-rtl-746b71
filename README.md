# Idle mode processor for a software defined radio terminal

A radio terminal spends most of its life in idle mode. It wakes up briefly to
search for cells, synchronise and read control messages, and sleeps the rest
of the time. The signal processing in those short awake periods is dominated by
one kernel, the FIR filter, in two flavours:

* pulse shaping: `y[n] = sum_{i<L} c_i * x[n+i]` with arbitrary coefficients;
* matched filtering against a synchronisation code of +1/-1 chips, where each
  multiply collapses to a conditional negation.

The rest of the work is small and sequential. The largest piece is the
sliding-window autocorrelation that detects a frame preamble.

This RTL implements the processor architecture proposed in the paper "Reducing
Idle Mode Power in Software Defined Radio Terminals". The processor is built
for this workload and nothing more:

* a **32-lane SIMD unit** that produces one 32-tap FIR output per clock;
* a small **scalar unit** with a multiply-accumulate (MAC) and an iterative
  divider for the sequential work;
* a **control unit** with hardware address generators and a hardware loop
  counter, so the whole FIR inner loop is one instruction;
* a **memory unit** of 100 Kbytes of data and 100 Kbytes of program, split
  into single-port sub-banks;
* an **AMBA APB client** as the system bus interface.

The goal is to do the idle-mode work at a low clock rate, which saves power.
The paper reports about 9 mW at 50 MHz and 1.08 V in 0.13 um. The paper fixes
the block structure, the SIMD width, the direct-form datapath, the three SIMD
pipeline stages and the memory sizes. The instruction set, the encodings, the
bank size, the bus address map and most widths are this implementation's own
choices. They are marked as such below.

## Block diagram

```
            +--------------------------------------------+
            |                 simd_unit                  |
            |  VR1/VR2 -> V.Mult/V.Comp -> V.Reduction   |
            +------+---------------------------+---------+
      read (AR1++) |  write (AR2++)            | issue, op, AR2
            +------v---------------+    +------+--------------+    +-----------+
            |  data_mem            |<---+  control_unit       |<-->|  bus_if   |<--> APB
            |  25 x 1K x 32 banks  |    |  PC, decoder,       |    |  (APB     |
            |  3 ports, per-bank   |<---+  agu, loop_ctrl     |    |   client) |
            |  arbitration         |    +------+--------------+    +-----+-----+
            +------^---------------+           | ctl / operands        |
                   |  bus port          +------v------+                |
                   +--------------------+ scalar_unit |  inst_mem <----+ (program load)
                                        +-------------+
```

`idle_mode_proc` is the top. Its ports are the clock, an active-low
asynchronous reset, an APB slave port (`psel penable pwrite paddr[19:0]
pwdata prdata pready pslverr`) and `irq`. `irq` goes high when the program
executes HALT.

## How an FIR filter runs

The C loop nest

```
for (n = 0; n < N; n++)  for (i = 0; i < 32; i++)  y[n] += c[i] * x[n+i];
```

becomes three hardware loops. Each loop is a single instruction repeated by the
loop counter:

```
      SETAR  AR0, r0, #coef      ; coefficients
      ADDI   r1, r0, #32
      LOOP   r1
      VSH2   (AR0)+        |L    ; 32 x: shift one coefficient into VR2
      SETAR  AR1, r0, #x
      ADDI   r1, r0, #31
      LOOP   r1
      VSH1   (AR1)+        |L    ; 31 x: prefill the delay line VR1
      SETAR  AR2, r0, #y
      ADDI   r1, r0, #N
      LOOP   r1
      VFIR   (AR2)+ <- (AR1)+ |L ; N x: one output per cycle
```

`VFIR` is the fused instruction. It reads the next sample at `AR1` and
shifts it into VR1. It multiplies all 32 lanes of VR1 by VR2 and adds the 32
products. It writes the sum to `AR2`. Both address registers are
post-incremented. The `|L` flag decrements the loop counter and jumps back while
it is not zero. The loop runs at one instruction per cycle with no branch
overhead.

Lane order: every shift moves lane i+1 into lane i, and the new value enters
lane 31. After the shift for output n, VR1 lane i holds `x[n+i]`. VR2 lane i
holds `c[i]` when the coefficients were shifted in as c[0] first.

With comp mode (`imm[0]` of VFIR) the lanes do not multiply. Each lane passes
x when its coefficient is non-negative and -x when it is negative. This is the
matched filter for a +1/-1 code.

Filters longer than 32 taps are cut into 32-tap chunks. Each chunk is one
pass like the one above. It runs over the input offset by 32·k and writes
its own partial output array. The scalar unit then adds the partial arrays.
A 300-tap filter, the longest in the target workloads, takes ten chunks, the
last padded with zero taps. For 64 outputs it runs in about 3700 cycles.
The ten chunk filters take about 1360 of those cycles. The rest are the scalar
additions, at four instructions per output and chunk.
The datapath is direct form on purpose: there is no vector accumulator. The
paper found the direct form about 20% cheaper in dynamic power than the
transpose form, because the transpose form needs an accumulator.

## SIMD pipeline timing

`simd_unit` has the three stages the paper names:

| stage       | cycle | work                                                                    |
|-------------|-------|-------------------------------------------------------------------------|
| read        | t     | control unit issues; the data memory reads x at AR1                     |
| execution-1 | t+1   | x arrives; VR1 (or VR2) shifts; 32 multiplies or negations into the product register |
| execution-2 | t+2   | adder tree reduces; saturate to 32 bits; write y at AR2 (captured at t) |

A VFIR issued in cycle t writes its result at the clock edge that ends cycle
t+2. A new VFIR can issue every cycle. Shift and multiply are chained inside
execution-1, and reduction and write inside execution-2. No intermediate vector
ever goes through a register file. There are no dependencies inside the pipe,
so it needs no forwarding and never stalls itself.

Samples and coefficients are the low 16 bits of a 32-bit memory word,
signed. The tree keeps 37 bits and saturates the result to 32.

## Memory banks and the stalls they cause

Both memories have 25 banks of 1024 32-bit words, 102400 bytes each. Bits
[14:10] of the word address select the bank. An access switches only the bank
it addresses. Every bank has a single port.

The data memory has three requesters, arbitrated per bank with fixed priority:

1. the SIMD execution-2 write, always served;
2. the issue stage: scalar LD/ST, or the SIMD operand read;
3. the APB bus.

Requests to different banks proceed in the same cycle. That is why a FIR runs
at full rate when its input and its output buffers sit in different banks. If
they share a bank, the operand read of cycle t+2 collides with the write of
cycle t. The issue stage then loses and holds its instruction for a cycle (a
**bank stall**). The results are still correct, only slower. The end-to-end
test runs the same 64-output filter both ways: 139 cycles with the buffers in
separate banks, 201 cycles in one bank. Keeping the buffers in different banks
is the programmer's job.

Three more interlocks keep the program's view consistent:

* **drain stall**: a scalar LD/ST, or HALT, waits while the SIMD pipe still
  holds operations. Scalar code and the host therefore always see every
  filter output.
* **load bypass**: a load returns its data one cycle later, through a second
  register-file write port. An instruction that reads that register in the
  very next cycle receives the data directly, so loads never stall.
* **divide wait**: DIV and REM are held in the execute stage for 34 cycles
  while the divider works. They then retire and write their result.

The instruction memory is written only over the bus, and only while the
processor is stopped. A write attempted while it runs gets PSLVERR and is
dropped. Data-memory accesses from the bus are allowed at any time. They
insert wait states (PREADY low) until the bank is free.

## Instruction set

Instructions are 32 bits: `op[31:26] L[25] rd[24:21] ra[20:17] rb[16:13]`,
and for immediate forms `imm[16:0]` (signed, overlapping rb). There are 16
scalar registers; r0 reads as zero. There are eight address registers
AR0-AR7, named by the low three bits of `rd` (destination stream) or `ra`
(source stream).

| op | meaning |
|----|---------|
| ADD SUB AND OR XOR SLL SRA MUL | rd = ra op rb (MUL: low 32 bits) |
| ADDI, LUI | rd = ra + imm; rd = imm << 15 |
| MAC, MSU, MTACC, MFACC | acc += ra*rb; acc -= ra*rb; acc = ra; rd = acc |
| DIV, REM | rd = ra / rb, rd = ra % rb (signed; held 34 cycles by the iterative divider; x/0 gives -1 and remainder x) |
| LD | rd = mem[AR(ra)], AR(ra)++ if imm[0] |
| ST | mem[AR(rd)] = rb, AR(rd)++ if imm[0] |
| SETAR, MFAR | AR(rd) = ra + imm; rd = AR(ra) |
| BEQZ, BNEZ, JMP | branch to the absolute address imm |
| LOOP | loop counter = ra, loop start = next instruction |
| VSH1, VSH2 | shift mem[AR(ra)++] into VR1 / VR2 |
| VFIR | mem[AR(rd)++] = sum(VR2 · shift(VR1, mem[AR(ra)++])); imm[0] = comp mode |
| HALT | stop (after the SIMD pipe drains), raise irq |

Any instruction may carry `L`. A count of N runs the loop body N times. The
body may be longer than one instruction: it ends at the instruction that
carries `L`. There is one hardware loop level. Outer loops use BNEZ.

Fetch and execute overlap. The next PC addresses the synchronous instruction
memory directly, so taken branches and loop-backs cost no cycle.
`tb/imp_asm_pkg.sv` has small encoder functions for writing programs.

## Sliding-window detector on the scalar unit

The frame detector computes `y[n] = sum_{i<L} x[n+i]·x[n+i-D]`. Like the
paper, it uses the running update
`y[n] = y[n-1] - P[0,n-1] + P[L-1,n]`. Each new product is stored, and read
back L samples later as the product that leaves the window. With the MAC
holding `y` in its accumulator, one output takes nine instructions in a
hardware loop: three loads, one multiply, one store, MAC, MSU, MFACC and a
store. The end-to-end test runs it with L = D = 16 and checks 48 outputs.

## System bus map (APB, byte addresses)

| address | register |
|---------|----------|
| 0x00000 | CTRL: write bit 0 = 1 starts the program |
| 0x00004 | START_PC: word address of the first instruction |
| 0x00008 | STATUS: bit 0 running, bit 1 done |
| 0x0000C | CYCLES: cycles of the current or last run |
| 0x40000 + 4·i | instruction word i (write only, only while stopped) |
| 0x80000 + 4·i | data word i |

A typical host sequence:

1. write the program and the data;
2. write START_PC, then write 1 to CTRL;
3. wait for `irq`, or poll STATUS;
4. read the results.

## Files

| file | block |
|------|-------|
| `rtl/imp_pkg.sv` | sizes, opcodes, request and decode structs |
| `rtl/idle_mode_proc.sv` | top |
| `rtl/simd_unit.sv`, `simd_vreg.sv`, `simd_vmult.sv`, `simd_vreduce.sv` | SIMD pipeline, VR1/VR2, lane multipliers, adder tree |
| `rtl/control_unit.sv`, `agu.sv`, `loop_ctrl.sv` | PC/decoder/interlocks, address generators, loop counter |
| `rtl/scalar_unit.sv`, `scalar_regs.sv`, `scalar_alu.sv`, `scalar_div.sv` | scalar datapath, register file, ALU with MAC, divider |
| `rtl/data_mem.sv`, `inst_mem.sv`, `mem_bank.sv` | banked memories, single-port sub-bank |
| `rtl/bus_if.sv` | APB client |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/imp_asm_pkg.sv` | instruction encoders for testbench programs |

## Simulating

Every testbench is self-checking. It ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/imp_pkg.sv tb/imp_asm_pkg.sv tb/tb_idle_mode_proc.sv \
    --top-module tb_idle_mode_proc
./obj_dir/Vtb_idle_mode_proc
```

Replace the testbench name to run another one.

`tb_idle_mode_proc` uses the default sizes: 32 lanes and 2 × 100 Kbytes of
memory. It runs seven programs loaded over APB:

* a pulse-shaping FIR, which checks every output and the exact cycle count
  (one output per cycle);
* a complement-mode matched filter while the host polls the output bank;
* the same FIR with a bank conflict;
* a 64-tap filter as two chunks plus a scalar sum;
* the sliding window;
* signed divisions on the scalar unit;
* a 300-tap filter as ten chunks, the last one padded with zero taps. The
  scalar unit adds each chunk's partial outputs into a running sum.

It also counts that each mechanism occurred: loop-back, bank stall, drain
stall, bypass, divide wait, complement mode, bus wait and the refused program
write. It takes a few seconds.

Each unit testbench compares against a model written in the testbench. Each
has been shown to catch a deliberately injected fault in its unit.

## Departures from the paper and open points

* **Instruction set, encodings, widths and bus map are invented here.** The
  paper gives only pseudo assembly. The VFIR instruction corresponds to its
  fused "reduction ← mul ← shift" form.
* **The scalar unit is minimal.** The paper suggests a conventional low-power
  general-purpose processor for the scalar unit. This one is a minimal
  in-order datapath. Its divider is the simplest that works: one quotient bit
  per cycle. The paper names division but says nothing about how it is done.
* **Data distribution over banks is up to software.** The paper says data is
  spread over the sub-banks so that reads and writes can run in parallel. Here
  the banks are contiguous address ranges, and a same-bank collision costs a
  stall rather than an error.
* **Memories are plain arrays.** The original used compiled SRAM macros. For
  synthesis, map `mem_bank` to a single-port SRAM of 1024 × 32.
* **Not modelled:** power, clock gating, dynamic operand precision and
  technology. The paper mentions these only as ways to save more power.
* **Real-time rates are not verified.** The paper's W-CDMA scenario (a 30 ms
  awake period at 50 MHz) does not define its filter sizes or sample counts.
  So whether this implementation meets it cannot be checked. The FIR rate of
  one 32-tap output per cycle matches the paper's SIMD unit.
