# Scheduled Dataflow processor in SystemVerilog

A dataflow machine normally decides at run time which instruction may fire
next, which costs the same kind of matching and issue hardware that an
out-of-order superscalar spends on its reservation stations. Scheduled
Dataflow (SDF) keeps the dataflow program model and drops that hardware. A
program is a set of short **nonblocking threads**. Inside a thread every
instruction writes its result straight into the registers reserved for the
instructions that consume it, so there are no false (WAR/WAW) dependences, and
the compiler fixes the order in which the thread's instructions run. The only
dynamic scheduling left is at thread granularity: a thread becomes runnable
when all of its inputs have arrived in its frame.

The second idea is that **memory access is taken out of the execution
pipeline altogether**. Each thread runs in three phases on two different
pipelines:

1. **Preload** on the Synchronization Pipeline (SP): copy the thread's inputs
   from its frame in memory into a private register set.
2. **Execute** on the Execution Pipeline (EP): compute on registers only. The
   EP never touches data memory and so never waits for it.
3. **Poststore** on the SP: store the results into the frames of the consumer
   threads. Each such store counts down the consumer's synchronization count.

The SP and EP work on different threads at the same time, so memory traffic
overlaps with computation. This repository implements the processor with one
SP and one EP, the Scheduling Unit between them, the register sets, a
dual-ported instruction memory and a frame memory. The frame memory has
one-cycle access, the "perfect cache" the design was evaluated with.

## Threads and continuations

A thread is tracked by its **continuation** `<FP, IP, RS, SC>`:

| field | meaning |
|-------|---------|
| FP | frame pointer: word address of the thread's frame, which holds its inputs |
| IP | instruction pointer of the code to run next |
| RS | register set the thread owns while it is enabled |
| SC | synchronization count: the number of inputs still missing |

A continuation passes through four states. The Scheduling Unit (`sdf_su`)
moves it from one state to the next:

```
 FALLOC ──► WTC <FP,IP,-,SC>   waits in the SU until SC reaches 0
              │ last STORE into its frame; a register set is taken from the ring
              ▼
            PLC <FP,IP,RS,->   PLC queue ──► SP runs the preload code
              │ FORKEP (4 cycles)
              ▼
            EXC <-,IP,RS,->    EXC queue ──► EP runs the thread body
              │ FORKSP (4 cycles)
              ▼
            PSC <-,IP,RS,->    PSC queue ──► SP runs the poststore code
              │ FFREE returns the frame, STOP returns the register set
              ▼
           (gone)
```

The IP changes along the way. A FORKEP or FORKSP instruction names the code of
the next phase, and that target becomes the IP of the continuation it pushes.

### Frames

Frames have a fixed size (`FRAME_WORDS` = 16 words). Frame *i* starts at word
address `i * FRAME_WORDS`, and that address is the thread's FP. The indices
of free frames are kept on a stack (`sdf_frame_stack`). FALLOC pops one and
FFREE pushes one back, so each takes a single stack operation. The SU keeps a
small waiting table indexed by frame number, holding the IP, the SC and an
"allocated" bit. Every STORE the SP performs is reported to the SU with its
address. The SU takes the frame number from the address
(`addr / FRAME_WORDS`) and decrements that frame's count. A STORE into a frame
that is not allocated, or whose count is already zero, changes only memory.

### Register sets

`NUM_RS` register sets of 32 registers each (`sdf_regsets`) are handed out in
ring order (`sdf_rs_ring`). A thread gets a set when its count reaches zero
and gives it back when its poststore code executes STOP. If no set is free,
the enabled thread waits in a FIFO inside the SU (status output `rs_wait`).
That FIFO holds `NUM_FRAMES` entries, so it can never overflow. R0 reads as
zero. When a preload starts, the SP writes the thread's frame pointer into
**R1** (the "RFP" register), so preload code can address the frame as
`R1|offset`.

## A worked example

The thread below computes `(X+Y)*(A+B)` and `(X-Y)/(A+B)` and sends the two
results to two other threads. Its frame holds A, B, X and Y at offsets 2-5.
Offsets 6-9 hold the frame pointer and offset of each destination.

```
preload (SP)    LOAD R1|2 -> R2   ... LOAD R1|9 -> R9    ; A B X Y, two destinations
                FORKEP body
body (EP)       ADD  RR2  -> R11, R13                    ; A+B, to both consumers
                ADD  RR4  -> R10                         ; X+Y
                SUB  RR4  -> R12                         ; X-Y
                MULT RR10 -> R14                         ; (X+Y)*(A+B)
                DIV  RR12 -> R15                         ; (X-Y)/(A+B)
                FORKSP post
post (SP)       STORE R14 -> R6|R7
                STORE R15 -> R8|R9                       ; each counts down a consumer
                FFREE R1
                STOP
```

`RR2` names the register pair R2, R3. Each result is written straight into
the pair slot of the instruction that consumes it, so the body needs no
renaming. On the EP the body takes 9 cycles. That counts from taking the
EXC continuation to pushing the PSC continuation, fork included.

## The two pipelines

### Execution Pipeline (`sdf_ep`): IF, DE, EX, WB

- **IF** fetches from the EP port of the instruction memory.
- **DE** reads the source register pair `RR(rs) = R[rs], R[rs+1]`.
- **EX** runs the ALU (`sdf_alu`): add, subtract, multiply, signed divide,
  and/or/xor, set-less-than and shifts.
- **WB** writes the result to `rd1` and, optionally, also to `rd2`. One
  instruction can feed two consumers, as in `ADD RR2, R11, R13`.

The compiler orders the instructions. On top of that, the EP forwards results
from EX and WB into DE, so a thread gets the right values whatever the
distance between dependent instructions. BEQZ, BNEZ and JMP resolve in DE.
There is no prediction, and a taken branch costs one bubble. FORKSP ends the
thread. Fetch stops, and four cycles later the PSC continuation enters its
queue. If that queue is full the EP holds (`ep_fork_stall`). The EP takes
the next EXC continuation as soon as the fork has completed.

### Synchronization Pipeline (`sdf_sp`): IF, DE, EA, MEM, WB

- **DE** reads the base, offset and value registers.
- **EA** forms `R[base] + R[offset]` or `R[base] + imm`. This is the
  `Rfp|offset` form: register offsets as in `STORE R14, R6|R7` and literal
  offsets as in `LOAD RFP|2, R2` are both encoded.
- **MEM** accesses the frame memory. A STORE also counts down the consumer's
  SC in the same cycle. FALLOC and FFREE hold MEM for two cycles.
- **WB** writes LOAD data, or the new frame pointer of a FALLOC, into the
  register set.

A LOAD or FALLOC result is not ready until WB. A dependent instruction in DE
therefore stalls while the producer is in EA or MEM (`sp_hazard`), and gets
the value forwarded once it is in WB (`sp_bypass`). FALLOC waits in MEM while
no frame is free (`sp_alloc_wait`).

When it is free, the SP serves a poststore (PSC) continuation before a preload
(PLC) one. Finishing threads releases frames and register sets, which is what
lets waiting threads proceed. FORKEP ends a preload and STOP ends a
poststore. Each takes four cycles and first waits for EA and MEM to drain.

### Instruction memory

`sdf_imem` has one read port for each pipeline and a write port for loading
programs. Reads are synchronous.

## Instruction encoding

All instructions are 32 bits. The opcodes and field layout are defined in
`rtl/sdf_pkg.sv`, which also provides encoder functions (`enc_alu`, `enc_br`,
`enc_ldst`, `enc_falloc`) that the testbenches use as a small assembler.

| format | fields (bit 31 first) | instructions |
|--------|-----------------------|--------------|
| ALU | `op[31:26] rs[25:21] rd1[20:16] rd2[15:11] d2v[10] imm[9:0]` | ADD SUB MULT DIV AND OR XOR SLT SHL SHR (operand pair `R[rs],R[rs+1]`); ADDI MOVI MOV |
| branch | `op rs target[15:0]` | BEQZ BNEZ JMP (EP) |
| fork | `op target[15:0]` | FORKSP (EP), FORKEP (SP) |
| load/store | `op rb rv ro[15:11] m[10] imm[9:0]` | LOAD, STORE (SP); address `R[rb] + (m ? R[ro] : imm)` |
| FALLOC | `op rd sc[20:16] ip[15:0]` | new frame pointer into `rd` |
| FFREE / STOP | `op rb` / `op` | SP only |

Each pipeline treats the other pipeline's opcodes as NOPs.

## Top level and host interface (`sdf_top`)

| port group | use |
|------------|-----|
| `imem_we/waddr/wdata` | load the program |
| `host_mem_*` | read and write the frame memory (a second port, synchronous read) |
| `host_falloc_req/ip/sc` → `host_falloc_gnt`, `falloc_fp` | create a thread from outside |
| `host_sync/host_sync_addr` | count an input that the host wrote into a frame |
| `host_ready` | the SU accepts host FALLOC/sync only in cycles without an SP request |
| `idle` | no thread is queued, running or draining |
| `frames_free`, `rs_free`, `rs_wait` | resource status |
| `ep_*`, `sp_*` | event counters: instructions, threads, bypasses, branches, stalls |

A typical run goes like this:

1. Write the program into the instruction memory.
2. FALLOC the first threads through the host port.
3. Write their inputs into the frames.
4. Pulse `host_sync` once per input.
5. Wait for `idle`.
6. Read the results from the frame memory.

Reset is asynchronous and active low. It clears all control state: queues,
pipelines, the frame stack (all frames free) and the register ring (all sets
free). The contents of the memory arrays are not reset.

### Parameters

| parameter | default | where |
|-----------|---------|-------|
| `NUM_RS` | 16 | register sets |
| `NUM_FRAMES` | 256 | frames |
| `FRAME_WORDS` | 16 | words per frame |
| `IMEM_DEPTH` | 1024 | instruction words |
| `QDEPTH` | 8 | depth of the PLC, EXC and PSC queues |
| `XLEN`, `NREGS`, `IP_W`, `SC_W` | 32, 32, 16, 5 | package constants |
| `FORK_CYCLES`, `ALLOC_CYCLES` | 4, 2 | pipeline parameters |

Only the two latencies come from the SDF description: FORKEP/FORKSP take
four cycles and FALLOC/FFREE take two. It gives no sizes, so all the others
are choices made here. `NUM_FRAMES` = 256 is enough for the recursive
Fibonacci test up to fib(10), which has up to 135 frames live at once.

## What follows the SDF description and what does not

Taken from the description:

- the continuation states and their transitions;
- preload, execute and poststore split across SP and EP;
- the EP's four stages and the SP's five stages;
- a frame stack popped by FALLOC and pushed by FFREE;
- synchronization counts decremented by poststores;
- register sets handed out in ring order;
- a dual-ported instruction memory;
- one-cycle memory;
- the FALLOC/FFREE and FORK latencies.

Choices made here:

- the instruction encoding and the extra instructions (MOVI, ADDI, MOV, logic
  ops, SLT, shifts, branches, STOP);
- R1 as the frame-pointer register;
- the forwarding paths and the SP interlock;
- PSC-before-PLC priority;
- the FIFO of threads that wait for a register set;
- the waiting table inside the SU;
- the host ports.

The description says LOAD/STORE take frame pointer and offset from registers,
while its own preload example uses literal offsets. Both forms are supported.

Not built:

- **I-structure (array) memory.** Arrays would live there, but no structure
  is specified for it. Threads can only exchange data through the frame
  memory. Small arrays can be parked in frame words that no thread is given,
  as the matrix-multiply and FFT tests do. The published matrix-multiply and
  zoom sizes, and FFTs above 64 points, do not fit that way.
- **Several SPs and EPs sharing one Scheduling Unit.** Only the one-SP,
  one-EP machine is built.
- **Branch prediction.** There is none, as in the original design.

Cycle counts of this RTL are not comparable with the published simulator
figures. Programs, encoding and forwarding differ, and the recursive
Fibonacci here is a program written for these tests.

## Testbenches

Every block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_sdf_alu` | all ALU operations against a reference model, random operands |
| `tb_sdf_cont_fifo`, `tb_sdf_frame_stack`, `tb_sdf_rs_ring` | random push/pop against queue, stack and ring models, full/empty |
| `tb_sdf_regsets`, `tb_sdf_imem`, `tb_sdf_frame_mem` | random traffic against array models, R0, port independence |
| `tb_sdf_su` | FALLOC, counting down, enable latency, waiting for a register set, FORK queues, FFREE/STOP |
| `tb_sdf_ep` | the worked example thread (`(X+Y)*(A+B)`, `(X-Y)/(A+B)`) with its 9-cycle thread latency; a loop with branches and forwarding; fork stall on a full PSC queue |
| `tb_sdf_sp` | preload and poststore of the same example, FORKEP latency, interlock, alloc wait with no free frame, PSC priority |
| `tb_sdf_top` | end to end: 8 parent threads each create a child that runs the example; `NUM_RS=4`, `QDEPTH=1`, so threads wait for register sets and FORKSP waits for a full poststore queue. Checks results, returned frames and register sets, instruction and thread counts, and that every counted mechanism occurred |
| `tb_sdf_top_full` | the same program with every parameter at its default |
| `tb_sdf_matmul` | matrix multiply for N = 4 and 8, one thread per element of C; the host places the matrices in unused frame-memory words because there is no array memory |
| `tb_sdf_fft` | radix-2 FFT of 8, 16, 32 and 64 integer points as a dataflow graph of butterfly threads, against an integer reference that does the same steps |
| `tb_sdf_fib` | recursive Fibonacci, one thread per call plus a join thread, for n = 5, 8, 10 at the defaults |

`tb_sdf_harness.sv` holds the end-to-end test body shared by the two top
testbenches.

Measured results:

- The 8 pairs finish in 427 cycles after the first input.
- fib(5) takes 515 cycles and 22 threads.
- fib(8) takes 2,205 cycles and 100 threads.
- fib(10) takes 5,780 cycles and 265 threads.
- Matrix multiply takes 382 cycles for 4*4 (16 threads) and 2,006 cycles for
  8*8 (64 threads). Both counts include the host creating the threads one at
  a time.
- FFT takes 514, 1,314, 3,234 and 7,714 cycles for 8, 16, 32 and 64 points
  (12 to 192 butterfly threads), again including the host's setup.

With Verilator 5 and the repository root as working directory:

```
verilator --binary --timing --assert -Irtl -Itb rtl/sdf_pkg.sv tb/tb_sdf_top.sv --top-module tb_sdf_top
./obj_dir/Vtb_sdf_top
```

Replace `tb_sdf_top` with any testbench name. The block testbenches need only
`rtl/sdf_pkg.sv` and the testbench file on the command line, because the
modules they use are found through `-Irtl`.
