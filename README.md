# Hardware interrupt management for a hardware RTOS

In a conventional system an interrupt stops the CPU. The CPU then runs an
interrupt response cycle, saves its context, works out which device
interrupted, and only after that calls a service routine. This design moves
that work into FPGA logic that sits beside a hardware real-time kernel. An
interrupt does not go to the CPU. It turns into a request to the kernel's
hardware task scheduler: "make interrupt task N ready, entry address V". The
service routine is then an ordinary task, scheduled like any other. Context
saving, nesting bookkeeping, stack-pointer switching and the RTOS clock-tick
delay list are all handled in hardware.

The design targets a PowerPC system (Xilinx Virtex-II Pro class) with a
standard interrupt controller, whose registers are ISR, IPR, IER, IAR, SIE,
CIE, IVR and MER. The interrupt controller, the CPU and the scheduler IP
kernel are outside this RTL. Their signals are ports of `int_mgmt_top`.

## System and user interrupts

Every request belongs to one of two classes, and the two are handled in very
different ways:

| class  | sources            | path through the module                                  |
|--------|--------------------|----------------------------------------------------------|
| system | ISR0..ISR3         | task scheduling only: one request to the scheduler       |
| user   | ISR4 (device pins) | response (save, nest) -> scheduling -> return (restore)  |

System interrupts (fault, clock tick, data channel, self-trap) have a single
fixed entry and save nothing, so they go straight to the scheduler on
`sys_req` ("response output 1"). User interrupts come from external devices.
Several devices may share one pin, so these interrupts need the full
treatment. The result of a user interrupt leaves on `usr_req` when the task is
scheduled, and on `ret_*` when it returns ("response output 2").

## Interrupt source Ids (`int_source_mgmt`)

Each request is given an 8-bit *type number*, its Id. The smaller the Id, the
higher the priority.

* The system sources have fixed one-hot type numbers, held in Idreg0..Idreg3.
  These are 1, 2, 4 and 8.
* The user source has the base Idreg4 = 16. A trigger flip-flop fires on the
  rising edge of each gated user request, and an accumulator counts these
  events. The Id is `Idreg4 | accumulator`, so successive user interrupts on
  the same pin get 16, 17, 18, and so on. At most 15 Ids (16..30) are handed
  out. After that the accumulator wraps to 0. The point of this scheme is that
  one pin can serve many interrupt types.

The comparator takes two class masks, `a_mask` (user) and `b_mask` (system).
The defaults in use are `a_mask = 8'h10` and `b_mask = 8'h0F`.
* If a request has a user bit set, it is a user interrupt, even when system
  bits are also set. For example, ISR = 24 gives Id 16.
* Among several system bits, the lowest one wins.

`id` and `id_valid` are registered. They appear one clock after the request
and stay valid while `int_en` and the request are held. `id_new` is a
one-clock pulse for each interrupt. `rst` clears the accumulator. `clr` clears
only the trigger flip-flop and the output.

## Vectors (`int_vector_mgmt`)

The register group IVRreg holds the entry addresses:

* IVRreg0..IVRreg3 hold the system vectors. They are written by index from the
  controller's IVR value.
* IVRreg4 and up hold the user vectors, written *in turn*. Each user write
  goes to the next register, so the n-th user vector belongs to Id 16+n. This
  is the same order in which Ids are handed out. The pointer wraps after 15.

The block also holds two *unified entry* addresses, written with
`wr_entry`: one where every system interrupt task starts, and one where every
user interrupt task starts. A scheduling request carries both addresses:
* `entry` is the unified entry of its class, where the interrupt task begins;
* `vector` is the per-source ISR that the task then calls.

There are two combinational read ports, one for the system path and one for
the user path. Id 1/2/4/8 selects IVRreg0..3, and Id 16+n selects IVRreg4+n.
Any other Id reads 0 with `rd_hit` low.

## Nesting, masking and the stack pointer (`int_nesting`)

This block keeps the IntNesting counter and a small stack of the interrupts
in service, storing each one's Id and priority.

* **Masking.** A user request is accepted only when one of these holds:
  * nothing is in service;
  * its priority number is strictly smaller than that of the interrupt in
    service.
  Otherwise it is masked. Equal priority is masked too.
* **Entry.** Entry pushes the stack, and IntNesting increments.
* **Exit, still nested.** When an exit leaves IntNesting above 0, the
  interrupted ISR resumes and is reported on `cur_id`. The SP stays on the
  interrupt nesting stack, so there is no stack switch.
* **Exit, last level.** When an exit brings IntNesting to 0, the SP switches
  back to the task stack (`task_sp`), and `ret_to_task` pulses for one clock.

While nested, `sp = NEST_SP_BASE - (IntNesting-1) * FRAME_BYTES`. That is one
frame per level, growing down.

## Context frames (`stack_space_mgr`)

The stack space manager holds one frame per nesting level:

* a snapshot of the controller registers ISR, IPR, IER, IAR, IVR and MER,
  saved when a user interrupt is accepted;
* `CPU_WORDS` words that the CPU writes and reads through `data_in`/`wr` and
  `data_out`/`rd`, inside the frame of the interrupt in service.

On return, the frame is read back and given out on `ret_ctx`. SIE and CIE are
write strobes of the controller and hold no state, so they are not saved.

## Control sequence (`int_control`)

Latencies are counted in clocks from `id_new` (or from `isr_done`):

```
system:  id_new --1--> sys_req_valid {id, vector}
user:    id_new --1--> pending register
                 --1--> accept? save frame[level], push    (response)
                 --1--> usr_req_valid {id, vector}          (scheduling)
         isr_done --1--> latched
                 --1--> ret_valid {ret_id, ret_ctx}, pop    (return)
```

* **Pending register.** A user request that is masked waits in a one-entry
  pending register, with `pend_masked` high. It is taken as soon as the
  nesting state accepts it, which is normally after a return. A further user
  request that finds the register full is dropped and counted in
  `lost_count`.
* **Accept and return in the same cycle.** If a pending request becomes
  acceptable in the same cycle as a waiting `isr_done`, the (higher priority)
  request goes first.
* **System requests** are served in any state. They never touch the nesting
  state.
* **Priority input.** A user request's priority comes from the `usr_prio`
  input. The Id cannot serve as the priority: Ids grow with each request, so
  a later user interrupt could never nest over an earlier one.

## Clock tick delay list (`clock_tick_mgmt`)

This block replaces the RTOS's software tick handler. Delayed tasks are kept
in four 8-bit registers, DelayReg0..3, one per task id. The layout is:

```
 7      4 3  2 1  0
[ delay  |prio| id ]     e.g. 53 = 0011_01_01 : delay 3, prio 1, id 1
```

* **Load.** While `rd` is high, the record `{delay_time, prio, id}` is
  captured each clock in the input register TTDelayreg. One clock later it is
  written to DelayReg[id]. A record with delay 0 is not loaded.
* **Timer.** `q` counts 0..TICK_CYCLES-1. `time_en` is high on the last
  count, which gives one tick every 5 clocks. With no task loaded the block is
  dormant: `q` stays at 0 and no ticks occur.
* **Scan at each tick.** A task whose delay is already 0 expires. For that
  cycle:
  * `tick_en` is high;
  * the task is removed;
  * `ready_mask` marks every expiring id;
  * `ready_id`/`ready_prio` name the one with the highest priority (smallest
    prio, then smallest id).

  Every other task's delay is decremented.
* **Cancel.** `cancel`, with `prio` naming the task, sets that task's delay to
  0. The task then expires, with `tick_en`, at the next tick.

So, with four tasks loaded as 64, 53, 74 and 143, the registers read 48, 37,
58 and 127 after one tick. A cancel for priority 2 then turns 58 into 10, and
the next tick raises `tick_en` for task 2. The testbench replays exactly this
sequence.

## Where this RTL departs from or adds to the original description

* **Comparator inputs.** The A/B comparator inputs are implemented as class
  masks. The original waveform shows ISR3 requests receiving user Ids 16-18
  after a reset. That result is reproduced by setting `a_mask = 8'h18`, but
  the default keeps ISR3 as a system source with Id 8, as the text states.
* **Tick period.** The text gives one tick every five clocks, and that is
  what is built. The original waveform's tick counter visibly counts 0..5.
* **Design choices.** The following were not specified and are this design's
  own:
  * the user priority input and the one-entry pending register;
  * all widths of vectors, controller registers and stack pointers (32 bits);
  * nesting depth 15 and frame size 64 bytes;
  * 8 CPU words per frame;
  * all latencies;
  * reset behaviour.
* **Tick requests.** The tick logic's `tick_en` leaves as its own port. It is
  not merged into a system ISR bit, because which of ISR0..3 belongs to which
  of the four named system sources is not specified.
* **Outside this RTL.** The selector by IER[x] and the CIE[x] output belong to
  the scheduler IP kernel. The scheduler, the interrupt controller and the
  CPU are not implemented here.
* **Nesting overflow.** `int_nesting` raises `overflow` if pushed when full.
  The control logic never pushes a full stack, so at the top this output only
  guards against misuse.

## Files

* `rtl/intmgmt_pkg.sv`: shared types, including the Id, the vector, the
  controller register snapshot, the scheduler request and the tick record.
* `rtl/int_source_mgmt.sv`, `rtl/int_vector_mgmt.sv`, `rtl/int_nesting.sv`,
  `rtl/stack_space_mgr.sv`, `rtl/int_control.sv`, `rtl/clock_tick_mgmt.sv`:
  the blocks.
* `rtl/int_mgmt_top.sv`: the whole module.
* `tb/tb_<block>.sv`: one self-checking testbench per block.
* `tb/tb_int_mgmt_top.sv`: the end-to-end test. It runs at the default
  parameters and exercises each mechanism at least once:
  * system and user paths;
  * nesting and masking;
  * a lost request;
  * the stack switch;
  * CPU frame words;
  * ticks, expiry, cancel and the dormant state.
* `tb/tb_workloads.sv`: the two reference scenarios, run through the whole
  module at the default parameters:
  * the interrupt-source sequence: Ids 1, 2, 4, 8, then 16, then 16/17/18
    nested three deep;
  * the four-task clock-tick sequence, with DelayReg values 64/53/74/143,
    then 48/37/58/127, then the cancel.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/intmgmt_pkg.sv tb/tb_int_mgmt_top.sv --top-module tb_int_mgmt_top
./obj_dir/Vtb_int_mgmt_top
```

Replace the testbench name to run any other block. Every testbench finishes in
well under a second.

## Parameters

| module / parameter             | default        | meaning                                   |
|--------------------------------|----------------|-------------------------------------------|
| `USER_IDS` (source, vector)    | 15             | user Ids / user vector registers          |
| `NEST_DEPTH` (nesting, frames) | 15             | nesting levels and context frames         |
| `NEST_SP_BASE`, `FRAME_BYTES`  | 0x1000, 64     | nesting stack addresses                   |
| `CPU_WORDS` (stack manager)    | 8              | CPU words per frame                       |
| `TICK_CYCLES` (clock tick)     | 5              | clocks per clock tick                     |

The tick record widths (2-bit id and priority, 4-bit delay, four tasks) are
fixed in `tick_task_t`. Widening them means changing that struct and the
`4`-entry arrays in `clock_tick_mgmt`. All logic uses a single clock and a
synchronous, active-high reset.
