// intmgmt_pkg: types and constants shared by the interrupt management blocks.
//
// The interrupt source Id is an 8-bit type number. The four system sources
// ISR0..ISR3 have the one-hot type numbers held in Idreg0..Idreg3 (1, 2, 4, 8);
// the user source ISR4 has the base Idreg4 = 16 and successive user interrupts
// get 16, 17, 18, ... by OR-ing a 4-bit accumulator into it. At most 15 user
// interrupts are supported. A smaller type number means a higher priority.
// Register widths of the interrupt controller (32 bits) and the vector width
// (32 bits, the PowerPC address width) are this design's choice.
package intmgmt_pkg;

  localparam int ID_W     = 8;   // interrupt source Id / type number width
  localparam int N_SYS    = 4;   // system interrupt sources ISR0..ISR3
  localparam int MAX_USER = 15;  // user interrupts supported behind ISR4
  localparam int REG_W    = 32;  // interrupt controller register width
  localparam int VEC_W    = 32;  // interrupt vector (entry address) width

  typedef logic [ID_W-1:0]  id_t;
  typedef logic [VEC_W-1:0] vec_t;
  typedef logic [REG_W-1:0] word_t;

  // Type number registers Idreg0..Idreg4 (one-hot, bit k set for Idreg k).
  function automatic id_t idreg(input int k);
    return id_t'(1) << k;
  endfunction

  localparam id_t IDREG4 = 8'h10;

  // Snapshot of the interrupt controller registers saved on interrupt entry.
  // SIE and CIE are write strobes of the controller and hold no state.
  typedef struct packed {
    word_t isr;  // interrupt status
    word_t ipr;  // interrupt pending
    word_t ier;  // interrupt enable
    word_t iar;  // interrupt acknowledge
    word_t ivr;  // interrupt vector
    word_t mer;  // master enable
  } intc_regs_t;

  // Request handed to the hardware task scheduler: make the interrupt task
  // of this Id ready. The task starts at the unified entry of its class
  // (system or user) and from there calls the ISR at vector.
  typedef struct packed {
    id_t  id;
    vec_t entry;
    vec_t vector;
  } sched_req_t;

  // Task record of the clock tick logic: {delay, priority, task id}, the
  // layout of the DelayReg registers (delay in the upper nibble).
  typedef struct packed {
    logic [3:0] delay;
    logic [1:0] prio;
    logic [1:0] id;
  } tick_task_t;

endpackage
