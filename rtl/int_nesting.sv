// int_nesting: interrupt nesting logic.
//
// Tracks the nesting of user interrupts with the IntNesting counter and an
// interrupt nesting stack that records, per level, the Id and priority of the
// interrupt being served. A new user interrupt is accepted only if its
// priority is higher (numerically smaller type number) than the one being
// served, so lower priority interrupts are masked while an ISR runs.
// On entry (push) IntNesting rises by one; on exit (pop) it falls by one. While
// IntNesting > 0 the stack pointer sp points into the interrupt nesting stack,
// one frame of FRAME_BYTES per level below NEST_SP_BASE; when IntNesting
// returns to 0 the SP switches back to the task stack (task_sp) and
// ret_to_task pulses. A pop that leaves IntNesting > 0 resumes the interrupted
// ISR, whose Id is cur_id, and ret_to_task stays low (no stack switch).
// Timing: push and pop act on the rising clock edge; accept, sp and cur_*
// are combinational from the registered state. A push on a full stack is
// dropped and sets overflow; a pop on an empty stack is ignored. rst clears
// the counter. Depth, stack addresses and frame size are this design's
// choices; the depth default covers the 15 user interrupts.
module int_nesting
  import intmgmt_pkg::*;
#(
  parameter int unsigned NEST_DEPTH   = MAX_USER,
  parameter word_t       NEST_SP_BASE = 32'h0000_1000,
  parameter int unsigned FRAME_BYTES  = 64
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,          // enter an accepted interrupt
  input  id_t   push_id,
  input  id_t   push_prio,
  input  logic  pop,           // leave the current interrupt
  input  id_t   req_prio,      // priority of a requesting interrupt
  input  word_t task_sp,       // stack pointer of the interrupted task
  output logic  accept,        // req_prio may nest over the current one
  output logic [4:0] nest_cnt,    // IntNesting counter
  output id_t   cur_id,        // Id being served (valid if nest_cnt > 0)
  output id_t   cur_prio,
  output word_t sp,
  output logic  sp_on_task,    // SP is on the task stack
  output logic  ret_to_task,   // pulse: last level left, SP back to task stack
  output logic  overflow       // a push found the stack full (sticky)
);

  id_t stk_id   [NEST_DEPTH];
  id_t stk_prio [NEST_DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      nest_cnt <= '0;
      ret_to_task <= 1'b0;
      overflow    <= 1'b0;
      for (int i = 0; i < NEST_DEPTH; i++) begin
        stk_id[i]   <= '0;
        stk_prio[i] <= '0;
      end
    end else begin
      ret_to_task <= 1'b0;
      if (push) begin
        if (32'(nest_cnt) < NEST_DEPTH) begin
          stk_id[nest_cnt]   <= push_id;
          stk_prio[nest_cnt] <= push_prio;
          nest_cnt           <= nest_cnt + 5'd1;
        end else begin
          overflow <= 1'b1;
        end
      end else if (pop && nest_cnt != 0) begin
        nest_cnt <= nest_cnt - 5'd1;
        ret_to_task <= (nest_cnt == 5'd1);
      end
    end
  end

  always_comb begin
    if (nest_cnt != 0) begin
      cur_id   = stk_id[nest_cnt - 5'd1];
      cur_prio = stk_prio[nest_cnt - 5'd1];
    end else begin
      cur_id   = '0;
      cur_prio = '1;
    end
    accept     = (nest_cnt == 0) ||
                 ((req_prio < cur_prio) && (32'(nest_cnt) < NEST_DEPTH));
    sp_on_task = (nest_cnt == 0);
    sp         = sp_on_task ? task_sp
               : NEST_SP_BASE - word_t'(32'(nest_cnt - 5'd1) * FRAME_BYTES);
  end

endmodule
