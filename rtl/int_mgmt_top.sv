// int_mgmt_top: hardware interrupt management module of a hardware RTOS.
//
// Interrupt requests are handed to the RTOS task scheduler instead of the CPU:
// an interrupt only makes its interrupt task ready. The module joins
//   * int_source_mgmt  - classifies ISR bits, allocates the source Id,
//   * int_vector_mgmt  - IVRreg group, Id -> ISR entry address,
//   * int_nesting      - IntNesting, masking of lower priorities, SP switch,
//   * stack_space_mgr  - per-level frames of controller and CPU registers,
//   * int_control      - system path (scheduling) and user path (response,
//                        scheduling, return),
//   * clock_tick_mgmt  - delayed tasks and the clock tick request tick_en.
// The interrupt controller, the task scheduler IP kernel and the CPU are
// outside: their signals are the ports. sys_req / usr_req / tick_en go to the
// scheduler; ret_* return the restored controller registers; sp is the stack
// pointer to use (nesting stack while IntNesting > 0, else task_sp).
// All blocks share one clock and a synchronous active-high reset. Latencies,
// counted from the clock edge that samples the request on isr: system
// request to sys_req_valid 2 clocks; user request to usr_req_valid 4 clocks
// if accepted at once; isr_done to ret_valid 2 clocks. The split into these
// blocks follows the original structure; the ports toward the controller,
// CPU and scheduler, and all latencies, are this design's choices.
module int_mgmt_top
  import intmgmt_pkg::*;
#(
  parameter int unsigned USER_IDS    = MAX_USER,
  parameter int unsigned NEST_DEPTH  = MAX_USER,
  parameter int unsigned CPU_WORDS   = 8,
  parameter int unsigned TICK_CYCLES = 5
) (
  input  logic       clk,
  input  logic       rst,
  // interrupt controller side
  input  logic [7:0] isr,
  input  logic [7:0] a_mask,
  input  logic [7:0] b_mask,
  input  logic       inta_en,
  input  logic       clr,
  input  id_t        usr_prio,
  input  intc_regs_t ctrl_regs,
  input  logic       ivr_wr_sys,
  input  logic [1:0] ivr_wr_idx,
  input  logic       ivr_wr_user,
  input  vec_t       ivr_data,
  input  logic       ivr_wr_entry,      // write a unified entry (ivr_data)
  input  logic       ivr_wr_entry_user, // 0: system entry, 1: user entry
  // CPU side
  input  logic       wr,
  input  logic       rd,
  input  logic [$clog2(CPU_WORDS)-1:0] addr,
  input  word_t      data_in,
  output word_t      data_out,
  input  word_t      task_sp,
  input  logic       isr_done,
  // scheduler side
  output id_t        id,
  output logic       id_valid,
  output sched_req_t sys_req,
  output logic       sys_req_valid,
  output sched_req_t usr_req,
  output logic       usr_req_valid,
  output intc_regs_t ret_ctx,
  output id_t        ret_id,
  output logic       ret_valid,
  output logic       pend_masked,
  output logic [7:0] lost_count,
  output logic [4:0] int_nesting,
  output word_t      sp,
  output logic       sp_on_task,
  output logic       ret_to_task,
  output logic       nest_overflow,
  output logic [3:0] user_vectors,
  output logic       vec_hit [2],   // lookup ports 0 (system) / 1 (user) found a written vector
  output id_t        cur_prio,      // priority of the interrupt in service
  // clock tick management
  input  logic       td_rd,
  input  logic [1:0] td_prio,
  input  logic [1:0] td_id,
  input  logic [3:0] td_delay,
  input  logic       td_cancel,
  output logic [3:0] tick_q,
  output logic       time_en,
  output logic       tick_en,
  output logic [1:0] tick_ready_id,
  output logic [1:0] tick_ready_prio,
  output logic [3:0] tick_ready_mask,
  output tick_task_t delayreg [4],
  output logic [3:0] delay_loaded,
  output logic       tick_dormant
);

  logic       id_new, id_user;
  id_t        vec_id [2];
  vec_t       vec    [2];
  logic       accept, push, pop, save;
  id_t        req_prio, push_id, cur_id;
  logic [4:0] level;
  intc_regs_t ctx;
  vec_t       sys_entry, usr_entry;

  int_source_mgmt #(.USER_IDS(USER_IDS)) u_src (
    .clk, .rst, .isr, .a_mask, .b_mask, .int_en(inta_en), .clr,
    .id, .id_valid, .id_new, .id_user
  );

  int_vector_mgmt #(.USER_IDS(USER_IDS)) u_vec (
    .clk, .rst, .wr_sys(ivr_wr_sys), .wr_sys_idx(ivr_wr_idx),
    .wr_user(ivr_wr_user), .wr_data(ivr_data),
    .wr_entry(ivr_wr_entry), .wr_entry_user(ivr_wr_entry_user), .sys_entry, .usr_entry,
    .rd_id(vec_id), .rd_vec(vec), .rd_hit(vec_hit), .user_count(user_vectors)
  );

  int_nesting #(.NEST_DEPTH(NEST_DEPTH)) u_nest (
    .clk, .rst, .push, .push_id, .push_prio(req_prio), .pop, .req_prio,
    .task_sp, .accept, .nest_cnt(int_nesting), .cur_id, .cur_prio, .sp, .sp_on_task,
    .ret_to_task, .overflow(nest_overflow)
  );

  stack_space_mgr #(.LEVELS(NEST_DEPTH), .CPU_WORDS(CPU_WORDS)) u_ssm (
    .clk, .rst, .level, .save, .ctrl_in(ctrl_regs), .ctx_out(ctx),
    .wr, .rd, .addr, .data_in, .data_out
  );

  int_control u_ctl (
    .clk, .rst, .src_id(id), .src_new(id_new), .src_user(id_user), .usr_prio,
    .vec_id, .vec, .sys_entry, .usr_entry, .int_nesting, .cur_id, .accept, .req_prio, .push, .push_id,
    .pop, .level, .save, .isr_done, .ctx_in(ctx), .sys_req, .sys_req_valid,
    .usr_req, .usr_req_valid, .ret_ctx, .ret_id, .ret_valid, .pend_masked,
    .lost_count
  );

  clock_tick_mgmt #(.TICK_CYCLES(TICK_CYCLES)) u_tick (
    .clk, .rst, .rd(td_rd), .prio(td_prio), .id(td_id), .delay_time(td_delay),
    .cancel(td_cancel), .q(tick_q), .time_en, .tick_en,
    .ready_id(tick_ready_id), .ready_prio(tick_ready_prio),
    .ready_mask(tick_ready_mask), .delayreg, .loaded(delay_loaded),
    .dormant(tick_dormant)
  );

endmodule
