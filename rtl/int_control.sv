// int_control: control logic of the interrupt management module.
//
// Sequences the two handling paths:
//   * System interrupt: goes straight to interrupt task scheduling. The cycle
//     after the source Id appears, sys_req_valid pulses with the Id, the
//     unified system entry and the ISR vector (response output 1). No
//     context is saved.
//   * User interrupt: response, scheduling, return. The request waits in a
//     one-entry pending register until the nesting logic accepts its priority
//     (lower priorities stay masked while a higher one is served). Response:
//     the controller registers are saved in the stack space manager frame of
//     the new level and the nesting logic is pushed (IntNesting + 1).
//     Scheduling: next cycle usr_req_valid pulses with Id, the unified user
//     entry and the ISR vector.
//     Return: when the kernel signals isr_done, the saved frame is read back
//     and presented on ret_ctx with ret_valid (response output 2), and the
//     nesting logic is popped; the nesting logic decides the stack switch.
// A user request arriving while the pending register is full is dropped and
// counted in lost_count. An isr_done with no interrupt in service is ignored.
// When a pending request can be taken and an isr_done is waiting in the same
// cycle, the pending (higher priority) request goes first.
// Interface: vec_id/vec are the lookup port of the vector logic; the push,
// pop, save and level outputs drive the nesting logic and the stack space
// manager. Between save and restore, level addresses the frame of the
// interrupt in service so the CPU can reach its words there.
// The pending register, the arbitration and the cycle counts are this
// design's choices; the two paths follow the original workflow.
module int_control
  import intmgmt_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // from interrupt source management
  input  id_t        src_id,
  input  logic       src_new,
  input  logic       src_user,
  input  id_t        usr_prio,     // priority of the user interrupt request
  // vector lookup ports (0: system path, 1: user path)
  output id_t        vec_id [2],
  input  vec_t       vec    [2],
  input  vec_t       sys_entry,    // unified entries of the two paths
  input  vec_t       usr_entry,
  // nesting logic
  input  logic [4:0] int_nesting,
  input  id_t        cur_id,
  input  logic       accept,
  output id_t        req_prio,
  output logic       push,
  output id_t        push_id,
  output logic       pop,
  // stack space manager
  output logic [4:0] level,
  output logic       save,
  // kernel side
  input  logic       isr_done,     // the interrupt task in service finished
  input  intc_regs_t ctx_in,       // frame read from the stack space manager
  output sched_req_t sys_req,      // response output 1
  output logic       sys_req_valid,
  output sched_req_t usr_req,      // interrupt task made ready (user)
  output logic       usr_req_valid,
  output intc_regs_t ret_ctx,      // response output 2: restored registers
  output id_t        ret_id,
  output logic       ret_valid,
  output logic       pend_masked,  // a pending user request is masked
  output logic [7:0] lost_count
);

  typedef enum logic [0:0] {S_IDLE, S_SCHED} state_t;
  state_t state;

  logic pend_v;
  id_t  pend_id, pend_prio;
  logic done_v;
  logic take, ret;

  always_comb begin
    vec_id[0] = src_id;
    vec_id[1] = cur_id;
    req_prio  = pend_prio;
    take      = (state == S_IDLE) && pend_v && accept;
    ret       = (state == S_IDLE) && !take && done_v && (int_nesting != 0);
    push      = take;
    push_id   = pend_id;
    pop       = ret;
    save      = take;
    level     = (take || int_nesting == 0) ? int_nesting : int_nesting - 5'd1;
    pend_masked = pend_v && !accept;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state         <= S_IDLE;
      pend_v        <= 1'b0;
      pend_id       <= '0;
      pend_prio     <= '0;
      done_v        <= 1'b0;
      sys_req       <= '0;
      sys_req_valid <= 1'b0;
      usr_req       <= '0;
      usr_req_valid <= 1'b0;
      ret_ctx       <= '0;
      ret_id        <= '0;
      ret_valid     <= 1'b0;
      lost_count    <= '0;
    end else begin
      // system path: straight to task scheduling
      sys_req_valid <= src_new && !src_user;
      if (src_new && !src_user) sys_req <= '{id: src_id, entry: sys_entry, vector: vec[0]};

      // user path: pending register
      if (take) pend_v <= 1'b0;
      if (src_new && src_user) begin
        if (!pend_v || take) begin
          pend_v    <= 1'b1;
          pend_id   <= src_id;
          pend_prio <= usr_prio;
        end else if (lost_count != '1) begin
          lost_count <= lost_count + 8'd1;
        end
      end

      if (isr_done) done_v <= 1'b1;
      else if (ret || (done_v && int_nesting == 0 && state == S_IDLE && !take))
        done_v <= 1'b0;

      usr_req_valid <= 1'b0;
      ret_valid     <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (take) state <= S_SCHED;
          else if (ret) begin
            ret_ctx   <= ctx_in;
            ret_id    <= cur_id;
            ret_valid <= 1'b1;
          end
        end
        S_SCHED: begin
          usr_req       <= '{id: cur_id, entry: usr_entry, vector: vec[1]};
          usr_req_valid <= 1'b1;
          state         <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
