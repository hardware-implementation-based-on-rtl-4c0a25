// tb_int_mgmt_top: end-to-end test of the interrupt management module at its
// default parameters (15 user Ids, 15 nesting levels, 8 CPU words per frame,
// a clock tick every 5 clocks).
// Scenario: the vector group is loaded with four system vectors and fifteen
// user vectors; ISR0..ISR3 each produce a system scheduling request with
// their own entry address; user interrupts on ISR4 receive Ids 16, 17, ...
// and go through response (frame save, nesting push), scheduling and return.
// A higher priority user interrupt nests over a running one, a lower one is
// masked until the return, one request is lost with the pending register
// full, the CPU saves and reloads words of its frame through data_in /
// data_out, and the last return switches SP back to the task stack. In
// parallel the clock tick logic delays three tasks, one delay is cancelled,
// and every expiry raises tick_en. Each of these mechanisms is counted and
// a mechanism that never happened counts as a failure.
module tb_int_mgmt_top;
  import intmgmt_pkg::*;

  localparam word_t TASK_SP = 32'h0004_0000;
  localparam word_t NBASE   = 32'h0000_1000;

  logic clk = 0, rst;
  logic [7:0] isr, a_mask, b_mask;
  logic inta_en, clr;
  id_t usr_prio;
  intc_regs_t ctrl_regs;
  logic ivr_wr_sys, ivr_wr_user;
  logic [1:0] ivr_wr_idx;
  vec_t ivr_data;
  logic ivr_wr_entry, ivr_wr_entry_user;
  logic wr, rd;
  logic [2:0] addr;
  word_t data_in, data_out, task_sp;
  logic isr_done;
  id_t id;
  logic id_valid;
  sched_req_t sys_req, usr_req;
  logic sys_req_valid, usr_req_valid;
  intc_regs_t ret_ctx;
  id_t ret_id;
  logic ret_valid, pend_masked;
  logic [7:0] lost_count;
  logic [4:0] int_nesting;
  word_t sp;
  logic sp_on_task, ret_to_task, nest_overflow;
  logic [3:0] user_vectors;
  logic vec_hit [2];
  id_t cur_prio;
  logic td_rd, td_cancel;
  logic [1:0] td_prio, td_id;
  logic [3:0] td_delay;
  logic [3:0] tick_q;
  logic time_en, tick_en;
  logic [1:0] tick_ready_id, tick_ready_prio;
  logic [3:0] tick_ready_mask;
  tick_task_t delayreg [4];
  logic [3:0] delay_loaded;
  logic tick_dormant;

  int_mgmt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_sys = 0, n_usr = 0, n_ret = 0, n_nest = 0, n_mask = 0, n_switch = 0;
  int n_tick = 0, n_irq = 0, n_cancel = 0, n_dormant = 0, n_cpuword = 0;
  logic was_masked = 0;

  vec_t sysv [4];
  vec_t usrv [MAX_USER];
  // expected frames per level, recorded when a user interrupt is raised
  intc_regs_t exp_frame [$];
  id_t        exp_sched [$];
  id_t        exp_ret   [$];
  id_t        tick_exp  [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  initial begin
    #400000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitors: scheduler side
  always @(posedge clk) begin
    cyc++;
    if (!rst) monitor();
  end

  task automatic monitor();
    if (sys_req_valid) n_sys++;
    if (usr_req_valid) begin
      n_usr++;
      checks++;
      if (exp_sched.size() == 0 || usr_req.id != exp_sched[0] ||
          usr_req.vector != usrv[usr_req.id - 16] || usr_req.entry != 32'hA00) begin
        failures++; $display("FAIL user request id %0d vector %h", usr_req.id, usr_req.vector);
      end
      if (exp_sched.size() != 0) void'(exp_sched.pop_front());
    end
    if (ret_valid) begin
      n_ret++;
      checks++;
      if (exp_ret.size() == 0 || ret_id != exp_ret[0]) begin
        failures++; $display("FAIL return id %0d", ret_id);
      end
      if (exp_ret.size() != 0) void'(exp_ret.pop_front());
    end
    if (int_nesting >= 2 && !was_masked) n_nest++;
    if (pend_masked && !was_masked) n_mask++;
    was_masked <= pend_masked;
    if (ret_to_task) n_switch++;
    if (time_en) n_tick++;
    if (tick_en) begin
      n_irq++;
      checks++;
      if (tick_exp.size() == 0 || tick_ready_id != tick_exp[0][1:0]) begin
        failures++; $display("FAIL tick task %0d", tick_ready_id);
      end
      if (tick_exp.size() != 0) void'(tick_exp.pop_front());
    end
    if (td_cancel) n_cancel++;
  endtask

  task automatic raise(input logic [7:0] bits, input int len = 2);
    @(negedge clk); isr = bits; inta_en = 1;
    repeat (len) @(negedge clk);
    isr = 0; inta_en = 0;
  endtask

  task automatic user_irq(input id_t exp_id, input id_t prio, input bit accepted);
    usr_prio = prio;
    ctrl_regs = '{isr: 32'h10, ipr: $urandom, ier: $urandom, iar: 32'(exp_id), ivr: usrv[exp_id - 16], mer: 32'h3};
    if (accepted) exp_sched.push_back(exp_id);
    raise(8'h10);
  endtask

  task automatic done_and_wait();
    int n0;
    n0 = n_ret;
    @(negedge clk); isr_done = 1; @(negedge clk); isr_done = 0;
    while (n_ret == n0) @(negedge clk);
  endtask

  task automatic settle(input int n = 6);
    repeat (n) @(negedge clk);
  endtask

  // clock tick thread
  initial begin
    td_rd = 0; td_cancel = 0; td_prio = 0; td_id = 0; td_delay = 0;
    wait (!rst);
    repeat (10) @(negedge clk);
    check(tick_dormant && n_tick == 0, "tick logic dormant with no task");
    if (tick_dormant) n_dormant++;
    // tasks: id 0 prio 1 delay 2, id 1 prio 0 delay 6, id 3 prio 2 delay 9
    td_rd = 1;
    td_id = 0; td_prio = 1; td_delay = 2; @(negedge clk);
    td_id = 1; td_prio = 0; td_delay = 6; @(negedge clk);
    td_id = 3; td_prio = 2; td_delay = 9; @(negedge clk);
    td_rd = 0;
    tick_exp.push_back(8'd0);
    tick_exp.push_back(8'd3);   // cancelled below, before task 1 expires
    tick_exp.push_back(8'd1);
    // after 4 ticks cancel the priority 2 task
    wait (n_tick >= 4);
    @(negedge clk); td_prio = 2; td_cancel = 1; @(negedge clk); td_cancel = 0;
    wait (n_irq == 3);
    settle(2);
    check(tick_dormant && delay_loaded == 0, "tick logic dormant after the last task");
    if (tick_dormant) n_dormant++;
  end

  initial begin
    rst = 1; isr = 0; a_mask = 8'h10; b_mask = 8'h0F; inta_en = 0; clr = 0; usr_prio = 0;
    ctrl_regs = '0; ivr_wr_sys = 0; ivr_wr_user = 0; ivr_wr_idx = 0; ivr_data = 0;
    ivr_wr_entry = 0; ivr_wr_entry_user = 0;
    wr = 0; rd = 0; addr = 0; data_in = 0; task_sp = TASK_SP; isr_done = 0;
    repeat (3) @(negedge clk); rst = 0;
    // unified entries, then vectors
    @(negedge clk); ivr_wr_entry = 1; ivr_wr_entry_user = 0; ivr_data = 32'h0000_0500;
    @(negedge clk); ivr_wr_entry_user = 1; ivr_data = 32'h0000_0A00;
    @(negedge clk); ivr_wr_entry = 0;
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ivr_wr_sys = 1; ivr_wr_idx = 2'(k); ivr_data = 32'h0000_0100 * (k + 1); sysv[k] = ivr_data;
    end
    @(negedge clk); ivr_wr_sys = 0;
    for (int n = 0; n < MAX_USER; n++) begin
      ivr_wr_user = 1; ivr_data = 32'h0002_0000 + 32'(n) * 32'h20; usrv[n] = ivr_data;
      @(negedge clk);
    end
    ivr_wr_user = 0;
    check(user_vectors == 4'(MAX_USER), "fifteen user vectors stored");
    // system interrupts ISR0..3
    for (int k = 0; k < 4; k++) begin
      int n0;
      n0 = n_sys;
      raise(8'(1 << k));
      settle(2);
      check(n_sys == n0 + 1 && sys_req.id == idreg(k) && sys_req.vector == sysv[k] && sys_req.entry == 32'h500,
            $sformatf("system interrupt ISR%0d scheduled", k));
      check(int_nesting == 0, "system interrupt does not nest");
    end
    // user interrupt, Id 16, priority 30
    user_irq(8'd16, 8'd30, 1);
    settle();
    exp_frame.push_back(ctrl_regs);
    check(int_nesting == 1 && sp == NBASE && !sp_on_task, "user Id 16 in service on nesting stack");
    // the ISR saves CPU words in its frame
    for (int w = 0; w < 8; w++) begin
      @(negedge clk); wr = 1; addr = 3'(w); data_in = 32'hC0DE_0000 + 32'(w);
    end
    @(negedge clk); wr = 0;
    // higher priority user interrupt nests: Id 17
    user_irq(8'd17, 8'd10, 1);
    settle();
    exp_frame.push_back(ctrl_regs);
    check(int_nesting == 2 && sp == NBASE - 64, "Id 17 nested, second frame");
    for (int w = 0; w < 8; w++) begin
      @(negedge clk); wr = 1; addr = 3'(w); data_in = 32'hBEEF_0000 + 32'(w);
    end
    @(negedge clk); wr = 0;
    // lower priority Id 18 is masked, Id 19 is lost
    user_irq(8'd18, 8'd50, 0);
    settle();
    check(pend_masked, "Id 18 masked");
    user_irq(8'd19, 8'd60, 0);
    settle();
    check(lost_count == 1, "Id 19 lost, pending register full");
    // return from 17: restored frame, CPU words of level 2 reloaded
    for (int w = 0; w < 8; w++) begin
      @(negedge clk); rd = 1; addr = 3'(w);
      @(negedge clk); rd = 0;
      check(data_out == 32'hBEEF_0000 + 32'(w), "CPU word of frame 2 reloaded");
      n_cpuword++;
    end
    exp_ret.push_back(8'd17);
    done_and_wait();
    check(ret_ctx == exp_frame[1], "frame of Id 17 restored");
    settle(2);
    check(int_nesting == 1 && n_switch == 0 && pend_masked, "back in Id 16, no stack switch, 18 still masked");
    for (int w = 0; w < 8; w++) begin
      @(negedge clk); rd = 1; addr = 3'(w);
      @(negedge clk); rd = 0;
      check(data_out == 32'hC0DE_0000 + 32'(w), "CPU word of frame 1 reloaded");
      n_cpuword++;
    end
    // return from 16: SP back on the task stack, then 18 is served
    exp_sched.push_back(8'd18);
    exp_ret.push_back(8'd16);
    done_and_wait();
    check(ret_ctx == exp_frame[0], "frame of Id 16 restored");
    settle();
    check(n_switch == 1, "stack switch on the last return");
    check(int_nesting == 1 && !pend_masked, "Id 18 served after the return");
    exp_ret.push_back(8'd18);
    done_and_wait();
    settle(2);
    check(int_nesting == 0 && sp == TASK_SP && sp_on_task && n_switch == 2, "idle on task stack");
    // wait for the clock tick thread
    wait (n_irq == 3 && tick_dormant);
    settle(2);
    check(exp_sched.size() == 0 && exp_ret.size() == 0 && tick_exp.size() == 0, "all expected responses seen");
    check(!nest_overflow, "no nesting overflow");
    // every mechanism happened
    check(n_sys == 4, "system interrupt path");
    check(n_usr == 3, "user interrupt path");
    check(n_ret == 3, "interrupt return");
    check(n_nest > 0, "interrupt nesting");
    check(n_mask > 0, "masking of lower priority");
    check(lost_count > 0, "lost request");
    check(n_switch > 0, "stack switch to task stack");
    check(n_cpuword > 0, "CPU register frame");
    check(n_tick > 0, "clock ticks");
    check(n_irq > 0, "clock tick interrupt request");
    check(n_cancel > 0, "delay cancel");
    check(n_dormant == 2, "dormant tick logic");
    $display("sys=%0d usr=%0d ret=%0d nest=%0d mask=%0d lost=%0d switch=%0d ticks=%0d tick_en=%0d cancel=%0d",
             n_sys, n_usr, n_ret, n_nest, n_mask, lost_count, n_switch, n_tick, n_irq, n_cancel);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
