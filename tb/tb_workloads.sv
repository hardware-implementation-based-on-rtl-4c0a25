// tb_workloads: the two reference scenarios run through the complete
// interrupt management module at its default parameters.
//  1. Interrupt source scenario: with int_en, ISR = 1, 2, 4, 8 give system
//     Ids 1, 2, 4, 8 (each scheduled at once with its vector); ISR = 24 gives
//     user Id 16; after clr and rst, with ISR3 classed as a user source,
//     three ISR3 requests receive Ids 16, 17, 18. These three are given
//     rising priorities, so they nest three deep (ISR#1 -> ISR#2 -> ISR#3)
//     and return in reverse order, the last return switching SP back to
//     the task stack.
//  2. Clock tick scenario: four delayed tasks are loaded, DelayReg reads
//     64, 53, 74, 143 and then 48, 37, 58, 127 after a tick; a cancel for
//     priority 2 gives 10 and the next tick raises tick_en for task 2;
//     ticks are 5 clocks apart.
module tb_workloads;
  import intmgmt_pkg::*;

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

  int checks = 0, failures = 0, cyc = 0, last_tick = -1;
  id_t usr_seen [$], ret_seen [$], sys_seen [$];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  initial begin
    #300000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (sys_req_valid) begin
        sys_seen.push_back(sys_req.id);
        checks++;
        if (sys_req.vector != 32'h100 * (32'($clog2(sys_req.id)) + 1)) begin
          failures++; $display("FAIL system vector %h for id %0d", sys_req.vector, sys_req.id);
        end
      end
      if (usr_req_valid) usr_seen.push_back(usr_req.id);
      if (ret_valid) ret_seen.push_back(ret_id);
      if (time_en) begin
        if (last_tick >= 0) begin
          checks++;
          if (cyc - last_tick != 5) begin failures++; $display("FAIL tick spacing"); end
        end
        last_tick = cyc;
      end
    end
  end

  function automatic logic [7:0] r(int i); return 8'(delayreg[i]); endfunction

  task automatic pulse_isr(input logic [7:0] v);
    @(negedge clk); isr = v; inta_en = 1;
    @(negedge clk);
    @(negedge clk); isr = 0; inta_en = 0;
    repeat (4) @(negedge clk);
  endtask

  task automatic load_vectors();
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); ivr_wr_sys = 1; ivr_wr_idx = 2'(k); ivr_data = 32'h100 * (k + 1);
    end
    @(negedge clk); ivr_wr_sys = 0;
    for (int n = 0; n < MAX_USER; n++) begin
      ivr_wr_user = 1; ivr_data = 32'h2_0000 + 32'(n) * 32'h20; @(negedge clk);
    end
    ivr_wr_user = 0;
  endtask

  task automatic done();
    @(negedge clk); isr_done = 1; @(negedge clk); isr_done = 0;
    repeat (4) @(negedge clk);
  endtask

  int last_ret = -1;
  task automatic wait_tick();
    while (!(time_en && cyc != last_ret)) @(negedge clk);
    last_ret = cyc;
  endtask

  initial begin
    rst = 1; isr = 0; a_mask = 8'h10; b_mask = 8'h0F; inta_en = 0; clr = 0; usr_prio = 0;
    ctrl_regs = '0; ivr_wr_sys = 0; ivr_wr_user = 0; ivr_wr_idx = 0; ivr_data = 0;
    ivr_wr_entry = 0; ivr_wr_entry_user = 0;
    wr = 0; rd = 0; addr = 0; data_in = 0; task_sp = 32'h0004_0000; isr_done = 0;
    td_rd = 0; td_cancel = 0; td_prio = 0; td_id = 0; td_delay = 0;
    repeat (3) @(negedge clk); rst = 0;
    load_vectors();

    // ---- scenario 1: interrupt sources ----
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); isr = 8'(1 << k); inta_en = 1;
      @(negedge clk); check(id_valid && id == idreg(k), $sformatf("ISR%0d -> Id %0d", k, idreg(k)));
      @(negedge clk); isr = 0; inta_en = 0;
      repeat (3) @(negedge clk);
    end
    check(sys_seen.size() == 4 && sys_seen[0] == 1 && sys_seen[1] == 2 && sys_seen[2] == 4 && sys_seen[3] == 8,
          "four system scheduling requests 1, 2, 4, 8");
    usr_prio = 8'd30;
    @(negedge clk); isr = 8'd24; inta_en = 1;
    @(negedge clk); check(id_valid && id == 16, "ISR = 24 -> user Id 16");
    @(negedge clk); isr = 0; inta_en = 0;
    repeat (4) @(negedge clk);
    check(usr_seen.size() == 1 && usr_seen[0] == 16 && int_nesting == 1, "Id 16 scheduled");
    done();
    check(ret_seen.size() == 1 && ret_seen[0] == 16 && sp_on_task, "Id 16 returned");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    @(negedge clk); rst = 1; @(negedge clk); rst = 0;
    load_vectors();
    a_mask = 8'h18; b_mask = 8'h07;
    usr_seen.delete(); ret_seen.delete();
    for (int n = 0; n < 3; n++) begin
      usr_prio = 8'(30 - 10 * n);
      @(negedge clk); isr = 8'h08; inta_en = 1;
      @(negedge clk); check(id_valid && id == 8'(16 + n), $sformatf("user Id %0d", 16 + n));
      @(negedge clk); isr = 0; inta_en = 0;
      repeat (4) @(negedge clk);
      check(32'(int_nesting) == n + 1, $sformatf("nesting level %0d", n + 1));
    end
    check(usr_seen.size() == 3 && usr_seen[0] == 16 && usr_seen[1] == 17 && usr_seen[2] == 18 &&
          usr_req.vector == 32'h2_0000 + 2 * 32'h20, "user Ids 16, 17, 18 scheduled with their vectors");
    check(sp == 32'h1000 - 2 * 64, "three frames deep on the nesting stack");
    done(); check(!sp_on_task && int_nesting == 2, "ISR#3 returned, still nested");
    done(); check(!sp_on_task && int_nesting == 1, "ISR#2 returned, still nested");
    done(); check(sp_on_task && int_nesting == 0, "ISR#1 returned, back on task stack");
    check(ret_seen.size() == 3 && ret_seen[0] == 18 && ret_seen[1] == 17 && ret_seen[2] == 16,
          "returns in reverse order");

    // ---- scenario 2: clock tick delay management ----
    td_rd = 1;
    td_prio = 0; td_id = 0; td_delay = 4; @(negedge clk);
    td_prio = 1; td_id = 1; td_delay = 3; @(negedge clk);
    td_prio = 3; td_id = 3; td_delay = 8; @(negedge clk);
    td_prio = 2; td_id = 2; td_delay = 4; @(negedge clk);
    td_rd = 0; td_prio = 0; td_id = 0; td_delay = 0;
    @(negedge clk);
    check(r(0) == 64 && r(1) == 53 && r(2) == 74 && r(3) == 143, "DelayReg 64 53 74 143");
    wait_tick(); @(negedge clk);
    check(r(0) == 48 && r(1) == 37 && r(2) == 58 && r(3) == 127, "DelayReg 48 37 58 127");
    td_prio = 2; td_cancel = 1; @(negedge clk); td_cancel = 0; td_prio = 0;
    check(r(2) == 10, "cancel: DelayReg2 = 10");
    wait_tick();
    check(tick_en && tick_ready_id == 2, "tick_en for task 2");
    @(negedge clk);
    check(r(0) == 32 && r(1) == 21 && r(3) == 111, "DelayReg 32 21 111");
    wait_tick(); @(negedge clk);
    check(r(0) == 16 && r(1) == 5 && r(3) == 95, "DelayReg 16 5 95");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
