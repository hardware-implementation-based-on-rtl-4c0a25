// tb_int_control: self-checking test of the interrupt control logic.
// The control logic runs with the nesting logic as its partner; the vector
// group and the stack frames are replaced by testbench functions (vector =
// f(Id), frame = g(level)) so every response can be predicted. Checked:
//   * system path: sys_req_valid one clock after the Id, no nesting change;
//   * user path: save + push, then usr_req_valid 3 clocks after the Id with
//     the right entry address; the frame saved is the level being entered;
//   * masking: a lower priority request waits while pend_masked is high and
//     is served after the return; a request finding the pending register full
//     is counted as lost;
//   * nesting: a higher priority request nests (IntNesting 2) and returns
//     first; isr_done to ret_valid takes 2 clocks; the last return switches
//     the SP back to the task stack.
module tb_int_control;
  import intmgmt_pkg::*;

  logic clk = 0, rst;
  id_t src_id, usr_prio;
  logic src_new, src_user;
  id_t vec_id [2];
  vec_t vec [2];
  vec_t sys_entry = 32'h0000_0500, usr_entry = 32'h0000_0A00;
  logic [4:0] int_nesting, level;
  id_t cur_id, cur_prio, req_prio, push_id;
  logic accept, push, pop, save, isr_done;
  intc_regs_t ctx_in, ret_ctx;
  sched_req_t sys_req, usr_req;
  logic sys_req_valid, usr_req_valid, ret_valid, pend_masked;
  id_t ret_id;
  logic [7:0] lost_count;
  word_t sp;
  logic sp_on_task, ret_to_task, overflow;
  int checks = 0, failures = 0, cyc = 0;
  int saves_at [$];

  function automatic vec_t vf(id_t i); return 32'h0100_0000 + 32'(i) * 32'h40; endfunction
  function automatic intc_regs_t cf(logic [4:0] l);
    return '{isr: 32'(l), ipr: 32'(l) + 1, ier: 32'(l) + 2, iar: 32'(l) + 3, ivr: 32'(l) + 4, mer: 32'hAA00 + 32'(l)};
  endfunction

  always_comb begin
    vec[0] = vf(vec_id[0]);
    vec[1] = vf(vec_id[1]);
    ctx_in = cf(level);
  end

  int_control dut (.*);
  int_nesting u_nest (.clk, .rst, .push, .push_id, .push_prio(req_prio), .pop,
                      .req_prio, .task_sp(32'h8000), .accept, .nest_cnt(int_nesting),
                      .cur_id, .cur_prio, .sp, .sp_on_task, .ret_to_task, .overflow);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    if (save) saves_at.push_back(int'(level));
  end

  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // present one source Id for one clock
  task automatic src(input id_t i, input bit user, input id_t p);
    @(negedge clk); src_id = i; src_user = user; usr_prio = p; src_new = 1;
    @(negedge clk); src_new = 0;
  endtask

  // wait for a signal, return clocks since `t0`
  task automatic wait_usr(input int t0, output int dt);
    while (!usr_req_valid) begin @(posedge clk); #1; end
    dt = cyc - t0;
  endtask

  initial begin
    int t0, dt;
    rst = 1; src_id = 0; src_new = 0; src_user = 0; usr_prio = 0; isr_done = 0;
    repeat (2) @(negedge clk); rst = 0;
    // system interrupt Id 4
    @(negedge clk); src_id = 4; src_user = 0; src_new = 1; t0 = cyc;
    @(posedge clk); #1; src_new = 0;
    check(sys_req_valid && sys_req.id == 4 && sys_req.vector == vf(4) && sys_req.entry == sys_entry && cyc - t0 == 1, "system request after 1 clock");
    check(int_nesting == 0 && !usr_req_valid, "system path leaves nesting alone");
    @(posedge clk); #1; check(!sys_req_valid, "sys_req_valid is a pulse");
    // user interrupt Id 16, priority 30
    @(negedge clk); src_id = 16; src_user = 1; usr_prio = 30; src_new = 1; t0 = cyc;
    @(negedge clk); src_new = 0;
    @(posedge clk); #1; wait_usr(t0, dt);
    check(usr_req.id == 16 && usr_req.vector == vf(16) && usr_req.entry == usr_entry && dt == 3, $sformatf("user request after 3 clocks (%0d)", dt));
    check(int_nesting == 1 && saves_at.size() == 1 && saves_at[0] == 0, "frame 0 saved, IntNesting 1");
    // lower priority Id 17 is masked, Id 18 is lost
    src(8'd17, 1, 8'd40);
    repeat (3) @(negedge clk);
    check(pend_masked && int_nesting == 1, "lower priority masked");
    src(8'd18, 1, 8'd50);
    @(negedge clk);
    check(lost_count == 1, "request lost with pending register full");
    // return from 16: ret after 2 clocks, then 17 is taken
    @(negedge clk); isr_done = 1; t0 = cyc;
    @(negedge clk); isr_done = 0;
    while (!ret_valid) begin @(posedge clk); #1; end
    #1;
    check(cyc - t0 == 2 && ret_id == 16 && ret_ctx == cf(0), "return of 16 after 2 clocks with frame 0");
    wait_usr(t0, dt); #1;
    check(usr_req.id == 17 && int_nesting == 1, "masked request served after return");
    // higher priority Id 19 nests over 17
    src(8'd19, 1, 8'd5);
    @(posedge clk); #1; wait_usr(cyc, dt); #1;
    check(usr_req.id == 19 && int_nesting == 2 && saves_at[$] == 1, "nesting: level 2, frame 1 saved");
    // returns in reverse order
    @(negedge clk); isr_done = 1; @(negedge clk); isr_done = 0;
    while (!ret_valid) begin @(posedge clk); #1; end
    #1; check(ret_id == 19 && ret_ctx == cf(1) && int_nesting == 1 && !sp_on_task, "19 returns first, no stack switch");
    @(negedge clk); isr_done = 1; @(negedge clk); isr_done = 0;
    while (!ret_valid) begin @(posedge clk); #1; end
    #1; check(ret_id == 17 && ret_ctx == cf(0) && int_nesting == 0, "17 returns last");
    @(posedge clk); #1; check(sp_on_task && sp == 32'h8000, "SP back on task stack");
    // stray isr_done ignored
    @(negedge clk); isr_done = 1; @(negedge clk); isr_done = 0;
    repeat (4) @(negedge clk);
    check(!ret_valid && int_nesting == 0, "isr_done with nothing in service ignored");
    // system interrupt while a user interrupt is in service
    src(8'd20, 1, 8'd9);
    repeat (4) @(negedge clk);
    @(negedge clk); src_id = 1; src_user = 0; src_new = 1;
    @(posedge clk); #1; src_new = 0;
    check(sys_req_valid && sys_req.id == 1 && int_nesting == 1, "system request during user service");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
