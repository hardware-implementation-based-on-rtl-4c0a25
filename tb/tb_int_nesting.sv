// tb_int_nesting: self-checking test of the interrupt nesting logic.
// Plays the nesting pattern ISR#1 -> ISR#2 -> ISR#3 with rising priority,
// checks that a lower priority request is not accepted, that IntNesting
// counts the levels, that SP points into the nesting stack one frame per
// level and only returns to the task stack (with ret_to_task) when the last
// level is left, and that the interrupted Ids are resumed in reverse order.
// A random push/pop sequence is then compared with a reference stack kept in
// the testbench, including overflow at 15 levels.
module tb_int_nesting;
  import intmgmt_pkg::*;

  localparam word_t BASE = 32'h0000_1000;
  localparam int    FB   = 64;
  logic clk = 0, rst, push, pop;
  id_t push_id, push_prio, req_prio, cur_id, cur_prio;
  word_t task_sp, sp;
  logic accept, sp_on_task, ret_to_task, overflow;
  logic [4:0] nest_cnt;
  int checks = 0, failures = 0;
  int task_returns = 0;

  int_nesting dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (ret_to_task) task_returns++;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cnt=%0d cur=%0d sp=%h)", what, nest_cnt, cur_id, sp); end
  endtask

  task automatic do_push(input id_t i, input id_t p);
    @(negedge clk); push = 1; push_id = i; push_prio = p;
    @(negedge clk); push = 0;
  endtask
  task automatic do_pop();
    @(negedge clk); pop = 1;
    @(negedge clk); pop = 0;
  endtask

  id_t ref_id [$], ref_pr [$];

  initial begin
    rst = 1; push = 0; pop = 0; push_id = 0; push_prio = 0; req_prio = 0;
    task_sp = 32'h0008_0000;
    repeat (2) @(negedge clk); rst = 0;
    #1;
    check(nest_cnt == 0 && sp_on_task && sp == task_sp, "idle on task stack");
    req_prio = 8'd200; #1; check(accept, "anything accepted when idle");
    do_push(8'd16, 8'd30);
    check(nest_cnt == 1 && sp == BASE && !sp_on_task && cur_id == 16, "level 1");
    req_prio = 8'd40; #1; check(!accept, "lower priority masked");
    req_prio = 8'd30; #1; check(!accept, "equal priority masked");
    req_prio = 8'd20; #1; check(accept, "higher priority nests");
    do_push(8'd17, 8'd20);
    do_push(8'd18, 8'd10);
    check(nest_cnt == 3 && sp == BASE - 2 * FB && cur_id == 18 && cur_prio == 10, "level 3");
    do_pop();
    check(nest_cnt == 2 && cur_id == 17 && sp == BASE - FB && task_returns == 0, "resume ISR#2, no switch");
    do_pop();
    check(nest_cnt == 1 && cur_id == 16 && !sp_on_task && task_returns == 0, "resume ISR#1");
    @(negedge clk); pop = 1;
    @(posedge clk); #1; pop = 0;
    check(ret_to_task && nest_cnt == 0 && sp_on_task && sp == task_sp, "back on task stack");
    @(posedge clk); #1; check(!ret_to_task, "ret_to_task is a pulse");
    do_pop();
    check(nest_cnt == 0 && task_returns == 1, "pop when idle ignored");
    // random against a reference stack
    for (int t = 0; t < 400; t++) begin
      if ($urandom_range(0, 2) != 0) begin
        id_t i, p;
        i = 8'($urandom); p = 8'($urandom);
        do_push(i, p);
        if (ref_id.size() < MAX_USER) begin ref_id.push_back(i); ref_pr.push_back(p); end
      end else begin
        do_pop();
        if (ref_id.size() > 0) begin void'(ref_id.pop_back()); void'(ref_pr.pop_back()); end
      end
      check(32'(nest_cnt) == ref_id.size(), "depth matches reference");
      if (ref_id.size() > 0)
        check(cur_id == ref_id[$] && cur_prio == ref_pr[$] &&
              sp == BASE - word_t'((ref_id.size() - 1) * FB), "top matches reference");
      else
        check(sp == task_sp, "task stack when empty");
    end
    check(overflow, "overflow seen at 15 levels");
    rst = 1; @(negedge clk); rst = 0;
    check(nest_cnt == 0 && !overflow, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
