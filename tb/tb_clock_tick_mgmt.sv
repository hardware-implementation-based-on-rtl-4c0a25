// tb_clock_tick_mgmt: self-checking test of the clock tick management logic.
// Part 1 replays the reference waveform: four delayed tasks
// (prio,id,delay) = (0,0,4) (1,1,3) (3,3,8) (2,2,4) are loaded, DelayReg must
// read 64, 53, 74, 143; after each tick the delay nibble drops by one
// (48, 37, 58, 127 ...); a cancel for priority 2 sets DelayReg2 to 10 and the
// next tick raises tick_en for task 2. The tasks then expire one by one.
// Clock ticks must be exactly TICK_CYCLES = 5 clocks apart.
// Part 2 drives random loads and cancels and compares every cycle with a
// reference model of the delay list kept in the testbench.
module tb_clock_tick_mgmt;
  import intmgmt_pkg::*;

  localparam int TC = 5;
  logic clk = 0, rst, rd, cancel;
  logic [1:0] prio, id, ready_id, ready_prio;
  logic [3:0] delay_time, q, ready_mask, loaded;
  logic time_en, tick_en, dormant;
  tick_task_t delayreg [4];
  int checks = 0, failures = 0;
  int cyc = 0, last_tick = -1, ticks = 0, irqs = 0;

  clock_tick_mgmt dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s @%0d", what, cyc); end
  endtask

  // tick spacing
  always @(posedge clk) begin
    cyc++;
    if (time_en) begin
      if (last_tick >= 0 && !rst) begin
        checks++;
        if (cyc - last_tick != TC) begin failures++; $display("FAIL tick spacing %0d", cyc - last_tick); end
      end
      last_tick = cyc;
      ticks++;
    end
    if (tick_en) irqs++;
    if (rst || dormant) last_tick = -1;
  end

  function automatic logic [7:0] r(int i); return 8'(delayreg[i]); endfunction

  // the next clock tick not yet returned (it may be the current cycle)
  int last_ret = -1;
  task automatic wait_tick();
    while (!(time_en && cyc != last_ret)) @(negedge clk);
    last_ret = cyc;
  endtask

  // reference model for part 2
  logic [3:0] rd_d [4];
  logic [1:0] rd_p [4];
  logic       rl [4];
  logic       rv;
  logic [7:0] rt;
  int         rq;
  logic       ref_on = 0;

  always @(posedge clk) if (ref_on) begin
    logic dm, te;
    logic [3:0] ex;
    int best;
    dm = !(rl[0] || rl[1] || rl[2] || rl[3]) && !rv;
    te = !dm && rq == TC - 1;
    best = -1;
    for (int i = 0; i < 4; i++) begin
      ex[i] = te && rl[i] && rd_d[i] == 0;
      if (ex[i] && (best < 0 || rd_p[i] < rd_p[best])) best = i;
    end
    checks++;
    if (time_en !== te || tick_en !== (|ex) || ready_mask !== ex ||
        (best >= 0 && (ready_id !== 2'(best) || ready_prio !== rd_p[best]))) begin
      failures++;
      $display("FAIL reference: te %b/%b irq %b/%b mask %b/%b", time_en, te, tick_en, |ex, ready_mask, ex);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (loaded[i] !== rl[i] || (rl[i] && (delayreg[i].delay !== rd_d[i] || delayreg[i].prio !== rd_p[i]))) begin
        failures++; $display("FAIL reference slot %0d", i);
      end
    end
    rq = (dm || te) ? 0 : rq + 1;
    for (int i = 0; i < 4; i++) begin
      if (ex[i]) rl[i] = 0;
      else if (te && rl[i]) rd_d[i] = rd_d[i] - 1;
      if (cancel && rl[i] && rd_p[i] == prio && !ex[i]) rd_d[i] = 0;
    end
    if (rv) begin
      rd_d[rt[1:0]] = rt[7:4]; rd_p[rt[1:0]] = rt[3:2]; rl[rt[1:0]] = 1;
    end
    rv = rd && delay_time != 0;
    rt = {delay_time, prio, id};
  end

  initial begin
    rst = 1; rd = 0; cancel = 0; prio = 0; id = 0; delay_time = 0;
    repeat (2) @(negedge clk); rst = 0;
    @(negedge clk);
    check(dormant && !time_en, "dormant with no task");
    repeat (7) @(negedge clk);
    check(ticks == 0, "no ticks while dormant");
    // load the four tasks of the waveform
    rd = 1;
    prio = 0; id = 0; delay_time = 4; @(negedge clk);
    prio = 1; id = 1; delay_time = 3; @(negedge clk);
    prio = 3; id = 3; delay_time = 8; @(negedge clk);
    prio = 2; id = 2; delay_time = 4; @(negedge clk);
    rd = 0; prio = 0; id = 0; delay_time = 0;
    @(negedge clk);
    check(r(0) == 64 && r(1) == 53 && r(2) == 74 && r(3) == 143, "loaded 64 53 74 143");
    check(loaded == 4'hF, "four tasks loaded");
    wait_tick(); check(!tick_en, "first tick: nothing due");
    @(negedge clk);
    check(r(0) == 48 && r(1) == 37 && r(2) == 58 && r(3) == 127, "after tick 1: 48 37 58 127");
    // cancel the delay of the priority 2 task
    prio = 2; cancel = 1; @(negedge clk); cancel = 0; prio = 0;
    check(r(2) == 10, "cancel sets DelayReg2 to 10");
    wait_tick();
    check(tick_en && ready_id == 2 && ready_prio == 2 && ready_mask == 4'b0100, "tick_en for cancelled task 2");
    @(negedge clk);
    check(r(0) == 32 && r(1) == 21 && r(3) == 111 && !loaded[2], "after tick 2: 32 21 - 111");
    wait_tick(); check(!tick_en, "tick 3: nothing due");
    @(negedge clk);
    check(r(0) == 16 && r(1) == 5 && r(3) == 95, "after tick 3: 16 5 95");
    wait_tick(); check(tick_en && ready_id == 1 && ready_mask == 4'b0010, "task 1 expires");
    wait_tick(); check(tick_en && ready_id == 0 && ready_mask == 4'b0001, "task 0 expires");
    for (int k = 0; k < 3; k++) begin wait_tick(); check(!tick_en, "task 3 still delayed"); end
    wait_tick(); check(tick_en && ready_id == 3 && ready_prio == 3, "task 3 expires");
    @(negedge clk);
    check(dormant && loaded == 0, "dormant again");
    // two tasks due at the same tick: highest priority reported
    rd = 1;
    prio = 3; id = 0; delay_time = 1; @(negedge clk);
    prio = 1; id = 2; delay_time = 1; @(negedge clk);
    rd = 0;
    wait_tick(); wait_tick();
    check(tick_en && ready_mask == 4'b0101 && ready_id == 2 && ready_prio == 1, "simultaneous expiry, priority 1 first");
    repeat (3) @(negedge clk);
    // part 2: random against the reference
    rst = 1; @(negedge clk); rst = 0;
    for (int i = 0; i < 4; i++) begin rl[i] = 0; rd_d[i] = 0; rd_p[i] = 0; end
    rv = 0; rt = 0; rq = 0;
    @(negedge clk);
    ref_on = 1;
    for (int t = 0; t < 3000; t++) begin
      rd = ($urandom_range(0, 9) == 0);
      cancel = !rd && ($urandom_range(0, 24) == 0);
      prio = 2'($urandom); id = 2'($urandom); delay_time = 4'($urandom);
      @(negedge clk);
    end
    ref_on = 0;
    check(irqs > 20 && ticks > 100, "random phase produced ticks and requests");
    $display("ticks=%0d tick_en=%0d", ticks, irqs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
