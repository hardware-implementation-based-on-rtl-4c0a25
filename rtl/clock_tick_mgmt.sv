// clock_tick_mgmt: clock tick interrupt management logic.
//
// Holds the delayed tasks of the RTOS in hardware and raises the clock tick
// interrupt request (tick_en) when a task's delay is over, so the CPU does not
// scan delay lists on every tick.
//   * Load: while rd is high, the task record {delay_time, prio, id} on the
//     inputs is captured each clock in the input register TTDelayreg and one
//     clock later written to the output register DelayReg[id] (one register
//     per task id, 8 bits laid out as delay[7:4], prio[3:2], id[1:0]). A
//     record with delay_time = 0 is not loaded.
//   * Timer: a counter q runs from 0 to TICK_CYCLES-1; time_en is high while q
//     is at its last value, one clock tick every TICK_CYCLES clocks. With no
//     task loaded the logic is dormant: q stays at 0 and no ticks occur.
//   * Scan: at each clock tick every loaded task whose delay is already 0
//     expires: tick_en is high for that cycle, the task is removed, ready_mask
//     marks all expiring task ids and ready_id/ready_prio give the one with the
//     highest priority (smallest prio, then smallest id). Every other loaded
//     task has its delay decremented by one.
//   * Cancel: cancel with prio selecting the task sets that task's delay to 0,
//     so it expires with tick_en at the next clock tick.
// Timing: all state changes on the rising clock edge; time_en, tick_en and the
// ready outputs are combinational from the registers and valid in the tick
// cycle. rst (synchronous) removes all tasks. The record layout follows the
// original timing waveform; the dormant timer, the ignored zero delay, selection of
// a cancelled task by priority and the tie rules are this design's choices.
module clock_tick_mgmt
  import intmgmt_pkg::*;
#(
  parameter int unsigned TICK_CYCLES = 5   // clocks per clock tick
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rd,          // load the task record on the inputs
  input  logic [1:0] prio,
  input  logic [1:0] id,
  input  logic [3:0] delay_time,
  input  logic       cancel,      // cancel the delay of the task with prio
  output logic [3:0] q,           // tick timer
  output logic       time_en,     // clock tick
  output logic       tick_en,     // clock tick interrupt request
  output logic [1:0] ready_id,
  output logic [1:0] ready_prio,
  output logic [3:0] ready_mask,  // task ids made ready at this tick
  output tick_task_t delayreg [4],
  output logic [3:0] loaded,      // DelayReg[i] holds a delayed task
  output logic       dormant
);

  localparam int NT = 4;

  tick_task_t ttdelayreg;         // input register
  logic       ttd_v;
  logic [NT-1:0] expire;

  always_comb begin
    dormant = !(|loaded) && !ttd_v;
    time_en = !dormant && (32'(q) == TICK_CYCLES - 1);
    for (int i = 0; i < NT; i++)
      expire[i] = time_en && loaded[i] && (delayreg[i].delay == 4'd0);
    tick_en    = |expire;
    ready_mask = expire;
    ready_id   = '0;
    ready_prio = '0;
    for (int i = NT - 1; i >= 0; i--) begin
      logic better;
      better = expire[i];
      for (int j = 0; j < NT; j++)
        if (expire[j] && (delayreg[j].prio < delayreg[i].prio ||
            (delayreg[j].prio == delayreg[i].prio && j < i)))
          better = 1'b0;
      if (better) begin
        ready_id   = delayreg[i].id;
        ready_prio = delayreg[i].prio;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ttdelayreg <= '0;
      ttd_v      <= 1'b0;
      q          <= '0;
      loaded     <= '0;
      for (int i = 0; i < NT; i++) delayreg[i] <= '0;
    end else begin
      ttdelayreg <= '{delay: delay_time, prio: prio, id: id};
      ttd_v      <= rd && (delay_time != 4'd0);

      if (dormant || time_en) q <= '0;
      else                    q <= q + 4'd1;

      for (int i = 0; i < NT; i++) begin
        if (expire[i]) begin
          loaded[i] <= 1'b0;
        end else if (time_en && loaded[i]) begin
          delayreg[i].delay <= delayreg[i].delay - 4'd1;
        end
        if (cancel && loaded[i] && delayreg[i].prio == prio && !expire[i])
          delayreg[i].delay <= 4'd0;
      end

      if (ttd_v) begin
        delayreg[ttdelayreg.id] <= ttdelayreg;
        loaded[ttdelayreg.id]   <= 1'b1;
      end
    end
  end

endmodule
