// tb_int_source_mgmt: self-checking test of the interrupt source logic.
// Replays the sequence of the reference waveform (system sources 1, 2, 4, 8,
// a combined request 24 that is taken as a user interrupt, clr, rst, then
// three user requests receiving Ids 16, 17, 18 with ISR3 classed as user),
// then checks accumulator wrap-around after 15 user Ids, lowest-bit
// selection among several system bits, gating by int_en and that a held
// request produces only one id_new pulse. Expected values are computed from
// the Idreg table (1 << k, 16 + n) in the testbench itself.
module tb_int_source_mgmt;
  import intmgmt_pkg::*;

  logic clk = 0, rst, int_en, clr;
  logic [7:0] isr, a_mask, b_mask;
  id_t id;
  logic id_valid, id_new, id_user;
  int checks = 0, failures = 0;
  int news = 0;

  int_source_mgmt dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (id_new) news++;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: id=%0d valid=%0b new=%0b user=%0b", what, id, id_valid, id_new, id_user);
    end
  endtask

  // apply a request for `len` cycles; check the Id one cycle after it starts
  task automatic req(input logic [7:0] v, input id_t exp_id, input bit exp_user, input int len = 2);
    @(negedge clk); isr = v; int_en = 1;
    @(negedge clk);
    check(id_valid && id_new && id == exp_id && id_user == exp_user,
          $sformatf("isr=%0d expects id %0d", v, exp_id));
    repeat (len - 1) begin
      @(negedge clk);
      check(id_valid && !id_new && id == exp_id, "held request keeps its Id");
    end
    int_en = 0; isr = 0;
    @(negedge clk);
    check(!id_valid && !id_new, "no request, no Id");
  endtask

  initial begin
    rst = 1; int_en = 0; clr = 0; isr = 0; a_mask = 8'h10; b_mask = 8'h0F;
    repeat (2) @(negedge clk);
    rst = 0;
    // system sources, Idreg0..3
    for (int k = 0; k < 4; k++) req(8'(1 << k), idreg(k), 0);
    // request without int_en is ignored
    @(negedge clk); isr = 8'h04; int_en = 0;
    @(negedge clk); check(!id_valid && !id_new, "int_en low gates the request");
    isr = 0;
    // ISR = 24: user bit present, user Id 16
    req(8'd24, 8'd16, 1);
    // several system bits: the smallest type number wins
    req(8'h0C, 8'd4, 0);
    req(8'h0A, 8'd2, 0);
    // clr drops a held Id
    @(negedge clk); isr = 8'h01; int_en = 1;
    @(negedge clk); check(id_valid && id == 1, "before clr");
    clr = 1;
    @(negedge clk); clr = 0; check(!id_valid, "clr clears the Id");
    isr = 0; int_en = 0;
    @(negedge clk);
    // rst clears the accumulator; ISR3 classed as user (as in the waveform)
    rst = 1; @(negedge clk); rst = 0;
    a_mask = 8'h18; b_mask = 8'h07;
    for (int n = 0; n < 3; n++) req(8'h08, 8'(16 + n), 1);
    // continue to wrap-around: 15 Ids 16..30 then 16 again
    for (int n = 3; n < MAX_USER; n++) req(8'h08, 8'(16 + n), 1, 1);
    req(8'h08, 8'd16, 1, 1);
    // a system source under the new masks still maps to its Idreg
    req(8'h02, 8'd2, 0);
    // random mix against a reference counter
    begin
      int acc = 1;
      a_mask = 8'h10; b_mask = 8'h0F;
      for (int t = 0; t < 200; t++) begin
        logic [7:0] v;
        v = 8'($urandom_range(1, 31));
        if (v[4]) begin
          req(v, 8'(16 + acc), 1, 1);
          acc = (acc + 1) % MAX_USER;
        end else begin
          int k;
          k = 0;
          while (!v[k]) k++;
          req(v, idreg(k), 0, 1);
        end
      end
    end
    check(news > 200, "id_new pulses counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
