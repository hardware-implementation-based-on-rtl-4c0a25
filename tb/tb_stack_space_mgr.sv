// tb_stack_space_mgr: self-checking test of the stack space manager.
// Saves random controller register snapshots in every level, writes random
// CPU words into every frame, then reads all of them back (data_out one clock
// after rd, ctx_out combinational) and compares with shadow copies. Also
// checks that levels do not overwrite each other and that an out-of-range
// level neither writes nor reads.
module tb_stack_space_mgr;
  import intmgmt_pkg::*;

  localparam int L = MAX_USER, W = 8;
  logic clk = 0, rst, save, wr, rd;
  logic [4:0] level;
  intc_regs_t ctrl_in, ctx_out;
  logic [2:0] addr;
  word_t data_in, data_out;
  int checks = 0, failures = 0;
  intc_regs_t sh_ctx [L];
  word_t      sh_cpu [L][W];

  stack_space_mgr dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic intc_regs_t rnd_regs();
    return '{isr: $urandom, ipr: $urandom, ier: $urandom, iar: $urandom, ivr: $urandom, mer: $urandom};
  endfunction

  initial begin
    rst = 1; save = 0; wr = 0; rd = 0; level = 0; addr = 0; data_in = 0; ctrl_in = '0;
    repeat (2) @(negedge clk); rst = 0;
    for (int l = 0; l < L; l++) begin
      @(negedge clk); level = 5'(l); save = 1; ctrl_in = rnd_regs(); sh_ctx[l] = ctrl_in;
      @(negedge clk); save = 0;
      for (int w = 0; w < W; w++) begin
        wr = 1; addr = 3'(w); data_in = $urandom; sh_cpu[l][w] = data_in;
        @(negedge clk);
      end
      wr = 0;
    end
    // out-of-range level: ignored
    level = 5'd20; save = 1; wr = 1; ctrl_in = '1; data_in = '1; addr = 0;
    @(negedge clk); save = 0; wr = 0;
    #1; check(ctx_out == '0, "out of range level reads zero");
    for (int l = L - 1; l >= 0; l--) begin
      level = 5'(l); #1;
      check(ctx_out == sh_ctx[l], $sformatf("context of level %0d", l));
      for (int w = 0; w < W; w++) begin
        rd = 1; addr = 3'(w);
        @(negedge clk);
        check(data_out == sh_cpu[l][w], $sformatf("cpu word %0d of level %0d", w, l));
      end
      rd = 0;
    end
    // data_out holds without rd
    @(negedge clk); level = 0; addr = 1;
    @(negedge clk); check(data_out == sh_cpu[0][W-1], "data_out holds when rd low");
    rst = 1; @(negedge clk); rst = 0; level = 3; #1;
    check(ctx_out == '0, "reset clears frames");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
