// tb_int_vector_mgmt: self-checking test of the IVRreg vector group.
// Writes the four system vectors by index and the user vectors in turn,
// then looks up every Id on both read ports and compares with a shadow copy
// kept by the testbench: Ids 1, 2, 4, 8 -> IVRreg0..3, Id 16 + n -> the n-th
// user vector. Also checks unwritten and illegal Ids, the wrap of the user
// write pointer after 15 vectors and the saturating user count.
module tb_int_vector_mgmt;
  import intmgmt_pkg::*;

  logic clk = 0, rst, wr_sys, wr_user;
  logic [1:0] wr_sys_idx;
  vec_t wr_data, sys_entry, usr_entry;
  logic wr_entry, wr_entry_user;
  id_t  rd_id [2];
  vec_t rd_vec [2];
  logic rd_hit [2];
  logic [3:0] user_count;
  int checks = 0, failures = 0;
  vec_t shadow_sys [4];
  vec_t shadow_usr [MAX_USER];

  int_vector_mgmt dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic look(input int port, input id_t id, input bit hit, input vec_t v);
    rd_id[port] = id; #1;
    check(rd_hit[port] == hit && (!hit || rd_vec[port] == v),
          $sformatf("port %0d id %0d: hit=%0b vec=%h expected %0b %h", port, id, rd_hit[port], rd_vec[port], hit, v));
  endtask

  initial begin
    rst = 1; wr_sys = 0; wr_user = 0; wr_sys_idx = 0; wr_data = 0; wr_entry = 0; wr_entry_user = 0;
    rd_id[0] = 0; rd_id[1] = 0;
    repeat (2) @(negedge clk); rst = 0;
    look(0, 8'd1, 0, 0);
    look(1, 8'd16, 0, 0);
    for (int k = 0; k < 4; k++) begin
      @(negedge clk); wr_sys = 1; wr_sys_idx = 2'(k); wr_data = $urandom; shadow_sys[k] = wr_data;
    end
    @(negedge clk); wr_sys = 0;
    for (int n = 0; n < 5; n++) begin
      @(negedge clk); wr_user = 1; wr_data = 32'hF000_0000 + $urandom_range(0, 4095) * 4; shadow_usr[n] = wr_data;
    end
    @(negedge clk); wr_user = 0;
    check(user_count == 5, "five user vectors");
    for (int k = 0; k < 4; k++) begin
      look(0, idreg(k), 1, shadow_sys[k]);
      look(1, idreg(k), 1, shadow_sys[k]);
    end
    for (int n = 0; n < 5; n++) begin
      look(1, 8'(16 + n), 1, shadow_usr[n]);
      look(0, 8'(16 + n), 1, shadow_usr[n]);
    end
    // unified entries
    @(negedge clk); wr_entry = 1; wr_entry_user = 0; wr_data = 32'h0000_0500;
    @(negedge clk); wr_entry_user = 1; wr_data = 32'h0000_0A00;
    @(negedge clk); wr_entry = 0;
    check(sys_entry == 32'h500 && usr_entry == 32'hA00, "unified entries stored");
    look(1, 8'd16, 1, shadow_usr[0]);
    look(1, 8'd21, 0, 0);      // not yet written
    look(0, 8'd3, 0, 0);       // not a one-hot system Id
    look(0, 8'd31, 0, 0);      // beyond 15 user Ids
    look(0, 8'd0, 0, 0);
    // fill the rest, then wrap: the 16th write lands in IVRreg4 again
    for (int n = 5; n < MAX_USER + 1; n++) begin
      @(negedge clk); wr_user = 1; wr_data = $urandom;
      shadow_usr[n % MAX_USER] = wr_data;
    end
    @(negedge clk); wr_user = 0;
    check(user_count == MAX_USER, "user count saturates at 15");
    for (int n = 0; n < MAX_USER; n++) look(1, 8'(16 + n), 1, shadow_usr[n]);
    // both ports at once
    rd_id[0] = 8'd8; rd_id[1] = 8'd30; #1;
    check(rd_vec[0] == shadow_sys[3] && rd_vec[1] == shadow_usr[14], "two ports independent");
    // system rewrite keeps user entries
    @(negedge clk); wr_sys = 1; wr_sys_idx = 2; wr_data = 32'h1234_5678;
    @(negedge clk); wr_sys = 0;
    look(0, 8'd4, 1, 32'h1234_5678);
    look(1, 8'd16, 1, shadow_usr[0]);
    rst = 1; @(negedge clk); rst = 0;
    look(0, 8'd4, 0, 0);
    check(user_count == 0, "reset clears count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
