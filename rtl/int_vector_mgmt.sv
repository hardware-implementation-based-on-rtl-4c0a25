// int_vector_mgmt: interrupt vector management logic.
//
// Keeps the interrupt vector register group IVRreg and turns an interrupt
// source Id into the entry address of its interrupt service routine.
// IVRreg0..IVRreg3 hold the vectors of the system sources ISR0..ISR3, written
// by index from the controller's IVR value. User vectors start at IVRreg4 and
// are stored in turn: each user write goes to the next free register, so the
// n-th user vector (n = 0..USER_IDS-1) belongs to user Id 16 + n, the order in
// which int_source_mgmt hands out user Ids. The write pointer wraps after
// USER_IDS entries.
// Id decoding: a one-hot Id 1, 2, 4, 8 selects IVRreg0..3; an Id with bit 4
// set selects IVRreg4 + Id[3:0]. Any other Id reads zero with hit low.
// Besides the per-source vectors the block holds the two unified entry
// addresses, one where every system interrupt task starts and one where
// every user interrupt task starts; both are written from the same data
// input with wr_entry (wr_entry_user selects which).
// Timing: writes are registered on the rising clock edge; the two read ports
// are combinational selectors. rst clears all entries and the pointer.
// The register width, the two read ports and the reset behaviour are this
// design's choices.
module int_vector_mgmt
  import intmgmt_pkg::*;
#(
  parameter int unsigned USER_IDS = MAX_USER
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       wr_sys,       // write a system vector
  input  logic [1:0] wr_sys_idx,   // which of IVRreg0..3
  input  logic       wr_user,      // store the next user vector in turn
  input  vec_t       wr_data,      // IVR[x] value from the controller
  input  logic       wr_entry,     // write a unified entry address
  input  logic       wr_entry_user,// 0: system entry, 1: user entry
  output vec_t       sys_entry,    // unified system interrupt entry
  output vec_t       usr_entry,    // unified user interrupt entry
  input  id_t        rd_id [2],    // Ids to look up
  output vec_t       rd_vec [2],   // their entry addresses
  output logic       rd_hit [2],   // the Id names a written register
  output logic [3:0] user_count    // user vectors stored so far (saturates)
);

  localparam int unsigned N_REG = N_SYS + USER_IDS;

  vec_t              ivrreg [N_REG];
  logic [N_REG-1:0]  written;
  logic [3:0]        wr_ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      written    <= '0;
      wr_ptr     <= '0;
      sys_entry  <= '0;
      usr_entry  <= '0;
      user_count <= '0;
      for (int i = 0; i < N_REG; i++) ivrreg[i] <= '0;
    end else begin
      if (wr_entry) begin
        if (wr_entry_user) usr_entry <= wr_data;
        else               sys_entry <= wr_data;
      end
      if (wr_sys) begin
        ivrreg[wr_sys_idx]  <= wr_data;
        written[wr_sys_idx] <= 1'b1;
      end
      if (wr_user) begin
        ivrreg[N_SYS + 32'(wr_ptr)]  <= wr_data;
        written[N_SYS + 32'(wr_ptr)] <= 1'b1;
        wr_ptr <= (32'(wr_ptr) == USER_IDS - 1) ? '0 : wr_ptr + 4'd1;
        if (32'(user_count) < USER_IDS) user_count <= user_count + 4'd1;
      end
    end
  end

  // Id -> register index
  function automatic logic [5:0] id_index(input id_t rid, output logic ok);
    ok = 1'b1;
    unique case (1'b1)
      rid == 8'h01: return 6'd0;
      rid == 8'h02: return 6'd1;
      rid == 8'h04: return 6'd2;
      rid == 8'h08: return 6'd3;
      (rid[7:4] == 4'h1) && (32'(rid[3:0]) < USER_IDS):
        return 6'(N_SYS) + 6'(rid[3:0]);
      default: begin
        ok = 1'b0;
        return 6'd0;
      end
    endcase
  endfunction

  always_comb begin
    for (int p = 0; p < 2; p++) begin
      logic       ok;
      logic [5:0] idx;
      idx       = id_index(rd_id[p], ok);
      rd_vec[p] = ok ? ivrreg[idx] : '0;
      rd_hit[p] = ok && written[idx];
    end
  end

endmodule
