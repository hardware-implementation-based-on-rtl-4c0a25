// stack_space_mgr: stack space manager.
//
// Holds one context frame per interrupt nesting level. On entry to a user
// interrupt the control logic saves the interrupt controller registers
// (ISR, IPR, IER, IAR, IVR, MER) into the frame of the new level; the CPU
// stores and reloads its own registers through Data_in / Data_out, CPU_WORDS
// words per frame, with WR and RD. On interrupt return the frame of the level
// being left is presented on ctx_out so the controller state can be restored.
// Interface: level selects the frame for every operation; save writes
// ctrl_in into it; wr writes data_in into word addr; rd loads word addr into
// data_out on the next clock. ctx_out is combinational from the frame
// selected by level.
// Timing: writes and data_out are registered on the rising clock edge. rst
// clears the frames. The frame contents beyond the named controller
// registers, the frame count and CPU_WORDS are this design's choices.
module stack_space_mgr
  import intmgmt_pkg::*;
#(
  parameter int unsigned LEVELS    = MAX_USER,
  parameter int unsigned CPU_WORDS = 8
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [4:0] level,
  input  logic       save,
  input  intc_regs_t ctrl_in,
  output intc_regs_t ctx_out,
  input  logic       wr,
  input  logic       rd,
  input  logic [$clog2(CPU_WORDS)-1:0] addr,
  input  word_t      data_in,
  output word_t      data_out
);

  intc_regs_t ctx_mem [LEVELS];
  word_t      cpu_mem [LEVELS][CPU_WORDS];

  logic in_range;
  assign in_range = 32'(level) < LEVELS;

  always_ff @(posedge clk) begin
    if (rst) begin
      data_out <= '0;
      for (int l = 0; l < LEVELS; l++) begin
        ctx_mem[l] <= '0;
        for (int w = 0; w < CPU_WORDS; w++) cpu_mem[l][w] <= '0;
      end
    end else begin
      if (save && in_range) ctx_mem[level] <= ctrl_in;
      if (wr && in_range)   cpu_mem[level][addr] <= data_in;
      if (rd)               data_out <= in_range ? cpu_mem[level][addr] : '0;
    end
  end

  assign ctx_out = in_range ? ctx_mem[level] : '0;

endmodule
