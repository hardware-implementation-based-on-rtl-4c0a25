// int_source_mgmt: interrupt source management logic.
//
// Turns the interrupt status bits into an interrupt source Id (type number).
// A comparator classifies the request: bits selected by a_mask are user
// interrupts (signal A), bits selected by b_mask are system interrupts
// (signal B). With the default masks ISR4 is the user source and ISR0..ISR3
// are the system sources, as in the original design.
//   * System: a selector picks the type number register of the requesting
//     source, Idreg0..Idreg3 = 1, 2, 4, 8. If several system bits are set the
//     lowest-numbered one wins (smaller type number = higher priority).
//   * User: each new user request, gated by int_en, fires a trigger flip-flop;
//     its rising edge makes the accumulator add 1 and the Id is Idreg4 OR the
//     accumulator: 16, 17, 18, ... At most MAX_USER (15) Ids are handed out,
//     after which the accumulator wraps to 0. A user request wins over a
//     system request present in the same cycle (the original timing waveform
//     gives Id 16 for ISR = 24, bits 3 and 4 set).
// Timing: inputs are sampled on the rising clock edge; id and id_valid are
// registered, one cycle after the request. id_valid stays high while the
// request and int_en are held; id_new pulses for one cycle per interrupt.
// rst (synchronous) clears everything including the accumulator; clr clears
// the trigger flip-flop and the Id output. The masks, the edge detection and
// the wrap of the accumulator are this design's choices.
module int_source_mgmt
  import intmgmt_pkg::*;
#(
  parameter int unsigned USER_IDS = MAX_USER  // number of distinct user Ids
) (
  input  logic       clk,
  input  logic       rst,      // synchronous reset, active high
  input  logic [7:0] isr,      // interrupt status bits ISR[x]
  input  logic [7:0] a_mask,   // bits that are user interrupts (A)
  input  logic [7:0] b_mask,   // bits that are system interrupts (B)
  input  logic       int_en,   // interrupt enable from the controller
  input  logic       clr,      // clear trigger and output
  output id_t        id,       // interrupt source Id
  output logic       id_valid, // id holds the Id of a present request
  output logic       id_new,   // one-cycle pulse: a new interrupt Id
  output logic       id_user   // the Id belongs to a user interrupt
);

  logic       sel_a, sel_b;        // comparator outputs
  logic       user_req, sys_req;
  logic [3:0] sys_bits;
  id_t        sys_id;
  logic       trig_q;              // trigger flip-flop (user path)
  logic       sys_q;               // previous system request
  logic [3:0] acc_q;               // accumulator of user interrupts

  always_comb begin
    sel_a    = |(isr & a_mask);
    sys_bits = isr[3:0] & b_mask[3:0];
    sel_b    = |sys_bits;
    user_req = int_en && sel_a;
    sys_req  = int_en && sel_b && !sel_a;
    sys_id   = '0;
    for (int k = N_SYS - 1; k >= 0; k--)
      if (sys_bits[k]) sys_id = idreg(k);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      trig_q   <= 1'b0;
      sys_q    <= 1'b0;
      acc_q    <= '0;
      id       <= '0;
      id_valid <= 1'b0;
      id_new   <= 1'b0;
      id_user  <= 1'b0;
    end else if (clr) begin
      trig_q   <= 1'b0;
      sys_q    <= 1'b0;
      id       <= '0;
      id_valid <= 1'b0;
      id_new   <= 1'b0;
      id_user  <= 1'b0;
    end else begin
      trig_q <= user_req;
      sys_q  <= sys_req;
      id_new <= 1'b0;
      if (user_req && !trig_q) begin
        id      <= IDREG4 | id_t'(acc_q);
        id_user <= 1'b1;
        id_new  <= 1'b1;
        acc_q   <= (32'(acc_q) == USER_IDS - 1) ? '0 : acc_q + 4'd1;
      end else if (sys_req && (!sys_q || id_user || id != sys_id)) begin
        id      <= sys_id;
        id_user <= 1'b0;
        id_new  <= 1'b1;
      end
      id_valid <= user_req || sys_req;
    end
  end

endmodule
