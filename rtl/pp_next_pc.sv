// pp_next_pc: the NextPC unit of the protocol processor.
//
// Chooses the PC of the next cycle from the decoded instruction, the CCB
// lookup and the general purpose inputs, so that every instruction, taken
// jumps included, completes in one cycle:
//   WAT           hold the PC until every input selected by the bitmap is 1
//   JMP type 00   PC + rel - 128
//   JMP type 01   PC + rel - 128 if every selected input 8..0 is 1
//   JMP type 10   PC + rel - 128 if any comparator matched
//   CMP/CPS jump  PC + CCB value - 128 if any comparator matched
//   otherwise     PC + 1
// Jump values carry 128 + the relative jump; the PC wraps modulo the ILT
// depth. "Every selected input is 1" is this design's reading of a bitmap
// match. Purely combinational.
module pp_next_pc
  import pp_pkg::*;
(
  input  logic [PCW-1:0]  pc,
  input  ctl_t            ctl,
  input  logic            hit,        // any comparator matched
  input  logic [7:0]      ccb_value,
  input  logic [N_IN-1:0] inputs,
  output logic [PCW-1:0]  npc
);
  logic       in_ok;
  logic [7:0] rel;
  logic       take;

  assign in_ok = (inputs & ctl.in_mask) == ctl.in_mask;

  always_comb begin
    take = 1'b0;
    rel  = ctl.rel;
    if (ctl.jmp_always)                  take = 1'b1;
    if (ctl.jmp_inputs && in_ok)         take = 1'b1;
    if (ctl.jmp_match && hit)            take = 1'b1;
    if (ctl.cmp_jump && hit) begin
      take = 1'b1;
      rel  = ccb_value;
    end
    if (ctl.wait_in && !in_ok)
      npc = pc;
    else if (take)
      npc = PCW'(8'(pc) + rel - 8'd128);
    else
      npc = PCW'(pc + 1'b1);
  end
endmodule
