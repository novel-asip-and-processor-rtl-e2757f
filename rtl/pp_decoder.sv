// pp_decoder: instruction decoder (ID) of the protocol processor.
//
// Splits a 24-bit instruction into control for the rest of the processor.
// Formats (bit positions as published):
//   NOP 0000 b 0...0
//   CMP 0001 b new[18] jump[17] pointer[16:13] width[12:11] offset[10]
//   SET 0010 b outputs[9:0]
//   CPS 0011 b CMP fields in [18:10], outputs[9:0]
//   JMP 0100 b type[18:17] rel[7:0]; type 01: input bitmap[16:8] = inputs 8..0;
//              type 10: pointer[16:13] width[12:11] offset[10] new[9]
//   WAT 0101 b input bitmap[18:0]
// b is the buffer ctrl bit 19. Outputs of SET and CPS are driven for the one
// cycle the instruction executes; there is no output register. Unused codes
// and JMP type 11 behave as NOP, which is this design's choice.
module pp_decoder
  import pp_pkg::*;
(
  input  logic [IW-1:0]    instr,
  output ctl_t             ctl,
  output logic [N_OUT-1:0] outputs
);
  opcode_e op;
  jtype_e  jt;

  assign op = opcode_e'(instr[23:20]);
  assign jt = jtype_e'(instr[18:17]);

  always_comb begin
    ctl         = '0;
    ctl.width   = cwidth_e'(instr[12:11]);
    ctl.offset  = instr[10];
    ctl.pointer = instr[16:13];
    ctl.rel     = instr[7:0];
    ctl.buf2    = instr[19];
    outputs     = '0;
    unique case (op)
      OP_CMP, OP_CPS: begin
        ctl.cmp      = 1'b1;
        ctl.newcmp   = instr[18];
        ctl.cmp_jump = instr[17];
        if (op == OP_CPS) outputs = instr[9:0];
      end
      OP_SET: outputs = instr[9:0];
      OP_JMP: begin
        unique case (jt)
          JT_ALWAYS: ctl.jmp_always = 1'b1;
          JT_INPUTS: begin
            ctl.jmp_inputs = 1'b1;
            ctl.in_mask    = {{(N_IN-9){1'b0}}, instr[16:8]};
          end
          JT_MATCH: begin
            ctl.jmp_match = 1'b1;
            ctl.cmp       = 1'b1;
            ctl.newcmp    = instr[9];
          end
          default: ;
        endcase
      end
      OP_WAT: begin
        ctl.wait_in = 1'b1;
        ctl.in_mask = instr[18:0];
      end
      default: ;
    endcase
  end
endmodule
