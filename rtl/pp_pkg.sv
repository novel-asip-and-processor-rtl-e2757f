// pp_pkg: shared types and constants of the protocol processor (PP).
//
// The PP executes one 24-bit instruction per clock cycle, in step with a
// 32-bit input stream. An instruction is {code[23:20], buffer ctrl[19],
// instruction specific bits[18:0]}. The six instruction codes, the field
// positions of every format and the table sizes below follow the published
// instruction set; the stream word struct (data plus start/end flags and a
// byte count for the last word) is this design's own way of modelling the
// physical-layer input port.
package pp_pkg;

  // Table geometry.
  localparam int unsigned ILT_DEPTH = 32;  // 24-bit instructions
  localparam int unsigned PCW       = $clog2(ILT_DEPTH);
  localparam int unsigned PCB_LINES = 16;  // addressed by a 4-bit pointer
  localparam int unsigned CCB_LINES = 8;   // addressed by pointer[2:0]
  localparam int unsigned NPAR      = 4;   // parameters per line / comparators
  localparam int unsigned PW        = 32;  // parameter width
  localparam int unsigned N_IN      = 19;  // general purpose inputs
  localparam int unsigned N_OUT     = 10;  // general purpose outputs
  localparam int unsigned IW        = 24;  // instruction width

  typedef enum logic [3:0] {
    OP_NOP = 4'b0000,
    OP_CMP = 4'b0001,
    OP_SET = 4'b0010,
    OP_CPS = 4'b0011,
    OP_JMP = 4'b0100,
    OP_WAT = 4'b0101
  } opcode_e;

  // JMP type field, bits 18:17.
  typedef enum logic [1:0] {
    JT_ALWAYS = 2'b00,
    JT_INPUTS = 2'b01,
    JT_MATCH  = 2'b10,
    JT_NONE   = 2'b11
  } jtype_e;

  // Compare width code, bits 12:11 of CMP/CPS/JMP type 10.
  typedef enum logic [1:0] {
    W4  = 2'b00,
    W8  = 2'b01,
    W16 = 2'b10,
    W32 = 2'b11
  } cwidth_e;

  // One word of the received stream. Bytes are in wire order from the MSB:
  // the first byte received is data[31:24].
  typedef struct packed {
    logic [31:0] data;
    logic        valid;   // a frame word is present
    logic        sof;     // first word of a frame
    logic        eof;     // last word of a frame
    logic [2:0]  nbytes;  // valid bytes (1..4) in an eof word, 4 otherwise
  } word_t;

  localparam word_t WORD_IDLE = '{data: '0, valid: 1'b0, sof: 1'b0, eof: 1'b0, nbytes: 3'd0};

  // Decoded control produced by the instruction decoder.
  typedef struct packed {
    logic             buf2;      // keep two words in the input buffer
    logic             cmp;       // run the comparator array and store its result
    logic             newcmp;    // start comparison from scratch
    logic             cmp_jump;  // CMP/CPS: jump through the CCB on a match
    logic [3:0]       pointer;   // PCB line, CCB line = pointer[2:0]
    cwidth_e          width;
    logic             offset;    // 0: bits 31:0, 1: bits 47:16 of the buffer
    logic             wait_in;   // WAT
    logic             jmp_always;
    logic             jmp_inputs;
    logic             jmp_match;
    logic [N_IN-1:0]  in_mask;   // inputs that must all be 1 (WAT, JMP 01)
    logic [7:0]       rel;       // 128 + relative jump of a JMP
  } ctl_t;

  // Ones-complement 16-bit end-around-carry fold of a 32-bit sum.
  function automatic logic [15:0] csum_fold(input logic [31:0] s);
    logic [31:0] t;
    t = {16'h0, s[31:16]} + {16'h0, s[15:0]};
    t = {16'h0, t[31:16]} + {16'h0, t[15:0]};
    return t[15:0];
  endfunction

endpackage
