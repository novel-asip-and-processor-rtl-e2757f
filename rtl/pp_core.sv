// pp_core: the protocol processor (PP) datapath and control.
//
// One instruction per clock with no pipeline, so the program stays locked to
// the input stream word by word. Each cycle the PC addresses the ILT, the
// decoder drives the outputs and selects a PCB line, the comparator array
// matches a field of the input buffer against the four parameters, the CCB
// turns the match array into a relative jump and NextPC forms the next PC:
// PC -> ILT -> PCB -> compare -> CCB -> adder -> PC is the single-cycle
// critical path. The input buffer is loaded from the port every cycle.
//
// Interface: din is the input port (one 32-bit word per clock while a frame
// is received); inputs/outputs are the 19 general purpose inputs and 10
// outputs; `cur` is the word the current instruction sees, handed to the
// accelerators so that an output pulse and the data it refers to line up.
// The table port comes from pp_config_if (start/halt included); the
// *_rdata outputs return the table entry at tbl_addr for configuration reads.
module pp_core
  import pp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            din,
  input  logic [N_IN-1:0]  inputs,
  output logic [N_OUT-1:0] outputs,
  output word_t            cur,
  // configuration
  input  logic             ilt_we,
  input  logic             pcb_we,
  input  logic             ccb_we,
  input  logic [5:0]       tbl_addr,
  input  logic [31:0]      tbl_wdata,
  input  logic             start,
  input  logic             halt,
  output logic [IW-1:0]    ilt_rdata,
  output logic [PW-1:0]    pcb_rdata,
  output logic [7:0]       ccb_rdata,
  // observation
  output logic [PCW-1:0]   pc,
  output logic             run
);
  logic [IW-1:0]             ilt_word, instr;
  ctl_t                      ctl;
  logic [N_OUT-1:0]          dec_out;
  logic [63:0]               buf64;
  logic [NPAR-1:0][PW-1:0]   params;
  logic [NPAR-1:0]           match;
  logic                      hit;
  logic [7:0]                ccb_value;
  logic [PCW-1:0]            npc;

  pp_pc u_pc (
    .clk, .rst_n, .halt, .start, .npc, .pc, .run
  );

  pp_ilt u_ilt (
    .clk, .we(ilt_we), .waddr(tbl_addr[PCW-1:0]), .wdata(tbl_wdata[IW-1:0]),
    .raddr(pc), .instr(ilt_word), .rdata(ilt_rdata)
  );

  assign instr = run ? ilt_word : '0;  // NOP while halted

  pp_decoder u_id (
    .instr, .ctl, .outputs(dec_out)
  );
  assign outputs = dec_out;

  pp_input_buffer u_buf (
    .clk, .rst_n, .din, .two_words(ctl.buf2), .buf64, .cur
  );

  pp_pcb u_pcb (
    .clk, .we(pcb_we), .waddr(tbl_addr), .wdata(tbl_wdata),
    .line(ctl.pointer), .params, .rdata(pcb_rdata)
  );

  pp_compare_unit u_cmp (
    .clk, .rst_n, .buf64, .params, .width(ctl.width), .offset(ctl.offset),
    .newcmp(ctl.newcmp), .update(ctl.cmp), .match
  );

  pp_ccb u_ccb (
    .clk, .we(ccb_we), .waddr(tbl_addr[4:0]), .wdata(tbl_wdata[7:0]),
    .line(ctl.pointer[2:0]), .match, .hit, .value(ccb_value), .rdata(ccb_rdata)
  );

  pp_next_pc u_npc (
    .pc, .ctl, .hit, .ccb_value, .inputs, .npc
  );
endmodule
