// pp_top: protocol processor with its accelerators and configuration port.
//
// An in-line packet decoder: frames arrive one 32-bit word per clock from
// the physical layer side, and a small program of at most 32 instructions,
// aided by four-way parallel compares and codebook jumps, decides for every
// frame which header fields are acceptable, which checksum accelerators to
// run and whether the payload is handed to the payload memory. The
// processor (pp_core) reaches its accelerators only through general purpose
// inputs and outputs. Their numbering follows the published example program
// for Ethernet II / IPv4 / UDP and ARP reception:
//   in0  frame start (port)            out0 start UDP checksum
//   in1  CRC done                      out1 start IP header checksum
//   in2  CRC correct                   out2 start IP length counter
//   in3  UDP checksum done             out4 start payload storage
//   in4  UDP checksum correct          out5 packet accepted (commit payload)
//   in5  IP header checksum done       out6 stop payload storage
//   in6  IP header checksum correct
// Inputs 18:7 come from outside (ext_in); all ten outputs are also brought
// out, and are collected in the result register of the configuration port.
//
// Interface: din is the input port (valid/sof/eof/nbytes per word, in-frame
// words back to back); cfg_* is the microcontroller's SRAM-style port (see
// pp_config_if for the address map); pmem_* is the payload memory write
// port. Everything runs on one clock with an asynchronous active-low reset.
module pp_top
  import pp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  word_t            din,
  input  logic [N_IN-8:0]  ext_in,
  output logic [N_OUT-1:0] outputs,
  // microcontroller port
  input  logic             cfg_cs,
  input  logic             cfg_we,
  input  logic [9:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  output logic [31:0]      cfg_rdata,
  // payload memory port
  output logic             pmem_we,
  output logic [13:0]      pmem_addr,
  output logic [31:0]      pmem_wdata,
  // observation
  output logic [PCW-1:0]   pc,
  output logic             run,
  output logic             len_err,
  output logic             pmem_overflow
);
  logic [N_IN-1:0] inputs;
  word_t           cur;
  logic            ilt_we, pcb_we, ccb_we, start, halt;
  logic [5:0]      tbl_addr;
  logic [31:0]     tbl_wdata;
  logic            crc_done, crc_ok, ip_done, ip_ok, udp_done, udp_ok;
  logic            len_active, ip_end;
  logic [2:0]      end_bytes;
  logic [31:0]     commit_info;
  logic [IW-1:0]   ilt_rdata;
  logic [PW-1:0]   pcb_rdata;
  logic [7:0]      ccb_rdata;

  assign inputs = {ext_in, ip_ok, ip_done, udp_ok, udp_done, crc_ok, crc_done,
                   din.sof & din.valid};

  pp_config_if u_cfg (
    .clk, .rst_n, .cfg_cs, .cfg_we, .cfg_addr, .cfg_wdata, .cfg_rdata,
    .ilt_we, .pcb_we, .ccb_we, .tbl_addr, .tbl_wdata, .start, .halt,
    .ilt_rdata, .pcb_rdata, .ccb_rdata, .pp_outputs(outputs), .commit_info
  );

  pp_core u_core (
    .clk, .rst_n, .din, .inputs, .outputs, .cur,
    .ilt_we, .pcb_we, .ccb_we, .tbl_addr, .tbl_wdata, .start, .halt,
    .ilt_rdata, .pcb_rdata, .ccb_rdata, .pc, .run
  );

  acc_crc32 u_crc (
    .clk, .rst_n, .cur, .done(crc_done), .ok(crc_ok)
  );

  acc_ip_csum u_ipcs (
    .clk, .rst_n, .start(outputs[1]), .cur, .done(ip_done), .ok(ip_ok)
  );

  acc_udp_csum u_udpcs (
    .clk, .rst_n, .start(outputs[0]), .cur, .done(udp_done), .ok(udp_ok)
  );

  acc_len_counter u_len (
    .clk, .rst_n, .start(outputs[2]), .cur, .active(len_active), .ip_end,
    .end_bytes, .len_err
  );

  acc_mem_if u_mem (
    .clk, .rst_n, .start(outputs[4]), .stop(outputs[6]), .commit(outputs[5]),
    .cur, .len_active, .len_end(ip_end), .len_end_bytes(end_bytes),
    .mem_we(pmem_we), .mem_addr(pmem_addr), .mem_wdata(pmem_wdata),
    .commit_info, .overflow(pmem_overflow)
  );
endmodule
