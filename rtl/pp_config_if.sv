// pp_config_if: the microcontroller's SRAM-style port into the processor.
//
// Decodes a word address into write strobes for the three program tables and
// gives read access to the result registers. Address map (this design's own):
//   0x000-0x01F  ILT entry n            (read/write, bits 23:0)
//   0x100-0x13F  PCB line*4 + parameter (read/write, 32 bits)
//   0x200-0x21F  CCB line*4 + value     (read/write, bits 7:0)
//   0x300        output result register (read, clears on read)
//   0x301        payload commit register from the memory interface (read)
// Writing ILT entry 0 starts program execution from PC 0; any other table
// write halts the processor first. The output result register collects (ORs)
// every output bitmap the program sets, so results such as "packet accepted"
// stay visible to the microcontroller after their one-cycle pulse.
//
// Timing: writes take effect at the clock edge with cs & we; read data is
// registered and valid one cycle after cs & !we.
module pp_config_if
  import pp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             cfg_cs,
  input  logic             cfg_we,
  input  logic [9:0]       cfg_addr,
  input  logic [31:0]      cfg_wdata,
  output logic [31:0]      cfg_rdata,
  // program tables
  output logic             ilt_we,
  output logic             pcb_we,
  output logic             ccb_we,
  output logic [5:0]       tbl_addr,
  output logic [31:0]      tbl_wdata,
  output logic             start,
  output logic             halt,
  // results
  input  logic [IW-1:0]    ilt_rdata,
  input  logic [PW-1:0]    pcb_rdata,
  input  logic [7:0]       ccb_rdata,
  input  logic [N_OUT-1:0] pp_outputs,
  input  logic [31:0]      commit_info
);
  logic             wr;
  logic [N_OUT-1:0] result_q;
  logic             rd_result;
  logic             in_ilt, in_pcb, in_ccb;

  assign wr        = cfg_cs && cfg_we;
  assign in_ilt    = (cfg_addr[9:8] == 2'd0) && (cfg_addr[7:5] == 3'd0);
  assign in_pcb    = (cfg_addr[9:8] == 2'd1) && (cfg_addr[7:6] == 2'd0);
  assign in_ccb    = (cfg_addr[9:8] == 2'd2) && (cfg_addr[7:5] == 3'd0);
  assign tbl_addr  = cfg_addr[5:0];
  assign tbl_wdata = cfg_wdata;
  assign ilt_we    = wr && in_ilt;
  assign pcb_we    = wr && in_pcb;
  assign ccb_we    = wr && in_ccb;
  assign start     = ilt_we && (cfg_addr[4:0] == 5'd0);
  assign halt      = (ilt_we || pcb_we || ccb_we) && !start;
  assign rd_result = cfg_cs && !cfg_we && (cfg_addr == 10'h300);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      result_q  <= '0;
      cfg_rdata <= '0;
    end else begin
      result_q <= (rd_result ? '0 : result_q) | pp_outputs;
      if (cfg_cs && !cfg_we) begin
        if (in_ilt)                   cfg_rdata <= 32'(ilt_rdata);
        else if (in_pcb)              cfg_rdata <= pcb_rdata;
        else if (in_ccb)              cfg_rdata <= 32'(ccb_rdata);
        else if (cfg_addr == 10'h300) cfg_rdata <= 32'(result_q);
        else if (cfg_addr == 10'h301) cfg_rdata <= commit_info;
        else                          cfg_rdata <= '0;
      end
    end
  end
endmodule
