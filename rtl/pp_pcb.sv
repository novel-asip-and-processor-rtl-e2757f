// pp_pcb: parameter codebook (PCB) of the protocol processor.
//
// LINES lines of NPAR compare parameters of PW bits each (16 x 4 x 32 in the
// published design). The 4-bit pointer of a compare instruction selects one
// line, whose parameters feed the comparator array in parallel. Flip-flop
// storage with combinational line read.
//
// Interface: the configuration port writes one parameter per clock at
// address line*NPAR + index (an own choice of mapping) and reads the
// parameter at that address back on `rdata`; `line` selects the line
// presented on `params`.
module pp_pcb #(
  parameter int unsigned LINES = pp_pkg::PCB_LINES,
  parameter int unsigned NPAR  = pp_pkg::NPAR,
  parameter int unsigned PW    = pp_pkg::PW,
  localparam int unsigned LW   = $clog2(LINES),
  localparam int unsigned AW   = $clog2(LINES * NPAR)
) (
  input  logic                clk,
  input  logic                we,
  input  logic [AW-1:0]       waddr,
  input  logic [PW-1:0]       wdata,
  input  logic [LW-1:0]       line,
  output logic [NPAR-1:0][PW-1:0] params,
  output logic [PW-1:0]       rdata
);
  logic [NPAR-1:0][PW-1:0] mem [LINES];

  always_ff @(posedge clk)
    if (we) mem[waddr[AW-1 -: LW]][waddr[AW-LW-1:0]] <= wdata;

  assign params = mem[line];
  assign rdata  = mem[waddr[AW-1 -: LW]][waddr[AW-LW-1:0]];
endmodule
