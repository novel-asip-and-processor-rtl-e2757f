// pp_ilt: instruction lookup table (ILT) of the protocol processor.
//
// Holds the main instruction flow: DEPTH instructions of 24 bits, built from
// flip-flops as in the published implementation. The PC reads it
// asynchronously so that an instruction is fetched and executed in the same
// cycle. The configuration port writes one instruction per clock; the depth
// of 32 is this design's reading of the total table size (768 of the 3072
// table flip-flops remain for the ILT once the PCB and CCB are counted).
//
// Interface: synchronous write (we, waddr, wdata), combinational read
// (raddr -> instr) for the PC, and a second combinational read port at the
// configuration address (waddr -> rdata) for the microcontroller. Tables are
// configuration, so reset does not clear them.
module pp_ilt #(
  parameter int unsigned DEPTH = pp_pkg::ILT_DEPTH,
  parameter int unsigned IW    = pp_pkg::IW,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [IW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [IW-1:0] instr,
  output logic [IW-1:0] rdata
);
  logic [IW-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign instr = mem[raddr];
  assign rdata = mem[waddr];
endmodule
