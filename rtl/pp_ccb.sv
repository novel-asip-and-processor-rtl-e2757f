// pp_ccb: control codebook (CCB) of the protocol processor.
//
// LINES lines of NPAR 8-bit jump values (8 x 4 in the published design). A
// value is 128 plus a relative jump, so no negative numbers are stored. The
// line is chosen by the three low bits of the instruction pointer and the
// value within the line by the comparator result array: value k belongs to
// PCB parameter k of the same line. When several comparators match, the
// lowest numbered one wins; that priority is this design's choice.
//
// Interface: synchronous configuration write at line*NPAR + index, with the
// value at that address read back on `rdata`;
// combinational lookup (line, match) -> (hit, value). `hit` is 1 when any
// comparator matched.
module pp_ccb #(
  parameter int unsigned LINES = pp_pkg::CCB_LINES,
  parameter int unsigned NPAR  = pp_pkg::NPAR,
  localparam int unsigned LW   = $clog2(LINES),
  localparam int unsigned AW   = $clog2(LINES * NPAR)
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [7:0]      wdata,
  input  logic [LW-1:0]   line,
  input  logic [NPAR-1:0] match,
  output logic            hit,
  output logic [7:0]      value,
  output logic [7:0]      rdata
);
  logic [NPAR-1:0][7:0] mem [LINES];
  logic [NPAR-1:0][7:0] row;

  always_ff @(posedge clk)
    if (we) mem[waddr[AW-1 -: LW]][waddr[AW-LW-1:0]] <= wdata;

  assign row   = mem[line];
  assign rdata = mem[waddr[AW-1 -: LW]][waddr[AW-LW-1:0]];

  always_comb begin
    hit   = 1'b0;
    value = 8'd128;  // relative jump of zero
    for (int k = NPAR - 1; k >= 0; k--) begin
      if (match[k]) begin
        hit   = 1'b1;
        value = row[k];
      end
    end
  end
endmodule
