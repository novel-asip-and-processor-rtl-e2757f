// pp_compare_unit: field extraction and the comparator array.
//
// A 32-bit field is taken from the input buffer, bits 31:0 (offset 0) or
// bits 47:16 (offset 1), and masked to 4, 8, 16 or 32 bits. The masked field
// is compared for equality with the NPAR parameters of the selected PCB line
// at once. The result array is kept in a register inside the unit: a compare
// with New = 0 ANDs its fresh result with the kept array, so wider fields
// such as 48-bit MAC or 128-bit IPv6 addresses are matched over several
// cycles. Following the published description only the data is masked; the
// parameter is compared as stored.
//
// Interface: combinational `match` for the current instruction; the kept
// array updates on the clock edge when `update` (a compare instruction) is 1.
module pp_compare_unit
  import pp_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [63:0]             buf64,  // bits 63:48 are never extracted
  input  logic [NPAR-1:0][31:0]   params,
  input  cwidth_e                 width,
  input  logic                    offset,
  input  logic                    newcmp,
  input  logic                    update,
  output logic [NPAR-1:0]         match
);
  logic [31:0]     field, mask;
  logic [NPAR-1:0] kept;

  always_comb begin
    unique case (width)
      W4:      mask = 32'h0000_000F;
      W8:      mask = 32'h0000_00FF;
      W16:     mask = 32'h0000_FFFF;
      default: mask = 32'hFFFF_FFFF;
    endcase
    field = (offset ? buf64[47:16] : buf64[31:0]) & mask;
    for (int k = 0; k < NPAR; k++)
      match[k] = (field == params[k]) && (newcmp || kept[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      kept <= '0;
    else if (update) kept <= match;
  end
endmodule
