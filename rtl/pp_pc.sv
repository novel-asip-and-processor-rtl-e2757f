// pp_pc: program counter with run control.
//
// The PC register of the processor. Execution is triggered by the
// configuration interface writing position 0 of the ILT, which is how the
// published design ends a configuration. Any other write to the program
// tables halts the processor and returns the PC to 0 so that a partly
// written program never runs (this design's choice). While halted, `run` is
// 0 and the core replaces the instruction with NOP.
//
// Interface: `start` and `halt` are one-cycle strobes from the configuration
// interface and never come together (checked by an assertion); `npc` is
// loaded every cycle while running.
module pp_pc #(
  parameter int unsigned PCW = pp_pkg::PCW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           halt,
  input  logic           start,
  input  logic [PCW-1:0] npc,
  output logic [PCW-1:0] pc,
  output logic           run
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc  <= '0;
      run <= 1'b0;
    end else if (start) begin
      pc  <= '0;
      run <= 1'b1;
    end else if (halt) begin
      pc  <= '0;
      run <= 1'b0;
    end else if (run) begin
      pc  <= npc;
    end
  end

  a_start_halt: assert property (@(posedge clk) disable iff (!rst_n) !(start && halt));
endmodule
