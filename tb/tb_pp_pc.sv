// tb_pp_pc: checks that the PC stays at 0 and halted after reset, that a
// start strobe runs it from 0 and it then follows npc every cycle, and that a
// halt strobe stops it and returns it to 0.
module tb_pp_pc;
  logic clk = 0, rst_n = 0, halt = 0, start = 0;
  logic [4:0] npc = '0, pc;
  logic run;
  int checks = 0, failures = 0;

  pp_pc dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s: pc %0d run %b", what, pc, run); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    npc = 5'd7;
    repeat (3) @(negedge clk);
    chk(pc == 0 && !run, "idle after reset");
    start = 1; @(negedge clk); start = 0;
    chk(pc == 0 && run, "start");
    for (int i = 0; i < 50; i++) begin
      logic [4:0] n = 5'($urandom);
      npc = n; @(negedge clk);
      chk(pc == n && run, "follows npc");
    end
    halt = 1; @(negedge clk); halt = 0;
    chk(pc == 0 && !run, "halt");
    npc = 5'd9; @(negedge clk);
    chk(pc == 0 && !run, "stays halted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
