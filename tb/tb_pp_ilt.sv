// tb_pp_ilt: writes every ILT entry with random instructions through the
// write port, then reads all entries back by address and compares them with
// a copy kept in the testbench; also checks that a write changes only its
// own entry. The configuration read port must return the entry at the
// write address.
module tb_pp_ilt;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [23:0] wdata = '0, instr, rdata;
  logic [23:0] model [32];
  int checks = 0, failures = 0;

  pp_ilt dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic readall();
    for (int a = 0; a < 32; a++) begin
      raddr = 5'(a); waddr = 5'(31 - a); #1;
      checks++;
      if (instr !== model[a] || rdata !== model[31 - a]) begin
        failures++;
        $display("FAIL entry %0d: %h expected %h", a, instr, model[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); we = 1; waddr = 5'(a); wdata = 24'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    readall();
    @(negedge clk); we = 1; waddr = 5'd17; wdata = 24'h453483; model[17] = wdata;
    @(negedge clk); we = 0;
    readall();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
