// tb_pp_ccb: loads the control codebook with random jump values and, for
// every line and every 4-bit comparator array, checks `hit` and the selected
// value against the rule "lowest numbered matching comparator selects its
// value", plus the example's line 0 (0x82 for the first parameter, 0x91 for
// the second). The configuration read port must return every value.
module tb_pp_ccb;
  logic clk = 0, we = 0;
  logic [4:0] waddr = '0;
  logic [7:0] wdata = '0, value, rdata;
  logic [2:0] line = '0;
  logic [3:0] match = '0;
  logic hit;
  logic [7:0] model [32];
  int checks = 0, failures = 0;

  pp_ccb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); we = 1; waddr = 5'(a);
      wdata = (a == 0) ? 8'h82 : (a == 1) ? 8'h91 : 8'($urandom);
      model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int l = 0; l < 8; l++) begin
      for (int m = 0; m < 16; m++) begin
        int first;
        line = 3'(l); match = 4'(m); #1;
        first = (m & 1) ? 0 : (m & 2) ? 1 : (m & 4) ? 2 : (m & 8) ? 3 : -1;
        checks++;
        if (hit !== (m != 0) || (m != 0 && value !== model[4*l+first])) begin
          failures++;
          $display("FAIL line %0d match %b: hit %b value %h", l, match, hit, value);
        end
      end
    end
    for (int a = 0; a < 32; a++) begin
      waddr = 5'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    line = 0; match = 4'b0010; #1;
    checks++; if (value !== 8'h91) failures++;
    match = 4'b0011; #1;
    checks++; if (value !== 8'h82) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
