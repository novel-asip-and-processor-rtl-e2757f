// tb_pp_pcb: fills the parameter codebook with random parameters through the
// write port (address line*4 + index) and checks that selecting each line
// presents its four parameters in order, and that the configuration read
// port returns each parameter at its address.
module tb_pp_pcb;
  logic clk = 0, we = 0;
  logic [5:0] waddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [3:0] line = '0;
  logic [3:0][31:0] params;
  logic [31:0] model [64];
  int checks = 0, failures = 0;

  pp_pcb dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wdata = $urandom; model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int l = 0; l < 16; l++) begin
      line = 4'(l); #1;
      for (int k = 0; k < 4; k++) begin
        checks++;
        if (params[k] !== model[4*l+k]) begin
          failures++;
          $display("FAIL line %0d param %0d: %h expected %h", l, k, params[k], model[4*l+k]);
        end
      end
    end
    for (int a = 0; a < 64; a++) begin
      waddr = 6'(a); #1;
      checks++;
      if (rdata !== model[a]) begin failures++; $display("FAIL read %0d", a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
