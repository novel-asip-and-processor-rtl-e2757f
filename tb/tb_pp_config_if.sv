// tb_pp_config_if: drives the SRAM-style port and checks the decoded write
// strobes for each table range, the start strobe for ILT entry 0 and the
// halt strobe for every other table write, ignored addresses, the result
// register (ORs output bitmaps, clears on read), the commit register read,
// and table reads returning the table data offered at the table address.
// A random sweep over the whole 10-bit address space then checks strobes
// and read data of every access against the address map.
module tb_pp_config_if;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0, cfg_cs = 0, cfg_we = 0;
  logic [9:0] cfg_addr = '0;
  logic [31:0] cfg_wdata = '0, cfg_rdata, tbl_wdata, commit_info = 32'h8003_0042;
  logic ilt_we, pcb_we, ccb_we, start, halt;
  logic [5:0] tbl_addr;
  logic [9:0] pp_outputs = '0;
  logic [23:0] ilt_rdata;
  logic [31:0] pcb_rdata;
  logic [7:0]  ccb_rdata;
  // Table models answer with data derived from the address.
  assign ilt_rdata = {18'h2a5a5, tbl_addr};
  assign pcb_rdata = {26'h3c0ffee, tbl_addr};
  assign ccb_rdata = {2'b10, tbl_addr};
  int checks = 0, failures = 0;

  pp_config_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wr(logic [9:0] a, logic [31:0] d, bit ei, bit ep, bit ec, bit st, bit ht, string what);
    @(negedge clk); cfg_cs = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d; #1;
    chk(ilt_we == ei && pcb_we == ep && ccb_we == ec && start == st && halt == ht &&
        tbl_addr == a[5:0] && tbl_wdata == d, what);
    @(negedge clk); cfg_cs = 0; cfg_we = 0;
  endtask

  task automatic rd(logic [9:0] a, output logic [31:0] d);
    @(negedge clk); cfg_cs = 1; cfg_we = 0; cfg_addr = a;
    #1 chk(!ilt_we && !pcb_we && !ccb_we && !start && !halt, "read has no strobes");
    @(negedge clk); cfg_cs = 0; d = cfg_rdata;
  endtask

  initial begin
    logic [31:0] d;
    repeat (2) @(negedge clk);
    rst_n = 1;
    wr(10'h005, 32'h151800, 1, 0, 0, 0, 1, "ILT 5");
    wr(10'h01f, 32'h000000, 1, 0, 0, 0, 1, "ILT 31");
    wr(10'h000, 32'h500001, 1, 0, 0, 1, 0, "ILT 0 starts");
    wr(10'h100, 32'h0800,   0, 1, 0, 0, 1, "PCB 0");
    wr(10'h13f, 32'h1,      0, 1, 0, 0, 1, "PCB 63");
    wr(10'h200, 32'h82,     0, 0, 1, 0, 1, "CCB 0");
    wr(10'h21f, 32'h82,     0, 0, 1, 0, 1, "CCB 31");
    wr(10'h020, 32'h1,      0, 0, 0, 0, 0, "outside ILT");
    wr(10'h140, 32'h1,      0, 0, 0, 0, 0, "outside PCB");
    wr(10'h220, 32'h1,      0, 0, 0, 0, 0, "outside CCB");
    @(negedge clk); pp_outputs = 10'h013;
    @(negedge clk); pp_outputs = 10'h000;
    @(negedge clk); pp_outputs = 10'h120;
    @(negedge clk); pp_outputs = 10'h000;
    rd(10'h300, d); chk(d == 32'h133, "result register collects outputs");
    rd(10'h300, d); chk(d == 32'h0, "result register cleared by read");
    rd(10'h301, d); chk(d == 32'h8003_0042, "commit register");
    rd(10'h007, d); chk(d == {8'h0, 18'h2a5a5, 6'h07}, "ILT read");
    rd(10'h12b, d); chk(d == {26'h3c0ffee, 6'h2b}, "PCB read");
    rd(10'h213, d); chk(d == {24'h0, 2'b10, 6'h13}, "CCB read");
    rd(10'h0e0, d); chk(d == 32'h0, "unmapped read");
    for (int n = 0; n < 600; n++) begin
      automatic logic [9:0] a = 10'($urandom);
      automatic bit in_ilt = (a < 10'h020);
      automatic bit in_pcb = (a >= 10'h100 && a < 10'h140);
      automatic bit in_ccb = (a >= 10'h200 && a < 10'h220);
      automatic logic [31:0] v = $urandom;
      automatic logic [31:0] e;
      if (a == 10'h300) continue;              // reading it has a side effect
      if (n % 2 == 0) begin
        wr(a, v, in_ilt, in_pcb, in_ccb, in_ilt && a == 0,
           (in_ilt && a != 0) || in_pcb || in_ccb, "random write strobes");
      end else begin
        e = in_ilt ? {8'h0, 18'h2a5a5, a[5:0]} :
            in_pcb ? {26'h3c0ffee, a[5:0]} :
            in_ccb ? {24'h0, 2'b10, a[5:0]} :
            (a == 10'h301) ? 32'h8003_0042 : 32'h0;
        rd(a, d); chk(d == e, $sformatf("random read %h", a));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
