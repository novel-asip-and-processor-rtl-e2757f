// tb_pp_compare_unit: random buffer contents, parameters, widths, offsets
// and New bits, with parameters often forced equal to the extracted field so
// that matches occur. Each result is compared with a reference that extracts
// (buf >> offset*16) masked to 4/8/16/32 bits, compares it with each
// parameter, and ANDs with the previous array when New is 0. Also replays
// the 48-bit MAC match of the example (32 bits, then 16 bits at offset 16).
module tb_pp_compare_unit;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [63:0] buf64 = '0;
  logic [3:0][31:0] params = '0;
  cwidth_e width = W32;
  logic offset = 0, newcmp = 1, update = 0;
  logic [3:0] match;
  logic [3:0] kept_ref = '0, exp;
  int checks = 0, failures = 0;

  pp_compare_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_field(logic [63:0] b, logic off, cwidth_e w);
    logic [63:0] s = off ? (b >> 16) : b;
    int bits = (w == W4) ? 4 : (w == W8) ? 8 : (w == W16) ? 16 : 32;
    return bits == 32 ? s[31:0] : s[31:0] & ((32'h1 << bits) - 1);
  endfunction

  task automatic step(string what);
    #1;
    for (int k = 0; k < 4; k++)
      exp[k] = (ref_field(buf64, offset, width) == params[k]) && (newcmp || kept_ref[k]);
    checks++;
    if (match !== exp) begin
      failures++;
      $display("FAIL %s: match %b expected %b", what, match, exp);
    end
    @(negedge clk);
    if (update) kept_ref = exp;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      buf64  = {$urandom, $urandom};
      width  = cwidth_e'($urandom);
      offset = 1'($urandom);
      newcmp = ($urandom % 3) != 0;
      update = ($urandom % 4) != 0;
      for (int k = 0; k < 4; k++)
        params[k] = ($urandom % 2) ? ref_field(buf64, offset, width) : $urandom;
      if ($urandom % 4 == 0) params[0] = buf64[31:0];  // unmasked value
      step("random");
    end
    // MAC 0c5a80ac4ab7 arriving over two words.
    params = '{32'h0, 32'h0, 32'h0c5a80ac, 32'hffffffff};
    buf64 = {32'h0, 32'h0c5a80ac}; width = W32; offset = 0; newcmp = 1; update = 1;
    step("mac part 1");
    params = '{32'h0, 32'h0, 32'h00004ab7, 32'h0000ffff};
    buf64 = {32'h0, 32'h4ab70010}; width = W16; offset = 1; newcmp = 0;
    step("mac part 2");
    checks++;
    if (match !== 4'b0010) begin failures++; $display("FAIL mac match %b", match); end
    // 128-bit key over four 32-bit compares (new = 1, then 0, 0, 0): only
    // parameter 2 matches all four words; parameter 1 differs in word 2.
    begin
      automatic logic [3:0][31:0] key = '{32'h2001_0db8, 32'h0000_0042, 32'h0000_0000, 32'h0000_0001};
      for (int w = 0; w < 4; w++) begin
        buf64 = {32'h0, key[3 - w]}; width = W32; offset = 0; newcmp = (w == 0); update = 1;
        params = '{32'h0, key[3 - w], (w == 2) ? 32'h1 : key[3 - w], 32'hdead_beef};
        step("128-bit word");
      end
      checks++;
      if (match !== 4'b0100) begin failures++; $display("FAIL 128-bit key match %b", match); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
