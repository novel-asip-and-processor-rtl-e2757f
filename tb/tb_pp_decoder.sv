// tb_pp_decoder: decodes instructions of the example program and checks the
// fields against the values its assembly listing states (pointer, width,
// offset, new, jump, type, input and output bitmaps, buffer ctrl), then
// checks that unused codes decode as NOP. Finally decodes random
// instructions of every code and checks each control field that matters for
// that code against the bit positions of the instruction formats.
module tb_pp_decoder;
  import pp_pkg::*;
  logic [23:0] instr = '0;
  ctl_t ctl;
  logic [9:0] outputs;
  int checks = 0, failures = 0;

  pp_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    instr = 24'h500001; #1;   // WAT input(0)
    chk(ctl.wait_in && ctl.in_mask == 19'h1 && !ctl.cmp && outputs == 0, "WAT 0");
    instr = 24'h151800; #1;   // CMP new=1 jump=0 pointer=8 width=32 offset=0
    chk(ctl.cmp && ctl.newcmp && !ctl.cmp_jump && ctl.pointer == 8 && ctl.width == W32 && !ctl.offset, "CMP 1");
    instr = 24'h453483; #1;   // JMP type=10 pointer=9 width=16 offset=16 new=0 rel 0x83
    chk(ctl.jmp_match && ctl.cmp && !ctl.newcmp && ctl.pointer == 9 && ctl.width == W16 && ctl.offset && ctl.rel == 8'h83, "JMP 2");
    instr = 24'h200040; #1;   // SET output(6)
    chk(outputs == 10'h040 && !ctl.cmp && !ctl.jmp_always, "SET 3");
    instr = 24'h40007c; #1;   // JMP type=00
    chk(ctl.jmp_always && ctl.rel == 8'h7c && !ctl.cmp, "JMP 4");
    instr = 24'h361413; #1;   // CPS new=1 jump=1 pointer=0 width=16 offset=16 output(4,1,0)
    chk(ctl.cmp && ctl.newcmp && ctl.cmp_jump && ctl.pointer == 0 && ctl.width == W16 && ctl.offset && outputs == 10'h013, "CPS 6");
    instr = 24'h162800; #1;   // CMP pointer=1 width=8
    chk(ctl.cmp && ctl.cmp_jump && ctl.pointer == 1 && ctl.width == W8 && !ctl.offset, "CMP 9");
    instr = 24'h080000; #1;   // NOP 1
    chk(ctl.buf2 && !ctl.cmp && outputs == 0, "NOP 12");
    instr = 24'h455e82; #1;   // JMP type=10 pointer=10 width=32 offset=16 new=1
    chk(ctl.jmp_match && ctl.newcmp && ctl.pointer == 10 && ctl.width == W32 && ctl.offset, "JMP 13");
    instr = 24'h50002a; #1;   // WAT input(5,3,1)
    chk(ctl.wait_in && ctl.in_mask == 19'h2a, "WAT 18");
    instr = 24'h425482; #1;   // JMP type=01 input(6,4,2)
    chk(ctl.jmp_inputs && ctl.in_mask == 19'h54 && ctl.rel == 8'h82 && !ctl.jmp_always, "JMP 19");
    instr = 24'h2000a0; #1;   // SET output(7,5)
    chk(outputs == 10'h0a0, "SET 27");
    instr = 24'h200120; #1;   // SET output(8,5)
    chk(outputs == 10'h120, "SET 21");
    instr = 24'h47ffff; #1;   // JMP type 11: no effect
    chk(!ctl.jmp_always && !ctl.jmp_inputs && !ctl.jmp_match && !ctl.cmp, "JMP 11");
    for (int c = 6; c < 16; c++) begin
      instr = {4'(c), 20'hfffff}; #1;
      chk(ctl.cmp == 0 && ctl.wait_in == 0 && outputs == 0 && !ctl.jmp_always, "unused code");
    end
    for (int n = 0; n < 3000; n++) begin
      logic [3:0] op;
      logic [1:0] jt;
      bit is_jmp, is_cmp;
      instr = 24'($urandom);
      if (n % 2 == 0) instr[23:20] = 4'($urandom % 6);   // mostly defined codes
      op = instr[23:20]; jt = instr[18:17];
      is_jmp = (op == 4'h4);
      is_cmp = (op == 4'h1 || op == 4'h3 || (is_jmp && jt == 2'b10));
      #1;
      chk(outputs == ((op == 4'h2 || op == 4'h3) ? instr[9:0] : 10'h0), "random outputs");
      chk(ctl.buf2 == instr[19], "random buffer ctrl");
      chk(ctl.cmp == is_cmp, "random compare enable");
      if (is_cmp)
        chk(ctl.newcmp == (is_jmp ? instr[9] : instr[18]) && ctl.pointer == instr[16:13] &&
            ctl.width == cwidth_e'(instr[12:11]) && ctl.offset == instr[10], "random compare fields");
      chk(ctl.cmp_jump == ((op == 4'h1 || op == 4'h3) && instr[17]), "random CCB jump");
      chk(ctl.wait_in == (op == 4'h5) && (op != 4'h5 || ctl.in_mask == instr[18:0]), "random WAT");
      chk(ctl.jmp_always == (is_jmp && jt == 2'b00) && ctl.jmp_match == (is_jmp && jt == 2'b10) &&
          ctl.jmp_inputs == (is_jmp && jt == 2'b01), "random JMP type");
      if (is_jmp && jt == 2'b01) chk(ctl.in_mask == {10'h0, instr[16:8]}, "random JMP input bitmap");
      if (is_jmp) chk(ctl.rel == instr[7:0], "random JMP offset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
