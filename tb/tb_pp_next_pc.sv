// tb_pp_next_pc: random PCs, decoded controls, CCB outputs and inputs,
// compared with a reference: WAT holds until all selected inputs are 1,
// jumps add (value - 128) modulo 32, everything else adds one. Includes the
// example's backward jumps (0x7c from 4 to 0, 0x6a from 22 to 0).
module tb_pp_next_pc;
  import pp_pkg::*;
  logic [4:0] pc = '0, npc;
  ctl_t ctl = '0;
  logic hit = 0;
  logic [7:0] ccb_value = '0;
  logic [18:0] inputs = '0;
  int checks = 0, failures = 0;

  pp_next_pc dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [4:0] ref_npc();
    bit all = (inputs & ctl.in_mask) == ctl.in_mask;
    int p = pc;
    if (ctl.wait_in) return all ? 5'(p + 1) : 5'(p);
    if (ctl.cmp_jump && hit) return 5'(p + int'(ccb_value) - 128);
    if (ctl.jmp_always || (ctl.jmp_inputs && all) || (ctl.jmp_match && hit))
      return 5'(p + int'(ctl.rel) - 128);
    return 5'(p + 1);
  endfunction

  task automatic chk(string what);
    #1;
    checks++;
    if (npc !== ref_npc()) begin
      failures++;
      $display("FAIL %s: pc %0d npc %0d expected %0d", what, pc, npc, ref_npc());
    end
  endtask

  initial begin
    ctl = '0; ctl.jmp_always = 1; ctl.rel = 8'h7c; pc = 4; chk("jump 4->0");
    checks++; if (npc != 0) failures++;
    ctl.rel = 8'h6a; pc = 22; chk("jump 22->0");
    checks++; if (npc != 0) failures++;
    ctl = '0; ctl.cmp_jump = 1; hit = 1; ccb_value = 8'h91; pc = 6; chk("ccb 6->23");
    checks++; if (npc != 23) failures++;
    for (int i = 0; i < 3000; i++) begin
      ctl = '0;
      case ($urandom % 6)
        0: ;
        1: begin ctl.wait_in = 1; ctl.in_mask = 19'($urandom) & 19'($urandom); end
        2: ctl.jmp_always = 1;
        3: begin ctl.jmp_inputs = 1; ctl.in_mask = 19'($urandom % 512); end
        4: begin ctl.jmp_match = 1; ctl.cmp = 1; end
        default: begin ctl.cmp = 1; ctl.cmp_jump = 1; end
      endcase
      ctl.rel = 8'($urandom);
      pc = 5'($urandom); hit = 1'($urandom); ccb_value = 8'($urandom);
      inputs = ($urandom % 2) ? 19'h7ffff : 19'($urandom);
      chk("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
