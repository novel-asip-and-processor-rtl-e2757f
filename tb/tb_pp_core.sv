// tb_pp_core: the processor without accelerators. Loads the example
// reception program through the table ports, plays the accelerator inputs
// from the testbench, and streams an IPv4/UDP frame, an ARP frame and a frame
// for another MAC address. For each, the PC must follow, one instruction per
// clock, the path the example program takes for that frame (e.g. 0 1 2 5 6 8
// 9 11 12 13 15 17 18 ... 19 21 22 0 for a good UDP frame), and the outputs
// must pulse in exactly the cycles of the SET/CPS instructions on that path.
//
// Then single-instruction checking against a reference: random programs
// (all six instructions, buffer ctrl, every JMP type, undefined codes) with
// random PCB/CCB contents run on a random word stream and random inputs,
// and a cycle-true instruction-set model written here from the instruction
// definitions predicts the PC and the outputs of every clock. The data
// words come from a small pool so that compares, continuations and codebook
// jumps all happen; each is counted and must occur.
module tb_pp_core;
  import pp_pkg::*;
  import tb_pkt_pkg::*;

  logic clk = 0, rst_n = 0;
  word_t din = WORD_IDLE, cur;
  logic [18:0] inputs;
  logic [9:0] outputs;
  logic ilt_we = 0, pcb_we = 0, ccb_we = 0, start = 0, halt = 0;
  logic [5:0] tbl_addr = '0;
  logic [31:0] tbl_wdata = '0, pcb_rdata;
  logic [23:0] ilt_rdata;
  logic [7:0] ccb_rdata;
  logic [4:0] pc;
  logic run;
  logic [18:1] acc_in = '0;
  int checks = 0, failures = 0;

  assign inputs = {acc_in, din.sof};
  pp_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [23:0] ILT [29] = '{
    24'h500001, 24'h151800, 24'h453483, 24'h200040, 24'h40007c, 24'h000000,
    24'h361413, 24'h40007c, 24'h200044, 24'h162800, 24'h400079, 24'h000000,
    24'h080000, 24'h455e82, 24'h400075, 24'h457682, 24'h400073, 24'h200010,
    24'h50002a, 24'h425482, 24'h40006f, 24'h200120, 24'h40006a, 24'h200008,
    24'h500002, 24'h420482, 24'h400069, 24'h2000a0, 24'h400064 };


  task automatic wr(int tbl, int a, logic [31:0] d);
    @(negedge clk);
    tbl_addr = 6'(a); tbl_wdata = d;
    ilt_we = (tbl == 0); pcb_we = (tbl == 1); ccb_we = (tbl == 2);
    start = (tbl == 0 && a == 0);
    halt  = !start;
    @(negedge clk);
    ilt_we = 0; pcb_we = 0; ccb_we = 0; start = 0; halt = 0;
  endtask

  // ---- Reference model of the instruction set ----
  logic [23:0] T_ILT [32];
  logic [31:0] T_PCB [64];
  logic [7:0]  T_CCB [32];
  bit          model_on = 0, m_run = 0;
  logic [4:0]  m_pc = '0;
  logic [31:0] m_cur = '0, m_older = '0;
  logic [3:0]  m_kept = '0;
  int n_ccb = 0, n_jmatch = 0, n_jin = 0, n_stall = 0, n_cont = 0, n_buf2 = 0;

  function automatic logic [9:0] m_outputs(logic [23:0] i);
    return (i[23:20] == 4'h2 || i[23:20] == 4'h3) ? i[9:0] : 10'h0;
  endfunction

  always @(posedge clk) if (model_on) begin
    automatic logic [23:0] i = m_run ? T_ILT[m_pc] : 24'h0;
    automatic logic [63:0] b = {m_older, m_cur};
    automatic logic [31:0] fld = i[10] ? b[47:16] : b[31:0];
    automatic logic [3:0]  m = '0;
    automatic bit          is_cmp = (i[23:20] == 4'h1 || i[23:20] == 4'h3);
    automatic bit          is_jm  = (i[23:20] == 4'h4 && i[18:17] == 2'b10);
    automatic bit          nw = is_jm ? i[9] : i[18];
    automatic logic [4:0]  npc = m_pc + 5'd1;
    case (i[12:11])
      2'b00: fld &= 32'hf;
      2'b01: fld &= 32'hff;
      2'b10: fld &= 32'hffff;
      default: ;
    endcase
    for (int k = 0; k < 4; k++) m[k] = (fld == T_PCB[4 * i[16:13] + k]) && (nw || m_kept[k]);
    case (i[23:20])
      4'h5: if ((inputs & i[18:0]) != i[18:0]) begin npc = m_pc; n_stall++; end
      4'h4: case (i[18:17])
        2'b00: npc = m_pc + 5'(i[7:0] - 8'd128);
        2'b01: if ((inputs[8:0] & i[16:8]) == i[16:8]) begin
                 npc = m_pc + 5'(i[7:0] - 8'd128); n_jin++;
               end
        2'b10: if (m != 0) begin npc = m_pc + 5'(i[7:0] - 8'd128); n_jmatch++; end
        default: ;
      endcase
      4'h1, 4'h3: if (i[17] && m != 0) begin
        automatic int k = m[0] ? 0 : m[1] ? 1 : m[2] ? 2 : 3;
        npc = m_pc + 5'(T_CCB[4 * i[15:13] + k] - 8'd128);
        n_ccb++;
      end
      default: ;
    endcase
    if ((is_cmp || is_jm) && !nw && m_kept != 0) n_cont++;
    if (i[19]) n_buf2++;
    if (start) begin m_pc = '0; m_run = 1; end
    else if (halt) begin m_pc = '0; m_run = 0; end
    else if (m_run) m_pc = npc;
    m_older = i[19] ? m_cur : 32'h0;
    m_cur   = din.data;
    if (is_cmp || is_jm) m_kept = m;
  end

  localparam logic [31:0] POOL [6] = '{32'h0, 32'hffffffff, 32'h0c5a80ac,
                                       32'h4ab70800, 32'h00000800, 32'h12345678};

  function automatic logic [31:0] rand_param();
    logic [31:0] v = POOL[$urandom % 6];
    case ($urandom % 5)
      0: v &= 32'hf;
      1: v &= 32'hff;
      2: v &= 32'hffff;
      3: v = {16'h0, v[31:16]};
      default: ;
    endcase
    return v;
  endfunction

  function automatic logic [23:0] rand_instr();
    logic [3:0] bm = 4'($urandom);
    logic [18:0] one = 19'(1) << ($urandom % 19);
    logic [18:0] two = one | (19'(1) << ($urandom % 19));
    logic [23:0] r = 24'($urandom);
    case ($urandom % 16)
      0:      return {4'h0, r[19], 19'h0};
      1, 2:   return {4'h5, r[19], ($urandom % 4 == 0) ? 19'h0 : ($urandom % 2 == 1) ? one : two};
      3, 4:   return {4'h2, r[19], 9'h0, r[9:0]};
      5, 6, 7: return {4'h1, r[19:0]};
      8, 9:   return {4'h3, r[19:0]};
      10:     return {4'h4, r[19], 2'b00, r[16:0]};
      11, 12: return {4'h4, r[19], 2'b01, 9'(one[8:0] | ((bm == 0) ? two[8:0] : 9'h0)), r[7:0]};
      13, 14: return {4'h4, r[19], 2'b10, r[16:0]};
      default: return ($urandom % 2 == 1) ? {4'h4, r[19], 2'b11, r[16:0]}
                                     : {4'(6 + $urandom % 10), r[19:0]};
    endcase
  endfunction

  // Logged trace of (pc, outputs) while a frame is played.
  int trace_pc[$];
  logic [9:0] trace_out[$];
  bit logging = 0;
  always @(posedge clk) if (logging) begin
    trace_pc.push_back(int'(pc));
    trace_out.push_back(outputs);
  end

  function automatic logic [9:0] out_of(int p);
    logic [23:0] i = ILT[p];
    return (i[23:20] == 4'h2 || i[23:20] == 4'h3) ? i[9:0] : 10'h0;
  endfunction

  // Plays frame f; raises the accelerator inputs `acc` after `late` cycles
  // and compares the trace (with the waiting at 0 and at WATs collapsed)
  // against `path`.
  task automatic play(bytes_t f, logic [18:1] acc, int path[$], string name);
    int nw = n_words(f);
    int collapsed[$];
    bit ok = 1;
    acc_in = '0;
    trace_pc = {}; trace_out = {};
    logging = 1;
    for (int w = 0; w < nw + 6; w++) begin
      @(negedge clk);
      din = (w < nw) ? frame_word(f, w) : WORD_IDLE;
      if (w == nw + 1) acc_in = acc;
    end
    repeat (8) @(negedge clk);
    logging = 0;
    acc_in = '0;
    // The frame starts where the PC first leaves 0.
    while (trace_pc.size() > 1 && trace_pc[1] == 0) begin
      void'(trace_pc.pop_front()); void'(trace_out.pop_front());
    end
    foreach (trace_pc[i]) begin
      if (trace_out[i] !== out_of(trace_pc[i])) ok = 0;
      if (collapsed.size() == 0 || collapsed[$] != trace_pc[i] ||
          ILT[trace_pc[i]][23:20] != 4'h5)
        collapsed.push_back(trace_pc[i]);
    end
    while (collapsed.size() > path.size()) void'(collapsed.pop_back());
    checks++;
    if (collapsed != path) begin
      failures++;
      $display("FAIL %s: path %p expected %p", name, collapsed, path);
    end
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: outputs", name); end
  endtask

  initial begin
    bytes_t f, p;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 64; a++) wr(1, a, 0);
    wr(1, 0, 32'h0800); wr(1, 1, 32'h0806); wr(1, 4, 32'h11);
    wr(1, 32, 32'hffffffff); wr(1, 33, 32'h0c5a80ac);
    wr(1, 36, 32'h0000ffff); wr(1, 37, 32'h00004ab7);
    wr(1, 40, 32'h82ec3705); wr(1, 41, 32'h82ecffff); wr(1, 42, 32'hffffffff);
    wr(1, 44, 32'h07e9);
    for (int a = 0; a < 32; a++) wr(2, a, 0);
    wr(2, 0, 32'h82); wr(2, 1, 32'h91); wr(2, 4, 32'h82);
    for (int a = 31; a >= 0; a--) wr(0, a, a < 29 ? 32'(ILT[a]) : 32'h0);
    checks++; if (!run) failures++;
    repeat (3) @(negedge clk);

    p = rand_bytes(30);
    f = eth(48'h0c5a80ac4ab7, 16'h0800, ip_udp(32'h0a000001, 32'h82ec3705, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    play(f, 18'h3f, '{0, 1, 2, 5, 6, 8, 9, 11, 12, 13, 15, 17, 18, 19, 21, 22, 0}, "udp accepted");
    play(f, 18'h37, '{0, 1, 2, 5, 6, 8, 9, 11, 12, 13, 15, 17, 18, 19, 20, 3, 4, 0}, "udp bad checksum");
    f = eth(48'hffffffffffff, 16'h0806, rand_bytes(28), 0);
    play(f, 18'h03, '{0, 1, 2, 5, 6, 23, 24, 25, 27, 28, 0}, "arp accepted");
    f = eth(48'h0c5a80ac4ab6, 16'h0800, ip_udp(32'h0a000001, 32'h82ec3705, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    play(f, 18'h3f, '{0, 1, 2, 3, 4, 0}, "other MAC");
    f = eth(48'h0c5a80ac4ab7, 16'h0800, ip_udp(32'h0a000001, 32'h82ec3705, 8'h11, 16'd53, p, 0, 0, 0), 0);
    play(f, 18'h3f, '{0, 1, 2, 5, 6, 8, 9, 11, 12, 13, 15, 16, 3, 4, 0}, "other port");

    // Random programs against the reference model.
    // Known start state through the ports only: one CMP (new, PCB line 15,
    // which cannot match the idle word) clears the kept match array, and
    // the NOPs executed while halted leave the older buffer word at zero.
    for (int a = 60; a < 64; a++) wr(1, a, 32'h5a5a_5a5a);
    wr(0, 0, 32'h15f800);
    halt = 1; @(negedge clk); halt = 0;
    repeat (2) @(negedge clk);
    m_cur = cur.data; m_older = '0; m_kept = '0;
    m_run = 0; m_pc = '0; model_on = 1;
    for (int prog = 0; prog < 20; prog++) begin
      automatic int bad = 0;
      @(negedge clk); halt = 1; @(negedge clk); halt = 0;
      foreach (T_ILT[a]) T_ILT[a] = rand_instr();
      foreach (T_PCB[a]) T_PCB[a] = rand_param();
      foreach (T_CCB[a]) T_CCB[a] = 8'($urandom);
      foreach (T_PCB[a]) wr(1, a, T_PCB[a]);
      foreach (T_CCB[a]) wr(2, a, 32'(T_CCB[a]));
      for (int a = 31; a >= 0; a--) wr(0, a, 32'(T_ILT[a]));
      for (int c = 0; c < 300; c++) begin
        @(negedge clk);
        checks++;
        if (pc !== m_pc || run !== m_run ||
            outputs !== m_outputs(m_run ? T_ILT[m_pc] : 24'h0)) begin
          failures++;
          if (bad++ < 3)
            $display("FAIL program %0d cycle %0d: pc %0d expected %0d, outputs %h expected %h",
                     prog, c, pc, m_pc, outputs, m_outputs(T_ILT[m_pc]));
        end
        din = '{data: POOL[$urandom % 6], valid: 1'b1, sof: 1'($urandom), eof: 1'b0, nbytes: 3'd0};
        acc_in = 18'($urandom);
      end
    end
    model_on = 0;
    $display("reference run: codebook jumps=%0d match jumps=%0d input jumps=%0d WAT stalls=%0d continuations=%0d two-word cycles=%0d",
             n_ccb, n_jmatch, n_jin, n_stall, n_cont, n_buf2);
    checks++; if (n_ccb == 0) begin failures++; $display("FAIL no codebook jump"); end
    checks++; if (n_jmatch == 0) begin failures++; $display("FAIL no match jump"); end
    checks++; if (n_jin == 0) begin failures++; $display("FAIL no input jump"); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no WAT stall"); end
    checks++; if (n_cont == 0) begin failures++; $display("FAIL no continuation"); end
    checks++; if (n_buf2 == 0) begin failures++; $display("FAIL no two-word buffer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
