// tb_acc_mem_if: the payload storage unit with a memory model. Cases:
// storage from a start word to the frame end (ARP style, everything after
// the 14-byte Ethernet header); storage that is stopped and restarted later
// and ends where a length counter (modelled here) marks the datagram end
// (UDP style); a packet stopped and never committed, whose slot is then
// reused. After each commit the commit register must name the slot and the
// byte count, and the slot must hold exactly the expected bytes.
module tb_acc_mem_if;
  import pp_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, stop = 0, commit = 0;
  word_t cur = WORD_IDLE;
  logic len_active = 0, len_end = 0;
  logic [2:0] len_end_bytes = 3'd4;
  logic mem_we, overflow;
  logic [13:0] mem_addr;
  logic [31:0] mem_wdata, commit_info;
  logic [31:0] mem [16384];
  int checks = 0, failures = 0;

  acc_mem_if dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (mem_we) mem[mem_addr] <= mem_wdata;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Streams f. Storage starts at word s1 (and s2 if >= 0, after a stop at
  // word st); if dend >= 0 the datagram ends at frame byte dend.
  task automatic run(bytes_t f, int s1, int st, int s2, int dend, bit do_commit,
                     bytes_t exp, logic [14:0] exp_slot, string what);
    int nw = n_words(f);
    logic [31:0] ci_before = commit_info;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk);
      cur = frame_word(f, w);
      start = (w == s1) || (w == s2);
      stop = (w == st);
      len_active = (dend >= 0) && (w > s1) && (w <= dend / 4);
      len_end = len_active && (w == dend / 4);
      len_end_bytes = 3'(dend % 4 + 1);
    end
    @(negedge clk); cur = WORD_IDLE; start = 0; stop = 0; len_active = 0; len_end = 0;
    repeat (3) @(negedge clk);
    if (do_commit) begin
      commit = 1; @(negedge clk); commit = 0; @(negedge clk);
      checks++;
      if (commit_info[31] == ci_before[31] || commit_info[30:16] != exp_slot ||
          int'(commit_info[15:0]) != exp.size()) begin
        failures++;
        $display("FAIL %s: commit %h, expected slot %0d bytes %0d", what, commit_info, exp_slot, exp.size());
      end
      for (int i = 0; i < exp.size(); i++) begin
        logic [31:0] w = mem[int'(exp_slot) * 512 + i / 4];
        if (w[31 - 8 * (i % 4) -: 8] != exp[i]) begin
          checks++; failures++;
          $display("FAIL %s: byte %0d", what, i);
          break;
        end
      end
      checks++;
    end else begin
      checks++;
      if (commit_info != ci_before) begin failures++; $display("FAIL %s: committed", what); end
    end
  endtask

  initial begin
    bytes_t f, e, none;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // ARP style: whole Ethernet payload up to the frame end.
    for (int n = 60; n < 68; n++) begin
      f = rand_bytes(n);
      e = {};
      for (int i = 14; i < n; i++) e.push_back(f[i]);
      run(f, 3, -1, -1, -1, 1, e, 15'(n - 60), "to frame end");
    end
    // UDP style: start at word 3, stop at 4, restart at 10 (UDP payload at
    // frame byte 42), end at the datagram end before padding and FCS.
    for (int plen = 1; plen < 40; plen += 3) begin
      automatic int dend = 14 + 28 + plen - 1;
      f = rand_bytes((dend + 1 < 60 ? 60 : dend + 1) + 4);
      e = {};
      for (int i = 42; i <= dend; i++) e.push_back(f[i]);
      run(f, 3, 4, 10, dend, 1, e, 15'(8 + (plen - 1) / 3), "restart to datagram end");
    end
    // Stopped and not committed: the next packet goes to the same slot.
    f = rand_bytes(80);
    run(f, 3, 6, -1, -1, 0, none, 0, "discarded");
    f = rand_bytes(64);
    e = {};
    for (int i = 14; i < 64; i++) e.push_back(f[i]);
    run(f, 3, -1, -1, -1, 1, e, 15'd21, "after discard");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
