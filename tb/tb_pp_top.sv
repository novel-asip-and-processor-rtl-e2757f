// tb_pp_top: end-to-end test of the protocol processor with accelerators.
//
// Loads the Ethernet II / ARP / IPv4-UDP reception program (ILT, PCB and CCB
// contents of the published example: node 130.236.55.5, MAC 0c5a80ac4ab7,
// UDP port 2025) through the microcontroller port, starts it by writing ILT
// entry 0 last, and streams a mix of frames: good UDP frames of several
// sizes, broadcast frames, ARP frames, and every error the example program
// must reject (wrong MAC, wrong IP address, unknown Ethernet type, non-UDP
// protocol, wrong UDP port, bad IP header checksum, bad UDP checksum, bad
// CRC). For each frame the expected verdict is worked out from the frame
// itself. The test checks the accept outputs, the result register, the
// commit register and the stored payload in a payload memory model, and
// counts how often each processor mechanism occurred: WAT stalls, codebook
// jumps, JMP on match, JMP on inputs, compare continuation, the two-word
// input buffer, storage stop and restart, commits and discards. A last
// burst of frames separated by the minimum Ethernet gap checks that the
// program keeps up at line rate.
// The top runs with all parameters at their defaults.
module tb_pp_top;
  import pp_pkg::*;
  import tb_pkt_pkg::*;

  logic             clk = 0, rst_n = 0;
  word_t            din = WORD_IDLE;
  logic [11:0]      ext_in = '0;
  logic [N_OUT-1:0] outputs;
  logic             cfg_cs = 0, cfg_we = 0;
  logic [9:0]       cfg_addr = '0;
  logic [31:0]      cfg_wdata = '0, cfg_rdata;
  logic             pmem_we;
  logic [13:0]      pmem_addr;
  logic [31:0]      pmem_wdata;
  logic [PCW-1:0]   pc;
  logic             run, len_err, pmem_overflow;

  int checks = 0, failures = 0, cycles = 0;

  pp_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Payload memory model.
  logic [31:0] pmem [16384];
  always @(posedge clk) if (pmem_we) pmem[pmem_addr] <= pmem_wdata;

  // Mechanism counters.
  int n_wat_stall = 0, n_ccb_jump = 0, n_jmp_match = 0, n_jmp_in = 0,
      n_jmp_in_not = 0, n_continue = 0, n_buf2 = 0, n_stop = 0, n_restart = 0,
      n_commit = 0, n_discard = 0, n_len_end = 0, n_burst = 0;
  int acc_ip = 0, acc_arp = 0;
  logic [N_OUT-1:0] frame_outs;
  always @(posedge clk) if (run) begin
    automatic ctl_t c = dut.u_core.ctl;
    if (c.wait_in && dut.u_core.npc == pc) n_wat_stall++;
    if (c.cmp_jump && dut.u_core.hit) n_ccb_jump++;
    if (c.jmp_match && dut.u_core.hit) n_jmp_match++;
    if (c.jmp_inputs) begin
      if (dut.u_core.npc != pc + 1'b1) n_jmp_in++; else n_jmp_in_not++;
    end
    if (c.cmp && !c.newcmp) n_continue++;
    if (c.buf2) n_buf2++;
    if (outputs[6]) n_stop++;
    if (outputs[4] && pc != 5'd6) n_restart++;
    if (outputs[5]) n_commit++;
    if (outputs[8] && outputs[5]) acc_ip++;
    if (outputs[7] && outputs[5]) acc_arp++;
    if (pc == 5'd3) n_discard++;
    if (dut.ip_end) n_len_end++;
    frame_outs |= outputs;
  end

  task automatic cfg_write(input logic [9:0] a, input logic [31:0] d);
    @(negedge clk); cfg_cs = 1; cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk); cfg_cs = 0; cfg_we = 0;
  endtask

  task automatic cfg_read(input logic [9:0] a, output logic [31:0] d);
    @(negedge clk); cfg_cs = 1; cfg_we = 0; cfg_addr = a;
    @(negedge clk); cfg_cs = 0; d = cfg_rdata;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Program of the example: Ethernet II, ARP and IPv4/UDP reception.
  localparam logic [23:0] ILT [29] = '{
    24'h500001, 24'h151800, 24'h453483, 24'h200040, 24'h40007c, 24'h000000,
    24'h361413, 24'h40007c, 24'h200044, 24'h162800, 24'h400079, 24'h000000,
    24'h080000, 24'h455e82, 24'h400075, 24'h457682, 24'h400073, 24'h200010,
    24'h50002a, 24'h425482, 24'h40006f, 24'h200120, 24'h40006a, 24'h200008,
    24'h500002, 24'h420482, 24'h400069, 24'h2000a0, 24'h400064 };

  task automatic load_program();
    // PCB lines 0, 1, 8, 9, 10, 11 (all other parameters zero).
    for (int a = 0; a < 64; a++) cfg_write(10'h100 + 10'(a), 32'h0);
    cfg_write(10'h100 + 0,  32'h0000_0800); cfg_write(10'h100 + 1,  32'h0000_0806);
    cfg_write(10'h100 + 4,  32'h0000_0011);
    cfg_write(10'h100 + 32, 32'hffff_ffff); cfg_write(10'h100 + 33, 32'h0c5a_80ac);
    cfg_write(10'h100 + 36, 32'h0000_ffff); cfg_write(10'h100 + 37, 32'h0000_4ab7);
    cfg_write(10'h100 + 40, 32'h82ec_3705); cfg_write(10'h100 + 41, 32'h82ec_ffff);
    cfg_write(10'h100 + 42, 32'hffff_ffff);
    cfg_write(10'h100 + 44, 32'h0000_07e9);
    // CCB lines 0 and 1.
    for (int a = 0; a < 32; a++) cfg_write(10'h200 + 10'(a), 32'h0);
    cfg_write(10'h200 + 0, 32'h82); cfg_write(10'h200 + 1, 32'h91);
    cfg_write(10'h200 + 4, 32'h82);
    for (int a = 29; a < 32; a++) cfg_write(10'(a), 32'h0);
    for (int a = 1; a < 29; a++) cfg_write(10'(a), 32'(ILT[a]));
    check(!run, "processor halted while configuring");
    begin
      logic [31:0] d;
      cfg_read(10'h00d, d);       check(d == 32'(ILT[13]), "ILT readback");
      cfg_read(10'h100 + 40, d);  check(d == 32'h82ec_3705, "PCB readback");
      cfg_read(10'h201, d);       check(d == 32'h91, "CCB readback");
    end
    cfg_write(10'h000, 32'(ILT[0]));
    check(run && pc == 0, "writing ILT entry 0 starts the program");
  endtask

  localparam logic [47:0] MY_MAC = 48'h0c5a_80ac_4ab7;
  localparam logic [31:0] MY_IP  = 32'h82ec_3705;

  typedef enum {V_DROP, V_IP, V_ARP} verdict_e;

  task automatic send_frame(bytes_t f, verdict_e exp, bytes_t payload, string name);
    logic [31:0] rd, ci_before, ci;
    int nw = n_words(f);
    cfg_read(10'h301, ci_before);
    cfg_read(10'h300, rd);  // clear the result register
    check(pc == 0, {name, ": processor waits for a frame"});
    frame_outs = '0;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk); din = frame_word(f, w);
    end
    @(negedge clk); din = WORD_IDLE;
    repeat (30) @(negedge clk);
    check(pc == 0, {name, ": back at instruction 0"});
    check(frame_outs[8] == (exp == V_IP), {name, ": IP accept output"});
    check(frame_outs[7] == (exp == V_ARP), {name, ": ARP accept output"});
    check(frame_outs[5] == (exp != V_DROP), {name, ": accept output"});
    cfg_read(10'h300, rd);
    check(rd[5] == (exp != V_DROP) && rd[8] == (exp == V_IP),
          {name, ": result register"});
    cfg_read(10'h301, ci);
    if (exp == V_DROP) begin
      check(ci == ci_before, {name, ": nothing committed"});
    end else begin
      int base = int'(ci[30:16]) * 512;
      check(ci[31] != ci_before[31], {name, ": commit toggled"});
      check(int'(ci[15:0]) == payload.size(),
            $sformatf("%s: committed %0d bytes, expected %0d", name, ci[15:0], payload.size()));
      for (int i = 0; i < payload.size(); i++) begin
        logic [31:0] w = pmem[base + i / 4];
        if (w[31 - 8 * (i % 4) -: 8] != payload[i]) begin
          check(0, $sformatf("%s: payload byte %0d", name, i));
          break;
        end
      end
      checks++;
    end
  endtask

  function automatic bytes_t arp_body();
    bytes_t b;
    put16(b, 16'h0001); put16(b, 16'h0800); put16(b, 16'h0604); put16(b, 16'h0001);
    put32(b, 32'h0010_a4e3); put16(b, 16'h5501); put32(b, 32'h82ec_3701);
    put32(b, 32'h0); put16(b, 16'h0); put32(b, MY_IP);
    return b;
  endfunction

  initial begin
    bytes_t p, f, ip, none;
    repeat (3) @(negedge clk);
    rst_n = 1;
    load_program();
    repeat (5) @(negedge clk);

    // Good UDP frames: one byte (ends in the word where storage restarts),
    // small (padded, odd length), medium, large, broadcast.
    p  = rand_bytes(1);
    f  = eth(MY_MAC, 16'h0800, ip_udp(32'h82ec_3701, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "udp 1 byte");
    p  = rand_bytes(5);
    f  = eth(MY_MAC, 16'h0800, ip_udp(32'h82ec_3701, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "udp 5 bytes");
    p  = rand_bytes(64);
    f  = eth(MY_MAC, 16'h0800, ip_udp(32'h0a00_0001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "udp 64 bytes");
    p  = rand_bytes(1471);
    f  = eth(MY_MAC, 16'h0800, ip_udp(32'h0a00_0001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "udp 1471 bytes");
    p  = rand_bytes(33);
    f  = eth(48'hffff_ffff_ffff, 16'h0800, ip_udp(32'h0a00_0001, 32'h82ec_ffff, 8'h11, 16'd2025, p, 0, 0, 1), 0);
    send_frame(f, V_IP, p, "broadcast udp, no checksum");
    p  = rand_bytes(20);
    f  = eth(MY_MAC, 16'h0800, ip_udp(32'h0a00_0001, 32'hffff_ffff, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "limited broadcast udp");

    // ARP: the whole Ethernet payload (padding and FCS included) is stored.
    f = eth(48'hffff_ffff_ffff, 16'h0806, arp_body(), 0);
    p = {};
    for (int i = 14; i < f.size(); i++) p.push_back(f[i]);
    send_frame(f, V_ARP, p, "arp request");
    f = eth(48'hffff_ffff_ffff, 16'h0806, arp_body(), 1);
    send_frame(f, V_DROP, none, "arp with bad crc");

    // Errors the program must reject.
    p = rand_bytes(40);
    f = eth(48'h0c5a_80ac_4ab8, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "wrong MAC");
    f = eth(48'h0c5a_80ad_4ab7, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "wrong MAC upper part");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, 32'h82ec_3706, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "wrong IP address");
    f = eth(MY_MAC, 16'h86dd, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "unknown ethertype");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h06, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "TCP protocol");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2026, p, 0, 0, 0), 0);
    send_frame(f, V_DROP, none, "wrong UDP port");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 1, 0, 0), 0);
    send_frame(f, V_DROP, none, "bad IP checksum");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 0, 1, 0), 0);
    send_frame(f, V_DROP, none, "bad UDP checksum");
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a000001, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 1);
    send_frame(f, V_DROP, none, "bad CRC");

    // A good frame after all the errors.
    p = rand_bytes(100);
    f = eth(MY_MAC, 16'h0800, ip_udp(32'h0a00_0002, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0);
    send_frame(f, V_IP, p, "udp after errors");

    // Line rate: good frames back to back with the minimum Ethernet gap of
    // 12 idle bytes plus 8 preamble bytes (5 idle words). Every frame must
    // be accepted, so the program has to be back at instruction 0 in time.
    begin
      automatic bytes_t burst[$];
      automatic int n0 = acc_ip, a0 = acc_arp, c0 = n_commit;
      for (int i = 0; i < 6; i++) begin
        p = rand_bytes(10 + 37 * i);
        if (i == 3) burst.push_back(eth(48'hffff_ffff_ffff, 16'h0806, arp_body(), 0));
        else burst.push_back(eth(MY_MAC, 16'h0800, ip_udp(32'h0a00_0003, MY_IP, 8'h11, 16'd2025, p, 0, 0, 0), 0));
      end
      foreach (burst[i]) begin
        for (int w = 0; w < n_words(burst[i]); w++) begin
          @(negedge clk); din = frame_word(burst[i], w);
        end
        repeat (5) begin @(negedge clk); din = WORD_IDLE; end
      end
      repeat (30) @(negedge clk);
      check(acc_ip - n0 == 5 && acc_arp - a0 == 1 && n_commit - c0 == 6,
            $sformatf("line-rate burst: %0d IP, %0d ARP, %0d commits", acc_ip - n0, acc_arp - a0, n_commit - c0));
      n_burst = acc_ip - n0 + acc_arp - a0;
    end

    check(acc_ip == 12 && acc_arp == 2, $sformatf("accept counts ip=%0d arp=%0d", acc_ip, acc_arp));
    $display("mechanisms: wat_stall=%0d ccb_jump=%0d jmp_match=%0d jmp_inputs taken=%0d not=%0d continue=%0d two_word_buffer=%0d stop=%0d restart=%0d commit=%0d discard=%0d len_end=%0d",
             n_wat_stall, n_ccb_jump, n_jmp_match, n_jmp_in, n_jmp_in_not, n_continue,
             n_buf2, n_stop, n_restart, n_commit, n_discard, n_len_end);
    check(n_wat_stall > 0, "WAT stall happened");
    check(n_ccb_jump > 0, "codebook jump happened");
    check(n_jmp_match > 0, "JMP on match happened");
    check(n_jmp_in > 0, "JMP on inputs taken");
    check(n_jmp_in_not > 0, "JMP on inputs not taken");
    check(n_continue > 0, "compare continuation happened");
    check(n_buf2 > 0, "two-word input buffer used");
    check(n_stop > 0, "payload storage stopped");
    check(n_restart > 0, "payload storage restarted");
    check(n_commit > 0, "payload committed");
    check(n_discard > 0, "packet discarded");
    check(n_len_end > 0, "length counter reached datagram end");
    check(n_burst == 6, "frames accepted at line rate");
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
