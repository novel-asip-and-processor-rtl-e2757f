// acc_mem_if: payload memory interface accelerator.
//
// Writes the payload of a received packet into the payload memory while the
// processor program lets it. A `start` pulse (re)opens storage at the base of
// the current packet slot, beginning with bits 15:0 of the start word, which
// with Ethernet II framing is where both the Ethernet payload and the UDP
// payload begin. Half words are repacked into 32-bit memory words. Storage
// ends at a `stop` pulse (payload not wanted), at the last IP datagram word
// reported by the length counter when that counter is running, or at the end
// of the frame. A `commit` pulse (packet accepted) publishes the slot number
// and byte count in `commit_info` and moves on to the next slot; a packet
// that is never committed is overwritten by the next one. Slots of
// SLOT_WORDS words form a ring of SLOTS entries. The published processor
// names this accelerator only; slot layout, alignment and end rules are this
// design's own.
//
// Interface: one memory write per clock at most (mem_we/mem_addr/mem_wdata,
// word addressed, first byte in bits 31:24). commit_info = {toggle[31],
// slot[30:16], bytes[15:0]}; the toggle flips on every commit.
module acc_mem_if
  import pp_pkg::*;
#(
  parameter int unsigned AW         = 14,
  parameter int unsigned SLOT_WORDS = 512,
  parameter int unsigned SLOTS      = 32,
  localparam int unsigned OW        = $clog2(SLOT_WORDS),
  localparam int unsigned SW        = $clog2(SLOTS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          stop,
  input  logic          commit,
  input  word_t         cur,
  input  logic          len_active,
  input  logic          len_end,
  input  logic [2:0]    len_end_bytes,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [31:0]   mem_wdata,
  output logic [31:0]   commit_info,
  output logic          overflow
);
  logic          storing, flush;
  logic          pend_v;
  logic [15:0]   pend;
  logic [OW:0]   wptr;
  logic [15:0]   nbytes;
  logic [SW-1:0] slot;

  logic [2:0]    vb;        // valid bytes of cur while storing
  logic          last;      // storage ends with this word
  logic          hi_v, lo_v;

  always_comb begin
    last = 1'b0;
    vb   = 3'd4;
    if (len_active && len_end) begin
      last = 1'b1;
      vb   = len_end_bytes;
    end else if (cur.eof) begin
      last = 1'b1;
      vb   = cur.nbytes;
    end
    hi_v = vb >= 3'd1;
    lo_v = vb >= 3'd3;
  end

  always_comb begin
    mem_we    = 1'b0;
    mem_wdata = '0;
    if (flush) begin
      mem_we    = 1'b1;
      mem_wdata = {pend, 16'h0};
    end else if (storing && !start && !stop && cur.valid) begin
      if (pend_v && hi_v) begin
        mem_we    = 1'b1;
        mem_wdata = {pend, cur.data[31:16]};
      end else if (!pend_v && lo_v) begin
        mem_we    = 1'b1;
        mem_wdata = cur.data;
      end
    end
    mem_we   = mem_we && !wptr[OW];
    mem_addr = AW'({slot, wptr[OW-1:0]});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      storing     <= 1'b0;
      flush       <= 1'b0;
      pend_v      <= 1'b0;
      pend        <= '0;
      wptr        <= '0;
      nbytes      <= '0;
      slot        <= '0;
      commit_info <= '0;
      overflow    <= 1'b0;
    end else begin
      flush <= 1'b0;
      if (flush) begin
        pend_v <= 1'b0;
        if (!wptr[OW]) wptr <= wptr + 1'b1;
      end
      if (start) begin
        wptr     <= '0;
        pend     <= cur.data[15:0];
        overflow <= 1'b0;
        if (last) begin              // payload ends in the start word
          storing <= 1'b0;
          pend_v  <= 1'b0;
          flush   <= lo_v;
          nbytes  <= lo_v ? 16'(vb - 3'd2) : 16'd0;
        end else begin
          storing <= 1'b1;
          flush   <= 1'b0;
          pend_v  <= 1'b1;
          nbytes  <= 16'd2;
        end
      end else if (stop) begin
        storing <= 1'b0;
        flush   <= 1'b0;
        pend_v  <= 1'b0;
      end else if (storing && cur.valid) begin
        nbytes <= nbytes + 16'(vb);
        if (mem_we) wptr <= wptr + 1'b1;
        if (wptr[OW]) overflow <= 1'b1;
        if (pend_v) begin
          pend_v <= lo_v;
          pend   <= cur.data[15:0];
        end else if (hi_v && !lo_v) begin
          pend_v <= 1'b1;
          pend   <= cur.data[31:16];
        end
        if (last) begin
          storing <= 1'b0;
          flush   <= pend_v ? lo_v : (hi_v && !lo_v);
        end
      end
      if (commit) begin
        commit_info <= {~commit_info[31], 15'(slot), nbytes};
        slot        <= slot + 1'b1;
      end
    end
  end
endmodule
