// icache: the MIPS-X on-chip instruction cache.
//
// 512 words of instructions, organised as 4 sets of 8 ways, 16-word blocks
// (4 x 8 x 16 = 512), with pseudo-random replacement driven by a ring counter.
// These numbers and the ring counter follow the source description; the rest
// of the organisation is this design's own, because the cache's circuit is
// documented elsewhere:
//   * a block has one tag and a valid bit per word. A miss brings in only two
//     words (the two cache-miss cycles CM1 and CM2), so a block fills a word at
//     a time;
//   * a fill whose block is not present allocates a way of the set: the first
//     way whose tag is invalid, otherwise the way the ring counter points at.
//     The ring counter is one-hot and rotates every clock, which makes the
//     choice independent of the access pattern;
//   * reset clears every tag-valid bit, unless ICacheTest is high: the test
//     sequence resets the processor a second time and must keep the contents.
//   * ICacheDisable makes every lookup miss and suppresses fills.
//
// Interface: lk_addr is the byte address of the instruction being fetched;
// lk_hit/lk_data answer combinationally in the same cycle. wr_en writes wr_data
// for byte address wr_addr at the clock edge. Address bits: [5:2] word in
// block, [7:6] set, [31:8] tag.
//
// Lint note: the address-field functions each use only their own bits of
// the address; the unused-bit warnings stand.
module icache #(
  parameter int unsigned SETS  = 4,
  parameter int unsigned WAYS  = 8,
  parameter int unsigned BLOCK = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        icache_test,
  input  logic        icache_disable,
  input  logic [31:0] lk_addr,
  output logic        lk_hit,
  output logic [31:0] lk_data,
  input  logic        wr_en,
  input  logic [31:0] wr_addr,
  input  logic [31:0] wr_data
);
  localparam int unsigned OB = $clog2(BLOCK);
  localparam int unsigned SB = $clog2(SETS);
  localparam int unsigned WB = $clog2(WAYS);
  localparam int unsigned TB = 32 - 2 - OB - SB;

  logic [31:0]   data   [SETS][WAYS][BLOCK];
  logic [TB-1:0] tag    [SETS][WAYS];
  logic          tvalid [SETS][WAYS];
  logic [BLOCK-1:0] wvalid [SETS][WAYS];
  logic [WAYS-1:0]  ring;

  function automatic logic [SB-1:0] set_of(logic [31:0] a);
    return a[2+OB +: SB];
  endfunction
  function automatic logic [OB-1:0] off_of(logic [31:0] a);
    return a[2 +: OB];
  endfunction
  function automatic logic [TB-1:0] tag_of(logic [31:0] a);
    return a[31 -: TB];
  endfunction

  // Lookup
  always_comb begin
    lk_hit  = 1'b0;
    lk_data = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (tvalid[set_of(lk_addr)][w] && tag[set_of(lk_addr)][w] == tag_of(lk_addr)
          && wvalid[set_of(lk_addr)][w][off_of(lk_addr)]) begin
        lk_hit  = 1'b1;
        lk_data = data[set_of(lk_addr)][w][off_of(lk_addr)];
      end
    end
    if (icache_disable) lk_hit = 1'b0;
  end

  // Way selection for a fill
  logic          wr_match;
  logic [WB-1:0] wr_way_match, wr_way_free, wr_way_ring, wr_way;
  logic          wr_free;
  always_comb begin
    wr_match = 1'b0; wr_way_match = '0;
    wr_free  = 1'b0; wr_way_free  = '0;
    wr_way_ring = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (tvalid[set_of(wr_addr)][w] && tag[set_of(wr_addr)][w] == tag_of(wr_addr)) begin
        wr_match = 1'b1; wr_way_match = WB'(w);
      end
      if (!tvalid[set_of(wr_addr)][w]) begin
        wr_free = 1'b1; wr_way_free = WB'(w);
      end
      if (ring[w]) wr_way_ring = WB'(w);
    end
    wr_way = wr_match ? wr_way_match : (wr_free ? wr_way_free : wr_way_ring);
  end

  always_ff @(posedge clk) begin
    if (rst) ring <= WAYS'(1);
    else     ring <= {ring[WAYS-2:0], ring[WAYS-1]};
  end

  always_ff @(posedge clk) begin
    if (rst && !icache_test) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) tvalid[s][w] <= 1'b0;
    end else if (wr_en && !icache_disable) begin
      tvalid[set_of(wr_addr)][wr_way] <= 1'b1;
      tag[set_of(wr_addr)][wr_way]    <= tag_of(wr_addr);
      if (wr_match)
        wvalid[set_of(wr_addr)][wr_way][off_of(wr_addr)] <= 1'b1;
      else
        wvalid[set_of(wr_addr)][wr_way] <= BLOCK'(1) << off_of(wr_addr);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en && !icache_disable && !(rst && !icache_test))
      data[set_of(wr_addr)][wr_way][off_of(wr_addr)] <= wr_data;
  end
endmodule
