// itt: Instruction Trace Table of the KITPS predictor.
//
// Stores key instruction traces (KITs): fetches that left the line held in
// the line buffer.  A KIT is kept as the address of its start instruction and
// the cache line address (CLA = set index and way) of the line holding the
// next instruction.  The table of ENTRIES entries is built as ENTRIES/2 sets
// of two ways.  The set is chosen by the low bits of the start instruction's
// word address and the remaining bits are compared as a tag in both ways at
// once.  When a set is full the older of its two KITs is replaced (FIFO).
//
// Interface: lookup_addr_i is searched combinationally every cycle (hit_o,
// hit_cla_o).  ins_i writes the KIT (ins_start_i, ins_cla_i) at the rising
// edge.  ins_evict_o tells that the write pushes out a valid older KIT,
// ins_update_o that it rewrites an existing entry.
//
// From the document: 2-way set associative organisation, N/2 sets, FIFO
// replacement, entry contents, 8 entries by default.  This design's choices:
// a start address already in the table has its CLA rewritten in place
// instead of being stored twice; the byte-offset bits of the instruction
// address are not stored; reset invalidates all entries.  ENTRIES must be a
// power of two and at least 4.
module itt #(
  parameter int unsigned ENTRIES = kitps_pkg::ITT_SIZE,
  parameter int unsigned ADDR_W  = kitps_pkg::ADDR_W,
  parameter int unsigned INSTR_W = kitps_pkg::INSTR_W,
  parameter int unsigned CLA_W   = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup with the fetch address
  input  logic [ADDR_W-1:0] lookup_addr_i,
  output logic              hit_o,
  output logic [CLA_W-1:0]  hit_cla_o,
  // insertion of a new KIT
  input  logic              ins_i,
  input  logic [ADDR_W-1:0] ins_start_i,
  input  logic [CLA_W-1:0]  ins_cla_i,
  output logic              ins_evict_o,
  output logic              ins_update_o
);

  localparam int unsigned SETS    = ENTRIES / 2;
  localparam int unsigned SET_W   = $clog2(SETS);
  localparam int unsigned BYTE_W  = $clog2(INSTR_W / 8);
  localparam int unsigned TAG_W   = ADDR_W - BYTE_W - SET_W;

  logic [TAG_W-1:0] tag_q   [SETS][2];
  logic [CLA_W-1:0] cla_q   [SETS][2];
  logic [1:0]       valid_q [SETS];
  logic             fifo_q  [SETS];   // way holding the older KIT of the set

  // ---- lookup: both ways of the set compared at once ----
  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;
  logic [1:0]       lk_match;

  assign lk_set = lookup_addr_i[BYTE_W +: SET_W];
  assign lk_tag = lookup_addr_i[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < 2; w++)
      lk_match[w] = valid_q[lk_set][w] && (tag_q[lk_set][w] == lk_tag);
  end

  assign hit_o     = |lk_match;
  assign hit_cla_o = lk_match[1] ? cla_q[lk_set][1] : cla_q[lk_set][0];

  // ---- insertion ----
  logic [SET_W-1:0] in_set;
  logic [TAG_W-1:0] in_tag;
  logic [1:0]       in_match;
  logic             in_way;

  assign in_set = ins_start_i[BYTE_W +: SET_W];
  assign in_tag = ins_start_i[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < 2; w++)
      in_match[w] = valid_q[in_set][w] && (tag_q[in_set][w] == in_tag);
  end

  assign ins_update_o = ins_i && (|in_match);
  assign in_way       = (|in_match) ? in_match[1] : fifo_q[in_set];
  assign ins_evict_o  = ins_i && !(|in_match) && valid_q[in_set][fifo_q[in_set]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= 2'b00;
        fifo_q[s]  <= 1'b0;
      end
    end else if (ins_i) begin
      valid_q[in_set][in_way] <= 1'b1;
      if (!(|in_match)) fifo_q[in_set] <= ~fifo_q[in_set];
    end
  end

  always_ff @(posedge clk) begin
    if (ins_i) begin
      tag_q[in_set][in_way] <= in_tag;
      cla_q[in_set][in_way] <= ins_cla_i;
    end
  end

endmodule
