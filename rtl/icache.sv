// icache: the normal level-1 instruction cache behind the line buffer.
//
// An n-way set associative cache (16 KB, 64-byte lines, 4 ways by default).
// Tags, valid bits and data are kept per way; a line is located either by the
// fetch address (set index and tag compare) or directly by its cache line
// address, CLA = {set index, way}, which is how the KITPS predictor names a
// line.  Each access drives exactly one wordline of the addressed set: on a
// lookup the wordline of the hitting way, on a refill that of the victim way.
//
// Interface (all reads combinational, all writes at the rising clock edge):
//   addr_i           fetch address: lookup and refill
//   hit_o, wl_o      hit flag and one-hot wordline vector of the hitting way
//   hit_line_o       data of the hitting line
//   victim_wl_o      one-hot wordline of the way a refill of addr_i would use
//   fill_i, fill_line_i   write the line of addr_i into the victim way
//   cla_i            cache line address for a direct read:
//   cla_valid_o, cla_laddr_o, cla_line_o   valid bit, line address
//                    ({tag, index}) and data of that line
//
// The cache size, line size and associativity follow the document.  The
// document does not give the replacement policy: this design uses one
// round-robin pointer per set.  Reset clears the valid bits and pointers; tag
// and data arrays are plain memories without reset.
module icache #(
  parameter int unsigned ADDR_W      = kitps_pkg::ADDR_W,
  parameter int unsigned CACHE_BYTES = kitps_pkg::CACHE_BYTES,
  parameter int unsigned LINE_BYTES  = kitps_pkg::LINE_BYTES,
  parameter int unsigned WAYS        = kitps_pkg::WAYS,
  parameter int unsigned SETS        = CACHE_BYTES / (LINE_BYTES * WAYS),
  parameter int unsigned OFFSET_W    = $clog2(LINE_BYTES),
  parameter int unsigned INDEX_W     = $clog2(SETS),
  parameter int unsigned TAG_W       = ADDR_W - INDEX_W - OFFSET_W,
  parameter int unsigned WAY_W       = $clog2(WAYS),
  parameter int unsigned CLA_W       = INDEX_W + WAY_W,
  parameter int unsigned LADDR_W     = ADDR_W - OFFSET_W,
  parameter int unsigned LINE_W      = LINE_BYTES * 8
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup by fetch address
  input  logic [ADDR_W-1:0]  addr_i,
  output logic               hit_o,
  output logic [WAYS-1:0]    wl_o,
  output logic [LINE_W-1:0]  hit_line_o,
  output logic [WAYS-1:0]    victim_wl_o,
  // refill of the line of addr_i
  input  logic               fill_i,
  input  logic [LINE_W-1:0]  fill_line_i,
  // direct read by cache line address
  input  logic [CLA_W-1:0]   cla_i,
  output logic               cla_valid_o,
  output logic [LADDR_W-1:0] cla_laddr_o,
  output logic [LINE_W-1:0]  cla_line_o
);

  logic [INDEX_W-1:0] a_idx;
  logic [TAG_W-1:0]   a_tag;
  logic [INDEX_W-1:0] c_idx;
  logic [WAY_W-1:0]   c_way;

  assign a_idx = addr_i[OFFSET_W +: INDEX_W];
  assign a_tag = addr_i[ADDR_W-1 -: TAG_W];
  assign c_idx = cla_i[CLA_W-1 -: INDEX_W];
  assign c_way = cla_i[WAY_W-1:0];

  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAY_W-1:0] rr_q    [SETS];

  logic [WAYS-1:0]   victim_wl;
  logic [LINE_W-1:0] way_line  [WAYS];   // data of each way in set a_idx
  logic [LINE_W-1:0] cway_line [WAYS];   // data of each way in set c_idx
  logic [TAG_W-1:0]  way_tag   [WAYS];
  logic [TAG_W-1:0]  cway_tag  [WAYS];

  always_comb begin
    victim_wl = '0;
    victim_wl[rr_q[a_idx]] = 1'b1;
  end
  assign victim_wl_o = victim_wl;

  // One tag array and one data array per way
  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TAG_W-1:0]  tag_mem  [SETS];
    logic [LINE_W-1:0] data_mem [SETS];

    always_ff @(posedge clk) begin
      if (fill_i && victim_wl[w]) begin
        tag_mem[a_idx]  <= a_tag;
        data_mem[a_idx] <= fill_line_i;
      end
    end

    assign way_tag[w]   = tag_mem[a_idx];
    assign way_line[w]  = data_mem[a_idx];
    assign cway_tag[w]  = tag_mem[c_idx];
    assign cway_line[w] = data_mem[c_idx];
    assign wl_o[w]      = valid_q[a_idx][w] && (way_tag[w] == a_tag);
  end

  assign hit_o = |wl_o;

  // Wordline-selected read of the hitting way
  always_comb begin
    hit_line_o = '0;
    for (int w = 0; w < WAYS; w++)
      if (wl_o[w]) hit_line_o = hit_line_o | way_line[w];
  end

  // Direct read by CLA
  assign cla_valid_o = valid_q[c_idx][c_way];
  assign cla_laddr_o = {cway_tag[c_way], c_idx};
  assign cla_line_o  = cway_line[c_way];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        rr_q[s]    <= '0;
      end
    end else if (fill_i) begin
      valid_q[a_idx] <= valid_q[a_idx] | victim_wl;
      rr_q[a_idx]    <= rr_q[a_idx] + 1'b1;
    end
  end

  // A line is filled only when it is not already present
  a_fill_miss : assert property (@(posedge clk) disable iff (!rst_n)
                                 fill_i |-> !hit_o);

endmodule
