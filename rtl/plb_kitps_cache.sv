// plb_kitps_cache: predictive line buffer (PLB) instruction cache with the
// Key Instruction Trace Predictive Strategy (KITPS).
//
// A one-line buffer is the first source of every instruction fetch; the
// set-associative cache is accessed only when the buffer misses.  Fetches that
// leave the buffered line are "key instruction traces" (KITs).  Each one is
// recorded in the Instruction Trace Table (ITT) as the address of the
// instruction fetched just before the miss (held in the LIAR) together with
// the cache line address (CLA) of the line the miss was served from: the set
// index of the missing address and the way number held in the CLIR.  Every
// fetch also looks up the ITT; a hit means the next fetch will leave the
// buffered line, so the line named by the stored CLA is read from the cache
// and loaded into the line buffer at once, before the next fetch arrives.
//
// Operation per fetch (line buffer / ITT outcome):
//   hit  / miss : instruction from the buffer; LIAR <= address.
//   hit  / hit  : instruction from the buffer; buffer <= line at the ITT's CLA;
//                 LIAR <= address.
//   miss / miss : normal cache access (refill from memory on a cache miss);
//                 new KIT {LIAR, {index, CLIR}} written to the ITT;
//                 buffer <= fetched line; LIAR <= address.
//   miss / hit  : as miss / miss, but the buffer is loaded with the line at
//                 the ITT's CLA instead of the fetched line.
//
// Timing (this design's choice; the document fixes only the order of the
// steps): a request is accepted when req_ready_o is high.  A line buffer hit
// answers in the next cycle and the unit accepts a new request in that same
// cycle, so back-to-back buffer hits run at one fetch per cycle; the
// predicted line is in the buffer for the very next fetch.  A line buffer
// miss that hits in the cache answers two cycles after the request
// (ST_CACHE, then ST_RESP), and the unit is ready again one cycle later.  A
// cache miss issues one line-sized read on the memory port and answers in the
// cycle after the line arrives.  The KIT write, the LIAR update and the
// buffer reload of a miss all happen in the ST_RESP cycle, whose CLIR value
// was captured from the wordline of the cache access (hit way or refill way).
//
// Memory port: mem_req_valid_o / mem_req_ready_i handshake with a
// line-aligned address, then one mem_rvalid_i beat carrying the whole line
// (this design's choice).  The ev_* outputs pulse once per event, for hit
// ratio counters.  P_ITT_SIZE = 0 builds the unit without the ITT, i.e. a
// plain line buffer cache, as the zero point of a table-size study; the
// table otherwise needs a power of two of at least 4 entries.
module plb_kitps_cache
  import kitps_pkg::*;
#(
  parameter int unsigned P_ADDR_W      = kitps_pkg::ADDR_W,
  parameter int unsigned P_INSTR_W     = kitps_pkg::INSTR_W,
  parameter int unsigned P_CACHE_BYTES = kitps_pkg::CACHE_BYTES,
  parameter int unsigned P_LINE_BYTES  = kitps_pkg::LINE_BYTES,
  parameter int unsigned P_WAYS        = kitps_pkg::WAYS,
  parameter int unsigned P_ITT_SIZE    = kitps_pkg::ITT_SIZE,
  parameter int unsigned LINE_W        = P_LINE_BYTES * 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // instruction fetch port (from the processor)
  input  logic                  req_valid_i,
  output logic                  req_ready_o,
  input  logic [P_ADDR_W-1:0]   req_addr_i,
  output logic                  resp_valid_o,
  output logic [P_INSTR_W-1:0]  resp_instr_o,
  // line refill port (to memory)
  output logic                  mem_req_valid_o,
  input  logic                  mem_req_ready_i,
  output logic [P_ADDR_W-1:0]   mem_req_addr_o,
  input  logic                  mem_rvalid_i,
  input  logic [LINE_W-1:0]     mem_rdata_i,
  // event strobes
  output logic                  ev_lb_hit_o,       // fetch served by the line buffer
  output logic                  ev_lb_miss_o,      // fetch missed the line buffer
  output logic                  ev_itt_hit_o,      // fetch address found in the ITT
  output logic                  ev_cache_miss_o,   // normal cache missed, line refilled
  output logic                  ev_kit_insert_o,   // KIT written into the ITT
  output logic                  ev_itt_evict_o,    // KIT write pushed out an older KIT
  output logic                  ev_itt_update_o,   // KIT write rewrote the CLA of a known start
  output logic                  ev_lb_predict_o    // buffer loaded with a predicted line
);

  localparam int unsigned SETS     = P_CACHE_BYTES / (P_LINE_BYTES * P_WAYS);
  localparam int unsigned OFFSET_W = $clog2(P_LINE_BYTES);
  localparam int unsigned INDEX_W  = $clog2(SETS);
  localparam int unsigned WAY_W    = $clog2(P_WAYS);
  localparam int unsigned CLA_W    = INDEX_W + WAY_W;
  localparam int unsigned LADDR_W  = P_ADDR_W - OFFSET_W;
  localparam int unsigned BYTE_W   = $clog2(P_INSTR_W / 8);
  localparam int unsigned WORDS    = LINE_W / P_INSTR_W;
  localparam int unsigned WSEL_W   = $clog2(WORDS);

  fetch_state_e state_q, state_d;

  // request held while a line buffer miss is served
  logic [P_ADDR_W-1:0] addr_q;
  logic                itt_hit_q;
  logic [CLA_W-1:0]    itt_cla_q;
  logic                sent_q;

  // response register
  logic                resp_valid_q;
  logic [P_INSTR_W-1:0] resp_instr_q;

  // ---- line buffer ----
  logic               lb_hit;
  logic [P_INSTR_W-1:0] lb_instr;
  logic               lb_load;
  logic               lb_valid;
  logic [LADDR_W-1:0] lb_laddr;

  // ---- ITT ----
  logic               itt_hit;
  logic [CLA_W-1:0]   itt_cla;
  logic               itt_ins;
  logic [CLA_W-1:0]   itt_ins_cla;
  logic               itt_evict, itt_update;

  // ---- LIAR / CLIR ----
  logic [P_ADDR_W-1:0] liar_addr;
  logic                liar_valid;
  logic                liar_load;
  logic [P_ADDR_W-1:0] liar_din;
  logic [P_WAYS-1:0]   clir_wl;
  logic                clir_load;
  logic [WAY_W-1:0]    clir_q;

  // ---- cache ----
  logic [P_ADDR_W-1:0] c_addr;
  logic                c_hit;
  logic [P_WAYS-1:0]   c_wl, c_victim_wl;
  logic [LINE_W-1:0]   c_hit_line;
  logic                c_fill;
  logic [CLA_W-1:0]    c_cla;
  logic                c_cla_valid;
  logic [LADDR_W-1:0]  c_cla_laddr;
  logic [LINE_W-1:0]   c_cla_line;

  logic         accept;
  lookup_case_e lk_case;
  assign req_ready_o = (state_q == ST_IDLE);
  assign accept      = req_valid_i && req_ready_o;
  assign lk_case     = lookup_case_e'({lb_hit, itt_hit});

  line_buffer #(
    .ADDR_W(P_ADDR_W), .INSTR_W(P_INSTR_W), .LINE_BYTES(P_LINE_BYTES)
  ) u_lb (
    .clk, .rst_n,
    .addr_i      (req_addr_i),
    .hit_o       (lb_hit),
    .instr_o     (lb_instr),
    .load_i      (lb_load),
    .load_laddr_i(c_cla_laddr),
    .load_line_i (c_cla_line),
    .valid_o     (lb_valid),
    .laddr_o     (lb_laddr)
  );

  // P_ITT_SIZE = 0 leaves out the table: the unit is then a plain line buffer
  // cache without prediction, the reference point of the table-size study.
  if (P_ITT_SIZE > 0) begin : g_itt
    itt #(
      .ENTRIES(P_ITT_SIZE), .ADDR_W(P_ADDR_W), .INSTR_W(P_INSTR_W), .CLA_W(CLA_W)
    ) u_itt (
      .clk, .rst_n,
      .lookup_addr_i(req_addr_i),
      .hit_o        (itt_hit),
      .hit_cla_o    (itt_cla),
      .ins_i        (itt_ins),
      .ins_start_i  (liar_addr),
      .ins_cla_i    (itt_ins_cla),
      .ins_evict_o  (itt_evict),
      .ins_update_o (itt_update)
    );
  end else begin : g_no_itt
    assign itt_hit    = 1'b0;
    assign itt_cla    = '0;
    assign itt_evict  = 1'b0;
    assign itt_update = 1'b0;
  end

  liar #(.ADDR_W(P_ADDR_W)) u_liar (
    .clk, .rst_n,
    .load_i (liar_load),
    .addr_i (liar_din),
    .addr_o (liar_addr),
    .valid_o(liar_valid)
  );

  clir #(.WAYS(P_WAYS)) u_clir (
    .clk, .rst_n,
    .wl_i  (clir_wl),
    .load_i(clir_load),
    .enc_o (),
    .clir_o(clir_q)
  );

  icache #(
    .ADDR_W(P_ADDR_W), .CACHE_BYTES(P_CACHE_BYTES),
    .LINE_BYTES(P_LINE_BYTES), .WAYS(P_WAYS)
  ) u_cache (
    .clk, .rst_n,
    .addr_i      (c_addr),
    .hit_o       (c_hit),
    .wl_o        (c_wl),
    .hit_line_o  (c_hit_line),
    .victim_wl_o (c_victim_wl),
    .fill_i      (c_fill),
    .fill_line_i (mem_rdata_i),
    .cla_i       (c_cla),
    .cla_valid_o (c_cla_valid),
    .cla_laddr_o (c_cla_laddr),
    .cla_line_o  (c_cla_line)
  );

  // ---- datapath selections ----
  logic [WSEL_W-1:0] q_wsel;
  logic              fill_now;

  assign q_wsel   = addr_q[OFFSET_W-1:BYTE_W];
  assign c_addr   = addr_q;
  assign fill_now = (state_q == ST_REFILL) && sent_q && mem_rvalid_i;
  assign c_fill   = fill_now;

  // CLA of the line the miss was served from: index of the fetch address, CLIR
  assign itt_ins_cla = {addr_q[OFFSET_W +: INDEX_W], clir_q};

  // CLA read port: predicted line on an ITT hit, otherwise the fetched line
  always_comb begin
    if (state_q == ST_IDLE) c_cla = itt_cla;
    else                    c_cla = itt_hit_q ? itt_cla_q : itt_ins_cla;
  end

  // CLIR: wordline of the hitting way, or of the refilled way
  always_comb begin
    clir_wl   = (state_q == ST_REFILL) ? c_victim_wl : c_wl;
    clir_load = ((state_q == ST_CACHE) && c_hit) || fill_now;
  end

  always_comb begin
    lb_load   = 1'b0;
    liar_load = 1'b0;
    liar_din  = req_addr_i;
    itt_ins   = 1'b0;
    state_d   = state_q;
    unique case (state_q)
      ST_IDLE: begin
        if (accept) begin
          unique case (lk_case)
            LB_HIT_ITT_MISS: liar_load = 1'b1;
            LB_HIT_ITT_HIT: begin
              liar_load = 1'b1;
              lb_load   = c_cla_valid;       // predicted line from the ITT's CLA
            end
            default: state_d = ST_CACHE;   // both miss rows: normal cache access
          endcase
        end
      end
      ST_CACHE:  state_d = c_hit ? ST_RESP : ST_REFILL;
      ST_REFILL: if (fill_now) state_d = ST_RESP;
      ST_RESP: begin
        liar_load = 1'b1;
        liar_din  = addr_q;
        itt_ins   = liar_valid && (P_ITT_SIZE > 0);
        lb_load   = c_cla_valid;
        state_d   = ST_IDLE;
      end
      default: state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_IDLE;
      addr_q       <= '0;
      itt_hit_q    <= 1'b0;
      itt_cla_q    <= '0;
      sent_q       <= 1'b0;
      resp_valid_q <= 1'b0;
      resp_instr_q <= '0;
    end else begin
      state_q      <= state_d;
      resp_valid_q <= 1'b0;
      if (accept) begin
        addr_q    <= req_addr_i;
        itt_hit_q <= itt_hit;
        itt_cla_q <= itt_cla;
        if (lb_hit) begin
          resp_valid_q <= 1'b1;
          resp_instr_q <= lb_instr;
        end
      end
      if (state_q == ST_CACHE && c_hit) begin
        resp_valid_q <= 1'b1;
        resp_instr_q <= c_hit_line[q_wsel*P_INSTR_W +: P_INSTR_W];
      end
      if (fill_now) begin
        resp_valid_q <= 1'b1;
        resp_instr_q <= mem_rdata_i[q_wsel*P_INSTR_W +: P_INSTR_W];
      end
      if (state_q == ST_REFILL && mem_req_valid_o && mem_req_ready_i) sent_q <= 1'b1;
      if (fill_now) sent_q <= 1'b0;
    end
  end

  assign resp_valid_o    = resp_valid_q;
  assign resp_instr_o    = resp_instr_q;
  assign mem_req_valid_o = (state_q == ST_REFILL) && !sent_q;
  assign mem_req_addr_o  = {addr_q[P_ADDR_W-1:OFFSET_W], {OFFSET_W{1'b0}}};

  // ---- event strobes ----
  assign ev_lb_hit_o     = accept && lb_hit;
  assign ev_lb_miss_o    = accept && !lb_hit;
  assign ev_itt_hit_o    = accept && itt_hit;
  assign ev_cache_miss_o = fill_now;
  assign ev_kit_insert_o = itt_ins;
  assign ev_itt_evict_o  = itt_evict;
  assign ev_itt_update_o = itt_update;
  assign ev_lb_predict_o = lb_load && ((state_q == ST_IDLE) || itt_hit_q);

  // ---- protocol rules ----
  a_mem_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                mem_req_valid_o && !mem_req_ready_i |=> mem_req_valid_o);
  a_resp_state : assert property (@(posedge clk) disable iff (!rst_n)
                                  resp_valid_o |-> (state_q == ST_IDLE || state_q == ST_RESP));

endmodule
