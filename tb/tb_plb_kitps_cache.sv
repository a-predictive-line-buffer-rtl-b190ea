// tb_plb_kitps_cache: end-to-end testbench of the predictive line buffer
// cache with KITPS, at the default sizes (16 KB 4-way cache, 64-byte line
// buffer, 8-entry ITT).
//
// A fetch driver plays synthetic loop programs: each program is a list of
// basic blocks at random addresses in a 64 KB code region, run many times,
// with a block skipped now and then so that branch targets change.  A
// behavioural memory returns a line some random cycles after a request and
// applies random back-pressure; every instruction word is a fixed function
// of its address, so each response is checked against that function.
//
// Beside the design runs a reference model of the fetch policy written from
// the operation table: line buffer, ITT (two ways per set, FIFO, in-place
// rewrite), LIAR, CLIR and the cache tags with round-robin replacement.  For
// every fetch it predicts the line-buffer and ITT outcome and whether the
// cache hits; the testbench checks the event strobes against it and the
// latency: a line buffer hit answers 1 cycle after acceptance, a cache hit
// 2 cycles, a cache miss 1 cycle after the refill line arrives.  It also
// counts every mechanism (all four operation cases, KIT writes, ITT
// evictions and rewrites, useful predictions, cache replacements, memory
// back-pressure, back-to-back fetches) and counts a failure for one that
// never happened.  A short directed loop first checks, against outcomes
// worked out by hand, that a jump target missed once is preloaded and hits
// on the next pass, also when the jump source itself missed the buffer.  A traditional line buffer (no prediction) is modelled too
// and both hit ratios are printed.
module tb_plb_kitps_cache;
  localparam int SETS = 64, WAYS = 4, ITT_SETS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;
  longint cyc = 0;

  logic         req_valid, req_ready;
  logic [31:0]  req_addr;
  logic         resp_valid;
  logic [31:0]  resp_instr;
  logic         mem_req_valid, mem_req_ready;
  logic [31:0]  mem_req_addr;
  logic         mem_rvalid;
  logic [511:0] mem_rdata;
  logic ev_lb_hit, ev_lb_miss, ev_itt_hit, ev_cache_miss, ev_kit_insert;
  logic ev_itt_evict, ev_itt_update, ev_lb_predict;

  plb_kitps_cache dut (
    .clk, .rst_n,
    .req_valid_i(req_valid), .req_ready_o(req_ready), .req_addr_i(req_addr),
    .resp_valid_o(resp_valid), .resp_instr_o(resp_instr),
    .mem_req_valid_o(mem_req_valid), .mem_req_ready_i(mem_req_ready),
    .mem_req_addr_o(mem_req_addr), .mem_rvalid_i(mem_rvalid), .mem_rdata_i(mem_rdata),
    .ev_lb_hit_o(ev_lb_hit), .ev_lb_miss_o(ev_lb_miss), .ev_itt_hit_o(ev_itt_hit),
    .ev_cache_miss_o(ev_cache_miss), .ev_kit_insert_o(ev_kit_insert),
    .ev_itt_evict_o(ev_itt_evict), .ev_itt_update_o(ev_itt_update),
    .ev_lb_predict_o(ev_lb_predict)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // instruction word stored at a byte address
  function automatic logic [31:0] instr_at(input logic [31:0] a);
    return (a[31:2] * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  function automatic logic [511:0] line_at(input logic [31:0] a);
    logic [511:0] l;
    for (int w = 0; w < 16; w++) l[w*32 +: 32] = instr_at({a[31:6], 4'(w), 2'b00});
    return l;
  endfunction

  // ------------------------------------------------------------------
  // Reference model of the fetch policy
  // ------------------------------------------------------------------
  typedef struct { logic [29:0] wa; logic [7:0] cla; } kit_t;
  kit_t        r_itt [ITT_SETS][$];
  logic [19:0] r_tag   [SETS][WAYS];
  logic        r_valid [SETS][WAYS];
  int          r_rr    [SETS];
  logic        r_lb_valid;
  logic [25:0] r_lb_laddr;
  logic        r_liar_valid;
  logic [31:0] r_liar;
  logic        t_lb_valid;      // traditional line buffer
  logic [25:0] t_lb_laddr;
  bit          r_predicted;     // last fetch loaded a predicted line

  // counters of mechanisms
  int n_fetch = 0, n_hh = 0, n_hm = 0, n_mm = 0, n_mh = 0;
  int n_cache_hit = 0, n_cache_miss = 0, n_repl = 0;
  int n_ins = 0, n_evict = 0, n_update = 0, n_predict = 0, n_useful = 0;
  int n_trad_hit = 0, n_lb_hit = 0, n_backpressure = 0, n_b2b = 0, n_mem = 0;
  int e_insert = 0, e_evict = 0, e_update = 0, e_predict = 0, e_cmiss = 0;

  typedef struct { bit lb_hit; bit itt_hit; bit cache_hit; } outcome_t;

  function automatic int itt_find(input logic [31:0] a, output logic [7:0] cla);
    int s = int'(a[3:2]);
    cla = '0;
    foreach (r_itt[s][i]) if (r_itt[s][i].wa == a[31:2]) begin cla = r_itt[s][i].cla; return i; end
    return -1;
  endfunction

  function automatic outcome_t model_fetch(input logic [31:0] a);
    outcome_t o;
    logic [7:0] icla, cla;
    int ii, s, w;
    logic [19:0] t;
    s = int'(a[11:6]); t = a[31:12];
    ii = itt_find(a, icla);
    o.itt_hit = (ii >= 0);
    o.lb_hit  = r_lb_valid && r_lb_laddr == a[31:6];
    o.cache_hit = 1'b1;
    // traditional PLB for comparison
    if (t_lb_valid && t_lb_laddr == a[31:6]) n_trad_hit++;
    else begin t_lb_valid = 1'b1; t_lb_laddr = a[31:6]; end
    n_fetch++;
    if (o.lb_hit) begin
      n_lb_hit++;
      if (r_predicted) n_useful++;
    end
    r_predicted = 0;
    if (o.lb_hit) begin
      if (o.itt_hit) begin
        n_hh++;
        if (r_valid[icla[7:2]][icla[1:0]]) begin
          r_lb_laddr = {r_tag[icla[7:2]][icla[1:0]], icla[7:2]};
          n_predict++; r_predicted = 1;
        end
      end else n_hm++;
    end else begin
      if (o.itt_hit) n_mh++; else n_mm++;
      w = -1;
      for (int k = 0; k < WAYS; k++) if (r_valid[s][k] && r_tag[s][k] == t) w = k;
      if (w < 0) begin
        o.cache_hit = 1'b0;
        n_cache_miss++;
        w = r_rr[s];
        if (r_valid[s][w]) n_repl++;
        r_valid[s][w] = 1'b1; r_tag[s][w] = t;
        r_rr[s] = (w + 1) % WAYS;
      end else n_cache_hit++;
      cla = {6'(s), 2'(w)};
      if (r_liar_valid) begin
        automatic logic [7:0] dummy;
        automatic int ls = int'(r_liar[3:2]);
        automatic int j = itt_find(r_liar, dummy);
        n_ins++;
        if (j >= 0) begin r_itt[ls][j].cla = cla; n_update++; end
        else begin
          if (r_itt[ls].size() == 2) begin void'(r_itt[ls].pop_front()); n_evict++; end
          r_itt[ls].push_back('{wa: r_liar[31:2], cla: cla});
        end
      end
      if (o.itt_hit) begin
        cla = icla;
        if (r_valid[cla[7:2]][cla[1:0]]) begin n_predict++; r_predicted = 1; end
      end
      if (r_valid[cla[7:2]][cla[1:0]]) begin
        r_lb_valid = 1'b1;
        r_lb_laddr = {r_tag[cla[7:2]][cla[1:0]], cla[7:2]};
      end
    end
    r_liar_valid = 1'b1; r_liar = a;
    return o;
  endfunction

  // ------------------------------------------------------------------
  // Monitor: acceptance, responses, event strobes
  // ------------------------------------------------------------------
  bit          outstanding = 0;
  outcome_t    cur;
  logic [31:0] cur_addr;
  longint      acc_cyc, fill_cyc, last_acc = -10;
  bit          mem_seen;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc++;
      if (resp_valid) begin
        check(outstanding, "response without a request");
        check(resp_instr == instr_at(cur_addr),
              $sformatf("instr %h for %h expected %h", resp_instr, cur_addr, instr_at(cur_addr)));
        if (cur.lb_hit)
          check(cyc - acc_cyc == 1, $sformatf("line buffer hit latency %0d", cyc - acc_cyc));
        else if (cur.cache_hit)
          check(cyc - acc_cyc == 2, $sformatf("cache hit latency %0d", cyc - acc_cyc));
        else begin
          check(mem_seen, "cache miss without a memory request");
          check(cyc - fill_cyc == 1, $sformatf("refill latency %0d", cyc - fill_cyc));
        end
        outstanding = 0;
      end
      if (mem_req_valid && mem_req_ready) begin
        check(outstanding && !cur.cache_hit, "memory request only on a predicted cache miss");
        check(mem_req_addr == {cur_addr[31:6], 6'b0}, "refill line address");
        mem_seen = 1;
      end
      if (mem_req_valid && !mem_req_ready) n_backpressure++;
      if (mem_rvalid) fill_cyc = cyc;
      if (ev_kit_insert) e_insert++;
      if (ev_itt_evict)  e_evict++;
      if (ev_itt_update) e_update++;
      if (ev_lb_predict) e_predict++;
      if (ev_cache_miss) e_cmiss++;
      if (req_valid && req_ready) begin
        check(!outstanding, "request accepted while one is outstanding");
        cur_addr = req_addr;
        cur = model_fetch(req_addr);
        check(ev_lb_hit == cur.lb_hit && ev_lb_miss == !cur.lb_hit,
              $sformatf("line buffer outcome for %h: %0d expected %0d", req_addr, ev_lb_hit, cur.lb_hit));
        check(ev_itt_hit == cur.itt_hit,
              $sformatf("ITT outcome for %h: %0d expected %0d", req_addr, ev_itt_hit, cur.itt_hit));
        if (exp_lb >= 0) begin
          n_directed++;
          check(ev_lb_hit == exp_lb[0],
                $sformatf("directed fetch %h: line buffer hit %0d expected %0d", req_addr, ev_lb_hit, exp_lb));
        end
        if (acc_cyc == cyc - 1) n_b2b++;
        acc_cyc = cyc;
        outstanding = 1;
        mem_seen = 0;
      end else begin
        check(!(ev_lb_hit || ev_lb_miss || ev_itt_hit), "lookup strobe without a request");
      end
    end
  end

  // ------------------------------------------------------------------
  // Behavioural memory: random back-pressure and latency, one-beat lines
  // ------------------------------------------------------------------
  bit          mem_pending = 0;
  int          mem_cnt;
  logic [31:0] mem_line_addr;

  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      mem_pending   = 1;
      mem_line_addr = mem_req_addr;
      mem_cnt       = $urandom_range(6, 1);
      n_mem++;
    end
  end

  always @(negedge clk) begin
    mem_req_ready = ($urandom_range(3) != 0);
    if (mem_rvalid) mem_rvalid = 1'b0;
    else if (mem_pending) begin
      if (mem_cnt == 0) begin
        mem_rvalid  = 1'b1;
        mem_rdata   = line_at(mem_line_addr);
        mem_pending = 0;
      end else mem_cnt--;
    end
  end

  // ------------------------------------------------------------------
  // Fetch driver: synthetic loop programs (the last one thrashes one cache set)
  // ------------------------------------------------------------------
  localparam int PROGS = 6, BLOCKS = 6, ITERS = 40, ROUNDS = 2;
  logic [31:0] blk_start [PROGS][BLOCKS];
  int          blk_len   [PROGS][BLOCKS];

  int exp_lb = -1;   // expected line buffer outcome of the directed fetches
  int n_directed = 0;

  task automatic fetch(input logic [31:0] a);
    if ($urandom_range(49) == 0) begin
      req_valid = 1'b0;
      repeat ($urandom_range(3, 1)) @(negedge clk);
    end
    req_valid = 1'b1;
    req_addr  = a;
    @(posedge clk);
    while (!req_ready) @(posedge clk);
    @(negedge clk);
  endtask

  initial begin
    req_valid = 1'b0; req_addr = '0; mem_rvalid = 1'b0; mem_rdata = '0; mem_req_ready = 1'b0;
    r_lb_valid = 0; r_liar_valid = 0; t_lb_valid = 0; r_predicted = 0;
    acc_cyc = -10; fill_cyc = -10;
    for (int s = 0; s < SETS; s++) begin
      r_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) r_valid[s][w] = 1'b0;
    end
    for (int p = 0; p < PROGS; p++)
      for (int b = 0; b < BLOCKS; b++) begin
        blk_start[p][b] = {16'h0, 14'($urandom_range(16383)), 2'b00};
        blk_len[p][b]   = $urandom_range(24, 3);
        // the last program's blocks all fall into one cache set, more blocks than ways
        if (p == PROGS - 1) blk_start[p][b] = 32'(4096 * b + 16'h0740);
      end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    // Directed: instructions 1..16 fill line 0 and 17..32 line 1 (instruction
    // n at base + 4*(n-1)).  A loop runs 1..13, jumps to 18, runs to 20 and
    // jumps back to 1.  First pass: 18 misses and the KIT 13 -> line 1 is
    // recorded.  Second pass: 1 misses (buffer holds line 1, KIT 20 -> line 0
    // recorded); fetching 13 preloads line 1, so 18 hits.  Third pass: the KIT
    // at 20 preloaded line 0, so 1 hits as well.
    for (int pass = 0; pass < 3; pass++) begin
      for (int n = 1; n <= 20; n++) begin
        if (n > 13 && n < 18) continue;
        if (n == 1)       exp_lb = (pass == 2) ? 1 : 0;
        else if (n == 18) exp_lb = (pass == 0) ? 0 : 1;
        else              exp_lb = 1;
        fetch(32'h0001_0000 + 32'(4 * (n - 1)));
      end
    end
    // Line buffer miss with an ITT hit: leave for another line, then enter
    // the loop at 13.  13 misses the buffer, the KIT 13 -> line 1 loads line 1
    // instead of line 0, and 18 hits.
    exp_lb = 0; fetch(32'h0002_0000);
    exp_lb = 0; fetch(32'h0001_0000 + 32'(4 * 12));
    exp_lb = 1; fetch(32'h0001_0000 + 32'(4 * 17));
    exp_lb = -1;
    for (int r = 0; r < ROUNDS; r++)
      for (int p = 0; p < PROGS; p++)
        for (int it = 0; it < ITERS; it++)
          for (int b = 0; b < BLOCKS; b++) begin
            if (b != 0 && $urandom_range(9) == 0) continue;   // diverging branch
            for (int i = 0; i < blk_len[p][b]; i++)
              fetch(blk_start[p][b] + 32'(4 * i));
          end
    req_valid = 1'b0;
    repeat (20) @(negedge clk);
    check(!outstanding, "last response arrived");

    // event strobes against the model
    check(e_insert == n_ins,   $sformatf("KIT writes %0d expected %0d", e_insert, n_ins));
    check(e_evict == n_evict,  $sformatf("ITT evictions %0d expected %0d", e_evict, n_evict));
    check(e_update == n_update, $sformatf("ITT rewrites %0d expected %0d", e_update, n_update));
    check(e_predict == n_predict, $sformatf("predicted loads %0d expected %0d", e_predict, n_predict));
    check(e_cmiss == n_cache_miss && n_mem == n_cache_miss, "cache misses and memory requests");

    $display("fetches=%0d  LB hit/ITT hit=%0d  LB hit/ITT miss=%0d  LB miss/ITT hit=%0d  LB miss/ITT miss=%0d",
             n_fetch, n_hh, n_hm, n_mh, n_mm);
    $display("cache hits=%0d misses=%0d replacements=%0d  KIT writes=%0d evictions=%0d rewrites=%0d",
             n_cache_hit, n_cache_miss, n_repl, n_ins, n_evict, n_update);
    $display("predicted loads=%0d useful=%0d  memory back-pressure cycles=%0d  back-to-back fetches=%0d",
             n_predict, n_useful, n_backpressure, n_b2b);
    $display("line buffer hit ratio: KITPS %0d/%0d, traditional %0d/%0d",
             n_lb_hit, n_fetch, n_trad_hit, n_fetch);

    check(n_directed == 51, "directed loop fetches all seen");
    check(n_hh > 0, "case LB hit / ITT hit happened");
    check(n_hm > 0, "case LB hit / ITT miss happened");
    check(n_mh > 0, "case LB miss / ITT hit happened");
    check(n_mm > 0, "case LB miss / ITT miss happened");
    check(n_cache_hit > 0, "cache hit after line buffer miss happened");
    check(n_cache_miss > 0, "cache refill happened");
    check(n_repl > 0, "cache line replacement happened");
    check(n_ins > 0, "KIT write happened");
    check(n_evict > 0, "ITT FIFO eviction happened");
    check(n_update > 0, "ITT rewrite happened");
    check(n_useful > 0, "useful prediction happened");
    check(n_backpressure > 0, "memory back-pressure happened");
    check(n_b2b > 0, "back-to-back fetches happened");
    check(n_lb_hit > n_trad_hit, "prediction raises the line buffer hit count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
