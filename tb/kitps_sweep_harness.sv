// kitps_sweep_harness: one predictive line buffer cache, its fetch driver and
// a behavioural memory, for comparing table sizes on the same trace.
//
// The fetch trace is made by a fixed linear congruential generator, so every
// instance of the harness plays exactly the same fetch sequence whatever its
// timing: four loop programs of 3, 6, 9 and 12 basic blocks (the larger ones
// have more key instruction traces per loop than a small table holds), with
// a block skipped now and then.  The
// memory answers a refill 3 cycles after the request.  Every returned word is
// compared with the fixed function of its address, and the latency with the
// line buffer outcome (1 cycle on a hit).  For ITT_SIZE = 0 the line buffer
// outcome of every fetch is also compared with a model of a plain line buffer
// that holds the line of the last miss.
module kitps_sweep_harness #(
  parameter int unsigned ITT_SIZE = 8
) (
  input  logic clk,
  input  logic rst_n,
  output bit   done,
  output int   fetches,
  output int   lb_hits,
  output int   predicts,
  output int   checks,
  output int   failures
);
  localparam int PROGS = 4, BLOCKS = 12, ITERS = 30;

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

  plb_kitps_cache #(.P_ITT_SIZE(ITT_SIZE)) dut (
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

  function automatic logic [31:0] instr_at(input logic [31:0] a);
    return (a[31:2] * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  // fixed pseudo-random sequence, identical in every instance
  logic [31:0] lcg = 32'd12345;
  function automatic int unsigned next_rand(inout logic [31:0] st, input int unsigned range);
    st = st * 32'd1103515245 + 32'd12345;
    return int'(st[30:16]) % range;
  endfunction

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL (ITT %0d): %s", ITT_SIZE, what);
    end
  endtask

  // monitor
  bit          outstanding = 0, cur_hit;
  logic [31:0] cur_addr;
  int          cyc = 0, acc_cyc = 0;
  bit          t_valid = 0;
  logic [25:0] t_laddr;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (resp_valid) begin
      check(outstanding, "response without a request");
      check(resp_instr == instr_at(cur_addr), $sformatf("instr for %h", cur_addr));
      if (cur_hit) check(cyc - acc_cyc == 1, "line buffer hit latency");
      outstanding = 0;
    end
    if (ev_lb_predict) predicts++;
    if (req_valid && req_ready) begin
      automatic bit t_hit = t_valid && t_laddr == req_addr[31:6];
      fetches++;
      if (ev_lb_hit) lb_hits++;
      if (ITT_SIZE == 0) check(ev_lb_hit == t_hit, "plain line buffer outcome");
      if (!t_hit) begin t_valid = 1; t_laddr = req_addr[31:6]; end
      cur_addr = req_addr; cur_hit = ev_lb_hit; acc_cyc = cyc; outstanding = 1;
    end
  end

  // memory: always ready, line 3 cycles after the request
  int          mem_cnt = -1;
  logic [31:0] mem_line_addr;
  always @(posedge clk) begin
    if (rst_n && mem_req_valid && mem_req_ready) begin
      mem_line_addr = mem_req_addr;
      mem_cnt = 3;
    end
  end
  always @(negedge clk) begin
    mem_rvalid = 1'b0;
    if (mem_cnt > 0) mem_cnt--;
    if (mem_cnt == 0) begin
      mem_rvalid = 1'b1;
      for (int w = 0; w < 16; w++) mem_rdata[w*32 +: 32] = instr_at({mem_line_addr[31:6], 4'(w), 2'b00});
      mem_cnt = -1;
    end
  end
  assign mem_req_ready = 1'b1;

  // driver
  logic [31:0] blk_start [PROGS][BLOCKS];
  int          blk_len   [PROGS][BLOCKS];

  initial begin
    done = 0; fetches = 0; lb_hits = 0; predicts = 0; checks = 0; failures = 0;
    req_valid = 1'b0; req_addr = '0; mem_rvalid = 1'b0; mem_rdata = '0;
    for (int p = 0; p < PROGS; p++)
      for (int b = 0; b < BLOCKS; b++) begin
        blk_start[p][b] = {16'h0, 14'(next_rand(lcg, 16384)), 2'b00};
        blk_len[p][b]   = 2 + int'(next_rand(lcg, 11));
      end
    @(posedge rst_n);
    @(negedge clk);
    for (int p = 0; p < PROGS; p++)
      for (int it = 0; it < ITERS; it++)
        for (int b = 0; b < 3 * (p + 1); b++) begin
          if (b != 0 && next_rand(lcg, 16) == 0) continue;
          for (int i = 0; i < blk_len[p][b]; i++) begin
            req_valid = 1'b1;
            req_addr  = blk_start[p][b] + 32'(4 * i);
            @(posedge clk);
            while (!req_ready) @(posedge clk);
            @(negedge clk);
          end
        end
    req_valid = 1'b0;
    repeat (10) @(negedge clk);
    check(!outstanding, "last response arrived");
    done = 1;
  end
endmodule
