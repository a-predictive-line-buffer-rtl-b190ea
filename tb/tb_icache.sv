// tb_icache: self-checking testbench of the 4-way set associative
// instruction cache (16 KB, 64-byte lines).  A reference model tracks the tag,
// valid bit and data of every way plus a round-robin victim pointer per set.
// Random fetch addresses over a few sets and many tags force hits, misses
// and replacements; every miss is refilled.  Checked: hit flag, the one-hot
// wordline of the hitting way, the hit line data, the victim wordline, and
// the direct read by cache line address {set, way}.
module tb_icache;
  localparam int SETS = 64, WAYS = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [31:0]  addr;
  logic         hit;
  logic [3:0]   wl, vwl;
  logic [511:0] hline, fline, cline;
  logic         fill;
  logic [7:0]   cla;
  logic         cvalid;
  logic [25:0]  claddr;

  icache dut (
    .clk, .rst_n, .addr_i(addr), .hit_o(hit), .wl_o(wl), .hit_line_o(hline),
    .victim_wl_o(vwl), .fill_i(fill), .fill_line_i(fline), .cla_i(cla),
    .cla_valid_o(cvalid), .cla_laddr_o(claddr), .cla_line_o(cline)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [19:0]  m_tag   [SETS][WAYS];
  logic         m_valid [SETS][WAYS];
  logic [511:0] m_data  [SETS][WAYS];
  int           m_rr    [SETS];
  int n_hit = 0, n_miss = 0, n_repl = 0;

  function automatic logic [511:0] rand_line();
    logic [511:0] l;
    for (int i = 0; i < 16; i++) l[i*32 +: 32] = $urandom();
    return l;
  endfunction

  initial begin
    fill = 1'b0; addr = '0; cla = '0; fline = '0;
    for (int s = 0; s < SETS; s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < WAYS; w++) m_valid[s][w] = 1'b0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int n = 0; n < 4000; n++) begin
      automatic int s  = $urandom_range(3) * 17;   // four sets in use
      automatic logic [19:0] t = 20'($urandom_range(6));
      automatic int hw = -1;
      addr = {t, 6'(s), 6'($urandom_range(63))};
      cla  = {6'($urandom_range(3) * 17), 2'($urandom_range(3))};
      #1;
      for (int w = 0; w < WAYS; w++) if (m_valid[s][w] && m_tag[s][w] == t) hw = w;
      check(hit == (hw >= 0), $sformatf("hit=%0d expected %0d for %h", hit, hw >= 0, addr));
      if (hw >= 0) begin
        n_hit++;
        check(wl == 4'(1 << hw), $sformatf("wordline %b expected way %0d", wl, hw));
        check(hline == m_data[s][hw], "hit line data");
      end else begin
        check(wl == 4'b0, "no wordline on a miss");
        check(vwl == 4'(1 << m_rr[s]), $sformatf("victim %b expected way %0d", vwl, m_rr[s]));
      end
      // direct read by CLA
      begin
        automatic int cs = int'(cla[7:2]), cw = int'(cla[1:0]);
        check(cvalid == m_valid[cs][cw], "CLA valid");
        if (m_valid[cs][cw]) begin
          check(claddr == {m_tag[cs][cw], 6'(cs)}, "CLA line address");
          check(cline == m_data[cs][cw], "CLA line data");
        end
      end
      if (hw < 0) begin
        automatic int v = m_rr[s];
        fline = rand_line();
        fill = 1'b1;
        if (m_valid[s][v]) n_repl++;
        m_valid[s][v] = 1'b1; m_tag[s][v] = t; m_data[s][v] = fline;
        m_rr[s] = (v + 1) % WAYS;
        n_miss++;
      end
      @(negedge clk);
      fill = 1'b0;
    end
    check(n_hit > 100 && n_miss > 100 && n_repl > 50, "hits, misses and replacements exercised");
    $display("hits=%0d misses=%0d replacements=%0d", n_hit, n_miss, n_repl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
