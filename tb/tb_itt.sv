// tb_itt: self-checking testbench of the Instruction Trace Table.
// A reference model (two ways per set, older entry replaced first, an existing
// start address rewritten in place) is kept beside the table.  Directed steps
// fill one set beyond its two ways and check that the oldest KIT is the one
// discarded; a random phase then mixes inserts and lookups over a small
// address range so that hits, evictions and rewrites all occur.
module tb_itt;
  localparam int N = 8;
  localparam int SETS = N / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [31:0] lk_addr, in_start;
  logic        hit, ins, evict, update;
  logic [7:0]  hit_cla, in_cla;

  itt #(.ENTRIES(N)) dut (
    .clk, .rst_n, .lookup_addr_i(lk_addr), .hit_o(hit), .hit_cla_o(hit_cla),
    .ins_i(ins), .ins_start_i(in_start), .ins_cla_i(in_cla),
    .ins_evict_o(evict), .ins_update_o(update)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: per set, a queue of {word address, cla}, oldest first
  typedef struct { logic [29:0] wa; logic [7:0] cla; } kit_t;
  kit_t ref_q [SETS][$];
  int n_evict = 0, n_update = 0, n_hit = 0;

  function automatic int ref_find(input logic [31:0] a, output logic [7:0] cla);
    int s = int'(a[2 +: 2]);
    foreach (ref_q[s][i]) if (ref_q[s][i].wa == a[31:2]) begin cla = ref_q[s][i].cla; return i; end
    cla = '0;
    return -1;
  endfunction

  task automatic do_lookup(input logic [31:0] a);
    logic [7:0] c;
    int i;
    lk_addr = a; #1;
    i = ref_find(a, c);
    check(hit == (i >= 0), $sformatf("lookup %h hit=%0d expected %0d", a, hit, i >= 0));
    if (i >= 0) begin
      n_hit++;
      check(hit_cla == c, $sformatf("lookup %h cla %h expected %h", a, hit_cla, c));
    end
  endtask

  task automatic do_insert(input logic [31:0] a, input logic [7:0] cla);
    logic [7:0] c;
    int i, s;
    s = int'(a[2 +: 2]);
    in_start = a; in_cla = cla; ins = 1'b1; #1;
    i = ref_find(a, c);
    check(update == (i >= 0), "update flag");
    check(evict == (i < 0 && ref_q[s].size() == 2), "evict flag");
    if (i >= 0) begin
      ref_q[s][i].cla = cla; n_update++;
    end else begin
      if (ref_q[s].size() == 2) begin void'(ref_q[s].pop_front()); n_evict++; end
      ref_q[s].push_back('{wa: a[31:2], cla: cla});
    end
    @(negedge clk);
    ins = 1'b0;
  endtask

  initial begin
    ins = 1'b0; lk_addr = '0; in_start = '0; in_cla = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    do_lookup(32'h0000_1000);
    // directed: three KITs into set 1, the first is discarded
    do_insert(32'h0000_1004, 8'h11);
    do_insert(32'h0000_2004, 8'h22);
    do_lookup(32'h0000_1004);
    do_lookup(32'h0000_2004);
    do_insert(32'h0000_3004, 8'h33);
    do_lookup(32'h0000_1004);
    check(!hit, "oldest KIT discarded");
    do_lookup(32'h0000_2004);
    do_lookup(32'h0000_3004);
    // rewrite in place keeps both KITs
    do_insert(32'h0000_2004, 8'h44);
    do_lookup(32'h0000_2004);
    check(hit && hit_cla == 8'h44, "rewritten CLA");
    do_lookup(32'h0000_3004);
    // random
    for (int n = 0; n < 3000; n++) begin
      automatic logic [31:0] a = {24'h0, 6'($urandom_range(63)), 2'b00};
      if ($urandom_range(2) == 0) do_insert(a, 8'($urandom()));
      else begin do_lookup(a); @(negedge clk); end
    end
    check(n_evict > 10 && n_update > 10 && n_hit > 100, "all ITT mechanisms exercised");
    $display("evictions=%0d rewrites=%0d hits=%0d", n_evict, n_update, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
