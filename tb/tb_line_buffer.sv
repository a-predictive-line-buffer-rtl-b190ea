// tb_line_buffer: self-checking testbench of the one-line instruction buffer.
// Loads random 64-byte lines at random line addresses and looks up addresses
// inside and outside the held line.  A hit must return exactly the addressed
// 32-bit word; an address of another line must miss; nothing hits after
// reset.
module tb_line_buffer;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [31:0]  addr;
  logic         hit;
  logic [31:0]  instr;
  logic         ld;
  logic [25:0]  ld_laddr;
  logic [511:0] ld_line;
  logic         vld;
  logic [25:0]  laddr;

  line_buffer dut (
    .clk, .rst_n, .addr_i(addr), .hit_o(hit), .instr_o(instr),
    .load_i(ld), .load_laddr_i(ld_laddr), .load_line_i(ld_line),
    .valid_o(vld), .laddr_o(laddr)
  );

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [25:0]  m_laddr;
  logic [31:0]  m_word [16];

  initial begin
    ld = 1'b0; addr = '0; ld_laddr = '0; ld_line = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    addr = 32'h0; #1;
    check(!hit, "miss after reset");
    for (int n = 0; n < 40; n++) begin
      // load a new line
      m_laddr = 26'($urandom());
      for (int w = 0; w < 16; w++) begin
        m_word[w] = $urandom();
        ld_line[w*32 +: 32] = m_word[w];
      end
      ld_laddr = m_laddr; ld = 1'b1;
      @(negedge clk);
      ld = 1'b0;
      check(vld && laddr == m_laddr, "line address held");
      for (int k = 0; k < 20; k++) begin
        automatic int unsigned w = $urandom_range(15);
        automatic bit inside_line = ($urandom_range(1) == 1);
        automatic logic [25:0] la = inside_line ? m_laddr : m_laddr ^ 26'($urandom_range(1, 2**20));
        addr = {la, 4'(w), 2'($urandom_range(3))};
        #1;
        check(hit == inside_line, $sformatf("hit=%0d expected %0d", hit, inside_line));
        if (inside_line)
          check(instr == m_word[w], $sformatf("word %0d got %h expected %h", w, instr, m_word[w]));
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
