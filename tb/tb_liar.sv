// tb_liar: self-checking testbench of the Last Instruction Address Register.
// Checks the reset state, that a load captures the address and sets the valid
// flag, and that the register holds while load_i is low.
module tb_liar;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        ld;
  logic [31:0] din, q;
  logic        vld;

  liar dut (.clk, .rst_n, .load_i(ld), .addr_i(din), .addr_o(q), .valid_o(vld));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] expect_q;
    ld = 1'b0; din = 32'h1234_5678;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!vld, "not valid after reset");
    @(negedge clk);
    check(!vld, "still not valid without a load");
    expect_q = 32'h0;
    for (int i = 0; i < 100; i++) begin
      ld  = ($urandom_range(2) != 0);
      din = $urandom();
      if (ld) expect_q = din;
      @(negedge clk);
      if (i == 0 && !ld) begin
        check(!vld, "no valid before first load");
      end else if (ld || i > 0) begin
        check(q == expect_q, $sformatf("addr %h expected %h", q, expect_q));
      end
    end
    check(vld, "valid after loads");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
