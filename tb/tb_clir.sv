// tb_clir: self-checking testbench of the Cache Line Index Register.
// Drives every one-hot wordline vector of a 4-way and an 8-way instance,
// checks the combinational encoding and that the register loads only when
// load_i is high and keeps its value otherwise.
module tb_clir;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic [3:0] wl4;  logic ld4;  logic [1:0] enc4, q4;
  logic [7:0] wl8;  logic ld8;  logic [2:0] enc8, q8;

  clir #(.WAYS(4)) dut4 (.clk, .rst_n, .wl_i(wl4), .load_i(ld4), .enc_o(enc4), .clir_o(q4));
  clir #(.WAYS(8)) dut8 (.clk, .rst_n, .wl_i(wl8), .load_i(ld8), .enc_o(enc8), .clir_o(q8));

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
    wl4 = 4'b0001; ld4 = 1'b0; wl8 = 8'b1; ld8 = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(q4 == 2'd0 && q8 == 3'd0, "reset value");
    // every way, loaded
    for (int w = 0; w < 8; w++) begin
      wl8 = 8'(1 << w); ld8 = 1'b1;
      wl4 = 4'(1 << (w % 4)); ld4 = 1'b1;
      #1;
      check(enc8 == 3'(w), $sformatf("enc8 way %0d got %0d", w, enc8));
      check(enc4 == 2'(w % 4), $sformatf("enc4 way %0d got %0d", w % 4, enc4));
      @(negedge clk);
      check(q8 == 3'(w), $sformatf("clir8 way %0d got %0d", w, q8));
      check(q4 == 2'(w % 4), $sformatf("clir4 way %0d got %0d", w % 4, q4));
    end
    // hold when not loaded
    for (int i = 0; i < 20; i++) begin
      automatic int unsigned w = $urandom_range(7);
      automatic logic [2:0] prev8 = q8;
      automatic logic [1:0] prev4 = q4;
      automatic bit l = $urandom_range(1) == 1;
      wl8 = 8'(1 << w); ld8 = l;
      wl4 = 4'(1 << (w % 4)); ld4 = l;
      @(negedge clk);
      check(q8 == (l ? 3'(w) : prev8), "clir8 load/hold");
      check(q4 == (l ? 2'(w % 4) : prev4), "clir4 load/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
