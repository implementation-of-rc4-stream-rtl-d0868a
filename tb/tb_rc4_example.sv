// tb_rc4_example: the 4-entry hand-worked RC4 example, followed step by step.
// A core with N = 4 is keyed with K = [1, 7, 1, 7]; after each clock of the
// key-setup phase the state array must match the hand calculation:
//   [1,0,2,3]  [0,1,2,3]  [0,1,3,2]  [2,1,3,0]
// Then "H" and "I" are encrypted; the keystream values are 3 and 1, the state
// after each step is [2,1,3,0] and [3,1,2,0], and the ciphertext is 0x4B 0x48.
// Finally the core is keyed again and the ciphertext decrypts to "HI".
module tb_rc4_example;
  logic clk = 1'b0, rst_n = 1'b0;
  logic key_we, key_start, key_busy, din_valid, din_ready, dout_valid;
  logic [6:0] key_waddr;
  logic [7:0] key_wdata, key_len, din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_top #(.N(4)) dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_s(string what, logic [1:0] e0, logic [1:0] e1, logic [1:0] e2, logic [1:0] e3);
    checks++;
    if (dut.u_sbox.s[0] !== e0 || dut.u_sbox.s[1] !== e1 || dut.u_sbox.s[2] !== e2 || dut.u_sbox.s[3] !== e3) begin
      failures++;
      $display("%s: S = [%0d,%0d,%0d,%0d], expected [%0d,%0d,%0d,%0d]", what,
               dut.u_sbox.s[0], dut.u_sbox.s[1], dut.u_sbox.s[2], dut.u_sbox.s[3], e0, e1, e2, e3);
    end
  endtask

  task automatic key_setup(bit trace);
    @(negedge clk);
    key_start = 1'b1; key_len = 8'd4;
    @(negedge clk);              // INIT cycle: S is being loaded
    key_start = 1'b0;
    @(negedge clk);              // first MIX cycle, S = identity
    if (trace) check_s("after init", 0, 1, 2, 3);
    @(negedge clk); if (trace) check_s("iteration 1", 1, 0, 2, 3);
    @(negedge clk); if (trace) check_s("iteration 2", 0, 1, 2, 3);
    @(negedge clk); if (trace) check_s("iteration 3", 0, 1, 3, 2);
    @(negedge clk); if (trace) check_s("iteration 4", 2, 1, 3, 0);
    @(negedge clk);
    checks++;
    if (!din_ready) begin failures++; $display("not ready N + 3 cycles after key_start"); end
  endtask

  task automatic send(logic [7:0] b, logic [7:0] exp_out);
    din_valid = 1'b1; din = b;
    @(negedge clk);
    din_valid = 1'b0;
    checks++;
    if (!dout_valid || dout !== exp_out) begin
      failures++; $display("byte %h: out %h (valid %0d), expected %h", b, dout, dout_valid, exp_out);
    end
  endtask

  initial begin
    automatic logic [7:0] key[4] = '{8'd1, 8'd7, 8'd1, 8'd7};
    key_we = 0; key_start = 0; key_waddr = 0; key_wdata = 0; key_len = 0;
    din_valid = 0; din = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (key[a]) begin
      @(negedge clk);
      key_we = 1'b1; key_waddr = 7'(a); key_wdata = key[a];
    end
    @(negedge clk);
    key_we = 1'b0;
    key_setup(1'b1);
    // encryption of "HI"
    send(8'h48, 8'h4B);
    check_s("after 'H'", 2, 1, 3, 0);
    send(8'h49, 8'h48);
    check_s("after 'I'", 3, 1, 2, 0);
    // decryption with the same key
    key_setup(1'b0);
    send(8'h4B, 8'h48);
    send(8'h48, 8'h49);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
