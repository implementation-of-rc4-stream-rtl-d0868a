// tb_rc4_xor: checks the combiner against a direct XOR, including that the
// result appears one cycle after the input, holds while in_valid is low, and
// that applying the same keystream byte twice returns the original byte.
module tb_rc4_xor;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [7:0] in_data, ks, out_data;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_xor dut (.*);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_data, a, k;
    in_valid = 1'b0; in_data = '0; ks = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++; if (out_valid !== 1'b0 || out_data !== 8'h00) begin failures++; $display("reset state wrong"); end
    // paper-style example bytes: 'H' ^ 3 = 0x4B, 'I' ^ 1 = 0x48
    for (int n = 0; n < 300; n++) begin
      if (n == 0)      begin a = 8'h48; k = 8'h03; end
      else if (n == 1) begin a = 8'h49; k = 8'h01; end
      else             begin a = 8'($urandom); k = 8'($urandom); end
      in_valid = 1'b1; in_data = a; ks = k;
      @(negedge clk);
      exp_data = (n == 0) ? 8'h4B : (n == 1) ? 8'h48 : (a ^ k);
      checks++;
      if (out_valid !== 1'b1 || out_data !== exp_data) begin
        failures++; $display("byte %0d: got %h expected %h", n, out_data, exp_data);
      end
      // decrypt: feed the result back with the same keystream byte
      in_data = out_data;
      @(negedge clk);
      checks++;
      if (out_data !== a) begin failures++; $display("round trip %0d: got %h expected %h", n, out_data, a); end
      // idle cycle: valid drops, data holds
      in_valid = 1'b0; in_data = 8'($urandom);
      @(negedge clk);
      checks++;
      if (out_valid !== 1'b0 || out_data !== a) begin failures++; $display("idle %0d wrong", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
