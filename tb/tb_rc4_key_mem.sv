// tb_rc4_key_mem: writes random keys into the key memory and reads them back
// through the read port, against a shadow copy kept in the testbench; also
// checks that reset clears every byte and that idle cycles change nothing.
module tb_rc4_key_mem;
  localparam int unsigned KEY_MAX = 128;
  logic clk = 1'b0, rst_n = 1'b0;
  logic we;
  logic [6:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [KEY_MAX];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_key_mem dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_all(string what);
    for (int a = 0; a < KEY_MAX; a++) begin
      raddr = 7'(a);
      #1;
      checks++;
      if (rdata !== shadow[a]) begin
        failures++; $display("%s: key[%0d] = %h expected %h", what, a, rdata, shadow[a]);
      end
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; wdata = '0; raddr = '0;
    foreach (shadow[a]) shadow[a] = 8'h00;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    read_all("after reset");
    for (int round = 0; round < 4; round++) begin
      for (int n = 0; n < 200; n++) begin
        @(negedge clk);
        we = ($urandom_range(0, 3) != 0);
        waddr = 7'($urandom);
        wdata = 8'($urandom);
        if (we) shadow[waddr] = wdata;
      end
      @(negedge clk);
      we = 1'b0;
      @(negedge clk);
      read_all("after writes");
    end
    rst_n = 1'b0;
    foreach (shadow[a]) shadow[a] = 8'h00;
    @(negedge clk);
    rst_n = 1'b1;
    read_all("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
