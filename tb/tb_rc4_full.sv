// tb_rc4_full: one complete operation of the core at its default size
// (128-entry state array, keys up to 128 bytes): load a 16-byte key, run key
// setup, encrypt a 512-byte message at one byte per clock, compare it with the
// software model, then key again and decrypt the ciphertext back to the
// message. Also checks the key-setup time (N + 3 cycles to din_ready) and the
// streaming rate (one byte per clock).
module tb_rc4_full;
  import rc4_ref_pkg::*;

  localparam int unsigned N = rc4_pkg::RC4_N;
  localparam int unsigned MSG_LEN = 512;
  localparam int unsigned KEY_LEN = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic key_we, key_start, key_busy, din_valid, din_ready, dout_valid;
  logic [6:0] key_waddr;
  logic [7:0] key_wdata, key_len, din, dout;
  byte unsigned outq[$];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rc4_top dut (.*);

  always @(posedge clk) if (rst_n && dout_valid) outq.push_back(dout);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_key(bytes_t key);
    int cycles;
    foreach (key[a]) begin
      @(negedge clk);
      key_we = 1'b1; key_waddr = 7'(a); key_wdata = key[a];
    end
    @(negedge clk);
    key_we = 1'b0; key_start = 1'b1; key_len = 8'(key.size());
    @(negedge clk);
    key_start = 1'b0;
    cycles = 1;
    while (!din_ready && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (cycles != int'(N) + 3) begin
      failures++; $display("key setup took %0d cycles, expected %0d", cycles, N + 3);
    end
  endtask

  task automatic run_data(bytes_t data, output bytes_t res);
    int cycles;
    outq.delete();
    cycles = 0;
    foreach (data[n]) begin
      din_valid = 1'b1; din = data[n];
      @(negedge clk);
      cycles++;
    end
    din_valid = 1'b0;
    @(negedge clk);
    checks++;
    if (cycles != data.size() || outq.size() != data.size()) begin
      failures++; $display("%0d bytes in, %0d out, %0d cycles", data.size(), outq.size(), cycles);
    end
    res = new[outq.size()];
    foreach (res[n]) res[n] = outq[n];
  endtask

  initial begin
    rc4_model m;
    bytes_t key, msg, exp_c, c, d;
    int bad;

    key_we = 0; key_start = 0; key_waddr = 0; key_wdata = 0; key_len = 0;
    din_valid = 0; din = 0;
    m = new(N);
    key = new[KEY_LEN];
    foreach (key[a]) key[a] = 8'($urandom);
    msg = new[MSG_LEN];
    foreach (msg[n]) msg[n] = 8'($urandom);
    m.schedule(key, KEY_LEN);
    exp_c = new[MSG_LEN];
    foreach (msg[n]) exp_c[n] = msg[n] ^ m.next();

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    run_key(key);
    run_data(msg, c);
    bad = 0;
    foreach (exp_c[n]) if (n < c.size() && c[n] !== exp_c[n]) bad++;
    checks++;
    if (bad != 0 || c.size() != exp_c.size()) begin failures++; $display("ciphertext: %0d bytes differ", bad); end

    run_key(key);
    run_data(c, d);
    bad = 0;
    foreach (msg[n]) if (n < d.size() && d[n] !== msg[n]) bad++;
    checks++;
    if (bad != 0 || d.size() != msg.size()) begin failures++; $display("decrypted text: %0d bytes differ", bad); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
