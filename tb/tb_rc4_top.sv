// tb_rc4_top: end-to-end test of the RC4 core, three instances side by side.
//   inst 0, N = 4:    the hand-worked example, key [1,7,1,7], "HI" must
//                     encrypt to 0x4B 0x48 and decrypt back.
//   inst 1, N = 256:  classic byte-wide RC4 against published test vectors
//                     ("Key"/"Plaintext", "Wiki"/"pedia", "Secret"/"Attack at dawn").
//   inst 2, N = 128:  the default size against the software model, with
//                     random keys of lengths 1..128, back-to-back bytes,
//                     idle gaps, input offered during key setup (must be
//                     ignored), re-keying in the middle of a stream and
//                     decryption of every ciphertext with a fresh key setup.
// Each of those situations is counted and must occur at least once. The
// cycle counts are checked too: key setup takes N + 3 cycles from the
// key_start cycle to the first cycle with din_ready, and a run of bytes with
// din_valid held high moves one byte per clock.
module tb_rc4_top;
  import rc4_ref_pkg::*;

  localparam int NI = 3;
  localparam int unsigned NS [NI] = '{4, 256, 128};

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic       key_we [NI], key_start [NI], key_busy [NI];
  logic [6:0] key_waddr [NI];
  logic [7:0] key_wdata [NI], key_len [NI];
  logic       din_valid [NI], din_ready [NI], dout_valid [NI];
  logic [7:0] din [NI], dout [NI];
  byte unsigned outq [NI][$];

  rc4_top #(.N(4)) u_n4 (.clk, .rst_n,
    .key_we(key_we[0]), .key_waddr(key_waddr[0]), .key_wdata(key_wdata[0]),
    .key_len(key_len[0]), .key_start(key_start[0]), .key_busy(key_busy[0]),
    .din_valid(din_valid[0]), .din(din[0]), .din_ready(din_ready[0]),
    .dout_valid(dout_valid[0]), .dout(dout[0]));
  rc4_top #(.N(256)) u_n256 (.clk, .rst_n,
    .key_we(key_we[1]), .key_waddr(key_waddr[1]), .key_wdata(key_wdata[1]),
    .key_len(key_len[1]), .key_start(key_start[1]), .key_busy(key_busy[1]),
    .din_valid(din_valid[1]), .din(din[1]), .din_ready(din_ready[1]),
    .dout_valid(dout_valid[1]), .dout(dout[1]));
  rc4_top u_n128 (.clk, .rst_n,
    .key_we(key_we[2]), .key_waddr(key_waddr[2]), .key_wdata(key_wdata[2]),
    .key_len(key_len[2]), .key_start(key_start[2]), .key_busy(key_busy[2]),
    .din_valid(din_valid[2]), .din(din[2]), .din_ready(din_ready[2]),
    .dout_valid(dout_valid[2]), .dout(dout[2]));

  for (genvar g = 0; g < NI; g++) begin : g_mon
    always @(posedge clk) if (rst_n && dout_valid[g]) outq[g].push_back(dout[g]);
  end

  // mechanism counters (default-size instance)
  int n_keysetup = 0, n_b2b = 0, n_gap = 0, n_ignored = 0, n_rekey = 0;
  int n_wrap = 0, n_fullkey = 0, n_len1 = 0, n_decrypt = 0;
  logic prev_fire, prev_ready;
  always @(posedge clk) begin
    if (rst_n) begin
      if (din_valid[2] && din_ready[2] && prev_fire) n_b2b++;
      if (!din_valid[2] && din_ready[2]) n_gap++;
      if (din_valid[2] && !din_ready[2]) n_ignored++;
      if (key_start[2] && prev_ready) n_rekey++;
    end
    prev_fire  <= din_valid[2] && din_ready[2];
    prev_ready <= din_ready[2];
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Write the key and run key setup; checks the setup time. If offer_data is
  // set, din_valid is held high during key setup (nothing may be accepted).
  task automatic load_key(int idx, byte unsigned key[], bit offer_data);
    int cycles;
    foreach (key[a]) begin
      @(negedge clk);
      key_we[idx] = 1'b1; key_waddr[idx] = 7'(a); key_wdata[idx] = key[a];
    end
    @(negedge clk);
    key_we[idx] = 1'b0;
    key_start[idx] = 1'b1; key_len[idx] = 8'(key.size());
    din_valid[idx] = 1'b0;
    @(negedge clk);
    cycles = 1;
    key_start[idx] = 1'b0;
    if (offer_data) begin din_valid[idx] = 1'b1; din[idx] = 8'($urandom); end
    while (!din_ready[idx] && cycles < 2000) begin
      @(negedge clk);
      cycles++;
    end
    din_valid[idx] = 1'b0;
    checks++;
    if (cycles != int'(NS[idx]) + 3) begin
      failures++; $display("inst %0d: key setup took %0d cycles, expected %0d", idx, cycles, NS[idx] + 3);
    end
    if (idx == 2) n_keysetup++;
  endtask

  // Send bytes; gap_pct is the chance of an idle cycle before each byte.
  // Returns the output bytes. Checks the cycle count when there are no gaps.
  task automatic stream(int idx, byte unsigned data[], int gap_pct, output byte unsigned res[]);
    int cycles;
    outq[idx].delete();
    cycles = 0;
    foreach (data[n]) begin
      if ($urandom_range(0, 99) < gap_pct) begin
        din_valid[idx] = 1'b0;
        @(negedge clk); cycles++;
      end
      din_valid[idx] = 1'b1; din[idx] = data[n];
      @(negedge clk); cycles++;
    end
    din_valid[idx] = 1'b0;
    @(negedge clk);
    if (gap_pct == 0) begin
      checks++;
      if (cycles != data.size()) begin failures++; $display("inst %0d: %0d bytes took %0d cycles", idx, data.size(), cycles); end
    end
    checks++;
    if (outq[idx].size() != data.size()) begin
      failures++; $display("inst %0d: %0d bytes out for %0d in", idx, outq[idx].size(), data.size());
    end
    res = new[outq[idx].size()];
    foreach (res[n]) res[n] = outq[idx][n];
  endtask

  function automatic bytes_t hex2bytes(string h);
    bytes_t b;
    b = new[h.len() / 2];
    foreach (b[n]) b[n] = 8'(h.substr(2 * n, 2 * n + 1).atohex());
    return b;
  endfunction

  task automatic check_bytes(string what, byte unsigned got[], byte unsigned exp[]);
    checks++;
    if (got.size() != exp.size()) begin
      failures++; $display("%s: %0d bytes, expected %0d", what, got.size(), exp.size());
      return;
    end
    foreach (exp[n]) if (got[n] !== exp[n]) begin
      failures++; $display("%s: byte %0d = %h expected %h", what, n, got[n], exp[n]);
      return;
    end
  endtask

  task automatic known_vector(string k, string p, bytes_t exp);
    byte unsigned c[], d[];
    load_key(1, str2bytes(k), 1'b0);
    stream(1, str2bytes(p), 0, c);
    check_bytes({"N=256 ", k, "/", p}, c, exp);
    load_key(1, str2bytes(k), 1'b0);
    stream(1, c, 20, d);
    check_bytes({"N=256 decrypt ", k}, d, str2bytes(p));
  endtask

  initial begin
    byte unsigned key[], msg[], c[], d[], exp_c[];
    rc4_model m;
    int unsigned len;
    int split;

    for (int g = 0; g < NI; g++) begin
      key_we[g] = 0; key_waddr[g] = 0; key_wdata[g] = 0; key_len[g] = 0; key_start[g] = 0;
      din_valid[g] = 0; din[g] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- inst 0: the worked 4-entry example ----
    key = new[4];
    key[0] = 8'd1; key[1] = 8'd7; key[2] = 8'd1; key[3] = 8'd7;
    load_key(0, key, 1'b0);
    stream(0, str2bytes("HI"), 0, c);
    exp_c = new[2];
    exp_c[0] = 8'h4B;
    exp_c[1] = 8'h48;
    check_bytes("N=4 encrypt HI", c, exp_c);
    load_key(0, key, 1'b0);
    stream(0, c, 0, d);
    check_bytes("N=4 decrypt", d, str2bytes("HI"));

    // ---- inst 1: published RC4 test vectors ----
    known_vector("Key", "Plaintext", hex2bytes("BBF316E8D940AF0AD3"));
    known_vector("Wiki", "pedia", hex2bytes("1021BF0420"));
    known_vector("Secret", "Attack at dawn", hex2bytes("45A01F645FC35B383552544B9BF5"));

    // ---- inst 2: default size against the model ----
    m = new(128);
    for (int round = 0; round < 12; round++) begin
      case (round)
        0: len = 1;
        1: len = 128;
        2: len = 5;
        default: len = $urandom_range(1, 128);
      endcase
      if (len == 1) n_len1++;
      if (len == 128) n_fullkey++;
      if (len < 128) n_wrap++;
      key = new[len];
      foreach (key[a]) key[a] = 8'($urandom);
      msg = new[$urandom_range(20, 300)];
      foreach (msg[n]) msg[n] = 8'($urandom);
      m.schedule(key, len);
      exp_c = new[msg.size()];
      foreach (msg[n]) exp_c[n] = msg[n] ^ m.next();

      load_key(2, key, round % 2 == 1);
      stream(2, msg, (round < 2) ? 0 : 25, c);
      check_bytes($sformatf("N=128 round %0d encrypt", round), c, exp_c);

      // decrypt with a fresh key setup; on odd rounds re-key in the middle of
      // a stream (key_start right after a cycle with din_ready), which restarts the keystream
      load_key(2, key, 1'b0);
      if (round % 2 == 1) begin
        split = $urandom_range(1, c.size() - 1);
        stream(2, slice(c, 0, split), 10, d);
        check_bytes($sformatf("N=128 round %0d partial decrypt", round), d, slice(msg, 0, split));
        // key bytes unchanged, so a new key_start restarts the same keystream
        @(negedge clk);
        key_start[2] = 1'b1; key_len[2] = 8'(len);
        @(negedge clk);
        key_start[2] = 1'b0;
        while (!din_ready[2]) @(negedge clk);
        n_keysetup++;
      end
      stream(2, c, 15, d);
      check_bytes($sformatf("N=128 round %0d decrypt", round), d, msg);
      n_decrypt++;
    end

    checks++;
    if (n_keysetup == 0 || n_b2b == 0 || n_gap == 0 || n_ignored == 0 || n_rekey == 0 ||
        n_wrap == 0 || n_fullkey == 0 || n_len1 == 0 || n_decrypt == 0) begin
      failures++; $display("a mechanism never occurred");
    end
    $display("key setups=%0d back-to-back=%0d gaps=%0d ignored-during-setup=%0d rekey-mid-stream=%0d",
             n_keysetup, n_b2b, n_gap, n_ignored, n_rekey);
    $display("wrapping keys=%0d full-length keys=%0d one-byte keys=%0d decryptions=%0d",
             n_wrap, n_fullkey, n_len1, n_decrypt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
