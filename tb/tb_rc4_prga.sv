// tb_rc4_prga: runs the keystream generator on a state array that the
// testbench first sets to a chosen permutation by a sequence of swaps, then
// compares each keystream value with the software model.
//   - N = 4, S = [2, 1, 3, 0] (the worked example after key setup): the first
//     two values must be 3 and 1, and "HI" XOR them gives 0x4B 0x48.
//   - N = 128 (default size), random permutations, long runs with req high
//     every cycle (one value per clock) and with random gaps, and `clear`
//     restarting the indices mid-stream.
module tb_rc4_prga;
  import rc4_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int n_fwd_i = 0, n_fwd_j = 0, n_gaps = 0, n_clears = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- small instance, N = 4 ----------------
  logic       s_clear, s_req, s_tb_mode, s_tb_swap, s_init, s_pswap;
  logic [7:0] s_ks;
  logic [1:0] s_ra, s_rad, s_rb, s_rbd, s_rc, s_rcd, s_pa, s_pb, s_tba, s_tbb;

  rc4_sbox #(.N(4)) u_ssbox (.clk, .rst_n, .init(s_init),
    .ra_addr(s_ra), .ra_data(s_rad), .rb_addr(s_rb), .rb_data(s_rbd),
    .rc_addr(s_rc), .rc_data(s_rcd),
    .swap_en(s_tb_mode ? s_tb_swap : s_pswap),
    .swap_a(s_tb_mode ? s_tba : s_pa), .swap_b(s_tb_mode ? s_tbb : s_pb));
  rc4_prga #(.N(4)) u_sprga (.clk, .rst_n, .clear(s_clear), .req(s_req), .ks(s_ks),
    .s_ra_addr(s_ra), .s_ra_data(s_rad), .s_rb_addr(s_rb), .s_rb_data(s_rbd),
    .s_rc_addr(s_rc), .s_rc_data(s_rcd),
    .s_swap_en(s_pswap), .s_swap_a(s_pa), .s_swap_b(s_pb));

  // ---------------- default instance, N = 128 ----------------
  logic       b_clear, b_req, b_tb_mode, b_tb_swap, b_init, b_pswap;
  logic [7:0] b_ks;
  logic [6:0] b_ra, b_rad, b_rb, b_rbd, b_rc, b_rcd, b_pa, b_pb, b_tba, b_tbb;

  rc4_sbox u_bsbox (.clk, .rst_n, .init(b_init),
    .ra_addr(b_ra), .ra_data(b_rad), .rb_addr(b_rb), .rb_data(b_rbd),
    .rc_addr(b_rc), .rc_data(b_rcd),
    .swap_en(b_tb_mode ? b_tb_swap : b_pswap),
    .swap_a(b_tb_mode ? b_tba : b_pa), .swap_b(b_tb_mode ? b_tbb : b_pb));
  rc4_prga u_bprga (.clk, .rst_n, .clear(b_clear), .req(b_req), .ks(b_ks),
    .s_ra_addr(b_ra), .s_ra_data(b_rad), .s_rb_addr(b_rb), .s_rb_data(b_rbd),
    .s_rc_addr(b_rc), .s_rc_data(b_rcd),
    .s_swap_en(b_pswap), .s_swap_a(b_pa), .s_swap_b(b_pb));

  // count how often the swap forwarding path is needed (t equals new i or new j)
  always @(posedge clk) if (b_req && !b_clear) begin
    if (b_rc == b_ra) n_fwd_i++;
    else if (b_rc == b_rb) n_fwd_j++;
  end

  initial begin
    rc4_model m;
    byte unsigned exp_ks;
    int unsigned perm[];
    int unsigned cur[];
    int unsigned tmp;
    byte unsigned plain[2];
    byte unsigned cipher[2];

    s_clear = 0; s_req = 0; s_tb_mode = 1; s_tb_swap = 0; s_init = 0; s_tba = 0; s_tbb = 0;
    b_clear = 0; b_req = 0; b_tb_mode = 1; b_tb_swap = 0; b_init = 0; b_tba = 0; b_tbb = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // --- worked example: identity -> [2,1,3,0] by swap(0,2), swap(2,3) ---
    @(negedge clk); s_tb_swap = 1; s_tba = 2'd0; s_tbb = 2'd2;
    @(negedge clk); s_tba = 2'd2; s_tbb = 2'd3;
    @(negedge clk); s_tb_swap = 0; s_tb_mode = 0;
    plain = '{8'h48, 8'h49};
    for (int n = 0; n < 2; n++) begin
      s_req = 1; #1;
      cipher[n] = plain[n] ^ s_ks;
      checks++;
      if (s_ks !== ((n == 0) ? 8'd3 : 8'd1)) begin failures++; $display("N=4 byte %0d: ks=%0d", n, s_ks); end
      @(negedge clk);
    end
    s_req = 0;
    checks++;
    if (cipher[0] !== 8'h4B || cipher[1] !== 8'h48) begin
      failures++; $display("N=4 cipher %h %h, expected 4b 48", cipher[0], cipher[1]);
    end
    // S after the two steps must be [3,1,2,0]; with i = 2 the generator's
    // port A now reads S[3], which must be 0.
    s_tb_mode = 1;
    #1;
    checks++;
    if (s_rad !== 2'd0) begin failures++; $display("N=4 S[3]=%0d expected 0", s_rad); end

    // --- default size: random permutations ---
    m = new(128);
    for (int round = 0; round < 6; round++) begin
      // reset the array to identity through the prga-side path: tb init
      @(negedge clk); b_tb_mode = 1; b_init = 1;
      @(negedge clk); b_init = 0;
      perm = new[128];
      cur = new[128];
      foreach (perm[k]) begin perm[k] = k; cur[k] = k; end
      perm.shuffle();
      // selection by swaps: bring perm[k] into position k
      for (int k = 0; k < 128; k++) begin
        int pos;
        pos = k;
        for (int q = k; q < 128; q++) if (cur[q] == perm[k]) pos = q;
        b_tb_swap = 1; b_tba = 7'(k); b_tbb = 7'(pos);
        tmp = cur[k]; cur[k] = cur[pos]; cur[pos] = tmp;
        @(negedge clk);
      end
      b_tb_swap = 0; b_tb_mode = 0;
      b_clear = 1;
      @(negedge clk);
      b_clear = 0;
      foreach (perm[k]) m.s[k] = perm[k];
      m.i = 0; m.j = 0;
      for (int n = 0; n < 700; n++) begin
        if (round > 2 && $urandom_range(0, 3) == 0) begin
          b_req = 0; n_gaps++;
          @(negedge clk);
        end
        if (n == 350 && round == 5) begin
          // clear mid-stream: indices restart at 0, S keeps its contents
          b_clear = 1; b_req = 0; n_clears++;
          @(negedge clk);
          b_clear = 0;
          m.i = 0; m.j = 0;
        end
        b_req = 1; #1;
        exp_ks = m.next();
        checks++;
        if (b_ks !== exp_ks) begin
          failures++;
          if (failures < 10) $display("round %0d byte %0d: ks=%0d expected %0d", round, n, b_ks, exp_ks);
        end
        @(negedge clk);
      end
      b_req = 0;
    end
    checks++;
    if (n_fwd_i == 0 || n_fwd_j == 0 || n_gaps == 0 || n_clears == 0) begin
      failures++; $display("not all cases exercised: fwd_i=%0d fwd_j=%0d gaps=%0d clears=%0d",
                           n_fwd_i, n_fwd_j, n_gaps, n_clears);
    end
    $display("forwarded from i: %0d, from j: %0d, gaps: %0d, clears: %0d", n_fwd_i, n_fwd_j, n_gaps, n_clears);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
