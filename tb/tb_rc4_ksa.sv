// tb_rc4_ksa: runs the key-scheduling unit with its state array and key
// memory and compares the resulting permutation with the software model.
//   - N = 4, key [1, 7, 1, 7]: the hand-worked example, S must end as
//     [2, 1, 3, 0].
//   - N = 128 (default size), random keys of length 1, 128 and in between,
//     including a key longer than nothing and shorter than N (key wraps).
// Also checks the cycle count: done comes N + 2 cycles after start.
module tb_rc4_ksa;
  import rc4_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- small instance, N = 4 ----------------
  logic       s_start, s_busy, s_done, s_init, s_swap_en, s_kwe;
  logic [7:0] s_klen;
  logic [6:0] s_kraddr, s_kwaddr;
  logic [7:0] s_krdata, s_kwdata;
  logic [1:0] s_raddr, s_rdata, s_swap_a, s_swap_b, s_scan_addr, s_scan_data, s_unused_b;

  rc4_key_mem u_skey (.clk, .rst_n, .we(s_kwe), .waddr(s_kwaddr), .wdata(s_kwdata),
                      .raddr(s_kraddr), .rdata(s_krdata));
  rc4_sbox #(.N(4)) u_ssbox (.clk, .rst_n, .init(s_init),
    .ra_addr(s_raddr), .ra_data(s_rdata), .rb_addr(2'd0), .rb_data(s_unused_b),
    .rc_addr(s_scan_addr), .rc_data(s_scan_data),
    .swap_en(s_swap_en), .swap_a(s_swap_a), .swap_b(s_swap_b));
  rc4_ksa #(.N(4)) u_sksa (.clk, .rst_n, .start(s_start), .key_len(s_klen),
    .busy(s_busy), .done(s_done), .key_raddr(s_kraddr), .key_rdata(s_krdata),
    .s_init(s_init), .s_raddr(s_raddr), .s_rdata(s_rdata),
    .s_swap_en(s_swap_en), .s_swap_a(s_swap_a), .s_swap_b(s_swap_b));

  // ---------------- default instance, N = 128 ----------------
  logic       b_start, b_busy, b_done, b_init, b_swap_en, b_kwe;
  logic [7:0] b_klen;
  logic [6:0] b_kraddr, b_kwaddr;
  logic [7:0] b_krdata, b_kwdata;
  logic [6:0] b_raddr, b_rdata, b_swap_a, b_swap_b, b_scan_addr, b_scan_data, b_unused_b;

  rc4_key_mem u_bkey (.clk, .rst_n, .we(b_kwe), .waddr(b_kwaddr), .wdata(b_kwdata),
                      .raddr(b_kraddr), .rdata(b_krdata));
  rc4_sbox u_bsbox (.clk, .rst_n, .init(b_init),
    .ra_addr(b_raddr), .ra_data(b_rdata), .rb_addr(7'd0), .rb_data(b_unused_b),
    .rc_addr(b_scan_addr), .rc_data(b_scan_data),
    .swap_en(b_swap_en), .swap_a(b_swap_a), .swap_b(b_swap_b));
  rc4_ksa u_bksa (.clk, .rst_n, .start(b_start), .key_len(b_klen),
    .busy(b_busy), .done(b_done), .key_raddr(b_kraddr), .key_rdata(b_krdata),
    .s_init(b_init), .s_raddr(b_raddr), .s_rdata(b_rdata),
    .s_swap_en(b_swap_en), .s_swap_a(b_swap_a), .s_swap_b(b_swap_b));

  initial begin
    rc4_model m4, m128;
    byte unsigned key[];
    static int unsigned lens[5] = '{1, 5, 16, 127, 128};
    int cycles;
    static int unsigned exp4[4] = '{2, 1, 3, 0};

    s_start = 0; s_klen = 0; s_kwe = 0; s_kwaddr = 0; s_kwdata = 0; s_scan_addr = 0;
    b_start = 0; b_klen = 0; b_kwe = 0; b_kwaddr = 0; b_kwdata = 0; b_scan_addr = 0;
    m4 = new(4);
    m128 = new(128);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // --- worked example, N = 4 ---
    key = new[4];
    key = '{8'd1, 8'd7, 8'd1, 8'd7};
    for (int a = 0; a < 4; a++) begin
      @(negedge clk); s_kwe = 1; s_kwaddr = 7'(a); s_kwdata = key[a];
    end
    @(negedge clk); s_kwe = 0; s_start = 1; s_klen = 8'd4;
    cycles = 0;
    @(negedge clk); s_start = 0;
    do begin cycles++; @(negedge clk); end while (!s_done && cycles < 100);
    checks++;
    if (cycles != 4 + 1) begin failures++; $display("N=4: done after %0d cycles, expected %0d", cycles + 1, 4 + 2); end
    @(negedge clk);
    for (int a = 0; a < 4; a++) begin
      s_scan_addr = 2'(a); #1;
      checks++;
      if (s_scan_data !== 2'(exp4[a])) begin failures++; $display("N=4: S[%0d]=%0d expected %0d", a, s_scan_data, exp4[a]); end
    end

    // --- default size, several key lengths ---
    foreach (lens[li]) begin
      key = new[lens[li]];
      foreach (key[a]) key[a] = 8'($urandom);
      for (int a = 0; a < 128; a++) begin
        @(negedge clk); b_kwe = 1; b_kwaddr = 7'(a);
        b_kwdata = (a < int'(lens[li])) ? key[a] : 8'($urandom);  // bytes past the length must not matter
      end
      @(negedge clk); b_kwe = 0; b_start = 1; b_klen = 8'(lens[li]);
      cycles = 0;
      @(negedge clk); b_start = 0;
      do begin cycles++; @(negedge clk); end while (!b_done && cycles < 1000);
      checks++;
      if (cycles != 128 + 1) begin failures++; $display("N=128: done after %0d cycles, expected %0d", cycles + 1, 128 + 2); end
      m128.schedule(key, lens[li]);
      @(negedge clk);
      for (int a = 0; a < 128; a++) begin
        b_scan_addr = 7'(a); #1;
        checks++;
        if (b_scan_data !== 7'(m128.s[a])) begin
          failures++; $display("N=128 len=%0d: S[%0d]=%0d expected %0d", lens[li], a, b_scan_data, m128.s[a]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
