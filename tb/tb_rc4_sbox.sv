// tb_rc4_sbox: drives random swaps and re-initialisations into the state
// array and compares all three read ports against a shadow permutation after
// every cycle. N = 16 keeps the full scan short; the logic is the same at
// any power of two.
module tb_rc4_sbox;
  localparam int unsigned N = 16;
  localparam int unsigned AW = $clog2(N);
  logic clk = 1'b0, rst_n = 1'b0;
  logic init, swap_en;
  logic [AW-1:0] ra_addr, rb_addr, rc_addr, ra_data, rb_data, rc_data, swap_a, swap_b;
  int unsigned shadow [N];
  int checks = 0, failures = 0;
  int n_swaps = 0, n_inits = 0, n_self = 0;

  always #5 clk = ~clk;

  rc4_sbox #(.N(N)) dut (.*);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int a = 0; a < N; a++) begin
      ra_addr = AW'(a);
      rb_addr = AW'((a + 5) % N);
      rc_addr = AW'(N - 1 - a);
      #1;
      checks++;
      if (ra_data !== AW'(shadow[a]) || rb_data !== AW'(shadow[(a + 5) % N]) ||
          rc_data !== AW'(shadow[N - 1 - a])) begin
        failures++; $display("S mismatch at address %0d", a);
      end
    end
  endtask

  initial begin
    int unsigned tmp;
    init = 1'b0; swap_en = 1'b0; swap_a = '0; swap_b = '0;
    ra_addr = '0; rb_addr = '0; rc_addr = '0;
    foreach (shadow[k]) shadow[k] = k;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    compare_all();
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      init    = ($urandom_range(0, 99) == 0);
      swap_en = ($urandom_range(0, 4) != 0);
      swap_a  = AW'($urandom);
      swap_b  = ($urandom_range(0, 9) == 0) ? swap_a : AW'($urandom);
      if (init) begin
        foreach (shadow[k]) shadow[k] = k;
        n_inits++;
      end else if (swap_en) begin
        tmp = shadow[swap_a]; shadow[swap_a] = shadow[swap_b]; shadow[swap_b] = tmp;
        n_swaps++;
        if (swap_a == swap_b) n_self++;
      end
      @(negedge clk);
      init = 1'b0; swap_en = 1'b0;
      compare_all();
    end
    checks++;
    if (n_swaps == 0 || n_inits == 0 || n_self == 0) begin
      failures++; $display("not every operation exercised");
    end
    $display("swaps=%0d inits=%0d self-swaps=%0d", n_swaps, n_inits, n_self);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
