// rc4_sbox: the RC4 state array S, N entries of log2(N) bits each.
//
// S is held in flip-flops so that the three read ports are combinational:
// the keystream generator reads S[i], then S[j] at an address computed from
// the first read, then S[t] from the sum of both, all in one clock cycle.
// A single write operation, the swap, exchanges S[swap_a] and S[swap_b] at the
// clock edge (swap_a == swap_b leaves S unchanged). The `init` command loads
// the identity permutation S[k] = k in one cycle; reset does the same.
// Identity start and the swap are RC4's own; holding S in registers, the
// three read ports and the one-cycle initialisation are this design's choice.
//
// Timing: reads see the array as of the last clock edge; init has priority
// over swap.
module rc4_sbox #(
  parameter  int unsigned N  = rc4_pkg::RC4_N,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          init,      // load S[k] = k
  input  logic [AW-1:0] ra_addr,
  output logic [AW-1:0] ra_data,
  input  logic [AW-1:0] rb_addr,
  output logic [AW-1:0] rb_data,
  input  logic [AW-1:0] rc_addr,
  output logic [AW-1:0] rc_data,
  input  logic          swap_en,   // exchange S[swap_a] and S[swap_b]
  input  logic [AW-1:0] swap_a,
  input  logic [AW-1:0] swap_b
);

  initial begin
    if (N < 2 || (N & (N - 1)) != 0) $fatal(1, "rc4_sbox: N must be a power of two >= 2");
  end

  logic [AW-1:0] s [N];

  assign ra_data = s[ra_addr];
  assign rb_data = s[rb_addr];
  assign rc_data = s[rc_addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < N; k++) s[k] <= AW'(k);
    end else if (init) begin
      for (int unsigned k = 0; k < N; k++) s[k] <= AW'(k);
    end else if (swap_en) begin
      s[swap_a] <= s[swap_b];
      s[swap_b] <= s[swap_a];
    end
  end

endmodule
