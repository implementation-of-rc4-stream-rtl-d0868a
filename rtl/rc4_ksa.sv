// rc4_ksa: the RC4 key-scheduling algorithm (key setup phase).
//
// On `start` it latches the key length and then
//   1. loads the identity permutation into S (one cycle, INIT), and
//   2. for i = 0 .. N-1:  j = (j + S[i] + K[i mod keylen]) mod N,
//                         swap S[i] and S[j]     (one cycle each, MIX).
// The key index runs in its own counter that wraps at the key length, so no
// divider is needed for "i mod keylen". Key bytes are 8 bits; only their low
// log2(N) bits matter in the mod-N sum, so with N < 256 the upper key bits are
// read but unused (lint reports them as unused). The algorithm is RC4's; the one swap
// per clock, the separate wrapping key counter and the handshake are this
// design's choices.
//
// Interface: the unit drives the state array's init, read port A and swap
// port, and the key memory's read address. A key length of 0 is treated as 1.
//
// Timing: start seen in cycle 0, INIT in cycle 1, MIX in cycles 2..N+1, and
// `done` is high for one cycle in cycle N+2. `busy` is high from cycle 1 to
// N+2 inclusive; start is ignored while busy.
module rc4_ksa #(
  parameter  int unsigned N       = rc4_pkg::RC4_N,
  parameter  int unsigned KEY_MAX = rc4_pkg::RC4_KEY_MAX,
  localparam int unsigned AW      = $clog2(N),
  localparam int unsigned KAW     = (KEY_MAX > 1) ? $clog2(KEY_MAX) : 1,
  localparam int unsigned KLW     = $clog2(KEY_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [KLW-1:0] key_len,
  output logic           busy,
  output logic           done,
  // key memory read port
  output logic [KAW-1:0] key_raddr,
  input  rc4_pkg::byte_t key_rdata,
  // state array ports
  output logic           s_init,
  output logic [AW-1:0]  s_raddr,
  input  logic [AW-1:0]  s_rdata,
  output logic           s_swap_en,
  output logic [AW-1:0]  s_swap_a,
  output logic [AW-1:0]  s_swap_b
);

  typedef enum logic [1:0] {K_IDLE, K_INIT, K_MIX, K_DONE} ksa_state_e;

  ksa_state_e     state;
  logic [AW-1:0]  i, j, j_next;
  logic [KAW-1:0] k;
  logic [KLW-1:0] len_q;
  logic           k_wrap;

  assign j_next = j + s_rdata + key_rdata[AW-1:0];
  assign k_wrap = (KLW'(k) + KLW'(1)) >= len_q;

  assign busy      = (state != K_IDLE);
  assign done      = (state == K_DONE);
  assign key_raddr = k;
  assign s_init    = (state == K_INIT);
  assign s_raddr   = i;
  assign s_swap_en = (state == K_MIX);
  assign s_swap_a  = i;
  assign s_swap_b  = j_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= K_IDLE;
      i     <= '0;
      j     <= '0;
      k     <= '0;
      len_q <= KLW'(1);
    end else begin
      unique case (state)
        K_IDLE: if (start) begin
          state <= K_INIT;
          len_q <= (key_len == '0) ? KLW'(1) : key_len;
        end
        K_INIT: begin
          state <= K_MIX;
          i     <= '0;
          j     <= '0;
          k     <= '0;
        end
        K_MIX: begin
          i <= i + AW'(1);
          j <= j_next;
          k <= k_wrap ? '0 : k + KAW'(1);
          if (i == AW'(N - 1)) state <= K_DONE;
        end
        K_DONE: state <= K_IDLE;
        default: state <= K_IDLE;
      endcase
    end
  end

endmodule
