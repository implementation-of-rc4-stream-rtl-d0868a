// rc4_prga: the RC4 pseudorandom generation algorithm (keystream generator).
//
// Each cycle with `req` high produces one keystream value:
//   i = (i + 1) mod N;  j = (j + S[i]) mod N;  swap S[i], S[j];
//   t = (S[i] + S[j]) mod N;  keystream = S[t].
// The three reads S[i], S[j], S[t] go through the state array's three
// combinational ports in the same cycle, so the generator delivers one value
// per clock. S[t] must be read after the swap, but the array only changes at
// the clock edge, so the swap is forwarded: if t equals the new i the value is
// the old S[j], if t equals the new j it is the old S[i]. The swap itself is
// written at the clock edge that ends the cycle. The keystream value has
// log2(N) bits and is zero-extended to a byte (with N = 256 it is the byte;
// with the default N = 128 the top bit of ks is constant 0).
// The algorithm is RC4's; the single-cycle schedule with forwarding is this
// design's choice.
//
// Interface: `clear` sets i = j = 0 (done whenever a new key is scheduled).
// `ks` is valid, combinationally, in the cycle `req` is high.
module rc4_prga #(
  parameter  int unsigned N  = rc4_pkg::RC4_N,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           req,
  output rc4_pkg::byte_t ks,
  // state array ports
  output logic [AW-1:0]  s_ra_addr,
  input  logic [AW-1:0]  s_ra_data,
  output logic [AW-1:0]  s_rb_addr,
  input  logic [AW-1:0]  s_rb_data,
  output logic [AW-1:0]  s_rc_addr,
  input  logic [AW-1:0]  s_rc_data,
  output logic           s_swap_en,
  output logic [AW-1:0]  s_swap_a,
  output logic [AW-1:0]  s_swap_b
);

  logic [AW-1:0] i, j;
  logic [AW-1:0] i_next, j_next, si, sj, t, ks_val;

  always_comb begin
    i_next    = i + AW'(1);
    s_ra_addr = i_next;
    si        = s_ra_data;
    j_next    = j + si;
    s_rb_addr = j_next;
    sj        = s_rb_data;
    t         = si + sj;
    s_rc_addr = t;
    // value of S[t] after the swap of S[i_next] and S[j_next]
    if (t == i_next)      ks_val = sj;
    else if (t == j_next) ks_val = si;
    else                  ks_val = s_rc_data;
  end

  assign ks        = 8'(ks_val);
  assign s_swap_en = req && !clear;
  assign s_swap_a  = i_next;
  assign s_swap_b  = j_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i <= '0;
      j <= '0;
    end else if (clear) begin
      i <= '0;
      j <= '0;
    end else if (req) begin
      i <= i_next;
      j <= j_next;
    end
  end

endmodule
