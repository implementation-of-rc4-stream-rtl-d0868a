// rc4_top: complete RC4 stream cipher, byte in / byte out.
//
// The host first writes the key bytes (key_we/key_waddr/key_wdata) and then
// pulses key_start with the key length (1..KEY_MAX bytes). The core runs the
// key-setup phase (rc4_ksa) over the N-entry state array (rc4_sbox) and then
// enters the streaming phase: every byte presented with din_valid while
// din_ready is high is XORed (rc4_xor) with the next keystream value from the
// generator (rc4_prga) and appears on dout one cycle later. Encryption and
// decryption are the same operation: feeding the ciphertext back through a
// core keyed with the same key returns the plaintext. Both phases run again
// for every new key: key_start may be given at any time except during key
// setup and restarts the keystream from i = j = 0.
//
// The two phases share the state array; the phase register selects which unit
// drives its ports. The key memory must not be written during key setup.
//
// Timing, with the default N = 128: key setup takes N + 3 cycles from the
// key_start cycle to the first cycle with din_ready high; after that one byte
// per clock, each with a latency of one cycle. The two-phase structure and
// the default sizes follow the RC4 core's specification; the port protocol,
// one-swap-per-cycle schedule and register-based state array are this
// design's choices.
module rc4_top #(
  parameter  int unsigned N       = rc4_pkg::RC4_N,
  parameter  int unsigned KEY_MAX = rc4_pkg::RC4_KEY_MAX,
  localparam int unsigned AW      = $clog2(N),
  localparam int unsigned KAW     = (KEY_MAX > 1) ? $clog2(KEY_MAX) : 1,
  localparam int unsigned KLW     = $clog2(KEY_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  // key loading
  input  logic           key_we,
  input  logic [KAW-1:0] key_waddr,
  input  rc4_pkg::byte_t key_wdata,
  input  logic [KLW-1:0] key_len,
  input  logic           key_start,
  output logic           key_busy,
  // data stream (plaintext in -> ciphertext out, or the reverse)
  input  logic           din_valid,
  input  rc4_pkg::byte_t din,
  output logic           din_ready,
  output logic           dout_valid,
  output rc4_pkg::byte_t dout
);

  import rc4_pkg::*;

  rc4_phase_e phase;

  // key memory
  logic [KAW-1:0] key_raddr;
  byte_t          key_rdata;

  // KSA side of the state array
  logic           ksa_done, ksa_busy, ksa_init, ksa_swap_en;
  logic [AW-1:0]  ksa_raddr, ksa_swap_a, ksa_swap_b;

  // PRGA side of the state array
  logic           prga_req, prga_swap_en;
  logic [AW-1:0]  prga_ra_addr, prga_rb_addr, prga_rc_addr, prga_swap_a, prga_swap_b;
  byte_t          ks;

  // state array ports after the phase multiplexer
  logic           s_init, s_swap_en;
  logic [AW-1:0]  s_ra_addr, s_ra_data, s_rb_data, s_rc_data, s_swap_a, s_swap_b;

  logic           start_ok, fire;

  assign start_ok  = key_start && !ksa_busy;
  assign din_ready = (phase == PH_STREAM) && !key_start;
  assign fire      = din_valid && din_ready;
  assign prga_req  = fire;
  assign key_busy  = ksa_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          phase <= PH_NOKEY;
    else if (start_ok)   phase <= PH_KEYSETUP;
    else if (ksa_done)   phase <= PH_STREAM;
  end

  always_comb begin
    if (phase == PH_KEYSETUP) begin
      s_init    = ksa_init;
      s_ra_addr = ksa_raddr;
      s_swap_en = ksa_swap_en;
      s_swap_a  = ksa_swap_a;
      s_swap_b  = ksa_swap_b;
    end else begin
      s_init    = 1'b0;
      s_ra_addr = prga_ra_addr;
      s_swap_en = prga_swap_en;
      s_swap_a  = prga_swap_a;
      s_swap_b  = prga_swap_b;
    end
  end

  rc4_key_mem #(.KEY_MAX(KEY_MAX)) u_key (
    .clk, .rst_n,
    .we(key_we), .waddr(key_waddr), .wdata(key_wdata),
    .raddr(key_raddr), .rdata(key_rdata)
  );

  rc4_sbox #(.N(N)) u_sbox (
    .clk, .rst_n,
    .init(s_init),
    .ra_addr(s_ra_addr),    .ra_data(s_ra_data),
    .rb_addr(prga_rb_addr), .rb_data(s_rb_data),
    .rc_addr(prga_rc_addr), .rc_data(s_rc_data),
    .swap_en(s_swap_en), .swap_a(s_swap_a), .swap_b(s_swap_b)
  );

  rc4_ksa #(.N(N), .KEY_MAX(KEY_MAX)) u_ksa (
    .clk, .rst_n,
    .start(start_ok), .key_len(key_len),
    .busy(ksa_busy), .done(ksa_done),
    .key_raddr(key_raddr), .key_rdata(key_rdata),
    .s_init(ksa_init), .s_raddr(ksa_raddr), .s_rdata(s_ra_data),
    .s_swap_en(ksa_swap_en), .s_swap_a(ksa_swap_a), .s_swap_b(ksa_swap_b)
  );

  rc4_prga #(.N(N)) u_prga (
    .clk, .rst_n,
    .clear(start_ok), .req(prga_req), .ks(ks),
    .s_ra_addr(prga_ra_addr), .s_ra_data(s_ra_data),
    .s_rb_addr(prga_rb_addr), .s_rb_data(s_rb_data),
    .s_rc_addr(prga_rc_addr), .s_rc_data(s_rc_data),
    .s_swap_en(prga_swap_en), .s_swap_a(prga_swap_a), .s_swap_b(prga_swap_b)
  );

  rc4_xor u_xor (
    .clk, .rst_n,
    .in_valid(fire), .in_data(din), .ks(ks),
    .out_valid(dout_valid), .out_data(dout)
  );

  // The key must stay still while the key-setup phase reads it.
  a_no_key_write_in_setup: assert property (@(posedge clk) disable iff (!rst_n)
    !(key_we && ksa_busy))
    else $error("rc4_top: key memory written during key setup");

  // Keystream is only drawn in the streaming phase.
  a_stream_only_when_keyed: assert property (@(posedge clk) disable iff (!rst_n)
    prga_req |-> (phase == PH_STREAM))
    else $error("rc4_top: keystream requested before key setup finished");

endmodule
