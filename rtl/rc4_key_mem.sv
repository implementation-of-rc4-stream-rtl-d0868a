// rc4_key_mem: storage for the secret key, KEY_MAX bytes.
//
// The host writes the key one byte per cycle through the write port (byte
// address waddr gets wdata at the clock edge when we is high). The
// key-scheduling unit reads byte raddr combinationally. How many of the bytes
// are used (the key length, 1..KEY_MAX) is given separately when key setup
// starts, so a short key is simply written to the low addresses. The byte
// write port and the asynchronous read are this design's choice; the key size
// of up to 128 bytes follows the RC4 core's specification. Reset clears the key.
module rc4_key_mem #(
  parameter  int unsigned KEY_MAX = rc4_pkg::RC4_KEY_MAX,
  localparam int unsigned KAW     = (KEY_MAX > 1) ? $clog2(KEY_MAX) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           we,
  input  logic [KAW-1:0] waddr,
  input  rc4_pkg::byte_t wdata,
  input  logic [KAW-1:0] raddr,
  output rc4_pkg::byte_t rdata
);

  rc4_pkg::byte_t key [KEY_MAX];

  assign rdata = (32'(raddr) < KEY_MAX) ? key[raddr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < KEY_MAX; k++) key[k] <= '0;
    end else if (we && 32'(waddr) < KEY_MAX) begin
      key[waddr] <= wdata;
    end
  end

endmodule
