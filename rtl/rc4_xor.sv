// rc4_xor: the RC4 combiner, out = in XOR keystream, registered.
//
// Encryption XORs a plaintext byte with the keystream byte; decryption XORs
// the ciphertext byte with the same keystream byte, since
// (A xor B) xor B = A. One unit therefore serves both directions. The byte is
// captured with its valid flag at the clock edge, so the result appears one
// cycle after the input. The XOR is RC4's; the output register is this
// design's choice. Reset clears the valid flag and the byte.
module rc4_xor (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,
  input  rc4_pkg::byte_t in_data,
  input  rc4_pkg::byte_t ks,
  output logic           out_valid,
  output rc4_pkg::byte_t out_data
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data ^ ks;
    end
  end

endmodule
