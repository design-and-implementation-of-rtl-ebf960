// random_key_gen: per-tag key generation, the first step of the encryption scheme.
// The first 128 bits of the tag's TID are XORed with a randomly drawn 128-bit key1;
// the result, key2, is the AES-128 cipher key. key1 must be kept by the owner so that
// the same key2 can be rebuilt for decryption. The XOR is the scheme's own method; the
// register and the in_valid/key_valid pulse are this design's choice: key2 is updated,
// and key_valid pulses, one cycle after in_valid. rst is synchronous, active high.
module random_key_gen
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  block_t tid,
  input  block_t key1,
  output logic   key_valid,
  output block_t key2
);
  always_ff @(posedge clk) begin
    if (rst) begin
      key_valid <= 1'b0;
      key2      <= '0;
    end else begin
      key_valid <= in_valid;
      if (in_valid) key2 <= tid ^ key1;
    end
  end
endmodule
