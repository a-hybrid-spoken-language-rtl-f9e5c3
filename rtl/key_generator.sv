// key_generator: maps a byte value to a unique 8-bit key and back.
//
// The key is a fixed one-to-one scrambling of the byte value: rotate left by
// three bits, then XOR with 5A hex (see nlp_pkg::byte_to_key). Being a
// bijection, every byte value has exactly one key and the key can be turned
// back into the byte value, which the reverse lookup dictionary uses to find
// a word from its key. The description requires only that the key be unique
// per byte value; the particular scrambling is this implementation's choice.
// Purely combinational.
module key_generator
  import nlp_pkg::*;
(
  input  byte_t byte_in,
  output byte_t key_out,
  input  byte_t key_in,
  output byte_t byte_out
);
  assign key_out  = byte_to_key(byte_in);
  assign byte_out = key_to_byte(key_in);
endmodule
