// nc_hash: the family of non-cryptographic hash functions h1, h2, ... that map a
// capability key {token type, n} to a digest for the capability metadata table.
//
// Hash function number `sel` is a seeded 64-bit avalanche mix: the key is XORed with the
// seed (sel+1) * 0x9E3779B97F4A7C15 and passed through nc_pkg::mix64. Choosing a "new hash
// function" when the table is expanded means incrementing `sel`. The table uses the low
// TBits bits of the 32-bit digest as the slot number. The family itself is this design's
// choice; the scheme only asks for a non-cryptographic hash per table. Combinational.
module nc_hash
  import nc_pkg::*;
(
  input  key_t        key,
  input  logic [7:0]  sel,
  output logic [31:0] digest
);
  logic [63:0] seed, z;
  always_comb begin
    seed   = 64'(sel + 9'd1) * 64'h9E37_79B9_7F4A_7C15;
    z      = mix64(64'(key) ^ seed);
    digest = z[31:0];
  end
endmodule
