// nc_mac: computes the 16-bit MAC tag sigma of a capability-metadata-table entry.
//
// The tag binds a token to the entry it names: it is taken over the capability key
// {type, n}, the entry type, the aux word (user bits or parent token), the R/W/X
// permissions and the entry's nonce. Fields that change while the capability is live are
// left out: reference count, lock state and lock holder (so clone, drop, lock and unlock
// do not invalidate tokens already handed out) and base and length (so the allocator's
// token for a segment stays valid while create and merge resize it, including the token
// through which it reaches the northbridge's registers). A new number or a new nonce
// (revoke, a new capability) always gives a new tag. The message (48+3+64+3+32 = 150 bits,
// zero padded) is packed into four 64-bit words and absorbed into a state that starts at
// the secret key: s = mix64(s ^ word) per word, and the tag is s[63:48] ^ s[15:0].
// This keyed construction is a placeholder with the right interface: it is not a
// cryptographically strong MAC, which a deployed northbridge would need. Combinational.
module nc_mac
  import nc_pkg::*;
(
  input  logic [63:0] mac_key,
  input  key_t        key,
  input  cmt_entry_t  entry,
  output tag_t        tag
);
  logic [255:0] msg;
  logic [63:0]  s;
  always_comb begin
    msg = 256'({key, entry.ctype, entry.aux, entry.r, entry.w, entry.x, entry.nonce});
    s = mac_key;
    for (int i = 0; i < 4; i++) s = mix64(s ^ msg[64*i +: 64]);
    tag = s[63:48] ^ s[15:0];
  end
endmodule
