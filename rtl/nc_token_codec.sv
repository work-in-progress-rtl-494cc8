// nc_token_codec: splits a 64-bit capability token into its fields and builds tokens.
//
// Decode: bits [63:62] are the token type, [61:46] the 16-bit MAC tag, and the remaining
// 46 bits hold the capability number n followed (towards the LSB) by the byte offset:
//   type 0: n = [45:32] (14 bits), offset = [31:0]  (32 bits)
//   type 1: n = [45:0]  (46 bits), no offset
//   type 2: n = [45:16] (30 bits), offset = [15:0]  (16 bits)
//   type 3: n = [45:24] (22 bits), offset = [23:0]  (24 bits)
// The widths are the published encoding; assigning them to type codes 0..3 in table order
// is this design's reading, and it is the one that makes the root capability (type, tag
// and number all zero) take a plain 32-bit physical address as its offset.
// `key` is {type, n}, the identifier the capability metadata table is hashed on.
//
// Encode: builds a token with offset 0 from {type, tag, n}; n is truncated to the type's
// width. Both directions are purely combinational.
module nc_token_codec
  import nc_pkg::*;
(
  input  token_t        dec_token,
  output token_fields_t dec_fields,
  output key_t          dec_key,

  input  logic [1:0]        enc_ttype,
  input  tag_t              enc_tag,
  input  logic [NUM_W-1:0]  enc_num,
  output token_t            enc_token
);

  always_comb begin
    dec_fields       = '0;
    dec_fields.ttype = dec_token[63:62];
    dec_fields.tag   = dec_token[61:46];
    unique case (dec_token[63:62])
      2'd0: begin dec_fields.num = NUM_W'(dec_token[45:32]); dec_fields.offset = dec_token[31:0]; end
      2'd1: begin dec_fields.num = dec_token[45:0];          dec_fields.offset = '0; end
      2'd2: begin dec_fields.num = NUM_W'(dec_token[45:16]); dec_fields.offset = 32'(dec_token[15:0]); end
      default: begin dec_fields.num = NUM_W'(dec_token[45:24]); dec_fields.offset = 32'(dec_token[23:0]); end
    endcase
    dec_key = {dec_fields.ttype, dec_fields.num};
  end

  assign enc_token = tok_encode(enc_ttype, enc_tag, enc_num);

endmodule
