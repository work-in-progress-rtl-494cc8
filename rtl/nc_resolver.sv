// nc_resolver: validates a capability token against the capability metadata table and
// walks the parent chain of indirect capabilities up to the owning direct (or paged-out)
// capability.
//
// On req_valid (accepted when req_ready) the token is decoded into key {type, n}, tag and
// offset, and a LOOKUP is sent to the CMT controller. A miss (no entry with that key and
// MAC tag: forged, dropped or revoked token) ends the walk with F_INVALID. An indirect
// entry holds the token of its parent, which is looked up next; a revoked ancestor
// therefore invalidates every capability derived from it without any sweep. The walk
// ends at the first direct or paged-out entry. Walks longer than MAX_DEPTH parent steps end
// with F_DEPTH, which bounds the validation latency: it is (depth+1) CMT lookups.
//
// Results, valid with the one-cycle done pulse: ok/fault, the leaf entry (the one the
// token names), its location and key, the owner entry with its location and key, the
// token's offset and the chain depth. The document describes the recursion to the root
// direct capability; the depth limit and the interface are this design's choices.
module nc_resolver
  import nc_pkg::*;
#(
  parameter int unsigned MAX_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        req_valid,
  output logic        req_ready,
  input  token_t      req_token,

  output logic        done,
  output logic        ok,
  output fault_e      fault,
  output cmt_entry_t  leaf,
  output cmt_loc_t    leaf_loc,
  output key_t        leaf_key,
  output cmt_entry_t  owner,
  output cmt_loc_t    owner_loc,
  output key_t        owner_key,
  output logic [31:0] offset,
  output logic [7:0]  depth,

  // CMT controller command port (lookups only)
  output logic        cmt_valid,
  input  logic        cmt_ready,
  output key_t        cmt_key,
  output tag_t        cmt_tag,
  input  logic        cmt_rsp_valid,
  input  logic        cmt_rsp_ok,
  input  cmt_entry_t  cmt_rsp_entry,
  input  cmt_loc_t    cmt_rsp_loc
);

  typedef enum logic [1:0] {R_IDLE, R_ISSUE, R_WAIT} rstate_e;
  rstate_e state;

  token_t        cur;
  token_fields_t cur_f;
  key_t          cur_key;
  token_t        unused_enc;

  nc_token_codec u_codec (
    .dec_token(cur), .dec_fields(cur_f), .dec_key(cur_key),
    .enc_ttype(2'd0), .enc_tag('0), .enc_num('0), .enc_token(unused_enc)
  );

  assign req_ready = (state == R_IDLE);
  assign cmt_valid = (state == R_ISSUE);
  assign cmt_key   = cur_key;
  assign cmt_tag   = cur_f.tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= R_IDLE;
      cur       <= '0;
      done      <= 1'b0;
      ok        <= 1'b0;
      fault     <= F_NONE;
      leaf      <= '0;
      leaf_loc  <= '0;
      leaf_key  <= '0;
      owner     <= '0;
      owner_loc <= '0;
      owner_key <= '0;
      offset    <= '0;
      depth     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        R_IDLE: if (req_valid) begin
          cur   <= req_token;
          depth <= '0;
          state <= R_ISSUE;
        end
        R_ISSUE: begin
          if (depth == '0) offset <= cur_f.offset;
          if (cmt_ready) state <= R_WAIT;
        end
        default: if (cmt_rsp_valid) begin
          if (depth == '0) begin
            leaf     <= cmt_rsp_entry;
            leaf_loc <= cmt_rsp_loc;
            leaf_key <= cur_key;
          end
          if (!cmt_rsp_ok) begin
            done  <= 1'b1;
            ok    <= 1'b0;
            fault <= F_INVALID;
            state <= R_IDLE;
          end else if (cmt_rsp_entry.ctype == CT_INDIRECT) begin
            if (depth == 8'(MAX_DEPTH)) begin
              done  <= 1'b1;
              ok    <= 1'b0;
              fault <= F_DEPTH;
              state <= R_IDLE;
            end else begin
              cur   <= cmt_rsp_entry.aux;
              depth <= depth + 8'd1;
              state <= R_ISSUE;
            end
          end else begin
            owner     <= cmt_rsp_entry;
            owner_loc <= cmt_rsp_loc;
            owner_key <= cur_key;
            done      <= 1'b1;
            ok        <= 1'b1;
            fault     <= F_NONE;
            state     <= R_IDLE;
          end
        end
      endcase
    end
  end

endmodule
