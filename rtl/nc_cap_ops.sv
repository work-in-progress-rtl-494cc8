// nc_cap_ops: executes the capability operations that software requests through the
// northbridge's MMIO registers: create, merge, derive, lock, unlock, clone, drop, revoke
// and mkXonly.
//
// Each operation is a short microprogram over three services: the resolver (validate a
// token and find its entry and owning direct capability), the CMT controller
// (insert/update/delete an entry) and the zero filler (overwrite a segment). A start pulse
// latches the opcode and operands; busy stays high until the done pulse, when res_bit,
// err, res0 and res1 are valid. Every operation advances the nonce counter when it ends;
// every entry written with a new tag takes the current nonce and a tag from nc_mac, so
// tokens of an earlier incarnation of an entry no longer match.
//
//   create(a,len,user,perms): a direct, ref. count 0, 0 < len <= len_a. New direct
//       capability b over the first len bytes of a; a keeps the rest under its token
//       (returned in res1) or is destroyed when len = len_a. res0 = token of b.
//   merge(a,b): both direct, ref. count 0, unlocked, a ends where b starts. a grows by
//       len_b under its token (res0); b is destroyed.
//   derive(a,len,off,perms): off+len <= len_a, perms within a's. New indirect capability
//       (base_a+off, len, parent = token a, ref. count 1); a's ref. count +1. res0.
//   mkXonly(a): derive(a, len_a, 0, {X}); a must carry X.
//   lock(a,tid) / unlock(a,tid): set / clear the lock of a's owning direct capability;
//       lock needs the lockable bit and a free lock, unlock the same task id. res_bit.
//   clone(a): ref. count +1 (fails at the maximum). res_bit.
//   drop(a): ref. count -1, never below 1 while the owning capability is locked.
//       res_bit = 1 when a's count is then 0. An indirect capability whose count reaches
//       0 is destroyed and its parent is dropped in turn.
//   revoke(a): a direct. Deletes a's entry, zeroes the segment and inserts a fresh direct
//       capability (new number, R/W/X, lockable) for it. res0.
// New token types follow the segment length: up to 64 KiB type 2 (16-bit offset), up to
// 16 MiB type 3 (24-bit offset), otherwise type 0 (32-bit offset); perms[5] asks for the
// offset-less type 1. Numbers come from a counter starting at 1 (0 is the root).
//
// The operations and their rules follow the document. This design's choices: the
// initial reference counts, derive allowing off+len = len_a, mkXonly requiring X,
// merge requiring unlocked operands with count 0, the type selection and the numbering.
module nc_cap_ops
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] mac_key,

  input  logic        start,
  input  cap_op_e     op,
  input  token_t      cap_a,
  input  token_t      cap_b,
  input  logic [31:0] arg_len,
  input  logic [31:0] arg_off,
  input  logic [5:0]  arg_perms,   // [0]R [1]W [2]X [3]lockable [4]cow [5]no-offset token
  input  logic [63:0] arg_user,
  input  logic [TID_W-1:0] arg_tid,
  output logic        busy,
  output logic        done,
  output logic        res_bit,
  output op_err_e     err,
  output token_t      res0,
  output token_t      res1,
  output logic [31:0] nonce,

  // resolver
  output logic        rs_valid,
  input  logic        rs_ready,
  output token_t      rs_token,
  input  logic        rs_done,
  input  logic        rs_ok,
  input  cmt_entry_t  rs_leaf,
  input  cmt_loc_t    rs_leaf_loc,
  input  key_t        rs_leaf_key,
  input  cmt_entry_t  rs_owner,
  input  cmt_loc_t    rs_owner_loc,
  input  logic [7:0]  rs_depth,

  // CMT controller (insert / update / delete)
  output logic        cm_valid,
  input  logic        cm_ready,
  output cmt_cmd_e    cm_op,
  output key_t        cm_key,
  output cmt_loc_t    cm_loc,
  output cmt_entry_t  cm_entry,
  input  logic        cm_rsp_valid,
  input  logic        cm_rsp_ok,

  // zero filler
  output logic        zf_start,
  output logic [31:0] zf_base,
  output logic [31:0] zf_length,
  input  logic        zf_done
);

  typedef enum logic [4:0] {
    O_IDLE, O_RES, O_RESW, O_CMT, O_CMTW, O_FILL, O_FILLW,
    O_A, O_B, O_CREATE2, O_CREATE3, O_MERGE2, O_DERIVE2, O_DERIVE3,
    O_DROP2, O_REVOKE2, O_REVOKE3, O_REVOKE4, O_REVOKE5, O_FINISH
  } ostate_e;

  ostate_e state, ret;

  cap_op_e     q_op;
  token_t      q_a, q_b;
  logic [31:0] q_len, q_off;
  logic [5:0]  q_perms;
  logic [63:0] q_user;
  logic [TID_W-1:0] q_tid;

  logic        res_to_b;         // store the next resolver result as operand b
  cmt_entry_t  ea, oa, eb;
  cmt_loc_t    la, loa, lb;
  key_t        ka;
  logic [7:0]  da, db;
  logic        cok;
  logic        first_drop;

  logic [NUM_W-1:0] next_num;
  key_t        new_key;
  cmt_entry_t  new_e;
  tag_t        mac_tag;
  key_t        mac_k;
  cmt_entry_t  mac_e;

  nc_mac u_mac (.mac_key(mac_key), .key(mac_k), .entry(mac_e), .tag(mac_tag));

  function automatic logic [1:0] pick_type(input logic [31:0] len, input logic no_off);
    if (no_off)                  return 2'd1;
    else if (len <= 32'h1_0000)  return 2'd2;
    else if (len <= 32'h100_0000) return 2'd3;
    else                         return 2'd0;
  endfunction

  function automatic key_t make_key(input logic [1:0] t, input logic [NUM_W-1:0] n);
    return {t, num_trunc(t, n)};
  endfunction

  function automatic token_t key_token(input key_t k, input tag_t tg);
    return tok_encode(k[KEY_W-1 -: 2], tg, k[NUM_W-1:0]);
  endfunction

  // entry with its tag filled in: the MAC is combinational on (mac_k, mac_e)
  function automatic cmt_entry_t with_tag(input cmt_entry_t e, input tag_t t);
    cmt_entry_t r;
    r = e;
    r.tag = t;
    return r;
  endfunction

  assign busy      = (state != O_IDLE);
  assign rs_valid  = (state == O_RES);
  assign cm_valid  = (state == O_CMT);
  assign zf_start  = (state == O_FILL);
  assign zf_base   = ea.base;
  assign zf_length = ea.length;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= O_IDLE; ret <= O_IDLE;
      q_op <= OP_NOP; q_a <= '0; q_b <= '0; q_len <= '0; q_off <= '0; q_perms <= '0;
      q_user <= '0; q_tid <= '0;
      res_to_b <= 1'b0;
      ea <= '0; oa <= '0; eb <= '0; la <= '0; loa <= '0; lb <= '0; ka <= '0;
      da <= '0; db <= '0; cok <= 1'b0; first_drop <= 1'b0;
      next_num <= NUM_W'(1);
      new_key <= '0; new_e <= '0; mac_k <= '0; mac_e <= '0;
      rs_token <= '0;
      cm_op <= CMD_LOOKUP; cm_key <= '0; cm_loc <= '0; cm_entry <= '0;
      done <= 1'b0; res_bit <= 1'b0; err <= E_OK; res0 <= '0; res1 <= '0;
      nonce <= 32'd1;
    end else begin
      done <= 1'b0;
      unique case (state)
        O_IDLE: if (start) begin
          q_op <= op; q_a <= cap_a; q_b <= cap_b; q_len <= arg_len; q_off <= arg_off;
          q_perms <= arg_perms; q_user <= arg_user; q_tid <= arg_tid;
          res_bit <= 1'b0; err <= E_OK; res0 <= '0; res1 <= '0;
          first_drop <= 1'b1;
          if (op == OP_NOP || op > OP_MKXONLY) begin
            err   <= E_BADOP;
            state <= O_FINISH;
          end else begin
            rs_token <= cap_a;
            res_to_b <= 1'b0;
            ret      <= O_A;
            state    <= O_RES;
          end
        end

        // ------------------------------------------------ service calls
        O_RES:  if (rs_ready) state <= O_RESW;
        O_RESW: if (rs_done) begin
          if (res_to_b) begin eb <= rs_leaf; lb <= rs_leaf_loc; db <= rs_depth; end
          else begin
            ea <= rs_leaf; la <= rs_leaf_loc; ka <= rs_leaf_key; da <= rs_depth;
            oa <= rs_owner; loa <= rs_owner_loc;
          end
          state <= rs_ok ? ret : O_FINISH;
          if (!rs_ok) err <= E_INVALID;
        end
        O_CMT:  if (cm_ready) state <= O_CMTW;
        O_CMTW: if (cm_rsp_valid) begin
          cok   <= cm_rsp_ok;
          state <= ret;
        end
        O_FILL:  state <= O_FILLW;
        O_FILLW: if (zf_done) state <= ret;

        // ------------------------------------------------ operand a resolved
        O_A: begin
          unique case (q_op)
            OP_CREATE: begin
              if (ea.ctype != CT_DIRECT || da != '0) err <= E_TYPE;
              else if (ea.refcnt != '0)             err <= E_REFCNT;
              else if (q_len == '0 || q_len > ea.length) err <= E_ARG;
              if (ea.ctype != CT_DIRECT || da != '0 || ea.refcnt != '0 ||
                  q_len == '0 || q_len > ea.length) state <= O_FINISH;
              else begin
                new_key <= make_key(pick_type(q_len, q_perms[5]), next_num);
                next_num <= next_num + 1'b1;
                new_e <= '{ctype: CT_DIRECT, base: ea.base, length: q_len, refcnt: '0,
                           lock_holder: '0, aux: q_user, r: q_perms[0], w: q_perms[1],
                           x: q_perms[2], locked: 1'b0, lockable: q_perms[3],
                           cow: q_perms[4], tag: '0, nonce: nonce};
                mac_k <= make_key(pick_type(q_len, q_perms[5]), next_num);
                mac_e <= '{ctype: CT_DIRECT, base: ea.base, length: q_len, refcnt: '0,
                           lock_holder: '0, aux: q_user, r: q_perms[0], w: q_perms[1],
                           x: q_perms[2], locked: 1'b0, lockable: q_perms[3],
                           cow: q_perms[4], tag: '0, nonce: nonce};
                state <= O_CREATE2;
              end
            end
            OP_MERGE: begin
              rs_token <= q_b;
              res_to_b <= 1'b1;
              ret      <= O_B;
              state    <= O_RES;
            end
            OP_DERIVE, OP_MKXONLY: begin
              logic [32:0] span;
              logic [2:0]  p;
              logic [31:0] l, o;
              l = (q_op == OP_MKXONLY) ? ea.length : q_len;
              o = (q_op == OP_MKXONLY) ? 32'd0 : q_off;
              p = (q_op == OP_MKXONLY) ? 3'b100 : q_perms[2:0];
              span = 33'(o) + 33'(l);
              if (ea.ctype == CT_PAGED) begin err <= E_TYPE; state <= O_FINISH; end
              else if (span > 33'(ea.length) || (p & ~{ea.x, ea.w, ea.r}) != 3'b000) begin
                err <= E_ARG; state <= O_FINISH;
              end else if (ea.refcnt == 16'hFFFF) begin
                err <= E_REFCNT; state <= O_FINISH;
              end else begin
                new_key  <= make_key(pick_type(l, q_perms[5] && q_op == OP_DERIVE), next_num);
                next_num <= next_num + 1'b1;
                new_e <= '{ctype: CT_INDIRECT, base: ea.base + o, length: l, refcnt: 16'd1,
                           lock_holder: '0, aux: q_a, r: p[0], w: p[1], x: p[2],
                           locked: 1'b0, lockable: 1'b0, cow: ea.cow, tag: '0, nonce: nonce};
                mac_k <= make_key(pick_type(l, q_perms[5] && q_op == OP_DERIVE), next_num);
                mac_e <= '{ctype: CT_INDIRECT, base: ea.base + o, length: l, refcnt: 16'd1,
                           lock_holder: '0, aux: q_a, r: p[0], w: p[1], x: p[2],
                           locked: 1'b0, lockable: 1'b0, cow: ea.cow, tag: '0, nonce: nonce};
                state <= O_DERIVE2;
              end
            end
            OP_LOCK: begin
              if (oa.ctype == CT_DIRECT && oa.lockable && !oa.locked) begin
                cm_op    <= CMD_UPDATE;
                cm_loc   <= loa;
                cm_entry <= '{ctype: oa.ctype, base: oa.base, length: oa.length,
                              refcnt: oa.refcnt, lock_holder: q_tid[LOCK_W-1:0], aux: oa.aux,
                              r: oa.r, w: oa.w, x: oa.x, locked: 1'b1, lockable: oa.lockable,
                              cow: oa.cow, tag: oa.tag, nonce: oa.nonce};
                res_bit  <= 1'b1;
                ret      <= O_FINISH;
                state    <= O_CMT;
              end else begin
                err   <= E_LOCK;
                state <= O_FINISH;
              end
            end
            OP_UNLOCK: begin
              if (oa.locked && oa.lock_holder == q_tid[LOCK_W-1:0]) begin
                cm_op    <= CMD_UPDATE;
                cm_loc   <= loa;
                cm_entry <= '{ctype: oa.ctype, base: oa.base, length: oa.length,
                              refcnt: oa.refcnt, lock_holder: '0, aux: oa.aux,
                              r: oa.r, w: oa.w, x: oa.x, locked: 1'b0, lockable: oa.lockable,
                              cow: oa.cow, tag: oa.tag, nonce: oa.nonce};
                res_bit  <= 1'b1;
                ret      <= O_FINISH;
                state    <= O_CMT;
              end else begin
                err   <= E_LOCK;
                state <= O_FINISH;
              end
            end
            OP_CLONE: begin
              if (ea.refcnt == 16'hFFFF) begin
                err <= E_REFCNT; state <= O_FINISH;
              end else begin
                cm_op    <= CMD_UPDATE;
                cm_loc   <= la;
                cm_entry <= ea;
                cm_entry.refcnt <= ea.refcnt + 16'd1;
                res_bit  <= 1'b1;
                ret      <= O_FINISH;
                state    <= O_CMT;
              end
            end
            OP_DROP: begin
              logic [15:0] nc;
              if (oa.locked && ea.refcnt <= 16'd1) nc = ea.refcnt;
              else if (ea.refcnt == '0)              nc = '0;
              else                                   nc = ea.refcnt - 16'd1;
              if (first_drop) res_bit <= (nc == '0);
              first_drop <= 1'b0;
              if (ea.ctype == CT_INDIRECT && nc == '0) begin
                cm_op  <= CMD_DELETE;
                cm_loc <= la;
                ret    <= O_DROP2;
              end else begin
                cm_op    <= CMD_UPDATE;
                cm_loc   <= la;
                cm_entry <= ea;
                cm_entry.refcnt <= nc;
                ret      <= O_FINISH;
              end
              state <= O_CMT;
            end
            default: begin // OP_REVOKE
              if (ea.ctype != CT_DIRECT || da != '0) begin
                err <= E_TYPE; state <= O_FINISH;
              end else begin
                cm_op  <= CMD_DELETE;
                cm_loc <= la;
                ret    <= O_REVOKE2;
                state  <= O_CMT;
              end
            end
          endcase
        end

        // ------------------------------------------------ create
        O_CREATE2: begin
          cm_op    <= CMD_INSERT;
          cm_key   <= new_key;
          cm_entry <= with_tag(new_e, mac_tag);
          res0     <= key_token(new_key, mac_tag);
          ret      <= O_CREATE3;
          state    <= O_CMT;
        end
        O_CREATE3: begin
          if (!cok) begin
            err <= E_FULL; res0 <= '0; state <= O_FINISH;
          end else if (q_len == ea.length) begin
            cm_op  <= CMD_DELETE;
            cm_loc <= la;
            ret    <= O_FINISH;
            state  <= O_CMT;
          end else begin
            // a keeps its number, nonce and tag: only base and length change
            cm_op    <= CMD_UPDATE;
            cm_loc   <= la;
            cm_entry <= ea;
            cm_entry.base   <= ea.base + q_len;
            cm_entry.length <= ea.length - q_len;
            res1     <= key_token(ka, ea.tag);
            ret      <= O_FINISH;
            state    <= O_CMT;
          end
        end

        // ------------------------------------------------ merge
        O_B: begin
          if (ea.ctype != CT_DIRECT || da != '0 || eb.ctype != CT_DIRECT || db != '0) begin
            err <= E_TYPE; state <= O_FINISH;
          end else if (ea.refcnt != '0 || eb.refcnt != '0 || ea.locked || eb.locked) begin
            err <= E_REFCNT; state <= O_FINISH;
          end else if (33'(ea.base) + 33'(ea.length) != 33'(eb.base) ||
                       33'(ea.length) + 33'(eb.length) > 33'h0_FFFF_FFFF || la == lb) begin
            err <= E_ARG; state <= O_FINISH;
          end else begin
            cm_op  <= CMD_DELETE;
            cm_loc <= lb;
            ret    <= O_MERGE2;
            state  <= O_CMT;
          end
        end
        O_MERGE2: begin
          // a keeps its number, nonce and tag and grows by b
          cm_op    <= CMD_UPDATE;
          cm_loc   <= la;
          cm_entry <= ea;
          cm_entry.length <= ea.length + eb.length;
          res0     <= key_token(ka, ea.tag);
          ret      <= O_FINISH;
          state    <= O_CMT;
        end

        // ------------------------------------------------ derive / mkXonly
        O_DERIVE2: begin
          cm_op    <= CMD_INSERT;
          cm_key   <= new_key;
          cm_entry <= with_tag(new_e, mac_tag);
          res0     <= key_token(new_key, mac_tag);
          ret      <= O_DERIVE3;
          state    <= O_CMT;
        end
        O_DERIVE3: begin
          if (!cok) begin
            err <= E_FULL; res0 <= '0; state <= O_FINISH;
          end else begin
            // the parent gains a reference
            cm_op    <= CMD_UPDATE;
            cm_loc   <= la;
            cm_entry <= ea;
            cm_entry.refcnt <= ea.refcnt + 16'd1;
            ret      <= O_FINISH;
            state    <= O_CMT;
          end
        end

        // ------------------------------------------------ drop: continue with the parent
        O_DROP2: begin
          rs_token <= ea.aux;
          res_to_b <= 1'b0;
          ret      <= O_A;
          state    <= O_RES;
        end

        // ------------------------------------------------ revoke
        O_REVOKE2: begin
          ret   <= O_REVOKE3;
          state <= O_FILL;
        end
        O_REVOKE3: begin
          new_key  <= make_key(ka[KEY_W-1 -: 2], next_num);
          next_num <= next_num + 1'b1;
          new_e <= '{ctype: CT_DIRECT, base: ea.base, length: ea.length, refcnt: '0,
                     lock_holder: '0, aux: ea.aux, r: 1'b1, w: 1'b1, x: 1'b1,
                     locked: 1'b0, lockable: 1'b1, cow: 1'b0, tag: '0, nonce: nonce};
          mac_k <= make_key(ka[KEY_W-1 -: 2], next_num);
          mac_e <= '{ctype: CT_DIRECT, base: ea.base, length: ea.length, refcnt: '0,
                     lock_holder: '0, aux: ea.aux, r: 1'b1, w: 1'b1, x: 1'b1,
                     locked: 1'b0, lockable: 1'b1, cow: 1'b0, tag: '0, nonce: nonce};
          state <= O_REVOKE4;
        end
        O_REVOKE4: begin
          cm_op    <= CMD_INSERT;
          cm_key   <= new_key;
          cm_entry <= with_tag(new_e, mac_tag);
          res0     <= key_token(new_key, mac_tag);
          ret      <= O_REVOKE5;
          state    <= O_CMT;
        end
        O_REVOKE5: begin
          if (!cok) begin err <= E_FULL; res0 <= '0; end
          state <= O_FINISH;
        end

        // ------------------------------------------------ end of every operation
        default: begin
          nonce <= nonce + 32'd1;
          done  <= 1'b1;
          state <= O_IDLE;
        end
      endcase
    end
  end

endmodule
