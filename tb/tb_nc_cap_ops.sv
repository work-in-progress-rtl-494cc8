// tb_nc_cap_ops: self-checking test of nc_cap_ops, the capability-operation unit.
//
// The unit runs against the real resolver, CMT controller (on nc_cmt_mem_model) and zero
// filler (on nc_axi_mem_model), wired as in the northbridge: the resolver's lookups and
// the unit's table writes share the controller's command port. While the unit is idle
// the testbench uses the same resolver to inspect capabilities. Directed sequences cover
// every operation and its refusals: create (token type by length, offset-less type,
// remainder keeps its token, whole-segment create), derive (entry, parent count, bounds
// and permission refusals), mkXonly, lock/unlock (holder rules, lockable bit), clone,
// recursive drop, merge (adjacency, reference rules), revoke (old token and derived
// tokens invalid, fresh token valid, segment zeroed, neighbours intact), forged operands
// and the nonce advancing once per operation. A random phase then creates, derives,
// clones and drops many capabilities and checks reference counts against a scoreboard.
// Inputs change on the falling edge. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_cap_ops;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- operation unit
  logic        start = 0;
  cap_op_e     op = OP_NOP;
  token_t      cap_a = 0, cap_b = 0;
  logic [31:0] arg_len = 0, arg_off = 0;
  logic [5:0]  arg_perms = 0;
  logic [63:0] arg_user = 0;
  logic [TID_W-1:0] arg_tid = 0;
  logic        busy, done, res_bit;
  op_err_e     err;
  token_t      res0, res1;
  logic [31:0] nonce;

  logic        ox_rs_valid, rv_ready, rv_done, rv_ok;
  token_t      ox_rs_token;
  cmt_entry_t  rv_leaf, rv_owner;
  cmt_loc_t    rv_leaf_loc, rv_owner_loc;
  key_t        rv_leaf_key, rv_owner_key;
  fault_e      rv_fault;
  logic [31:0] rv_offset;
  logic [7:0]  rv_depth;
  logic        ox_cm_valid, cc_ready, cc_rsp_valid, cc_rsp_ok;
  cmt_cmd_e    ox_cm_op;
  key_t        ox_cm_key;
  cmt_loc_t    ox_cm_loc;
  cmt_entry_t  ox_cm_entry;
  logic        zf_start, zf_done, zf_busy;
  logic [31:0] zf_base, zf_length, zf_words;

  nc_cap_ops dut (
    .clk, .rst_n, .mac_key(64'h0123_4567_89AB_CDEF),
    .start, .op, .cap_a, .cap_b, .arg_len, .arg_off, .arg_perms, .arg_user, .arg_tid,
    .busy, .done, .res_bit, .err, .res0, .res1, .nonce,
    .rs_valid(ox_rs_valid), .rs_ready(rv_ready), .rs_token(ox_rs_token), .rs_done(rv_done),
    .rs_ok(rv_ok), .rs_leaf(rv_leaf), .rs_leaf_loc(rv_leaf_loc), .rs_leaf_key(rv_leaf_key),
    .rs_owner(rv_owner), .rs_owner_loc(rv_owner_loc), .rs_depth(rv_depth),
    .cm_valid(ox_cm_valid), .cm_ready(cc_ready), .cm_op(ox_cm_op), .cm_key(ox_cm_key),
    .cm_loc(ox_cm_loc), .cm_entry(ox_cm_entry), .cm_rsp_valid(cc_rsp_valid),
    .cm_rsp_ok(cc_rsp_ok), .zf_start, .zf_base, .zf_length, .zf_done);

  // ---------------------------------------------------------------- resolver (shared)
  logic   tb_rs_valid = 0;
  token_t tb_rs_token = 0;
  logic   rv_valid;
  token_t rv_token;
  assign rv_valid = busy ? ox_rs_valid : tb_rs_valid;
  assign rv_token = busy ? ox_rs_token : tb_rs_token;

  logic       rc_valid, rc_ready;
  key_t       rc_key;
  tag_t       rc_tag;
  nc_resolver #(.MAX_DEPTH(8)) u_res (
    .clk, .rst_n, .req_valid(rv_valid), .req_ready(rv_ready), .req_token(rv_token),
    .done(rv_done), .ok(rv_ok), .fault(rv_fault), .leaf(rv_leaf), .leaf_loc(rv_leaf_loc),
    .leaf_key(rv_leaf_key), .owner(rv_owner), .owner_loc(rv_owner_loc),
    .owner_key(rv_owner_key), .offset(rv_offset), .depth(rv_depth),
    .cmt_valid(rc_valid), .cmt_ready(rc_ready), .cmt_key(rc_key), .cmt_tag(rc_tag),
    .cmt_rsp_valid(cc_rsp_valid), .cmt_rsp_ok(cc_rsp_ok), .cmt_rsp_entry(cc_rsp_entry),
    .cmt_rsp_loc(cc_rsp_loc));
  assign rc_ready = cc_ready;

  // ---------------------------------------------------------------- CMT controller
  logic       cc_valid;
  cmt_cmd_e   cc_op;
  key_t       cc_key;
  tag_t       cc_tag;
  cmt_loc_t   cc_loc, cc_rsp_loc;
  cmt_entry_t cc_entry, cc_rsp_entry;
  always_comb begin
    if (rc_valid) begin
      cc_valid = 1'b1; cc_op = CMD_LOOKUP; cc_key = rc_key; cc_tag = rc_tag;
      cc_loc = '0; cc_entry = '0;
    end else begin
      cc_valid = ox_cm_valid; cc_op = ox_cm_op; cc_key = ox_cm_key; cc_tag = '0;
      cc_loc = ox_cm_loc; cc_entry = ox_cm_entry;
    end
  end
  assign cc_ready = u_cmt.cmd_ready;

  logic       m_valid, m_ready, m_we, m_rsp_valid;
  logic [CMT_AW-1:0] m_idx;
  cmt_entry_t m_wdata, m_rdata;
  logic       st_init_done, st_expanding, st_shadow_ready, st_freed;
  logic [CMT_AW-1:0] st_act_start;
  logic [7:0] st_act_bits, st_act_sel;
  logic [CMT_AW:0] st_act_count, st_shd_count;
  logic [2:0] st_ovf_count;
  logic [31:0] st_moves, st_promotions;
  logic       cmd_ready_unused;

  nc_cmt_ctrl #(.INIT_START(0), .INIT_BITS(6), .MAX_BITS(8), .OVF_N(4)) u_cmt (
    .clk, .rst_n, .cmd_valid(cc_valid), .cmd_ready(cmd_ready_unused), .cmd_op(cc_op),
    .cmd_key(cc_key), .cmd_tag(cc_tag), .cmd_loc(cc_loc), .cmd_entry(cc_entry),
    .rsp_valid(cc_rsp_valid), .rsp_ok(cc_rsp_ok), .rsp_entry(cc_rsp_entry),
    .rsp_loc(cc_rsp_loc), .shadow_wr(1'b0), .shadow_start('0), .freed_clr(1'b0),
    .st_init_done, .st_expanding, .st_shadow_ready, .st_freed, .st_act_start,
    .st_act_bits, .st_act_sel, .st_act_count, .st_shd_count, .st_ovf_count, .st_moves,
    .st_promotions, .mem_req_valid(m_valid), .mem_req_ready(m_ready), .mem_req_we(m_we),
    .mem_req_idx(m_idx), .mem_req_wdata(m_wdata), .mem_rsp_valid(m_rsp_valid),
    .mem_rsp_rdata(m_rdata));
  nc_cmt_mem_model #(.DEPTH(64), .LATENCY(2)) u_cmtmem (
    .clk, .rst_n, .req_valid(m_valid), .req_ready(m_ready), .req_we(m_we), .req_idx(m_idx),
    .req_wdata(m_wdata), .rsp_valid(m_rsp_valid), .rsp_rdata(m_rdata));

  // ---------------------------------------------------------------- zero filler + memory
  logic   aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready, ar_ready, r_valid;
  dn_ax_t aw;
  w_t     w;
  r_t     r;
  logic [1:0] b_resp;
  int unsigned n_writes, n_reads, n_wbeats;
  nc_zero_fill u_zf (.clk, .rst_n, .start(zf_start), .base(zf_base), .length(zf_length),
    .busy(zf_busy), .done(zf_done), .words_written(zf_words), .aw_valid, .aw_ready, .aw,
    .w_valid, .w_ready, .w, .b_valid, .b_ready);
  nc_axi_mem_model #(.AW(16)) u_mem (.clk, .rst_n, .aw_valid, .aw_ready, .aw, .w_valid,
    .w_ready, .w, .b_valid, .b_ready, .b_resp, .ar_valid(1'b0), .ar_ready, .ar('0),
    .r_valid, .r_ready(1'b0), .r, .n_writes, .n_reads, .n_wbeats);

  // ---------------------------------------------------------------- helpers
  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic run(input cap_op_e o, input token_t a, input token_t b, input logic [31:0] len,
                     input logic [31:0] off, input logic [5:0] perms, input logic [63:0] tid,
                     output op_err_e e, output logic rb, output token_t t0, output token_t t1);
    logic [31:0] n0;
    int cyc = 0;
    n0 = nonce;
    @(negedge clk);
    op = o; cap_a = a; cap_b = b; arg_len = len; arg_off = off; arg_perms = perms;
    arg_tid = tid; arg_user = 64'hFEED_0000 + 64'(o); start = 1;
    @(negedge clk); start = 0;
    while (!done && cyc < 100000) begin @(negedge clk); cyc++; end
    e = err; rb = res_bit; t0 = res0; t1 = res1;
    @(negedge clk);
    check(nonce == n0 + 1, "nonce advances once per operation");
  endtask

  // inspect a token with the resolver while the unit is idle
  task automatic inspect(input token_t t, output logic okq, output cmt_entry_t lf,
                         output cmt_entry_t ow, output logic [7:0] dp);
    int cyc = 0;
    @(negedge clk);
    tb_rs_valid = 1; tb_rs_token = t;
    while (!rv_ready) @(negedge clk);
    @(negedge clk); tb_rs_valid = 0;
    while (!rv_done && cyc < 10000) begin @(negedge clk); cyc++; end
    okq = rv_ok; lf = rv_leaf; ow = rv_owner; dp = rv_depth;
  endtask

  function automatic bit all_zero(input int a, input int l);
    for (int i = a; i < a + l; i++) if (u_mem.peek(i) != 0) return 0;
    return 1;
  endfunction

  initial begin
    #50_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  // ---------------------------------------------------------------- test
  initial begin
    op_err_e e; logic rb, okq; token_t t0, t1;
    token_t root, s1, s2, s3, big, d1, d2, x1, rv1;
    cmt_entry_t lf, ow; logic [7:0] dp;
    root = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!st_init_done) @(negedge clk);

    // -------- create
    run(OP_CREATE, root, 0, 32'h100, 0, 6'b001011, 0, e, rb, s1, t1);
    check(e == E_OK && s1[63:62] == 2'd2, "create 256 B gives a type-2 token");
    check(t1 == root, "remainder keeps the root token");
    inspect(s1, okq, lf, ow, dp);
    check(okq && lf.ctype == CT_DIRECT && lf.base == 0 && lf.length == 32'h100 && lf.r && lf.w &&
          !lf.x && lf.lockable && !lf.cow && lf.refcnt == 0 && lf.aux == 64'hFEED_0001 && dp == 0,
          "created entry");
    inspect(root, okq, lf, ow, dp);
    check(okq && lf.base == 32'h100 && lf.length == 32'hFFFF_FEFF, "root shrank from below");
    run(OP_CREATE, root, 0, 32'h100, 0, 6'b000111, 0, e, rb, s2, t1);
    check(e == E_OK, "second create");
    inspect(s2, okq, lf, ow, dp);
    check(okq && lf.base == 32'h100, "segments are consecutive");
    run(OP_CREATE, root, 0, 32'h2_0000, 0, 6'b000011, 0, e, rb, big, t1);
    check(e == E_OK && big[63:62] == 2'd3, "create 128 KiB gives a type-3 token");
    run(OP_CREATE, root, 0, 32'h40, 0, 6'b100011, 0, e, rb, t0, t1);
    check(e == E_OK && t0[63:62] == 2'd1, "perms[5] gives an offset-less type-1 token");
    run(OP_CREATE, root, 0, 32'h200_0000, 0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_OK && t0[63:62] == 2'd0, "create 32 MiB gives a type-0 token");
    run(OP_CREATE, s1, 0, 32'h101, 0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_ARG, "create longer than the operand refused");
    run(OP_CREATE, s1, 0, 32'h0, 0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_ARG, "zero-length create refused");
    t0 = s1; t0[47] = ~t0[47];
    run(OP_CREATE, t0, 0, 32'h10, 0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_INVALID, "forged operand refused");
    run(OP_CREATE, s2, 0, 32'h100, 0, 6'b000111, 0, e, rb, s3, t1);
    check(e == E_OK, "create over the whole segment");
    inspect(s2, okq, lf, ow, dp);
    check(!okq, "whole-segment create destroys the operand");
    inspect(s3, okq, lf, ow, dp);
    check(okq && lf.base == 32'h100 && lf.length == 32'h100 && lf.x, "and the new capability covers it");

    // -------- derive
    run(OP_DERIVE, s1, 0, 32'h20, 32'h40, 6'b000001, 0, e, rb, d1, t1);
    check(e == E_OK, "derive");
    inspect(d1, okq, lf, ow, dp);
    check(okq && lf.ctype == CT_INDIRECT && lf.base == 32'h40 && lf.length == 32'h20 && lf.r &&
          !lf.w && lf.refcnt == 1 && lf.aux == s1 && dp == 1 && ow.base == 0, "derived entry");
    inspect(s1, okq, lf, ow, dp);
    check(lf.refcnt == 1, "parent count incremented");
    run(OP_DERIVE, s1, 0, 32'h20, 32'hF0, 6'b000001, 0, e, rb, t0, t1);
    check(e == E_ARG, "derive beyond the end refused");
    run(OP_DERIVE, d1, 0, 32'h10, 32'h0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_ARG, "derive with more permissions refused");
    run(OP_DERIVE, d1, 0, 32'h20, 32'h0, 6'b000001, 0, e, rb, d2, t1);
    check(e == E_OK, "derive of the whole derived range");
    inspect(d2, okq, lf, ow, dp);
    check(okq && dp == 2 && lf.base == 32'h40, "second-level derive");
    run(OP_CREATE, s1, 0, 32'h10, 0, 6'b000011, 0, e, rb, t0, t1);
    check(e == E_REFCNT, "create refused while derived capabilities exist");

    // -------- mkXonly
    run(OP_MKXONLY, s1, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_ARG, "mkXonly of a capability without X refused");
    run(OP_MKXONLY, s3, 0, 0, 0, 0, 0, e, rb, x1, t1);
    check(e == E_OK, "mkXonly");
    inspect(x1, okq, lf, ow, dp);
    check(okq && lf.x && !lf.r && !lf.w && lf.length == 32'h100, "execute-only entry");

    // -------- lock / unlock
    run(OP_LOCK, d1, 0, 0, 0, 0, 64'h11, e, rb, t0, t1);
    check(e == E_OK && rb, "lock through a derived capability");
    inspect(s1, okq, lf, ow, dp);
    check(lf.locked && lf.lock_holder == 55'h11, "owner locked by the task");
    run(OP_LOCK, s1, 0, 0, 0, 0, 64'h22, e, rb, t0, t1);
    check(e == E_LOCK, "second lock refused");
    run(OP_UNLOCK, s1, 0, 0, 0, 0, 64'h22, e, rb, t0, t1);
    check(e == E_LOCK, "unlock by another task refused");
    run(OP_UNLOCK, s1, 0, 0, 0, 0, 64'h11, e, rb, t0, t1);
    check(e == E_OK && rb, "unlock by the holder");
    run(OP_LOCK, big, 0, 0, 0, 0, 64'h11, e, rb, t0, t1);
    check(e == E_LOCK, "lock of a non-lockable capability refused");

    // -------- clone / drop (recursive)
    run(OP_CLONE, d2, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && rb, "clone");
    inspect(d2, okq, lf, ow, dp);
    check(lf.refcnt == 2, "clone increments the count");
    run(OP_DROP, d2, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && !rb, "drop to 1");
    run(OP_DROP, d2, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && rb, "drop to 0");
    inspect(d2, okq, lf, ow, dp);
    check(!okq, "indirect capability at count 0 destroyed");
    inspect(d1, okq, lf, ow, dp);
    check(okq && lf.refcnt == 1, "its parent dropped in turn");
    run(OP_LOCK, s1, 0, 0, 0, 0, 64'h5, e, rb, t0, t1);
    run(OP_DROP, d1, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && !rb, "drop at 1 under a lock");
    inspect(d1, okq, lf, ow, dp);
    check(okq && lf.refcnt == 1, "locked owner keeps the count at 1");
    run(OP_UNLOCK, s1, 0, 0, 0, 0, 64'h5, e, rb, t0, t1);
    run(OP_DROP, d1, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && rb, "drop after unlock");
    inspect(d1, okq, lf, ow, dp);
    check(!okq, "derived capability gone");
    inspect(s1, okq, lf, ow, dp);
    check(okq && lf.refcnt == 0, "owner count back to 0");

    // -------- merge
    run(OP_MERGE, s1, x1, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_TYPE, "merge with an indirect capability refused");
    run(OP_MERGE, s1, s3, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_REFCNT, "merge refused while s3 has a derived capability");
    run(OP_DROP, x1, 0, 0, 0, 0, 0, e, rb, t0, t1);
    run(OP_MERGE, s3, s1, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_ARG, "merge of non-adjacent order refused");
    run(OP_MERGE, s1, s3, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_OK && t0 == s1, "merge keeps a's token");
    inspect(s1, okq, lf, ow, dp);
    check(okq && lf.base == 0 && lf.length == 32'h200, "merged segment");
    inspect(s3, okq, lf, ow, dp);
    check(!okq, "merged-away capability destroyed");

    // -------- revoke
    run(OP_DERIVE, s1, 0, 32'h10, 32'h0, 6'b000001, 0, e, rb, d1, t1);
    check(u_mem.peek(32'h1FF) == 8'(32'h1FF * 7 + 3) && u_mem.peek(32'h200) == 8'(32'h200 * 7 + 3),
          "segment holds data before revoke");
    run(OP_REVOKE, d1, 0, 0, 0, 0, 0, e, rb, t0, t1);
    check(e == E_TYPE, "revoke of an indirect capability refused");
    run(OP_REVOKE, s1, 0, 0, 0, 0, 0, e, rb, rv1, t1);
    check(e == E_OK && rv1 != s1, "revoke gives a new token");
    inspect(s1, okq, lf, ow, dp);
    check(!okq, "old token invalid");
    inspect(d1, okq, lf, ow, dp);
    check(!okq, "derived token invalid");
    inspect(rv1, okq, lf, ow, dp);
    check(okq && lf.base == 0 && lf.length == 32'h200 && lf.r && lf.w && lf.x && lf.lockable &&
          lf.refcnt == 0, "fresh capability for the segment");
    check(all_zero(0, 32'h200), "segment zeroed");
    check(u_mem.peek(32'h200) == 8'(32'h200 * 7 + 3), "neighbour untouched");

    // -------- random create / derive / clone / drop against a reference-count model
    begin
      token_t pool [$];
      int     cnt  [token_t];
      token_t par  [token_t];
      bit     ind  [token_t];
      for (int i = 0; i < 6; i++) begin
        run(OP_CREATE, big, 0, 32'h400, 0, 6'b000111, 0, e, rb, t0, t1);
        check(e == E_OK, "pool create");
        pool.push_back(t0); cnt[t0] = 0; ind[t0] = 0;
      end
      for (int it = 0; it < 80; it++) begin
        automatic token_t p = pool[$urandom_range(0, pool.size() - 1)];
        automatic int k = $urandom_range(0, 2);
        if (k == 0) begin
          run(OP_DERIVE, p, 0, 32'h8, 0, 6'b000001, 0, e, rb, t0, t1);
          if (e == E_OK) begin
            pool.push_back(t0); cnt[t0] = 1; ind[t0] = 1; par[t0] = p; cnt[p]++;
          end else check(e == E_FULL, $sformatf("derive fails only on a full table (err %0d, it %0d)", e, it));
        end else if (k == 1) begin
          run(OP_CLONE, p, 0, 0, 0, 0, 0, e, rb, t0, t1);
          check(e == E_OK, $sformatf("clone (err %0d, it %0d)", e, it));
          cnt[p]++;
        end else begin
          run(OP_DROP, p, 0, 0, 0, 0, 0, e, rb, t0, t1);
          check(e == E_OK, "drop");
          if (cnt[p] > 0) cnt[p]--;
          check(rb == (cnt[p] == 0), "drop result bit");
          while (ind[p] && cnt[p] == 0) begin        // destroyed: the parent is dropped
            automatic token_t q = par[p];
            inspect(p, okq, lf, ow, dp);
            check(!okq, "dropped indirect capability destroyed");
            foreach (pool[j]) if (pool[j] == p) begin pool.delete(j); break; end
            cnt.delete(p); ind.delete(p); par.delete(p);
            p = q;
            if (cnt[p] > 0) cnt[p]--;
          end
        end
      end
      foreach (pool[j]) begin
        inspect(pool[j], okq, lf, ow, dp);
        check(okq && lf.refcnt == 16'(cnt[pool[j]]), $sformatf("reference count of %h", pool[j]));
      end
      $display("random phase: %0d capabilities live", pool.size());
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
