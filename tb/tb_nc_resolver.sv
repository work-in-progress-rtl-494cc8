// tb_nc_resolver: self-checking test of nc_resolver, the token validation and
// parent-chain walk.
//
// The CMT controller is replaced by a behavioural responder in the testbench: an
// associative table from {key, tag} to entry, answering each lookup after a random delay
// with a random ready stall before it. The test builds direct and paged-out owners and
// chains of indirect capabilities of depth 0..10 (each indirect entry's aux word holding
// its parent's token), then resolves tokens with random offsets. Checks: ok/fault
// (F_INVALID for a forged tag or a revoked ancestor anywhere in the chain, F_DEPTH beyond
// MAX_DEPTH=8), leaf and owner entries and keys, chain depth, offset passthrough, that
// exactly depth+1 lookups were made, and that `done` is a single pulse per request.
// Inputs change on the falling edge. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_resolver;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       req_valid = 0, req_ready;
  token_t     req_token = 0;
  logic       done, ok;
  fault_e     fault;
  cmt_entry_t leaf, owner;
  cmt_loc_t   leaf_loc, owner_loc;
  key_t       leaf_key, owner_key;
  logic [31:0] offset;
  logic [7:0] depth;
  logic       cmt_valid, cmt_ready, cmt_rsp_valid, cmt_rsp_ok;
  key_t       cmt_key;
  tag_t       cmt_tag;
  cmt_entry_t cmt_rsp_entry;
  cmt_loc_t   cmt_rsp_loc;

  nc_resolver #(.MAX_DEPTH(8)) dut (.*);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- CMT responder
  cmt_entry_t table_e [logic [63:0]];   // index {tag, key}
  int         lookups = 0;
  logic       busy = 0;
  int         delay;
  key_t       q_key; tag_t q_tag;

  logic stall = 0;
  assign cmt_ready = !busy && !stall;
  always @(posedge clk) begin
    stall <= ($urandom_range(0, 3) == 0);
    cmt_rsp_valid <= 1'b0;
    if (!busy && cmt_valid && cmt_ready) begin
      busy <= 1; delay <= $urandom_range(0, 4); q_key <= cmt_key; q_tag <= cmt_tag;
      lookups++;
    end else if (busy) begin
      if (delay == 0) begin
        busy <= 0;
        cmt_rsp_valid <= 1'b1;
        cmt_rsp_ok    <= table_e.exists({q_tag, q_key});
        cmt_rsp_entry <= table_e.exists({q_tag, q_key}) ? table_e[{q_tag, q_key}] : '0;
        cmt_rsp_loc   <= '{ovf: 1'b0, idx: CMT_AW'(q_key)};
      end else delay <= delay - 1;
    end
  end

  int done_pulses = 0;
  always @(posedge clk) if (done) done_pulses++;

  // ---------------------------------------------------------------- capability builder
  int unsigned next_n = 1;
  function automatic token_t add(input ctype_e ct, input token_t parent, output key_t k);
    cmt_entry_t e;
    tag_t t;
    logic [1:0] ty;
    ty = 2'($urandom_range(0, 3));
    if (ty == 0) ty = 2;
    k = {ty, 46'(next_n)}; next_n++;
    t = 16'($urandom);
    e = '0; e.ctype = ct; e.base = $urandom; e.length = $urandom; e.r = 1; e.tag = t;
    e.nonce = $urandom;
    if (ct == CT_INDIRECT) e.aux = parent;
    table_e[{t, k}] = e;
    return tok_encode(ty, t, k[45:0]);
  endfunction

  task automatic resolve(input token_t tok, output int cyc);
    int d0;
    d0 = done_pulses;
    @(negedge clk);
    req_valid = 1; req_token = tok;
    while (!req_ready) @(negedge clk);
    @(negedge clk); req_valid = 0;
    cyc = 0;
    while (!done && cyc < 2000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(done_pulses == d0 + 1, "one done pulse");
  endtask

  initial begin
    #5_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    int cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      token_t chain [$];
      key_t   keys [$];
      key_t   k;
      token_t t, q;
      int     d, l0, kill;
      bit     paged, forge;
      cmt_entry_t le, oe;
      logic [31:0] off;
      d = $urandom_range(0, 10);
      paged = ($urandom_range(0, 7) == 0);
      forge = ($urandom_range(0, 9) == 0);
      kill  = ($urandom_range(0, 9) == 0) ? $urandom_range(0, d) : -1;
      t = add(paged ? CT_PAGED : CT_DIRECT, '0, k);
      chain.push_front(t); keys.push_front(k);
      for (int i = 0; i < d; i++) begin
        t = add(CT_INDIRECT, t, k);
        chain.push_front(t); keys.push_front(k);
      end
      // chain[0] is the leaf, chain[d] the owner
      le = table_e[{chain[0][61:46], keys[0]}];
      oe = table_e[{chain[d][61:46], keys[d]}];
      if (kill >= 0) table_e.delete({chain[kill][61:46], keys[kill]});
      q = chain[0];
      if (forge) q[50] = ~q[50];
      off = 0;
      case (q[63:62])
        2'd2: begin off = 32'($urandom_range(0, 65535)); q[15:0] = off[15:0]; end
        2'd3: begin off = 32'($urandom_range(0, 1 << 24)); off[31:24] = 0; q[23:0] = off[23:0]; end
        default: ;
      endcase
      l0 = lookups;
      resolve(q, cyc);
      if (forge) begin
        check(!ok && fault == F_INVALID, "forged tag refused");
        check(lookups - l0 == 1, "forged token costs one lookup");
      end else if (kill >= 0 && kill <= 8) begin
        check(!ok && fault == F_INVALID, $sformatf("revoked ancestor at %0d of %0d invalidates", kill, d));
        check(lookups - l0 == kill + 1, "walk stops at the revoked entry");
      end else if (d > 8) begin
        check(!ok && fault == F_DEPTH, $sformatf("chain depth %0d over the limit", d));
      end else begin
        check(ok && fault == F_NONE, $sformatf("chain depth %0d resolves", d));
        check(leaf == le && leaf_key == keys[0], "leaf entry");
        check(owner == oe && owner_key == keys[d] && owner.ctype == (paged ? CT_PAGED : CT_DIRECT), "owner entry");
        check(depth == 8'(d), "depth reported");
        check(offset == off, "offset passed through");
        check(lookups - l0 == d + 1, "depth+1 lookups");
        check(leaf_loc.idx == CMT_AW'(keys[0]) && owner_loc.idx == CMT_AW'(keys[d]), "locations");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
