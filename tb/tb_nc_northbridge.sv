// tb_nc_northbridge: end-to-end test of the capability northbridge.
//
// A bus-master model drives the upstream port; the data stores and the CMT region are
// behavioural memories. The test boots through the root capability (plain 32-bit
// addresses), carves segments with create, derives indirect capabilities two levels
// deep, and checks forwarding and translation, every refusal path (forged tag, bounds,
// permission, lock holder, revoked parent, copy-on-write with IRQ), lock/unlock,
// clone/drop with recursive destruction, mkXonly with instruction fetches, revoke with
// zero-fill, and merge. The CMT starts with 4 slots so that inserts collide: the test
// supplies shadow tables and checks that the table expands, rehashes entries on access,
// promotes the shadow table, and spills to the overflow buffer when no shadow table is
// available. Access latency is checked to grow with the capability-chain depth, with one
// CMT read per chain level outside expansion. Expected data comes from the memory
// model's known initial pattern (byte a holds a*7+3) and from what the test wrote.
module tb_nc_northbridge;
  import nc_pkg::*;

  localparam logic [31:0] MMIO = 32'hFFFF_0000;
  localparam int unsigned CMT_DEPTH = 256;   // CMT region of the memory model, in slots

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_fwd = 0, n_err_bounds = 0, n_err_perm = 0, n_err_forged = 0, n_err_lock = 0,
      n_err_revoked = 0, n_cow_irq = 0, n_expand = 0, n_moves = 0, n_promote = 0,
      n_ovf = 0, n_zero = 0, n_merge = 0, n_exec = 0, n_recursive_drop = 0, n_legacy = 0,
      n_full = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------------ DUT and models
  logic s_aw_valid, s_aw_ready, s_w_valid, s_w_ready, s_b_valid, s_b_ready;
  logic s_ar_valid, s_ar_ready, s_r_valid, s_r_ready;
  up_ax_t s_aw, s_ar;
  w_t s_w;
  logic [1:0] s_b_resp;
  r_t s_r;
  logic m_aw_valid, m_aw_ready, m_w_valid, m_w_ready, m_b_valid, m_b_ready;
  logic m_ar_valid, m_ar_ready, m_r_valid, m_r_ready;
  dn_ax_t m_aw, m_ar;
  w_t m_w;
  logic [1:0] m_b_resp;
  r_t m_r;
  logic cmt_req_valid, cmt_req_ready, cmt_req_we, cmt_rsp_valid;
  logic [CMT_AW-1:0] cmt_req_idx;
  cmt_entry_t cmt_req_wdata, cmt_rsp_rdata;
  logic irq;
  int unsigned n_writes, n_reads, n_wbeats;

  nc_northbridge #(.CMT_INIT_BITS(2), .CMT_MAX_BITS(8)) dut (
    .clk, .rst_n, .mac_key(64'h0123_4567_89AB_CDEF), .irq,
    .s_aw_valid, .s_aw_ready, .s_aw, .s_w_valid, .s_w_ready, .s_w, .s_b_valid, .s_b_ready,
    .s_b_resp, .s_ar_valid, .s_ar_ready, .s_ar, .s_r_valid, .s_r_ready, .s_r,
    .m_aw_valid, .m_aw_ready, .m_aw, .m_w_valid, .m_w_ready, .m_w, .m_b_valid, .m_b_ready,
    .m_b_resp, .m_ar_valid, .m_ar_ready, .m_ar, .m_r_valid, .m_r_ready, .m_r,
    .cmt_req_valid, .cmt_req_ready, .cmt_req_we, .cmt_req_idx, .cmt_req_wdata,
    .cmt_rsp_valid, .cmt_rsp_rdata
  );

  nc_axi_mem_model #(.AW(16)) u_mem (
    .clk, .rst_n, .aw_valid(m_aw_valid), .aw_ready(m_aw_ready), .aw(m_aw),
    .w_valid(m_w_valid), .w_ready(m_w_ready), .w(m_w), .b_valid(m_b_valid),
    .b_ready(m_b_ready), .b_resp(m_b_resp), .ar_valid(m_ar_valid), .ar_ready(m_ar_ready),
    .ar(m_ar), .r_valid(m_r_valid), .r_ready(m_r_ready), .r(m_r),
    .n_writes, .n_reads, .n_wbeats
  );

  nc_cmt_mem_model #(.DEPTH(CMT_DEPTH), .LATENCY(2)) u_cmtmem (
    .clk, .rst_n, .req_valid(cmt_req_valid), .req_ready(cmt_req_ready), .req_we(cmt_req_we),
    .req_idx(cmt_req_idx), .req_wdata(cmt_req_wdata), .rsp_valid(cmt_rsp_valid),
    .rsp_rdata(cmt_rsp_rdata)
  );

  int unsigned cmt_reads = 0;
  always @(posedge clk) if (cmt_req_valid && cmt_req_ready && !cmt_req_we) cmt_reads++;

  // ------------------------------------------------------------------ bus master
  function automatic token_t at(input token_t t, input logic [31:0] off);
    token_t r;
    r = t;
    unique case (t[63:62])
      2'd0:    r[31:0] = off;
      2'd1:    ;
      2'd2:    r[15:0] = off[15:0];
      default: r[23:0] = off[23:0];
    endcase
    return r;
  endfunction

  // Inputs change at the falling edge; a handshake completes at the rising edge that
  // follows a falling edge at which valid and ready were both high.
  task automatic wr(input token_t a, input logic [63:0] tid, input logic [63:0] data,
                    input logic [7:0] strb, output logic [1:0] resp);
    @(negedge clk);
    s_aw = '{addr: a, len: 8'd0, size: 3'd3, prot: 3'b000, user: tid};
    s_aw_valid = 1'b1;
    while (!s_aw_ready) @(negedge clk);
    @(negedge clk);
    s_aw_valid = 1'b0;
    s_w = '{data: data, strb: strb, last: 1'b1};
    s_w_valid = 1'b1;
    while (!s_w_ready) @(negedge clk);
    @(negedge clk);
    s_w_valid = 1'b0;
    s_b_ready = 1'b1;
    while (!s_b_valid) @(negedge clk);
    resp = s_b_resp;
    @(negedge clk);
    s_b_ready = 1'b0;
  endtask

  // lat = cycles from the address handshake to the first data beat
  task automatic rd(input token_t a, input logic [63:0] tid, input logic [2:0] prot,
                    output logic [63:0] data, output logic [1:0] resp, output int lat);
    int c;
    @(negedge clk);
    s_ar = '{addr: a, len: 8'd0, size: 3'd3, prot: prot, user: tid};
    s_ar_valid = 1'b1;
    while (!s_ar_ready) @(negedge clk);
    @(negedge clk);
    s_ar_valid = 1'b0;
    s_r_ready = 1'b1;
    c = 1;
    while (!s_r_valid) begin @(negedge clk); c++; end
    data = s_r.data;
    resp = s_r.resp;
    lat  = c;
    @(negedge clk);
    s_r_ready = 1'b0;
  endtask

  // the capability that currently reaches the northbridge registers
  token_t      reg_tok;
  logic [31:0] reg_base;

  token_t      last_cap_a;
  logic [31:0] last_len;
  task automatic mw(input logic [7:0] r, input logic [63:0] v);
    logic [1:0] resp;
    if (r == R_CAP_A) last_cap_a = v;
    if (r == R_LEN)   last_len   = v[31:0];
    wr(at(reg_tok, MMIO + 32'(r) - reg_base), 64'd0, v, 8'hFF, resp);
    if (resp != RESP_OKAY) begin failures++; $display("FAIL: register write %h refused", r); end
  endtask

  task automatic mr(input logic [7:0] r, output logic [63:0] v);
    logic [1:0] resp;
    int lat;
    rd(at(reg_tok, MMIO + 32'(r) - reg_base), 64'd0, 3'b000, v, resp, lat);
    if (resp != RESP_OKAY) begin failures++; $display("FAIL: register read %h refused", r); end
  endtask

  // run an operation; returns {err, bit} and the two result tokens
  task automatic op(input cap_op_e code, output logic [3:0] err, output logic rbit,
                    output token_t r0, output token_t r1);
    logic [63:0] st;
    mw(R_CMD, 64'(code));
    // carving from the capability that reaches the registers moves its base
    if (code == OP_CREATE && last_cap_a == reg_tok) reg_base = reg_base + last_len;
    mr(R_CMD, st);
    if (code == OP_CREATE && last_cap_a == reg_tok && st[5:2] != E_OK) reg_base = reg_base - last_len;
    err  = st[5:2];
    rbit = st[1];
    mr(R_RES0, r0);
    mr(R_RES1, r1);
    watch_cmt();
  endtask

  // keep a shadow table available and count the table mechanisms
  int unsigned next_shadow = 16;
  logic [31:0] last_moves = 0, last_prom = 0;
  bit          give_shadow = 1'b1;
  task automatic watch_cmt();
    logic [63:0] st, stats;
    mr(R_CMTSTAT, st);
    mr(R_STATS, stats);
    if (st[0]) n_expand++;
    if (st[55:48] != 0) n_ovf++;
    if (stats[63:32] != last_moves) n_moves++;
    if (stats[31:0] != last_prom) n_promote++;
    last_moves = stats[63:32];
    last_prom  = stats[31:0];
    if (st[2]) mw(R_CMTSTAT, 64'h4);                       // acknowledge "old table freed"
    // software places each new (twice as large) table after the previous ones
    if (give_shadow && !st[0] && !st[1] && next_shadow + (2 << st[15:8]) <= CMT_DEPTH) begin
      mw(R_SHADOW, 64'(next_shadow));
      next_shadow += 2 << st[15:8];
    end
  endtask

  // ------------------------------------------------------------------ test
  logic [63:0] d, st;
  logic [1:0]  resp;
  logic [3:0]  err;
  logic        rb;
  token_t      pool, r0, r1, c1, c2, c3, i1, i2, x1, c1n, cm, cw;
  int          lat0, lat1, lat2, lat;
  int unsigned rd0, rd1;
  logic [7:0]  exp_b;

  initial begin
    s_aw_valid = 0; s_w_valid = 0; s_b_ready = 0; s_ar_valid = 0; s_r_ready = 0;
    s_aw = '0; s_ar = '0; s_w = '0;
    reg_tok = '0; reg_base = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (40) @(posedge clk);

    // ---- legacy access through the root capability
    rd(64'h0000_0000_0000_0123, 64'd0, 3'b000, d, resp, lat);
    exp_b = 8'(32'h120 * 7 + 3);
    check(resp == RESP_OKAY && d[7:0] == exp_b, "legacy 32-bit address reads physical memory");
    n_legacy++;
    watch_cmt();

    // ---- create c1 = [0, 0x1000) RW lockable from the root
    mw(R_CAP_A, reg_tok);
    mw(R_LEN, 64'h1000);
    mw(R_PERMS, 64'b001011);
    mw(R_USER, 64'hAA);
    op(OP_CREATE, err, rb, r0, r1);
    check(err == E_OK && r0 != 0 && r1 == 0, "create from root; the root keeps its token");
    check(r0[63:62] == 2'd2, "4 KiB segment gets a 16-bit-offset token");
    c1 = r0;
    check(reg_base == 32'h1000, "root now starts at 0x1000");
    mr(R_NONCE, d);
    check(d != 0, "nonce readable");

    // the root now starts after c1
    rd(64'h0000_0000_0000_0010, 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h1010 * 7 + 3), "root offset 0x10 is now physical 0x1010");

    // ---- forwarded write and read through c1, physical translation
    wr(at(c1, 32'h10), 64'd0, 64'h1122_3344_5566_7788, 8'hFF, resp);
    check(resp == RESP_OKAY, "write via c1");
    check(u_mem.peek(32'h10) == 8'h88 && u_mem.peek(32'h17) == 8'h11, "c1 offset 0x10 is physical 0x10");
    rd(at(c1, 32'h10), 64'd0, 3'b000, d, resp, lat0);
    check(resp == RESP_OKAY && d == 64'h1122_3344_5566_7788, "read back via c1");
    n_fwd++;

    // ---- bounds: last 8 bytes fit, one past does not
    rd(at(c1, 32'hFF8), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY, "read of the last word of c1");
    rd0 = n_reads;
    rd(at(c1, 32'hFF9), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR && n_reads == rd0, "read crossing the end of c1 refused, not forwarded");
    n_err_bounds++;

    // ---- forged tag
    rd(c1 ^ (64'd1 << 50), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR && n_reads == rd0, "forged tag refused");
    n_err_forged++;

    // ---- derive i1 = c1[0x200, +0x100) R, then i2 = i1[0x10, +0x80) R
    mw(R_CAP_A, c1); mw(R_LEN, 64'h100); mw(R_OFFSET, 64'h200); mw(R_PERMS, 64'b000001);
    op(OP_DERIVE, err, rb, r0, r1);
    check(err == E_OK, "derive i1"); i1 = r0;
    mw(R_CAP_A, i1); mw(R_LEN, 64'h80); mw(R_OFFSET, 64'h10);
    op(OP_DERIVE, err, rb, r0, r1);
    check(err == E_OK, "derive i2"); i2 = r0;
    mw(R_CAP_A, i1); mw(R_LEN, 64'h100); mw(R_OFFSET, 64'h10);
    op(OP_DERIVE, err, rb, r0, r1);
    check(err == E_ARG, "derive beyond the parent refused");
    mw(R_CAP_A, i1); mw(R_LEN, 64'h10); mw(R_OFFSET, 64'h0); mw(R_PERMS, 64'b000011);
    op(OP_DERIVE, err, rb, r0, r1);
    check(err == E_ARG, "derive with more permissions refused");

    rd(at(i1, 32'h0), 64'd0, 3'b000, d, resp, lat1);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h200 * 7 + 3), "i1 offset 0 is physical 0x200");
    mr(R_CMTSTAT, st);
    rd1 = cmt_reads;
    rd(at(i2, 32'h8), 64'd0, 3'b000, d, resp, lat2);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h218 * 7 + 3), "i2 offset 8 is physical 0x218");
    if (!st[0]) check(cmt_reads - rd1 == 3, "depth-2 access makes three CMT reads");
    rd(at(c1, 32'h10), 64'd0, 3'b000, d, resp, lat0);
    rd(at(i1, 32'h0), 64'd0, 3'b000, d, resp, lat1);
    rd(at(i2, 32'h8), 64'd0, 3'b000, d, resp, lat2);
    check(lat0 < lat1 && lat1 < lat2, $sformatf("latency grows with depth (%0d %0d %0d)", lat0, lat1, lat2));
    n_fwd++;

    wr(at(i1, 32'h0), 64'd0, 64'h0, 8'hFF, resp);
    check(resp == RESP_SLVERR, "write through read-only i1 refused");
    n_err_perm++;
    rd(at(i2, 32'h7C), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "i2 read past its 0x80 bytes refused");
    n_err_bounds++;

    // ---- lock c1 for task A; accesses through i2 need task A
    mw(R_CAP_A, i2); mw(R_TID, 64'hA5A5_0000_1234_5678);
    op(OP_LOCK, err, rb, r0, r1);
    check(err == E_OK && rb, "lock through an indirect capability locks the owner");
    op(OP_LOCK, err, rb, r0, r1);
    check(err == E_LOCK && !rb, "second lock refused");
    rd(at(i2, 32'h0), 64'hBEEF, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "other task refused while locked");
    n_err_lock++;
    rd(at(c1, 32'h0), 64'h0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "allocator's own direct capability refused while locked");
    rd(at(i2, 32'h0), 64'hA5A5_0000_1234_5678, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY, "lock holder allowed");
    mw(R_CAP_A, c1); mw(R_TID, 64'hBEEF);
    op(OP_UNLOCK, err, rb, r0, r1);
    check(!rb, "unlock by another task refused");
    mw(R_TID, 64'hA5A5_0000_1234_5678);
    op(OP_UNLOCK, err, rb, r0, r1);
    check(rb, "unlock by the holder");
    rd(at(i2, 32'h0), 64'hBEEF, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY, "unlocked again");

    // ---- clone / drop with recursion
    mw(R_CAP_A, i1);
    op(OP_CLONE, err, rb, r0, r1);
    check(rb, "clone i1");
    mw(R_CAP_A, i2);
    op(OP_DROP, err, rb, r0, r1);
    check(err == E_OK && rb, "drop i2 reaches 0");
    rd(at(i2, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "dropped i2 is gone");
    n_recursive_drop++;
    mw(R_CAP_A, i1);
    op(OP_DROP, err, rb, r0, r1);
    check(err == E_OK && !rb, "i1 still referenced after one drop");
    rd(at(i1, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY, "i1 still valid");

    // ---- create c2 = next 0x800 bytes, RWX; mkXonly -> instruction fetch only
    mw(R_CAP_A, reg_tok); mw(R_LEN, 64'h800); mw(R_PERMS, 64'b001111);
    op(OP_CREATE, err, rb, r0, r1);
    check(err == E_OK, "create c2"); c2 = r0;
    mw(R_CAP_A, c2);
    op(OP_MKXONLY, err, rb, r0, r1);
    check(err == E_OK, "mkXonly"); x1 = r0;
    rd(at(x1, 32'h40), 64'd0, 3'b100, d, resp, lat);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h1040 * 7 + 3), "instruction fetch through execute-only capability");
    rd(at(x1, 32'h40), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "data read through execute-only capability refused");
    n_exec++;
    mw(R_CAP_A, c1);
    op(OP_MKXONLY, err, rb, r0, r1);
    check(err == E_ARG, "mkXonly needs X");

    // ---- copy-on-write capability: writes raise the IRQ
    mw(R_CAP_A, reg_tok); mw(R_LEN, 64'h100); mw(R_PERMS, 64'b010011);
    op(OP_CREATE, err, rb, r0, r1);
    check(err == E_OK, "create cow segment"); cw = r0;
    wr(at(cw, 32'h0), 64'd0, 64'h5, 8'hFF, resp);
    check(resp == RESP_SLVERR && irq, "write to copy-on-write raises IRQ");
    mr(R_FAULTTOK, d);
    check(d == at(cw, 0), "faulting token latched");
    mw(R_IRQ, 64'h1);
    check(!irq, "IRQ acknowledged");
    n_cow_irq++;

    // ---- revoke c1: data zeroed, derived i1 dies, new capability works
    rd0 = n_wbeats;
    mw(R_CAP_A, i1);
    op(OP_REVOKE, err, rb, r0, r1);
    check(err == E_TYPE, "revoke of an indirect capability refused");
    mw(R_CAP_A, c1);
    op(OP_REVOKE, err, rb, r0, r1);
    check(err == E_OK && r0 != c1, "revoke c1"); c1n = r0;
    check(n_wbeats - rd0 == 32'h1000 / 8, "revoke wrote the whole segment");
    check(u_mem.peek(32'h10) == 0 && u_mem.peek(32'hFFF) == 0 && u_mem.peek(32'h1000) == 8'(32'h1000 * 7 + 3),
          "segment zeroed, neighbour untouched");
    n_zero++;
    rd(at(i1, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "capability derived from a revoked one refused");
    n_err_revoked++;
    rd(at(c1, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "revoked token refused");
    rd(at(c1n, 32'h18), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d == 0, "new capability reads zeros");

    // ---- merge c1n and c2 (c2 still referenced by x1 first)
    mw(R_CAP_A, c1n); mw(R_CAP_B, c2);
    op(OP_MERGE, err, rb, r0, r1);
    check(err == E_REFCNT, "merge refused while c2 is referenced");
    mw(R_CAP_A, x1);
    op(OP_DROP, err, rb, r0, r1);
    check(rb, "drop x1");
    mw(R_CAP_A, c1n); mw(R_CAP_B, c2);
    op(OP_MERGE, err, rb, r0, r1);
    check(err == E_OK, "merge"); cm = r0;
    rd(at(cm, 32'h17F8), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h17F8 * 7 + 3), "merged capability spans both segments");
    rd(at(c2, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "merged-away capability refused");
    n_merge++;

    // ---- many small capabilities: collisions, expansion, rehash on access, promotion
    // carved from a pool so the root, through which the registers are reached, stays put
    mw(R_CAP_A, reg_tok); mw(R_LEN, 64'h10000); mw(R_PERMS, 64'b000011);
    op(OP_CREATE, err, rb, pool, r1);
    check(err == E_OK, "pool created");
    for (int k = 0; k < 40; k++) begin
      mw(R_CAP_A, pool); mw(R_LEN, 64'h40); mw(R_PERMS, 64'b000011);
      op(OP_CREATE, err, rb, r0, r1);
      if (err == E_OK) begin
        pool = r1;
        wr(at(r0, 32'h8), 64'd0, 64'(k), 8'hFF, resp);
        rd(at(r0, 32'h8), 64'd0, 3'b000, d, resp, lat);
        check(resp == RESP_OKAY && d == 64'(k), "small capability usable");
        rd(at(cm, 32'h0), 64'd0, 3'b000, d, resp, lat);   // keeps old entries moving
        rd(at(cw, 32'h0), 64'd0, 3'b000, d, resp, lat);
        watch_cmt();
      end else begin
        n_full++;
        check(err == E_FULL, "create fails only for lack of CMT space");
      end
      if (k == 8) give_shadow = 1'b0;     // from here on, spill into the overflow buffer
    end
    check(n_expand > 0,  "CMT expansion happened");
    check(n_moves > 0,   "entries were rehashed on access");
    check(n_promote > 0, "shadow table was promoted");
    check(n_ovf > 0,     "overflow buffer was used");

    // ---- every mechanism occurred
    check(n_legacy > 0 && n_fwd > 0 && n_err_bounds > 0 && n_err_perm > 0 && n_err_forged > 0 &&
          n_err_lock > 0 && n_err_revoked > 0 && n_cow_irq > 0 && n_zero > 0 && n_merge > 0 &&
          n_exec > 0 && n_recursive_drop > 0, "all mechanisms exercised");
    $display("creates refused for lack of space: %0d", n_full);
    $display("mechanisms: legacy=%0d fwd=%0d bounds=%0d perm=%0d forged=%0d lock=%0d revoked=%0d cow=%0d expand=%0d moves=%0d promote=%0d ovf=%0d zero=%0d merge=%0d exec=%0d drop=%0d",
             n_legacy, n_fwd, n_err_bounds, n_err_perm, n_err_forged, n_err_lock, n_err_revoked,
             n_cow_irq, n_expand, n_moves, n_promote, n_ovf, n_zero, n_merge, n_exec, n_recursive_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (front end %0d, CMT controller %0d, resolver %0d, operation unit %0d)",
             dut.fs, dut.u_cmt.state, dut.u_res.state, dut.u_ops.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
