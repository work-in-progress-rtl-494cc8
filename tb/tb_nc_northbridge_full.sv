// tb_nc_northbridge_full: end-to-end test of the northbridge at its default parameters
// (MMIO window at 0xFFFF0000, CMT of 1024 slots at slot 0 growing up to 2^20 slots,
// 8-entry overflow buffer, parent chains of up to 8 levels).
//
// The same bus-master, memory and register helpers as tb_nc_northbridge. After the
// hardware has cleared the 1024-slot table and installed the root capability, the test
// reads physical memory through the root, carves a 64 KiB pool and then 150 capabilities
// of 64 bytes from it, writing a distinct word into each. Software behaviour is modelled
// by supplying a 2048-slot shadow table after the initial one (and a larger one after
// each promotion) and acknowledging the "old table freed" flag. Every capability is then
// read back, which rehashes the entries left in the old table and lets the shadow table
// be promoted. Checks: data of every capability, refused accesses (bounds, forged tag),
// a derived capability two levels deep, revoke with zero-fill, and that expansion,
// rehash on access and promotion all took place at full table size.
module tb_nc_northbridge_full;
  import nc_pkg::*;

  localparam logic [31:0] MMIO = 32'hFFFF_0000;
  localparam int unsigned CMT_DEPTH = 8192;  // CMT region of the memory model, in slots

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

  nc_northbridge dut (
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
  int unsigned next_shadow = 1024;   // right after the initial 1024-slot table
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
  localparam int NCAP = 150;
  logic [63:0] d, st;
  logic [1:0]  resp;
  logic [3:0]  err;
  logic        rb;
  token_t      pool, r0, r1, i1, i2, rv;
  token_t      caps [NCAP];
  int          lat, n_ok;

  initial begin
    s_aw_valid = 0; s_w_valid = 0; s_b_ready = 0; s_ar_valid = 0; s_r_ready = 0;
    s_aw = '0; s_ar = '0; s_w = '0;
    reg_tok = '0; reg_base = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // the hardware clears the 1024-slot table before it accepts the first access
    rd(64'h0000_0000_0000_0208, 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d[7:0] == 8'(32'h208 * 7 + 3), "legacy address through the root");
    n_legacy++;
    mr(R_CMTSTAT, st);
    check(st[3] && st[15:8] == 8'd10 && st[47:24] == 0, "initial table: 1024 slots at slot 0");

    // ---- 64 KiB pool, then many small capabilities from it
    mw(R_CAP_A, reg_tok); mw(R_LEN, 64'h10000); mw(R_PERMS, 64'b001011);
    op(OP_CREATE, err, rb, pool, r1);
    check(err == E_OK && pool[63:62] == 2'd2, "pool created");
    n_ok = 0;
    for (int k = 0; k < NCAP; k++) begin
      mw(R_CAP_A, pool); mw(R_LEN, 64'h40); mw(R_PERMS, 64'b000011);
      op(OP_CREATE, err, rb, r0, r1);
      caps[k] = (err == E_OK) ? r0 : '0;
      if (err == E_OK) begin
        n_ok++;
        pool = r1;
        wr(at(r0, 32'h8), 64'd0, 64'hC0DE_0000 + 64'(k), 8'hFF, resp);
        check(resp == RESP_OKAY, "write to a new capability");
        n_fwd++;
      end else begin
        n_full++;
        check(err == E_FULL, "create fails only for lack of CMT space");
      end
    end
    // ---- read everything back (old entries move to the new table on access)
    for (int pass = 0; pass < 2; pass++)
      for (int k = 0; k < NCAP; k++) if (caps[k] != 0) begin
        rd(at(caps[k], 32'h8), 64'd0, 3'b000, d, resp, lat);
        check(resp == RESP_OKAY && d == 64'hC0DE_0000 + 64'(k), $sformatf("capability %0d reads back", k));
        if (k % 16 == 0) watch_cmt();
      end
    watch_cmt();
    mr(R_CMTSTAT, st);
    mr(R_SHADOW, d);
    $display("entries: active table %0d, shadow table %0d", d[63:32], d[31:0]);
    $display("created %0d of %0d, table 2^%0d slots at slot %0d, hash %0d, overflow %0d",
             n_ok, NCAP, st[15:8], st[47:24], st[23:16], st[55:48]);
    check(n_ok >= NCAP * 9 / 10, "nearly all creates succeed at full size");
    check(st[15:8] > 8'd10, "table grew beyond 1024 slots");

    // ---- refusals
    rd(at(caps[1], 32'h40), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "read past the end refused"); n_err_bounds++;
    r0 = caps[2]; r0[50] = ~r0[50];
    rd(at(r0, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "forged tag refused"); n_err_forged++;

    // ---- two-level derive, then revoke of the owner
    mw(R_CAP_A, caps[3]); mw(R_LEN, 64'h20); mw(R_OFFSET, 64'h8); mw(R_PERMS, 64'b000001);
    op(OP_DERIVE, err, rb, i1, r1);
    check(err == E_OK, "derive");
    mw(R_CAP_A, i1); mw(R_LEN, 64'h10); mw(R_OFFSET, 64'h0);
    op(OP_DERIVE, err, rb, i2, r1);
    check(err == E_OK, "derive of a derived capability");
    rd(at(i2, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d == 64'hC0DE_0003, "two-level chain reads the owner's data");
    wr(at(i2, 32'h0), 64'd0, 64'h1, 8'hFF, resp);
    check(resp == RESP_SLVERR, "write through a read-only derived capability refused"); n_err_perm++;
    mw(R_CAP_A, caps[3]);
    op(OP_REVOKE, err, rb, rv, r1);
    check(err == E_OK, "revoke");
    rd(at(i2, 32'h0), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_SLVERR, "derived capability dead after revoke"); n_err_revoked++;
    rd(at(rv, 32'h8), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d == 0, "revoked segment zeroed"); n_zero++;
    rd(at(caps[4], 32'h8), 64'd0, 3'b000, d, resp, lat);
    check(resp == RESP_OKAY && d == 64'hC0DE_0004, "neighbour intact");

    check(n_expand > 0,  "CMT expansion happened");
    check(n_moves > 0,   "entries were rehashed on access");
    check(n_promote > 0, "shadow table was promoted");
    $display("mechanisms: legacy=%0d fwd=%0d bounds=%0d perm=%0d forged=%0d revoked=%0d expand=%0d moves=%0d promote=%0d ovf=%0d zero=%0d refused_creates=%0d",
             n_legacy, n_fwd, n_err_bounds, n_err_perm, n_err_forged, n_err_revoked, n_expand,
             n_moves, n_promote, n_ovf, n_zero, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (front end %0d, CMT controller %0d, resolver %0d, operation unit %0d)",
             dut.fs, dut.u_cmt.state, dut.u_res.state, dut.u_ops.state);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
