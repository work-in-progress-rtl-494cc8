// tb_nc_cmt_ctrl: self-checking test of nc_cmt_ctrl, the capability metadata table
// controller, on a small table (4 initial slots, growth up to 256) backed by
// nc_cmt_mem_model with latency and random stalls.
//
// A scoreboard keyed by capability key holds the tag and entry of every live capability.
// Random inserts (unique tags), lookups, updates and deletes are issued; software
// behaviour is modelled by supplying a new, non-overlapping shadow region whenever none is
// pending and acknowledging the `freed` flag. Checks: the root capability is present
// after reset; every lookup of a live key hits with the stored entry and a wrong tag
// misses; deleted keys miss; update is visible through a later lookup; an insert is
// refused only when the overflow buffer is full; the entry counts (active + shadow +
// overflow) equal the scoreboard size after every command; a location returned by a
// lookup holds the entry in the memory model. At the end, expansion, rehash on access,
// promotion and the overflow buffer must all have been exercised. Inputs change on the
// falling edge. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_cmt_ctrl;
  import nc_pkg::*;
  localparam int DEPTH = 1024;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       cmd_valid = 0, cmd_ready;
  cmt_cmd_e   cmd_op = CMD_LOOKUP;
  key_t       cmd_key = 0;
  tag_t       cmd_tag = 0;
  cmt_loc_t   cmd_loc = 0;
  cmt_entry_t cmd_entry = 0;
  logic       rsp_valid, rsp_ok;
  cmt_entry_t rsp_entry;
  cmt_loc_t   rsp_loc;
  logic       shadow_wr = 0, freed_clr = 0;
  logic [CMT_AW-1:0] shadow_start = 0;
  logic       st_init_done, st_expanding, st_shadow_ready, st_freed;
  logic [CMT_AW-1:0] st_act_start;
  logic [7:0] st_act_bits, st_act_sel;
  logic [CMT_AW:0] st_act_count, st_shd_count;
  logic [2:0] st_ovf_count;
  logic [31:0] st_moves, st_promotions;
  logic       mem_req_valid, mem_req_ready, mem_req_we, mem_rsp_valid;
  logic [CMT_AW-1:0] mem_req_idx;
  cmt_entry_t mem_req_wdata, mem_rsp_rdata;

  nc_cmt_ctrl #(.INIT_START(0), .INIT_BITS(2), .MAX_BITS(8), .OVF_N(4)) dut (.*);
  nc_cmt_mem_model #(.DEPTH(DEPTH), .LATENCY(3)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req_ready(mem_req_ready), .req_we(mem_req_we),
    .req_idx(mem_req_idx), .req_wdata(mem_req_wdata), .rsp_valid(mem_rsp_valid),
    .rsp_rdata(mem_rsp_rdata));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && mem_req_valid && mem_req_idx >= DEPTH) begin
    failures++; $display("FAIL: CMT access outside the memory region: %0d", mem_req_idx);
  end

  // scoreboard
  tag_t       sb_tag [key_t];
  cmt_entry_t sb_ent [key_t];
  key_t       keys [$];
  int         n_ovf_seen = 0, n_refused = 0, next_shadow = 4, n_expand_seen = 0;

  task automatic cmd(input cmt_cmd_e op, input key_t k, input tag_t t, input cmt_loc_t l,
                     input cmt_entry_t e, output logic ok, output cmt_entry_t re,
                     output cmt_loc_t rl);
    int cyc = 0;
    @(negedge clk);
    cmd_valid = 1; cmd_op = op; cmd_key = k; cmd_tag = t; cmd_loc = l; cmd_entry = e;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
    while (!rsp_valid && cyc < 1000) begin @(posedge clk); #1; cyc++; end
    check(rsp_valid, "response arrives");
    ok = rsp_ok; re = rsp_entry; rl = rsp_loc;
    @(posedge clk); #1;          // overflow-buffer writes land one cycle after the response
    if (st_ovf_count != 0) n_ovf_seen++;
    if (st_expanding) n_expand_seen++;
  endtask

  // software side: acknowledge freed, supply a new shadow region after the others
  task automatic software();
    @(negedge clk);
    if (st_freed) begin freed_clr = 1; @(negedge clk); freed_clr = 0; end
    if (!st_expanding && !st_shadow_ready && next_shadow + (2 << st_act_bits) <= DEPTH) begin
      shadow_start = CMT_AW'(next_shadow); shadow_wr = 1;
      @(negedge clk); shadow_wr = 0;
      next_shadow += 2 << st_act_bits;
    end
  endtask

  task automatic check_counts();
    check(int'(st_act_count) + int'(st_shd_count) + int'(st_ovf_count) == sb_tag.num(),
          $sformatf("entry count %0d+%0d+%0d vs %0d live", st_act_count, st_shd_count,
                    st_ovf_count, sb_tag.num()));
  endtask

  task automatic lookup_check(input key_t k);
    logic ok; cmt_entry_t re; cmt_loc_t rl;
    cmd(CMD_LOOKUP, k, sb_tag[k], '0, '0, ok, re, rl);
    check(ok && re == sb_ent[k], $sformatf("lookup of live key %h", k));
    if (ok && !rl.ovf) check(u_mem.peek(rl.idx) == sb_ent[k], "returned slot holds the entry");
    check_counts();
  endtask

  function automatic cmt_entry_t rnd_entry(input tag_t t);
    cmt_entry_t e;
    e = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    e.ctype = CT_DIRECT;
    e.tag = t;
    return e;
  endfunction

  initial begin
    #20_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    logic ok; cmt_entry_t re; cmt_loc_t rl;
    key_t k; tag_t t; cmt_entry_t e;
    int unsigned tagctr = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    while (!st_init_done) @(negedge clk);
    // the root capability
    cmd(CMD_LOOKUP, '0, '0, '0, '0, ok, re, rl);
    check(ok && re.ctype == CT_DIRECT && re.base == 0 && re.length == 32'hFFFF_FFFF &&
          re.r && re.w && re.x, "root capability present after reset");
    sb_tag[key_t'(0)] = '0; sb_ent[key_t'(0)] = re; keys.push_back('0);
    check_counts();
    // a lookup with the wrong tag misses
    cmd(CMD_LOOKUP, '0, 16'h1234, '0, '0, ok, re, rl);
    check(!ok, "wrong tag misses");

    for (int it = 0; it < 3000; it++) begin
      int r;
      software();
      r = $urandom_range(0, 99);
      if (r < 35 || keys.size() < 3) begin                     // insert
        k = {2'($urandom_range(1, 3)), 46'($urandom_range(1, 1 << 20))};
        if (sb_tag.exists(k)) continue;
        t = 16'(tagctr++); e = rnd_entry(t);
        cmd(CMD_INSERT, k, t, '0, e, ok, re, rl);
        if (ok) begin
          sb_tag[k] = t; sb_ent[k] = e; keys.push_back(k);
        end else begin
          n_refused++;
          check(st_ovf_count == 4, "insert refused only with a full overflow buffer");
        end
        check_counts();
      end else if (r < 70) begin                                 // lookup (maybe moves)
        lookup_check(keys[$urandom_range(0, keys.size() - 1)]);
      end else if (r < 80) begin                                 // lookup of an absent key
        cmd(CMD_LOOKUP, {2'd1, 46'($urandom_range(1 << 21, 1 << 22))}, 16'hFFFF, '0, '0, ok, re, rl);
        check(!ok, "absent key misses");
      end else if (r < 90) begin                                 // update via lookup location
        automatic int i = $urandom_range(0, keys.size() - 1);
        k = keys[i];
        cmd(CMD_LOOKUP, k, sb_tag[k], '0, '0, ok, re, rl);
        check(ok, "lookup before update");
        e = sb_ent[k]; e.refcnt = 16'($urandom); e.base = $urandom;
        cmd(CMD_UPDATE, {2'd3, 46'($urandom)}, 16'($urandom), rl, e, ok, re, rl);   // key and tag unused
        sb_ent[k] = e;
        lookup_check(k);
      end else if (keys.size() > 1) begin                        // delete (never the root)
        automatic int i = $urandom_range(1, keys.size() - 1);
        k = keys[i];
        cmd(CMD_LOOKUP, k, sb_tag[k], '0, '0, ok, re, rl);
        check(ok, "lookup before delete");
        t = sb_tag[k];
        cmd(CMD_DELETE, {2'd3, 46'($urandom)}, 16'($urandom), rl, '0, ok, re, rl);
        sb_tag.delete(k); sb_ent.delete(k); keys.delete(i);
        check_counts();
        cmd(CMD_LOOKUP, k, t, '0, '0, ok, re, rl);
        check(!ok, "deleted key misses");
      end
      if (keys.size() > 150) begin                                // keep the table small
        foreach (keys[j]) if (j > 0 && $urandom_range(0, 1)) lookup_check(keys[j]);
      end
    end
    // every live key is still found
    foreach (keys[j]) lookup_check(keys[j]);
    $display("live=%0d expand_seen=%0d moves=%0d promotions=%0d ovf_seen=%0d refused=%0d act_bits=%0d",
             keys.size(), n_expand_seen, st_moves, st_promotions, n_ovf_seen, n_refused, st_act_bits);
    check(n_expand_seen > 0, "expansion happened");
    check(st_moves > 0, "entries rehashed on access");
    check(st_promotions > 0, "shadow table promoted");
    check(n_ovf_seen > 0, "overflow buffer used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
