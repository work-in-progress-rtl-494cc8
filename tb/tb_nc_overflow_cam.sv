// tb_nc_overflow_cam: self-checking test of nc_overflow_cam, the CMT overflow buffer.
//
// Runs random insert / in-place update (key kept) / invalidate / lookup sequences against a scoreboard of N slots and
// checks after every clock: hit and returned entry for present keys (key and tag must
// both match), misses for absent keys and for a present key with a wrong tag, the lowest
// free slot, the full flag and the occupancy count. Also checks that an insert and an
// invalidate of the same slot in one cycle leave it valid. Inputs change on the falling
// edge; the DUT writes on the rising edge. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_overflow_cam;
  import nc_pkg::*;
  localparam int N = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  key_t       lk_key;  tag_t lk_tag;
  logic       lk_hit;  logic [1:0] lk_idx; cmt_entry_t lk_entry;
  logic       full;    logic [1:0] free_idx; logic [2:0] count;
  logic       wr_en = 0, wr_new = 1, inv_en = 0;
  logic [1:0] wr_idx = 0, inv_idx = 0;
  key_t       wr_key = 0; cmt_entry_t wr_entry = 0;

  nc_overflow_cam #(.N(N)) dut (.*);

  bit         v  [N];
  key_t       k  [N];
  cmt_entry_t en [N];

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic check_state();
    int c, fi;
    c = 0; fi = -1;
    for (int i = 0; i < N; i++) begin
      if (v[i]) c++;
      else if (fi < 0) fi = i;
    end
    check(count == 3'(c) && full == (c == N) && (c == N || free_idx == 2'(fi)), "count / full / free slot");
    for (int i = 0; i < N; i++) if (v[i]) begin
      lk_key = k[i]; lk_tag = en[i].tag; #1;
      check(lk_hit && lk_entry == en[i], $sformatf("lookup of slot %0d", i));
      lk_tag = en[i].tag ^ 16'h0101; #1;
      check(!lk_hit, "wrong tag misses");
    end
    lk_key = {16'hDEAD, $urandom}; lk_tag = 16'($urandom); #1;
    check(!lk_hit, "absent key misses");
  endtask

  initial begin
    #2_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    foreach (v[i]) v[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); check_state();
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      wr_en = 0; inv_en = 0; wr_new = 1;
      if ($urandom_range(0, 3) == 0) begin       // in-place update keeps the stored key
        automatic int u = $urandom_range(0, N - 1);
        if (v[u]) begin
          wr_en = 1; wr_new = 0; wr_idx = 2'(u); wr_key = {16'hBEEF, $urandom};
          wr_entry = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
          for (int i = 0; i < N; i++) if (v[i] && k[i] == k[u] && en[i].tag == wr_entry.tag) wr_en = 0;
        end
      end else if (!full && $urandom_range(0, 1)) begin
        wr_en = 1; wr_idx = free_idx;
        wr_key = {2'($urandom), 14'd0, $urandom & 32'h3F};   // few distinct keys
        wr_entry = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
        // keep (key, tag) unique in the scoreboard so lookups are unambiguous
        for (int i = 0; i < N; i++) if (v[i] && k[i] == wr_key && en[i].tag == wr_entry.tag) wr_en = 0;
      end
      if ($urandom_range(0, 2) == 0) begin
        inv_en = 1; inv_idx = 2'($urandom);
      end
      if (it == 100) begin                     // same-slot insert and invalidate
        wr_en = 1; wr_idx = 2'd1; inv_en = 1; inv_idx = 2'd1; wr_key = 48'h1; wr_entry = '1;
        for (int i = 0; i < N; i++) if (i != 1 && v[i] && k[i] == 48'h1) v[i] = 0;
        for (int i = 0; i < N; i++) if (i != 1 && v[i] && k[i] == 48'h1) inv_idx = 2'(i);
      end
      @(posedge clk); #1;
      if (inv_en) v[inv_idx] = 0;
      if (wr_en) begin
        v[wr_idx] = 1; en[wr_idx] = wr_entry;
        if (wr_new) k[wr_idx] = wr_key;
      end
      wr_en = 0; inv_en = 0;
      if (it == 100) check(v[1] && dut.valid[1], "insert wins over invalidate");
      check_state();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
