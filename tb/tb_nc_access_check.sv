// tb_nc_access_check: self-checking test of nc_access_check, the per-transaction
// access-control decision.
//
// Directed cases for each fault (resolve failure, paged owner, bounds at the exact last
// byte and one past it, missing R/W/X, lock held by another task versus by the presenting
// task, copy-on-write on write but not on read), then random entries, offsets, burst
// shapes, access kinds and task ids compared against a reference model of the documented
// precedence. Checks the physical address (base + offset) on every grant. Combinational
// DUT, checked after #1. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_access_check;
  import nc_pkg::*;
  int checks = 0, failures = 0;
  int seen [8];

  logic        rok;
  fault_e      rf;
  cmt_entry_t  leaf, owner;
  logic [31:0] off;
  logic [7:0]  len;
  logic [2:0]  size;
  access_e     acc;
  logic [TID_W-1:0] tid;
  logic        grant;
  fault_e      fault;
  logic [31:0] pa;

  nc_access_check dut (.resolved_ok(rok), .resolve_fault(rf), .leaf, .owner, .offset(off),
                       .len, .size, .access(acc), .tid, .grant, .fault, .phys_addr(pa));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic fault_e ref_fault();
    longint last;
    bit p;
    last = longint'(off) + ((longint'(len) + 1) << size);
    p = (acc == ACC_WRITE) ? leaf.w : (acc == ACC_EXEC) ? leaf.x : leaf.r;
    if (!rok) return rf;
    if (owner.ctype == CT_PAGED) return F_PAGED;
    if (last > longint'(leaf.length)) return F_BOUNDS;
    if (!p) return F_PERM;
    if (owner.locked && owner.lock_holder != tid[54:0]) return F_LOCKED;
    if (acc == ACC_WRITE && (leaf.cow || owner.cow)) return F_COW;
    return F_NONE;
  endfunction

  task automatic base_case();
    leaf = '0; leaf.ctype = CT_DIRECT; leaf.base = 32'h1000; leaf.length = 32'h100;
    leaf.r = 1; leaf.w = 1; leaf.x = 1;
    owner = leaf;
    rok = 1; rf = F_NONE; off = 0; len = 0; size = 3; acc = ACC_READ; tid = 64'h55;
  endtask

  initial begin
    #2_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    base_case(); off = 32'h20; #1;
    check(grant && fault == F_NONE && pa == 32'h1020, "plain read granted, address translated");
    base_case(); rok = 0; rf = F_INVALID; #1;
    check(!grant && fault == F_INVALID, "forged token refused");
    base_case(); owner.ctype = CT_PAGED; off = 32'h1000; #1;
    check(fault == F_PAGED, "paged-out owner wins over bounds");
    base_case(); off = 32'hF8; #1;
    check(grant, "last 8 bytes in bounds");
    base_case(); off = 32'hF9; #1;
    check(fault == F_BOUNDS, "one byte past the end");
    base_case(); off = 32'hF0; len = 8'd1; #1;
    check(grant, "2-beat burst to the end");
    base_case(); off = 32'hFFFF_FFF8; #1;
    check(fault == F_BOUNDS, "offset near 2^32 does not wrap");
    base_case(); leaf.w = 0; acc = ACC_WRITE; #1;
    check(fault == F_PERM, "write without W");
    base_case(); leaf.r = 0; #1;
    check(fault == F_PERM, "read without R");
    base_case(); leaf.x = 0; acc = ACC_EXEC; #1;
    check(fault == F_PERM, "fetch without X");
    base_case(); leaf.r = 0; leaf.w = 0; acc = ACC_EXEC; #1;
    check(grant, "execute-only capability can be fetched");
    base_case(); owner.locked = 1; owner.lock_holder = 55'h77; #1;
    check(fault == F_LOCKED, "locked by another task");
    base_case(); owner.locked = 1; owner.lock_holder = 55'h55; tid = {9'h1FF, 55'h55}; #1;
    check(grant, "lock holder compared on the low 55 bits");
    base_case(); leaf.cow = 1; acc = ACC_WRITE; #1;
    check(fault == F_COW, "write to copy-on-write");
    base_case(); owner.cow = 1; #1;
    check(grant, "read of copy-on-write granted");

    foreach (seen[i]) seen[i] = 0;
    for (int i = 0; i < 20000; i++) begin
      base_case();
      rok = ($urandom_range(0, 15) != 0);
      rf = fault_e'($urandom_range(1, 2));
      leaf.base = $urandom; leaf.length = $urandom_range(0, 512);
      {leaf.r, leaf.w, leaf.x, leaf.cow} = 4'($urandom);
      owner = leaf;
      if ($urandom_range(0, 3) == 0) begin
        owner.base = $urandom; owner.length = $urandom; {owner.cow} = 1'($urandom);
      end
      owner.ctype = ($urandom_range(0, 15) == 0) ? CT_PAGED : CT_DIRECT;
      owner.locked = ($urandom_range(0, 3) == 0);
      owner.lock_holder = 55'($urandom_range(0, 3));
      tid = 64'($urandom_range(0, 3));
      off = ($urandom_range(0, 31) == 0) ? $urandom : $urandom_range(0, 512);
      len = 8'($urandom_range(0, 7)); size = 3'($urandom_range(0, 3));
      acc = access_e'($urandom_range(0, 2));
      #1;
      check(fault == ref_fault() && grant == (ref_fault() == F_NONE), $sformatf("random case %0d", i));
      if (grant) check(pa == leaf.base + off, "translated address");
      seen[fault]++;
    end
    foreach (seen[i]) check(seen[i] > 0, $sformatf("fault %0d seen in random run", i));
    $display("faults seen: none=%0d invalid=%0d depth=%0d bounds=%0d perm=%0d locked=%0d paged=%0d cow=%0d",
             seen[0], seen[1], seen[2], seen[3], seen[4], seen[5], seen[6], seen[7]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
