// tb_nc_mac: self-checking test of nc_mac, the 16-bit tag generator.
//
// Compares the tag for random keys and entries against a reference model of the keyed
// absorb (message {key, type, aux, R, W, X, nonce} in four 64-bit words, s = mix of
// s ^ word, tag = s[63:48] ^ s[15:0]). Then checks the binding properties the rest of the
// design relies on: changing the number, the nonce, the aux word, a permission bit or the
// secret key changes the tag (for almost all random trials); changing base, length,
// reference count or lock state does not. Combinational DUT, checked after #1. Prints
// TB_RESULT; a watchdog stops a hung run.
module tb_nc_mac;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  logic [63:0] mk;
  key_t        key;
  cmt_entry_t  e;
  tag_t        tag;
  nc_mac dut (.mac_key(mk), .key, .entry(e), .tag);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] rmix(input logic [63:0] z);
    z = (z ^ (z >> 30)) * 64'hBF58476D1CE4E5B9;
    z = (z ^ (z >> 27)) * 64'h94D049BB133111EB;
    return z ^ (z >> 31);
  endfunction

  function automatic tag_t ref_tag(input logic [63:0] k, input key_t ky, input cmt_entry_t en);
    logic [255:0] m;
    logic [63:0]  s;
    m = '0;
    m[149:0] = {ky, en.ctype, en.aux, en.r, en.w, en.x, en.nonce};
    s = k;
    for (int i = 0; i < 4; i++) s = rmix(s ^ m[64*i +: 64]);
    return s[63:48] ^ s[15:0];
  endfunction

  function automatic cmt_entry_t rnd_entry();
    cmt_entry_t x;
    x = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
    x.ctype = ctype_e'(3'($urandom_range(1, 3)));
    return x;
  endfunction

  initial begin
    #2_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    tag_t t0;
    int changed [5];
    foreach (changed[i]) changed[i] = 0;
    for (int i = 0; i < 1000; i++) begin
      mk = {$urandom, $urandom}; key = {16'($urandom), $urandom}; e = rnd_entry(); #1;
      check(tag == ref_tag(mk, key, e), "tag matches reference");
      t0 = tag;
      // fields outside the MAC
      e.base = $urandom; e.length = $urandom; e.refcnt = 16'($urandom);
      e.locked = ~e.locked; e.lock_holder = {23'($urandom), $urandom}; e.tag = 16'($urandom); #1;
      check(tag == t0, "tag independent of base, length, refcount and lock state");
      // fields inside the MAC
      key[3] = ~key[3]; #1;         if (tag != t0) changed[0]++; key[3] = ~key[3];
      e.nonce = e.nonce + 1; #1;    if (tag != t0) changed[1]++; e.nonce = e.nonce - 1;
      e.aux[40] = ~e.aux[40]; #1;   if (tag != t0) changed[2]++; e.aux[40] = ~e.aux[40];
      e.w = ~e.w; #1;               if (tag != t0) changed[3]++; e.w = ~e.w;
      mk[0] = ~mk[0]; #1;           if (tag != t0) changed[4]++; mk[0] = ~mk[0];
      #1 check(tag == t0, "restored inputs give the same tag");
    end
    foreach (changed[i]) check(changed[i] >= 990, $sformatf("field %0d changed the tag in %0d of 1000", i, changed[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
