// tb_nc_hash: self-checking test of nc_hash, the CMT hash family.
//
// Compares the digest for random keys and hash-function numbers against an independent
// splitmix64 reference written in the testbench (key XOR (sel+1)*golden-ratio constant,
// then the splitmix64 finaliser), then checks the properties the table relies on: the
// function is deterministic, different `sel` values give different functions (slot
// agreement between h_s and h_s+1 near 1/2^bits), and 4096 sequential keys spread evenly
// over 64 slots (every bucket within a loose band around the mean). Combinational DUT,
// checked after #1. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_hash;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  key_t        key;
  logic [7:0]  sel;
  logic [31:0] dig;
  nc_hash dut (.key, .sel, .digest(dig));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [31:0] ref_hash(input key_t k, input logic [7:0] s);
    logic [63:0] z;
    z = {16'd0, k} ^ ((64'(s) + 64'd1) * 64'h9E3779B97F4A7C15);
    z = (z ^ (z >> 30)) * 64'hBF58476D1CE4E5B9;
    z = (z ^ (z >> 27)) * 64'h94D049BB133111EB;
    z = z ^ (z >> 31);
    return z[31:0];
  endfunction

  initial begin
    #2_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    int bucket [64];
    int same;
    logic [31:0] d0;
    for (int i = 0; i < 2000; i++) begin
      key = {16'($urandom), $urandom}; sel = 8'($urandom); #1;
      check(dig == ref_hash(key, sel), $sformatf("digest key %h sel %0d", key, sel));
      d0 = dig; #1;
      check(dig == d0, "deterministic");
    end
    // consecutive hash functions disagree on the slot
    same = 0;
    for (int i = 0; i < 1024; i++) begin
      key = 48'(i); sel = 8'd3; #1; d0 = dig;
      sel = 8'd4; #1;
      if (d0[5:0] == dig[5:0]) same++;
    end
    check(same < 64, $sformatf("h3 and h4 agree on %0d of 1024 slots", same));
    // spread of sequential numbers over 64 slots
    foreach (bucket[i]) bucket[i] = 0;
    for (int i = 0; i < 4096; i++) begin
      key = {2'd2, 46'(i)}; sel = 8'd0; #1;
      bucket[dig[5:0]]++;
    end
    foreach (bucket[i]) check(bucket[i] > 32 && bucket[i] < 100, $sformatf("bucket %0d holds %0d", i, bucket[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
