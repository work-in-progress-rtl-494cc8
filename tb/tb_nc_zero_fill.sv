// tb_nc_zero_fill: self-checking test of nc_zero_fill, the revoke-time segment scrubber.
//
// The engine is connected to nc_axi_mem_model (byte memory preset to a known pattern,
// random ready stalls). For aligned, unaligned, single-byte, word-straddling and
// zero-length segments the test starts the engine, waits for `done`, and then checks every
// byte of a window around the segment: zero inside, untouched pattern outside. It also
// checks the number of words written, that `busy` covers the run, that each write is a
// single beat of size 3, and that `done` is a one-cycle pulse. Inputs change on the
// falling edge. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_zero_fill;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start = 0;
  logic [31:0] base = 0, length = 0;
  logic        busy, done;
  logic [31:0] words;
  logic        aw_valid, aw_ready, w_valid, w_ready, b_valid, b_ready;
  dn_ax_t      aw;
  w_t          w;

  nc_zero_fill dut (.clk, .rst_n, .start, .base, .length, .busy, .done, .words_written(words),
                    .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w, .b_valid, .b_ready);

  // memory: writes only; the read channels are tied off
  logic        ar_valid = 0, r_valid, ar_ready, r_ready = 0;
  dn_ax_t      ar = '0;
  r_t          r;
  logic [1:0]  b_resp;
  int unsigned n_writes, n_reads, n_wbeats;
  nc_axi_mem_model #(.AW(16)) u_mem (
    .clk, .rst_n, .aw_valid, .aw_ready, .aw, .w_valid, .w_ready, .w,
    .b_valid, .b_ready, .b_resp, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .n_writes, .n_reads, .n_wbeats);

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n && aw_valid && aw_ready)
    if (aw.len != 0 || aw.size != 3 || aw.addr[2:0] != 0) begin
      failures++; $display("FAIL: write is not a single aligned 8-byte beat");
    end

  int done_cycles = 0;
  always @(posedge clk) if (done) done_cycles++;

  task automatic fill(input logic [31:0] b, input logic [31:0] l);
    int unsigned w0, cyc, dc0;
    logic [7:0] exp;
    w0 = words; dc0 = done_cycles;
    @(negedge clk); base = b; length = l; start = 1;
    @(negedge clk); start = 0;
    check(busy || l == 0 || done, "busy after start");
    cyc = 0;
    while (!done && cyc < 10000) begin @(negedge clk); cyc++; end
    @(negedge clk);
    check(!busy && done_cycles == dc0 + 1, "done is one pulse and busy drops");
    check(words - w0 == ((l == 0) ? 0 : (((b + l - 1) >> 3) - (b >> 3) + 1)),
          $sformatf("words written for [%h,+%0d)", b, l));
    for (int a = int'(b) - 24; a < int'(b + l) + 24; a++) begin
      exp = (a >= int'(b) && a < int'(b + l)) ? 8'h00 : 8'(a * 7 + 3);
      if (u_mem.peek(a) != exp) begin
        check(0, $sformatf("byte %h = %h, expected %h (segment %h +%0d)", a, u_mem.peek(a), exp, b, l));
        break;
      end
    end
    checks++;
  endtask

  initial begin
    #5_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    fill(32'h0100, 32'd64);     // aligned
    fill(32'h0203, 32'd13);     // unaligned both ends
    fill(32'h0305, 32'd1);      // single byte
    fill(32'h0406, 32'd4);      // straddles two words
    fill(32'h0500, 32'd0);      // empty
    fill(32'h0601, 32'd7);      // ends exactly on a word boundary
    for (int i = 0; i < 30; i++)
      fill(32'h1000 + 32'(i) * 32'h100 + 32'($urandom_range(0, 7)), 32'($urandom_range(1, 120)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
