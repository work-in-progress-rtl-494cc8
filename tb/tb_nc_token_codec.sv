// tb_nc_token_codec: self-checking test of nc_token_codec.
//
// Drives random and corner-case 64-bit tokens into the decoder and compares type, tag,
// number, offset and key against a reference written from the published token table
// (type 0: n 14 / offset 32, type 1: n 46, type 2: n 30 / offset 16, type 3: n 22 /
// offset 24). Checks that the all-zero root token decodes to number 0 with the address
// as offset, and that encode followed by decode returns type, tag and the truncated
// number with offset 0. Purely combinational DUT: values are applied, then checked after
// #1. Prints TB_RESULT; a watchdog stops a hung run.
module tb_nc_token_codec;
  import nc_pkg::*;
  int checks = 0, failures = 0;

  token_t        dt;
  token_fields_t df;
  key_t          dk;
  logic [1:0]    et;
  tag_t          etag;
  logic [NUM_W-1:0] en;
  token_t        etok;

  nc_token_codec dut (.dec_token(dt), .dec_fields(df), .dec_key(dk),
                      .enc_ttype(et), .enc_tag(etag), .enc_num(en), .enc_token(etok));

  task automatic check(input bit c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // reference decode
  function automatic void ref_dec(input token_t t, output logic [45:0] n, output logic [31:0] o);
    int nb;
    case (t[63:62]) 2'd0: nb = 14; 2'd1: nb = 46; 2'd2: nb = 30; default: nb = 22; endcase
    n = '0; o = '0;
    for (int i = 0; i < 46; i++) begin
      if (i < 46 - nb) o[i] = t[i];          // offset occupies the low 46-nb bits
      else             n[i - (46 - nb)] = t[i];
    end
  endfunction

  initial begin
    #2_000_000 $display("TB_RESULT checks=%0d failures=%0d (watchdog)", checks, failures + 1);
    $finish;
  end

  initial begin
    logic [45:0] rn; logic [31:0] ro;
    // root: a plain 32-bit physical address
    dt = 64'h0000_0000_1234_5678; #1;
    check(df.ttype == 0 && df.tag == 0 && df.num == 0 && df.offset == 32'h1234_5678 && dk == 0,
          "legacy address is an offset into the root");
    dt = 64'hFFFF_FFFF_FFFF_FFFF; #1;
    check(df.ttype == 3 && df.tag == 16'hFFFF && df.num == 46'h3F_FFFF && df.offset == 32'hFF_FFFF,
          "all-ones type 3");
    for (int i = 0; i < 4000; i++) begin
      dt = {$urandom, $urandom};
      if (i < 4) dt[63:62] = 2'(i);
      #1;
      ref_dec(dt, rn, ro);
      check(df.ttype == dt[63:62] && df.tag == dt[61:46] && df.num == rn && df.offset == ro &&
            dk == {dt[63:62], rn}, $sformatf("decode %h", dt));
      // encode / decode round trip
      et = 2'($urandom); etag = 16'($urandom); en = {14'($urandom), $urandom};
      #1;
      dt = etok; #1;
      check(df.ttype == et && df.tag == etag && df.num == num_trunc(et, en) && df.offset == 0,
            $sformatf("round trip type %0d n %h", et, en));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
