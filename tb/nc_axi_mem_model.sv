// nc_axi_mem_model: simulation model of the data stores behind the northbridge: a
// byte-addressed memory of 2^AW bytes on the simplified downstream AXI port (INCR bursts
// of 64-bit beats, one transaction at a time, OKAY responses).
//
// Byte strobes are honoured. Counters report how many write and read transactions and
// how many written beats arrived, so a testbench can prove that a refused access never
// reached a data store.
module nc_axi_mem_model
  import nc_pkg::*;
#(
  parameter int unsigned AW = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        aw_valid,
  output logic        aw_ready,
  input  dn_ax_t      aw,
  input  logic        w_valid,
  output logic        w_ready,
  input  w_t          w,
  output logic        b_valid,
  input  logic        b_ready,
  output logic [1:0]  b_resp,
  input  logic        ar_valid,
  output logic        ar_ready,
  input  dn_ax_t      ar,
  output logic        r_valid,
  input  logic        r_ready,
  output r_t          r,
  output int unsigned n_writes,
  output int unsigned n_reads,
  output int unsigned n_wbeats
);
  logic [7:0] mem [2**AW];
  logic        wbusy, rbusy;
  logic [31:0] waddr, raddr;
  logic [7:0]  rleft;

  initial for (int i = 0; i < 2**AW; i++) mem[i] = 8'(i * 7 + 3);

  assign aw_ready = !wbusy && !b_valid;
  assign w_ready  = wbusy;
  assign ar_ready = !rbusy;
  assign b_resp   = RESP_OKAY;

  always_comb begin
    r = '0;
    for (int i = 0; i < 8; i++) r.data[8*i +: 8] = mem[(raddr + 32'(i)) % (2**AW)];
    r.resp = RESP_OKAY;
    r.last = (rleft == '0);
  end
  assign r_valid = rbusy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wbusy <= 1'b0; rbusy <= 1'b0; b_valid <= 1'b0;
      waddr <= '0; raddr <= '0; rleft <= '0;
      n_writes <= 0; n_reads <= 0; n_wbeats <= 0;
    end else begin
      if (aw_valid && aw_ready) begin
        wbusy    <= 1'b1;
        waddr    <= {aw.addr[31:3], 3'b000};
        n_writes <= n_writes + 1;
      end
      if (w_valid && w_ready) begin
        for (int i = 0; i < 8; i++)
          if (w.strb[i]) mem[(waddr + 32'(i)) % (2**AW)] <= w.data[8*i +: 8];
        waddr    <= waddr + 32'd8;
        n_wbeats <= n_wbeats + 1;
        if (w.last) begin wbusy <= 1'b0; b_valid <= 1'b1; end
      end
      if (b_valid && b_ready) b_valid <= 1'b0;
      if (ar_valid && ar_ready) begin
        rbusy   <= 1'b1;
        raddr   <= {ar.addr[31:3], 3'b000};
        rleft   <= ar.len;
        n_reads <= n_reads + 1;
      end else if (r_valid && r_ready) begin
        raddr <= raddr + 32'd8;
        if (rleft == '0) rbusy <= 1'b0;
        else rleft <= rleft - 8'd1;
      end
    end
  end

  function automatic logic [7:0] peek(input int unsigned a);
    return mem[a % (2**AW)];
  endfunction
endmodule
