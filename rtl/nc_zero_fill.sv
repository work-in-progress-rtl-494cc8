// nc_zero_fill: overwrites a segment with zero bytes on the downstream bus, as part of
// revoking a direct capability, so that no data of the previous owner reaches the
// allocator or the next owner.
//
// A start pulse with (base, length) in bytes makes the engine walk the 8-byte words that
// the byte range [base, base+length) touches. For each word it issues one single-beat
// write (AW and W offered together, len 0, size 3) whose byte strobes select only the
// bytes inside the segment, so neighbouring segments are untouched even when the segment
// is not word aligned; it waits for the write response before the next word. `done`
// pulses once after the last response (or one cycle after start for length 0). `busy` is
// high from start to done. Throughput is one word per write round trip; the document asks
// only that the segment be overwritten with zeros, the single-beat scheme is this
// design's.
module nc_zero_fill
  import nc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] base,
  input  logic [31:0] length,
  output logic        busy,
  output logic        done,
  output logic [31:0] words_written,

  output logic        aw_valid,
  input  logic        aw_ready,
  output dn_ax_t      aw,
  output logic        w_valid,
  input  logic        w_ready,
  output w_t          w,
  input  logic        b_valid,
  output logic        b_ready
);
  typedef enum logic [1:0] {Z_IDLE, Z_ISSUE, Z_RESP, Z_DONE} zstate_e;
  zstate_e state;

  logic [32:0] cur;      // byte address of the current word (aligned)
  logic [32:0] seg_end;  // first byte after the segment
  logic        aw_done, w_done;
  logic [7:0]  strb;

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      logic [32:0] a;
      a = cur + 33'(i);
      strb[i] = (a >= 33'(base)) && (a < seg_end);
    end
  end

  assign busy     = (state != Z_IDLE);
  assign aw_valid = (state == Z_ISSUE) && !aw_done;
  assign w_valid  = (state == Z_ISSUE) && !w_done;
  assign b_ready  = (state == Z_RESP);
  assign aw       = '{addr: cur[31:0], len: 8'd0, size: 3'd3, prot: 3'b000};
  assign w        = '{data: '0, strb: strb, last: 1'b1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= Z_IDLE;
      cur           <= '0;
      seg_end       <= '0;
      aw_done       <= 1'b0;
      w_done        <= 1'b0;
      done          <= 1'b0;
      words_written <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        Z_IDLE: if (start) begin
          cur     <= {1'b0, base[31:3], 3'b000};
          seg_end <= 33'(base) + 33'(length);
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          state   <= (length == '0) ? Z_DONE : Z_ISSUE;
        end
        Z_ISSUE: begin
          if (aw_valid && aw_ready) aw_done <= 1'b1;
          if (w_valid && w_ready)   w_done  <= 1'b1;
          if ((aw_done || aw_ready) && (w_done || w_ready)) state <= Z_RESP;
        end
        Z_RESP: if (b_valid) begin
          words_written <= words_written + 32'd1;
          aw_done <= 1'b0;
          w_done  <= 1'b0;
          if (cur + 33'd8 >= seg_end) state <= Z_DONE;
          else begin
            cur   <= cur + 33'd8;
            state <= Z_ISSUE;
          end
        end
        default: begin
          done  <= 1'b1;
          state <= Z_IDLE;
        end
      endcase
    end
  end

endmodule
