// nc_northbridge: the Northcape capability-enforcing northbridge, the top of the design.
//
// It sits between the data users (CPU, DMA devices, accelerators: AXI masters, upstream
// port s_*) and the data stores (memory controller, MMIO peripherals: downstream port
// m_*). Every upstream address is a 64-bit capability token and the task identifier rides
// in AxUSER. For each transaction the front end has the resolver validate the token
// against the capability metadata table (CMT, kept in memory behind the cmt_* port) and
// walk to the owning direct capability, then nc_access_check decides. A granted
// transaction is forwarded with its physical address (segment base + offset); a refused
// one never reaches a data store and is answered with SLVERR (the bus error), all write
// data being consumed. Paged-out and copy-on-write faults also raise `irq` and latch the
// faulting token.
//
// Granted accesses whose physical address falls in the 256-byte window at MMIO_BASE reach
// the northbridge's own registers instead (single-beat 64-bit accesses): operand and
// result registers of the capability operations (nc_cap_ops), the command register whose
// write runs an operation (the write response is returned when it has finished), CMT
// status, the shadow-table start, the nonce, the fault/IRQ registers and statistics. At
// reset the CMT controller clears the initial table and installs the root capability, so
// a plain 32-bit address reaches physical memory and these registers until software
// replaces the root.
//
// One upstream transaction is handled at a time (reads and writes alternate when both
// wait). Latency added to an access: one CMT lookup per level of the capability chain
// plus a few cycles of control; the downstream data phase is passed through unchanged.
// During revoke the zero filler owns the downstream write channels.
//
// Follows the document: enforcement at the bus in the northbridge for every master,
// tokens in the address lanes, task id in the User vector, the CMT in main memory, MMIO
// operation interface, root capability at reset, bus error on refusal, IRQ for paged-out
// capabilities. This design's choices: the simplified AXI subset (INCR bursts, one
// transaction in flight), the register map, the MMIO window and the fault handling of
// copy-on-write capabilities.
module nc_northbridge
  import nc_pkg::*;
#(
  parameter logic [31:0]       MMIO_BASE       = 32'hFFFF_0000,
  parameter logic [CMT_AW-1:0] CMT_INIT_START  = '0,
  parameter int unsigned       CMT_INIT_BITS   = 10,
  parameter int unsigned       CMT_MAX_BITS    = 20,
  parameter int unsigned       OVF_N           = 8,
  parameter int unsigned       MAX_DEPTH       = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [63:0] mac_key,     // secret key of the tag MAC
  output logic        irq,

  // upstream (data users)
  input  logic        s_aw_valid,
  output logic        s_aw_ready,
  input  up_ax_t      s_aw,
  input  logic        s_w_valid,
  output logic        s_w_ready,
  input  w_t          s_w,
  output logic        s_b_valid,
  input  logic        s_b_ready,
  output logic [1:0]  s_b_resp,
  input  logic        s_ar_valid,
  output logic        s_ar_ready,
  input  up_ax_t      s_ar,
  output logic        s_r_valid,
  input  logic        s_r_ready,
  output r_t          s_r,

  // downstream (data stores)
  output logic        m_aw_valid,
  input  logic        m_aw_ready,
  output dn_ax_t      m_aw,
  output logic        m_w_valid,
  input  logic        m_w_ready,
  output w_t          m_w,
  input  logic        m_b_valid,
  output logic        m_b_ready,
  input  logic [1:0]  m_b_resp,
  output logic        m_ar_valid,
  input  logic        m_ar_ready,
  output dn_ax_t      m_ar,
  input  logic        m_r_valid,
  output logic        m_r_ready,
  input  r_t          m_r,

  // CMT memory
  output logic              cmt_req_valid,
  input  logic              cmt_req_ready,
  output logic              cmt_req_we,
  output logic [CMT_AW-1:0] cmt_req_idx,
  output cmt_entry_t        cmt_req_wdata,
  input  logic              cmt_rsp_valid,
  input  cmt_entry_t        cmt_rsp_rdata
);

  // ================================================================ CMT controller
  logic       cc_valid, cc_ready, cc_rsp_valid, cc_rsp_ok;
  cmt_cmd_e   cc_op;
  key_t       cc_key;
  tag_t       cc_tag;
  cmt_loc_t   cc_loc, cc_rsp_loc;
  cmt_entry_t cc_entry, cc_rsp_entry;

  logic              shadow_wr, freed_clr;
  logic [CMT_AW-1:0] shadow_start;
  logic              st_init_done, st_expanding, st_shadow_ready, st_freed;
  logic [CMT_AW-1:0] st_act_start;
  logic [7:0]        st_act_bits, st_act_sel;
  logic [CMT_AW:0]   st_act_count, st_shd_count;
  logic [$clog2(OVF_N+1)-1:0] st_ovf_count;
  logic [31:0]       st_moves, st_promotions;

  nc_cmt_ctrl #(
    .INIT_START(CMT_INIT_START), .INIT_BITS(CMT_INIT_BITS),
    .MAX_BITS(CMT_MAX_BITS), .OVF_N(OVF_N)
  ) u_cmt (
    .clk, .rst_n,
    .cmd_valid(cc_valid), .cmd_ready(cc_ready), .cmd_op(cc_op), .cmd_key(cc_key),
    .cmd_tag(cc_tag), .cmd_loc(cc_loc), .cmd_entry(cc_entry),
    .rsp_valid(cc_rsp_valid), .rsp_ok(cc_rsp_ok), .rsp_entry(cc_rsp_entry), .rsp_loc(cc_rsp_loc),
    .shadow_wr, .shadow_start, .freed_clr,
    .st_init_done, .st_expanding, .st_shadow_ready, .st_freed, .st_act_start, .st_act_bits,
    .st_act_sel, .st_act_count, .st_shd_count, .st_ovf_count, .st_moves, .st_promotions,
    .mem_req_valid(cmt_req_valid), .mem_req_ready(cmt_req_ready), .mem_req_we(cmt_req_we),
    .mem_req_idx(cmt_req_idx), .mem_req_wdata(cmt_req_wdata),
    .mem_rsp_valid(cmt_rsp_valid), .mem_rsp_rdata(cmt_rsp_rdata)
  );

  // ================================================================ resolver
  logic        rv_valid, rv_ready, rv_done, rv_ok;
  token_t      rv_token;
  fault_e      rv_fault;
  cmt_entry_t  rv_leaf, rv_owner;
  cmt_loc_t    rv_leaf_loc, rv_owner_loc;
  key_t        rv_leaf_key, rv_owner_key;
  logic [31:0] rv_offset;
  logic [7:0]  rv_depth;
  logic        rc_valid;
  key_t        rc_key;
  tag_t        rc_tag;

  nc_resolver #(.MAX_DEPTH(MAX_DEPTH)) u_res (
    .clk, .rst_n,
    .req_valid(rv_valid), .req_ready(rv_ready), .req_token(rv_token),
    .done(rv_done), .ok(rv_ok), .fault(rv_fault), .leaf(rv_leaf), .leaf_loc(rv_leaf_loc),
    .leaf_key(rv_leaf_key), .owner(rv_owner), .owner_loc(rv_owner_loc),
    .owner_key(rv_owner_key), .offset(rv_offset), .depth(rv_depth),
    .cmt_valid(rc_valid), .cmt_ready(cc_ready), .cmt_key(rc_key), .cmt_tag(rc_tag),
    .cmt_rsp_valid(cc_rsp_valid), .cmt_rsp_ok(cc_rsp_ok), .cmt_rsp_entry(cc_rsp_entry),
    .cmt_rsp_loc(cc_rsp_loc)
  );

  // ================================================================ capability operations
  logic        op_start, op_busy, op_done, op_res_bit;
  cap_op_e     op_code;
  op_err_e     op_err;
  token_t      op_res0, op_res1;
  logic [31:0] nonce;
  logic        ox_rs_valid;
  token_t      ox_rs_token;
  logic        ox_cm_valid;
  cmt_cmd_e    ox_cm_op;
  key_t        ox_cm_key;
  cmt_loc_t    ox_cm_loc;
  cmt_entry_t  ox_cm_entry;
  logic        zf_start, zf_busy, zf_done;
  logic [31:0] zf_base, zf_length, zf_words;

  // operand registers
  token_t      r_cap_a, r_cap_b;
  logic [31:0] r_len, r_off;
  logic [5:0]  r_perms;
  logic [63:0] r_user;
  logic [TID_W-1:0] r_tid;

  nc_cap_ops u_ops (
    .clk, .rst_n, .mac_key,
    .start(op_start), .op(op_code), .cap_a(r_cap_a), .cap_b(r_cap_b), .arg_len(r_len),
    .arg_off(r_off), .arg_perms(r_perms), .arg_user(r_user), .arg_tid(r_tid),
    .busy(op_busy), .done(op_done), .res_bit(op_res_bit), .err(op_err),
    .res0(op_res0), .res1(op_res1), .nonce,
    .rs_valid(ox_rs_valid), .rs_ready(rv_ready), .rs_token(ox_rs_token), .rs_done(rv_done),
    .rs_ok(rv_ok), .rs_leaf(rv_leaf), .rs_leaf_loc(rv_leaf_loc), .rs_leaf_key(rv_leaf_key),
    .rs_owner(rv_owner), .rs_owner_loc(rv_owner_loc), .rs_depth(rv_depth),
    .cm_valid(ox_cm_valid), .cm_ready(cc_ready), .cm_op(ox_cm_op), .cm_key(ox_cm_key),
    .cm_loc(ox_cm_loc), .cm_entry(ox_cm_entry), .cm_rsp_valid(cc_rsp_valid),
    .cm_rsp_ok(cc_rsp_ok),
    .zf_start, .zf_base, .zf_length, .zf_done
  );

  // CMT command port: resolver lookups, or the operation unit's writes (never together)
  always_comb begin
    if (rc_valid) begin
      cc_valid = 1'b1;
      cc_op    = CMD_LOOKUP;
      cc_key   = rc_key;
      cc_tag   = rc_tag;
      cc_loc   = '0;
      cc_entry = '0;
    end else begin
      cc_valid = ox_cm_valid;
      cc_op    = ox_cm_op;
      cc_key   = ox_cm_key;
      cc_tag   = '0;
      cc_loc   = ox_cm_loc;
      cc_entry = ox_cm_entry;
    end
  end

  // ================================================================ zero filler
  logic   zf_aw_valid, zf_w_valid, zf_b_ready;
  dn_ax_t zf_aw;
  w_t     zf_w;

  nc_zero_fill u_zf (
    .clk, .rst_n, .start(zf_start), .base(zf_base), .length(zf_length),
    .busy(zf_busy), .done(zf_done), .words_written(zf_words),
    .aw_valid(zf_aw_valid), .aw_ready(m_aw_ready), .aw(zf_aw),
    .w_valid(zf_w_valid), .w_ready(m_w_ready), .w(zf_w),
    .b_valid(m_b_valid), .b_ready(zf_b_ready)
  );

  // ================================================================ front end
  typedef enum logic [3:0] {
    F_IDLE, F_RES, F_RESW, F_DECIDE, F_ERR_W, F_ERR_B, F_ERR_R,
    F_FWD_AW, F_FWD_W, F_FWD_B, F_FWD_AR, F_FWD_R,
    F_MMIO_W, F_MMIO_OP, F_MMIO_B, F_MMIO_R
  } fstate_e;

  fstate_e     fs;
  logic        is_write, prefer_read;
  up_ax_t      tx;
  logic        grant;
  fault_e      fault;
  logic [31:0] phys;
  logic [7:0]  beats_left;
  logic [1:0]  resp_q;
  logic [63:0] rdata_q;
  logic        irq_q;
  token_t      fault_tok;
  access_e     acc;

  assign acc = is_write ? ACC_WRITE : (tx.prot[2] ? ACC_EXEC : ACC_READ);

  nc_access_check u_chk (
    .resolved_ok(rv_ok), .resolve_fault(rv_fault), .leaf(rv_leaf), .owner(rv_owner),
    .offset(rv_offset), .len(tx.len), .size(tx.size), .access(acc), .tid(tx.user),
    .grant, .fault, .phys_addr(phys)
  );

  logic in_mmio;
  assign in_mmio = (phys >= MMIO_BASE) && ({1'b0, phys} < {1'b0, MMIO_BASE} + 33'h100);

  // resolver request: from the operation unit while it runs, else from the front end
  assign rv_valid = op_busy ? ox_rs_valid : (fs == F_RES);
  assign rv_token = op_busy ? ox_rs_token : tx.addr;

  assign s_aw_ready = (fs == F_IDLE) && st_init_done && !(s_ar_valid && prefer_read);
  assign s_ar_ready = (fs == F_IDLE) && st_init_done && !(s_aw_valid && !prefer_read);

  // downstream write channels: zero filler during revoke, else forwarded traffic
  always_comb begin
    if (zf_busy) begin
      m_aw_valid = zf_aw_valid;
      m_aw       = zf_aw;
      m_w_valid  = zf_w_valid;
      m_w        = zf_w;
      m_b_ready  = zf_b_ready;
    end else begin
      m_aw_valid = (fs == F_FWD_AW);
      m_aw       = '{addr: phys, len: tx.len, size: tx.size, prot: tx.prot};
      m_w_valid  = (fs == F_FWD_W) && s_w_valid;
      m_w        = s_w;
      m_b_ready  = (fs == F_FWD_B) && s_b_ready;
    end
  end
  assign m_ar_valid = (fs == F_FWD_AR);
  assign m_ar       = '{addr: phys, len: tx.len, size: tx.size, prot: tx.prot};
  assign m_r_ready  = (fs == F_FWD_R) && s_r_ready;

  always_comb begin
    s_w_ready = 1'b0;
    unique case (fs)
      F_FWD_W:  s_w_ready = m_w_ready;
      F_ERR_W:  s_w_ready = 1'b1;
      F_MMIO_W: s_w_ready = 1'b1;
      default:  s_w_ready = 1'b0;
    endcase
  end

  assign s_b_valid = (fs == F_FWD_B) ? m_b_valid : (fs == F_ERR_B || fs == F_MMIO_B);
  assign s_b_resp  = (fs == F_FWD_B) ? m_b_resp : resp_q;

  always_comb begin
    s_r_valid = 1'b0;
    s_r       = '0;
    unique case (fs)
      F_FWD_R:  begin s_r_valid = m_r_valid; s_r = m_r; end
      F_ERR_R:  begin s_r_valid = 1'b1; s_r = '{data: '0, resp: RESP_SLVERR, last: beats_left == '0}; end
      F_MMIO_R: begin s_r_valid = 1'b1; s_r = '{data: rdata_q, resp: resp_q, last: 1'b1}; end
      default: ;
    endcase
  end

  // register read mux
  function automatic logic [63:0] reg_read(input logic [7:0] a);
    unique case (a)
      R_CAP_A:    return r_cap_a;
      R_CAP_B:    return r_cap_b;
      R_LEN:      return 64'(r_len);
      R_OFFSET:   return 64'(r_off);
      R_PERMS:    return 64'(r_perms);
      R_USER:     return r_user;
      R_TID:      return 64'd0;            // the task id is write-only
      R_CMD:      return 64'({op_err, op_res_bit, op_busy});
      R_RES0:     return op_res0;
      R_RES1:     return op_res1;
      R_CMTSTAT:  return 64'({8'(st_ovf_count), st_act_start, st_act_sel, st_act_bits,
                              4'b0, st_init_done, st_freed, st_shadow_ready, st_expanding});
      R_SHADOW:   return {7'b0, st_act_count, 7'b0, st_shd_count};
      R_NONCE:    return 64'(nonce);
      R_IRQ:      return {zf_words, 31'b0, irq_q};
      R_FAULTTOK: return fault_tok;
      R_STATS:    return {st_moves, st_promotions};
      default:    return 64'd0;
    endcase
  endfunction

  assign irq = irq_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fs          <= F_IDLE;
      is_write    <= 1'b0;
      prefer_read <= 1'b0;
      tx          <= '0;
      beats_left  <= '0;
      resp_q      <= RESP_OKAY;
      rdata_q     <= '0;
      irq_q       <= 1'b0;
      fault_tok   <= '0;
      r_cap_a     <= '0;
      r_cap_b     <= '0;
      r_len       <= '0;
      r_off       <= '0;
      r_perms     <= '0;
      r_user      <= '0;
      r_tid       <= '0;
      op_start    <= 1'b0;
      op_code     <= OP_NOP;
      shadow_wr   <= 1'b0;
      shadow_start <= '0;
      freed_clr   <= 1'b0;
    end else begin
      op_start  <= 1'b0;
      shadow_wr <= 1'b0;
      freed_clr <= 1'b0;
      unique case (fs)
        F_IDLE: begin
          if (s_aw_valid && s_aw_ready) begin
            tx          <= s_aw;
            is_write    <= 1'b1;
            prefer_read <= 1'b1;
            fs          <= F_RES;
          end else if (s_ar_valid && s_ar_ready) begin
            tx          <= s_ar;
            is_write    <= 1'b0;
            prefer_read <= 1'b0;
            fs          <= F_RES;
          end
        end
        F_RES:  if (rv_ready) fs <= F_RESW;
        F_RESW: if (rv_done) fs <= F_DECIDE;
        F_DECIDE: begin
          beats_left <= tx.len;
          if (!grant) begin
            resp_q <= RESP_SLVERR;
            if (fault == F_PAGED || fault == F_COW) begin
              irq_q     <= 1'b1;
              fault_tok <= tx.addr;
            end
            fs <= is_write ? F_ERR_W : F_ERR_R;
          end else if (in_mmio) begin
            resp_q <= (tx.len == '0) ? RESP_OKAY : RESP_SLVERR;
            if (is_write) fs <= F_MMIO_W;
            else begin
              rdata_q <= reg_read(phys[7:0] & 8'hF8);
              fs      <= (tx.len == '0) ? F_MMIO_R : F_ERR_R;
            end
          end else begin
            fs <= is_write ? F_FWD_AW : F_FWD_AR;
          end
        end

        // -------------------------------------------- refused transactions
        F_ERR_W: if (s_w_valid && s_w.last) fs <= F_ERR_B;
        F_ERR_B: if (s_b_ready) fs <= F_IDLE;
        F_ERR_R: if (s_r_ready) begin
          if (beats_left == '0) fs <= F_IDLE;
          else beats_left <= beats_left - 8'd1;
        end

        // -------------------------------------------- forwarded transactions
        F_FWD_AW: if (m_aw_ready) fs <= F_FWD_W;
        F_FWD_W:  if (s_w_valid && m_w_ready && s_w.last) fs <= F_FWD_B;
        F_FWD_B:  if (m_b_valid && s_b_ready) fs <= F_IDLE;
        F_FWD_AR: if (m_ar_ready) fs <= F_FWD_R;
        F_FWD_R:  if (m_r_valid && s_r_ready && m_r.last) fs <= F_IDLE;

        // -------------------------------------------- northbridge registers
        F_MMIO_W: if (s_w_valid) begin
          if (!s_w.last) begin
            resp_q <= RESP_SLVERR;
            fs     <= F_ERR_W;
          end else if (resp_q != RESP_OKAY) begin
            fs <= F_ERR_B;
          end else begin
            fs <= F_MMIO_B;
            unique case (phys[7:0] & 8'hF8)
              R_CAP_A:   r_cap_a <= s_w.data;
              R_CAP_B:   r_cap_b <= s_w.data;
              R_LEN:     r_len   <= s_w.data[31:0];
              R_OFFSET:  r_off   <= s_w.data[31:0];
              R_PERMS:   r_perms <= s_w.data[5:0];
              R_USER:    r_user  <= s_w.data;
              R_TID:     r_tid   <= s_w.data;
              R_CMD: begin
                op_code  <= cap_op_e'(s_w.data[3:0]);
                op_start <= 1'b1;
                fs       <= F_MMIO_OP;
              end
              R_CMTSTAT: freed_clr <= s_w.data[2];
              R_SHADOW: begin
                shadow_start <= s_w.data[CMT_AW-1:0];
                shadow_wr    <= 1'b1;
              end
              R_IRQ:     if (s_w.data[0]) irq_q <= 1'b0;
              default: ;
            endcase
          end
        end
        F_MMIO_OP: if (op_done) fs <= F_MMIO_B;
        F_MMIO_B:  if (s_b_ready) fs <= F_IDLE;
        F_MMIO_R:  if (s_r_ready) fs <= F_IDLE;
        default:   fs <= F_IDLE;
      endcase
    end
  end

  // A refused or register write must not be forwarded, and the operation unit and the
  // front end never drive the resolver at the same time.
  a_op_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    op_busy |-> (fs == F_MMIO_OP || fs == F_MMIO_W));
  a_cmt_exclusive: assert property (@(posedge clk) disable iff (!rst_n)
    !(rc_valid && ox_cm_valid));

endmodule
