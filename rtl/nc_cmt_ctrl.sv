// nc_cmt_ctrl: keeps the capability metadata table (CMT), a hash table of 256-bit entries
// in main memory, and hides its expansion from the rest of the northbridge.
//
// Table organisation (extendible hashing with one inlined entry per directory slot): the
// active table occupies slots [act_start, act_start + 2^act_bits) of the CMT memory and a
// capability key k lives in slot act_start + (h_sel(k) mod 2^act_bits). When an insert
// collides, the controller turns an empty "shadow" table of twice the size (act_bits+1,
// placed by software at shd_start) into the target of all further inserts, using the next
// hash function of the family. While this expansion runs, every lookup checks the
// overflow buffer, then the active table, then the shadow table; an entry found in the
// active table is moved ("rehashed on access") into the shadow table. When the active
// table holds no entry any more, the shadow table is promoted to active, the sticky
// `freed` flag tells software that the old region may be reused, and software can supply
// the next shadow region. Collisions that cannot be placed otherwise go to a small
// overflow CAM; a lookup that hits there moves the entry to its slot in the table that
// takes inserts (shadow while expanding, otherwise active) when that slot is free, so the
// buffer drains. Entries carry no copy of the number n, so a slot matches a lookup when it
// is occupied and its stored MAC tag equals the presented one.
//
// Reset clears the initial table and installs the root capability (key 0, tag 0: a direct
// capability with base 0 over the whole 32-bit physical space). Writing a new shadow
// start also makes the controller clear that region, one slot per idle cycle, before it
// can be used.
//
// Command port (one command at a time, cmd_ready only in the idle state; one rsp_valid
// pulse per command):
//   LOOKUP key,tag   -> rsp_ok = found, rsp_entry, rsp_loc (after a possible move)
//   INSERT key,entry -> rsp_ok = placed, rsp_loc
//   UPDATE loc,entry -> rewrites the entry in place
//   DELETE loc       -> empties the slot
// Memory port: valid/ready request of one 256-bit slot, and exactly one mem_rsp_valid per
// request (read data, or an acknowledge for a write). A lookup costs one memory read
// outside expansion and up to two reads (plus the move) during it.
//
// Follows the document: single contiguous table, per-slot inlined bucket, shadow table of
// twice the size with a new hash, rehash on access, promotion when the old table is
// empty, status flag to the allocator, overflow CAM during expansion. This design's
// choices: the state machine, slot-index units, tag matching, the hardware clearing of
// the shadow region, that inserts fall back to the overflow buffer when no shadow table
// is available, and draining the buffer on lookup.
module nc_cmt_ctrl
  import nc_pkg::*;
#(
  parameter logic [CMT_AW-1:0] INIT_START = '0,
  parameter int unsigned       INIT_BITS  = 10,
  parameter int unsigned       MAX_BITS   = 20,
  parameter int unsigned       OVF_N      = 8
) (
  input  logic              clk,
  input  logic              rst_n,

  input  logic              cmd_valid,
  output logic              cmd_ready,
  input  cmt_cmd_e          cmd_op,
  input  key_t              cmd_key,
  input  tag_t              cmd_tag,
  input  cmt_loc_t          cmd_loc,
  input  cmt_entry_t        cmd_entry,
  output logic              rsp_valid,
  output logic              rsp_ok,
  output cmt_entry_t        rsp_entry,
  output cmt_loc_t          rsp_loc,

  // software control / status
  input  logic              shadow_wr,
  input  logic [CMT_AW-1:0] shadow_start,
  input  logic              freed_clr,
  output logic              st_init_done,
  output logic              st_expanding,
  output logic              st_shadow_ready,
  output logic              st_freed,
  output logic [CMT_AW-1:0] st_act_start,
  output logic [7:0]        st_act_bits,
  output logic [7:0]        st_act_sel,
  output logic [CMT_AW:0]   st_act_count,
  output logic [CMT_AW:0]   st_shd_count,
  output logic [$clog2(OVF_N+1)-1:0] st_ovf_count,
  output logic [31:0]       st_moves,        // entries rehashed into the shadow table
  output logic [31:0]       st_promotions,

  // CMT memory
  output logic              mem_req_valid,
  input  logic              mem_req_ready,
  output logic              mem_req_we,
  output logic [CMT_AW-1:0] mem_req_idx,
  output cmt_entry_t        mem_req_wdata,
  input  logic              mem_rsp_valid,
  input  cmt_entry_t        mem_rsp_rdata
);

  localparam int unsigned OW = $clog2(OVF_N);

  typedef enum logic [4:0] {
    S_INIT_CLR, S_INIT_ROOT, S_IDLE, S_MEM, S_MEMW,
    S_LK_ACT, S_LK_SHD, S_MV_SHD, S_MV_CLR, S_MV_OVF,
    S_INS_ACT, S_INS_SHD, S_WR_DONE, S_DEL_DONE, S_CLR_DONE
  } state_e;

  state_e            state, ret_state;
  logic              mreq_we;
  logic [CMT_AW-1:0] mreq_idx;
  cmt_entry_t        mreq_wdata;
  cmt_entry_t        mdata;

  // table registers
  logic [CMT_AW-1:0] act_start, shd_start;
  logic [7:0]        act_bits, shd_bits, act_sel, shd_sel;
  logic [CMT_AW:0]   act_count, shd_count;
  logic              expanding, shd_ready, clearing, freed, init_done;
  logic [CMT_AW:0]   clr_ptr;

  // current command
  key_t       c_key;
  tag_t       c_tag;
  cmt_loc_t   c_loc;
  cmt_entry_t c_entry;
  cmt_entry_t found;
  logic [CMT_AW-1:0] act_slot_q;

  // hashes of the current key
  logic [31:0] dig_act, dig_shd;
  nc_hash u_h_act (.key(c_key), .sel(act_sel), .digest(dig_act));
  nc_hash u_h_shd (.key(c_key), .sel(shd_sel), .digest(dig_shd));

  function automatic logic [CMT_AW-1:0] slot(input logic [CMT_AW-1:0] start,
                                             input logic [7:0] bits, input logic [31:0] dig);
    logic [31:0] mask;
    mask = (32'd1 << bits) - 32'd1;
    return start + CMT_AW'(dig & mask);
  endfunction

  logic [CMT_AW-1:0] act_slot, shd_slot;
  assign act_slot = slot(act_start, act_bits, dig_act);
  assign shd_slot = slot(shd_start, shd_bits, dig_shd);

  function automatic logic in_act(input logic [CMT_AW-1:0] idx, input logic [CMT_AW-1:0] start,
                                  input logic [7:0] bits);
    logic [CMT_AW:0] end_i;
    end_i = (CMT_AW+1)'(start) + ((CMT_AW+1)'(1) << bits);
    return (idx >= start) && ((CMT_AW+1)'(idx) < end_i);
  endfunction

  // overflow buffer
  logic          ovf_hit, ovf_full;
  logic [OW-1:0] ovf_idx, ovf_free;
  cmt_entry_t    ovf_entry;
  logic          ovf_wr, ovf_new, ovf_inv;
  logic [OW-1:0] ovf_wr_idx, ovf_inv_idx;
  cmt_entry_t    ovf_wr_entry;

  nc_overflow_cam #(.N(OVF_N)) u_ovf (
    .clk, .rst_n,
    .lk_key(c_key), .lk_tag(c_tag), .lk_hit(ovf_hit), .lk_idx(ovf_idx), .lk_entry(ovf_entry),
    .full(ovf_full), .free_idx(ovf_free), .count(st_ovf_count),
    .wr_en(ovf_wr), .wr_new(ovf_new), .wr_idx(ovf_wr_idx), .wr_key(c_key), .wr_entry(ovf_wr_entry),
    .inv_en(ovf_inv), .inv_idx(ovf_inv_idx)
  );

  function automatic cmt_entry_t root_entry();
    cmt_entry_t e;
    e          = '0;
    e.ctype    = CT_DIRECT;
    e.base     = 32'h0;
    e.length   = 32'hFFFF_FFFF;
    e.r        = 1'b1;
    e.w        = 1'b1;
    e.x        = 1'b1;
    e.lockable = 1'b1;
    return e;
  endfunction

  function automatic logic occupied(input cmt_entry_t e);
    return e.ctype != CT_EMPTY;
  endfunction

  assign cmd_ready     = (state == S_IDLE) && init_done && !(expanding && act_count == '0);
  assign mem_req_valid = (state == S_MEM);
  assign mem_req_we    = mreq_we;
  assign mem_req_idx   = mreq_idx;
  assign mem_req_wdata = mreq_wdata;

  assign st_init_done    = init_done;
  assign st_expanding    = expanding;
  assign st_shadow_ready = shd_ready;
  assign st_freed        = freed;
  assign st_act_start    = act_start;
  assign st_act_bits     = act_bits;
  assign st_act_sel      = act_sel;
  assign st_act_count    = act_count;
  assign st_shd_count    = shd_count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_INIT_CLR;
      ret_state  <= S_IDLE;
      mreq_we    <= 1'b0;
      mreq_idx   <= '0;
      mreq_wdata <= '0;
      mdata      <= '0;
      act_start  <= INIT_START;
      act_bits   <= 8'(INIT_BITS);
      act_sel    <= '0;
      shd_start  <= '0;
      shd_bits   <= 8'(INIT_BITS + 1);
      shd_sel    <= 8'd1;
      act_count  <= '0;
      shd_count  <= '0;
      expanding  <= 1'b0;
      shd_ready  <= 1'b0;
      clearing   <= 1'b0;
      freed      <= 1'b0;
      init_done  <= 1'b0;
      clr_ptr    <= '0;
      c_key      <= '0;
      c_tag      <= '0;
      c_loc      <= '0;
      c_entry    <= '0;
      found      <= '0;
      act_slot_q <= '0;
      rsp_valid  <= 1'b0;
      rsp_ok     <= 1'b0;
      rsp_entry  <= '0;
      rsp_loc    <= '0;
      ovf_wr     <= 1'b0;
      ovf_new    <= 1'b0;
      ovf_inv    <= 1'b0;
      ovf_wr_idx <= '0;
      ovf_inv_idx <= '0;
      ovf_wr_entry <= '0;
      st_moves   <= '0;
      st_promotions <= '0;
    end else begin
      rsp_valid <= 1'b0;
      ovf_wr    <= 1'b0;
      ovf_new   <= 1'b1;   // inserts and moves bring their key; an update keeps the slot's
      ovf_inv   <= 1'b0;
      if (freed_clr) freed <= 1'b0;

      // software supplies a new shadow region (ignored while one is pending or in use)
      if (shadow_wr && init_done && !expanding && !shd_ready && !clearing) begin
        shd_start <= shadow_start;
        shd_bits  <= (act_bits < 8'(MAX_BITS)) ? act_bits + 8'd1 : act_bits;
        clearing  <= 1'b1;
        clr_ptr   <= '0;
      end

      unique case (state)
        // ---------------------------------------------------- reset: clear table, add root
        S_INIT_CLR: begin
          if (clr_ptr == ((CMT_AW+1)'(1) << act_bits)) begin
            clr_ptr    <= '0;
            c_key      <= '0;
            state      <= S_INIT_ROOT;
          end else begin
            mreq_we    <= 1'b1;
            mreq_idx   <= act_start + CMT_AW'(clr_ptr);
            mreq_wdata <= '0;
            clr_ptr    <= clr_ptr + 1'b1;
            ret_state  <= S_INIT_CLR;
            state      <= S_MEM;
          end
        end
        S_INIT_ROOT: begin
          if (!init_done) begin
            mreq_we    <= 1'b1;
            mreq_idx   <= act_slot;
            mreq_wdata <= root_entry();
            act_count  <= (CMT_AW+1)'(1);
            init_done  <= 1'b1;
            ret_state  <= S_IDLE;
            state      <= S_MEM;
          end else begin
            state <= S_IDLE;
          end
        end

        // ---------------------------------------------------- memory access sub-sequence
        S_MEM:  if (mem_req_ready) state <= S_MEMW;
        S_MEMW: if (mem_rsp_valid) begin
          mdata <= mem_rsp_rdata;
          state <= ret_state;
        end

        // ---------------------------------------------------- idle: promote, accept, clear
        S_IDLE: begin
          if (expanding && act_count == '0) begin
            // old table drained: the shadow becomes the active table
            act_start <= shd_start;
            act_bits  <= shd_bits;
            act_sel   <= shd_sel;
            act_count <= shd_count;
            shd_count <= '0;
            shd_sel   <= shd_sel + 8'd1;
            expanding <= 1'b0;
            shd_ready <= 1'b0;
            freed     <= 1'b1;
            st_promotions <= st_promotions + 1'b1;
          end else if (cmd_valid) begin
            c_key   <= cmd_key;
            c_tag   <= cmd_tag;
            c_loc   <= cmd_loc;
            c_entry <= cmd_entry;
            ret_state <= S_IDLE;
            unique case (cmd_op)
              CMD_LOOKUP: state <= S_LK_ACT;   // first cycle: hash the key
              CMD_INSERT: state <= S_INS_ACT;
              CMD_UPDATE: begin
                if (cmd_loc.ovf) begin
                  ovf_wr       <= 1'b1;
                  ovf_new      <= 1'b0;
                  ovf_wr_idx   <= cmd_loc.idx[OW-1:0];
                  ovf_wr_entry <= cmd_entry;
                  rsp_valid    <= 1'b1;
                  rsp_ok       <= 1'b1;
                  rsp_loc      <= cmd_loc;
                  rsp_entry    <= cmd_entry;
                end else begin
                  mreq_we    <= 1'b1;
                  mreq_idx   <= cmd_loc.idx;
                  mreq_wdata <= cmd_entry;
                  rsp_loc    <= cmd_loc;
                  rsp_entry  <= cmd_entry;
                  ret_state  <= S_WR_DONE;
                  state      <= S_MEM;
                end
              end
              default: begin // CMD_DELETE
                if (cmd_loc.ovf) begin
                  ovf_inv     <= 1'b1;
                  ovf_inv_idx <= cmd_loc.idx[OW-1:0];
                  rsp_valid   <= 1'b1;
                  rsp_ok      <= 1'b1;
                  rsp_loc     <= cmd_loc;
                  rsp_entry   <= '0;
                end else begin
                  mreq_we    <= 1'b1;
                  mreq_idx   <= cmd_loc.idx;
                  mreq_wdata <= '0;
                  ret_state  <= S_DEL_DONE;
                  state      <= S_MEM;
                end
              end
            endcase
          end else if (clearing) begin
            if (clr_ptr == ((CMT_AW+1)'(1) << shd_bits)) begin
              clearing  <= 1'b0;
              shd_ready <= 1'b1;
            end else begin
              mreq_we    <= 1'b1;
              mreq_idx   <= shd_start + CMT_AW'(clr_ptr);
              mreq_wdata <= '0;
              clr_ptr    <= clr_ptr + 1'b1;
              ret_state  <= S_CLR_DONE;
              state      <= S_MEM;
            end
          end
        end
        S_CLR_DONE: state <= S_IDLE;

        // ---------------------------------------------------- lookup
        // S_LK_ACT is entered twice: once to issue the active-table read (mreq_we
        // distinguishes nothing here, so act_slot_q marks the phase via ret_state).
        S_LK_ACT: begin
          if (ret_state != S_LK_ACT) begin
            if (ovf_hit) begin
              // try to move the entry back to its slot in the table inserts go to
              found      <= ovf_entry;
              c_loc      <= '{ovf: 1'b1, idx: CMT_AW'(ovf_idx)};
              mreq_we    <= 1'b0;
              mreq_idx   <= expanding ? shd_slot : act_slot;
              act_slot_q <= expanding ? shd_slot : act_slot;
              ret_state  <= S_MV_OVF;
              state      <= S_MEM;
            end else begin
              mreq_we    <= 1'b0;
              mreq_idx   <= act_slot;
              act_slot_q <= act_slot;
              ret_state  <= S_LK_ACT;
              state      <= S_MEM;
            end
          end else begin
            ret_state <= S_IDLE;
            if (occupied(mdata) && mdata.tag == c_tag) begin
              found <= mdata;
              if (expanding) begin
                // rehash on access: look at the entry's slot in the shadow table
                mreq_we   <= 1'b0;
                mreq_idx  <= shd_slot;
                ret_state <= S_MV_SHD;
                state     <= S_MEM;
              end else begin
                rsp_valid <= 1'b1;
                rsp_ok    <= 1'b1;
                rsp_entry <= mdata;
                rsp_loc   <= '{ovf: 1'b0, idx: act_slot_q};
                state     <= S_IDLE;
              end
            end else if (expanding) begin
              mreq_we   <= 1'b0;
              mreq_idx  <= shd_slot;
              ret_state <= S_LK_SHD;
              state     <= S_MEM;
            end else begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b0;
              rsp_entry <= '0;
              rsp_loc   <= '0;
              state     <= S_IDLE;
            end
          end
        end
        S_LK_SHD: begin
          ret_state <= S_IDLE;
          rsp_valid <= 1'b1;
          rsp_ok    <= occupied(mdata) && mdata.tag == c_tag;
          rsp_entry <= mdata;
          rsp_loc   <= '{ovf: 1'b0, idx: shd_slot};
          state     <= S_IDLE;
        end
        S_MV_SHD: begin
          ret_state <= S_IDLE;
          if (!occupied(mdata)) begin
            mreq_we    <= 1'b1;
            mreq_idx   <= shd_slot;
            mreq_wdata <= found;
            shd_count  <= shd_count + 1'b1;
            rsp_loc    <= '{ovf: 1'b0, idx: shd_slot};
            ret_state  <= S_MV_CLR;
            state      <= S_MEM;
          end else if (!ovf_full) begin
            ovf_wr       <= 1'b1;
            ovf_wr_idx   <= ovf_free;
            ovf_wr_entry <= found;
            rsp_loc      <= '{ovf: 1'b1, idx: CMT_AW'(ovf_free)};
            mreq_we      <= 1'b1;
            mreq_idx     <= act_slot_q;
            mreq_wdata   <= '0;
            act_count    <= act_count - 1'b1;
            st_moves     <= st_moves + 1'b1;
            ret_state    <= S_WR_DONE;
            rsp_entry    <= found;
            state        <= S_MEM;
          end else begin
            // nowhere to move it: leave it in the old table
            rsp_valid <= 1'b1;
            rsp_ok    <= 1'b1;
            rsp_entry <= found;
            rsp_loc   <= '{ovf: 1'b0, idx: act_slot_q};
            state     <= S_IDLE;
          end
        end
        S_MV_OVF: begin
          ret_state <= S_IDLE;
          rsp_entry <= found;
          if (!occupied(mdata)) begin
            ovf_inv     <= 1'b1;
            ovf_inv_idx <= c_loc.idx[OW-1:0];
            if (expanding) shd_count <= shd_count + 1'b1;
            else           act_count <= act_count + 1'b1;
            mreq_we    <= 1'b1;
            mreq_idx   <= act_slot_q;
            mreq_wdata <= found;
            rsp_loc    <= '{ovf: 1'b0, idx: act_slot_q};
            st_moves   <= st_moves + 1'b1;
            ret_state  <= S_WR_DONE;
            state      <= S_MEM;
          end else begin
            rsp_valid <= 1'b1;
            rsp_ok    <= 1'b1;
            rsp_loc   <= c_loc;
            state     <= S_IDLE;
          end
        end
        S_MV_CLR: begin
          mreq_we    <= 1'b1;
          mreq_idx   <= act_slot_q;
          mreq_wdata <= '0;
          act_count  <= act_count - 1'b1;
          st_moves   <= st_moves + 1'b1;
          rsp_entry  <= found;
          ret_state  <= S_WR_DONE;
          state      <= S_MEM;
        end

        // ---------------------------------------------------- insert
        S_INS_ACT: begin
          if (ret_state != S_INS_ACT) begin
            mreq_we    <= 1'b0;
            if (expanding) begin
              mreq_idx  <= shd_slot;
              ret_state <= S_INS_SHD;
            end else begin
              mreq_idx   <= act_slot;
              act_slot_q <= act_slot;
              ret_state  <= S_INS_ACT;
            end
            state <= S_MEM;
          end else begin
            ret_state <= S_IDLE;
            if (!occupied(mdata)) begin
              mreq_we    <= 1'b1;
              mreq_idx   <= act_slot_q;
              mreq_wdata <= c_entry;
              act_count  <= act_count + 1'b1;
              rsp_loc    <= '{ovf: 1'b0, idx: act_slot_q};
              rsp_entry  <= c_entry;
              ret_state  <= S_WR_DONE;
              state      <= S_MEM;
            end else if (shd_ready) begin
              // collision: start expanding into the shadow table with the next hash
              expanding <= 1'b1;
              mreq_we   <= 1'b0;
              mreq_idx  <= shd_slot;
              ret_state <= S_INS_SHD;
              state     <= S_MEM;
            end else if (!ovf_full) begin
              ovf_wr       <= 1'b1;
              ovf_wr_idx   <= ovf_free;
              ovf_wr_entry <= c_entry;
              rsp_valid    <= 1'b1;
              rsp_ok       <= 1'b1;
              rsp_entry    <= c_entry;
              rsp_loc      <= '{ovf: 1'b1, idx: CMT_AW'(ovf_free)};
              state        <= S_IDLE;
            end else begin
              rsp_valid <= 1'b1;
              rsp_ok    <= 1'b0;
              rsp_loc   <= '0;
              state     <= S_IDLE;
            end
          end
        end
        S_INS_SHD: begin
          ret_state <= S_IDLE;
          if (!occupied(mdata)) begin
            mreq_we    <= 1'b1;
            mreq_idx   <= shd_slot;
            mreq_wdata <= c_entry;
            shd_count  <= shd_count + 1'b1;
            rsp_loc    <= '{ovf: 1'b0, idx: shd_slot};
            rsp_entry  <= c_entry;
            ret_state  <= S_WR_DONE;
            state      <= S_MEM;
          end else if (!ovf_full) begin
            ovf_wr       <= 1'b1;
            ovf_wr_idx   <= ovf_free;
            ovf_wr_entry <= c_entry;
            rsp_valid    <= 1'b1;
            rsp_ok       <= 1'b1;
            rsp_entry    <= c_entry;
            rsp_loc      <= '{ovf: 1'b1, idx: CMT_AW'(ovf_free)};
            state        <= S_IDLE;
          end else begin
            rsp_valid <= 1'b1;
            rsp_ok    <= 1'b0;
            rsp_loc   <= '0;
            state     <= S_IDLE;
          end
        end

        // ---------------------------------------------------- write / delete completion
        S_WR_DONE: begin
          rsp_valid <= 1'b1;
          rsp_ok    <= 1'b1;
          ret_state <= S_IDLE;
          state     <= S_IDLE;
        end
        S_DEL_DONE: begin
          if (in_act(c_loc.idx, act_start, act_bits)) act_count <= act_count - 1'b1;
          else                                          shd_count <= shd_count - 1'b1;
          rsp_valid <= 1'b1;
          rsp_ok    <= 1'b1;
          rsp_loc   <= c_loc;
          rsp_entry <= '0;
          ret_state <= S_IDLE;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
