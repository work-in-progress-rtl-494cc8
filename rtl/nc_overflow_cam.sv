// nc_overflow_cam: small content-addressed overflow buffer for CMT entries that collide
// while the capability metadata table is being expanded.
//
// Each of the N slots holds a valid bit, the capability key {type, n} and a full 256-bit
// CMT entry. A lookup compares the key and the stored MAC tag of every valid slot in
// parallel and returns the first match (combinational, same cycle). `free_idx`/`full`
// report the lowest free slot for an insert. One write port: `wr_en` stores the entry in
// slot `wr_idx` and sets it valid, together with the key `wr_key` when `wr_new` is set (a
// new entry) or keeping the slot's key otherwise (an in-place update); `inv_en` clears slot `inv_idx` (an insert wins if
// both hit the same slot). The buffer is emptied by reset. The document only calls it "a
// small content-addressed memory in the northbridge"; the size (N = 4 by default, 8 in the
// northbridge) is this design's.
module nc_overflow_cam
  import nc_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  key_t                 lk_key,
  input  tag_t                 lk_tag,
  output logic                 lk_hit,
  output logic [$clog2(N)-1:0] lk_idx,
  output cmt_entry_t           lk_entry,
  // allocation
  output logic                 full,
  output logic [$clog2(N)-1:0] free_idx,
  output logic [$clog2(N+1)-1:0] count,
  // write / invalidate
  input  logic                 wr_en,
  input  logic                 wr_new,
  input  logic [$clog2(N)-1:0] wr_idx,
  input  key_t                 wr_key,
  input  cmt_entry_t           wr_entry,
  input  logic                 inv_en,
  input  logic [$clog2(N)-1:0] inv_idx
);
  logic [N-1:0] valid;
  key_t         keys    [N];
  cmt_entry_t   entries [N];

  always_comb begin
    lk_hit   = 1'b0;
    lk_idx   = '0;
    lk_entry = '0;
    for (int i = N-1; i >= 0; i--) begin
      if (valid[i] && keys[i] == lk_key && entries[i].tag == lk_tag) begin
        lk_hit   = 1'b1;
        lk_idx   = i[$clog2(N)-1:0];
        lk_entry = entries[i];
      end
    end
  end

  always_comb begin
    full     = &valid;
    free_idx = '0;
    count    = '0;
    for (int i = N-1; i >= 0; i--)
      if (!valid[i]) free_idx = i[$clog2(N)-1:0];
    for (int i = 0; i < N; i++) count = count + ($clog2(N+1))'(valid[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else begin
      if (inv_en) valid[inv_idx] <= 1'b0;
      if (wr_en)  valid[wr_idx]  <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (wr_new) keys[wr_idx] <= wr_key;
      entries[wr_idx] <= wr_entry;
    end
  end

endmodule
