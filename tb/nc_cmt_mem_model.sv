// nc_cmt_mem_model: simulation model of the main-memory region that holds the capability
// metadata table, seen through the northbridge's 256-bit slot port.
//
// DEPTH slots of one CMT entry each, starting empty. A request is accepted when
// req_ready (high except on pseudo-random stall cycles when STALLS is set); LATENCY
// cycles later exactly one rsp_valid pulse returns the slot's data (for a write: the data
// just written, as an acknowledge). Slot indices beyond DEPTH wrap. Not synthesizable
// intent: it stands for DRAM behind a memory controller.
module nc_cmt_mem_model
  import nc_pkg::*;
#(
  parameter int unsigned DEPTH   = 64,
  parameter int unsigned LATENCY = 2,
  parameter bit          STALLS  = 1'b1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid,
  output logic              req_ready,
  input  logic              req_we,
  input  logic [CMT_AW-1:0] req_idx,
  input  cmt_entry_t        req_wdata,
  output logic              rsp_valid,
  output cmt_entry_t        rsp_rdata
);
  cmt_entry_t mem [DEPTH];
  int unsigned cnt;
  logic        pending;
  logic [31:0] lfsr;

  initial for (int i = 0; i < DEPTH; i++) mem[i] = '0;

  assign req_ready = !pending && !(STALLS && lfsr[0] && lfsr[3]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending   <= 1'b0;
      cnt       <= 0;
      rsp_valid <= 1'b0;
      rsp_rdata <= '0;
      lfsr      <= 32'hACE1_2345;
    end else begin
      lfsr      <= {lfsr[30:0], lfsr[31] ^ lfsr[21] ^ lfsr[1] ^ lfsr[0]};
      rsp_valid <= 1'b0;
      if (req_valid && req_ready) begin
        if (req_we) mem[req_idx % DEPTH] <= req_wdata;
        rsp_rdata <= req_we ? req_wdata : mem[req_idx % DEPTH];
        pending   <= 1'b1;
        cnt       <= LATENCY;
      end else if (pending) begin
        if (cnt <= 1) begin
          rsp_valid <= 1'b1;
          pending   <= 1'b0;
        end else cnt <= cnt - 1;
      end
    end
  end

  // direct access for checks
  function automatic cmt_entry_t peek(input int unsigned idx);
    return mem[idx % DEPTH];
  endfunction
endmodule
