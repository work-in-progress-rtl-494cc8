// nc_pkg: shared types and constants of the Northcape capability northbridge.
//
// A capability token is an ordinary 64-bit bus address. Its two top bits give the token
// type, which fixes how the remaining 62 bits split into a 16-bit MAC tag, a capability
// number n and a byte offset into the segment (type 0: n 14 / offset 32, type 1: n 46 /
// no offset, type 2: n 30 / offset 16, type 3: n 22 / offset 24). The all-zero token of
// type 0 is the root capability, so a plain 32-bit physical address is read as an offset
// into the root segment.
//
// Each live capability has one 256-bit entry in the capability metadata table (CMT). The
// direct-capability layout below uses all 256 bits; indirect and paged-out entries reuse
// the same positions: `aux` holds the 64 device-specific user bits of a direct entry, the
// parent token of an indirect entry, and the pagefile number of a paged-out entry. The
// field widths follow the published entry format; the placement of the overlaid fields
// and the entry-type codes are this design's choice.
//
// The bus structs describe a simplified AXI4 port (INCR bursts, one outstanding
// transaction) with the task identifier carried in the AxUSER field.
package nc_pkg;

  // ---------------------------------------------------------------- tokens
  localparam int unsigned TOKEN_W = 64;
  localparam int unsigned TAG_W   = 16;
  localparam int unsigned NUM_W   = 46;   // widest capability number (type 1)
  localparam int unsigned KEY_W   = 2 + NUM_W; // CMT key: {token type, n}
  localparam int unsigned TID_W   = 64;   // task identifier on the bus
  localparam int unsigned LOCK_W  = 55;   // task-id bits kept in the lock-holder field

  typedef logic [TOKEN_W-1:0] token_t;
  typedef logic [KEY_W-1:0]   key_t;
  typedef logic [TAG_W-1:0]   tag_t;

  typedef struct packed {
    logic [1:0]       ttype;
    tag_t             tag;
    logic [NUM_W-1:0] num;     // zero-extended capability number
    logic [31:0]      offset;  // zero-extended byte offset, 0 for type 1
  } token_fields_t;

  // ---------------------------------------------------------------- CMT entries
  typedef enum logic [2:0] {
    CT_EMPTY    = 3'd0,
    CT_DIRECT   = 3'd1,
    CT_INDIRECT = 3'd2,
    CT_PAGED    = 3'd3
  } ctype_e;

  localparam int unsigned ENTRY_W = 256;

  typedef struct packed {
    ctype_e             ctype;       // 3
    logic [31:0]        base;        // segment start (physical)
    logic [31:0]        length;      // bytes
    logic [15:0]        refcnt;
    logic [LOCK_W-1:0]  lock_holder;
    logic [63:0]        aux;         // user bits / parent token / pagefile number
    logic               r, w, x;
    logic               locked;
    logic               lockable;
    logic               cow;
    tag_t               tag;
    logic [31:0]        nonce;
  } cmt_entry_t;

  // Location of an entry: absolute CMT slot index, or an overflow-buffer slot.
  localparam int unsigned CMT_AW = 24;   // entry index width (2^24 x 32 B = 512 MiB)
  typedef struct packed {
    logic              ovf;
    logic [CMT_AW-1:0] idx;
  } cmt_loc_t;

  typedef enum logic [1:0] {
    CMD_LOOKUP = 2'd0,
    CMD_INSERT = 2'd1,
    CMD_UPDATE = 2'd2,
    CMD_DELETE = 2'd3
  } cmt_cmd_e;

  // ---------------------------------------------------------------- access faults
  typedef enum logic [2:0] {
    F_NONE     = 3'd0,
    F_INVALID  = 3'd1,  // no CMT entry with this number and tag (forged or revoked)
    F_DEPTH    = 3'd2,  // parent chain longer than the walk limit
    F_BOUNDS   = 3'd3,
    F_PERM     = 3'd4,
    F_LOCKED   = 3'd5,  // segment locked by another task
    F_PAGED    = 3'd6,  // segment paged out: raise IRQ
    F_COW      = 3'd7   // write to a copy-on-write segment: raise IRQ
  } fault_e;

  typedef enum logic [1:0] {
    ACC_READ  = 2'd0,
    ACC_WRITE = 2'd1,
    ACC_EXEC  = 2'd2
  } access_e;

  // ---------------------------------------------------------------- capability operations
  typedef enum logic [3:0] {
    OP_NOP     = 4'd0,
    OP_CREATE  = 4'd1,
    OP_MERGE   = 4'd2,
    OP_DERIVE  = 4'd3,
    OP_LOCK    = 4'd4,
    OP_UNLOCK  = 4'd5,
    OP_CLONE   = 4'd6,
    OP_DROP    = 4'd7,
    OP_REVOKE  = 4'd8,
    OP_MKXONLY = 4'd9
  } cap_op_e;

  typedef enum logic [3:0] {
    E_OK       = 4'd0,
    E_INVALID  = 4'd1,  // operand token does not resolve
    E_TYPE     = 4'd2,  // wrong capability type for this operation
    E_ARG      = 4'd3,  // length, offset or permission outside the operand's
    E_REFCNT   = 4'd4,  // reference count does not allow the operation
    E_FULL     = 4'd5,  // no free CMT slot and overflow buffer full
    E_LOCK     = 4'd6,  // lock refused
    E_BADOP    = 4'd7
  } op_err_e;

  // MMIO register offsets (64-bit registers) inside the northbridge window
  localparam logic [7:0] R_CAP_A    = 8'h00;
  localparam logic [7:0] R_CAP_B    = 8'h08;
  localparam logic [7:0] R_LEN      = 8'h10;
  localparam logic [7:0] R_OFFSET   = 8'h18;
  localparam logic [7:0] R_PERMS    = 8'h20; // [0]R [1]W [2]X [3]lockable [4]cow [5]no-offset token
  localparam logic [7:0] R_USER     = 8'h28;
  localparam logic [7:0] R_TID      = 8'h30;
  localparam logic [7:0] R_CMD      = 8'h38; // write: opcode; read: {err, result bit, busy}
  localparam logic [7:0] R_RES0     = 8'h40;
  localparam logic [7:0] R_RES1     = 8'h48;
  localparam logic [7:0] R_CMTSTAT  = 8'h50;
  localparam logic [7:0] R_SHADOW   = 8'h58;
  localparam logic [7:0] R_NONCE    = 8'h60;
  localparam logic [7:0] R_IRQ      = 8'h68;
  localparam logic [7:0] R_FAULTTOK = 8'h70;
  localparam logic [7:0] R_STATS    = 8'h78; // {entries moved, table promotions}

  // ---------------------------------------------------------------- bus
  localparam int unsigned DATA_W = 64;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef struct packed {
    logic [63:0]      addr;   // capability token
    logic [7:0]       len;
    logic [2:0]       size;
    logic [2:0]       prot;   // prot[2] = instruction fetch
    logic [TID_W-1:0] user;   // task identifier
  } up_ax_t;

  typedef struct packed {
    logic [31:0] addr;        // physical address
    logic [7:0]  len;
    logic [2:0]  size;
    logic [2:0]  prot;
  } dn_ax_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [STRB_W-1:0] strb;
    logic              last;
  } w_t;

  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [1:0]        resp;
    logic              last;
  } r_t;

  localparam logic [1:0] RESP_OKAY   = 2'b00;
  localparam logic [1:0] RESP_SLVERR = 2'b10;

  // Token from key {type, n} and tag, offset 0 (n truncated to the type's number width).
  function automatic token_t tok_encode(input logic [1:0] ttype, input tag_t tag,
                                        input logic [NUM_W-1:0] num);
    token_t t;
    t = '0;
    t[63:62] = ttype;
    t[61:46] = tag;
    unique case (ttype)
      2'd0:    t[45:32] = num[13:0];
      2'd1:    t[45:0]  = num;
      2'd2:    t[45:16] = num[29:0];
      default: t[45:24] = num[21:0];
    endcase
    return t;
  endfunction

  // Capability number n reduced to the width of the token type.
  function automatic logic [NUM_W-1:0] num_trunc(input logic [1:0] ttype,
                                                 input logic [NUM_W-1:0] num);
    unique case (ttype)
      2'd0:    return NUM_W'(num[13:0]);
      2'd1:    return num;
      2'd2:    return NUM_W'(num[29:0]);
      default: return NUM_W'(num[21:0]);
    endcase
  endfunction

  // ---------------------------------------------------------------- mixing
  // 64-bit avalanche mix (the splitmix64 finaliser), used by the CMT hash and the tag MAC.
  function automatic logic [63:0] mix64(input logic [63:0] v);
    logic [63:0] z;
    z = v;
    z = (z ^ (z >> 30)) * 64'hBF58_476D_1CE4_E5B9;
    z = (z ^ (z >> 27)) * 64'h94D0_49BB_1331_11EB;
    z = z ^ (z >> 31);
    return z;
  endfunction

endpackage
