// nc_access_check: the access-control decision for one bus transaction, taken after the
// token has been resolved (nc_resolver).
//
// Checks, in this order of precedence, and the fault reported for each:
//   token did not resolve (forged / revoked / chain too deep)   -> resolver's fault
//   owning capability is paged out                               -> F_PAGED (IRQ to the OS)
//   offset + burst bytes > segment length (byte granular)        -> F_BOUNDS
//   read without R, write without W, instruction fetch without X -> F_PERM
//   owning direct capability locked and task id != lock holder   -> F_LOCKED
//   write to a copy-on-write capability                          -> F_COW (IRQ to the OS)
// The burst covers (len+1) << size bytes starting at the token's offset; the sum is formed
// with 34 bits so it cannot wrap. Only the low 55 bits of the task id are compared, the
// width of the lock-holder field. On a grant the physical address is the leaf's segment
// base plus the offset. Purely combinational.
//
// Follows the document: byte-granular bounds, R/W/X permissions, lock holder presented in
// the bus User field, IRQ for paged-out capabilities. This design's choices: the order of
// the checks and treating a write to a copy-on-write capability as a fault for the OS
// (the document names the flag but not its effect).
module nc_access_check
  import nc_pkg::*;
(
  input  logic        resolved_ok,
  input  fault_e      resolve_fault,
  input  cmt_entry_t  leaf,
  input  cmt_entry_t  owner,
  input  logic [31:0] offset,
  input  logic [7:0]  len,
  input  logic [2:0]  size,
  input  access_e     access,
  input  logic [TID_W-1:0] tid,
  output logic        grant,
  output fault_e      fault,
  output logic [31:0] phys_addr
);
  logic [33:0] span, last;
  logic        perm_ok;

  always_comb begin
    span = 34'(len + 9'd1) << size;
    last = 34'(offset) + span;
    unique case (access)
      ACC_WRITE: perm_ok = leaf.w;
      ACC_EXEC:  perm_ok = leaf.x;
      default:   perm_ok = leaf.r;
    endcase

    if (!resolved_ok)                                   fault = resolve_fault;
    else if (owner.ctype == CT_PAGED)                   fault = F_PAGED;
    else if (last > 34'(leaf.length))                   fault = F_BOUNDS;
    else if (!perm_ok)                                  fault = F_PERM;
    else if (owner.locked && owner.lock_holder != tid[LOCK_W-1:0]) fault = F_LOCKED;
    else if (access == ACC_WRITE && (leaf.cow || owner.cow)) fault = F_COW;
    else                                                fault = F_NONE;

    grant     = (fault == F_NONE);
    phys_addr = leaf.base + offset;
  end

endmodule
