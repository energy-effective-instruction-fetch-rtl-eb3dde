// fetch_pkg: shared types and helper functions of the energy-saving fetch unit.
//
// The fetch unit works on 32-bit instructions and 32-bit byte addresses. A fetch
// line holds ISSUE_WIDTH instructions (the line size equals the fetch width). A
// fetch mask has one bit per instruction slot of a line: bit i enables the
// subbank that holds instruction i (bit 0 is the first instruction of the line).
// The helper functions below build the two kinds of masks that the Fetch Mask
// Determination logic combines; they work on a MAX_WIDTH-bit vector and the
// caller keeps the low ISSUE_WIDTH bits.
package fetch_pkg;

  localparam int unsigned XLEN      = 32;  // address and instruction width
  localparam int unsigned MAX_WIDTH = 64;  // largest fetch width the helpers support

  typedef logic [XLEN-1:0] addr_t;
  typedef logic [XLEN-1:0] instr_t;

  // Branch resolution reported by the back end when a branch commits.
  typedef struct packed {
    logic  valid;       // a branch commits this cycle
    addr_t pc;          // byte address of the branch
    logic  cond;        // conditional branch (updates the direction predictor)
    logic  taken;       // resolved direction
    addr_t target;      // resolved target (meaningful when taken)
    logic  mispredict;  // the fetch unit had predicted this branch wrongly
  } commit_t;

  // One prefetch-buffer entry: an instruction, its address and the address the
  // fetch unit predicted to follow it.
  typedef struct packed {
    instr_t instr;
    addr_t  pc;
    addr_t  pred_npc;
  } fb_entry_t;

  // Branch-into ("target") mask: slots from `first` up to the end of the line.
  function automatic logic [MAX_WIDTH-1:0] from_slot_mask(input int unsigned first);
    logic [MAX_WIDTH-1:0] m;
    for (int unsigned i = 0; i < MAX_WIDTH; i++) m[i] = (i >= first);
    return m;
  endfunction

  // Branch-out mask: slots from the start of the line up to and including `last`.
  function automatic logic [MAX_WIDTH-1:0] upto_slot_mask(input int unsigned last);
    logic [MAX_WIDTH-1:0] m;
    for (int unsigned i = 0; i < MAX_WIDTH; i++) m[i] = (i <= last);
    return m;
  endfunction

endpackage
