// fmd: Fetch Mask Determination unit.
//
// Builds, during cycle i, the fetch mask that enables the I-cache subbanks for
// the line fetched in cycle i+1. Two masks are combined:
//   target mask         - branch-into case. If the current line holds a taken
//                         branch (or the fetch is redirected), only the slots
//                         from the target slot to the end of the next line are
//                         used; otherwise all ones.
//   mask of predictions - branch-out case. The Mask Table entry of the next line
//                         (binary slot of its last used instruction) decoded to
//                         ones from slot 0 up to that slot.
// next_fetch_mask = target_mask AND mask_of_predictions; if that is all zeros
// (the predicted-taken branch lies before the target slot) the target mask is
// used alone. This is the published algorithm. Because the way of the next line
// is not known before its tag compare, this implementation forms one mask per
// way from the MT entries of all ways of the set (a design choice); the way that
// hits selects its own mask. Purely combinational.
module fmd #(
  parameter int unsigned ISSUE_WIDTH = 8,
  parameter int unsigned WAYS        = 4,
  localparam int unsigned EW         = $clog2(ISSUE_WIDTH)
) (
  input  logic                           taken,          // taken branch in current line / redirect
  input  logic [EW-1:0]                  target_slot,    // slot of the target in the next line
  input  logic [WAYS-1:0][EW-1:0]        mt_entry,       // MT entries of the next line's set
  output logic [ISSUE_WIDTH-1:0]         target_mask,
  output logic [WAYS-1:0][ISSUE_WIDTH-1:0] mask_of_predictions,
  output logic [WAYS-1:0][ISSUE_WIDTH-1:0] next_fetch_mask,
  output logic [WAYS-1:0]                fallback        // AND was zero, target mask used
);
  import fetch_pkg::*;

  logic [MAX_WIDTH-1:0] tm_full;
  assign tm_full     = from_slot_mask(int'(target_slot));
  assign target_mask = taken ? tm_full[ISSUE_WIDTH-1:0] : '1;

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) begin
      logic [MAX_WIDTH-1:0]   mop_full;
      logic [ISSUE_WIDTH-1:0] anded;
      mop_full                 = upto_slot_mask(int'(mt_entry[w]));
      mask_of_predictions[w]   = mop_full[ISSUE_WIDTH-1:0];
      anded                    = target_mask & mask_of_predictions[w];
      fallback[w]              = (anded == '0);
      next_fetch_mask[w]       = fallback[w] ? target_mask : anded;
    end
  end

endmodule
