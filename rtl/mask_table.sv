// mask_table: the Mask Table (MT) of the Fetch Mask Determination unit.
//
// The MT has one entry per I-cache line (SETS x WAYS entries). An entry is a
// binary-encoded mask of log2(ISSUE_WIDTH) bits: it holds the slot of the last
// instruction of the line that will be used the next time the line is fetched,
// i.e. the slot of a branch that the direction predictor will predict taken on
// its next execution. The value ISSUE_WIDTH-1 means "all instructions used",
// which is the all-ones mask; it is also the reset value.
//
// Read port: combinational; rd_set selects a set and rd_entry returns the entry
// of every way, so the fetch stage can build one mask per way (the way of the
// next line is only known after its tag compare).
// Write ports, all taking effect at the clock edge:
//   - repl_*  : an I-cache line is replaced; its entry returns to all ones.
//   - upd_*   : a branch commits in a line that is still cached. If the branch
//               will be predicted taken next time (and was not mispredicted)
//               the entry becomes the branch slot, otherwise all ones.
// A replacement wins over an update of the same entry. Entry encoding, the
// per-set read port and the priority are this design's choices; the table size,
// the entry width, the all-ones initial value and the update/reset rules follow
// the published scheme.
module mask_table #(
  parameter int unsigned ISSUE_WIDTH = 8,
  parameter int unsigned SETS        = 256,
  parameter int unsigned WAYS        = 4,
  localparam int unsigned EW         = $clog2(ISSUE_WIDTH),
  localparam int unsigned SW         = $clog2(SETS),
  localparam int unsigned WW         = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // read
  input  logic [SW-1:0]         rd_set,
  output logic [WAYS-1:0][EW-1:0] rd_entry,
  // line replacement
  input  logic                  repl_valid,
  input  logic [SW-1:0]         repl_set,
  input  logic [WW-1:0]         repl_way,
  // commit-time update
  input  logic                  upd_valid,
  input  logic [SW-1:0]         upd_set,
  input  logic [WW-1:0]         upd_way,
  input  logic [EW-1:0]         upd_slot,
  input  logic                  upd_taken_next,
  input  logic                  upd_mispredict
);

  localparam logic [EW-1:0] ALL_ONES = EW'(ISSUE_WIDTH - 1);

  logic [EW-1:0] mt [SETS][WAYS];
  logic [EW-1:0] upd_value;

  assign upd_value = (upd_taken_next && !upd_mispredict) ? upd_slot : ALL_ONES;

  always_comb begin
    for (int unsigned w = 0; w < WAYS; w++) rd_entry[w] = mt[rd_set][w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned s = 0; s < SETS; s++)
        for (int unsigned w = 0; w < WAYS; w++)
          mt[s][w] <= ALL_ONES;
    end else begin
      if (upd_valid && !(repl_valid && repl_set == upd_set && repl_way == upd_way))
        mt[upd_set][upd_way] <= upd_value;
      if (repl_valid)
        mt[repl_set][repl_way] <= ALL_ONES;
    end
  end

endmodule
