// pas_predictor: two-level PAs conditional branch predictor.
//
// First level: a branch history table of per-address histories (BHT_ENTRIES
// entries of HIST bits), indexed by low bits of the branch word address.
// Second level: PHT_SETS pattern tables of 2**HIST two-bit saturating counters;
// the set is chosen by further branch address bits and the entry by the history.
// The default size is 32 KB of counters (32 x 4096 x 2 bits), as evaluated.
//
// lookup  (combinational): lk_pc -> lk_taken (counter MSB).
// update  (at the clock edge, upd_valid): the counter used by this execution is
//         moved toward the outcome and the outcome is shifted into the history.
//         upd_next_taken (combinational, same cycle) is the prediction the same
//         branch will receive on its next execution, read from the counter that
//         the updated history selects; the Mask Table uses it, so no extra
//         predictor access is needed.
// After reset the tables are cleared by a sweep of one entry per cycle
// (counters to weakly not-taken, histories to zero); `ready` rises when it is
// done. Lookups read not-taken and updates are ignored until then.
// The split of the 32 KB between levels, the index bits, the initial counter
// value and the sweep are choices of this design.
module pas_predictor #(
  parameter int unsigned BHT_ENTRIES = 2048,
  parameter int unsigned HIST        = 12,
  parameter int unsigned PHT_SETS    = 32,
  localparam int unsigned BW         = $clog2(BHT_ENTRIES),
  localparam int unsigned PW         = $clog2(PHT_SETS),
  localparam int unsigned PHT_SIZE   = PHT_SETS << HIST,
  localparam int unsigned IW         = PW + HIST,
  localparam int unsigned SWEEP      = (PHT_SIZE > BHT_ENTRIES) ? PHT_SIZE : BHT_ENTRIES,
  localparam int unsigned CW         = $clog2(SWEEP + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic             ready,
  input  fetch_pkg::addr_t lk_pc,
  output logic             lk_taken,
  input  logic             upd_valid,
  input  fetch_pkg::addr_t upd_pc,
  input  logic             upd_taken,
  output logic             upd_next_taken
);

  logic [HIST-1:0] bht [BHT_ENTRIES];
  logic [1:0]      pht [PHT_SIZE];
  logic [CW-1:0]   sweep;

  logic [BW-1:0]   lk_b, up_b;
  logic [PW-1:0]   lk_s, up_s;
  logic [IW-1:0]   lk_i, up_i_old, up_i_new;
  logic [HIST-1:0] h_old, h_new;
  logic [1:0]      c_old, c_new;

  assign ready = (sweep == CW'(SWEEP));

  assign lk_b     = lk_pc[BW+1:2];
  assign lk_s     = lk_pc[PW+1:2];
  assign lk_i     = {lk_s, bht[lk_b]};
  assign lk_taken = ready && pht[lk_i][1];

  assign up_b     = upd_pc[BW+1:2];
  assign up_s     = upd_pc[PW+1:2];
  assign h_old    = bht[up_b];
  assign h_new    = {h_old[HIST-2:0], upd_taken};
  assign up_i_old = {up_s, h_old};
  assign up_i_new = {up_s, h_new};
  assign c_old    = pht[up_i_old];

  always_comb begin
    c_new = c_old;
    if (upd_taken && c_old != 2'b11) c_new = c_old + 2'd1;
    if (!upd_taken && c_old != 2'b00) c_new = c_old - 2'd1;
  end

  assign upd_next_taken = (up_i_new == up_i_old) ? c_new[1] : pht[up_i_new][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sweep <= '0;
    else if (!ready) sweep <= sweep + CW'(1);
  end

  always_ff @(posedge clk) begin
    if (!ready) begin
      if (sweep < CW'(PHT_SIZE))    pht[sweep[IW-1:0]] <= 2'b01;
      if (sweep < CW'(BHT_ENTRIES)) bht[sweep[BW-1:0]] <= '0;
    end else if (upd_valid) begin
      pht[up_i_old] <= c_new;
      bht[up_b]     <= h_new;
    end
  end

endmodule
