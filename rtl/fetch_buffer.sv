// fetch_buffer: prefetch buffer, a queue between the I-cache and the decoders.
//
// The fetch stage writes the used instructions of one fetch line per cycle: the
// contiguous run of slots push_first..push_last of push_words. Each queued entry
// carries the instruction, its address and the address the fetch unit predicted
// to follow it (the next instruction, or the predicted target after the last
// slot of a run). A line is accepted only if the queue has room for a whole line
// (push_ready = at least ISSUE_WIDTH free entries), as in the baseline fetch
// unit. The decode side sees up to ISSUE_WIDTH oldest entries (out_valid /
// out_entry) and removes pop_count of them at the clock edge. flush empties the
// queue (branch misprediction recovery) and wins over push and pop.
// The depth (4 lines) and the entry format are choices of this design.
module fetch_buffer #(
  parameter int unsigned ISSUE_WIDTH = 8,
  parameter int unsigned DEPTH       = 32,
  localparam int unsigned EW         = $clog2(ISSUE_WIDTH),
  localparam int unsigned DW         = $clog2(DEPTH)
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                flush,
  // fetch side
  input  logic                                push_valid,
  output logic                                push_ready,
  input  fetch_pkg::addr_t                    push_line_pc,   // address of slot 0
  input  logic [EW-1:0]                       push_first,
  input  logic [EW-1:0]                       push_last,
  input  fetch_pkg::addr_t                    push_last_npc,  // predicted successor of push_last
  input  fetch_pkg::instr_t [ISSUE_WIDTH-1:0] push_words,
  // decode side
  output logic [ISSUE_WIDTH-1:0]              out_valid,
  output fetch_pkg::fb_entry_t [ISSUE_WIDTH-1:0] out_entry,
  input  logic [EW:0]                         pop_count
);
  import fetch_pkg::*;

  fb_entry_t     q [DEPTH];
  logic [DW-1:0] head, tail;
  logic [DW:0]   count;
  logic [EW:0]   push_n;
  logic          do_push;
  logic [EW:0]   pop_n;

  assign push_ready = ((DW+1)'(DEPTH) - count) >= (DW+1)'(ISSUE_WIDTH);
  assign do_push    = push_valid && push_ready && !flush;
  assign push_n     = (EW+1)'(push_last) - (EW+1)'(push_first) + (EW+1)'(1);
  assign pop_n      = ((DW+1)'(pop_count) > count) ? count[EW:0] : pop_count;

  always_comb begin
    for (int unsigned j = 0; j < ISSUE_WIDTH; j++) begin
      out_valid[j] = (DW+1)'(j) < count;
      out_entry[j] = q[head + DW'(j)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
    end else begin
      head  <= head + DW'(pop_n);
      tail  <= tail + (do_push ? DW'(push_n) : DW'(0));
      count <= count - (DW+1)'(pop_n) + (do_push ? (DW+1)'(push_n) : (DW+1)'(0));
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      for (int unsigned k = 0; k < ISSUE_WIDTH; k++) begin
        if ((EW+1)'(k) < push_n) begin
          logic [EW-1:0] s;
          addr_t pc;
          s  = push_first + EW'(k);
          pc = push_line_pc + addr_t'({s, 2'b00});
          q[tail + DW'(k)] <= '{instr: push_words[s], pc: pc,
                                pred_npc: (s == push_last) ? push_last_npc : pc + addr_t'(4)};
        end
      end
    end
  end

endmodule
