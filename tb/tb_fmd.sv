// tb_fmd: exhaustive check of the Fetch Mask Determination logic (8-wide, 4 ways).
// For every taken flag, target slot and MT entry the masks are recomputed here
// from the slot numbers with plain loops and compared; the two worked examples
// of the scheme (4-wide, written first-slot-left as 0111 AND 1110 = 0110, and
// 0111 AND 1000 = 0 -> fall back to 0111) are checked on a 4-wide instance.
`timescale 1ns/1ps
module tb_fmd;
  localparam int unsigned N = 8, W = 4, EW = 3;
  int unsigned checks = 0, failures = 0;

  logic                 taken;
  logic [EW-1:0]        slot;
  logic [W-1:0][EW-1:0] mt;
  logic [N-1:0]         tm;
  logic [W-1:0][N-1:0]  mop, nfm;
  logic [W-1:0]         fb;

  fmd #(.ISSUE_WIDTH(N), .WAYS(W)) dut (.taken, .target_slot(slot), .mt_entry(mt),
    .target_mask(tm), .mask_of_predictions(mop), .next_fetch_mask(nfm), .fallback(fb));

  // 4-wide instance for the worked examples
  logic         t4;
  logic [1:0]   s4;
  logic [0:0][1:0] mt4;
  logic [3:0]   tm4;
  logic [0:0][3:0] mop4, nfm4;
  logic [0:0]   fb4;
  fmd #(.ISSUE_WIDTH(4), .WAYS(1)) dut4 (.taken(t4), .target_slot(s4), .mt_entry(mt4),
    .target_mask(tm4), .mask_of_predictions(mop4), .next_fetch_mask(nfm4), .fallback(fb4));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 2; t++)
      for (int s = 0; s < N; s++)
        for (int e = 0; e < N; e++) begin
          logic [N-1:0] etm, emop, eand, enfm;
          taken = t[0];
          slot  = EW'(s);
          for (int w = 0; w < W; w++) mt[w] = EW'((e + w * 3) % N);
          #1;
          for (int i = 0; i < N; i++) etm[i] = (t == 0) || (i >= s);
          check(tm == etm, $sformatf("target mask t=%0d s=%0d", t, s));
          for (int w = 0; w < W; w++) begin
            for (int i = 0; i < N; i++) emop[i] = (i <= int'((e + w * 3) % N));
            eand = etm & emop;
            enfm = (eand == 0) ? etm : eand;
            check(mop[w] == emop, "mask of predictions");
            check(nfm[w] == enfm, $sformatf("next fetch mask t=%0d s=%0d e=%0d w=%0d", t, s, e, w));
            check(fb[w] == (eand == 0), "fallback flag");
          end
        end
    // Example 1: target_A in slot 1, branch_2 in slot 2 -> slots 1..2 (printed 0110)
    t4 = 1'b1; s4 = 2'd1; mt4[0] = 2'd2; #1;
    check(tm4 == 4'b1110 && mop4[0] == 4'b0111 && nfm4[0] == 4'b0110 && !fb4[0], "example 1");
    // Example 2: branch_2 in slot 0, target_A in slot 1 -> AND is zero, target mask used
    t4 = 1'b1; s4 = 2'd1; mt4[0] = 2'd0; #1;
    check(mop4[0] == 4'b0001 && nfm4[0] == 4'b1110 && fb4[0], "example 2");
    // Sequential next line with an untouched MT entry reads the whole line
    t4 = 1'b0; s4 = 2'd0; mt4[0] = 2'd3; #1;
    check(nfm4[0] == 4'b1111, "all ones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
