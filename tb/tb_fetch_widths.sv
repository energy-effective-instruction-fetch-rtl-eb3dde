// tb_fetch_widths: runs the synthetic-program scenario on the 4-wide and the
// 16-wide configurations of the fetch unit (each with a 32 KB, 4-way I-cache
// whose line equals the fetch width: 512 and 128 sets), side by side, and
// reports the combined result. The 8-wide default is covered by tb_fetch_unit.
`timescale 1ns/1ps
module tb_fetch_widths;
  logic        done4, done16;
  int unsigned checks4, failures4, checks16, failures16;

  fetch_scenario #(.N(4),  .IC_SETS(512)) u_w4  (.done(done4),  .checks(checks4),  .failures(failures4));
  fetch_scenario #(.N(16), .IC_SETS(128)) u_w16 (.done(done16), .checks(checks16), .failures(failures16));

  initial begin
    wait (done4 && done16);
    #10;
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks16, failures4 + failures16);
    $finish;
  end

  initial begin
    #3000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks16, failures4 + failures16 + 1);
    $finish;
  end
endmodule
