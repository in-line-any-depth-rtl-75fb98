// tb_lut_cascade: self-checking test of the table hierarchy in its three
// arrangements: 2 features / 1 table, 6 features / 5 tables on three levels
// (with an odd value carried past one level), 8 features / 7 tables. Each runs
// in its own tb_cascade_run at 4 bits per feature, which keeps the exhaustive
// table fill short.
module tb_lut_cascade;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d2, d6, d8;
  int   c2, c6, c8, f2, f6, f8;

  tb_cascade_run #(.N(2), .BITS(4)) r2 (.clk, .done(d2), .checks(c2), .failures(f2));
  tb_cascade_run #(.N(6), .BITS(4)) r6 (.clk, .done(d6), .checks(c6), .failures(f6));
  tb_cascade_run #(.N(8), .BITS(4)) r8 (.clk, .done(d8), .checks(c8), .failures(f8));

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c6 + c8, f2 + f6 + f8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    wait (d2 && d6 && d8);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c2 + c6 + c8, f2 + f6 + f8);
    $finish;
  end
endmodule
