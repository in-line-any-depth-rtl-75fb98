// tb_switch_widths: end-to-end runs of the whole switch pipeline (parser,
// quantiser, five-table cascade) at 4 and 6 bits per feature, the two narrower
// widths of the evaluated models, each with the traffic, reference model and
// mechanism counts of the full-size test.
module tb_switch_widths;
  logic clk = 0;
  always #5 clk = ~clk;

  logic d4, d6;
  int   c4, c6, f4, f6;

  tb_switch_run #(.BITS(4)) r4 (.clk, .done(d4), .checks(c4), .failures(f4));
  tb_switch_run #(.BITS(6)) r6 (.clk, .done(d6), .checks(c6), .failures(f6));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6, f4 + f6 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    wait (d4 && d6);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c4 + c6, f4 + f6);
    $finish;
  end
endmodule
