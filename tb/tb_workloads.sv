// tb_workloads: the evaluated model arrangements at every evaluated input
// width. 2 features / 1 table, 6 features / 5 tables and 8 features / 7
// tables, each at 6 and 8 bits per feature (4 bits is covered by
// tb_lut_cascade), with every table filled exhaustively with a distilled
// integer network and 300 vectors checked per arrangement against a direct
// evaluation of the network tree. At 8 bits each table has 2**16 entries, the
// smallest table size of the switch measurements.
module tb_workloads;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int NR = 6;
  logic d [NR];
  int   c [NR], f [NR];

  tb_cascade_run #(.N(2), .BITS(6), .NPKT(300)) r0 (.clk, .done(d[0]), .checks(c[0]), .failures(f[0]));
  tb_cascade_run #(.N(6), .BITS(6), .NPKT(300)) r1 (.clk, .done(d[1]), .checks(c[1]), .failures(f[1]));
  tb_cascade_run #(.N(8), .BITS(6), .NPKT(300)) r2 (.clk, .done(d[2]), .checks(c[2]), .failures(f[2]));
  tb_cascade_run #(.N(2), .BITS(8), .NPKT(300)) r3 (.clk, .done(d[3]), .checks(c[3]), .failures(f[3]));
  tb_cascade_run #(.N(6), .BITS(8), .NPKT(300)) r4 (.clk, .done(d[4]), .checks(c[4]), .failures(f[4]));
  tb_cascade_run #(.N(8), .BITS(8), .NPKT(300)) r5 (.clk, .done(d[5]), .checks(c[5]), .failures(f[5]));

  function automatic int total(input int a[NR]);
    int t = 0;
    for (int i = 0; i < NR; i++) t += a[i];
    return t;
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NR; i++) if (!d[i]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (800000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f) + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    while (!all_done()) @(posedge clk);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", total(c), total(f));
    $finish;
  end
endmodule
