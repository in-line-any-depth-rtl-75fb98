// tb_lut_table: self-checking test of the exact-match distilled-DNN table.
//
// A 4+4-bit-key table (256 entries, 8-bit data) is checked for: the post-reset
// clear taking exactly 256 cycles; lookups before ready missing; an exhaustive
// fill with the outputs of a small integer network and back-to-back lookups of
// every key with the one-cycle latency; misses on deleted rules returning zero;
// a same-cycle write and read of one key returning the old entry.
module tb_lut_table;
  import tb_lutdnn_ref_pkg::*;

  localparam int AW = 4, BW = 4, DW = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic           ready, in_valid, out_valid, out_hit;
  logic [AW-1:0]  in_a;
  logic [BW-1:0]  in_b;
  logic [DW-1:0]  out_data, cfg_data;
  logic           cfg_we, cfg_entry_valid;
  logic [AW+BW-1:0] cfg_addr;

  lut_table #(.A_W(AW), .B_W(BW), .DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected result pipeline (1 cycle)
  logic          exp_valid;
  logic          exp_hit;
  logic [DW-1:0] exp_data;
  bit            present [256];
  int            table_v [256];

  logic          exp_valid_q = 0, exp_hit_q = 0;
  logic [DW-1:0] exp_data_q = 0;
  always @(posedge clk) begin
    exp_valid_q <= exp_valid;
    exp_hit_q   <= exp_hit;
    exp_data_q  <= exp_data;
    if (rst_n && exp_valid_q) begin
      check(out_valid, "out_valid one cycle after request");
      check(out_hit == exp_hit_q && out_data == exp_data_q,
            $sformatf("lookup got hit=%0d data=%0d exp hit=%0d data=%0d", out_hit, out_data, exp_hit_q, exp_data_q));
    end
  end

  initial begin
    int t0, key;
    in_valid = 0; in_a = 0; in_b = 0; cfg_we = 0; cfg_addr = 0; cfg_entry_valid = 0; cfg_data = 0;
    exp_valid = 0; exp_hit = 0; exp_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    t0 = cyc;
    // lookups during the clear must miss
    @(negedge clk);
    in_valid = 1; in_a = 3; in_b = 7;
    @(posedge clk); #1;
    in_valid = 0;
    check(out_valid && !out_hit && out_data == 0, "lookup during clear misses");
    while (!ready) @(posedge clk);
    check(cyc - t0 >= 254 && cyc - t0 <= 257, $sformatf("clear took %0d cycles", cyc - t0));

    // exhaustive fill with a distilled network, some keys left without rule
    for (int k = 0; k < 256; k++) begin
      present[k] = rule_present(2, k, 0);
      table_v[k] = nn2(2, k >> BW, k % (1 << BW), DW);
      @(negedge clk);
      // keys without a rule are written as deleted entries holding junk data
      cfg_we = 1; cfg_addr = 8'(k); cfg_entry_valid = present[k];
      cfg_data = present[k] ? 8'(table_v[k]) : 8'h5A;
    end
    @(negedge clk); cfg_we = 0;

    // back-to-back lookups of every key
    for (int k = 0; k < 256; k++) begin
      @(negedge clk);
      in_valid = 1; {in_a, in_b} = 8'(k);
      exp_valid = 1; exp_hit = present[k]; exp_data = present[k] ? 8'(table_v[k]) : 8'h0;
    end
    @(negedge clk); in_valid = 0; exp_valid = 0;
    @(negedge clk);

    // delete a rule; it must miss afterwards
    key = 8'h42;
    cfg_we = 1; cfg_addr = 8'(key); cfg_entry_valid = 0; cfg_data = 8'hff;
    @(negedge clk); cfg_we = 0;
    in_valid = 1; {in_a, in_b} = 8'(key);
    @(posedge clk); #1; in_valid = 0;
    check(!out_hit && out_data == 0, "deleted rule misses");

    // same-cycle write and read: old value returned, new value next time
    @(negedge clk);
    key = 8'h17;
    cfg_we = 1; cfg_addr = 8'(key); cfg_entry_valid = 1; cfg_data = 8'hA5;
    in_valid = 1; {in_a, in_b} = 8'(key);
    @(posedge clk); #1;
    check(out_hit == present[key] && out_data == (present[key] ? 8'(table_v[key]) : 8'h0),
          "read during write returns old entry");
    @(negedge clk); cfg_we = 0;
    @(posedge clk); #1; in_valid = 0;
    check(out_hit && out_data == 8'hA5, "updated rule visible");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
