// tb_lut_final: self-checking test of the final table's set_egress / drop
// actions. A 3+3-bit-key table is filled with forwarding rules, explicit drop
// rules and left-out keys; every key is then looked up back to back and the
// action compared with the expected one, including the default drop on a miss.
module tb_lut_final;
  import lutdnn_pkg::*;

  localparam int AW = 3, BW = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              ready, in_valid, out_valid, out_hit, out_drop;
  logic [AW-1:0]     in_a;
  logic [BW-1:0]     in_b;
  logic [PORT_W-1:0] out_port, cfg_port;
  logic              cfg_we, cfg_entry_valid, cfg_drop;
  logic [AW+BW-1:0]  cfg_addr;

  lut_final #(.A_W(AW), .B_W(BW)) dut (.*);

  int checks = 0, failures = 0;
  int n_fwd = 0, n_drop_rule = 0, n_drop_miss = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per key: 0 = no rule, 1 = forward, 2 = drop rule
  int kind [64];
  int port [64];

  logic exp_valid = 0, exp_valid_q = 0;
  int   exp_key = 0, exp_key_q = 0;
  always @(posedge clk) begin
    exp_valid_q <= exp_valid;
    exp_key_q   <= exp_key;
    if (exp_valid_q) begin
      checks++;
      case (kind[exp_key_q])
        1: begin
          n_fwd++;
          if (!(out_valid && out_hit && !out_drop && out_port == PORT_W'(port[exp_key_q]))) begin
            failures++; $display("FAIL key %0d: expected set_egress %0d, got drop=%0d port=%0d", exp_key_q, port[exp_key_q], out_drop, out_port);
          end
        end
        2: begin
          n_drop_rule++;
          if (!(out_valid && out_hit && out_drop)) begin
            failures++; $display("FAIL key %0d: expected drop rule", exp_key_q);
          end
        end
        default: begin
          n_drop_miss++;
          if (!(out_valid && !out_hit && out_drop && out_port == 0)) begin
            failures++; $display("FAIL key %0d: expected default drop", exp_key_q);
          end
        end
      endcase
    end
  end

  initial begin
    in_valid = 0; in_a = 0; in_b = 0; cfg_we = 0; cfg_addr = 0; cfg_entry_valid = 0; cfg_drop = 0; cfg_port = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    for (int k = 0; k < 64; k++) begin
      kind[k] = (k % 5 == 0) ? 0 : (k % 3 == 0) ? 2 : 1;
      port[k] = (k * 37 + 5) % 48;
      @(negedge clk);
      cfg_we = kind[k] != 0; cfg_addr = 6'(k); cfg_entry_valid = 1;
      cfg_drop = kind[k] == 2; cfg_port = PORT_W'(kind[k] == 2 ? 47 : port[k]);
    end
    @(negedge clk); cfg_we = 0;
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      in_valid = 1; {in_a, in_b} = 6'(k); exp_valid = 1; exp_key = k;
    end
    @(negedge clk); in_valid = 0; exp_valid = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_fwd == 0 || n_drop_rule == 0 || n_drop_miss == 0) begin
      failures++; $display("FAIL an action was never exercised");
    end
    $display("set_egress=%0d drop_rule=%0d drop_default=%0d", n_fwd, n_drop_rule, n_drop_miss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
