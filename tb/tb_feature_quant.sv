// tb_feature_quant: self-checking test of the shift-and-saturate quantiser.
// Random raw features and scales (including shift 0 and values far above the
// 8-bit range) are applied every cycle; each output must equal
// min(raw >> shift, 255), arrive one cycle later and carry its metadata.
// Both saturated and unsaturated outputs must occur.
module tb_feature_quant;
  import lutdnn_pkg::*;

  localparam int N = 6, B = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               in_valid = 0, out_valid;
  logic [RAW_W-1:0]   in_raw [N];
  logic [SHIFT_W-1:0] shift  [N];
  logic [B-1:0]       out_feat [N];
  pkt_meta_t          in_meta, out_meta;

  feature_quant #(.N_FEAT(N), .FEAT_BITS(B)) dut (.*);

  int checks = 0, failures = 0, n_sat = 0, n_plain = 0;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int exp_q [N];
  int exp_id = 0;
  bit exp_v = 0;
  int exp_q_d [N];
  int exp_id_d = 0;
  bit exp_v_d = 0;

  always @(posedge clk) begin
    exp_q_d  <= exp_q;
    exp_id_d <= exp_id;
    exp_v_d  <= exp_v;
    if (rst_n && exp_v_d) begin
      checks++;
      if (!out_valid || int'(out_meta.pkt_id) != exp_id_d) begin
        failures++; $display("FAIL record %0d missing or late", exp_id_d);
      end
      for (int i = 0; i < N; i++) begin
        checks++;
        if (int'(out_feat[i]) != exp_q_d[i]) begin
          failures++; $display("FAIL rec %0d feat %0d got %0d exp %0d", exp_id_d, i, out_feat[i], exp_q_d[i]);
        end
      end
    end
  end

  initial begin
    in_meta = '0;
    foreach (in_raw[i]) begin in_raw[i] = 0; shift[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid = 1;
      in_meta = '0; in_meta.pkt_id = PKT_ID_W'(n);
      for (int i = 0; i < N; i++) begin
        longint unsigned s;
        case ($urandom_range(3))
          0: in_raw[i] = $urandom_range(255);
          1: in_raw[i] = $urandom_range(65535);
          default: in_raw[i] = $urandom();
        endcase
        shift[i] = SHIFT_W'($urandom_range(31));
        if (n % 7 == 0) shift[i] = 0;
        s = longint'(in_raw[i]) >> shift[i];
        if (s > 255) begin exp_q[i] = 255; n_sat++; end
        else begin exp_q[i] = int'(s); n_plain++; end
      end
      exp_id = n; exp_v = 1;
    end
    @(negedge clk); in_valid = 0; exp_v = 0;
    repeat (3) @(posedge clk);
    checks++;
    if (n_sat == 0 || n_plain == 0) begin failures++; $display("FAIL saturation not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
