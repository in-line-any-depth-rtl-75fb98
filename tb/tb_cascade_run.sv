// tb_cascade_run: reusable driver/checker for one lut_cascade configuration.
//
// After the post-reset clear it distils one small integer network per table
// (tables numbered level by level, as in the RTL) by writing nn2() for every
// key that has a rule, then streams NPKT random feature vectors back to back
// and compares each decision with cascade_ref(), a direct evaluation of the
// network tree. It also checks that every result leaves exactly tree_depth
// cycles after it entered and counts forwarding hits, drop rules, default
// drops and intermediate misses; a kind never seen counts as a failure.
// Results are reported on the checks/failures outputs once done is high.
module tb_cascade_run #(
  parameter int N    = 6,
  parameter int BITS = 4,
  parameter int NPKT = 400
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import lutdnn_pkg::*;
  import tb_lutdnn_ref_pkg::*;

  localparam int DEPTH = tree_depth(N);
  localparam int KW    = 2 * BITS;

  logic                 rst_n = 0;
  logic                 ready, in_valid, out_valid, out_hit, out_drop;
  logic [BITS-1:0]      in_feat [N];
  pkt_meta_t            in_meta, out_meta;
  logic [PORT_W-1:0]    out_port;
  logic                 cfg_we = 0, cfg_entry_valid = 1, cfg_drop = 0;
  logic [$clog2(N)-1:0] cfg_table = 0;
  logic [KW-1:0]        cfg_addr = 0;
  logic [BITS-1:0]      cfg_data = 0;
  logic [PORT_W-1:0]    cfg_port = 0;

  lut_cascade #(.N_FEAT(N), .FEAT_BITS(BITS)) dut (.*);

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // scoreboard, indexed by packet id
  bit exp_drop [NPKT];
  int exp_port [NPKT];
  bit exp_hit  [NPKT];
  int t_in     [NPKT];
  int n_out = 0, n_fwd = 0, n_drop_rule = 0, n_drop_miss = 0, n_mid_miss = 0;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int id;
      id = int'(out_meta.pkt_id);
      checks++;
      if (id >= NPKT || out_drop != exp_drop[id] || out_hit != exp_hit[id] ||
          (!out_drop && int'(out_port) != exp_port[id])) begin
        failures++;
        $display("FAIL N=%0d BITS=%0d pkt %0d: got hit=%0d drop=%0d port=%0d exp hit=%0d drop=%0d port=%0d",
                 N, BITS, id, out_hit, out_drop, out_port, exp_hit[id], exp_drop[id], exp_port[id]);
      end
      checks++;
      if (id < NPKT && cyc - t_in[id] != DEPTH) begin
        failures++;
        $display("FAIL N=%0d latency %0d, expected %0d", N, cyc - t_in[id], DEPTH);
      end
      n_out++;
      if (id < NPKT) begin
        if (!exp_hit[id]) n_drop_miss++;
        else if (exp_drop[id]) n_drop_rule++;
        else n_fwd++;
      end
    end
  end

  // does any intermediate table miss for this vector?
  function automatic bit any_mid_miss(input int f[]);
    int cur[$];
    int nxt[$];
    int k, key;
    bit miss;
    foreach (f[i]) cur.push_back(f[i]);
    k = 0; miss = 0;
    while (cur.size() > 2) begin
      nxt = {};
      for (int i = 0; i + 1 < cur.size(); i += 2) begin
        key = (cur[i] << BITS) | cur[i+1];
        if (!rule_present(k, key, 0)) miss = 1;
        nxt.push_back(rule_present(k, key, 0) ? nn2(k, cur[i], cur[i+1], BITS) : 0);
        k++;
      end
      if (cur.size() % 2 == 1) nxt.push_back(cur[cur.size()-1]);
      cur = nxt;
    end
    return miss;
  endfunction

  initial begin
    int f[];
    bit d, h;
    int p, v;
    done = 0; checks = 0; failures = 0;
    in_valid = 0; in_meta = '0;
    foreach (in_feat[i]) in_feat[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    // distil: every table gets all keys that have a rule
    for (int k = 0; k < N - 1; k++) begin
      for (int key = 0; key < (1 << KW); key++) begin
        bit fin;
        fin = (k == N - 2);
        if (!rule_present(k, key, fin)) continue;
        v = nn2(k, key >> BITS, key % (1 << BITS), BITS);
        @(negedge clk);
        cfg_we = 1; cfg_table = $clog2(N)'(k); cfg_addr = KW'(key); cfg_entry_valid = 1;
        cfg_data = BITS'(v);
        if (fin) begin
          final_action(v, BITS, d, p);
          cfg_drop = d; cfg_port = PORT_W'(p);
        end
      end
    end
    @(negedge clk); cfg_we = 0;
    // stream vectors back to back
    f = new[N];
    for (int n = 0; n < NPKT; n++) begin
      for (int i = 0; i < N; i++) f[i] = int'($urandom_range((1 << BITS) - 1));
      cascade_ref(N, BITS, f, d, p, h);
      exp_drop[n] = d; exp_port[n] = p; exp_hit[n] = h;
      if (any_mid_miss(f)) n_mid_miss++;
      @(negedge clk);
      in_valid = 1;
      for (int i = 0; i < N; i++) in_feat[i] = BITS'(f[i]);
      in_meta = '0; in_meta.pkt_id = PKT_ID_W'(n);
      t_in[n] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (DEPTH + 3) @(posedge clk);
    checks++;
    if (n_out != NPKT) begin failures++; $display("FAIL N=%0d: %0d results for %0d vectors", N, n_out, NPKT); end
    checks++;
    if (n_fwd == 0 || n_drop_rule == 0 || n_drop_miss == 0 || (N > 2 && n_mid_miss == 0)) begin
      failures++; $display("FAIL N=%0d: a lookup outcome was never exercised", N);
    end
    $display("cascade N=%0d BITS=%0d tables=%0d depth=%0d: set_egress=%0d drop_rule=%0d drop_default=%0d mid_miss=%0d",
             N, BITS, N - 1, DEPTH, n_fwd, n_drop_rule, n_drop_miss, n_mid_miss);
    done = 1;
  end
endmodule
