// tb_switch_run: the end-to-end check of tb_lutdnn_switch, with the feature
// width as a parameter, so the whole pipeline can be run at the narrower
// feature widths (4 and 6 bits) as well. The quantiser scales grow by
// 8 - BITS so the same traffic spreads over the smaller input range. Results are
// reported on checks/failures once done is high.
module tb_switch_run #(
  parameter int BITS = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  import lutdnn_pkg::*;
  import tb_lutdnn_ref_pkg::*;

  localparam int BB   = 8;
  localparam int N    = N_HDR_FEAT;
  localparam int NPKT = 300;

  logic rst_n = 0;

  logic                 s_valid = 0, s_last = 0;
  logic [BB*8-1:0]      s_data = '0;
  logic [PORT_W-1:0]    s_port = '0;
  logic [15:0]          s_rev_win = '0;
  logic [31:0]          s_rev_bytes = '0;
  logic [SHIFT_W-1:0]   q_shift [N];
  logic                 ready;
  logic                 cfg_we = 0, cfg_entry_valid = 1, cfg_drop = 0;
  logic [2:0]           cfg_table = 0;
  logic [2*BITS-1:0]    cfg_addr = 0;
  logic [BITS-1:0]      cfg_data = 0;
  logic [PORT_W-1:0]    cfg_port = 0;
  logic                 d_valid, d_hit, d_drop;
  logic [PORT_W-1:0]    d_port;
  pkt_meta_t            d_meta;
  parse_state_e         parse_state;

  lutdnn_switch #(.FEAT_BITS(BITS)) dut (.*);

  // quantiser scales: 8-bit settings, shifted further for narrower features
  localparam int D = 8 - BITS;
  localparam int SHIFTS [N] = '{0, D, 8 + D, 8 + D, 2 + D, 16 + D};
  localparam int QMAX = (1 << BITS) - 1;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // mechanism counters
  int n_fwd = 0, n_drop_rule = 0, n_drop_miss = 0, n_mid_miss = 0, n_sat = 0;
  int n_tcp = 0, n_udp = 0, n_opt = 0, n_other_ip = 0, n_nonip = 0, n_trunc = 0;
  int n_b2b = 0, n_update = 0;


  typedef struct {
    bit drop, hit;
    int port, in_port, t_done;
  } exp_t;
  exp_t q[$];
  int n_dec = 0;

  always @(posedge clk) begin
    if (rst_n && d_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected decision");
      end else begin
        e = q.pop_front();
        if (d_drop != e.drop || d_hit != e.hit || (!e.drop && int'(d_port) != e.port) ||
            int'(d_meta.ingress_port) != e.in_port || int'(d_meta.pkt_id) != n_dec % (1 << PKT_ID_W)) begin
          failures++;
          $display("FAIL pkt %0d: got hit=%0d drop=%0d port=%0d exp hit=%0d drop=%0d port=%0d",
                   n_dec, d_hit, d_drop, d_port, e.hit, e.drop, e.port);
        end
        checks++;
        if (cyc - e.t_done != 5) begin
          failures++; $display("FAIL pkt %0d: decision %0d cycles after headers", n_dec, cyc - e.t_done);
        end
        if (!e.hit) n_drop_miss++;
        else if (e.drop) n_drop_rule++;
        else n_fwd++;
      end
      n_dec++;
    end
  end

  function automatic int quant(input longint unsigned raw, input int sh);
    longint unsigned s;
    s = raw >> sh;
    return (s > QMAX) ? QMAX : int'(s);
  endfunction

  // Build, model and send one frame; returns its quantised features.
  task automatic frame(input bit [15:0] et, input int ihl, input bit [7:0] ttl, input bit [7:0] proto,
                       input bit [15:0] win, input int payload, input int cut, input bit gaps,
                       input int in_port, input bit [15:0] rwin, input bit [31:0] rbytes,
                       output int fq[]);
    bytes_t p;
    exp_t e;
    int need, l4, totlen, nb, eb;
    bit ip, tcp;
    longint unsigned raw [N];
    p = build_pkt(et, ihl, ttl, proto, win, payload);
    if (cut > 0) while (p.size() > cut) void'(p.pop_back());
    l4 = 14 + ihl * 4;
    ip = (et == 16'h0800) && p.size() >= 24;
    tcp = ip && proto == 6 && p.size() >= l4 + 16;
    totlen = ihl * 4 + ((proto == 6) ? 20 : (proto == 17) ? 8 : 0) + payload;
    if (et != 16'h0800) need = 14;
    else if (proto == 6) need = l4 + 16;
    else if (proto == 17) need = l4 + 8;
    else need = l4;
    raw[0] = ip ? proto : 0;
    raw[1] = ip ? ttl : 0;
    raw[2] = tcp ? win : 0;
    raw[3] = rwin;
    raw[4] = ip ? totlen : 0;
    raw[5] = rbytes;
    fq = new[N];
    for (int i = 0; i < N; i++) begin
      fq[i] = quant(raw[i], SHIFTS[i]);
      if ((raw[i] >> SHIFTS[i]) > QMAX) n_sat++;
    end
    cascade_ref(N, BITS, fq, e.drop, e.port, e.hit);
    begin
      int k1, k2, k3, ki;
      k1 = (fq[0] << BITS) | fq[1]; k2 = (fq[2] << BITS) | fq[3]; k3 = (fq[4] << BITS) | fq[5];
      if (!rule_present(0, k1, 0) || !rule_present(1, k2, 0) || !rule_present(2, k3, 0)) n_mid_miss++;
      else begin
        ki = (nn2(0, fq[0], fq[1], BITS) << BITS) | nn2(1, fq[2], fq[3], BITS);
        if (!rule_present(3, ki, 0)) n_mid_miss++;
      end
    end
    e.in_port = in_port;
    if (et != 16'h0800) n_nonip++;
    else if (cut > 0) n_trunc++;
    else if (proto == 6) n_tcp++;
    else if (proto == 17) n_udp++;
    else n_other_ip++;
    if (ip && ihl > 5) n_opt++;
    nb = (p.size() + BB - 1) / BB;
    eb = (need + BB - 1) / BB - 1;
    if (eb > nb - 1) eb = nb - 1;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      if (gaps && b % 2 == 1) begin s_valid = 0; @(negedge clk); end
      s_valid = 1;
      s_last  = b == nb - 1;
      for (int ln = 0; ln < BB; ln++)
        s_data[ln*8 +: 8] = (b * BB + ln < p.size()) ? p[b * BB + ln] : 8'h00;
      s_port = PORT_W'(in_port); s_rev_win = rwin; s_rev_bytes = rbytes;
      if (b == eb) begin e.t_done = cyc; q.push_back(e); end
    end
  endtask

  task automatic idle();
    @(negedge clk); s_valid = 0; s_last = 0;
  endtask

  initial begin
    int fq[];
    int v, p, key, sel;
    bit d;
    bit [15:0] rw;
    bit [31:0] rb;
    done = 0; checks = 0; failures = 0;
    for (int i = 0; i < N; i++) q_shift[i] = SHIFT_W'(SHIFTS[i]);
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    while (!ready) @(posedge clk);
    // distil the five networks into LUT_1..LUT_3, LUT_Inter, LUT_Final
    for (int k = 0; k < N - 1; k++) begin
      for (int kk = 0; kk < (1 << (2 * BITS)); kk++) begin
        bit fin;
        fin = k == N - 2;
        if (!rule_present(k, kk, fin)) continue;
        v = nn2(k, kk >> BITS, kk % (1 << BITS), BITS);
        @(negedge clk);
        cfg_we = 1; cfg_table = 3'(k); cfg_addr = (2 * BITS)'(kk); cfg_entry_valid = 1; cfg_data = BITS'(v);
        if (fin) begin final_action(v, BITS, d, p); cfg_drop = d; cfg_port = PORT_W'(p); end
      end
    end
    @(negedge clk); cfg_we = 0;
    $display("tables loaded at cycle %0d", cyc);

    // traffic
    for (int n = 0; n < NPKT; n++) begin
      bit b2b;
      sel = n % 10;
      rw = 16'($urandom_range(65535));
      rb = $urandom_range(32'h1fff_ffff);
      b2b = (n % 4) != 0;
      case (sel)
        0: frame(16'h0806, 5, 0, 0, 0, 10, 0, 0, n % 48, rw, rb, fq);
        1: frame(16'h0800, 5, 8'($urandom_range(255)), 1, 0, $urandom_range(40), 0, 0, n % 48, rw, rb, fq);
        2, 3: frame(16'h0800, 5 + $urandom_range(2), 8'($urandom_range(255)), 17, 0, $urandom_range(200), 0, n % 3 == 0, n % 48, rw, rb, fq);
        4: frame(16'h0800, 5, 8'($urandom_range(255)), 6, 16'($urandom_range(65535)), 20, 44, 0, n % 48, rw, rb, fq);
        default: frame(16'h0800, 5 + $urandom_range(3), 8'($urandom_range(255)), 6, 16'($urandom_range(65535)),
                       $urandom_range(900), 0, n % 5 == 0, n % 48, rw, rb, fq);
      endcase
      if (b2b) n_b2b++;
      else idle();
    end
    idle();
    repeat (10) @(posedge clk);

    // run-time rule update: flip the action of a frame's final-table rule
    rw = 16'h1234; rb = 32'h0040_0000;
    frame(16'h0800, 5, 64, 6, 16'h8000, 100, 0, 0, 7, rw, rb, fq);
    idle();
    repeat (10) @(posedge clk);
    key = final_key(N, BITS, fq);
    @(negedge clk);
    cfg_we = 1; cfg_table = 3'(N - 2); cfg_addr = (2 * BITS)'(key); cfg_entry_valid = 1; cfg_drop = 0; cfg_port = 9'd45;
    @(negedge clk); cfg_we = 0;
    begin
      // expectation for the repeated frame is set_egress 45 whatever the old rule was
      bytes_t pk;
      exp_t e;
      int nb;
      pk = build_pkt(16'h0800, 5, 64, 6, 16'h8000, 100);
      nb = (pk.size() + BB - 1) / BB;
      e.drop = 0; e.hit = 1; e.port = 45; e.in_port = 7;
      for (int b = 0; b < nb; b++) begin
        @(negedge clk);
        s_valid = 1; s_last = b == nb - 1;
        for (int ln = 0; ln < BB; ln++)
          s_data[ln*8 +: 8] = (b * BB + ln < pk.size()) ? pk[b * BB + ln] : 8'h00;
        s_port = 9'd7; s_rev_win = rw; s_rev_bytes = rb;
        if (b == (50 + BB - 1) / BB - 1) begin e.t_done = cyc; q.push_back(e); end
      end
      n_update++;
    end
    idle();
    repeat (10) @(posedge clk);

    checks++;
    if (q.size() != 0 || n_dec != NPKT + 2) begin
      failures++; $display("FAIL %0d decisions, %0d still expected", n_dec, q.size());
    end
    $display("FEAT_BITS=%0d", BITS);
    $display("set_egress=%0d drop_rule=%0d drop_default=%0d mid_miss=%0d saturated=%0d",
             n_fwd, n_drop_rule, n_drop_miss, n_mid_miss, n_sat);
    $display("tcp=%0d udp=%0d ip_options=%0d other_ip=%0d non_ip=%0d truncated=%0d back_to_back=%0d rule_update=%0d",
             n_tcp, n_udp, n_opt, n_other_ip, n_nonip, n_trunc, n_b2b, n_update);
    checks++;
    if (n_fwd == 0 || n_drop_rule == 0 || n_drop_miss == 0 || n_mid_miss == 0 || n_sat == 0 ||
        n_tcp == 0 || n_udp == 0 || n_opt == 0 || n_other_ip == 0 || n_nonip == 0 || n_trunc == 0 ||
        n_b2b == 0 || n_update == 0) begin
      failures++; $display("FAIL a mechanism was never exercised");
    end
    done = 1;
  end
endmodule
