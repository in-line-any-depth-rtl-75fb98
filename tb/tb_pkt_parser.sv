// tb_pkt_parser: self-checking test of the header parser.
//
// Frames built by build_pkt() are streamed 8 bytes per beat: TCP with and
// without IPv4 options, UDP, another IP protocol (ICMP), a non-IP frame (ARP),
// a TCP frame cut short before its window field, frames with idle cycles
// between beats and back-to-back frames. For each frame the expected features
// follow from the values the frame was built with, and the feature record must
// appear exactly one cycle after the beat that carries the last byte needed.
// Every parse-graph node must be reached at least once.
module tb_pkt_parser;
  import lutdnn_pkg::*;
  import tb_lutdnn_ref_pkg::*;

  localparam int BB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic              s_valid = 0, s_last = 0;
  logic [BB*8-1:0]   s_data = '0;
  logic [PORT_W-1:0] s_port = '0;
  logic [15:0]       s_rev_win = '0;
  logic [31:0]       s_rev_bytes = '0;
  logic              f_valid;
  raw_feat_t         f_raw;
  pkt_meta_t         f_meta;
  parse_state_e      state;

  pkt_parser #(.BEAT_BYTES(BB)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  int seen_state [6];
  always @(posedge clk) seen_state[int'(state)]++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expectation queue
  typedef struct {
    int unsigned f[6];
    bit ip, tcp, udp;
    int port;
    int t_emit;
  } exp_t;
  exp_t q[$];
  int n_rec = 0;

  always @(posedge clk) begin
    if (rst_n && f_valid) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++; $display("FAIL unexpected feature record");
      end else begin
        e = q.pop_front();
        for (int i = 0; i < 6; i++)
          if (f_raw[i] != e.f[i]) begin
            failures++; $display("FAIL pkt %0d feature %0d: got %0d exp %0d", n_rec, i, f_raw[i], e.f[i]);
          end
        if (f_meta.is_ipv4 != e.ip || f_meta.is_tcp != e.tcp || f_meta.is_udp != e.udp ||
            int'(f_meta.ingress_port) != e.port || int'(f_meta.pkt_id) != n_rec) begin
          failures++; $display("FAIL pkt %0d metadata", n_rec);
        end
        checks++;
        if (cyc - e.t_emit != 1) begin
          failures++; $display("FAIL pkt %0d: record %0d cycles after completing beat", n_rec, cyc - e.t_emit);
        end
      end
      n_rec++;
    end
  end

  task automatic send(input bytes_t p, input int need, input exp_t e, input bit gaps);
    int nb, emit_beat;
    nb = (p.size() + BB - 1) / BB;
    emit_beat = (need + BB - 1) / BB - 1;
    if (emit_beat > nb - 1) emit_beat = nb - 1;
    for (int b = 0; b < nb; b++) begin
      @(negedge clk);
      if (gaps && b % 2 == 1) begin
        s_valid = 0;
        @(negedge clk);
      end
      s_valid = 1;
      s_last  = b == nb - 1;
      for (int ln = 0; ln < BB; ln++)
        s_data[ln*8 +: 8] = (b * BB + ln < p.size()) ? p[b * BB + ln] : 8'h00;
      s_port = PORT_W'(e.port); s_rev_win = 16'(e.f[3]); s_rev_bytes = e.f[5];
      if (b != 0) begin s_port = '1; s_rev_win = '1; s_rev_bytes = '1; end  // only first beat counts
      if (b == emit_beat) begin e.t_emit = cyc; q.push_back(e); end
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
  endtask

  task automatic frame(input bit [15:0] et, input int ihl, input bit [7:0] ttl, input bit [7:0] proto,
                       input bit [15:0] win, input int payload, input int cut, input bit gaps, input int port);
    bytes_t p;
    exp_t e;
    int need, l4, totlen;
    bit ip;
    p = build_pkt(et, ihl, ttl, proto, win, payload);
    if (cut > 0) while (p.size() > cut) void'(p.pop_back());
    l4 = 14 + ihl * 4;
    ip = (et == 16'h0800) && (p.size() >= 24);
    totlen = ihl * 4 + ((proto == 6) ? 20 : (proto == 17) ? 8 : 0) + payload;
    if (et != 16'h0800) need = 14;
    else if (proto == 6) need = l4 + 16;
    else if (proto == 17) need = l4 + 8;
    else need = l4;
    e.ip  = ip;
    e.tcp = ip && proto == 6 && p.size() >= l4 + 16;
    e.udp = ip && proto == 17 && p.size() >= l4 + 8;
    e.f[0] = ip ? proto : 0;
    e.f[1] = ip ? ttl : 0;
    e.f[2] = e.tcp ? win : 0;
    e.f[3] = $urandom_range(65535);
    e.f[4] = ip ? totlen : 0;
    e.f[5] = $urandom();
    e.port = port;
    send(p, need, e, gaps);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    frame(16'h0800, 5, 64,  6, 16'hfaf0, 40, 0, 0, 3);    // TCP
    frame(16'h0800, 7, 128, 6, 16'h0200, 3,  0, 0, 17);   // TCP, IPv4 options
    frame(16'h0800, 5, 33,  17, 0, 20, 0, 0, 5);          // UDP
    frame(16'h0800, 6, 1,   17, 0, 0,  0, 1, 9);          // UDP, options, gaps
    frame(16'h0800, 5, 250, 1, 0, 30, 0, 0, 40);          // ICMP
    frame(16'h0806, 5, 0,   0, 0, 0,  0, 0, 2);           // ARP
    frame(16'h0800, 5, 77,  6, 16'h1234, 10, 40, 0, 47);  // TCP cut before window
    frame(16'h0800, 5, 12,  6, 16'h8001, 0, 0, 1, 1);     // TCP, gaps
    for (int i = 0; i < 20; i++)
      frame(16'h0800, 5 + $urandom_range(3), 8'($urandom_range(255)),
            (i % 3 == 0) ? 8'd17 : 8'd6, 16'($urandom_range(65535)), $urandom_range(60), 0, 0, i);
    repeat (5) @(posedge clk);
    checks++;
    if (q.size() != 0 || n_rec != 28) begin
      failures++; $display("FAIL %0d records, %0d still expected", n_rec, q.size());
    end
    for (int s = 1; s < 6; s++) begin
      checks++;
      if (seen_state[s] == 0) begin failures++; $display("FAIL parse state %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
