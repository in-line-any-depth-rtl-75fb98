// pkt_parser: header parser that extracts the DNN input features of a packet.
//
// Packets arrive as a stream of BEAT_BYTES-byte beats (lane 0, bits [7:0], is
// the first byte on the wire), one beat per cycle, with s_last on the final
// beat. Sideband signals valid on a packet's first beat give the ingress port
// and the reverse-direction window and byte count of the packet's flow. The
// parser walks the parse graph Ingress port -> Ethernet -> IPv4 -> TCP | UDP ->
// Accept: every lane compares its byte offset with the offsets of the fields
// needed, so a beat may cross several headers in one cycle. The IPv4 header
// length (IHL) sets where the TCP/UDP header starts.
//
// Extracted raw features (order of lutdnn_pkg F_*):
//   IP protocol, IP TTL, TCP window of this packet (source window), reverse
//   window from the sideband (destination window), IPv4 total length (source
//   bytes), reverse byte count from the sideband (destination bytes).
// Fields of headers the packet does not carry are zero (metadata starts at
// zero). The feature list and the parse graph follow the described parser; the
// beat width, taking the destination-side values from a sideband (one packet
// carries only its own direction), and IPv4 total length as the byte feature
// are this design's choices. All raw features share one 32-bit width, so the
// upper bits of the narrower header fields are always zero.
//
// Timing: f_valid pulses once per packet, one cycle after the beat in which
// the last needed header byte arrived (TCP: window; UDP: full UDP header;
// other IPv4: end of IPv4 header; non-IPv4: EtherType), or after s_last for a
// packet that ends earlier. No back-pressure: s_ready is not needed, the parser
// takes a beat every cycle. `state` shows the parse-graph node reached.
module pkt_parser
  import lutdnn_pkg::*;
#(
  parameter int unsigned BEAT_BYTES = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    s_valid,
  input  logic [BEAT_BYTES*8-1:0] s_data,
  input  logic                    s_last,
  input  logic [PORT_W-1:0]       s_port,
  input  logic [15:0]             s_rev_win,
  input  logic [31:0]             s_rev_bytes,
  output logic                    f_valid,
  output raw_feat_t               f_raw,
  output pkt_meta_t               f_meta,
  output parse_state_e            state
);

  localparam int unsigned OFF_W = 16;

  // Packet context
  logic              in_pkt, emitted;
  logic [OFF_W-1:0]  beat_off;
  logic [15:0]       etype;
  logic [3:0]        ihl;
  logic [15:0]       totlen;
  logic [7:0]        ttl, proto;
  logic [15:0]       win;
  logic [PORT_W-1:0] port;
  logic [15:0]       rev_win;
  logic [31:0]       rev_bytes;
  logic [PKT_ID_W-1:0] pkt_cnt;

  // Next-state values
  logic              sop;
  logic [OFF_W-1:0]  off0, eo;
  logic [15:0]       etype_n;
  logic [3:0]        ihl_n;
  logic [15:0]       totlen_n;
  logic [7:0]        ttl_n, proto_n;
  logic [15:0]       win_n;
  logic [PORT_W-1:0] port_n;
  logic [15:0]       rev_win_n;
  logic [31:0]       rev_bytes_n;
  logic [OFF_W-1:0]  l4_off;
  logic              eth_seen, ip_hdr_seen, is_ip, ip_ok, tcp_ok, udp_ok, done, emit;
  parse_state_e      state_n;

  always_comb begin
    sop  = !in_pkt;
    off0 = sop ? '0 : beat_off;
    eo   = (off0 > OFF_W'(2**OFF_W - 1 - BEAT_BYTES)) ? '1 : off0 + OFF_W'(BEAT_BYTES);

    if (sop) begin
      etype_n = '0; ihl_n = '0; totlen_n = '0; ttl_n = '0; proto_n = '0; win_n = '0;
      port_n = s_port; rev_win_n = s_rev_win; rev_bytes_n = s_rev_bytes;
    end else begin
      etype_n = etype; ihl_n = ihl; totlen_n = totlen; ttl_n = ttl; proto_n = proto; win_n = win;
      port_n = port; rev_win_n = rev_win; rev_bytes_n = rev_bytes;
    end

    // Byte-lane field capture, in wire order so IHL is known before L4 bytes.
    for (int unsigned ln = 0; ln < BEAT_BYTES; ln++) begin
      logic [OFF_W-1:0] o;
      logic [7:0]       b;
      logic [OFF_W-1:0] l4;
      o  = off0 + OFF_W'(ln);
      b  = s_data[ln*8 +: 8];
      l4 = OFF_W'(ETH_HDR_LEN) + OFF_W'({ihl_n, 2'b00});
      case (o)
        OFF_W'(12): etype_n[15:8]  = b;
        OFF_W'(13): etype_n[7:0]   = b;
        OFF_W'(14): ihl_n          = b[3:0];
        OFF_W'(16): totlen_n[15:8] = b;
        OFF_W'(17): totlen_n[7:0]  = b;
        OFF_W'(22): ttl_n          = b;
        OFF_W'(23): proto_n        = b;
        default: ;
      endcase
      if (o >= OFF_W'(34) && o == l4 + OFF_W'(14)) win_n[15:8] = b;
      if (o >= OFF_W'(34) && o == l4 + OFF_W'(15)) win_n[7:0]  = b;
    end

    l4_off      = OFF_W'(ETH_HDR_LEN) + OFF_W'({ihl_n, 2'b00});
    eth_seen    = eo >= OFF_W'(ETH_HDR_LEN);
    is_ip       = eth_seen && etype_n == ETHERTYPE_IPV4;
    ip_hdr_seen = eo >= OFF_W'(24);
    ip_ok       = is_ip && ip_hdr_seen && ihl_n >= 4'd5;
    tcp_ok      = ip_ok && proto_n == IPPROTO_TCP && eo >= l4_off + OFF_W'(16);
    udp_ok      = ip_ok && proto_n == IPPROTO_UDP && eo >= l4_off + OFF_W'(8);

    // Parse-graph node reached after this beat
    if (!eth_seen)                                   state_n = PS_ETH;
    else if (!is_ip)                                 state_n = PS_ACCEPT;
    else if (!ip_hdr_seen)                           state_n = PS_IPV4;
    else if (ihl_n < 4'd5)                           state_n = PS_ACCEPT;
    else if (eo < l4_off)                            state_n = PS_IPV4;
    else if (proto_n == IPPROTO_TCP && !tcp_ok)      state_n = PS_TCP;
    else if (proto_n == IPPROTO_UDP && !udp_ok)      state_n = PS_UDP;
    else                                             state_n = PS_ACCEPT;

    done = state_n == PS_ACCEPT;
    emit = s_valid && !(emitted && !sop) && (done || s_last);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_pkt   <= 1'b0;
      emitted  <= 1'b0;
      beat_off <= '0;
      pkt_cnt  <= '0;
      f_valid  <= 1'b0;
      state    <= PS_INGRESS;
      etype <= '0; ihl <= '0; totlen <= '0; ttl <= '0; proto <= '0; win <= '0;
      port <= '0; rev_win <= '0; rev_bytes <= '0;
    end else begin
      f_valid <= emit;
      if (emit) pkt_cnt <= pkt_cnt + 1'b1;
      if (s_valid) begin
        in_pkt   <= !s_last;
        beat_off <= eo;
        emitted  <= !s_last && ((emitted && !sop) || emit);
        state    <= s_last ? PS_INGRESS : state_n;
        etype <= etype_n; ihl <= ihl_n; totlen <= totlen_n; ttl <= ttl_n; proto <= proto_n;
        win <= win_n; port <= port_n; rev_win <= rev_win_n; rev_bytes <= rev_bytes_n;
      end
    end
  end

  // Feature record
  always_ff @(posedge clk) begin
    if (emit) begin
      f_raw[F_PROTO]      <= ip_ok  ? RAW_W'(proto_n)  : '0;
      f_raw[F_TTL]        <= ip_ok  ? RAW_W'(ttl_n)    : '0;
      f_raw[F_SWIN]       <= tcp_ok ? RAW_W'(win_n)    : '0;
      f_raw[F_DWIN]       <= RAW_W'(rev_win_n);
      f_raw[F_SBYTES]     <= ip_ok  ? RAW_W'(totlen_n) : '0;
      f_raw[F_DBYTES]     <= RAW_W'(rev_bytes_n);
      f_meta.ingress_port <= port_n;
      f_meta.pkt_id       <= pkt_cnt;
      f_meta.is_ipv4      <= ip_ok;
      f_meta.is_tcp       <= tcp_ok;
      f_meta.is_udp       <= udp_ok;
    end
  end

endmodule
