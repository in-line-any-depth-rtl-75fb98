// lutdnn_pkg: constants and types shared by the LUT-distilled DNN switch pipeline.
//
// The pipeline classifies each packet with a cascade of 2-input look-up tables.
// Each table holds every output of a small integer-quantised neural network, so
// inference is one exact-match lookup per table. This package holds the header
// constants the parser needs, the order of the six raw features handed to the
// quantiser (IP protocol, TTL, source window, destination window, source bytes,
// destination bytes, as listed for the parser), the per-packet metadata record
// carried alongside the features, and helper functions that size the table
// hierarchy (number of values at each level of the pairing tree).
// Widths of the raw features, of the port number and of the packet tag are this
// design's own choices; the 8-bit feature width and the six features follow the
// six-input example pipeline.
package lutdnn_pkg;

  // Raw (unquantised) feature width and count produced by the parser.
  localparam int unsigned RAW_W      = 32;
  localparam int unsigned N_HDR_FEAT = 6;

  // Raw feature positions; also the order of the cascade inputs Input_1..Input_6.
  localparam int unsigned F_PROTO  = 0;
  localparam int unsigned F_TTL    = 1;
  localparam int unsigned F_SWIN   = 2;
  localparam int unsigned F_DWIN   = 3;
  localparam int unsigned F_SBYTES = 4;
  localparam int unsigned F_DBYTES = 5;

  // Default quantised feature width (bits per LUT input) and egress port width.
  localparam int unsigned FEAT_BITS_DEF = 8;
  localparam int unsigned PORT_W        = 9;
  localparam int unsigned PKT_ID_W      = 16;
  localparam int unsigned SHIFT_W       = 5;

  // Header constants.
  localparam logic [15:0] ETHERTYPE_IPV4 = 16'h0800;
  localparam logic [7:0]  IPPROTO_TCP    = 8'd6;
  localparam logic [7:0]  IPPROTO_UDP    = 8'd17;
  localparam int unsigned ETH_HDR_LEN    = 14;

  // Parse graph states (Ingress port -> Eth -> IPv4 -> TCP | UDP -> Accept).
  typedef enum logic [2:0] {
    PS_INGRESS = 3'd0,
    PS_ETH     = 3'd1,
    PS_IPV4    = 3'd2,
    PS_TCP     = 3'd3,
    PS_UDP     = 3'd4,
    PS_ACCEPT  = 3'd5
  } parse_state_e;

  // Metadata that travels with a packet's features through the pipeline.
  typedef struct packed {
    logic [PORT_W-1:0]   ingress_port;
    logic [PKT_ID_W-1:0] pkt_id;
    logic                is_ipv4;
    logic                is_tcp;
    logic                is_udp;
  } pkt_meta_t;

  typedef logic [RAW_W-1:0] raw_feat_t [N_HDR_FEAT];

  // Number of values entering level `lvl` of a pairing tree with n leaves.
  function automatic int unsigned tree_count(input int unsigned n, input int unsigned lvl);
    int unsigned c;
    c = n;
    for (int unsigned k = 0; k < lvl; k++) c = (c + 1) / 2;
    return c;
  endfunction

  // Number of levels (tables traversed) of a pairing tree with n >= 2 leaves.
  function automatic int unsigned tree_depth(input int unsigned n);
    int unsigned c, d;
    c = n;
    d = 0;
    while (c > 1) begin
      c = (c + 1) / 2;
      d++;
    end
    return d;
  endfunction

  // Index of the first table of level `lvl`; tables are numbered level by level.
  function automatic int unsigned tree_base(input int unsigned n, input int unsigned lvl);
    int unsigned b;
    b = 0;
    for (int unsigned k = 0; k < lvl; k++) b += tree_count(n, k) / 2;
    return b;
  endfunction

endpackage
