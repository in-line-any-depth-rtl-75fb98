// lutdnn_switch: in-line DNN classification pipeline of a programmable switch.
//
// Every packet is classified by a deep neural network without any arithmetic
// in the data path: the network is built as a tree of small 2-input networks,
// each replaced offline by a table of all its outputs, so inference is a chain
// of exact-match lookups. The pipeline is
//   pkt_parser     Ethernet/IPv4/TCP/UDP parse, six raw features
//   feature_quant  raw features -> FEAT_BITS-bit integers
//   lut_cascade    LUT_1 (in 1,2), LUT_2 (in 3,4), LUT_3 (in 5,6)
//                  -> LUT_Inter (LUT_1, LUT_2) -> LUT_Final (LUT_Inter, LUT_3)
// and its result is the forwarding decision of the packet: set_egress with an
// egress port, or drop (also the action when LUT_Final has no matching rule).
// Packet buffering, queueing and transmission belong to the rest of the switch
// and are not part of this module; the decision leaves on the d_* ports tagged
// with the packet number and ingress port.
//
// Interface
//   s_*      packet stream, BEAT_BYTES per beat, sideband on the first beat
//   q_shift  per-feature quantiser scale (right shift)
//   cfg_*    control-plane table writes (see lut_cascade for table numbering)
//   ready    all tables cleared after reset and writable
//   d_*      one decision per packet
// Timing: one beat per cycle, no back-pressure. A decision appears 2 + 3 = 5
// cycles after the beat that completed the packet's headers (parser 1, quantiser
// 1, three table levels 1 each). The structure of five tables on three levels,
// their keys and actions follow the six-input example pipeline; widths of the
// stream and of the control interface are this design's choices.
module lutdnn_switch
  import lutdnn_pkg::*;
#(
  parameter int unsigned BEAT_BYTES = 8,
  parameter int unsigned FEAT_BITS  = FEAT_BITS_DEF
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // packet stream
  input  logic                    s_valid,
  input  logic [BEAT_BYTES*8-1:0] s_data,
  input  logic                    s_last,
  input  logic [PORT_W-1:0]       s_port,
  input  logic [15:0]             s_rev_win,
  input  logic [31:0]             s_rev_bytes,
  // quantiser configuration
  input  logic [SHIFT_W-1:0]      q_shift [N_HDR_FEAT],
  // control plane
  output logic                    ready,
  input  logic                    cfg_we,
  input  logic [2:0]              cfg_table,
  input  logic [2*FEAT_BITS-1:0]  cfg_addr,
  input  logic                    cfg_entry_valid,
  input  logic [FEAT_BITS-1:0]    cfg_data,
  input  logic                    cfg_drop,
  input  logic [PORT_W-1:0]       cfg_port,
  // decision
  output logic                    d_valid,
  output logic                    d_hit,
  output logic                    d_drop,
  output logic [PORT_W-1:0]       d_port,
  output pkt_meta_t               d_meta,
  output parse_state_e            parse_state
);

  raw_feat_t               raw;
  pkt_meta_t               p_meta, q_meta;
  logic                    p_valid, q_valid;
  logic [FEAT_BITS-1:0]    qfeat [N_HDR_FEAT];

  pkt_parser #(.BEAT_BYTES(BEAT_BYTES)) u_parser (
    .clk, .rst_n,
    .s_valid, .s_data, .s_last, .s_port, .s_rev_win, .s_rev_bytes,
    .f_valid (p_valid),
    .f_raw   (raw),
    .f_meta  (p_meta),
    .state   (parse_state)
  );

  feature_quant #(.N_FEAT(N_HDR_FEAT), .FEAT_BITS(FEAT_BITS)) u_quant (
    .clk, .rst_n,
    .in_valid  (p_valid),
    .in_raw    (raw),
    .in_meta   (p_meta),
    .shift     (q_shift),
    .out_valid (q_valid),
    .out_feat  (qfeat),
    .out_meta  (q_meta)
  );

  lut_cascade #(.N_FEAT(N_HDR_FEAT), .FEAT_BITS(FEAT_BITS)) u_cascade (
    .clk, .rst_n, .ready,
    .in_valid        (q_valid),
    .in_feat         (qfeat),
    .in_meta         (q_meta),
    .out_valid       (d_valid),
    .out_hit         (d_hit),
    .out_drop        (d_drop),
    .out_port        (d_port),
    .out_meta        (d_meta),
    .cfg_we, .cfg_table, .cfg_addr, .cfg_entry_valid, .cfg_data, .cfg_drop, .cfg_port
  );

endmodule
