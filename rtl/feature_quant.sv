// feature_quant: integer quantiser that turns raw header features into the
// FEAT_BITS-bit inputs of the distilled tables.
//
// The tables are addressed by integer-encoded inputs of 4, 6 or 8 bits, so each
// raw feature must be mapped onto 2**FEAT_BITS levels. Each feature i is
// shifted right by shift[i] (a power-of-two scale set by the control plane to
// match the quantiser used in training) and saturated to the largest
// FEAT_BITS-bit value. Only the need for integer-encoded inputs of fixed width
// comes from the method; the shift-and-saturate form of the quantiser is this
// design's choice.
//
// Timing: registered, one record per cycle, one cycle of latency; in_meta is
// carried alongside.
module feature_quant
  import lutdnn_pkg::*;
#(
  parameter int unsigned N_FEAT    = N_HDR_FEAT,
  parameter int unsigned FEAT_BITS = FEAT_BITS_DEF
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [RAW_W-1:0]      in_raw  [N_FEAT],
  input  pkt_meta_t             in_meta,
  input  logic [SHIFT_W-1:0]    shift   [N_FEAT],
  output logic                  out_valid,
  output logic [FEAT_BITS-1:0]  out_feat [N_FEAT],
  output pkt_meta_t             out_meta
);

  localparam logic [RAW_W-1:0] QMAX = RAW_W'(2 ** FEAT_BITS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_meta <= in_meta;
      for (int i = 0; i < N_FEAT; i++) begin
        logic [RAW_W-1:0] s;
        s = in_raw[i] >> shift[i];
        out_feat[i] <= (s > QMAX) ? QMAX[FEAT_BITS-1:0] : s[FEAT_BITS-1:0];
      end
    end
  end

endmodule
