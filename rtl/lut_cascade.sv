// lut_cascade: hierarchy of 2-input distilled-DNN tables of any depth.
//
// Instead of one table addressed by all N_FEAT features (whose size grows as
// 2**(N_FEAT*FEAT_BITS)), the features are paired: each pair addresses one
// lut_table whose FEAT_BITS-wide output becomes an input of the next level, and
// pairing repeats until two values remain, which address lut_final. A level
// with an odd count passes its last value to the next level through a register.
// With N_FEAT = 6 this gives LUT_1 (inputs 1,2), LUT_2 (3,4), LUT_3 (5,6), then
// LUT_Inter (LUT_1, LUT_2) with LUT_3 held for one cycle, then LUT_Final
// (LUT_Inter, LUT_3): five tables on three levels. N_FEAT = 2 and 8 give the
// one- and seven-table arrangements. The pairing order, the level structure and
// the final drop/egress actions follow the six-input pipeline and its two
// sibling models; the odd-value register and the numbering of tables are this
// design's choices.
//
// Tables are numbered level by level, left to right: 0 .. N_FEAT-3 are
// intermediate tables, N_FEAT-2 is the final one. cfg_table selects the table a
// control-plane write goes to; intermediate tables take cfg_data, the final
// table takes {cfg_drop, cfg_port}.
//
// Timing: fully pipelined, one packet per cycle; a lookup entering on in_valid
// leaves on out_valid LATENCY = tree_depth(N_FEAT) cycles later with its
// in_meta. ready rises once every table has finished its post-reset clear
// (2**(2*FEAT_BITS) cycles).
module lut_cascade
  import lutdnn_pkg::*;
#(
  parameter int unsigned N_FEAT    = 6,
  parameter int unsigned FEAT_BITS = FEAT_BITS_DEF
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   ready,
  input  logic                   in_valid,
  input  logic [FEAT_BITS-1:0]   in_feat [N_FEAT],
  input  pkt_meta_t              in_meta,
  output logic                   out_valid,
  output logic                   out_hit,
  output logic                   out_drop,
  output logic [PORT_W-1:0]      out_port,
  output pkt_meta_t              out_meta,
  input  logic                   cfg_we,
  input  logic [$clog2(N_FEAT)-1:0] cfg_table,
  input  logic [2*FEAT_BITS-1:0] cfg_addr,
  input  logic                   cfg_entry_valid,
  input  logic [FEAT_BITS-1:0]   cfg_data,
  input  logic                   cfg_drop,
  input  logic [PORT_W-1:0]      cfg_port
);

  localparam int unsigned DEPTH   = tree_depth(N_FEAT);
  localparam int unsigned N_LUT   = N_FEAT - 1;

  // val[l][i]: i-th value entering level l.
  logic [FEAT_BITS-1:0] val   [DEPTH][N_FEAT];
  logic                 vld   [DEPTH+1];
  pkt_meta_t            meta  [DEPTH+1];
  logic                 tbl_ready [N_LUT];

  assign vld[0]  = in_valid;
  assign meta[0] = in_meta;

  for (genvar i = 0; i < N_FEAT; i++) begin : g_in
    assign val[0][i] = in_feat[i];
  end

  for (genvar l = 0; l < DEPTH; l++) begin : g_lvl
    localparam int unsigned CNT  = tree_count(N_FEAT, l);
    localparam int unsigned BASE = tree_base(N_FEAT, l);

    // valid / metadata travel one level per cycle
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) vld[l+1] <= 1'b0;
      else        vld[l+1] <= vld[l];
    end
    always_ff @(posedge clk) meta[l+1] <= meta[l];

    if (l == DEPTH - 1) begin : g_final
      lut_final #(.A_W(FEAT_BITS), .B_W(FEAT_BITS)) u_final (
        .clk, .rst_n,
        .ready           (tbl_ready[BASE]),
        .in_valid        (vld[l]),
        .in_a            (val[l][0]),
        .in_b            (val[l][1]),
        .out_valid       (),
        .out_hit         (out_hit),
        .out_drop        (out_drop),
        .out_port        (out_port),
        .cfg_we          (cfg_we && (32'(cfg_table) == BASE)),
        .cfg_addr        (cfg_addr),
        .cfg_entry_valid (cfg_entry_valid),
        .cfg_drop        (cfg_drop),
        .cfg_port        (cfg_port)
      );
    end else begin : g_mid
      for (genvar i = 0; i < CNT / 2; i++) begin : g_lut
        lut_table #(.A_W(FEAT_BITS), .B_W(FEAT_BITS), .DATA_W(FEAT_BITS)) u_lut (
          .clk, .rst_n,
          .ready           (tbl_ready[BASE+i]),
          .in_valid        (vld[l]),
          .in_a            (val[l][2*i]),
          .in_b            (val[l][2*i+1]),
          .out_valid       (),
          .out_hit         (),
          .out_data        (val[l+1][i]),
          .cfg_we          (cfg_we && (32'(cfg_table) == BASE + i)),
          .cfg_addr        (cfg_addr),
          .cfg_entry_valid (cfg_entry_valid),
          .cfg_data        (cfg_data)
        );
      end
      if (CNT % 2 == 1) begin : g_odd
        always_ff @(posedge clk) val[l+1][CNT/2] <= val[l][CNT-1];
      end
      for (genvar i = (CNT + 1) / 2; i < N_FEAT; i++) begin : g_unused
        assign val[l+1][i] = '0;
      end
    end
  end

  always_comb begin
    ready = 1'b1;
    for (int i = 0; i < N_LUT; i++) ready &= tbl_ready[i];
  end

  assign out_valid = vld[DEPTH];
  assign out_meta  = meta[DEPTH];

  if (N_FEAT < 2) begin : g_bad_param
    $error("lut_cascade needs at least two features");
  end

endmodule
