// lut_final: last table of the cascade, turning the distilled DNN's decision
// into a forwarding action.
//
// Like the intermediate tables it is an exact-match table keyed by the
// concatenation of its two inputs. Its entries hold an action instead of a
// metadata value: {drop, egress_port}. A hit on an entry with drop=0 applies
// set_egress (the packet leaves through egress_port); a hit on an entry with
// drop=1, or a miss, applies drop, the table's default action. The two
// actions and drop as the default follow the pipeline description; the entry
// encoding is this design's choice.
//
// Interface and timing are those of lut_table: one lookup per cycle, result one
// cycle later, control-plane writes of {cfg_drop, cfg_port} per key, ready after
// the post-reset clear.
module lut_final
  import lutdnn_pkg::*;
#(
  parameter int unsigned A_W = 8,
  parameter int unsigned B_W = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               ready,
  input  logic               in_valid,
  input  logic [A_W-1:0]     in_a,
  input  logic [B_W-1:0]     in_b,
  output logic               out_valid,
  output logic               out_hit,
  output logic               out_drop,
  output logic [PORT_W-1:0]  out_port,
  input  logic               cfg_we,
  input  logic [A_W+B_W-1:0] cfg_addr,
  input  logic               cfg_entry_valid,
  input  logic               cfg_drop,
  input  logic [PORT_W-1:0]  cfg_port
);

  logic [PORT_W:0] entry;

  lut_table #(.A_W(A_W), .B_W(B_W), .DATA_W(PORT_W + 1)) u_tbl (
    .clk, .rst_n, .ready,
    .in_valid, .in_a, .in_b,
    .out_valid, .out_hit, .out_data(entry),
    .cfg_we, .cfg_addr, .cfg_entry_valid,
    .cfg_data({cfg_drop, cfg_port})
  );

  // Action decode: set_egress on a forwarding hit, drop otherwise.
  always_comb begin
    if (out_hit && !entry[PORT_W]) begin
      out_drop = 1'b0;
      out_port = entry[PORT_W-1:0];
    end else begin
      out_drop = 1'b1;
      out_port = '0;
    end
  end

endmodule
