// lut_table: exact-match flow table holding a distilled 2-input DNN.
//
// The two integer inputs are concatenated into one compound key {in_a, in_b}
// of A_W + B_W bits, which addresses a table with one entry per possible key.
// Each entry holds a valid bit and the DNN output for that input pair. A lookup
// that hits returns the stored output (the set_meta / set_lut_meta action); a
// miss returns zero, the value the downstream metadata field keeps when no rule
// matched. Using the key directly as the address and filling the table
// exhaustively follows the distillation scheme; the zero-on-miss behaviour, the
// valid bit per entry and the clear sweep are this design's choices.
//
// Interface
//   in_valid/in_a/in_b      lookup request, one per cycle, no back-pressure
//   out_valid/out_hit/out_data  result, exactly one cycle after the request
//   cfg_we/cfg_addr/cfg_entry_valid/cfg_data  control-plane write of one entry
//                           (cfg_entry_valid=0 deletes the rule)
//   ready                   low while the table is being cleared after reset
// Timing: after reset the table walks all 2**(A_W+B_W) entries, clearing one per
// cycle, then raises ready. Control writes before ready are ignored and lookups
// before ready miss. A lookup and a write to the same key in the same cycle
// return the old entry.
module lut_table #(
  parameter int unsigned A_W    = 8,
  parameter int unsigned B_W    = 8,
  parameter int unsigned DATA_W = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 ready,
  // lookup
  input  logic                 in_valid,
  input  logic [A_W-1:0]       in_a,
  input  logic [B_W-1:0]       in_b,
  output logic                 out_valid,
  output logic                 out_hit,
  output logic [DATA_W-1:0]    out_data,
  // control-plane entry write
  input  logic                 cfg_we,
  input  logic [A_W+B_W-1:0]   cfg_addr,
  input  logic                 cfg_entry_valid,
  input  logic [DATA_W-1:0]    cfg_data
);

  localparam int unsigned KEY_W   = A_W + B_W;
  localparam int unsigned ENTRIES = 2 ** KEY_W;

  // Entry: {valid, data}
  logic [DATA_W:0] mem [ENTRIES];

  logic [KEY_W-1:0] clr_addr;
  logic             clearing;

  logic             wr_en;
  logic [KEY_W-1:0] wr_addr;
  logic [DATA_W:0]  wr_entry;

  always_comb begin
    if (clearing) begin
      wr_en    = 1'b1;
      wr_addr  = clr_addr;
      wr_entry = '0;
    end else begin
      wr_en    = cfg_we;
      wr_addr  = cfg_addr;
      wr_entry = {cfg_entry_valid, cfg_data};
    end
  end

  // Clear sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == KEY_W'(ENTRIES - 1)) clearing <= 1'b0;
    end
  end

  assign ready = !clearing;

  // Memory write port
  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_entry;
  end

  // Memory read port (registered)
  logic [DATA_W:0] rd_entry;
  logic            rd_ok;
  always_ff @(posedge clk) begin
    rd_entry <= mem[{in_a, in_b}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      rd_ok     <= 1'b0;
    end else begin
      out_valid <= in_valid;
      rd_ok     <= !clearing;
    end
  end

  assign out_hit  = rd_ok && rd_entry[DATA_W];
  assign out_data = out_hit ? rd_entry[DATA_W-1:0] : '0;

endmodule
