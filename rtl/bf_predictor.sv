// bf_predictor: partial-address Bloom filter L2 miss predictor.
//
// A 2^P-bit array is indexed by the least-significant P bits of a line
// address. A bit is 1 when at least one line currently held in the L2 has
// that partial address, so a 0 bit proves the line is absent and the
// access is predicted to miss to main memory; a 1 bit predicts a hit.
// The L2 tag directory keeps the array current: it sets the bit of every
// line it inserts and clears the bit of an evicted line when no other way
// of the set shares its partial address (collision detection happens
// there, not here). All of this follows the published predictor; the
// default P = 15 gives the 32 kbit (4 kB) array chosen for the 128 kB L2.
//
// Interface and timing:
//   lk_valid/lk_line  N_PORTS lookup ports, one per load/store unit;
//                     pred_valid/pred_miss/pred_tag are registered and
//                     appear on the next cycle. lk_tag is a caller tag (the
//                     load's ROB tag) carried alongside, as is lk_level.
//   set_valid/set_line, clr_valid/clr_line
//                     update requests, written at the clock edge. When both
//                     name the same bit, the set wins (the new line is in
//                     the cache). A lookup in the same cycle as an update
//                     sees the array before the update.
// Reset clears the whole array (an empty cache: every access predicted to
// miss). The synchronous reset, the one-cycle lookup and the set-wins rule
// are this design's choices.
module bf_predictor #(
  parameter int unsigned LINE_W = fh_pkg::LINE_W,
  parameter int unsigned P      = fh_pkg::BF_P,
  parameter int unsigned TAG_W  = fh_pkg::ROB_TAG_W,
  parameter int unsigned N_PORTS = 3
) (
  input  logic              clk,
  input  logic              rst,
  // lookup
  input  logic [N_PORTS-1:0]              lk_valid,
  input  logic [N_PORTS-1:0][LINE_W-1:0]  lk_line,
  input  logic [N_PORTS-1:0][TAG_W-1:0]   lk_tag,
  input  fh_pkg::crit_e [N_PORTS-1:0]     lk_level,
  output logic [N_PORTS-1:0]              pred_valid,
  output logic [N_PORTS-1:0]              pred_miss,
  output logic [N_PORTS-1:0][TAG_W-1:0]   pred_tag,
  output fh_pkg::crit_e [N_PORTS-1:0]     pred_level,
  // updates from the L2 tag directory
  input  logic              set_valid,
  input  logic [LINE_W-1:0] set_line,
  input  logic              clr_valid,
  input  logic [LINE_W-1:0] clr_line
);

  localparam int unsigned BITS = 1 << P;

  logic [BITS-1:0] bf_q;

  logic [P-1:0] set_idx, clr_idx;
  assign set_idx = set_line[P-1:0];
  assign clr_idx = clr_line[P-1:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      bf_q <= '0;
    end else begin
      if (clr_valid) bf_q[clr_idx] <= 1'b0;
      if (set_valid) bf_q[set_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      pred_valid <= '0;
      pred_miss  <= '0;
      pred_tag   <= '0;
      for (int k = 0; k < N_PORTS; k++) pred_level[k] <= fh_pkg::CRIT_NONE;
    end else begin
      for (int k = 0; k < N_PORTS; k++) begin
        pred_valid[k] <= lk_valid[k];
        pred_miss[k]  <= lk_valid[k] & ~bf_q[lk_line[k][P-1:0]];
        pred_tag[k]   <= lk_tag[k];
        pred_level[k] <= lk_level[k];
      end
    end
  end

endmodule
