// l2_tag_dir: L2 tag directory with the Bloom filter collision detector.
//
// Looks up every line address presented to the L2, reports hit or miss,
// and on a miss allocates the line (the tags are updated when the miss is
// detected, not when the data returns). On each allocation it produces
// the two Bloom filter updates of the partial-address predictor:
//   * set the bit of the inserted line, and
//   * clear the bit of the evicted line, but only when no other valid way
//     of the same set holds a line with the same partial address
//     (collision detection) and the inserted line does not share it.
// The partial address is the low P bits of the line address; with P at
// least the index width, lines that share it always sit in the same set,
// so comparing the low P-IDX_W tag bits of the other ways of the set is
// sufficient.
//
// The geometry follows the evaluated machine: 128 kB, 8 ways, 32-byte
// lines, hence 512 sets. The replacement policy is not given; this design
// fills an invalid way first and otherwise replaces round-robin per set
// (a 3-bit pointer), the simplest policy that works. The data array is
// outside this block.
//
// Interface and timing: req_valid/req_line is looked up combinationally
// and the directory is updated at the same clock edge, so back-to-back
// requests to one set see each other. resp_* and bf_* are registered and
// valid on the cycle after the request. One request per cycle.
module l2_tag_dir #(
  parameter int unsigned LINE_W = fh_pkg::LINE_W,
  parameter int unsigned SETS   = 512,
  parameter int unsigned WAYS   = 8,
  parameter int unsigned P      = fh_pkg::BF_P
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              req_valid,
  input  logic [LINE_W-1:0] req_line,
  output logic              resp_valid,
  output logic              resp_hit,
  output logic              resp_evict,      // a valid line was replaced
  output logic [LINE_W-1:0] resp_evict_line,
  // Bloom filter updates
  output logic              bf_set_valid,
  output logic [LINE_W-1:0] bf_set_line,
  output logic              bf_clr_valid,
  output logic [LINE_W-1:0] bf_clr_line
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = LINE_W - IDX_W;
  localparam int unsigned PT_W  = P - IDX_W;   // partial-address bits in the tag

  if (P <= IDX_W || P > LINE_W) begin : g_bad_p
    $error("l2_tag_dir: P must exceed the index width and fit in the line address");
  end

  logic [TAG_W-1:0]             tag_mem [SETS][WAYS];
  logic [SETS-1:0][WAYS-1:0]    valid_q;
  logic [SETS-1:0][WAY_W-1:0]   ptr_q;

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  assign idx = req_line[IDX_W-1:0];
  assign tag = req_line[LINE_W-1:IDX_W];

  logic              hit;
  logic              has_inv;
  logic [WAY_W-1:0]  inv_way, victim;
  logic              victim_valid;
  logic [TAG_W-1:0]  victim_tag;
  logic              collide;

  always_comb begin
    hit     = 1'b0;
    has_inv = 1'b0;
    inv_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (valid_q[idx][w] && tag_mem[idx][w] == tag) hit = 1'b1;
      if (!valid_q[idx][w]) begin
        has_inv = 1'b1;
        inv_way = WAY_W'(w);
      end
    end
    victim       = has_inv ? inv_way : ptr_q[idx];
    victim_valid = valid_q[idx][victim];
    victim_tag   = tag_mem[idx][victim];
    // collision detector: another valid way, or the incoming line, shares
    // the victim's partial address
    collide = (tag[PT_W-1:0] == victim_tag[PT_W-1:0]);
    for (int w = 0; w < WAYS; w++) begin
      if (WAY_W'(w) != victim && valid_q[idx][w] &&
          tag_mem[idx][w][PT_W-1:0] == victim_tag[PT_W-1:0])
        collide = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (req_valid && !hit) tag_mem[idx][victim] <= tag;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      valid_q <= '0;
      ptr_q   <= '0;
    end else if (req_valid && !hit) begin
      valid_q[idx][victim] <= 1'b1;
      if (!has_inv) ptr_q[idx] <= (ptr_q[idx] == WAY_W'(WAYS - 1)) ? '0 : ptr_q[idx] + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      resp_valid      <= 1'b0;
      resp_hit        <= 1'b0;
      resp_evict      <= 1'b0;
      resp_evict_line <= '0;
      bf_set_valid    <= 1'b0;
      bf_set_line     <= '0;
      bf_clr_valid    <= 1'b0;
      bf_clr_line     <= '0;
    end else begin
      resp_valid      <= req_valid;
      resp_hit        <= req_valid & hit;
      resp_evict      <= req_valid & ~hit & victim_valid;
      resp_evict_line <= {victim_tag, idx};
      bf_set_valid    <= req_valid & ~hit;
      bf_set_line     <= req_line;
      bf_clr_valid    <= req_valid & ~hit & victim_valid & ~collide;
      bf_clr_line     <= {victim_tag, idx};
    end
  end

endmodule
