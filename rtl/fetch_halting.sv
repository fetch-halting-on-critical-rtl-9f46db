// fetch_halting: fetch-halting unit for an out-of-order core.
//
// Halts instruction fetch while a load that software profiling marked as
// critical is missing to main memory, so that the issue queue and the
// reorder buffer do not fill with instructions that could only wait. Fewer
// occupied entries let unused queue entries be switched off.
//
// Flow through the pipeline:
//   decode      the two annotation bits of each instruction give its
//               criticality (fh_pkg::decode_annot);
//   address     a critical or half-critical load with its effective
//               address looks up the partial-address Bloom filter
//               (bf_predictor); non-critical loads do not access it;
//   L1 access   an annotated load predicted to miss in the L2 halts fetch
//               from the next cycle (halt_ctrl);
//   write-back  completion, or a squash of a wrong-path load, ends the
//               halt; a half-critical load ends it after HALF_HALT_CYCLES.
// Every L2 access is also looked up in the L2 tag directory (l2_tag_dir),
// whose allocations and evictions keep the Bloom filter current. The
// profiling counters (crit_profiler) measure dead cycles and fetch-issue
// counts of monitored misses for the offline criticality analysis.
//
// The overall flow follows the document. The core itself (fetch unit,
// issue queue, reorder buffer, load/store queue), the L2 data array and
// main memory are outside this unit and connect through the ports below.
//
// Timing: an agen_* request is looked up at the clock edge and its
// prediction is acted upon in the next cycle, which may be the cycle of
// its L1 access (l1_*). fetch_halt is a function of registers only and
// is high from the cycle after the L1 access starts. l2_resp_* follow an
// l2_req_* by one cycle and the Bloom filter is updated one cycle later.
module fetch_halting
  import fh_pkg::*;
#(
  parameter int unsigned TAG_W            = ROB_TAG_W,
  parameter int unsigned A_W              = ADDR_W,
  parameter int unsigned OFF_W            = L2_OFF_W,
  parameter int unsigned P                = BF_P,
  parameter int unsigned L2_SETS          = 512,
  parameter int unsigned L2_WAYS          = 8,
  parameter int unsigned N_LSU            = 3,
  parameter int unsigned N_DONE           = 8,
  parameter int unsigned ISSUE_W          = 8,
  parameter int unsigned N_HALT_ENTRIES   = 8,
  parameter int unsigned N_MON_ENTRIES    = 8,
  parameter int unsigned HALF_HALT_CYCLES = 103,
  parameter bit          EN_LONG_LAT      = 1'b0,
  parameter int unsigned PC_W             = 32,
  parameter int unsigned SEQ_W            = 32,
  parameter int unsigned CNT_W            = 16
) (
  input  logic                          clk,
  input  logic                          rst,
  // address generation of loads (one port per load/store unit)
  input  logic [N_LSU-1:0]              agen_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]   agen_tag,
  input  logic [N_LSU-1:0][A_W-1:0]     agen_addr,
  input  logic [N_LSU-1:0][1:0]         agen_annot,
  // L1 data cache access start
  input  logic [N_LSU-1:0]              l1_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]   l1_tag,
  // long-latency arithmetic issue (used when EN_LONG_LAT = 1)
  input  logic                          ll_valid,
  input  logic [TAG_W-1:0]              ll_tag,
  input  logic [1:0]                    ll_annot,
  // completion, squash, flush
  input  logic [N_DONE-1:0]             done_valid,
  input  logic [N_DONE-1:0][TAG_W-1:0]  done_tag,
  input  logic [N_LSU-1:0]              squash_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]   squash_tag,
  input  logic                          flush,
  // to the fetch unit
  output logic                          fetch_halt,
  output logic                          halt_start,
  output logic                          halt_drop,
  output logic [$clog2(N_HALT_ENTRIES+1)-1:0] n_halting,
  // miss prediction (observation)
  output logic [N_LSU-1:0]              pred_valid,
  output logic [N_LSU-1:0]              pred_miss,
  // L2 tag directory
  input  logic                          l2_req_valid,
  input  logic [A_W-1:0]                l2_req_addr,
  output logic                          l2_resp_valid,
  output logic                          l2_resp_hit,
  output logic                          l2_resp_evict,
  output logic [A_W-OFF_W-1:0]          l2_resp_evict_line,
  // profiling counters
  input  logic                          mon_valid,
  input  logic [TAG_W-1:0]              mon_tag,
  input  logic [PC_W-1:0]               mon_pc,
  input  logic [SEQ_W-1:0]              fetch_seq,
  input  logic [ISSUE_W-1:0]            issue_valid,
  input  logic [ISSUE_W-1:0][SEQ_W-1:0] issue_seq,
  output logic                          rec_valid,
  output logic [PC_W-1:0]               rec_pc,
  output logic [CNT_W-1:0]              rec_dead,
  output logic [CNT_W-1:0]              rec_fi,
  output logic                          mon_drop
);

  localparam int unsigned LW = A_W - OFF_W;

  // decode: criticality of each load; only annotated loads use the predictor
  logic  [N_LSU-1:0]          lk_valid;
  logic  [N_LSU-1:0][LW-1:0]  lk_line;
  crit_e [N_LSU-1:0]          lk_level;

  always_comb begin
    for (int k = 0; k < N_LSU; k++) begin
      lk_level[k] = decode_annot(agen_annot[k]);
      lk_valid[k] = agen_valid[k] && lk_level[k] != CRIT_NONE;
      lk_line[k]  = agen_addr[k][A_W-1:OFF_W];
    end
  end

  logic  [N_LSU-1:0][TAG_W-1:0] pred_tag;
  crit_e [N_LSU-1:0]            pred_level;
  logic                         bf_set_valid, bf_clr_valid;
  logic  [LW-1:0]               bf_set_line, bf_clr_line;

  bf_predictor #(
    .LINE_W (LW),
    .P      (P),
    .TAG_W  (TAG_W),
    .N_PORTS(N_LSU)
  ) u_bf (
    .clk       (clk),
    .rst       (rst),
    .lk_valid  (lk_valid),
    .lk_line   (lk_line),
    .lk_tag    (agen_tag),
    .lk_level  (lk_level),
    .pred_valid(pred_valid),
    .pred_miss (pred_miss),
    .pred_tag  (pred_tag),
    .pred_level(pred_level),
    .set_valid (bf_set_valid),
    .set_line  (bf_set_line),
    .clr_valid (bf_clr_valid),
    .clr_line  (bf_clr_line)
  );

  l2_tag_dir #(
    .LINE_W(LW),
    .SETS  (L2_SETS),
    .WAYS  (L2_WAYS),
    .P     (P)
  ) u_l2 (
    .clk            (clk),
    .rst            (rst),
    .req_valid      (l2_req_valid),
    .req_line       (l2_req_addr[A_W-1:OFF_W]),
    .resp_valid     (l2_resp_valid),
    .resp_hit       (l2_resp_hit),
    .resp_evict     (l2_resp_evict),
    .resp_evict_line(l2_resp_evict_line),
    .bf_set_valid   (bf_set_valid),
    .bf_set_line    (bf_set_line),
    .bf_clr_valid   (bf_clr_valid),
    .bf_clr_line    (bf_clr_line)
  );

  halt_ctrl #(
    .TAG_W           (TAG_W),
    .N_ENTRIES       (N_HALT_ENTRIES),
    .N_LSU           (N_LSU),
    .N_DONE          (N_DONE),
    .HALF_HALT_CYCLES(HALF_HALT_CYCLES),
    .EN_LONG_LAT     (EN_LONG_LAT)
  ) u_halt (
    .clk         (clk),
    .rst         (rst),
    .arm_valid   (pred_valid & pred_miss),
    .arm_tag     (pred_tag),
    .arm_level   (pred_level),
    .l1_valid    (l1_valid),
    .l1_tag      (l1_tag),
    .ll_valid    (ll_valid),
    .ll_tag      (ll_tag),
    .ll_level    (decode_annot(ll_annot)),
    .done_valid  (done_valid),
    .done_tag    (done_tag),
    .squash_valid(squash_valid),
    .squash_tag  (squash_tag),
    .flush       (flush),
    .fetch_halt  (fetch_halt),
    .halt_start  (halt_start),
    .arm_drop    (halt_drop),
    .n_halting   (n_halting)
  );

  crit_profiler #(
    .TAG_W    (TAG_W),
    .PC_W     (PC_W),
    .SEQ_W    (SEQ_W),
    .CNT_W    (CNT_W),
    .ISSUE_W  (ISSUE_W),
    .N_DONE   (N_DONE),
    .N_SQ     (N_LSU),
    .N_ENTRIES(N_MON_ENTRIES)
  ) u_prof (
    .clk         (clk),
    .rst         (rst),
    .mon_valid   (mon_valid),
    .mon_tag     (mon_tag),
    .mon_pc      (mon_pc),
    .fetch_seq   (fetch_seq),
    .issue_valid (issue_valid),
    .issue_seq   (issue_seq),
    .done_valid  (done_valid),
    .done_tag    (done_tag),
    .squash_valid(squash_valid),
    .squash_tag  (squash_tag),
    .flush       (flush),
    .rec_valid   (rec_valid),
    .rec_pc      (rec_pc),
    .rec_dead    (rec_dead),
    .rec_fi      (rec_fi),
    .mon_drop    (mon_drop)
  );

endmodule
