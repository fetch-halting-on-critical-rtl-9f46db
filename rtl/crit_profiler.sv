// crit_profiler: per-miss criticality counters for the profiling runs.
//
// While a profiled load's miss to main memory is outstanding, two
// statistics are gathered for it:
//   dead cycles       cycles in which no instruction issues at all;
//   fetch-issue count instructions fetched after the miss started that
//                     issue before it ends.
// A low fetch-issue count or a high dead-cycle count marks a load whose
// misses stall the machine. Software averages these per static load over
// a training run and writes the criticality annotation bits; that
// analysis is not hardware and is not part of this block.
//
// How it works: the fetch unit numbers instructions in fetch order
// (fetch_seq is the number the next fetched instruction will get, and
// each issue slot reports the number of the instruction it issues). When
// a miss starts, the entry records the current fetch_seq; an issued
// instruction counts for that miss when its number is not older than the
// recorded one (wrap-safe comparison). Up to N_ENTRIES misses are
// monitored at once; a start that finds the table full is dropped. When
// the load completes, one record (pc, dead cycles, fetch-issue count) is
// emitted on the next cycle; a squashed or flushed load emits nothing.
// Counters saturate at all ones. The statistics follow the document; the
// sequence-number method, table size, widths and saturation are this
// design's choices.
//
// Interface and timing: all inputs are sampled at the rising edge; the
// start cycle itself is counted. rec_* is registered; if two monitored
// loads complete in one cycle the lower-numbered entry is reported and
// the other is reported on a following cycle.
module crit_profiler #(
  parameter int unsigned TAG_W     = fh_pkg::ROB_TAG_W,
  parameter int unsigned PC_W      = 32,
  parameter int unsigned SEQ_W     = 32,
  parameter int unsigned CNT_W     = 16,
  parameter int unsigned ISSUE_W   = 8,
  parameter int unsigned N_DONE    = 8,
  parameter int unsigned N_SQ      = 3,
  parameter int unsigned N_ENTRIES = 8
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          mon_valid,     // profiled load misses to memory
  input  logic [TAG_W-1:0]              mon_tag,
  input  logic [PC_W-1:0]               mon_pc,
  input  logic [SEQ_W-1:0]              fetch_seq,
  input  logic [ISSUE_W-1:0]            issue_valid,
  input  logic [ISSUE_W-1:0][SEQ_W-1:0] issue_seq,
  input  logic [N_DONE-1:0]             done_valid,
  input  logic [N_DONE-1:0][TAG_W-1:0]  done_tag,
  input  logic [N_SQ-1:0]               squash_valid,
  input  logic [N_SQ-1:0][TAG_W-1:0]    squash_tag,
  input  logic                          flush,
  output logic                          rec_valid,
  output logic [PC_W-1:0]               rec_pc,
  output logic [CNT_W-1:0]              rec_dead,
  output logic [CNT_W-1:0]              rec_fi,
  output logic                          mon_drop
);

  typedef enum logic [1:0] {M_FREE, M_RUN, M_DONE} mst_e;

  typedef struct packed {
    mst_e             st;
    logic [TAG_W-1:0] tag;
    logic [PC_W-1:0]  pc;
    logic [SEQ_W-1:0] seq0;
    logic [CNT_W-1:0] dead;
    logic [CNT_W-1:0] fi;
  } ment_t;

  localparam int unsigned ADD_W = $clog2(ISSUE_W + 1);

  ment_t ent_q [N_ENTRIES];
  ment_t ent_d [N_ENTRIES];
  logic  rec_v_d;
  logic [PC_W-1:0]  rec_pc_d;
  logic [CNT_W-1:0] rec_dead_d, rec_fi_d;
  logic  drop_d;

  function automatic logic [CNT_W-1:0] sat_add(input logic [CNT_W-1:0] a,
                                               input logic [ADD_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + (CNT_W + 1)'(b);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_comb begin
    logic             dead_cyc;
    logic [ADD_W-1:0] n_fi;
    logic             done_hit;
    logic             sq_hit;
    logic             placed;
    logic             reported;
    logic [SEQ_W-1:0] diff;

    dead_cyc   = (issue_valid == '0);
    n_fi       = '0;
    diff       = '0;
    done_hit   = 1'b0;
    sq_hit     = 1'b0;
    placed     = 1'b0;
    rec_v_d    = 1'b0;
    rec_pc_d   = '0;
    rec_dead_d = '0;
    rec_fi_d   = '0;
    drop_d     = 1'b0;
    reported   = 1'b0;

    for (int e = 0; e < N_ENTRIES; e++) begin
      ent_d[e] = ent_q[e];
      // report one finished entry per cycle
      if (ent_q[e].st == M_DONE && !reported) begin
        reported   = 1'b1;
        rec_v_d    = 1'b1;
        rec_pc_d   = ent_q[e].pc;
        rec_dead_d = ent_q[e].dead;
        rec_fi_d   = ent_q[e].fi;
        ent_d[e].st = M_FREE;
      end
      if (ent_q[e].st == M_RUN) begin
        n_fi = '0;
        for (int i = 0; i < ISSUE_W; i++) begin
          diff = issue_seq[i] - ent_q[e].seq0;
          if (issue_valid[i] && !diff[SEQ_W-1]) n_fi = n_fi + 1'b1;
        end
        ent_d[e].fi = sat_add(ent_q[e].fi, n_fi);
        if (dead_cyc) ent_d[e].dead = sat_add(ent_q[e].dead, ADD_W'(1));
        done_hit = 1'b0;
        sq_hit   = 1'b0;
        for (int i = 0; i < N_DONE; i++)
          if (done_valid[i] && done_tag[i] == ent_q[e].tag) done_hit = 1'b1;
        for (int i = 0; i < N_SQ; i++)
          if (squash_valid[i] && squash_tag[i] == ent_q[e].tag) sq_hit = 1'b1;
        if (flush || sq_hit) ent_d[e].st = M_FREE;
        else if (done_hit)   ent_d[e].st = M_DONE;
      end
    end

    if (mon_valid && !flush) begin
      placed = 1'b0;
      for (int e = 0; e < N_ENTRIES; e++) begin
        if (!placed && ent_q[e].st == M_FREE) begin
          placed        = 1'b1;
          ent_d[e].st   = M_RUN;
          ent_d[e].tag  = mon_tag;
          ent_d[e].pc   = mon_pc;
          ent_d[e].seq0 = fetch_seq;
          ent_d[e].dead = dead_cyc ? CNT_W'(1) : '0;
          n_fi = '0;
          for (int i = 0; i < ISSUE_W; i++) begin
            diff = issue_seq[i] - fetch_seq;
            if (issue_valid[i] && !diff[SEQ_W-1]) n_fi = n_fi + 1'b1;
          end
          ent_d[e].fi = CNT_W'(n_fi);
        end
      end
      if (!placed) drop_d = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < N_ENTRIES; e++) ent_q[e] <= '0;
      rec_valid <= 1'b0;
      rec_pc    <= '0;
      rec_dead  <= '0;
      rec_fi    <= '0;
      mon_drop  <= 1'b0;
    end else begin
      for (int e = 0; e < N_ENTRIES; e++) ent_q[e] <= ent_d[e];
      rec_valid <= rec_v_d;
      rec_pc    <= rec_pc_d;
      rec_dead  <= rec_dead_d;
      rec_fi    <= rec_fi_d;
      mon_drop  <= drop_d;
    end
  end

endmodule
