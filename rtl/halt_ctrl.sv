// halt_ctrl: fetch-halt controller.
//
// Keeps a small table of the instructions that are allowed to halt the
// fetch unit. A load enters the table ("armed") when it is annotated
// critical or half-critical and the L2 miss predictor has predicted that
// it will miss to main memory. When an armed load starts its L1 access
// the entry starts halting, and fetch_halt is raised from the next cycle.
// A critical load halts fetch until it completes (write-back) or is
// squashed as a wrong-path instruction. A half-critical load halts for
// only half of that time: since the end of the miss is not known when
// the halt starts, half the time is taken as a fixed HALF_HALT_CYCLES
// count, after which the entry stops halting and waits for completion.
// fetch_halt is the OR of all halting entries, so overlapping misses keep
// fetch halted until the last one ends.
//
// Following the document: criticality levels, predictor and annotation
// both required, halt from the cycle after the L1 access starts, release
// on completion or squash. This design's own choices: the table size
// (N_ENTRIES), dropping a request when the table is full, the fixed
// half-critical duration (103 cycles, half of 20 L2 + 180 first-chunk +
// 3 x 2 further-chunk memory cycles of the evaluated machine), and the
// port counts (N_LSU load/store units, N_DONE completion ports).
//
// The long-latency arithmetic extension (EN_LONG_LAT = 1, off by default)
// lets an annotated arithmetic operation of four or more cycles latency
// halt fetch from the cycle after it issues until it completes.
//
// Interface and timing (all inputs sampled at the rising edge):
//   arm_valid[k]/arm_tag/arm_level   predicted-miss annotated load (k-th
//                                    predictor port); level NONE is ignored
//   l1_valid[k]/l1_tag               load k starts its L1 access; may be the
//                                    same cycle as its arm request
//   ll_valid/ll_tag/ll_level         long-latency arithmetic op issues
//   done_valid[k]/done_tag           instruction completes (write-back)
//   squash_valid[k]/squash_tag       wrong-path instruction squashed
//   flush                            squash everything in flight
//   fetch_halt                       registered: high while any entry halts
//   halt_start                       one-cycle pulse when an entry starts halting
//   arm_drop                         a request found the table full
module halt_ctrl
  import fh_pkg::*;
#(
  parameter int unsigned TAG_W            = ROB_TAG_W,
  parameter int unsigned N_ENTRIES        = 8,
  parameter int unsigned N_LSU            = 3,
  parameter int unsigned N_DONE           = 8,
  parameter int unsigned HALF_HALT_CYCLES = 103,
  parameter bit          EN_LONG_LAT      = 1'b0
) (
  input  logic                         clk,
  input  logic                         rst,
  input  logic [N_LSU-1:0]             arm_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]  arm_tag,
  input  crit_e [N_LSU-1:0]            arm_level,
  input  logic [N_LSU-1:0]             l1_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]  l1_tag,
  input  logic                         ll_valid,
  input  logic [TAG_W-1:0]             ll_tag,
  input  crit_e                        ll_level,
  input  logic [N_DONE-1:0]            done_valid,
  input  logic [N_DONE-1:0][TAG_W-1:0] done_tag,
  input  logic [N_LSU-1:0]             squash_valid,
  input  logic [N_LSU-1:0][TAG_W-1:0]  squash_tag,
  input  logic                         flush,
  output logic                         fetch_halt,
  output logic                         halt_start,
  output logic                         arm_drop,
  output logic [$clog2(N_ENTRIES+1)-1:0] n_halting
);

  localparam int unsigned TMR_W = (HALF_HALT_CYCLES > 1) ? $clog2(HALF_HALT_CYCLES) : 1;

  typedef enum logic [1:0] {E_FREE, E_ARMED, E_HALT, E_WAIT} est_e;

  typedef struct packed {
    est_e             st;
    logic [TAG_W-1:0] tag;
    logic             half;
    logic [TMR_W-1:0] tmr;
  } ent_t;

  ent_t ent_q [N_ENTRIES];
  ent_t ent_d [N_ENTRIES];
  logic start_d, drop_d;

  function automatic logic tag_in(input logic [TAG_W-1:0] t,
                                  input logic [N_DONE-1:0] dv,
                                  input logic [N_DONE-1:0][TAG_W-1:0] dt,
                                  input logic [N_LSU-1:0] sv,
                                  input logic [N_LSU-1:0][TAG_W-1:0] st);
    logic r;
    r = 1'b0;
    for (int i = 0; i < N_DONE; i++) if (dv[i] && dt[i] == t) r = 1'b1;
    for (int i = 0; i < N_LSU; i++)  if (sv[i] && st[i] == t) r = 1'b1;
    return r;
  endfunction

  function automatic logic l1_match(input logic [TAG_W-1:0] t,
                                    input logic [N_LSU-1:0] v,
                                    input logic [N_LSU-1:0][TAG_W-1:0] lt);
    logic r;
    r = 1'b0;
    for (int i = 0; i < N_LSU; i++) if (v[i] && lt[i] == t) r = 1'b1;
    return r;
  endfunction

  always_comb begin
    logic [N_ENTRIES-1:0] taken;
    logic                 rq_v;
    logic [TAG_W-1:0]     rq_tag;
    crit_e                rq_lvl;
    logic                 rq_now;
    logic                 placed;

    start_d = 1'b0;
    drop_d  = 1'b0;
    taken   = '0;
    rq_v    = 1'b0;
    rq_tag  = '0;
    rq_lvl  = CRIT_NONE;
    rq_now  = 1'b0;
    placed  = 1'b0;

    // entries already in the table
    for (int e = 0; e < N_ENTRIES; e++) begin
      ent_d[e] = ent_q[e];
      unique case (ent_q[e].st)
        E_ARMED: begin
          if (l1_match(ent_q[e].tag, l1_valid, l1_tag)) begin
            ent_d[e].st  = E_HALT;
            ent_d[e].tmr = TMR_W'(HALF_HALT_CYCLES - 1);
            start_d      = 1'b1;
          end
        end
        E_HALT: begin
          if (ent_q[e].half) begin
            if (ent_q[e].tmr == '0) ent_d[e].st = E_WAIT;
            else                    ent_d[e].tmr = ent_q[e].tmr - 1'b1;
          end
        end
        default: ;
      endcase
      if (ent_q[e].st != E_FREE &&
          (flush || tag_in(ent_q[e].tag, done_valid, done_tag, squash_valid, squash_tag)))
        ent_d[e].st = E_FREE;
    end

    // new requests: N_LSU predictor ports, then the arithmetic port
    for (int k = 0; k <= N_LSU; k++) begin
      if (k < N_LSU) begin
        rq_v   = arm_valid[k] && arm_level[k] != CRIT_NONE;
        rq_tag = arm_tag[k];
        rq_lvl = arm_level[k];
        rq_now = l1_match(arm_tag[k], l1_valid, l1_tag);
      end else begin
        rq_v   = EN_LONG_LAT && ll_valid && ll_level != CRIT_NONE;
        rq_tag = ll_tag;
        rq_lvl = ll_level;
        rq_now = 1'b1;
      end
      if (rq_v && !flush && !tag_in(rq_tag, done_valid, done_tag, squash_valid, squash_tag)) begin
        placed = 1'b0;
        for (int e = 0; e < N_ENTRIES; e++) begin
          if (!placed && ent_q[e].st == E_FREE && !taken[e]) begin
            placed       = 1'b1;
            taken[e]     = 1'b1;
            ent_d[e].st  = rq_now ? E_HALT : E_ARMED;
            ent_d[e].tag = rq_tag;
            ent_d[e].half = (rq_lvl == CRIT_HALF);
            ent_d[e].tmr = TMR_W'(HALF_HALT_CYCLES - 1);
            if (rq_now) start_d = 1'b1;
          end
        end
        if (!placed) drop_d = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int e = 0; e < N_ENTRIES; e++) ent_q[e] <= '{st: E_FREE, tag: '0, half: 1'b0, tmr: '0};
      halt_start <= 1'b0;
      arm_drop   <= 1'b0;
    end else begin
      for (int e = 0; e < N_ENTRIES; e++) ent_q[e] <= ent_d[e];
      halt_start <= start_d;
      arm_drop   <= drop_d;
    end
  end

  always_comb begin
    fetch_halt = 1'b0;
    n_halting  = '0;
    for (int e = 0; e < N_ENTRIES; e++) begin
      if (ent_q[e].st == E_HALT) begin
        fetch_halt = 1'b1;
        n_halting  = n_halting + 1'b1;
      end
    end
  end

  // An instruction tag may be in the table only once.
  for (genvar k = 0; k < N_LSU; k++) begin : g_chk
    always_ff @(posedge clk) begin
      if (!rst && arm_valid[k] && arm_level[k] != CRIT_NONE) begin
        for (int e = 0; e < N_ENTRIES; e++)
          assert (!(ent_q[e].st != E_FREE && ent_q[e].tag == arm_tag[k]))
            else $error("halt_ctrl: tag %0d armed twice", arm_tag[k]);
      end
    end
  end

endmodule
