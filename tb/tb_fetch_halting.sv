// tb_fetch_halting: end-to-end test of the fetch-halting unit at its
// default configuration (32 kbit filter, 128 kB 8-way L2 directory,
// 8-entry halt table, 103-cycle half-critical halt).
//
// The testbench plays a simple in-order stream of loads through the
// unit: address generation, L1 access on the next cycle, an L2 access on
// the cycle after (every load misses the L1 here), and completion after
// 20 cycles on an L2 hit or 206 cycles on a miss to memory. It keeps its
// own picture of the L2 contents (first-in-first-out per set) and from it
// derives what the filter must predict: a line is predicted present
// exactly when some resident line shares its low 15 address bits. A
// small fetch model advances the fetch sequence number only while
// fetch_halt is low, and issues one instruction every other cycle; the
// testbench recounts the profiling statistics from that activity.
//
// Each mechanism is counted and must occur at least once: full halt,
// half-critical halt ended by its timer, predicted hit with no halt,
// non-critical load with no predictor access, squash ending a halt,
// eviction clearing a filter bit, collision keeping a bit, aliasing,
// halt-table overflow, flush, and profiling records.
module tb_fetch_halting;
  import fh_pkg::*;

  localparam int unsigned NL = 3, ND = 8, IW = 8;
  localparam int HIT_LAT  = 20;
  localparam int MISS_LAT = 206;
  localparam int HALF     = 103;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [NL-1:0]          agen_valid;
  logic [NL-1:0][7:0]     agen_tag;
  logic [NL-1:0][31:0]    agen_addr;
  logic [NL-1:0][1:0]     agen_annot;
  logic [NL-1:0]          l1_valid;
  logic [NL-1:0][7:0]     l1_tag;
  logic                   ll_valid;
  logic [7:0]             ll_tag;
  logic [1:0]             ll_annot;
  logic [ND-1:0]          done_valid;
  logic [ND-1:0][7:0]     done_tag;
  logic [NL-1:0]          squash_valid;
  logic [NL-1:0][7:0]     squash_tag;
  logic                   flush;
  logic                   fetch_halt, halt_start, halt_drop;
  logic [3:0]             n_halting;
  logic [NL-1:0]          pred_valid, pred_miss;
  logic                   l2_req_valid;
  logic [31:0]            l2_req_addr;
  logic                   l2_resp_valid, l2_resp_hit, l2_resp_evict;
  logic [26:0]            l2_resp_evict_line;
  logic                   mon_valid;
  logic [7:0]             mon_tag;
  logic [31:0]            mon_pc;
  logic [31:0]            fetch_seq;
  logic [IW-1:0]          issue_valid;
  logic [IW-1:0][31:0]    issue_seq;
  logic                   rec_valid;
  logic [31:0]            rec_pc;
  logic [15:0]            rec_dead, rec_fi;
  logic                   mon_drop;

  fetch_halting dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // mechanism counters
  int m_full, m_half, m_pred_hit, m_noncrit, m_squash, m_clear, m_collide;
  int m_alias, m_drop, m_flush, m_record;

  // ---------------- L2 picture ----------------
  logic [26:0] l2fifo [512][$];

  function automatic bit resident(input logic [26:0] line);
    int s = int'(line[8:0]);
    foreach (l2fifo[s][i]) if (l2fifo[s][i] == line) return 1'b1;
    return 1'b0;
  endfunction

  function automatic bit partial_present(input logic [26:0] line);
    int s = int'(line[8:0]);
    foreach (l2fifo[s][i]) if (l2fifo[s][i][14:0] == line[14:0]) return 1'b1;
    return 1'b0;
  endfunction

  // ---------------- fetch / issue model ----------------
  // fetch_seq advances by 4 per cycle unless fetch is halted; every other
  // cycle the most recently fetched instruction issues.
  bit odd;
  always @(posedge clk) begin
    if (rst) begin
      fetch_seq <= 32'd1000;
      odd       <= 1'b0;
    end else begin
      if (!fetch_halt) fetch_seq <= fetch_seq + 32'd4;
      odd <= ~odd;
    end
  end
  always_comb begin
    issue_valid    = '0;
    issue_seq      = '0;
    issue_valid[0] = odd;
    issue_seq[0]   = fetch_seq - 32'd1;
  end

  // expected profiling records
  typedef struct { logic [31:0] pc; int dead; int fi; } rec_t;
  rec_t expq[$];
  bit          mon_on;
  logic [31:0] mon_seq0;
  int          mon_dead, mon_fi;

  always @(posedge clk) begin
    if (!rst && rec_valid) begin
      if (expq.size() == 0) check(1'b0, "unexpected profiling record");
      else begin
        rec_t e;
        e = expq.pop_front();
        check(rec_pc == e.pc && int'(rec_dead) == e.dead && int'(rec_fi) == e.fi,
              $sformatf("profiling record pc %h dead %0d fi %0d, expected %h %0d %0d",
                        rec_pc, rec_dead, rec_fi, e.pc, e.dead, e.fi));
        m_record++;
      end
    end
  end

  task automatic clear_in();
    agen_valid = '0; l1_valid = '0; ll_valid = 1'b0; done_valid = '0;
    squash_valid = '0; flush = 1'b0; l2_req_valid = 1'b0; mon_valid = 1'b0;
  endtask

  // one clock; accumulates the monitored miss's statistics for this cycle
  task automatic cyc();
    if (mon_on) begin
      if (issue_valid == '0) mon_dead++;
      if (issue_valid[0] && (issue_seq[0] - mon_seq0) < 32'h8000_0000) mon_fi++;
    end
    @(posedge clk); #1;
    clear_in();
  endtask

  // an L2 access outside any load (warm-up, filling a set)
  task automatic l2_access(input logic [26:0] line);
    bit hit;
    int s;
    logic [26:0] victim;
    s = int'(line[8:0]);
    hit = resident(line);
    l2_req_valid = 1'b1; l2_req_addr = {line, 5'b0};
    if (!hit) begin
      if (l2fifo[s].size() == 8) begin
        victim = l2fifo[s].pop_front();
        if (partial_present(victim) || line[14:0] == victim[14:0]) m_collide++;
        else m_clear++;
      end
      l2fifo[s].push_back(line);
    end
    cyc();
    check(l2_resp_valid && l2_resp_hit == hit, "L2 directory hit/miss");
  endtask

  // one load through the whole flow
  //   annot: 0 none, 1 half, 2 critical; squash_at: cycle after the L1
  //   access at which the load is squashed (0: it completes)
  task automatic load_op(input logic [7:0] tag, input logic [26:0] line,
                         input logic [1:0] annot, input int squash_at,
                         output bit predicted_miss);
    bit exp_pm, hit;
    int lat, end_c, halted, exp_halt, c;
    exp_pm = !partial_present(line);
    hit    = resident(line);
    lat    = hit ? HIT_LAT : MISS_LAT;
    end_c  = (squash_at > 0) ? squash_at : lat;
    if (annot == 2'd0)      exp_halt = 0;
    else if (!exp_pm)       exp_halt = 0;
    else if (annot == 2'd2) exp_halt = end_c;
    else                    exp_halt = (end_c < HALF) ? end_c : HALF;

    // address generation
    agen_valid[0] = 1'b1; agen_tag[0] = tag; agen_addr[0] = {line, 5'h04}; agen_annot[0] = annot;
    cyc();
    // L1 access; the prediction is visible now
    check(pred_valid[0] == (annot != 2'd0), "only annotated loads access the predictor");
    if (annot != 2'd0) check(pred_miss[0] == exp_pm, "miss prediction matches the L2 contents");
    predicted_miss = pred_miss[0];
    if (annot == 2'd0 && !pred_valid[0]) m_noncrit++;
    if (annot != 2'd0 && !exp_pm) m_pred_hit++;
    if (annot != 2'd0 && !exp_pm && !hit) m_alias++;
    l1_valid[1] = 1'b1; l1_tag[1] = tag;
    check(!fetch_halt, "no halt in the L1 access cycle");
    cyc();
    halted = 0;
    for (c = 1; c <= end_c + 2; c++) begin
      // c counts cycles after the L1 access
      if (fetch_halt) halted++;
      if (c == 1) begin
        l2_req_valid = 1'b1; l2_req_addr = {line, 5'b0};
      end
      if (c == 2) begin
        check(l2_resp_valid && l2_resp_hit == hit, "load's L2 access hit/miss");
        if (!hit && squash_at == 0) begin
          mon_valid = 1'b1; mon_tag = tag; mon_pc = 32'h0001_0000 + 32'(tag);
          mon_on = 1'b1; mon_seq0 = fetch_seq; mon_dead = 0; mon_fi = 0;
        end
      end
      if (c == end_c) begin
        if (squash_at > 0) begin
          squash_valid[2] = 1'b1; squash_tag[2] = tag;
        end else begin
          done_valid[5] = 1'b1; done_tag[5] = tag;
        end
      end
      cyc();
      if (c == end_c && mon_on) begin
        rec_t r;
        r.pc = 32'h0001_0000 + 32'(tag); r.dead = mon_dead; r.fi = mon_fi;
        mon_on = 1'b0;
        expq.push_back(r);
      end
      if (c == 1 && !hit) begin
        // model the L2 allocation done by the L2 access of this load
        int s = int'(line[8:0]);
        if (l2fifo[s].size() == 8) begin
          logic [26:0] v = l2fifo[s].pop_front();
          if (partial_present(v) || line[14:0] == v[14:0]) m_collide++;
          else m_clear++;
        end
        l2fifo[s].push_back(line);
      end
    end
    check(halted == exp_halt,
          $sformatf("tag %0d halted %0d cycles, expected %0d", tag, halted, exp_halt));
    check(!fetch_halt, "fetch running after the load");
    if (exp_halt > 0 && annot == 2'd2 && squash_at == 0) m_full++;
    if (exp_halt == HALF && annot == 2'd1) m_half++;
    if (exp_halt > 0 && squash_at > 0) m_squash++;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [26:0] X, X2, Y, Z, W;
  bit pm;

  initial begin
    clear_in();
    agen_tag = '0; agen_addr = '0; agen_annot = '0; l1_tag = '0; ll_tag = '0; ll_annot = '0;
    done_tag = '0; squash_tag = '0; l2_req_addr = '0; mon_tag = '0; mon_pc = '0;
    mon_on = 1'b0;
    m_full = 0; m_half = 0; m_pred_hit = 0; m_noncrit = 0; m_squash = 0; m_clear = 0;
    m_collide = 0; m_alias = 0; m_drop = 0; m_flush = 0; m_record = 0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    X  = {18'h00011, 9'd33};
    X2 = {18'h10011, 9'd33};     // same low 15 bits as X
    Y  = {18'h00022, 9'd34};
    Z  = {18'h00023, 9'd35};
    W  = {18'h00024, 9'd36};

    // warm-up: a few resident lines
    for (int i = 0; i < 4; i++) l2_access({18'(i + 1), 9'd40});

    load_op(8'd1, X, 2'd2, 0, pm);              // critical, miss predicted: full halt
    load_op(8'd2, X, 2'd2, 0, pm);              // now resident: predicted hit
    load_op(8'd3, Y, 2'd0, 0, pm);              // non-critical: no lookup, no halt
    load_op(8'd4, Z, 2'd1, 0, pm);              // half-critical: timer ends the halt
    load_op(8'd5, W, 2'd2, 60, pm);             // squashed after 60 cycles
    load_op(8'd6, X2, 2'd2, 0, pm);             // aliases X: predicted hit, misses in L2
    // set 33 now holds X and X2 (same partial); fill it so that X is evicted
    for (int i = 0; i < 6; i++) l2_access({18'(i + 32'h100), 9'd33});
    l2_access({18'h00200, 9'd33});              // evicts X: collision with X2 keeps the bit
    load_op(8'd7, X, 2'd2, 0, pm);              // absent, but still predicted present
    // its allocation evicted X2 (X shares the bit); eight more lines evict
    // X last, with no other line sharing its partial address: bit cleared
    for (int i = 0; i < 8; i++) l2_access({18'(i + 32'h300), 9'd33});
    cyc();                                      // the filter is updated two cycles after the access
    load_op(8'd8, X2, 2'd2, 0, pm);             // predicted miss again
    check(pm, "cleared bit predicts a miss");

    // overflow of the halt table: nine critical loads predicted to miss
    for (int i = 0; i < 3; i++) begin
      for (int p = 0; p < 3; p++) begin
        agen_valid[p] = 1'b1; agen_tag[p] = 8'(100 + 3 * i + p);
        agen_addr[p] = {18'h3f000 + 18'(3 * i + p), 9'd100, 5'b0}; agen_annot[p] = 2'd2;
      end
      cyc();
    end
    // the ninth request was dropped in the cycle of its prediction
    cyc();
    if (halt_drop) m_drop++;
    check(halt_drop, "halt table overflow reported");
    l1_valid[0] = 1'b1; l1_tag[0] = 8'd100; cyc();
    check(fetch_halt, "a tracked load halts");
    flush = 1'b1; cyc();
    check(!fetch_halt && n_halting == 0, "flush releases fetch");
    if (!fetch_halt) m_flush++;
    repeat (4) cyc();

    check(expq.size() == 0, "all profiling records seen");
    check(m_full > 0,     "mechanism: full halt");
    check(m_half > 0,     "mechanism: half-critical halt");
    check(m_pred_hit > 0, "mechanism: predicted hit");
    check(m_noncrit > 0,  "mechanism: non-critical load");
    check(m_squash > 0,   "mechanism: squash");
    check(m_clear > 0,    "mechanism: filter bit cleared on eviction");
    check(m_collide > 0,  "mechanism: collision keeps the bit");
    check(m_alias > 0,    "mechanism: aliasing prediction");
    check(m_drop > 0,     "mechanism: halt table overflow");
    check(m_flush > 0,    "mechanism: flush");
    check(m_record > 0,   "mechanism: profiling record");
    $display("full %0d half %0d pred_hit %0d noncrit %0d squash %0d clear %0d collide %0d alias %0d drop %0d flush %0d records %0d",
             m_full, m_half, m_pred_hit, m_noncrit, m_squash, m_clear, m_collide, m_alias,
             m_drop, m_flush, m_record);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
