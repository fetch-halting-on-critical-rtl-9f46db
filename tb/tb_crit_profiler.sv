// tb_crit_profiler: self-checking test of the profiling counters.
//
// A random instruction stream is generated: each cycle the fetch unit
// fetches 0..32 instructions (fetch_seq advances), and up to 8 already
// fetched instructions issue, some from before and some from after the
// start of each monitored miss, with about one cycle in four issuing
// nothing. The sequence numbers start just below the 32-bit wrap point.
// Monitored misses start and complete (or are squashed) at random; the
// testbench recounts dead cycles and fetch-issue counts for each from the
// stimulus and compares them with the emitted records, in order. At most seven misses are
// active, so that finished entries waiting to be reported never fill
// the table. A final directed case fills the table and checks the drop flag.
module tb_crit_profiler;
  localparam int unsigned IW = 8;
  localparam int unsigned ND = 8;
  localparam int unsigned NS = 3;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic                   mon_valid;
  logic [7:0]             mon_tag;
  logic [31:0]            mon_pc;
  logic [31:0]            fetch_seq;
  logic [IW-1:0]          issue_valid;
  logic [IW-1:0][31:0]    issue_seq;
  logic [ND-1:0]          done_valid;
  logic [ND-1:0][7:0]     done_tag;
  logic [NS-1:0]          squash_valid;
  logic [NS-1:0][7:0]     squash_tag;
  logic                   flush;
  logic                   rec_valid;
  logic [31:0]            rec_pc;
  logic [15:0]            rec_dead, rec_fi;
  logic                   mon_drop;

  crit_profiler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  typedef struct {
    logic [7:0]  tag;
    logic [31:0] pc;
    logic [31:0] seq0;
    int          dead;
    int          fi;
  } mon_t;

  mon_t act[$];
  mon_t expq[$];
  int   n_rec = 0, n_squash = 0;

  // collect records
  always @(posedge clk) begin
    if (!rst && rec_valid) begin
      mon_t e;
      if (expq.size() == 0) check(1'b0, "unexpected record");
      else begin
        e = expq.pop_front();
        check(rec_pc == e.pc, "record pc");
        check(int'(rec_dead) == e.dead, $sformatf("dead cycles %0d, expected %0d", rec_dead, e.dead));
        check(int'(rec_fi) == e.fi, $sformatf("fetch-issue %0d, expected %0d", rec_fi, e.fi));
        n_rec++;
      end
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] next_tag;

  initial begin
    mon_valid = 1'b0; mon_tag = '0; mon_pc = '0; issue_valid = '0; issue_seq = '0;
    done_valid = '0; done_tag = '0; squash_valid = '0; squash_tag = '0; flush = 1'b0;
    fetch_seq = 32'hFFFF_F000;
    next_tag = 8'd1;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    for (int c = 0; c < 20000; c++) begin
      bit dead;
      int k;
      // stimulus for this cycle
      mon_valid = 1'b0; done_valid = '0; squash_valid = '0; issue_valid = '0;
      if (act.size() < 7 && $urandom_range(0, 19) == 0) begin
        mon_t m;
        mon_valid = 1'b1; mon_tag = next_tag; mon_pc = 32'h0040_0000 + 32'(next_tag) * 4;
        m.tag = next_tag; m.pc = mon_pc; m.seq0 = fetch_seq; m.dead = 0; m.fi = 0;
        act.push_back(m);
        // next tag: one not held by an active miss
        do begin
          bit used;
          next_tag++;
          used = 1'b0;
          foreach (act[a]) if (act[a].tag == next_tag) used = 1'b1;
          if (!used) break;
        end while (1'b1);
      end
      dead = ($urandom_range(0, 3) == 0);
      if (!dead) begin
        for (int i = 0; i < IW; i++) begin
          if ($urandom_range(0, 1) == 1) begin
            issue_valid[i] = 1'b1;
            issue_seq[i]   = fetch_seq - 32'($urandom_range(1, 400));
          end
        end
      end
      // one completion or squash per cycle at most, never of a miss started now
      if (act.size() > 1 && $urandom_range(0, 14) == 0) begin
        k = $urandom_range(0, act.size() - 2);
        if ($urandom_range(0, 9) == 0) begin
          squash_valid[1] = 1'b1; squash_tag[1] = act[k].tag;
        end else begin
          done_valid[3] = 1'b1; done_tag[3] = act[k].tag;
        end
      end else k = -1;
      // model: count this cycle for every active miss
      foreach (act[a]) begin
        if (issue_valid == '0) act[a].dead++;
        for (int i = 0; i < IW; i++)
          if (issue_valid[i] && (issue_seq[i] - act[a].seq0) < 32'h8000_0000) act[a].fi++;
      end
      if (k >= 0) begin
        if (done_valid[3]) expq.push_back(act[k]);
        else n_squash++;
        act.delete(k);
      end
      @(posedge clk); #1;
      if (mon_drop) check(1'b0, "no drop while the table has room");
      fetch_seq = fetch_seq + 32'($urandom_range(0, 32));
    end
    // let the remaining misses complete
    mon_valid = 1'b0; issue_valid = '0; squash_valid = '0;
    while (act.size() > 0) begin
      done_valid = '0; done_valid[0] = 1'b1; done_tag[0] = act[0].tag;
      foreach (act[a]) act[a].dead++;
      expq.push_back(act[0]);
      act.delete(0);
      @(posedge clk); #1;
    end
    done_valid = '0;
    repeat (12) @(posedge clk);
    #1;
    check(expq.size() == 0, "every completed miss was reported");
    check(n_rec > 50 && n_squash > 3, "enough records and squashes");

    // table full: nine starts, the ninth is dropped
    for (int i = 0; i < 9; i++) begin
      mon_valid = 1'b1; mon_tag = 8'(200 + i);
      @(posedge clk); #1;
      check(mon_drop == (i == 8), "drop only when the table is full");
    end
    mon_valid = 1'b0;
    flush = 1'b1; @(posedge clk); #1; flush = 1'b0;
    repeat (3) @(posedge clk);
    check(!rec_valid, "flushed misses are not reported");

    $display("records %0d squashes %0d", n_rec, n_squash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
