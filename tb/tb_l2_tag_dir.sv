// tb_l2_tag_dir: self-checking test of the L2 tag directory and its
// collision detector.
//
// The reference model keeps, per set, the resident lines in the order
// they were brought in: with no invalidations, filling invalid ways first
// and then replacing round-robin is the same as first-in-first-out.
// Directed cases fill one set, evict with and without a partial-address
// collision, and check the Bloom filter set/clear outputs; a random phase
// over a small address range (many hits, misses and collisions) compares
// every response with the model. Runs at the default geometry.
module tb_l2_tag_dir;
  import fh_pkg::*;

  localparam int unsigned LW    = LINE_W;
  localparam int unsigned SETS  = 512;
  localparam int unsigned WAYS  = 8;
  localparam int unsigned IDX_W = 9;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic          req_valid;
  logic [LW-1:0] req_line;
  logic          resp_valid, resp_hit, resp_evict;
  logic [LW-1:0] resp_evict_line;
  logic          bf_set_valid, bf_clr_valid;
  logic [LW-1:0] bf_set_line, bf_clr_line;

  l2_tag_dir dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s (line %h)", what, req_line);
    end
  endtask

  // reference model: per-set FIFO of resident lines
  logic [LW-1:0] fifo [SETS][$];

  int n_collide = 0;

  task automatic access(input logic [LW-1:0] line);
    int s;
    bit hit, evict, clr;
    logic [LW-1:0] victim;
    s = int'(line[IDX_W-1:0]);
    hit = 1'b0;
    foreach (fifo[s][i]) if (fifo[s][i] == line) hit = 1'b1;
    evict = 1'b0; clr = 1'b0; victim = '0;
    if (!hit) begin
      if (fifo[s].size() == WAYS) begin
        victim = fifo[s].pop_front();
        evict  = 1'b1;
        clr    = 1'b1;
        foreach (fifo[s][i]) if (fifo[s][i][BF_P-1:0] == victim[BF_P-1:0]) clr = 1'b0;
        if (line[BF_P-1:0] == victim[BF_P-1:0]) clr = 1'b0;
        if (!clr) n_collide++;
      end
      fifo[s].push_back(line);
    end
    req_valid = 1'b1; req_line = line;
    @(posedge clk); #1;
    req_valid = 1'b0;
    check(resp_valid, "response one cycle after request");
    check(resp_hit == hit, "hit/miss");
    check(resp_evict == evict, "eviction");
    if (evict) check(resp_evict_line == victim, "evicted line");
    check(bf_set_valid == !hit, "bloom set on miss");
    if (!hit) check(bf_set_line == line, "bloom set line");
    check(bf_clr_valid == clr, "bloom clear only without collision");
    if (clr) check(bf_clr_line == victim, "bloom clear line");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req_valid = 1'b0; req_line = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;
    check(!resp_valid && !bf_set_valid && !bf_clr_valid, "idle after reset");

    // fill set 7 with 8 lines of distinct partial addresses (tag bits 0..5)
    for (int w = 0; w < WAYS; w++) access({18'(w), 9'd7});
    for (int w = 0; w < WAYS; w++) access({18'(w), 9'd7});     // all hit
    // ninth line evicts the first; no collision -> clear
    access({18'h00020, 9'd7});
    check(bf_clr_valid && bf_clr_line == {18'd0, 9'd7}, "directed: victim cleared");
    // new line 0x40 has tag bits 0..5 equal to line 1 (the next victim):
    // that eviction must not clear
    access({18'h00041, 9'd7});
    check(resp_evict && !bf_clr_valid, "directed: collision with incoming line keeps bit");
    // put two lines with equal partial address in set 9, then evict one
    for (int w = 0; w < WAYS - 1; w++) access({18'(w), 9'd9});
    access({18'h00040, 9'd9});                  // same partial as way 0's line
    access({18'h00200, 9'd9});                  // evicts line 0 -> collision with 0x40
    check(resp_evict && resp_evict_line == {18'd0, 9'd9} && !bf_clr_valid,
          "directed: collision with another way keeps bit");

    // random phase: 4 sets, tag bits 1:0 (partial) and 8:6 (above the
    // partial address) random, so many resident lines share a partial
    for (int n = 0; n < 4000; n++) begin
      logic [17:0] t;
      t = '0;
      t[1:0] = 2'($urandom_range(0, 3));
      t[8:6] = 3'($urandom_range(0, 7));
      access({t, 9'($urandom_range(20, 23))});
    end
    check(n_collide > 10, "random phase produced collisions");
    $display("collisions seen: %0d", n_collide);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
