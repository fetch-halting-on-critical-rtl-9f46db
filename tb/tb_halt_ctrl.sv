// tb_halt_ctrl: self-checking test of the fetch-halt controller.
//
// Two instances share the inputs: one at the default configuration
// (loads only, 8 entries, 103-cycle half-critical halt) and one with the
// long-latency arithmetic extension enabled. Directed cases check the
// cycle on which fetch_halt rises (the cycle after the L1 access starts)
// and falls (the cycle after completion, squash or flush), the exact
// length of a half-critical halt, that non-critical and already
// completed loads never halt, overlapping halts, the full-table drop and
// the arithmetic extension.
module tb_halt_ctrl;
  import fh_pkg::*;

  localparam int unsigned NL = 3;
  localparam int unsigned ND = 8;
  localparam int unsigned HALF = 103;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  [NL-1:0]          arm_valid;
  logic  [NL-1:0][7:0]     arm_tag;
  crit_e [NL-1:0]          arm_level;
  logic  [NL-1:0]          l1_valid;
  logic  [NL-1:0][7:0]     l1_tag;
  logic                    ll_valid;
  logic  [7:0]             ll_tag;
  crit_e                   ll_level;
  logic  [ND-1:0]          done_valid;
  logic  [ND-1:0][7:0]     done_tag;
  logic  [NL-1:0]          squash_valid;
  logic  [NL-1:0][7:0]     squash_tag;
  logic                    flush;
  logic                    fetch_halt, halt_start, arm_drop;
  logic  [3:0]             n_halting;
  logic                    fetch_halt2, halt_start2, arm_drop2;
  logic  [3:0]             n_halting2;

  halt_ctrl dut (.*);

  halt_ctrl #(.EN_LONG_LAT(1'b1)) dut_ll (
    .clk, .rst, .arm_valid, .arm_tag, .arm_level, .l1_valid, .l1_tag,
    .ll_valid, .ll_tag, .ll_level, .done_valid, .done_tag,
    .squash_valid, .squash_tag, .flush,
    .fetch_halt(fetch_halt2), .halt_start(halt_start2),
    .arm_drop(arm_drop2), .n_halting(n_halting2));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic clear_in();
    arm_valid = '0; l1_valid = '0; ll_valid = 1'b0; done_valid = '0;
    squash_valid = '0; flush = 1'b0;
  endtask

  // advance one clock and remove all one-cycle requests
  task automatic cyc();
    @(posedge clk); #1;
    clear_in();
  endtask

  task automatic arm(input int p, input logic [7:0] t, input crit_e l);
    arm_valid[p] = 1'b1; arm_tag[p] = t; arm_level[p] = l;
  endtask
  task automatic l1(input int p, input logic [7:0] t);
    l1_valid[p] = 1'b1; l1_tag[p] = t;
  endtask
  task automatic done(input int p, input logic [7:0] t);
    done_valid[p] = 1'b1; done_tag[p] = t;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;

  initial begin
    clear_in();
    arm_tag = '0; arm_level = '{CRIT_NONE, CRIT_NONE, CRIT_NONE}; l1_tag = '0;
    ll_tag = '0; ll_level = CRIT_NONE; done_tag = '0; squash_tag = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    check(!fetch_halt && n_halting == 0, "no halt after reset");

    // 1. critical load: arm, then L1 access, halt until completion
    arm(0, 8'd5, CRIT_FULL); cyc();
    check(!fetch_halt, "armed load does not halt before its L1 access");
    cyc();
    check(!fetch_halt, "still armed");
    l1(1, 8'd5);
    check(!fetch_halt, "no halt in the cycle of the L1 access");
    cyc();
    check(fetch_halt && halt_start && n_halting == 1, "halt from the next cycle");
    for (int i = 0; i < 200; i++) begin
      cyc();
      check(fetch_halt && !halt_start, "critical halt held until completion");
    end
    done(4, 8'd5);
    check(fetch_halt, "halt held in the completion cycle");
    cyc();
    check(!fetch_halt && n_halting == 0, "fetch resumes after completion");

    // 2. half-critical load, arm and L1 access in the same cycle
    arm(2, 8'd6, CRIT_HALF); l1(0, 8'd6); cyc();
    n = 0;
    while (fetch_halt && n < 1000) begin
      n++;
      cyc();
    end
    check(n == HALF, $sformatf("half-critical halt lasts %0d cycles (got %0d)", HALF, n));
    for (int i = 0; i < 20; i++) begin
      cyc();
      check(!fetch_halt, "released half-critical load does not halt again");
    end
    done(0, 8'd6); cyc();
    check(!fetch_halt, "completion of released half-critical load");

    // 3. non-critical request is ignored
    arm(0, 8'd7, CRIT_NONE); l1(0, 8'd7); cyc(); cyc();
    check(!fetch_halt, "non-critical load never halts");

    // 4. load completes before its L1 access is reported: no halt
    arm(1, 8'd9, CRIT_FULL); cyc();
    done(7, 8'd9); cyc();
    l1(2, 8'd9); cyc();
    check(!fetch_halt, "completed load does not halt");

    // 5. squash of a wrong-path load
    arm(0, 8'd10, CRIT_FULL); l1(0, 8'd10); cyc();
    check(fetch_halt, "second halt");
    cyc(); cyc();
    squash_valid[2] = 1'b1; squash_tag[2] = 8'd10; cyc();
    check(!fetch_halt, "squash releases fetch");

    // 6. overlapping halts: both must end
    arm(0, 8'd11, CRIT_FULL); arm(1, 8'd12, CRIT_FULL); l1(0, 8'd11); cyc();
    check(fetch_halt && n_halting == 1, "first of two halts");
    l1(2, 8'd12); cyc();
    check(fetch_halt && n_halting == 2, "two halting loads");
    done(0, 8'd11); cyc();
    check(fetch_halt && n_halting == 1, "still halted by the second load");
    done(3, 8'd12); cyc();
    check(!fetch_halt, "released after both loads");

    // 7. flush releases everything
    arm(0, 8'd13, CRIT_FULL); arm(1, 8'd14, CRIT_HALF); l1(0, 8'd13); l1(1, 8'd14); cyc();
    check(fetch_halt && n_halting == 2, "two halts before flush");
    flush = 1'b1; cyc();
    check(!fetch_halt && n_halting == 0, "flush releases fetch");

    // 8. table full: nine armed loads, the ninth is dropped
    for (int i = 0; i < 3; i++) begin
      for (int p = 0; p < 3; p++) arm(p, 8'(20 + 3 * i + p), CRIT_FULL);
      cyc();
      check(arm_drop == (i == 2), "drop only when the table is full");
    end
    l1(0, 8'd28); cyc();
    check(!fetch_halt, "dropped load does not halt");
    l1(0, 8'd27); cyc();
    check(fetch_halt, "load held in the table halts");
    flush = 1'b1; cyc();

    // 9. long-latency arithmetic: only the extended instance reacts
    ll_valid = 1'b1; ll_tag = 8'd40; ll_level = CRIT_FULL;
    check(!fetch_halt2, "no arithmetic halt in the issue cycle");
    cyc();
    check(!fetch_halt && fetch_halt2, "arithmetic halt only with the extension");
    cyc();
    done(1, 8'd40); cyc();
    check(!fetch_halt2, "arithmetic halt ends at completion");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
