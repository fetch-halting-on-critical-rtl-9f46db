// tb_occupancy: fetch halting on a synthetic memory-bound program.
//
// Two copies of a behavioural out-of-order core (core_model), each with
// its own fetch-halting unit at the default configuration, run the same
// synthetic program for 40,000 cycles: one with its critical loads
// annotated, one without (the baseline, which never halts). Every 512th
// instruction is a load that misses to memory and that the following
// instructions depend on. The test checks that halting lowers the
// average issue-queue and reorder-buffer occupancy while the committed
// instruction count stays within 5 % of the baseline, and that the
// baseline never halts.
module tb_occupancy;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  longint iq_h, rob_h, com_h, iq_b, rob_b, com_b;
  int     halts_h, halts_b;

  core_model #(.ANNOTATE(1'b1)) u_halt (.clk, .rst, .iq_sum(iq_h), .rob_sum(rob_h),
                                        .committed(com_h), .halts(halts_h));
  core_model #(.ANNOTATE(1'b0)) u_base (.clk, .rst, .iq_sum(iq_b), .rob_sum(rob_b),
                                        .committed(com_b), .halts(halts_b));

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int CYCLES = 40000;

  initial begin
    repeat (CYCLES + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real iqh, iqb, robh, robb, ipch, ipcb;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (CYCLES) @(posedge clk);
    #1;
    iqh = real'(iq_h) / CYCLES;  iqb = real'(iq_b) / CYCLES;
    robh = real'(rob_h) / CYCLES; robb = real'(rob_b) / CYCLES;
    ipch = real'(com_h) / CYCLES; ipcb = real'(com_b) / CYCLES;
    $display("baseline: IQ %0.1f ROB %0.1f IPC %0.3f halts %0d", iqb, robb, ipcb, halts_b);
    $display("halting : IQ %0.1f ROB %0.1f IPC %0.3f halts %0d", iqh, robh, ipch, halts_h);
    $display("relative: IQ %0.1f%% ROB %0.1f%% IPC %0.1f%%",
             100.0 * iqh / iqb, 100.0 * robh / robb, 100.0 * ipch / ipcb);
    check(halts_b == 0, "baseline never halts");
    check(halts_h > 10, "critical misses halt fetch");
    check(com_b > 1000, "baseline makes progress");
    check(iqh < 0.9 * iqb, "issue-queue occupancy reduced");
    check(robh < 0.9 * robb, "reorder-buffer occupancy reduced");
    check(ipch > 0.95 * ipcb, "IPC within 5 % of the baseline");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
