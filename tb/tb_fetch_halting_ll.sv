// tb_fetch_halting_ll: the long-latency arithmetic extension, end to end.
//
// Instantiates the fetch-halting unit with EN_LONG_LAT = 1 and checks
// that an annotated arithmetic operation halts fetch from the cycle after
// it issues until the cycle after it completes, that a half-critical one
// halts for HALF_HALT_CYCLES (shortened to 12 here), that a
// non-annotated one never halts, and that a squash ends the halt. A load
// halt overlapping an arithmetic halt keeps fetch halted until both end.
module tb_fetch_halting_ll;
  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic [2:0]          agen_valid;
  logic [2:0][7:0]     agen_tag;
  logic [2:0][31:0]    agen_addr;
  logic [2:0][1:0]     agen_annot;
  logic [2:0]          l1_valid;
  logic [2:0][7:0]     l1_tag;
  logic                ll_valid;
  logic [7:0]          ll_tag;
  logic [1:0]          ll_annot;
  logic [7:0]          done_valid;
  logic [7:0][7:0]     done_tag;
  logic [2:0]          squash_valid;
  logic [2:0][7:0]     squash_tag;
  logic                flush;
  logic                fetch_halt, halt_start, halt_drop;
  logic [3:0]          n_halting;
  logic [2:0]          pred_valid, pred_miss;
  logic                l2_req_valid;
  logic [31:0]         l2_req_addr;
  logic                l2_resp_valid, l2_resp_hit, l2_resp_evict;
  logic [26:0]         l2_resp_evict_line;
  logic                mon_valid;
  logic [7:0]          mon_tag;
  logic [31:0]         mon_pc, fetch_seq;
  logic [7:0]          issue_valid;
  logic [7:0][31:0]    issue_seq;
  logic                rec_valid, mon_drop;
  logic [31:0]         rec_pc;
  logic [15:0]         rec_dead, rec_fi;

  fetch_halting #(.EN_LONG_LAT(1'b1), .HALF_HALT_CYCLES(12)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  task automatic clear_in();
    agen_valid = '0; l1_valid = '0; ll_valid = 1'b0; done_valid = '0;
    squash_valid = '0; flush = 1'b0; l2_req_valid = 1'b0; mon_valid = 1'b0;
  endtask
  task automatic cyc();
    @(posedge clk); #1;
    clear_in();
  endtask

  // issue an arithmetic op, complete (or squash) it after lat cycles and
  // return how many cycles fetch was halted
  task automatic arith(input logic [7:0] tag, input logic [1:0] annot, input int lat,
                       input bit squash, output int halted);
    ll_valid = 1'b1; ll_tag = tag; ll_annot = annot;
    check(!fetch_halt, "no halt in the issue cycle");
    cyc();
    halted = 0;
    for (int c = 1; c <= lat + 2; c++) begin
      if (fetch_halt) halted++;
      if (c == lat) begin
        if (squash) begin squash_valid[0] = 1'b1; squash_tag[0] = tag; end
        else        begin done_valid[2] = 1'b1;  done_tag[2] = tag; end
      end
      cyc();
    end
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int h;

  initial begin
    clear_in();
    agen_tag = '0; agen_addr = '0; agen_annot = '0; l1_tag = '0; ll_tag = '0; ll_annot = '0;
    done_tag = '0; squash_tag = '0; l2_req_addr = '0; mon_tag = '0; mon_pc = '0;
    fetch_seq = '0; issue_valid = '0; issue_seq = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    arith(8'd1, 2'b10, 30, 1'b0, h); check(h == 30, $sformatf("critical op halts 30 cycles (got %0d)", h));
    arith(8'd2, 2'b01, 30, 1'b0, h); check(h == 12, $sformatf("half-critical op halts 12 cycles (got %0d)", h));
    arith(8'd3, 2'b00, 30, 1'b0, h); check(h == 0, "non-annotated op never halts");
    arith(8'd4, 2'b10, 30, 1'b1, h); check(h == 30, "squash ends the halt");

    // overlap: a critical load (empty filter: predicted miss) and an op
    agen_valid[0] = 1'b1; agen_tag[0] = 8'd10; agen_addr[0] = 32'h0000_1000; agen_annot[0] = 2'b10;
    cyc();
    check(pred_valid[0] && pred_miss[0], "empty filter predicts a miss");
    l1_valid[0] = 1'b1; l1_tag[0] = 8'd10; ll_valid = 1'b1; ll_tag = 8'd11; ll_annot = 2'b10;
    cyc();
    check(fetch_halt && n_halting == 2, "load and op both halt");
    done_valid[0] = 1'b1; done_tag[0] = 8'd11; cyc();
    check(fetch_halt && n_halting == 1, "load still halts after the op completes");
    done_valid[1] = 1'b1; done_tag[1] = 8'd10; cyc();
    check(!fetch_halt, "fetch resumes after both");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
