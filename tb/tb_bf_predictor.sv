// tb_bf_predictor: self-checking test of the partial-address Bloom filter.
//
// Directed cases: an empty filter predicts a miss for every line; a set
// line is predicted to hit one cycle after the lookup; lines that share
// the low P address bits alias (predicted hit), others do not; a clear
// restores the miss prediction; set and clear of one bit in one cycle
// leaves it set; the tag and level travel with the prediction. A random
// phase then drives lookups, sets and clears on three ports against a
// bit-array reference model. Runs at the default size (32 kbit).
module tb_bf_predictor;
  import fh_pkg::*;

  localparam int unsigned LW = LINE_W;
  localparam int unsigned NP = 3;

  logic clk = 1'b0;
  logic rst;
  always #5 clk = ~clk;

  logic  [NP-1:0]          lk_valid;
  logic  [NP-1:0][LW-1:0]  lk_line;
  logic  [NP-1:0][7:0]     lk_tag;
  crit_e [NP-1:0]          lk_level;
  logic  [NP-1:0]          pred_valid, pred_miss;
  logic  [NP-1:0][7:0]     pred_tag;
  crit_e [NP-1:0]          pred_level;
  logic                    set_valid, clr_valid;
  logic  [LW-1:0]          set_line, clr_line;

  bf_predictor dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  bit model [1 << BF_P];

  task automatic idle();
    lk_valid = '0; set_valid = 1'b0; clr_valid = 1'b0;
  endtask

  // one lookup on port 0; returns the prediction seen on the next cycle
  task automatic lookup(input logic [LW-1:0] line, output logic miss);
    lk_valid[0] = 1'b1; lk_line[0] = line; lk_tag[0] = 8'h5a; lk_level[0] = CRIT_HALF;
    @(posedge clk); #1;
    lk_valid = '0;
    check(pred_valid[0] && pred_tag[0] == 8'h5a && pred_level[0] == CRIT_HALF,
          "prediction valid one cycle after lookup with tag and level");
    miss = pred_miss[0];
  endtask

  task automatic do_set(input logic [LW-1:0] line);
    set_valid = 1'b1; set_line = line;
    @(posedge clk); #1;
    set_valid = 1'b0;
  endtask

  task automatic do_clr(input logic [LW-1:0] line);
    clr_valid = 1'b1; clr_line = line;
    @(posedge clk); #1;
    clr_valid = 1'b0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic m;
  logic [LW-1:0] a, b, c;

  initial begin
    idle();
    lk_line = '0; lk_tag = '0; lk_level = '{CRIT_NONE, CRIT_NONE, CRIT_NONE};
    set_line = '0; clr_line = '0;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;

    a = 27'h123_4567;
    b = a ^ 27'h000_0001;             // differs in the partial address
    c = a ^ 27'h400_0000;             // same low 15 bits as a
    lookup(a, m); check(m == 1'b1, "empty filter predicts miss");
    do_set(a);
    lookup(a, m); check(m == 1'b0, "inserted line predicted hit");
    lookup(b, m); check(m == 1'b1, "other partial address predicted miss");
    lookup(c, m); check(m == 1'b0, "aliasing line predicted hit");
    do_clr(c);
    lookup(a, m); check(m == 1'b1, "cleared partial address predicted miss");
    // set and clear of one bit in the same cycle: set wins
    set_valid = 1'b1; set_line = b; clr_valid = 1'b1; clr_line = b;
    @(posedge clk); #1; idle();
    lookup(b, m); check(m == 1'b0, "set wins over clear");
    // lookup sees the array before a same-cycle update
    lk_valid[0] = 1'b1; lk_line[0] = a; lk_tag[0] = 8'h11; lk_level[0] = CRIT_FULL;
    set_valid = 1'b1; set_line = a;
    @(posedge clk); #1; idle();
    check(pred_valid[0] && pred_miss[0] && pred_tag[0] == 8'h11 && pred_level[0] == CRIT_FULL,
          "same-cycle lookup sees old value");
    lookup(a, m); check(m == 1'b0, "update visible on the following lookup");
    // an invalid lookup gives no prediction
    @(posedge clk); #1;
    check(pred_valid == '0 && pred_miss == '0, "no lookup, no prediction");

    // random phase against the reference model (bits 0..63 of a few lines)
    do_clr(a); do_clr(b);
    for (int i = 0; i < (1 << BF_P); i++) model[i] = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      logic [NP-1:0][LW-1:0] ln;
      logic [NP-1:0]         lv;
      for (int k = 0; k < NP; k++) begin
        ln[k] = LW'({$urandom} & 32'h07ff_803f);
        lv[k] = $urandom_range(0, 1);
        lk_valid[k] = lv[k]; lk_line[k] = ln[k]; lk_tag[k] = 8'(n + k);
        lk_level[k] = crit_e'($urandom_range(0, 2));
      end
      set_valid = $urandom_range(0, 1); set_line = LW'({$urandom} & 32'h07ff_803f);
      clr_valid = $urandom_range(0, 1); clr_line = LW'({$urandom} & 32'h07ff_803f);
      @(posedge clk); #1;
      for (int k = 0; k < NP; k++) begin
        check(pred_valid[k] == lv[k], "random: valid");
        if (lv[k]) check(pred_miss[k] == !model[ln[k][BF_P-1:0]] && pred_tag[k] == 8'(n + k),
                         "random: prediction matches model");
      end
      if (clr_valid) model[clr_line[BF_P-1:0]] = 1'b0;
      if (set_valid) model[set_line[BF_P-1:0]] = 1'b1;
    end
    idle();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
