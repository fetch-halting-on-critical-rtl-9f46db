// core_model: behavioural out-of-order core used to exercise the
// fetch-halting unit on a synthetic program (testbench only).
//
// The core dispatches up to 8 instructions per cycle into a 64-entry
// issue queue and a 256-entry reorder buffer, stops dispatching while
// fetch_halt is high, issues up to 8 ready instructions per cycle oldest
// first (at most 3 loads), and commits up to 8 per cycle in order.
// The synthetic program has a load every 8th instruction. Every 512th
// instruction is a "critical" load to a fresh line, so it misses the L2
// (206 cycles); the next DEP instructions all depend on it, so while it
// misses the machine can do nothing but fill its queues. All other loads
// hit (20 cycles) and other instructions take one cycle. With ANNOTATE = 0
// the critical loads carry no annotation and the unit never halts: this
// is the baseline.
//
// The core drives the unit's load ports (address generation at issue,
// L1 access on the next cycle, an L2 access for critical loads on the
// cycle after, completion at write-back) and reports occupancy sums.
module core_model #(
  parameter bit ANNOTATE = 1'b1,
  parameter int DEP      = 400
) (
  input  logic         clk,
  input  logic         rst,
  output longint       iq_sum,
  output longint       rob_sum,
  output longint       committed,
  output int           halts
);
  import fh_pkg::*;

  localparam int IQ_SZ = 64, ROB_SZ = 256, W = 8;
  localparam int HIT_LAT = 20, MISS_LAT = 206;

  logic [2:0]          agen_valid;
  logic [2:0][7:0]     agen_tag;
  logic [2:0][31:0]    agen_addr;
  logic [2:0][1:0]     agen_annot;
  logic [2:0]          l1_valid;
  logic [2:0][7:0]     l1_tag;
  logic [7:0]          done_valid;
  logic [7:0][7:0]     done_tag;
  logic                fetch_halt, halt_start, halt_drop;
  logic [3:0]          n_halting;
  logic [2:0]          pred_valid, pred_miss;
  logic                l2_req_valid;
  logic [31:0]         l2_req_addr;
  logic                l2_resp_valid, l2_resp_hit, l2_resp_evict;
  logic [26:0]         l2_resp_evict_line;
  logic                rec_valid, mon_drop;
  logic [31:0]         rec_pc;
  logic [15:0]         rec_dead, rec_fi;

  fetch_halting u_fh (
    .clk, .rst,
    .agen_valid, .agen_tag, .agen_addr, .agen_annot,
    .l1_valid, .l1_tag,
    .ll_valid(1'b0), .ll_tag(8'd0), .ll_annot(2'd0),
    .done_valid, .done_tag,
    .squash_valid(3'b000), .squash_tag('0), .flush(1'b0),
    .fetch_halt, .halt_start, .halt_drop, .n_halting,
    .pred_valid, .pred_miss,
    .l2_req_valid, .l2_req_addr, .l2_resp_valid, .l2_resp_hit, .l2_resp_evict,
    .l2_resp_evict_line,
    .mon_valid(1'b0), .mon_tag(8'd0), .mon_pc(32'd0), .fetch_seq(32'd0),
    .issue_valid('0), .issue_seq('0),
    .rec_valid, .rec_pc, .rec_dead, .rec_fi, .mon_drop);

  // instruction i of the synthetic program
  function automatic bit is_load(input longint i);   return (i % 8) == 0; endfunction
  function automatic bit is_crit(input longint i);   return (i % 512) == 0; endfunction
  function automatic longint crit_of(input longint i); return i - (i % 512); endfunction

  longint rob_seq [$];          // in program order
  longint iq_seq  [$];
  longint done_at [longint];    // completion cycle of issued instructions
  bit     completed [longint];
  longint next_seq;
  longint crit_done;            // newest critical load that has completed
  longint now;
  // pending L1 accesses and L2 requests (one cycle delayed)
  logic [2:0]      l1_v_n;
  logic [2:0][7:0] l1_t_n;
  logic            l2_v_n;
  logic [31:0]     l2_a_n;

  always @(posedge clk) begin
    if (rst) begin
      iq_sum <= 0; rob_sum <= 0; committed <= 0; halts <= 0;
      next_seq = 0; now = 0; crit_done = -1;
      rob_seq.delete(); iq_seq.delete(); done_at.delete(); completed.delete();
      agen_valid <= '0; l1_valid <= '0; done_valid <= '0; l2_req_valid <= 1'b0;
      agen_tag <= '0; agen_addr <= '0; agen_annot <= '0; l1_tag <= '0; done_tag <= '0;
      l2_req_addr <= '0;
      l1_v_n = '0; l1_t_n = '0; l2_v_n = 1'b0; l2_a_n = '0;
    end else begin
      int nd, ni, nl, nc;
      logic [2:0]       av;
      logic [2:0][7:0]  at;
      logic [2:0][31:0] aa;
      logic [2:0][1:0]  an;
      logic [7:0]       dv;
      logic [7:0][7:0]  dt;
      logic             l2v;
      logic [31:0]      l2a;
      now++;
      if (halt_start) halts <= halts + 1;
      iq_sum  <= iq_sum + longint'(iq_seq.size());
      rob_sum <= rob_sum + longint'(rob_seq.size());
      // write-back
      dv = '0; dt = '0; nd = 0;
      foreach (done_at[s]) begin
        if (done_at[s] == now) begin
          completed[s] = 1'b1;
          if (is_crit(s) && s > crit_done) crit_done = s;
          if (is_load(s) && nd < 8) begin
            dv[nd] = 1'b1; dt[nd] = 8'(s); nd++;
          end
        end
      end
      // commit
      nc = 0;
      while (nc < W && rob_seq.size() > 0 && completed.exists(rob_seq[0])) begin
        longint s;
        s = rob_seq.pop_front();
        completed.delete(s);
        done_at.delete(s);
        nc++;
      end
      committed <= committed + nc;
      // issue, oldest first
      av = '0; at = '0; aa = '0; an = '0; l2v = 1'b0; l2a = '0;
      ni = 0; nl = 0;
      for (int k = 0; k < iq_seq.size() && ni < W; k++) begin
        longint s, c;
        bit ready;
        int lat;
        s = iq_seq[k];
        c = crit_of(s);
        ready = (s == c) || (s - c > DEP) || (crit_done >= c);
        if (ready && is_load(s) && nl == 3) ready = 1'b0;
        if (ready) begin
          lat = 1;
          if (is_load(s)) begin
            av[nl] = 1'b1; at[nl] = 8'(s);
            if (is_crit(s)) begin
              aa[nl] = 32'h1000_0000 + 32'(s / 512) * 32'd4096;   // fresh line
              an[nl] = ANNOTATE ? 2'b10 : 2'b00;
              lat = MISS_LAT + 1;
            end else begin
              aa[nl] = 32'h0000_0000 + 32'(s % 64) * 32'd32;      // resident lines
              an[nl] = 2'b00;
              lat = HIT_LAT + 1;
            end
            nl++;
          end
          done_at[s] = now + longint'(lat);
          iq_seq.delete(k);
          k--;
          ni++;
        end
      end
      // L1 access one cycle after address generation, L2 access one later
      l1_valid <= l1_v_n; l1_tag <= l1_t_n;
      l2_req_valid <= l2_v_n; l2_req_addr <= l2_a_n;
      l1_v_n = av; l1_t_n = at;
      l2_v_n = 1'b0;
      for (int p = 0; p < 3; p++) if (av[p] && aa[p][28]) begin l2_v_n = 1'b1; l2_a_n = aa[p]; end
      agen_valid <= av; agen_tag <= at; agen_addr <= aa; agen_annot <= an;
      done_valid <= dv; done_tag <= dt;
      // dispatch (fetch halted: nothing enters)
      if (!fetch_halt) begin
        for (int k = 0; k < W; k++) begin
          if (iq_seq.size() < IQ_SZ && rob_seq.size() < ROB_SZ) begin
            iq_seq.push_back(next_seq);
            rob_seq.push_back(next_seq);
            next_seq++;
          end
        end
      end
    end
  end
endmodule
