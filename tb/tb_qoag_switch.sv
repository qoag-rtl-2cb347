// tb_qoag_switch: end-to-end test of the QOAG switch at its default size.
//
// A 16x16 switch with two queues of 20 buffers per input is fed Bernoulli
// arrivals whose output addresses follow the shuffled Zipf distribution of
// qoag_traffic_pkg. Every payload is a unique packet number. A reference
// model keeps each input's queues as lists of packet numbers and applies
// the QOAG rule to every arrival. The test checks, slot by slot:
//   - each delivered packet reaches the output it is addressed to, from
//     the input it arrived at, at most one per input per slot;
//   - it was the head-of-line packet of one of its input's model queues,
//     so per-output order holds and no packet overtakes one in its queue;
//   - the switch drops exactly the arrivals the model drops;
//   - an idle switch forwards a packet in the slot after it arrives;
//   - after the input is stopped, every accepted packet comes out.
// It counts each mechanism of the design (address grouping, shortest
// queue choice, tie for the shortest queue, drop, full queue refilled in
// the slot it drains, output contention, a grant in the second round,
// an input held up by head-of-line blocking) and fails on one that never
// happened. Throughput, loss and mean delay are printed per phase.
module tb_qoag_switch;
  import qoag_traffic_pkg::*;
  localparam int unsigned N = qoag_pkg::N_PORTS, Q = qoag_pkg::Q_QUEUES;
  localparam int unsigned B = qoag_pkg::B_BUFS, DW = qoag_pkg::DW_DATA;
  localparam int unsigned AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0]         in_valid, in_drop, out_valid;
  logic [N-1:0][AW-1:0] in_addr, out_src;
  logic [N-1:0][DW-1:0] in_data, out_data;

  qoag_switch dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_group = 0, n_short = 0, n_tie = 0, n_drop = 0, n_refill = 0;
  int n_contend = 0, n_late = 0, n_blocked = 0;
  int pkt_src[int], pkt_addr[int], pkt_slot[int];
  int mq[N][Q][$];
  int next_id = 0;
  longint arrived = 0, accepted = 0, delivered = 0, dropped = 0, delay_sum = 0;
  int first_delay = -1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at slot time %0t", what, $time);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_len(int i);
    int s = 0;
    for (int q = 0; q < Q; q++) s += mq[i][q].size();
    return s;
  endfunction

  // one time slot: drive arrivals, let the switch run, check the outcome
  task automatic slot(input int t, input real p, input bit use_b, input bit single);
    int off, pre[N][Q], sent[N];
    @(negedge clk);
    off = int'(dut.u_sched.serve_offset);
    for (int i = 0; i < N; i++) for (int q = 0; q < Q; q++) pre[i][q] = mq[i][q].size();
    // output contention among round-0 HOL packets
    for (int j = 0; j < N; j++) begin
      int c = 0;
      for (int i = 0; i < N; i++)
        if (mq[i][off].size() != 0 && pkt_addr[mq[i][off][0]] == j) c++;
      if (c > 1) n_contend++;
    end
    for (int i = 0; i < N; i++) begin
      in_valid[i] = single ? (i == 3) : bernoulli(p);
      in_addr[i]  = AW'(single ? 5 : draw_output(use_b ? RANK_B : RANK_A));
      in_data[i]  = DW'(next_id);
      if (in_valid[i]) begin
        pkt_src[next_id]  = i;
        pkt_addr[next_id] = int'(in_addr[i]);
        pkt_slot[next_id] = t;
        next_id++;
      end
    end
    @(posedge clk);
    #1;
    // departures of this slot
    foreach (sent[i]) sent[i] = 0;
    for (int j = 0; j < N; j++) if (out_valid[j]) begin
      int id, s, found;
      id = int'(out_data[j]);
      check(pkt_addr.exists(id), "known packet");
      if (!pkt_addr.exists(id)) continue;
      s = pkt_src[id];
      check(pkt_addr[id] == j, "delivered to its output");
      check(int'(out_src[j]) == s, "reported source");
      check(sent[s] == 0, "one packet per input per slot");
      sent[s]++;
      found = -1;
      for (int q = 0; q < Q; q++) if (mq[s][q].size() != 0 && mq[s][q][0] == id) found = q;
      check(found >= 0, "packet was head of line");
      if (found >= 0) begin
        void'(mq[s][found].pop_front());
        if (found != off) n_late++;
      end
      if (first_delay < 0) first_delay = t - pkt_slot[id] - 1;
      delay_sum += t - pkt_slot[id] - 1;
      delivered++;
    end
    for (int i = 0; i < N; i++)
      if (sent[i] == 0 && (pre[i][0] + pre[i][1 % Q]) != 0) n_blocked++;
    // arrivals of this slot, after its departures
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        int hit, sel, id;
        bit exp_drop;
        id = int'(in_data[i]);
        hit = -1;
        for (int q = 0; q < Q; q++) foreach (mq[i][q][k]) if (pkt_addr[mq[i][q][k]] == int'(in_addr[i])) hit = q;
        sel = hit;
        if (hit < 0) begin
          int ties = 1;
          sel = 0;
          for (int q = 1; q < Q; q++) begin
            if (mq[i][q].size() < mq[i][sel].size()) begin sel = q; ties = 1; end
            else if (mq[i][q].size() == mq[i][sel].size()) ties++;
          end
          n_short++;
          if (ties > 1) n_tie++;
        end else n_group++;
        exp_drop = (mq[i][sel].size() == B);
        check(in_drop[i] == exp_drop, "drop decision");
        arrived++;
        if (exp_drop) begin
          dropped++;
          n_drop++;
          pkt_addr.delete(id);
        end else begin
          if (pre[i][sel] == B) n_refill++;
          mq[i][sel].push_back(id);
          accepted++;
        end
      end else begin
        check(!in_drop[i], "no drop without arrival");
      end
    end
  endtask

  task automatic phase(input string name, input int slots, input real p, input bit use_b,
                       input int t0);
    longint a0 = arrived, d0 = delivered, l0 = dropped, s0 = delay_sum;
    for (int t = t0; t < t0 + slots; t++) slot(t, p, use_b, 1'b0);
    $display("%s: p=%0.2f throughput=%0.3f loss=%0.3f mean delay=%0.1f slots",
             name, p, real'(delivered - d0) / (slots * N),
             (arrived == a0) ? 0.0 : real'(dropped - l0) / real'(arrived - a0),
             (delivered == d0) ? 0.0 : real'(delay_sum - s0) / real'(delivered - d0));
  endtask

  initial begin
    int t;
    in_valid = '0; in_addr = '0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // a lone packet crosses an idle switch in the slot after it arrives
    slot(0, 0.0, 1'b0, 1'b1);
    slot(1, 0.0, 1'b0, 1'b0);
    check(first_delay == 0, "idle switch forwards in the next slot");
    t = 2;
    phase("light load", 1000, 0.2, 1'b0, t);  t += 1000;
    phase("heavy load", 3000, 0.7, 1'b0, t);  t += 3000;
    phase("changed traffic, full load", 1000, 1.0, 1'b1, t);  t += 1000;
    // drain
    for (int k = 0; k < 2000; k++) begin
      int left = 0;
      for (int i = 0; i < N; i++) left += model_len(i);
      if (left == 0) break;
      slot(t, 0.0, 1'b0, 1'b0);
      t++;
    end
    check(accepted == delivered, "every accepted packet delivered");
    check(arrived == accepted + dropped, "arrivals accounted for");
    check(n_group > 0, "address grouping happened");
    check(n_short > 0, "shortest-queue choice happened");
    check(n_tie > 0, "shortest-queue tie happened");
    check(n_drop > 0, "drop happened");
    check(n_refill > 0, "full queue refilled while draining");
    check(n_contend > 0, "output contention happened");
    check(n_late > 0, "second-round grant happened");
    check(n_blocked > 0, "head-of-line blocking happened");
    $display("arrived=%0d delivered=%0d dropped=%0d", arrived, delivered, dropped);
    $display("grouped=%0d shortest=%0d ties=%0d drops=%0d refills=%0d contention=%0d round2=%0d blocked=%0d",
             n_group, n_short, n_tie, n_drop, n_refill, n_contend, n_late, n_blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
