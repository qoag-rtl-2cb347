// qoag_load_runner: measurement harness for the switch workload tests.
//
// Holds one switch (N = 16, Q = 2, buffer depth B) with its clock and
// offers run(), which resets the switch, applies Bernoulli arrivals of
// load p whose addresses follow the Zipf traffic of qoag_traffic_pkg
// (distribution A, switching to B at slot change_at if that is >= 0), and
// returns throughput (packets delivered per output per slot), loss
// probability (dropped / arrived) and mean delay over the slots after a
// warm-up. The payload of a packet is its arrival slot; the delay of a
// packet switched in slot s that arrived in slot a is s - a - 1, so a
// packet that crosses an idle switch at once has delay 0. Per-slot arrival
// and drop counts are kept in arr_cnt/drop_cnt for loss-over-time plots.
module qoag_load_runner #(
  parameter int unsigned B = qoag_pkg::B_BUFS
);
  import qoag_traffic_pkg::*;
  localparam int unsigned N = qoag_pkg::N_PORTS, DW = qoag_pkg::DW_DATA;
  localparam int unsigned AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  logic [N-1:0]         in_valid, in_drop, out_valid;
  logic [N-1:0][AW-1:0] in_addr, out_src;
  logic [N-1:0][DW-1:0] in_data, out_data;
  int arr_cnt[$], drop_cnt[$];

  qoag_switch #(.B(B)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input real p, input int warm, input int slots, input int change_at,
                     output real thr, output real loss, output real delay);
    longint arrived = 0, dropped = 0, delivered = 0, dsum = 0;
    arr_cnt.delete();
    drop_cnt.delete();
    in_valid = '0; in_addr = '0; in_data = '0;
    @(negedge clk) rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < warm + slots; t++) begin
      int a = 0, d = 0;
      @(negedge clk);
      for (int i = 0; i < N; i++) begin
        in_valid[i] = bernoulli(p);
        in_addr[i]  = AW'(draw_output((change_at >= 0 && t >= change_at) ? RANK_B : RANK_A));
        in_data[i]  = DW'(t);
        a += int'(in_valid[i]);
      end
      @(posedge clk);
      #1;
      for (int i = 0; i < N; i++) d += int'(in_drop[i]);
      arr_cnt.push_back(a);
      drop_cnt.push_back(d);
      if (t >= warm) begin
        arrived += a;
        dropped += d;
        for (int j = 0; j < N; j++) if (out_valid[j]) begin
          delivered++;
          dsum += t - int'(out_data[j]) - 1;
        end
      end
    end
    thr   = real'(delivered) / real'(slots * N);
    loss  = (arrived == 0) ? 0.0 : real'(dropped) / real'(arrived);
    delay = (delivered == 0) ? 0.0 : real'(dsum) / real'(delivered);
  endtask
endmodule
