// qoag_traffic_pkg: traffic for the switch testbenches.
//
// Output addresses follow Zipf distribution version II over M = 16
// outputs: the output of rank i (1 = most popular) is chosen with
// probability b_i = (i^theta - (i-1)^theta) / M^theta, theta = 0.4, which
// sums to one. The ranks are shuffled over the output ports; two fixed
// shuffles are given. RANK_A puts the hotspot (b_1 = 0.3299) on output 7
// (ports counted from 1). RANK_B is the distribution after a traffic
// change, with the hotspot on output 6. Arrivals are Bernoulli with
// probability p per input per slot.
package qoag_traffic_pkg;
  localparam int unsigned M = 16;
  localparam real THETA = 0.4;

  // rank of output port 1..16 (array index 0..15)
  localparam int RANK_A [M] = '{6, 12, 8, 16, 11, 3, 1, 4, 10, 7, 14, 9, 15, 2, 5, 13};
  localparam int RANK_B [M] = '{2, 14, 4, 13, 5, 1, 7, 10, 16, 12, 3, 6, 11, 15, 9, 8};

  function automatic real zipf2(input int rank);
    return ($pow(real'(rank), THETA) - $pow(real'(rank - 1), THETA)) / $pow(real'(M), THETA);
  endfunction

  // draw an output port (0-based) for a distribution given by its ranks
  function automatic int draw_output(input int rank_of [M]);
    real u, acc;
    u = real'($urandom) / 4294967296.0;
    acc = 0.0;
    for (int j = 0; j < M; j++) begin
      acc += zipf2(rank_of[j]);
      if (u < acc) return j;
    end
    return M - 1;
  endfunction

  function automatic bit bernoulli(input real p);
    return (real'($urandom) / 4294967296.0) < p;
  endfunction
endpackage
