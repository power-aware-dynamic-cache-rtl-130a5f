// access_monitor: counts what the locality metric needs, per core, over a
// fixed sampling interval of L2 accesses.
//
// For every L2 access reported on the acc_* inputs it increments, for the
// requesting core, the MRU-hit count (hit on the most recently used line of
// the ways that core may use), the LRU-hit count (hit on the least recently
// used of them) and the miss count. A single access counter of N bits counts
// the accesses of both cores; the INTERVAL-th access closes the interval
// and clears it. The counts including that access are copied to the output
// registers, `sample_vld` pulses for one cycle in the next cycle, and the
// working counters restart from zero. The outputs stay stable until the end
// of the next interval.
//
// The counter width N bounds the interval: INTERVAL may be any number of
// accesses from 2 to 2^N and defaults to 2^N. Widths of 8, 12, 16 and 20
// bits, and an interval of 100,000 accesses (N = 17 or more), follow the
// source. Counters saturate at 2^N - 1, which only matters when INTERVAL is
// 2^N and one core makes every access of an interval; saturation is this
// design's choice.
module access_monitor #(
  parameter int unsigned N        = 16,
  parameter int unsigned INTERVAL = 1 << N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         acc_vld,    // one L2 access is reported this cycle
  input  logic         acc_core,   // requesting core (0 or 1)
  input  logic         acc_hit,    // it hit
  input  logic         acc_mru,    // hit on the core's MRU line
  input  logic         acc_lru,    // hit on the core's LRU line
  output logic         sample_vld, // the counts below are a new interval
  output logic [N-1:0] mru_count [2],
  output logic [N-1:0] lru_count [2],
  output logic [N-1:0] miss_count [2]
);

  logic [N-1:0] acc_cnt;
  logic [N-1:0] mru_c [2];
  logic [N-1:0] lru_c [2];
  logic [N-1:0] miss_c [2];
  logic [N-1:0] mru_n [2];
  logic [N-1:0] lru_n [2];
  logic [N-1:0] miss_n [2];
  logic         wrap;

  function automatic logic [N-1:0] sat_inc(input logic [N-1:0] v, input logic inc);
    return (inc && v != '1) ? v + 1'b1 : v;
  endfunction

  if (INTERVAL < 2 || longint'(INTERVAL) > (longint'(1) << N)) begin : g_bad_interval
    $error("access_monitor: INTERVAL must lie between 2 and 2^N");
  end

  assign wrap = acc_vld && (acc_cnt == N'(INTERVAL - 1));

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      mru_n[c]  = sat_inc(mru_c[c],  acc_vld && (acc_core == c[0]) && acc_hit && acc_mru);
      lru_n[c]  = sat_inc(lru_c[c],  acc_vld && (acc_core == c[0]) && acc_hit && acc_lru);
      miss_n[c] = sat_inc(miss_c[c], acc_vld && (acc_core == c[0]) && !acc_hit);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_cnt    <= '0;
      sample_vld <= 1'b0;
      for (int c = 0; c < 2; c++) begin
        mru_c[c]      <= '0;
        lru_c[c]      <= '0;
        miss_c[c]     <= '0;
        mru_count[c]  <= '0;
        lru_count[c]  <= '0;
        miss_count[c] <= '0;
      end
    end else begin
      sample_vld <= wrap;
      if (wrap)         acc_cnt <= '0;
      else if (acc_vld) acc_cnt <= acc_cnt + 1'b1;
      for (int c = 0; c < 2; c++) begin
        if (wrap) begin
          mru_count[c]  <= mru_n[c];
          lru_count[c]  <= lru_n[c];
          miss_count[c] <= miss_n[c];
          mru_c[c]      <= '0;
          lru_c[c]      <= '0;
          miss_c[c]     <= '0;
        end else begin
          mru_c[c]  <= mru_n[c];
          lru_c[c]  <= lru_n[c];
          miss_c[c] <= miss_n[c];
        end
      end
    end
  end

endmodule
