// way_manager: way-allocation and power-control state of the shared L2.
//
// Keeps, for the two cores, the number of ways allocated (alloc0, and
// WAYS - alloc0 for core 1) and the number of those that are powered (act0,
// act1). On every command from the controller (`cmd_vld`) it follows the
// control flow of the mechanism:
//   1. Way allocation, skipped when both cores have at least one inactive
//      way: NALLOC0 = INC moves the virtual partition so that core 0 gains one
//      way and core 1 loses one, DEC the reverse, KEEP nothing.
//   2. Power control for each core: NACT = INC powers one more of its ways,
//      DEC powers one fewer, KEEP nothing.
// Core 0 owns ways 0..alloc0-1 and core 1 the rest (the partition is the
// boundary); each core's active ways are the ones farthest from the
// partition, so its inactive ways sit next to the partition. A way that moves
// across the partition is active for its new owner if that owner had no
// inactive way, else it joins the inactive ones; the loser keeps
// min(act, alloc-1) active ways. Every core keeps at least one allocated and
// one active way. These layout and limit rules are this design's choices;
// the source lets the cache pick the way to move or switch off freely.
//
// From the counts it derives per-way masks: use0/use1 (a core may look up
// and fill the way: owned and powered), pwr (the way's supply is on). When
// `part_en` is low the cache is a conventional shared cache: every way is
// powered and usable by both cores and commands are ignored; the counts are
// kept. Any way that a core could use before a change and cannot use after it
// must be written back and invalidated: `flush_req` pulses with that set of
// ways in `flush_mask` in the cycle after the change (also, for all ways, when
// partitioning is switched on). The new masks apply from the same cycle.
//
// Reset: alloc0 = WAYS/2, all ways active (an even split, this design's
// choice).
module way_manager
  import pac_pkg::*;
#(
  parameter int unsigned WAYS = 32,
  localparam int unsigned CW = $clog2(WAYS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            part_en,     // 1: partitioned, 0: conventional sharing
  input  logic            cmd_vld,     // commands below are valid
  input  resize_e         nalloc0,
  input  resize_e         nact0,
  input  resize_e         nact1,
  output logic [CW-1:0]   alloc0,      // ways allocated to core 0
  output logic [CW-1:0]   alloc1,      // ways allocated to core 1
  output logic [CW-1:0]   act0,        // active ways of core 0
  output logic [CW-1:0]   act1,        // active ways of core 1
  output logic [WAYS-1:0] use0,        // ways core 0 may access
  output logic [WAYS-1:0] use1,        // ways core 1 may access
  output logic [WAYS-1:0] pwr,         // ways whose supply is on
  output logic            flush_req,   // pulse: write back and invalidate
  output logic [WAYS-1:0] flush_mask,  // the ways to flush
  output logic            ev_alloc,    // pulse: the partition moved
  output logic            ev_alloc_skip // pulse: allocation skipped (both have inactive ways)
);

  localparam logic [CW-1:0] W = CW'(WAYS);
  localparam logic [CW-1:0] ONE = CW'(1);

  logic [CW-1:0] a0, c0, c1;          // current alloc0, act0, act1
  logic [CW-1:0] a0_n, c0_n, c1_n;    // after this command
  logic [CW-1:0] a1, a1_n;
  logic          part_q;
  logic          skip, moved;

  assign a1 = W - a0;

  always_comb begin
    a0_n  = a0;
    c0_n  = c0;
    c1_n  = c1;
    skip  = (c0 != a0) && (c1 != a1);
    moved = 1'b0;
    // step 1: way allocation
    if (!skip) begin
      if (nalloc0 == RS_INC && a1 > ONE) begin
        moved = 1'b1;
        a0_n  = a0 + ONE;
        if (c0 == a0) c0_n = c0 + ONE;
        if (c1 > a1 - ONE) c1_n = a1 - ONE;
      end else if (nalloc0 == RS_DEC && a0 > ONE) begin
        moved = 1'b1;
        a0_n  = a0 - ONE;
        if (c1 == a1) c1_n = c1 + ONE;
        if (c0 > a0 - ONE) c0_n = a0 - ONE;
      end
    end
    a1_n = W - a0_n;
    // step 2: power control
    if (nact0 == RS_INC && c0_n < a0_n) c0_n = c0_n + ONE;
    else if (nact0 == RS_DEC && c0_n > ONE) c0_n = c0_n - ONE;
    if (nact1 == RS_INC && c1_n < a1_n) c1_n = c1_n + ONE;
    else if (nact1 == RS_DEC && c1_n > ONE) c1_n = c1_n - ONE;
  end

  // Masks of usable ways for a given configuration.
  function automatic logic [WAYS-1:0] mask0(input logic [CW-1:0] act);
    logic [WAYS-1:0] m;
    for (int w = 0; w < WAYS; w++) m[w] = (CW'(w) < act);
    return m;
  endfunction
  function automatic logic [WAYS-1:0] mask1(input logic [CW-1:0] act);
    logic [WAYS-1:0] m;
    for (int w = 0; w < WAYS; w++) m[w] = (CW'(w) >= W - act);
    return m;
  endfunction

  logic [WAYS-1:0] p_use0, p_use1;
  logic            apply;

  assign p_use0 = part_q ? mask0(c0) : '1;
  assign p_use1 = part_q ? mask1(c1) : '1;
  assign apply  = part_en && part_q && cmd_vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a0            <= W / 2;
      c0            <= W / 2;
      c1            <= W - W / 2;
      part_q        <= 1'b0;
      flush_req     <= 1'b0;
      flush_mask    <= '0;
      ev_alloc      <= 1'b0;
      ev_alloc_skip <= 1'b0;
    end else begin
      part_q        <= part_en;
      flush_req     <= 1'b0;
      flush_mask    <= '0;
      ev_alloc      <= 1'b0;
      ev_alloc_skip <= 1'b0;
      if (part_en && !part_q) begin
        // switching into partitioned mode: every way may hold the other
        // core's lines, so everything is written back
        flush_req  <= 1'b1;
        flush_mask <= '1;
      end else if (apply) begin
        a0            <= a0_n;
        c0            <= c0_n;
        c1            <= c1_n;
        ev_alloc      <= moved;
        ev_alloc_skip <= skip;
        flush_req     <= |((p_use0 & ~mask0(c0_n)) | (p_use1 & ~mask1(c1_n)));
        flush_mask    <= (p_use0 & ~mask0(c0_n)) | (p_use1 & ~mask1(c1_n));
      end
    end
  end

  assign alloc0 = a0;
  assign alloc1 = a1;
  assign act0   = c0;
  assign act1   = c1;
  assign use0   = p_use0;
  assign use1   = p_use1;
  assign pwr    = p_use0 | p_use1;

endmodule
