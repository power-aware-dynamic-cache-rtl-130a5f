// cache_ctrl: the cache control block that turns one sampling interval's
// counts into way-allocation and power-control commands.
//
// Structure as in the controller's block diagram: two dividers compute
// D0 = LRUcount0 / MRUcount0 and D1 = LRUcount1 / MRUcount1; D_COMP compares
// D0 with D1 (NALLOC0); one T_COMP per core compares its D with the shared
// thresholds T1 and T2 (NXT); one STATE machine per core filters that into
// the power command NACT0 / NACT1.
//
// Timing: the counts and thresholds must be stable in the cycle where
// `sample_vld` is high. The dividers and comparators are combinational; on
// that clock edge the state machines step and NALLOC0 is registered next to
// them, so nalloc0, nact0, nact1 and `cmd_vld` are valid for one cycle, the
// cycle after `sample_vld`. Registering NALLOC0 is this design's choice (the
// diagram shows it as a plain comparator output).
module cache_ctrl
  import pac_pkg::*;
#(
  parameter int unsigned N       = 16,
  parameter int unsigned SM_BITS = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         sample_vld,   // counts below are a finished interval
  input  logic [N-1:0] mru_count0,
  input  logic [N-1:0] lru_count0,
  input  logic [N-1:0] mru_count1,
  input  logic [N-1:0] lru_count1,
  input  logic [N-1:0] t1,           // lower threshold, N-bit fraction
  input  logic [N-1:0] t2,           // upper threshold, N-bit fraction
  output resize_e      nalloc0,      // allocation change for core 0
  output resize_e      nact0,        // power command for core 0
  output resize_e      nact1,        // power command for core 1
  output logic         cmd_vld,      // the three commands are valid
  output logic [N-1:0] d0,           // D of core 0 (combinational)
  output logic [N-1:0] d1,           // D of core 1 (combinational)
  output logic [SM_BITS-1:0] state0, // state machine of core 0
  output logic [SM_BITS-1:0] state1  // state machine of core 1
);

  resize_e nalloc0_c, nxt0, nxt1;
  logic    vld0, vld1;

  locality_div #(.N(N)) u_div0 (.diva(mru_count0), .divb(lru_count0), .divq(d0));
  locality_div #(.N(N)) u_div1 (.diva(mru_count1), .divb(lru_count1), .divq(d1));

  d_comp #(.N(N)) u_dcomp (.d0(d0), .d1(d1), .nalloc0(nalloc0_c));

  t_comp #(.N(N)) u_tcomp0 (.d(d0), .t1(t1), .t2(t2), .nxt(nxt0));
  t_comp #(.N(N)) u_tcomp1 (.d(d1), .t1(t1), .t2(t2), .nxt(nxt1));

  resize_fsm #(.SM_BITS(SM_BITS)) u_state0 (
    .clk(clk), .rst_n(rst_n), .en(sample_vld), .nxt(nxt0),
    .nact(nact0), .nact_vld(vld0), .state_o(state0)
  );
  resize_fsm #(.SM_BITS(SM_BITS)) u_state1 (
    .clk(clk), .rst_n(rst_n), .en(sample_vld), .nxt(nxt1),
    .nact(nact1), .nact_vld(vld1), .state_o(state1)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          nalloc0 <= RS_KEEP;
    else if (sample_vld) nalloc0 <= nalloc0_c;
  end

  assign cmd_vld = vld0 & vld1;

endmodule
