// pac_pkg: types and constants shared by the power-aware partitioned L2 cache.
//
// The controller passes three kinds of resizing decision between its parts:
// grow by one way, shrink by one way, or keep the current size. Both the
// threshold comparators (local requests inc/dec/keep) and the state machines
// (control signals INC/DEC/KEEP) use the same 2-bit code. The codes themselves
// are this design's choice; the three meanings follow the source description.
package pac_pkg;

  // 2-bit resize request / command (the "NXT", "NACT" and "NALLOC" buses).
  typedef enum logic [1:0] {
    RS_KEEP = 2'b00,
    RS_INC  = 2'b01,
    RS_DEC  = 2'b10
  } resize_e;

endpackage
