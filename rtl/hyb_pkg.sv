// hyb_pkg: types and helpers shared by the hybrid-encoded domino pipeline.
//
// Modelling convention used by every module of this design: the circuits are
// self-timed domino pipelines, modelled here at unit-gate-delay level. Every
// gate that holds state or drives a handshake wire (domino node, completion
// detector, stage-controller NAND3/inverter, asymmetric C-element) is a
// flip-flop on a common "tick" clock, so one tick equals one gate delay. The
// clock never synchronises stages with each other: all synchronisation is done
// by the request/acknowledge wires described in each module. Reset is the
// active-low Reset of the circuits; it clears every dynamic node and every
// completion detector and leaves every stage ready to evaluate.
package hyb_pkg;

  // Dual-rail bit as carried by the critical path. (0,0) is the spacer (no
  // data); (1,0) is a valid 1 and (0,1) a valid 0; (1,1) never occurs.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  localparam dr_t DR_SPACER = '{t: 1'b0, f: 1'b0};

  // Phase of a logic block, given by the decoupled control pair {pc, ev}.
  typedef enum logic [1:0] {
    PH_PRECHARGE = 2'b00,
    PH_ILLEGAL   = 2'b01,
    PH_ISOLATE   = 2'b10,
    PH_EVALUATE  = 2'b11
  } phase_e;

  // Handshake style of a pipeline: early-acknowledge completion detection at
  // the stage input (EA-Hybrid) or post detection at the stage output (PD-Hybrid).
  typedef enum logic {
    STYLE_EA = 1'b0,
    STYLE_PD = 1'b1
  } style_e;

  function automatic logic dr_valid(dr_t d);
    return d.t ^ d.f;
  endfunction

  function automatic dr_t dr_enc(logic v);
    return '{t: v, f: ~v};
  endfunction

  function automatic phase_e phase_of(logic pc, logic ev);
    return phase_e'({pc, ev});
  endfunction

  // Truth tables (bit i is the output for input index i) of the gates the
  // circuits use as critical elements.
  localparam logic [1:0] TT_BUF  = 2'b10;
  localparam logic [3:0] TT_AND2 = 4'b1000;
  localparam logic [7:0] TT_MAJ3 = 8'b1110_1000;  // full-adder carry
  localparam logic [7:0] TT_XOR3 = 8'b1001_0110;  // full-adder sum

endpackage
