// Shared definitions for the repetitive-addition multiplier.
//
// The multiplier is a finite state machine with datapath (FSMD): a small
// control FSM tells a datapath when to calculate, and the datapath tells the
// FSM when it is done. This package holds what both halves and the top share:
// the default operand width and the control states.
//
// The 4-bit operand width and the three states (Idle, Run, Finish) follow the
// original design. The state encoding is this design's own choice.
package mult_rep_add_pkg;

  // Operand width of the original design; the product is twice as wide.
  parameter int unsigned DEFAULT_WIDTH = 4;

  // Control path states.
  typedef enum logic [1:0] {
    ST_IDLE   = 2'd0,  // waiting for startb low; datapath loads operands
    ST_RUN    = 2'd1,  // datapath adds once per cycle until done
    ST_FINISH = 2'd2   // one cycle after done before returning to idle
  } state_t;

endpackage
