// Shared types for the in-circuit configurable Montgomery multiplier (ICMM).
//
// ctrl_t bundles the control strobes that the controller drives into the
// datapath of icmm_top. The names c1..c9, c3n, c61 and c81 are the names the
// architecture gives its control lines; mp_rd is this implementation's own
// addition (the read strobe of the product accumulator, split from the c61
// multiplexer select, see icmm_ctrl). All fields are active high.
package icmm_pkg;

  typedef struct packed {
    logic c1;   // core "cntin": 0 on the first row of a pass (take row from V)
    logic c2;   // H[0] select: 1 = M_H, 0 = M_V port 2 path
    logic c3;   // H[1:L-1] select: 1 = M_H, 0 = bit-reversed M_V port 2
    logic c3n;  // M_V port 2 read (down-counter)
    logic c4;   // load strobe for all four memory systems
    logic c5;   // M_A read and M_V port 1 read
    logic c6;   // M_H read
    logic c7;   // M_H address reload to 0
    logic c8;   // address reset of M_V, M_A, M_P
    logic c81;  // M_P address reset at the end of a pass
    logic c9;   // M_V down-counter load from the up-counter
    logic c61;  // M_P input multiplexer: 1 = accumulate, 0 = external data
    logic mp_rd;// M_P read strobe
  } ctrl_t;

endpackage
