// shrimp_pkg: types shared by the SHRIMP instruction-delivery blocks.
//
// A domain wall memory (DWM) cluster is moved one domain per cycle in one of
// two directions. SHIFT_UP moves the tapes so that the next higher domain
// lines up with each access port (the head position grows by one);
// SHIFT_DOWN moves them back towards the initial position. Each tape has two
// access ports: the read-write port at the first effective domain and the
// read-only port at the midpoint. The two-port arrangement follows the
// design; the encodings below are this implementation's own choice.
package shrimp_pkg;

  typedef enum logic {
    SHIFT_UP   = 1'b0,
    SHIFT_DOWN = 1'b1
  } shift_dir_e;

  typedef enum logic {
    PORT_RW = 1'b0,  // read-write port, serves the upper half of a cluster
    PORT_R  = 1'b1   // read-only port, serves the lower half of a cluster
  } dwm_port_e;

endpackage
