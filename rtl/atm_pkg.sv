// atm_pkg: types and default sizes shared by the blocks of the centrally
// controlled, channel-grouped ATM switch.
//
// The defaults describe the configuration whose cell loss is evaluated for
// this architecture: a 32x32 switch whose outputs form 8 link groups of 4
// links, two switching planes (duplicated controller and sorter), input
// queues of 15 cells and output queues of 17 cells, and a 2.8 us cell slot
// at a 10 ns controller cycle (280 cycles). The 424-bit cell (53 octets) is
// the standard ATM cell size and is this design's choice of data width.
//
// Packet format carried through the sorter (MSB first):
//   { present, addr[AW-1:0], live, data[DW-1:0] }
//   present - a packet occupies this sorter input (cell or test packet)
//   addr    - routing flag: the output port the packet must reach
//   live    - 1 for a user cell, 0 for a self-test packet
package atm_pkg;

  localparam int unsigned DEF_N           = 32;   // ports
  localparam int unsigned DEF_NG          = 8;    // link groups (RAM words)
  localparam int unsigned DEF_NP          = 2;    // switching planes
  localparam int unsigned DEF_DW          = 424;  // cell bits
  localparam int unsigned DEF_IQ_DEPTH    = 15;   // input queue cells
  localparam int unsigned DEF_OQ_DEPTH    = 17;   // output queue cells
  localparam int unsigned DEF_SLOT_CYCLES = 280;  // controller cycles per slot

  // Sequencing state of a central controller within one cell slot.
  typedef enum logic [2:0] {
    CC_IDLE  = 3'd0,  // plane disabled or before the first slot
    CC_INIT  = 3'd1,  // reload each group's counter from its RT entry
    CC_PH1   = 3'd2,  // phase I: strobe every port controller in turn
    CC_PH2   = 3'd3,  // phase II: hand free outputs down the POLL chain
    CC_DONE  = 3'd4   // routing flags ready, wait for the next slot
  } cc_phase_e;

endpackage
