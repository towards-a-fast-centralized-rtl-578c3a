// lucc_pkg: shared sizes, types and the default routing table of the
// look-up-table centralized controller (LUCC) for a 4x4 multistage
// Mach-Zehnder-interferometer (MZI) switch.
//
// Switch topology (five 2x2 MZIs, three columns):
//   column 1: MZI1 (inputs TX1, TX2)        MZI3 (inputs TX3, TX4)
//   column 2: MZI5
//   column 3: MZI2 (outputs RX1, RX2)       MZI4 (outputs RX3, RX4)
// Waveguides: MZI1.out0->MZI2.in0, MZI1.out1->MZI5.in0,
//             MZI3.out0->MZI5.in1, MZI3.out1->MZI4.in1,
//             MZI5.out0->MZI2.in1, MZI5.out1->MZI4.in0.
// An MZI in state 0 (bar) connects in0->out0 and in1->out1; in state 1
// (cross) it connects in0->out1 and in1->out0. Index k of the MZI vectors
// below is MZI(k+1).
//
// The default table holds, for every (TX, RX) pair, the shortest path through
// this fabric (each pair has exactly one shortest path). The placement of
// TX1/TX2 on MZI1 and RX2/RX3 on MZI2/MZI4 follows the prototype drawing; the
// placement of TX3, TX4, RX1 and RX4 on the remaining free ports is this
// design's choice.
package lucc_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N_TX  = 4;  // transmitter ports
  localparam int unsigned N_RX  = 4;  // receiver ports
  localparam int unsigned N_MZI = 5;  // 2x2 MZI elements in the fabric

  // One entry of the routing look-up table.
  typedef struct packed {
    logic             valid;  // a path exists for this (TX, RX) pair
    logic [N_MZI-1:0] use_m;  // MZIs the path passes through
    logic [N_MZI-1:0] state;  // required state of each used MZI
  } route_t;

  // Builds one valid table entry from a used-MZI mask and the states.
  function automatic route_t mk_route(input logic [N_MZI-1:0] use_m,
                                      input logic [N_MZI-1:0] state);
    route_t r;
    r.valid = 1'b1;
    r.use_m = use_m;
    r.state = state & use_m;
    return r;
  endfunction

  // Default shortest-path table, indexed by tx*N_RX + rx (0-based).
  // Vectors are written MZI5..MZI1 (bit 4 .. bit 0).
  function automatic route_t default_route(input logic [1:0] tx,
                                           input logic [1:0] rx);
    case ({tx, rx})
      //                         use_m     state
      4'b00_00: return mk_route(5'b00011, 5'b00000); // TX1->RX1: M1 bar,   M2 bar
      4'b00_01: return mk_route(5'b00011, 5'b00010); // TX1->RX2: M1 bar,   M2 cross
      4'b00_10: return mk_route(5'b11001, 5'b10001); // TX1->RX3: M1 cross, M5 cross, M4 bar
      4'b00_11: return mk_route(5'b11001, 5'b11001); // TX1->RX4: M1 cross, M5 cross, M4 cross
      4'b01_00: return mk_route(5'b00011, 5'b00001); // TX2->RX1: M1 cross, M2 bar
      4'b01_01: return mk_route(5'b00011, 5'b00011); // TX2->RX2: M1 cross, M2 cross
      4'b01_10: return mk_route(5'b11001, 5'b10000); // TX2->RX3: M1 bar,   M5 cross, M4 bar
      4'b01_11: return mk_route(5'b11001, 5'b11000); // TX2->RX4: M1 bar,   M5 cross, M4 cross
      4'b10_00: return mk_route(5'b10110, 5'b10010); // TX3->RX1: M3 bar,   M5 cross, M2 cross
      4'b10_01: return mk_route(5'b10110, 5'b10000); // TX3->RX2: M3 bar,   M5 cross, M2 bar
      4'b10_10: return mk_route(5'b01100, 5'b01100); // TX3->RX3: M3 cross, M4 cross
      4'b10_11: return mk_route(5'b01100, 5'b00100); // TX3->RX4: M3 cross, M4 bar
      4'b11_00: return mk_route(5'b10110, 5'b10110); // TX4->RX1: M3 cross, M5 cross, M2 cross
      4'b11_01: return mk_route(5'b10110, 5'b10100); // TX4->RX2: M3 cross, M5 cross, M2 bar
      4'b11_10: return mk_route(5'b01100, 5'b01000); // TX4->RX3: M3 bar,   M4 cross
      default:  return mk_route(5'b01100, 5'b00000); // TX4->RX4: M3 bar,   M4 bar
    endcase
  endfunction

endpackage
