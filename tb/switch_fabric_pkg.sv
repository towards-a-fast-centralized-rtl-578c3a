// switch_fabric_pkg: testbench model of the optical 4x4 switch fabric made
// of five 2x2 MZIs. trace() follows the light entering at one transmitter
// port through the MZIs, given their states (0 = bar: in0->out0, in1->out1;
// 1 = cross: in0->out1, in1->out0), and returns the receiver port it leaves
// by together with the set of MZIs it crossed. It is written from the
// waveguide list independently of the controller's routing table, so the
// testbenches can check the table and the controller's MZI settings.
package switch_fabric_pkg;
  timeunit 1ns;
  timeprecision 1ps;

  // Returns the receiver (0..3) reached from transmitter tx (0..3).
  function automatic int trace(input int tx, input logic [4:0] state,
                               output logic [4:0] visited);
    int mzi, port, outp;
    visited = '0;
    mzi  = (tx < 2) ? 0 : 2;   // TX1/TX2 enter MZI1, TX3/TX4 enter MZI3
    port = tx % 2;
    for (int hop = 0; hop < 5; hop++) begin
      visited[mzi] = 1'b1;
      outp = port ^ int'(state[mzi]);
      case (mzi)
        0: begin if (outp == 0) begin mzi = 1; port = 0; end
                 else           begin mzi = 4; port = 0; end end
        2: begin if (outp == 0) begin mzi = 4; port = 1; end
                 else           begin mzi = 3; port = 1; end end
        4: begin if (outp == 0) begin mzi = 1; port = 1; end
                 else           begin mzi = 3; port = 0; end end
        1: return outp;        // MZI2 -> RX1 / RX2
        default: return 2 + outp; // MZI4 -> RX3 / RX4
      endcase
    end
    return -1;
  endfunction
endpackage
