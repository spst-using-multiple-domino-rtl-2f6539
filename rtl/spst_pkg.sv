// spst_pkg: types shared by the SPST adder/subtractor blocks.
//
// spst_ctrl_t bundles the three registered decisions of the detection logic:
//   close     - 1: the MSP is shut off (its operands are forced to zero and its
//               sum is rebuilt by the sign-extension unit); 0: the MSP computes.
//   sign      - predicted value of every MSP sum bit above bit 0 while closed.
//   carr_ctrl - predicted value of MSP sum bit 0 while closed.
package spst_pkg;
  typedef struct packed {
    logic close;
    logic sign;
    logic carr_ctrl;
  } spst_ctrl_t;
endpackage
