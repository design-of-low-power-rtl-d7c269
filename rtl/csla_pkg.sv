// Shared constants of the carry select adders.
//
// DATA_WIDTH is the operand width of the proposed adder (32 bits). GROUP_WIDTH
// is the size of one carry-select group of the BEC adder; the 4-bit value
// matches the 4-bit binary-to-excess-1 converter and is a design choice, the
// group partitioning not being fixed by the source description.
package csla_pkg;
  localparam int unsigned DATA_WIDTH  = 32;
  localparam int unsigned GROUP_WIDTH = 4;
endpackage : csla_pkg
