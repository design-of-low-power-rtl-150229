// csa_pkg: constants shared by the carry-select adder modules.
//
// CSA_WIDTH is the size of one carry-select block, four bits as in the
// design this RTL follows. Every module takes its width as a parameter
// whose default is this constant.
package csa_pkg;
  localparam int unsigned CSA_WIDTH = 4;
endpackage
