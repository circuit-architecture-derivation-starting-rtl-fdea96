// dds_pkg: constants shared by the blocks of the pulse output DDS.
//
// M_W_DEFAULT is the phase accumulator word width m and V_DEFAULT the word
// width v of the offset time, so that the virtual clock runs at
// f_c,v = 2^v * f_c. m = 32 is the largest accumulator width in the width
// studies this design is sized from; v = 6 is the largest virtual clock
// factor of the noise-shaping study. Both are defaults only: every module
// takes them as parameters.
package dds_pkg;
  localparam int unsigned M_W_DEFAULT = 32;
  localparam int unsigned V_DEFAULT   = 6;
endpackage
