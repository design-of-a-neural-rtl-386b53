// cc_pkg: sizes and shared helpers of the chain-code pre-processing unit.
//
// The 16 segments match the 16 inputs of the network and the direction
// numbering (0 right, 1 up, 2 left, 3 down) follows the published crack-code
// example. The image size, the code-memory depth and the density threshold
// are choices of this implementation.
package cc_pkg;

  localparam int unsigned IMG_W   = 64;    // binary image width, pixels
  localparam int unsigned IMG_H   = 64;    // binary image height, pixels
  localparam int unsigned MAX_LEN = 1024;  // longest contour, in unit moves
  localparam int unsigned N_SEG   = 16;    // slopes per contour (network inputs)
  localparam int unsigned DENS_TH = 1;     // white pixels that make a row part of the object region

  localparam int unsigned SLW  = 4;                   // slope code, 16 sectors

  // crack-code directions
  typedef enum logic [1:0] {
    DIR_RIGHT = 2'd0,
    DIR_UP    = 2'd1,
    DIR_LEFT  = 2'd2,
    DIR_DOWN  = 2'd3
  } dir_e;


endpackage
