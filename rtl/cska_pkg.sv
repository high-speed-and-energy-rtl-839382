// cska_pkg: constants shared by the carry skip adders.
//
// The word width and the stage sizes are this design's own choices: the
// adder structure is defined for any width N split into Q stages, and no
// particular split is fixed by the method. The variable stage size split
// keeps the first and last stages small and the middle ones large, as the
// variable stage size method asks. The hybrid split puts a power-of-two
// nucleus stage, the largest one, in the middle.
package cska_pkg;

  localparam int unsigned WIDTH = 32;

  // Stage sizes, least significant stage first. Only the first Q entries of
  // a stage_sizes_t are used; the rest are left 0.
  localparam int unsigned MAX_STAGES = 16;
  typedef int unsigned stage_sizes_t [MAX_STAGES];

  // Variable stage size CI-CSKA: 9 stages, 32 bits, a 1-bit first stage.
  localparam int unsigned CI_Q = 9;
  localparam stage_sizes_t CI_SIZES = '{0: 1, 1: 2, 2: 3, 3: 4, 4: 5, 5: 6, 6: 5, 7: 4, 8: 2, default: 0};

  // Hybrid variable latency CSKA: 7 stages, 32 bits, 8-bit nucleus at index 3.
  localparam int unsigned HY_Q = 7;
  localparam stage_sizes_t HY_SIZES = '{0: 3, 1: 4, 2: 5, 3: 8, 4: 5, 5: 4, 6: 3, default: 0};
  localparam int unsigned HY_P_IDX = 3;

endpackage
