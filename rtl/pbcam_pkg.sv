// pbcam_pkg: sizes shared by the precomputation-based CAM (PB-CAM) modules.
//
// The CAM holds DEPTH words of DATA_W bits. Beside every word it stores a
// short PARAM_W-bit "parameter" computed from the word by the Block-XOR
// extractor. The code with all parameter bits set (PARAM_EMPTY) is never
// produced by the extractor and marks an empty entry. The defaults (14-bit
// words, 4-bit parameters, 2^14 words) are the configuration the design was
// sized and evaluated for; the empty code is this implementation's name for
// the "valid bit" state 1111.
package pbcam_pkg;

  parameter int unsigned DATA_W  = 14;
  parameter int unsigned PARAM_W = 4;
  parameter int unsigned DEPTH   = 16384;

endpackage
