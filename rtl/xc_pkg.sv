// xc_pkg: shared constants and types of the superset X-canceling compactor.
//
// The compactor squeezes the scan-out stream of a circuit under test into
// MISR signatures and then removes the unknown (X) values from each
// signature by XORing together MISR bits whose X dependences cancel. Each
// of the Q X-canceled output bits is chosen by M control bits (one per
// MISR bit), so one "control set" is Q*M bits wide.
//
// The values below are the defaults of the whole design. The MISR size
// (128) and Q = 7 canceled combinations (99.2 % error coverage) follow the
// document; every other size is this design's own choice.
package xc_pkg;

  // MISR size; the smallest of the three MISR sizes evaluated with
  // partitioned responses (128, 256, 512).
  localparam int unsigned MISR_W   = 128;
  // X-canceled combinations per signature (error coverage 1 - 2^-7).
  localparam int unsigned NUM_XC   = 7;
  // Scan chains feeding the MISR, one bit each per scan slice (assumed).
  localparam int unsigned N_CHAINS = 32;
  // Tester channels used to load control bits (assumed).
  localparam int unsigned N_TCH    = 8;
  // Maximum number of partitions (signatures) per scan vector (assumed).
  localparam int unsigned MAX_PARTS   = 64;
  // Depth of the control-set RAM of the indexed scheme (assumed).
  localparam int unsigned GROUP_DEPTH = 1024;
  // Width of a partition length in scan slices (assumed).
  localparam int unsigned LEN_W    = 16;

  // Feedback polynomial of the MISR without its x^M term:
  // x^128 + x^7 + x^2 + x + 1 (irreducible over GF(2)).
  localparam logic [MISR_W-1:0] MISR_POLY = MISR_W'(128'h87);

  // Where the control bits of each signature come from.
  typedef enum logic [1:0] {
    SRC_REG  = 2'd0,  // on-chip control register reloaded by the tester
    SRC_RAM  = 2'd1,  // RAM of merged control sets addressed by a group index
    SRC_INCR = 2'd2   // per-partition RAM, incrementally updated
  } ctrl_src_e;

  // Configuration registers reachable through the configuration port.
  typedef enum logic [1:0] {
    CFG_MODE      = 2'd0,  // data[1:0] = ctrl_src_e
    CFG_NUM_PARTS = 2'd1,  // data = partitions per scan vector (1..MAX_PARTS)
    CFG_PART_LEN  = 2'd2,  // data = scan slices in partition idx
    CFG_PART_BASE = 2'd3   // data = RAM address of group 0 of partition idx
  } cfg_sel_e;

endpackage
