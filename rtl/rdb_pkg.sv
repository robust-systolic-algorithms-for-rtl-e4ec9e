// Shared types of the robust systolic relational-database array.
//
// Every inter-processor connection of the array carries four streams side by
// side: the A stream (elements of the first relation, or the wild card WC),
// the B stream (elements of the second relation), the one-bit C stream (the
// running comparison result c_ij) and the one-bit X stream (the running
// intersection result x_i). They are bundled as lane_t so that a link register
// or an I/O port is a single typed signal.
//
// The element width is this design's choice (the algorithms only need equality
// on elements). The wild card is an extra flag bit on the A stream rather than
// a reserved element value, so every element value stays usable.
package rdb_pkg;

  parameter int unsigned ELEM_W = 8;

  typedef logic [ELEM_W-1:0] elem_t;

  // A-stream word: wc = 1 is the wild card, which matches any B element.
  typedef struct packed {
    logic  wc;
    elem_t val;
  } a_word_t;

  // One slot of the pipeline: what one clock cycle carries on each path.
  typedef struct packed {
    a_word_t a;
    elem_t   b;
    logic    c;
    logic    x;
  } lane_t;

  // Relational operations run by the host sequencer.
  //   OP_COMPARE    : [C] = A * B (and X = A intersect B as a by-product)
  //   OP_INTERSECT  : X = A intersect B
  //   OP_DIFFERENCE : X complemented, true where a_i is in no tuple of B
  //   OP_DEDUP      : A * A with c_ij seeded only for i < j; x_i marks a duplicate
  typedef enum logic [1:0] {
    OP_COMPARE    = 2'd0,
    OP_INTERSECT  = 2'd1,
    OP_DIFFERENCE = 2'd2,
    OP_DEDUP      = 2'd3
  } op_e;

  // ----------------------------------------------------------------------
  // Mesh configuration. Each module of the mesh has four neighbour links
  // (north = row above, east = column to the right, south, west) and, in the
  // module that serves as the I/O port, the host connection. After testing,
  // every module is given a route: where its processor takes its input from,
  // and what drives each outgoing link and the host output. A faulty or
  // unused module drives nothing (all SRC_NONE).
  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  typedef enum logic [2:0] {
    SRC_NONE = 3'd0,   // idle lane
    SRC_PROC = 3'd1,   // this module's processor output
    SRC_N    = 3'd2,   // the link arriving from the north neighbour
    SRC_E    = 3'd3,
    SRC_S    = 3'd4,
    SRC_W    = 3'd5,
    SRC_IO   = 3'd6    // the host input (I/O module only)
  } src_e;

  typedef struct packed {
    logic           proc_en;   // processor is part of the pipeline
    src_e           proc_src;  // input of the processor
    src_e [3:0]     out_src;   // out_src[dir_e]: what drives the link to that neighbour
    src_e           io_src;    // what drives the host output (I/O module only)
  } module_cfg_t;

  localparam module_cfg_t CFG_UNUSED = '{proc_en: 1'b0, proc_src: SRC_NONE,
                                         out_src: {4{SRC_NONE}}, io_src: SRC_NONE};

  localparam lane_t LANE_IDLE = '{a: '{wc: 1'b1, val: '0}, b: '0, c: 1'b0, x: 1'b0};

endpackage
