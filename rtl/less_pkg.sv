// less_pkg: types and constants shared by the two-way parallel MWJ
// (multi-way join) subgraph-isomorphism stream core.
//
// Node words are 32 bits wide. In the partial-solution FIFO the most
// significant bit tells a radix (a node already verified, bit 31 = 1) from an
// extension (a node still to verify, bit 31 = 0). Two reserved radix words
// mark the start of single-node solutions (FAKE_NODE) and the end of the run
// (STOP_NODE). Inside the core, node ids are carried with bit 31 cleared; a
// word equal to STOP_NODE is the end-of-stream marker.
//
// The split between the two processing channels (and between the two memory
// banks) uses the most significant bit of a node hash. The hash function
// itself is this design's choice (a 32-bit multiplicative hash); the use of
// its MSB for the channel follows the reference architecture. Stream widths
// (table id, bloom word) are also this design's choices.
package less_pkg;

  localparam int unsigned NODE_W   = 32;
  localparam int unsigned RADIX_BIT = 31;
  localparam logic [NODE_W-1:0] FAKE_NODE = 32'hFFFF_FFFE;
  localparam logic [NODE_W-1:0] STOP_NODE = 32'hFFFF_FFFF;

  // Largest query handled (vertices per partial solution).
  localparam int unsigned MAX_QV  = 8;
  // Table id width: one table per indexing/indexed label pair of the query.
  localparam int unsigned TABLE_W = 5;
  // Width of one bloom-filter word.
  localparam int unsigned BLOOM_W = 64;
  // Hash bits used to address a bloom word / edge block inside a table.
  localparam int unsigned H1_W    = 7;
  // Node label width.
  localparam int unsigned LABEL_W = 4;

  typedef logic [NODE_W-1:0]  node_t;
  typedef logic [BLOOM_W-1:0] bloom_t;
  typedef logic [TABLE_W-1:0] table_t;
  typedef logic [LABEL_W-1:0] label_t;

  // Multiplicative (Fibonacci) hash of a node id.
  function automatic node_t node_hash(input node_t v);
    return v * 32'h9E37_79B1;
  endfunction

  // Channel / memory bank of a node: MSB of its hash.
  function automatic logic node_bank(input node_t v);
    node_t h;
    h = node_hash(v);
    return h[NODE_W-1];
  endfunction

  // One node of a decompressed partial-solution packet.
  typedef struct packed {
    node_t node;
    logic  last;   // final node of the packet
  } vertex_t;

  // Tuple from edgebuild to findmin: one query edge whose indexed node is the
  // extension being verified.
  typedef struct packed {
    table_t tbl;       // table holding the edges of this query edge
    node_t  indexing;  // data node mapped to the indexing query node
    logic   last;      // last tuple proposed for this packet
    logic   stop;      // end-of-stream tuple
  } fmin_tuple_t;

  // Element of the homomorphism output (hstream): solution nodes, then one
  // minset word, then the surviving candidates. nil marks a terminator beat
  // that carries no candidate (empty candidate set).
  typedef struct packed {
    node_t node;
    logic  last;
    logic  nil;
  } seq_t;

  // Intersect tuple of the tuplebuild branch.
  typedef enum logic [1:0] {
    IT_SOL      = 2'd0,  // node of a partial solution
    IT_EDGE     = 2'd1,  // vertex to verify against one edge set
    IT_LAST_SET = 2'd2,  // end of the sets of one solution
    IT_STOP     = 2'd3   // end of stream
  } itup_kind_e;

  typedef struct packed {
    itup_kind_e kind;
    node_t      node;
    table_t     tbl;
    logic       last_edge;  // last edge of its set
    logic       pos;        // on IT_LAST_SET: 0 real, 1 alignment padding
    logic       last;       // on IT_SOL: last node of the packet
  } itup_t;

  // Data edge as read by preprocess.
  typedef struct packed {
    node_t src;
    node_t dst;
    logic [LABEL_W-1:0] lsrc;
    logic [LABEL_W-1:0] ldst;
  } edge_t;

endpackage
