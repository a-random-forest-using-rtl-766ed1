// rf_pkg: types and constants shared by the MDD random-forest classifier.
//
// The classifier evaluates every decision tree of a random forest as a
// multi-valued decision diagram MDD(k): a tree is cut into heights, each
// height tests one feature against k fixed-point constants at once, and the
// k comparison bits (the "super variable") select one of 2^k edges of the
// current node. This package holds the defaults of the main configuration
// (the Iris forest: 50 trees, 4 features, 3 classes, a longest MDD path of 4
// heights), the 14-bit signed fixed-point feature width, and the layout of
// the table-loading write port that fills the on-chip node memories.
//
// The 14-bit signed fixed point and the forest sizes follow the source
// design; k = 4, 16 nodes per height and the write-port layout are this
// design's own choices.
package rf_pkg;

  // Defaults of the main configuration (Iris forest).
  localparam int unsigned DEF_NUM_TREES = 50;
  localparam int unsigned DEF_NUM_FEAT  = 4;
  localparam int unsigned DEF_NUM_CLASS = 3;
  localparam int unsigned DEF_LEVELS    = 4;   // longest MDD path
  localparam int unsigned DEF_FEAT_W    = 14;  // n-bit signed fixed point
  localparam int unsigned DEF_K         = 4;   // binary variables per super variable
  localparam int unsigned DEF_NODES     = 16;  // node slots per MDD height

  // Table-loading write port.
  localparam int unsigned CFG_TREE_W = 16;
  localparam int unsigned CFG_LVL_W  = 8;
  localparam int unsigned CFG_ADDR_W = 16;
  localparam int unsigned CFG_DATA_W = 32;

  // What a configuration write targets.
  typedef enum logic [1:0] {
    CFG_FEATURE = 2'd0, // feature index tested at a height (addr unused)
    CFG_THRESH  = 2'd1, // constant number addr of a height
    CFG_EDGE    = 2'd2  // edge addr = node * 2^k + super-variable value
  } cfg_sel_e;

  typedef struct packed {
    logic                  we;
    cfg_sel_e              sel;
    logic [CFG_TREE_W-1:0] tree;
    logic [CFG_LVL_W-1:0]  level;
    logic [CFG_ADDR_W-1:0] addr;
    logic [CFG_DATA_W-1:0] data;
  } cfg_wr_t;

  // Width of the index field of an edge pointer: it holds either a node
  // number of the next height or, with the terminal flag set, a class label.
  function automatic int unsigned ptr_idx_w(int unsigned nodes, int unsigned num_class);
    int unsigned nw, lw;
    nw = (nodes > 1) ? $clog2(nodes) : 1;
    lw = (num_class > 1) ? $clog2(num_class) : 1;
    return (nw > lw) ? nw : lw;
  endfunction

endpackage
