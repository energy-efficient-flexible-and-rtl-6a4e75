// carla_pkg: types and constants shared by the CARLA convolution accelerator.
//
// CARLA computes convolutional layers with U+1 convolution units (CUs) that
// share one pipelined input bus. The numeric formats follow the design
// description: 16-bit weights, input features and output features, 32-bit
// partial sums. The per-cycle control word (uop_t) is produced by the
// controller for CU #0 and travels down a register chain beside the input
// pipeline, so CU #k executes the same micro-operation k cycles later.
// The fields of the control word, the layer configuration record and the
// fixed-point output scaling are choices of this implementation.
package carla_pkg;

  localparam int unsigned DW     = 16;  // weight / feature / output word
  localparam int unsigned ACCW   = 32;  // partial sum (accumulator, S banks)
  localparam int unsigned ADDRW  = 32;  // DRAM word address
  localparam int unsigned IDXW   = 9;   // output index inside one CU partition
  localparam int unsigned DIMW   = 9;   // feature-map width / height
  localparam int unsigned CHW    = 12;  // channel and filter counts (up to 2048)

  typedef logic signed [DW-1:0]   word_t;
  typedef logic signed [ACCW-1:0] acc_t;
  typedef logic [ADDRW-1:0]       addr_t;

  typedef enum logic [1:0] {
    MODE_3X3  = 2'd0,  // serial accumulation: weights in CU registers, features piped
    MODE_1X1  = 2'd1,  // independent PEs: features in CU registers, weights piped
    MODE_1X1S = 2'd2   // 1x1 for small in-fmaps: independent PEs, weights of up to
                       // 196 filters in the CU registers, features piped
  } mode_e;

  // One micro-operation, as seen by a CU in the cycle its pipeline register
  // holds the matching feature (3x3) or weight (1x1).
  typedef struct packed {
    mode_e          mode;
    logic           load;     // load R registers from the broadcast buses
    logic           en_acc0;  // 3x3: ACC0 <= A0 + M0(product 0)
    logic           en_acc1;  // 3x3: ACC1 <= ACC0 + product 1
    logic           zero_m0;  // MUX M0 forces product 0 to zero (row end)
    logic           zero_m2;  // MUX M2 forces product 2 to zero (row start)
    logic           first;    // A muxes select 0 instead of a stored partial sum
    logic           rd;       // a stored partial sum is needed in this cycle
    logic [IDXW-1:0] rd_idx;  // its output index
    logic           wr_s;     // write the MAC result into the S bank(s)
    logic           wr_p;     // also write the rounded result into the P bank(s)
    logic [IDXW-1:0] wr_idx;  // output index written
  } uop_t;

  localparam uop_t UOP_NOP = '{mode: MODE_3X3, default: '0};

  // Layer configuration written by the host before start.
  typedef struct packed {
    mode_e           mode;
    logic [DIMW-1:0] il;         // input width = height
    logic [DIMW-1:0] ol;         // output width = height
    logic [1:0]      stride;     // 1x1 mode only (1 or 2)
    logic [CHW-1:0]  ic;         // input channels
    logic [CHW-1:0]  k;          // filters = output channels
    logic [DIMW-1:0] part_rows;  // 3x3: output rows per partition
    addr_t           in_base;    // in-fmap   [c][row][col]
    addr_t           w_base;     // weights   3x3: [k][c][fr][fc]; 1x1: [k][c]
    addr_t           out_base;   // out-fmap  [k][row][col]
    logic            prune_en;   // semi-structured random row-wise pruning
    logic [15:0]     prune_seed;
    logic [15:0]     prune_thresh;
  } cfg_t;

  // What the output drain needs to know about a finished pass.
  typedef struct packed {
    mode_e          mode;
    logic [CHW-1:0] filt_base;   // first filter of the pass
    logic [CHW-1:0] filt_cnt;    // valid filters in the pass
    logic [17:0]    pix_base;    // first output pixel (linear) of the partition
    logic [17:0]    pix_cnt;     // valid pixels in the partition
    logic [17:0]    plane;       // OL * OL
    addr_t          out_base;
  } drain_t;

  // One pulse per cycle for each mechanism of the dataflow, for monitoring.
  typedef struct packed {
    logic stall_1x1;   // 1x1: bus cycle that loads the last CU's four features
    logic feedback;    // 3x3: feature re-injected from the pipeline feedback
    logic skip;        // a filter-row step skipped (pruned or fully padded)
    logic border;      // 3x3: M0 or M2 replaced a product at a row border
    logic drain_wait;  // bubble: P banks still being emptied
    logic preload;     // 3x3: step started after a gap (preload cycle)
    logic zero_row;    // pruned row of the last channel run with zero weights
  } ev_t;

  // Saturating conversion of a partial sum to an output word.
  function automatic word_t to_word(acc_t v, int unsigned frac);
    acc_t s;
    s = v >>> frac;
    if (s > acc_t'(32767))       return word_t'(16'sh7fff);
    else if (s < acc_t'(-32768)) return word_t'(16'sh8000);
    else                         return word_t'(s[DW-1:0]);
  endfunction

endpackage
