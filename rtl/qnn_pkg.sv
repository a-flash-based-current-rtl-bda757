// qnn_pkg: types and constants shared by the flash-based current-mode QNN
// accelerator.
//
// Weights are 9-valued, w in {-4..+4}. A weight is held by a pair of flash
// branches (one in the left and one in the right input network); its magnitude
// selects one of five threshold voltages and its sign selects the branch that
// conducts. The weight_t encoding (4-bit two's complement) and the programming
// bus layout are choices of this implementation; the set of threshold voltages
// and the 9-valued weight set follow the design description.
//
// Activations on binary layers are one bit: 1 encodes +1 and 0 encodes -1.
package qnn_pkg;

  // Signed weight, legal range -4..+4.
  typedef logic signed [3:0] weight_t;

  // Flash threshold voltage (mV) that sets a branch to carry |w| unit currents.
  // A lower threshold conducts more current; 2 V keeps the branch off (w = 0).
  function automatic int vth_mv(int mag);
    case (mag)
      4:       return 862;
      3:       return 908;
      2:       return 962;
      1:       return 1037;
      default: return 2000;
    endcase
  endfunction

  // Weights written per programming beat.
  localparam int PROG_CHUNK = 64;

  // Programming bus, broadcast to every layer. One beat writes PROG_CHUNK
  // consecutive weights of one node (w_we) or that node's threshold (t_we).
  typedef struct packed {
    logic                    w_we;
    logic                    t_we;
    logic [4:0]              layer;
    logic [12:0]             node;
    logic [13:0]             chunk;   // branch index / PROG_CHUNK
    logic [PROG_CHUNK*4-1:0] wdata;   // weight k of the chunk in [4k+3:4k]
    logic signed [31:0]      tdata;   // node threshold T (batch normalization)
  } prog_t;

  // Per CONV layer run-time configuration.
  typedef struct packed {
    logic        en;        // layer used
    logic        part;      // layer partitioning: one node fires per cycle
    logic [15:0] img_w;     // input feature map width  (before padding)
    logic [15:0] img_h;     // input feature map height (before padding)
    logic [3:0]  pad_lo;    // zero pixels added before the first row/column
    logic [3:0]  pad_hi;    // zero pixels added after the last row/column
    logic [3:0]  k;         // kernel size k x k
    logic [3:0]  stride;
    logic [12:0] n_filt;    // filters (nodes) used
  } conv_cfg_t;

  // Per MAXPOOL layer run-time configuration.
  typedef struct packed {
    logic        en;
    logic [15:0] img_w;
    logic [15:0] img_h;
    logic [3:0]  k;         // pooling window k x k, k <= 3
    logic [3:0]  stride;
  } pool_cfg_t;

  // Per FC layer run-time configuration.
  typedef struct packed {
    logic        en;
    logic        part;       // layer partitioning
    logic [5:0]  src;        // input multiplexer selection
    logic [15:0] n_words;    // words that make one input vector
    logic [12:0] word_bits;  // useful bits per word (channels of the source)
    logic [12:0] n_nodes;    // nodes used
  } fc_cfg_t;

endpackage
