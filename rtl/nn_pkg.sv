// nn_pkg: types and constants shared by the neural-net processor chain.
//
// Activations and weights are block-floating-point tensors: every element of
// one tensor shares one exponent, so the datapath only ever sees signed
// significands. The exponent bookkeeping lives in firmware, which turns it into
// the per-instruction right shift applied by the auxiliary unit.
//
// An instruction describes one layer pass of a processor: a convolution (or a
// fully connected layer, which is a 1x1 convolution on a 1x1 image) or a max
// pooling. Tensors are stored height-width-channel, addressed by element; the
// stride fields let firmware place a layer's output at any channel offset, which
// is how concatenation is done. Field widths are this design's choice.
package nn_pkg;

  // Significand width of activations and weights (the design supports 8- and
  // 16-bit significands; 8 is the default).
  localparam int unsigned SIG_W  = 8;
  // Accumulator width: a DSP48E2 accumulator is 48 bits wide.
  localparam int unsigned ACC_W  = 48;
  // Bias width in the bias store.
  localparam int unsigned BIAS_W = 32;
  // Element address width of the tensor buffers.
  localparam int unsigned EADDR_W = 24;
  // Host configuration bus chunk width.
  localparam int unsigned CFG_W  = 64;

  typedef enum logic [1:0] {
    OP_CONV = 2'd0,  // convolution / fully connected through the MxV
    OP_POOL = 2'd1,  // max pooling through the pool unit
    OP_JUMP = 2'd2,  // continue at instruction 'jump_to'
    OP_HALT = 2'd3   // stop until the next start pulse
  } opcode_e;

  // Configuration targets of the host bus.
  typedef enum logic [1:0] {
    CFG_INSTR  = 2'd0,
    CFG_WEIGHT = 2'd1,
    CFG_BIAS   = 2'd2,
    CFG_INBIAS = 2'd3   // input-image bias registers
  } cfg_target_e;

  typedef struct packed {
    opcode_e              op;
    logic                 dest_next;      // 1: results go downstream, 0: own tensor buffer
    logic [7:0]           wait_ev;        // upstream events to consume before starting
    logic [7:0]           jump_to;        // OP_JUMP target
    logic [EADDR_W-1:0]   in_base;        // element address of input pixel (0,0), channel 0
    logic [15:0]          in_row_stride;  // elements between input rows
    logic [15:0]          in_pix_stride;  // elements between input pixels
    logic [15:0]          fx_stride;      // elements between filter taps along x
    logic [3:0]           conv_stride;    // convolution / pooling stride
    logic [9:0]           out_h;          // output rows
    logic [9:0]           out_w;          // output columns
    logic [3:0]           fy_n;           // filter rows
    logic [3:0]           fx_n;           // filter columns
    logic [7:0]           cb_n;           // input channel blocks (of N1 channels)
    logic [7:0]           groups;         // output channel groups (of N2*T channels)
    logic [19:0]          w_base;         // weight store word of group 0
    logic [15:0]          b_base;         // bias store word of group 0
    logic [EADDR_W-1:0]   out_base;       // element address of output pixel (0,0), channel 0
    logic [15:0]          out_row_stride; // elements between output rows
    logic [15:0]          out_pix_stride; // elements between output pixels
    logic [5:0]           shift;          // right shift back to SIG_W significands
    logic                 relu;           // apply ReLU
  } instr_t;

  localparam int unsigned INSTR_W = $bits(instr_t);

endpackage
