// Shared types and constants of the Puppis SSD-head accelerator.
//
// Puppis takes the outputs of the SSD confidence and box-modifier convolution
// layers from main memory and runs the four post-processing steps of an SSD
// detector in hardware: softmax, bounding-box decoding, non-maximum
// suppression and top-K selection. This package holds what the blocks share:
// the processing phases of the main state machine, the data formats and the
// memory-port and stream bundles the Arbiter routes.
//
// Number formats (the first three follow the description, the rest are choices
// of this design):
//   * all fixed-point values are 16 bits, floating-point values IEEE-754 binary32;
//   * confidences are signed 16-bit; the ECLUT address is conf >> 4 (12 bits);
//   * softmax scores and IoU values are unsigned Q1.15 (1.0 = 16'h8000);
//   * one main-memory word (32 bits) carries one 16-bit value in its low half;
//   * a decoded box is two words: {xmin, ymin} then {xmax, ymax} (x in the upper half).
package puppis_pkg;

  localparam int unsigned DW        = 32;    // AXI data width
  localparam int unsigned AW        = 32;    // AXI address width
  localparam int unsigned VW        = 16;    // fixed-point value width
  localparam int unsigned ECLUT_N   = 4096;  // ECLUT samples per table
  localparam int unsigned BLUT_N    = 1024;  // box exponential LUT entries
  localparam int unsigned CLS_W     = 5;     // class index width (up to 32 classes)
  localparam int unsigned BOX_W     = 11;    // box index width (up to 2048 boxes)

  localparam int unsigned MAX_LAYERS = 6;  // SSD convolution layer pairs (SCN)

  // Configuration written over AXI-lite (see puppis_regs for the map).
  typedef struct packed {
    logic                         start;        // one-cycle pulse
    logic                         auto_en;      // start on cnn_done
    logic [CLS_W:0]               num_classes;
    logic [3:0]                   num_layers;   // SCN
    logic [CLS_W:0]               cls_start;    // first class NMS visits
    logic [AW-1:0]                anchor_addr;
    logic [AW-1:0]                blut_addr;
    logic [AW-1:0]                score_addr;
    logic [AW-1:0]                result_addr;
    logic [VW-1:0]                var_x, var_y, var_w, var_h;
    logic [4:0]                   sh1, sh2;     // box-datapath barrel shifts
    logic [VW-1:0]                tval, tover;
    logic [7:0]                   topk;
    logic [MAX_LAYERS-1:0][15:0]  nbox;         // boxes per layer: H*W*boxes
    logic [MAX_LAYERS-1:0][AW-1:0] conf_addr;
    logic [MAX_LAYERS-1:0][AW-1:0] loc_addr;
    logic [MAX_LAYERS-1:0][AW-1:0] eclut_addr;
  } cfg_t;

  // Phases of the Control state machine.
  typedef enum logic [2:0] {
    PH_READY   = 3'd0,
    PH_SOFTMAX = 3'd1,
    PH_BOXES   = 3'd2,
    PH_NMS     = 3'd3,
    PH_SORT    = 3'd4
  } phase_e;

  // One port of an internal memory: a write and a synchronous read per cycle.
  typedef struct packed {
    logic          we;
    logic [11:0]   waddr;
    logic [DW-1:0] wdata;
    logic          re;
    logic [11:0]   raddr;
  } mem_req_t;

  // Where the Arbiter sends the read stream.
  typedef enum logic [2:0] {
    RD_NONE    = 3'd0,
    RD_MEM0    = 3'd1,   // table load into Memory 0 (ECLUT)
    RD_MEM1    = 3'd2,   // table load into Memory 1 (box LUT)
    RD_SOFTMAX = 3'd3,   // confidences into Softmax
    RD_BOXES   = 3'd4,   // box modifiers and anchors into Boxes
    RD_SORT    = 3'd5    // thresholded scores into Sort
  } rd_route_e;

  // Where the write stream comes from.
  typedef enum logic [1:0] {
    WR_NONE    = 2'd0,
    WR_SOFTMAX = 2'd1,   // normalised scores
    WR_CTRL    = 2'd2    // final detections
  } wr_route_e;

  // A final detection result kept in Memory 1 between NMS and SORT.
  typedef struct packed {
    logic [VW-1:0]    score;
    logic [CLS_W-1:0] cls;
    logic [BOX_W-1:0] box;
  } result_t;

  // Status read back over AXI-lite.
  typedef struct packed {
    phase_e        phase;
    logic          done;       // a frame finished since the last start
    logic          overflow;   // the sorter dropped candidates
    logic          err;        // AXI error response seen
    logic [15:0]   n_results;  // detections written by the last frame
  } status_t;

endpackage
