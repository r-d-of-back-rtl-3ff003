// irpc_pkg: types and constants shared by the iRPC back-end board (BEB) firmware.
//
// The frame layouts follow the FEB<->BEB link definition: a 112-bit uplink user word
// (GBT wide-bus mode) and an 80-bit downlink user word (GBT frame mode). TDC data are
// 8-bit channel + 24-bit time. The split of the 24-bit time into a 12-bit bunch
// crossing number and a 12-bit fine time, the TP and event-word encodings and the
// orbit length are choices of this design.
package irpc_pkg;

  // ---- link and detector constants -------------------------------------------------
  localparam int unsigned UL_W       = 112;  // uplink user data (80 + 32 extra bits)
  localparam int unsigned DL_W       = 80;   // downlink user data
  localparam int unsigned HITS_PER_FRAME = 3;
  localparam int unsigned N_STRIPS   = 48;   // strips per half chamber
  localparam int unsigned N_CHAN     = 96;   // TDC channels per FEB (both strip ends)
  localparam int unsigned ORBIT_BX   = 3564; // bunch crossings per LHC orbit
  localparam int unsigned BCN_W      = 12;

  // ---- TDC data ---------------------------------------------------------------------
  typedef struct packed {
    logic [7:0]  chan;   // TDC channel 0..95
    logic [11:0] bx;     // bunch crossing of the hit (upper half of the time value)
    logic [11:0] fine;   // fine time inside the BX, 25 ns / 4096 per LSB
  } tdc_t;               // 32 bits

  typedef struct packed {
    logic valid;
    tdc_t d;
  } tdc_hit_t;           // 33 bits

  // ---- uplink frame (Fig. "uplink data format") -------------------------------------
  typedef struct packed {
    logic [2:0] misc_status;
    logic [2:0] sc_fifo_full;
    logic [2:0] data_fifo_full;
    logic       sc_frame;      // 0: detector data frame, 1: SC reply frame
    logic [2:0] rsvd;
    logic [2:0] data_valid;    // one bit per TDC data, [2] = first
    tdc_t [2:0] tdc;           // [2] = first (most significant) TDC data
  } ul_data_frame_t;

  typedef struct packed {
    logic [2:0]  misc_status;
    logic [2:0]  sc_fifo_full;
    logic [2:0]  data_fifo_full;
    logic        sc_frame;
    logic [5:0]  data_valid;   // one bit per 16-bit reply word, [5] = FPGA0 word N
    logic [5:0][15:0] rd;      // [5:4] FPGA0 N,N+1; [3:2] FPGA1; [1:0] FPGA2
  } ul_reply_frame_t;

  // ---- downlink frame (Fig. "downlink data format") ---------------------------------
  typedef struct packed {
    logic       resync;
    logic       bc0;
    logic       reset_sc_path;
    logic       flush_data_path;
    logic       mute_channels;
    logic [7:0] rsvd;
    logic [2:0] fpga_sel;      // one bit per FEB FPGA; 0 = no SC content in this frame
  } fast_ctrl_t;               // 16 bits

  typedef struct packed {
    logic [6:0]  rsvd;
    logic        wr;
    logic [7:0]  length;       // number of 16-bit words
    logic [15:0] addr;
    logic [15:0] wdata0;
    logic [15:0] wdata1;
  } sc_request_t;              // 64 bits; a payload frame carries 4 data words instead

  typedef struct packed {
    fast_ctrl_t  fc;
    logic [63:0] sc;
  } dl_frame_t;                // 80 bits

  // ---- trigger primitive --------------------------------------------------------------
  typedef struct packed {
    logic               valid;
    logic [5:0]         strip;   // central strip 0..47
    logic [2:0]         size;    // number of strips in the cluster
    logic signed [12:0] dt;      // t(end A) - t(end B) of the central strip, fine LSB
    logic signed [11:0] y;       // position along the strip, mm from the strip centre
  } tp_t;                        // 35 bits

  // ---- fast control commands kept in BEB registers -----------------------------------
  typedef struct packed {
    logic resync;
    logic reset_sc_path;
    logic flush_data_path;
    logic mute_channels;
  } fc_cmd_t;

  // ---- readout event words (64 bit) ---------------------------------------------------
  typedef enum logic [3:0] {
    W_HEADER   = 4'hA,
    W_IN_HDR   = 4'h1,
    W_IN_DATA  = 4'h2,
    W_OUT_HDR  = 4'h3,
    W_OUT_DATA = 4'h4,
    W_TRAILER  = 4'hE
  } word_type_e;

  // Position along the strip: y = v * dt / 2 with v = 0.67 c (0.2009 mm/ps) and
  // 6.1035 ps per fine LSB gives 0.6131 mm per LSB, i.e. 157/256.
  localparam int Y_MUL   = 157;
  localparam int Y_SHIFT = 8;

endpackage
