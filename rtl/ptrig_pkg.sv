// ptrig_pkg: types and constants shared by the Pixel Trigger logic.
//
// The ALICE Silicon Pixel Detector has 120 half staves (40 in the inner
// layer, 80 in the outer one), each read out over one G-Link optical link
// carrying the Fast-OR bits of its 10 readout chips: 1200 bits every 100 ns.
// Ten OPTIN boards handle 12 links each and pass their 120 bits to the BRAIN
// processing FPGA on 64 double-data-rate lines. These counts follow the
// document. The G-Link word flags, the local-bus structs and the register
// numbering are this design's own choices.
package ptrig_pkg;

  localparam int unsigned N_LINKS         = 120;  // half staves / optical links
  localparam int unsigned INNER_LINKS     = 40;   // links 0..39 = inner layer (assumed order)
  localparam int unsigned CHIPS_PER_LINK  = 10;   // Fast-OR bits per link
  localparam int unsigned N_FASTOR        = N_LINKS * CHIPS_PER_LINK;  // 1200
  localparam int unsigned N_OPTIN         = 10;
  localparam int unsigned LINKS_PER_OPTIN = 12;
  localparam int unsigned FO_PER_OPTIN    = LINKS_PER_OPTIN * CHIPS_PER_LINK; // 120
  localparam int unsigned BUS_LINES       = 64;   // DDR lines per OPTIN board
  localparam int unsigned BUS_BITS        = 2 * BUS_LINES; // bits per clock on one board bus
  localparam int unsigned CLK_PER_FRAME   = 8;    // 100 ns at 80.16 MHz

  // Bit positions of the board frame (128 bits per clock on the DDR bus).
  localparam int unsigned FRM_VALID  = 120;
  localparam int unsigned FRM_PARITY = 121;
  localparam int unsigned FRM_ERROR  = 122;

  // Parallel output of one G-Link receiver (HDMP-1034 in 16-bit mode).
  typedef struct packed {
    logic        ready;   // link locked
    logic        cav;     // control word available
    logic        dav;     // data word available
    logic        error;   // frame error flagged by the receiver
    logic [15:0] data;    // word payload
  } glink_word_t;

  // Local bus: a single-cycle request, answered one cycle later.
  typedef struct packed {
    logic        we;      // write strobe
    logic        re;      // read strobe
    logic [15:0] addr;    // [15:12] device, [11:0] register word address
    logic [31:0] wdata;
  } lbus_req_t;

  typedef struct packed {
    logic        ack;
    logic [31:0] rdata;
  } lbus_rsp_t;

  // Device numbers on the local bus (addr[15:12]).
  localparam logic [3:0] DEV_BRAIN = 4'd10;   // OPTIN boards are devices 0..9
  localparam logic [3:0] DEV_CTRL  = 4'd11;

  localparam logic [31:0] ID_OPTIN = 32'h0F71_0001;
  localparam logic [31:0] ID_BRAIN = 32'hB7A1_0001;
  localparam logic [31:0] ID_CTRL  = 32'hC7A1_0001;

endpackage
