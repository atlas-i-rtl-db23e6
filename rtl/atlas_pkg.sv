// atlas_pkg: types and constants shared by the ATLAS I switch core.
//
// The switch has 16 input and 16 output links, a shared buffer of 256 ATM
// cells, three service classes and multi-lane credit flow control; those
// numbers follow the published description of the chip. The ATM header layout
// is the standard UNI one (GFC, VPI, VCI, PTI, CLP, HEC). The flow-group width,
// the size of the translation table and the cycles per cell are choices of this
// design and are explained where they are used.
package atlas_pkg;

  // Published chip dimensions.
  localparam int unsigned N_LINKS    = 16;   // 16x16 switch
  localparam int unsigned N_CELLS    = 256;  // shared buffer, in cells
  localparam int unsigned N_CLASSES  = 3;    // service classes / priority levels
  localparam int unsigned CELL_BYTES = 53;   // ATM cell (5-byte header + 48-byte payload)

  // Choices of this design.
  localparam int unsigned FG_W        = 6;   // flow-group id width: 64 flow groups per link
  localparam int unsigned TT_VCI_BITS = 6;   // VCI bits that index the translation table
  localparam int unsigned CELL_CYCLES = 34;  // 680 ns cell time at a 50 MHz core clock
  localparam int unsigned N_VBUF      = 4;   // simulated buffers of the load monitor

  localparam int unsigned CELL_W = CELL_BYTES * 8;  // 424 bits

  // Service classes: 0 is the top priority (never back-pressured), 1 and 2
  // are the optionally back-pressured middle and low priorities.
  typedef enum logic [1:0] {
    CLS_HIGH = 2'd0,
    CLS_MID  = 2'd1,
    CLS_LOW  = 2'd2
  } svc_class_t;

  typedef struct packed {
    logic [3:0]  gfc;
    logic [7:0]  vpi;
    logic [15:0] vci;
    logic [2:0]  pti;
    logic        clp;
    logic [7:0]  hec;
  } atm_hdr_t;

  typedef struct packed {
    atm_hdr_t     hdr;
    logic [383:0] payload;
  } atm_cell_t;

  // Link characters, as delivered by a link receiver after decoding: a data
  // byte or a control character. A cell is one CH_BOC control character and 53
  // data bytes; a credit is one CH_CREDIT control character and one data byte
  // holding the flow group. Credits may appear between any two characters,
  // also inside a cell. The codes are choices of this design.
  typedef struct packed {
    logic       ctrl;
    logic [7:0] data;
  } link_char_t;

  localparam logic [7:0] CH_IDLE   = 8'h00;
  localparam logic [7:0] CH_BOC    = 8'h01;   // begin of cell
  localparam logic [7:0] CH_CREDIT = 8'h02;   // credit, flow group follows
  localparam int unsigned CHARS_PER_CELL   = CELL_BYTES + 1;  // 54
  localparam int unsigned CHARS_PER_CREDIT = 2;

  // One translation table entry.
  typedef struct packed {
    logic                       valid;
    logic [N_LINKS-1:0]         out_mask;  // multicast set of (bundle-leader) outputs
    svc_class_t                 cls;
    logic [7:0]                 new_vpi;
    logic [15:0]                new_vci;
    logic                       mon_en;    // feed this VC to the load monitor
    logic [$clog2(N_VBUF)-1:0]  mon_grp;   // which simulated buffer
  } tt_entry_t;

  // ATM HEC: CRC-8 (x^8 + x^2 + x + 1) over the first four header bytes,
  // XORed with the coset 0x55 (ITU-T I.432).
  function automatic logic [7:0] atm_hec(input logic [31:0] hdr4);
    logic [7:0] crc;
    crc = 8'h00;
    for (int i = 31; i >= 0; i--) begin
      logic fb;
      fb  = crc[7] ^ hdr4[i];
      crc = {crc[6:0], 1'b0} ^ (fb ? 8'h07 : 8'h00);
    end
    return crc ^ 8'h55;
  endfunction

endpackage
