// ahb_pkg: types and constants shared by every block of the AHB system.
//
// Holds the encodings of the AHB control fields (HTRANS transfer types,
// HBURST burst types, HSIZE transfer sizes, HRESP responses), the bus widths,
// and two structs that bundle the signals travelling from a master towards the
// slaves (address/control plus write data) and from a slave back towards the
// masters (read data, HREADY, HRESP). The HTRANS encoding (IDLE, BUSY, NONSEQ,
// SEQ) is the four-type table of the bus protocol; the 32-bit address and data
// widths and the remaining encodings follow the AMBA 2 AHB convention, since
// no other widths are given for this design.
package ahb_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned HMASTER_W = 4;

  // Transfer type (HTRANS[1:0]).
  typedef enum logic [1:0] {
    TRANS_IDLE   = 2'b00,  // no transfer wanted
    TRANS_BUSY   = 2'b01,  // master pauses inside a burst
    TRANS_NONSEQ = 2'b10,  // first beat of a burst, or a single transfer
    TRANS_SEQ    = 2'b11   // later beat of a burst, address follows the last
  } htrans_t;

  // Burst type (HBURST[2:0]).
  typedef enum logic [2:0] {
    BURST_SINGLE = 3'b000,
    BURST_INCR   = 3'b001,  // undefined length
    BURST_WRAP4  = 3'b010,
    BURST_INCR4  = 3'b011,
    BURST_WRAP8  = 3'b100,
    BURST_INCR8  = 3'b101,
    BURST_WRAP16 = 3'b110,
    BURST_INCR16 = 3'b111
  } hburst_t;

  // Transfer size (HSIZE[2:0]); only sizes up to the bus width are used.
  typedef enum logic [2:0] {
    SIZE_BYTE  = 3'b000,
    SIZE_HALF  = 3'b001,
    SIZE_WORD  = 3'b010
  } hsize_t;

  // Slave response (HRESP[1:0]).
  typedef enum logic [1:0] {
    RESP_OKAY  = 2'b00,
    RESP_ERROR = 2'b01,
    RESP_RETRY = 2'b10,
    RESP_SPLIT = 2'b11
  } hresp_t;

  // Signals a master drives onto the bus.
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_t           htrans;
    logic              hwrite;
    hsize_t            hsize;
    hburst_t           hburst;
    logic [DATA_W-1:0] hwdata;
  } ahb_m2s_t;

  // Signals a slave drives back.
  typedef struct packed {
    logic [DATA_W-1:0] hrdata;
    logic              hready;
    hresp_t            hresp;
  } ahb_s2m_t;

  // Number of beats of a fixed-length burst (1 for SINGLE and for INCR,
  // whose length the master decides).
  function automatic int unsigned burst_beats(hburst_t b);
    case (b)
      BURST_WRAP4,  BURST_INCR4:  return 4;
      BURST_WRAP8,  BURST_INCR8:  return 8;
      BURST_WRAP16, BURST_INCR16: return 16;
      default:                    return 1;
    endcase
  endfunction

  function automatic logic burst_is_wrap(hburst_t b);
    return (b == BURST_WRAP4) || (b == BURST_WRAP8) || (b == BURST_WRAP16);
  endfunction

endpackage
