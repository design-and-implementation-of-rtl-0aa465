// ahb_pkg: types and constants shared by the 3-master / 4-slave AHB system.
//
// Signal widths follow the waveforms of the reference design: 32-bit HADDR,
// HWDATA and HRDATA, 2-bit HTRANS, HBURST, HRESP and HMASTER, 3-bit master
// state. HTRANS and HRESP use the AMBA AHB encodings. HBURST is a 2-bit field
// that only names the four burst kinds this system supports (single, INCR4,
// INCR8, INCR16); the values 0..3 are the ones seen on the reference
// waveforms. Consecutive beats of a burst are ADDR_INCR address units apart
// (the reference waveforms step 416, 418, 420, ...).
package ahb_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned ADDR_INCR = 2;

  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_t;

  typedef enum logic [1:0] {
    HRESP_OKAY  = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_t;

  typedef enum logic [1:0] {
    HBURST_SINGLE = 2'd0,
    HBURST_INCR4  = 2'd1,
    HBURST_INCR8  = 2'd2,
    HBURST_INCR16 = 2'd3
  } hburst_t;

  // Master FSM states, numbered as in the state diagram (0..7).
  typedef enum logic [2:0] {
    ST_IDLE        = 3'd0,
    ST_REQ         = 3'd1,
    ST_GRANT       = 3'd2,
    ST_WRITE       = 3'd3,
    ST_TRANS_WRITE = 3'd4,
    ST_TRANS_END   = 3'd5,
    ST_READ        = 3'd6,
    ST_TRANS_READ  = 3'd7
  } mst_state_t;

  // Address and control driven by a master (address phase) plus its write
  // data (data phase). This is the bundle the address/control and write data
  // multiplexers select from.
  typedef struct packed {
    logic [ADDR_W-1:0] haddr;
    htrans_t           htrans;
    logic              hwrite;
    logic [2:0]        hsize;
    hburst_t           hburst;
  } ahb_ctrl_t;

  // Response bundle driven by a slave and selected by the read data mux.
  typedef struct packed {
    logic [DATA_W-1:0] hrdata;
    logic              hready;
    hresp_t            hresp;
  } ahb_resp_t;

  // Number of beats of a burst kind.
  function automatic logic [4:0] burst_beats(hburst_t b);
    case (b)
      HBURST_INCR4:  return 5'd4;
      HBURST_INCR8:  return 5'd8;
      HBURST_INCR16: return 5'd16;
      default:       return 5'd1;
    endcase
  endfunction

endpackage
