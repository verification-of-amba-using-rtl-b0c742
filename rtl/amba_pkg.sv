// amba_pkg: types and constants shared by the AHB and APB blocks.
//
// The AHB address/control bundle (ahb_ctl_t) is what a master drives in its
// one-cycle address phase; the response bundle (ahb_rsp_t) is what a slave
// drives in the data phase. Transfer kinds and responses use the AMBA 2.0
// encodings. The burst signal is a single bit, SINGLE or INC, as in the model
// this design follows; bursts are bounded at MAX_BEATS beats and a slave may
// insert at most MAX_WAITS wait states per burst, which together with one
// address cycle and one BUSY cycle gives the 34-cycle transfer bound.
package amba_pkg;

  localparam int unsigned ADDR_W    = 32;
  localparam int unsigned DATA_W    = 32;
  localparam int unsigned MAX_BEATS = 16;
  localparam int unsigned MAX_WAITS = 16;
  localparam int unsigned BEAT_W    = 5;   // holds 0..MAX_BEATS
  localparam int unsigned WAIT_W    = 5;   // holds 0..MAX_WAITS

  typedef enum logic [1:0] {
    HTRANS_IDLE = 2'b00,
    HTRANS_BUSY = 2'b01,
    HTRANS_NSQ  = 2'b10,
    HTRANS_SEQ  = 2'b11
  } htrans_e;

  typedef enum logic [1:0] {
    HRESP_OK    = 2'b00,
    HRESP_ERROR = 2'b01,
    HRESP_RETRY = 2'b10,
    HRESP_SPLIT = 2'b11
  } hresp_e;

  typedef enum logic {
    BURST_SINGLE = 1'b0,
    BURST_INC    = 1'b1
  } hburst_e;

  typedef enum logic [1:0] {
    APB_IDLE   = 2'b00,
    APB_SETUP  = 2'b01,
    APB_ENABLE = 2'b10
  } apb_state_e;

  // Address phase: driven by a master, routed to the slaves by the multiplexer
  typedef struct packed {
    htrans_e             htrans;
    hburst_e             hburst;
    logic                hwrite;
    logic [ADDR_W-1:0]   haddr;
  } ahb_ctl_t;

  // Data phase response of a slave
  typedef struct packed {
    logic                hready;
    hresp_e              hresp;
    logic [DATA_W-1:0]   hrdata;
  } ahb_rsp_t;

  // Command given to a generic master by its user
  typedef struct packed {
    logic                valid;
    logic                write;
    hburst_e             burst;
    logic [BEAT_W-1:0]   beats;   // 1..MAX_BEATS, forced to 1 for SINGLE
    logic [ADDR_W-1:0]   addr;
  } master_cmd_t;

  // How a generic slave answers its next transfer (the slave's environment)
  typedef struct packed {
    logic [WAIT_W-1:0]   waits;    // wait states before the answer
    hresp_e              resp;     // OK, or a two-cycle ERROR/RETRY/SPLIT
    logic                unsplit;  // release the master split on
  } slave_ctl_t;

  function automatic logic is_active(htrans_e t);
    return (t == HTRANS_NSQ) || (t == HTRANS_SEQ);
  endfunction

endpackage
