// axi4_pkg: types and constants shared by the AXI4 master, the AXI4 slave and
// their testbenches.
//
// Widths follow the signal table of the AXI4 interface described for this
// design: 32-bit address and data, 4-bit transaction IDs, 3-bit burst size,
// 2-bit burst type, 2-bit lock, 4-bit cache and 3-bit protection fields.
// The burst length field is 8 bits wide (AXI4, up to 256 beats per burst),
// not the 4-bit field of the older AXI3 table. QOS and REGION fields are
// carried as in AXI4; the slave ignores them, as it ignores lock, cache and
// protection. Write data carries no ID (AXI4 has no WID).
//
// Each channel's payload is a packed struct; VALID and READY travel next to
// it as plain signals.
package axi4_pkg;

  localparam int unsigned ADDR_W = 32;
  localparam int unsigned DATA_W = 32;
  localparam int unsigned STRB_W = DATA_W / 8;
  localparam int unsigned ID_W   = 4;
  localparam int unsigned LEN_W  = 8;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [DATA_W-1:0] data_t;
  typedef logic [STRB_W-1:0] strb_t;
  typedef logic [ID_W-1:0]   id_t;
  typedef logic [LEN_W-1:0]  len_t;   // beats - 1
  typedef logic [2:0]        size_t;  // bytes per beat = 2**size

  typedef enum logic [1:0] {
    BURST_FIXED = 2'b00,
    BURST_INCR  = 2'b01,
    BURST_WRAP  = 2'b10
  } burst_t;

  typedef enum logic [1:0] {
    RESP_OKAY   = 2'b00,
    RESP_EXOKAY = 2'b01,
    RESP_SLVERR = 2'b10,
    RESP_DECERR = 2'b11
  } resp_t;

  // Address and control, the same for the write (AW) and read (AR) channels.
  typedef struct packed {
    id_t        id;
    addr_t      addr;
    len_t       len;
    size_t      size;
    burst_t     burst;
    logic [1:0] lock;
    logic [3:0] cache;
    logic [2:0] prot;
    logic [3:0] qos;
    logic [3:0] region;
  } ax_chan_t;

  // Write data channel (W).
  typedef struct packed {
    data_t data;
    strb_t strb;
    logic  last;
  } w_chan_t;

  // Write response channel (B).
  typedef struct packed {
    id_t   id;
    resp_t resp;
  } b_chan_t;

  // Read data channel (R).
  typedef struct packed {
    id_t   id;
    data_t data;
    resp_t resp;
    logic  last;
  } r_chan_t;

endpackage
