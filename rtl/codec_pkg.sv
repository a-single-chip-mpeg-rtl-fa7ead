// codec_pkg: types and constants shared by the blocks of the MPEG-2 codec.
// The main bus carries single-word transactions. A master holds a request (bus_req_t)
// stable until the bus answers with a one-cycle ack (bus_rsp_t); read data is valid
// with the ack. Addresses are word addresses. Addresses with bit 31 set select the
// hardware semaphore registers instead of the shared SDRAM. The word width (32 bits)
// is this design's choice; the architecture allows 32- or 64-bit main buses.
package codec_pkg;
  localparam int unsigned DW = 32;
  localparam int unsigned AW = 32;
  localparam int unsigned NUM_MM = 6;   // six media modules

  typedef struct packed {
    logic          req;
    logic          we;
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic          ack;
    logic [DW-1:0] rdata;
  } bus_rsp_t;

  // media module index on the main bus
  typedef enum logic [2:0] {
    MM_BITSTREAM = 3'd0,
    MM_AUDIO     = 3'd1,
    MM_VIDEO     = 3'd2,
    MM_ME        = 3'd3,
    MM_VIDEOPP   = 3'd4,
    MM_GENERAL   = 3'd5
  } mm_id_e;
endpackage
