// fabbus_pkg: widths and transaction records of the FabHetero shared bus.
//
// The bus carries 64-bit byte addresses and 256-bit data beats (the widths
// of the published bus configuration). A master raises req with the other
// request fields and holds them until the one-clock ack of the response.
// Reads return the whole 256-bit beat that contains addr (32-byte
// aligned); writes update the bytes selected by wstrb in that beat.
// Every granted transaction is broadcast once on the snoop channel to the
// other masters; their snoop hits are ORed into the response's 'shared'
// flag (wired-OR response).
package fabbus_pkg;

  localparam int unsigned ADDR_W = 64;
  localparam int unsigned DATA_W = 256;
  localparam int unsigned STRB_W = DATA_W / 8;

  typedef struct packed {
    logic              req;
    logic              we;
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] wdata;
    logic [STRB_W-1:0] wstrb;
  } bus_req_t;

  typedef struct packed {
    logic              ack;
    logic [DATA_W-1:0] rdata;
    logic              shared;   // another master holds the line
  } bus_rsp_t;

  typedef struct packed {
    logic              valid;
    logic              we;
    logic [ADDR_W-1:0] addr;
  } snoop_t;

endpackage
