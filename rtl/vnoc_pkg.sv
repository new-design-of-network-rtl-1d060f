// vnoc_pkg: types and constants shared by the virtual-router network.
// Linted on its own, the package reports its constants as unused parameters;
// the modules that import it use them.
//
// A link between two routers (or a router and a network interface) is a
// forward bundle (req, data, nb) and a backward acknowledge (ack_v, ack).
// A packet is a 32-bit header flit followed by P.length body flits; req is
// high for every cycle in which a flit of the packet is on data.  The
// receiver answers with a one-cycle ack_v strobe carrying one of the four
// acknowledge codes of the handshake: 00 header received, 01 body started,
// 11 whole packet received, 10 error (the sender keeps its copy and resends).
//
// Header layout (MSB first, in the order the fields are listed for the
// header): Y@S | X@S | @IP S | @IP D | P.length | Y@D | X@D.  The header is
// 32 bits, so P.length is 8 bits here; a packet must fit the 16-flit input
// buffer, so P.length is at most 15.  NB, the number of misroutes a packet
// has taken, travels beside the flit on the link, not in the header.
//
// From the publication: 32-bit header with fields Y/X source, source IP, destination IP,
// length, Y/X destination, and the four ack codes.  This design's choices: length narrowed to
// 8 bits (body flits, at most 15) so the header stays 32 bits; NB as a 4-bit side signal;
// ack_v strobe; East = x+1, North = y-1.
package vnoc_pkg;

  localparam int FLIT_W  = 32;
  localparam int COORD_W = 4;
  localparam int IPA_W   = 4;
  localparam int LEN_W   = 8;
  localparam int NB_W    = 4;
  localparam int NP      = 5;   // ports of an elementary router
  localparam int BUF_DEPTH = 16; // flits per input buffer

  typedef logic [FLIT_W-1:0] flit_t;

  // Port / direction numbering; the state signals STA.PW..STA.PL use it.
  typedef enum logic [2:0] {
    DIR_W = 3'd0,
    DIR_E = 3'd1,
    DIR_N = 3'd2,
    DIR_S = 3'd3,
    DIR_L = 3'd4
  } dir_e;

  typedef enum logic [1:0] {
    ACK_HDR  = 2'b00,  // header received
    ACK_BODY = 2'b01,  // reception of the rest started
    ACK_ERR  = 2'b10,  // transmission error: resend
    ACK_DONE = 2'b11   // whole packet received
  } ack_e;

  typedef struct packed {
    logic [COORD_W-1:0] ys;
    logic [COORD_W-1:0] xs;
    logic [IPA_W-1:0]   ips;
    logic [IPA_W-1:0]   ipd;
    logic [LEN_W-1:0]   len;
    logic [COORD_W-1:0] yd;
    logic [COORD_W-1:0] xd;
  } header_t;

  typedef struct packed {
    logic            req;
    flit_t           data;
    logic [NB_W-1:0] nb;
  } link_fwd_t;

  typedef struct packed {
    logic ack_v;
    ack_e ack;
  } link_bwd_t;

  localparam int FWD_W = $bits(link_fwd_t);
  localparam int BWD_W = $bits(link_bwd_t);

  localparam link_fwd_t FWD_IDLE = '{req: 1'b0, data: '0, nb: '0};
  localparam link_bwd_t BWD_IDLE = '{ack_v: 1'b0, ack: ACK_HDR};

  function automatic header_t make_header(
      input logic [COORD_W-1:0] xs, input logic [COORD_W-1:0] ys,
      input logic [IPA_W-1:0] ips, input logic [IPA_W-1:0] ipd,
      input logic [LEN_W-1:0] len,
      input logic [COORD_W-1:0] xd, input logic [COORD_W-1:0] yd);
    header_t h;
    h.ys = ys; h.xs = xs; h.ips = ips; h.ipd = ipd; h.len = len;
    h.yd = yd; h.xd = xd;
    return h;
  endfunction

  // Port chosen by dimension-order XY routing.  East is x+1, North is y-1.
  function automatic dir_e xy_dir(input logic [COORD_W-1:0] x, input logic [COORD_W-1:0] y,
                                  input logic [COORD_W-1:0] xd, input logic [COORD_W-1:0] yd);
    if (xd > x)      return DIR_E;
    else if (xd < x) return DIR_W;
    else if (yd < y) return DIR_N;
    else if (yd > y) return DIR_S;
    else             return DIR_L;
  endfunction

endpackage
