// clos_udn_pkg: types and constants shared by the Clos-UDN switch.
//
// A packet is fixed-size and moves through the switch as a single word. Its
// header carries the absolute destination (output module j and output port h
// inside that module); each NoC router derives the next hop from it and its
// own mesh coordinates. The source fields and the sequence number are payload
// that the switch never inspects; testbenches use them to check delivery and
// ordering. Field widths are this design's choice (the switch only needs
// log2 of its dimensions); 8-bit index fields allow modules of up to 256.
package clos_udn_pkg;

  localparam int IDX_W = 8;   // width of each index field
  localparam int SEQ_W = 16;  // width of the payload sequence number

  typedef struct packed {
    logic [IDX_W-1:0] dst_om;    // j: destination output module (= CM mesh row)
    logic [IDX_W-1:0] dst_port;  // h: output port inside OM(j)
    logic [IDX_W-1:0] src_im;    // i: source input module
    logic [IDX_W-1:0] src_port;  // h: input port inside IM(i)
    logic [SEQ_W-1:0] seq;       // payload / sequence number
  } packet_t;

  // Router port numbering. Inputs: packets arriving from the west (previous
  // column or the LI link), from the router above (travelling south) and from
  // the router below (travelling north). Outputs: east, up (north), down (south).
  typedef enum logic [1:0] {
    DIR_E = 2'd0,  // output east / input west
    DIR_N = 2'd1,  // output towards row-1 / input from row-1
    DIR_S = 2'd2   // output towards row+1 / input from row+1
  } dir_e;

  localparam int NDIR = 3;

endpackage
