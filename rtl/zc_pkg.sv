// Shared types and constants of the zero-client large-format display.
//
// Image data travels between the host module and the chain of zero-client
// modules as fragments on a 32-bit word stream (valid/ready handshake with
// start- and end-of-packet marks). A fragment is one header word followed by
// FRAG_PIXELS pixel words:
//   header : [31:24] module ID of the screen the pixels belong to
//            [23:0]  pixel offset of the first pixel inside that screen
//                    (y * H_ACTIVE + x, raster order)
//   pixel  : [23:16] red, [15:8] green, [7:0] blue, [31:24] zero
// The fragment length of 20 pixels, the 24-bit colour and the 640x480 screen
// follow the prototype this design reproduces; the word layout is this
// design's own choice (the original carries the fragment in a UDP payload
// whose layout is not published).
package zc_pkg;

  localparam int unsigned FRAG_PIXELS = 20;   // pixels carried by one fragment
  localparam int unsigned WORD_W      = 32;   // stream and SRAM word width
  localparam int unsigned ID_W        = 8;    // module ID width
  localparam int unsigned OFFSET_W    = 24;   // pixel offset width

  typedef logic [23:0] rgb_t;

  // One beat of the fragment stream (valid and ready travel beside it).
  typedef struct packed {
    logic              sop;   // first word of a fragment (the header)
    logic              eop;   // last word of a fragment
    logic [WORD_W-1:0] data;
  } beat_t;

  typedef struct packed {
    logic [ID_W-1:0]     module_id;
    logic [OFFSET_W-1:0] offset;
  } frag_hdr_t;

  function automatic logic [WORD_W-1:0] pack_hdr(logic [ID_W-1:0] id,
                                                 logic [OFFSET_W-1:0] off);
    frag_hdr_t h;
    h.module_id = id;
    h.offset    = off;
    return h;
  endfunction

endpackage
