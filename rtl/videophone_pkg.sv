// videophone_pkg: state encoding of the video phone's call-control state machine.
//
// The twelve states and their names follow the state machine of the design:
// after reset the phone waits in IDLE, goes to RESPOND when the user answers or to
// ANS_MACHINE when not, then branches on whether an image is sent (IMAGEOUT_*)
// and whether one comes in (IMAGEIN_*, IOOIN_*, ANSIN_*), until the line is hung up.
// The 4-bit binary encoding is this design's own choice.
package videophone_pkg;

  typedef enum logic [3:0] {
    ST_HANGUP       = 4'd0,
    ST_IDLE         = 4'd1,
    ST_RESPOND      = 4'd2,
    ST_IMAGEOUT_ON  = 4'd3,  // user sends an image
    ST_IMAGEOUT_OFF = 4'd4,  // user sends no image
    ST_IMAGEIN_ON   = 4'd5,  // image sent, image received
    ST_IMAGEIN_OFF  = 4'd6,  // image sent, none received
    ST_IOOIN_ON     = 4'd7,  // no image sent, image received
    ST_IOOIN_OFF    = 4'd8,  // no image sent, none received
    ST_ANS_MACHINE  = 4'd9,  // call not answered: answering machine on
    ST_ANSIN_ON     = 4'd10, // answering machine, image received
    ST_ANSIN_OFF    = 4'd11  // answering machine, no image received
  } call_state_e;

  // Moore outputs of the state machine.
  typedef struct packed {
    logic video_rec;
    logic audio_rec;
    logic image_send;
    logic image_display;
  } call_out_t;

endpackage
