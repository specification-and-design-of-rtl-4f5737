// videophone_fsm: call-control state machine of the video phone (main controller).
//
// A Moore machine with twelve states (videophone_pkg::call_state_e). After reset it
// sits in IDLE; each clock it leaves IDLE for RESPOND if the user answers (an = 1)
// or for ANS_MACHINE if not. RESPOND branches on imo (the user sends an image) to
// IMAGEOUT_ON / IMAGEOUT_OFF, and those branch on imi (an image comes in) to the
// four conversation states IMAGEIN_ON/OFF and IOOIN_ON/OFF. ANS_MACHINE branches on
// imi to ANSIN_ON / ANSIN_OFF. Every conversation and answering-machine state holds
// until hang_up, then goes to HANGUP, which returns to IDLE on the next clock.
//
// Outputs are decoded from the state register only (no input-to-output paths):
//   IMAGEOUT_ON            image_send, image_display
//   IMAGEIN_ON, IOOIN_ON   video_rec, image_display
//   ANS_MACHINE, ANSIN_OFF audio_rec
//   ANSIN_ON               audio_rec, video_rec, image_display
//   all others             nothing
// Port names, the state names, the asynchronous active-high reset to IDLE and
// the transitions and outputs of all states but three follow the design's
// original state table. This design's own choices: the outputs of IMAGEIN_OFF and
// ANSIN_ON and the way ANSIN_ON is left (hold until hang_up, like every other
// answering and conversation state), and ANS_MACHINE going to ANSIN_ON on an
// incoming image and to ANSIN_OFF otherwise, as the operation flow chart shows.
//
// Timing: one state change per rising clk edge; outputs follow the state with no
// extra delay. reset is asynchronous, active high.
module videophone_fsm
  import videophone_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic        an,            // user answers the ring
  input  logic        hang_up,       // line hung up
  input  logic        imi,           // image coming in
  input  logic        imo,           // user asks to send an image
  output logic        audio_rec,
  output logic        image_display,
  output logic        image_send,
  output logic        video_rec,
  output call_state_e state
);

  call_state_e next_state;
  call_out_t   o;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= ST_IDLE;
    else       state <= next_state;
  end

  always_comb begin
    next_state = ST_HANGUP;
    unique case (state)
      ST_HANGUP:       next_state = ST_IDLE;
      ST_IDLE:         next_state = an  ? ST_RESPOND     : ST_ANS_MACHINE;
      ST_RESPOND:      next_state = imo ? ST_IMAGEOUT_ON : ST_IMAGEOUT_OFF;
      ST_IMAGEOUT_ON:  next_state = imi ? ST_IMAGEIN_ON  : ST_IMAGEIN_OFF;
      ST_IMAGEOUT_OFF: next_state = imi ? ST_IOOIN_ON    : ST_IOOIN_OFF;
      ST_ANS_MACHINE:  next_state = imi ? ST_ANSIN_ON    : ST_ANSIN_OFF;
      ST_IMAGEIN_ON, ST_IMAGEIN_OFF, ST_IOOIN_ON, ST_IOOIN_OFF,
      ST_ANSIN_ON, ST_ANSIN_OFF:
                       next_state = hang_up ? ST_HANGUP : state;
      default:         next_state = ST_HANGUP;
    endcase
  end

  always_comb begin
    o = '0;
    case (state)
      ST_IMAGEOUT_ON: begin o.image_send = 1'b1; o.image_display = 1'b1; end
      ST_IMAGEIN_ON,
      ST_IOOIN_ON:    begin o.video_rec = 1'b1; o.image_display = 1'b1; end
      ST_ANS_MACHINE,
      ST_ANSIN_OFF:   o.audio_rec = 1'b1;
      ST_ANSIN_ON:    begin o.audio_rec = 1'b1; o.video_rec = 1'b1; o.image_display = 1'b1; end
      default:        o = '0;
    endcase
  end

  assign audio_rec     = o.audio_rec;
  assign image_display = o.image_display;
  assign image_send    = o.image_send;
  assign video_rec     = o.video_rec;

  // Only the twelve defined encodings may ever be held.
  a_legal_state: assert property (@(posedge clk) disable iff (reset) state <= ST_ANSIN_OFF);

endmodule
