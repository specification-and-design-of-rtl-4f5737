// tb_videophone_fsm: self-checking test of the call-control state machine.
//
// A reference model kept in the testbench (its own integer state numbering and
// output table) runs beside the DUT. Directed call scenarios visit every
// state: answered call with/without sending and with/without receiving an image,
// and an unanswered call with/without an incoming image. Random inputs follow.
// Every clock the DUT's state and four outputs are compared with the model. A
// watchdog ends the run if it hangs.
module tb_videophone_fsm;
  import videophone_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  logic an = 1'b0, hang_up = 1'b0, imi = 1'b0, imo = 1'b0;
  logic audio_rec, image_display, image_send, video_rec;
  call_state_e state;
  int checks = 0, failures = 0;
  int visited [12];

  videophone_fsm dut (.*);

  always #5 clk = ~clk;

  // Reference: states 0..11 in the order HANGUP, IDLE, RESPOND, OUT_ON, OUT_OFF,
  // IN_ON, IN_OFF, IOO_ON, IOO_OFF, ANS, ANS_ON, ANS_OFF.
  int ref_st;
  function automatic int ref_next(int s, bit a, bit h, bit i_in, bit i_out);
    case (s)
      0: return 1;
      1: return a ? 2 : 9;
      2: return i_out ? 3 : 4;
      3: return i_in ? 5 : 6;
      4: return i_in ? 7 : 8;
      9: return i_in ? 10 : 11;
      default: return h ? 0 : s;
    endcase
  endfunction
  // {video_rec, audio_rec, image_send, image_display}
  function automatic logic [3:0] ref_out(int s);
    case (s)
      3:       return 4'b0011;
      5, 7:    return 4'b1001;
      9, 11:   return 4'b0100;
      10:      return 4'b1101;
      default: return 4'b0000;
    endcase
  endfunction

  task automatic step();
    @(posedge clk);
    ref_st = ref_next(ref_st, an, hang_up, imi, imo);
    #1;
    checks++;
    if (int'(state) != ref_st ||
        {video_rec, audio_rec, image_send, image_display} != ref_out(ref_st)) begin
      failures++;
      if (failures < 10)
        $display("MISMATCH t=%0t state=%0d exp=%0d outs=%b exp=%b", $time, state, ref_st,
                 {video_rec, audio_rec, image_send, image_display}, ref_out(ref_st));
    end
    visited[ref_st]++;
  endtask

  task automatic call(bit a, bit o, bit i, int talk);
    an = a; imo = o; imi = i; hang_up = 1'b0;
    repeat (3 + talk) step();
    hang_up = 1'b1; step(); // into HANGUP
    hang_up = 1'b0; an = 1'b0; imo = 1'b0; imi = 1'b0;
    step();                 // back to IDLE
  endtask

  initial begin
    #200000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_st = 1;
    repeat (2) @(posedge clk);
    #1 reset = 1'b0;
    checks++;
    if (state != ST_IDLE || {video_rec, audio_rec, image_send, image_display} != 4'b0) begin
      failures++; $display("reset state wrong");
    end
    for (int k = 0; k < 8; k++) call(k[2], k[1], k[0], k + 2);
    for (int n = 0; n < 3000; n++) begin
      an = 1'($urandom); imi = 1'($urandom); imo = 1'($urandom);
      hang_up = ($urandom % 4) == 0;
      step();
    end
    // asynchronous reset in the middle of a call
    an = 1'b1; step(); step();
    #2 reset = 1'b1; #1;
    checks++;
    if (state != ST_IDLE) begin failures++; $display("async reset failed"); end
    #2 reset = 1'b0; ref_st = 1;
    repeat (5) step();
    for (int s = 0; s < 12; s++) begin
      checks++;
      if (visited[s] == 0) begin failures++; $display("state %0d never reached", s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
