// tb_videophone_top: end-to-end test of the video phone core at its default size.
//
// Part 1, call control: every call scenario (answered or not, image sent or not,
// image received or not) is played through the state machine. The visited states
// and the four control outputs are checked against the expected sequence.
// Part 2, still images, external mode: pixel blocks are encoded, and the quantized
// coefficients at coef_out are checked against a floating-point FDCT and quantizer
// (1 step of tolerance). They are then fed back through coef_in, and the decoded
// pixels are checked against a floating-point dequantizer and IDCT of those same
// coefficients. A smooth block must come back close to the original: mean absolute
// error of at most 4 levels with the default table.
// Part 3, loopback mode: the same blocks, sent back to back, go through the internal
// encoder-to-decoder path. They must come back exactly as in external mode, with
// coef_out_valid and coef_in_ready held low.
// Part 4: both tables are reloaded with a finer table and parts 2 and 3 repeat.
// Every mechanism is counted and must occur at least once: each of the 12 call
// states, back-pressure stalls at pix_in, coef_out and pix_out, the loopback
// and external modes, table loads, and output clamping at 0 and 255. A watchdog ends
// a hung run.
module tb_videophone_top;
  import tb_jpeg_ref_pkg::*;
  import videophone_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic an = 0, hang_up = 0, imi = 0, imo = 0;
  logic audio_rec, image_display, image_send, video_rec;
  call_state_e call_state;
  logic loopback = 0;
  logic pix_in_valid = 0, pix_in_ready;
  logic [7:0] pix_in_data = '0;
  logic coef_out_valid, coef_out_ready = 0, coef_out_last;
  logic signed [11:0] coef_out_data;
  logic coef_in_valid = 0, coef_in_ready;
  logic signed [11:0] coef_in_data = '0;
  logic pix_out_valid, pix_out_ready = 0, pix_out_last;
  logic [7:0] pix_out_data;
  logic enc_qt_we = 0, dec_qt_we = 0;
  logic [5:0] enc_qt_addr = '0, dec_qt_addr = '0;
  logic [7:0] enc_qt_data = '0, dec_qt_data = '0;

  videophone_top dut (.*);

  // mechanism counters
  int st_seen [12];
  int n_pix_in_stall = 0, n_coef_out_stall = 0, n_pix_out_stall = 0;
  int n_loop_blocks = 0, n_ext_blocks = 0, n_table_loads = 0, n_clamp_lo = 0, n_clamp_hi = 0;

  always @(posedge clk) if (!reset) begin
    st_seen[int'(call_state)]++;
    if (pix_in_valid && !pix_in_ready)     n_pix_in_stall++;
    if (coef_out_valid && !coef_out_ready) n_coef_out_stall++;
    if (pix_out_valid && !pix_out_ready)   n_pix_out_stall++;
    if (pix_out_valid && pix_out_ready && pix_out_data == 8'd0)   n_clamp_lo++;
    if (pix_out_valid && pix_out_ready && pix_out_data == 8'd255) n_clamp_hi++;
    if (loopback && (coef_out_valid || coef_in_ready)) begin
      failures++; $display("loopback: external coefficient port active");
    end
  end

  initial begin
    #50000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- call control ----------------
  task automatic expect_state(call_state_e s, logic [3:0] outs);
    @(negedge clk);
    checks++;
    if (call_state != s || {video_rec, audio_rec, image_send, image_display} != outs) begin
      failures++;
      $display("call: state %s outs %b, expected %s %b", call_state.name(), 
               {video_rec, audio_rec, image_send, image_display}, s.name(), outs);
    end
  endtask

  task automatic call(bit answer, bit send, bit incoming);
    call_state_e conv;
    logic [3:0]  conv_o;
    an = answer; imo = send; imi = incoming; hang_up = 0;
    @(posedge clk);                       // IDLE -> RESPOND / ANS_MACHINE
    if (answer) begin
      expect_state(ST_RESPOND, 4'b0000);
      @(posedge clk);
      if (send) expect_state(ST_IMAGEOUT_ON, 4'b0011);
      else      expect_state(ST_IMAGEOUT_OFF, 4'b0000);
      case ({send, incoming})
        2'b11: begin conv = ST_IMAGEIN_ON;  conv_o = 4'b1001; end
        2'b10: begin conv = ST_IMAGEIN_OFF; conv_o = 4'b0000; end
        2'b01: begin conv = ST_IOOIN_ON;    conv_o = 4'b1001; end
        default: begin conv = ST_IOOIN_OFF; conv_o = 4'b0000; end
      endcase
    end else begin
      expect_state(ST_ANS_MACHINE, 4'b0100);
      if (incoming) begin conv = ST_ANSIN_ON;  conv_o = 4'b1101; end
      else          begin conv = ST_ANSIN_OFF; conv_o = 4'b0100; end
    end
    for (int k = 0; k < 4; k++) begin
      @(posedge clk);
      expect_state(conv, conv_o);
    end
    hang_up = 1;
    @(posedge clk);
    expect_state(ST_HANGUP, 4'b0000);
    hang_up = 0; an = 0; imo = 0; imi = 0;
    @(posedge clk);
    expect_state(ST_IDLE, 4'b0000);
  endtask

  // ---------------- still images ----------------
  int enc_q [64], dec_q [64];
  blk_i blocks [4];
  int ext_out [4][64];

  task automatic load_tables(int step);
    for (int i = 0; i < 64; i++) begin
      @(negedge clk);
      enc_q[i] = step + (i / 8 + i % 8);
      dec_q[i] = enc_q[i];
      enc_qt_we = 1; enc_qt_addr = 6'(i); enc_qt_data = 8'(enc_q[i]);
      dec_qt_we = 1; dec_qt_addr = 6'(i); dec_qt_data = 8'(dec_q[i]);
    end
    @(negedge clk);
    enc_qt_we = 0; dec_qt_we = 0;
    n_table_loads++;
  endtask

  task automatic send_pixels(blk_i p);
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      pix_in_valid = 1; pix_in_data = 8'(p[k]);
      #1;
      while (!pix_in_ready) begin @(negedge clk); #1; end
    end
    @(negedge clk);
    pix_in_valid = 0;
  endtask

  task automatic recv_pixels(output int got [64]);
    int n = 0;
    while (n < 64) begin
      @(negedge clk);
      pix_out_ready = ($urandom % 4) != 0;
      #1;
      if (pix_out_valid && pix_out_ready) begin
        got[n] = int'(pix_out_data);
        checks++;
        if (pix_out_last != (n == 63)) begin failures++; $display("pix_out_last wrong"); end
        n++;
      end
    end
    @(negedge clk);
    pix_out_ready = 0;
  endtask

  task automatic external_block(int b);
    blk_i s, cq, r;
    blk_r F, f;
    int n, got [64];
    for (int k = 0; k < 64; k++) s[k] = blocks[b][k] - 128;
    F = fdct_ref(s);
    send_pixels(blocks[b]);
    n = 0;
    while (n < 64) begin
      @(negedge clk);
      coef_out_ready = ($urandom % 4) != 0;
      #1;
      if (coef_out_valid && coef_out_ready) begin
        int e = quant_ref(clamp(round_r(F[n]), -2048, 2047), enc_q[n]);
        cq[n] = int'(coef_out_data);
        checks++;
        if (cq[n] - e > 1 || e - cq[n] > 1) begin
          failures++; $display("block %0d coef %0d got %0d exp %0d", b, n, cq[n], e);
        end
        checks++;
        if (coef_out_last != (n == 63)) begin failures++; $display("coef_out_last wrong"); end
        n++;
      end
    end
    @(negedge clk);
    coef_out_ready = 0;
    for (int k = 0; k < 64; k++) r[k] = dequant_ref(cq[k], dec_q[k]);
    f = idct_ref(r);
    fork
      begin
        for (int k = 0; k < 64; k++) begin
          @(negedge clk);
          coef_in_valid = 1; coef_in_data = 12'(cq[k]);
          #1;
          while (!coef_in_ready) begin @(negedge clk); #1; end
        end
        @(negedge clk);
        coef_in_valid = 0;
      end
      recv_pixels(got);
    join
    for (int k = 0; k < 64; k++) begin
      int e = clamp(round_r(f[k]), -128, 127) + 128;
      ext_out[b][k] = got[k];
      checks++;
      if (got[k] - e > 1 || e - got[k] > 1) begin
        failures++; $display("block %0d pixel %0d got %0d exp %0d", b, k, got[k], e);
      end
    end
    if (b == 0) begin
      int err = 0;
      for (int k = 0; k < 64; k++) err += (got[k] > blocks[b][k]) ? got[k] - blocks[b][k] : blocks[b][k] - got[k];
      checks++;
      if (err > 4 * 64) begin failures++; $display("smooth block error %0d too large", err); end
    end
    n_ext_blocks++;
  endtask

  task automatic loopback_blocks();
    int got [4][64];
    @(negedge clk);
    loopback = 1;
    fork
      for (int b = 0; b < 4; b++) send_pixels(blocks[b]);
      for (int b = 0; b < 4; b++) recv_pixels(got[b]);
    join
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < 64; k++) begin
        checks++;
        if (got[b][k] != ext_out[b][k]) begin
          failures++; $display("loopback block %0d pixel %0d got %0d, external gave %0d", b, k, got[b][k], ext_out[b][k]);
        end
      end
      n_loop_blocks++;
    end
    @(negedge clk);
    loopback = 0;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin enc_q[i] = luma_q(i); dec_q[i] = luma_q(i); end
    for (int k = 0; k < 64; k++) begin
      blocks[0][k] = 60 + 12 * (k / 8) + 6 * (k % 8);                  // smooth ramp
      blocks[1][k] = ((k / 8) < 4) ? 250 : 5;                           // hard edge, clamps
      blocks[2][k] = int'($urandom % 256);                              // noise
      blocks[3][k] = ((k % 8) < 4) ? 0 : 255;                           // vertical edge
    end
    repeat (2) @(negedge clk);
    reset = 0;
    for (int c = 0; c < 8; c++) call(c[2], c[1], c[0]);
    for (int b = 0; b < 4; b++) external_block(b);
    loopback_blocks();
    load_tables(2);
    for (int b = 0; b < 4; b++) external_block(b);
    loopback_blocks();

    for (int s = 0; s < 12; s++) begin
      checks++;
      if (st_seen[s] == 0) begin failures++; $display("call state %0d never reached", s); end
    end
    $display("mechanisms: pix_in stalls %0d, coef_out stalls %0d, pix_out stalls %0d, external blocks %0d, loopback blocks %0d, table loads %0d, clamps lo %0d hi %0d",
             n_pix_in_stall, n_coef_out_stall, n_pix_out_stall, n_ext_blocks, n_loop_blocks, n_table_loads, n_clamp_lo, n_clamp_hi);
    checks += 8;
    if (n_pix_in_stall == 0)   begin failures++; $display("no pix_in stall"); end
    if (n_coef_out_stall == 0) begin failures++; $display("no coef_out stall"); end
    if (n_pix_out_stall == 0)  begin failures++; $display("no pix_out stall"); end
    if (n_ext_blocks == 0)     begin failures++; $display("no external block"); end
    if (n_loop_blocks == 0)    begin failures++; $display("no loopback block"); end
    if (n_table_loads == 0)    begin failures++; $display("no table load"); end
    if (n_clamp_lo == 0)       begin failures++; $display("no clamp at 0"); end
    if (n_clamp_hi == 0)       begin failures++; $display("no clamp at 255"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
