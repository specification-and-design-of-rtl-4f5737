// tb_dequantizer: self-checking test of the JPEG dequantizer.
//
// The DUT reads its step sizes from a small table model in the testbench. That
// table is the JPEG luminance table, with random entries in later blocks and
// entries of 1 and 255 mixed in. Several blocks of random coefficients are sent
// under random input gaps and random output back-pressure. Every output is
// compared with an integer reference (tb_jpeg_ref_pkg), and so is out_last on the
// 64th output of each block. A run with out_ready held high checks the
// one-coefficient-per-clock rate and the one-clock latency. A watchdog ends a hung run.
module tb_dequantizer;
  import tb_jpeg_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  logic               in_valid = 1'b0, in_ready, out_valid, out_ready = 1'b0, out_last;
  logic signed [11:0] in_data = '0, out_data;
  logic [5:0]         q_addr;
  logic [7:0]         q_data;
  int                 qtab [64];

  assign q_data = 8'(qtab[q_addr]);

  dequantizer dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int expq [$];
  int nout = 0;
  bit full_rate = 1'b0;
  longint first_in, last_out;

  // output monitor, samples the handshake before the rising edge
  always @(negedge clk) begin
    if (!reset) begin
      out_ready = full_rate ? 1'b1 : (($urandom % 3) != 0);
      if (out_valid && out_ready) begin
        automatic int e = expq.pop_front();
        checks++;
        if (int'(out_data) != e) begin
          failures++;
          if (failures < 10) $display("out %0d got %0d exp %0d", nout, out_data, e);
        end
        checks++;
        if (out_last != ((nout % 64) == 63)) begin failures++; $display("out_last wrong at %0d", nout); end
        nout++;
        last_out = cyc + 1;
      end
    end
  end

  task automatic send_block(bit gaps);
    int din [64];
    for (int k = 0; k < 64; k++) begin
      int n = k;
      din[k] = (n % 3 == 0) ? int'($urandom % 4096) - 2048 : int'($urandom % 61) - 30;
    end
    for (int k = 0; k < 64; k++) begin
      int qv;
      @(negedge clk);
      while (gaps && ($urandom % 4) == 0) begin in_valid = 1'b0; @(negedge clk); end
      in_valid = 1'b1; in_data = 12'(din[k]);
      #1;
      while (!in_ready) begin @(negedge clk); #1; end
      qv = qtab[k];
      expq.push_back(dequant_ref(int'(din[k]), qv));
      if (k == 0 && !gaps) first_in = cyc + 1;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  initial begin
    for (int i = 0; i < 64; i++) qtab[i] = luma_q(i);
    #12 reset = 1'b0;
    send_block(1'b1);
    send_block(1'b1);
    for (int b = 0; b < 3; b++) begin
      wait (expq.size() == 0);
      for (int i = 0; i < 64; i++) qtab[i] = 1 + int'($urandom % 255);
      qtab[0] = 1; qtab[63] = 255;
      send_block(1'b1);
    end
    wait (expq.size() == 0);
    // full rate: 64 coefficients back to back, each result one clock later
    full_rate = 1'b1;
    @(negedge clk);
    send_block(1'b0);
    wait (expq.size() == 0);
    checks++;
    if (last_out - first_in != 64) begin
      failures++;
      $display("full-rate block took %0d clocks from first in to last out, expected 64", last_out - first_in);
    end
    checks++;
    if (nout != 6 * 64) begin failures++; $display("got %0d outputs", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
