// tb_dct8x8: self-checking test of the 8x8 forward and inverse DCT engine.
//
// Two instances run: a forward transform (8-bit samples in, 12-bit coefficients out)
// and an inverse one (12-bit coefficients in, 8-bit saturated samples out). Each gets
// random blocks, a constant block and an extreme block. Outputs are compared with a
// direct floating-point evaluation of the DCT definition; at most 1 LSB of fixed-point
// error is allowed. The outputs are read under random back-pressure. Also checked:
// the 129-clock latency from the last input taken to the first output taken, and
// out_last on exactly the 64th output. A watchdog ends a hung run.
module tb_dct8x8;
  import tb_jpeg_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // forward
  logic f_iv, f_ir, f_ov, f_or, f_ol;
  logic signed [7:0]  f_id;
  logic signed [11:0] f_od;
  dct8x8 #(.INVERSE(1'b0), .IN_W(8), .OUT_W(12)) u_f (
    .clk, .reset, .in_valid(f_iv), .in_ready(f_ir), .in_data(f_id),
    .out_valid(f_ov), .out_ready(f_or), .out_data(f_od), .out_last(f_ol));
  // inverse
  logic i_iv, i_ir, i_ov, i_or, i_ol;
  logic signed [11:0] i_id;
  logic signed [7:0]  i_od;
  dct8x8 #(.INVERSE(1'b1), .IN_W(12), .OUT_W(8)) u_i (
    .clk, .reset, .in_valid(i_iv), .in_ready(i_ir), .in_data(i_id),
    .out_valid(i_ov), .out_ready(i_or), .out_data(i_od), .out_last(i_ol));

  initial begin
    #2000000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(bit inv, blk_i din, blk_r expect_r, int lo, int hi);
    longint t_last, t_first;
    int n;
    // load: drive at the falling edge, the transfer happens at the next rising edge
    for (int k = 0; k < 64; k++) begin
      @(negedge clk);
      if (inv) begin i_iv = 1'b1; i_id = 12'(din[k]); end
      else     begin f_iv = 1'b1; f_id = 8'(din[k]);  end
      while (!(inv ? i_ir : f_ir)) @(negedge clk);
      t_last = cyc + 1;
    end
    @(negedge clk);
    i_iv = 1'b0; f_iv = 1'b0;
    // drain with random back-pressure
    n = 0;
    t_first = -1;
    while (n < 64) begin
      bit rdy = ($urandom % 4) != 0;
      if (inv) i_or = rdy; else f_or = rdy;
      if ((inv ? i_ov : f_ov) && t_first < 0) t_first = cyc + 1;
      if ((inv ? i_ov : f_ov) && rdy) begin
        int got = inv ? int'(i_od) : int'(f_od);
        int e = clamp(round_r(expect_r[n]), lo, hi);
        bit lst = inv ? i_ol : f_ol;
        checks++;
        if (got - e > 1 || e - got > 1) begin
          failures++;
          if (failures < 10) $display("%s idx %0d got %0d exp %0d (%f)", inv ? "IDCT" : "FDCT", n, got, e, expect_r[n]);
        end
        checks++;
        if (lst != (n == 63)) begin failures++; $display("out_last wrong at %0d", n); end
        n++;
      end
      @(negedge clk);
    end
    i_or = 1'b0; f_or = 1'b0;
    checks++;
    if (t_first - t_last != 129) begin
      failures++;
      $display("latency %0d, expected 129", t_first - t_last);
    end
  endtask

  initial begin
    blk_i b;
    f_iv = 0; i_iv = 0; f_or = 0; i_or = 0; f_id = 0; i_id = 0;
    repeat (3) @(posedge clk);
    reset <= 1'b0;
    @(posedge clk);
    // forward transform
    for (int t = 0; t < 6; t++) begin
      for (int k = 0; k < 64; k++)
        case (t)
          0: b[k] = 100;                                // constant block
          1: b[k] = ((k / 8 + k % 8) % 2) ? 127 : -128; // checkerboard, extreme
          default: b[k] = int'($urandom % 256) - 128;
        endcase
      run_block(1'b0, b, fdct_ref(b), -2048, 2047);
    end
    // inverse transform
    for (int t = 0; t < 6; t++) begin
      for (int k = 0; k < 64; k++)
        case (t)
          0: b[k] = (k == 0) ? 800 : 0;                 // DC only
          1: b[k] = (k == 0) ? 2047 : (k == 9 ? -1500 : 0); // saturating
          default: b[k] = (k < 16) ? int'($urandom % 401) - 200 : int'($urandom % 21) - 10;
        endcase
      run_block(1'b1, b, idct_ref(b), -128, 127);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
