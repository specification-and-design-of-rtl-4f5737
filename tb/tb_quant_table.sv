// tb_quant_table: self-checking test of the quantization table memory.
//
// Checks that reset loads the JPEG standard luminance table, that writes
// replace single entries without disturbing the others, that a written 0 reads
// back as 1, and that a second reset restores the default table. Reads are
// combinational and are checked at the falling edge. A watchdog ends a hung run.
module tb_quant_table;
  import tb_jpeg_ref_pkg::*;

  logic clk = 1'b0, reset = 1'b1;
  always #5 clk = ~clk;
  logic       we = 1'b0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int model [64];

  quant_table dut (.*);

  initial begin
    #100000;
    failures++;
    $display("WATCHDOG expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(string what);
    for (int i = 0; i < 64; i++) begin
      raddr = 6'(i); #1;
      checks++;
      if (int'(rdata) != model[i]) begin
        failures++;
        if (failures < 10) $display("%s: entry %0d got %0d exp %0d", what, i, rdata, model[i]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) model[i] = luma_q(i);
    #12 reset = 1'b0;
    @(negedge clk);
    check_all("after reset");
    for (int n = 0; n < 200; n++) begin
      @(negedge clk);
      we = 1'b1; waddr = 6'($urandom); wdata = 8'($urandom);
      if (n % 17 == 0) wdata = 8'd0;
      model[waddr] = (wdata == 0) ? 1 : int'(wdata);
      @(negedge clk);
      we = 1'b0;
      raddr = waddr; #1;
      checks++;
      if (int'(rdata) != model[waddr]) begin failures++; $display("write %0d failed", waddr); end
    end
    check_all("after writes");
    reset = 1'b1; #3 reset = 1'b0;
    for (int i = 0; i < 64; i++) model[i] = luma_q(i);
    check_all("after second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
