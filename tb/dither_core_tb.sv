// dither_core_tb: streams samples (random, near full scale, and beyond full
// scale so that clipping happens) through one dithering block and compares
// every 16-bit result with the reference dither, whose state (error filter and
// random generator) is kept in the testbench. Checks that the result appears
// on the first enable after the load and then holds.
module dither_core_tb;
  import osif_ref_pkg::*;
  logic clk = 0, rst_n = 0, ce = 0, load = 0, pending;
  logic signed [31:0] din;
  logic signed [15:0] dout;
  dither_state_t st;
  int checks = 0, failures = 0, clips = 0;
  always #5 clk = ~clk;

  dither_core dut (.clk, .rst_n, .ce, .load, .din, .dout, .pending);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    shortint expect_out;
    st = '{0, 0, 0, 0};
    din = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      int x, kind;
      kind = $urandom_range(0, 3);
      unique case (kind)
        0: x = int'($urandom) >>> 3;                  // within +-1.0
        1: x = $signed($urandom_range(0, 32'h0FFF_0000)) - 32'sh07FF_8000;
        2: x = ($urandom_range(0, 1) ? 1 : -1) * int'($urandom_range(32'h1000_0000, 32'h3000_0000));
        default: x = int'($urandom_range(0, 1000)) - 500;
      endcase
      if (x > 32'sh0FFF_FFFF || x < -32'sh1000_0000) clips++;
      din = x; load = 1;
      @(posedge clk); #1;
      load = 0;
      checks++; if (!pending) failures++;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      #1 ce = 1;
      @(posedge clk); #1;
      ce = 0;
      expect_out = dither_ref(st, x);
      checks += 2;
      if (pending) failures++;
      if (dout !== expect_out) begin
        failures++;
        if (failures < 10) $display("sample %0d: x=%h out %h expected %h", i, x, dout, expect_out);
      end
      ce = 1; @(posedge clk); #1; ce = 0;       // an enable with nothing pending
      checks++; if (dout !== expect_out) failures++;
    end
    checks++; if (clips == 0) failures++;
    $display("clipping samples: %0d", clips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
