// sad_unit_tb: feeds random pixel pairs to one SAD unit and compares the sum
// with an independently accumulated reference; also checks clear and hold.
module sad_unit_tb;
  logic clk = 0, clr, en;
  logic [7:0] cur, ref_px;
  logic [15:0] sad;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sad_unit dut (.clk, .clr, .en, .cur, .ref_px, .sad);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_sum;
    clr = 1; en = 0; cur = 0; ref_px = 0;
    @(posedge clk); #1;
    checks++; if (sad !== 0) failures++;
    for (int t = 0; t < 4; t++) begin
      clr = 1; @(posedge clk); #1; clr = 0;
      expect_sum = 0;
      for (int i = 0; i < 256; i++) begin
        cur = 8'($urandom); ref_px = 8'($urandom);
        if (t == 3) begin cur = (i % 2) ? 8'd255 : 8'd0; ref_px = 8'd255 - cur; end
        en = ($urandom_range(0, 3) != 0) || t == 3;
        if (en) expect_sum += (cur > ref_px) ? cur - ref_px : ref_px - cur;
        @(posedge clk); #1;
      end
      en = 0;
      checks++;
      if (sad !== 16'(expect_sum)) begin
        failures++;
        $display("round %0d: sad %0d expected %0d", t, sad, expect_sum);
      end
      @(posedge clk); #1;
      checks++; if (sad !== 16'(expect_sum)) failures++;   // holds
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
