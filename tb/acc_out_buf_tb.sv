// acc_out_buf_tb: writes 64 results in a random order with random gaps,
// checks that done pulses exactly once, after the last one, and reads the
// buffer back through the DMA port against the expected packing.
module acc_out_buf_tb;
  import osif_pkg::*;
  logic clk = 0, rst_n = 0, stall_o, clear = 0, done;
  frame_fwd_t in_i = '0;
  logic [3:0] r_addr = 0;
  logic [63:0] r_data;
  logic [15:0] vals [64];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  acc_out_buf dut (.clk, .rst_n, .in_i, .stall_o, .clear, .done, .r_addr, .r_data);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order [64];
    int dones;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int blk = 0; blk < 3; blk++) begin
      clear = 1; @(posedge clk); #1; clear = 0;
      for (int i = 0; i < 64; i++) order[i] = i;
      order.shuffle();
      dones = 0;
      for (int i = 0; i < 64; i++) begin
        vals[order[i]] = 16'($urandom);
        in_i = '{valid: 1'b1, addr: 6'(order[i]), data: vals[order[i]]};
        @(posedge clk); #1;
        in_i.valid = 0;
        if (done) dones++;
        checks++; if (stall_o) failures++;
        checks++;
        if (done != (i == 63)) begin failures++; $display("done after write %0d", i); end
        if (i < 63) repeat ($urandom_range(0, 2)) begin
          @(posedge clk); #1; if (done) dones++;
        end
      end
      @(posedge clk); #1;
      if (done) dones++;
      checks++;
      if (dones != 1) begin failures++; $display("done pulses %0d", dones); end
      for (int w = 0; w < 16; w++) begin
        r_addr = 4'(w); @(posedge clk); #1;
        checks++;
        if (r_data !== {vals[4*w], vals[4*w+1], vals[4*w+2], vals[4*w+3]}) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
