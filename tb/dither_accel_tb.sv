// dither_accel_tb: uses the dithering accelerator as the application does:
// two stores (left, right) and one load of the merged output, back to back,
// for a run of stereo samples. Every output is compared with two independent
// reference dithers. Checks that each result is ready within CLK_DIV bus
// cycles (12 CPU cycles) of its store, and that the input registers read back.
module dither_accel_tb;
  import osif_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_req = 0, s_rnw = 0, s_ack;
  logic [3:0] s_addr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  dither_state_t sl, sr;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dither_accel dut (.clk, .rst_n, .s_req, .s_rnw, .s_addr, .s_wdata, .s_ack, .s_rdata);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus(input logic rnw, input logic [3:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    s_req = 1; s_rnw = rnw; s_addr = a; s_wdata = d;
    do begin @(posedge clk); #1; end while (!s_ack);
    q = s_rdata; s_req = 0;
  endtask

  initial begin
    logic [31:0] q;
    sl = '{0, 0, 0, 0}; sr = '{0, 0, 0, 0};
    repeat (3) @(posedge clk); #1 rst_n = 1;
    repeat ($urandom_range(0, 3)) @(posedge clk);
    for (int i = 0; i < 1000; i++) begin
      int xl, xr;
      shortint el, er;
      xl = int'($urandom) >>> 3;
      xr = int'($urandom) >>> 4;
      bus(0, 4'h0, xl, q);
      bus(0, 4'h4, xr, q);
      el = dither_ref(sl, xl);
      er = dither_ref(sr, xr);
      // the right result must be ready CLK_DIV cycles after its store
      repeat (3) @(posedge clk);
      #1 checks++;
      if (dut.out_r !== er) failures++;
      bus(1, 4'h8, 0, q);
      checks++;
      if (q !== {el, er}) begin
        failures++;
        if (failures < 10) $display("pair %0d: %h expected %h", i, q, {el, er});
      end
      if (i % 100 == 0) begin
        bus(1, 4'h0, 0, q); checks++; if (q !== xl) failures++;
        bus(1, 4'h4, 0, q); checks++; if (q !== xr) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
