// fw_ctrl_tb: exercises the framework control registers through the DCR port:
// configuration write and read-back, start pulse and busy, toggling of the
// done bit on each finished block, refusal of configuration changes and
// restarts while busy, and silence for addresses that are not its own.
module fw_ctrl_tb;
  import osif_pkg::*;
  localparam logic [9:0] BASE = 10'h040;
  logic clk = 0, rst_n = 0;
  logic [9:0] dcr_addr = 0;
  logic dcr_read = 0, dcr_write = 0, dcr_ack, start, block_done = 0, busy;
  logic [31:0] dcr_wdata = 0, dcr_rdata;
  logic [2:0] frame_sel;
  int checks = 0, failures = 0, starts = 0;
  always #5 clk = ~clk;
  always @(posedge clk) if (start) starts++;

  fw_ctrl #(.DCR_BASE(BASE)) dut (.clk, .rst_n, .dcr_addr, .dcr_read, .dcr_write,
    .dcr_wdata, .dcr_ack, .dcr_rdata, .frame_sel, .start, .block_done, .busy);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dcr(input bit wr, input logic [9:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    dcr_addr = a; dcr_wdata = d; dcr_write = wr; dcr_read = !wr;
    do begin @(posedge clk); #1; end while (!dcr_ack);
    q = dcr_rdata; dcr_read = 0; dcr_write = 0;
    @(posedge clk); #1;
  endtask

  initial begin
    logic [31:0] q;
    bit tog;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      dcr(1, BASE + DCR_CONFIG, 32'(i), q);
      dcr(0, BASE + DCR_CONFIG, 0, q);
      checks += 2;
      if (q !== 32'(i)) failures++;
      if (frame_sel !== 3'(i)) failures++;
    end
    dcr(0, BASE + DCR_STATUS, 0, q);
    tog = q[0];
    checks++; if (q[1]) failures++;
    for (int b = 0; b < 4; b++) begin
      dcr(1, BASE + DCR_CONFIG, 32'h3, q);
      dcr(1, BASE + DCR_START, 32'h1, q);
      checks += 3;
      if (starts != b + 1) failures++;
      if (!busy) failures++;
      dcr(1, BASE + DCR_CONFIG, 32'h1, q);      // ignored while busy
      dcr(1, BASE + DCR_START, 32'h1, q);       // ignored while busy
      if (frame_sel !== 3'h3 || starts != b + 1) failures++;
      dcr(0, BASE + DCR_STATUS, 0, q);
      checks++; if (q[0] !== tog || !q[1]) failures++;
      block_done = 1; @(posedge clk); #1 block_done = 0;
      dcr(0, BASE + DCR_STATUS, 0, q);
      checks++; if (q[0] === tog || q[1]) failures++;
      tog = q[0];
    end
    // not its address: no ack within 20 cycles
    dcr_addr = BASE + 10'd7; dcr_read = 1;
    repeat (20) begin
      @(posedge clk); #1;
      checks++; if (dcr_ack || dcr_rdata != 0) failures++;
    end
    dcr_read = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
