// acc_in_buf_tb: fills the input buffer with random 64-bit words, starts the
// streamer, and receives the 64 elements under random back-pressure. Checks
// element order, addresses and data (element i in word i/4, first element in
// the top 16 bits), that a held word does not change while stalled, that a
// start during a block is ignored, and the one-element-per-cycle rate without
// stalls.
module acc_in_buf_tb;
  import osif_pkg::*;
  logic clk = 0, rst_n = 0;
  logic w_en = 0, start = 0, busy, stall_i = 0;
  logic [3:0] w_addr = 0;
  logic [63:0] w_data = 0;
  frame_fwd_t out_o;
  logic [63:0] words [16];
  int checks = 0, failures = 0, stalls = 0;
  always #5 clk = ~clk;

  acc_in_buf dut (.clk, .rst_n, .w_en, .w_addr, .w_data, .start, .busy, .out_o, .stall_i);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input bit use_stall);
    int got, cycles;
    frame_fwd_t held;
    for (int i = 0; i < 16; i++) begin
      words[i] = {$urandom, $urandom};
      w_en = 1; w_addr = 4'(i); w_data = words[i];
      @(posedge clk); #1;
    end
    w_en = 0;
    start = 1; @(posedge clk); #1; start = 0;
    got = 0; cycles = 0;
    while (got < 64) begin
      stall_i = use_stall && ($urandom_range(0, 2) == 0);
      if (got == 10) start = 1;                     // ignored while busy
      if (out_o.valid) begin
        if (stall_i) begin
          held = out_o; stalls++;
        end else begin
          checks += 2;
          if (out_o.addr !== 6'(got)) failures++;
          if (out_o.data !== words[got/4][63 - 16*(got%4) -: 16]) failures++;
          got++;
        end
      end
      @(posedge clk); #1;
      start = 0;
      cycles++;
      if (stall_i && held.valid) begin
        checks++; if (out_o !== held) failures++;
        held.valid = 0;
      end
      if (cycles > 1000) break;
    end
    stall_i = 0;
    repeat (3) @(posedge clk); #1;
    checks += 2;
    if (busy) failures++;
    if (out_o.valid) failures++;
    if (!use_stall) begin
      checks++; if (cycles != 65) begin failures++; $display("cycles %0d", cycles); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run_block(0);
    run_block(1);
    run_block(1);
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
