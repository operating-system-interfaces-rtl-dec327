// dct_frame_tb: sends random 8x8 blocks (level-shifted pixels and, once,
// full-range values) into the DCT frame, elements in a random order, with
// random gaps on the input and random back-pressure on the output. Every
// coefficient is compared with a real-valued DCT (tolerance one unit) and
// must come out in row-major order. Without stalls, the latency from the last
// input to the first output (65 cycles) and the one-per-cycle output rate are
// checked too, and four blocks sent back to back must enter without a stall
// and leave without a gap.
module dct_frame_tb;
  import osif_pkg::*;
  import osif_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_stall_o, out_stall_i = 0;
  frame_fwd_t in_i = '0, out_o;
  int checks = 0, failures = 0, stalls = 0;
  block_t blk;
  int expect_c [64];
  always #5 clk = ~clk;

  dct_frame dut (.clk, .rst_n, .in_i, .in_stall_o, .out_o, .out_stall_i);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_block(input int kind, input bit stress);
    int order [64];
    int got, t_last, t_first, t_end, t;
    for (int i = 0; i < 64; i++) begin
      order[i] = i;
      blk[i] = (kind == 0) ? shortint'($urandom_range(0, 255)) - 16'sd128
             : (kind == 1) ? shortint'($urandom_range(0, 8000)) - 16'sd4000
             : shortint'(((i / 8 + i % 8) % 2) ? 127 : -128);
    end
    if (stress) order.shuffle();
    for (int v = 0; v < 8; v++)
      for (int u = 0; u < 8; u++) expect_c[8*v + u] = dct_ref(blk, v, u);
    got = 0; t = 0; t_last = 0; t_first = -1; t_end = 0;
    fork
      begin
        for (int i = 0; i < 64; i++) begin
          in_i = '{valid: 1'b1, addr: 6'(order[i]), data: blk[order[i]]};
          while (in_stall_o) begin @(posedge clk); #1; end
          @(posedge clk); #1;
          in_i.valid = 0;
          t_last = t;
          if (stress) repeat ($urandom_range(0, 2)) begin @(posedge clk); #1; end
        end
      end
      begin
        while (got < 64) begin
          out_stall_i = stress && ($urandom_range(0, 3) == 0);
          if (out_o.valid && out_stall_i) stalls++;
          if (out_o.valid && !out_stall_i) begin
            int d;
            if (t_first < 0) t_first = t;
            d = int'(out_o.data) - expect_c[got];
            checks += 2;
            if (out_o.addr !== 6'(got)) failures++;
            if (d > 1 || d < -1) begin
              failures++;
              if (failures < 10) $display("coef %0d: %0d expected %0d", got, out_o.data, expect_c[got]);
            end
            got++;
            t_end = t;
          end
          @(posedge clk); #1;
        end
        out_stall_i = 0;
      end
      begin
        while (got < 64) begin @(posedge clk); #1; t++; end
      end
    join
    if (!stress) begin
      checks += 2;
      if (t_first - t_last != 65) begin failures++; $display("latency %0d", t_first - t_last); end
      if (t_end - t_first != 63) begin failures++; $display("drain %0d", t_end - t_first); end
    end
  endtask


  // Four blocks back to back, in address order, no gaps and no back-pressure:
  // the input must never stall and the outputs must follow without a gap.
  task automatic run_stream();
    block_t sblk [4];
    int sexp [4][64];
    int in_stalls = 0, got = 0, t = 0, t_first = -1, t_end = 0;
    for (int b = 0; b < 4; b++) begin
      for (int i = 0; i < 64; i++) sblk[b][i] = shortint'($urandom_range(0, 255)) - 16'sd128;
      for (int v = 0; v < 8; v++)
        for (int u = 0; u < 8; u++) sexp[b][8*v + u] = dct_ref(sblk[b], v, u);
    end
    out_stall_i = 0;
    fork
      begin
        for (int i = 0; i < 256; i++) begin
          in_i = '{valid: 1'b1, addr: 6'(i % 64), data: sblk[i / 64][i % 64]};
          while (in_stall_o) begin in_stalls++; @(posedge clk); #1; end
          @(posedge clk); #1;
        end
        in_i.valid = 0;
      end
      begin
        while (got < 256) begin
          if (out_o.valid) begin
            int d;
            if (t_first < 0) t_first = t;
            d = int'(out_o.data) - sexp[got / 64][got % 64];
            checks += 2;
            if (out_o.addr !== 6'(got % 64)) failures++;
            if (d > 1 || d < -1) failures++;
            got++;
            t_end = t;
          end
          @(posedge clk); #1; t++;
        end
      end
    join
    checks += 2;
    if (in_stalls != 0) begin failures++; $display("stream input stalls %0d", in_stalls); end
    if (t_end - t_first != 255) begin failures++; $display("stream output span %0d", t_end - t_first); end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run_block(0, 0);
    run_block(1, 0);
    run_block(2, 0);
    for (int i = 0; i < 5; i++) run_block(i % 2, 1);
    run_stream();
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
