// quant_frame_tb: streams random coefficients (small, large, both signs and
// exact halves) with their element addresses into the quantiser, with random
// input gaps and random output back-pressure, and compares each result with
// rounded division by the default table entry. Checks that results leave in
// input order, and the
// pipeline latency of DIV_BITS + 2 = 19 cycles.
module quant_frame_tb;
  import osif_pkg::*;
  import osif_ref_pkg::*;
  logic clk = 0, rst_n = 0, in_stall_o, out_stall_i = 0;
  frame_fwd_t in_i = '0, out_o;
  int checks = 0, failures = 0, stalls = 0;
  int q_addr [$], q_val [$];
  always #5 clk = ~clk;

  quant_frame dut (.clk, .rst_n, .in_i, .in_stall_o, .out_o, .out_stall_i);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  int t = 0, t_in = -1, t_out = -1;
  always_ff @(posedge clk) begin
    t <= t + 1;
    if (rst_n && in_i.valid && !in_stall_o) begin
      q_addr.push_back(int'(in_i.addr));
      q_val.push_back(quant_ref(int'(in_i.data), QTAB_REF[in_i.addr]));
      if (t_in < 0) t_in <= t;
    end
    if (rst_n && out_o.valid && !out_stall_i) begin
      int a, v;
      a = q_addr.pop_front();
      v = q_val.pop_front();
      checks <= checks + 2;
      if (t_out < 0) t_out <= t;
      if (int'(out_o.addr) != a || int'(out_o.data) != v) begin
        failures <= failures + 1;
        $display("addr %0d: %0d expected %0d (addr %0d)", out_o.addr, out_o.data, v, a);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int phase = 0; phase < 2; phase++) begin
      for (int i = 0; i < 1500; i++) begin
        int c, kind;
        kind = $urandom_range(0, 3);
        unique case (kind)
          0: c = int'($urandom_range(0, 200)) - 100;
          1: c = int'($urandom_range(0, 65535)) - 32768;
          2: c = (int'($urandom_range(0, 40)) - 20) * QTAB_REF[i % 64] + QTAB_REF[i % 64] / 2;
          default: c = -((int'($urandom_range(0, 20))) * QTAB_REF[i % 64] + QTAB_REF[i % 64] / 2);
        endcase
        in_i = '{valid: 1'b1, addr: 6'(i % 64), data: 16'(c)};
        if (phase == 1) out_stall_i = ($urandom_range(0, 3) == 0);
        if (out_stall_i && out_o.valid) stalls++;
        while (in_stall_o) begin
          @(posedge clk); #1;
          if (phase == 1) out_stall_i = ($urandom_range(0, 3) == 0);
        end
        @(posedge clk); #1;
        in_i.valid = 0;
        if (phase == 1 && $urandom_range(0, 3) == 0) begin @(posedge clk); #1; end
      end
      out_stall_i = 0;
      repeat (30) @(posedge clk);
      #1;
    end
    checks++; if (q_addr.size() != 0) failures++;
    checks++; if (t_out - t_in != 19) begin failures++; $display("latency %0d", t_out - t_in); end
    checks++; if (stalls == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
