// acc_framework_tb: runs the switchable accelerator framework the way its
// device driver does, against a behavioural system memory: write the frame
// configuration over DCR, DMA one macroblock (64 x 16 bits) into the input
// buffer, start, poll the toggling done bit, DMA the output buffer back, and
// compare memory with reference results. Configurations: DCT then quantiser
// (the JPEG case), DCT alone, quantiser alone, no frame (copy), and the empty
// frame with a testbench accelerator attached (flips the low byte, stalls at
// random). Counts how often each mechanism happened: frame bypass,
// reconfiguration between blocks, back-pressure, inbound and outbound DMA
// bursts, done toggles; each must happen at least once.
module acc_framework_tb;
  import osif_pkg::*;
  import osif_ref_pkg::*;
  localparam logic [9:0] BASE = 10'h040;
  logic clk = 0, rst_n = 0;
  logic s_req = 0, s_rnw = 0, s_ack;
  logic [3:0] s_addr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic m_req, m_rnw, m_addr_ack, m_rd_valid, m_wr_ack;
  logic [31:0] m_addr;
  logic [4:0] m_beats;
  logic [63:0] m_rd_data, m_wdata;
  logic [9:0] dcr_addr = 0;
  logic dcr_read = 0, dcr_write = 0, dcr_ack;
  logic [31:0] dcr_wdata = 0, dcr_rdata;
  frame_fwd_t x_o, y_i;
  logic x_stall_i, y_stall_o;
  logic [2:0] frame_sel;
  logic busy;
  int checks = 0, failures = 0;
  int n_bypass = 0, n_switch = 0, n_stall = 0, n_dma_in = 0, n_dma_out = 0, n_done = 0;
  always #5 clk = ~clk;

  acc_framework #(.DCR_BASE(BASE)) dut (.*);
  sys_mem_model u_mem (.clk, .m_req, .m_rnw, .m_addr, .m_beats, .m_addr_ack,
                       .m_rd_valid, .m_rd_data, .m_wdata, .m_wr_ack);

  // accelerator in the empty frame: one register stage, flips the low byte,
  // and refuses input at random
  logic ext_busy;
  always_ff @(posedge clk) ext_busy <= ($urandom_range(0, 3) == 0);
  assign x_stall_i = ext_busy || (y_i.valid && y_stall_o);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_i <= '0;
    else if (!y_i.valid || !y_stall_o) begin
      y_i.valid <= x_o.valid && !x_stall_i;
      y_i.addr  <= x_o.addr;
      y_i.data  <= x_o.data ^ 16'h00FF;
    end
  end

  always_ff @(posedge clk) begin
    if (dut.link[0].valid && dut.link_stall[0]) n_stall <= n_stall + 1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic dcr(input bit wr, input logic [9:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    dcr_addr = a; dcr_wdata = d; dcr_write = wr; dcr_read = !wr;
    do begin @(posedge clk); #1; end while (!dcr_ack);
    q = dcr_rdata; dcr_read = 0; dcr_write = 0;
  endtask

  task automatic dma_reg(input logic rnw, input logic [3:0] a, input logic [31:0] d,
                         output logic [31:0] q);
    s_req = 1; s_rnw = rnw; s_addr = a; s_wdata = d;
    do begin @(posedge clk); #1; end while (!s_ack);
    q = s_rdata; s_req = 0;
  endtask

  task automatic dma(input bit out_dir, input int sys);
    logic [31:0] q;
    dma_reg(0, DMA_SYS, sys, q);
    dma_reg(0, DMA_LOC, 0, q);
    dma_reg(0, DMA_LEN, 128, q);
    dma_reg(0, DMA_CTRL, {30'd0, out_dir, 1'b1}, q);
    do dma_reg(1, DMA_CTRL, 0, q); while (q[0]);
    if (out_dir) n_dma_out++; else n_dma_in++;
  endtask

  logic [2:0] last_cfg = 3'b111;

  task automatic run_block(input logic [2:0] cfg, input int kind);
    block_t blk;
    int expect_v [64], tol [64];
    logic [31:0] q, st0;
    int polls;
    for (int i = 0; i < 64; i++)
      blk[i] = (kind == 0) ? shortint'($urandom_range(0, 255)) - 16'sd128
                           : shortint'($urandom_range(0, 2000)) - 16'sd1000;
    for (int i = 0; i < 64; i++) begin
      int v;
      v = int'(blk[i]); tol[i] = 0;
      if (cfg[0]) begin v = dct_ref(blk, i / 8, i % 8); tol[i] = 1; end
      if (cfg[1]) v = quant_ref(v, QTAB_REF[i]);
      if (cfg[2]) v = int'(shortint'(v) ^ 16'sh00FF);
      expect_v[i] = v;
      if (cfg[2] && tol[i] != 0) tol[i] = 300;   // an off-by-one before the flip spreads
    end
    for (int w = 0; w < 16; w++)
      u_mem.mem[32 + w] = {blk[4*w], blk[4*w+1], blk[4*w+2], blk[4*w+3]};
    for (int w = 0; w < 16; w++) u_mem.mem[64 + w] = '0;
    // driver sequence
    if (cfg != last_cfg) n_switch++;
    if (cfg != 3'b011) n_bypass++;
    last_cfg = cfg;
    dcr(1, BASE + DCR_CONFIG, 32'(cfg), q);
    dma(0, 32'h100);
    dcr(0, BASE + DCR_STATUS, 0, st0);
    dcr(1, BASE + DCR_START, 32'h1, q);
    polls = 0;
    do begin dcr(0, BASE + DCR_STATUS, 0, q); polls++; end
    while (q[0] == st0[0] && polls < 2000);
    checks++;
    if (q[0] == st0[0]) failures++; else n_done++;
    dma(1, 32'h200);
    for (int i = 0; i < 64; i++) begin
      int got, d;
      got = int'($signed(u_mem.mem[64 + i/4][63 - 16*(i%4) -: 16]));
      d = got - expect_v[i];
      checks++;
      if (d > tol[i] || d < -tol[i]) begin
        failures++;
        if (failures < 10) $display("cfg %b elem %0d: %0d expected %0d", cfg, i, got, expect_v[i]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    run_block(3'b011, 0);
    run_block(3'b011, 1);
    run_block(3'b001, 0);
    run_block(3'b010, 1);
    run_block(3'b000, 1);
    run_block(3'b100, 1);
    run_block(3'b111, 0);
    run_block(3'b011, 0);
    checks += 6;
    if (n_bypass == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_dma_in == 0) failures++;
    if (n_dma_out == 0) failures++;
    if (n_done == 0) failures++;
    $display("bypass=%0d switch=%0d stall=%0d dma_in=%0d dma_out=%0d done=%0d",
             n_bypass, n_switch, n_stall, n_dma_in, n_dma_out, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
