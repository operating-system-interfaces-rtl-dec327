// osif_top_tb: end-to-end test of the whole fabric side at its default sizes.
// The testbench plays the processor and system memory and runs the three
// applications' accelerator calls, interleaved:
//   * motion estimation (direct access over the OCM): write a macroblock and
//     search area into the BRAM, set ready, poll done, read motion vector/SAD;
//   * dithering (direct access over the bus): two stores and one load per
//     stereo sample pair, checked against reference dithers;
//   * JPEG DCT + quantisation (indirect access through the framework): DCR
//     configuration, DMA in, start, poll the toggle, DMA out; also a DCT-only
//     block, a copy block and a block through an accelerator attached to the
//     empty frame (which stalls at random).
// Counts each mechanism (ME polls that found the accelerator busy, dither
// results ready before the load reached the accelerator, with the bus latency
// modelled, frame bypass, reconfiguration, back-pressure,
// DMA bursts both ways, done toggles) and fails any that never happened.
module osif_top_tb;
  import osif_pkg::*;
  import osif_ref_pkg::*;
  localparam logic [9:0] BASE = 10'h040;
  logic ocm_clk = 0, plb_clk = 0, ocm_rst_n = 0, plb_rst_n = 0;
  logic [8:0]  ocm_addr = 0;
  logic        ocm_en = 0;
  logic [3:0]  ocm_we = 0;
  logic [31:0] ocm_wdata = 0, ocm_rdata;
  logic        me_busy;
  logic dith_req = 0, dith_rnw = 0, dith_ack;
  logic [3:0] dith_addr = 0;
  logic [31:0] dith_wdata = 0, dith_rdata;
  logic dma_req = 0, dma_rnw = 0, dma_ack;
  logic [3:0] dma_addr = 0;
  logic [31:0] dma_wdata = 0, dma_rdata;
  logic m_req, m_rnw, m_addr_ack, m_rd_valid, m_wr_ack;
  logic [31:0] m_addr;
  logic [4:0] m_beats;
  logic [63:0] m_rd_data, m_wdata;
  logic [9:0] dcr_addr = 0;
  logic dcr_read = 0, dcr_write = 0, dcr_ack;
  logic [31:0] dcr_wdata = 0, dcr_rdata;
  frame_fwd_t x_o, y_i;
  logic x_stall_i, y_stall_o, fw_busy;
  logic [2:0] frame_sel;
  int checks = 0, failures = 0;
  int n_me_busy_polls = 0, n_dith_early = 0, n_bypass = 0, n_switch = 0, n_stall = 0,
      n_dma_in = 0, n_dma_out = 0, n_done = 0, n_me = 0;

  always #5 plb_clk = ~plb_clk;      // 100 MHz bus
  always #5 ocm_clk = ~ocm_clk;

  osif_top dut (.*);
  sys_mem_model u_mem (.clk(plb_clk), .m_req, .m_rnw, .m_addr, .m_beats, .m_addr_ack,
                       .m_rd_valid, .m_rd_data, .m_wdata, .m_wr_ack);

  // accelerator in the empty frame (flips the low byte, stalls at random)
  logic ext_busy;
  always_ff @(posedge plb_clk) ext_busy <= ($urandom_range(0, 3) == 0);
  assign x_stall_i = ext_busy || (y_i.valid && y_stall_o);
  always_ff @(posedge plb_clk or negedge plb_rst_n) begin
    if (!plb_rst_n) y_i <= '0;
    else if (!y_i.valid || !y_stall_o) begin
      y_i.valid <= x_o.valid && !x_stall_i;
      y_i.addr  <= x_o.addr;
      y_i.data  <= x_o.data ^ 16'h00FF;
    end
  end
  always_ff @(posedge plb_clk) begin
    for (int i = 0; i <= N_FRAMES; i++)
      if (dut.u_fw.link[i].valid && dut.u_fw.link_stall[i]) n_stall <= n_stall + 1;
  end

  initial begin
    repeat (1000000) @(posedge plb_clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ bus tasks
  task automatic ocm_write(input int a, input logic [31:0] d);
    ocm_addr = 9'(a); ocm_wdata = d; ocm_we = 4'hF; ocm_en = 1;
    @(posedge ocm_clk); #1;
    ocm_we = 0; ocm_en = 0;
  endtask
  task automatic ocm_read(input int a, output logic [31:0] d);
    ocm_addr = 9'(a); ocm_en = 1;
    @(posedge ocm_clk); #1;
    d = ocm_rdata; ocm_en = 0;
  endtask
  // A CPU access to the dithering accelerator: the request reaches the slave
  // two bus cycles after the CPU issues it and the CPU continues seven bus
  // cycles (about 21 CPU cycles) after issue, the uncontended bus latency.
  logic dith_ready_at_read;
  task automatic dith(input logic rnw, input logic [3:0] a, input logic [31:0] d,
                      output logic [31:0] q);
    int n;
    repeat (2) begin @(posedge plb_clk); #1; end
    if (rnw) dith_ready_at_read = !dut.u_dither.pend_l && !dut.u_dither.pend_r;
    dith_req = 1; dith_rnw = rnw; dith_addr = a; dith_wdata = d;
    n = 2;
    do begin @(posedge plb_clk); #1; n++; end while (!dith_ack);
    q = dith_rdata; dith_req = 0;
    while (n < 7) begin @(posedge plb_clk); #1; n++; end
  endtask
  task automatic dma_reg(input logic rnw, input logic [3:0] a, input logic [31:0] d,
                         output logic [31:0] q);
    dma_req = 1; dma_rnw = rnw; dma_addr = a; dma_wdata = d;
    do begin @(posedge plb_clk); #1; end while (!dma_ack);
    q = dma_rdata; dma_req = 0;
  endtask
  task automatic dcr(input bit wr, input logic [9:0] a, input logic [31:0] d,
                     output logic [31:0] q);
    dcr_addr = a; dcr_wdata = d; dcr_write = wr; dcr_read = !wr;
    do begin @(posedge plb_clk); #1; end while (!dcr_ack);
    q = dcr_rdata; dcr_read = 0; dcr_write = 0;
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

  // ------------------------------------------------------------ ME call
  task automatic me_call();
    mb_t mb;
    sa_t sa;
    byte unsigned flat [964];
    int pdx, pdy, rdx, rdy, rsad;
    logic [31:0] w, ctrl;
    pdx = $urandom_range(0, 15); pdy = $urandom_range(0, 15);
    for (int i = 0; i < 961; i++) sa[i] = 8'($urandom);
    for (int i = 0; i < 256; i++) mb[i] = 8'($urandom);
    for (int r = 0; r < 16; r++)
      for (int c = 0; c < 16; c++) sa[31*(r+pdy) + c + pdx] = mb[16*r + c];
    me_ref(mb, sa, rdx, rdy, rsad);
    for (int i = 0; i < 964; i++) flat[i] = (i < 961) ? sa[i] : 8'd0;
    for (int i = 0; i < 64; i++) ocm_write(i, {mb[4*i], mb[4*i+1], mb[4*i+2], mb[4*i+3]});
    for (int i = 0; i < 241; i++)
      ocm_write(64 + i, {flat[4*i], flat[4*i+1], flat[4*i+2], flat[4*i+3]});
    ocm_write(510, 32'h1);
    do begin
      ocm_read(510, ctrl);
      if (!ctrl[1]) n_me_busy_polls++;
    end while (!ctrl[1]);
    ocm_read(511, w);
    checks += 3;
    if ($signed(w[31:24]) !== 8'(rdx - 8) || $signed(w[23:16]) !== 8'(rdy - 8)) failures++;
    if (w[15:0] !== 16'(rsad)) failures++;
    if (rdx != pdx || rdy != pdy || rsad != 0) failures++;
    n_me++;
  endtask

  // ------------------------------------------------------------ dithering
  dither_state_t sl = '{0, 0, 0, 0}, sr = '{0, 0, 0, 0};
  task automatic dither_calls(input int n);
    logic [31:0] q;
    for (int i = 0; i < n; i++) begin
      int xl, xr;
      shortint el, er;
      xl = int'($urandom) >>> 3;
      xr = int'($urandom) >>> 3;
      dith(0, 4'h0, xl, q);
      dith(0, 4'h4, xr, q);
      el = dither_ref(sl, xl);
      er = dither_ref(sr, xr);
      dith(1, 4'h8, 0, q);
      checks += 2;
      if (q !== {el, er}) failures++;
      if (!dith_ready_at_read) failures++; else n_dith_early++;
    end
  endtask

  // ------------------------------------------------------------ JPEG block
  logic [2:0] last_cfg = 3'b000;
  task automatic jpeg_block(input logic [2:0] cfg);
    block_t blk;
    int expect_v [64], tol [64];
    logic [31:0] q, st0;
    int polls;
    for (int i = 0; i < 64; i++) blk[i] = shortint'($urandom_range(0, 255)) - 16'sd128;
    for (int i = 0; i < 64; i++) begin
      int v;
      v = int'(blk[i]); tol[i] = 0;
      if (cfg[0]) begin v = dct_ref(blk, i / 8, i % 8); tol[i] = 1; end
      if (cfg[1]) v = quant_ref(v, QTAB_REF[i]);
      if (cfg[2]) v = int'(shortint'(v) ^ 16'sh00FF);
      if (cfg[2] && tol[i] != 0) tol[i] = 300;
      expect_v[i] = v;
    end
    for (int w = 0; w < 16; w++)
      u_mem.mem[32 + w] = {blk[4*w], blk[4*w+1], blk[4*w+2], blk[4*w+3]};
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
      if (d > tol[i] || d < -tol[i]) failures++;
    end
  endtask

  initial begin
    repeat (3) @(posedge plb_clk); #1;
    ocm_rst_n = 1; plb_rst_n = 1;
    fork
      begin
        me_call();
        me_call();
      end
      begin
        dither_calls(300);
      end
      begin
        jpeg_block(3'b011);
        jpeg_block(3'b011);
        jpeg_block(3'b001);
        jpeg_block(3'b000);
        jpeg_block(3'b111);
        jpeg_block(3'b011);
      end
    join
    checks += 9;
    if (n_me == 0) failures++;
    if (n_me_busy_polls == 0) failures++;
    if (n_dith_early == 0) failures++;
    if (n_bypass == 0) failures++;
    if (n_switch == 0) failures++;
    if (n_stall == 0) failures++;
    if (n_dma_in == 0) failures++;
    if (n_dma_out == 0) failures++;
    if (n_done == 0) failures++;
    $display("me=%0d me_busy_polls=%0d dither_ok=%0d bypass=%0d switch=%0d stall=%0d dma_in=%0d dma_out=%0d done=%0d",
             n_me, n_me_busy_polls, n_dith_early, n_bypass, n_switch, n_stall,
             n_dma_in, n_dma_out, n_done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
