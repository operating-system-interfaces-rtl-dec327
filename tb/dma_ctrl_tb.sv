// dma_ctrl_tb: sets up the DMA controller through its registers and runs
// bursts of several lengths in both directions against a behavioural system
// memory. Inbound bursts are checked word by word at the input buffer port;
// outbound bursts read a model output buffer (synchronous, as the real one)
// and are checked in memory. Also checks busy/done and the register readback.
module dma_ctrl_tb;
  import osif_pkg::*;
  logic clk = 0, rst_n = 0;
  logic s_req = 0, s_rnw = 0, s_ack;
  logic [3:0] s_addr = 0;
  logic [31:0] s_wdata = 0, s_rdata;
  logic m_req, m_rnw, m_addr_ack, m_rd_valid, m_wr_ack;
  logic [31:0] m_addr;
  logic [4:0] m_beats;
  logic [63:0] m_rd_data, m_wdata;
  logic ib_we;
  logic [3:0] ib_addr, ob_addr;
  logic [63:0] ib_wdata, ob_rdata;
  logic [63:0] ib [16], ob [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dma_ctrl dut (.*);
  sys_mem_model u_mem (.clk, .m_req, .m_rnw, .m_addr, .m_beats, .m_addr_ack,
                       .m_rd_valid, .m_rd_data, .m_wdata, .m_wr_ack);

  always_ff @(posedge clk) begin
    if (ib_we) ib[ib_addr] <= ib_wdata;
    ob_rdata <= ob[ob_addr];
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic reg_access(input logic rnw, input logic [3:0] a, input logic [31:0] d,
                            output logic [31:0] q);
    s_req = 1; s_rnw = rnw; s_addr = a; s_wdata = d;
    do begin @(posedge clk); #1; end while (!s_ack);
    q = s_rdata; s_req = 0;
    @(posedge clk); #1;
  endtask

  task automatic transfer(input bit out_dir, input int sys, input int loc, input int len);
    logic [31:0] q;
    int n;
    reg_access(0, DMA_SYS, sys, q);
    reg_access(0, DMA_LOC, loc, q);
    reg_access(0, DMA_LEN, len, q);
    reg_access(1, DMA_LEN, 0, q);
    checks++; if (q !== 32'(len)) failures++;
    reg_access(0, DMA_CTRL, {30'd0, out_dir, 1'b1}, q);
    n = 0;
    do begin
      reg_access(1, DMA_CTRL, 0, q);
      n++;
    end while (q[0] && n < 500);
    checks++; if (q[1:0] !== 2'b10) begin failures++; $display("ctrl %h after %0d polls", q, n); end
  endtask

  initial begin
    logic [31:0] q;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int i = 0; i < 1024; i++) u_mem.mem[i] = {$urandom, $urandom};
    for (int i = 0; i < 16; i++) begin ib[i] = '0; ob[i] = {$urandom, $urandom}; end
    // inbound: a whole macroblock, then a short piece at an offset
    transfer(0, 32'h100, 0, 128);
    for (int i = 0; i < 16; i++) begin
      checks++; if (ib[i] !== u_mem.mem[32 + i]) begin failures++; $display("ib %0d %h %h", i, ib[i], u_mem.mem[32+i]); end
    end
    transfer(0, 32'h400, 40, 24);
    for (int i = 0; i < 3; i++) begin
      checks++; if (ib[5 + i] !== u_mem.mem[128 + i]) failures++;
    end
    // outbound: whole buffer, then part of it
    transfer(1, 32'h800, 0, 128);
    for (int i = 0; i < 16; i++) begin
      checks++; if (u_mem.mem[256 + i] !== ob[i]) failures++;
    end
    transfer(1, 32'hA00, 64, 32);
    for (int i = 0; i < 4; i++) begin
      checks++; if (u_mem.mem[320 + i] !== ob[8 + i]) failures++;
    end
    checks++; if (u_mem.bursts != 4) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
