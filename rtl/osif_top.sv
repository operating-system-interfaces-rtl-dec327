// osif_top: the FPGA-fabric side of a CPU/FPGA hybrid in which applications
// under a standard operating system call hardware accelerators.
//
// Three accelerator attachments stand side by side, each reached by the CPU
// in its own way:
//   * on the on-chip memory bus: a 512 x 32 BRAM shared with the full-search
//     motion estimation accelerator (direct access: the application maps the
//     BRAM into its address space, writes the pictures, sets a ready bit and
//     polls for done);
//   * on the processor local bus: the stereo dithering accelerator (direct
//     access: two stores and one load per pair of samples);
//   * on the processor local bus and the DCR bus: the switchable accelerator
//     interconnect framework with its DMA controller, DCT and quantiser
//     frames and one empty frame (indirect access: a driver moves each block).
// The processor, the buses themselves and the memory controller are not part
// of this RTL; their connections are the ports below. The OCM side runs on
// ocm_clk, the rest on the 100 MHz bus clock plb_clk.
module osif_top
  import osif_pkg::*;
(
  input  logic        ocm_clk,
  input  logic        ocm_rst_n,
  // OCM: CPU port of the motion estimation BRAM
  input  logic [8:0]  ocm_addr,
  input  logic        ocm_en,
  input  logic [3:0]  ocm_we,
  input  logic [31:0] ocm_wdata,
  output logic [31:0] ocm_rdata,
  output logic        me_busy,

  input  logic        plb_clk,
  input  logic        plb_rst_n,
  // PLB slave: dithering accelerator
  input  logic        dith_req,
  input  logic        dith_rnw,
  input  logic [3:0]  dith_addr,
  input  logic [31:0] dith_wdata,
  output logic        dith_ack,
  output logic [31:0] dith_rdata,
  // PLB slave: DMA registers of the framework
  input  logic        dma_req,
  input  logic        dma_rnw,
  input  logic [3:0]  dma_addr,
  input  logic [31:0] dma_wdata,
  output logic        dma_ack,
  output logic [31:0] dma_rdata,
  // PLB master: DMA data
  output logic        m_req,
  output logic        m_rnw,
  output logic [31:0] m_addr,
  output logic [4:0]  m_beats,
  input  logic        m_addr_ack,
  input  logic        m_rd_valid,
  input  logic [63:0] m_rd_data,
  output logic [63:0] m_wdata,
  input  logic        m_wr_ack,
  // DCR slave: framework control
  input  logic [9:0]  dcr_addr,
  input  logic        dcr_read,
  input  logic        dcr_write,
  input  logic [31:0] dcr_wdata,
  output logic        dcr_ack,
  output logic [31:0] dcr_rdata,
  // empty reconfigurable frame
  output frame_fwd_t  x_o,
  input  logic        x_stall_i,
  input  frame_fwd_t  y_i,
  output logic        y_stall_o,
  // observation
  output logic [N_FRAMES-1:0] frame_sel,
  output logic        fw_busy
);
  // ---------------------------------------------- motion estimation (OCM)
  logic [8:0]  me_addr;
  logic        me_we;
  logic [31:0] me_wdata, me_rdata;

  me_bram u_me_bram (
    .clk(ocm_clk),
    .a_addr(ocm_addr), .a_en(ocm_en), .a_we(ocm_we), .a_wdata(ocm_wdata), .a_rdata(ocm_rdata),
    .b_addr(me_addr), .b_we(me_we), .b_wdata(me_wdata), .b_rdata(me_rdata)
  );

  me_accel u_me (
    .clk(ocm_clk), .rst_n(ocm_rst_n),
    .bram_addr(me_addr), .bram_we(me_we), .bram_wdata(me_wdata), .bram_rdata(me_rdata),
    .busy(me_busy)
  );

  // ---------------------------------------------- dithering (PLB)
  dither_accel u_dither (
    .clk(plb_clk), .rst_n(plb_rst_n),
    .s_req(dith_req), .s_rnw(dith_rnw), .s_addr(dith_addr), .s_wdata(dith_wdata),
    .s_ack(dith_ack), .s_rdata(dith_rdata)
  );

  // ---------------------------------------------- framework (PLB + DCR)
  acc_framework u_fw (
    .clk(plb_clk), .rst_n(plb_rst_n),
    .s_req(dma_req), .s_rnw(dma_rnw), .s_addr(dma_addr), .s_wdata(dma_wdata),
    .s_ack(dma_ack), .s_rdata(dma_rdata),
    .m_req, .m_rnw, .m_addr, .m_beats, .m_addr_ack, .m_rd_valid, .m_rd_data,
    .m_wdata, .m_wr_ack,
    .dcr_addr, .dcr_read, .dcr_write, .dcr_wdata, .dcr_ack, .dcr_rdata,
    .x_o, .x_stall_i, .y_i, .y_stall_o,
    .frame_sel, .busy(fw_busy)
  );
endmodule
