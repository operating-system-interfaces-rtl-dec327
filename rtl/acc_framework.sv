// acc_framework: the switchable accelerator interconnect framework.
//
// A block travels: system memory -> (DMA burst) -> input buffer -> chain of
// three switch nodes -> output buffer -> (DMA burst) -> system memory. Each
// switch node has a reconfigurable frame attached: frame 0 holds the DCT,
// frame 1 the quantiser, frame 2 is empty and its frame interface is brought
// out on the ports so that a further accelerator can be attached. The DCR
// CONFIG register chooses which frames the block passes through (DCT then
// quantiser for JPEG, either alone, or none for a plain copy), so resident
// accelerators are switched between blocks without reconfiguring the FPGA.
//
// Driver sequence for one block: write CONFIG, DMA memory -> input buffer
// (registers of dma_ctrl), write START, poll STATUS bit0 for a change, DMA
// output buffer -> memory. All stages use the same 100 MHz bus clock.
//
// Ports: the DMA controller's register slave and bus master ports, the DCR
// slave port of the framework control, and frame 2's input (x_*) and output
// (y_*) streams. The chain of buffers, nodes and frames follows the original framework; bus
// protocols, register maps and the frame stream timing are this design's.
module acc_framework
  import osif_pkg::*;
#(
  parameter logic [9:0] DCR_BASE = 10'h040,
  parameter qtab_t      QTAB     = QTAB_DEFAULT
) (
  input  logic        clk,
  input  logic        rst_n,
  // DMA register slave port
  input  logic        s_req,
  input  logic        s_rnw,
  input  logic [3:0]  s_addr,
  input  logic [31:0] s_wdata,
  output logic        s_ack,
  output logic [31:0] s_rdata,
  // DMA bus master port
  output logic        m_req,
  output logic        m_rnw,
  output logic [31:0] m_addr,
  output logic [4:0]  m_beats,
  input  logic        m_addr_ack,
  input  logic        m_rd_valid,
  input  logic [63:0] m_rd_data,
  output logic [63:0] m_wdata,
  input  logic        m_wr_ack,
  // DCR slave port
  input  logic [9:0]  dcr_addr,
  input  logic        dcr_read,
  input  logic        dcr_write,
  input  logic [31:0] dcr_wdata,
  output logic        dcr_ack,
  output logic [31:0] dcr_rdata,
  // empty frame 2
  output frame_fwd_t  x_o,
  input  logic        x_stall_i,
  input  frame_fwd_t  y_i,
  output logic        y_stall_o,
  // observation
  output logic [N_FRAMES-1:0] frame_sel,
  output logic        busy
);
  logic        ib_we;
  logic [3:0]  ib_addr, ob_addr;
  logic [63:0] ib_wdata, ob_rdata;
  logic        start, block_done, in_busy;

  // chain: link[0] from the input buffer, link[N_FRAMES] into the output buffer
  frame_fwd_t link      [N_FRAMES+1];
  logic       link_stall[N_FRAMES+1];
  frame_fwd_t to_fr     [N_FRAMES];
  logic       to_fr_stall[N_FRAMES];
  frame_fwd_t from_fr   [N_FRAMES];
  logic       from_fr_stall[N_FRAMES];

  dma_ctrl u_dma (
    .clk, .rst_n,
    .s_req, .s_rnw, .s_addr, .s_wdata, .s_ack, .s_rdata,
    .m_req, .m_rnw, .m_addr, .m_beats, .m_addr_ack, .m_rd_valid, .m_rd_data,
    .m_wdata, .m_wr_ack,
    .ib_we, .ib_addr, .ib_wdata, .ob_addr, .ob_rdata
  );

  fw_ctrl #(.DCR_BASE(DCR_BASE)) u_ctrl (
    .clk, .rst_n,
    .dcr_addr, .dcr_read, .dcr_write, .dcr_wdata, .dcr_ack, .dcr_rdata,
    .frame_sel, .start, .block_done, .busy
  );

  acc_in_buf u_ibuf (
    .clk, .rst_n,
    .w_en(ib_we), .w_addr(ib_addr), .w_data(ib_wdata),
    .start, .busy(in_busy),
    .out_o(link[0]), .stall_i(link_stall[0])
  );

  for (genvar i = 0; i < N_FRAMES; i++) begin : g_node
    frame_switch u_sw (
      .sel(frame_sel[i]),
      .up_i(link[i]),        .up_stall_o(link_stall[i]),
      .dn_o(link[i+1]),      .dn_stall_i(link_stall[i+1]),
      .fr_o(to_fr[i]),       .fr_stall_i(to_fr_stall[i]),
      .fr_i(from_fr[i]),     .fr_stall_o(from_fr_stall[i])
    );
  end

  dct_frame u_dct (
    .clk, .rst_n,
    .in_i(to_fr[0]),    .in_stall_o(to_fr_stall[0]),
    .out_o(from_fr[0]), .out_stall_i(from_fr_stall[0])
  );

  quant_frame #(.QTAB(QTAB)) u_quant (
    .clk, .rst_n,
    .in_i(to_fr[1]),    .in_stall_o(to_fr_stall[1]),
    .out_o(from_fr[1]), .out_stall_i(from_fr_stall[1])
  );

  assign x_o            = to_fr[2];
  assign to_fr_stall[2] = x_stall_i;
  assign from_fr[2]     = y_i;
  assign y_stall_o      = from_fr_stall[2];

  acc_out_buf u_obuf (
    .clk, .rst_n,
    .in_i(link[N_FRAMES]), .stall_o(link_stall[N_FRAMES]),
    .clear(start), .done(block_done),
    .r_addr(ob_addr), .r_data(ob_rdata)
  );
endmodule
