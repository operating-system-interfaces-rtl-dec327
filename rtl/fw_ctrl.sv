// fw_ctrl: framework control of the switchable accelerator interconnect,
// reached by the driver through device control registers (DCRs), which keeps
// control traffic off the processor local bus.
//
// Registers (DCR address = DCR_BASE + offset):
//   +0 CONFIG  bits N_FRAMES-1:0 select which frames the chain passes through
//              (bit 0 = first frame after the input buffer). Written before a
//              block starts; changes are ignored while a block is in flight.
//   +1 START   writing bit0 = 1 says a macroblock is in the input buffer: the
//              output count is cleared and the input streamer starts.
//   +2 STATUS  bit0 toggles each time all results of a block are in the output
//              buffer (the driver polls for the change), bit1 busy.
// DCR port: dcr_read or dcr_write held until a one-cycle dcr_ack, read data
// with the ack. Accesses outside the three addresses are not acknowledged and
// return zero, leaving them to other DCR slaves.
//
// The configuration register, start register and toggled done bit follow the
// document; addresses, bit positions and the port timing are this design's.
module fw_ctrl
  import osif_pkg::*;
#(
  parameter logic [9:0] DCR_BASE = 10'h040
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [9:0]  dcr_addr,
  input  logic        dcr_read,
  input  logic        dcr_write,
  input  logic [31:0] dcr_wdata,
  output logic        dcr_ack,
  output logic [31:0] dcr_rdata,
  // to the framework
  output logic [N_FRAMES-1:0] frame_sel,
  output logic        start,       // one-cycle pulse
  input  logic        block_done,  // one-cycle pulse from the output buffer
  output logic        busy
);
  logic       hit, take;
  logic [9:0] off;
  logic       toggle;

  assign off  = dcr_addr - DCR_BASE;
  assign hit  = (dcr_addr >= DCR_BASE) && (off <= DCR_STATUS);
  assign take = (dcr_read || dcr_write) && hit && !dcr_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dcr_ack   <= 1'b0;
      dcr_rdata <= '0;
      frame_sel <= '0;
      start     <= 1'b0;
      toggle    <= 1'b0;
      busy      <= 1'b0;
    end else begin
      dcr_ack <= take;
      start   <= 1'b0;
      if (take && dcr_write) begin
        if (off == DCR_CONFIG && !busy) frame_sel <= dcr_wdata[N_FRAMES-1:0];
        if (off == DCR_START && dcr_wdata[0] && !busy) begin
          start <= 1'b1;
          busy  <= 1'b1;
        end
      end
      if (take && dcr_read) begin
        unique case (off)
          DCR_CONFIG: dcr_rdata <= 32'(frame_sel);
          DCR_START:  dcr_rdata <= '0;
          default:    dcr_rdata <= {30'd0, busy, toggle};
        endcase
      end else if (!take) begin
        dcr_rdata <= '0;
      end
      if (block_done) begin
        toggle <= !toggle;
        busy   <= 1'b0;
      end
    end
  end

  a_dcr_held: assert property (@(posedge clk) disable iff (!rst_n)
    (dcr_read || dcr_write) && hit && !dcr_ack |=> (dcr_read || dcr_write || dcr_ack));
endmodule
