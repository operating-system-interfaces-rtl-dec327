// dither_accel: stereo dithering accelerator, a slave on the processor local
// bus reached by plain loads and stores from the application.
//
// Three 32-bit memory-mapped registers (byte offsets): 0x0 left input, 0x4
// right input, 0x8 output {left[15:0], right[15:0]}. The CPU stores one sample
// of each channel and then loads the output register. Each store loads the
// input register of one dither_core; the cores run on an enable every CLK_DIV
// bus cycles (25 MHz from the 100 MHz bus), so a result is ready at most
// CLK_DIV bus cycles (12 CPU cycles at 300 MHz) after its store, well inside
// the time a following load needs to reach the slave. The output register is
// only changed by new samples, so it stays valid until the CPU reads it.
//
// Bus port: a single-beat request (req, rnw, addr, wdata) held by the master
// until ack; ack is a one-cycle pulse, the cycle after the request is seen,
// with read data on rdata. This stands in for the bus protocol, which the
// document does not give. The register map and the channel order in the output
// word are this design's choices; two cores, the register widths and the clock
// ratio follow the document.
module dither_accel #(
  parameter int unsigned CLK_DIV = 4      // bus clock / dither clock
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        s_req,
  input  logic        s_rnw,
  input  logic [3:0]  s_addr,             // byte offset
  input  logic [31:0] s_wdata,
  output logic        s_ack,
  output logic [31:0] s_rdata
);
  logic [$clog2(CLK_DIV)-1:0] div;
  logic ce;
  logic wr_l, wr_r;
  logic [15:0] out_l, out_r;
  logic [31:0] in_l, in_r;
  logic pend_l, pend_r;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div <= '0;
    else        div <= (div == $clog2(CLK_DIV)'(CLK_DIV - 1)) ? '0 : div + 1'b1;
  end
  assign ce = (div == '0);

  logic take;
  assign take = s_req && !s_ack;
  assign wr_l = take && !s_rnw && s_addr[3:2] == 2'd0;
  assign wr_r = take && !s_rnw && s_addr[3:2] == 2'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack   <= 1'b0;
      s_rdata <= '0;
      in_l    <= '0;
      in_r    <= '0;
    end else begin
      s_ack <= take;
      if (wr_l) in_l <= s_wdata;
      if (wr_r) in_r <= s_wdata;
      if (take && s_rnw) begin
        unique case (s_addr[3:2])
          2'd0:    s_rdata <= in_l;
          2'd1:    s_rdata <= in_r;
          default: s_rdata <= {out_l, out_r};
        endcase
      end
    end
  end

  dither_core u_left  (.clk, .rst_n, .ce, .load(wr_l), .din(s_wdata), .dout(out_l), .pending(pend_l));
  dither_core u_right (.clk, .rst_n, .ce, .load(wr_r), .din(s_wdata), .dout(out_r), .pending(pend_r));

  // the master keeps its request until it is acknowledged
  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_req && !s_ack |=> s_req || s_ack);
endmodule
