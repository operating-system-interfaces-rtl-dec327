// quant_frame: quantiser accelerator in a reconfigurable frame of the
// switchable interconnect.
//
// Each coefficient is divided by the quantisation table entry of its element
// address and rounded to the nearest integer, halves away from zero:
//   q = sign(c) * floor((|c| + Q/2) / Q)
// A fully pipelined restoring divider takes one coefficient per cycle: one
// register stage for the operands, then one quotient bit per stage (DIV_BITS
// stages), then the output register. The pipeline moves as a whole whenever
// its output register is empty or not stalled, and stalls its input otherwise,
// so the element address travels with its data. Latency: DIV_BITS + 2 cycles.
//
// The document gives the function (quantisation after the DCT, one sample per
// cycle from a pipelined divider, results written in row-major order) but not
// the table; the default is the JPEG luminance table at quality 75, and the
// divider structure and rounding rule are this design's choices.
module quant_frame
  import osif_pkg::*;
#(
  parameter qtab_t QTAB = QTAB_DEFAULT
) (
  input  logic       clk,
  input  logic       rst_n,
  input  frame_fwd_t in_i,
  output logic       in_stall_o,
  output frame_fwd_t out_o,
  input  logic       out_stall_i
);
  localparam int DIV_BITS = 17;          // |c| + Q/2 < 2^17

  typedef struct packed {
    logic                valid;
    eaddr_t              addr;
    logic                neg;
    logic [7:0]          divisor;
    logic [DIV_BITS-1:0] dividend;       // shifts left, quotient bits enter at the bottom
    logic [8:0]          rem;
  } div_stage_t;

  div_stage_t st [DIV_BITS+1];
  logic       en;

  assign en         = !out_o.valid || !out_stall_i;
  assign in_stall_o = !en;

  // operand stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st[0] <= '0;
    end else if (en) begin
      logic [16:0] mag;
      mag = in_i.data[15] ? 17'(-$signed({in_i.data[15], in_i.data})) : 17'(in_i.data);
      st[0].valid    <= in_i.valid;
      st[0].addr     <= in_i.addr;
      st[0].neg      <= in_i.data[15];
      st[0].divisor  <= QTAB[in_i.addr];
      st[0].dividend <= mag + 17'(QTAB[in_i.addr] >> 1);
      st[0].rem      <= '0;
    end
  end

  // one quotient bit per stage
  for (genvar i = 0; i < DIV_BITS; i++) begin : g_div
    logic [9:0] trial;
    assign trial = {st[i].rem, st[i].dividend[DIV_BITS-1]} - {2'b00, st[i].divisor};
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        st[i+1] <= '0;
      end else if (en) begin
        st[i+1].valid   <= st[i].valid;
        st[i+1].addr    <= st[i].addr;
        st[i+1].neg     <= st[i].neg;
        st[i+1].divisor <= st[i].divisor;
        if (!trial[9]) begin
          st[i+1].rem      <= trial[8:0];
          st[i+1].dividend <= {st[i].dividend[DIV_BITS-2:0], 1'b1};
        end else begin
          st[i+1].rem      <= {st[i].rem[7:0], st[i].dividend[DIV_BITS-1]};
          st[i+1].dividend <= {st[i].dividend[DIV_BITS-2:0], 1'b0};
        end
      end
    end
  end

  // output register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_o <= '0;
    end else if (en) begin
      out_o.valid <= st[DIV_BITS].valid;
      out_o.addr  <= st[DIV_BITS].addr;
      out_o.data  <= st[DIV_BITS].neg ? -16'(st[DIV_BITS].dividend)
                                      :  16'(st[DIV_BITS].dividend);
    end
  end
endmodule
