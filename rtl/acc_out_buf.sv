// acc_out_buf: output buffer of the accelerator framework.
//
// The last stage of the chain writes each 16-bit result at the element address
// it carries (row-major, element i in word i/4, first element in bits 63:48),
// so results may arrive in any order. The buffer never applies back-pressure.
// When the 64th result of a block has been written it raises done for one
// cycle; clear (at the start of a block) restarts the count. The DMA
// controller reads 64-bit words with a synchronous read.
//
// Sizes follow the document (64 elements of two bytes, a separate block RAM
// bank for output); the counting is this design's way of knowing that "all 64
// results are complete".
module acc_out_buf
  import osif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  frame_fwd_t  in_i,
  output logic        stall_o,
  input  logic        clear,
  output logic        done,
  // DMA read port
  input  logic [3:0]  r_addr,
  output logic [63:0] r_data
);
  logic [63:0] mem [16];
  logic [6:0]  count;

  assign stall_o = 1'b0;

  always_ff @(posedge clk) begin
    if (in_i.valid)
      mem[in_i.addr[5:2]][63 - 16*in_i.addr[1:0] -: 16] <= in_i.data;
    r_data <= mem[r_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        count <= '0;
      end else if (in_i.valid) begin
        if (count == 7'(MB_ELEMS - 1)) begin
          count <= '0;
          done  <= 1'b1;
        end else begin
          count <= count + 7'd1;
        end
      end
    end
  end
endmodule
