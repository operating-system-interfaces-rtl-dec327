// acc_in_buf: input buffer of the accelerator framework and the state machine
// that streams one macroblock out of it.
//
// Storage is a block RAM of 16 words of 64 bits (one 128-byte macroblock of
// 64 16-bit elements), written a bus word at a time by the DMA controller.
// Element i sits in word i/4, the first element of a word in bits 63:48 as on
// the big-endian CPU. A start pulse makes the streamer send elements 0..63
// in order on the frame interface, each with its index as address; it holds
// its word while stall is high. The read is synchronous: the read address is
// the next element when the output advances and the current one when it is
// held, so the data register always matches the address register.
//
// The document places the start-of-flow state machine in the active
// accelerator; here it sits with the buffer so that any frame can be first in
// the chain. Sizes follow the document (64 elements of two bytes).
module acc_in_buf
  import osif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DMA write port
  input  logic        w_en,
  input  logic [3:0]  w_addr,
  input  logic [63:0] w_data,
  // control
  input  logic        start,
  output logic        busy,
  // stream out
  output frame_fwd_t out_o,
  input  logic        stall_i
);
  logic [63:0] mem [16];
  logic [63:0] rd_word;
  logic [6:0]  ptr;          // next element to send, 64 = all sent
  logic        active;
  logic        o_valid;
  eaddr_t      o_addr;
  logic        advance;
  eaddr_t      rd_idx;

  assign advance = !o_valid || !stall_i;
  assign rd_idx  = advance ? ptr[5:0] : o_addr;
  assign busy    = active || o_valid;

  always_ff @(posedge clk) begin
    if (w_en) mem[w_addr] <= w_data;
    rd_word <= mem[rd_idx[5:2]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr     <= '0;
      active  <= 1'b0;
      o_valid <= 1'b0;
      o_addr  <= '0;
    end else begin
      if (advance) begin
        if (active && !ptr[6]) begin
          o_valid <= 1'b1;
          o_addr  <= ptr[5:0];
          ptr     <= ptr + 7'd1;
        end else begin
          o_valid <= 1'b0;
          if (ptr[6]) active <= 1'b0;
        end
      end
      if (start && !busy) begin
        active <= 1'b1;
        ptr    <= '0;
      end
    end
  end

  always_comb begin
    out_o.valid = o_valid;
    out_o.addr  = o_addr;
    out_o.data  = rd_word[63 - 16*o_addr[1:0] -: 16];
  end
endmodule
