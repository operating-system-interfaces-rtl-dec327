// dct_frame: two-dimensional 8x8 forward DCT accelerator in a reconfigurable
// frame of the switchable interconnect.
//
// F(v,u) = C(v)/2 * C(u)/2 * sum_r sum_k x(r,k) cos((2r+1)v pi/16) cos((2k+1)u pi/16),
// C(0) = 1/sqrt 2, C(n>0) = 1, rounded to an integer (the orthonormal DCT).
//
// Three stages pass whole blocks along through double-buffered storage:
//   collect  takes one element per cycle at the address it carries into one
//            of two input banks, and stalls its input only when both banks
//            hold blocks the row stage has not finished;
//   rows     64 cycles, one row-transform output per cycle from 8 multipliers,
//            kept with two extra fraction bits in a transpose buffer;
//   columns  64 cycles, one output per cycle from 8 multipliers, in row-major
//            order (address = 8v + u), each held while the next stage stalls.
// With both buffers doubled, the three stages work on three blocks at once, so
// blocks sent back to back enter and leave at one element per cycle with no
// stall. The first result leaves 65 cycles after the last input is taken.
// Cosines are 13-bit fixed point (osif_pkg::dct_coef); results are exact to
// within one unit.
//
// The document gives the transform, the 64 two-byte elements per block, one
// sample per cycle and the frame handshake; it used a vendor DCT core. This
// row-column structure and its fixed-point format are this design's own.
module dct_frame
  import osif_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  frame_fwd_t in_i,
  output logic       in_stall_o,
  output frame_fwd_t out_o,
  input  logic       out_stall_i
);
  localparam int ROW_SHIFT = COS_FRAC - 2;     // keep 2 fraction bits
  localparam int COL_SHIFT = COS_FRAC + 2;

  // Two banks per buffer: the collect stage fills one input bank while the
  // row stage reads the other, and the row stage writes one transpose bank
  // while the column stage reads the other.
  elem_t              xbuf [2][64];
  logic signed [23:0] tbuf [2][64];
  logic [5:0]         a_cnt, b_cnt, c_cnt;
  logic [1:0]         a_full, t_full;       // per bank
  logic               a_sel, b_sel, c_sel;  // bank in use by each stage
  logic               a_take, b_run;

  // ---------------------------------------------------------- collect
  assign in_stall_o = a_full[a_sel];
  assign a_take     = in_i.valid && !a_full[a_sel];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_cnt <= '0;
      a_sel <= 1'b0;
    end else if (a_take) begin
      a_cnt <= a_cnt + 6'd1;          // wraps to 0 after the 64th element
      if (a_cnt == 6'd63) a_sel <= !a_sel;
    end
  end
  always_ff @(posedge clk) begin
    if (a_take) xbuf[a_sel][in_i.addr] <= in_i.data;
  end

  // ---------------------------------------------------------- rows
  // b_cnt = 8*r + u : T(r,u) = sum_k x(r,k) a(u,k)
  logic signed [31:0] row_sum;
  always_comb begin
    row_sum = '0;
    for (int k = 0; k < 8; k++)
      for (int u = 0; u < 8; u++)
        if (b_cnt[2:0] == u[2:0])
          row_sum += 32'(xbuf[b_sel][{b_cnt[5:3], k[2:0]}]) * 32'(dct_coef(u, k));
  end
  assign b_run = a_full[b_sel] && !t_full[b_sel];

  always_ff @(posedge clk) begin
    if (b_run) tbuf[b_sel][b_cnt] <= 24'((row_sum + (32'sd1 <<< (ROW_SHIFT-1))) >>> ROW_SHIFT);
  end

  // ---------------------------------------------------------- columns
  // c_cnt = 8*v + u : F(v,u) = sum_r a(v,r) T(r,u)
  logic signed [47:0] col_sum, col_rnd;
  logic signed [15:0] col_val;
  always_comb begin
    col_sum = '0;
    for (int r = 0; r < 8; r++)
      for (int v = 0; v < 8; v++)
        if (c_cnt[5:3] == v[2:0])
          col_sum += 48'(tbuf[c_sel][{r[2:0], c_cnt[2:0]}]) * 48'(dct_coef(v, r));
    col_rnd = (col_sum + (48'sd1 <<< (COL_SHIFT-1))) >>> COL_SHIFT;
    if (col_rnd > 48'sd32767)       col_val = 16'sh7FFF;
    else if (col_rnd < -48'sd32768) col_val = 16'sh8000;
    else                            col_val = 16'(col_rnd);
  end

  logic advance;
  assign advance = !out_o.valid || !out_stall_i;

  // A bank flag is set by one stage and cleared by the next; in one cycle the
  // two always address different banks.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_full <= '0;
      t_full <= '0;
      b_sel  <= 1'b0;
      c_sel  <= 1'b0;
      b_cnt  <= '0;
      c_cnt  <= '0;
      out_o  <= '0;
    end else begin
      if (a_take && a_cnt == 6'd63) a_full[a_sel] <= 1'b1;
      if (b_run) begin
        b_cnt <= b_cnt + 6'd1;
        if (b_cnt == 6'd63) begin
          a_full[b_sel] <= 1'b0;
          t_full[b_sel] <= 1'b1;
          b_sel         <= !b_sel;
        end
      end
      if (advance) begin
        if (t_full[c_sel]) begin
          out_o <= '{valid: 1'b1, addr: c_cnt, data: col_val};
          c_cnt <= c_cnt + 6'd1;
          if (c_cnt == 6'd63) begin
            t_full[c_sel] <= 1'b0;
            c_sel         <= !c_sel;
          end
        end else begin
          out_o.valid <= 1'b0;
        end
      end
    end
  end
endmodule
