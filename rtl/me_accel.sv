// me_accel: full-search motion estimation accelerator attached to the CPU
// through a shared block RAM.
//
// The CPU writes a 16x16 macroblock of the current frame (256 bytes) and the
// 31x31 search area of the previous frame (961 bytes) into the BRAM, then sets
// the ready bit of the control word. The accelerator polls that word, copies
// both pictures into registers, and runs all 256 candidate positions at once:
// one SAD unit per displacement (dx, dy) in 0..15 x 0..15. Each cycle the
// macroblock pixel (r, c) is broadcast to every unit, and unit (dy, dx) takes
// the search-area pixel (r+dy, c+dx) from a register window whose rows rotate
// up by one after every macroblock row, so each unit only chooses among 16
// columns. After 256 cycles a sequential scan finds the smallest SAD (the first
// one in dy-major order wins a tie), the result word is written, and the
// control word is set to "done" (ready cleared), which the CPU polls.
//
// BRAM layout (word addresses, pixels packed 4 per word, first pixel in bits
// 31:24 as on the big-endian CPU): 0..63 macroblock, 64..304 search area
// (last three bytes unused), 510 control (bit0 ready, bit1 done), 511 result
// {mv_x, mv_y, sad[15:0]}, mv as signed 8-bit. The search area is centred on
// the macroblock: displacement (dx, dy) gives the motion vector (dx-8, dy-8).
//
// Timing from seeing ready: 306 load cycles, 256 SAD cycles, 256 scan
// cycles, 2 write cycles. The document gives the sizes, the 256 parallel SAD
// units and the polled handshake; the layout, the rotating window and the
// sequential scan are this design's choices.
module me_accel
  import osif_pkg::*;
#(
  parameter int unsigned MB = 16,           // macroblock edge
  parameter int unsigned SA = 2*MB - 1      // search area edge
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic [8:0]  bram_addr,
  output logic        bram_we,
  output logic [31:0] bram_wdata,
  input  logic [31:0] bram_rdata,
  output logic        busy
);
  localparam int unsigned NPOS   = MB * MB;             // candidates
  localparam int unsigned NSA    = SA * SA;             // search-area pixels
  localparam int unsigned MB_W   = NPOS / 4;            // macroblock words
  localparam int unsigned SA_W   = (NSA + 3) / 4;       // search-area words
  localparam int unsigned NFLAT  = SA_W * 4;            // padded byte count
  localparam int unsigned NWORDS = MB_W + SA_W;

  typedef enum logic [2:0] {S_POLL, S_LOAD, S_CALC, S_SCAN, S_RES, S_DONE} state_t;
  state_t state;

  logic [7:0]  mbpx [NPOS];       // macroblock, rotates by one pixel per cycle
  logic [7:0]  sapx [NFLAT];      // search area, row-major, rows rotate
  logic [9:0]  cnt;               // load word / pixel / scan counter
  logic        rd_valid;          // bram_rdata holds word cnt-1 of the load
  logic [1:0]  skip;              // polls to ignore while a control write settles
  logic [15:0] sad [NPOS];
  logic [15:0] best_sad;
  logic [$clog2(NPOS)-1:0] best_idx;
  logic        unit_clr, unit_en;
  logic [$clog2(MB)-1:0] col;

  assign col      = cnt[$clog2(MB)-1:0];
  assign unit_clr = (state == S_LOAD);
  assign unit_en  = (state == S_CALC);
  assign busy     = (state != S_POLL);

  // ------------------------------------------------------------ SAD array
  for (genvar dy = 0; dy < MB; dy++) begin : g_row
    for (genvar dx = 0; dx < MB; dx++) begin : g_col
      logic [7:0] ref_px;
      always_comb begin
        ref_px = '0;
        for (int c = 0; c < MB; c++)
          if (col == c[$clog2(MB)-1:0]) ref_px = sapx[dy*SA + dx + c];
      end
      sad_unit u_sad (
        .clk, .clr(unit_clr), .en(unit_en),
        .cur(mbpx[0]), .ref_px, .sad(sad[dy*MB + dx])
      );
    end
  end

  // ------------------------------------------------------------ control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_POLL;
      cnt        <= '0;
      rd_valid   <= 1'b0;
      skip       <= 2'd2;
      bram_addr  <= 9'(ME_CTRL_ADDR);
      bram_we    <= 1'b0;
      bram_wdata <= '0;
      best_sad   <= '1;
      best_idx   <= '0;
    end else begin
      bram_we <= 1'b0;
      unique case (state)
        S_POLL: begin
          bram_addr <= 9'(ME_CTRL_ADDR);
          // the control word read on the last edge is visible now, unless a
          // write of it (or reset) is too recent for the read to reflect it
          if (skip != 2'd0) begin
            skip <= skip - 2'd1;
          end else if (bram_rdata[0]) begin
            state     <= S_LOAD;
            cnt       <= '0;
            bram_addr <= 9'(ME_MB_BASE);
          end
        end
        S_LOAD: begin
          rd_valid <= (cnt < 10'(NWORDS));
          if (cnt < 10'(NWORDS - 1)) bram_addr <= bram_addr + 9'd1;
          if (rd_valid) begin
            if (cnt <= 10'(MB_W)) begin
              for (int i = 0; i < NPOS - 4; i++) mbpx[i] <= mbpx[i+4];
              for (int j = 0; j < 4; j++) mbpx[NPOS-4+j] <= bram_rdata[31-8*j -: 8];
            end else begin
              for (int i = 0; i < NFLAT - 4; i++) sapx[i] <= sapx[i+4];
              for (int j = 0; j < 4; j++) sapx[NFLAT-4+j] <= bram_rdata[31-8*j -: 8];
            end
          end
          if (cnt == 10'(NWORDS)) begin
            state <= S_CALC;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 10'd1;
          end
        end
        S_CALC: begin
          for (int i = 0; i < NPOS; i++) mbpx[i] <= mbpx[(i+1) % NPOS];
          if (col == $clog2(MB)'(MB-1))
            for (int i = 0; i < NSA; i++) sapx[i] <= sapx[(i+SA) % NSA];
          if (cnt == 10'(NPOS-1)) begin
            state    <= S_SCAN;
            cnt      <= '0;
            best_sad <= '1;
            best_idx <= '0;
          end else begin
            cnt <= cnt + 10'd1;
          end
        end
        S_SCAN: begin
          if (sad[cnt[$clog2(NPOS)-1:0]] < best_sad || cnt == 0) begin
            best_sad <= sad[cnt[$clog2(NPOS)-1:0]];
            best_idx <= cnt[$clog2(NPOS)-1:0];
          end
          if (cnt == 10'(NPOS-1)) state <= S_RES;
          else cnt <= cnt + 10'd1;
        end
        S_RES: begin
          bram_addr  <= 9'(ME_RES_ADDR);
          bram_we    <= 1'b1;
          bram_wdata <= {8'(best_idx % MB) - 8'(MB/2),
                         8'(best_idx / MB) - 8'(MB/2), best_sad};
          state      <= S_DONE;
        end
        S_DONE: begin
          bram_addr  <= 9'(ME_CTRL_ADDR);
          bram_we    <= 1'b1;
          bram_wdata <= 32'h2;
          skip       <= 2'd2;   // the write lands on the next edge
          state      <= S_POLL;
        end
        default: state <= S_POLL;
      endcase
    end
  end
endmodule
