// dma_ctrl: DMA controller of the accelerator framework, a master on the
// 64-bit processor local bus that moves one block between system memory and
// the accelerator's input or output buffer.
//
// The driver sets it up through four memory-mapped registers on a bus slave
// port (byte offsets): 0x0 system memory address, 0x4 byte offset in the local
// buffer, 0x8 length in bytes (a multiple of 8, at most 128), 0xC control:
// write bit0 = start, bit1 = direction (0: memory -> input buffer, 1: output
// buffer -> memory); read bit0 = busy, bit1 = done (set at the end, cleared by
// the next start). A transfer is one burst of LEN/8 beats.
//
// Master port (a stand-in for the bus protocol, which the document does not
// give): m_req with m_rnw, m_addr and m_beats is held until a one-cycle
// m_addr_ack. A read burst then returns m_beats words, one per m_rd_valid
// pulse. In a write burst m_wdata carries the current beat and the memory
// takes it with a one-cycle m_wr_ack. Slave port: as for dither_accel
// (request held until a one-cycle ack, read data with the ack).
//
// The data paths are plain wires on purpose: ib_wdata is m_rd_data and
// m_wdata is ob_rdata, so a beat moves without an extra register stage. Only
// the addresses and strobes are generated here.
module dma_ctrl
  import osif_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // register slave port
  input  logic        s_req,
  input  logic        s_rnw,
  input  logic [3:0]  s_addr,
  input  logic [31:0] s_wdata,
  output logic        s_ack,
  output logic [31:0] s_rdata,
  // bus master port
  output logic        m_req,
  output logic        m_rnw,
  output logic [31:0] m_addr,
  output logic [4:0]  m_beats,
  input  logic        m_addr_ack,
  input  logic        m_rd_valid,
  input  logic [63:0] m_rd_data,
  output logic [63:0] m_wdata,
  input  logic        m_wr_ack,
  // input buffer write port
  output logic        ib_we,
  output logic [3:0]  ib_addr,
  output logic [63:0] ib_wdata,
  // output buffer read port (synchronous)
  output logic [3:0]  ob_addr,
  input  logic [63:0] ob_rdata
);
  typedef enum logic [1:0] {D_IDLE, D_ADDR, D_DATA} dstate_t;
  dstate_t state;

  logic [31:0] sys_addr, loc_off, len;
  logic        dir, done;
  logic [4:0]  beat;          // beats finished in this burst
  logic [4:0]  nbeats;
  logic        take;

  assign take   = s_req && !s_ack;
  assign nbeats = len[7:3];

  // ---------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_ack    <= 1'b0;
      s_rdata  <= '0;
      sys_addr <= '0;
      loc_off  <= '0;
      len      <= '0;
      dir      <= 1'b0;
    end else begin
      s_ack <= take;
      if (take && !s_rnw) begin
        unique case (s_addr[3:2])
          2'd0: sys_addr <= s_wdata;
          2'd1: loc_off  <= s_wdata;
          2'd2: len      <= s_wdata;
          2'd3: if (state == D_IDLE) dir <= s_wdata[1];
        endcase
      end
      if (take && s_rnw) begin
        unique case (s_addr[3:2])
          2'd0: s_rdata <= sys_addr;
          2'd1: s_rdata <= loc_off;
          2'd2: s_rdata <= len;
          2'd3: s_rdata <= {30'd0, done, state != D_IDLE};
        endcase
      end
    end
  end

  logic start;
  assign start = take && !s_rnw && s_addr[3:2] == 2'd3 && s_wdata[0] && state == D_IDLE;

  // ---------------------------------------------------------- transfer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= D_IDLE;
      beat  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        D_IDLE: if (start && nbeats != 5'd0) begin
          state <= D_ADDR;
          beat  <= '0;
          done  <= 1'b0;
        end
        D_ADDR: if (m_addr_ack) state <= D_DATA;
        D_DATA: begin
          if ((dir ? m_wr_ack : m_rd_valid)) begin
            beat <= beat + 5'd1;
            if (beat + 5'd1 == nbeats) begin
              state <= D_IDLE;
              done  <= 1'b1;
            end
          end
        end
        default: state <= D_IDLE;
      endcase
    end
  end

  assign m_req   = (state == D_ADDR);
  assign m_rnw   = !dir;
  assign m_addr  = sys_addr;
  assign m_beats = nbeats;

  // input buffer: one word per returned beat
  assign ib_we    = (state == D_DATA) && !dir && m_rd_valid;
  assign ib_addr  = loc_off[6:3] + beat[3:0];
  assign ib_wdata = m_rd_data;

  // output buffer: address the next beat as soon as this one is taken
  assign ob_addr = loc_off[6:3] + beat[3:0] + 4'((state == D_DATA) && m_wr_ack);
  assign m_wdata = ob_rdata;

  a_req_held: assert property (@(posedge clk) disable iff (!rst_n)
    s_req && !s_ack |=> s_req || s_ack);
  a_len_ok: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> len <= 32'd128 && len[2:0] == 3'd0);
endmodule
