// sys_mem_model: behavioural model of system memory behind the memory
// controller, answering the DMA master port (64-bit words, 8 KB). The address
// is acknowledged 1..4 cycles after the request; read beats and write
// acknowledges then follow with random gaps of 0..2 cycles. A read beat is
// valid in the cycle m_rd_valid is high; a write beat is taken from m_wdata
// in the cycle m_wr_ack is high. mem is open to the testbench by hierarchy.
module sys_mem_model (
  input  logic        clk,
  input  logic        m_req,
  input  logic        m_rnw,
  input  logic [31:0] m_addr,
  input  logic [4:0]  m_beats,
  output logic        m_addr_ack,
  output logic        m_rd_valid,
  output logic [63:0] m_rd_data,
  input  logic [63:0] m_wdata,
  output logic        m_wr_ack
);
  logic [63:0] mem [1024];
  int bursts = 0;

  typedef enum logic [1:0] {M_IDLE, M_ADDR, M_DATA} mstate_t;
  mstate_t st = M_IDLE;
  int delay, issued, taken, nbeats;
  logic rnw;
  logic [9:0] base;

  initial begin
    m_addr_ack = 1'b0;
    m_rd_valid = 1'b0;
    m_rd_data  = '0;
    m_wr_ack   = 1'b0;
  end

  always_ff @(posedge clk) begin
    m_addr_ack <= 1'b0;
    m_rd_valid <= 1'b0;
    m_wr_ack   <= 1'b0;
    if (m_wr_ack) begin
      mem[base + 10'(taken)] <= m_wdata;
      taken <= taken + 1;
    end
    unique case (st)
      M_IDLE: if (m_req) begin
        st     <= M_ADDR;
        delay  <= $urandom_range(0, 3);
        rnw    <= m_rnw;
        base   <= m_addr[12:3];
        nbeats <= int'(m_beats);
      end
      M_ADDR: if (delay == 0) begin
        m_addr_ack <= 1'b1;
        st         <= M_DATA;
        issued     <= 0;
        taken      <= 0;
        delay      <= $urandom_range(1, 3);
        bursts     <= bursts + 1;
      end else begin
        delay <= delay - 1;
      end
      M_DATA: if (issued == nbeats) begin
        if (!m_wr_ack) st <= M_IDLE;
      end else if (delay == 0) begin
        if (rnw) begin
          m_rd_valid <= 1'b1;
          m_rd_data  <= mem[base + 10'(issued)];
        end else begin
          m_wr_ack <= 1'b1;
        end
        issued <= issued + 1;
        delay  <= $urandom_range(0, 2);
      end else begin
        delay <= delay - 1;
      end
      default: st <= M_IDLE;
    endcase
  end
endmodule
