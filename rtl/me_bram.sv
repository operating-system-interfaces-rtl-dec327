// me_bram: 2 KByte true dual-port block RAM, 512 words of 32 bits, that the
// CPU and the motion estimation accelerator share.
//
// Port A is the CPU side (reached through the on-chip memory bus) and has
// byte enables; port B is the accelerator side and writes whole words. Each
// port is clocked by the same clock, the accelerator running on the memory's
// clock (the document says the BRAMs run at processor speed). Reads are synchronous: the word at an address
// appears on the read port one clock edge after the address. When both ports
// write the same word on the same edge, port A's bytes win.
//
// Size and width follow the document (one 2 KByte BRAM, 32 bits x 512).
module me_bram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic [AW-1:0] a_addr,
  input  logic          a_en,
  input  logic [3:0]    a_we,      // byte enables, bit 3 = bits 31:24
  input  logic [31:0]   a_wdata,
  output logic [31:0]   a_rdata,
  input  logic [AW-1:0] b_addr,
  input  logic          b_we,
  input  logic [31:0]   b_wdata,
  output logic [31:0]   b_rdata
);
  logic [31:0] mem [DEPTH];

  // port B is written first, so a same-cycle byte write from port A lands last
  always_ff @(posedge clk) begin
    if (b_we) mem[b_addr] <= b_wdata;
    b_rdata <= mem[b_addr];
    if (a_en) begin
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[a_addr];
    end
  end
endmodule
