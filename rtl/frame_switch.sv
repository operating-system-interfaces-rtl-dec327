// frame_switch: one node of the switchable accelerator interconnect.
//
// The data path of the framework is a chain of these nodes between the input
// buffer and the output buffer; each node has a reconfigurable frame attached.
// With sel high the node sends the incoming stream into its frame and passes
// the frame's output on down the chain; with sel low it passes the stream
// straight on and the frame sees no valid data and is held (stall high) on its
// output. Back-pressure follows the same path backwards. The node is purely
// combinational, so switching between resident accelerators costs no cycles;
// sel may only change while no block is in flight.
//
// The nodes and their places in the chain follow the original framework
// design; what a node does (route through or past its frame)
// is this design's reading of it.
module frame_switch
  import osif_pkg::*;
(
  input  logic       sel,
  // upstream side
  input  frame_fwd_t up_i,
  output logic       up_stall_o,
  // downstream side
  output frame_fwd_t dn_o,
  input  logic       dn_stall_i,
  // attached frame: its input ...
  output frame_fwd_t fr_o,
  input  logic       fr_stall_i,
  // ... and its output
  input  frame_fwd_t fr_i,
  output logic       fr_stall_o
);
  always_comb begin
    if (sel) begin
      fr_o       = up_i;
      up_stall_o = fr_stall_i;
      dn_o       = fr_i;
      fr_stall_o = dn_stall_i;
    end else begin
      fr_o       = '{valid: 1'b0, addr: up_i.addr, data: up_i.data};
      up_stall_o = dn_stall_i;
      dn_o       = up_i;
      fr_stall_o = 1'b1;
    end
  end
endmodule
