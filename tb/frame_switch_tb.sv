// frame_switch_tb: applies random stream words and stall bits to a switch
// node in both settings and checks every routed signal against the intended
// routing (through the frame when selected, around it otherwise).
module frame_switch_tb;
  import osif_pkg::*;
  logic sel, up_stall_o, dn_stall_i, fr_stall_i, fr_stall_o;
  frame_fwd_t up_i, dn_o, fr_o, fr_i;
  int checks = 0, failures = 0;

  frame_switch dut (.sel, .up_i, .up_stall_o, .dn_o, .dn_stall_i,
                    .fr_o, .fr_stall_i, .fr_i, .fr_stall_o);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      sel = 1'($urandom); dn_stall_i = 1'($urandom); fr_stall_i = 1'($urandom);
      up_i = frame_fwd_t'($urandom); fr_i = frame_fwd_t'($urandom);
      #1;
      checks += 4;
      if (sel) begin
        if (fr_o !== up_i) failures++;
        if (dn_o !== fr_i) failures++;
        if (up_stall_o !== fr_stall_i) failures++;
        if (fr_stall_o !== dn_stall_i) failures++;
      end else begin
        if (fr_o.valid !== 1'b0) failures++;
        if (dn_o !== up_i) failures++;
        if (up_stall_o !== dn_stall_i) failures++;
        if (fr_stall_o !== 1'b1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
