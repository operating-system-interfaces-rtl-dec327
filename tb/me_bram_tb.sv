// me_bram_tb: writes random words through both ports, with random byte
// enables on the CPU port, and reads them back through both ports against a
// shadow copy; checks the one-cycle read latency.
module me_bram_tb;
  logic clk = 0;
  logic [8:0] a_addr, b_addr;
  logic a_en, b_we;
  logic [3:0] a_we;
  logic [31:0] a_wdata, a_rdata, b_wdata, b_rdata;
  logic [31:0] shadow [512];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  me_bram dut (.clk, .a_addr, .a_en, .a_we, .a_wdata, .a_rdata,
               .b_addr, .b_we, .b_wdata, .b_rdata);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // fill all words from port B
    for (int i = 0; i < 512; i++) begin
      b_addr = 9'(i); b_wdata = $urandom; b_we = 1; shadow[i] = b_wdata;
      @(posedge clk); #1;
    end
    b_we = 0;
    // byte writes from port A
    for (int i = 0; i < 2000; i++) begin
      a_addr = 9'($urandom); a_wdata = $urandom; a_we = 4'($urandom); a_en = 1;
      for (int j = 0; j < 4; j++) if (a_we[j]) shadow[a_addr][8*j +: 8] = a_wdata[8*j +: 8];
      @(posedge clk); #1;
    end
    a_we = 0;
    // read back through both ports
    for (int i = 0; i < 512; i++) begin
      a_addr = 9'(i); b_addr = 9'(511 - i); a_en = 1;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== shadow[i]) failures++;
      if (b_rdata !== shadow[511 - i]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
