// me_accel_tb: drives the motion estimation accelerator through its shared
// BRAM exactly as the application does: writes a macroblock and a search area
// through the CPU port, sets the ready bit, polls for done and reads the
// result. Search areas are random with the macroblock planted (plus noise) at
// a random displacement, and one flat picture checks the tie rule. Results are
// compared with a software full search; the cycles from the ready write to the
// done write are checked against the design's schedule (822) and against the
// 18 us the document reports for the computation (1800 cycles at 100 MHz).
module me_accel_tb;
  import osif_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [8:0]  a_addr, b_addr;
  logic        a_en, b_we, busy;
  logic [3:0]  a_we;
  logic [31:0] a_wdata, a_rdata, b_wdata, b_rdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  me_bram u_ram (.clk, .a_addr, .a_en, .a_we, .a_wdata, .a_rdata,
                 .b_addr, .b_we, .b_wdata, .b_rdata);
  me_accel dut (.clk, .rst_n, .bram_addr(b_addr), .bram_we(b_we),
                .bram_wdata(b_wdata), .bram_rdata(b_rdata), .busy);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_write(input int addr, input logic [31:0] d);
    a_addr = 9'(addr); a_wdata = d; a_we = 4'hF; a_en = 1;
    @(posedge clk); #1;
    a_we = 0; a_en = 0;
  endtask

  task automatic cpu_read(input int addr, output logic [31:0] d);
    a_addr = 9'(addr); a_en = 1;
    @(posedge clk); #1;
    d = a_rdata; a_en = 0;
  endtask

  mb_t mb;
  sa_t sa;

  task automatic run_case(input int kind);
    int pdx, pdy, rdx, rdy, rsad, cycles;
    logic [31:0] w, ctrl;
    byte unsigned flat [964];
    pdx = $urandom_range(0, 15); pdy = $urandom_range(0, 15);
    for (int i = 0; i < 961; i++) sa[i] = (kind == 2) ? 8'd100 : 8'($urandom);
    for (int i = 0; i < 256; i++) mb[i] = (kind == 2) ? 8'd100 : 8'($urandom);
    if (kind == 1)
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          sa[31*(r+pdy) + c + pdx] = 8'(int'(mb[16*r+c]) + $urandom_range(0, 2) > 255 ? 255
                                         : int'(mb[16*r+c]) + $urandom_range(0, 2));
    me_ref(mb, sa, rdx, rdy, rsad);
    for (int i = 0; i < 964; i++) flat[i] = (i < 961) ? sa[i] : 8'd0;
    for (int i = 0; i < 64; i++)
      cpu_write(i, {mb[4*i], mb[4*i+1], mb[4*i+2], mb[4*i+3]});
    for (int i = 0; i < 241; i++)
      cpu_write(64 + i, {flat[4*i], flat[4*i+1], flat[4*i+2], flat[4*i+3]});
    cpu_write(510, 32'h1);
    cycles = 0;
    while (!(b_we && b_addr == 9'd510)) begin
      @(posedge clk); #1;
      cycles++;
    end
    @(posedge clk); #1;
    // software polls the control word
    do cpu_read(510, ctrl); while (ctrl[1] == 1'b0);
    cpu_read(511, w);
    checks += 4;
    if (ctrl !== 32'h2) failures++;
    if ($signed(w[31:24]) !== 8'(rdx - 8) || $signed(w[23:16]) !== 8'(rdy - 8)) begin
      failures++;
      $display("case %0d: mv (%0d,%0d) expected (%0d,%0d)", kind,
               $signed(w[31:24]), $signed(w[23:16]), rdx - 8, rdy - 8);
    end
    if (w[15:0] !== 16'(rsad)) begin
      failures++;
      $display("case %0d: sad %0d expected %0d", kind, w[15:0], rsad);
    end
    if (cycles != 822 || cycles > 1800) begin
      failures++;
      $display("case %0d: %0d cycles", kind, cycles);
    end
    if (kind == 1 && (rdx != pdx || rdy != pdy)) $display("note: planted match not best");
  endtask

  initial begin
    a_en = 0; a_we = 0; a_addr = 0; a_wdata = 0;
    cpu_write(510, 32'h0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk); #1;
    checks++; if (busy) failures++;
    run_case(1);
    run_case(0);
    run_case(1);
    run_case(2);
    repeat (20) @(posedge clk); #1;
    checks++; if (busy) failures++;   // done stays done, no restart
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
