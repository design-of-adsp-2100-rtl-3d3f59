// tb_host_interface: host I/O cycles against the interface card: control
// register writes at 301H (and none at other ports), status reads at 302H,
// the XFIFO write strobe at 300H (on writes only), IOCS16# at 300H, the full-flag interrupt and
// the master chip select.
module tb_host_interface;
  logic clk = 0, rst_n = 0;
  logic [19:0] sa = '0;
  logic aen = 0, iow_n = 1, ior_n = 1;
  logic [15:0] sd_w = '0;
  logic [7:0] sd_r, cr;
  logic sd_oe, iocs16_n, irq, wrxf1_n, mcs_n;
  logic [4:0] dip = 5'b0_1010;
  logic bgh_n = 1, traph = 0, ffh_n = 1;
  int checks = 0, failures = 0;
  int strobes = 0;

  host_interface dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) if (!wrxf1_n) strobes++;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  task automatic io_wr(logic [9:0] port, logic [15:0] d);
    @(negedge clk); sa = {10'h0, port}; sd_w = d; iow_n = 0;
    @(negedge clk); iow_n = 1;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(cr, 8'h63, "reset value");
    io_wr(10'h301, 16'h0061); chk(cr, 8'h61, "CR write 61H");
    io_wr(10'h302, 16'h0055); chk(cr, 8'h61, "no CR write at 302H");
    io_wr(10'h300, 16'h00AA); chk(cr, 8'h61, "no CR write at 300H");
    chk(strobes, 1, "one XFIFO strobe");
    @(negedge clk); sa = 20'h00300; ior_n = 0;
    @(negedge clk); ior_n = 1; sa = 20'h00301;
    chk(strobes, 1, "no XFIFO strobe on a read of 300H");
    // status register
    @(negedge clk); sa = 20'h00302; ior_n = 0; bgh_n = 0; traph = 1; ffh_n = 0; #1;
    chk({sd_oe, sd_r}, {1'b1, 8'b0000_0010}, "status read");
    bgh_n = 1; traph = 0; ffh_n = 1; #1;
    chk({sd_oe, sd_r}, {1'b1, 8'b0000_0101}, "status read 2");
    @(negedge clk); ior_n = 1; #1; chk(sd_oe, 0, "status idle");
    // IOCS16# on port 300H only
    sa = 20'h00300; #1; chk(iocs16_n, 0, "IOCS16 at 300H");
    sa = 20'h00301; #1; chk(iocs16_n, 1, "IOCS16 at 301H");
    aen = 1; sa = 20'h00300; #1; chk(iocs16_n, 1, "IOCS16 with AEN"); aen = 0;
    // interrupt: full flag sampled at the next I/O write
    ffh_n = 0; #1; chk(irq, 0, "irq before write");
    io_wr(10'h300, 16'h1234); @(negedge clk); chk(irq, 1, "irq after write while full");
    ffh_n = 1; @(negedge clk); chk(irq, 1, "irq held");
    io_wr(10'h300, 16'h1235); @(negedge clk); chk(irq, 0, "irq cleared");
    // master chip select: A0000H..AFFFFH with AEN low
    sa = 20'hA1234; #1; chk(mcs_n, 0, "MCS in segment A");
    sa = 20'hB1234; #1; chk(mcs_n, 1, "MCS outside");
    aen = 1; sa = 20'hA1234; #1; chk(mcs_n, 1, "MCS with AEN"); aen = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
