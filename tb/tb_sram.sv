// tb_sram: random byte-lane writes and reads of a 2K x 16 and an 8K x 24
// array compared with a model array.
module tb_sram;
  logic clk = 0;
  logic [1:0] we = '0;
  logic [10:0] addr = '0;
  logic [15:0] wdata = '0, rdata;
  logic [2:0] we3 = '0;
  logic [12:0] addr3 = '0;
  logic [23:0] wdata3 = '0, rdata3;
  logic [15:0] m16 [2048];
  logic [23:0] m24 [8192];
  bit   v16 [2048];
  bit   v24 [8192];
  int checks = 0, failures = 0;

  sram dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));
  sram #(.WORDS(8192), .WIDTH(24)) dut3 (.clk(clk), .we(we3), .addr(addr3), .wdata(wdata3), .rdata(rdata3));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word once so all reads are defined
    for (int i = 0; i < 8192; i++) begin
      @(negedge clk);
      addr = 11'(i); wdata = 16'(i * 3); we = (i < 2048) ? 2'b11 : 2'b00;
      addr3 = 13'(i); wdata3 = 24'(i * 5); we3 = 3'b111;
      if (i < 2048) begin m16[i] = 16'(i * 3); v16[i] = 1; end
      m24[i] = 24'(i * 5); v24[i] = 1;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = 11'($urandom); we = 2'($urandom); wdata = 16'($urandom);
      addr3 = 13'($urandom); we3 = 3'($urandom); wdata3 = 24'($urandom);
      #1;
      checks += 2;
      if (rdata !== m16[addr]) begin failures++; $display("FAIL 16 a=%h %h/%h", addr, rdata, m16[addr]); end
      if (rdata3 !== m24[addr3]) begin failures++; $display("FAIL 24 a=%h %h/%h", addr3, rdata3, m24[addr3]); end
      for (int b = 0; b < 2; b++) if (we[b]) m16[addr][b*8 +: 8] = wdata[b*8 +: 8];
      for (int b = 0; b < 3; b++) if (we3[b]) m24[addr3][b*8 +: 8] = wdata3[b*8 +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
