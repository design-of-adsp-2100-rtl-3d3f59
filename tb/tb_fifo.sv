// tb_fifo: random writes and reads against a queue model (flags, data,
// ignored writes when full and reads when empty), then retransmit. Run at
// DEPTH 16 so that full and empty are reached often; a second instance at
// the default depth is filled to its 1024-word limit.
module tb_fifo;
  logic clk = 0, rst_n = 0;
  logic wr_n = 1, rd_n = 1, rt_n = 1;
  logic [15:0] din = '0, dout;
  logic ef_n, ff_n;
  logic wr2_n = 1, ef2_n, ff2_n;
  logic [15:0] dout2;
  int checks = 0, failures = 0;
  logic [15:0] q[$];
  logic [15:0] hist[$];

  fifo #(.DEPTH(16), .WIDTH(16)) dut (.*);
  fifo big (.clk(clk), .rst_n(rst_n), .wr_n(wr2_n), .rd_n(1'b1), .rt_n(1'b1), .din(din),
            .dout(dout2), .ef_n(ef2_n), .ff_n(ff2_n));
  always #5 clk = ~clk;

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s got %h exp %h t=%0t", what, got, exp, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk({ef_n, ff_n}, 2'b01, "flags after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      chk(ef_n, q.size() != 0, "ef_n");
      chk(ff_n, q.size() != 16, "ff_n");
      if (q.size() != 0) chk(dout, q[0], "head");
      wr_n = ($urandom % 100) < (i < 1500 ? 60 : 40) ? 0 : 1;
      rd_n = ($urandom % 100) < (i < 1500 ? 40 : 60) ? 0 : 1;
      din = 16'($urandom);
      @(posedge clk);
      // model: read and write both act on the state before the edge
      begin
        bit can_rd, can_wr;
        can_rd = q.size() != 0;
        can_wr = q.size() != 16;
        if (!rd_n && can_rd) void'(q.pop_front());
        if (!wr_n && can_wr) q.push_back(din);
      end
    end
    // retransmit: reset, write 10 words, read 4, retransmit, read all 10
    @(negedge clk); wr_n = 1; rd_n = 1; rst_n = 0; @(negedge clk); rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      din = 16'(i * 7 + 1); wr_n = 0; @(negedge clk);
    end
    wr_n = 1;
    for (int i = 0; i < 4; i++) begin rd_n = 0; @(negedge clk); end
    rd_n = 1; rt_n = 0; @(negedge clk); rt_n = 1;
    for (int i = 0; i < 10; i++) begin
      chk(dout, 16'(i * 7 + 1), "retransmit data");
      rd_n = 0; @(negedge clk);
    end
    rd_n = 1; chk(ef_n, 0, "empty after retransmitted reads");
    // default depth: 1024 words fill it
    for (int i = 0; i < 1024; i++) begin
      chk(ff2_n, 1, "big not full");
      wr2_n = 0; @(negedge clk);
    end
    wr2_n = 1;
    chk(ff2_n, 0, "big full at 1024");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
