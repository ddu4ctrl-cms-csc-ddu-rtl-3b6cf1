// tb_sync_fifo: random pushes and pops against a queue model; checks data order, the empty,
// full and almost-full flags and the overflow pulse.
module tb_sync_fifo;
  localparam int D = 8;
  logic clk = 0, rst = 1, push = 0, pop = 0;
  logic [35:0] din, dout;
  logic empty, full, afull, ovf;
  logic [3:0] count;
  logic [35:0] q[$];
  int checks = 0, failures = 0, novf = 0;
  sync_fifo #(.W(36), .DEPTH(D), .AF_LEVEL(6)) dut (.*, .overflow(ovf));
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (empty != (q.size() == 0) || full != (q.size() == D) || afull != (q.size() >= 6)) begin
        failures++; $display("flags size=%0d e%0b f%0b af%0b", q.size(), empty, full, afull);
      end
      if (q.size() > 0) begin checks++; if (dout != q[0]) begin failures++; $display("data"); end end
      push = ($urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30));
      pop  = ($urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70));
      din  = {$urandom, 4'($urandom)};
      #1;
      checks++; if (ovf != (push && q.size() == D)) begin failures++; $display("ovf"); end
      if (push && q.size() == D) novf++;
      @(posedge clk);
      begin
        int pre;
        pre = q.size();
        if (pop && pre > 0) void'(q.pop_front());
        if (push && pre < D) q.push_back(din);
      end
    end
    checks++; if (novf == 0) begin failures++; $display("never overflowed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
