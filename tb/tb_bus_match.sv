// tb_bus_match: 16-to-64 and 8-to-16 versions: random narrow words with random enables must come
// out as wide words, lowest lane first, with one valid pulse per wide word.
module tb_bus_match;
  logic clk = 0, clr = 1, ce = 0, ce8 = 0;
  logic [15:0] din; logic [7:0] din8;
  logic [63:0] dout; logic [15:0] dout8;
  logic valid, valid8;
  int checks = 0, failures = 0, nw = 0;
  bus_match #(.IN_W(16), .OUT_W(64)) dut (.clk(clk), .clr(clr), .ce(ce), .din(din), .dout(dout), .valid(valid));
  bus_match #(.IN_W(8), .OUT_W(16)) dut8 (.clk(clk), .clr(clr), .ce(ce8), .din(din8), .dout(dout8), .valid(valid8));
  always #5 clk = ~clk;
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  logic [63:0] exp64; int lane; logic [15:0] exp16; int lane8;
  initial begin
    repeat (2) @(posedge clk); @(negedge clk); clr = 0; lane = 0; lane8 = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      ce = $urandom_range(0, 1); din = 16'($urandom);
      ce8 = $urandom_range(0, 1); din8 = 8'($urandom);
      @(posedge clk); #1;
      if (ce) begin
        exp64[16*lane +: 16] = din; lane++;
        checks++;
        if (lane == 4) begin
          lane = 0; nw++;
          if (!valid || dout != exp64) begin failures++; $display("64: %h exp %h v%b", dout, exp64, valid); end
        end else if (valid) failures++;
      end else begin checks++; if (valid) failures++; end
      if (ce8) begin
        exp16[8*lane8 +: 8] = din8; lane8++;
        checks++;
        if (lane8 == 2) begin
          lane8 = 0;
          if (!valid8 || dout8 != exp16) failures++;
        end else if (valid8) failures++;
      end
    end
    checks++; if (nw < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
