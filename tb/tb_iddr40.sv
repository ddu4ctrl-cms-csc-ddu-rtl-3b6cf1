// tb_iddr40: drives different values before each falling and each rising edge and checks that
// the 80-bit word holds {rising sample, preceding falling sample}.
module tb_iddr40;
  logic clk = 1, clr = 1;
  logic [39:0] din;
  logic [79:0] q;
  int checks = 0, failures = 0;
  iddr40 dut (.*);
  initial begin #1_000_000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  initial begin
    logic [39:0] a, b;
    din = 0;
    #3 clr = 0;
    for (int t = 0; t < 500; t++) begin
      a = {8'($urandom), $urandom}; b = {8'($urandom), $urandom};
      din = a; #5 clk = 0;       // falling edge samples a
      #2 din = b; #3 clk = 1;    // rising edge samples b
      #1;
      checks++; if (q != {b, a}) begin failures++; $display("q %h exp %h", q, {b, a}); end
      #1;
    end
    clr = 1; #1; checks++; if (q != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
