// tb_muid_logical_tubes: random physical hit patterns; each logical tube must
// equal the OR of its panel tubes (reference computed here from the map
// g*NOR*NLT + k*NLT + t), one clock after the input.
module tb_muid_logical_tubes;
  localparam int GAPS = 5, NLT = 16, NOR = 3;
  logic clk = 0, rst_n = 0;
  logic [GAPS*NOR*NLT-1:0] phys = '0;
  logic [GAPS*NLT-1:0] ltube;
  int checks = 0, failures = 0;

  muid_logical_tubes #(.GAPS(GAPS), .NLT(NLT), .NOR(NOR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) begin
      logic [GAPS*NOR*NLT-1:0] p;
      for (int i = 0; i < GAPS*NOR*NLT; i++) p[i] = ($urandom % 10) == 0;  // sparse hits
      phys = p;
      @(negedge clk);
      for (int g = 0; g < GAPS; g++)
        for (int t = 0; t < NLT; t++) begin
          bit e;
          e = p[g*NOR*NLT + t] | p[g*NOR*NLT + NLT + t] | p[g*NOR*NLT + 2*NLT + t];
          checks++;
          if (ltube[g*NLT + t] !== e) begin
            failures++; $display("FAIL gap %0d tube %0d", g, t);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
