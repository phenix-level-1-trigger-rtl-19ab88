// tb_bit_mask: writes a random mask 32 bits at a time, drives random data and
// checks data_out == previous data_in & ~mask every clock, plus mask read-back.
module tb_bit_mask;
  localparam int W = 100;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] data_in = '0, data_out;
  logic mask_we = 0;
  logic [5:0] mask_chunk = '0;
  logic [31:0] mask_wdata = '0, mask_rdata;
  int checks = 0, failures = 0;
  logic [127:0] mask_ref = '0;

  bit_mask #(.W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check_stream(int n);
    logic [W-1:0] prev;
    prev = data_in;
    repeat (n) begin
      @(negedge clk);
      checks++;
      if (data_out !== (prev & ~mask_ref[W-1:0])) begin
        failures++; $display("FAIL out %h exp %h", data_out, prev & ~mask_ref[W-1:0]);
      end
      data_in = {$urandom, $urandom, $urandom, $urandom};
      prev = data_in;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    data_in = {$urandom, $urandom, $urandom, $urandom};
    @(negedge clk);
    check_stream(10);                       // reset mask: all pass
    for (int c = 0; c < 4; c++) begin
      mask_we = 1; mask_chunk = 6'(c); mask_wdata = $urandom;
      mask_ref[c*32 +: 32] = mask_wdata;
      @(negedge clk);
    end
    mask_we = 0;
    @(negedge clk);
    check_stream(20);
    for (int c = 0; c < 4; c++) begin
      mask_chunk = 6'(c); #1;
      checks++;
      if (mask_rdata !== mask_ref[c*32 +: 32]) begin
        failures++; $display("FAIL readback chunk %0d", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
