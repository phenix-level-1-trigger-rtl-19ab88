// tb_vme_slave: a small register file behind the slave answers local bus
// requests with a one-clock ack. The test writes and reads back registers at
// the board's base, checks that the local bus sees the right word addresses,
// that another base and a wrong address modifier get no DTACK*, and that the
// read data are driven only during the acknowledged read.
module tb_vme_slave;
  import ll1_pkg::*;
  logic clk = 0, rst_n = 0;   // low from time 0: the first clock edge resets the slave
  logic as_n, write_n, lword_n, data_oe, dtack_n;
  logic [1:0] ds_n;
  logic [5:0] am;
  logic [31:1] addr;
  logic [31:0] data_i, data_o;
  lbus_req_t lreq;
  lbus_rsp_t lrsp;
  int checks = 0, failures = 0;
  logic [31:0] regs [16];
  int wr_seen = 0, rd_seen = 0;

  vme_slave #(.BASE(8'h10)) dut (.*);
  vme_bfm bfm (.as_n, .ds_n, .write_n, .am, .addr, .lword_n, .wdata(data_i),
               .rdata(data_o), .dtack_n);
  always #25 clk = ~clk;

  // register file on the local bus
  always_ff @(posedge clk) if (rst_n) begin
    lrsp.ack <= lreq.wr || lreq.rd;
    if (lreq.wr) begin regs[lreq.addr[3:0]] <= lreq.wdata; wr_seen++; end
    if (lreq.rd) begin lrsp.rdata <= regs[lreq.addr[3:0]] ^ {10'd0, lreq.addr}; rd_seen++; end
  end

  initial begin
    logic [31:0] q;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 16; i++) bfm.write(32'h1000_0000 + 32'(i * 4), 32'hA500_0000 + 32'(i * 3));
    checks++; if (wr_seen != 16) begin failures++; $display("FAIL writes seen %0d", wr_seen); end
    for (int i = 0; i < 16; i++) begin
      bfm.read(32'h1000_0000 + 32'(i * 4), q);
      checks++;
      if (q !== ((32'hA500_0000 + 32'(i * 3)) ^ 32'(i))) begin
        failures++; $display("FAIL read %0d: %h", i, q);
      end
    end
    checks++; if (bfm.timeouts != 0) begin failures++; $display("FAIL timeouts"); end
    // other board: no answer
    bfm.read(32'h1100_0000, q);
    checks++; if (bfm.timeouts != 1) begin failures++; $display("FAIL answered another base"); end
    checks++; if (rd_seen != 16) begin failures++; $display("FAIL local read for another base"); end
    // a high word address
    bfm.write(32'h10ff_fffc, 32'h1234_5678);
    checks++; if (lreq.addr != 22'h3f_ffff) begin failures++; $display("FAIL word address %h", lreq.addr); end
    checks++; if (data_oe) begin failures++; $display("FAIL data driven outside a read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
