// tb_accept_fifo: drives a numbered crossing into accept_fifo every clock and
// raises l1_accept at random, with a cycle-accurate reference model kept in
// the testbench: the crossing presented l1_delay clocks before an accept must
// be pushed, the show-ahead output must be the oldest held crossing, full and
// empty must follow the number of held entries, and an accept while full must
// only be counted in dropped. The run has phases with light and heavy accept
// rates, slow and fast readout (so the FIFO fills and overflows), and several
// l1_delay values. Every output is compared on every clock.
// Timing: clock 10 ns; inputs change on the falling edge.
module tb_accept_fifo;
  localparam int W = 16, D = 4, DLY = 64;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] din = '0, dout;
  logic l1_accept = 0, rd_en = 0, empty, full;
  logic [5:0] l1_delay = 6'd40;
  logic [15:0] dropped;
  int checks = 0, failures = 0;

  accept_fifo #(.W(W), .DEPTH(D), .DLY_DEPTH(DLY)) dut (.*);
  always #5 clk = ~clk;

  // reference model, updated on the rising edge from the stable inputs
  logic [W-1:0] hist [4096];   // din seen at every rising edge since reset
  int nh = 0;
  logic [W-1:0] q [$];         // crossings held
  int model_dropped = 0;
  int n_push = 0, n_drop = 0, n_pop = 0, n_full = 0;
  always @(posedge clk) if (rst_n) begin
    automatic int d = 32'(l1_delay);
    automatic logic [W-1:0] v;
    hist[nh % 4096] = din;
    if (l1_accept) begin
      if (q.size() == D) begin model_dropped++; n_drop++; end
      else begin v = hist[(nh - d) % 4096]; q.push_back(v); n_push++; end
    end
    if (rd_en && q.size() > 0) begin void'(q.pop_front()); n_pop++; end
    nh++;
  end

  // compare every output on the falling edge, before the inputs change
  task automatic compare();
    checks++;
    if (empty !== (q.size() == 0) || full !== (q.size() == D)) begin
      failures++; $display("FAIL flags empty=%b full=%b held=%0d", empty, full, q.size());
    end
    if (q.size() > 0) begin
      checks++;
      if (dout !== q[0]) begin failures++; $display("FAIL dout %0d exp %0d", dout, q[0]); end
    end
    checks++;
    if (dropped !== 16'(model_dropped)) begin
      failures++; $display("FAIL dropped %0d exp %0d", dropped, model_dropped);
    end
    if (full) n_full++;
  endtask

  // one phase: accept with probability pa/16, read with probability pr/16
  task automatic phase(int cycles, int pa, int pr);
    repeat (cycles) begin
      @(negedge clk);
      compare();
      din       <= din + 1'b1;
      l1_accept <= ($urandom_range(15) < pa);
      rd_en     <= !empty && ($urandom_range(15) < pr);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    phase(DLY, 0, 0);              // fill the delay memory before any accept
    phase(300, 3, 12);             // light load, fast readout
    l1_delay = 6'd5;
    phase(200, 12, 2);             // heavy load, slow readout: overflow
    l1_delay = 6'd63;
    phase(200, 6, 6);
    l1_delay = 6'd1;
    phase(200, 8, 8);
    phase(60, 0, 16);              // drain
    checks++;
    if (n_push < 100 || n_drop < 10 || n_full < 10) begin
      failures++; $display("FAIL too few events: push=%0d drop=%0d full=%0d", n_push, n_drop, n_full);
    end
    $display("accepted=%0d dropped=%0d read=%0d full-cycles=%0d", n_push, n_drop, n_pop, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
