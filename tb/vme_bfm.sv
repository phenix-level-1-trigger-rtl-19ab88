// vme_bfm: simulation-only VME master for the testbenches. It drives A32/D32
// single-cycle transfers (address modifier 0x09): address and AS*, then data
// strobes, waits for DTACK*, samples read data, releases the strobes and waits
// for DTACK* to go away. A transfer without DTACK* within 2000 steps of
// 10 ns counts as a timeout.
module vme_bfm (
  output logic        as_n,
  output logic [1:0]  ds_n,
  output logic        write_n,
  output logic [5:0]  am,
  output logic [31:1] addr,
  output logic        lword_n,
  output logic [31:0] wdata,
  input  logic [31:0] rdata,
  input  logic        dtack_n
);
  int timeouts = 0;
  int cycles = 0;

  initial begin
    as_n = 1; ds_n = 2'b11; write_n = 1; am = 6'h09; addr = '0; lword_n = 0; wdata = '0;
  end

  task automatic xfer(input logic [31:0] a, input bit wr, input logic [31:0] d, output logic [31:0] q);
    int n;
    addr = a[31:1]; write_n = !wr; wdata = d; am = 6'h09; lword_n = 0;
    #10 as_n = 0;
    #10 ds_n = 2'b00;
    n = 0;
    while (dtack_n && n < 2000) begin #10; n++; end
    if (n >= 2000) timeouts++;
    q = rdata;
    #10 ds_n = 2'b11; as_n = 1;
    n = 0;
    while (!dtack_n && n < 2000) begin #10; n++; end
    write_n = 1;
    cycles++;
  endtask

  task automatic write(input logic [31:0] a, input logic [31:0] d);
    logic [31:0] q;
    xfer(a, 1, d, q);
  endtask

  task automatic read(input logic [31:0] a, output logic [31:0] q);
    xfer(a, 0, '0, q);
  endtask
endmodule
