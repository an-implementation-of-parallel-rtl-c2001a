// tb_bus_master: testbench-only bus master. Its read and write tasks, called
// hierarchically, perform single-beat transfers on the on-chip bus protocol:
// the request is raised at a falling edge and dropped at the first falling
// edge at which the acknowledge is high. It also counts the
// clocks each transfer waited.
module tb_bus_master
  import dna_pkg::*;
(
  input  logic     clk,
  output bus_req_t req,
  input  bus_rsp_t rsp
);
  int last_wait = 0;

  initial req = '0;

  task automatic write(input logic [31:0] addr, input logic [127:0] data);
    @(negedge clk);
    req = '{req: 1'b1, we: 1'b1, addr: addr, wdata: data};
    last_wait = 0;
    do begin @(negedge clk); last_wait++; end while (!rsp.ack);
    req.req = 1'b0;
  endtask

  task automatic read(input logic [31:0] addr, output logic [127:0] data);
    @(negedge clk);
    req = '{req: 1'b1, we: 1'b0, addr: addr, wdata: '0};
    last_wait = 0;
    do begin @(negedge clk); last_wait++; end while (!rsp.ack);
    data = rsp.rdata;
    req.req = 1'b0;
  endtask
endmodule
