// Memory-port bundle of the packet switch, as seen by the testbench.
// mem_en high opens an access; mem_rd_wr high writes mem_data into the
// address entry of port mem_add, low reads it back on mem_rdata one clock
// later. The assertion checks that the port number is in range.
interface switch_mem_if #(parameter int unsigned NUM_PORTS = 4) (input logic clk);
  logic                         mem_en;
  logic                         mem_rd_wr;
  logic [$clog2(NUM_PORTS)-1:0] mem_add;
  logic [7:0]                   mem_data;
  logic [7:0]                   mem_rdata;

  a_port_in_range: assert property (@(posedge clk) mem_en |-> 32'(mem_add) < NUM_PORTS);
endinterface
