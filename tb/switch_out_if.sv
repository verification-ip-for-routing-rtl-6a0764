// Output-port bundle of the packet switch, as seen by the testbench.
// The switch raises ready while a packet is on offer; each clock edge that
// samples ready and read high moves one byte onto data. The assertion
// checks that data changes only at such an edge.
interface switch_out_if (input logic clk);
  logic       ready;
  logic       read;
  logic [7:0] data;

  a_data_held: assert property (@(posedge clk) !(ready && read) |=> $stable(data));
endinterface
