// Input-port bundle of the packet switch, as seen by the testbench.
// A packet is sent one byte per clock on data while data_status is high.
// The driver marks the final byte with pkt_end; the assertion checks that
// data_status is low in the clock after it, the idle gap the switch needs
// to tell one packet from the next.
interface switch_in_if (input logic clk);
  logic       data_status;
  logic [7:0] data;
  logic       pkt_end;

  a_gap_after_packet: assert property (@(posedge clk) pkt_end |=> !data_status);
endinterface
